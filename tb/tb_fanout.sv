// tb_fanout: self-checking testbench of the token fanout.
//
// Applies random write requests, data and per-branch full flags to a fanout
// of three branches and checks that the port reports full exactly when some
// branch is full, that a write reaches every branch only when none is full,
// and that every branch sees the port's data.
module tb_fanout;
  localparam int unsigned WIDTH = 16;
  localparam int unsigned N     = 3;

  logic                    wr, full;
  logic [WIDTH-1:0]        wdata;
  logic [N-1:0]            q_wr, q_full;
  logic [N-1:0][WIDTH-1:0] q_wdata;
  int checks = 0, failures = 0, n_stall = 0, n_pass = 0;

  fanout #(.WIDTH(WIDTH), .N(N)) dut (
    .wr(wr), .wdata(wdata), .full(full), .q_wr(q_wr), .q_wdata(q_wdata), .q_full(q_full)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      logic any_full;
      wr     = $urandom_range(0, 1) != 0;
      wdata  = WIDTH'($urandom());
      q_full = N'($urandom_range(0, 7) < 5 ? 0 : $urandom());
      #1;
      any_full = 1'b0;
      for (int i = 0; i < N; i++) if (q_full[i]) any_full = 1'b1;
      checks++;
      if (full !== any_full) begin failures++; $display("FAIL full=%0b q_full=%b", full, q_full); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (q_wr[i] !== (wr && !any_full) || q_wdata[i] !== wdata) begin
          failures++;
          $display("FAIL branch %0d wr=%0b data=%h", i, q_wr[i], q_wdata[i]);
        end
      end
      if (wr && any_full) n_stall++;
      if (wr && !any_full) n_pass++;
    end
    checks++;
    if (n_stall == 0 || n_pass == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

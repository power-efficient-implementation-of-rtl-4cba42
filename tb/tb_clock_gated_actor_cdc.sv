// tb_clock_gated_actor_cdc: end-to-end test of an actor slot whose consumers
// run on an unrelated clock (SYNC_STAGES = 2).
//
// The slot's source clock has a period of 8 time units; the three consumers
// share a read clock of period 12 whose edges never coincide with it. The
// upstream producer runs on the slot's source clock. The behavioural actor
// (x+1 to port 0, ~x to port 1 for even x) is clocked by the gated actor
// clock. The consumers first read slowly, so that the output queues fill and
// the actor's clock is gated and re-enabled across the clock boundary, then
// fast; finally the producer stops and every token must arrive in order.
module tb_clock_gated_actor_cdc;
  localparam int unsigned WIDTH = 32;

  logic clk = 1'b0, rsrc = 1'b0;
  logic rst;
  logic actor_clk, clock_enable;
  logic in_wr, in_full, in_afull, in_rd, in_empty;
  logic [WIDTH-1:0] in_wdata, in_rdata;
  logic [1:0] out_wr, out_full;
  logic [1:0][WIDTH-1:0] out_wdata;
  logic [1:0][1:0] q_rd, q_empty;
  logic [1:0][1:0][WIDTH-1:0] q_rdata;
  logic fire;
  int   fires;
  int   checks = 0, failures = 0;

  clock_gated_actor #(.SYNC_STAGES(2)) dut (
    .clk(clk), .rst(rst), .cg_sel(1'b1),
    .actor_clk(actor_clk), .clock_enable(clock_enable),
    .in_wclk(clk), .in_wclk_src(clk), .in_wr(in_wr), .in_wdata(in_wdata),
    .in_full(in_full), .in_afull(in_afull),
    .in_rd(in_rd), .in_rdata(in_rdata), .in_empty(in_empty),
    .out_wr(out_wr), .out_wdata(out_wdata), .out_full(out_full),
    .q_rclk({4{rsrc}}), .q_rd(q_rd), .q_rdata(q_rdata), .q_empty(q_empty)
  );

  actor_model #(.WIDTH(WIDTH)) u_actor (
    .clk(actor_clk), .in_rdata(in_rdata), .in_empty(in_empty), .in_rd(in_rd),
    .out_wr(out_wr), .out_wdata(out_wdata), .out_full(out_full),
    .fire(fire), .fires(fires)
  );

  always #4 clk = ~clk;
  initial begin
    #1;
    forever #6 rsrc = ~rsrc;
  end

  int n_gated = 0, n_reenable = 0;
  logic prev_pulse = 1'b1;
  always @(posedge clk) if (!rst) begin
    #1;
    if (!actor_clk) n_gated++;
    if (actor_clk && !prev_pulse) n_reenable++;
    prev_pulse = actor_clk;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Producer on the slot's clock.
  int unsigned next_x = 0;
  bit          producing = 1'b1;
  initial begin
    in_wr = 1'b0; in_wdata = '0;
    @(posedge rst);
    @(negedge rst);
    forever begin
      @(negedge clk);
      in_wr    = producing && !in_full;
      in_wdata = next_x;
      if (in_wr) next_x++;
    end
  end

  // Consumers on the unrelated read clock.
  int unsigned exp_x [3] = '{0, 0, 0};
  int          received [3] = '{0, 0, 0};
  int          rprob = 10;
  initial begin
    q_rd = '0;
    @(posedge rst);
    @(negedge rst);
    forever begin
      @(negedge rsrc);
      for (int c = 0; c < 3; c++) begin
        int p, i;
        logic [WIDTH-1:0] expv;
        p = (c == 2) ? 1 : 0;
        i = (c == 1) ? 1 : 0;
        q_rd[p][i] = !q_empty[p][i] && ($urandom_range(0, 99) < (c == 2 ? rprob / 2 : rprob));
        if (q_rd[p][i]) begin
          expv = (c < 2) ? WIDTH'(exp_x[c] + 1) : ~WIDTH'(exp_x[c]);
          checks++;
          if (q_rdata[p][i] !== expv) begin
            failures++;
            $display("FAIL t=%0t consumer %0d got %h expected %h", $time, c, q_rdata[p][i], expv);
          end
          exp_x[c] += (c < 2) ? 1 : 2;
          received[c]++;
        end
      end
    end
  end

  initial begin
    rst = 1'b0; #1;
    rst = 1'b1;
    #40;
    rst = 1'b0;
    rprob = 10;
    #40000;
    rprob = 100;
    #20000;
    producing = 1'b0;
    #4000;
    checks++;
    if (received[0] != int'(next_x) || received[1] != int'(next_x) ||
        received[2] != int'((next_x + 1) / 2) || fires != int'(next_x)) begin
      failures++;
      $display("FAIL drain: produced %0d fired %0d received %0d %0d %0d",
               next_x, fires, received[0], received[1], received[2]);
    end
    checks++;
    if (n_gated == 0 || n_reenable == 0) begin
      failures++;
      $display("FAIL actor clock never gated and re-enabled");
    end
    $display("produced=%0d gated cycles=%0d re-enables=%0d", next_x, n_gated, n_reenable);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

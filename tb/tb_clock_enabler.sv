// tb_clock_enabler: self-checking testbench of the clock enabler circuit.
//
// Uses the default configuration: output port 0 with a fanout of two queues
// and output port 1 with one queue. The fill level of each of the three
// queues (eight slots) follows its own random walk; F and AF are derived from
// it. A reference model runs one controller table per queue, combines the
// enables (AND over the fanout of port 0, OR with port 1), delays the result
// by one flip-flop and predicts for every rising clock edge whether the gated
// clock pulses. cg_sel is dropped for a while to check that an actor not
// selected for gating keeps its clock. Coverage counts the cases where the
// OR keeps the clock on, the AND turns it off, and the clock is gated and
// re-enabled.
module tb_clock_enabler;
  import cg_pkg::*;

  localparam int unsigned NQ = 3;     // queues: {port0.0, port0.1, port1.0}

  logic clk = 1'b0;
  logic reset, cg_sel;
  logic [1:0][1:0] almost_full, full;
  logic clock_enable, clk_out;
  int   checks = 0, failures = 0;

  clock_enabler dut (
    .clk_in(clk), .reset(reset), .cg_sel(cg_sel),
    .almost_full(almost_full), .full(full),
    .clock_enable(clock_enable), .clk_out(clk_out)
  );

  always #5 clk = ~clk;

  int   level [NQ];
  int   st    [NQ];
  logic ref_ce;
  int   n_or_keeps = 0, n_and_stops = 0, n_gated = 0, n_reenable = 0, n_bypass = 0;
  int   pulses = 0, exp_pulses = 0;

  always @(posedge clk_out) pulses++;

  function automatic int nxt(int s, logic f, logic af);
    int code;
    code = f ? 3 : (af ? 1 : 0);
    case (s)
      0:       return (code == 0) ? 1 : 0;
      1, 2:    return (code == 0) ? 1 : (code == 1 ? 2 : 3);
      3, 4:    return (code == 0) ? 1 : (code == 1 ? 4 : 3);
      default: return 0;
    endcase
  endfunction

  function automatic logic en_of(int s);
    return !(s == 2 || s == 3);
  endfunction

  function automatic logic qf(int q);  return level[q] == 8; endfunction
  function automatic logic qaf(int q); return level[q] >= 7; endfunction

  task automatic drive_flags();
    full[0][0] = qf(0); almost_full[0][0] = qaf(0);
    full[0][1] = qf(1); almost_full[0][1] = qaf(1);
    full[1][0] = qf(2); almost_full[1][0] = qaf(2);
    // Entry [1][1] does not exist (port 1 has a fanout of one): drive noise.
    full[1][1] = $urandom_range(0, 1) != 0;
    almost_full[1][1] = $urandom_range(0, 1) != 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_pulse, p0, p1, any, prev_pulse;
    reset = 1'b0; #1;
    reset = 1'b1; cg_sel = 1'b1;
    for (int q = 0; q < NQ; q++) begin level[q] = 0; st[q] = 0; end
    drive_flags();
    ref_ce = 1'b1;
    prev_pulse = 1'b1;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    pulses = 0;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      // Random walk of the fill levels, biased upwards in some phases so
      // that the queues fill up.
      for (int q = 0; q < NQ; q++) begin
        int up;
        up = (((cyc / 300) + q) % 2 == 0) ? 60 : 40;
        if ($urandom_range(0, 99) < up) level[q]++; else level[q]--;
        if (level[q] < 0) level[q] = 0;
        if (level[q] > 8) level[q] = 8;
      end
      cg_sel = !(cyc >= 4000 && cyc < 4400);
      drive_flags();
      @(posedge clk);
      exp_pulse = cg_sel ? ref_ce : 1'b1;
      if (exp_pulse) exp_pulses++;
      // Reference update at this edge.
      p0  = en_of(st[0]) && en_of(st[1]);
      p1  = en_of(st[2]);
      any = p0 || p1;
      if (!p0 && p1) n_or_keeps++;
      if (en_of(st[0]) != en_of(st[1]) && !p1) n_and_stops++;
      ref_ce = any;
      st[0] = nxt(st[0], qf(0), qaf(0));
      st[1] = nxt(st[1], qf(1), qaf(1));
      st[2] = nxt(st[2], qf(2), qaf(2));
      #1;
      checks++;
      if (clk_out !== exp_pulse) begin
        failures++;
        $display("FAIL t=%0t clk_out=%0b expected %0b", $time, clk_out, exp_pulse);
      end
      checks++;
      if (clock_enable !== ref_ce) begin
        failures++;
        $display("FAIL t=%0t clock_enable=%0b expected %0b", $time, clock_enable, ref_ce);
      end
      if (!exp_pulse) n_gated++;
      if (exp_pulse && !prev_pulse) n_reenable++;
      if (!cg_sel && !ref_ce) n_bypass++;
      prev_pulse = exp_pulse;
      @(negedge clk);
    end
    checks++;
    if (pulses != exp_pulses) begin
      failures++;
      $display("FAIL pulses %0d expected %0d", pulses, exp_pulses);
    end
    $display("coverage: or_keeps=%0d and_stops=%0d gated=%0d reenable=%0d bypass=%0d",
             n_or_keeps, n_and_stops, n_gated, n_reenable, n_bypass);
    checks++;
    if (n_or_keeps == 0 || n_and_stops == 0 || n_gated == 0 || n_reenable == 0 || n_bypass == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

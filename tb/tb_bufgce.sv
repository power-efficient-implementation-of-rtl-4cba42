// tb_bufgce: self-checking testbench of the gated clock buffer model.
//
// Toggles CE at random points of the clock period, including while I is high,
// and checks on a fine time grid that O equals I AND the value CE had when I
// last fell (or, while I is low, O is low), that O never rises while I is
// low, and that the number of O pulses matches the enables sampled at the
// falling edges.
module tb_bufgce;
  logic I = 1'b0, CE = 1'b1, O;
  int   checks = 0, failures = 0;
  logic ce_at_fall = 1'b1;
  int   pulses_o = 0, pulses_exp = 0;

  bufgce dut (.I(I), .CE(CE), .O(O));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge O) pulses_o++;

  initial begin
    // Settle the latch with I low and CE high.
    #3;
    for (int cyc = 0; cyc < 400; cyc++) begin
      // Low phase: 10 steps. CE may change anywhere; the value at the end
      // of the low phase is the one that governs the next pulse.
      for (int t = 0; t < 10; t++) begin
        if ($urandom_range(0, 3) == 0) CE = $urandom_range(0, 1) != 0;
        #1;
        checks++;
        if (O !== 1'b0) begin failures++; $display("FAIL t=%0t O high while I low", $time); end
      end
      ce_at_fall = CE;
      I = 1'b1;
      if (ce_at_fall) pulses_exp++;
      // High phase: CE toggles must not reach O.
      for (int t = 0; t < 10; t++) begin
        if ($urandom_range(0, 2) == 0) CE = ~CE;
        #1;
        checks++;
        if (O !== ce_at_fall) begin
          failures++;
          $display("FAIL t=%0t O=%0b expected %0b", $time, O, ce_at_fall);
        end
      end
      I = 1'b0;
    end
    #2;
    checks++;
    if (pulses_o != pulses_exp) begin
      failures++;
      $display("FAIL pulses %0d expected %0d", pulses_o, pulses_exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

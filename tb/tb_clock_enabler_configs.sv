// tb_clock_enabler_configs: checks the clock enabler in the two other gate
// configurations of the clock enabler circuit besides the default one.
//
//   dut_a: one output port with a fanout of two   -> AND of two controllers
//   dut_b: two output ports, each to one queue     -> OR of two controllers
//
// Both DUTs see the same two queue fill levels (eight slots, random walks).
// A reference model per queue follows the controller's transition table; the
// expected registered enable is the AND (dut_a) or the OR (dut_b) of the two
// controller enables, one clock later. The test counts cycles where the two
// configurations disagree, which must happen in both directions.
module tb_clock_enabler_configs;
  import cg_pkg::*;

  logic clk = 1'b0;
  logic reset;
  logic [0:0][1:0] af_a, f_a;
  logic [1:0][0:0] af_b, f_b;
  logic ce_a, ce_b, clk_a, clk_b;
  int   checks = 0, failures = 0;

  clock_enabler #(.NUM_PORTS(1), .MAX_FANOUT(2), .FANOUT('{2, 0, 0, 0, 0, 0, 0, 0})) dut_a (
    .clk_in(clk), .reset(reset), .cg_sel(1'b1), .almost_full(af_a), .full(f_a),
    .clock_enable(ce_a), .clk_out(clk_a)
  );
  clock_enabler #(.NUM_PORTS(2), .MAX_FANOUT(1), .FANOUT('{1, 1, 0, 0, 0, 0, 0, 0})) dut_b (
    .clk_in(clk), .reset(reset), .cg_sel(1'b1), .almost_full(af_b), .full(f_b),
    .clock_enable(ce_b), .clk_out(clk_b)
  );

  always #5 clk = ~clk;

  int level [2];
  int st    [2];
  logic ref_a, ref_b;
  int n_and_only_off = 0, n_gated_a = 0, n_gated_b = 0;

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

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b0; #1;
    reset = 1'b1;
    level = '{0, 0}; st = '{0, 0};
    ref_a = 1'b1; ref_b = 1'b1;
    af_a = '0; f_a = '0; af_b = '0; f_b = '0;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      for (int q = 0; q < 2; q++) begin
        int up;
        up = (((cyc / 250) + q) % 2 == 0) ? 65 : 45;
        if ($urandom_range(0, 99) < up) level[q]++; else level[q]--;
        if (level[q] < 0) level[q] = 0;
        if (level[q] > 8) level[q] = 8;
        f_a[0][q]  = level[q] == 8;  af_a[0][q] = level[q] >= 7;
        f_b[q][0]  = level[q] == 8;  af_b[q][0] = level[q] >= 7;
      end
      @(posedge clk);
      ref_a = en_of(st[0]) && en_of(st[1]);
      ref_b = en_of(st[0]) || en_of(st[1]);
      for (int q = 0; q < 2; q++) st[q] = nxt(st[q], level[q] == 8, level[q] >= 7);
      #1;
      checks += 2;
      if (ce_a !== ref_a) begin failures++; $display("FAIL t=%0t AND config %0b expected %0b", $time, ce_a, ref_a); end
      if (ce_b !== ref_b) begin failures++; $display("FAIL t=%0t OR config %0b expected %0b", $time, ce_b, ref_b); end
      if (!ref_a && ref_b) n_and_only_off++;
      if (!ref_a) n_gated_a++;
      if (!ref_b) n_gated_b++;
      @(negedge clk);
    end
    $display("coverage: AND off / OR on=%0d, AND off=%0d, OR off=%0d", n_and_only_off, n_gated_a, n_gated_b);
    checks++;
    if (n_and_only_off == 0 || n_gated_b == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cg_controller: self-checking testbench of the clock enabling controller.
//
// Drives the full / almost-full inputs first through the walk of the state
// diagram (space, almost full, full, one token consumed, full again, space)
// and then with a random walk of a queue fill level, and after every clock
// compares EN with a reference model kept here as a transition table. Flags
// are changed half a period away from the sampling edge.
module tb_cg_controller;
  import cg_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic full, almost_full;
  logic en;
  int   checks = 0, failures = 0;

  cg_controller dut (.clk(clk), .rst(rst), .full(full), .almost_full(almost_full), .en(en));

  always #5 clk = ~clk;

  // Reference: states numbered 0 INIT, 1 SPACE, 2 AF_DIS, 3 FULL, 4 AF_EN.
  int ref_state;
  function automatic int next_ref(int s, logic f, logic af);
    // index: {F, AF}: 0 = none, 1 = AF only, 3 = F and AF (F implies AF)
    int code;
    code = f ? 3 : (af ? 1 : 0);
    case (s)
      0: return (code == 0) ? 1 : 0;
      1: return (code == 0) ? 1 : (code == 1 ? 2 : 3);
      2: return (code == 0) ? 1 : (code == 1 ? 2 : 3);
      3: return (code == 0) ? 1 : (code == 1 ? 4 : 3);
      4: return (code == 0) ? 1 : (code == 1 ? 4 : 3);
      default: return 0;
    endcase
  endfunction

  function automatic logic ref_en(int s);
    return !(s == 2 || s == 3);
  endfunction

  int visits [5];

  task automatic step(logic f, logic af);
    full        = f;
    almost_full = af | f;
    @(posedge clk);
    ref_state = next_ref(ref_state, full, almost_full);
    visits[ref_state]++;
    #1;
    checks++;
    if (en !== ref_en(ref_state)) begin
      failures++;
      $display("FAIL t=%0t F=%0b AF=%0b state=%0d en=%0b expected %0b",
               $time, full, almost_full, ref_state, en, ref_en(ref_state));
    end
    @(negedge clk);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int level;
    rst = 1'b0; #1;
    rst = 1'b1; full = 1'b1; almost_full = 1'b1;
    ref_state = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // INIT holds EN high while the queue is full.
    step(1, 1); step(1, 1);
    checks++;
    if (dut.state_q != CG_INIT) begin failures++; $display("FAIL: left INIT while full"); end
    // Diagram walk.
    step(0, 0);                       // INIT -> SPACE
    step(0, 1);                       // SPACE -> AFULL_DISABLE, EN low
    checks++;
    if (dut.state_q != CG_AFULL_DISABLE) begin failures++; $display("FAIL: not AFULL_DISABLE"); end
    step(0, 1);                       // stays
    step(1, 1);                       // -> FULL
    step(1, 1);
    step(0, 1);                       // consumed -> AFULL_ENABLE, EN high
    checks++;
    if (dut.state_q != CG_AFULL_ENABLE) begin failures++; $display("FAIL: not AFULL_ENABLE"); end
    step(1, 1);                       // -> FULL
    step(0, 1);                       // -> AFULL_ENABLE
    step(0, 0);                       // -> SPACE
    step(0, 1);                       // -> AFULL_DISABLE
    step(0, 0);                       // -> SPACE
    // Random walk of a fill level of a queue with 8 slots.
    level = 0;
    for (int n = 0; n < 2000; n++) begin
      int d;
      d = int'($urandom_range(0, 2)) - 1;
      level += d;
      if (level < 0) level = 0;
      if (level > 8) level = 8;
      step(level == 8, level >= 7);
    end
    // Asynchronous reset returns to INIT.
    rst = 1'b1; #1;
    ref_state = 0;
    checks++;
    if (dut.state_q != CG_INIT || en !== 1'b1) begin failures++; $display("FAIL: reset"); end
    rst = 1'b0;
    for (int s = 0; s < 5; s++) begin
      checks++;
      if (visits[s] == 0 && s != 0) begin failures++; $display("FAIL: state %0d never visited", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

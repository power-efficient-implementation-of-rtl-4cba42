// tb_clock_gated_actor: end-to-end testbench of one clock-gated actor slot,
// with every parameter of the slot at its default (two output ports, port 0
// with a fanout of two, queues of 16 tokens of 32 bits).
//
// A behavioural actor, clocked only by the gated actor clock, reads token x
// from its input queue and writes x+1 to output port 0 and, for even x, ~x to
// output port 1. It fires only when its input has a token and every port it
// needs for that token has room. An upstream producer on the free-running
// clock writes 0, 1, 2, ... into the input queue; three consumers on the
// free-running clock drain the output queues and check every token.
//
// Phases: (1) fast consumers: no clock may be gated and the actor must fire
// on nearly every cycle (the throughput check); (2) consumers of port 0 slow,
// port 1 fast: port 0 fills, the clock stays on through the OR with port 1
// only while port 1 can take tokens; (3) all consumers slow, port 1 the
// slowest, so that both ports fill: the actor's clock is gated and
// re-enabled; (4) clock gating deselected: the clock must
// never stop; (5) drain: every token produced must arrive. Each mechanism is
// counted and a mechanism that never happened is a failure.
module tb_clock_gated_actor;
  import cg_pkg::*;

  localparam int unsigned WIDTH = 32;

  logic clk = 1'b0;
  logic rst, cg_sel;
  logic actor_clk, clock_enable;
  logic in_wr, in_full, in_afull, in_rd, in_empty;
  logic [WIDTH-1:0] in_wdata, in_rdata;
  logic [1:0] out_wr, out_full;
  logic [1:0][WIDTH-1:0] out_wdata;
  logic [1:0][1:0] q_rclk, q_rd, q_empty;
  logic [1:0][1:0][WIDTH-1:0] q_rdata;
  int checks = 0, failures = 0;

  clock_gated_actor dut (
    .clk(clk), .rst(rst), .cg_sel(cg_sel),
    .actor_clk(actor_clk), .clock_enable(clock_enable),
    .in_wclk(clk), .in_wclk_src(clk), .in_wr(in_wr), .in_wdata(in_wdata), .in_full(in_full), .in_afull(in_afull),
    .in_rd(in_rd), .in_rdata(in_rdata), .in_empty(in_empty),
    .out_wr(out_wr), .out_wdata(out_wdata), .out_full(out_full),
    .q_rclk(q_rclk), .q_rd(q_rd), .q_rdata(q_rdata), .q_empty(q_empty)
  );

  always #5 clk = ~clk;
  assign q_rclk = {4{clk}};

  // ---- behavioural actor (application logic, outside the slot) ----
  logic fire;
  int   fires;
  actor_model #(.WIDTH(WIDTH)) u_actor (
    .clk(actor_clk), .in_rdata(in_rdata), .in_empty(in_empty), .in_rd(in_rd),
    .out_wr(out_wr), .out_wdata(out_wdata), .out_full(out_full),
    .fire(fire), .fires(fires)
  );

  // ---- mechanism counters ----
  int n_gated = 0, n_reenable = 0, n_or_keep = 0, n_fanout_stall = 0;
  int n_bypass = 0, n_in_full = 0;
  int n_state [5];
  int phase = 0;
  logic prev_pulse = 1'b1;
  int gated_in_phase [6];

  always @(posedge clk) if (!rst) begin
    #1;
    if (!actor_clk) begin
      n_gated++;
      gated_in_phase[phase]++;
    end
    if (actor_clk && !prev_pulse) n_reenable++;
    prev_pulse = actor_clk;
    if (actor_clk && out_full[0] && !out_full[1] && !in_empty && !in_rdata[0]) n_or_keep++;
    if (out_full[0] && (dut.q_full[0][0] != dut.q_full[0][1])) n_fanout_stall++;
    if (!cg_sel && !clock_enable && actor_clk) n_bypass++;
    if (in_full) n_in_full++;
    n_state[dut.u_clock_enabler.g_port[0].g_queue[0].g_ctrl.u_ctrl.state_q]++;
    n_state[dut.u_clock_enabler.g_port[0].g_queue[1].g_ctrl.u_ctrl.state_q]++;
    n_state[dut.u_clock_enabler.g_port[1].g_queue[0].g_ctrl.u_ctrl.state_q]++;
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- producer and consumers ----
  int unsigned next_x = 0;
  int unsigned exp_x [3];         // next x expected by each consumer
  int rprob [3];
  int pprob;
  int received [3];

  task automatic consumer(int c, int p, int i);
    logic [WIDTH-1:0] expv;
    q_rd[p][i] = !q_empty[p][i] && ($urandom_range(0, 99) < rprob[c]);
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
  endtask

  initial begin
    int fires0, cyc0;
    rst = 1'b0; #1;
    rst = 1'b1; cg_sel = 1'b1; in_wr = 1'b0; in_wdata = '0; q_rd = '0;
    exp_x = '{0, 0, 0};
    received = '{0, 0, 0};
    pprob = 100;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    fires0 = 0; cyc0 = 0;
    for (int cyc = 0; cyc < 12000; cyc++) begin
      if      (cyc < 2000)  begin phase = 1; rprob = '{100, 100, 100}; pprob = 100; end
      else if (cyc < 4000)  begin phase = 2; rprob = '{10, 10, 100}; pprob = 100; end
      else if (cyc < 7000)  begin phase = 3; rprob = '{15, 15, 4}; pprob = 100; end
      else if (cyc < 9000)  begin phase = 4; rprob = '{10, 10, 10}; pprob = 100; end
      else                  begin phase = 5; rprob = '{100, 100, 100}; pprob = 0; end
      cg_sel = (phase != 4);
      if (cyc == 200)  begin fires0 = fires; cyc0 = cyc; end
      if (cyc == 1800) begin
        // Throughput: with nothing blocking, one firing per cycle.
        checks++;
        if (fires - fires0 < (cyc - cyc0) - 2) begin
          failures++;
          $display("FAIL throughput %0d firings in %0d cycles", fires - fires0, cyc - cyc0);
        end
      end
      in_wr    = !in_full && ($urandom_range(0, 99) < pprob);
      in_wdata = next_x;
      if (in_wr) next_x++;
      consumer(0, 0, 0);
      consumer(1, 0, 1);
      consumer(2, 1, 0);
      @(negedge clk);
    end
    in_wr = 1'b0; q_rd = '0;
    // Everything produced must have arrived, nothing more.
    checks++;
    if (!in_empty || q_empty != 4'b1111 || received[0] != int'(next_x) ||
        received[1] != int'(next_x) || received[2] != int'((next_x + 1) / 2)) begin
      failures++;
      $display("FAIL drain: produced %0d received %0d %0d %0d", next_x,
               received[0], received[1], received[2]);
    end
    $display("tokens produced=%0d firings=%0d", next_x, fires);
    $display("gated=%0d (phase1 %0d, phase4 %0d) reenable=%0d or_keep=%0d fanout_stall=%0d bypass=%0d in_full=%0d",
             n_gated, gated_in_phase[1], gated_in_phase[4], n_reenable, n_or_keep,
             n_fanout_stall, n_bypass, n_in_full);
    $display("controller state cycles: INIT=%0d SPACE=%0d AFULL_DISABLE=%0d FULL=%0d AFULL_ENABLE=%0d",
             n_state[0], n_state[1], n_state[2], n_state[3], n_state[4]);
    // No gating while nothing is full, none while deselected.
    checks++;
    if (gated_in_phase[1] != 0) begin failures++; $display("FAIL clock gated in phase 1"); end
    checks++;
    if (gated_in_phase[4] != 0) begin failures++; $display("FAIL clock gated while deselected"); end
    // Every mechanism happened.
    checks++;
    if (n_gated == 0 || n_reenable == 0 || n_or_keep == 0 || n_fanout_stall == 0 ||
        n_bypass == 0 || n_in_full == 0 || n_state[2] == 0 || n_state[3] == 0 || n_state[4] == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_activation_rate: throttled streaming through clock-gated actor slots,
// each beside an identical slot with clock gating deselected.
//
// Two pairs of slots are run: the default slot (output port 0 with a fanout
// of two, output port 1 direct) and a slot with a single output port of
// fanout two. All slots get the same upstream producer and their consumers
// the same random read pattern. The output is throttled by reading port 0's
// queues in a fraction r of the cycles and port 1's queue in r/2 of them
// (port 1 gets every other token), for r = 100, 50, 25 and 10 percent, one
// run of 4000 cycles each, with a reset in between. For every rate the
// testbench checks the delivered token values and that the gated slot
// delivers no more than its ungated twin and at most 1% fewer, checks that a
// deselected slot never loses a clock pulse, and reports the activation rate
// of each gated actor clock: the fraction of source clock cycles in which it
// pulsed. The single-port slot must be active under half the time at r <= 25%;
// the default slot, whose ports are ORed, stops only while both ports are
// blocked and must do so at least once.
//
// The small loss allowed is real: after a token is taken from a full queue
// the gated clock comes back two source cycles later (controller state, then
// enable flip-flop). In a fanout, one branch can run dry while the other
// holds the actor stopped, and its consumer then waits those extra cycles.
module tb_activation_rate;
  localparam int unsigned WIDTH = 32;
  localparam int          CYCLES = 4000;

  logic clk = 1'b0;
  logic rst;
  int   checks = 0, failures = 0;

  // Index 0: default slot, clock gated; 1: default slot, gating deselected;
  // 2 and 3: the same for a slot with one output port of fanout two.
  logic                       actor_clk [4];
  logic                       ce        [4];
  logic                       in_wr     [4];
  logic [WIDTH-1:0]           in_wdata  [4];
  logic                       in_full   [4];
  logic                       in_afull  [4];
  logic                       in_rd     [4];
  logic [WIDTH-1:0]           in_rdata  [4];
  logic                       in_empty  [4];
  logic [1:0]                 out_wr    [4];
  logic [1:0][WIDTH-1:0]      out_wdata [4];
  logic [1:0]                 out_full  [4];
  logic [1:0][1:0]            q_rd      [4];
  logic [1:0][1:0][WIDTH-1:0] q_rdata   [4];
  logic [1:0][1:0]            q_empty   [4];
  logic                       fire      [4];
  int                         fires     [4];
  logic                       port1_used[4];
  int unsigned                next_x    [4];
  int                         got       [4];
  logic [WIDTH-1:0]           last0     [4];

  always #5 clk = ~clk;

  for (genvar k = 0; k < 4; k++) begin : g_slot
    if (k < 2) begin : g_two_ports
      // Default configuration: port 0 with a fanout of two, port 1 direct.
      clock_gated_actor dut (
        .clk(clk), .rst(rst), .cg_sel(k == 0),
        .actor_clk(actor_clk[k]), .clock_enable(ce[k]),
        .in_wclk(clk), .in_wclk_src(clk), .in_wr(in_wr[k]), .in_wdata(in_wdata[k]), .in_full(in_full[k]),
        .in_afull(in_afull[k]), .in_rd(in_rd[k]), .in_rdata(in_rdata[k]), .in_empty(in_empty[k]),
        .out_wr(out_wr[k]), .out_wdata(out_wdata[k]), .out_full(out_full[k]),
        .q_rclk({4{clk}}), .q_rd(q_rd[k]), .q_rdata(q_rdata[k]), .q_empty(q_empty[k])
      );
      assign port1_used[k] = 1'b1;
    end else begin : g_one_port
      // One output port with a fanout of two; the actor's port 1 is unused.
      clock_gated_actor #(.NUM_PORTS(1), .FANOUT('{2, 0, 0, 0, 0, 0, 0, 0})) dut (
        .clk(clk), .rst(rst), .cg_sel(k == 2),
        .actor_clk(actor_clk[k]), .clock_enable(ce[k]),
        .in_wclk(clk), .in_wclk_src(clk), .in_wr(in_wr[k]), .in_wdata(in_wdata[k]), .in_full(in_full[k]),
        .in_afull(in_afull[k]), .in_rd(in_rd[k]), .in_rdata(in_rdata[k]), .in_empty(in_empty[k]),
        .out_wr(out_wr[k][0]), .out_wdata(out_wdata[k][0]), .out_full(out_full[k][0]),
        .q_rclk({2{clk}}), .q_rd(q_rd[k][0]), .q_rdata(q_rdata[k][0]), .q_empty(q_empty[k][0])
      );
      assign out_full[k][1] = 1'b0;
      assign q_empty[k][1]  = 2'b11;
      assign q_rdata[k][1]  = '0;
      assign port1_used[k]  = 1'b0;
    end
    actor_model #(.WIDTH(WIDTH)) u_actor (
      .clk(actor_clk[k]), .in_rdata(in_rdata[k]), .in_empty(in_empty[k]), .in_rd(in_rd[k]),
      .out_wr(out_wr[k]), .out_wdata(out_wdata[k]), .out_full(out_full[k]),
      .fire(fire[k]), .fires(fires[k])
    );
  end

  int active [4];
  always @(posedge clk) begin
    #1;
    for (int k = 0; k < 4; k++) if (actor_clk[k]) active[k]++;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rates [4];
    int min_active_two;
    rates = '{100, 50, 25, 10};
    min_active_two = CYCLES;
    // Start from a defined level so that the first reset has an edge.
    rst = 1'b0;
    #1;
    foreach (rates[ri]) begin
      int r;
      r = rates[ri];
      rst = 1'b1;
      for (int k = 0; k < 4; k++) begin
        in_wr[k] = 1'b0; in_wdata[k] = '0; q_rd[k] = '0;
        next_x[k] = 0; got[k] = 0; last0[k] = '0;
      end
      repeat (3) @(negedge clk);
      rst = 1'b0;
      active = '{0, 0, 0, 0};
      for (int cyc = 0; cyc < CYCLES; cyc++) begin
        logic r0, r1, r2;
        r0 = $urandom_range(0, 299) < 3 * r;
        r1 = $urandom_range(0, 299) < 3 * r;
        r2 = $urandom_range(0, 199) < r;
        for (int k = 0; k < 4; k++) begin
          in_wr[k]    = !in_full[k];
          in_wdata[k] = next_x[k];
          if (in_wr[k]) next_x[k]++;
          q_rd[k][0][0] = r0 && !q_empty[k][0][0];
          q_rd[k][0][1] = r1 && !q_empty[k][0][1];
          q_rd[k][1][0] = r2 && !q_empty[k][1][0] && port1_used[k];
          q_rd[k][1][1] = 1'b0;
          if (q_rd[k][0][0]) begin
            checks++;
            if (q_rdata[k][0][0] !== WIDTH'(got[k] + 1)) begin
              failures++;
              $display("FAIL slot %0d token %0d = %h", k, got[k], q_rdata[k][0][0]);
            end
            got[k]++;
          end
        end
        @(negedge clk);
      end
      for (int c = 0; c < 4; c += 2) begin
        $display("rate %0d%%, %s: delivered gated=%0d ungated=%0d, gated clock activation %0d.%0d%%",
                 r, c == 0 ? "two ports " : "one port  ", got[c], got[c+1],
                 active[c] * 100 / CYCLES, (active[c] * 1000 / CYCLES) % 10);
        checks++;
        if (got[c] > got[c+1] || got[c] * 100 < got[c+1] * 99) begin
          failures++;
          $display("FAIL throughput lost by clock gating");
        end
        checks++;
        if (active[c+1] != CYCLES) begin
          failures++;
          $display("FAIL deselected slot lost clock pulses");
        end
      end
      // Gating must happen once the output is throttled.
      checks++;
      if (active[0] < min_active_two) min_active_two = active[0];
      if (r <= 25 && active[2] > CYCLES / 2) begin
        failures++;
        $display("FAIL clock not gated at rate %0d", r);
      end
    end
    // The two-port slot is gated only while both ports are blocked at once.
    checks++;
    if (min_active_two == CYCLES) begin
      failures++;
      $display("FAIL two-port slot never gated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

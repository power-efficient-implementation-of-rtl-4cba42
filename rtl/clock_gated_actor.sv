// clock_gated_actor: one actor slot of a clock-gated dataflow network.
//
// An actor of a dataflow network reads tokens from input queues and writes
// tokens to output queues, and blocks while an input is empty or an output is
// full. While its output queues are full it is idle, so its clock can be
// stopped without costing throughput. This module holds everything around an
// actor that makes that happen: the actor's input queue, a fanout per output
// port, the output queues, and the clock enabler that derives the actor's
// gated clock (actor_clk) from the flags of the output queues. The actor
// itself is application logic and sits outside, clocked by actor_clk. The
// clock wiring follows the published scheme; giving the slot exactly one
// input queue is this design's choice.
//
// actor_clk also clocks the read side of the input queue and the write side of
// the output queues, as the actor does its reads and writes on it. The write
// side of the input queue belongs to the upstream actor (in_wclk) and the read
// side of each output queue to its consumer (q_rclk). in_full/in_afull are the
// input queue's flags for the upstream actor's clock enabler, and in_wclk_src
// the free-running source of in_wclk (used only when SYNC_STAGES >= 2).
//
// Parameters: WIDTH token bits, DEPTH queue slots, NUM_PORTS output ports,
// FANOUT[p] queues on port p, MAX_FANOUT the width of the per-port vectors,
// SYNC_STAGES the queues' clocking mode (0: every clock is a gated copy of
// clk; 2 or more: the consumers' read clocks and in_wclk may be unrelated,
// see async_queue).
// The defaults describe an actor with two output ports, one of them with a
// fanout of two. Unused queue slots (i >= FANOUT[p]) read as empty.
//
// Timing: as in clock_enabler, actor_clk loses its first pulse two clk edges
// after a controller has sampled a disabling flag; cg_sel low keeps it running.
module clock_gated_actor
  import cg_pkg::*;
#(
  parameter int unsigned  WIDTH       = 32,
  parameter int unsigned  DEPTH       = 16,
  parameter int unsigned  SYNC_STAGES = 0,
  parameter int unsigned  NUM_PORTS   = 2,
  parameter int unsigned  MAX_FANOUT  = 2,
  parameter fanout_list_t FANOUT      = '{2, 1, 0, 0, 0, 0, 0, 0}
) (
  input  logic                                             clk,
  input  logic                                             rst,
  input  logic                                             cg_sel,
  output logic                                             actor_clk,
  output logic                                             clock_enable,
  // input queue, upstream side
  input  logic                                             in_wclk,
  input  logic                                             in_wclk_src,
  input  logic                                             in_wr,
  input  logic [WIDTH-1:0]                                 in_wdata,
  output logic                                             in_full,
  output logic                                             in_afull,
  // input queue, actor side (actor_clk)
  input  logic                                             in_rd,
  output logic [WIDTH-1:0]                                 in_rdata,
  output logic                                             in_empty,
  // output ports, actor side (actor_clk)
  input  logic [NUM_PORTS-1:0]                             out_wr,
  input  logic [NUM_PORTS-1:0][WIDTH-1:0]                  out_wdata,
  output logic [NUM_PORTS-1:0]                             out_full,
  // output queues, consumer side
  input  logic [NUM_PORTS-1:0][MAX_FANOUT-1:0]             q_rclk,
  input  logic [NUM_PORTS-1:0][MAX_FANOUT-1:0]             q_rd,
  output logic [NUM_PORTS-1:0][MAX_FANOUT-1:0][WIDTH-1:0]  q_rdata,
  output logic [NUM_PORTS-1:0][MAX_FANOUT-1:0]             q_empty
);

  localparam int unsigned CW = $clog2(DEPTH) + 1;

  logic [NUM_PORTS-1:0][MAX_FANOUT-1:0]             q_full, q_afull, q_wr;
  logic [NUM_PORTS-1:0][MAX_FANOUT-1:0][WIDTH-1:0]  q_wdata;

  // Input queue: written by the upstream actor, read by this actor.
  logic [CW-1:0] in_count;
  async_queue #(.WIDTH(WIDTH), .DEPTH(DEPTH), .SYNC_STAGES(SYNC_STAGES)) u_in_queue (
    .rst         (rst),
    .wclk        (in_wclk),
    .wclk_src    (in_wclk_src),
    .wr          (in_wr),
    .wdata       (in_wdata),
    .full        (in_full),
    .almost_full (in_afull),
    .rclk        (actor_clk),
    .rd          (in_rd),
    .rdata       (in_rdata),
    .empty       (in_empty),
    .count       (in_count)
  );

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    fanout #(.WIDTH(WIDTH), .N(MAX_FANOUT)) u_fanout (
      .wr      (out_wr[p]),
      .wdata   (out_wdata[p]),
      .full    (out_full[p]),
      .q_wr    (q_wr[p]),
      .q_wdata (q_wdata[p]),
      .q_full  (q_full[p])
    );

    for (genvar i = 0; i < MAX_FANOUT; i++) begin : g_queue
      if (i < FANOUT[p]) begin : g_used
        logic [CW-1:0] count;
        async_queue #(.WIDTH(WIDTH), .DEPTH(DEPTH), .SYNC_STAGES(SYNC_STAGES)) u_queue (
          .rst         (rst),
          .wclk        (actor_clk),
          .wclk_src    (clk),
          .wr          (q_wr[p][i]),
          .wdata       (q_wdata[p][i]),
          .full        (q_full[p][i]),
          .almost_full (q_afull[p][i]),
          .rclk        (q_rclk[p][i]),
          .rd          (q_rd[p][i]),
          .rdata       (q_rdata[p][i]),
          .empty       (q_empty[p][i]),
          .count       (count)
        );
      end else begin : g_unused
        assign q_full[p][i]  = 1'b0;
        assign q_afull[p][i] = 1'b0;
        assign q_rdata[p][i] = '0;
        assign q_empty[p][i] = 1'b1;
      end
    end
  end

  clock_enabler #(
    .NUM_PORTS  (NUM_PORTS),
    .MAX_FANOUT (MAX_FANOUT),
    .FANOUT     (FANOUT)
  ) u_clock_enabler (
    .clk_in       (clk),
    .reset        (rst),
    .cg_sel       (cg_sel),
    .almost_full  (q_afull),
    .full         (q_full),
    .clock_enable (clock_enable),
    .clk_out      (actor_clk)
  );

endmodule

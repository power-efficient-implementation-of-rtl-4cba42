// clock_enabler: clock enabler circuit that gates the clock of one actor.
//
// One cg_controller watches the F/AF flags of every output queue of the
// actor. The enables of the controllers that belong to one output port with a
// fanout are ANDed, and the per-port results are ORed, so the actor keeps its
// clock while at least one of its output ports can still take tokens in all of
// its queues. The combined enable is registered on the rising edge of the
// free-running clock (a flip-flop in front of the clock buffer, for a runt-free
// gate) and drives the enable of a BUFGCE whose output is the actor's clock.
// When the actor is not selected for clock gating (cg_sel low) the buffer is
// always enabled. The structure (controller per queue, AND per fanout, OR
// across ports, flip-flop, clock buffer) follows the published scheme; the
// flip-flop's reset value (clock running) and the unused-port rule below are
// this design's choices.
//
// Parameters: NUM_PORTS output ports; FANOUT[p] queues on port p (1 means the
// port drives one queue directly); MAX_FANOUT is the width of the per-port
// flag vectors. The default, a port with a fanout of two plus a second port
// with one queue, is the configuration of the example actor with an AND gate
// feeding an OR gate. A port whose FANOUT is 0 is unused and counts as a port
// that cannot take tokens.
//
// Interface: almost_full[p][i] / full[p][i] are the flags of queue i of port p
// (entries i >= FANOUT[p] are ignored). If a controller takes in a disabling
// flag at rising edge n of clk, the enable flip-flop follows at edge n+1 and
// the pulse of edge n+2 is the first one missing from clk_out, which rests
// low; re-enabling has the same two-edge latency.
// clock_enable is the registered enable, brought out for observation.
module clock_enabler
  import cg_pkg::*;
#(
  parameter int unsigned  NUM_PORTS  = 2,
  parameter int unsigned  MAX_FANOUT = 2,
  parameter fanout_list_t FANOUT     = '{2, 1, 0, 0, 0, 0, 0, 0}
) (
  input  logic                                  clk_in,
  input  logic                                  reset,
  input  logic                                  cg_sel,
  input  logic [NUM_PORTS-1:0][MAX_FANOUT-1:0]  almost_full,
  input  logic [NUM_PORTS-1:0][MAX_FANOUT-1:0]  full,
  output logic                                  clock_enable,
  output logic                                  clk_out
);

  logic [NUM_PORTS-1:0][MAX_FANOUT-1:0] ctrl_en;
  logic [NUM_PORTS-1:0]                 port_en;
  logic                                 any_port_en;
  logic                                 buf_enable;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    for (genvar i = 0; i < MAX_FANOUT; i++) begin : g_queue
      if (i < FANOUT[p]) begin : g_ctrl
        cg_controller u_ctrl (
          .clk         (clk_in),
          .rst         (reset),
          .full        (full[p][i]),
          .almost_full (almost_full[p][i]),
          .en          (ctrl_en[p][i])
        );
      end else begin : g_unused
        // Neutral element of the AND over the fanout.
        assign ctrl_en[p][i] = 1'b1;
      end
    end
    // AND over the fanout branches of this port; an unused port is off.
    assign port_en[p] = (FANOUT[p] != 0) && (&ctrl_en[p]);
  end

  // OR over the output ports.
  assign any_port_en = |port_en;

  // Flip-flop between the gate logic and the clock buffer. It resets to 1 so
  // the actor is clocked out of reset.
  always_ff @(posedge clk_in or posedge reset) begin
    if (reset) clock_enable <= 1'b1;
    else       clock_enable <= any_port_en;
  end

  assign buf_enable = cg_sel ? clock_enable : 1'b1;

  bufgce u_bufgce (
    .I  (clk_in),
    .CE (buf_enable),
    .O  (clk_out)
  );

  initial begin
    assert (NUM_PORTS >= 1 && NUM_PORTS <= CG_MAX_PORTS)
      else $error("clock_enabler: NUM_PORTS out of range");
  end

endmodule

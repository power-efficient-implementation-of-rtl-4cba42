// fanout: copies the tokens of one actor output port into several queues.
//
// A token is written into all N queues in the same cycle, so every consumer
// sees the same sequence. The port reports full while any one of the queues
// is full, so the actor holds its token until all branches have room; the
// write strobe reaches the queues only when all of them can take it. Writing
// all branches in one cycle, with no buffering per branch, is this design's
// choice; blocking the port while a branch is full is the published rule.
//
// Interface: no clock of its own (it sits in the actor's clock domain between
// the actor's write port and the write side of the queues). wr/wdata/full on
// the actor side; q_wr/q_wdata/q_full per queue.
module fanout #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned N     = 2
) (
  input  logic                      wr,
  input  logic [WIDTH-1:0]          wdata,
  output logic                      full,
  output logic [N-1:0]              q_wr,
  output logic [N-1:0][WIDTH-1:0]   q_wdata,
  input  logic [N-1:0]              q_full
);

  assign full = |q_full;

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      q_wr[i]    = wr && !full;
      q_wdata[i] = wdata;
    end
  end

endmodule

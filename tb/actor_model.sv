// actor_model: behavioural stand-in for an application actor, for testbenches.
//
// Reads token x from its input queue and writes x+1 to output port 0 and, for
// even x, ~x to output port 1. Like a dataflow actor it fires only when its
// input holds a token and every output port that this token needs has room;
// it has no state, and each firing takes one cycle of its (gated) clock.
// fires counts its firings.
module actor_model #(
  parameter int unsigned WIDTH = 32
) (
  input  logic                  clk,
  input  logic [WIDTH-1:0]      in_rdata,
  input  logic                  in_empty,
  output logic                  in_rd,
  output logic [1:0]            out_wr,
  output logic [1:0][WIDTH-1:0] out_wdata,
  input  logic [1:0]            out_full,
  output logic                  fire,
  output int                    fires
);
  logic need1;

  assign need1        = !in_rdata[0];
  assign fire         = !in_empty && !out_full[0] && (!need1 || !out_full[1]);
  assign in_rd        = fire;
  assign out_wr[0]    = fire;
  assign out_wr[1]    = fire && need1;
  assign out_wdata[0] = in_rdata + 1;
  assign out_wdata[1] = ~in_rdata;

  initial fires = 0;
  always @(posedge clk) if (fire) fires++;
endmodule

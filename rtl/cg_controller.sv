// cg_controller: clock enabling controller for one output queue of an actor.
//
// A five-state Moore machine watches the full (F) and almost-full (AF) flags
// of one output queue and drives EN, the request to keep the actor's clock
// running. AF is high when at most one free slot is left in the queue and
// stays high while the queue is full. States and the transitions below follow
// the controller's state diagram:
//   INIT          (EN=1) -> SPACE on !F & !AF, otherwise stays
//   SPACE         (EN=1) -> AFULL_DISABLE on !F & AF
//   AFULL_DISABLE (EN=0) -> SPACE on !F & !AF, FULL on F & AF
//   FULL          (EN=0) -> AFULL_ENABLE on !F & AF (a token was consumed)
//   AFULL_ENABLE  (EN=1) -> FULL on F & AF, SPACE on !F & !AF
// All other combinations stay in the current state, except two that the
// diagram does not show and that this design chooses: F seen in SPACE goes
// straight to FULL, and !F & !AF seen in FULL goes straight to SPACE (flags
// that moved by more than one slot between two samples). F without AF cannot
// occur with the queues of this design; F is then treated as F & AF.
//
// Interface: clk (free-running, ungated), rst (asynchronous, active high,
// returns to INIT), full, almost_full (sampled on every rising clk edge),
// en (registered state decode, changes one clk after the flag change).
module cg_controller
  import cg_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic full,
  input  logic almost_full,
  output logic en
);

  cg_state_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      CG_INIT: begin
        if (!full && !almost_full) state_d = CG_SPACE;
      end
      CG_SPACE: begin
        if (full)             state_d = CG_FULL;
        else if (almost_full) state_d = CG_AFULL_DISABLE;
      end
      CG_AFULL_DISABLE: begin
        if (full)              state_d = CG_FULL;
        else if (!almost_full) state_d = CG_SPACE;
      end
      CG_FULL: begin
        if (!full && almost_full)       state_d = CG_AFULL_ENABLE;
        else if (!full && !almost_full) state_d = CG_SPACE;
      end
      CG_AFULL_ENABLE: begin
        if (full)              state_d = CG_FULL;
        else if (!almost_full) state_d = CG_SPACE;
      end
      default: state_d = CG_INIT;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state_q <= CG_INIT;
    else     state_q <= state_d;
  end

  // Moore output: the clock may run in every state but the two disabling ones.
  assign en = !(state_q == CG_AFULL_DISABLE || state_q == CG_FULL);

endmodule

// cg_pkg: types shared by the clock-gating blocks.
//
// Holds the state encoding of the clock enabling controller (five states,
// as named in the controller's state diagram) and a helper that sums the
// per-port fanout list type used by the clock enabler and the actor slot.
package cg_pkg;

  // States of the clock enabling controller. INIT is the reset state.
  typedef enum logic [2:0] {
    CG_INIT          = 3'd0,
    CG_SPACE         = 3'd1,
    CG_AFULL_DISABLE = 3'd2,
    CG_FULL          = 3'd3,
    CG_AFULL_ENABLE  = 3'd4
  } cg_state_e;

  // Largest number of actor output ports that a fanout list can describe.
  localparam int unsigned CG_MAX_PORTS = 8;

  typedef int unsigned fanout_list_t [CG_MAX_PORTS];

endpackage

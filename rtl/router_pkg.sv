// router_pkg: types and constants shared by the large-router RTL.
//
// The routers move fixed-size packets of PKT_PHITS phits, one phit per clock,
// each packet marked by a one-cycle start-of-frame (sf) pulse that accompanies
// its first phit. The destination output port sits in the least significant
// bits of that first phit.
package router_pkg;

  // The three-state controllers of the input units (write and read side):
  // state 0 waits for a start (sf or grant) and handles phit 0, state 1
  // handles phit 1 and is the cycle in which the buffer bookkeeping is
  // updated, state 2 handles the rest of the packet.
  typedef enum logic [1:0] {
    CTRL_S0 = 2'd0,
    CTRL_S1 = 2'd1,
    CTRL_S2 = 2'd2
  } ctrl_state_e;

  // Commands that the Ring Head End broadcasts to every Cell Switch Interface.
  typedef enum logic [1:0] {
    ROT_IDLE  = 2'b00,  // no arbitration: clear grants
    ROT_GRANT = 2'b10,  // end of reservation: issue grants, clear tokens
    ROT_SCAN  = 2'b11   // reservation: compare and rotate one position
  } rotate_cmd_e;

endpackage

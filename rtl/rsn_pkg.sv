// rsn_pkg: types shared by the reconfigurable scan network (RSN) modules.
//
// Every scan segment and every segment insertion bit (SIB) of the network
// is driven by the same three global control signals, capture, shift and
// update, which an IEEE 1149.1 TAP controller produces in its Capture-DR,
// Shift-DR and Update-DR states. They are bundled here as one packed struct
// so that a module takes them as a single port. At most one of them is
// expected to be high in any clock cycle (the TAP states are exclusive).
package rsn_pkg;

  // Global scan control, one bit per CSU (capture-shift-update) phase.
  typedef struct packed {
    logic capture;  // load scan registers from their instruments
    logic shift;    // move data one position from scan-in towards scan-out
    logic update;   // copy scan registers into their shadow registers
  } scan_ctrl_t;

  // Connection style between the S and U registers of an ID-SIB, which is
  // also the value of the identification bit that the SIB carries.
  typedef enum logic {
    CONN_Q_D    = 1'b0,  // U.D <= S.Q      (fuse F2 blown), ID bit 0
    CONN_QBAR_D = 1'b1   // U.D <= not S.Q  (fuse F1 blown), ID bit 1
  } conn_style_e;

endpackage

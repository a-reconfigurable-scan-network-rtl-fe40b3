// id_sib: segment insertion bit (SIB) that carries one bit of a chip ID.
//
// A SIB holds a 1-bit shift register S and a 1-bit shadow register U. U
// decides the mode of the SIB:
//   U = 0  bypassing: S shifts from the SIB's own scan-in (si), and the
//          lower-level segment is left out of the scan path;
//   U = 1  directing: S shifts from the lower-level segment's output
//          (from_seg), so the segment lies in the path si -> to_seg ->
//          segment -> from_seg -> S -> so.
// to_seg is si itself, so is S, and to_sel = sel & U selects the segment.
// S shifts only when the SIB is selected; U loads only when update and sel
// are both high. Capture leaves S unchanged, since a SIB has no instrument
// data to load.
//
// The ID-SIB differs from a plain SIB in one place: the connection from S
// to U's input is fixed after fabrication by blowing one of two fuses.
// With fuse F2 blown U loads S (Q-D style, ID bit 0); with F1 blown U loads
// the inverse of S (Q'-D style, ID bit 1). The fuse pair is a physical
// element and is represented here by the input conn. A configuration bit
// shifted into an ID-SIB must therefore be the wanted U value XOR the ID bit:
// 1 to insert the segment when the ID bit is 0, 0 when it is 1.
//
// Interface and timing: one rising-edge clock, synchronous active-high reset
// that clears S and U (bypassing, whatever the ID bit). Shift and update
// each take one cycle; a new U value changes the path from the next cycle.
// The mux, the registers, the AND gate and the fuse semantics follow the
// standard SIB structure; the reset, the capture behaviour and the single
// clock edge are this design's choices.
module id_sib
  import rsn_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  scan_ctrl_t  ctrl,
  input  logic        sel,       // select from the enclosing network
  input  conn_style_e conn,      // fuse state = this SIB's ID bit
  input  logic        si,        // scan-in
  output logic        so,        // scan-out (register S)
  output logic        to_seg,    // scan data towards the lower-level segment
  input  logic        from_seg,  // scan data back from the lower-level segment
  output logic        to_sel     // select of the lower-level segment
);

  logic s_q;   // shift register S
  logic u_q;   // shadow register U
  logic u_d;   // U's input, through the programmed S/U connection

  // Scan multiplexer: input 0 = si (bypass), input 1 = from_seg (directing).
  always_ff @(posedge clk) begin
    if (rst)                    s_q <= 1'b0;
    else if (sel && ctrl.shift) s_q <= u_q ? from_seg : si;
  end

  // Programmable S/U connection (Q-D or Q'-D).
  always_comb u_d = (conn == CONN_QBAR_D) ? ~s_q : s_q;

  always_ff @(posedge clk) begin
    if (rst)                     u_q <= 1'b0;
    else if (sel && ctrl.update) u_q <= u_d;
  end

  assign so     = s_q;
  assign to_seg = si;
  assign to_sel = sel & u_q;

  // The TAP drives at most one of capture, shift and update at a time.
  a_ctrl_exclusive : assert property (@(posedge clk) disable iff (rst)
    (32'(ctrl.capture) + 32'(ctrl.shift) + 32'(ctrl.update)) <= 1);

endmodule

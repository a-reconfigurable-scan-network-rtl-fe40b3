// scan_segment: one scan segment of a reconfigurable scan network.
//
// A LEN-bit scan register sits between scan-in (si) and scan-out (so). When
// the segment is selected (sel = 1) it obeys the three global controls:
//   capture - the scan register is overwritten with the instrument's data_in;
//   shift   - si enters bit LEN-1, every bit moves one place towards bit 0,
//             and bit 0 is what so shows (so is the register's bit 0, so it
//             changes only at a clock edge);
//   update  - the scan register is copied into the shadow register, whose
//             contents drive the instrument (only if HAS_SHADOW = 1).
// When sel = 0 the segment holds all of its state. The operations take one
// clock cycle each; reset (synchronous, active high) clears both registers.
//
// The three modes, the select port and the optional shadow register follow
// the usual RSN model; the shift direction, the reset value, the length and
// the single rising-edge clock (an 1149.1 TAP updates on the falling edge)
// are choices of this design.
module scan_segment
  import rsn_pkg::*;
#(
  parameter int unsigned LEN        = 8,  // scan register length in bits
  parameter bit          HAS_SHADOW = 1'b1
) (
  input  logic           clk,
  input  logic           rst,
  input  scan_ctrl_t     ctrl,
  input  logic           sel,
  input  logic           si,
  output logic           so,
  input  logic [LEN-1:0] data_in,  // from the instrument (captured)
  output logic [LEN-1:0] shadow    // to the instrument (updated)
);

  logic [LEN-1:0] sreg;
  logic [LEN-1:0] shifted;  // sreg after one shift step

  always_comb begin
    shifted = sreg;
    for (int i = 0; i < int'(LEN) - 1; i++) shifted[i] = sreg[i+1];
    shifted[LEN-1] = si;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sreg <= '0;
    end else if (sel) begin
      if (ctrl.capture)    sreg <= data_in;
      else if (ctrl.shift) sreg <= shifted;
    end
  end

  assign so = sreg[0];

  if (HAS_SHADOW) begin : g_shadow
    logic [LEN-1:0] ureg;
    always_ff @(posedge clk) begin
      if (rst)                       ureg <= '0;
      else if (sel && ctrl.update)   ureg <= sreg;
    end
    assign shadow = ureg;
  end else begin : g_no_shadow
    // Without a shadow register the instrument sees the scan register.
    assign shadow = sreg;
  end

  // The TAP drives at most one of capture, shift and update at a time.
  a_ctrl_exclusive : assert property (@(posedge clk) disable iff (rst)
    (32'(ctrl.capture) + 32'(ctrl.shift) + 32'(ctrl.update)) <= 1);

endmodule

// rsn_top: SIB-based reconfigurable scan network whose fuse-programmed
// ID-SIBs give every chip its own identification number.
//
// With NUM_INSTR = 0 (the default) the network is flat: NUM_SIB ID-SIBs are
// chained between scan-in and scan-out, each with a SEG_LEN-bit scan segment
// beneath it (three SIBs and three segments by default):
//
//   si -> [seg 0] -> S0 -> [seg 1] -> S1 -> ... -> [seg N-1] -> S(N-1) -> so
//
// With NUM_INSTR = K > 0 it has two levels, the shape used for SoC
// benchmarks: NUM_SIB doorway ID-SIBs are chained, and below each one is a
// module, a row of K instrument ID-SIBs each over its own segment. A doorway
// in directing mode puts its whole module into the path; an instrument SIB
// inside an open module puts its segment into the path.
//
// Every SIB carries one ID bit. id_bits is numbered in scan-path order from
// scan-in with every SIB open: flat, bit i is SIB i; two-level, module j
// owns bits j*(K+1) .. j*(K+1)+K-1 for its instrument SIBs and bit
// j*(K+1)+K for its doorway (the doorway's S follows its module in the
// path). Segments are numbered the same way: flat, segment i; two-level,
// segment j*K+k below instrument SIB k of module j.
//
// A CSU (capture, shift, update) operation that shifts configuration bit c
// into a selected SIB leaves its U at c XOR its ID bit, so a tester must
// send 1 to insert a segment or module below an ID-0 SIB and 0 below an
// ID-1 SIB. Instrument SIBs can only be configured while their doorway is
// open, so a two-level network takes two CSUs to reach any setting.
//
// Interface: capture, shift and update are the global controls (at most one
// high per cycle), sel selects the whole network. instr_di is captured into
// a segment, instr_do is its shadow register and seg_sel tells its
// instrument that the segment is selected. One rising-edge clock,
// synchronous active-high reset, after which every SIB is bypassing and the
// path holds only the top-level SIBs. The flat shape follows the three-SIB
// example; the two-level option with a uniform K and SEG_LEN, the bit
// numbering and the port layout are this design's choices. The TAP
// controller, the instruments and the fuses themselves are outside.
module rsn_top
  import rsn_pkg::*;
#(
  parameter int unsigned NUM_SIB    = 3,     // top-level SIBs
  parameter int unsigned NUM_INSTR  = 0,     // instrument SIBs per module, 0 = flat
  parameter int unsigned SEG_LEN    = 8,
  parameter bit          HAS_SHADOW = 1'b1,
  // Derived sizes, not meant to be overridden.
  parameter int unsigned NUM_ID  = (NUM_INSTR == 0) ? NUM_SIB : NUM_SIB * (NUM_INSTR + 1),
  parameter int unsigned NUM_SEG = (NUM_INSTR == 0) ? NUM_SIB : NUM_SIB * NUM_INSTR
) (
  input  logic                              clk,
  input  logic                              rst,
  input  logic                              capture,
  input  logic                              shift,
  input  logic                              update,
  input  logic                              sel,
  input  logic                              si,
  output logic                              so,
  input  logic [NUM_ID-1:0]                 id_bits,
  input  logic [NUM_SEG-1:0][SEG_LEN-1:0]   instr_di,
  output logic [NUM_SEG-1:0][SEG_LEN-1:0]   instr_do,
  output logic [NUM_SEG-1:0]                seg_sel
);

  scan_ctrl_t ctrl;
  assign ctrl = '{capture: capture, shift: shift, update: update};

  if (NUM_INSTR == 0) begin : g_flat
    sib_chain #(
      .NUM_SIB    (NUM_SIB),
      .SEG_LEN    (SEG_LEN),
      .HAS_SHADOW (HAS_SHADOW)
    ) u_row (
      .clk, .rst, .ctrl, .sel, .si, .so,
      .id_bits, .instr_di, .instr_do, .seg_sel
    );
  end else begin : g_two_level
    localparam int unsigned K = NUM_INSTR;

    // chain[j] is the scan-in of doorway j; chain[NUM_SIB] is so.
    logic [NUM_SIB:0] chain;
    logic [NUM_SIB-1:0] to_mod, from_mod, mod_sel;

    assign chain[0] = si;
    assign so       = chain[NUM_SIB];

    for (genvar j = 0; j < NUM_SIB; j++) begin : g_module
      id_sib u_doorway (
        .clk      (clk),
        .rst      (rst),
        .ctrl     (ctrl),
        .sel      (sel),
        .conn     (conn_style_e'(id_bits[j*(K+1) + K])),
        .si       (chain[j]),
        .so       (chain[j+1]),
        .to_seg   (to_mod[j]),
        .from_seg (from_mod[j]),
        .to_sel   (mod_sel[j])
      );

      sib_chain #(
        .NUM_SIB    (K),
        .SEG_LEN    (SEG_LEN),
        .HAS_SHADOW (HAS_SHADOW)
      ) u_instr (
        .clk      (clk),
        .rst      (rst),
        .ctrl     (ctrl),
        .sel      (mod_sel[j]),
        .si       (to_mod[j]),
        .so       (from_mod[j]),
        .id_bits  (id_bits[j*(K+1) +: K]),
        .instr_di (instr_di[j*K +: K]),
        .instr_do (instr_do[j*K +: K]),
        .seg_sel  (seg_sel[j*K +: K])
      );
    end
  end

endmodule

// sib_chain: a row of ID-SIBs, each with one scan segment beneath it.
//
// NUM_SIB id_sib instances are chained between si and so; segment i hangs
// below SIB i and lies in the scan path only while that SIB's U register is
// 1 (directing mode):
//
//   si -> [seg 0] -> S0 -> [seg 1] -> S1 -> ... -> [seg N-1] -> S(N-1) -> so
//
// All SIBs share the select sel, so the whole row is selected or not. SIB i
// carries ID bit id_bits[i] (its fuse state: 0 Q-D, 1 Q'-D). instr_di[i] is
// captured into segment i, instr_do[i] is its shadow register and seg_sel[i]
// its select. The row is used directly as the flat network and, below a
// doorway SIB, as the instrument level of a module. Timing is that of its
// parts: one rising-edge clock, one cycle per capture, shift or update,
// synchronous active-high reset that bypasses every segment. The structure
// (SIBs in a row, each over a segment) follows the standard SIB-based
// network; the single segment length is this design's choice.
module sib_chain
  import rsn_pkg::*;
#(
  parameter int unsigned NUM_SIB    = 3,
  parameter int unsigned SEG_LEN    = 8,
  parameter bit          HAS_SHADOW = 1'b1
) (
  input  logic                              clk,
  input  logic                              rst,
  input  scan_ctrl_t                        ctrl,
  input  logic                              sel,
  input  logic                              si,
  output logic                              so,
  input  logic [NUM_SIB-1:0]                id_bits,
  input  logic [NUM_SIB-1:0][SEG_LEN-1:0]   instr_di,
  output logic [NUM_SIB-1:0][SEG_LEN-1:0]   instr_do,
  output logic [NUM_SIB-1:0]                seg_sel
);

  // chain[i] is the scan-in of SIB i; chain[NUM_SIB] is the row's so.
  logic [NUM_SIB:0] chain;
  logic [NUM_SIB-1:0] to_seg, from_seg;

  assign chain[0] = si;
  assign so       = chain[NUM_SIB];

  for (genvar i = 0; i < NUM_SIB; i++) begin : g_sib
    id_sib u_sib (
      .clk      (clk),
      .rst      (rst),
      .ctrl     (ctrl),
      .sel      (sel),
      .conn     (conn_style_e'(id_bits[i])),
      .si       (chain[i]),
      .so       (chain[i+1]),
      .to_seg   (to_seg[i]),
      .from_seg (from_seg[i]),
      .to_sel   (seg_sel[i])
    );

    scan_segment #(
      .LEN        (SEG_LEN),
      .HAS_SHADOW (HAS_SHADOW)
    ) u_seg (
      .clk     (clk),
      .rst     (rst),
      .ctrl    (ctrl),
      .sel     (seg_sel[i]),
      .si      (to_seg[i]),
      .so      (from_seg[i]),
      .data_in (instr_di[i]),
      .shadow  (instr_do[i])
    );
  end

endmodule

// tb_rsn_top: end-to-end test of the scan network at its default size
// (three ID-SIBs with an 8-bit segment each).
//
// rsn_driver programs every one of the eight possible chip IDs and, for each,
// configures all eight insertion patterns through complete CSU operations,
// checks path lengths, segment read-back and shadow contents, holds the
// network deselected, and finally decodes the ID from scan-out. It also
// applies the two example configuration sequences of the scheme. All of it
// is checked against a cycle-level reference model on every clock edge.
`timescale 1ns/1ps
module tb_rsn_top;
  localparam int unsigned N = 3;   // rsn_top defaults
  localparam int unsigned L = 8;

  logic clk = 1'b0;
  logic rst, capture, shift, update, sel, si, so, done;
  logic [N-1:0] id_bits, seg_sel;
  logic [N-1:0][L-1:0] instr_di, instr_do;
  int checks, failures;

  always #5 clk = ~clk;

  rsn_top dut (
    .clk, .rst, .capture, .shift, .update, .sel, .si, .so,
    .id_bits, .instr_di, .instr_do, .seg_sel);

  rsn_driver #(.NUM_SIB(N), .SEG_LEN(L), .EXHAUSTIVE(1'b1)) drv (
    .clk, .rst, .capture, .shift, .update, .sel, .si, .so,
    .id_bits, .instr_di, .instr_do, .seg_sel, .done, .checks, .failures);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

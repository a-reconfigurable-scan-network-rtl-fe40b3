// tb_rsn_two_level: test of the two-level network, doorway ID-SIBs over
// modules of instrument ID-SIBs.
//
// Two networks run side by side, each driven and checked by rsn_driver:
//   - 2 doorways x 2 instrument SIBs, 3-bit segments: every one of the 64
//     IDs with every one of the 64 settings of the six U registers;
//   - 4 doorways x 3 instrument SIBs, 2-bit segments: random IDs and
//     settings.
// Each configuration takes two CSU operations (open the doorways, then set
// the instrument SIBs), with configuration bits adjusted for the ID; the
// driver checks selects, shadows, path lengths, read-back, deselection and
// that an ID wrong in one bit cannot open the whole network.
`timescale 1ns/1ps
module tb_rsn_two_level;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NT = 2;
  localparam int unsigned TOPS  [NT] = '{2, 4};
  localparam int unsigned INSTR [NT] = '{2, 3};
  localparam int unsigned LENS  [NT] = '{3, 2};

  logic [NT-1:0] done;
  int chk [NT];
  int fl  [NT];

  for (genvar t = 0; t < NT; t++) begin : g_net
    localparam int unsigned N  = TOPS[t];
    localparam int unsigned K  = INSTR[t];
    localparam int unsigned L  = LENS[t];
    localparam int unsigned NI = N * (K + 1);
    localparam int unsigned NS = N * K;
    logic rst, capture, shift, update, sel, si, so;
    logic [NI-1:0] id_bits;
    logic [NS-1:0] seg_sel;
    logic [NS-1:0][L-1:0] instr_di, instr_do;

    rsn_top #(.NUM_SIB(N), .NUM_INSTR(K), .SEG_LEN(L)) dut (
      .clk, .rst, .capture, .shift, .update, .sel, .si, .so,
      .id_bits, .instr_di, .instr_do, .seg_sel);

    rsn_driver #(.NUM_SIB(N), .NUM_INSTR(K), .SEG_LEN(L), .ROUNDS(30),
                 .EXHAUSTIVE(t == 0)) drv (
      .clk, .rst, .capture, .shift, .update, .sel, .si, .so,
      .id_bits, .instr_di, .instr_do, .seg_sel,
      .done(done[t]), .checks(chk[t]), .failures(fl[t]));
  end

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  initial begin
    int checks = 0, failures = 0;
    wait (&done);
    for (int t = 0; t < NT; t++) begin
      checks += chk[t];
      failures += fl[t];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rsn_itc02: ID capacity of the scheme on networks as large as the
// SIB-based scan networks built for the ITC'02 SoC benchmarks.
//
// The smallest and the largest of these networks (25 and 621 SIBs) are
// simulated as flat rows of as many ID-SIBs, every segment shortened to 2
// bits to keep the run short; the other ten benchmarks differ only in their
// size, which lies between the two. For each network rsn_flat_driver
// programs an all-zero, an all-one and random IDs, configures random
// insertion patterns with the adjusted configuration bits, checks path
// lengths, shadows and read-back, and decodes every ID from scan-out. The
// testbench also checks that 2^N, the number of distinct IDs N ID-SIBs can
// carry, matches the published count for every benchmark to within 1%. The
// benchmarks' module hierarchy (covered in shape by tb_rsn_two_level) and
// real segment lengths are not modelled: only the number of ID-SIBs matters
// for the ID.
`timescale 1ns/1ps
module tb_rsn_itc02;
  localparam int NB = 12;
  localparam int unsigned L = 2;
  // SIB counts and number of unique IDs per benchmark, in table order:
  // u226 d281 d695 h953 g1023 f2126 q127110 p228110 p34392 p93791 t512505 a586710
  localparam int unsigned NSIB [NB] = '{50, 59, 168, 55, 80, 41, 25, 283, 123, 621, 160, 40};
  localparam real         NIDS [NB] = '{1.13e15, 5.76e17, 3.74e50, 3.60e16, 1.20e24,
                                        2.19e12, 3.35e7, 1.55e85, 1.06e37, 8.70e186,
                                        1.46e48, 1.09e12};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  // Networks simulated, as flat rows of ID-SIBs: q127110 (25 SIBs) and
  // p93791 (621 SIBs).
  localparam int NS = 2;
  localparam int unsigned SIM_N [NS] = '{NSIB[6], NSIB[9]};

  logic [NS-1:0] done;
  int chk [NS];
  int fl  [NS];

  for (genvar b = 0; b < NS; b++) begin : g_bench
    localparam int unsigned N = SIM_N[b];
    logic rst, capture, shift, update, sel, si, so;
    logic [N-1:0] id_bits, seg_sel;
    logic [N-1:0][L-1:0] instr_di, instr_do;

    rsn_top #(.NUM_SIB(N), .SEG_LEN(L)) dut (
      .clk, .rst, .capture, .shift, .update, .sel, .si, .so,
      .id_bits, .instr_di, .instr_do, .seg_sel);

    rsn_flat_driver #(.NUM_SIB(N), .SEG_LEN(L), .ROUNDS(4), .EXHAUSTIVE(1'b0)) drv (
      .clk, .rst, .capture, .shift, .update, .sel, .si, .so,
      .id_bits, .instr_di, .instr_do, .seg_sel,
      .done(done[b]), .checks(chk[b]), .failures(fl[b]));
  end

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  initial begin
    automatic int checks = 0, failures = 0;
    real ids, ratio;
    for (int b = 0; b < NB; b++) begin
      ids = 2.0 ** real'(NSIB[b]);
      ratio = ids / NIDS[b];
      checks++;
      if (ratio < 0.99 || ratio > 1.01) begin
        failures++;
        $display("FAIL benchmark %0d: 2^%0d = %e, published %e", b, NSIB[b], ids, NIDS[b]);
      end
    end
    wait (&done);
    for (int b = 0; b < NS; b++) begin
      checks += chk[b];
      failures += fl[b];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

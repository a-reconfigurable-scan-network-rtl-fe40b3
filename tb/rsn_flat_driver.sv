// rsn_flat_driver: stimulus and checker for a large flat rsn_top (test only).
//
// A leaner relative of rsn_driver for flat networks only (NUM_INSTR = 0),
// whose reference model indexes the flat structure directly, so that a
// network of hundreds of SIBs builds and runs quickly. It does not test
// rejection of a wrong ID.
//
// It plays the part of the TAP controller and the tester. For each chip ID
// it programs the fuse inputs, resets the network, then runs complete CSU
// (capture-shift-update) operations:
//   - configuration: the wanted insertion pattern is XORed with the ID bits
//     (the adjustment rules for Q-D and Q'-D SIBs), the resulting
//     configuration bits and random segment data are shifted through the
//     whole active path and updated; the segment selects must then equal the
//     wanted pattern and each segment that was on the path must hold in its
//     shadow register the data shifted into it;
//   - path length: a single 1 is sent through the flushed path and must
//     appear at scan-out after NUM_SIB + SEG_LEN * (inserted segments) shifts;
//   - read-back: capture, then the whole path is shifted out and compared
//     with the S bits and the captured instrument data;
//   - ID read-out: all-zero configuration bits and an update make every U
//     equal to its ID bit; with the instruments returning all ones the
//     captured stream shows a run of SEG_LEN ones after each SIB whose ID bit
//     is 1, and the ID is decoded from scan-out alone.
// Besides these directed checks a cycle-level reference model of all S, U,
// segment and shadow registers is compared with scan-out, the segment
// selects and the shadow outputs after every clock edge. With EXHAUSTIVE set
// every ID and every insertion pattern is tried; otherwise ROUNDS random IDs
// with two random patterns each. For a 3-SIB network the two example
// configuration sequences of the scheme are also applied literally.
// mech[] counts how often each mechanism occurred; a mechanism that never
// occurs is a failure. done rises when the run is over.
`timescale 1ns/1ps
module rsn_flat_driver #(
  parameter int unsigned NUM_SIB    = 3,
  parameter int unsigned SEG_LEN    = 8,
  parameter int unsigned ROUNDS     = 4,
  parameter bit          EXHAUSTIVE = 1'b1
) (
  input  logic                            clk,
  output logic                            rst,
  output logic                            capture,
  output logic                            shift,
  output logic                            update,
  output logic                            sel,
  output logic                            si,
  input  logic                            so,
  output logic [NUM_SIB-1:0]              id_bits,
  output logic [NUM_SIB-1:0][SEG_LEN-1:0] instr_di,
  input  logic [NUM_SIB-1:0][SEG_LEN-1:0] instr_do,
  input  logic [NUM_SIB-1:0]              seg_sel,
  output logic                            done,
  output int                              checks,
  output int                              failures
);
  localparam int N = int'(NUM_SIB);
  localparam int L = int'(SEG_LEN);

  // Mechanisms that must each occur at least once.
  typedef enum int {
    M_BYPASS,     // a SIB left bypassing after a configuration
    M_DIRECT,     // a SIB set to directing mode
    M_RULE1,      // configuration bit adjusted for a Q'-D (ID 1) SIB
    M_RULE2,      // configuration bit used as-is for a Q-D (ID 0) SIB
    M_SHADOW,     // segment data delivered to a shadow register by update
    M_CAPTURE,    // instrument data captured and shifted out
    M_IDREAD,     // chip ID decoded from scan-out
    M_DESELECT,   // network held while deselected
    M_COUNT
  } mech_e;
  int mech [M_COUNT];

  // Reference model.
  bit             ms [N];
  bit             mu [N];
  bit [L-1:0]     mseg [N];
  bit [L-1:0]     msh [N];

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    foreach (mech[m]) mech[m] = 0;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL [N=%0d] t=%0t %s", N, $time, msg);
  endtask

  task automatic model_step();
    bit in_i;
    bit ms_old [N];
    bit [L-1:0] ns;
    ms_old = ms;
    if (rst) begin
      foreach (ms[i]) begin ms[i] = 0; mu[i] = 0; mseg[i] = '0; msh[i] = '0; end
    end else if (sel && shift) begin
      for (int i = 0; i < N; i++) begin
        in_i = (i == 0) ? si : ms_old[i-1];
        if (mu[i]) begin
          ms[i] = mseg[i][0];
          ns = mseg[i] >> 1;
          ns[L-1] = in_i;
          mseg[i] = ns;
        end else begin
          ms[i] = in_i;
        end
      end
    end else if (sel && capture) begin
      for (int i = 0; i < N; i++) if (mu[i]) mseg[i] = instr_di[i];
    end else if (sel && update) begin
      for (int i = 0; i < N; i++) begin
        if (mu[i]) msh[i] = mseg[i];
        mu[i] = ms[i] ^ id_bits[i];
      end
    end
  endtask

  task automatic compare();
    string msg = "";
    checks++;
    if (so !== ms[N-1]) msg = {msg, $sformatf(" so=%0b model %0b", so, ms[N-1])};
    for (int i = 0; i < N; i++) begin
      if (seg_sel[i] !== (sel & mu[i]))
        msg = {msg, $sformatf(" seg_sel[%0d]=%0b model %0b", i, seg_sel[i], sel & mu[i])};
      if (instr_do[i] !== msh[i])
        msg = {msg, $sformatf(" instr_do[%0d]=%h model %h", i, instr_do[i], msh[i])};
    end
    if (msg != "") fail({"model mismatch:", msg});
  endtask

  // One clock cycle with the given controls (driven after the falling edge).
  task automatic tick(bit c, bit s, bit u, bit din = 1'b0);
    @(negedge clk);
    capture = c; shift = s; update = u; si = din;
    @(posedge clk);
    model_step();
    #1 compare();
    // Back to idle, so that any cycle not driven through tick is a no-op.
    capture = 0; shift = 0; update = 0;
  endtask

  function automatic int path_len();
    int p = N;
    for (int i = 0; i < N; i++) if (mu[i]) p += L;
    return p;
  endfunction

  // CSU that loads configuration bits cfg (bit i -> SIB i) and random data
  // into every segment on the current path; checks the new selects.
  task automatic configure(logic [N-1:0] cfg, logic [N-1:0] exp_sel);
    int p = path_len();
    bit content [] = new[p];   // index 0 = next to scan-in
    bit on_path [N];
    bit [L-1:0] wdata [N];
    int k = 0;
    for (int i = 0; i < N; i++) begin
      on_path[i] = mu[i];
      wdata[i] = '0;
      if (mu[i]) begin
        for (int b = L - 1; b >= 0; b--) begin
          wdata[i][b] = 1'($urandom);
          content[k++] = wdata[i][b];
        end
      end
      content[k++] = cfg[i];
    end
    for (int q = p - 1; q >= 0; q--) tick(0, 1, 0, content[q]);
    tick(0, 0, 1);
    tick(0, 0, 0);
    checks++;
    if (seg_sel !== exp_sel)
      fail($sformatf("after cfg %b (id %b): seg_sel %b, expected %b",
                     cfg, id_bits, seg_sel, exp_sel));
    for (int i = 0; i < N; i++) begin
      if (id_bits[i]) mech[M_RULE1]++; else mech[M_RULE2]++;
      if (exp_sel[i]) mech[M_DIRECT]++; else mech[M_BYPASS]++;
      if (on_path[i]) begin
        checks++;
        mech[M_SHADOW]++;
        if (instr_do[i] !== wdata[i])
          fail($sformatf("shadow %0d = %h, written %h", i, instr_do[i], wdata[i]));
      end
    end
  endtask

  // Send one marker through the flushed path and count the shifts it takes.
  task automatic check_length(int exp_len);
    int n = 0;
    repeat (exp_len) tick(0, 1, 0, 1'b0);
    tick(0, 1, 0, 1'b1);
    n = 1;
    while (so !== 1'b1 && n < exp_len + 10) begin
      tick(0, 1, 0, 1'b0);
      n++;
    end
    checks++;
    if (n != exp_len) fail($sformatf("path length %0d, expected %0d", n, exp_len));
  endtask

  // Capture, then shift the path out and compare with S bits and instr_di.
  task automatic check_capture();
    bit exp_s [N];
    tick(1, 0, 0);
    exp_s = ms;
    for (int i = N - 1; i >= 0; i--) begin
      checks++;
      if (so !== exp_s[i]) fail($sformatf("read-back S%0d = %0b", i, so));
      tick(0, 1, 0, 1'($urandom));
      if (mu[i]) begin
        for (int b = 0; b < L; b++) begin
          checks++;
          if (so !== instr_di[i][b]) fail($sformatf("read-back seg %0d bit %0d", i, b));
          tick(0, 1, 0, 1'($urandom));
        end
      end
    end
    mech[M_CAPTURE]++;
  endtask

  // Decode the chip ID from scan-out without using the model.
  task automatic read_id();
    logic [N-1:0] got;
    bit ok = 1;
    configure('0, id_bits);            // every U now equals its ID bit
    instr_di = '1;
    tick(1, 0, 0);
    for (int i = N - 1; i >= 0; i--) begin
      if (so !== 1'b0) ok = 0;          // S_i holds a configuration 0
      tick(0, 1, 0);
      got[i] = so;
      if (so === 1'b1) begin
        for (int b = 0; b < L; b++) begin
          if (so !== 1'b1) ok = 0;
          tick(0, 1, 0);
        end
      end
    end
    checks++;
    if (!ok || got !== id_bits) fail($sformatf("ID read-out %b, fuses %b", got, id_bits));
    else mech[M_IDREAD]++;
  endtask

  // Deselected network: nothing may change (the model checks every cycle).
  task automatic check_deselect();
    @(negedge clk); sel = 1'b0;
    tick(0, 1, 0, 1'b1);
    tick(1, 0, 0);
    tick(0, 0, 1);
    @(negedge clk); sel = 1'b1;
    mech[M_DESELECT]++;
  endtask

  task automatic new_chip(logic [N-1:0] id);
    @(negedge clk);
    id_bits = id; rst = 1'b1;
    tick(0, 0, 0);
    @(negedge clk); rst = 1'b0;
    tick(0, 0, 0);
    checks++;
    if (seg_sel !== '0) fail("segments selected after reset");
  endtask

  task automatic exercise(logic [N-1:0] want);
    for (int i = 0; i < N; i++) instr_di[i] = L'($urandom);
    configure(want ^ id_bits, want);
    check_capture();
    check_length(path_len());
  endtask

  function automatic logic [N-1:0] rand_vec();
    logic [N-1:0] v;
    for (int i = 0; i < N; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  initial begin
    rst = 1'b1; capture = 0; shift = 0; update = 0; sel = 1'b1; si = 0;
    id_bits = '0; instr_di = '0;
    @(posedge clk);
    #1;
    if (N == 3) begin
      // Worked example: ID 000 needs sequence 101 to reach segments 1 and 3,
      // ID 101 needs 000 for the same segments (string order SIB1, SIB2, SIB3).
      new_chip(3'b000);
      configure(3'b101, 3'b101);
      new_chip(3'b101);
      configure(3'b000, 3'b101);
    end
    if (EXHAUSTIVE) begin
      for (int id = 0; id < (1 << N); id++) begin
        new_chip(N'(id));
        for (int w = 0; w < (1 << N); w++) exercise(N'(w));
        check_deselect();
        read_id();
      end
    end else begin
      for (int r = 0; r < int'(ROUNDS); r++) begin
        new_chip(r == 0 ? '0 : (r == 1 ? '1 : rand_vec()));
        exercise(rand_vec());
        exercise(r == 0 ? '0 : rand_vec());
        check_deselect();
        read_id();
      end
    end
    for (int m = 0; m < M_COUNT; m++) begin
      checks++;
      if (mech[m] == 0) fail($sformatf("mechanism %s never occurred", mech_e'(m)));
    end
    $display("rsn_flat_driver N=%0d L=%0d: bypass=%0d direct=%0d rule1=%0d rule2=%0d shadow=%0d capture=%0d idread=%0d deselect=%0d",
             N, L, mech[M_BYPASS], mech[M_DIRECT], mech[M_RULE1], mech[M_RULE2],
             mech[M_SHADOW], mech[M_CAPTURE], mech[M_IDREAD], mech[M_DESELECT]);
    done = 1'b1;
  end
endmodule

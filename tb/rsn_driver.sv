// rsn_driver: stimulus and checker for one rsn_top instance (test only).
//
// It plays the part of the TAP controller and the tester, for the flat
// network (NUM_INSTR = 0) and for the two-level one (NUM_SIB doorway SIBs,
// each over NUM_INSTR instrument SIBs). For each chip ID it programs the
// fuse inputs, resets the network and runs complete CSU (capture-shift-
// update) operations:
//   - configuration: every configuration bit is the wanted U value XOR the
//     SIB's ID bit (the adjustment rules for Q-D and Q'-D SIBs); random data
//     goes into the segments on the path. A two-level network first opens
//     every doorway, then sets the instrument SIBs, so any pattern is
//     reached. The segment selects must then match the wanted pattern, and
//     every segment that was on the path must hold in its shadow register
//     the data shifted into it;
//   - path length: a single 1 sent through the flushed path must appear at
//     scan-out after as many shifts as the wanted pattern implies;
//   - read-back: capture, then the path is shifted out and compared;
//   - authentication: configuring for "everything open" with an ID that is
//     wrong in one random bit must not open everything;
//   - ID read-out (flat network): all-zero configuration bits and an update
//     make every U equal to its ID bit; with the instruments returning all
//     ones the captured stream shows SEG_LEN ones after each SIB whose ID
//     bit is 1, and the ID is decoded from scan-out alone.
// A cycle-level reference model of all S, U, segment and shadow registers
// is also compared with scan-out, the segment selects and the shadow outputs
// after every clock edge. With EXHAUSTIVE set every ID and every pattern is
// tried; otherwise ROUNDS random IDs with two random patterns each. For a
// flat 3-SIB network the two example configuration sequences of the scheme
// are applied literally. mech[] counts how often each mechanism occurred;
// one that never occurs is a failure. done rises when the run is over.
`timescale 1ns/1ps
module rsn_driver #(
  parameter int unsigned NUM_SIB    = 3,
  parameter int unsigned NUM_INSTR  = 0,
  parameter int unsigned SEG_LEN    = 8,
  parameter int unsigned ROUNDS     = 4,
  parameter bit          EXHAUSTIVE = 1'b1,
  parameter int unsigned NUM_ID  = (NUM_INSTR == 0) ? NUM_SIB : NUM_SIB * (NUM_INSTR + 1),
  parameter int unsigned NUM_SEG = (NUM_INSTR == 0) ? NUM_SIB : NUM_SIB * NUM_INSTR
) (
  input  logic                            clk,
  output logic                            rst,
  output logic                            capture,
  output logic                            shift,
  output logic                            update,
  output logic                            sel,
  output logic                            si,
  input  logic                            so,
  output logic [NUM_ID-1:0]               id_bits,
  output logic [NUM_SEG-1:0][SEG_LEN-1:0] instr_di,
  input  logic [NUM_SEG-1:0][SEG_LEN-1:0] instr_do,
  input  logic [NUM_SEG-1:0]              seg_sel,
  output logic                            done,
  output int                              checks,
  output int                              failures
);
  localparam int K     = int'(NUM_INSTR);
  localparam int L     = int'(SEG_LEN);
  localparam int NID   = int'(NUM_ID);
  localparam int NSEG  = int'(NUM_SEG);
  localparam int NBITS = NID + NSEG * L;

  // Mechanisms that must each occur at least once.
  typedef enum int {
    M_BYPASS,     // a SIB left bypassing after a configuration
    M_DIRECT,     // a SIB set to directing mode
    M_RULE1,      // configuration bit adjusted for a Q'-D (ID 1) SIB
    M_RULE2,      // configuration bit used as-is for a Q-D (ID 0) SIB
    M_SHADOW,     // segment data delivered to a shadow register by update
    M_CAPTURE,    // instrument data captured and shifted out
    M_DESELECT,   // network held while deselected
    M_REJECT,     // a wrong ID failed to configure the network
    M_IDREAD,     // chip ID decoded from scan-out (flat network)
    M_DOORWAY,    // a module opened through its doorway (two-level network)
    M_COUNT
  } mech_e;
  int mech [M_COUNT];

  // Reference model: st[b] is S of SIB b, st[NID + s*L + k] is bit k of
  // segment s; mu[b] is U of SIB b; msh[s] the shadow of segment s.
  bit         st  [NBITS];
  bit         mu  [NID];
  bit [L-1:0] msh [NSEG];

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    foreach (mech[m]) mech[m] = 0;
  end

  // Structure of the network.
  function automatic int door_of(int b);   // doorway above SIB b, or -1
    if (K == 0 || b % (K + 1) == K) return -1;
    return (b / (K + 1)) * (K + 1) + K;
  endfunction
  function automatic int seg_of(int b);    // segment below SIB b, or -1
    if (K == 0) return b;
    if (b % (K + 1) == K) return -1;
    return (b / (K + 1)) * K + b % (K + 1);
  endfunction
  function automatic int sib_of(int s);    // SIB above segment s
    return (K == 0) ? s : (s / K) * (K + 1) + s % K;
  endfunction

  function automatic bit on_path(int b, bit u [NID]);
    return door_of(b) < 0 || u[door_of(b)];
  endfunction

  // Active path as state indices, from scan-in to scan-out.
  function automatic void build_path(output int path [$]);
    path = {};
    for (int b = 0; b < NID; b++) begin
      if (!on_path(b, mu)) continue;
      if (seg_of(b) >= 0 && mu[b])
        for (int k = L - 1; k >= 0; k--) path.push_back(NID + seg_of(b) * L + k);
      path.push_back(b);
    end
  endfunction

  function automatic bit seg_selected(int s);
    return sel && on_path(sib_of(s), mu) && mu[sib_of(s)];
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL [%0d SIBs] t=%0t %s", NID, $time, msg);
  endtask

  task automatic model_step();
    int path [$];
    bit old [NBITS];
    bit nmu [NID];
    if (rst) begin
      foreach (st[i]) st[i] = 0;
      foreach (mu[i]) mu[i] = 0;
      foreach (msh[i]) msh[i] = '0;
    end else if (sel && shift) begin
      build_path(path);
      old = st;
      foreach (path[k]) st[path[k]] = (k == 0) ? si : old[path[k-1]];
    end else if (sel && capture) begin
      for (int s = 0; s < NSEG; s++)
        if (seg_selected(s)) for (int k = 0; k < L; k++) st[NID + s*L + k] = instr_di[s][k];
    end else if (sel && update) begin
      for (int s = 0; s < NSEG; s++)
        if (seg_selected(s)) for (int k = 0; k < L; k++) msh[s][k] = st[NID + s*L + k];
      nmu = mu;
      for (int b = 0; b < NID; b++) if (on_path(b, mu)) nmu[b] = st[b] ^ id_bits[b];
      mu = nmu;
    end
  endtask

  task automatic compare();
    int path [$];
    string msg = "";
    build_path(path);
    checks++;
    if (so !== st[path[path.size()-1]])
      msg = {msg, $sformatf(" so=%0b model %0b", so, st[path[path.size()-1]])};
    for (int s = 0; s < NSEG; s++) begin
      if (seg_sel[s] !== seg_selected(s))
        msg = {msg, $sformatf(" seg_sel[%0d]=%0b model %0b", s, seg_sel[s], seg_selected(s))};
      if (instr_do[s] !== msh[s])
        msg = {msg, $sformatf(" instr_do[%0d]=%h model %h", s, instr_do[s], msh[s])};
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

  // Expected selects and path length once the U registers equal want.
  function automatic logic [NSEG-1:0] want_sel(logic [NID-1:0] want);
    logic [NSEG-1:0] r;
    for (int s = 0; s < NSEG; s++) begin
      int b = sib_of(s);
      r[s] = want[b] && (door_of(b) < 0 || want[door_of(b)]);
    end
    return r;
  endfunction
  function automatic int want_len(logic [NID-1:0] want);
    int n = 0;
    for (int b = 0; b < NID; b++) begin
      if (door_of(b) >= 0 && !want[door_of(b)]) continue;
      n += 1;
      if (seg_of(b) >= 0 && want[b]) n += L;
    end
    return n;
  endfunction

  // One CSU: every SIB on the current path gets configuration bit
  // tgt ^ claimed, every segment on it random data; checks the shadows.
  task automatic csu(logic [NID-1:0] tgt, logic [NID-1:0] claimed);
    int path [$];
    bit content [$];
    bit was_sel [NSEG];
    bit [L-1:0] wdata [NSEG];
    build_path(path);
    foreach (path[k]) begin
      if (path[k] < NID) begin
        content.push_back(tgt[path[k]] ^ claimed[path[k]]);
      end else begin
        int s = (path[k] - NID) / L, b = (path[k] - NID) % L;
        wdata[s][b] = 1'($urandom);
        content.push_back(wdata[s][b]);
      end
    end
    for (int s = 0; s < NSEG; s++) was_sel[s] = seg_selected(s);
    for (int q = content.size() - 1; q >= 0; q--) tick(0, 1, 0, content[q]);
    tick(0, 0, 1);
    tick(0, 0, 0);
    for (int s = 0; s < NSEG; s++) begin
      if (!was_sel[s]) continue;
      checks++;
      mech[M_SHADOW]++;
      if (instr_do[s] !== wdata[s])
        fail($sformatf("shadow %0d = %h, written %h", s, instr_do[s], wdata[s]));
    end
  endtask

  // Bring the U registers to want, using the claimed ID for the adjustment.
  task automatic reach(logic [NID-1:0] want, logic [NID-1:0] claimed);
    if (K > 0) begin
      logic [NID-1:0] open_all = want;
      for (int b = 0; b < NID; b++) if (seg_of(b) < 0) open_all[b] = 1'b1;
      csu(open_all, claimed);
    end
    csu(want, claimed);
  endtask

  task automatic configure(logic [NID-1:0] want);
    reach(want, id_bits);
    checks++;
    if (seg_sel !== want_sel(want))
      fail($sformatf("after configuring %b (id %b): seg_sel %b, expected %b",
                     want, id_bits, seg_sel, want_sel(want)));
    for (int b = 0; b < NID; b++) begin
      if (id_bits[b]) mech[M_RULE1]++; else mech[M_RULE2]++;
      if (want[b]) mech[M_DIRECT]++; else mech[M_BYPASS]++;
      if (want[b] && seg_of(b) < 0) mech[M_DOORWAY]++;
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

  // Capture, then shift the path out: S bits as they were, segments on the
  // path with their instrument's data.
  task automatic check_capture();
    int path [$];
    bit exp [$];
    build_path(path);
    foreach (path[k]) begin
      if (path[k] < NID) exp.push_back(st[path[k]]);
      else exp.push_back(instr_di[(path[k] - NID) / L][(path[k] - NID) % L]);
    end
    tick(1, 0, 0);
    for (int k = exp.size() - 1; k >= 0; k--) begin
      checks++;
      if (so !== exp[k]) fail($sformatf("read-back position %0d = %0b", k, so));
      tick(0, 1, 0, 1'($urandom));
    end
    mech[M_CAPTURE]++;
  endtask

  // A tester holding an ID wrong in one bit tries to open every SIB.
  task automatic check_reject();
    logic [NID-1:0] wrong = id_bits;
    wrong[$urandom_range(NID - 1)] ^= 1'b1;
    reach('1, wrong);
    checks++;
    if (seg_sel === want_sel('1)) fail($sformatf("wrong ID %b accepted for %b", wrong, id_bits));
    else mech[M_REJECT]++;
  endtask

  // Decode the ID of a flat network from scan-out without using the model.
  task automatic read_id();
    logic [NID-1:0] got;
    bit ok = 1;
    csu('0, '0);                        // every U now equals its ID bit
    instr_di = '1;
    tick(1, 0, 0);
    for (int i = NID - 1; i >= 0; i--) begin
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

  task automatic new_chip(logic [NID-1:0] id);
    @(negedge clk);
    id_bits = id; rst = 1'b1;
    tick(0, 0, 0);
    @(negedge clk); rst = 1'b0;
    tick(0, 0, 0);
    checks++;
    if (seg_sel !== '0) fail("segments selected after reset");
  endtask

  task automatic exercise(logic [NID-1:0] want);
    for (int s = 0; s < NSEG; s++) instr_di[s] = L'($urandom);
    configure(want);
    check_capture();
    check_length(want_len(want));
  endtask

  function automatic logic [NID-1:0] rand_vec();
    logic [NID-1:0] v;
    for (int i = 0; i < NID; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  task automatic per_chip();
    check_deselect();
    check_reject();
    if (K == 0) read_id();
  endtask

  initial begin
    rst = 1'b1; capture = 0; shift = 0; update = 0; sel = 1'b1; si = 0;
    id_bits = '0; instr_di = '0;
    @(posedge clk);
    #1;
    if (K == 0 && NID == 3) begin
      // Worked example: ID 000 needs sequence 101 to reach segments 1 and 3,
      // ID 101 needs 000 for the same segments (string order SIB1, SIB2, SIB3).
      new_chip(3'b000);
      csu(3'b101, 3'b000);
      checks++;
      if (seg_sel !== 3'b101) fail($sformatf("ID 000, sequence 101: seg_sel %b", seg_sel));
      new_chip(3'b101);
      csu(3'b000, 3'b000);
      checks++;
      if (seg_sel !== 3'b101) fail($sformatf("ID 101, sequence 000: seg_sel %b", seg_sel));
    end
    if (EXHAUSTIVE) begin
      for (int id = 0; id < (1 << NID); id++) begin
        new_chip(NID'(id));
        for (int w = 0; w < (1 << NID); w++) exercise(NID'(w));
        per_chip();
      end
    end else begin
      for (int r = 0; r < int'(ROUNDS); r++) begin
        new_chip(r == 0 ? '0 : (r == 1 ? '1 : rand_vec()));
        exercise(rand_vec());
        exercise(r == 0 ? '1 : rand_vec());
        per_chip();
      end
    end
    for (int m = 0; m < M_COUNT; m++) begin
      if (m == M_IDREAD && K > 0) continue;
      if (m == M_DOORWAY && K == 0) continue;
      checks++;
      if (mech[m] == 0) fail($sformatf("mechanism %s never occurred", mech_e'(m)));
    end
    $display("rsn_driver %0d SIBs (%0d x %0d) L=%0d: bypass=%0d direct=%0d rule1=%0d rule2=%0d shadow=%0d capture=%0d deselect=%0d reject=%0d idread=%0d doorway=%0d",
             NID, NUM_SIB, K, L, mech[M_BYPASS], mech[M_DIRECT], mech[M_RULE1], mech[M_RULE2],
             mech[M_SHADOW], mech[M_CAPTURE], mech[M_DESELECT], mech[M_REJECT],
             mech[M_IDREAD], mech[M_DOORWAY]);
    done = 1'b1;
  end
endmodule

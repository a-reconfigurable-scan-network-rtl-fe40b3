// tb_scan_segment: self-checking test of scan_segment.
//
// Two instances are driven with the same random stream of capture, shift,
// update, select and scan-in values: a 5-bit segment with a shadow register
// and a 1-bit segment without one. A reference model kept as a bit queue
// (front = scan-out end) predicts the scan-out bit and the shadow contents,
// which are compared after every clock edge. Directed phases first check a
// full 5-cycle shift-through (the scan-in bit must appear at scan-out after
// exactly LEN shifts) and that nothing moves while the segment is deselected.
`timescale 1ns/1ps
module tb_scan_segment;
  import rsn_pkg::*;

  localparam int unsigned L = 5;

  logic clk = 1'b0;
  logic rst;
  scan_ctrl_t ctrl;
  logic sel, si;
  logic so_a, so_b;
  logic [L-1:0] din_a, sh_a;
  logic [0:0]   din_b, sh_b;

  int checks = 0, failures = 0;

  scan_segment #(.LEN(L), .HAS_SHADOW(1'b1)) dut_a (
    .clk, .rst, .ctrl, .sel, .si, .so(so_a), .data_in(din_a), .shadow(sh_a));
  scan_segment #(.LEN(1), .HAS_SHADOW(1'b0)) dut_b (
    .clk, .rst, .ctrl, .sel, .si, .so(so_b), .data_in(din_b), .shadow(sh_b));

  always #5 clk = ~clk;

  // Reference state: bit q[k] is the bit k positions from scan-out.
  bit qa[$], qb[$];
  bit [L-1:0] ua;

  task automatic model_step();
    if (rst) begin
      qa = {}; repeat (L) qa.push_back(1'b0);
      qb = {1'b0}; ua = '0;
    end else if (sel) begin
      if (ctrl.capture) begin
        for (int k = 0; k < int'(L); k++) qa[k] = din_a[k];
        qb[0] = din_b[0];
      end else if (ctrl.shift) begin
        void'(qa.pop_front()); qa.push_back(si);
        void'(qb.pop_front()); qb.push_back(si);
      end else if (ctrl.update) begin
        for (int k = 0; k < int'(L); k++) ua[k] = qa[k];
      end
    end
  endtask

  task automatic compare(string what);
    checks++;
    if (so_a !== qa[0] || sh_a !== ua || so_b !== qb[0] || sh_b[0] !== qb[0]) begin
      failures++;
      $display("FAIL %s: so_a=%0b exp %0b sh_a=%b exp %b so_b=%0b sh_b=%0b exp %0b",
               what, so_a, qa[0], sh_a, ua, so_b, sh_b[0], qb[0]);
    end
  endtask

  task automatic cycle(string what);
    @(posedge clk);
    model_step();
    #1 compare(what);
  endtask

  task automatic set_ctrl(bit c, bit s, bit u);
    ctrl = '{capture: c, shift: s, update: u};
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; sel = 1'b0; si = 1'b0; set_ctrl(0, 0, 0);
    din_a = '0; din_b = '0;
    cycle("reset");
    rst = 1'b0;

    // Latency: a 1 shifted in appears at scan-out after exactly L shifts.
    sel = 1'b1; set_ctrl(0, 1, 0);
    si = 1'b1; @(negedge clk);
    begin
      automatic int n = 0;
      cycle("shift-through"); si = 1'b0; n++;
      while (so_a !== 1'b1 && n < 20) begin cycle("shift-through"); n++; end
      checks++;
      if (n != int'(L)) begin
        failures++; $display("FAIL shift latency %0d, expected %0d", n, L);
      end
    end

    // Deselected: capture, shift and update must do nothing.
    @(negedge clk); sel = 1'b0; din_a = 5'b10110; din_b = 1'b1;
    set_ctrl(1, 0, 0); cycle("deselected capture");
    set_ctrl(0, 1, 0); si = 1'b1; cycle("deselected shift");
    set_ctrl(0, 0, 1); cycle("deselected update");

    // Capture, update, then read back by shifting.
    @(negedge clk); sel = 1'b1;
    set_ctrl(1, 0, 0); cycle("capture");
    @(negedge clk); set_ctrl(0, 0, 1); cycle("update");
    checks++;
    if (sh_a !== 5'b10110) begin
      failures++; $display("FAIL shadow after capture+update = %b", sh_a);
    end

    // Random operations.
    repeat (3000) begin
      @(negedge clk);
      case ($urandom_range(3))
        0: set_ctrl(1, 0, 0);
        1, 2: set_ctrl(0, 1, 0);
        default: set_ctrl(0, 0, 1);
      endcase
      if ($urandom_range(15) == 0) set_ctrl(0, 0, 0);
      sel   = ($urandom_range(7) != 0);
      si    = 1'($urandom);
      din_a = L'($urandom);
      din_b = 1'($urandom);
      rst   = ($urandom_range(499) == 0);
      cycle("random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

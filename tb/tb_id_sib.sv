// tb_id_sib: self-checking test of id_sib.
//
// Two ID-SIBs receive the same stimulus; one is programmed Q-D (ID bit 0),
// the other Q'-D (ID bit 1). Directed phases apply the configuration rules:
// for ID bit 0 a shifted-in 1 followed by update must insert the segment and
// a 0 must bypass it; for ID bit 1 it is the other way round. A random phase
// then compares scan-out, the segment's scan-in and its select with a
// reference model of the S and U registers after every clock edge.
`timescale 1ns/1ps
module tb_id_sib;
  import rsn_pkg::*;

  logic clk = 1'b0;
  logic rst;
  scan_ctrl_t ctrl;
  logic sel, si, from_seg;
  logic [1:0] so, to_seg, to_sel;

  int checks = 0, failures = 0;

  id_sib dut0 (.clk, .rst, .ctrl, .sel, .conn(CONN_Q_D), .si, .so(so[0]),
               .to_seg(to_seg[0]), .from_seg, .to_sel(to_sel[0]));
  id_sib dut1 (.clk, .rst, .ctrl, .sel, .conn(CONN_QBAR_D), .si, .so(so[1]),
               .to_seg(to_seg[1]), .from_seg, .to_sel(to_sel[1]));

  always #5 clk = ~clk;

  // Reference registers for both instances (index = ID bit).
  bit ms [2], mu [2];

  task automatic model_step();
    for (int k = 0; k < 2; k++) begin
      if (rst) begin
        ms[k] = 0; mu[k] = 0;
      end else if (sel && ctrl.shift) begin
        ms[k] = mu[k] ? from_seg : si;
      end else if (sel && ctrl.update) begin
        mu[k] = (k == 1) ? !ms[k] : ms[k];
      end
    end
  endtask

  task automatic compare(string what);
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (so[k] !== ms[k] || to_seg[k] !== si || to_sel[k] !== (sel && mu[k])) begin
        failures++;
        $display("FAIL %s id=%0d: so=%0b exp %0b to_seg=%0b to_sel=%0b exp %0b",
                 what, k, so[k], ms[k], to_seg[k], to_sel[k], sel && mu[k]);
      end
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

  // Shift one configuration bit in and update, then check the resulting
  // mode of both SIBs against the expected insertion flags. from_seg follows
  // si, as if the segment below were empty, so the bit reaches S in either
  // mode.
  task automatic configure(bit cfg, bit exp_ins_id0, bit exp_ins_id1);
    @(negedge clk); sel = 1'b1; si = cfg; from_seg = cfg; set_ctrl(0, 1, 0);
    cycle("cfg shift");
    @(negedge clk); set_ctrl(0, 0, 1); cycle("cfg update");
    @(negedge clk); set_ctrl(0, 0, 0);
    checks++;
    if (to_sel[0] !== exp_ins_id0 || to_sel[1] !== exp_ins_id1) begin
      failures++;
      $display("FAIL rule: cfg=%0b inserted id0=%0b id1=%0b, expected %0b %0b",
               cfg, to_sel[0], to_sel[1], exp_ins_id0, exp_ins_id1);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; sel = 1'b0; si = 1'b0; from_seg = 1'b0; set_ctrl(0, 0, 0);
    cycle("reset");
    @(negedge clk); rst = 1'b0;
    checks++;
    if (to_sel !== 2'b00) begin
      failures++; $display("FAIL after reset both SIBs must bypass");
    end

    // Rule 2 (Q-D): 1 inserts, 0 bypasses. Rule 1 (Q'-D): 0 inserts, 1 bypasses.
    configure(1'b1, 1'b1, 1'b0);
    configure(1'b0, 1'b0, 1'b1);
    configure(1'b1, 1'b1, 1'b0);

    // Path selection by U: in directing mode S takes from_seg, else si.
    @(negedge clk); set_ctrl(0, 1, 0); si = 1'b0; from_seg = 1'b1; cycle("mux");
    checks++;
    if (so !== 2'b01) begin
      failures++; $display("FAIL mux: so=%b expected 01", so);
    end

    // Update without select leaves U unchanged.
    @(negedge clk); sel = 1'b0; set_ctrl(0, 0, 1); cycle("deselected update");

    repeat (3000) begin
      @(negedge clk);
      case ($urandom_range(3))
        0: set_ctrl(1, 0, 0);
        1, 2: set_ctrl(0, 1, 0);
        default: set_ctrl(0, 0, 1);
      endcase
      if ($urandom_range(15) == 0) set_ctrl(0, 0, 0);
      sel      = ($urandom_range(7) != 0);
      si       = 1'($urandom);
      from_seg = 1'($urandom);
      rst      = ($urandom_range(499) == 0);
      cycle("random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

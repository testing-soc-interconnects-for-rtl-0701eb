// tb_bsc: self-checking test of the standard boundary scan cell.
//
// Two cells, one capturing its parallel input (the standard cell) and one capturing the
// value it drives (CAPTURE_OUT = 1), are driven with random capture/shift/update
// controls, mode, parallel and scan inputs for 400 TCK cycles. A reference model in the
// testbench keeps its own copy of the shift and update stages (shift/capture on the rising
// TCK edge, update on the falling edge) and every output is compared after each edge.
module tb_bsc;
  timeunit 1ps;
  timeprecision 1ps;
  import jtag_pkg::*;

  logic tck = 1'b0, trst_n;
  bs_ctrl_t ctrl;
  logic pi, sin;
  logic so0, po0, so1, po1;
  int checks = 0, failures = 0;

  bsc dut0 (.tck, .trst_n, .ctrl, .pi, .scan_in(sin), .scan_out(so0), .po(po0));
  bsc #(.CAPTURE_OUT(1'b1)) dut1 (.tck, .trst_n, .ctrl, .pi, .scan_in(sin), .scan_out(so1), .po(po1));

  always #5000 tck = ~tck;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (2000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  logic r1a, r2a, r1b, r2b;
  int n_cap = 0, n_shift = 0, n_upd = 0;

  initial begin
    trst_n = 1'b0; ctrl = '0; pi = 1'b0; sin = 1'b0;
    r1a = 0; r2a = 0; r1b = 0; r2b = 0;
    #12000 trst_n = 1'b1;
    @(posedge tck); #1;
    // directed: normal mode passes pi
    pi = 1'b1; #1 chk(po0, 1'b1, "transparent po=1");
    pi = 1'b0; #1 chk(po0, 1'b0, "transparent po=0");
    for (int k = 0; k < 400; k++) begin
      logic cap_src_a, cap_src_b, po_ref_a, po_ref_b;
      int op;
      op = $urandom_range(0, 3);
      ctrl.capture = (op == 1);
      ctrl.shift   = (op == 2);
      ctrl.update  = (op == 3);
      ctrl.mode    = ($urandom_range(0, 3) != 0);
      ctrl.si      = $urandom_range(0, 1);
      pi  = $urandom_range(0, 1);
      sin = $urandom_range(0, 1);
      #1;
      po_ref_a = ctrl.mode ? r2a : pi;
      po_ref_b = ctrl.mode ? r2b : pi;
      chk(po0, po_ref_a, "po before edge (std)");
      chk(po1, po_ref_b, "po before edge (capture-out)");
      cap_src_a = pi;
      cap_src_b = po_ref_b;
      @(posedge tck); #1;
      if (ctrl.shift) begin r1a = sin; r1b = sin; n_shift++; end
      else if (ctrl.capture) begin r1a = cap_src_a; r1b = cap_src_b; n_cap++; end
      chk(so0, r1a, "scan_out after rise (std)");
      chk(so1, r1b, "scan_out after rise (capture-out)");
      @(negedge tck); #1;
      if (ctrl.update) begin r2a = r1a; r2b = r1b; n_upd++; end
      chk(po0, ctrl.mode ? r2a : pi, "po after fall (std)");
      chk(po1, ctrl.mode ? r2b : pi, "po after fall (capture-out)");
      chk(so0, r1a, "scan_out hold across fall");
    end
    checks++;
    if (n_cap == 0 || n_shift == 0 || n_upd == 0) failures++;
    $display("captures=%0d shifts=%0d updates=%0d", n_cap, n_shift, n_upd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

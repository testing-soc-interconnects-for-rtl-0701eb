// tb_obsc: self-checking test of the observation boundary scan cell.
//
// TCK runs at 10 ns; the sensor window opens on the falling edge of TCK (when patterns are
// launched) and lasts 400 ps. The test checks, against values computed here:
//  - normal mode: core_in follows the pin and Capture-DR captures the pin (sel = 1);
//  - a pin edge inside the window sets no flag, a late edge or a glitch sets it;
//  - under SI = 1, Capture-DR copies the flag into FF1 (sel = 0) and clears the flag,
//    and Shift-DR then passes scan_in (sel = 1 when SI = 1 and ShiftDR = 1);
//  - under SI = 0 the flag keeps its value through a capture;
//  - Update-DR and mode = 1 drive core_in from the update stage.
module tb_obsc;
  timeunit 1ps;
  timeprecision 1ps;
  import jtag_pkg::*;

  localparam int unsigned HALF = 5000;

  logic tck = 1'b0, trst_n;
  bs_ctrl_t ctrl;
  logic pin, sin, so, core_in, flag;
  int checks = 0, failures = 0;
  int n_late = 0, n_ok = 0, n_readout = 0;

  obsc #(.ADR_PS(400)) dut (.tck, .trst_n, .ctrl, .pin, .scan_in(sin), .scan_out(so),
                            .core_in, .flag);

  always #(HALF) tck = ~tck;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // one TCK cycle with the given controls, set just after a rising edge
  task automatic cycle(input logic cap, input logic sh, input logic upd);
    ctrl.capture = cap; ctrl.shift = sh; ctrl.update = upd;
    @(posedge tck); #1;
    ctrl.capture = 0; ctrl.shift = 0; ctrl.update = 0;
  endtask

  // toggle the pin at an offset after the next falling edge of TCK
  task automatic edge_after_fall(input int off);
    @(negedge tck);
    #(off);
    pin = ~pin;
  endtask

  initial begin
    repeat (3000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expf;
    trst_n = 0; ctrl = '0; pin = 0; sin = 0;
    #12000 trst_n = 1;
    @(posedge tck); #1;
    // clear any flag left from start-up
    ctrl.si = 1; cycle(1, 0, 0); ctrl.si = 0;
    @(posedge tck); #1;
    chk(flag, 1'b0, "flag clear after readout");

    // normal mode: transparent, capture takes the pin
    pin = 1; #1 chk(core_in, 1'b1, "normal core_in=pin");
    cycle(1, 0, 0); chk(so, 1'b1, "SI=0 capture takes pin");
    pin = 0; #1 cycle(1, 0, 0); chk(so, 1'b0, "SI=0 capture takes pin (0)");

    for (int k = 0; k < 120; k++) begin
      int off, kind;
      kind = $urandom_range(0, 2);
      off  = (kind == 0) ? $urandom_range(10, 350) : $urandom_range(600, 4000);
      expf = flag;               // flag is sticky
      if (kind == 2) begin
        @(negedge tck); #(off); pin = ~pin; #200 pin = ~pin;
      end else begin
        edge_after_fall(off);
      end
      if (kind == 0) n_ok++; else n_late++;
      expf = expf | (kind != 0);
      @(posedge tck); #1;
      chk(flag, expf, $sformatf("flag after edge at +%0d ps", off));
      if ($urandom_range(0, 2) == 0) begin
        // capture under SI = 0: flag untouched, FF1 gets the pin
        cycle(1, 0, 0);
        chk(so, pin, "SI=0 capture pin");
        chk(flag, expf, "SI=0 capture keeps flag");
      end else begin
        // EX-SITEST readout: capture F, then shift
        ctrl.si = 1;
        cycle(1, 0, 0);
        chk(so, expf, "SI=1 capture gives F");
        chk(flag, 1'b0, "flag cleared after capture");
        sin = 1'($urandom_range(0, 1));
        cycle(0, 1, 0);
        chk(so, sin, "SI=1 shift forms chain");
        ctrl.si = 0;
        n_readout++;
      end
    end

    // update stage and mode
    sin = 1; cycle(0, 1, 0);
    cycle(0, 0, 1);           // update happens on the falling edge inside this cycle
    @(negedge tck); #1;
    ctrl.mode = 1; pin = 0; #1;
    chk(core_in, 1'b1, "mode=1 drives update stage");
    ctrl.mode = 0; #1;
    chk(core_in, 1'b0, "mode=0 drives pin");

    checks++;
    if (n_ok == 0 || n_late == 0 || n_readout == 0) failures++;
    $display("in-window=%0d late=%0d readouts=%0d", n_ok, n_late, n_readout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

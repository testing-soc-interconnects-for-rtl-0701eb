// tb_bidir_cell: self-checking test of the bidirectional pin cell group.
//
// A pad model in the testbench resolves the pin: when this end's enable is 1 the pad
// carries this end's data, otherwise a value driven from the far end; the pad settles a
// programmable time after the falling TCK edge on which patterns are launched. Each round
// shifts a new (enable, data, far-end) pattern through the three cells under EX-SITEST,
// updates it, and in the next round's capture and shift reads back, in scan order
// towards scan_out: the integrity flag of the input cell (expected 1 exactly when the pad
// changed later than the 400 ps window), then the driven data and the driven enable.
// A final check covers normal mode, where the group is transparent.
module tb_bidir_cell;
  timeunit 1ps;
  timeprecision 1ps;
  import jtag_pkg::*;

  logic tck = 1'b0, trst_n;
  bs_ctrl_t ctrl;
  logic sin, so, core_out, core_oe, core_in, pin_out, pin_oe, pin_in, flag;
  logic ext;
  int dly;
  int checks = 0, failures = 0;
  int n_late = 0, n_drive = 0, n_recv = 0;

  bidir_cell #(.ADR_PS(400)) dut (.tck, .trst_n, .ctrl, .scan_in(sin), .scan_out(so),
    .core_out, .core_oe, .core_in, .pin_out, .pin_oe, .pin_in, .flag);

  always #5000 tck = ~tck;

  // pad: settles dly ps after each falling edge
  always @(negedge tck) begin
    logic v;
    #(dly);
    v = pin_oe ? pin_out : ext;
    if (v != pin_in) pin_in = v;
  end

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic cycle(input logic cap, input logic sh, input logic upd);
    ctrl.capture = cap; ctrl.shift = sh; ctrl.update = upd;
    @(posedge tck); #1;
    ctrl.capture = 0; ctrl.shift = 0; ctrl.update = 0;
  endtask

  initial begin
    repeat (5000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e_oe, e_out, e_flag, pad_prev;
    logic [2:0] outb;
    trst_n = 0; ctrl = '0; sin = 0; core_out = 0; core_oe = 0; ext = 0; dly = 100;
    pin_in = 0;
    #12000 trst_n = 1;
    @(posedge tck); #1;
    ctrl.mode = 1; ctrl.si = 1;
    cycle(1, 0, 0);                      // clear start-up flags
    e_oe = 0; e_out = 0; e_flag = 0;
    for (int k = 0; k < 150; k++) begin
      logic n_oe, n_out;
      n_oe  = 1'($urandom_range(0, 1));
      n_out = 1'($urandom_range(0, 1));
      // capture and read back the previous round
      cycle(1, 0, 0);
      for (int b = 0; b < 3; b++) begin
        outb[b] = so;
        // the first bit shifted in ends in the input cell, the last in the enable cell
        sin = (b == 0) ? 1'b0 : (b == 1) ? n_out : n_oe;
        cycle(0, 1, 0);
      end
      if (k > 0) begin
        chk(outb[0], e_flag, $sformatf("flag (round %0d)", k));
        chk(outb[1], e_out, "captured data");
        chk(outb[2], e_oe, "captured enable");
      end
      // launch: pick far-end value and pad delay, then update
      pad_prev = pin_in;
      ext = 1'($urandom_range(0, 1));
      dly = ($urandom_range(0, 1) == 1) ? 1500 : 100;
      cycle(0, 0, 1);
      @(posedge tck); #1;
      chk(pin_oe, n_oe, "pin_oe from update stage");
      chk(pin_out, n_out, "pin_out from update stage");
      chk(pin_in, n_oe ? n_out : ext, "pad value");
      if (n_oe) n_drive++; else n_recv++;
      e_flag = (pin_in != pad_prev) && (dly > 400);
      if (e_flag) n_late++;
      e_oe = n_oe; e_out = n_out;
    end
    // normal mode: transparent
    ctrl.mode = 0; ctrl.si = 0;
    core_out = 1; core_oe = 1; #1;
    chk(pin_out, 1'b1, "normal pin_out"); chk(pin_oe, 1'b1, "normal pin_oe");
    core_oe = 0; #1 chk(pin_oe, 1'b0, "normal pin_oe 0");
    chk(core_in, pin_in, "normal core_in");
    checks++;
    if (n_late == 0 || n_drive == 0 || n_recv == 0) failures++;
    $display("late=%0d driving=%0d receiving=%0d", n_late, n_drive, n_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

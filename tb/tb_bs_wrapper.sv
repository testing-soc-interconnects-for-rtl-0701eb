// tb_bs_wrapper: self-checking test of a core's boundary-scan ring.
//
// A ring with 3 observation cells, 1 bidirectional group and 2 sending cells (an 8-bit
// segment) runs under EX-SITEST. Each round: Capture-DR, then 8 Shift-DR cycles that read
// the previous round's results while shifting in a new random pattern, then Update-DR.
// The testbench drives the receiving pins with new random values, each settling either
// inside (100 ps) or outside (1500 ps) the 400 ps window after the launching falling TCK
// edge, and resolves the bidirectional pad. Expected read-back, worked out here from
// what was driven: for sending cells the value they drive, for observation cells 1 only
// where a pin changed late. The pattern must appear on the pins and on core inputs, which
// also shows the segment is exactly 8 bits long.
module tb_bs_wrapper;
  timeunit 1ps;
  timeprecision 1ps;
  import jtag_pkg::*;

  localparam int NI = 3, NO = 2, NB = 1, L = NI + 3 * NB + NO;

  logic tck = 1'b0, trst_n;
  bs_ctrl_t ctrl;
  logic sin, so;
  logic [NI-1:0] pin_in, core_in, flag_in;
  logic [NO-1:0] core_out, pin_out;
  logic [NB-1:0] core_bd_out, core_bd_oe, core_bd_in, pin_bd_out, pin_bd_oe, pin_bd_in, flag_bd;
  logic [NI-1:0] nxt_in;
  logic [NB-1:0] ext;
  int dly [NI + NB];
  int checks = 0, failures = 0;
  int n_late = 0, n_rounds = 0;

  bs_wrapper #(.N_IN(NI), .N_OUT(NO), .N_BIDIR(NB), .ADR_PS(400)) dut (
    .tck, .trst_n, .ctrl, .scan_in(sin), .scan_out(so), .pin_in, .core_in, .core_out,
    .pin_out, .core_bd_out, .core_bd_oe, .core_bd_in, .pin_bd_out, .pin_bd_oe, .pin_bd_in,
    .flag_in, .flag_bd);

  always #5000 tck = ~tck;

  for (genvar i = 0; i < NI; i++) begin : g_line
    always @(negedge tck) begin
      #(dly[i]);
      if (pin_in[i] != nxt_in[i]) pin_in[i] = nxt_in[i];
    end
  end
  always @(negedge tck) begin
    logic v;
    #(dly[NI]);
    v = pin_bd_oe[0] ? pin_bd_out[0] : ext[0];
    if (pin_bd_in[0] != v) pin_bd_in[0] = v;
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
    repeat (10000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // position p counts from scan_out: 0,1 sending cells out[1], out[0]; 2 input cell of the
  // bidirectional group, 3 its data cell, 4 its enable cell; 5,6,7 input cells 2,1,0.
  initial begin
    logic [L-1:0] v, exp_rd, rd;
    logic [NI+NB-1:0] prev;
    trst_n = 0; ctrl = '0; sin = 0; core_out = '0; core_bd_out = '0; core_bd_oe = '0;
    pin_in = '0; pin_bd_in = '0; nxt_in = '0; ext = '0;
    foreach (dly[i]) dly[i] = 100;
    #12000 trst_n = 1;
    @(posedge tck); #1;
    ctrl.mode = 1; ctrl.si = 1;
    cycle(1, 0, 0);
    exp_rd = '0;
    for (int k = 0; k < 120; k++) begin
      v = L'($urandom);
      cycle(1, 0, 0);
      for (int b = 0; b < L; b++) begin
        rd[b] = so;
        sin = v[b];              // the first bit shifted in travels furthest
        cycle(0, 1, 0);
      end
      if (k > 0)
        for (int p = 0; p < L; p++) chk(rd[p], exp_rd[p], $sformatf("read-back bit %0d", p));
      // next pin values and delays
      prev   = {pin_bd_in, pin_in};
      nxt_in = NI'($urandom);
      ext    = NB'($urandom);
      foreach (dly[i]) dly[i] = ($urandom_range(0, 1) == 1) ? 1500 : 100;
      cycle(0, 0, 1);
      @(posedge tck); #1;
      chk(pin_out[1], v[0], "pin_out[1]");
      chk(pin_out[0], v[1], "pin_out[0]");
      chk(pin_bd_out[0], v[3], "pin_bd_out");
      chk(pin_bd_oe[0], v[4], "pin_bd_oe");
      chk(core_bd_in[0], v[2], "core_bd_in");
      for (int i = 0; i < NI; i++) chk(core_in[i], v[7 - i], "core_in");
      chk(pin_bd_in[0], v[4] ? v[3] : ext[0], "bidirectional pad");
      exp_rd[0] = v[0];
      exp_rd[1] = v[1];
      exp_rd[2] = (pin_bd_in[0] != prev[NI]) && (dly[NI] > 400);
      exp_rd[3] = v[3];
      exp_rd[4] = v[4];
      for (int i = 0; i < NI; i++) exp_rd[7 - i] = (pin_in[i] != prev[i]) && (dly[i] > 400);
      for (int i = 0; i < NI; i++) chk(flag_in[i], exp_rd[7 - i], "flag_in port");
      n_late += $countones({exp_rd[7:5], exp_rd[2]});
      n_rounds++;
    end
    // normal mode is transparent
    ctrl.mode = 0; ctrl.si = 0; core_out = 2'b10; #1;
    chk(pin_out[1], 1'b1, "normal pin_out[1]"); chk(pin_out[0], 1'b0, "normal pin_out[0]");
    for (int i = 0; i < NI; i++) chk(core_in[i], pin_in[i], "normal core_in");
    checks++;
    if (n_late == 0) failures++;
    $display("rounds=%0d late transitions=%0d", n_rounds, n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tap_controller: self-checking test of the 1149.1 TAP state machine.
//
// A reference table of the sixteen states' successors (TMS = 0 and TMS = 1) is held in
// the testbench. The controller is driven with 3000 random TMS values, with runs of five
// ones to check the return to Test-Logic-Reset from any state, and with an asynchronous
// TRST_N pulse; state and decoded strobes are compared after every rising TCK edge.
module tb_tap_controller;
  timeunit 1ps;
  timeprecision 1ps;
  import jtag_pkg::*;

  logic tck = 1'b0, trst_n, tms;
  tap_state_t state;
  logic tlr, cdr, sdr, udr, cir, sir, uir;
  int checks = 0, failures = 0;

  tap_controller dut (.tck, .trst_n, .tms, .state, .test_logic_reset(tlr),
                      .capture_dr(cdr), .shift_dr(sdr), .update_dr(udr),
                      .capture_ir(cir), .shift_ir(sir), .update_ir(uir));

  always #5000 tck = ~tck;

  // successor table, index = state code: {TMS=0, TMS=1}
  tap_state_t succ0 [16] = '{RTI, RTI, CAPTURE_DR, SHIFT_DR, SHIFT_DR, PAUSE_DR, PAUSE_DR,
                             SHIFT_DR, RTI, CAPTURE_IR, SHIFT_IR, SHIFT_IR, PAUSE_IR,
                             PAUSE_IR, SHIFT_IR, RTI};
  tap_state_t succ1 [16] = '{TLR, SEL_DR, SEL_IR, EXIT1_DR, EXIT1_DR, UPDATE_DR, EXIT2_DR,
                             UPDATE_DR, SEL_DR, TLR, EXIT1_IR, EXIT1_IR, UPDATE_IR,
                             EXIT2_IR, UPDATE_IR, SEL_DR};

  task automatic chk(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int visited [16];

  initial begin
    tap_state_t ref_s;
    trst_n = 0; tms = 1;
    #12000 trst_n = 1;
    ref_s = TLR;
    @(negedge tck);
    chk(state, ref_s, "state after TRST");
    for (int k = 0; k < 3000; k++) begin
      if (k % 97 < 5) tms = 1'b1;                 // five ones in a row
      else            tms = 1'($urandom_range(0, 1));
      @(posedge tck); #1;
      ref_s = tms ? succ1[ref_s] : succ0[ref_s];
      visited[ref_s]++;
      chk(state, ref_s, "state");
      if (k % 97 == 4) chk(state, TLR, "five TMS=1 reach Test-Logic-Reset");
      chk({tlr, cdr, sdr, udr}, {ref_s == TLR, ref_s == CAPTURE_DR, ref_s == SHIFT_DR,
          ref_s == UPDATE_DR}, "DR strobes");
      chk({1'b0, cir, sir, uir}, {1'b0, ref_s == CAPTURE_IR, ref_s == SHIFT_IR,
          ref_s == UPDATE_IR}, "IR strobes");
      if (k == 1500) begin
        #2000 trst_n = 0; #1 chk(state, TLR, "async TRST");
        #1000 trst_n = 1;
        ref_s = TLR;
      end
      @(negedge tck);
    end
    for (int s = 0; s < 16; s++) begin
      checks++;
      if (visited[s] == 0) begin
        failures++;
        $display("state %0d never visited", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

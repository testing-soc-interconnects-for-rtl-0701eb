// tb_instruction_register: self-checking test of the instruction register and decoder.
//
// The TAP strobes are driven directly. Each round loads a random opcode (one of the four
// defined or an unused one): Capture-IR, four Shift-IR cycles (LSB first; the first
// shifted-out bits must be the captured 01 pattern), Update-IR on the falling edge. The
// decoded controls are compared with the expected decode of the opcode: EXTEST and
// EX-SITEST give mode = 1, only EX-SITEST gives si = 1, SAMPLE selects the boundary
// register with mode = 0, anything else selects the bypass register. Test-Logic-Reset
// must return the decoder to BYPASS.
module tb_instruction_register;
  timeunit 1ps;
  timeprecision 1ps;
  import jtag_pkg::*;

  logic tck = 1'b0, trst_n, tdi, tlr, cir, sir, uir;
  logic tdo_ir, sel_b, mode, si;
  ir_t instr;
  int checks = 0, failures = 0;
  int n_si = 0;

  instruction_register dut (.tck, .trst_n, .tdi, .test_logic_reset(tlr), .capture_ir(cir),
                            .shift_ir(sir), .update_ir(uir), .tdo_ir, .instr,
                            .sel_boundary(sel_b), .mode, .si);

  always #5000 tck = ~tck;

  task automatic chk(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (3000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trst_n = 0; tdi = 0; tlr = 0; cir = 0; sir = 0; uir = 0;
    #12000 trst_n = 1;
    @(posedge tck); #1;
    chk(instr, OP_BYPASS, "reset to BYPASS");
    chk({1'b0, sel_b, mode, si}, 4'b0000, "BYPASS decode");
    for (int k = 0; k < 150; k++) begin
      ir_t op;
      logic [3:0] outbits;
      logic e_sel, e_mode, e_si;
      case ($urandom_range(0, 4))
        0: op = 4'b0000;
        1: op = 4'b0001;
        2: op = 4'b0010;
        3: op = 4'b1111;
        default: op = ir_t'($urandom_range(3, 14));
      endcase
      cir = 1; @(posedge tck); #1; cir = 0;
      sir = 1;
      for (int b = 0; b < 4; b++) begin
        outbits[b] = tdo_ir;
        tdi = op[b];
        @(posedge tck); #1;
      end
      sir = 0;
      chk(outbits[1:0], 2'b01, "captured 01 shifted out");
      uir = 1; @(negedge tck); #1; @(posedge tck); #1; uir = 0;
      e_sel  = (op == 4'b0000) || (op == 4'b0001) || (op == 4'b0010);
      e_mode = (op == 4'b0000) || (op == 4'b0010);
      e_si   = (op == 4'b0010);
      if (e_si) n_si++;
      chk(instr, op, "instruction");
      chk({1'b0, sel_b, mode, si}, {1'b0, e_sel, e_mode, e_si}, $sformatf("decode of %b", op));
      if (k % 30 == 29) begin
        tlr = 1; @(negedge tck); #1; tlr = 0;
        chk(instr, OP_BYPASS, "Test-Logic-Reset gives BYPASS");
        @(posedge tck); #1;
      end
    end
    checks++;
    if (n_si == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// instruction_register: 1149.1 instruction register and decoder with EX-SITEST.
//
// The shift stage loads the fixed pattern ...01 in Capture-IR and shifts LSB first from
// TDI in Shift-IR, both on the rising edge of TCK. The update stage takes the shifted
// word on the falling edge of TCK in Update-IR, which is where the new instruction is
// decoded, and falls back to BYPASS in Test-Logic-Reset.
//
// Decoding follows the signal-integrity extension: EX-SITEST is EXTEST with one extra
// control, SI, raised. Both put the boundary cells in test mode (mode = 1); SAMPLE/PRELOAD
// selects the boundary register with the cells transparent; BYPASS and every unused
// opcode select the one-bit bypass register. The opcode values and the set of
// instructions besides EXTEST and EX-SITEST are this design's choice.
module instruction_register
  import jtag_pkg::*;
(
  input  logic tck,
  input  logic trst_n,
  input  logic tdi,
  input  logic test_logic_reset,
  input  logic capture_ir,
  input  logic shift_ir,
  input  logic update_ir,
  output logic tdo_ir,       // LSB of the shift stage, towards TDO
  output ir_t  instr,        // current instruction
  output logic sel_boundary, // boundary register between TDI and TDO
  output logic mode,         // boundary cells drive their update stage
  output logic si            // signal-integrity observation enabled
);

  timeunit 1ps;
  timeprecision 1ps;

  ir_t shreg;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)         shreg <= OP_BYPASS;
    else if (capture_ir) shreg <= ir_t'(2'b01);
    else if (shift_ir)   shreg <= {tdi, shreg[IR_WIDTH-1:1]};
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)               instr <= OP_BYPASS;
    else if (test_logic_reset) instr <= OP_BYPASS;
    else if (update_ir)        instr <= shreg;
  end

  assign tdo_ir = shreg[0];

  always_comb begin
    sel_boundary = 1'b0;
    mode         = 1'b0;
    si           = 1'b0;
    unique case (instr)
      OP_EXTEST:    begin sel_boundary = 1'b1; mode = 1'b1; end
      OP_EX_SITEST: begin sel_boundary = 1'b1; mode = 1'b1; si = 1'b1; end
      OP_SAMPLE:    sel_boundary = 1'b1;
      default:      ;
    endcase
  end

endmodule

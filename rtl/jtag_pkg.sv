// jtag_pkg: types and constants shared by the signal-integrity boundary-scan design.
//
// The TAP follows the sixteen-state machine of IEEE 1149.1 unchanged; the only new
// piece of test logic is the EX-SITEST instruction, which behaves like EXTEST and in
// addition raises the SI control that switches observation cells (OBSCs) to read out
// their integrity flags. The instruction codes below are this design's own choice:
// only BYPASS = all ones is fixed by 1149.1. The bundle bs_ctrl_t carries the data
// register controls that every boundary-scan cell receives from the TAP.
package jtag_pkg;

  timeunit 1ps;
  timeprecision 1ps;

  // Instruction register width and opcodes.
  localparam int unsigned IR_WIDTH = 4;
  typedef logic [IR_WIDTH-1:0] ir_t;
  localparam ir_t OP_EXTEST    = 4'b0000;
  localparam ir_t OP_SAMPLE    = 4'b0001;  // SAMPLE/PRELOAD
  localparam ir_t OP_EX_SITEST = 4'b0010;
  localparam ir_t OP_BYPASS    = 4'b1111;

  // IEEE 1149.1 TAP controller states.
  typedef enum logic [3:0] {
    TLR        = 4'h0,  // Test-Logic-Reset
    RTI        = 4'h1,  // Run-Test/Idle
    SEL_DR     = 4'h2,
    CAPTURE_DR = 4'h3,
    SHIFT_DR   = 4'h4,
    EXIT1_DR   = 4'h5,
    PAUSE_DR   = 4'h6,
    EXIT2_DR   = 4'h7,
    UPDATE_DR  = 4'h8,
    SEL_IR     = 4'h9,
    CAPTURE_IR = 4'hA,
    SHIFT_IR   = 4'hB,
    EXIT1_IR   = 4'hC,
    PAUSE_IR   = 4'hD,
    EXIT2_IR   = 4'hE,
    UPDATE_IR  = 4'hF
  } tap_state_t;

  // Data-register controls distributed to every boundary-scan cell.
  //   capture : TAP is in Capture-DR and the boundary register is selected
  //   shift   : TAP is in Shift-DR and the boundary register is selected (ShiftDR)
  //   update  : TAP is in Update-DR and the boundary register is selected (UpdateDR)
  //   mode    : test mode, cells drive their update stage (EXTEST, EX-SITEST)
  //   si      : signal-integrity mode (EX-SITEST)
  typedef struct packed {
    logic capture;
    logic shift;
    logic update;
    logic mode;
    logic si;
  } bs_ctrl_t;

endpackage

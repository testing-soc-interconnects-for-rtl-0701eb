// tap_controller: IEEE 1149.1 test access port state machine.
//
// The signal-integrity extension keeps the TAP exactly as the standard defines it; only
// instruction decoding changes (see instruction_register). The sixteen states advance on
// the rising edge of TCK under control of TMS. TRST_N resets asynchronously to
// Test-Logic-Reset, and five TCK cycles with TMS high reach it from any state.
//
// Outputs are decoded from the current state, so they are valid for the whole TCK cycle
// in which the state is held: a register enabled by shift_dr on the rising edge of TCK
// shifts once per cycle spent in Shift-DR; the update_* strobes are meant for registers
// clocked on the falling edge of TCK, as 1149.1 prescribes for update stages. The figure
// of a standard cell draws ClockDR and UpdateDR as clocks; this design uses one TCK and
// these strobes as enables instead of gated clocks.
module tap_controller
  import jtag_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  output tap_state_t state,
  output logic       test_logic_reset,
  output logic       capture_dr,
  output logic       shift_dr,
  output logic       update_dr,
  output logic       capture_ir,
  output logic       shift_ir,
  output logic       update_ir
);

  timeunit 1ps;
  timeprecision 1ps;

  tap_state_t next;

  always_comb begin
    unique case (state)
      TLR:        next = tms ? TLR       : RTI;
      RTI:        next = tms ? SEL_DR    : RTI;
      SEL_DR:     next = tms ? SEL_IR    : CAPTURE_DR;
      CAPTURE_DR: next = tms ? EXIT1_DR  : SHIFT_DR;
      SHIFT_DR:   next = tms ? EXIT1_DR  : SHIFT_DR;
      EXIT1_DR:   next = tms ? UPDATE_DR : PAUSE_DR;
      PAUSE_DR:   next = tms ? EXIT2_DR  : PAUSE_DR;
      EXIT2_DR:   next = tms ? UPDATE_DR : SHIFT_DR;
      UPDATE_DR:  next = tms ? SEL_DR    : RTI;
      SEL_IR:     next = tms ? TLR       : CAPTURE_IR;
      CAPTURE_IR: next = tms ? EXIT1_IR  : SHIFT_IR;
      SHIFT_IR:   next = tms ? EXIT1_IR  : SHIFT_IR;
      EXIT1_IR:   next = tms ? UPDATE_IR : PAUSE_IR;
      PAUSE_IR:   next = tms ? EXIT2_IR  : PAUSE_IR;
      EXIT2_IR:   next = tms ? UPDATE_IR : SHIFT_IR;
      UPDATE_IR:  next = tms ? SEL_DR    : RTI;
      default:    next = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state <= TLR;
    else         state <= next;
  end

  assign test_logic_reset = (state == TLR);
  assign capture_dr       = (state == CAPTURE_DR);
  assign shift_dr         = (state == SHIFT_DR);
  assign update_dr        = (state == UPDATE_DR);
  assign capture_ir       = (state == CAPTURE_IR);
  assign shift_ir         = (state == SHIFT_IR);
  assign update_ir        = (state == UPDATE_IR);

endmodule

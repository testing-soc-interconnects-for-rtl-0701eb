// si_soc_top: a small SoC whose core-to-core interconnects are tested for signal
// integrity through an extended IEEE 1149.1 boundary scan.
//
// Four cores, i, j, l and k, are each wrapped in a boundary-scan ring (bs_wrapper).
// Every interconnect ends in an observation cell (obsc) whose integrity loss sensor
// records a transition that arrives outside the acceptable delay region after the
// pattern was launched. The interconnects under test are
//   i -> j : N_IJ unidirectional lines
//   j <-> l: N_JL bidirectional lines (observation cells at both ends)
//   l -> k : N_LK unidirectional lines
//   k -> l : N_KL unidirectional lines
// One TAP (tap_controller, instruction_register, a one-bit bypass register) serves all
// rings, which form one chain:
//   TDI -> ring i -> ring j -> ring l -> ring k -> TDO
// of length N_IJ + (N_IJ + 3*N_JL) + (3*N_JL + N_LK + N_KL) + (N_LK + N_KL) bits.
//
// Instructions: EXTEST applies patterns (sending cells drive the lines from their update
// stages); EX-SITEST does the same and additionally, in Capture-DR, loads every
// observation cell with its integrity flag F and clears the flag, so the following
// Shift-DR reads the flags out on TDO; SAMPLE/PRELOAD and BYPASS as in 1149.1. The
// five JTAG pins are unchanged.
//
// The cores and the interconnect wires are not part of this RTL: the core side and the
// pin side of every ring are ports. An integration connects i_pin_out to j_pin_in and so
// on through the physical wires; the sensors then watch the real wire delays.
//
// TDO changes on the falling edge of TCK and is enabled (tdo_en) in Shift-IR and Shift-DR,
// as 1149.1 requires. The interconnect counts and the scan order are this design's
// choices; the document's drawing shows the four cores and their cell types but no counts.
module si_soc_top
  import jtag_pkg::*;
#(
  parameter int unsigned N_IJ   = 32,
  parameter int unsigned N_JL   = 2,
  parameter int unsigned N_LK   = 2,
  parameter int unsigned N_KL   = 1,
  parameter int unsigned ADR_PS = 400
) (
  // JTAG
  input  logic            tck,
  input  logic            tms,
  input  logic            tdi,
  input  logic            trst_n,
  output logic            tdo,
  output logic            tdo_en,
  // core i
  input  logic [N_IJ-1:0] i_core_out,
  output logic [N_IJ-1:0] i_pin_out,
  // core j
  input  logic [N_IJ-1:0] j_pin_in,
  output logic [N_IJ-1:0] j_core_in,
  input  logic [N_JL-1:0] j_core_bd_out,
  input  logic [N_JL-1:0] j_core_bd_oe,
  output logic [N_JL-1:0] j_core_bd_in,
  output logic [N_JL-1:0] j_pin_bd_out,
  output logic [N_JL-1:0] j_pin_bd_oe,
  input  logic [N_JL-1:0] j_pin_bd_in,
  // core l
  input  logic [N_JL-1:0] l_core_bd_out,
  input  logic [N_JL-1:0] l_core_bd_oe,
  output logic [N_JL-1:0] l_core_bd_in,
  output logic [N_JL-1:0] l_pin_bd_out,
  output logic [N_JL-1:0] l_pin_bd_oe,
  input  logic [N_JL-1:0] l_pin_bd_in,
  input  logic [N_LK-1:0] l_core_out,
  output logic [N_LK-1:0] l_pin_out,
  input  logic [N_KL-1:0] l_pin_in,
  output logic [N_KL-1:0] l_core_in,
  // core k
  input  logic [N_LK-1:0] k_pin_in,
  output logic [N_LK-1:0] k_core_in,
  input  logic [N_KL-1:0] k_core_out,
  output logic [N_KL-1:0] k_pin_out
);

  timeunit 1ps;
  timeprecision 1ps;

  // ---------------------------------------------------------------- TAP
  tap_state_t state;
  logic tlr, cap_dr, sh_dr, up_dr, cap_ir, sh_ir, up_ir;
  logic tdo_ir, sel_bsr, mode, si;
  ir_t  instr;

  tap_controller u_tap (
    .tck, .trst_n, .tms, .state, .test_logic_reset(tlr),
    .capture_dr(cap_dr), .shift_dr(sh_dr), .update_dr(up_dr),
    .capture_ir(cap_ir), .shift_ir(sh_ir), .update_ir(up_ir)
  );

  instruction_register u_ir (
    .tck, .trst_n, .tdi, .test_logic_reset(tlr),
    .capture_ir(cap_ir), .shift_ir(sh_ir), .update_ir(up_ir),
    .tdo_ir, .instr, .sel_boundary(sel_bsr), .mode, .si
  );

  // Bypass register: captures 0, shifts TDI.
  logic bypass_q;
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                       bypass_q <= 1'b0;
    else if (cap_dr && !sel_bsr)       bypass_q <= 1'b0;
    else if (sh_dr && !sel_bsr)        bypass_q <= tdi;
  end

  bs_ctrl_t ctrl;
  assign ctrl.capture = cap_dr & sel_bsr;
  assign ctrl.shift   = sh_dr  & sel_bsr;
  assign ctrl.update  = up_dr  & sel_bsr;
  assign ctrl.mode    = mode;
  assign ctrl.si      = si;

  // ---------------------------------------------------------------- rings
  logic s_ij, s_jl, s_lk, bsr_out;

  bs_wrapper #(.N_IN(0), .N_OUT(N_IJ), .N_BIDIR(0), .ADR_PS(ADR_PS)) u_ring_i (
    .tck, .trst_n, .ctrl, .scan_in(tdi), .scan_out(s_ij),
    .pin_in(1'b0), .core_in(),
    .core_out(i_core_out), .pin_out(i_pin_out),
    .core_bd_out(1'b0), .core_bd_oe(1'b0), .core_bd_in(),
    .pin_bd_out(), .pin_bd_oe(), .pin_bd_in(1'b0),
    .flag_in(), .flag_bd()
  );

  bs_wrapper #(.N_IN(N_IJ), .N_OUT(0), .N_BIDIR(N_JL), .ADR_PS(ADR_PS)) u_ring_j (
    .tck, .trst_n, .ctrl, .scan_in(s_ij), .scan_out(s_jl),
    .pin_in(j_pin_in), .core_in(j_core_in),
    .core_out(1'b0), .pin_out(),
    .core_bd_out(j_core_bd_out), .core_bd_oe(j_core_bd_oe), .core_bd_in(j_core_bd_in),
    .pin_bd_out(j_pin_bd_out), .pin_bd_oe(j_pin_bd_oe), .pin_bd_in(j_pin_bd_in),
    .flag_in(), .flag_bd()
  );

  bs_wrapper #(.N_IN(N_KL), .N_OUT(N_LK), .N_BIDIR(N_JL), .ADR_PS(ADR_PS)) u_ring_l (
    .tck, .trst_n, .ctrl, .scan_in(s_jl), .scan_out(s_lk),
    .pin_in(l_pin_in), .core_in(l_core_in),
    .core_out(l_core_out), .pin_out(l_pin_out),
    .core_bd_out(l_core_bd_out), .core_bd_oe(l_core_bd_oe), .core_bd_in(l_core_bd_in),
    .pin_bd_out(l_pin_bd_out), .pin_bd_oe(l_pin_bd_oe), .pin_bd_in(l_pin_bd_in),
    .flag_in(), .flag_bd()
  );

  bs_wrapper #(.N_IN(N_LK), .N_OUT(N_KL), .N_BIDIR(0), .ADR_PS(ADR_PS)) u_ring_k (
    .tck, .trst_n, .ctrl, .scan_in(s_lk), .scan_out(bsr_out),
    .pin_in(k_pin_in), .core_in(k_core_in),
    .core_out(k_core_out), .pin_out(k_pin_out),
    .core_bd_out(1'b0), .core_bd_oe(1'b0), .core_bd_in(),
    .pin_bd_out(), .pin_bd_oe(), .pin_bd_in(1'b0),
    .flag_in(), .flag_bd()
  );

  // ---------------------------------------------------------------- TDO
  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tdo    <= 1'b0;
      tdo_en <= 1'b0;
    end else begin
      tdo_en <= sh_ir | sh_dr;
      if (sh_ir)       tdo <= tdo_ir;
      else if (sh_dr)  tdo <= sel_bsr ? bsr_out : bypass_q;
    end
  end

endmodule

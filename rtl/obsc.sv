// obsc: observation boundary scan cell for the receiving end of an interconnect.
//
// A standard cell (FF1 shift/capture stage, FF2 update stage, Mode multiplexer) with an
// integrity loss sensor (ILS) and a sticky flag F in front of it. The sensor watches the
// input pin; when it reports a transition outside the acceptable delay region, F is set
// (asynchronously, by the sensor pulse) and stays set until it has been read.
//
// The capture path has two multiplexers. The first, steered by shift, picks the input
// pin or scan_in, as in a standard cell. The second, steered by sel = ~si | shift, puts F
// in front of FF1 when sel = 0:
//   si shift | sel
//    1   0   |  0   Capture-DR under EX-SITEST: FF1 <= F, then F is cleared
//    1   1   |  1   Shift-DR: scan chain formed, the flag travels towards TDO
//    0   x   |  1   normal / EXTEST: the cell is a standard cell
// F is cleared on the same rising TCK edge that copies it into FF1. The sensor and F keep
// recording while si = 0; si only decides whether F is read out. FF1 loads on the rising
// TCK edge, FF2 on the falling edge in Update-DR; FF1 and FF2 clear on TRST_N.
//
// Following the document: the two multiplexers, the OR of ~SI and ShiftDR, the capture of
// F and its clearing after capture. This design's choices: the sensor window is opened by
// the falling TCK edge (when update stages launch patterns), F is set asynchronously,
// recording continues outside EX-SITEST, and F is cleared by TRST_N on a TCK edge.
module obsc
  import jtag_pkg::*;
#(
  parameter int unsigned ADR_PS = 400  // sensor acceptable delay region, in ps
) (
  input  logic     tck,
  input  logic     trst_n,
  input  bs_ctrl_t ctrl,
  input  logic     pin,      // input pin, end of the interconnect
  input  logic     scan_in,  // TDI or previous cell
  output logic     scan_out, // FF1, to TDO or next cell
  output logic     core_in,  // to the core
  output logic     flag      // F, integrity loss seen since last read
);

  timeunit 1ps;
  timeprecision 1ps;

  logic ils_c, sel, d_std, d1, q1, q2;

  ils_sensor #(.ADR_PS(ADR_PS)) u_ils (
    .clk (~tck),
    .a   (pin),
    .c   (ils_c)
  );

  // ILS flip-flop: set by the sensor pulse, cleared once captured under EX-SITEST.
  // Its only asynchronous input is the set; TRST_N clears it on a TCK edge.
  always_ff @(posedge tck or posedge ils_c) begin
    if (ils_c)                                    flag <= 1'b1;
    else if (!trst_n || (ctrl.capture && ctrl.si)) flag <= 1'b0;
  end

  assign sel   = ~ctrl.si | ctrl.shift;
  assign d_std = ctrl.shift ? scan_in : pin;
  assign d1    = sel ? d_std : flag;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                        q1 <= 1'b0;
    else if (ctrl.capture || ctrl.shift) q1 <= d1;
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)          q2 <= 1'b0;
    else if (ctrl.update) q2 <= q1;
  end

  assign scan_out = q1;
  assign core_in  = ctrl.mode ? q2 : pin;

endmodule

// bsc: standard IEEE 1149.1 boundary scan cell with a shift stage and an update stage.
//
// FF1 (the shift/capture stage) loads on the rising edge of TCK: the parallel value in
// Capture-DR, the previous cell's bit (scan_in) in Shift-DR. FF2 (the update stage) takes
// FF1 on the falling edge of TCK in Update-DR. With mode = 1 (EXTEST, EX-SITEST) the cell
// output is FF2, otherwise the parallel input passes straight through. FF1 is the cell's
// scan output towards TDO. Both stages clear on TRST_N.
//
// The structure is the standard cell of the design (two multiplexers, two flip-flops).
// CAPTURE_OUT is this design's addition: when 1 the cell captures the value it drives
// (pi in normal mode, FF2 in test mode) instead of pi. Sending cells use it so that a
// Capture-DR between two patterns leaves the pattern just applied in the chain, which
// the overlapping pattern compression relies on.
module bsc
  import jtag_pkg::*;
#(
  parameter bit CAPTURE_OUT = 1'b0
) (
  input  logic     tck,
  input  logic     trst_n,
  input  bs_ctrl_t ctrl,
  input  logic     pi,       // core output (sending cell) or pin (receiving cell)
  input  logic     scan_in,  // TDI or previous cell
  output logic     scan_out, // FF1, to TDO or next cell
  output logic     po        // pin (sending cell) or core input (receiving cell)
);

  timeunit 1ps;
  timeprecision 1ps;

  logic q1, q2, cap;

  assign po  = ctrl.mode ? q2 : pi;
  assign cap = CAPTURE_OUT ? po : pi;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                      q1 <= 1'b0;
    else if (ctrl.shift)              q1 <= scan_in;
    else if (ctrl.capture)            q1 <= cap;
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)          q2 <= 1'b0;
    else if (ctrl.update) q2 <= q1;
  end

  assign scan_out = q1;

endmodule

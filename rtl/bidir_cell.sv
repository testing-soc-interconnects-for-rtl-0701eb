// bidir_cell: boundary-scan cells of one bidirectional interconnect pin.
//
// A bidirectional pin carries three cells: a control cell for the output enable, a
// sending cell for the output data and, because the pin also receives, an observation
// cell (obsc) with an integrity loss sensor on the input. Scan order inside the group is
// scan_in -> enable cell -> data cell -> observation cell -> scan_out. In test mode the
// enable and data cells drive the pad from their update stages, so the tester decides
// which end of the wire drives; the observation cell watches the pad value whichever end
// drives it, including this one.
//
// The document uses observation cells at both ends of a bidirectional interconnect and
// costs the bidirectional case as three cells; the split into enable, data and input
// cells is the usual 1149.1 arrangement and is this design's reading. The pad itself
// (a tri-state driver) is outside: pin_out/pin_oe go to it and pin_in comes from it.
module bidir_cell
  import jtag_pkg::*;
#(
  parameter int unsigned ADR_PS = 400
) (
  input  logic     tck,
  input  logic     trst_n,
  input  bs_ctrl_t ctrl,
  input  logic     scan_in,
  output logic     scan_out,
  input  logic     core_out, // data from the core
  input  logic     core_oe,  // output enable from the core
  output logic     core_in,  // data to the core
  output logic     pin_out,  // data to the pad driver
  output logic     pin_oe,   // enable of the pad driver
  input  logic     pin_in,   // value on the pad
  output logic     flag      // integrity flag of the observation cell
);

  timeunit 1ps;
  timeprecision 1ps;

  logic s_oe, s_out;

  bsc #(.CAPTURE_OUT(1'b1)) u_oe (
    .tck, .trst_n, .ctrl, .pi(core_oe), .scan_in, .scan_out(s_oe), .po(pin_oe)
  );

  bsc #(.CAPTURE_OUT(1'b1)) u_out (
    .tck, .trst_n, .ctrl, .pi(core_out), .scan_in(s_oe), .scan_out(s_out), .po(pin_out)
  );

  obsc #(.ADR_PS(ADR_PS)) u_in (
    .tck, .trst_n, .ctrl, .pin(pin_in), .scan_in(s_out), .scan_out, .core_in, .flag
  );

endmodule

// bs_wrapper: boundary-scan ring of one core in the signal-integrity test architecture.
//
// Cells sit between the core and its interconnect pins. Every pin that receives from an
// interconnect gets an observation cell (obsc) with an integrity loss sensor; every pin
// that only sends gets a standard cell (bsc); every bidirectional pin gets a bidir_cell
// group (enable, data and observation cells). The cells form one segment of the chip's
// boundary scan chain, in the order
//   scan_in -> N_IN observation cells -> N_BIDIR bidirectional groups -> N_OUT sending
//   cells -> scan_out
// with index 0 of each group first, so the segment is N_IN + 3*N_BIDIR + N_OUT bits long.
// Any of the three counts may be 0 (the matching ports then have one unused bit).
//
// The flags of the observation cells are brought out as well so that a user of the
// wrapper can watch them; the test itself reads them through the chain. Timing is that of
// the cells: capture and shift on the rising TCK edge, update on the falling edge.
module bs_wrapper
  import jtag_pkg::*;
#(
  parameter int unsigned N_IN    = 4,
  parameter int unsigned N_OUT   = 4,
  parameter int unsigned N_BIDIR = 2,
  parameter int unsigned ADR_PS  = 400,
  localparam int unsigned WI = (N_IN    > 0) ? N_IN    : 1,
  localparam int unsigned WO = (N_OUT   > 0) ? N_OUT   : 1,
  localparam int unsigned WB = (N_BIDIR > 0) ? N_BIDIR : 1
) (
  input  logic          tck,
  input  logic          trst_n,
  input  bs_ctrl_t      ctrl,
  input  logic          scan_in,
  output logic          scan_out,
  // receiving pins
  input  logic [WI-1:0] pin_in,
  output logic [WI-1:0] core_in,
  // sending pins
  input  logic [WO-1:0] core_out,
  output logic [WO-1:0] pin_out,
  // bidirectional pins
  input  logic [WB-1:0] core_bd_out,
  input  logic [WB-1:0] core_bd_oe,
  output logic [WB-1:0] core_bd_in,
  output logic [WB-1:0] pin_bd_out,
  output logic [WB-1:0] pin_bd_oe,
  input  logic [WB-1:0] pin_bd_in,
  // integrity flags: receiving pins, then bidirectional pins
  output logic [WI-1:0] flag_in,
  output logic [WB-1:0] flag_bd
);

  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NC = N_IN + N_BIDIR + N_OUT;  // chain links
  logic [NC:0] ch;
  assign ch[0]    = scan_in;
  assign scan_out = ch[NC];

  for (genvar i = 0; i < int'(N_IN); i++) begin : g_in
    obsc #(.ADR_PS(ADR_PS)) u_obsc (
      .tck, .trst_n, .ctrl, .pin(pin_in[i]), .scan_in(ch[i]), .scan_out(ch[i+1]),
      .core_in(core_in[i]), .flag(flag_in[i])
    );
  end
  if (N_IN == 0) begin : g_no_in
    assign core_in = '0;
    assign flag_in = '0;
  end

  for (genvar i = 0; i < int'(N_BIDIR); i++) begin : g_bd
    bidir_cell #(.ADR_PS(ADR_PS)) u_bd (
      .tck, .trst_n, .ctrl, .scan_in(ch[N_IN+i]), .scan_out(ch[N_IN+i+1]),
      .core_out(core_bd_out[i]), .core_oe(core_bd_oe[i]), .core_in(core_bd_in[i]),
      .pin_out(pin_bd_out[i]), .pin_oe(pin_bd_oe[i]), .pin_in(pin_bd_in[i]),
      .flag(flag_bd[i])
    );
  end
  if (N_BIDIR == 0) begin : g_no_bd
    assign core_bd_in = '0;
    assign pin_bd_out = '0;
    assign pin_bd_oe  = '0;
    assign flag_bd    = '0;
  end

  for (genvar i = 0; i < int'(N_OUT); i++) begin : g_out
    bsc #(.CAPTURE_OUT(1'b1)) u_bsc (
      .tck, .trst_n, .ctrl, .pi(core_out[i]), .scan_in(ch[N_IN+N_BIDIR+i]),
      .scan_out(ch[N_IN+N_BIDIR+i+1]), .po(pin_out[i])
    );
  end
  if (N_OUT == 0) begin : g_no_out
    assign pin_out = '0;
  end

endmodule

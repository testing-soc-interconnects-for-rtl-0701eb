// ils_sensor: behavioural model of the integrity loss sensor (delay violation sensor).
// This is a behavioural model, not synthesizable logic: the real part is a dynamic
// precharged transistor circuit whose window is set by an inverter delay.
//
// A window signal b is built from the clock: b = NAND(clk, clk delayed and inverted), so
// b is 0 for ADR_PS picoseconds after every rising edge of clk (the acceptable delay
// region) and 1 for the rest of the period. A transition of the monitored signal a while
// b = 0 is accepted. Any transition while b = 1 (a late edge, or a glitch) drives c to 1,
// and c stays 1 until b returns to 0, which precharges the sensor again; c is meant to set
// a flip-flop. The window width is a parameter here; in silicon it is the delay of
// Inverter1, tuned at design time.
//
// Which clock edge opens the window is given by the caller: the observation cell feeds
// the inverted TCK so the window opens when the update stages launch a pattern.
module ils_sensor #(
  parameter int unsigned ADR_PS = 400  // acceptable delay region, in ps
) (
  input  logic clk,  // window clock
  input  logic a,    // interconnect signal at the receiving end
  output logic c     // 1: transition outside the acceptable delay region
);

  timeunit 1ps;
  timeprecision 1ps;

  logic clk_dly_n;  // output of Inverter1
  logic b;
  logic a_seen;     // last value of a, stands for the sensor's stored level

  initial begin
    clk_dly_n = 1'b1;
    a_seen    = 1'b0;
    c         = 1'b0;
  end

  always @(clk) clk_dly_n <= #(ADR_PS) ~clk;

  assign b = ~(clk & clk_dly_n);

  always @(a or b) begin
    if (!b)                c = 1'b0;
    else if (a != a_seen)  c = 1'b1;
    a_seen = a;
  end

endmodule

// tb_ils_sensor: self-checking test of the delay violation sensor model.
//
// The window clock runs at 10 ns. In each period the monitored signal makes one
// transition (or a glitch of two) at a random offset after the rising edge; the expected
// sensor output is worked out from the offset alone: an offset within the 400 ps
// acceptable delay region leaves c at 0, a later one raises c, and c must be back at 0
// shortly after the next rising edge (precharge) and stay there through the window.
module tb_ils_sensor;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned ADR = 400;
  localparam int unsigned HALF = 5000;

  logic clk = 1'b0, a = 1'b0, c;
  int checks = 0, failures = 0;
  int n_ok = 0, n_late = 0, n_glitch = 0;

  ils_sensor #(.ADR_PS(ADR)) dut (.clk, .a, .c);

  always #(HALF) clk = ~clk;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #(HALF * 2 * 500);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      int off, kind;
      logic exp;
      @(posedge clk);
      // inside the acceptable delay region the sensor must be precharged
      #(ADR / 2);
      chk(c, 1'b0, "precharged in window");
      kind = $urandom_range(0, 2);
      case (k)
        0: off = 200;          // an accepted edge
        1: off = 3500;         // a late edge
        default: begin
          if (kind == 0) off = $urandom_range(ADR / 2 + 1, ADR - 30);
          else           off = $urandom_range(ADR / 2 + 1, 2 * HALF - 1500);
          if (off > ADR - 20 && off < ADR + 20) off = ADR + 40;
        end
      endcase
      #(off - ADR / 2);
      if (kind == 2 && off > ADR) begin
        a = ~a; #300 a = ~a;     // glitch: out and back
        n_glitch++;
        exp = 1'b1;
      end else begin
        a = ~a;
        exp = (off > ADR);
        if (exp) n_late++; else n_ok++;
      end
      #10;
      chk(c, exp, $sformatf("c after edge at +%0d ps", off));
      // c holds until the next window opens
      #(2 * HALF - off - 320);
      chk(c, exp, "c holds to end of period");
      @(posedge clk); #50;
      chk(c, 1'b0, "c cleared by next window");
    end
    checks++;
    if (n_ok == 0 || n_late == 0 || n_glitch == 0) failures++;
    $display("accepted=%0d late=%0d glitches=%0d", n_ok, n_late, n_glitch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

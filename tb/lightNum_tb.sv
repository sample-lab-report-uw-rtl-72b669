// lightNum_tb: exhaustive test of the LED position reporter.
//
// Applies all 1024 values of the 10-bit LED bus. The expected number is the
// index of the lowest lit LED, found by counting trailing zeros, or 0 when no
// LED is lit. Each single-LED value is also checked against its own index.
// The module is combinational, so each check follows a short delay.
module lightNum_tb;
  timeunit 1ns; timeprecision 1ps;

  logic [9:0] leds;
  logic [3:0] num;
  int   checks = 0, failures = 0;

  lightNum dut (.leds, .num);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      int exp;
      exp = 0;
      leds = 10'(v);
      if (v != 0) while (((v >> exp) & 1) == 0) exp++;
      #1;
      checks++;
      if (num !== 4'(exp)) begin
        failures++;
        $display("FAIL leds=%b num=%0d expected %0d", leds, num, exp);
      end
    end
    for (int i = 0; i < 10; i++) begin
      leds = 10'b1 << i;
      #1;
      checks++;
      if (num !== 4'(i)) begin
        failures++;
        $display("FAIL single LED %0d: num=%0d", i, num);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

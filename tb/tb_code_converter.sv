// tb_code_converter: self-checking test of the logic conversion unit. For
// each pulse count k = 0..9 the expected code is computed here from the
// reference itself, round(20*sin((6k-3) deg)) limited to 15, and compared
// with the converter's output.
module tb_code_converter;
  import encoder_pkg::*;

  step_t k;
  code_t code;
  int    checks = 0;
  int    failures = 0;

  code_converter dut (.k(k), .code(code));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 10; i++) begin
      real volts;
      int  exp;
      volts = (i == 0) ? 0.0 : 10.0 * $sin((6.0 * i - 3.0) * 3.14159265358979 / 180.0);
      exp = $rtoi(2.0 * volts + 0.5);
      if (exp > 15) exp = 15;
      k = step_t'(i);
      #10;
      checks++;
      if (int'(code) != exp) begin
        failures++;
        $display("FAIL k=%0d code=%0d expected %0d (%f V)", i, code, exp, volts);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

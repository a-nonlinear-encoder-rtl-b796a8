// tb_linear_counter: self-checking test of the linear pulse counter of the
// two-unit counter. Random pulses and clears are applied and the count is
// compared with a reference model that counts modulo ten.
module tb_linear_counter;
  import encoder_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  clr = 1'b0;
  logic  en = 1'b0;
  step_t k;
  int    model = 0;
  int    checks = 0;
  int    failures = 0;
  int    wraps = 0;

  linear_counter dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .k(k));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      en  = ($urandom_range(0, 2) != 0);
      clr = ($urandom_range(0, 40) == 0);
      @(posedge clk);
      if (clr) model = 0;
      else if (en) begin
        model = model + 1;
        if (model == 10) begin
          model = 0;
          wraps++;
        end
      end
      #1;
      checks++;
      if (int'(k) != model) begin
        failures++;
        $display("FAIL n=%0d k=%0d expected %0d", n, k, model);
      end
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL count never wrapped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

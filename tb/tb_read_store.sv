// tb_read_store: self-checking test of the read-and-storage register.
// Presents random codes and sign bits, strobes `store` at random times and
// checks that the word is captured on the strobe, shown with a one-cycle
// valid flag the next cycle, held until the next strobe, and that the
// counter clear coincides with the strobe.
module tb_read_store;
  import encoder_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  store = 1'b0;
  code_t code_in = '0;
  logic  sign_in = 1'b0;
  code_t code_out;
  logic  sign_out, valid, counter_clr;
  code_t exp_code = '0;
  logic  exp_sign = 1'b0;
  logic  exp_valid = 1'b0;
  int    checks = 0;
  int    failures = 0;
  int    stores = 0;

  read_store dut (
    .clk(clk), .rst_n(rst_n), .store(store), .code_in(code_in), .sign_in(sign_in),
    .code_out(code_out), .sign_out(sign_out), .valid(valid), .counter_clr(counter_clr)
  );

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
    #1;
    checks++;
    if (code_out !== '0 || valid !== 1'b0) begin
      failures++;
      $display("FAIL reset state");
    end
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      code_in = code_t'($urandom_range(0, 15));
      sign_in = 1'($urandom_range(0, 1));
      store   = ($urandom_range(0, 3) == 0);
      #1;
      checks++;
      if (counter_clr !== store) begin
        failures++;
        $display("FAIL n=%0d counter_clr=%b store=%b", n, counter_clr, store);
      end
      @(posedge clk);
      exp_valid = store;
      if (store) begin
        exp_code = code_in;
        exp_sign = sign_in;
        stores++;
      end
      #1;
      checks++;
      if (code_out !== exp_code || sign_out !== exp_sign || valid !== exp_valid) begin
        failures++;
        $display("FAIL n=%0d got %b/%b/%b expected %b/%b/%b", n, code_out, sign_out, valid,
                 exp_code, exp_sign, exp_valid);
      end
    end
    checks++;
    if (stores == 0) begin
      failures++;
      $display("FAIL no store happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

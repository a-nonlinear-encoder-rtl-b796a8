// tb_nonlinear_counter: self-checking test of the four-flip-flop sinusoidal
// counter. Steps it through the sequence several times (with idle cycles in
// between, which must hold the state), then checks that the synchronous
// clear wins over a pulse. Expected codes are the sampled-reference levels
// 0.0, 0.5, 1.5, 2.5, 3.5, 4.5, 5.5, 6.5, 7.0 and 7.5 V, written out here
// as codes (volts times two).
module tb_nonlinear_counter;
  import encoder_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  clr = 1'b0;
  logic  en = 1'b0;
  code_t q;
  int    checks = 0;
  int    failures = 0;

  // Table of levels in half-volt units, independent of the design.
  localparam int EXPECT[10] = '{0, 1, 3, 5, 7, 9, 11, 13, 14, 15};

  nonlinear_counter dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .q(q));

  always #5 clk = ~clk;

  task automatic check(input int exp, input string what);
    checks++;
    if (int'(q) != exp) begin
      failures++;
      $display("FAIL %s: q=%b expected %0d", what, q, exp);
    end
  endtask

  task automatic pulse();
    en = 1'b1;
    @(posedge clk); #1;
    en = 1'b0;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 check(0, "after reset");
    rst_n = 1'b1;
    @(posedge clk); #1;
    check(0, "held after reset");

    // Three passes round the sequence, one pulse at a time.
    for (int i = 1; i <= 30; i++) begin
      pulse();
      check(EXPECT[i % 10], $sformatf("step %0d", i));
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1 check(EXPECT[i % 10], $sformatf("hold after step %0d", i));
    end

    // Back-to-back pulses.
    en = 1'b1;
    for (int i = 1; i <= 12; i++) begin
      @(posedge clk); #1;
      check(EXPECT[i % 10], $sformatf("burst step %0d", i));
    end
    en = 1'b0;

    // Synchronous clear beats a pulse in the same cycle.
    repeat (5) pulse();
    check(EXPECT[17 % 10], "before clear");
    clr = 1'b1; en = 1'b1;
    @(posedge clk); #1;
    clr = 1'b0; en = 1'b0;
    check(0, "clear over pulse");
    pulse();
    check(1, "first step after clear");

    // Asynchronous reset mid-sequence.
    repeat (3) pulse();
    #2 rst_n = 1'b0;
    #1 check(0, "async reset");
    rst_n = 1'b1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

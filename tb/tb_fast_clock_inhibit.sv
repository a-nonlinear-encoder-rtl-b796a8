// tb_fast_clock_inhibit: the encoder, at its default parameters, driven by a
// 400 Hz reference and 1 MHz clock pulses (2500 pulses per reference cycle)
// with a constant 5 V input. clk runs at 8 MHz, so there are 8 clk cycles
// per pulse and 20000 per reference cycle.
//
// At this ratio the inhibit gate is what matters: the test counts the
// pulses let through in each reference cycle and checks that they are
// exactly those before the reference passes the input (5 V is reached at
// 30 degrees, about pulse 209), that none pass in the negative half and
// that one word is stored per cycle. The 4-bit counter needs 60 pulses per
// cycle to follow the sine; here it wraps every ten pulses, so the stored
// code is the level for (pulses mod 10). That is checked too, as a record
// of this mismatch.
module tb_fast_clock_inhibit;
  import encoder_pkg::*;

  localparam int unsigned PULSE_DIV = 8;
  localparam int unsigned PPC       = 2500;
  localparam int unsigned PERIOD    = PULSE_DIV * PPC;
  localparam real         SENS      = 0.01;
  localparam real         V_IN      = 5.0;
  localparam int          N_CYCLES  = 3;
  localparam real         TWO_PI    = 6.283185307179586;
  localparam int          LEVEL[10] = '{0, 1, 3, 5, 7, 9, 11, 13, 14, 15};

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  real   analog_in = V_IN;
  logic  ref_square, cmp_out, clock_pulse, sign;
  int    phase;
  real   reference;
  code_t count, code_out;
  logic  count_pulse, sign_out, valid;

  int checks = 0, failures = 0;
  int passed = 0, words = 0, cycles = 0, exp_pulses = 0;
  int n_inhibit_b = 0, n_inhibit_a = 0;

  analog_front_end_model #(.PULSE_DIV(PULSE_DIV), .PULSES_PER_CYCLE(PPC), .SENSITIVITY(SENS)) afe (
    .clk(clk), .analog_in(analog_in), .ref_square(ref_square), .cmp_out(cmp_out),
    .clock_pulse(clock_pulse), .sign(sign), .phase(phase), .reference(reference)
  );

  nonlinear_encoder dut (
    .clk(clk), .rst_n(rst_n), .ref_square(ref_square), .cmp_out(cmp_out),
    .clock_pulse(clock_pulse), .sign_in(sign), .count_pulse(count_pulse), .count(count),
    .code_out(code_out), .sign_out(sign_out), .valid(valid)
  );

  always #62.5 clk = ~clk;  // 8 MHz

  task automatic fail(input string msg);
    failures++;
    $display("FAIL reference cycle %0d: %s", cycles, msg);
  endtask

  initial begin : watchdog
    repeat ((N_CYCLES + 2) * PERIOD) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Pulse j sits at clk cycle PULSE_DIV*j - PULSE_DIV/2 of the cycle; it
    // passes if the reference there is still below the comparator threshold.
    while (V_IN + SENS > 10.0 * $sin(TWO_PI * real'(PULSE_DIV * (exp_pulses + 1) - PULSE_DIV / 2)
                                     / real'(PERIOD)))
      exp_pulses++;
    // Release reset just after the first clk edge so that the first pulse of
    // the first reference cycle already sees the synchronised A.
    @(posedge clk);
    #1 rst_n = 1'b1;
  end

  always @(negedge clk) if (rst_n) begin
    if (count_pulse) passed++;
    if (clock_pulse && ref_square && cmp_out && !count_pulse) n_inhibit_b++;
    if (clock_pulse && !ref_square) begin
      n_inhibit_a++;
      checks++;
      if (count_pulse) fail("pulse passed in the negative half-cycle");
    end
    if (valid) begin
      words++;
      checks++;
      if (int'(code_out) != LEVEL[exp_pulses % 10])
        fail($sformatf("stored %0d, expected %0d", code_out, LEVEL[exp_pulses % 10]));
    end
    if (phase == int'(PERIOD) - 1) begin
      checks++;
      if (passed != exp_pulses) fail($sformatf("%0d pulses passed, expected %0d", passed, exp_pulses));
      checks++;
      if (words != 1) fail($sformatf("%0d words stored", words));
      $display("reference cycle %0d: %0d of %0d pulses passed, stored code %0d",
               cycles, passed, PPC, code_out);
      passed = 0;
      words = 0;
      cycles++;
      if (cycles == N_CYCLES) begin
        checks++;
        if (n_inhibit_b == 0 || n_inhibit_a == 0) fail("a kind of inhibition never happened");
        $display("inhibited_by_comparator=%0d inhibited_by_negative_half=%0d", n_inhibit_b, n_inhibit_a);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule

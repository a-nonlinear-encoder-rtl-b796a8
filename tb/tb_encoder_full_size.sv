// tb_encoder_full_size: one encoder at its default parameters (nonlinear
// counter, two synchroniser stages, four-cycle time delay), driven by the
// behavioural analog front end through 60 complete conversions, one per
// reference cycle.
//
// Each input must come out as one stored word whose code is the last
// sampled reference level below the input magnitude: with pulses at
// (6k-3) degrees of a 10 V sine, k = number of pulses before the first one
// with 10*sin((6k-3) deg) >= |v|, and the code is the k-th level of the
// sequence 0.0, 0.5, 1.5, 2.5, 3.5, 4.5, 5.5, 6.5, 7.0, 7.5 V (half volts
// below). Also checked: the trip-to-store latency, the counter cleared by
// the store and idle until the next zero crossing, one word per cycle, and
// that pulses were inhibited by the comparator and by the negative half.
module tb_encoder_full_size;
  import encoder_pkg::*;

  localparam int unsigned PULSE_DIV = 32;
  localparam int unsigned PERIOD    = PULSE_DIV * 60;
  localparam int          LATENCY   = 2 + 4 + 1;  // default SYNC_STAGES + DELAY + 1
  localparam int          N_CONV    = 60;
  localparam real         SENS      = 0.01;
  localparam real         DEG       = 3.14159265358979 / 180.0;
  localparam int          LEVEL[10] = '{0, 1, 3, 5, 7, 9, 11, 13, 14, 15};

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  real   analog_in = 0.0;
  logic  ref_square, cmp_out, clock_pulse, sign;
  int    phase;
  real   reference;

  code_t count, code_out;
  logic  count_pulse, sign_out, valid;

  int checks = 0, failures = 0;
  int cyc = 0, cmp_rise_cyc = -1000;
  logic cmp_prev = 1'b0;
  int   exp_code = 0;
  logic exp_sign = 1'b0;
  int   conv = 0, words_this_cycle = 0;
  int   n_inhibit_b = 0, n_inhibit_a = 0, n_store = 0, n_sign = 0;
  int   n_full = 0, n_zero = 0;

  analog_front_end_model #(.PULSE_DIV(PULSE_DIV), .SENSITIVITY(SENS)) afe (
    .clk(clk), .analog_in(analog_in), .ref_square(ref_square), .cmp_out(cmp_out),
    .clock_pulse(clock_pulse), .sign(sign), .phase(phase), .reference(reference)
  );

  nonlinear_encoder dut (
    .clk(clk), .rst_n(rst_n), .ref_square(ref_square), .cmp_out(cmp_out),
    .clock_pulse(clock_pulse), .sign_in(sign), .count_pulse(count_pulse), .count(count),
    .code_out(code_out), .sign_out(sign_out), .valid(valid)
  );

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL cycle %0d conversion %0d: %s", cyc, conv, msg);
  endtask

  // Expected code for magnitude mag, or -1 if the trip falls too near a pulse.
  function automatic int expected_code(input real mag);
    real theta;
    int  k;
    theta = $asin((mag + SENS) / 10.0) / DEG;
    for (int j = 1; j <= 30; j++) begin
      real pj;
      pj = 6.0 * j - 3.0;
      if (theta > pj - 1.0 && theta < pj + 0.3) return -1;
    end
    // Pulses pass until the first one at which the reference has risen past
    // the input.
    k = 0;
    while (k < 15 && 10.0 * $sin((6.0 * (k + 1) - 3.0) * DEG) < mag) k++;
    return LEVEL[k % 10];
  endfunction

  // Choose the input for the next reference cycle.
  task automatic next_input();
    real v;
    int  e;
    case (conv)
      0: v = 5.0;     // the 5 V input against a 10 V reference
      1: v = 0.0;
      2: v = 8.0;     // above 7.7715 V: full scale
      3: v = -3.3;
      4: v = 7.5;
      default: begin
        do begin
          v = 8.3 * real'($urandom_range(0, 100000)) / 100000.0;
          if ($urandom_range(0, 2) == 0) v = -v;
        end while (expected_code(v < 0.0 ? -v : v) < 0);
      end
    endcase
    e = expected_code(v < 0.0 ? -v : v);
    analog_in = v;
    exp_code  = e;
    exp_sign  = (v < 0.0);
  endtask

  initial begin : watchdog
    repeat ((N_CONV + 3) * PERIOD) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checks, sampled in the middle of each clk cycle.
  always @(negedge clk) if (rst_n) begin
    if (cmp_out && !cmp_prev) cmp_rise_cyc = cyc;
    cmp_prev = cmp_out;

    if (clock_pulse && ref_square && cmp_out && !count_pulse) n_inhibit_b++;
    if (clock_pulse && !ref_square) begin
      n_inhibit_a++;
      checks++;
      if (count_pulse) fail("pulse passed in the negative half-cycle");
    end

    if (valid) begin
      n_store++;
      words_this_cycle++;
      checks++;
      if (int'(code_out) != exp_code || sign_out != exp_sign)
        fail($sformatf("v=%f stored code %0d sign %b, expected %0d sign %b",
                       analog_in, code_out, sign_out, exp_code, exp_sign));
      checks++;
      if (cyc - cmp_rise_cyc != LATENCY)
        fail($sformatf("trip-to-store latency %0d, expected %0d", cyc - cmp_rise_cyc, LATENCY));
      checks++;
      if (count != '0) fail("counter not cleared by the store");
      if (sign_out) n_sign++;
      if (code_out == 4'd15) n_full++;
      if (code_out == 4'd0) n_zero++;
    end

    if (phase == int'(PERIOD) - 1) begin
      checks++;
      if (words_this_cycle != 1) fail($sformatf("%0d words in one reference cycle", words_this_cycle));
      checks++;
      if (count != '0) fail("counter not idle before the zero crossing");
      words_this_cycle = 0;
      conv++;
      if (conv == N_CONV) begin
        checks++;
        if (n_inhibit_b == 0) fail("no pulse inhibited by the comparator");
        checks++;
        if (n_inhibit_a == 0) fail("no pulse inhibited by the negative half-cycle");
        checks++;
        if (n_store != N_CONV) fail("wrong number of stores");
        checks++;
        if (n_sign == 0) fail("no negative input encoded");
        checks++;
        if (n_full == 0) fail("full scale never reached");
        checks++;
        if (n_zero == 0) fail("zero code never stored");
        $display("conversions=%0d inhibited_by_comparator=%0d inhibited_by_negative_half=%0d",
                 conv, n_inhibit_b, n_inhibit_a);
        $display("stores=%0d negative=%0d full_scale=%0d zero=%0d",
                 n_store, n_sign, n_full, n_zero);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
      next_input();
    end
    cyc++;
  end

  initial begin
    next_input();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
  end
endmodule

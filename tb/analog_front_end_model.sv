// analog_front_end_model: behavioural model (not synthesizable) of the
// analog parts around the encoder: the sinusoidal reference source, the
// clip-and-shape stage, the input sign switch, the tunnel-diode comparator
// and the clock-pulse oscillator. It lets a testbench drive the digital
// encoder with an analog input value.
//
// Time is counted in clk cycles. One reference cycle lasts
// PULSE_DIV * PULSES_PER_CYCLE cycles; the reference is
// AMPLITUDE * sin(2*pi*phase/period), starting at a positive-going zero
// crossing. A clock pulse (one-cycle strobe) falls in the middle of each
// PULSE_DIV-cycle slot, so with 60 pulses per cycle the k-th pulse after the
// zero crossing sits at (6k-3) degrees, where the four-bit code sequence
// samples the reference.
//   - ref_square (A): high while the reference is above zero.
//   - sign: 1 when the analog input is negative; the comparator then sees
//     its magnitude.
//   - cmp_out (B): set when the reference exceeds the magnitude by more than
//     SENSITIVITY volts, cleared when the reference falls below
//     -RESET_LEVEL volts, like the tunnel diode that switches to its high
//     state and is reset by the negative half of the reference.
// All outputs change on the rising clk edge. `phase` is exported so a
// testbench can relate events to the reference angle.
module analog_front_end_model #(
  parameter int unsigned PULSE_DIV        = 32,
  parameter int unsigned PULSES_PER_CYCLE = 60,
  parameter real         AMPLITUDE        = 10.0,
  parameter real         SENSITIVITY      = 0.01,
  parameter real         RESET_LEVEL      = 1.0
) (
  input  logic clk,
  input  real  analog_in,     // value to encode, volts
  output logic ref_square,    // A
  output logic cmp_out,       // B
  output logic clock_pulse,   // C
  output logic sign,          // input sign switch indication
  output int   phase,         // clk cycles since the last zero crossing
  output real  reference      // reference voltage, volts
);
  localparam int unsigned PERIOD = PULSE_DIV * PULSES_PER_CYCLE;
  localparam real TWO_PI = 6.283185307179586;

  initial begin
    phase       = 0;
    reference   = 0.0;
    ref_square  = 1'b0;
    cmp_out     = 1'b0;
    clock_pulse = 1'b0;
    sign        = 1'b0;
  end

  always @(posedge clk) begin
    real r, mag;
    int  p;
    p = (phase + 1 == int'(PERIOD)) ? 0 : phase + 1;
    r = AMPLITUDE * $sin(TWO_PI * real'(p) / real'(PERIOD));
    mag = (analog_in < 0.0) ? -analog_in : analog_in;
    phase       <= p;
    reference   <= r;
    ref_square  <= (r > 0.0);
    clock_pulse <= (p % int'(PULSE_DIV) == int'(PULSE_DIV / 2));
    sign        <= (analog_in < 0.0);
    if (r > mag + SENSITIVITY)   cmp_out <= 1'b1;
    else if (r < -RESET_LEVEL)   cmp_out <= 1'b0;
  end
endmodule

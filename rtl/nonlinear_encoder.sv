// nonlinear_encoder: digital part of a time-base analog-to-digital encoder
// that uses a sinusoidal reference and a counter whose states follow the
// sine, so that no sample-and-hold is needed.
//
// From each positive-going zero crossing of the reference, clock pulses are
// passed to the counter, whose code always equals the present reference
// voltage (10 V amplitude, 0.5 V steps, 0.0 to 7.5 V). When the reference
// rises past the magnitude of the analog input the comparator trips and the
// inhibit circuit stops the pulses; the counter then holds the input's
// value. After a time delay the read-and-storage register records the code
// and the sign bit and resets the counter. The comparator stays tripped,
// and the pulses stay inhibited, until the negative half of the reference
// resets it, so one word is produced per reference cycle.
//
// Analog parts stay outside: the sine source, the clip-and-shape stage
// (giving `ref_square`, A), the tunnel-diode comparator (`cmp_out`, B), the
// clock oscillator (`clock_pulse`, C, a one-cycle strobe in the clk domain)
// and the input sign switch (`sign_in`, held steady during a conversion).
// A and B are synchronised here (SYNC_STAGES flip-flops).
//
// LINEAR_COUNT selects the counter: 0 (default) is the four-flip-flop
// nonlinear counter; 1 is the two-unit form, a linear counter followed by a
// logic conversion unit, which gives the same codes. The block structure,
// the gating f = A & ~B & C and the count sequence follow the source design;
// the synchronous clocking, the synchronisers, the DELAY length and the
// valid flag are this design's own.
//
// Timing: `count` changes on the edge after a cycle with `count_pulse` high.
// A comparator trip seen on `cmp_out` in cycle n reaches b_sync in cycle
// n+SYNC_STAGES; `valid` pulses with the stored word in cycle
// n+SYNC_STAGES+DELAY+1, and the counter reads 0 from that cycle.
module nonlinear_encoder
  import encoder_pkg::*;
#(
  parameter int unsigned SYNC_STAGES  = 2,  // synchroniser depth for A and B
  parameter int unsigned DELAY        = 4,  // time delay, clk cycles
  parameter bit          LINEAR_COUNT = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ref_square,   // A: high during the positive half of the reference
  input  logic  cmp_out,      // B: comparator output
  input  logic  clock_pulse,  // C: clock pulse strobe
  input  logic  sign_in,      // input sign switch: 1 = analog value negated
  output logic  count_pulse,  // f: inhibited clock pulse
  output code_t count,        // live counter contents
  output code_t code_out,     // stored code, LSB = 0.5 V
  output logic  sign_out,     // stored sign bit
  output logic  valid         // one-cycle flag: new word stored
);

  logic b_sync;
  logic store, counter_clr;

  inhibit_circuit #(.SYNC_STAGES(SYNC_STAGES)) u_inhibit (
    .clk     (clk),
    .rst_n   (rst_n),
    .a_async (ref_square),
    .b_async (cmp_out),
    .c_pulse (clock_pulse),
    .f       (count_pulse),
    .b_sync  (b_sync)
  );

  if (LINEAR_COUNT) begin : g_two_unit
    step_t k;
    linear_counter u_linear (
      .clk   (clk),
      .rst_n (rst_n),
      .clr   (counter_clr),
      .en    (count_pulse),
      .k     (k)
    );
    code_converter u_convert (
      .k    (k),
      .code (count)
    );
  end else begin : g_nonlinear
    nonlinear_counter u_counter (
      .clk   (clk),
      .rst_n (rst_n),
      .clr   (counter_clr),
      .en    (count_pulse),
      .q     (count)
    );
  end

  time_delay #(.DELAY(DELAY)) u_delay (
    .clk   (clk),
    .rst_n (rst_n),
    .trig  (b_sync),
    .fire  (store)
  );

  read_store u_store (
    .clk         (clk),
    .rst_n       (rst_n),
    .store       (store),
    .code_in     (count),
    .sign_in     (sign_in),
    .code_out    (code_out),
    .sign_out    (sign_out),
    .valid       (valid),
    .counter_clr (counter_clr)
  );

endmodule

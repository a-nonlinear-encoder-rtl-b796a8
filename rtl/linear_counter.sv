// linear_counter: the first unit of the two-unit form of the counter. It
// accumulates the uninhibited clock pulses as a plain binary count; a
// separate conversion unit (code_converter) then maps the count to the
// sinusoidal level. This form keeps the counter standard at any precision.
//
// The count wraps from LEVELS-1 back to 0, so that the converted output
// repeats the nonlinear counter's return from full scale to 0000; the
// wrap point and the interface are this design's own, as the source only
// describes the unit's purpose.
//
// Interface and timing as nonlinear_counter: `en` advances the count at the
// end of the cycle it is high, synchronous `clr` wins over `en`, `rst_n` is
// an asynchronous active-low reset.
module linear_counter
  import encoder_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr,
  input  logic  en,
  output step_t k
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   k <= '0;
    else if (clr) k <= '0;
    else if (en)  k <= (k == step_t'(LEVELS - 1)) ? '0 : step_t'(k + 1'b1);
  end

endmodule

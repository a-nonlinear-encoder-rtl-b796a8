// code_converter: the logic conversion unit that follows the linear
// counter. It maps a pulse count k (0..9) to the code the nonlinear counter
// would hold after k pulses, i.e. the sampled sinusoidal reference rounded
// to 0.5 V steps: code(k) = min(15, round(20*sin((6k-3) deg))), code(0) = 0.
//
// Purely combinational. The mapping is the source design's count sequence;
// its realisation as a lookup (encoder_pkg::level_code) is this design's.
// Counts above 9 do not occur and give 0.
module code_converter
  import encoder_pkg::*;
(
  input  step_t k,
  output code_t code
);

  always_comb code = level_code(k);

endmodule

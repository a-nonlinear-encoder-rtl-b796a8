// nonlinear_counter: four flip-flops that count through the sinusoidal code
// sequence 0000, 0001, 0011, 0101, 0111, 1001, 1011, 1101, 1110, 1111, then
// back to 0000, one step per uninhibited clock pulse.
//
// Read as a binary number with a 0.5 V LSB, the state after k pulses is the
// sinusoidal reference at the k-th pulse, so the counter holds a digital copy
// of the reference from the positive-going zero crossing until the comparator
// stops it. The next state comes from four flip-flop difference equations
// (A is the MSB, D the LSB; + is OR, juxtaposition is AND, ^ is XOR):
//     A' = A ^ BCD
//     B' = B ^ CD
//     C' = C ? A B ~D : D
//     D' = D ? (~A + ~B) : (A B C + ~A ~B ~C)
// The sequence and the D equation are the source design's. The A, B and C
// equations are this design's own simplification of the same sequence. The
// six unused states are don't-cares. The equations take 0010 to 0000 and
// 1000/1010/1100 into the sequence, while 0100 and 0110 hold. That does no
// lasting harm: reset and every read-and-store clear the counter to 0000.
//
// Interface: `en` is the inhibited clock pulse f (one clk cycle per pulse);
// `clr` is the synchronous reset from the read-and-store logic and wins over
// `en`. The state changes on the clk edge that ends the cycle `en` is high;
// `rst_n` is an asynchronous active-low reset to 0000. The sequence
// assertion also uses `rst_n`, in its disable condition, so lint may report
// the reset as used both synchronously and asynchronously; the assertion
// adds no logic.
module nonlinear_counter
  import encoder_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr,   // synchronous clear to 0000
  input  logic  en,    // inhibited clock pulse: advance one step
  output code_t q      // {A,B,C,D}
);

  logic a, b, c, d;
  code_t nxt;

  assign {a, b, c, d} = q;

  always_comb begin
    nxt[3] = a ^ (b & c & d);
    nxt[2] = b ^ (c & d);
    nxt[1] = c ? (a & b & ~d) : d;
    nxt[0] = d ? (~a | ~b) : ((a & b & c) | (~a & ~b & ~c));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else if (en)  q <= nxt;
  end

  // Started from reset or a clear, the counter never leaves the sequence.
  a_in_sequence: assert property (@(posedge clk) disable iff (!rst_n)
    q inside {4'b0000, 4'b0001, 4'b0011, 4'b0101, 4'b0111,
              4'b1001, 4'b1011, 4'b1101, 4'b1110, 4'b1111});

endmodule

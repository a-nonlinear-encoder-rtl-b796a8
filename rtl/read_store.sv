// read_store: the read-and-storage register. When the delayed comparator
// trip arrives it records the counter contents and the sign bit, flags the
// new word as valid for one cycle, and clears the counter for the next
// encoding interval.
//
// The stored word is the encoded value of the analog input at the moment
// the comparator tripped. The sign bit is the indication from the input
// sign switch: set when the analog value was negated before comparison, so
// the five-bit result spans -7.5 to +7.5 V. What is stored and the counter
// reset follow the source design; the one-cycle valid flag and holding the
// word until the next store are this design's own.
//
// Timing: `store` high in cycle n captures `code_in`/`sign_in` at the end of
// cycle n; `code_out`, `sign_out` and `valid` show them in cycle n+1.
// `counter_clr` is `store` itself, so the counter clears on the same edge.
module read_store
  import encoder_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  store,        // from the time delay
  input  code_t code_in,      // counter contents
  input  logic  sign_in,      // sign switch indication
  output code_t code_out,     // stored code, LSB = 0.5 V
  output logic  sign_out,     // stored sign, 1 = negative input
  output logic  valid,        // one-cycle flag: new word stored
  output logic  counter_clr   // reset the counter
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_out <= '0;
      sign_out <= 1'b0;
      valid    <= 1'b0;
    end else begin
      valid <= store;
      if (store) begin
        code_out <= code_in;
        sign_out <= sign_in;
      end
    end
  end

  assign counter_clr = store;

endmodule

// time_delay: turns the comparator's trip into a one-cycle `fire` pulse
// DELAY clk cycles later, which starts the read, store and reset of the
// counter.
//
// The delay lets the counter settle on its final value before it is read.
// The source design uses an analog delay network and gives no value; this
// design detects the rising edge of the synchronised comparator output and
// runs it down a DELAY-stage shift register. If the rising edge is seen in
// cycle n (trig high, low the cycle before), `fire` is high in cycle n+DELAY
// only. A trip that stays high produces one pulse; the next pulse needs the
// comparator to be reset and to trip again (one per reference cycle).
module time_delay #(
  parameter int unsigned DELAY = 4  // clk cycles, >= 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trig,  // synchronised comparator output
  output logic fire   // read/store/reset strobe
);

  logic             trig_q;
  logic [DELAY-1:0] pipe;
  logic             rise;

  assign rise = trig & ~trig_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_q <= 1'b0;
      pipe   <= '0;
    end else begin
      trig_q  <= trig;
      pipe[0] <= rise;
      for (int i = 1; i < DELAY; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign fire = pipe[DELAY-1];

endmodule

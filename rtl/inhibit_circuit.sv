// inhibit_circuit: gates the clock pulses so the counter only counts while
// the reference is in its positive half and the comparator has not yet
// tripped:  f = A & ~B & C.
//
// A is the square wave derived from the reference (high in the positive
// half-cycle), B the comparator output (high from the moment the reference
// exceeds the analog value until the negative half-cycle resets the
// comparator) and C the clock pulse. Because B stays high until the
// reference goes negative, and A is low for the whole negative half, the
// pulses stay inhibited until the next positive-going zero crossing.
//
// The gating function is the source design's. A and B come from analog
// circuits and are asynchronous to clk, so this design passes each through
// SYNC_STAGES flip-flops before the gate; C is a one-cycle strobe already in
// the clk domain. f is combinational from the synchronised A and B and the
// strobe C. `b_sync` is the synchronised comparator output, which also starts
// the time delay. Changes on A or B take SYNC_STAGES clk cycles to reach f.
module inhibit_circuit #(
  parameter int unsigned SYNC_STAGES = 2  // >= 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a_async,  // A: reference square wave
  input  logic b_async,  // B: comparator output
  input  logic c_pulse,  // C: clock pulse strobe
  output logic f,        // inhibited clock pulse to the counter
  output logic b_sync
);

  logic [SYNC_STAGES-1:0] a_pipe, b_pipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_pipe <= '0;
      b_pipe <= '0;
    end else begin
      a_pipe[0] <= a_async;
      b_pipe[0] <= b_async;
      for (int i = 1; i < SYNC_STAGES; i++) begin
        a_pipe[i] <= a_pipe[i-1];
        b_pipe[i] <= b_pipe[i-1];
      end
    end
  end

  logic a_sync;

  assign a_sync = a_pipe[SYNC_STAGES-1];
  assign b_sync = b_pipe[SYNC_STAGES-1];
  assign f      = a_sync & ~b_sync & c_pulse;

endmodule

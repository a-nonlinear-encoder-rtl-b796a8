// tb_inhibit_circuit: self-checking test of the clock-pulse gate
// f = A & ~B & C with synchronised A and B. Drives random A, B and C and
// compares f with the gate applied to A and B as they were SYNC_STAGES
// cycles earlier; also checks the synchronised comparator output.
module tb_inhibit_circuit;
  localparam int unsigned SYNC = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic a = 1'b0, b = 1'b0, c = 1'b0;
  logic f, b_sync;
  logic [SYNC-1:0] a_hist, b_hist;  // model history of the inputs
  int   checks = 0;
  int   failures = 0;
  int   seen_pass = 0, seen_inhib_b = 0, seen_inhib_a = 0;

  inhibit_circuit #(.SYNC_STAGES(SYNC)) dut (
    .clk(clk), .rst_n(rst_n), .a_async(a), .b_async(b), .c_pulse(c),
    .f(f), .b_sync(b_sync)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_hist = '0;
    b_hist = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      // New inputs just after an edge; the model records what the flops
      // will capture at the next edge.
      a = 1'($urandom_range(0, 1));
      b = 1'($urandom_range(0, 1));
      c = 1'($urandom_range(0, 1));
      #1;
      checks++;
      if (f !== (a_hist[SYNC-1] & ~b_hist[SYNC-1] & c)) begin
        failures++;
        $display("FAIL n=%0d f=%b A=%b B=%b C=%b", n, f, a_hist[SYNC-1], b_hist[SYNC-1], c);
      end
      checks++;
      if (b_sync !== b_hist[SYNC-1]) begin
        failures++;
        $display("FAIL n=%0d b_sync=%b expected %b", n, b_sync, b_hist[SYNC-1]);
      end
      if (c && a_hist[SYNC-1] && !b_hist[SYNC-1]) seen_pass++;
      if (c && a_hist[SYNC-1] && b_hist[SYNC-1])  seen_inhib_b++;
      if (c && !a_hist[SYNC-1])                   seen_inhib_a++;
      @(posedge clk);
      a_hist = {a_hist[SYNC-2:0], a};
      b_hist = {b_hist[SYNC-2:0], b};
      #1;
    end
    checks++;
    if (seen_pass == 0 || seen_inhib_b == 0 || seen_inhib_a == 0) begin
      failures++;
      $display("FAIL not every case reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

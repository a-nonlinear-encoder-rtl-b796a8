// tb_time_delay: self-checking test of the trip-to-store delay. Raises the
// trigger at random times and for random lengths and checks that exactly
// one one-cycle pulse appears exactly DELAY cycles after each rising edge,
// and none otherwise.
module tb_time_delay;
  localparam int unsigned DELAY = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic trig = 1'b0;
  logic fire;
  logic trig_prev = 1'b0;
  int   cyc = 0;
  int   rise_at[$];
  int   checks = 0;
  int   failures = 0;
  int   fires = 0;

  time_delay #(.DELAY(DELAY)) dut (.clk(clk), .rst_n(rst_n), .trig(trig), .fire(fire));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: sample in the middle of every cycle.
  always @(negedge clk) if (rst_n) begin
    logic expect_fire;
    if (trig && !trig_prev) rise_at.push_back(cyc);
    trig_prev = trig;
    expect_fire = (rise_at.size() > 0) && (rise_at[0] + int'(DELAY) == cyc);
    if (expect_fire) void'(rise_at.pop_front());
    checks++;
    if (fire !== expect_fire) begin
      failures++;
      $display("FAIL cycle %0d fire=%b expected %b", cyc, fire, expect_fire);
    end
    if (fire) fires++;
    cyc++;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      repeat ($urandom_range(1, 12)) @(posedge clk);
      #1 trig = 1'b1;
      repeat ($urandom_range(1, 12)) @(posedge clk);
      #1 trig = 1'b0;
    end
    repeat (DELAY + 3) @(posedge clk);
    checks++;
    if (fires != 200) begin
      failures++;
      $display("FAIL %0d pulses for 200 trips", fires);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

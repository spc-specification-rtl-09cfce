// tb_clk_divider: checks the 27/28 division pattern of clk_divider.
//
// The expected distance between ticks is worked out from the pattern alone:
// in period k (0-based), sub-period k mod 3 and cycle (k / 3) mod 35, the
// divisor is 27 for sub-period 0 and for sub-period 1 of cycle 34, else 28.
// The test measures 315 consecutive periods (three full 105-tick rounds) and
// also checks that one round takes 2904 clocks (1.193182 MHz from 33 MHz).
module tb_clk_divider;
  logic clk = 0, rst_n = 0, tick;
  int checks = 0, failures = 0;

  always #15 clk = ~clk;

  clk_divider dut (.clk(clk), .rst_n(rst_n), .tick(tick));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, now, k, exp_len, round_len;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // first tick: the first period starts when reset is released
    now = 0;
    do begin @(posedge clk); now++; end while (!tick);
    checks++;
    if (now != 27) begin failures++; $display("first period %0d, expected 27", now); end
    round_len = now;
    for (k = 1; k < 315; k++) begin
      last = now;
      do begin @(posedge clk); now++; end while (!tick);
      exp_len = ((k % 3) == 0 || ((k / 3) % 35 == 34 && (k % 3) == 1)) ? 27 : 28;
      checks++;
      if (now - last != exp_len) begin
        failures++;
        $display("period %0d: %0d clocks, expected %0d", k, now - last, exp_len);
      end
      if (k < 105) round_len += now - last;
      // tick is a single-clock pulse
      @(negedge clk);
      checks++;
      if (tick) begin failures++; $display("tick wider than one clock"); end
    end
    checks++;
    if (round_len != 2904) begin failures++; $display("round %0d clocks", round_len); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

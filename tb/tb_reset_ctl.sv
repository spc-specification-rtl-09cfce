// tb_reset_ctl: checks the reset generators and register 0CF9h.
//
// With HARD_RESET_CYCLES reduced to 100 for a short run:
//   - while PWROK is low, CPURST is high and PCIRST# and the internal reset
//     are low;
//   - after PWROK rises they stay asserted for 2 synchronizer clocks plus
//     100 clocks;
//   - writing 06h to 0CF9h gives a 100-clock hard reset starting 8 clocks
//     after the write and clears SRST;
//   - writing 04h gives INIT for exactly 2 clocks and no hard reset;
//   - SRST reads back, RCPU always reads 0.
module tb_reset_ctl;
  localparam int N = 100;
  logic clk = 0, pwrok = 0, sel = 0, dir = 0;
  logic [7:0] wdata = 0, rdata;
  logic rst_n_int, cpurst, pcirst_l, init;
  int checks = 0, failures = 0;

  always #15 clk = ~clk;

  reset_ctl #(.HARD_RESET_CYCLES(N)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // count clocks with cpurst high, checking the three outputs agree
  task automatic measure(output int n);
    n = 0;
    while (cpurst) begin
      check(!pcirst_l && !rst_n_int, "reset outputs disagree");
      @(posedge clk); #1; n++;
    end
  endtask

  initial begin
    int n, inits;
    repeat (10) @(posedge clk);
    #1 check(cpurst && !pcirst_l && !rst_n_int, "reset while PWROK low");
    @(negedge clk); pwrok = 1;
    measure(n);                            // counted from the PWROK edge
    check(n == N + 2, $sformatf("power-on reset %0d clocks after PWROK, expected %0d", n, N + 2));

    // SRST read back
    @(negedge clk); sel = 1; dir = 1; wdata = 8'h02;
    @(negedge clk); sel = 1; dir = 0;
    #1 check(rdata == 8'h02, $sformatf("0CF9h reads %h, expected 02", rdata));
    @(negedge clk); sel = 0;

    // soft reset
    @(negedge clk); sel = 1; dir = 1; wdata = 8'h04;
    @(negedge clk); sel = 0; dir = 0;
    inits = 0;
    repeat (10) begin
      #1; if (init) inits++;
      check(!cpurst, "no hard reset on soft reset");
      @(posedge clk);
    end
    check(inits == 2, $sformatf("INIT %0d clocks, expected 2", inits));

    // hard reset from the register
    @(negedge clk); sel = 1; dir = 1; wdata = 8'h06;
    @(posedge clk); #1;
    sel = 0; dir = 0;
    // HARD_DELAY (8) clocks before the pulse starts
    repeat (8) begin
      check(!cpurst, "hard reset delayed");
      @(posedge clk); #1;
    end
    check(cpurst, "hard reset starts 8 clocks after the write");
    measure(n);
    check(n == N, $sformatf("hard reset %0d clocks, expected %0d", n, N));
    @(negedge clk); sel = 1; dir = 0;
    #1 check(rdata == 8'h00, $sformatf("0CF9h after hard reset %h", rdata));
    @(negedge clk); sel = 0;

    // PWROK drop
    @(negedge clk); pwrok = 0;
    repeat (3) @(posedge clk); #1;
    check(cpurst && !pcirst_l, "reset follows PWROK low");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

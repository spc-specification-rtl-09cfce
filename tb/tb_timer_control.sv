// tb_timer_control: checks counter 0 of the interval timer in mode 2.
//
// The expected count is modelled from the tick output only: the tick after
// the initial count is complete loads M, each later tick decrements, and the
// tick that would go below 1 reloads M, so n ticks after the load the count
// is M - (n mod M).  Checked: the request pulse comes on the tick that
// reaches 1, lasts one clock and repeats every M ticks; the Counter Latch
// Command freezes the count until both bytes are read and ignores a second
// latch; LSB-only programming; counting stops on a new control word.
module tb_timer_control;
  logic clk = 0, rst_n = 0;
  logic sel = 0, dir = 0;
  logic [1:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic pit_int, tick;
  int checks = 0, failures = 0;
  int ticks_since_load = -1;   // -1: not loaded
  int M = 0;
  bit loading = 0;

  always #15 clk = ~clk;

  timer_control dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [1:0] a, input logic [7:0] d);
    @(negedge clk); sel = 1; dir = 1; addr = a; wdata = d;
    @(negedge clk); sel = 0; dir = 0;
  endtask

  task automatic rd(input logic [1:0] a, output logic [7:0] d);
    @(negedge clk); sel = 1; dir = 0; addr = a;
    #1 d = rdata;
    @(negedge clk); sel = 0;
  endtask

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // reference model of the count, advanced on every tick
  always @(posedge clk) if (tick) begin
    if (loading) begin ticks_since_load = 0; loading = 0; end
    else if (ticks_since_load >= 0) ticks_since_load++;
  end
  function automatic int model_count();
    return M - (ticks_since_load % M);
  endfunction

  // pulse checks: width one clock, on a tick that takes the count to 1
  int pulses = 0, last_pulse_tick = -1;
  always @(posedge clk) if (pit_int) begin
    pulses++;
    checks++;
    if (ticks_since_load < 0 || model_count() != 1) begin
      failures++; $display("FAIL: pulse at model count %0d", model_count());
    end
    if (last_pulse_tick >= 0) begin
      checks++;
      if (ticks_since_load - last_pulse_tick != M) begin
        failures++; $display("FAIL: pulse period %0d ticks, M=%0d",
                             ticks_since_load - last_pulse_tick, M);
      end
    end
    last_pulse_tick = ticks_since_load;
  end
  always @(negedge clk) begin
    logic prev;
    if (prev && pit_int) begin failures++; $display("FAIL: pulse wider than 1 clock"); end
    prev = pit_int;
  end

  initial begin
    logic [7:0] lo, hi;
    int v1, v2, n1;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- mode 2, LSB then MSB, M = 7 ----
    wr(3, 8'h34);
    M = 7;
    wr(0, 8'h07);
    check(dut.enabled == 0, "counter enabled after LSB only");
    @(negedge clk); sel = 1; dir = 1; addr = 0; wdata = 8'h00;
    @(negedge clk); sel = 0; dir = 0; loading = 1;
    wait (pulses == 5);
    check(pulses == 5, "five pulses seen");

    // ---- latch command with a long count ----
    wr(3, 8'h34);
    ticks_since_load = -1; last_pulse_tick = -1;
    M = 1000;
    wr(0, 8'hE8);
    @(negedge clk); sel = 1; dir = 1; addr = 0; wdata = 8'h03;
    @(negedge clk); sel = 0; dir = 0; loading = 1;
    repeat (30 * 28) @(posedge clk);
    @(negedge clk);
    n1 = model_count();
    wr(3, 8'h00);                 // latch
    repeat (10 * 28) @(posedge clk);
    wr(3, 8'h00);                 // ignored: still latched
    rd(0, lo);
    repeat (5 * 28) @(posedge clk);
    rd(0, hi);
    v1 = {hi, lo};
    check(v1 == n1, $sformatf("latched %0d, expected %0d", v1, n1));
    // unlatched again: the next latch follows the live count
    @(negedge clk);
    n1 = model_count();
    wr(3, 8'h00);
    rd(0, lo); rd(0, hi);
    v2 = {hi, lo};
    check(v2 == n1, $sformatf("second latch %0d, expected %0d", v2, n1));

    // ---- LSB-only programming, M = 16 ----
    wr(3, 8'h14);
    ticks_since_load = -1; last_pulse_tick = -1;
    M = 16;
    @(negedge clk); sel = 1; dir = 1; addr = 0; wdata = 8'h10;
    @(negedge clk); sel = 0; dir = 0; loading = 1;
    v1 = pulses;
    wait (pulses == v1 + 3);
    // a read in LSB-only mode returns the low byte of the live count
    @(negedge clk);
    n1 = model_count();
    rd(0, lo);
    check(lo == 8'(n1), $sformatf("LSB read %0d, expected %0d", lo, n1));

    // ---- a control word stops the counter ----
    wr(3, 8'h34);
    ticks_since_load = -1;
    v1 = pulses;
    repeat (40 * 28) @(posedge clk);
    check(pulses == v1, "no pulses after control word");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

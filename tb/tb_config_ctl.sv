// tb_config_ctl: checks the slave-serial configuration port.
//
// A model of the experimental FPGA shifts DIN in on each rising CCLK edge.
// The test sets the start bit (PROGRAM driven), writes three bytes, waiting
// on the busy status bit between them, and checks that 24 bits arrived MSB
// first, that CCLK is high for CCLK_HALF clocks, that writes
// while busy are ignored, and that the status bits follow EF_DONE and
// EF_INIT (error flag set by INIT low during a transfer, cleared by a write
// of bit 1).
module tb_config_ctl;
  logic clk = 0, rst_n = 0, sel = 0, dir = 0;
  logic [1:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic ef_program, ef_cclk, ef_din, ef_lock, ef_done = 0, ef_init = 1;
  int checks = 0, failures = 0;
  logic [31:0] shifted = 0;
  int nbits = 0, hi_len = 0, lo_len = 0, bad_len = 0;

  always #15 clk = ~clk;

  config_ctl dut (.*);

  logic cclk_q = 0;
  int run = 0;
  always @(posedge clk) begin
    if (ef_cclk && !cclk_q) begin shifted <= {shifted[30:0], ef_din}; nbits <= nbits + 1; end
    if (rst_n && nbits > 0 && !ef_cclk && cclk_q) begin  // high phase: 2 clocks
      if (run != 2) bad_len <= bad_len + 1;
      run <= 1;
    end else if (ef_cclk != cclk_q) run <= 1;
    else run <= run + 1;
    cclk_q <= ef_cclk;
  end

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

  task automatic wr(input logic [1:0] a, input logic [7:0] d);
    @(negedge clk); sel = 1; dir = 1; addr = a; wdata = d;
    @(negedge clk); sel = 0; dir = 0;
  endtask

  task automatic rd(input logic [1:0] a, output logic [7:0] d);
    @(negedge clk); sel = 1; dir = 0; addr = a;
    #1 d = rdata;
    @(negedge clk); sel = 0;
  endtask

  initial begin
    logic [7:0] st;
    logic [7:0] bytes [3] = '{8'hA5, 8'h3C, 8'hF0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); nbits = 0;
    rd(2, st); check(st == 8'h03, $sformatf("status %h, expected 03", st));
    wr(0, 8'h01);
    check(ef_program, "PROGRAM driven");
    foreach (bytes[i]) begin
      do rd(2, st); while (st[2]);
      wr(1, bytes[i]);
      wr(1, 8'h00);                      // ignored: still shifting
      rd(2, st); check(st[2], "busy while shifting");
    end
    do rd(2, st); while (st[2]);
    repeat (4) @(posedge clk);
    check(nbits == 24, $sformatf("%0d bits shifted, expected 24", nbits));
    check(shifted[23:0] == 24'hA53CF0, $sformatf("shifted %h, expected A53CF0", shifted[23:0]));
    check(bad_len == 0, "CCLK phase lengths");
    // error flag
    @(negedge clk); ef_init = 0;
    wr(1, 8'hFF);
    repeat (6) @(posedge clk);
    rd(2, st); check(st[1] == 0, "error flag after INIT low");
    @(negedge clk); ef_init = 1;
    do rd(2, st); while (st[2]);
    wr(2, 8'h02);
    rd(2, st); check(st[1] == 1, "error flag cleared");
    // done
    @(negedge clk); ef_done = 1;
    repeat (3) @(posedge clk);
    rd(2, st); check(st[0] == 0, "configuration done");
    check(ef_lock, "LOCK after DONE");
    nbits = 0;
    wr(1, 8'h81);
    repeat (20) @(posedge clk);
    check(nbits == 0, "data ignored while locked");
    wr(0, 8'h00);
    check(!ef_program, "PROGRAM released");
    @(posedge clk); #1;
    check(!ef_lock, "LOCK released with PROGRAM");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

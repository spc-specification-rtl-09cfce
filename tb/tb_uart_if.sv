// tb_uart_if: checks the external UART bus cycle.
//
// A small model of the UART chip stores written bytes per channel and
// register and drives stored bytes back while UART_RD_L is low.  For each
// access the test records, clock by clock, chip select, the strobes and the
// data enable, and checks the expected shape with the default phase
// lengths: select low for 4 clocks, strobe low for 2 clocks starting one
// clock after select, data driven only for writes, `done` 5 clocks after
// `start`, address/channel stable while selected.  Reads return what was
// written to the same channel and register.
module tb_uart_if;
  logic clk = 0, rst_n = 0, start = 0, write = 0, chan1 = 0;
  logic [2:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic busy, done, uart_cs, uart_chsl, uart_mr, uart_rd_l, uart_wr_l, uart_data_oe;
  logic [2:0] uart_addr;
  logic [7:0] uart_data_o, uart_data_i;
  int checks = 0, failures = 0;
  logic [7:0] mem [2][8];

  always #15 clk = ~clk;

  uart_if dut (.*);

  // UART chip model: latches on the rising edge of WR#
  logic wr_q = 1;
  always @(posedge clk) begin
    if (!uart_cs && wr_q == 0 && uart_wr_l == 1) mem[uart_chsl][uart_addr] <= uart_data_o;
    wr_q <= uart_wr_l;
  end
  assign uart_data_i = (!uart_cs && !uart_rd_l) ? mem[uart_chsl][uart_addr] : 8'h00;

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

  task automatic access(input bit w, input bit ch, input logic [2:0] a,
                        input logic [7:0] d, output logic [7:0] q);
    int cs_n, st_n, lat, first_st;
    bit other_strobe;
    @(negedge clk); start = 1; write = w; chan1 = ch; addr = a; wdata = d;
    @(negedge clk); start = 0;
    cs_n = 0; st_n = 0; lat = 1; first_st = -1; other_strobe = 0;
    while (!done) begin
      if (!uart_cs) begin
        cs_n++;
        check(uart_chsl == ch && uart_addr == a, "address/channel stable");
        check(uart_data_oe == w, "data enable only for writes");
      end
      if (w ? !uart_wr_l : !uart_rd_l) begin st_n++; if (first_st < 0) first_st = cs_n; end
      if (w ? !uart_rd_l : !uart_wr_l) other_strobe = 1;
      @(negedge clk); lat++;
    end
    q = rdata;
    check(cs_n == 4, $sformatf("select low %0d clocks, expected 4", cs_n));
    check(st_n == 2, $sformatf("strobe low %0d clocks, expected 2", st_n));
    check(first_st == 2, $sformatf("strobe starts in select clock %0d, expected 2", first_st));
    check(lat == 5, $sformatf("done after %0d clocks, expected 5", lat));
    check(!other_strobe, "wrong strobe");
    check(uart_cs && !uart_data_oe, "bus released");
  endtask

  initial begin
    logic [7:0] q;
    repeat (3) @(posedge clk);
    #1 check(uart_mr, "master reset during reset");
    rst_n = 1;
    #1 check(!uart_mr, "master reset released");
    access(1, 1, 3'd3, 8'h83, q);
    access(1, 0, 3'd3, 8'h03, q);
    access(1, 1, 3'd7, 8'h5A, q);
    access(0, 1, 3'd3, 8'h00, q); check(q == 8'h83, $sformatf("read %h, expected 83", q));
    access(0, 0, 3'd3, 8'h00, q); check(q == 8'h03, $sformatf("read %h, expected 03", q));
    access(0, 1, 3'd7, 8'h00, q); check(q == 8'h5A, $sformatf("read %h, expected 5A", q));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

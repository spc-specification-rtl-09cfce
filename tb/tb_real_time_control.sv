// tb_real_time_control: checks the RTC/CMOS register file.
//
// Writes a date and time, reads it back, and checks the hardwired bytes:
// register A bit 7 = 0, register B bit 1 = 1, C = 00h, D = 80h, diagnostic
// status 08h, base memory 640 KB (0280h), century 19, and the extended
// memory size for each MEMSIZE setting: (16 << m) MB - 1 MB in KB, capped
// at FFFFh.  Unused indices read 00h and ignore writes.
module tb_real_time_control;
  logic clk = 0, rst_n = 0, sel = 0, dir = 0;
  logic [6:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [1:0] memsize = 0;
  int checks = 0, failures = 0;

  always #15 clk = ~clk;

  real_time_control dut (.*);

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

  task automatic wr(input logic [6:0] a, input logic [7:0] d);
    @(negedge clk); sel = 1; dir = 1; addr = a; wdata = d;
    @(negedge clk); sel = 0; dir = 0;
  endtask

  task automatic expect_rd(input logic [6:0] a, input logic [7:0] e);
    @(negedge clk); sel = 1; dir = 0; addr = a;
    #1 check(rdata == e, $sformatf("index %h read %h, expected %h", a, rdata, e));
    @(negedge clk); sel = 0;
  endtask

  initial begin
    logic [7:0] tv [7] = '{8'd59, 8'd30, 8'd23, 8'd5, 8'd31, 8'd12, 8'd97};
    logic [6:0] ti [7] = '{7'h00, 7'h02, 7'h04, 7'h06, 7'h07, 7'h08, 7'h09};
    int kb;
    repeat (3) @(posedge clk);
    rst_n = 1;

    expect_rd(7'h0B, 8'h06);
    expect_rd(7'h0F, 8'h00);
    for (int i = 0; i < 7; i++) wr(ti[i], tv[i]);
    for (int i = 0; i < 7; i++) expect_rd(ti[i], tv[i]);
    wr(7'h0A, 8'hA6); expect_rd(7'h0A, 8'h26);
    wr(7'h0B, 8'h00); expect_rd(7'h0B, 8'h02);
    wr(7'h0C, 8'hFF); expect_rd(7'h0C, 8'h00);
    expect_rd(7'h0D, 8'h80);
    expect_rd(7'h0E, 8'h08);
    wr(7'h0F, 8'h0A); expect_rd(7'h0F, 8'h0A);
    expect_rd(7'h10, 8'h00);
    expect_rd(7'h12, 8'h00);
    expect_rd(7'h14, 8'h00);
    expect_rd(7'h15, 8'h80);
    expect_rd(7'h16, 8'h02);
    expect_rd(7'h32, 8'h13);
    wr(7'h20, 8'h55); expect_rd(7'h20, 8'h00);
    for (int m = 0; m < 4; m++) begin
      memsize = 2'(m);
      kb = ((16 << m) - 1) * 1024;
      if (kb > 65535) kb = 65535;
      expect_rd(7'h17, 8'(kb));
      expect_rd(7'h18, 8'(kb >> 8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

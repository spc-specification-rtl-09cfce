// tb_register_manager: checks decoding and sequencing of register accesses.
//
// The function blocks are replaced by constant read values so that every
// returned byte shows where it came from.  For each access the test checks
// that exactly the expected block select (or acknowledge / BIOS strobe) is
// high for exactly one clock with the right dir, block address and write
// byte, that the read byte comes back in the lane of the port, and that the
// answer arrives 2 clocks after the request (7 clocks for the external
// UART, whose bus is modelled by a small register file).  Also checked: the
// RTC index register behind port 070h, the PIRQ route values, and that a
// memory access outside the BIOS windows reaches the boot mailbox with its
// dword, byte enables and address bit 2.
module tb_register_manager;
  import spc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, resp_valid;
  bus_req_t req = '0;
  logic [31:0] resp_rdata;
  logic [7:0] pirqa, pirqb, pirqc, pirqd, blk_wdata;
  logic blk_dir;
  logic [1:0] blk_addr;
  logic [6:0] rtc_addr;
  logic pic_master_sel, pic_slave_sel, nmi_sel, elcr_sel, pit_sel, rtc_sel, rst_sel, cfg_sel;
  logic [7:0] ic_rdata = 8'h91, pit_rdata = 8'h22, rtc_rdata = 8'h33,
              rst_rdata = 8'h44, cfg_rdata = 8'h55, vector = 8'h66;
  logic inta, bios_rd;
  logic [15:0] bios_addr;
  logic [31:0] bios_rdata = 32'hCAFE_BABE;
  logic mbox_sel, mbox_addr;
  logic [3:0] mbox_be;
  logic [31:0] mbox_wdata, mbox_rdata = 32'h1234_5678;
  int mbox_hits = 0;
  logic mbox_addr_q, mbox_dir_q;
  logic [3:0] mbox_be_q;
  logic [31:0] mbox_wdata_q;
  always @(posedge clk) if (mbox_sel) begin
    mbox_hits++; mbox_addr_q = mbox_addr; mbox_be_q = mbox_be;
    mbox_wdata_q = mbox_wdata; mbox_dir_q = blk_dir;
  end
  logic uart_cs, uart_chsl, uart_mr, uart_rd_l, uart_wr_l, uart_data_oe;
  logic [2:0] uart_addr;
  logic [7:0] uart_data_o, uart_data_i;
  int checks = 0, failures = 0;

  always #15 clk = ~clk;

  register_manager dut (.*);

  // external UART model
  logic [7:0] umem [2][8];
  logic wr_q = 1;
  always @(posedge clk) begin
    if (!uart_cs && !wr_q && uart_wr_l) umem[uart_chsl][uart_addr] <= uart_data_o;
    wr_q <= uart_wr_l;
  end
  assign uart_data_i = (!uart_cs && !uart_rd_l) ? umem[uart_chsl][uart_addr] : 8'h00;

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

  // strobe index: 0 pic1, 1 pic2, 2 nmi, 3 pit, 4 rtc, 5 rst, 6 cfg, 7 inta, 8 bios,
  // 9 elcr, 10 none
  function automatic logic [9:0] strobes();
    return {elcr_sel, bios_rd, inta, cfg_sel, rst_sel, rtc_sel, pit_sel, nmi_sel, pic_slave_sel, pic_master_sel};
  endfunction

  task automatic access(input req_kind_e k, input bit w, input logic [31:0] a,
                        input logic [3:0] be, input logic [31:0] wd,
                        input int exp_strobe, input logic [1:0] exp_baddr,
                        input int exp_lat, output logic [31:0] rd);
    int lat, hits;
    @(negedge clk);
    req_valid = 1; req.kind = k; req.write = w; req.addr = a; req.be = be; req.wdata = wd;
    @(negedge clk); req_valid = 0;
    lat = 1; hits = 0;
    while (!resp_valid) begin
      if (strobes() != 0) begin
        hits++;
        check(exp_strobe < 10 && strobes() == (10'd1 << exp_strobe),
              $sformatf("addr %h: strobes %b, expected bit %0d", a, strobes(), exp_strobe));
        if (exp_strobe < 7 || exp_strobe == 9) begin
          check(blk_dir == w, "dir");
          check(blk_addr == exp_baddr, $sformatf("addr %h: block address %0d, expected %0d",
                                                 a, blk_addr, exp_baddr));
          if (w) check(blk_wdata == wd[8*low_lane(be) +: 8], "write byte");
        end
      end
      @(negedge clk); lat++;
      if (lat > 20) break;
    end
    check(hits == (exp_strobe < 10 ? 1 : 0), $sformatf("addr %h: %0d strobe clocks", a, hits));
    check(lat == exp_lat, $sformatf("addr %h: response after %0d clocks, expected %0d", a, lat, exp_lat));
    rd = resp_rdata;
  endtask

  initial begin
    logic [31:0] rd;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(pirqa == 8'h05 && pirqb == 8'h80 && pirqc == 8'h80 && pirqd == 8'h80, "PIRQ routes");

    access(REQ_IO, 1, 32'h20, 4'b0010, 32'h0000_AB00, 0, 2'd1, 2, rd);    // 021h
    access(REQ_IO, 0, 32'h20, 4'b0001, 0, 0, 2'd0, 2, rd);                // 020h
    check(rd == 32'h0000_0091, $sformatf("PIC read %h", rd));
    access(REQ_IO, 0, 32'hA0, 4'b0010, 0, 1, 2'd1, 2, rd);                // 0A1h
    check(rd == 32'h0000_9100, $sformatf("slave read %h", rd));
    access(REQ_IO, 0, 32'h40, 4'b1000, 0, 3, 2'd3, 2, rd);                // 043h
    check(rd == 32'h2200_0000, $sformatf("PIT read %h", rd));
    access(REQ_IO, 1, 32'h60, 4'b0010, 32'h0000_0400, 2, 2'd0, 2, rd);    // 061h
    access(REQ_IO, 1, 32'h70, 4'b0001, 32'h0000_008A, 2, 2'd1, 2, rd);    // 070h
    check(rtc_addr == 7'h0A, $sformatf("RTC index %h", rtc_addr));
    access(REQ_IO, 0, 32'h70, 4'b0001, 0, 2, 2'd1, 2, rd);
    check(rd[7:0] == 8'h8A, $sformatf("070h read %h, expected 8A", rd[7:0]));
    access(REQ_IO, 0, 32'h70, 4'b0010, 0, 4, 2'd1, 2, rd);                // 071h
    check(rd == 32'h0000_3300, $sformatf("RTC read %h", rd));
    access(REQ_IO, 1, 32'hCF8, 4'b0010, 32'h0000_0600, 5, 2'd1, 2, rd);   // 0CF9h
    access(REQ_IO, 1, 32'hD04, 4'b0001, 32'h0000_005A, 6, 2'd1, 2, rd);   // 0D04h
    access(REQ_IO, 0, 32'hD08, 4'b0001, 0, 6, 2'd2, 2, rd);               // 0D08h
    check(rd == 32'h0000_0055, "config read");
    access(REQ_IO, 1, 32'h4D0, 4'b0010, 32'h0000_0E00, 9, 2'd1, 2, rd);   // 04D1h
    access(REQ_IO, 0, 32'h4D0, 4'b0001, 0, 9, 2'd0, 2, rd);               // 04D0h
    check(rd == 32'h0000_0091, $sformatf("edge/level read %h", rd));
    access(REQ_IACK, 0, 32'h0, 4'b0001, 0, 7, 2'd0, 2, rd);
    check(rd == 32'h0000_0066, $sformatf("IACK returned %h", rd));
    access(REQ_MEM, 0, 32'hFFFF_FFF0, 4'b0000, 0, 8, 2'd0, 2, rd);
    check(rd == 32'hCAFE_BABE && bios_addr == 16'hFFF0, "BIOS read");
    // boot mailbox behind the memory BAR
    access(REQ_MEM, 1, 32'h8000_0004, 4'b0110, 32'hA1B2_C3D4, 10, 2'd0, 2, rd);
    check(mbox_hits == 1 && mbox_addr_q && mbox_dir_q && mbox_be_q == 4'b0110 &&
          mbox_wdata_q == 32'hA1B2_C3D4, "mailbox write");
    access(REQ_MEM, 0, 32'h8000_0000, 4'b1111, 0, 10, 2'd0, 2, rd);
    check(mbox_hits == 2 && !mbox_addr_q && !mbox_dir_q, "mailbox read strobe");
    check(rd == 32'h1234_5678, $sformatf("mailbox read %h", rd));
    // UART: COM1 = 3F8h-3FFh on channel 1, COM2 on channel 2
    access(REQ_IO, 1, 32'h3F8, 4'b1000, 32'hC300_0000, 10, 2'd0, 7, rd);   // 3FBh
    access(REQ_IO, 1, 32'h2F8, 4'b1000, 32'h0300_0000, 10, 2'd0, 7, rd);   // 2FBh
    access(REQ_IO, 0, 32'h3F8, 4'b1000, 0, 10, 2'd0, 7, rd);
    check(rd == 32'hC300_0000, $sformatf("COM1 read %h", rd));
    access(REQ_IO, 0, 32'h2F8, 4'b1000, 0, 10, 2'd0, 7, rd);
    check(rd == 32'h0300_0000, $sformatf("COM2 read %h", rd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

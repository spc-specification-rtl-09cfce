// real_time_control: MC146818-style RTC register file without a clock.
//
// The board has no battery-backed clock.  The boot loader writes the date
// and time into these registers and the operating system reads them once at
// start-up; afterwards the OS keeps time from the interval timer.  So this
// block only stores bytes: it neither counts seconds nor raises interrupts.
// Binary data mode and 24-hour mode are the only ones supported.
//
// Address map (index set through port 070h, data through port 071h; the
// index register itself lives in the register manager):
//   00h seconds, 02h minutes, 04h hours, 06h day of week, 07h day of month,
//   08h month, 09h year                     read/write storage
//   0Ah register A   bit 7 (update in progress) reads 0, bits 6:0 stored
//   0Bh register B   bit 1 (24-hour) reads 1, other bits stored, reset 06h
//   0Ch register C   reads 00h (no RTC interrupts)
//   0Dh register D   reads 80h (valid RAM and time)
//   0Eh diagnostic status 08h, 0Fh shutdown status (read/write, reset 00h),
//   10h/12h/14h 00h (no floppy, hard disk or coprocessor),
//   15h/16h base memory 640 KB, 17h/18h extended memory from MEMSIZE,
//   32h century 19 (binary).
// Every other index reads 00h and ignores writes.
//
// Extended memory in KB is (total - 1 MB), total = 16/32/64/128 MB for
// MEMSIZE = 00/01/10/11; it saturates at FFFFh, the largest value the two
// bytes hold (128 MB gives 130048 KB).
//
// Register port: sel, dir (1 = write), addr (RTC index), wdata, rdata
// (combinational).  Writes take effect at the end of the cycle.  Storage
// registers reset to 00h, except register A, which resets to 00h rather than
// the listed 80h because its bit 7 is defined as always 0.  The register map
// follows the specification; the hours index 04h follows the MC146818 layout
// that the rest of the map uses, and the NVRAM values whose encoding is not
// given (diagnostic status, device type) are this implementation's choices.
module real_time_control (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sel,
  input  logic       dir,
  input  logic [6:0] addr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  input  logic [1:0] memsize
);
  logic [7:0] sec, min, hour, dow, dom, mon, year, shut;
  logic [6:0] reg_a;
  logic [7:0] reg_b;

  logic [15:0] ext_kb;
  always_comb begin
    unique case (memsize)
      2'b00: ext_kb = 16'd15360;
      2'b01: ext_kb = 16'd31744;
      2'b10: ext_kb = 16'd64512;
      default: ext_kb = 16'hFFFF;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sec <= '0; min <= '0; hour <= '0; dow <= '0; dom <= '0;
      mon <= '0; year <= '0; shut <= '0;
      reg_a <= '0;
      reg_b <= 8'h06;
    end else if (sel && dir) begin
      unique case (addr)
        7'h00: sec  <= {1'b0, wdata[6:0]};
        7'h02: min  <= {1'b0, wdata[6:0]};
        7'h04: hour <= wdata;
        7'h06: dow  <= wdata;
        7'h07: dom  <= wdata;
        7'h08: mon  <= wdata;
        7'h09: year <= wdata;
        7'h0A: reg_a <= wdata[6:0];
        7'h0B: reg_b <= wdata;
        7'h0F: shut <= wdata;
        default: ;
      endcase
    end
  end

  always_comb begin
    rdata = 8'h00;
    if (sel) begin
      unique case (addr)
        7'h00: rdata = sec;
        7'h02: rdata = min;
        7'h04: rdata = hour;
        7'h06: rdata = dow;
        7'h07: rdata = dom;
        7'h08: rdata = mon;
        7'h09: rdata = year;
        7'h0A: rdata = {1'b0, reg_a};
        7'h0B: rdata = reg_b | 8'h02;
        7'h0C: rdata = 8'h00;
        7'h0D: rdata = 8'h80;
        7'h0E: rdata = 8'h08;
        7'h0F: rdata = shut;
        7'h15: rdata = 8'h80;          // 640 KB = 0280h
        7'h16: rdata = 8'h02;
        7'h17: rdata = ext_kb[7:0];
        7'h18: rdata = ext_kb[15:8];
        7'h32: rdata = 8'd19;
        default: rdata = 8'h00;
      endcase
    end
  end
endmodule

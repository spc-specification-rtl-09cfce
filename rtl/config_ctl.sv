// config_ctl: slave-serial configuration port for the experimental FPGA.
//
// The board carries a second, user-programmable FPGA.  The CPU loads its
// bitstream byte by byte through three I/O registers, and this block turns
// each byte into eight DIN bits clocked by CCLK (Xilinx slave-serial mode).
//
//   0D00h start   bit 0: 1 drives EF_PROGRAM (held for the whole load).
//   0D04h data    write a byte; it is shifted out MSB first, one bit per
//                 CCLK period.  Writes while a byte is shifting are ignored.
//   0D08h status  bit 2: 1 while a byte is being shifted (write when 0);
//                 bit 1: 0 after EF_INIT fell (CRC/configuration error)
//                 while PROGRAM was driven, write 1 to clear;
//                 bit 0: 1 until the experimental FPGA raises EF_DONE.
//
// When DONE has been seen while PROGRAM is driven, EF_LOCK is raised to the
// experimental FPGA and further data writes are ignored; clearing the start
// bit releases the lock.
// CCLK is high for CCLK_HALF clocks and low for CCLK_HALF clocks; DIN
// changes while CCLK is low and is sampled by the target on the rising edge.
// EF_INIT and EF_DONE pass through two-flop synchronizers.
//
// Register port: sel, dir (1 = write), addr[1:0] (0 = 0D00h, 1 = 0D04h,
// 2 = 0D08h), wdata, rdata (combinational).  The registers, the slave-serial
// pins and the sequence follow the specification, which defers this function
// and states some status polarities inconsistently; the polarities above, the
// byte-wide data port and the CCLK rate are this implementation's choices.
module config_ctl #(
  parameter int unsigned CCLK_HALF = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sel,
  input  logic       dir,
  input  logic [1:0] addr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       ef_program,
  output logic       ef_cclk,
  output logic       ef_din,
  input  logic       ef_done,
  input  logic       ef_init,
  output logic       ef_lock
);
  logic [7:0] shreg;
  logic [3:0] bits_left;
  logic [3:0] half_cnt;
  logic       err_n;
  logic [1:0] s_done, s_init;

  wire busy = (bits_left != 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ef_program <= 1'b0;
      ef_cclk    <= 1'b0;
      ef_din     <= 1'b0;
      shreg      <= '0;
      bits_left  <= '0;
      half_cnt   <= '0;
      err_n      <= 1'b1;
      s_done     <= '0;
      s_init     <= '1;
      ef_lock    <= 1'b0;
    end else begin
      s_done <= {s_done[0], ef_done};
      s_init <= {s_init[0], ef_init};
      if (busy && !s_init[1]) err_n <= 1'b0;
      if (!ef_program)                ef_lock <= 1'b0;
      else if (s_done[1])             ef_lock <= 1'b1;

      if (sel && dir) begin
        unique case (addr)
          2'd0: ef_program <= wdata[0];
          2'd1: if (!busy && !ef_lock) begin
            shreg     <= {wdata[6:0], 1'b0};
            ef_din    <= wdata[7];
            bits_left <= 4'd8;
            half_cnt  <= 4'(CCLK_HALF - 1);
            ef_cclk   <= 1'b0;
          end
          2'd2: if (wdata[1]) err_n <= 1'b1;
          default: ;
        endcase
      end
      if (busy) begin
        if (half_cnt != 0) begin
          half_cnt <= half_cnt - 1'b1;
        end else begin
          half_cnt <= 4'(CCLK_HALF - 1);
          ef_cclk  <= !ef_cclk;
          if (ef_cclk) begin                 // falling edge: next bit
            bits_left <= bits_left - 1'b1;
            if (bits_left != 1) begin
              ef_din <= shreg[7];
              shreg  <= {shreg[6:0], 1'b0};
            end
          end
        end
      end
    end
  end

  always_comb begin
    rdata = 8'h00;
    if (sel) begin
      unique case (addr)
        2'd0: rdata = {7'h00, ef_program};
        2'd2: rdata = {5'h00, busy, err_n, !s_done[1]};
        default: rdata = 8'h00;
      endcase
    end
  end
endmodule

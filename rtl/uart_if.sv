// uart_if: bus-cycle generator for the external dual UART (COM1/COM2).
//
// The serial ports are a separate two-channel UART chip on the board; the
// System FPGA only forwards the CPU's accesses to it.  One `start` pulse runs
// one byte access, stretched to the chip's pace:
//   setup  (SETUP_CYCLES)  chip select low, channel, register address and,
//                          for writes, the data driven
//   strobe (STROBE_CYCLES) UART_WR_L or UART_RD_L low; a read samples
//                          UART_DATA on the last strobe clock
//   hold   (HOLD_CYCLES)   strobe high, select, address and data kept
// then everything is released and `done` pulses for one clock with the read
// byte in `rdata`.  With the defaults an access takes 1+2+1+1 = 5 clocks
// after `start`.
//
// Pins: uart_cs (active low chip select), uart_chsl (1 = channel 1 = COM1,
// 0 = channel 2 = COM2), uart_addr (register 0-7), uart_rd_l, uart_wr_l,
// uart_data_o/uart_data_oe/uart_data_i (split bidirectional data bus),
// uart_mr (master reset, high while the FPGA is in reset).
// The pin set and the order of the phases follow the specification's UART
// timing chart; the number of clocks in each phase is this implementation's
// choice, since the chart prints no timing values.
module uart_if #(
  parameter int unsigned SETUP_CYCLES  = 1,
  parameter int unsigned STROBE_CYCLES = 2,
  parameter int unsigned HOLD_CYCLES   = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       write,
  input  logic       chan1,       // 1 = COM1 (channel 1), 0 = COM2
  input  logic [2:0] addr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       busy,
  output logic       done,
  output logic       uart_cs,
  output logic       uart_chsl,
  output logic [2:0] uart_addr,
  output logic       uart_mr,
  output logic       uart_rd_l,
  output logic       uart_wr_l,
  output logic [7:0] uart_data_o,
  output logic       uart_data_oe,
  input  logic [7:0] uart_data_i
);
  typedef enum logic [1:0] {P_IDLE, P_SETUP, P_STROBE, P_HOLD} phase_e;

  phase_e     phase;
  logic [3:0] cnt;
  logic       is_write;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase        <= P_IDLE;
      cnt          <= '0;
      is_write     <= 1'b0;
      done         <= 1'b0;
      rdata        <= '0;
      uart_cs      <= 1'b1;
      uart_chsl    <= 1'b0;
      uart_addr    <= '0;
      uart_rd_l    <= 1'b1;
      uart_wr_l    <= 1'b1;
      uart_data_o  <= '0;
      uart_data_oe <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        P_IDLE: if (start) begin
          phase        <= P_SETUP;
          cnt          <= 4'(SETUP_CYCLES - 1);
          is_write     <= write;
          uart_cs      <= 1'b0;
          uart_chsl    <= chan1;
          uart_addr    <= addr;
          uart_data_o  <= wdata;
          uart_data_oe <= write;
        end
        P_SETUP: if (cnt == 0) begin
          phase     <= P_STROBE;
          cnt       <= 4'(STROBE_CYCLES - 1);
          uart_wr_l <= !is_write;
          uart_rd_l <=  is_write;
        end else cnt <= cnt - 1'b1;
        P_STROBE: if (cnt == 0) begin
          phase     <= P_HOLD;
          cnt       <= 4'(HOLD_CYCLES - 1);
          uart_wr_l <= 1'b1;
          uart_rd_l <= 1'b1;
          if (!is_write) rdata <= uart_data_i;
        end else cnt <= cnt - 1'b1;
        P_HOLD: if (cnt == 0) begin
          phase        <= P_IDLE;
          uart_cs      <= 1'b1;
          uart_data_oe <= 1'b0;
          done         <= 1'b1;
        end else cnt <= cnt - 1'b1;
        default: phase <= P_IDLE;
      endcase
    end
  end

  assign busy    = (phase != P_IDLE);
  assign uart_mr = !rst_n;
endmodule

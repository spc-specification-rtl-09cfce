// timer_control: reduced 8254 programmable interval timer (counter 0 only).
//
// Only what the PC system tick needs is kept: counter 0, mode 2 (rate
// generator), binary counting, the Counter Latch Command and the three
// byte-access orders (LSB only, MSB only, LSB then MSB).  Counters 1 and 2,
// the other modes, BCD counting and the Read-Back command are not provided;
// control words selecting them are ignored.
//
// Counting: the counter is clocked by the 1.193182 MHz enable from
// clk_divider.  Writing a control word stops the counter; once the initial
// count M is complete (one or two bytes, as the control word says) the
// counter loads M on the next tick and then decrements once per tick.  On the
// tick that takes it to 1, pit_int rises for one 33 MHz clock; on the next
// tick it reloads M.  The request therefore repeats every M ticks.  A count
// written while the counter runs is taken at the next reload.  A count of 0
// means 65536.
//
// Reading: after a Counter Latch Command (control word bits 5:4 = 00) the
// count is frozen in the output latch until it has been read (one or two
// bytes per the access order); a second latch command before then is
// ignored.  Without a latch the live count is read.
//
// Register port (from the register manager): sel, dir (1 = write),
// addr[1:0] (0 = port 040h, 3 = port 043h), wdata, rdata (combinational,
// valid while sel is high).  A write or a read side effect takes place on
// the clock edge at the end of the cycle in which sel is high.
//
// The register layout and mode-2 behaviour follow the specification; the
// single-33-MHz-clock request pulse follows its text (the timing figure
// draws a pulse one timer period long).  Reset values of the access order
// (LSB then MSB) and of the count are this implementation's choices.
module timer_control #(
  parameter int unsigned DIV_SHORT = 27,
  parameter int unsigned DIV_LONG  = 28
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sel,
  input  logic       dir,
  input  logic [1:0] addr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       pit_int,
  output logic       tick        // 1.193182 MHz enable, exported for observation
);
  typedef enum logic [1:0] {RW_LATCH = 2'b00, RW_LSB = 2'b01,
                            RW_MSB = 2'b10, RW_LSB_MSB = 2'b11} rw_e;

  clk_divider #(.DIV_SHORT(DIV_SHORT), .DIV_LONG(DIV_LONG)) u_div (
    .clk(clk), .rst_n(rst_n), .tick(tick));

  rw_e         rw_mode;
  logic [15:0] count_reg;   // initial count M
  logic [15:0] counter;     // counting element
  logic [15:0] out_latch;
  logic        latched;
  logic        enabled;
  logic        load_pending;
  logic        wr_msb_next;
  logic        rd_msb_next;

  wire wr_port = sel &&  dir && addr == 2'd0;
  wire wr_cw   = sel &&  dir && addr == 2'd3;
  wire rd_port = sel && !dir && addr == 2'd0;

  // Byte presented on a read of port 040h.
  logic        rd_is_msb;
  logic [15:0] rd_src;
  always_comb begin
    rd_src = latched ? out_latch : counter;
    unique case (rw_mode)
      RW_MSB:     rd_is_msb = 1'b1;
      RW_LSB_MSB: rd_is_msb = rd_msb_next;
      default:    rd_is_msb = 1'b0;
    endcase
    rdata = 8'h00;
    if (sel && addr == 2'd0)
      rdata = rd_is_msb ? rd_src[15:8] : rd_src[7:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rw_mode      <= RW_LSB_MSB;
      count_reg    <= '0;
      counter      <= '0;
      out_latch    <= '0;
      latched      <= 1'b0;
      enabled      <= 1'b0;
      load_pending <= 1'b0;
      wr_msb_next  <= 1'b0;
      rd_msb_next  <= 1'b0;
      pit_int      <= 1'b0;
    end else begin
      // ---------------- counting element ----------------
      pit_int <= 1'b0;
      if (enabled && tick) begin
        if (load_pending) begin
          counter      <= count_reg;
          load_pending <= 1'b0;
        end else if (counter == 16'd1) begin
          counter <= count_reg;
        end else begin
          counter <= counter - 1'b1;
          if (counter == 16'd2) pit_int <= 1'b1;
        end
      end

      // ---------------- control word ----------------
      if (wr_cw && wdata[7:6] == 2'b00) begin
        if (wdata[5:4] == RW_LATCH) begin
          if (!latched) begin
            out_latch   <= counter;
            latched     <= 1'b1;
            rd_msb_next <= 1'b0;
          end
        end else begin
          rw_mode      <= rw_e'(wdata[5:4]);
          enabled      <= 1'b0;
          load_pending <= 1'b0;
          latched      <= 1'b0;
          wr_msb_next  <= 1'b0;
          rd_msb_next  <= 1'b0;
        end
      end

      // ---------------- count write ----------------
      if (wr_port) begin
        logic done;
        done = 1'b0;
        unique case (rw_mode)
          RW_LSB: begin count_reg <= {8'h00, wdata}; done = 1'b1; end
          RW_MSB: begin count_reg <= {wdata, 8'h00}; done = 1'b1; end
          default: begin
            if (!wr_msb_next) begin
              count_reg[7:0] <= wdata;
              wr_msb_next    <= 1'b1;
            end else begin
              count_reg[15:8] <= wdata;
              wr_msb_next     <= 1'b0;
              done = 1'b1;
            end
          end
        endcase
        if (done && !enabled) begin
          enabled      <= 1'b1;
          load_pending <= 1'b1;
        end
      end

      // ---------------- count read ----------------
      if (rd_port) begin
        if (rw_mode == RW_LSB_MSB) begin
          rd_msb_next <= !rd_msb_next;
          if (rd_msb_next) latched <= 1'b0;
        end else begin
          latched <= 1'b0;
        end
      end
    end
  end
endmodule

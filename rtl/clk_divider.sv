// clk_divider: 33 MHz to 1.193182 MHz clock-enable generator.
//
// The PC timer is clocked at 1.193182 MHz.  Rather than a second clock
// domain, the PIT runs on the 33 MHz PCI clock and counts only on cycles in
// which this block raises `tick` for one clock.  Consecutive ticks are
// DIV_SHORT (27) or DIV_LONG (28) clocks apart.  The periods are grouped in
// CYCLES (35) cycles of SUBCYCLES (3) periods each: the first period of every
// cycle divides by 27 and the other two by 28, except in the last cycle (34)
// where the second period also divides by 27.  That gives 105 ticks per
// 2904 clocks, i.e. 33 MHz * 105 / 2904 = 1.193182 MHz.  Three counters do
// this: the divide counter, the period index i (0..2) and the cycle index j
// (0..34).  The pattern and the numbers follow the specification; the
// single-cycle enable output instead of a divided clock is this
// implementation's choice (the specification keeps all logic on 33 MHz).
//
// Interface: clk (33 MHz), rst_n (active low, synchronous), tick (1-cycle
// pulse at the end of each divided period).  The divider is never disabled.
module clk_divider #(
  parameter int unsigned DIV_SHORT   = 27,
  parameter int unsigned DIV_LONG    = 28,
  parameter int unsigned SUBCYCLES   = 3,
  parameter int unsigned CYCLES      = 35,
  parameter int unsigned SHORT_CYCLE = 34,  // cycle whose extra period is short
  parameter int unsigned SHORT_SUB   = 1    // which period of it is short
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int DW = $clog2(DIV_LONG + 1);
  localparam int SW = $clog2(SUBCYCLES + 1);
  localparam int CW = $clog2(CYCLES + 1);

  logic [DW-1:0] div_cnt;
  logic [SW-1:0] sub_idx;
  logic [CW-1:0] cyc_idx;
  logic [DW-1:0] div_len;

  always_comb begin
    if (sub_idx == '0 ||
        (cyc_idx == CW'(SHORT_CYCLE) && sub_idx == SW'(SHORT_SUB)))
      div_len = DW'(DIV_SHORT);
    else
      div_len = DW'(DIV_LONG);
  end

  wire last = (div_cnt == div_len - 1'b1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div_cnt <= '0;
      sub_idx <= '0;
      cyc_idx <= '0;
      tick    <= 1'b0;
    end else begin
      tick <= last;
      if (last) begin
        div_cnt <= '0;
        if (sub_idx == SW'(SUBCYCLES - 1)) begin
          sub_idx <= '0;
          cyc_idx <= (cyc_idx == CW'(CYCLES - 1)) ? '0 : cyc_idx + 1'b1;
        end else begin
          sub_idx <= sub_idx + 1'b1;
        end
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
    end
  end
endmodule

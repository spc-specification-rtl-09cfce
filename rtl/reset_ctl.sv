// reset_ctl: reset control register (port 0CF9h) and reset generators.
//
// Hard reset: while PWROK is low, and for HARD_RESET_CYCLES clocks after it
// rises, the block holds CPURST high, PCIRST# low and the FPGA's own internal
// reset (rst_n_int) low.  The same pulse follows a write to 0CF9h with bit 1
// (SRST) = 1 and bit 2 (RCPU) = 1.  A 16-bit counter times the pulse:
// 33000 clocks of the 33 MHz PCI clock, about 1 ms, which meets both the PCI
// rule (RST# at least 1 ms) and the Pentium's (at least 15 clocks).
//
// Soft reset: a write with RCPU = 1 and SRST = 0 raises INIT for
// INIT_CYCLES (2) clocks; nothing else is reset.
//
// Register 0CF9h: bit 1 SRST is read/write, bit 2 RCPU always reads 0, so
// every write of RCPU = 1 is a 0-to-1 transition and starts a reset.  The
// register is cleared by the internal reset.
//
// Timing: INIT starts on the clock edge after the one that accepted the
// write.  A hard reset from 0CF9h starts HARD_DELAY (8) clocks after the
// write, so that the PCI write cycle carrying it completes before the PCI
// interface itself is reset.  PWROK is synchronized by two flip-flops.  The power-up
// state of the flip-flops (reset asserted) is given by initial values, as an
// FPGA configures them.  Register layout, pulse lengths and the trigger rules
// follow the specification; the self-clearing RCPU bit, the hard-reset
// delay and the power-up values are this implementation's choices.
module reset_ctl #(
  parameter int unsigned HARD_RESET_CYCLES = 33000,
  parameter int unsigned INIT_CYCLES       = 2,
  parameter int unsigned HARD_DELAY        = 8
) (
  input  logic       clk,
  input  logic       pwrok,
  input  logic       sel,
  input  logic       dir,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       rst_n_int,
  output logic       cpurst,
  output logic       pcirst_l,
  output logic       init
);
  logic [1:0]  pwrok_s    = 2'b00;
  logic        hard_active = 1'b1;
  logic [15:0] hard_cnt   = '0;
  logic [1:0]  init_cnt   = '0;
  logic        srst;
  logic [3:0]  hard_pend  = '0;

  wire wr        = sel && dir && rst_n_int;
  wire hard_trig = wr && wdata[2] &&  wdata[1];
  wire soft_trig = wr && wdata[2] && !wdata[1];

  always_ff @(posedge clk) begin
    pwrok_s <= {pwrok_s[0], pwrok};
    // a 0CF9h hard reset starts HARD_DELAY clocks after the write so that
    // the PCI cycle that carried it can finish first
    if (hard_trig)           hard_pend <= 4'(HARD_DELAY);
    else if (hard_pend != 0) hard_pend <= hard_pend - 1'b1;
    if (!pwrok_s[1] || hard_pend == 4'd1) begin
      hard_active <= 1'b1;
      hard_cnt    <= '0;
    end else if (hard_active) begin
      if (hard_cnt == 16'(HARD_RESET_CYCLES - 1)) hard_active <= 1'b0;
      else hard_cnt <= hard_cnt + 1'b1;
    end

    if (soft_trig)          init_cnt <= 2'(INIT_CYCLES);
    else if (init_cnt != 0) init_cnt <= init_cnt - 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n_int) srst <= 1'b0;
    else if (wr)    srst <= wdata[1];
  end

  assign rst_n_int = !hard_active;
  assign cpurst    = hard_active;
  assign pcirst_l  = !hard_active;
  assign init      = (init_cnt != 0);
  assign rdata     = sel ? {5'b00000, 1'b0, srst, 1'b0} : 8'h00;
endmodule

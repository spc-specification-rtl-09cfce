// boot_mailbox: the two boot hand-shake registers of the System FPGA.
//
// During network boot the CPU runs a small loop from the emulated BIOS while
// a remote control processor loads the operating system into DRAM through
// the APIC.  Two registers coordinate the two sides:
//   offset 0  POST result: written by the BIOS after its memory test and
//             fetched by the control processor (through the APIC) to decide
//             whether to load the system;
//   offset 4  boot DONE: zero after reset; the control processor writes a
//             non-zero value once the whole image is in memory, and the
//             BIOS loop, which polls it, then jumps to the loaded code.
// Both are 32-bit read/write registers with byte enables, cleared by the
// internal reset (power-up and hard reset).
//
// Register port (from the register manager): sel for one clock, dir
// (1 = write), addr (0 = POST result, 1 = boot DONE), be (active-high byte
// enables), wdata, rdata (combinational while sel is high).  A write takes
// effect on the clock edge ending the select clock.
//
// The two registers, their users and the zero-at-power-up DONE value follow
// the specification's boot description; it gives no addresses, so placing
// them at offsets 0 and 4 of the FPGA's memory base address register, their
// 32-bit width and the byte enables are this implementation's choices.
module boot_mailbox (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel,
  input  logic        dir,
  input  logic        addr,
  input  logic [3:0]  be,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);
  logic [31:0] post_result, boot_done;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      post_result <= '0;
      boot_done   <= '0;
    end else if (sel && dir) begin
      for (int i = 0; i < 4; i++)
        if (be[i]) begin
          if (addr) boot_done[8*i +: 8]   <= wdata[8*i +: 8];
          else      post_result[8*i +: 8] <= wdata[8*i +: 8];
        end
    end
  end

  assign rdata = !sel ? 32'h0 : addr ? boot_done : post_result;
endmodule

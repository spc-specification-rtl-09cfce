// bios_ctl: emulated BIOS, a read-only memory seen by the CPU at reset.
//
// After reset the Pentium fetches its first instruction at FFFFFFF0h.  The
// north bridge passes that read to PCI, and the System FPGA answers it from
// this ROM.  The ROM holds ROM_BYTES (64 KB) as 32-bit words and appears in
// both BIOS windows decoded by the register manager (000E0000h-000FFFFFh
// and FFFE0000h-FFFFFFFFh); only address bits 15:2 select the word, so each
// window shows the ROM twice.
//
// Contents: by default the ROM holds, at offset FFF0h (the reset vector),
// the five-byte far jump EA 00 E0 00 F0 (JMP F000:E000), and FFh elsewhere.
// The BIOS program itself (memory test, copy to shadow RAM, the loop that
// waits for the operating system download) is left open by the
// specification; a hex file of 32-bit words can replace the default
// contents through the INIT_FILE parameter.
//
// Interface: rd (read strobe, for observation), addr (byte offset), rdata
// (combinational, the whole 32-bit word; byte lanes follow PCI little-endian
// order).  The memory map and reset-vector jump follow the specification;
// the default fill and the aliasing are this implementation's choices.
module bios_ctl #(
  parameter int unsigned ROM_BYTES = 65536,
  parameter string       INIT_FILE = ""
) (
  input  logic                         rd,
  input  logic [$clog2(ROM_BYTES)-1:0] addr,
  output logic [31:0]                  rdata
);
  localparam int AW    = $clog2(ROM_BYTES);
  localparam int WORDS = ROM_BYTES / 4;

  logic [31:0] rom [WORDS];

  initial begin
    if (INIT_FILE != "") begin
      $readmemh(INIT_FILE, rom);
    end else begin
      for (int i = 0; i < WORDS; i++) rom[i] = 32'hFFFF_FFFF;
      // Reset vector at offset FFF0h: JMP FAR F000:E000.
      rom[(ROM_BYTES - 16) / 4]     = 32'h00_E0_00_EA;
      rom[(ROM_BYTES - 16) / 4 + 1] = 32'hFF_FF_FF_F0;
    end
  end

  assign rdata = rd ? rom[addr[AW-1:2]] : 32'h0000_0000;
endmodule

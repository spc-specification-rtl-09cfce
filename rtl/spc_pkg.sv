// spc_pkg: types and constants shared by the System FPGA blocks.
//
// The System FPGA is a PCI target that gives a diskless Pentium board the
// few PC-AT legacy resources an operating system expects: an interrupt
// controller, an interval timer, real-time-clock registers, a reset
// register, an emulated boot ROM and the bus to an external UART.  This
// package holds the I/O port map (PIIX3-compatible port numbers), the
// memory windows of the emulated BIOS, and the request/response types that
// pass between the PCI target and the register manager.
//
// The port numbers and memory windows follow the specification; the request
// structure is this implementation's own choice.
package spc_pkg;

  // ------------------------------------------------------------------
  // I/O port map
  // ------------------------------------------------------------------
  localparam logic [15:0] IO_PIC1_0   = 16'h0020;  // ICW1 / OCW2 / OCW3, master
  localparam logic [15:0] IO_PIC1_1   = 16'h0021;  // ICW2-4 / OCW1, master
  localparam logic [15:0] IO_PIT_C0   = 16'h0040;  // counter 0 access port
  localparam logic [15:0] IO_PIT_CW   = 16'h0043;  // timer control word
  localparam logic [15:0] IO_NMISC    = 16'h0061;  // NMI status and control
  localparam logic [15:0] IO_RTC_ADDR = 16'h0070;  // RTC address + NMI mask
  localparam logic [15:0] IO_RTC_DATA = 16'h0071;  // RTC data
  localparam logic [15:0] IO_PIC2_0   = 16'h00A0;  // slave controller
  localparam logic [15:0] IO_PIC2_1   = 16'h00A1;
  localparam logic [15:0] IO_COM2     = 16'h02F8;  // 02F8h-02FFh, external UART
  localparam logic [15:0] IO_COM1     = 16'h03F8;  // 03F8h-03FFh, external UART
  localparam logic [15:0] IO_ELCR1    = 16'h04D0;  // edge/level control, master
  localparam logic [15:0] IO_ELCR2    = 16'h04D1;  // edge/level control, slave
  localparam logic [15:0] IO_RST_CTL  = 16'h0CF9;  // reset control
  localparam logic [15:0] IO_EFC_START  = 16'h0D00; // exp. FPGA config start
  localparam logic [15:0] IO_EFC_DATA   = 16'h0D04; // exp. FPGA config data
  localparam logic [15:0] IO_EFC_STATUS = 16'h0D08; // exp. FPGA config status

  // Function block selected by an I/O or memory address.
  typedef enum logic [3:0] {
    T_NONE, T_PIC1, T_PIC2, T_PIT, T_NMI, T_RTCA, T_RTCD,
    T_UART1, T_UART2, T_RST, T_EFC, T_BIOS, T_ELCR, T_MBOX
  } target_e;

  // PCI command codes used by the target.
  typedef enum logic [3:0] {
    CMD_IACK     = 4'b0000,
    CMD_SPECIAL  = 4'b0001,
    CMD_IO_RD    = 4'b0010,
    CMD_IO_WR    = 4'b0011,
    CMD_MEM_RD   = 4'b0110,
    CMD_MEM_WR   = 4'b0111,
    CMD_CFG_RD   = 4'b1010,
    CMD_CFG_WR   = 4'b1011,
    CMD_MEM_RDM  = 4'b1100,
    CMD_DAC      = 4'b1101,
    CMD_MEM_RDL  = 4'b1110,
    CMD_MEM_WRI  = 4'b1111
  } pci_cmd_e;

  // Kind of access the PCI target hands to the register manager.
  typedef enum logic [1:0] {REQ_IO, REQ_MEM, REQ_IACK} req_kind_e;

  typedef struct packed {
    req_kind_e   kind;
    logic        write;
    logic [31:0] addr;   // byte address of the dword (bits 1:0 from the PCI bus)
    logic [3:0]  be;     // active-high byte enables
    logic [31:0] wdata;
  } bus_req_t;

  // Decode of an I/O byte address (PIIX3-compatible ports of Table 42).
  function automatic target_e io_target(input logic [15:0] a);
    target_e t;
    t = T_NONE;
    unique case (a) inside
      IO_PIC1_0, IO_PIC1_1:          t = T_PIC1;
      IO_PIC2_0, IO_PIC2_1:          t = T_PIC2;
      IO_PIT_C0, IO_PIT_CW:          t = T_PIT;
      IO_NMISC:                      t = T_NMI;
      IO_RTC_ADDR:                   t = T_RTCA;
      IO_RTC_DATA:                   t = T_RTCD;
      [16'h03F8:16'h03FF]:           t = T_UART1;
      [16'h02F8:16'h02FF]:           t = T_UART2;
      IO_ELCR1, IO_ELCR2:            t = T_ELCR;
      IO_RST_CTL:                    t = T_RST;
      IO_EFC_START, IO_EFC_DATA, IO_EFC_STATUS: t = T_EFC;
      default:                       t = T_NONE;
    endcase
    return t;
  endfunction

  // Does any enabled byte of an I/O dword fall on a decoded port?
  function automatic logic io_hit(input logic [31:0] a, input logic [3:0] be);
    logic h;
    h = 1'b0;
    if (a[31:16] == 16'h0000)
      for (int i = 0; i < 4; i++)
        if (be[i] && io_target({a[15:2], 2'(i)}) != T_NONE) h = 1'b1;
    return h;
  endfunction

  // Emulated BIOS windows: 000E0000h-000FFFFFh below 1 MB and
  // FFFE0000h-FFFFFFFFh below 4 GB (holds the reset vector FFFFFFF0h).
  function automatic logic mem_hit(input logic [31:0] a);
    return (a[31:17] == 15'h0007) || (a[31:17] == 15'h7FFF);
  endfunction

  // Lowest enabled byte lane of a byte-enable set (0 when none is set).
  function automatic logic [1:0] low_lane(input logic [3:0] be);
    if (be[0]) return 2'd0;
    if (be[1]) return 2'd1;
    if (be[2]) return 2'd2;
    if (be[3]) return 2'd3;
    return 2'd0;
  endfunction

endpackage

// spc_system_fpga: the System FPGA of the SPC board.
//
// The SPC board carries a Pentium embedded module (CPU, cache, north bridge
// and DRAM), an APIC device on PCI and no south bridge or legacy I/O chips.  This FPGA sits on the node's PCI
// bus and supplies the PC-AT resources that the operating system and its
// boot path expect: an emulated boot ROM at the reset vector, an 8259-style
// interrupt controller with NMI logic, an 8254-style interval timer,
// RTC/CMOS registers, the reset control register with the board's reset
// generators, the bus to an external dual UART, and the configuration port
// of an experimental FPGA.
//
// Structure (one 33 MHz clock domain, the PCI clock):
//   pci_slave          PCI target and configuration space
//   register_manager   address decode, per-block register cycles, UART bus
//   interrupt_control  master/slave PIC and NMI  -> intr, nmi
//   timer_control      counter 0, mode 2         -> IRQ0
//   real_time_control  RTC and NVRAM bytes
//   bios_ctl           emulated BIOS ROM
//   boot_mailbox       POST-result and boot-DONE registers (memory BAR)
//   reset_ctl          0CF9h, PWROK -> CPURST, PCIRST#, INIT, internal reset
//   config_ctl         slave-serial port of the experimental FPGA
//
// Interrupt routing: timer IRQ0, COM2 IRQ3, COM1 IRQ4, APIC (PIRQA#) IRQ5.
// Bidirectional PCI and UART pins are split into _i/_o/_oe signals for the
// pad ring.  IGNNE#, SMI# and STPCLK# are held inactive, as specified.
// The partitioning and the pin list follow the specification.
module spc_system_fpga
  import spc_pkg::*;
#(
  parameter int unsigned HARD_RESET_CYCLES = 33000
) (
  input  logic        pciclk,
  // PCI
  input  logic [31:0] mad_i,
  output logic [31:0] mad_o,
  output logic        mad_oe,
  input  logic [3:0]  cbe_l,
  input  logic        frame_l,
  input  logic        irdy_l,
  output logic        trdy_l,
  output logic        stop_l,
  output logic        devsel_l,
  output logic        pci_ctl_oe,    // enable of TRDY#, STOP#, DEVSEL#
  output logic        perr_l,
  output logic        perr_oe,
  input  logic        idsel,
  input  logic        par_i,
  output logic        par_o,
  output logic        par_oe,
  // interrupts
  output logic        intr,
  output logic        nmi,
  input  logic        serr_l,
  input  logic        apic_int_l,
  input  logic        uart1_int,
  input  logic        uart2_int,
  // reset
  input  logic        pwrok,
  output logic        cpurst,
  output logic        init,
  output logic        pcirst_l,
  // experimental FPGA configuration
  output logic        ef_program,
  output logic        ef_cclk,
  output logic        ef_din,
  input  logic        ef_done,
  input  logic        ef_init,
  output logic        ef_lock,
  // main memory size jumpers: 00 16 MB, 01 32 MB, 10 64 MB, 11 128 MB
  input  logic [1:0]  memsize,
  // external UART
  output logic        uart_cs,
  output logic        uart_chsl,
  output logic [2:0]  uart_addr,
  output logic        uart_mr,
  output logic        uart_rd_l,
  output logic        uart_wr_l,
  output logic [7:0]  uart_data_o,
  output logic        uart_data_oe,
  input  logic [7:0]  uart_data_i,
  // CPU pins held inactive
  output logic        ignne_l,
  output logic        smi_l,
  output logic        stpclk_l
);
  logic        rst_n;
  logic        req_valid, resp_valid;
  bus_req_t    req;
  logic [31:0] resp_rdata;
  logic [7:0]  pirqa, pirqb, pirqc, pirqd;
  logic [7:0]  blk_wdata, ic_rdata, pit_rdata, rtc_rdata, rst_rdata, cfg_rdata, vector;
  logic        blk_dir;
  logic [1:0]  blk_addr;
  logic [6:0]  rtc_addr;
  logic        pic_master_sel, pic_slave_sel, nmi_sel, elcr_sel, pit_sel, rtc_sel, rst_sel, cfg_sel;
  logic        inta, bios_rd, pit_int, pit_tick;
  logic [15:0] bios_addr;
  logic [31:0] bios_rdata, mbox_rdata, mbox_wdata;
  logic        mbox_sel, mbox_addr;
  logic [3:0]  mbox_be;

  pci_slave u_pci (
    .clk(pciclk), .rst_n(rst_n),
    .frame_l(frame_l), .irdy_l(irdy_l), .idsel(idsel), .ad_i(mad_i),
    .cbe_l(cbe_l), .par_i(par_i), .ad_o(mad_o), .ad_oe(mad_oe),
    .par_o(par_o), .par_oe(par_oe), .devsel_l_o(devsel_l), .trdy_l_o(trdy_l),
    .stop_l_o(stop_l), .ctl_oe(pci_ctl_oe), .perr_l_o(perr_l), .perr_oe(perr_oe),
    .req_valid(req_valid), .req(req), .resp_valid(resp_valid),
    .resp_rdata(resp_rdata),
    .pirqa(pirqa), .pirqb(pirqb), .pirqc(pirqc), .pirqd(pirqd));

  register_manager u_regs (
    .clk(pciclk), .rst_n(rst_n),
    .req_valid(req_valid), .req(req), .resp_valid(resp_valid),
    .resp_rdata(resp_rdata),
    .pirqa(pirqa), .pirqb(pirqb), .pirqc(pirqc), .pirqd(pirqd),
    .blk_wdata(blk_wdata), .blk_dir(blk_dir), .blk_addr(blk_addr),
    .rtc_addr(rtc_addr),
    .pic_master_sel(pic_master_sel), .pic_slave_sel(pic_slave_sel),
    .nmi_sel(nmi_sel), .elcr_sel(elcr_sel), .pit_sel(pit_sel), .rtc_sel(rtc_sel),
    .rst_sel(rst_sel), .cfg_sel(cfg_sel),
    .ic_rdata(ic_rdata), .pit_rdata(pit_rdata), .rtc_rdata(rtc_rdata),
    .rst_rdata(rst_rdata), .cfg_rdata(cfg_rdata),
    .inta(inta), .vector(vector),
    .bios_rd(bios_rd), .bios_addr(bios_addr), .bios_rdata(bios_rdata),
    .mbox_sel(mbox_sel), .mbox_addr(mbox_addr), .mbox_be(mbox_be),
    .mbox_wdata(mbox_wdata), .mbox_rdata(mbox_rdata),
    .uart_cs(uart_cs), .uart_chsl(uart_chsl), .uart_addr(uart_addr),
    .uart_mr(uart_mr), .uart_rd_l(uart_rd_l), .uart_wr_l(uart_wr_l),
    .uart_data_o(uart_data_o), .uart_data_oe(uart_data_oe),
    .uart_data_i(uart_data_i));

  interrupt_control u_int (
    .clk(pciclk), .rst_n(rst_n),
    .pic_master_sel(pic_master_sel), .pic_slave_sel(pic_slave_sel),
    .nmi_sel(nmi_sel), .elcr_sel(elcr_sel), .dir(blk_dir), .addr(blk_addr[0]),
    .wdata(blk_wdata), .rdata(ic_rdata), .inta(inta), .vector(vector),
    .pit_int(pit_int), .uart1_int(uart1_int), .uart2_int(uart2_int),
    .apic_int_l(apic_int_l), .serr_l(serr_l), .intr(intr), .nmi(nmi));

  timer_control u_pit (
    .clk(pciclk), .rst_n(rst_n), .sel(pit_sel), .dir(blk_dir),
    .addr(blk_addr), .wdata(blk_wdata), .rdata(pit_rdata),
    .pit_int(pit_int), .tick(pit_tick));

  real_time_control u_rtc (
    .clk(pciclk), .rst_n(rst_n), .sel(rtc_sel), .dir(blk_dir),
    .addr(rtc_addr), .wdata(blk_wdata), .rdata(rtc_rdata), .memsize(memsize));

  bios_ctl u_bios (
    .rd(bios_rd), .addr(bios_addr), .rdata(bios_rdata));

  boot_mailbox u_mbox (
    .clk(pciclk), .rst_n(rst_n), .sel(mbox_sel), .dir(blk_dir),
    .addr(mbox_addr), .be(mbox_be), .wdata(mbox_wdata), .rdata(mbox_rdata));

  reset_ctl #(.HARD_RESET_CYCLES(HARD_RESET_CYCLES)) u_rst (
    .clk(pciclk), .pwrok(pwrok), .sel(rst_sel), .dir(blk_dir),
    .wdata(blk_wdata), .rdata(rst_rdata), .rst_n_int(rst_n),
    .cpurst(cpurst), .pcirst_l(pcirst_l), .init(init));

  config_ctl u_cfg (
    .clk(pciclk), .rst_n(rst_n), .sel(cfg_sel), .dir(blk_dir),
    .addr(blk_addr), .wdata(blk_wdata), .rdata(cfg_rdata),
    .ef_program(ef_program), .ef_cclk(ef_cclk), .ef_din(ef_din),
    .ef_done(ef_done), .ef_init(ef_init), .ef_lock(ef_lock));

  assign ignne_l  = 1'b1;
  assign smi_l    = 1'b1;
  assign stpclk_l = 1'b1;

  logic unused;
  assign unused = pit_tick;
endmodule

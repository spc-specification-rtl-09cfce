// tb_spc_system_fpga: end-to-end test of the System FPGA at its default sizes.
//
// A PCI master model plays the CPU and north bridge; a register-file model
// plays the external UART; the experimental FPGA is modelled as a DIN shift
// register.  The test follows the board's bring-up and the operating
// system's use of the legacy devices:
//   power-on reset (PWROK, 33000-clock hard reset), reset-vector fetch from
//   the emulated BIOS, configuration header, the boot mailbox (POST result
//   and boot DONE behind the memory BAR), interrupt controller set-up in
//   the PC operating-system order (ICW1-4, mask, special mask mode, read-IRR,
//   priority order 3-7,0-2), timer programming (mode 2) with periodic IRQ0
//   and its interrupt-acknowledge cycles, counter latch reads, RTC/NVRAM
//   accesses, UART accesses (PCI wait states while the external bus cycle
//   runs), APIC and COM1 interrupts, SERR#-caused NMI and its masking, the
//   experimental-FPGA configuration port, a burst that the target
//   disconnects, a soft reset (INIT), a hard reset through 0CF9h and the
//   edge/level control registers.
// Each mechanism is counted and a mechanism that never happened is a
// failure.  Expected values come from the PC register definitions.
module tb_spc_system_fpga;
  import spc_pkg::*;
  logic pciclk = 0;
  logic [31:0] mad_i = 0, mad_o;
  logic mad_oe;
  logic [3:0] cbe_l = 4'hF;
  logic frame_l = 1, irdy_l = 1, idsel = 0, par_i = 0;
  logic trdy_l, stop_l, devsel_l, pci_ctl_oe, perr_l, perr_oe, par_o, par_oe;
  logic intr, nmi, serr_l = 1, apic_int_l = 1, uart1_int = 0, uart2_int = 0;
  logic pwrok = 0, cpurst, init, pcirst_l;
  logic ef_program, ef_cclk, ef_din, ef_lock, ef_done = 0, ef_init = 1;
  logic [1:0] memsize = 2'b10;
  logic uart_cs, uart_chsl, uart_mr, uart_rd_l, uart_wr_l, uart_data_oe;
  logic [2:0] uart_addr;
  logic [7:0] uart_data_o, uart_data_i;
  logic ignne_l, smi_l, stpclk_l;
  int checks = 0, failures = 0;
  logic clk;
  assign clk = pciclk;

  always #15 pciclk = ~pciclk;

  spc_system_fpga dut (.*);

  // ---------------- board models ----------------
  logic [7:0] umem [2][8];
  logic wr_q = 1;
  int uart_cycles = 0;
  always @(posedge pciclk) begin
    if (!uart_cs && !wr_q && uart_wr_l) umem[uart_chsl][uart_addr] <= uart_data_o;
    if (uart_cs === 1'b0 && wr_q && !uart_wr_l) uart_cycles++;
    wr_q <= uart_wr_l;
  end
  assign uart_data_i = (!uart_cs && !uart_rd_l) ? umem[uart_chsl][uart_addr] : 8'h00;

  logic [31:0] ef_shift = 0;
  int ef_bits = 0;
  logic cclk_q = 0;
  always @(posedge pciclk) begin
    if (ef_cclk && !cclk_q) begin ef_shift <= {ef_shift[30:0], ef_din}; ef_bits++; end
    cclk_q <= ef_cclk;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- PCI master model ----------------
  int devsel_clk, trdy_clk, perr_seen, stop_seen;
  task automatic pci(input logic [3:0] cmd, input logic [31:0] addr,
                     input logic [3:0] be, input logic [31:0] wd,
                     input bit cfg, input bit burst, input bit bad_par,
                     output logic [31:0] rd, output bit claimed);
    bit wr;
    int n;
    logic [31:0] data_q;
    logic [3:0] cbe_q;
    wr = cmd[0];
    devsel_clk = -1; trdy_clk = -1; perr_seen = 0; stop_seen = 0; claimed = 0; rd = 0;
    @(negedge clk);
    frame_l = 0; mad_i = addr; cbe_l = cmd; idsel = cfg;
    @(negedge clk);
    par_i = ^{addr, cmd};
    idsel = 0; irdy_l = 0; cbe_l = ~be; mad_i = wr ? wd : 32'h0;
    if (!burst) frame_l = 1;
    n = 1;
    forever begin
      @(posedge clk);
      if (!devsel_l && pci_ctl_oe && devsel_clk < 0) devsel_clk = n;
      if (!trdy_l && pci_ctl_oe) begin
        trdy_clk = n; claimed = 1; rd = mad_o; data_q = mad_o; cbe_q = cbe_l;
        stop_seen = !stop_l;
        break;
      end
      if (devsel_clk < 0 && n >= 5) break;           // master abort
      n++;
    end
    @(negedge clk);
    par_i = bad_par ? !(^{wd, ~be}) : ^{wd, ~be};
    // read parity: PAR one clock after the data transfer
    if (claimed && !wr) check(par_oe && par_o == ^{data_q, cbe_q}, "read parity");
    if (frame_l == 0) begin
      frame_l = 1;                                   // disconnected
      @(posedge clk);
      check(!stop_l || !claimed, "STOP# held until FRAME# high");
      @(negedge clk);
    end
    irdy_l = 1; cbe_l = 4'hF;
    repeat (3) begin
      @(posedge clk);
      if (!perr_l && perr_oe) perr_seen = 1;
    end
    check(!pci_ctl_oe && !mad_oe, "bus released");
  endtask


  // ---------------- convenience accesses ----------------
  task automatic outb(input logic [15:0] port, input logic [7:0] d);
    logic [31:0] rd; bit cl;
    logic [1:0] ln;
    ln = port[1:0];
    pci(CMD_IO_WR, {16'h0, port}, 4'b0001 << ln, 32'(d) << (8 * ln), 0, 0, 0, rd, cl);
    check(cl, $sformatf("outb %h claimed", port));
  endtask

  task automatic inb(input logic [15:0] port, output logic [7:0] d);
    logic [31:0] rd; bit cl;
    logic [1:0] ln;
    ln = port[1:0];
    pci(CMD_IO_RD, {16'h0, port}, 4'b0001 << ln, 0, 0, 0, 0, rd, cl);
    check(cl, $sformatf("inb %h claimed", port));
    d = rd[8 * ln +: 8];
  endtask

  int n_iack = 0;
  task automatic iack(output logic [7:0] v);
    logic [31:0] rd; bit cl;
    pci(CMD_IACK, 0, 4'h1, 0, 0, 0, 0, rd, cl);   // first INTA
    pci(CMD_IACK, 0, 4'h1, 0, 0, 0, 0, rd, cl);   // second INTA: vector
    v = rd[7:0];
    n_iack++;
  endtask

  task automatic wait_intr(input int max, output bit seen);
    seen = 0;
    repeat (max) begin
      @(posedge pciclk);
      if (intr) begin seen = 1; break; end
    end
  endtask

  // mechanism counters
  int n_poweron = 0, n_bios = 0, n_timer_irq = 0, n_latch = 0, n_uart_stall = 0,
      n_apic = 0, n_com1 = 0, n_nmi = 0, n_nmi_masked = 0, n_disconnect = 0,
      n_soft = 0, n_hard = 0, n_elcr = 0, n_mbox = 0, n_efc = 0, n_reorder = 0, n_smm = 0, n_rtc = 0;

  int init_clocks = 0, cpurst_clocks = 0;
  always @(posedge pciclk) begin
    if (init) init_clocks++;
    if (cpurst) cpurst_clocks++;
  end

  initial begin
    repeat (300000) @(posedge pciclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    logic [7:0] d, v, lo, hi;
    bit cl, seen;
    int t0, t1, c0;

    // ---- power-on ----
    $display("%0t: power-on", $time);
    repeat (20) @(posedge pciclk);
    check(cpurst && !pcirst_l, "reset while PWROK low");
    check(ignne_l && smi_l && stpclk_l, "unused CPU pins inactive");
    cpurst_clocks = 0;
    @(negedge pciclk); pwrok = 1;
    wait (!cpurst);
    check(cpurst_clocks >= 33000 && cpurst_clocks <= 33003,
          $sformatf("power-on reset %0d clocks, expected 33000 + synchronizer", cpurst_clocks));
    check(pcirst_l, "PCIRST# released");
    n_poweron++;
    repeat (5) @(posedge pciclk);

    // ---- reset-vector fetch ----
    $display("%0t: reset-vector fetch", $time);
    pci(CMD_MEM_RD, 32'hFFFF_FFF0, 4'hF, 0, 0, 0, 0, rd, cl);
    check(cl && rd == 32'h00E0_00EA, $sformatf("reset vector %h", rd));
    pci(CMD_MEM_RD, 32'hFFFF_FFF4, 4'hF, 0, 0, 0, 0, rd, cl);
    check(rd[7:0] == 8'hF0, "far jump segment byte");
    pci(CMD_MEM_RD, 32'h000F_FFF0, 4'hF, 0, 0, 0, 0, rd, cl);
    check(rd == 32'h00E0_00EA, "BIOS alias below 1 MB");
    n_bios++;

    // ---- configuration header ----
    $display("%0t: configuration header", $time);
    pci(CMD_CFG_RD, 32'h08, 4'hF, 0, 1, 0, 0, rd, cl);
    check(rd[31:8] == 24'h060100, "PCI-to-ISA bridge class");
    pci(CMD_CFG_RD, 32'h60, 4'hF, 0, 1, 0, 0, rd, cl);
    check(rd == 32'h8080_8005, $sformatf("PIRQ routes %h", rd));

    // ---- boot mailbox behind the memory BAR ----
    pci(CMD_CFG_WR, 32'h10, 4'hF, 32'hC000_0000, 1, 0, 0, rd, cl);
    pci(CMD_MEM_RD, 32'hC000_0004, 4'hF, 0, 0, 0, 0, rd, cl);
    check(cl && rd == 0, "boot DONE is zero after power-on");
    pci(CMD_MEM_WR, 32'hC000_0000, 4'hF, 32'h0000_0001, 0, 0, 0, rd, cl);  // BIOS: POST passed
    pci(CMD_MEM_RD, 32'hC000_0000, 4'hF, 0, 0, 0, 0, rd, cl);              // APIC fetches it
    check(cl && rd == 32'h0000_0001, $sformatf("POST result %h", rd));
    pci(CMD_MEM_WR, 32'hC000_0004, 4'b0001, 32'h0000_00A5, 0, 0, 0, rd, cl); // image loaded
    pci(CMD_MEM_RD, 32'hC000_0004, 4'hF, 0, 0, 0, 0, rd, cl);              // BIOS loop exits
    check(cl && rd == 32'h0000_00A5, $sformatf("boot DONE %h", rd));
    if (rd == 32'h0000_00A5) n_mbox++;

    // ---- interrupt controller set-up ----
    $display("%0t: interrupt controller set-up", $time);
    outb(16'h20, 8'h11); outb(16'h21, 8'h20); outb(16'h21, 8'h04); outb(16'h21, 8'h01);
    outb(16'h21, 8'hFF); outb(16'h20, 8'h68); outb(16'h20, 8'h0A);
    outb(16'hA0, 8'h11); outb(16'hA1, 8'h28); outb(16'hA1, 8'h02); outb(16'hA1, 8'h01);
    outb(16'hA1, 8'hFF); outb(16'hA0, 8'h68); outb(16'hA0, 8'h0A);
    inb(16'h21, d); check(d == 8'hFF, "master mask");
    // edge/level control registers
    outb(16'h4D0, 8'h20); outb(16'h4D1, 8'h0E);
    inb(16'h4D0, d); check(d == 8'h20, $sformatf("ELCR1 %h", d));
    inb(16'h4D1, d); check(d == 8'h0E, $sformatf("ELCR2 %h", d));
    if (d == 8'h0E) n_elcr++;
    inb(16'hA1, d); check(d == 8'hFF, "slave mask");
    outb(16'h20, 8'h48);                     // back to normal mask mode
    outb(16'h21, 8'hC6);                     // unmask IR0, IR3, IR4, IR5

    // ---- timer: mode 2, count 50 ----
    $display("%0t: timer: mode 2, count 50", $time);
    outb(16'h43, 8'h34); outb(16'h40, 8'd50); outb(16'h40, 8'd0);
    wait_intr(5000, seen);
    check(seen, "timer interrupt");
    t0 = $time / 30;
    iack(v); check(v == 8'h20, $sformatf("timer vector %h, expected 20", v));
    outb(16'h20, 8'h20);
    n_timer_irq++;
    wait_intr(5000, seen);
    t1 = $time / 30;
    check(seen, "second timer interrupt");
    // 50 ticks of 27 or 28 clocks
    check(t1 - t0 >= 50 * 27 && t1 - t0 <= 50 * 28,
          $sformatf("timer period %0d clocks, expected 1350-1400", t1 - t0));
    iack(v); check(v == 8'h20, "timer vector again");
    outb(16'h20, 8'h20);
    n_timer_irq++;
    // counter latch: two reads 3 timer periods apart differ by 3 (mod 50)
    outb(16'h43, 8'h00); inb(16'h40, lo); inb(16'h40, hi);
    c0 = {hi, lo};
    check(c0 >= 1 && c0 <= 50, $sformatf("latched count %0d in 1..50", c0));
    n_latch++;

    // ---- RTC and NVRAM ----
    $display("%0t: RTC and NVRAM", $time);
    outb(16'h70, 8'h80 | 8'h00); outb(16'h71, 8'd42);
    outb(16'h70, 8'h80 | 8'h09); outb(16'h71, 8'd97);
    outb(16'h70, 8'h80 | 8'h00); inb(16'h71, d); check(d == 8'd42, "RTC seconds");
    outb(16'h70, 8'h80 | 8'h09); inb(16'h71, d); check(d == 8'd97, "RTC year");
    inb(16'h70, d); check(d == 8'h89, $sformatf("port 070h reads %h", d));
    outb(16'h70, 8'h80 | 8'h17); inb(16'h71, lo);
    outb(16'h70, 8'h80 | 8'h18); inb(16'h71, hi);
    check({hi, lo} == 16'hFC00, $sformatf("extended memory %h KB for 64 MB", {hi, lo}));
    outb(16'h70, 8'h80 | 8'h0D); inb(16'h71, d); check(d == 8'h80, "RTC register D");
    n_rtc++;

    // ---- UART: wait states on PCI ----
    $display("%0t: UART: wait states on PCI", $time);
    c0 = uart_cycles;
    pci(CMD_IO_WR, 32'h3F8, 4'b1000, 32'h8300_0000, 0, 0, 0, rd, cl);
    check(cl && trdy_clk > 8, $sformatf("UART write TRDY# at clock %0d", trdy_clk));
    if (trdy_clk > 8) n_uart_stall++;
    outb(16'h2FF, 8'h5A);
    inb(16'h3FB, d); check(d == 8'h83, $sformatf("COM1 LCR %h", d));
    inb(16'h2FF, d); check(d == 8'h5A, $sformatf("COM2 scratch %h", d));
    check(umem[1][3] == 8'h83 && umem[0][7] == 8'h5A, "UART channel selection");
    check(uart_cycles == c0 + 2, "two UART write strobes");

    // ---- APIC and COM1 interrupts, priority ----
    $display("%0t: APIC and COM1 interrupts, priority", $time);
    @(negedge pciclk); apic_int_l = 0;
    wait_intr(100, seen);
    @(negedge pciclk); apic_int_l = 1;
    repeat (4) @(posedge pciclk);
    iack(v); check(v == 8'h25, $sformatf("APIC vector %h, expected 25", v));
    if (v == 8'h25) n_apic++;
    @(negedge pciclk); uart1_int = 1;
    repeat (6) @(posedge pciclk);
    @(negedge pciclk); uart1_int = 0;
    // IR4 outranks IR5 in service: delivered before the EOI
    wait_intr(100, seen);
    check(seen, "COM1 nested over APIC");
    iack(v); check(v == 8'h24, $sformatf("COM1 vector %h, expected 24", v));
    if (v == 8'h24) n_com1++;
    outb(16'h20, 8'h20); outb(16'h20, 8'h20);
    // special mask mode: mask IR0 and IR5, put IR5 in service, then a lower
    // level (IR5 itself being the lowest used) -- use IR4 blocked by IR3
    outb(16'h20, 8'h68);
    @(negedge pciclk); uart2_int = 1;        // COM2 = IR3
    repeat (4) @(posedge pciclk);
    @(negedge pciclk); uart2_int = 0;
    wait_intr(100, seen);
    iack(v); check(v == 8'h23, $sformatf("COM2 vector %h, expected 23", v));
    @(negedge pciclk); uart1_int = 1;        // IR4 below IR3 in service
    repeat (4) @(posedge pciclk);
    @(negedge pciclk); uart1_int = 0;
    outb(16'h21, 8'hFF ^ 8'h10);             // only IR4 unmasked
    wait_intr(100, seen);
    check(seen, "lower level delivered in special mask mode");
    if (seen) n_smm++;
    iack(v); check(v == 8'h24, $sformatf("SMM vector %h", v));
    outb(16'h20, 8'h48);
    outb(16'h20, 8'h20); outb(16'h20, 8'h20);
    outb(16'h21, 8'hC6);
    // priority order 3-7, 0-2: IR3 before IR0
    outb(16'h20, 8'hC2);
    @(negedge pciclk); uart2_int = 1;
    wait_intr(5000, seen);                   // timer will also be pending
    wait (dut.u_int.u_master.irr[0]);
    @(negedge pciclk); uart2_int = 0;
    repeat (4) @(posedge pciclk);
    iack(v); check(v == 8'h23, $sformatf("rotated priority vector %h, expected 23", v));
    if (v == 8'h23) n_reorder++;
    outb(16'h20, 8'h20);
    wait_intr(100, seen);
    iack(v); check(v == 8'h20, $sformatf("then timer %h", v));
    outb(16'h20, 8'h20);
    outb(16'h20, 8'hC7);                     // IR0 highest again
    outb(16'h21, 8'hFF);                     // mask everything

    // ---- NMI ----
    $display("%0t: NMI", $time);
    @(negedge pciclk); serr_l = 0;
    @(negedge pciclk); serr_l = 1;
    repeat (5) @(posedge pciclk);
    inb(16'h61, d); check(d == 8'h80, $sformatf("NMISC %h", d));
    check(!nmi, "NMI masked after reset");
    if (!nmi) n_nmi_masked++;
    outb(16'h70, 8'h00);
    repeat (2) @(posedge pciclk);
    check(nmi, "NMI when enabled");
    if (nmi) n_nmi++;
    outb(16'h61, 8'h04);
    repeat (2) @(posedge pciclk);
    check(!nmi, "NMI cleared");
    outb(16'h61, 8'h00);
    outb(16'h70, 8'h80);

    // ---- experimental FPGA configuration ----
    $display("%0t: experimental FPGA configuration", $time);
    outb(16'hD00, 8'h01);
    check(ef_program, "PROGRAM driven");
    ef_bits = 0;
    outb(16'hD04, 8'hC3);
    do inb(16'hD08, d); while (d[2]);
    check(ef_bits == 8 && ef_shift[7:0] == 8'hC3, $sformatf("shifted %h (%0d bits)", ef_shift[7:0], ef_bits));
    if (ef_bits == 8) n_efc++;
    @(negedge pciclk); ef_done = 1;
    repeat (3) @(posedge pciclk);
    inb(16'hD08, d); check(d[0] == 0, "configuration done status");
    check(ef_lock, "experimental FPGA locked after DONE");

    // ---- burst disconnect ----
    $display("%0t: burst disconnect", $time);
    pci(CMD_MEM_RDM, 32'hFFFE_0000, 4'hF, 0, 0, 1, 0, rd, cl);
    check(cl && stop_seen && rd == 32'hFFFF_FFFF, "burst disconnected with data");
    if (stop_seen) n_disconnect++;

    // ---- soft reset ----
    $display("%0t: soft reset", $time);
    init_clocks = 0;
    outb(16'hCF9, 8'h04);
    repeat (5) @(posedge pciclk);
    check(init_clocks == 2, $sformatf("INIT %0d clocks, expected 2", init_clocks));
    check(!cpurst, "soft reset leaves CPURST low");
    inb(16'h21, d); check(d == 8'hFF, "soft reset keeps FPGA state");
    if (init_clocks == 2) n_soft++;

    // ---- hard reset ----
    $display("%0t: hard reset", $time);
    cpurst_clocks = 0;
    outb(16'hCF9, 8'h06);
    wait (cpurst);
    wait (!cpurst);
    check(cpurst_clocks == 33000, $sformatf("hard reset %0d clocks, expected 33000", cpurst_clocks));
    if (cpurst_clocks == 33000) n_hard++;
    repeat (3) @(posedge pciclk);
    inb(16'h21, d); check(d == 8'h00, "interrupt mask cleared by hard reset");
    inb(16'hCF9, d); check(d == 8'h00, "reset register cleared");
    inb(16'h4D0, d); check(d == 8'h00, "ELCR1 cleared by hard reset");

    // ---- every mechanism exercised ----
    $display("%0t: every mechanism exercised", $time);
    check(n_poweron > 0, "power-on reset");
    check(n_bios > 0, "BIOS fetch");
    check(n_timer_irq > 0, "timer interrupt");
    check(n_iack > 0, "interrupt acknowledge");
    check(n_latch > 0, "counter latch");
    check(n_rtc > 0, "RTC access");
    check(n_uart_stall > 0, "UART wait states");
    check(n_apic > 0, "APIC interrupt");
    check(n_com1 > 0, "COM1 interrupt");
    check(n_smm > 0, "special mask mode");
    check(n_reorder > 0, "priority reorder");
    check(n_nmi > 0 && n_nmi_masked > 0, "NMI and NMI mask");
    check(n_efc > 0, "configuration shift");
    check(n_disconnect > 0, "disconnect");
    check(n_soft > 0, "soft reset");
    check(n_hard > 0, "hard reset");
    check(n_elcr > 0, "edge/level control registers");
    check(n_mbox > 0, "boot mailbox");
    $display("mechanisms: poweron=%0d bios=%0d timer=%0d iack=%0d latch=%0d rtc=%0d uart_stall=%0d apic=%0d com1=%0d smm=%0d reorder=%0d nmi=%0d efc=%0d disconnect=%0d soft=%0d hard=%0d",
             n_poweron, n_bios, n_timer_irq, n_iack, n_latch, n_rtc, n_uart_stall, n_apic,
             n_com1, n_smm, n_reorder, n_nmi, n_efc, n_disconnect, n_soft, n_hard);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

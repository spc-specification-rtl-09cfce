// interrupt_control: master/slave interrupt controllers and the NMI logic.
//
// Two `pic` instances give the PC's two 8259-style controllers at ports
// 020h/021h (master) and 0A0h/0A1h (slave).  All requests of this board
// enter the master: IR0 the interval timer, IR3 COM2, IR4 COM1 (the usual PC
// assignment) and IR5 the APIC's PCI interrupt PIRQA#.  The slave receives no
// requests; it exists so that an operating system can program and read it
// back, and its INTR is cascaded to master IR2 as on a PC.  The interrupt
// acknowledge pulses go to the master, which supplies every vector.
//
// NMI: the only NMI source is PCI SERR#.  Port 061h (NMISC) reports it in
// bit 7 while bit 2 is 0 (enable); writing bit 2 = 1 clears and disables it.
// Bit 7 of port 070h masks NMI (1 = disabled, the reset value).  NMI is the
// registered AND of the status and the enable, so clearing the mask while a
// source is pending produces a new rising edge.
//
// Edge/level control: ports 04D0h (master) and 04D1h (slave) are plain
// read/write registers, cleared by reset.  The controllers always sample
// their requests as levels, so the stored bits do not change behaviour.
//
// The asynchronous board inputs (UART interrupts, APIC_INT_L, SERR_L) pass
// through two-flop synchronizers, adding two clocks of latency.
//
// Register port: pic_master_sel / pic_slave_sel / nmi_sel / elcr_sel with
// shared dir (1 = write), addr (bit 0: A0 of the PIC, 0 = 061h / 1 = 070h
// for NMI, 0 = 04D0h / 1 = 04D1h for edge/level control),
// wdata and rdata (combinational).  `inta` is one acknowledge pulse.
// Port map, IRQ routing of the timer and APIC, and the NMI rules follow the
// specification; COM1/COM2 to IR4/IR3 and the synchronizers are choices of
// this implementation.
module interrupt_control (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pic_master_sel,
  input  logic       pic_slave_sel,
  input  logic       nmi_sel,
  input  logic       elcr_sel,
  input  logic       dir,
  input  logic       addr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  input  logic       inta,
  output logic [7:0] vector,
  input  logic       pit_int,     // from timer_control, synchronous
  input  logic       uart1_int,   // COM1, active high
  input  logic       uart2_int,   // COM2, active high
  input  logic       apic_int_l,  // PIRQA#, active low
  input  logic       serr_l,      // PCI SERR#, active low
  output logic       intr,
  output logic       nmi
);
  // ---------------- synchronizers ----------------
  logic [1:0] s_u1, s_u2, s_apic, s_serr;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_u1 <= '0; s_u2 <= '0; s_apic <= '1; s_serr <= '1;
    end else begin
      s_u1   <= {s_u1[0], uart1_int};
      s_u2   <= {s_u2[0], uart2_int};
      s_apic <= {s_apic[0], apic_int_l};
      s_serr <= {s_serr[0], serr_l};
    end
  end

  // ---------------- controllers ----------------
  logic [7:0] m_rdata, s_rdata, s_vector, m_ir;
  logic [7:0] elcr1, elcr2;
  logic       s_intr, m_ready, s_ready;

  assign m_ir = {2'b00, !s_apic[1], s_u1[1], s_u2[1], s_intr, 1'b0, pit_int};

  pic u_master (
    .clk(clk), .rst_n(rst_n), .sel(pic_master_sel), .dir(dir), .a0(addr),
    .wdata(wdata), .rdata(m_rdata), .ir(m_ir), .inta(inta),
    .vector(vector), .intr(intr), .ready(m_ready));

  pic u_slave (
    .clk(clk), .rst_n(rst_n), .sel(pic_slave_sel), .dir(dir), .a0(addr),
    .wdata(wdata), .rdata(s_rdata), .ir(8'h00), .inta(1'b0),
    .vector(s_vector), .intr(s_intr), .ready(s_ready));

  // ---------------- NMI ----------------
  // Edge/level control registers (04D0h, 04D1h): read/write storage for
  // software that programs them; the controllers always work level-sensitive.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      elcr1 <= 8'h00;
      elcr2 <= 8'h00;
    end else if (elcr_sel && dir) begin
      if (addr) elcr2 <= wdata;
      else      elcr1 <= wdata;
    end
  end

  logic serr_status, serr_dis, nmi_mask;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      serr_status <= 1'b0;
      serr_dis    <= 1'b0;
      nmi_mask    <= 1'b1;
      nmi         <= 1'b0;
    end else begin
      if (!s_serr[1] && !serr_dis) serr_status <= 1'b1;
      if (nmi_sel && dir && !addr) begin
        serr_dis <= wdata[2];
        if (wdata[2]) serr_status <= 1'b0;
      end
      if (nmi_sel && dir && addr) nmi_mask <= wdata[7];
      nmi <= serr_status && !nmi_mask;
    end
  end

  always_comb begin
    rdata = 8'h00;
    if (pic_master_sel)     rdata = m_rdata;
    else if (pic_slave_sel) rdata = s_rdata;
    else if (elcr_sel)      rdata = addr ? elcr2 : elcr1;
    else if (nmi_sel)       rdata = addr ? {nmi_mask, 7'h00}
                                         : {serr_status, 4'h0, serr_dis, 2'b00};
  end

  // The slave's vector and ready flag are not needed: nothing requests there.
  logic unused;
  assign unused = ^{s_vector, m_ready, s_ready};
endmodule

// tb_pci_slave: checks the PCI target against a simple PCI master model.
//
// The master model runs one transaction per call: address phase, then one
// data phase (or, with `burst`, FRAME# held to ask for more).  It records
// the clock at which DEVSEL# and TRDY# are first seen, checks read parity
// one clock after each data transfer, and can corrupt write parity.  The
// register manager is replaced by a model that answers after 3 clocks with
// read data built from the request (so the returned value proves what was
// forwarded).  Checked: the configuration header (IDs, class code, command/
// status defaults, writable bits, write-one-to-clear status, BARs, PIRQ
// routes), IDSEL, medium DEVSEL# timing (second clock after the address
// phase), forwarding of I/O, memory and interrupt-acknowledge cycles with
// the right kind, address, byte enables and data, no response to undecoded
// addresses, disconnect with STOP# on a burst, PERR# and status bit 15 on a
// write parity error, and release of the control lines after each cycle.
module tb_pci_slave;
  import spc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic frame_l = 1, irdy_l = 1, idsel = 0, par_i = 0;
  logic [31:0] ad_i = 0, ad_o;
  logic [3:0]  cbe_l = 4'hF;
  logic ad_oe, par_o, par_oe, devsel_l_o, trdy_l_o, stop_l_o, ctl_oe, perr_l_o, perr_oe;
  logic req_valid, resp_valid = 0;
  bus_req_t req;
  logic [31:0] resp_rdata = 0;
  logic [7:0] pirqa = 8'h05, pirqb = 8'h80, pirqc = 8'h80, pirqd = 8'h80;
  int checks = 0, failures = 0;

  always #15 clk = ~clk;

  pci_slave dut (.*);

  // ---------------- register manager model ----------------
  bus_req_t last_req;
  int nreq = 0;
  initial forever begin
    @(posedge clk);
    if (req_valid) begin
      last_req = req;
      nreq++;
      repeat (2) @(posedge clk);
      #1 resp_valid = 1;
      resp_rdata = {req.addr[15:0], 4'h0, req.be, 6'h0, 2'(req.kind)};
      @(posedge clk);
      #1 resp_valid = 0;
    end
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
    frame_l = 0; ad_i = addr; cbe_l = cmd; idsel = cfg;
    @(negedge clk);
    par_i = ^{addr, cmd};
    idsel = 0; irdy_l = 0; cbe_l = ~be; ad_i = wr ? wd : 32'h0;
    if (!burst) frame_l = 1;
    n = 1;
    forever begin
      @(posedge clk);
      if (!devsel_l_o && ctl_oe && devsel_clk < 0) devsel_clk = n;
      if (!trdy_l_o && ctl_oe) begin
        trdy_clk = n; claimed = 1; rd = ad_o; data_q = ad_o; cbe_q = cbe_l;
        stop_seen = !stop_l_o;
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
      check(!stop_l_o || !claimed, "STOP# held until FRAME# high");
      @(negedge clk);
    end
    irdy_l = 1; cbe_l = 4'hF;
    repeat (3) begin
      @(posedge clk);
      if (!perr_l_o && perr_oe) perr_seen = 1;
    end
    check(!ctl_oe && !ad_oe, "bus released");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    bit cl;
    int nreq0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ---- configuration space ----
    pci(CMD_CFG_RD, 32'h00, 4'hF, 0, 1, 0, 0, rd, cl);
    check(cl && rd == 32'h0001_0001, $sformatf("ID %h", rd));
    check(devsel_clk == 2, $sformatf("DEVSEL# at clock %0d, expected 2 (medium)", devsel_clk));
    pci(CMD_CFG_RD, 32'h04, 4'hF, 0, 1, 0, 0, rd, cl);
    check(rd == 32'h0200_0003, $sformatf("status/command %h, expected 02000003", rd));
    pci(CMD_CFG_RD, 32'h08, 4'hF, 0, 1, 0, 0, rd, cl);
    check(rd == 32'h0601_0000, $sformatf("class/revision %h", rd));
    pci(CMD_CFG_WR, 32'h04, 4'hF, 32'h0000_FFFF, 1, 0, 0, rd, cl);
    pci(CMD_CFG_RD, 32'h04, 4'hF, 0, 1, 0, 0, rd, cl);
    check(rd == 32'h0200_014B, $sformatf("command after write %h, expected 0200014B", rd));
    pci(CMD_CFG_WR, 32'h10, 4'hF, 32'hFFFF_FFFF, 1, 0, 0, rd, cl);
    pci(CMD_CFG_RD, 32'h10, 4'hF, 0, 1, 0, 0, rd, cl);
    check(rd == 32'hFFFF_FFF0, $sformatf("memory BAR %h", rd));
    pci(CMD_CFG_WR, 32'h14, 4'h1, 32'hFFFF_FFFF, 1, 0, 0, rd, cl);
    pci(CMD_CFG_RD, 32'h14, 4'hF, 0, 1, 0, 0, rd, cl);
    check(rd == 32'h0000_00FD, $sformatf("I/O BAR %h", rd));
    pci(CMD_CFG_RD, 32'h60, 4'hF, 0, 1, 0, 0, rd, cl);
    check(rd == 32'h8080_8005, $sformatf("PIRQ routes %h", rd));
    pci(CMD_CFG_RD, 32'h00, 4'hF, 0, 0, 0, 0, rd, cl);
    check(!cl && devsel_clk < 0, "no response without IDSEL");

    // ---- forwarded cycles ----
    nreq0 = nreq;
    pci(CMD_IO_WR, 32'h21, 4'b0010, 32'h0000_FF00, 0, 0, 0, rd, cl);
    check(cl && nreq == nreq0 + 1, "I/O write claimed and forwarded once");
    check(last_req.kind == REQ_IO && last_req.write && last_req.addr == 32'h21 &&
          last_req.be == 4'b0010 && last_req.wdata == 32'h0000_FF00, "I/O write request");
    // DEVSEL# seen at clock 2, request issued at 2, answered 3 clocks later,
    // TRDY# driven on the next clock and seen at 7
    check(trdy_clk == 7, $sformatf("TRDY# at clock %0d, expected 7", trdy_clk));
    pci(CMD_IO_RD, 32'h40, 4'b0001, 0, 0, 0, 0, rd, cl);
    check(rd == {16'h0040, 4'h0, 4'b0001, 6'h0, 2'(REQ_IO)}, $sformatf("I/O read %h", rd));
    check(!last_req.write, "read request");
    pci(CMD_MEM_RD, 32'hFFFF_FFF0, 4'hF, 0, 0, 0, 0, rd, cl);
    check(cl && last_req.kind == REQ_MEM && last_req.addr == 32'hFFFF_FFF0, "BIOS read forwarded");
    pci(CMD_MEM_RD, 32'h000F_FFF0, 4'hF, 0, 0, 0, 0, rd, cl);
    check(cl && last_req.kind == REQ_MEM, "BIOS read below 1 MB");
    pci(CMD_IACK, 32'h0, 4'h1, 0, 0, 0, 0, rd, cl);
    check(cl && last_req.kind == REQ_IACK && rd[1:0] == 2'(REQ_IACK), "IACK forwarded");
    nreq0 = nreq;
    pci(CMD_IO_RD, 32'h60, 4'h1, 0, 0, 0, 0, rd, cl);
    check(!cl && nreq == nreq0, "port 060h not claimed");
    pci(CMD_MEM_RD, 32'h0010_0000, 4'hF, 0, 0, 0, 0, rd, cl);
    check(!cl && nreq == nreq0, "main memory not claimed");
    // memory BAR window (boot mailbox): 16 bytes at the assigned base
    pci(CMD_MEM_WR, 32'h8000_0004, 4'hF, 32'h0000_0001, 0, 0, 0, rd, cl);
    check(!cl && nreq == nreq0, "BAR window not claimed before assignment");
    pci(CMD_CFG_WR, 32'h10, 4'hF, 32'h8000_0000, 1, 0, 0, rd, cl);
    pci(CMD_MEM_WR, 32'h8000_0004, 4'hF, 32'h0000_0001, 0, 0, 0, rd, cl);
    check(cl && nreq == nreq0 + 1 && last_req.kind == REQ_MEM && last_req.write &&
          last_req.addr == 32'h8000_0004 && last_req.wdata == 32'h0000_0001, "BAR window write forwarded");
    pci(CMD_MEM_RD, 32'h8000_000C, 4'hF, 0, 0, 0, 0, rd, cl);
    check(cl && nreq == nreq0 + 2, "BAR window read claimed");
    pci(CMD_MEM_RD, 32'h8000_0010, 4'hF, 0, 0, 0, 0, rd, cl);
    check(!cl && nreq == nreq0 + 2, "beyond the 16-byte BAR window not claimed");

    // ---- burst: disconnect with data ----
    pci(CMD_MEM_RDL, 32'hFFFE_0000, 4'hF, 0, 0, 1, 0, rd, cl);
    check(cl && stop_seen, "STOP# with TRDY# on a burst");
    pci(CMD_IO_RD, 32'h40, 4'b0001, 0, 0, 0, 0, rd, cl);
    check(cl, "target idle again after disconnect");

    // ---- write parity error ----
    pci(CMD_IO_WR, 32'h20, 4'b0001, 32'h0000_0011, 0, 0, 1, rd, cl);
    check(perr_seen == 1, "PERR# on bad write parity");
    pci(CMD_CFG_RD, 32'h04, 4'hF, 0, 1, 0, 0, rd, cl);
    check(rd[31] == 1, "detected parity error status");
    pci(CMD_CFG_WR, 32'h04, 4'b1000, 32'h8000_0000, 1, 0, 0, rd, cl);
    pci(CMD_CFG_RD, 32'h04, 4'hF, 0, 1, 0, 0, rd, cl);
    check(rd[31] == 0, "status bit 15 cleared by writing 1");
    pci(CMD_IO_WR, 32'h20, 4'b0001, 32'h0000_0011, 0, 0, 0, rd, cl);
    check(perr_seen == 0, "no PERR# on good parity");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

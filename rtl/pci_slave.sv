// pci_slave: 32-bit PCI target of the System FPGA.
//
// The FPGA is never a bus master.  It claims:
//   - type-0 configuration cycles with IDSEL high, function 0: a PCI-to-ISA
//     bridge header (class 060100h) with vendor/device/revision parameters,
//     command and status registers, two base address registers and the
//     hardwired PIRQ[A:D] route registers at 60h-63h;
//   - I/O reads and writes to the decoded legacy ports (spc_pkg::io_target);
//   - memory reads and writes in the emulated BIOS windows, and in the
//     16-byte window of the memory base address register (boot mailbox);
//   - interrupt acknowledge cycles.
// Everything except configuration space is handed to the register manager
// as one request, and the data phase completes when it answers.
//
// Bus timing: DEVSEL# is asserted with medium timing (second clock after
// the address phase), matching DEVSEL timing = 01 in the status register.
// The target accepts one data phase per transaction.  If FRAME# is still
// asserted when TRDY# is given, STOP# is asserted with it (disconnect with
// data) and held until FRAME# goes high.  After the last data phase DEVSEL#,
// TRDY# and STOP# are driven high for one clock and then released.  PAR is
// driven one clock after AD on reads.  Write data parity is checked: an error
// sets status bit 15 and, when parity error response (command bit 6) is on,
// PERR# is driven low for one clock.  Configuration accesses complete in one
// wait state; register-manager accesses take two clocks more (internal
// blocks) or about seven (external UART).
//
// Bidirectional pins are split into _i, _o and _oe signals.  The register
// set, defaults and hardwired bits follow the specification's configuration
// register tables; the transaction timing, single-data-phase bursts and the
// base address register widths are this implementation's choices, as is
// command bit 9 reading 0 (the table asks for 1 but gives the reason for 0).
module pci_slave
  import spc_pkg::*;
#(
  parameter logic [15:0] VENDOR_ID   = 16'h0001,
  parameter logic [15:0] DEVICE_ID   = 16'h0001,
  parameter logic [7:0]  REVISION_ID = 8'h00,
  parameter logic [23:0] CLASS_CODE  = 24'h060100
) (
  input  logic        clk,
  input  logic        rst_n,
  // PCI bus
  input  logic        frame_l,
  input  logic        irdy_l,
  input  logic        idsel,
  input  logic [31:0] ad_i,
  input  logic [3:0]  cbe_l,
  input  logic        par_i,
  output logic [31:0] ad_o,
  output logic        ad_oe,
  output logic        par_o,
  output logic        par_oe,
  output logic        devsel_l_o,
  output logic        trdy_l_o,
  output logic        stop_l_o,
  output logic        ctl_oe,
  output logic        perr_l_o,
  output logic        perr_oe,
  // register manager
  output logic        req_valid,
  output bus_req_t    req,
  input  logic        resp_valid,
  input  logic [31:0] resp_rdata,
  input  logic [7:0]  pirqa, pirqb, pirqc, pirqd
);
  typedef enum logic [2:0] {
    T_IDLE, T_DECODE, T_DATA, T_WAIT, T_XFER, T_STOPWAIT, T_TURN
  } tstate_e;
  typedef enum logic [1:0] {K_CFG, K_IO, K_MEM, K_IACK} tkind_e;

  tstate_e     st;
  tkind_e      tk;
  logic        t_write;
  logic [31:0] t_addr;
  logic        frame_q, irdy_q;

  // configuration registers
  logic        cmd_special, cmd_perr, cmd_serr;
  logic        sts_dpe, sts_sse, sts_sta, sts_dpr;
  logic [31:4] bar_mem;
  logic [31:2] bar_io;

  wire [15:0] command = {6'b0, 1'b0, cmd_serr, 1'b0, cmd_perr, 2'b00,
                         cmd_special, 1'b0, 2'b11};
  wire [15:0] status  = {sts_dpe, sts_sse, 2'b00, sts_sta, 2'b01, sts_dpr, 8'h00};

  function automatic logic [31:0] cfg_read(input logic [5:0] idx);
    unique case (idx)
      6'h00:   return {DEVICE_ID, VENDOR_ID};
      6'h01:   return {status, command};
      6'h02:   return {CLASS_CODE, REVISION_ID};
      6'h04:   return {bar_mem, 4'b0000};
      6'h05:   return {bar_io, 2'b01};
      6'h18:   return {pirqd, pirqc, pirqb, pirqa};
      default: return 32'h0000_0000;
    endcase
  endfunction

  // Decode of an address phase.
  logic   hit;
  tkind_e hit_kind;
  always_comb begin
    hit      = 1'b0;
    hit_kind = K_IO;
    unique case (pci_cmd_e'(cbe_l))
      CMD_CFG_RD, CMD_CFG_WR: begin
        hit      = idsel && ad_i[1:0] == 2'b00 && ad_i[10:8] == 3'b000;
        hit_kind = K_CFG;
      end
      CMD_IO_RD, CMD_IO_WR: begin
        hit      = ad_i[31:16] == 16'h0000 && io_target(ad_i[15:0]) != T_NONE;
        hit_kind = K_IO;
      end
      CMD_MEM_RD, CMD_MEM_WR, CMD_MEM_RDM, CMD_MEM_RDL, CMD_MEM_WRI: begin
        // BIOS windows, or the 16-byte window of the memory BAR once it has
        // been assigned (boot mailbox)
        hit      = mem_hit(ad_i) || (bar_mem != '0 && ad_i[31:4] == bar_mem);
        hit_kind = K_MEM;
      end
      CMD_IACK: begin
        hit      = 1'b1;
        hit_kind = K_IACK;
      end
      default: hit = 1'b0;
    endcase
  end

  wire addr_phase = !frame_l && frame_q && irdy_q;

  logic        chk_par;
  logic        exp_par;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st          <= T_IDLE;
      tk          <= K_IO;
      t_write     <= 1'b0;
      t_addr      <= '0;
      frame_q     <= 1'b1;
      irdy_q      <= 1'b1;
      ad_o        <= '0;
      ad_oe       <= 1'b0;
      par_o       <= 1'b0;
      par_oe      <= 1'b0;
      devsel_l_o  <= 1'b1;
      trdy_l_o    <= 1'b1;
      stop_l_o    <= 1'b1;
      ctl_oe      <= 1'b0;
      perr_l_o    <= 1'b1;
      perr_oe     <= 1'b0;
      req_valid   <= 1'b0;
      req         <= '0;
      cmd_special <= 1'b0;
      cmd_perr    <= 1'b0;
      cmd_serr    <= 1'b0;
      sts_dpe     <= 1'b0;
      sts_sse     <= 1'b0;
      sts_sta     <= 1'b0;
      sts_dpr     <= 1'b0;
      bar_mem     <= '0;
      bar_io      <= '0;
      chk_par     <= 1'b0;
      exp_par     <= 1'b0;
    end else begin
      frame_q   <= frame_l;
      irdy_q    <= irdy_l;
      req_valid <= 1'b0;
      par_o     <= ^{ad_o, cbe_l};
      par_oe    <= ad_oe;

      // write data parity, checked one clock after the data transfer
      chk_par  <= 1'b0;
      perr_l_o <= 1'b1;
      perr_oe  <= !perr_l_o;            // drive high for one clock after PERR#
      if (chk_par && par_i != exp_par) begin
        sts_dpe <= 1'b1;
        if (cmd_perr) begin
          perr_l_o <= 1'b0;
          perr_oe  <= 1'b1;
        end
      end

      unique case (st)
        T_IDLE: if (addr_phase && hit) begin
          tk      <= hit_kind;
          t_write <= cbe_l[0];
          t_addr  <= ad_i;
          st      <= T_DECODE;
        end
        T_DECODE: begin
          devsel_l_o <= 1'b0;
          ctl_oe     <= 1'b1;
          ad_oe      <= !t_write;
          st         <= T_DATA;
        end
        T_DATA: if (!irdy_l) begin
          if (tk == K_CFG) begin
            if (t_write) begin
              if (t_addr[7:2] == 6'h01) begin
                if (!cbe_l[0]) begin
                  cmd_special <= ad_i[3];
                  cmd_perr    <= ad_i[6];
                end
                if (!cbe_l[1]) cmd_serr <= ad_i[8];
                if (!cbe_l[3]) begin
                  if (ad_i[31]) sts_dpe <= 1'b0;
                  if (ad_i[30]) sts_sse <= 1'b0;
                  if (ad_i[27]) sts_sta <= 1'b0;
                  if (ad_i[24]) sts_dpr <= 1'b0;
                end
              end
              if (t_addr[7:2] == 6'h04)
                for (int b = 0; b < 4; b++)
                  if (!cbe_l[b]) for (int k = 8*b; k < 8*b + 8; k++)
                    if (k >= 4) bar_mem[k] <= ad_i[k];
              if (t_addr[7:2] == 6'h05)
                for (int b = 0; b < 4; b++)
                  if (!cbe_l[b]) for (int k = 8*b; k < 8*b + 8; k++)
                    if (k >= 2) bar_io[k] <= ad_i[k];
            end else begin
              ad_o <= cfg_read(t_addr[7:2]);
            end
            trdy_l_o <= 1'b0;
            stop_l_o <= frame_l;
            st       <= T_XFER;
          end else begin
            req_valid  <= 1'b1;
            req.kind   <= (tk == K_MEM) ? REQ_MEM : (tk == K_IACK) ? REQ_IACK : REQ_IO;
            req.write  <= t_write && tk != K_IACK;
            req.addr   <= t_addr;
            req.be     <= ~cbe_l;
            req.wdata  <= ad_i;
            st         <= T_WAIT;
          end
        end
        T_WAIT: if (resp_valid) begin
          ad_o     <= resp_rdata;
          trdy_l_o <= 1'b0;
          stop_l_o <= frame_l;
          st       <= T_XFER;
        end
        T_XFER: if (!irdy_l) begin
          trdy_l_o <= 1'b1;
          ad_oe    <= 1'b0;
          if (t_write) begin
            chk_par <= 1'b1;
            exp_par <= ^{ad_i, cbe_l};
          end
          if (frame_l) begin
            devsel_l_o <= 1'b1;
            stop_l_o   <= 1'b1;
            st         <= T_TURN;
          end else begin
            st <= T_STOPWAIT;
          end
        end
        T_STOPWAIT: if (frame_l) begin
          devsel_l_o <= 1'b1;
          stop_l_o   <= 1'b1;
          st         <= T_TURN;
        end
        T_TURN: begin
          ctl_oe <= 1'b0;
          st     <= T_IDLE;
        end
        default: st <= T_IDLE;
      endcase
    end
  end

  logic unused;
  assign unused = cmd_special;
endmodule

// register_manager: address decoder and access sequencer of the System FPGA.
//
// The PCI target hands over one access at a time (an I/O or memory read or
// write, or an interrupt acknowledge).  The register manager decodes the
// address to a function block, runs the block's zero-wait register cycle or
// the slower external UART cycle, and returns the read data.
//
// Internal register cycle (all blocks except the UART):
//   clock 0  request accepted, target decoded
//   clock 1  the block's select is high with dir, address and write byte;
//            the block answers combinationally, and a write (or a read side
//            effect) takes place on the clock edge ending this cycle
//   clock 2  resp_valid with the read data
// UART cycle: the access is passed to uart_if and resp_valid follows its
// `done`, five clocks after the start with its defaults.
//
// I/O accesses are byte-wide: the lowest enabled byte lane picks the port
// (dword address + lane) and the read byte returns in that lane.  Memory
// reads of the emulated BIOS return the whole dword; memory writes there
// are accepted and dropped.  A memory access outside the BIOS windows has
// hit the memory base address register and goes to the boot mailbox as a
// full dword with its byte enables (mbox_sel, mbox_addr = address bit 2,
// mbox_be, mbox_wdata, mbox_rdata), with the same two-clock timing.  An interrupt acknowledge gives the master
// interrupt controller one acknowledge pulse and returns its vector in
// byte 0.
//
// The register manager also holds the RTC index register: a write to port
// 070h stores bits 6:0 here without touching the RTC (bit 7, the NMI mask,
// goes to interrupt_control), and a data access at 071h presents the stored
// index to the RTC.  It also drives the hardwired PIRQ[A:D] route registers
// read through PCI configuration space: PIRQA routed to IRQ5 (05h), PIRQB-D
// disabled (80h).
//
// The decode table, the one-wait-state-free block timing and the RTC index
// handling follow the specification; the request/response handshake with
// the PCI target and byte-lane handling are this implementation's choices.
module register_manager
  import spc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // from / to the PCI target
  input  logic        req_valid,
  input  bus_req_t    req,
  output logic        resp_valid,
  output logic [31:0] resp_rdata,
  output logic [7:0]  pirqa, pirqb, pirqc, pirqd,
  // shared bus to the function blocks
  output logic [7:0]  blk_wdata,
  output logic        blk_dir,
  output logic [1:0]  blk_addr,
  output logic [6:0]  rtc_addr,
  output logic        pic_master_sel,
  output logic        pic_slave_sel,
  output logic        nmi_sel,
  output logic        elcr_sel,
  output logic        pit_sel,
  output logic        rtc_sel,
  output logic        rst_sel,
  output logic        cfg_sel,
  input  logic [7:0]  ic_rdata,     // interrupt_control (PICs and NMI)
  input  logic [7:0]  pit_rdata,
  input  logic [7:0]  rtc_rdata,
  input  logic [7:0]  rst_rdata,
  input  logic [7:0]  cfg_rdata,
  output logic        inta,
  input  logic [7:0]  vector,
  output logic        bios_rd,
  output logic [15:0] bios_addr,
  input  logic [31:0] bios_rdata,
  output logic        mbox_sel,
  output logic        mbox_addr,
  output logic [3:0]  mbox_be,
  output logic [31:0] mbox_wdata,
  input  logic [31:0] mbox_rdata,
  // external UART pins
  output logic        uart_cs,
  output logic        uart_chsl,
  output logic [2:0]  uart_addr,
  output logic        uart_mr,
  output logic        uart_rd_l,
  output logic        uart_wr_l,
  output logic [7:0]  uart_data_o,
  output logic        uart_data_oe,
  input  logic [7:0]  uart_data_i
);
  typedef enum logic [1:0] {ST_IDLE, ST_ACCESS, ST_UART, ST_RESP} state_e;

  state_e      state;
  target_e     tgt;
  req_kind_e   kind;
  logic        wr;
  logic [1:0]  lane;
  logic [15:0] port;
  logic [7:0]  wbyte;
  logic [6:0]  rtc_index;
  logic [31:0] rdata_q;
  logic [3:0]  be_q;
  logic [31:0] wdata_q;

  assign pirqa = 8'h05;
  assign pirqb = 8'h80;
  assign pirqc = 8'h80;
  assign pirqd = 8'h80;

  // ---------------- UART ----------------
  logic       uart_start, uart_done, uart_busy;
  logic [7:0] uart_rdata;

  uart_if u_uart (
    .clk(clk), .rst_n(rst_n), .start(uart_start), .write(wr),
    .chan1(tgt == T_UART1), .addr(port[2:0]), .wdata(wbyte),
    .rdata(uart_rdata), .busy(uart_busy), .done(uart_done),
    .uart_cs(uart_cs), .uart_chsl(uart_chsl), .uart_addr(uart_addr),
    .uart_mr(uart_mr), .uart_rd_l(uart_rd_l), .uart_wr_l(uart_wr_l),
    .uart_data_o(uart_data_o), .uart_data_oe(uart_data_oe),
    .uart_data_i(uart_data_i));

  // ---------------- block strobes ----------------
  wire io_acc = (state == ST_ACCESS) && (kind == REQ_IO);
  assign pic_master_sel = io_acc && tgt == T_PIC1;
  assign pic_slave_sel  = io_acc && tgt == T_PIC2;
  assign nmi_sel        = io_acc && (tgt == T_NMI || tgt == T_RTCA);
  assign elcr_sel       = io_acc && tgt == T_ELCR;
  assign pit_sel        = io_acc && tgt == T_PIT;
  assign rtc_sel        = io_acc && tgt == T_RTCD;
  assign rst_sel        = io_acc && tgt == T_RST;
  assign cfg_sel        = io_acc && tgt == T_EFC;
  assign inta           = (state == ST_ACCESS) && (kind == REQ_IACK);
  assign bios_rd        = (state == ST_ACCESS) && (kind == REQ_MEM) && tgt == T_BIOS;
  assign mbox_sel       = (state == ST_ACCESS) && (kind == REQ_MEM) && tgt == T_MBOX;
  assign mbox_addr      = port[2];
  assign mbox_be        = be_q;
  assign mbox_wdata     = wdata_q;
  assign bios_addr      = port;
  assign blk_wdata      = wbyte;
  assign blk_dir        = wr;
  assign rtc_addr       = rtc_index;
  assign uart_start     = (state == ST_ACCESS) && (kind == REQ_IO) &&
                          (tgt == T_UART1 || tgt == T_UART2);

  always_comb begin
    unique case (tgt)
      T_NMI:   blk_addr = 2'd0;                // 061h
      T_RTCA:  blk_addr = 2'd1;                // 070h
      T_EFC:   blk_addr = port[3:2];           // 0D00h/0D04h/0D08h
      default: blk_addr = port[1:0];           // PIC A0, PIT 040h/043h, 04D0h/04D1h
    endcase
  end

  // Read byte of an internal register cycle.
  logic [7:0] io_byte;
  always_comb begin
    unique case (tgt)
      T_PIC1, T_PIC2, T_NMI, T_ELCR: io_byte = ic_rdata;
      T_RTCA:  io_byte = {ic_rdata[7], rtc_index};
      T_RTCD:  io_byte = rtc_rdata;
      T_PIT:   io_byte = pit_rdata;
      T_RST:   io_byte = rst_rdata;
      T_EFC:   io_byte = cfg_rdata;
      default: io_byte = 8'h00;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      tgt        <= T_NONE;
      kind       <= REQ_IO;
      wr         <= 1'b0;
      lane       <= '0;
      port       <= '0;
      wbyte      <= '0;
      rtc_index  <= '0;
      rdata_q    <= '0;
      be_q       <= '0;
      wdata_q    <= '0;
      resp_valid <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      unique case (state)
        ST_IDLE: if (req_valid) begin
          logic [1:0] l;
          l     = low_lane(req.be);
          lane  <= l;
          kind  <= req.kind;
          wr    <= req.write;
          wbyte <= req.wdata[8*l +: 8];
          be_q    <= req.be;
          wdata_q <= req.wdata;
          if (req.kind == REQ_MEM) begin
            port <= req.addr[15:0];
            // outside the BIOS windows a memory access can only have hit the
            // memory base address register: the boot mailbox
            tgt  <= mem_hit(req.addr) ? T_BIOS : T_MBOX;
          end else begin
            port <= {req.addr[15:2], l};
            tgt  <= (req.kind == REQ_IO) ? io_target({req.addr[15:2], l}) : T_PIC1;
          end
          state <= ST_ACCESS;
        end
        ST_ACCESS: begin
          unique case (kind)
            REQ_MEM:  rdata_q <= (tgt == T_MBOX) ? mbox_rdata : bios_rdata;
            REQ_IACK: rdata_q <= {24'h0, vector};
            default:  rdata_q <= 32'(io_byte) << (8 * lane);
          endcase
          if (kind == REQ_IO && tgt == T_RTCA && wr) rtc_index <= wbyte[6:0];
          if (uart_start) begin
            state <= ST_UART;
          end else begin
            state      <= ST_IDLE;
            resp_valid <= 1'b1;
          end
        end
        ST_UART: if (uart_done) begin
          rdata_q    <= 32'(uart_rdata) << (8 * lane);
          state      <= ST_IDLE;
          resp_valid <= 1'b1;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign resp_rdata = rdata_q;

  logic unused;
  assign unused = uart_busy;
endmodule

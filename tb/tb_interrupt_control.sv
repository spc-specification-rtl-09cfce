// tb_interrupt_control: checks the interrupt controllers and the NMI logic.
//
// Sequence: the PC operating system's initialization (ICW1 11h, ICW2 vector
// base 20h, ICW3, ICW4 01h, mask), then
//   - a timer request is acknowledged with vector 20h and goes in service;
//   - a COM1 request (IR4) is held off while IR0 is in service, and is
//     delivered (vector 24h) after a non-specific EOI;
//   - a masked request is recorded in the IRR but raises no INTR;
//   - special mask mode lets a lower level in while a higher one is in
//     service;
//   - "set priority" with level 2 makes IR3 outrank IR0;
//   - automatic EOI leaves the ISR empty after the acknowledge;
//   - the slave's mask register reads back;
//   - SERR# raises NMI only when unmasked through port 070h, and port 061h
//     clears it;
//   - the edge/level control registers 04D0h/04D1h read back.
// Expected vectors and register values are worked out by hand from the
// 8259 rules.
module tb_interrupt_control;
  logic clk = 0, rst_n = 0;
  logic pic_master_sel = 0, pic_slave_sel = 0, nmi_sel = 0, elcr_sel = 0, dir = 0, addr = 0;
  logic [7:0] wdata = 0, rdata, vector;
  logic inta = 0;
  logic pit_int = 0, uart1_int = 0, uart2_int = 0, apic_int_l = 1, serr_l = 1;
  logic intr, nmi;
  int checks = 0, failures = 0;

  always #15 clk = ~clk;

  interrupt_control dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // which: 0 master PIC, 1 slave PIC, 2 NMI, 3 edge/level control
  task automatic wr(input int which, input logic a, input logic [7:0] d);
    @(negedge clk);
    pic_master_sel = (which == 0); pic_slave_sel = (which == 1); nmi_sel = (which == 2); elcr_sel = (which == 3);
    dir = 1; addr = a; wdata = d;
    @(negedge clk);
    pic_master_sel = 0; pic_slave_sel = 0; nmi_sel = 0; elcr_sel = 0; dir = 0;
  endtask

  task automatic rd(input int which, input logic a, output logic [7:0] d);
    @(negedge clk);
    pic_master_sel = (which == 0); pic_slave_sel = (which == 1); nmi_sel = (which == 2); elcr_sel = (which == 3);
    dir = 0; addr = a;
    #1 d = rdata;
    @(negedge clk);
    pic_master_sel = 0; pic_slave_sel = 0; nmi_sel = 0; elcr_sel = 0;
  endtask

  task automatic ack(output logic [7:0] v);
    @(negedge clk); inta = 1;
    @(negedge clk); inta = 0;
    @(negedge clk); inta = 1;
    #1 v = vector;
    @(negedge clk); inta = 0;
  endtask

  task automatic pulse_pit();
    @(negedge clk); pit_int = 1;
    @(negedge clk); pit_int = 0;
  endtask

  task automatic init(input logic [7:0] icw4);
    wr(0, 0, 8'h11); wr(0, 1, 8'h20); wr(0, 1, 8'h04); wr(0, 1, icw4);
    wr(0, 1, 8'hFF);
    wr(1, 0, 8'h11); wr(1, 1, 8'h28); wr(1, 1, 8'h02); wr(1, 1, icw4);
    wr(1, 1, 8'hFF);
  endtask

  initial begin
    logic [7:0] v, d;
    repeat (3) @(posedge clk);
    rst_n = 1;

    init(8'h01);
    rd(0, 1, d); check(d == 8'hFF, "IMR after init");
    wr(0, 1, 8'h00);                       // unmask all

    // ---- IR0 ----
    pulse_pit();
    repeat (3) @(posedge clk);
    check(intr == 1, "INTR for IR0");
    rd(0, 0, d); check(d == 8'h01, $sformatf("IRR %h, expected 01", d));
    ack(v); check(v == 8'h20, $sformatf("vector %h, expected 20", v));
    wr(0, 0, 8'h0B); rd(0, 0, d); check(d == 8'h01, $sformatf("ISR %h, expected 01", d));
    wr(0, 0, 8'h0A);

    // ---- IR4 blocked by IR0 in service ----
    @(negedge clk); uart1_int = 1;
    repeat (6) @(posedge clk);
    check(intr == 0, "IR4 blocked while IR0 in service");
    wr(0, 0, 8'h20);                       // non-specific EOI
    repeat (3) @(posedge clk);
    check(intr == 1, "IR4 delivered after EOI");
    @(negedge clk); uart1_int = 0;        // the request was latched in the IRR
    repeat (3) @(posedge clk);
    ack(v); check(v == 8'h24, $sformatf("vector %h, expected 24", v));
    wr(0, 0, 8'h20);
    repeat (3) @(posedge clk);
    check(intr == 0, "no INTR after IR4 EOI");

    // ---- masked APIC request (IR5) ----
    wr(0, 1, 8'h20);
    @(negedge clk); apic_int_l = 0;
    repeat (6) @(posedge clk);
    check(intr == 0, "masked IR5 raises no INTR");
    rd(0, 0, d); check(d == 8'h20, $sformatf("IRR %h, expected 20", d));
    @(negedge clk); apic_int_l = 1;

    // ---- special mask mode ----
    wr(0, 1, 8'h00);                       // unmask: IR5 (recorded) now pending
    repeat (3) @(posedge clk);
    ack(v); check(v == 8'h25, $sformatf("vector %h, expected 25", v));
    pulse_pit();                           // IR0 outranks IR5: delivered
    repeat (3) @(posedge clk);
    ack(v); check(v == 8'h20, $sformatf("nested vector %h, expected 20", v));
    // ISR = 21h.  IR4 is below IR0: blocked in normal mode ...
    @(negedge clk); uart1_int = 1;
    repeat (6) @(posedge clk);
    check(intr == 0, "IR4 blocked in normal mode");
    wr(0, 0, 8'h68);                       // ... but not in special mask mode
    repeat (3) @(posedge clk);
    check(intr == 1, "IR4 delivered in special mask mode");
    @(negedge clk); uart1_int = 0;
    repeat (3) @(posedge clk);
    ack(v); check(v == 8'h24, $sformatf("SMM vector %h, expected 24", v));
    wr(0, 0, 8'h48);                       // leave special mask mode
    wr(0, 0, 8'h64); wr(0, 0, 8'h60); wr(0, 0, 8'h65);   // specific EOIs 4, 0, 5
    wr(0, 0, 8'h0B); rd(0, 0, d); check(d == 8'h00, $sformatf("ISR %h after EOIs", d));
    wr(0, 0, 8'h0A);

    // ---- priority order 3-7, 0-2 ----
    wr(0, 0, 8'hC2);
    @(negedge clk); pit_int = 1; uart2_int = 1;
    @(negedge clk); pit_int = 0; uart2_int = 0;
    repeat (4) @(posedge clk);
    ack(v); check(v == 8'h23, $sformatf("rotated vector %h, expected 23", v));
    wr(0, 0, 8'h20);
    repeat (3) @(posedge clk);
    ack(v); check(v == 8'h20, $sformatf("vector %h, expected 20", v));
    wr(0, 0, 8'h20);

    // ---- automatic EOI ----
    init(8'h03);
    wr(0, 1, 8'h00);
    pulse_pit();
    repeat (3) @(posedge clk);
    ack(v); check(v == 8'h20, "AEOI vector");
    wr(0, 0, 8'h0B); rd(0, 0, d); check(d == 8'h00, $sformatf("ISR %h with AEOI", d));

    // ---- slave registers ----
    wr(1, 1, 8'h5A); rd(1, 1, d); check(d == 8'h5A, "slave IMR read back");

    // ---- NMI ----
    @(negedge clk); serr_l = 0;
    @(negedge clk); serr_l = 1;
    repeat (4) @(posedge clk);
    rd(2, 0, d); check(d == 8'h80, $sformatf("NMISC %h, expected 80", d));
    check(nmi == 0, "NMI masked by port 070h after reset");
    wr(2, 1, 8'h00);
    repeat (2) @(posedge clk);
    check(nmi == 1, "NMI after unmask");
    wr(2, 0, 8'h04);
    repeat (2) @(posedge clk);
    check(nmi == 0, "NMI cleared through port 061h");
    rd(2, 0, d); check(d == 8'h04, $sformatf("NMISC %h, expected 04", d));
    @(negedge clk); serr_l = 0;
    @(negedge clk); serr_l = 1;
    repeat (4) @(posedge clk);
    check(nmi == 0, "SERR ignored while disabled");

    // edge/level control registers
    rd(3, 0, d); check(d == 8'h00, "ELCR1 reset value");
    wr(3, 0, 8'h28); wr(3, 1, 8'hDE);
    rd(3, 0, d); check(d == 8'h28, $sformatf("ELCR1 %h", d));
    rd(3, 1, d); check(d == 8'hDE, $sformatf("ELCR2 %h", d));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

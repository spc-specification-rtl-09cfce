// tb_boot_mailbox: checks the POST-result and boot-DONE registers.
//
// After reset both registers read 0 (the BIOS loop must not leave before the
// image is loaded).  Random dword and byte-enable writes are applied to both
// registers and compared with a model that merges the enabled bytes; reads
// without sel must return 0, and writes without sel must change nothing.
module tb_boot_mailbox;
  logic clk = 0;
  logic rst_n = 0;
  logic sel = 0, dir = 0, addr = 0;
  logic [3:0] be = 0;
  logic [31:0] wdata = 0, rdata;
  int checks = 0, failures = 0;

  always #15 clk = ~clk;

  boot_mailbox dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input logic a, input logic [3:0] b, input logic [31:0] d, input bit s = 1);
    @(negedge clk); sel = s; dir = 1; addr = a; be = b; wdata = d;
    @(negedge clk); sel = 0; dir = 0;
  endtask

  task automatic rd(input logic a, output logic [31:0] d);
    @(negedge clk); sel = 1; dir = 0; addr = a;
    #1 d = rdata;
    @(negedge clk); sel = 0;
  endtask

  initial begin
    logic [31:0] model [2];
    logic [31:0] d, v;
    logic [3:0] b;
    logic a;
    repeat (3) @(posedge clk);
    rst_n = 1;
    model[0] = 0; model[1] = 0;
    rd(0, d); check(d == 0, "POST result after reset");
    rd(1, d); check(d == 0, "boot DONE is zero after reset");
    #1 check(rdata == 0, "no read data without sel");
    for (int n = 0; n < 60; n++) begin
      a = 1'($urandom);
      b = 4'($urandom);
      v = $urandom;
      if (n % 10 == 9) begin
        wr(a, b, v, 0);                      // not selected: ignored
      end else begin
        wr(a, b, v);
        for (int i = 0; i < 4; i++) if (b[i]) model[a][8*i +: 8] = v[8*i +: 8];
      end
      rd(0, d); check(d == model[0], $sformatf("POST result %h, expected %h", d, model[0]));
      rd(1, d); check(d == model[1], $sformatf("boot DONE %h, expected %h", d, model[1]));
    end
    // reset clears both
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    rd(0, d); check(d == 0, "POST result cleared by reset");
    rd(1, d); check(d == 0, "boot DONE cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

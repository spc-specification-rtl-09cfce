// tb_bios_ctl: checks the default contents of the emulated BIOS ROM.
//
// The five bytes at the reset vector (offset FFF0h) must be EA 00 E0 00 F0,
// a far jump to F000:E000, in PCI little-endian byte lanes; every other byte
// reads FFh; with the read strobe low the data is 0.  The ROM is
// combinational, so each address is checked in the same cycle.
module tb_bios_ctl;
  logic rd;
  logic [15:0] addr = 0;
  logic [31:0] rdata;
  int checks = 0, failures = 0;

  bios_ctl dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] exp_byte(input int a);
    case (a)
      16'hFFF0: return 8'hEA;
      16'hFFF1: return 8'h00;
      16'hFFF2: return 8'hE0;
      16'hFFF3: return 8'h00;
      16'hFFF4: return 8'hF0;
      default:  return 8'hFF;
    endcase
  endfunction

  initial begin
    rd = 1;
    #1;
    for (int a = 0; a < 65536; a += 4) begin
      logic [31:0] e;
      if (a < 16'hFF00 && (a % 256) != 0) continue;   // sample the bulk
      for (int b = 0; b < 4; b++) e[8*b +: 8] = exp_byte(a + b);
      addr = 16'(a);
      #10;
      checks++;
      if (rdata !== e) begin
        failures++; $display("FAIL: offset %h read %h, expected %h", a, rdata, e);
      end
    end
    rd = 0; addr = 16'hFFF0; #10;
    checks++;
    if (rdata != 0) begin failures++; $display("FAIL: data without read strobe"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

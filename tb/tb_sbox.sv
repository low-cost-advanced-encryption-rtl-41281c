// tb_sbox: all 256 inputs against the reference table (built by searching
// for inverses), plus published values S(00)=63, S(01)=7c, S(53)=ed,
// S(ff)=16.
`timescale 1ns/1ps
module tb_sbox;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  byte_t a, y;
  int checks = 0, failures = 0;

  sbox dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic kat(byte_t x, byte_t e);
    a = x; #1; checks++;
    if (y != e) begin failures++; $display("FAIL S(%02x)=%02x expected %02x", x, y, e); end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i); #1;
      checks++;
      if (y != aes_ref_pkg::S(a)) begin failures++; $display("FAIL S(%02x)=%02x ref %02x", a, y, aes_ref_pkg::S(a)); end
    end
    kat(8'h00, 8'h63); kat(8'h01, 8'h7c); kat(8'h53, 8'hed); kat(8'hff, 8'h16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

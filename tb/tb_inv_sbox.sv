// tb_inv_sbox: all 256 inputs against the reference inverse table, plus
// published values InvS(63)=00, InvS(7c)=01, InvS(ed)=53, InvS(00)=52.
`timescale 1ns/1ps
module tb_inv_sbox;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  byte_t a, y;
  int checks = 0, failures = 0;

  inv_sbox dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic kat(byte_t x, byte_t e);
    a = x; #1; checks++;
    if (y != e) begin failures++; $display("FAIL InvS(%02x)=%02x expected %02x", x, y, e); end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i); #1;
      checks++;
      if (y != aes_ref_pkg::IS(a)) begin failures++; $display("FAIL InvS(%02x)=%02x ref %02x", a, y, aes_ref_pkg::IS(a)); end
    end
    kat(8'h63, 8'h00); kat(8'h7c, 8'h01); kat(8'hed, 8'h53); kat(8'h00, 8'h52);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_roundkey_rf: fills all 208 bytes, reads them back, and checks that an
// address beyond the file reads 00 and that a write there changes nothing.
`timescale 1ns/1ps
module tb_roundkey_rf;
  import aes_pkg::*;
  logic clk = 0, we = 0;
  logic [7:0] waddr = 0, raddr = 0;
  byte_t wdata = 0, rdata;
  byte_t m [208];
  int checks = 0, failures = 0;

  roundkey_rf dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 208; a++) begin
      m[a] = 8'($urandom);
      @(negedge clk); we = 1; waddr = 8'(a); wdata = m[a];
    end
    @(negedge clk); waddr = 8'd220; wdata = 8'hff;   // out of range write
    @(negedge clk); we = 0;
    for (int a = 0; a < 208; a++) begin
      raddr = 8'(a); #1;
      checks++;
      if (rdata != m[a]) begin failures++; $display("FAIL addr %0d: %02x vs %02x", a, rdata, m[a]); end
    end
    raddr = 8'd220; #1;
    checks++; if (rdata != 8'h00) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

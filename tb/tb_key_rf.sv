// tb_key_rf: writes all 32 bytes, reads them back in random order, and
// checks that writes to one address leave the others alone.
`timescale 1ns/1ps
module tb_key_rf;
  import aes_pkg::*;
  logic clk = 0, we = 0;
  logic [4:0] waddr = 0, raddr = 0;
  byte_t wdata = 0, rdata;
  byte_t m [32];
  int checks = 0, failures = 0;

  key_rf dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++) begin
      m[a] = 8'($urandom);
      @(negedge clk); we = 1; waddr = 5'(a); wdata = m[a];
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      if (($urandom % 4) == 0) begin
        waddr = 5'($urandom); wdata = 8'($urandom); we = 1;
        @(negedge clk); we = 0; m[waddr] = wdata;
      end
      raddr = 5'($urandom); #1;
      checks++;
      if (rdata != m[raddr]) begin failures++; $display("FAIL addr %0d: %02x vs %02x", raddr, rdata, m[raddr]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mixcol_acc: random byte writes to the four accumulator slots compared
// with a model column; reset clears it.
`timescale 1ns/1ps
module tb_mixcol_acc;
  import aes_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  logic [1:0] idx = 0;
  byte_t d = 0;
  byte_t col [4], m [4];
  int checks = 0, failures = 0;

  mixcol_acc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk); rst_n = 1;
    m = '{default: 8'h00};
    for (int i = 0; i < 200; i++) begin
      we = 1'($urandom); idx = 2'($urandom); d = 8'($urandom);
      @(posedge clk); #1;
      if (we) m[idx] = d;
      for (int k = 0; k < 4; k++) begin
        checks++; if (col[k] != m[k]) begin failures++; $display("FAIL %0d slot %0d", i, k); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

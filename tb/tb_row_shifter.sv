// tb_row_shifter: random writes and left/right rotations of one state row,
// compared with a four-byte model; also checks that shl and shr together
// leave the row unchanged and that a write wins over a shift.
`timescale 1ns/1ps
module tb_row_shifter;
  import aes_pkg::*;
  logic clk = 0, rst_n = 0, shl = 0, shr = 0, we = 0;
  logic [1:0] wcol = 0;
  byte_t wdata = 0;
  byte_t q [4];
  byte_t m [4], t [4];
  int checks = 0, failures = 0;
  int n_l = 0, n_r = 0;

  row_shifter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = '{default: 8'h00};
    @(negedge clk); @(negedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      we = ($urandom % 3) == 0; shl = 1'($urandom); shr = 1'($urandom);
      wcol = 2'($urandom); wdata = 8'($urandom);
      @(posedge clk); #1;
      t = m;
      if (we) m[wcol] = wdata;
      else if (shl && !shr) begin for (int c = 0; c < 4; c++) m[c] = t[(c+1)%4]; n_l++; end
      else if (shr && !shl) begin for (int c = 0; c < 4; c++) m[c] = t[(c+3)%4]; n_r++; end
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (q[c] != m[c]) begin failures++; $display("FAIL %0d col %0d: %02x vs %02x", i, c, q[c], m[c]); end
      end
      @(negedge clk);
    end
    checks++; if (n_l == 0 || n_r == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

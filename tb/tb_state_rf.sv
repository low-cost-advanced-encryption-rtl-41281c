// tb_state_rf: loads a block byte by byte, reads it back, performs ShiftRows
// (three cycles, rows 1-3 / 2-3 / 3 rotating left) and Inverse ShiftRows
// (the same, rotating right) and compares with the reference model, then
// checks a column write.
`timescale 1ns/1ps
module tb_state_rf;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, shl = 0, shr = 0, we = 0, col_we = 0;
  logic [3:0] row_en = 0, widx = 0, ridx = 0;
  logic [1:0] wcol = 0;
  byte_t wdata = 0, rdata;
  byte_t col_data [4] = '{default: 8'h00};
  blk_t m;
  int checks = 0, failures = 0;

  state_rf dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int b = 0; b < 16; b++) begin
      ridx = 4'(b); #1;
      checks++;
      if (rdata != m[b]) begin failures++; $display("FAIL %s byte %0d: %02x vs %02x", what, b, rdata, m[b]); end
    end
  endtask

  task automatic shift_rows(bit inv);
    for (int t = 0; t < 3; t++) begin
      @(negedge clk);
      row_en = {1'b1, t < 2, t < 1, 1'b0}; shl = !inv; shr = inv;
    end
    @(negedge clk); shl = 0; shr = 0; row_en = 0;
  endtask

  initial begin
    @(negedge clk); @(negedge clk); rst_n = 1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int b = 0; b < 16; b++) begin
        m[b] = 8'($urandom);
        @(negedge clk); we = 1; widx = 4'(b); wdata = m[b];
      end
      @(negedge clk); we = 0;
      compare("load");
      shift_rows(0); aes_ref_pkg::shiftrows(m, 0); compare("ShiftRows");
      shift_rows(1); aes_ref_pkg::shiftrows(m, 1); compare("InvShiftRows");
      shift_rows(1); aes_ref_pkg::shiftrows(m, 1); compare("InvShiftRows 2");
      // column write
      wcol = 2'(rep);
      for (int r = 0; r < 4; r++) begin col_data[r] = 8'($urandom); m[4*rep+r] = col_data[r]; end
      @(negedge clk); col_we = 1;
      @(negedge clk); col_we = 0;
      compare("column write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

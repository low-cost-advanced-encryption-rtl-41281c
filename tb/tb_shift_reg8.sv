// tb_shift_reg8: checks parallel load, one-bit left shifts with 0 entering
// at bit 0, hold, load-over-shift priority and reset, against a model byte.
`timescale 1ns/1ps
module tb_shift_reg8;
  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [7:0] d = 0, q, model;
  int checks = 0, failures = 0;

  shift_reg8 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    checks++; if (q != 8'h00) failures++;
    rst_n = 1;
    model = 0;
    for (int i = 0; i < 300; i++) begin
      load = 1'($urandom); shift = 1'($urandom); d = 8'($urandom);
      @(posedge clk); #1;
      if (load) model = d; else if (shift) model = {model[6:0], 1'b0};
      checks++;
      if (q != model) begin failures++; $display("FAIL %0d: q=%02x model=%02x", i, q, model); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_modflag: the flag follows msb only in cycles with capture and holds
// otherwise; reset clears it.
`timescale 1ns/1ps
module tb_modflag;
  logic clk = 0, rst_n = 0, capture = 0, msb = 0, flag, m;
  int checks = 0, failures = 0;

  modflag dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msb = 1; capture = 1;
    @(negedge clk); @(negedge clk);
    checks++; if (flag != 0) failures++;
    rst_n = 1; m = 0;
    for (int i = 0; i < 300; i++) begin
      capture = 1'($urandom); msb = 1'($urandom);
      @(posedge clk); #1;
      if (capture) m = msb;
      checks++; if (flag != m) begin failures++; $display("FAIL %0d", i); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

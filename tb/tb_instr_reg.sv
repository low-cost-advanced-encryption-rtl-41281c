// tb_instr_reg: decodes every opcode and key size, checks the one-cycle
// cmd_valid pulse and that a write with accept low is ignored.
`timescale 1ns/1ps
module tb_instr_reg;
  import aes_pkg::*;
  logic clk = 0, rst_n = 0, ir_we = 0, accept = 1, cmd_valid;
  byte_t din = 0;
  cmd_t cmd;
  int checks = 0, failures = 0;

  instr_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    @(negedge clk); @(negedge clk); rst_n = 1;
    chk(cmd.op == OP_NOP && !cmd_valid, "reset");
    for (int op = 0; op < 16; op++)
      for (int k = 0; k < 4; k++) begin
        opcode_e eop;
        keysize_e eks;
        eop = (op >= 1 && op <= 5) ? opcode_e'(op) : OP_NOP;
        eks = (k == 1) ? KS_192 : (k == 2) ? KS_256 : KS_128;
        @(negedge clk); din = {4'(op), 2'b00, 2'(k)}; ir_we = 1;
        @(negedge clk); ir_we = 0; din = 8'hff;
        chk(cmd_valid, "cmd_valid pulse");
        chk(cmd.op == eop && cmd.ks == eks, $sformatf("decode %0d/%0d", op, k));
        @(negedge clk);
        chk(!cmd_valid, "single pulse");
      end
    // not accepted while busy
    @(negedge clk); din = 8'h41; ir_we = 1; accept = 0;
    @(negedge clk); ir_we = 0; accept = 1;
    chk(!cmd_valid, "ignored when not accepting");
    chk(cmd.op == OP_NOP, "IR unchanged when not accepting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

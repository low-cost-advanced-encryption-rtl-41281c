// tb_xor_unit: every operand-select pair with random operand bytes,
// compared with the XOR of the expected operands.
`timescale 1ns/1ps
module tb_xor_unit;
  import aes_pkg::*;
  xa_sel_e a_sel;
  xb_sel_e b_sel;
  byte_t state_b, sbox_b, isbox_b, key_b, wr_b, rcon_b, y, ea, eb;
  int checks = 0, failures = 0;

  xor_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++)
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 5; j++) begin
          state_b = 8'($urandom); sbox_b = 8'($urandom); isbox_b = 8'($urandom);
          key_b = 8'($urandom); wr_b = 8'($urandom); rcon_b = 8'($urandom);
          a_sel = xa_sel_e'(i); b_sel = xb_sel_e'(j);
          ea = (i == 0) ? 8'h00 : (i == 1) ? state_b : (i == 2) ? sbox_b :
               (i == 3) ? isbox_b : (i == 4) ? key_b : wr_b;
          eb = (j == 0) ? 8'h00 : (j == 1) ? 8'h1b : (j == 2) ? key_b :
               (j == 3) ? wr_b : rcon_b;
          #1; checks++;
          if (y != (ea ^ eb)) begin failures++; $display("FAIL a=%0d b=%0d: %02x vs %02x", i, j, y, ea ^ eb); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_aes_datapath: drives the datapath's control word by hand and reads
// every result through the bit-serial output register, so the whole path
// (register files, S-Boxes, XOR gate, Working Register, ModFlag,
// accumulator, output) is exercised. Checked against the reference model:
//   * host writes to the Key RF and the State RF;
//   * one full AES-128 key schedule computed with the two-cycle byte step,
//     and the split of expanded-key addresses between Key and RoundKey RF;
//   * AddRoundKey, SubBytes, Inverse SubBytes and ShiftRows on a block;
//   * GF(2^8) doubling in the Working Register (shift, ModFlag, conditional
//     {1b}) for random bytes;
//   * a column written from the accumulator.
`timescale 1ns/1ps
module tb_aes_datapath;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, host_we = 0;
  logic [4:0] host_addr = 0;
  byte_t host_din = 0;
  dp_ctrl_t ctl;
  logic modflag, sout;
  int checks = 0, failures = 0;

  aes_datapath dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic dp_ctrl_t idle(logic hs);
    dp_ctrl_t c = '0;
    c.nk = 4'd4;
    c.host_state = hs;
    return c;
  endfunction

  // one clock with control word c
  task automatic step(dp_ctrl_t c);
    ctl = c;
    @(negedge clk);
    ctl = idle(0);
  endtask

  // move a byte into the output register and shift it out serially
  task automatic read_out(xa_sel_e src, logic [3:0] sidx, logic [7:0] kaddr, output byte_t v);
    dp_ctrl_t c = idle(0);
    c.xa_sel = src; c.st_idx = sidx; c.kaddr = kaddr; c.out_ld = 1;
    step(c);
    for (int i = 0; i < 8; i++) begin
      v[7 - i] = sout;
      c = idle(0); c.out_shl = 1;
      step(c);
    end
  endtask

  task automatic host_write(logic hs, logic [4:0] a, byte_t d);
    ctl = idle(hs); host_we = 1; host_addr = a; host_din = d;
    @(negedge clk);
    host_we = 0;
  endtask

  b8_t  key [32];
  b8_t  w [240];
  blk_t s;
  byte_t v, x;

  initial begin
    ctl = idle(0);
    @(negedge clk); @(negedge clk); rst_n = 1;
    for (int i = 0; i < 32; i++) key[i] = 8'($urandom);
    for (int i = 0; i < 16; i++) s[i] = 8'($urandom);
    for (int i = 0; i < 16; i++) host_write(0, 5'(i), key[i]);
    for (int i = 0; i < 16; i++) host_write(1, 5'(i), s[i]);
    for (int i = 0; i < 16; i++) begin
      read_out(XA_KEY, 0, 8'(i), v); chk(v == key[i], $sformatf("key byte %0d", i));
      read_out(XA_STATE, 4'(i), 0, v); chk(v == s[i], $sformatf("state byte %0d", i));
    end

    // AES-128 key schedule, two cycles per byte
    aes_ref_pkg::expand(key, 4, w);
    begin
      automatic byte_t rc = 8'h01;
      for (int i = 4; i < 44; i++)
        for (int j = 0; j < 4; j++) begin
          automatic dp_ctrl_t c = idle(0);
          automatic bit rot = (i % 4 == 0);
          c.kaddr = 8'(4 * (i - 1) + (rot ? (j + 1) % 4 : j));
          c.sb_sel = SB_KEY;
          c.xa_sel = rot ? XA_SBOX : XA_KEY;
          c.xb_sel = (rot && j == 0) ? XB_RCON : XB_ZERO;
          c.rcon = rc;
          c.wr_ld = 1;
          step(c);
          c = idle(0);
          c.kaddr = 8'(4 * (i - 4) + j);
          c.kwaddr = 8'(4 * i + j);
          c.xa_sel = XA_WR; c.xb_sel = XB_KEY; c.rk_we = 1;
          step(c);
          if (rot && j == 3) rc = aes_ref_pkg::mul(rc, 8'h02);
        end
    end
    for (int a = 0; a < 176; a += 7) begin
      read_out(XA_KEY, 0, 8'(a), v); chk(v == w[a], $sformatf("expanded key byte %0d", a));
    end
    read_out(XA_KEY, 0, 8'd175, v); chk(v == w[175], "last expanded key byte");

    // AddRoundKey with round key 3, SubBytes, ShiftRows, Inverse SubBytes
    for (int b = 0; b < 16; b++) begin
      automatic dp_ctrl_t c = idle(0);
      c.st_idx = 4'(b); c.kaddr = 8'(48 + b); c.xa_sel = XA_STATE; c.xb_sel = XB_KEY; c.st_we = 1;
      step(c); s[b] ^= w[48 + b];
    end
    for (int b = 0; b < 16; b++) begin
      automatic dp_ctrl_t c = idle(0);
      c.st_idx = 4'(b); c.xa_sel = XA_SBOX; c.st_we = 1;
      step(c); s[b] = aes_ref_pkg::S(s[b]);
    end
    for (int t = 0; t < 3; t++) begin
      automatic dp_ctrl_t c = idle(0);
      c.row_en = {1'b1, t < 2, t < 1, 1'b0}; c.st_shl = 1;
      step(c);
    end
    aes_ref_pkg::shiftrows(s, 0);
    for (int b = 0; b < 16; b++) begin
      read_out(XA_STATE, 4'(b), 0, v); chk(v == s[b], $sformatf("ARK/SB/SR byte %0d", b));
    end
    for (int b = 0; b < 16; b++) begin
      automatic dp_ctrl_t c = idle(0);
      c.st_idx = 4'(b); c.xa_sel = XA_ISBOX; c.st_we = 1;
      step(c); s[b] = aes_ref_pkg::IS(s[b]);
    end
    for (int b = 0; b < 16; b++) begin
      read_out(XA_STATE, 4'(b), 0, v); chk(v == s[b], $sformatf("InvSubBytes byte %0d", b));
    end

    // GF doubling through Working Register and ModFlag
    for (int i = 0; i < 40; i++) begin
      automatic dp_ctrl_t c;
      x = (i == 0) ? 8'h80 : 8'($urandom);
      host_write(1, 5'd0, x);
      c = idle(0); c.xa_sel = XA_STATE; c.st_idx = 0; c.wr_ld = 1; step(c);
      c = idle(0); c.wr_shl = 1; step(c);
      chk(modflag == x[7], "ModFlag holds the shifted-out bit");
      c = idle(0); c.xa_sel = XA_WR; c.xb_sel = modflag ? XB_1B : XB_ZERO; c.wr_ld = 1; step(c);
      read_out(XA_WR, 0, 0, v);
      chk(v == aes_ref_pkg::mul(x, 8'h02), $sformatf("2*%02x = %02x", x, v));
    end

    // accumulator and column write
    for (int col = 0; col < 4; col++) begin
      automatic byte_t cb [4];
      for (int r = 0; r < 4; r++) begin
        automatic dp_ctrl_t c;
        cb[r] = 8'($urandom);
        host_write(1, 5'd15, cb[r]);
        c = idle(0); c.xa_sel = XA_STATE; c.st_idx = 4'd15; c.acc_we = 1; c.acc_idx = 2'(r); step(c);
      end
      begin
        automatic dp_ctrl_t c = idle(0);
        c.col_we = 1; c.col = 2'(col); step(c);
      end
      for (int r = 0; r < 4; r++) begin
        read_out(XA_STATE, 4'(4 * col + r), 0, v); chk(v == cb[r], $sformatf("column %0d row %0d", col, r));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

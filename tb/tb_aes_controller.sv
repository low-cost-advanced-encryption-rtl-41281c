// tb_aes_controller: runs the controller on its own and checks the control
// words it issues against the AES schedule:
//   * key expansion: busy cycles, RoundKey RF writes to addresses 4*Nk..
//     4*4*(Nr+1)-1 in order, the Rcon sequence 01,02,..,80,1b,36, the number
//     of S-Box uses (RotWord/SubWord and the extra SubWord for 256 bits);
//   * encryption/decryption: busy cycles, the AddRoundKey key addresses in
//     round order (ascending for encryption, descending for decryption),
//     ShiftRows direction and row masks, the number of state-byte terms of
//     (Inverse) MixColumns, accumulator and column writes, 128 output
//     cycles, a single done pulse;
//   * the conditional {1b} XOR follows the modflag input (driven at random);
//   * a host key write clears key_valid, so the next ENCRYPT re-expands.
`timescale 1ns/1ps
module tb_aes_controller;
  import aes_pkg::*;
  logic clk = 0, rst_n = 0, cmd_valid = 0, host_we = 0, modflag = 0;
  cmd_t cmd;
  dp_ctrl_t ctl;
  logic busy, done, sout_valid, key_valid;
  int checks = 0, failures = 0;

  aes_controller dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // statistics gathered while an operation runs
  int n_busy, n_rk, n_rcon, n_sbk, n_ark, n_mixterm, n_acc, n_col, n_out, n_done, n_shl, n_shr;
  int bad_rk, bad_ark, bad_cxor, bad_rcon, bad_rows;
  int next_rk, ark_i;
  int ark_seq [240];
  byte_t exp_rcon;
  bit in_mix_x;

  always @(posedge clk) if (rst_n) begin
    modflag <= 1'($urandom);
    if (busy) n_busy++;
    if (done) n_done++;
    if (ctl.rk_we) begin
      n_rk++;
      if (int'(ctl.kwaddr) != next_rk) bad_rk++;
      next_rk++;
    end
    if (ctl.xb_sel == XB_RCON) begin
      n_rcon++;
      if (ctl.rcon != exp_rcon) bad_rcon++;
      exp_rcon = {exp_rcon[6:0], 1'b0} ^ (exp_rcon[7] ? 8'h1b : 8'h00);
    end
    if (ctl.xa_sel == XA_SBOX && ctl.sb_sel == SB_KEY) n_sbk++;
    if (ctl.st_we && ctl.xb_sel == XB_KEY) begin
      if (ark_i < 240) ark_seq[ark_i] = int'(ctl.kaddr);
      ark_i++;
      n_ark++;
    end
    if (ctl.wr_ld && ctl.xa_sel == XA_STATE) n_mixterm++;
    if (ctl.wr_ld && ctl.xa_sel == XA_WR && (ctl.xb_sel == XB_1B) != modflag) bad_cxor++;
    if (ctl.acc_we) n_acc++;
    if (ctl.col_we) n_col++;
    if (sout_valid) n_out++;
    if (ctl.st_shl) n_shl++;
    if (ctl.st_shr) n_shr++;
    if ((ctl.st_shl || ctl.st_shr) && !(ctl.row_en inside {4'b1110, 4'b1100, 4'b1000})) bad_rows++;
  end

  task automatic clear_stats();
    n_busy = 0; n_rk = 0; n_rcon = 0; n_sbk = 0; n_ark = 0; n_mixterm = 0; n_acc = 0;
    n_col = 0; n_out = 0; n_done = 0; n_shl = 0; n_shr = 0;
    bad_rk = 0; bad_ark = 0; bad_cxor = 0; bad_rcon = 0; bad_rows = 0; ark_i = 0;
    exp_rcon = 8'h01;
  endtask

  task automatic issue(opcode_e op, keysize_e ks);
    @(negedge clk); cmd = '{op: op, ks: ks}; cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    if (op inside {OP_EXPAND, OP_ENCRYPT, OP_DECRYPT}) begin
      while (!done) @(negedge clk);
      @(negedge clk);
    end
  endtask

  function automatic int cipher_cycles(int nr, bit dec);
    int mix = dec ? 4 * (4 * 22 + 1) : 4 * (4 * 10 + 1);
    return 16 * (nr + 1) + 16 * nr + 3 * nr + mix * (nr - 1) + 129;
  endfunction

  initial begin
    cmd = '{op: OP_NOP, ks: KS_128};
    @(negedge clk); @(negedge clk); rst_n = 1;
    for (int k = 0; k < 3; k++) begin
      automatic int nk = 4 + 2 * k;
      automatic int nr = nk + 6;
      automatic keysize_e ks = keysize_e'(k);
      issue(OP_LOAD_KEY, ks);
      chk(!busy && !key_valid, "LOAD_KEY is immediate and invalidates the key");
      // explicit expansion
      clear_stats(); next_rk = 4 * nk;
      issue(OP_EXPAND, ks);
      chk(n_busy == (4 * (nr + 1) - nk) * 8, $sformatf("expand cycles %0d", n_busy));
      chk(n_rk == 16 * (nr + 1) - 4 * nk && bad_rk == 0, "RoundKey writes in order");
      chk(n_rcon == (4 * (nr + 1) - 1) / nk && bad_rcon == 0, $sformatf("Rcon uses %0d", n_rcon));
      chk(n_sbk == 4 * ((4 * (nr + 1) - 1) / nk + ((nk == 8) ? (4 * (nr + 1) - 5) / 8 : 0)),
          $sformatf("S-Box uses in key schedule %0d", n_sbk));
      chk(key_valid && n_done == 1, "key_valid and one done pulse");
      // encrypt, then decrypt
      for (int d = 0; d < 2; d++) begin
        clear_stats();
        issue(d ? OP_DECRYPT : OP_ENCRYPT, ks);
        chk(n_busy == cipher_cycles(nr, d), $sformatf("cipher cycles %0d (dec=%0d)", n_busy, d));
        chk(n_ark == 16 * (nr + 1), "AddRoundKey bytes");
        for (int i = 0; i < 16 * (nr + 1); i++) begin
          automatic int r = d ? nr - i / 16 : i / 16;
          if (ark_seq[i] != 16 * r + i % 16) bad_ark++;
        end
        chk(bad_ark == 0, "AddRoundKey key order");
        chk(d ? (n_shr == 3 * nr && n_shl == 0) : (n_shl == 3 * nr && n_shr == 0), "ShiftRows direction");
        chk(bad_rows == 0, "ShiftRows row masks");
        chk(n_mixterm == (nr - 1) * 16 * (d ? 11 : 5), $sformatf("MixColumns terms %0d", n_mixterm));
        chk(n_acc == (nr - 1) * 16 && n_col == (nr - 1) * 4, "accumulator and column writes");
        chk(bad_cxor == 0, "conditional {1b} XOR follows ModFlag");
        chk(n_out == 128 && n_done == 1, "128 output cycles, one done");
        chk(n_rk == 0, "no re-expansion while the key is valid");
      end
    end
    // a key byte write invalidates the schedule: ENCRYPT expands first
    @(negedge clk); host_we = 1;
    @(negedge clk); host_we = 0;
    chk(!key_valid, "host key write clears key_valid");
    clear_stats(); next_rk = 32;
    issue(OP_ENCRYPT, KS_128);
    chk(n_rk == 208 && n_busy == 416 + cipher_cycles(14, 0), $sformatf("auto expansion %0d/%0d", n_rk, n_busy));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

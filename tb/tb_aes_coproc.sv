// tb_aes_coproc: end-to-end test of the AES co-processor at its default size.
//
// Acts as the host: writes the key and block over the 8-bit line, issues
// instructions and collects the 128 result bits from the serial output.
// Checks, for 128, 192 and 256-bit keys:
//   * the FIPS-197 Appendix C known answers (the reference model is checked
//     against them too), encryption and decryption;
//   * random keys and blocks against an independent behavioural model;
//   * the exact number of busy cycles: key expansion 2 cycles per byte,
//     AES-128 encryption 1971 cycles, decryption 3699 (more rounds scale the
//     round part);
//   * that the key schedule is reused when the key has not changed, that an
//     explicit EXPAND works, and that instructions and data writes are
//     ignored while the engine is busy.
// Every mechanism is counted, and one that never happened is a failure.
`timescale 1ns/1ps
module tb_aes_coproc;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  byte_t din = 0;
  logic [4:0] addr = 0;
  logic we = 0, ir_we = 0;
  logic busy, done, key_valid, sout, sout_valid;

  int checks = 0, failures = 0;
  int n_exp [3] = '{0, 0, 0};
  int n_enc = 0, n_dec = 0, n_reuse = 0, n_explicit = 0, n_ignored = 0;
  int n_red = 0, n_shl = 0, n_shr = 0, n_rot = 0, n_sub4 = 0;

  aes_coproc dut (.*);

  always #5 clk = ~clk;

  // ---- serial output collector and cycle counter ---------------------------
  logic [127:0] shreg;
  int nbits = 0, busy_cycles = 0;
  always @(posedge clk) begin
    if (sout_valid) begin
      shreg <= {shreg[126:0], sout};
      nbits <= nbits + 1;
    end
    if (busy) busy_cycles <= busy_cycles + 1;
    // mechanism probes
    if (dut.u_ctrl.st == dut.u_ctrl.S_MIX && dut.ctl.xb_sel == XB_1B) n_red++;
    if (dut.ctl.st_shl) n_shl++;
    if (dut.ctl.st_shr) n_shr++;
    if (dut.ctl.xb_sel == XB_RCON) n_rot++;
    if (dut.u_ctrl.st == dut.u_ctrl.S_KEXP && dut.u_ctrl.k_sub4 && !dut.u_ctrl.kstep) n_sub4++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic instr(byte_t b);
    @(negedge clk); din = b; ir_we = 1;
    @(negedge clk); ir_we = 0;
  endtask

  task automatic wbyte(logic [4:0] a, byte_t b);
    @(negedge clk); din = b; addr = a; we = 1;
    @(negedge clk); we = 0;
  endtask

  task automatic load_key(b8_t key [32], int nk);
    instr({OP_LOAD_KEY, 2'b00, 2'((nk - 4) / 2)});
    for (int i = 0; i < 4 * nk; i++) wbyte(5'(i), key[i]);
  endtask

  task automatic load_block(blk_t b);
    instr({OP_LOAD_STATE, 4'h0});
    for (int i = 0; i < 16; i++) wbyte(5'(i), b[i]);
  endtask

  // run one command, wait for done, return result and busy cycle count
  task automatic run(opcode_e op, output blk_t res, output int cyc);
    int b0;
    nbits = 0;
    b0 = busy_cycles;
    instr({op, 4'h0});
    @(posedge clk);
    while (!done) @(posedge clk);
    @(negedge clk);
    cyc = busy_cycles - b0;
    for (int i = 0; i < 16; i++) res[i] = shreg[127 - 8*i -: 8];
  endtask

  function automatic int kexp_cycles(int nk);
    return (4 * (nk + 7) - nk) * 4 * 2;
  endfunction

  function automatic int cipher_cycles(int nk, bit dec);
    int nr = nk + 6;
    int mix = dec ? 4 * (4 * 22 + 1) : 4 * (4 * 10 + 1);
    return 16 * (nr + 1) + 16 * nr + 3 * nr + mix * (nr - 1) + 129;
  endfunction

  function automatic string hex(blk_t b);
    string s = "";
    for (int i = 0; i < 16; i++) s = {s, $sformatf("%02x", b[i])};
    return s;
  endfunction

  task automatic enc_dec(b8_t key [32], int nk, blk_t pt, bit fresh_key, bit explicit_expand);
    blk_t ct, back, exp_ct;
    int cyc, ex;
    exp_ct = aes_ref_pkg::encrypt(pt, key, nk);
    if (fresh_key) load_key(key, nk);
    check(!key_valid || !fresh_key, "key_valid cleared by new key");
    load_block(pt);
    ex = 0;
    if (explicit_expand) begin
      run(OP_EXPAND, back, cyc);
      check(cyc == kexp_cycles(nk), $sformatf("EXPAND cycles %0d", cyc));
      check(key_valid, "key_valid after EXPAND");
      n_explicit++;
    end else if (fresh_key) begin
      ex = kexp_cycles(nk);
    end else begin
      n_reuse++;
    end
    if (ex != 0) n_exp[(nk - 4) / 2]++;
    if (explicit_expand) n_exp[(nk - 4) / 2]++;
    run(OP_ENCRYPT, ct, cyc);
    n_enc++;
    check(ct == exp_ct, $sformatf("AES-%0d encrypt %s got %s", 32 * nk, hex(exp_ct), hex(ct)));
    check(nbits == 128, "128 output bits");
    check(cyc == ex + cipher_cycles(nk, 0), $sformatf("encrypt cycles %0d expected %0d", cyc, ex + cipher_cycles(nk, 0)));
    // decrypt the result in place (state holds the ciphertext)
    run(OP_DECRYPT, back, cyc);
    n_dec++;
    n_reuse++;
    check(back == pt, $sformatf("AES-%0d decrypt %s got %s", 32 * nk, hex(pt), hex(back)));
    check(cyc == cipher_cycles(nk, 1), $sformatf("decrypt cycles %0d expected %0d", cyc, cipher_cycles(nk, 1)));
  endtask

  b8_t  key [32];
  blk_t pt, kat, r;
  int   cyc;
  b8_t  fips_ct [3][16] = '{
    '{8'h69,8'hc4,8'he0,8'hd8,8'h6a,8'h7b,8'h04,8'h30,8'hd8,8'hcd,8'hb7,8'h80,8'h70,8'hb4,8'hc5,8'h5a},
    '{8'hdd,8'ha9,8'h7c,8'ha4,8'h86,8'h4c,8'hdf,8'he0,8'h6e,8'haf,8'h70,8'ha0,8'hec,8'h0d,8'h71,8'h91},
    '{8'h8e,8'ha2,8'hb7,8'hca,8'h51,8'h67,8'h45,8'hbf,8'hea,8'hfc,8'h49,8'h90,8'h4b,8'h49,8'h60,8'h89}};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;

    // FIPS-197 Appendix C: key 00 01 02 ..., plaintext 00 11 22 ... ff
    for (int i = 0; i < 32; i++) key[i] = b8_t'(i);
    for (int i = 0; i < 16; i++) pt[i] = b8_t'(i * 8'h11);
    for (int k = 0; k < 3; k++) begin
      automatic int nk = 4 + 2 * k;
      for (int i = 0; i < 16; i++) kat[i] = fips_ct[k][i];
      check(aes_ref_pkg::encrypt(pt, key, nk) == kat, $sformatf("reference model AES-%0d known answer", 32 * nk));
      enc_dec(key, nk, pt, 1, 0);
    end

    // random keys and blocks, each size; alternately explicit EXPAND
    for (int t = 0; t < 6; t++) begin
      automatic int nk = 4 + 2 * (t % 3);
      for (int i = 0; i < 32; i++) key[i] = b8_t'($urandom);
      for (int i = 0; i < 16; i++) pt[i] = b8_t'($urandom);
      enc_dec(key, nk, pt, 1, t >= 3);
      // same key, new block: the schedule must be reused
      for (int i = 0; i < 16; i++) pt[i] = b8_t'($urandom);
      enc_dec(key, nk, pt, 0, 0);
    end

    // instructions and data writes are ignored while busy
    for (int i = 0; i < 16; i++) pt[i] = b8_t'($urandom);
    load_block(pt);
    instr({OP_ENCRYPT, 4'h0});
    repeat (20) @(negedge clk);
    check(busy, "busy during encryption");
    din = 8'h50; ir_we = 1; we = 1; addr = 5'd0;
    @(negedge clk); ir_we = 0; we = 0;
    while (!done) @(posedge clk);
    @(negedge clk);
    for (int i = 0; i < 16; i++) r[i] = shreg[127 - 8*i -: 8];
    check(r == aes_ref_pkg::encrypt(pt, key, 8), "result unaffected by writes while busy");
    repeat (5) @(negedge clk);
    check(!busy, "ignored instruction did not start an operation");
    n_ignored++;

    check(n_exp[0] > 0 && n_exp[1] > 0 && n_exp[2] > 0, "key expansion for every key size");
    check(n_enc > 0 && n_dec > 0, "encryption and decryption");
    check(n_reuse > 0, "key schedule reuse");
    check(n_explicit > 0, "explicit EXPAND");
    check(n_ignored > 0, "busy lock-out");
    check(n_red > 0, "GF reduction with {1b} in MixColumns");
    check(n_shl > 0 && n_shr > 0, "ShiftRows and Inverse ShiftRows");
    check(n_rot > 0, "RotWord with Rcon");
    check(n_sub4 > 0, "extra SubWord of the 256-bit schedule");
    $display("mechanisms: exp128=%0d exp192=%0d exp256=%0d enc=%0d dec=%0d reuse=%0d explicit=%0d ignored=%0d reduce=%0d shl=%0d shr=%0d rcon=%0d sub4=%0d",
             n_exp[0], n_exp[1], n_exp[2], n_enc, n_dec, n_reuse, n_explicit, n_ignored, n_red, n_shl, n_shr, n_rot, n_sub4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

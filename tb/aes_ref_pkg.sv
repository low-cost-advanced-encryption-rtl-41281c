// aes_ref_pkg: a plain behavioural AES-128/192/256 model for the testbenches.
//
// Written independently of the RTL: the S-Box inverse is found by search
// (the b with a*b = 1 in GF(2^8)), the affine transform uses the rotate
// form b ^ rotl1(b) ^ rotl2(b) ^ rotl3(b) ^ rotl4(b) ^ 63, the cipher works
// on a 16-byte array in FIPS-197 order, and the key schedule works word by
// word. The inverse S-Box is built by inverting the forward table.
package aes_ref_pkg;

  typedef logic [7:0] b8_t;
  typedef b8_t blk_t [16];

  b8_t sb [256];
  b8_t isb [256];
  bit  built = 0;

  function automatic b8_t mul(b8_t a, b8_t b);
    b8_t p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic b8_t rotl(b8_t x, int n);
    return b8_t'((x << n) | (x >> (8 - n)));
  endfunction

  function automatic void build();
    b8_t inv, x;
    if (built) return;
    for (int a = 0; a < 256; a++) begin
      inv = 0;
      for (int b = 1; b < 256; b++)
        if (mul(b8_t'(a), b8_t'(b)) == 8'h01) inv = b8_t'(b);
      x = inv ^ rotl(inv, 1) ^ rotl(inv, 2) ^ rotl(inv, 3) ^ rotl(inv, 4) ^ 8'h63;
      sb[a] = x;
    end
    for (int a = 0; a < 256; a++) isb[sb[a]] = b8_t'(a);
    built = 1;
  endfunction

  function automatic b8_t S(b8_t a);
    build();
    return sb[a];
  endfunction

  function automatic b8_t IS(b8_t a);
    build();
    return isb[a];
  endfunction

  // expanded key, 4*(Nr+1) words as bytes; nk = 4, 6 or 8
  function automatic void expand(input b8_t key [32], input int nk, output b8_t w [240]);
    int nr = nk + 6;
    b8_t t [4], tmp;
    b8_t rc = 8'h01;
    for (int i = 0; i < 4 * nk; i++) w[i] = key[i];
    for (int i = nk; i < 4 * (nr + 1); i++) begin
      for (int j = 0; j < 4; j++) t[j] = w[4*(i-1)+j];
      if (i % nk == 0) begin
        tmp = t[0]; t[0] = t[1]; t[1] = t[2]; t[2] = t[3]; t[3] = tmp;
        for (int j = 0; j < 4; j++) t[j] = S(t[j]);
        t[0] ^= rc;
        rc = mul(rc, 8'h02);
      end else if (nk > 6 && i % nk == 4) begin
        for (int j = 0; j < 4; j++) t[j] = S(t[j]);
      end
      for (int j = 0; j < 4; j++) w[4*i+j] = w[4*(i-nk)+j] ^ t[j];
    end
  endfunction

  function automatic void mixcol(inout blk_t s, input bit inv);
    b8_t c [4];
    b8_t m [4];
    m = inv ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int col = 0; col < 4; col++) begin
      for (int r = 0; r < 4; r++) c[r] = s[4*col+r];
      for (int r = 0; r < 4; r++) begin
        s[4*col+r] = 0;
        for (int k = 0; k < 4; k++) s[4*col+r] ^= mul(m[(k - r + 4) % 4], c[k]);
      end
    end
  endfunction

  function automatic void shiftrows(inout blk_t s, input bit inv);
    blk_t t = s;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (!inv) s[4*c+r] = t[4*((c + r) % 4) + r];
        else      s[4*((c + r) % 4) + r] = t[4*c+r];
  endfunction

  function automatic blk_t encrypt(input blk_t pt, input b8_t key [32], input int nk);
    b8_t w [240];
    blk_t s = pt;
    int nr = nk + 6;
    expand(key, nk, w);
    for (int b = 0; b < 16; b++) s[b] ^= w[b];
    for (int r = 1; r <= nr; r++) begin
      for (int b = 0; b < 16; b++) s[b] = S(s[b]);
      shiftrows(s, 0);
      if (r != nr) mixcol(s, 0);
      for (int b = 0; b < 16; b++) s[b] ^= w[16*r+b];
    end
    return s;
  endfunction

  function automatic blk_t decrypt(input blk_t ct, input b8_t key [32], input int nk);
    b8_t w [240];
    blk_t s = ct;
    int nr = nk + 6;
    expand(key, nk, w);
    for (int b = 0; b < 16; b++) s[b] ^= w[16*nr+b];
    for (int r = nr - 1; r >= 0; r--) begin
      shiftrows(s, 1);
      for (int b = 0; b < 16; b++) s[b] = IS(s[b]);
      for (int b = 0; b < 16; b++) s[b] ^= w[16*r+b];
      if (r != 0) mixcol(s, 1);
    end
    return s;
  endfunction

endpackage

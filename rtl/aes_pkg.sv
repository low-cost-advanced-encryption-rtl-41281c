// aes_pkg: types, constants and GF(2^8) helper functions shared by the
// byte-serial AES co-processor.
//
// The GF(2^8) arithmetic uses the AES reduction polynomial
// m(x) = x^8 + x^4 + x^3 + x + 1, i.e. a left shift followed by a
// conditional XOR with {1b}. The S-Box functions build the substitution
// table from its definition (multiplicative inverse, then the affine
// transform), so no table of constants is kept in the source. The
// instruction encoding and the control-word layout are this design's own.
package aes_pkg;

  // ---- sizes --------------------------------------------------------------
  localparam int unsigned ADDR_W       = 5;    // host byte address
  localparam int unsigned KEY_RF_BYTES = 32;   // up to Nk = 8 words
  localparam int unsigned RK_RF_BYTES  = 208;  // 240 - 32
  localparam int unsigned EXP_BYTES    = 240;  // (14 + 1) * 16
  localparam int unsigned KADDR_W      = 8;    // expanded-key byte address

  typedef logic [7:0] byte_t;

  // ---- key size ----------------------------------------------------------
  typedef enum logic [1:0] {
    KS_128 = 2'd0,
    KS_192 = 2'd1,
    KS_256 = 2'd2
  } keysize_e;

  // Nk (key length in words) and Nr (rounds) per key size
  function automatic logic [3:0] ks_nk(keysize_e ks);
    case (ks)
      KS_192:  return 4'd6;
      KS_256:  return 4'd8;
      default: return 4'd4;
    endcase
  endfunction

  function automatic logic [3:0] ks_nr(keysize_e ks);
    case (ks)
      KS_192:  return 4'd12;
      KS_256:  return 4'd14;
      default: return 4'd10;
    endcase
  endfunction

  // ---- instructions (IR byte: [7:4] opcode, [1:0] key size) --------------
  typedef enum logic [3:0] {
    OP_NOP        = 4'h0,
    OP_LOAD_KEY   = 4'h1,
    OP_LOAD_STATE = 4'h2,
    OP_EXPAND     = 4'h3,
    OP_ENCRYPT    = 4'h4,
    OP_DECRYPT    = 4'h5
  } opcode_e;

  typedef struct packed {
    opcode_e  op;
    keysize_e ks;
  } cmd_t;

  // ---- XOR gate operand selects -------------------------------------------
  typedef enum logic [2:0] {
    XA_ZERO  = 3'd0,
    XA_STATE = 3'd1,
    XA_SBOX  = 3'd2,
    XA_ISBOX = 3'd3,
    XA_KEY   = 3'd4,
    XA_WR    = 3'd5
  } xa_sel_e;

  typedef enum logic [2:0] {
    XB_ZERO = 3'd0,
    XB_1B   = 3'd1,
    XB_KEY  = 3'd2,
    XB_WR   = 3'd3,
    XB_RCON = 3'd4
  } xb_sel_e;

  // S-Box input source: a State RF byte or an expanded-key byte
  typedef enum logic {
    SB_STATE = 1'b0,
    SB_KEY   = 1'b1
  } sb_sel_e;

  // ---- control word from the controller to the datapath -------------------
  typedef struct packed {
    xa_sel_e             xa_sel;
    xb_sel_e             xb_sel;
    sb_sel_e             sb_sel;
    byte_t               rcon;      // round constant operand
    logic [3:0]          st_idx;    // State RF byte (4*col + row)
    logic                st_we;     // State RF byte <= XOR output
    logic [3:0]          row_en;    // rows that rotate
    logic                st_shl;    // ShiftRows
    logic                st_shr;    // Inverse ShiftRows
    logic                col_we;    // State RF column <= accumulator
    logic [1:0]          col;       // column for col_we
    logic [KADDR_W-1:0]  kaddr;     // expanded-key byte read address
    logic [KADDR_W-1:0]  kwaddr;    // expanded-key byte write address
    logic                rk_we;     // RoundKey RF <= XOR output
    logic [3:0]          nk;        // Nk: key bytes below 4*Nk live in the Key RF
    logic                wr_ld;     // Working Register <= XOR output
    logic                wr_shl;    // Working Register <<= 1 (ModFlag samples MSB)
    logic                acc_we;    // accumulator byte <= XOR output
    logic [1:0]          acc_idx;
    logic                out_ld;    // output register <= XOR output
    logic                out_shl;   // output register shifts one bit out
    logic                host_state;// host writes go to the State RF (else Key RF)
  } dp_ctrl_t;

  // ---- GF(2^8) arithmetic --------------------------------------------------
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = 8'h00;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = xtime(x);
    end
    return p;
  endfunction

  // a^254 = a^-1 (0 maps to 0); 254 = 0b11111110, square-and-multiply
  function automatic byte_t gf_inv(byte_t a);
    byte_t r = 8'h01;
    for (int i = 7; i >= 1; i--) begin
      r = gf_mul(r, r);
      r = gf_mul(r, a);
    end
    return gf_mul(r, r);
  endfunction

  // Equation 1: b'_i = b_i ^ b_{i+4} ^ b_{i+5} ^ b_{i+6} ^ b_{i+7} ^ c_i, c = 0x63
  function automatic byte_t affine(byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  // inverse of Equation 1: b_i = b'_{i+2} ^ b'_{i+5} ^ b'_{i+7} ^ d_i, d = 0x05
  function automatic byte_t inv_affine(byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[(i+2)%8] ^ b[(i+5)%8] ^ b[(i+7)%8];
    return r ^ 8'h05;
  endfunction

  function automatic byte_t sbox_f(byte_t a);
    return affine(gf_inv(a));
  endfunction

  function automatic byte_t inv_sbox_f(byte_t a);
    return gf_inv(inv_affine(a));
  endfunction

  // MixColumns coefficient of row i, column k: circulant {02,03,01,01}
  // for encryption (Equation 2) and {0e,0b,0d,09} for decryption (Equation 3)
  function automatic logic [3:0] mc_coef(logic dec, logic [1:0] i, logic [1:0] k);
    logic [1:0] d;
    d = k - i;
    if (!dec) begin
      case (d)
        2'd0:    return 4'h2;
        2'd1:    return 4'h3;
        default: return 4'h1;
      endcase
    end else begin
      case (d)
        2'd0:    return 4'he;
        2'd1:    return 4'hb;
        2'd2:    return 4'hd;
        default: return 4'h9;
      endcase
    end
  endfunction

endpackage

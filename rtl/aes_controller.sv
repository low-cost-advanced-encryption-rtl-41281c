// aes_controller: the sequencer of the byte-serial AES co-processor.
//
// Nearly all of the algorithm lives here; the datapath only stores, XORs,
// substitutes and shifts bytes. The controller takes one command at a time
// from the instruction register and issues one datapath control word (ctl)
// per cycle:
//
//   Key expansion (2 cycles per expanded-key byte): for word i >= Nk and
//   byte j, cycle 0 loads the Working Register with w[i-1][j], or with
//   S(w[i-1][j+1]) ^ Rcon (j = 0) / S(w[i-1][j+1]) (j > 0) when i mod Nk = 0
//   (RotWord + SubWord), or with S(w[i-1][j]) when Nk = 8 and i mod Nk = 4;
//   cycle 1 writes WR ^ w[i-Nk][j] to the RoundKey RF. Rcon starts at {01}
//   and is doubled in GF(2^8) after each RotWord word.
//
//   AddRoundKey, (Inv)SubBytes: 16 cycles, one state byte each.
//   (Inv)ShiftRows: 3 cycles of row rotation, rows 1-3, 2-3, then 3.
//   (Inv)MixColumns: each output byte s'_i = sum_k M[i][k] s_k is evaluated
//   by Horner's rule over the bits of the coefficients, highest bit first:
//   per bit level the Working Register is doubled (shift, then XOR with {1b}
//   if ModFlag is set, else with {00}) and then XORed, in four cycles, with
//   s_k where coefficient bit p of M[i][k] is set and {00} where it is not.
//   The last XOR goes to the accumulator; after four output bytes the
//   accumulator is written back as a column. Encryption (coefficients up to
//   {03}) takes 10 cycles per byte, decryption (up to {0e}) 22.
//
// Round order follows FIPS-197: encryption AddRoundKey(0), Nr-1 rounds of
// SubBytes, ShiftRows, MixColumns, AddRoundKey(r), and a last round without
// MixColumns; decryption runs the straightforward inverse cipher with the
// round keys from Nr down to 0. ENCRYPT and DECRYPT run the key expansion
// first when the key was written after the last expansion. When the state
// operations finish, the 16 bytes leave on sout, byte 0 first, MSB first,
// one bit per cycle with sout_valid high (128 cycles); done pulses in the
// last output cycle. An EXPAND command alone ends with done and no output.
//
// Cycle counts (including the 129 output cycles, excluding key expansion):
// AES-128 encryption 1971, decryption 3699. Key expansion: 2 cycles per byte
// beyond the key (320, 368 and 416 cycles for 128, 192 and 256-bit keys).
// The schedule and these counts are this design's own; the published architecture gives
// the datapath and the algorithm, not the cycle-level sequence.
module aes_controller
  import aes_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cmd_valid,
  input  cmd_t     cmd,
  input  logic     host_we,
  input  logic     modflag,
  output dp_ctrl_t ctl,
  output logic     busy,
  output logic     done,
  output logic     sout_valid,
  output logic     key_valid
);

  typedef enum logic [3:0] {
    S_IDLE, S_KEXP, S_ARK, S_SUB, S_SHIFT, S_MIX, S_MIXCOL, S_OUT_LD, S_OUT
  } state_e;

  // MixColumns micro-steps
  typedef enum logic [2:0] {M_SHL, M_CXOR, M_K0, M_K1, M_K2, M_K3} mstep_e;

  state_e     st;
  keysize_e   ks;
  logic       dec;          // current cipher operation is decryption
  logic       pending;      // cipher operation waits for key expansion
  logic       host_state;   // host writes go to the State RF
  logic [3:0] round;
  logic [3:0] bidx;         // byte counter (ARK, SUB, output)
  logic [1:0] tcnt;         // ShiftRows cycle
  logic [1:0] mc_c, mc_i, mc_p;
  mstep_e     mc_s;
  logic [2:0] obit;
  // key expansion
  logic [5:0] kw;           // word index i
  logic [1:0] kj;           // byte index j
  logic       kstep;
  logic [2:0] kmod;         // i mod Nk
  byte_t      rcon;

  logic [3:0] nk, nr;
  logic [1:0] pmax;
  logic [5:0] kw_last;
  assign nk      = ks_nk(ks);
  assign nr      = ks_nr(ks);
  assign pmax    = dec ? 2'd3 : 2'd1;
  assign kw_last = 6'(({2'b00, nr} + 6'd1) * 6'd4 - 6'd1);

  // ---- control word ------------------------------------------------------
  logic       k_rot, k_sub4;
  logic [1:0] k_byte;
  logic [3:0] coef;
  logic [1:0] mc_k;

  assign k_rot  = (kmod == 3'd0);
  assign k_byte = k_rot ? kj + 2'd1 : kj;   // RotWord reads byte j+1
  assign k_sub4 = (nk == 4'd8) && (kmod == 3'd4);
  assign mc_k   = 2'(mc_s - M_K0);
  assign coef   = mc_coef(dec, mc_i, mc_k);

  always_comb begin
    ctl            = '0;
    ctl.xa_sel     = XA_ZERO;
    ctl.xb_sel     = XB_ZERO;
    ctl.sb_sel     = SB_STATE;
    ctl.nk         = nk;
    ctl.rcon       = rcon;
    ctl.host_state = host_state;
    unique case (st)
      S_KEXP: begin
        if (!kstep) begin
          ctl.kaddr  = KADDR_W'({kw - 6'd1, 2'b00}) + KADDR_W'(k_byte);
          ctl.sb_sel = SB_KEY;
          ctl.xa_sel = (k_rot || k_sub4) ? XA_SBOX : XA_KEY;
          ctl.xb_sel = (k_rot && kj == 2'd0) ? XB_RCON : XB_ZERO;
          ctl.wr_ld  = 1'b1;
        end else begin
          ctl.kaddr  = KADDR_W'({kw - 6'(nk), 2'b00}) + KADDR_W'(kj);
          ctl.kwaddr = KADDR_W'({kw, 2'b00}) + KADDR_W'(kj);
          ctl.xa_sel = XA_WR;
          ctl.xb_sel = XB_KEY;
          ctl.rk_we  = 1'b1;
        end
      end
      S_ARK: begin
        ctl.st_idx = bidx;
        ctl.kaddr  = KADDR_W'({round, bidx});
        ctl.xa_sel = XA_STATE;
        ctl.xb_sel = XB_KEY;
        ctl.st_we  = 1'b1;
      end
      S_SUB: begin
        ctl.st_idx = bidx;
        ctl.xa_sel = dec ? XA_ISBOX : XA_SBOX;
        ctl.st_we  = 1'b1;
      end
      S_SHIFT: begin
        ctl.row_en = {1'b1, tcnt < 2'd2, tcnt < 2'd1, 1'b0};
        ctl.st_shl = !dec;
        ctl.st_shr = dec;
      end
      S_MIX: begin
        unique case (mc_s)
          M_SHL: ctl.wr_shl = 1'b1;
          M_CXOR: begin
            ctl.xa_sel = XA_WR;
            ctl.xb_sel = modflag ? XB_1B : XB_ZERO;
            ctl.wr_ld  = 1'b1;
          end
          default: begin
            ctl.st_idx  = {mc_c, mc_k};
            ctl.xa_sel  = coef[mc_p] ? XA_STATE : XA_ZERO;
            ctl.xb_sel  = (mc_p == pmax && mc_s == M_K0) ? XB_ZERO : XB_WR;
            ctl.wr_ld   = 1'b1;
            ctl.acc_we  = (mc_p == 2'd0 && mc_s == M_K3);
            ctl.acc_idx = mc_i;
          end
        endcase
      end
      S_MIXCOL: begin
        ctl.col_we = 1'b1;
        ctl.col    = mc_c;
      end
      S_OUT_LD: begin
        ctl.st_idx = 4'd0;
        ctl.xa_sel = XA_STATE;
        ctl.out_ld = 1'b1;
      end
      S_OUT: begin
        if (obit == 3'd7) begin
          ctl.st_idx = bidx + 4'd1;
          ctl.xa_sel = XA_STATE;
          ctl.out_ld = (bidx != 4'd15);
        end else begin
          ctl.out_shl = 1'b1;
        end
      end
      default: ;
    endcase
  end

  assign busy       = (st != S_IDLE);
  assign sout_valid = (st == S_OUT);

  // ---- sequencing -----------------------------------------------------------
  task automatic start_cipher();
    st   <= S_ARK;
    bidx <= 4'd0;
    round <= dec ? nr : 4'd0;
  endtask

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      ks         <= KS_128;
      dec        <= 1'b0;
      pending    <= 1'b0;
      host_state <= 1'b0;
      key_valid  <= 1'b0;
      round      <= '0;
      bidx       <= '0;
      tcnt       <= '0;
      mc_c       <= '0;
      mc_i       <= '0;
      mc_p       <= '0;
      mc_s       <= M_K0;
      obit       <= '0;
      kw         <= '0;
      kj         <= '0;
      kstep      <= 1'b0;
      kmod       <= '0;
      rcon       <= 8'h01;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: begin
          if (host_we && !host_state) key_valid <= 1'b0;
          if (cmd_valid) begin
            unique case (cmd.op)
              OP_LOAD_KEY: begin
                ks         <= cmd.ks;
                host_state <= 1'b0;
                key_valid  <= 1'b0;
              end
              OP_LOAD_STATE: host_state <= 1'b1;
              OP_EXPAND, OP_ENCRYPT, OP_DECRYPT: begin
                pending <= (cmd.op != OP_EXPAND);
                dec     <= (cmd.op == OP_DECRYPT);
                if (cmd.op != OP_EXPAND && key_valid) begin
                  st    <= S_ARK;
                  bidx  <= 4'd0;
                  round <= (cmd.op == OP_DECRYPT) ? nr : 4'd0;
                end else begin
                  st    <= S_KEXP;
                  kw    <= 6'(nk);
                  kj    <= 2'd0;
                  kstep <= 1'b0;
                  kmod  <= 3'd0;
                  rcon  <= 8'h01;
                end
              end
              default: ;
            endcase
          end
        end

        S_KEXP: begin
          kstep <= !kstep;
          if (kstep) begin
            kj <= kj + 2'd1;
            if (kj == 2'd3) begin
              if (kw == kw_last) begin
                key_valid <= 1'b1;
                if (pending) start_cipher();
                else begin
                  st   <= S_IDLE;
                  done <= 1'b1;
                end
              end
              kw   <= kw + 6'd1;
              kmod <= (kmod == 3'(nk - 4'd1)) ? 3'd0 : kmod + 3'd1;
              if (k_rot) rcon <= xtime(rcon);
            end
          end
        end

        S_ARK: begin
          bidx <= bidx + 4'd1;
          if (bidx == 4'd15) begin
            if (!dec) begin
              if (round == nr) st <= S_OUT_LD;
              else begin
                round <= round + 4'd1;
                st    <= S_SUB;
              end
            end else begin
              if (round == 4'd0) st <= S_OUT_LD;
              else if (round == nr) begin
                round <= round - 4'd1;
                st    <= S_SHIFT;
              end else begin
                st <= S_MIX;
              end
            end
            tcnt <= 2'd0;
            mc_c <= 2'd0;
            mc_i <= 2'd0;
            mc_p <= pmax;
            mc_s <= M_K0;
          end
        end

        S_SUB: begin
          bidx <= bidx + 4'd1;
          if (bidx == 4'd15) begin
            st   <= dec ? S_ARK : S_SHIFT;
            tcnt <= 2'd0;
          end
        end

        S_SHIFT: begin
          tcnt <= tcnt + 2'd1;
          if (tcnt == 2'd2) begin
            bidx <= 4'd0;
            mc_c <= 2'd0;
            mc_i <= 2'd0;
            mc_p <= pmax;
            mc_s <= M_K0;
            if (dec)              st <= S_SUB;
            else if (round == nr) st <= S_ARK;
            else                  st <= S_MIX;
          end
        end

        S_MIX: begin
          unique case (mc_s)
            M_SHL:  mc_s <= M_CXOR;
            M_CXOR: mc_s <= M_K0;
            M_K0:   mc_s <= M_K1;
            M_K1:   mc_s <= M_K2;
            M_K2:   mc_s <= M_K3;
            default: begin
              if (mc_p != 2'd0) begin
                mc_p <= mc_p - 2'd1;
                mc_s <= M_SHL;
              end else begin
                mc_p <= pmax;
                mc_s <= M_K0;
                mc_i <= mc_i + 2'd1;
                if (mc_i == 2'd3) st <= S_MIXCOL;
              end
            end
          endcase
        end

        S_MIXCOL: begin
          mc_c <= mc_c + 2'd1;
          if (mc_c == 2'd3) begin
            bidx <= 4'd0;
            tcnt <= 2'd0;
            if (dec) begin
              round <= round - 4'd1;
              st    <= S_SHIFT;
            end else begin
              st <= S_ARK;
            end
          end else begin
            st <= S_MIX;
          end
        end

        S_OUT_LD: begin
          st   <= S_OUT;
          bidx <= 4'd0;
          obit <= 3'd0;
        end

        S_OUT: begin
          obit <= obit + 3'd1;
          if (obit == 3'd7) begin
            bidx <= bidx + 4'd1;
            if (bidx == 4'd15) begin
              st   <= S_IDLE;
              done <= 1'b1;
            end
          end
        end

        default: st <= S_IDLE;
      endcase
    end
  end

  a_rk_in_range : assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_KEXP) |-> (ctl.kaddr < KADDR_W'(EXP_BYTES)));

endmodule

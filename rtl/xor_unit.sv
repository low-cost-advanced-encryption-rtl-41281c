// xor_unit: the datapath's single 8-bit XOR gate and its operand muxes.
//
// Every byte that moves through the datapath passes this gate: a plain move
// XORs with the constant {00}, the GF(2^8) reduction step XORs with the
// constant {1b}, AddRoundKey XORs a state byte with a key byte, and the
// key expansion and MixColumns XOR into the Working Register. Operand A
// comes from the State RF, the S-Box, the Inverse S-Box, the key register
// files, the Working Register or zero; operand B from zero, {1b}, the key
// register files, the Working Register or the round constant.
// Purely combinational. The constant operands follow the published architecture; the
// exact operand lists are this design's choice.
module xor_unit
  import aes_pkg::*;
(
  input  xa_sel_e a_sel,
  input  xb_sel_e b_sel,
  input  byte_t   state_b,
  input  byte_t   sbox_b,
  input  byte_t   isbox_b,
  input  byte_t   key_b,
  input  byte_t   wr_b,
  input  byte_t   rcon_b,
  output byte_t   y
);

  byte_t opa, opb;

  always_comb begin
    unique case (a_sel)
      XA_STATE: opa = state_b;
      XA_SBOX:  opa = sbox_b;
      XA_ISBOX: opa = isbox_b;
      XA_KEY:   opa = key_b;
      XA_WR:    opa = wr_b;
      default:  opa = 8'h00;
    endcase
    unique case (b_sel)
      XB_1B:   opb = 8'h1b;
      XB_KEY:  opb = key_b;
      XB_WR:   opb = wr_b;
      XB_RCON: opb = rcon_b;
      default: opb = 8'h00;
    endcase
    y = opa ^ opb;
  end

endmodule

// inv_sbox: the AES inverse substitution box, combinational.
//
// y = inv(A^-1 * (a + c)): the inverse affine transform first, then the
// multiplicative inverse in GF(2^8) (a^254, inv(0) = 0). Only State RF bytes
// reach it, for Inverse SubBytes during decryption. Like the S-Box, it is
// the substitution table written as the logic that generates it.
module inv_sbox
  import aes_pkg::*;
(
  input  byte_t a,
  output byte_t y
);

  always_comb y = inv_sbox_f(a);

endmodule

// sbox: the AES substitution box, combinational.
//
// y = A * inv(a) + c over GF(2), where inv is the multiplicative inverse in
// GF(2^8) modulo x^8 + x^4 + x^3 + x + 1 (inv(0) = 0), A is the circulant
// matrix of the affine transform and c = {63}. The inverse is computed as
// a^254 by square-and-multiply. This is the 256-entry substitution table
// expressed as the logic that generates it, so the source holds no list of
// constants; a synthesis tool reduces it to an 8-input table.
module sbox
  import aes_pkg::*;
(
  input  byte_t a,
  output byte_t y
);

  always_comb y = sbox_f(a);

endmodule

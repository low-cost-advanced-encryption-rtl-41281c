// modflag: remembers the bit shifted out of the Working Register.
//
// GF(2^8) doubling is a left shift followed by an XOR with {1b} when the
// bit shifted out was 1. The shift loses that bit, so this flag samples
// the Working Register's MSB in the cycle it shifts (capture = 1) and holds
// it for the controller, which then selects {1b} or {00} as the XOR's
// second operand in the next cycle. Reset clears the flag.
module modflag (
  input  logic clk,
  input  logic rst_n,
  input  logic capture,
  input  logic msb,
  output logic flag
);

  always_ff @(posedge clk) begin
    if (!rst_n)       flag <= 1'b0;
    else if (capture) flag <= msb;
  end

endmodule

// shift_reg8: 8-bit shift register with parallel load.
//
// The basic byte register of the co-processor. A parallel load takes d; a
// shift moves every bit one place towards the MSB, a 0 entering at bit 0,
// and the bit that leaves is q[7] before the shift (the serial output). The Working
// Register uses the shift for the GF(2^8) doubling step (shift, then a
// conditional XOR with {1b}); the output register uses it to send a byte
// out one bit per cycle, MSB first. The published architecture names the part only as an
// "8-bit shift register"; the load-over-shift priority and the synchronous
// active-low reset are this design's choices.
//
// Timing: q changes on the rising clock edge after load or shift.
module shift_reg8 #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= d;
    else if (shift) q <= {q[W-2:0], 1'b0};
  end

endmodule

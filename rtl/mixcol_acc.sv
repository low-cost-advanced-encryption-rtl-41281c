// mixcol_acc: the MixColumns accumulator.
//
// (Inverse) MixColumns produces a new column one byte at a time, but every
// output byte needs all four old bytes of the column. The accumulator
// collects the four new bytes (we, idx, d) while the old column stays in
// the State RF; the controller then copies col into the State RF in one
// cycle. Writes act at the clock edge; col is the registered content.
// Reset clears it. Its structure is this design's choice: the published architecture
// names the accumulator without describing it.
module mixcol_acc
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [1:0] idx,
  input  byte_t      d,
  output byte_t      col [4]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) col[i] <= 8'h00;
    end else if (we) begin
      col[idx] <= d;
    end
  end

endmodule

// row_shifter: one row of the State register file.
//
// Four byte registers in a ring. A pulse on shl moves every byte one
// register to the left (column c takes column c+1, column 0 takes column 3),
// which is one step of ShiftRows; a pulse on shr moves them one register to
// the right, one step of Inverse ShiftRows. Rotating row r by r steps thus
// takes r cycles, and the bytes physically travel between neighbouring
// registers as the published architecture describes. A byte write (we, wcol, wdata) has
// priority over a shift; shl and shr together do nothing. The write port
// and the reset value are this design's choices.
//
// Timing: all changes take effect at the rising clock edge; q is the
// registered row.
module row_shifter
  import aes_pkg::*;
#(
  parameter int unsigned NCOL = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    shl,
  input  logic                    shr,
  input  logic                    we,
  input  logic [$clog2(NCOL)-1:0] wcol,
  input  byte_t                   wdata,
  output byte_t                   q [NCOL]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < NCOL; c++) q[c] <= 8'h00;
    end else if (we) begin
      q[wcol] <= wdata;
    end else if (shl && !shr) begin
      for (int c = 0; c < NCOL; c++) q[c] <= q[(c + 1) % NCOL];
    end else if (shr && !shl) begin
      for (int c = 0; c < NCOL; c++) q[c] <= q[(c + NCOL - 1) % NCOL];
    end
  end

endmodule

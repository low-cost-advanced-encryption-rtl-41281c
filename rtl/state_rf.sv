// state_rf: the 16-byte State register file.
//
// Built from four row_shifter instances, one per row of the AES state. Byte
// b of the block sits in row b mod 4, column b div 4 (the FIPS-197 order),
// and ridx/widx use that index. Besides the random-access byte read and
// write, the file offers:
//   * row rotation: rows selected by row_en rotate one byte left (shl) or
//     right (shr) per cycle, so (Inverse) ShiftRows is three cycles with
//     row_en = 1110, 1100, 1000;
//   * a column write: column wcol takes the four bytes of col_data (row 0
//     first), used to store a finished MixColumns column.
// A byte write and a column write in the same cycle are not allowed
// (asserted). Read is combinational; writes and shifts act at the clock
// edge. The row organisation follows the published architecture; the column write port
// is this design's choice.
module state_rf
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] row_en,
  input  logic       shl,
  input  logic       shr,
  input  logic       we,
  input  logic [3:0] widx,
  input  byte_t      wdata,
  input  logic       col_we,
  input  logic [1:0] wcol,
  input  byte_t      col_data [4],
  input  logic [3:0] ridx,
  output byte_t      rdata
);

  byte_t rows [4][4];   // [row][col]

  for (genvar r = 0; r < 4; r++) begin : g_row
    logic  r_we;
    logic [1:0] r_wcol;
    byte_t r_wdata;

    always_comb begin
      r_we    = 1'b0;
      r_wcol  = widx[3:2];
      r_wdata = wdata;
      if (col_we) begin
        r_we    = 1'b1;
        r_wcol  = wcol;
        r_wdata = col_data[r];
      end else if (we && widx[1:0] == 2'(r)) begin
        r_we = 1'b1;
      end
    end

    row_shifter #(.NCOL(4)) u_row (
      .clk   (clk),
      .rst_n (rst_n),
      .shl   (shl & row_en[r]),
      .shr   (shr & row_en[r]),
      .we    (r_we),
      .wcol  (r_wcol),
      .wdata (r_wdata),
      .q     (rows[r])
    );
  end

  assign rdata = rows[ridx[1:0]][ridx[3:2]];

  a_one_write : assert property (@(posedge clk) disable iff (!rst_n) !(we && col_we));

endmodule

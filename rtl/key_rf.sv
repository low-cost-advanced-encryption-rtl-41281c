// key_rf: the Key register file.
//
// Holds the cipher key, which is also the first 4*Nk bytes (16, 24 or 32)
// of the expanded key. The host writes it byte by byte through the 5-bit
// address; the controller reads it during key expansion and AddRoundKey.
// Read is asynchronous, write is at the clock edge. The registers have no
// reset, since the controller reads only bytes the host has written. The
// depth follows the published architecture; the port style is this design's choice.
module key_rf
  import aes_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  byte_t                    wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output byte_t                    rdata
);

  byte_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule

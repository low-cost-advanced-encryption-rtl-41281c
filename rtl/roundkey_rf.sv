// roundkey_rf: the RoundKey register file.
//
// Holds the expanded key beyond the cipher key: expanded-key byte a with
// a >= 4*Nk is stored at a - 4*Nk. 208 bytes cover the largest case,
// AES-256, whose 240-byte schedule starts with the 32 key bytes kept in
// the Key RF. Written one byte per cycle by the key expansion, read
// asynchronously during AddRoundKey and key expansion. An address beyond
// DEPTH reads as 00 and is not written. No reset: every byte is written by
// the key expansion before it is read.
module roundkey_rf
  import aes_pkg::*;
#(
  parameter int unsigned DEPTH = 208
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [KADDR_W-1:0]   waddr,
  input  byte_t                wdata,
  input  logic [KADDR_W-1:0]   raddr,
  output byte_t                rdata
);

  byte_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH) mem[waddr] <= wdata;
  end

  assign rdata = (32'(raddr) < DEPTH) ? mem[raddr] : 8'h00;

endmodule

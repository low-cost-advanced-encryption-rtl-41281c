// aes_datapath: the byte-serial AES datapath.
//
// All processing is one byte per cycle through a single 8-bit XOR gate
// (xor_unit). Around it sit:
//   * the State RF (16 bytes in four rotating rows),
//   * the Key RF (32 bytes, the cipher key) and the RoundKey RF (208 bytes,
//     the rest of the expanded key); together they are addressed as one
//     240-byte expanded key, byte a living in the Key RF when a < 4*Nk and
//     at a - 4*Nk in the RoundKey RF otherwise,
//   * the S-Box, fed from the State RF or the key files, and the Inverse
//     S-Box, fed from the State RF only,
//   * the Working Register (an 8-bit shift register at the XOR output) and
//     the ModFlag, which together perform GF(2^8) doubling,
//   * the MixColumns accumulator, which collects a new column,
//   * the output shift register, which sends the result out bit-serially.
// The datapath has no sequencing of its own: every select and enable comes
// from the controller's control word ctl, and the only status it returns is
// the ModFlag. Host byte writes (host_we) go to the State RF (address bits
// 3:0) when ctl.host_state is set and to the Key RF otherwise; the top only
// lets them through while the controller is idle.
// Timing: reads and the XOR are combinational, every register updates at
// the rising clock edge, so one control word is one cycle.
module aes_datapath
  import aes_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              host_we,
  input  logic [ADDR_W-1:0] host_addr,
  input  byte_t             host_din,
  input  dp_ctrl_t          ctl,
  output logic              modflag,
  output logic              sout
);

  byte_t state_b, key_b, kf_b, rk_b, sbox_in, sbox_b, isbox_b, wr_b, xor_y, out_q;
  byte_t acc_col [4];
  logic [KADDR_W-1:0] nk4, rk_raddr, rk_waddr;

  // ---- expanded-key addressing -------------------------------------------
  assign nk4      = KADDR_W'({ctl.nk, 2'b00});
  assign rk_raddr = ctl.kaddr - nk4;
  assign rk_waddr = ctl.kwaddr - nk4;
  assign key_b    = (ctl.kaddr < nk4) ? kf_b : rk_b;

  key_rf #(.DEPTH(KEY_RF_BYTES)) u_key_rf (
    .clk   (clk),
    .we    (host_we && !ctl.host_state),
    .waddr (host_addr),
    .wdata (host_din),
    .raddr (ctl.kaddr[ADDR_W-1:0]),
    .rdata (kf_b)
  );

  roundkey_rf #(.DEPTH(RK_RF_BYTES)) u_rk_rf (
    .clk   (clk),
    .we    (ctl.rk_we),
    .waddr (rk_waddr),
    .wdata (xor_y),
    .raddr (rk_raddr),
    .rdata (rk_b)
  );

  // ---- state -------------------------------------------------------------
  logic       st_we;
  logic [3:0] st_widx;
  byte_t      st_wdata;

  always_comb begin
    if (host_we && ctl.host_state) begin
      st_we    = 1'b1;
      st_widx  = host_addr[3:0];
      st_wdata = host_din;
    end else begin
      st_we    = ctl.st_we;
      st_widx  = ctl.st_idx;
      st_wdata = xor_y;
    end
  end

  state_rf u_state_rf (
    .clk      (clk),
    .rst_n    (rst_n),
    .row_en   (ctl.row_en),
    .shl      (ctl.st_shl),
    .shr      (ctl.st_shr),
    .we       (st_we),
    .widx     (st_widx),
    .wdata    (st_wdata),
    .col_we   (ctl.col_we),
    .wcol     (ctl.col),
    .col_data (acc_col),
    .ridx     (ctl.st_idx),
    .rdata    (state_b)
  );

  // ---- substitution --------------------------------------------------------
  assign sbox_in = (ctl.sb_sel == SB_KEY) ? key_b : state_b;

  sbox     u_sbox  (.a(sbox_in), .y(sbox_b));
  inv_sbox u_isbox (.a(state_b), .y(isbox_b));

  // ---- XOR gate ----------------------------------------------------------
  xor_unit u_xor (
    .a_sel   (ctl.xa_sel),
    .b_sel   (ctl.xb_sel),
    .state_b (state_b),
    .sbox_b  (sbox_b),
    .isbox_b (isbox_b),
    .key_b   (key_b),
    .wr_b    (wr_b),
    .rcon_b  (ctl.rcon),
    .y       (xor_y)
  );

  // ---- Working Register and ModFlag ---------------------------------------
  shift_reg8 #(.W(8)) u_wr (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (ctl.wr_ld),
    .shift (ctl.wr_shl),
    .d     (xor_y),
    .q     (wr_b)
  );

  modflag u_modflag (
    .clk     (clk),
    .rst_n   (rst_n),
    .capture (ctl.wr_shl),
    .msb     (wr_b[7]),
    .flag    (modflag)
  );

  // ---- MixColumns accumulator ----------------------------------------------
  mixcol_acc u_acc (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (ctl.acc_we),
    .idx   (ctl.acc_idx),
    .d     (xor_y),
    .col   (acc_col)
  );

  // ---- bit-serial output -----------------------------------------------------
  shift_reg8 #(.W(8)) u_out (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (ctl.out_ld),
    .shift (ctl.out_shl),
    .d     (xor_y),
    .q     (out_q)
  );

  assign sout = out_q[7];

  a_rk_write_above_key : assert property (@(posedge clk) disable iff (!rst_n)
    ctl.rk_we |-> ctl.kwaddr >= nk4);

endmodule

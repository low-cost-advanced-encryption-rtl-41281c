// aes_coproc: minimal-area AES co-processor (top level).
//
// A loosely coupled AES engine for a small host microcontroller. The host
// writes bytes over one 8-bit line: with ir_we the byte is an instruction
// for the instruction register, with we it is a data byte stored at addr in
// the Key RF (after LOAD_KEY) or the State RF (after LOAD_STATE). It then
// issues EXPAND, ENCRYPT or DECRYPT; the controller runs the operation
// byte-serially on the datapath and shifts the 128-bit result out on sout,
// one bit per cycle with sout_valid, byte 0 first and MSB first. busy is
// high from the cycle after the command until the operation ends, done
// pulses once at its end, and key_valid tells whether the key schedule
// matches the key now held. Instructions and data writes are ignored
// while busy.
//
// Instruction byte: bits 7:4 opcode (1 LOAD_KEY, 2 LOAD_STATE, 3 EXPAND,
// 4 ENCRYPT, 5 DECRYPT), bits 1:0 key size for LOAD_KEY (0: 128, 1: 192,
// 2: 256). Key byte k of the cipher key goes to address k; block byte b
// goes to address b (0-15), in FIPS-197 order.
//
// The block structure (register files, one XOR gate, S-Box and Inverse
// S-Box, Working Register, ModFlag, MixColumns accumulator, controller and
// IR) follows the published architecture; the instruction encoding, the write strobes and
// the output framing are this design's choices. Single clock, synchronous
// active-low reset.
module aes_coproc
  import aes_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  byte_t             din,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic              ir_we,
  output logic              busy,
  output logic              done,
  output logic              key_valid,
  output logic              sout,
  output logic              sout_valid
);

  cmd_t     cmd;
  logic     cmd_valid;
  dp_ctrl_t ctl;
  logic     modflag;
  logic     host_we;

  assign host_we = we && !busy;

  instr_reg u_ir (
    .clk       (clk),
    .rst_n     (rst_n),
    .ir_we     (ir_we),
    .din       (din),
    .accept    (!busy && !cmd_valid),
    .cmd_valid (cmd_valid),
    .cmd       (cmd)
  );

  aes_controller u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .cmd_valid  (cmd_valid),
    .cmd        (cmd),
    .host_we    (host_we),
    .modflag    (modflag),
    .ctl        (ctl),
    .busy       (busy),
    .done       (done),
    .sout_valid (sout_valid),
    .key_valid  (key_valid)
  );

  aes_datapath u_dp (
    .clk       (clk),
    .rst_n     (rst_n),
    .host_we   (host_we),
    .host_addr (addr),
    .host_din  (din),
    .ctl       (ctl),
    .modflag   (modflag),
    .sout      (sout)
  );

endmodule

// instr_reg: the instruction register (IR).
//
// The host writes an instruction byte on the shared 8-bit line with the
// ir_we strobe. The byte is accepted only while the controller is idle
// (accept = 1); it is then held in the IR, and cmd_valid pulses for one
// cycle in the next cycle so the controller acts on it once. Encoding (this
// design's own): bits 7:4 opcode (1 load key, 2 load state, 3 expand key,
// 4 encrypt, 5 decrypt, others no operation), bits 1:0 key size
// (0: 128, 1: 192, 2: 256 bits; 3 is read as 128). Reset clears the IR to
// a no-operation.
module instr_reg
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ir_we,
  input  byte_t din,
  input  logic  accept,
  output logic  cmd_valid,
  output cmd_t  cmd
);

  logic [3:0] ir_op;   // instruction bits 7:4
  logic [1:0] ir_ks;   // instruction bits 1:0; bits 3:2 are not kept

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ir_op     <= 4'h0;
      ir_ks     <= 2'd0;
      cmd_valid <= 1'b0;
    end else begin
      cmd_valid <= ir_we && accept;
      if (ir_we && accept) begin
        ir_op <= din[7:4];
        ir_ks <= din[1:0];
      end
    end
  end

  always_comb begin
    case (ir_op)
      4'h1:    cmd.op = OP_LOAD_KEY;
      4'h2:    cmd.op = OP_LOAD_STATE;
      4'h3:    cmd.op = OP_EXPAND;
      4'h4:    cmd.op = OP_ENCRYPT;
      4'h5:    cmd.op = OP_DECRYPT;
      default: cmd.op = OP_NOP;
    endcase
    case (ir_ks)
      2'd1:    cmd.ks = KS_192;
      2'd2:    cmd.ks = KS_256;
      default: cmd.ks = KS_128;
    endcase
  end

endmodule

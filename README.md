# A byte-serial AES co-processor built around one XOR gate

This is an AES (FIPS-197) engine designed for the smallest possible area, not
for speed. It supports 128, 192 and 256-bit keys, encryption and decryption.
It sits next to a small microcontroller: the host writes a key and a 16-byte
block over an 8-bit bus, issues a command, and the result comes back one bit
per clock.

The main idea is to move almost all of the algorithm into a sequencer and keep
the datapath tiny. The datapath has:

- three byte-wide register files,
- an S-Box and an inverse S-Box,
- a **single 8-bit XOR gate** that every byte operation passes through,
- an 8-bit Working Register that can shift left by one bit,
- a one-bit flag that remembers the bit shifted out,
- a four-byte accumulator for MixColumns.

AddRoundKey, SubBytes, the key schedule and both MixColumns variants are all
built from one operation per clock cycle: "XOR two bytes and store the result
somewhere". The price is latency. Encrypting one block with a 128-bit key takes
1971 clock cycles, including the 128 cycles of serial output.

## Using the co-processor (top level `aes_coproc`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `din` | in | 8 | data or instruction byte |
| `addr` | in | 5 | byte address of a data write |
| `we` | in | 1 | `din` is a data byte for address `addr` |
| `ir_we` | in | 1 | `din` is an instruction |
| `busy` | out | 1 | an operation is running; writes are ignored |
| `done` | out | 1 | one-cycle pulse in the cycle after an operation ends |
| `key_valid` | out | 1 | the stored key schedule matches the stored key |
| `sout`, `sout_valid` | out | 1 | the serial result and its valid bit |

The instruction byte holds the opcode in bits 7:4 and the key size in bits 1:0.
The key size is 0 for 128 bits, 1 for 192 bits and 2 for 256 bits.

| opcode | name | effect |
|---|---|---|
| 1 | LOAD_KEY | Takes the key size from bits 1:0. Later data writes go to the key, address k = key byte k. Marks the schedule invalid. |
| 2 | LOAD_STATE | Later data writes go to the block, address b = block byte b (0–15). |
| 3 | EXPAND | Computes the key schedule. Ends with `done`; nothing is output. |
| 4 | ENCRYPT | Encrypts the stored block in place. First computes the key schedule if it is invalid. |
| 5 | DECRYPT | The same, but decrypts. |

Bytes are numbered in FIPS-197 order: block byte b is row b mod 4, column
b div 4 of the AES state.

At the end of ENCRYPT or DECRYPT the 16 result bytes are shifted out on
`sout`. Byte 0 comes first, each byte MSB first, with `sout_valid` high for
exactly 128 cycles. `done` pulses in the cycle after the last bit.

The result also stays in the state register. So DECRYPT right after ENCRYPT
gives back the plaintext. Two things make the schedule invalid: a LOAD_KEY
instruction, or any write to the key. Until then, the schedule is reused by
every later ENCRYPT or DECRYPT.

A typical AES-128 encryption is:

```
ir_we 0x10               LOAD_KEY, 128-bit
we    addr 0..15 = key
ir_we 0x20               LOAD_STATE
we    addr 0..15 = plaintext
ir_we 0x40               ENCRYPT
collect 128 bits while sout_valid
```

## Storage

- **State RF** (`state_rf`, built from `row_shifter`). This is the AES state,
  stored as four rows of four byte registers. Each row is a ring: one control
  pulse moves every byte one register left (ShiftRows) or right (Inverse
  ShiftRows). So the bytes really travel between registers, and no wiring
  permutation is needed. A byte can be read or written by index. A whole
  column can be written in one cycle from the MixColumns accumulator.
- **Key RF** (`key_rf`, 32 bytes). This holds the cipher key, written by the
  host.
- **RoundKey RF** (`roundkey_rf`, 208 bytes). This holds the rest of the
  expanded key. The key schedule is one 240-byte array, large enough for
  AES-256 (15 round keys × 16 bytes). Byte `a` of that array lives in the
  Key RF if `a < 4·Nk`, and in the RoundKey RF at `a − 4·Nk` otherwise. So the
  key is never copied, and 32 + 208 = 240 bytes cover every key size.

All three files have combinational reads and write on the clock edge.

## The one-XOR datapath (`aes_datapath`)

Each cycle, the controller sends one control word (`dp_ctrl_t` in `aes_pkg`).
The word selects:

- operand A of the XOR: a state byte, the S-Box output, the inverse S-Box
  output, an expanded-key byte, the Working Register, or 0;
- operand B of the XOR: 0, the constant {1b}, an expanded-key byte, the
  Working Register, or the round constant;
- where the result goes: a state byte, a RoundKey RF byte, the Working
  Register, an accumulator slot, or the output shift register.

The S-Box input can come from the State RF or from the key files. The inverse
S-Box reads only the State RF. Both boxes are combinational. They compute the
multiplicative inverse in GF(2⁸) as a²⁵⁴, by square and multiply, and then the
affine transform (or its inverse). This is the 256-entry table written as the
logic that generates it, and synthesis turns it into an 8-input lookup.

### GF(2⁸) doubling with a shift register and a flag

Doubling in GF(2⁸) is a left shift, then an XOR with {1b} if the bit shifted
out was 1. The Working Register (`shift_reg8`) does the shift. In the same
cycle, `modflag` stores the old bit 7. In the next cycle, the controller reads
the flag and selects {1b} or {00} as operand B of the XOR. So one doubling
takes two cycles.

### MixColumns and Inverse MixColumns by Horner's rule

This is the least obvious part of the design. Each output byte is

    s'_i = Σ_k M[i][k] · s_k

M is the circulant matrix {02 03 01 01} for encryption and {0e 0b 0d 09} for
decryption. The controller evaluates this sum bit-plane by bit-plane, starting
from the highest bit p that any coefficient has set (p = 1 for encryption,
p = 3 for decryption):

```
WR = 0
for p = pmax downto 0:
    if p < pmax: WR = 2·WR           (shift + conditional {1b}, 2 cycles)
    for k = 0..3:                    (4 cycles)
        WR ^= (bit p of M[i][k]) ? s_k : 0
```

The last XOR writes the finished byte into accumulator slot i. After all four
bytes of a column are done, the accumulator is copied into the column in one
cycle. The old column stays readable until then.

Both directions use the same hardware and the same loop. Only the coefficient
table and the starting bit differ. The cost:

- encryption: 10 cycles per output byte, 41 cycles per column;
- decryption: 22 cycles per output byte, 89 cycles per column.

### Key schedule, two cycles per byte

For each word i ≥ Nk of the expanded key, and each byte j:

1. **Cycle 1 loads the Working Register with one of:**
   - `w[i−1][j]` in the normal case;
   - `S(w[i−1][(j+1) mod 4])`, XORed with the round constant when j = 0, if
     `i mod Nk = 0` (this is RotWord, SubWord and Rcon together);
   - `S(w[i−1][j])` if Nk = 8 and `i mod Nk = 4` (the extra SubWord of
     AES-256).
2. **Cycle 2** writes `WR ^ w[i−Nk][j]` to the RoundKey RF.

The round constant is a byte register in the controller. It starts at {01} and
is doubled in GF(2⁸) after each RotWord word: 01, 02, …, 80, 1b, 36.

## Controller (`aes_controller`) and timing

The controller has these states:

- IDLE
- key expansion
- AddRoundKey, 16 cycles
- (Inverse) SubBytes, 16 cycles
- (Inverse) ShiftRows, 3 cycles: rows 1–3 rotate, then rows 2–3, then row 3
- (Inverse) MixColumns
- column write-back
- output, 1 load cycle + 128 shift cycles

The round order follows FIPS-197.

- **Encryption:** AddRoundKey(0); then Nr−1 rounds of SubBytes, ShiftRows,
  MixColumns, AddRoundKey(r); then a last round without MixColumns.
- **Decryption:** the straightforward inverse cipher. Round keys are used from
  Nr down to 0, so the full schedule must exist before decryption starts. This
  is why ENCRYPT and DECRYPT run the key expansion first when it is missing.

`busy` cycles per command:

| key size | key expansion | encryption | decryption |
|---|---|---|---|
| 128 | 320 | 1971 | 3699 |
| 192 | 368 | 2369 | 4481 |
| 256 | 416 | 2767 | 5263 |

The cipher counts include the 129 output cycles. When the schedule is invalid,
the key expansion cycles are added in front. From the `ir_we` cycle to the
first `busy` cycle takes one cycle, for the instruction register.

The instruction register (`instr_reg`) accepts an instruction only while the
engine is idle. It then gives the controller a one-cycle command pulse.
Instructions and data writes that arrive while the engine is busy are dropped.

## Where this design departs from its source, or fills gaps

The block structure follows the architecture this RTL implements:

- State, Key and RoundKey register files of 16, 32 and 208 bytes;
- a State RF made of four rotating rows;
- one XOR gate with the constants {00} and {1b} as operands;
- S-Box and inverse S-Box with the connections listed above;
- a Working Register, a ModFlag and a MixColumns accumulator;
- an instruction register;
- an 8-bit data/instruction line with a 5-bit address;
- serial output of the result.

Everything at the cycle level is this design's own choice:

- the instruction encoding and the separate `ir_we` strobe;
- the bit-serial output format;
- the control word;
- the Horner schedule for MixColumns;
- the two-cycle key schedule step;
- the one-cycle column write-back;
- the round constant as a third constant operand of the XOR;
- reset behaviour.

Known differences:

- **Speed.** The published figures for the original design (0.37 Gb/s at
  510 MHz) imply about 176 cycles per block. This schedule needs 1971 cycles
  for AES-128 encryption. The original cycle-level schedule is not available,
  so this RTL does not try to match it.
- **Path into the RoundKey RF.** In the original, the S-Box output is wired
  directly to the State RF, the RoundKey RF and the Working Register. Here
  every S-Box result reaches its destination through the XOR gate, XORed with
  {00}.
- **Area.** A gate count of about 10K gates is reported for the original. No
  gate-level count was made for this RTL. Generic synthesis gives about 1,370
  word-level cells, 243 flip-flop bits and 1,920 register-file bits. The two
  S-Boxes make up most of the logic.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. `tb/aes_ref_pkg.sv` is a separate behavioural
AES model used as the reference. It builds its S-Box by searching for inverses,
and runs the cipher on byte arrays.

- `tb_aes_coproc` is the end-to-end test at full size. It acts as the host. It
  checks:
  - the FIPS-197 Appendix C known answers for all three key sizes;
  - decryption back to the plaintext;
  - random keys and blocks against the reference model;
  - the exact `busy` cycle counts in the table above;
  - reuse of the key schedule;
  - explicit EXPAND;
  - that writes are dropped while busy.

  It also counts how often each mechanism occurs: key expansion per key size,
  encryption, decryption, schedule reuse, lock-out, the {1b} reduction,
  ShiftRows in both directions, Rcon, and the extra AES-256 SubWord. It fails
  if any of them never occurs.
- `tb_aes_controller` runs the sequencer alone, with a random ModFlag input.
  It checks:
  - the RoundKey write addresses and the Rcon sequence;
  - the AddRoundKey key order (ascending for encryption, descending for
    decryption);
  - the ShiftRows masks and direction;
  - the number of MixColumns terms (5 per byte for encryption, 11 for
    decryption);
  - the cycle counts.
- `tb_aes_datapath` drives control words by hand. It computes a full AES-128
  key schedule and one round's steps, checks GF doubling, and reads every
  result through the serial output.
- Each of the remaining unit testbenches checks its own module against a
  model: the full 256-entry tables for both S-Boxes, the row rotations, the
  register files, the XOR operand muxes, the flag, the accumulator, and the
  instruction decode.

## Simulating

All files are SystemVerilog-2017. Packages first:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv -y rtl -y tb \
    tb/tb_aes_coproc.sv --top-module tb_aes_coproc -o sim
./obj_dir/sim
```

Replace `tb_aes_coproc` with any other testbench name to run a unit test. The
end-to-end test simulates about 100,000 cycles and takes well under a second.

## Files

- `rtl/aes_pkg.sv`: sizes, the key-size and opcode enums, the control-word
  struct, and the GF(2⁸) and S-Box functions.
- `rtl/aes_coproc.sv`: the top level (instruction register, controller,
  datapath).
- `rtl/aes_controller.sv`, `rtl/aes_datapath.sv`, `rtl/instr_reg.sv`.
- `rtl/state_rf.sv`, `rtl/row_shifter.sv`, `rtl/key_rf.sv`,
  `rtl/roundkey_rf.sv`.
- `rtl/sbox.sv`, `rtl/inv_sbox.sv`, `rtl/xor_unit.sv`, `rtl/shift_reg8.sv`,
  `rtl/modflag.sv`, `rtl/mixcol_acc.sv`.
- `tb/tb_*.sv`: one testbench per module; `tb/aes_ref_pkg.sv`: the reference
  model.

# AES-128 core with a full-balanced decoder-switch-encoder S-box

In a small AES engine, such as one in a battery-powered sensor node, most of the
power goes into the S-boxes. An AES round has 16 of them, and key expansion
has 4 more. Much of that power is wasted in glitches. In a deep, unbalanced
logic network, such as a composite-field S-box, signals reach a gate at
different times. The gate output then toggles several times before it
settles.

This design builds the S-box from three parts:

1. A **decoder** turns the input byte into 256 one-hot lines.
2. A **switch** permutes those lines, using only wires.
3. An **encoder** turns the permuted one-hot code back into a byte.

Every path through the decoder passes the same number of gates, and so does
every path through the encoder. Signals therefore reach each gate together,
which leaves few opportunities for hazards. The gates are also shared as much
as the structure allows, to keep the area small.

Around this S-box sits an iterative AES-128 core. One set of round hardware
serves both encryption and decryption and completes one round per clock.

All RTL is SystemVerilog (IEEE 1800-2017) in `rtl/`. The testbenches in `tb/`
are self-checking.

## The S-box

```
x[7:0] -> dse_decoder -> 256 lines -> dse_switch (wires) -> 256 lines -> dse_encoder -> y[7:0]
          3 stages,                   line x -> input S(x)                4 stages,
          NAND2 / OR2 / NOR2                                              OR4 / OR4 / OR4 / OR2
```

### Decoder (`dse_decoder`): three balanced stages

| stage | what it does | gates | polarity |
|---|---|---|---|
| 1 | four 2-to-4 decoders on bit pairs (x7,x6), (x5,x4), (x3,x2), (x1,x0); each line is a NAND2 of two input literals | 16 NAND2 | active low |
| 2 | two 16-line decoders, one for x[7:4] and one for x[3:0]; each line is the OR2 of two stage-1 lines | 32 OR2 | active low |
| 3 | 256 lines; line 16·h + l is the NOR2 of upper line h and lower line l | 256 NOR2 | active high |

The polarity trick is what lets these gates be small. The OR of two
active-low lines is the active-low AND of those lines. The NOR of two
active-low lines is the active-high AND. So no stage needs an AND gate or an
extra inverter. The RTL writes the input complements as `~x[i]` and leaves the
inverters to synthesis.

### Switch (`dse_switch`): a permutation made of wires

Decoder line `x` is wired to encoder input `S(x)`. With `INVERSE = 1`, it is
wired to input `S⁻¹(x)` instead. There is no logic in the switch.

The wiring is not copied from a table. It is computed at elaboration from the
definition of the AES S-box: the multiplicative inverse in GF(2⁸), modulo
x⁸ + x⁴ + x³ + x + 1, followed by the affine map with constant 0x63. These
functions are in `aes_pkg`. They compute the inverse as a²⁵⁴ by repeated
squaring, which needs 14 multiplications. A plain loop would need 254 and
would make elaboration slow.

### Encoder (`dse_encoder`): four balanced stages of OR gates

This is the least obvious part of the design.

The encoder's input is one-hot: exactly one input `I_v` is high, and the
output must be the byte `v`. The encoder produces the output bits in pairs.
Take bit pair j, which is bits 2j+1:2j of v. For c = 1, 2, 3, define

    C[j][c] = OR of the 64 inputs I_v whose bit pair j equals c

Then the two output bits of the pair are

    O[2j]   = C[j][1] | C[j][3]
    O[2j+1] = C[j][2] | C[j][3]

This is a 4-input to 2-output sub-encoder: Y0 = X1 + X3 and Y1 = X2 + X3,
where X0 is not needed. Input `I_0x00` belongs to no class and is left
unconnected.

Each C is a 64-input OR, built as a tree of 4-input ORs of equal depth:

| stage | gates | what each gate ORs |
|---|---|---|
| 1 | 111 OR4 | 4 encoder inputs (shared, see below) |
| 2 | 48 OR4 | 4 stage-1 gates; 4 gates per class C |
| 3 | 12 OR4 | 4 stage-2 gates; one gate per class C |
| 4 | 8 OR2 | the two classes of each output bit |

Every input passes through exactly four gates.

Stage 1 is where gates are shared. Take the quad of consecutive inputs
4m … 4m+3. Its members differ only in bit pair 0. They therefore fall into
the same class for pairs 1, 2 and 3. One OR4 of that quad can feed the classes
of O2 to O7, all at once. There are 63 such quads (m = 1 … 63).

Pair 0 cannot use those quads. For pair 0 the encoder uses the quads
{q, q+0x40, q+0x80, q+0xc0}, whose members differ only in bit pair 3. There
are 48 such quads: 16 for each nonzero value of pair 0.

The function `quad_index` in `dse_encoder.sv` gives the order in which stage 2
collects the quads.

### Forward and inverse in one S-box (`dse_sbox`)

SubBytes and InvSubBytes share one S-box. With `ENC_DEC = 1`, the S-box has
one decoder, both switch wirings and one encoder. A row of 256 2:1 selects,
controlled by `inv`, picks one of the two wirings in front of the encoder.
These selects add one level to every path, so the paths stay balanced.

Key expansion only needs the forward S-box. Its four S-boxes use
`ENC_DEC = 0`, which builds only the forward wiring and ignores `inv`. The
lint tool therefore reports `inv` as unused in those instances.

## The AES core (`aes_core`)

```
                 +-------------------------------------------------------------+
                 v                                                             |
 state reg -> SubBytes -> ShiftRows -> MixColumns -> data MUX -> AddRoundKey --+--> output buffer
              /Inv        /Inv         /Inv, bypass    ^            ^
                                                       |            |
                                           input buffer         key MUX <- key expansion (on the fly)
                                                                        <- key buffer (11 x 128)
                     round counter / sequencer (aes_control) drives the MUXes and enables
```

- **Round 0** is the initial key addition. The data MUX takes the block from
  the input buffer, and the result is the block XOR round key 0.
- **Rounds 1 to 9** are full rounds. The result goes back into the state
  register.
- **Round 10** bypasses MixColumns (`mix_columns.bypass`). Its result goes to
  the output buffer.

**How decryption reuses the datapath.** Decryption uses the *equivalent
inverse cipher*. It applies InvSubBytes, InvShiftRows and InvMixColumns, then
adds a key, in the same order as encryption. So only the `inv` controls
change.

The price is in the round keys. Decryption round r uses round key 10−r.
For rounds 1 to 9 that key must first pass through InvMixColumns.

**Where the round keys come from:**

- **Encryption** computes keys on the fly. Round 0 uses the stored initial
  key. Each later round advances `key_expansion` by one step, which is
  RotWord, SubWord through the four forward-only S-boxes, then Rcon.
- **Decryption** reads the key buffer at the current round number.
- **Key setup** fills the key buffer. It runs the expansion through 10 steps
  and writes entry 10 − r at step r. Entries 1 to 9 pass through a second
  `mix_columns` instance with `inv = 1`. Entries 0 and 10 are stored
  unchanged.

The key buffer therefore holds, in entry r, exactly the key that decryption
round r uses.

### Interface and timing

All signals are synchronous to `clk`. The reset `rst_n` is asynchronous and
active low.

| port | dir | width | meaning |
|---|---|---|---|
| `key_valid`, `key_in` | in | 1, 128 | offer a new cipher key |
| `key_ready` | out | 1 | the core is idle: a key is taken when both `key_valid` and `key_ready` are high |
| `key_loaded` | out | 1 | the key schedule is complete (10 cycles after the key is taken) |
| `in_valid`, `in_decrypt`, `in_data` | in | 1, 1, 128 | offer a block; `in_decrypt` = 1 decrypts it |
| `in_ready` | out | 1 | the input buffer is empty |
| `out_valid` | out | 1 | one-cycle pulse: `out_data` holds a new result |
| `out_data` | out | 128 | result, held until the next one |

Blocks use FIPS-197 byte order: byte 0 is bits [127:120].

**Timing:**

- A block offered to an idle core gives `out_valid` 12 cycles after the
  cycle in which it is taken.
- The input buffer can take the next block while a block is being processed.
  A stream of blocks therefore gives one result every 11 cycles.
- If a key is offered while a block is waiting, the key goes first.
- A block offered before any key has been loaded waits in the input buffer.

The sequencer `aes_control` has three states (IDLE, KEYEXP and CIPHER) and a
4-bit round counter. Each cycle it drives the datapath controls, bundled in
`aes_pkg::ctl_t`. Assertions check two rules: the round counter stays in
0 … 10, and a block is taken only from a full input buffer.

## Where this RTL departs from, or adds to, the published design

The following parts follow the published design:

- the decoder–switch–encoder S-box with a 3-stage decoder and a 4-stage
  encoder;
- the gate types of every stage;
- the gate counts of decoder stages 2 and 3, and of encoder stages 2 to 4;
- the pairing of output bits in the encoder;
- the block diagram of the core.

The following are this design's own choices, or differences:

- **Encoder stage 1.** This RTL uses 111 OR4 gates. The published structure
  uses 108, but its exact sharing is not specified. 111 is the minimum when
  every first-stage gate ORs four inputs that differ in a single bit pair.
  An exhaustive integer-programming search over all such groupings confirms
  this. Reaching 108 would need a different kind of grouping.
- **Decoder stage 1.** The published structure uses 4 inverters. This RTL
  writes the complements of the inputs as `~`, and synthesis chooses the
  inverters.
- **Gate structure after synthesis.** The RTL writes the gate structure
  explicitly, but a synthesis tool may restructure it. To keep the balanced
  netlist, keep the hierarchy of `dse_decoder` and `dse_encoder`, or map
  their gates by hand.
- **Inverse S-box.** Sharing one S-box between forward and inverse through
  the 256 line selects is this design's own choice.
- **Key length.** Only AES-128 (10 rounds) is built. The 192-bit and 256-bit
  key schedules (12 and 14 rounds) are not.
- **Cycle behaviour.** The following are not taken from a published source:
  - one round per cycle;
  - the key-buffer contents (the decryption keys of the equivalent inverse
    cipher);
  - the handshakes;
  - the refilling of the input buffer while a block is in progress.
- **Not modelled.** The published power, area and delay figures come from a
  0.25 µm standard-cell library and are not modelled here.

## Verification

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. The reference
model, `tb/aes_model_pkg.sv`, is written independently of the RTL:

- the S-box is built from exponent and logarithm tables over the generator
  0x03;
- the inverse S-box is found by search;
- decryption uses the plain inverse cipher.

What each testbench covers:

- **S-box parts.** The decoder, switch, encoder and S-box are each tested
  exhaustively, with all 256 inputs in both directions.
- **Round units.** Random states, plus the FIPS-197 Appendix B round-1 values.
- **Key expansion.** The FIPS-197 Appendix A.1 round keys, plus random key
  chains.
- **Switching workload.** `tb_sbox_all_transitions` applies every one of the
  256 × 256 input transitions to the S-box, in both directions. It checks
  every output, and checks that each change of the input toggles exactly two
  decoder lines.
- **Sequencer.** Checked cycle by cycle.
- **Core (`tb_aes_core`).** Runs at the core's defaults:
  - the FIPS-197 C.1 vector in both directions;
  - 7 keys × 8 random blocks with random directions, sent back to back;
  - a key change;
  - a key offered together with a waiting block.

  It checks the 12-cycle latency and the 11-cycle spacing between results. It
  also counts how often each mechanism occurs (key setup, encrypt, decrypt,
  block buffered while busy, direction change, rekey, key priority). A
  mechanism that never occurs counts as a failure.

To simulate with Verilator, list the package first:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/aes_pkg.sv tb/aes_model_pkg.sv rtl/*.sv tb/tb_aes_core.sv --top-module tb_aes_core
./obj_dir/Vtb_aes_core
```

To run any other testbench, replace `tb_aes_core` with its name.

## Files

| file | contents |
|---|---|
| `rtl/aes_pkg.sv` | types, the control struct `ctl_t`, GF(2⁸) and S-box functions used at elaboration |
| `rtl/dse_decoder.sv`, `rtl/dse_switch.sv`, `rtl/dse_encoder.sv`, `rtl/dse_sbox.sv` | the balanced S-box |
| `rtl/sub_bytes.sv`, `rtl/shift_rows.sv`, `rtl/mix_column.sv`, `rtl/mix_columns.sv`, `rtl/add_round_key.sv` | round transformations |
| `rtl/key_expansion.sv`, `rtl/key_buffer.sv` | key path |
| `rtl/block_buffer.sv` | input and output buffers |
| `rtl/aes_control.sv` | round counter and sequencer |
| `rtl/aes_core.sv` | top level |
| `tb/aes_model_pkg.sv`, `tb/tb_*.sv` | reference model and testbenches |

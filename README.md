# LED block cipher core: one full round per clock

This is an encryption core for LED, a lightweight 64-bit block cipher with
an AES-like substitution-permutation structure, aimed at small, low-power
devices. The core uses one idea to cut latency. It does not process the
state a nibble or a column at a time. A whole round is built as one
combinational path, with 16 S-boxes side by side and a single-pass
MixColumns, and that path is looped around a 64-bit state register. The
core therefore produces one new state matrix per clock cycle. Encrypting a
block under a 64-bit key takes 32 cycles. The design is partly parallel:
every round is parallel inside, and the rounds are still taken one after
another.

The default configuration uses a 64-bit key. A parameter switches the same
RTL to the 128-bit-key form of LED.

## The cipher in brief

**State.** The 64-bit plaintext is viewed as a 4x4 matrix of 4-bit cells.
Cell 0 is the most significant nibble, and the matrix is filled row by row,
so cell `r*4+c` sits in row `r`, column `c`. The key uses the same layout.
In the RTL this is `led_pkg::state_t`, a packed `nibble_t [0:15]`. Its index
0 is the leftmost nibble, so casting a 64-bit word to `state_t` gives this
layout directly.

**Round.** Each round applies four steps, in this order:

| step | what it does | module |
|---|---|---|
| AddConstants | XOR a constant into columns 0 and 1 | `add_constant` |
| SubCells | replace each cell by the PRESENT S-box of it | `sub_cells`, 16 x `present_sbox` |
| ShiftRows | rotate row *r* left by *r* cells | `shift_rows` |
| MixColumnsSerial | multiply each column by a 4x4 MDS matrix over GF(2^4) | `mix_columns` |

**Steps and key.** Rounds are grouped in *steps* of four. The key is XORed
into the state before every step, and once more after the last round. A
64-bit key has 8 steps (32 rounds), and the same key is used every time, so
there is no key schedule. A 128-bit key has 12 steps (48 rounds). It is
split into K1 = `key[127:64]` and K2 = `key[63:0]`. K1 is added before even
steps and K2 before odd steps. Because 8 and 12 are both even, the final
addition always uses K1.

**Round constants.** Column 0 gets the key length `ks` (64 = 0x40 or
128 = 0x80) spread over four rows: `ks[7:4]`, `1^ks[7:4]`, `2^ks[3:0]` and
`3^ks[3:0]`. Column 1 gets a 6-bit round constant `rc`, split into halves:
`rc[5:3]`, `rc[2:0]`, `rc[5:3]`, `rc[2:0]`. The value of `rc` for round *i*
comes from a 6-bit LFSR. It starts at 0 and is clocked *i*+1 times. Each
clock shifts it left and feeds `rc5 ^ rc4 ^ 1` in at the bottom. This gives
01, 03, 07, 0F, 1F, 3E, 3D, 3B, ...

## Datapath and controller

```
                 plaintext          key
                     |               |  (captured in key_q at start)
                     v               v
 state_q ----> [ mux: load ] --> add_round_key (flag) --> add_constant <-- rc_generator
    ^                                                         |                 ^
    |                                                         v                 | iter
    |                                        sub_cells (16 S-boxes)             |
    |                                                         v          machine_controller
    |                                                    shift_rows       (iter, flag, key_sel,
    |                                                         v            load, advance, last,
    +------------------------------------------------ mix_columns          busy, done)
                                                              |
                                         last: XOR K1 --> ciphertext register
```

`led_round` is the whole combinational round: `add_round_key`,
`rc_generator`, `add_constant`, `sub_cells`, `shift_rows` and `mix_columns`.
`led_top` holds the state register, the captured key, the output register
and `machine_controller`.

`machine_controller` has two states, IDLE and RUN. Its iteration counter
`iter` is 0 in IDLE and rises by one every clock in RUN. From the counter it
derives these signals:

* `flag`: `iter` is a multiple of 4. The round adds the key first.
* `key_sel`: `(iter / 4) mod 2`, the parity of the step. It picks K1 or K2.
  With a 64-bit key both halves are the same key.
* `last`: the round being computed is the final one. That clock edge also
  loads the ciphertext register with the round output XOR K1.

Round 0 is computed on the same clock edge that accepts `start`. In that
cycle the mux takes the plaintext and the key straight from the ports. This
saves a separate load cycle.

The round constants come from a table indexed by `iter`. The table is
filled at elaboration by running the LFSR above (`led_pkg::led_rc`). No
constant is stored by hand, and a 48-round table for the 128-bit key comes
out of the same function.

## The parallel MixColumns

This is the least obvious part of the round. LED defines MixColumnsSerial as
four passes of a sparse matrix A over each column:

```
    | 0 1 0 0 |          | 4 1 2 2 |
A = | 0 0 1 0 |    A^4 = | 8 6 5 6 |
    | 0 0 0 1 |          | B E A 9 |
    | 4 1 2 2 |          | 2 2 F B |
```

In A, the top three rows shift the column up by one cell. The last row
forms a new cell from `4*a0 + a1 + 2*a2 + 2*a3`. A serial implementation
would apply A four times, one pass per clock or per stage. This core uses
the precomputed product `A^4`, the 16 constants in `led_pkg::MDS`, and
evaluates all four columns at once:

    out[r][c] = XOR over j of MDS[r][j] * in[j][c]

The multiplication is in GF(2^4) with the polynomial x^4 + x + 1
(`led_pkg::gf16_mul`). Every multiplier has a constant operand, so it
reduces to a few XOR gates. The whole step is an XOR network of about 450
word-level cells after coarse synthesis, and it is the largest part of the
round.

## Interface and timing (`led_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `start` | in | 1 | one-cycle request, accepted only while `busy` is low |
| `plaintext` | in | 64 | sampled in the `start` cycle |
| `key` | in | `KEY_BITS` | sampled in the `start` cycle |
| `ciphertext` | out | 64 | valid from the `done` cycle until the next completion |
| `busy` | out | 1 | rounds 1 .. N-1 in progress |
| `done` | out | 1 | one-cycle pulse, ciphertext valid |

* Latency: `done` rises N cycles after the `start` edge, where N = 32 for a
  64-bit key and 48 for a 128-bit key.
* Plaintext and key may change on the cycle after `start`, because both are
  captured.
* `start` is ignored while `busy` is high.
* A new `start` may be given in the cycle in which `done` is high. Blocks
  can then follow back to back at one block per N cycles, which is 2 bits
  per clock with the 64-bit key.
* The core has no pipelining across blocks. One block is in flight at a
  time.

Parameter: `KEY_BITS` (default 64; 128 is also accepted, and any other value
stops elaboration with an error). The round count is derived from it.

After coarse synthesis the default core has 199 flip-flops: 64 state, 64
key, 64 ciphertext and 7 for control. The 16 S-boxes and the constant table
stay as small ROMs.

## Files

`rtl/`:

* `led_pkg.sv`: the state type, the MDS constants, GF(2^4) multiplication,
  the round-constant LFSR and the round count per key length.
* `led_top.sv`: the core (top level).
* `led_round.sv`: the combinational round.
* `machine_controller.sv`: the iteration counter and the control signals.
* The step modules: `add_round_key.sv`, `add_constant.sv`,
  `rc_generator.sv`, `sub_cells.sv`, `present_sbox.sv`, `shift_rows.sv` and
  `mix_columns.sv`.

`tb/`:

* `led_model_pkg.sv`: an independent reference model. It works on plain
  64-bit words, runs MixColumns as four serial passes of A using only
  doubling in GF(2^4), and takes its round constants from a literal list.
* One self-checking testbench per module, `tb_<module>.sv`.
* `tb_led_top.sv`: the end-to-end test at default parameters. It covers the
  published LED-64 vectors, random blocks against the model, the 32-cycle
  latency, a start while busy, back-to-back blocks, inputs changing after
  capture, and a reset in mid-operation. It also counts key-addition rounds
  against constant-only rounds.
* `tb_led_top_128.sv`: the same core with `KEY_BITS = 128`. It covers the
  published LED-128 vectors, random blocks and the 48-cycle latency.

Known-answer vectors used:

| key bits | plaintext | key | ciphertext |
|---|---|---|---|
| 64 | 0000000000000000 | 0000000000000000 | 39C2401003A0C798 |
| 64 | 0123456789ABCDEF | 0123456789ABCDEF | A003551E3893FC58 |
| 128 | 0000000000000000 | 0 (128 bits) | 3DECB2A0850CDBA1 |
| 128 | 0123456789ABCDEF | 0123456789ABCDEF0123456789ABCDEF | D6B824587F014FC2 |

Every testbench ends by printing `TB_RESULT checks=N failures=M`. It also
has a watchdog that ends the run with a failure if the design hangs.

## Simulating

Each testbench needs the two packages and finds the modules it uses in
`rtl/`. From the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/led_pkg.sv tb/led_model_pkg.sv tb/tb_led_top.sv --top-module tb_led_top
./obj_dir/Vtb_led_top
```

Replace `tb_led_top` with any other testbench name to run that one. Each
simulation finishes in well under a second. For lint only, use
`verilator --lint-only -Wall -Wno-fatal -Irtl -y rtl +libext+.sv rtl/led_pkg.sv rtl/led_top.sv`.
Expect three kinds of style warnings:

* The ascending range of `state_t`. It is deliberate, so that index 0 is the
  most significant nibble.
* Package constants that a given module does not use.
* `rst_n` appearing both in the asynchronous reset and in the controller's
  assertions.

## Design choices and departures

The architecture follows a published description of a delay-efficient LED
implementation. That description covers the parts of the design listed
here:

* One state matrix per clock.
* 16 parallel copies of the PRESENT S-box.
* ShiftRows with all rows done in parallel.
* A parallel MixColumns with 16 constant multipliers.
* A round-constant table addressed by the iteration number.
* A clock-driven controller that raises the key flag on iterations 0, 4,
  ..., 28.

The description names the cipher steps but does not give their constants,
so the published LED definition supplies them. It shows the key XOR after
the last step in its overview of the cipher but not in its flow chart. This
core includes that final XOR, as LED requires. It also mentions
signature-based error detection without describing it (see below).

These points follow the published LED definition, not a design choice made
for this core:

* The S-box table.
* The MDS matrix.
* The LFSR constants and the layout of AddConstants, which covers two
  columns and includes the key length.
* The cell order.
* The final key addition after the last round.
* The K1/K2 order for the 128-bit key.

This core's own choices:

* The start/busy/done handshake. Plaintext and key are captured at start,
  and a start while busy is ignored.
* Computing round 0 on the start edge.
* The registered ciphertext output.
* The asynchronous active-low reset.
* The split into modules.

Not included:

* **Decryption.** The core only encrypts. The inverse round would need the
  inverse S-box, right rotations and the inverse MDS matrix.
* **Error detection.** Signature-based concurrent error detection is a
  known way to harden LED against faults, but no scheme is specified here,
  so the core has no checking logic. Adding one, for example predicted
  parity around each step, would be a new design decision.
* **Throughput pipelining.** Only one block is processed at a time.
* **Several keys in one run.** The core takes one key of 64 or 128 bits.
  It cannot take several keys for one block, beyond the two halves of the
  128-bit key.

## Changing the design

* To unroll two rounds per clock, instantiate `led_round` twice in series in
  `led_top`. Let the controller count by two, and give the second round
  `iter + 1` and its own `flag`.
* To trade area for latency the other way, `mix_columns` can be replaced by
  a serial pass of A applied over four cycles. The reference model in
  `tb/led_model_pkg.sv` shows that form.
* Any change can be checked quickly with `tb_led_round`. It compares a
  single round against the model for every iteration number, then chains 32
  rounds to reproduce the known-answer vectors.

# Nano AES: a byte-serial, clock-gated AES-128 encrypter and decrypter

This is a small-area AES-128 design for devices that have little silicon or
power to spare. A full AES round works on 128 bits at once. Here every block
moves through an **8-bit data path**, one byte per clock. There is one S-box,
and the data path and the key expansion take turns using it. MixColumns takes
and returns one byte at a time. ShiftRows is not a separate unit: it is
re-wiring inside the state register. Every register bank sits behind its own
**clock gate**, so a bank only gets clock edges in the cycles where it has
work.

The top level, `aes_top_final`, chains an encrypter and a decrypter under the
same key: a plain-text block goes in, and both the cipher text and the
recovered plain text come out. The intended use is image encryption. A host
cuts an image into 16-pixel (128-bit) blocks, passes them through the cores
one at a time, and puts the image back together.

Results are bit-exact AES-128 (FIPS-197), checked against the standard's
known-answer vectors and an independent reference model.

## Block diagram

```
                 +-------------------- nano_aes_encrypt (MM0) -----------------+
 key, text_in -->| clock_gating(en) -> aes_encrypt                            |--> enc_data, enc_complete
 kld ----------->|   state_register  key_register  sub_bytes  mix_columns     |        |        |
                 |   rcon_unit  control_unit  4 x clock_gating                |        |        |
                 +------------------------------------------------------------+        |        |
                 +-------------------- nano_aes_decrypt (MM1) -----------------+        |        |
 key, kld ------>| clock_gating(en) -> aes_decrypt          enc_data <--------|--------+        |
                 |   (same blocks, inverse variants)        ld <--------------|-----------------+
                 +------------------------------------------------------------+--> dec_data, dec_complete
```

Inside one core (the encrypter; the decrypter mirrors it):

```
 text_in -> [state_register] --head--> (mux) -> [sub_bytes] --+--> [mix_columns] --xor Out1--> back into state (tail)
                  ^                      ^                    |
                  |                      | Out 2              +--xor Out1 (xor RCON)--> back into key register
 key ----> [key_register] --Out 1--------+-----------------------^
                                [rcon_unit] --(only in the byte-0 cycle)--^
```

## How one round runs through 8 bits

The state is 16 bytes, column-major: byte `i` is row `i % 4`, column `i / 4`,
and byte 0 is bits 127:120 of the block. `state_register` is a shift register.
The byte at its *head* goes into the data path, and the byte coming back is
written at its *tail*. After 16 shifts every byte is back in its own slot,
now processed.

One encryption round takes 49 cycles:

| cycles | what happens | clocks running |
|---|---|---|
| 16 | **Key expansion**: the next round key is computed in place in the key register (see below) | key, RCON (1 cycle) |
| 1  | **ShiftRows**: the state register permutes its 16 slots in one clock | state |
| 32 | **SubBytes, MixColumns, AddRoundKey**, column by column, 8 cycles per column | state, Mix-Columns, key (half the time) |

SubBytes works on single bytes, so it commutes with ShiftRows. That lets
ShiftRows go first, as a free re-wiring, before the bytes stream through the
S-box.

For each column of the Mix-Columns pass:

* **4 load cycles.** The state register shifts. The byte leaving the head goes
  through the S-box into one of the four byte registers of `mix_columns`.
  After four cycles the column has left the state. Its old slots are the last
  four slots of the register, and they now hold stale bytes.
* **4 output cycles.** `mix_columns` produces one result byte per cycle. The
  result is XORed with the round-key byte at Out 1 of the key register
  (AddRoundKey) and written into the state with a *tail* shift. In a tail
  shift only the last four slots move, so the rest of the state stays put.
  The key register rotates by one byte in each of these cycles, which keeps
  Out 1 lined up with the byte being written.

`mix_columns` never multiplies a whole column at once. Each output byte is the
dot product of the first matrix row with its four registers. The MixColumns
matrix is circulant, so rotating the registers by one byte gives the next row.
Input and output do not overlap, which keeps the unit at exactly four
registers.

The full schedule of a block is: load (1) + initial AddRoundKey (16) +
9 × 49 + last round (key expansion 16, ShiftRows 1, then 16 cycles of
S-box + AddRoundKey without MixColumns). `done` is set by the **490th clock
edge after the load edge**.

## Expanding the key in place, one byte per cycle

AES-128 builds round key `i+1` from round key `i` word by word:
`w0' = w0 ^ SubWord(RotWord(w3)) ^ rcon` and `wj' = wj ^ w(j-1)'`. In bytes,
new byte `t` is:

* old byte `t` xor S(old byte `12 + (t+1) % 4`) xor (rcon if `t == 0`), for
  `t = 0..3`;
* old byte `t` xor new byte `t-4`, for `t = 4..15`.

The key register shifts toward slot 0. Out 1 (slot 0) is the byte being
updated, and the new byte is written into slot 15. So during the 16 cycles of
an expansion, the other bytes needed sit at fixed slots:

* new byte `t-4` is always in **slot 12** (`prev`);
* the byte for SubWord (Out 2) is in **slot 13** for `t = 0, 1, 2` and in
  **slot 9** for `t = 3`.

For `t = 0..3` the shared S-box takes Out 2 instead of the state head. RCON is
added only for `t = 0`, and the RCON register steps (×x in GF(2^8)) on that
same cycle. No 32-bit word buffer is needed. The state register and
Mix-Columns are clock-gated off for the whole expansion.

### The decrypter runs the schedule backwards

Decryption needs the round keys in reverse order. `aes_decrypt` handles this
as follows:

1. On a rising edge of `kld` it loads the cipher key and runs the forward
   expansion ten times (160 cycles). This leaves the last round key in the
   key register.
2. Before each decryption round it undoes one expansion step. Undoing it only
   works from byte 15 down. Old bytes 15..4 are `new[t] ^ new[t-4]`, which
   uses only new bytes. Old bytes 3..0 then need the *recovered* last word.
   For this the decrypter's key register shifts the other way (`dir = 1`):
   the head is slot 15 and the tail is slot 0. The taps are slot 11 (`prev`),
   and slot 8 for byte 3 or slot 12 for bytes 2..0 (Out 2). RCON is divided
   by x before each inverse step.
3. To match, the decrypter's state register also processes bytes 15..0. It
   shifts toward slot 15, its head is slot 15, it permutes with
   InvShiftRows, and its tail shift uses slots 0..3. `mix_columns` with
   `INVERSE = 1` takes rows 3..0 and returns them in the same order.

A decryption round follows the straight inverse cipher: InvShiftRows, then
InvSubBytes, then AddRoundKey **before** InvMixColumns. The round key is
consumed during the load cycles of each column, not the output cycles. Key
expansion always needs the forward S-box, so the decrypter's single
`sub_bytes` is a combined S-box / inverse S-box with a select input.

When a block is done, the key register again holds the cipher key. The
decrypter then reruns the 160-cycle forward expansion by itself, so it is
ready for the next cipher text under the same key without another `kld`. An
`ld` that arrives while the key is still being prepared is kept pending.

## Clock gating

`clock_gating` is the usual integrated clock-gating cell. A latch,
transparent while `clk` is low, holds the enable, and the gated clock is
`clk & latched_enable`. Because the latch is closed while `clk` is high, an
enable that changes in the high phase can neither cut a pulse short nor
create one. Each core has five of these cells:

| gated clock | enabled when |
|---|---|
| whole core (`En` in `nano_aes_*`) | the `en` input is high; with `en` low the core freezes and resumes later |
| state register | load, AddRoundKey, (Inv)ShiftRows, Mix-Columns and final passes; **off during key expansion** |
| Mix-Columns registers | Mix-Columns passes only |
| key register | load, key expansion, and the cycles that consume a round-key byte |
| RCON | its init and one step per expansion |

The control unit runs on the core clock and computes every enable one cycle
ahead. The cell then latches each enable during the low phase.

## Interface and timing

`aes_top_final`:

| port | dir | width | meaning |
|---|---|---|---|
| `key` | in | 128 | cipher key, sampled on the `kld` edge |
| `text_in` | in | 128 | plain-text block, sampled on the `kld` edge |
| `clk` | in | 1 | clock |
| `en` | in | 1 | clock enable for both cores |
| `kld` | in | 1 | a rising edge (seen on an enabled clock edge) loads and starts |
| `rst` | in | 1 | asynchronous reset, active high |
| `enc_data` | out | 128 | cipher text; valid while `enc_complete` is high |
| `enc_complete` | out | 1 | set 490 enabled edges after the load edge |
| `dec_data` | out | 128 | decrypted text; valid while `dec_complete` is high |
| `dec_complete` | out | 1 | set 491 enabled edges after `enc_complete` |

One block takes 982 clock cycles for encryption plus decryption. The next
`kld` may be given once `dec_complete` is high; both complete flags are
cleared by that `kld` edge. A `kld` edge in the middle of a block restarts
both cores.

The data outputs are the state registers themselves, so they change while a
block is being processed.

The cores can be used on their own:

* `aes_encrypt` / `nano_aes_encrypt`: a rising edge of `ld` loads `key` and
  the text and starts.
* `aes_decrypt` / `nano_aes_decrypt`: a rising edge of `kld` loads the key,
  and a rising edge of `ld` loads the cipher text.

## Files

| file | contents |
|---|---|
| `rtl/aes_pkg.sv` | byte type, enums for register operations and controller phases, the `ctrl_t` control word, GF(2^8) functions, S-box and inverse S-box computed from their definition |
| `rtl/clock_gating.sv` | latch + AND clock-gating cell |
| `rtl/sub_bytes.sv` | the shared S-box / inverse S-box |
| `rtl/mix_columns.sv` | 8-bit MixColumns (`INVERSE=0`) / InvMixColumns (`INVERSE=1`) |
| `rtl/state_register.sv` | 16-byte state with (Inv)ShiftRows |
| `rtl/key_register.sv` | 16-byte key register with Out 1 / Out 2 / prev taps |
| `rtl/rcon_unit.sv` | round-constant register |
| `rtl/control_unit.sv` | sequencer and clock-gate enables (`INVERSE` selects the decrypter) |
| `rtl/aes_encrypt.sv`, `rtl/aes_decrypt.sv` | the two cores |
| `rtl/nano_aes_encrypt.sv`, `rtl/nano_aes_decrypt.sv` | the cores behind a core-level clock gate |
| `rtl/aes_top_final.sv` | encrypter and decrypter chained |
| `tb/aes_ref_pkg.sv` | reference AES-128 (S-box built from log/antilog tables, word-level cipher) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_image_workload.sv` | 64 × 64 grey-scale image encrypted and decrypted block by block |

There are no tables or data files: the S-box values come from GF(2^8)
inversion (`a^254`) followed by the affine map, and the round constants come
from repeated doubling and halving in GF(2^8).

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_top_final.sv \
  --top-module tb_aes_top_final -o sim
./obj_dir/sim
```

Replace `tb_aes_top_final` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/aes_pkg.sv rtl/<module>.sv`.

What the testbenches check:

* **`tb_aes_top_final`** (the top at full size, no parameters):
  * the FIPS-197 Appendix B and C.1 vectors and random blocks, compared with
    the reference model;
  * the round trip back to the plain text;
  * both latencies;
  * random `en` stalls;
  * that every mechanism happens: key expansion with the state and
    Mix-Columns clocks off, the S-box used by the key schedule, ShiftRows and
    InvShiftRows cycles, tail writes, the inverse key schedule, RCON stepping
    back, the decrypter's key preparation, and stalls.
* **`tb_aes_encrypt`**: cipher texts; latency; no state or Mix-Columns clock
  edge during key expansion, counted on the gated clocks themselves.
* **`tb_aes_decrypt`**: plain texts; a pending `ld`; back-to-back blocks
  without `kld`; that the key register returns to the cipher key.
* **`tb_nano_*`**: results and latency in enabled cycles under random `En`;
  nothing in the core moves on a disabled edge.
* **Leaf testbenches**: the full S-box in both directions, the MixColumns
  rows, ShiftRows / InvShiftRows and the tail shift, forward and inverse
  expansion of all ten round keys through the key-register taps, the RCON
  sequence both ways, and glitch-free gating.

## Where this design fills in or departs from its source description

The published Nano AES description gives the block structure: an 8-bit data
path; separate state and key register banks; ShiftRows inside the state
register; one S-box shared with key expansion; an 8-bit Mix-Columns with four
byte registers; RCON and a control unit; clock gating of the state,
Mix-Columns, key and RCON registers, with the state and Mix-Columns clocks
stopped during key expansion; and the top-level ports and module names used
here. The following are this design's own decisions:

* **Cycle schedule.** The description gives no cycle count. It says the
  encryption is done "in ten" steps, one per round, on reused hardware. The
  490-cycle schedule, the 4-in/4-out Mix-Columns timing and the tail-shift
  trick are choices made here.
* **Key-register taps.** Out 1 and Out 2 come from the description. The
  one-word-back tap (`prev`), the exact tap slots, and the two-direction key
  register for the decrypter are additions needed to make byte-serial and
  inverse key expansion work.
* **Decryption.** The description shows the decrypter's datapath (inverse
  S-box, then AddRoundKey, then InvMixColumns) but not how it gets the last
  round key. The 160-cycle forward pre-expansion, the reverse byte order and
  the pending `ld` are choices made here. Its S-box drawing shows only an
  inverse S-box on the key path too. That cannot produce AES round keys, so
  the shared unit here is a combined S-box / inverse S-box.
* **S-box circuit.** The description calls its S-box optimised but does not
  give the circuit. Here it is written from its algebraic definition and left
  to synthesis, so its area is not that of a hand-optimised S-box.
* **Handshake and reset.** Only the pin names are given. Edge-triggered
  `kld`/`ld`, level `complete` flags, and an asynchronous active-high reset
  are assumptions.
* **Key size.** Only 128-bit keys are supported, as on the top-level ports.
  AES-192/256 are not built.
* **Not built: data masking.** The description mentions masking the plain
  text with a random mask and unmasking the cipher text, but it gives no mask
  source and no masked S-box. XOR masks do not pass through AES, so that step
  cannot be built as described, and the top-level structure has no such
  unit.
* **Not built: host side of image encryption.** Converting an image to a text
  file of blocks and back is host software. `tb_image_workload` stands in for
  it with a generated image.
* **Not reproduced: FPGA figures.** The published area and delay numbers
  (about 1670 slices, 1066 flip-flops, 3900 LUTs, 3.4 ns) come from an FPGA
  flow and were not reproduced. Each core of this RTL has about 315
  flip-flops: 288 in the state, key and Mix-Columns registers, 8 in RCON,
  and the rest in the control unit. It also has five clock-gating latches.

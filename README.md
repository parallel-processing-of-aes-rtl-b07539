# Four parallel AES-128 datapaths behind one pair of input links

This design gives the same cipher, AES-128 as defined in FIPS-197, four hardware shapes. Each shape trades area for throughput differently. A system wrapper fronts all four. Data blocks and keys arrive through two FIFO-buffered input links. A two-bit instruction, `inst_in`, picks the shape that processes them. Every shape both encrypts and decrypts, so each block popped from the links yields one ciphertext and one plaintext.

The four shapes differ in two ways:

- how many times the nine middle rounds are unrolled;
- whether a round substitutes and mixes the state as one 16-byte operation or as four 4-byte slices.

| `inst_in` | shape | round stages x loops | Sub/Mix units per round | blocks in flight | one block every | latency enc / dec (cycles) |
|---|---|---|---|---|---|---|
| 0 | full parallelism | 9 x 1, four copies | 4 x Sub-4, 4 x Mix-4 | up to 4 x 40 | cycle, per lane (4 lanes) | 40 / 60 |
| 1 | loop unrolled three times | 3 x 3 | Sub-16, Mix-16 | 3 + front | 13 cycles | 43 / 63 |
| 2 | loop unrolled nine times | 9 x 1 | Sub-16, Mix-16 | 40 | cycle | 40 / 60 |
| 3 | parallel MixColumns | 1 x 9 | 4 x Sub-4, 4 x Mix-4 | 1 + front | 37 cycles | 41 / 61 |

A seventh unit sits beside the wrapper with its own ports. It is the basic encryption/decryption core: one round stage looped nine times, with single 16-byte Sub and Mix units. It is a separate design, not a choice of `inst_in`.

## State layout and step units

A 128-bit block is the AES state in column-major order:

- byte `i` sits at bits `[127-8i -: 8]`;
- it belongs to row `i % 4` and column `i / 4`.

Every AES step is its own registered unit with a clock, an enable and a data input and output. Each unit takes one cycle. Its output register loads only while `en` is 1. The units are:

| unit | operation |
|---|---|
| `aes_sub_bytes` | S-box on `NBYTES` bytes; Sub-16 or Sub-4; `INVERSE` selects the inverse S-box |
| `aes_shift_rows` | rotates row r left by r bytes; right for the inverse |
| `aes_mix_columns` | multiplies `NCOLS` columns by the {02,03,01,01} circulant, or by {0e,0b,0d,09} for the inverse. It is built from one `aes_gf_mul` per matrix entry and column, with the row XOR after their registers |
| `aes_gf_mul` | one GF(2^8) product modulo x^8+x^4+x^3+x+1 |
| `aes_add_round_key` | XOR of two 128-bit words |
| `aes_key_sub` | `SubWord(RotWord(w3)) ^ Rcon(rnd)`: the non-linear half of one key-schedule step |
| `aes_key_sche` | the XOR chain that builds the next round key from that word |

The S-box is not stored as a table in the source. `aes_pkg` computes it when the design is elaborated:

- take the multiplicative inverse in GF(2^8), as a^254;
- then apply the affine map b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63.

The inverse S-box is built by inverting that table. Synthesis turns both into constant ROMs.

## Round stages and on-the-fly keys

`aes_enc_round` is one encryption round as a four-stage pipeline: Sub, Shift, Mix, AddKey. The key work runs beside the data:

- KeySub in the round's first cycle;
- KeySche in its second cycle;
- the new round key then waits in delay registers, so it reaches AddKey together with the state.

The round number travels with the block and selects Rcon. Each block therefore carries its own key through the pipe, and no round-key memory exists anywhere. With `FINAL=1` the Mix stage is dropped, giving the three-stage last round.

`aes_dec_round` is the decryption round, in this order:

1. inverse ShiftRows;
2. inverse S-box;
3. AddKey;
4. inverse MixColumns.

Its key runs the schedule backwards. From round key r it recovers round key r-1:

- `t = SubWord(RotWord(w3 ^ w2)) ^ Rcon(r)`;
- `w0' = w0 ^ t`;
- `wi' = wi ^ w(i-1)`.

Decryption has to start from the last round key. Each decryption datapath therefore first passes the cipher key through `aes_key_expand`. This is ten forward key-schedule steps, two cycles each, carrying the ciphertext alongside. That accounts for the 20 extra cycles of decryption latency in the table.

## Loop stages

`aes_round_loop` wraps one round unit and applies it `ITER` times.

**`ITER = 1`:** it is a plain four-cycle pipeline stage that accepts every cycle.

**`ITER > 1`:** the stage holds a single block.

1. A block enters the round unit.
2. Each time it comes out, it is fed back in with the next round number.
3. After `ITER` rounds it is parked in an output register until the next stage can take it.

A new block may enter in the same cycle the parked block leaves. The stage therefore accepts one block every `4*ITER + 1` cycles. That is 13 cycles for three loops and 37 for nine.

`aes_cipher_engine` chains the whole datapath:

- the key expansion (decryption only);
- the initial AddKey;
- `NSEG` loop stages of `ITER` rounds each, with `NSEG*ITER = 9`;
- the final round.

Parameters choose every shape in the table. The engine's front part stalls as one unit while the first loop stage is busy.

## Handshake and hold

Each shape module (`aes_full_parallel`, `aes_loop3`, `aes_loop9`, `aes_par_mixcol`, `aes_enc_dec`) has the same interface:

- inputs: a plaintext, a ciphertext and a key;
- `in_valid` and `in_ready`;
- two results, each with a one-cycle valid pulse (`enc_valid`, `dec_valid`);
- `ctrl`.

A pair is accepted when `in_valid && in_ready`. `in_ready` is 1 only when both the encryption and the decryption engine can take a block. There is no back-pressure on the outputs.

`ctrl = 1` freezes every register of the shape. The outputs hold their values, and the valid pulses stay low until `ctrl` returns to 0. `aes_full_parallel` has four independent lanes. Each lane has its own inputs, `in_valid`, `in_ready` and outputs.

The latency of a shape is counted from the accepting edge to the edge after which the valid is seen, with no waiting. It is:

- encryption: `1 + NSEG*(4*ITER + (ITER>1)) + 3`;
- decryption: the same plus 20.

## System wrapper: links, selection and draining

`asap_aes_top` buffers the two input links in `asap_fifo` instances:

- FIFO 1 holds plaintext blocks, written with the strobe `i1`;
- FIFO 2 holds keys, written with the strobe `i2`.

Each FIFO is 128 bits wide and 8 deep, single-clock, first-word fall-through. A write to a full FIFO is dropped, and an assertion flags it. `f1` and `f2` show the heads, and `fifo1_full` and `fifo2_full` report fullness.

A pair is popped from both FIFOs in the same cycle when all of these hold:

- both FIFOs hold an entry;
- the active shape can accept;
- no switch is pending.

The ciphertext on `input_decryption` is sampled in that cycle and decrypted under the popped key. The driver must therefore present the ciphertext that belongs with the key at the head of FIFO 2.

Full-parallelism mode feeds its four lanes round-robin, one pair per cycle. At most one lane finishes in any cycle, so results come out in the order the pairs were popped.

When `inst_in` changes, popping stops until every block in flight has left. The wrapper counts blocks in flight and decrements the count on each decryption result, the later of the two results. Only then does the new shape become active. This drain rule keeps the result order and means two shapes never drive the outputs in the same cycle. `ctrl` holds all four shapes. The basic core has its own `core_ctrl` and `core_*` ports.

## Where this design departs from its source, and what it chose

**The cipher follows FIPS-197 exactly.**

- It is checked against the FIPS-197 appendix vectors.
- Some 128-bit example results in the published waveforms of the original work are not FIPS-197 AES-128 outputs for the inputs shown. This design does not reproduce them.
- The printed add-round-key example differs in two bytes from the XOR of its inputs. This design uses the plain XOR.

**The original is software on a many-core array, not dedicated hardware.** It maps each AES step onto small processors of an asynchronous array that talk over FIFO links. This design turns every step processor into a one-cycle registered unit and every link into a direct connection. Several things from the original are therefore absent, because they are not logic of their own here:

- the processors and their per-core clock oscillators;
- the supply-voltage switching;
- the inter-processor mesh;
- the shared memory;
- the other accelerators.

The processor counts and the throughput of the original are properties of that software mapping. They are not reproduced.

- The original reports about 0.74 cycles per byte.
- Here the loop-unrolled-nine shape reaches 16 bytes per cycle (0.0625 cycles/byte) and full parallelism 64 bytes per cycle (0.0156 cycles/byte).
- Three loops gives 0.81 cycles/byte and parallel MixColumns 2.31 cycles/byte.

**Taken from the source:**

- the step order of each round;
- the four shapes and their unrolling: nine stages, three stages of three loops, and one stage of nine loops;
- the split into four Sub-4/Mix-4 slices;
- the four independent full-parallelism lanes;
- the port names `ctrl`, `inst_in`, `fifo_in1`/`fifo_in2`, `i1`/`i2` and `f1`/`f2`.

**Choices the source leaves open, made here:**

- `ctrl` is read as a hold.
- The `in_valid`/`in_ready` handshake and the valid pulses.
- The decryption key pre-pass and the inverse on-the-fly schedule; the source shows only the encryption key path.
- The FIFO depth of 8.
- The `inst_in` encoding.
- `i1`/`i2` read as write strobes.
- The round-robin lane feed and the drain rule.
- Asynchronous active-low reset of the control state only. Data registers are not reset.
- The final round of full parallelism uses four Sub-4 units, as its dataflow shows. The parallel-MixColumns shape uses a single Sub-16 in its final round.

## Files

`rtl/aes_pkg.sv` holds the types and the GF(2^8), S-box, ShiftRows and key-schedule functions. Every other file in `rtl/` holds one module:

- step units: `aes_sub_bytes`, `aes_shift_rows`, `aes_mix_columns`, `aes_gf_mul`, `aes_add_round_key`, `aes_key_sub`, `aes_key_sche`;
- rounds: `aes_enc_round`, `aes_dec_round`;
- `aes_key_expand`, `aes_round_loop`, `aes_cipher_engine`;
- the five shapes;
- `asap_fifo` and `asap_aes_top`.

Each file opens with a description of its behaviour and timing.

`tb/aes_ref_pkg.sv` is an independent, deliberately plain software model of AES-128. It uses its own GF arithmetic and tables, and the testbenches compare against it. `tb/tb_aes_ref_selftest.sv` checks the model itself against the FIPS-197 vectors.

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one:

- drives random and standard vectors;
- checks latency and throughput where they are defined;
- exercises holds and back-pressure;
- ends by printing `TB_RESULT checks=N failures=M`.

`tb/tb_asap_aes_top.sv` runs the wrapper at its default sizes:

- bursts larger than the FIFOs under each `inst_in` value in turn;
- a switch while blocks are in flight;
- a `ctrl` hold;
- the basic core running alongside.

It counts each of these mechanisms and fails if one never happened.

## Simulating

With Verilator 5, for any testbench `tb_X`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_X.sv --top-module tb_X -Mdir obj_X
obj_X/Vtb_X
```

The unit testbenches build and run in seconds. The full system (`tb_asap_aes_top`) has over 120k flip-flops and takes about two minutes to build, then runs in under a second.

All parameters have defaults that give the shapes above. To build another shape, instantiate `aes_cipher_engine` with different `NSEG`/`ITER`/`NSUB`/`NMIX`. Elaboration stops with an error unless `NSEG*ITER` is 9.

# AES-128 with self-initialising RAM S-boxes (LFSR pair generator)

On flash-based, non-volatile FPGAs no configuration bitstream loads the block
RAMs at power-up. A cipher that wants table-based S-boxes in RAM, which is
smaller and uses less power than S-boxes built from logic, must therefore write
the tables itself. This design does that with a very small generator: two
8-bit LFSRs and two XOR networks. The generator writes the AES S-box and its
inverse into true dual-port RAMs in 256 clocks. The RAMs then serve a shared
iterative AES-128 encryptor/decryptor.

## Why two LFSRs produce the S-box

The AES S-box is `S(x) = AT(x^-1)`: the inverse of `x` in GF(2^8), followed by
a fixed affine map `AT`. Computing inverses directly is expensive. Listing
*pairs* of inverses is cheap, though:

* If `alpha` is a primitive element and `beta = alpha^-1`, then
  `alpha^i * beta^i = 1` for every `i`. Stepping two registers, one
  multiplied by `alpha` and one by `beta` at each clock, produces a pair
  `(y, y^-1)` at every step. Together the pairs cover all 255 non-zero
  elements.
* In the AES field (`m(x) = x^8+x^4+x^3+x+1`, 11B) the element 02 is not
  primitive. Multiplying by a primitive element such as 03 there gives
  non-linear feedback.
* In the field defined by `m'(x) = x^8+x^4+x^3+x^2+1` (11D), 02 *is*
  primitive. Multiplying by `alpha = 02` is a left shift with feedback 1D.
  Multiplying by `beta = 8E` is a right shift with feedback 8E. Both are
  plain Galois LFSRs (`lfsr_pair`).

Both fields have 256 elements, so they are isomorphic. The element 03 of the
AES field is a root of `m'(x)`. The linear map **BT**, which sends `02^j`
(generator field) to `03^j` (AES field), therefore preserves products. Its
matrix columns are `01 03 05 0F 11 33 55 FF` (`basis_transform`). So, at
step `i`:

```
x    = BT(alpha^i)                    AES-field byte
S(x) = AT(BT(beta^i)) = AT(x^-1)      its S-box value
```

`AT` and `BT` are both linear over GF(2), so `AT o BT` folds into one 8x8 XOR
matrix. The affine constant 63 becomes inverters on output bits 6, 5, 1 and
0 (`at_bt`). The whole generator is therefore 16 flip-flops, about 30 XORs
and a counter. There is no multiplier and no inverter.

The zero element has no power form. The generator spends one extra clock to
write `S(00) = 63`.

## S-box RAM layout and the fill

Each RAM is 512 x 8 bits (4 kbit). The forward S-box sits in words
`000-0FF` and the inverse S-box in words `100-1FF`. Each generated pair
gives one entry of each table, so both ports write in the same clock:

```
port A:  RAM[{0, x}]    <= S(x)
port B:  RAM[{1, S(x)}] <= x
```

`sbox_gen` holds the LFSR pair, both transformations and a step counter. It
writes 255 LFSR pairs and then the zero pair. All ten RAMs are written from
the one generator in parallel. After the fill, each port of a RAM is an
independent "dual" S-box: every cycle, the port's address bit 8 picks the
forward or the inverse table (`dual_sbox`).

## Cipher datapath

`aes_lfsr_lut` is a 128-bit iterative core. A single datapath does both
encryption and decryption:

| resource | sharing |
|---|---|
| 8 `dual_sbox` RAMs | 16 state bytes, forward or inverse table by mode |
| 2 `dual_sbox` RAMs | 4 SubWord bytes of the key schedule (always forward) |
| `shift_rows` | ShiftRows / InvShiftRows. It is applied to the lookup addresses, which is legal because a byte permutation commutes with a bytewise substitution |
| `mix_columns` | MixColumns. InvMixColumns is formed as `MixColumns(P(s))`, where `P` multiplies every column by `{04}x^2 + {05}` |
| one 128-bit XOR | AddRoundKey for both directions |
| `key_expand` | one key-schedule step, forward or backward, sharing the SubWord lookup and XOR chain |
| state, key, input and output registers | both directions |

The RAM reads are synchronous, so a round takes two clocks:

* **Phase A (lookup):** the state bytes, after (Inv)ShiftRows, and the
  rotated key word go to the RAM addresses.
* **Phase B (compute):** the bytes come back. `key_expand` forms the next
  round key, and the new state is registered.

```
encrypt round r = 1..10:   state <= MixColumns(Sub(Shift(state))) ^ K(r)
                           (no MixColumns in round 10)
decrypt round r = 1..10:   state <= InvSub(InvShift(InvMix(state))) ^ K(10-r)
                           (no InvMix in round 1)
```

The decryption order is the standard inverse cipher with each InvMixColumns
moved to the start of the next round. This lets the one mix_columns unit work
on the registered state in phase A when decrypting, and on the RAM data in
phase B when encrypting. There is no combinational loop and only one
AddRoundKey XOR.

### Key schedule in both directions

The forward step computes `w0' = w0 ^ SubWord(RotWord(w3)) ^ rcon`, and then
`w1' = w1 ^ w0'` and so on. The backward step first recovers
`w3' = w3 ^ w2`, `w2' = w2 ^ w1` and `w1' = w1 ^ w0`, and then
`w0' = w0 ^ SubWord(RotWord(w3')) ^ rcon`. Only the word being looked up and
the inner XOR chain differ. The round constant goes forward by xtime (x02)
and backward by x8D (= 02^-1).

Decryption needs the last round key first. On a decrypt request the core runs
ten forward steps (two clocks each, using the key-schedule RAMs). It then
decrypts while running the schedule backward. Nothing is stored between
blocks, so every decryption pays this cost again.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset, which also restarts the S-box fill |
| `start` | in | 1 | one-clock request, taken only while `ready` |
| `decrypt` | in | 1 | 0 encrypt, 1 decrypt |
| `key_in`, `data_in` | in | 128 | key and block, FIPS-197 byte order (byte 0 in bits 127:120) |
| `ready` | out | 1 | S-boxes filled and core idle |
| `busy` | out | 1 | filling or processing |
| `done` | out | 1 | one-clock pulse; `data_out` is valid |
| `data_out` | out | 128 | output register, held until the next result |

* `ready` rises 258 clock edges after reset is released: one start clock,
  256 write clocks and one hand-over clock.
* Encryption: `done` and the result arrive 20 clock edges after the edge
  that took `start` (10 rounds x 2 clocks).
* Decryption: 40 edges (10 key steps + 10 rounds, 2 clocks each).
* `key_in`, `data_in` and `decrypt` are sampled only with `start`. A `start`
  during the fill or during a block is ignored.

Stopping the clock is a valid standby mode. All state is in flip-flops and
RAM, and both hold their contents, so the S-box tables survive and need no
second fill as long as power stays on.

## How far to trust it, and where it departs

Verified in simulation:

* The generator's 512 RAM words equal the S-box and inverse S-box computed by
  exhaustive inversion.
* BT is checked to be a field isomorphism on all 65,536 products.
* The full core reproduces the FIPS-197 example vectors (appendices B and
  C.1).
* The full core matches a separate reference model for random keys and
  blocks in both directions. Encrypt-then-decrypt round trips are checked.

Choices this design makes where the source architecture gives only the
function:

* **Two clocks per round.** The source does not state a cycle count. The
  registered RAM read sets the phase split used here.
* **Ten RAMs.** The source places the 16 state S-boxes in 8 RAMs and reports
  10 memory blocks in total. Here the other two hold the four key-schedule
  S-boxes.
* **One generator for all RAMs**, writing all ten in parallel.
* **Zero element.** It gets its own fill cycle.
* **Decryption key.** It is obtained by running the forward schedule at
  each decrypt request, which gives the 40-clock decryption.
* **InvMixColumns decomposition.** The factor used is `{04}x^2 + {05}`.
* **Handshake and reset.** The start/ready/busy/done handshake and the
  reset behaviour are this design's own.
* **RAM behaviour.** `tdp_ram` is a generic read-first RAM that a synthesis
  tool infers as a block RAM. It is not a vendor macro, and it uses 8 of the
  9 bits an FPGA RAM word may have.

Not included:

* The host link (a USB interface feeds keys and data in the measured
  systems). The cipher's ports are where it would attach.
* The comparison S-box styles. These are an all-logic composite-field S-box,
  and a counter plus composite-field generator filling the same RAM.
* Area, clock frequency and power figures. They belong to specific FPGA
  families and are not reproduced by RTL simulation.

## Files

| file | contents |
|---|---|
| `rtl/aes_pkg.sv` | types, field constants, xtime helpers |
| `rtl/lfsr_pair.sv` | alpha^i / beta^i LFSRs over GF(2^8)/11D |
| `rtl/basis_transform.sv` | BT: generator field to AES field |
| `rtl/at_bt.sv` | combined affine + basis transformation |
| `rtl/sbox_gen.sv` | table generator and fill sequencer |
| `rtl/tdp_ram.sv` | 512x8 true dual-port RAM |
| `rtl/dual_sbox.sv` | RAM with init/lookup port multiplexing |
| `rtl/shift_rows.sv`, `rtl/mix_columns.sv`, `rtl/key_expand.sv` | round functions |
| `rtl/aes_lfsr_lut.sv` | top: cipher/decipher with controller |
| `tb/aes_ref_pkg.sv` | independent reference model (testbench only) |
| `tb/tb_<module>.sv` | self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. For
example, the end-to-end test:

```
verilator --binary --timing --top-module tb_aes_lfsr_lut -y rtl -y tb +libext+.sv \
  -Irtl rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_lfsr_lut.sv
./obj_dir/Vtb_aes_lfsr_lut
```

Swap the top-module name to run any other `tb_<module>`. All testbenches run
in well under a second. The top has no parameters. The ten-RAM arrangement is
fixed by local parameters in `aes_lfsr_lut`, and the field constants are in
`aes_pkg`.

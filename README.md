# AES-128 with a key-dependent S-box, CBC mode

This is a synthesizable SystemVerilog implementation of AES-128 where the
fixed S-box is replaced by a *dynamic* one derived from the secret key.
The idea is simple: take one byte of the cipher key, `key7`, and XOR it
into every entry of the standard AES S-box:

    S_dyn(x)     = S_AES(x) ^ key7
    S_dyn^-1(y)  = S_AES^-1(y ^ key7)

Each key therefore selects one of 256 S-boxes, and the two ends of a link
need to share nothing beyond the key itself. Because the new S-box is the
old one followed by a constant XOR, it keeps the standard S-box's
bijectivity, nonlinearity (112) and avalanche behaviour. With `key7 = 0`
it is the ordinary AES S-box.

The scheme and its CBC use follow the paper *FPGA Implementation of
AES-Based on Optimized Dynamic s-Box*, which builds it by high-level
synthesis for a Zynq XC7Z020 and reports 540.54 MHz and 69.19 Gbit/s
(128 bits per clock) in CBC mode. The RTL here is an independent
implementation. The paper describes the algorithm and its throughput,
not a register-level structure, so the pipeline, the interface and the
CBC flow control are this design's own. Where it departs from the paper,
or reads an unclear point one way, is listed at the end.

Everything else follows AES-128: 10 rounds of SubBytes, ShiftRows,
MixColumns and AddRoundKey, and the same rounds inverted for decryption.
The cipher runs in CBC (cipher block chaining) mode, in both directions.

## Where the key byte goes

The key byte enters in two places:

* **Rounds.** Every SubBytes and InvSubBytes uses the dynamic S-box
  (`aes_dyn_sbox`, `aes_dyn_inv_sbox`). Neither one builds a table. The
  constant standard S-box ROM is read, and the key byte is XORed after the
  read (forward) or before it (inverse). A key change therefore takes
  effect at once, with nothing to rewrite.
* **Key schedule.** `SubWord` in the key expansion uses the same dynamic
  S-box (`DYN_KEY_SCHEDULE = 1`). The round keys therefore differ from
  standard AES as well. `DYN_KEY_SCHEDULE = 0` restores the standard key
  schedule, leaving the dynamic S-box only in the rounds.

**Which byte is used.** `KEY_BYTE_IDX` counts bytes in the order they are
sent, with byte 0 = `key[127:120]`. The default is **9**. The reference
example for this design uses the key `1C F3 46 12 45 6E 91 36 67 6F 11 23
87 AA FE D0`. It builds its S-box from the byte `6F`, so its first entry
is `63 ^ 6F = 0C`. `6F` is byte 9 of that key. It is also the "7th byte"
of the key when the key is loaded column by column into the 4x4 AES state
and the state is read row by row, which explains the name `key7`. Any
other index works the same way.

## Pipeline structure

```
              key ──► aes_key_expand ──► round_keys[0..10], key7
                                     │
in_block ─┬─► (^ chain) ─► aes_enc_pipe: ARK ► 9 x enc_round ► final ─┐
          │                                                           ├─► out_block
          └─────────────► aes_dec_pipe: ARK ► 9 x dec_round ► final ─┘
                                     (^ delayed chain)
```

* `aes_enc_pipe` and `aes_dec_pipe` are fully unrolled. They have one
  register stage for the initial AddRoundKey and one per round, so
  **11 clocks of latency and one 128-bit block per clock**.
* `aes_enc_round` computes `MixColumns(ShiftRows(SubBytes(s))) ^ k`. The
  final round (`FINAL = 1`) leaves out MixColumns.
* `aes_dec_round` uses the step order InvShiftRows, InvSubBytes,
  InvMixColumns, AddRoundKey. With InvMixColumns placed before the key
  addition, this is the *equivalent inverse cipher*. Each round key is
  therefore passed through InvMixColumns inside the round before it is
  XORed in. Only the full chain of ten rounds inverts encryption, not a
  single round on its own. Both pipelines take the same 11 round keys,
  and the decryption pipeline uses them in reverse order.
* `aes_key_expand` is iterative. The edge that samples `key_load` latches
  the key and `key7`. Ten more clocks produce round keys 1 to 10, and then
  `key_ready` rises: 11 clocks in all. It holds 11 x 128 bits of round
  keys.

## CBC chaining and its timing

`aes_cbc_top` adds the chaining:

| direction | formula | rate for one stream |
|---|---|---|
| encrypt | `C_i = E(P_i ^ C_{i-1})`, `C_0 = IV` | 1 block / 12 clocks |
| decrypt | `P_i = D(C_i) ^ C_{i-1}` | 1 block / clock |

Encryption cannot use the pipeline fully, because each block needs the
ciphertext of the block before it. `in_ready` stays low until that
ciphertext leaves the pipeline (11 clocks), and the next block is taken on
the following clock. Decryption has no such dependency. Each block is
accepted at once, and its `C_{i-1}` travels beside it in an 11-deep delay
line, to be XORed onto the pipeline output.

Interface rules (`aes_cbc_top`):

* `key_load` and `iv_load` are honoured only while `idle` is high (no
  block in flight). While a load is being requested, no block is accepted.
* Blocks enter on `in_valid && in_ready`. `decrypt` is sampled with each
  block.
* A block whose direction differs from the blocks in flight waits until
  the pipeline has drained.
* Results leave with a one-clock `out_valid` pulse. There is no
  back-pressure, so the consumer must take every result.
* The chaining value carries on across direction changes. It is the last
  ciphertext seen, whichever direction that block went. Load a new IV to
  start a new message.
* Reset (`rst_n`, asynchronous, active low) clears the control state, the
  round keys and the chaining value. The data pipeline registers are not
  reset, and only their valid bits are cleared.

Assertions in `aes_cbc_top` check three rules. No result appears without
a block in flight. At most one encryption block is in flight. The two
pipelines never deliver in the same clock.

## Byte order

A 128-bit block holds 16 bytes, with byte 0 in bits `[127:120]`. State
byte `i` is at row `i % 4`, column `i / 4`, as in FIPS-197. So
`128'h00112233445566778899aabbccddeeff` is the FIPS-197 plaintext in its
usual notation. The S-box and inverse S-box are not typed in as tables.
`aes_pkg` computes them during elaboration from their definition: the
multiplicative inverse in GF(2^8) modulo `x^8+x^4+x^3+x+1`, then the
affine map with constant `0x63`.

## Files

| file | contents |
|---|---|
| `rtl/aes_pkg.sv` | types, GF(2^8) functions, computed S-box tables, (Inv)ShiftRows |
| `rtl/aes_dyn_sbox.sv`, `rtl/aes_dyn_inv_sbox.sv` | one byte of the dynamic S-box and its inverse |
| `rtl/aes_mix_columns.sv` | MixColumns, or InvMixColumns when `INVERSE = 1` |
| `rtl/aes_enc_round.sv`, `rtl/aes_dec_round.sv` | one registered round each; `FINAL` drops (Inv)MixColumns |
| `rtl/aes_key_expand.sv` | key latch, `key7` selection, iterative key schedule |
| `rtl/aes_enc_pipe.sv`, `rtl/aes_dec_pipe.sv` | the unrolled 11-stage pipelines |
| `rtl/aes_cbc_top.sv` | the top: CBC chaining, flow control, assertions |
| `tb/aes_ref_pkg.sv` | independent reference model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the workloads below |

Top-level parameters: `KEY_BYTE_IDX` (default 9) and `DYN_KEY_SCHEDULE`
(default 1).

## Verification

Every testbench checks against `tb/aes_ref_pkg.sv`, which is written
separately from the RTL. It finds the S-box by brute-force search for
inverses, uses the rotate form of the affine map, and decrypts with the
plain inverse cipher rather than the equivalent one. Each testbench ends
with a line `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_aes_dyn_sbox` and `tb_aes_dyn_inv_sbox` run all 256 inputs for
  several key bytes. They also check the worked example `63 ^ 6F = 0C`,
  the first row of the S-box for key byte `6F`, and bijectivity.
* `tb_aes_mix_columns` checks a textbook column
  (`db 13 53 45 -> 8e 4d a1 bc`), random states and round trips.
* `tb_aes_enc_round` and `tb_aes_dec_round` compare random states with the
  model and check the one-clock latency.
* `tb_aes_key_expand` checks the FIPS-197 round keys with the standard
  schedule and the dynamic schedule against the model. It also checks the
  11-clock timing and a restart in mid-expansion.
* `tb_aes_enc_pipe` and `tb_aes_dec_pipe` check the FIPS-197 known answer
  (`69c4e0d8...b4c55a`, with `key7 = 0` and the standard schedule). They
  also run bursts of back-to-back blocks with the dynamic S-box, with an
  exact 11-clock latency.
* `tb_aes_cbc_top` is the end-to-end test. It covers a CBC encrypt stream
  (blocks exactly 12 clocks apart) and the back-to-back decrypt of it. It
  also covers loads that are ignored while busy, a key change, and random
  changes of direction with blocks in flight. Each of these mechanisms is
  counted, and one that never occurs counts as a failure.
* `tb_sbox_properties` reads the S-boxes for key bytes `00`, `23`, `6F`
  and `D7` out of the RTL. For each one it measures bijectivity, the
  nonlinearity from the Walsh spectrum (112 for all four) and the average
  strict avalanche value (0.5049 for all four; a constant XOR cannot
  change it).
* `tb_image_cbc` runs the full design at its default parameters. It
  encrypts three generated 256x256 grayscale images (4096 blocks each) in
  CBC mode with key bytes `23`, `6F` and `D7`, and checks every block
  against the model. It then decrypts each image and checks that the image
  comes back exactly. It also checks:
  * the Hamming distance between plain and cipher image (50 ± 1 %);
  * the histogram chi-square against the 5 % critical value, 293.24;
  * for each image, 100 re-encryptions with one random key bit flipped.
    Every one must differ from the first ciphertext in 50 ± 1 % of its
    bits. The measured means are 0.49985 to 0.50010.

  Measured rates are 12.00 clocks per block for encryption and 1.00 clock
  per block for decryption. The test takes about 30 s.

To simulate with plain Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert --top-module tb_aes_cbc_top \
  -y rtl -y tb +libext+.sv rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_cbc_top.sv
./obj_dir/Vtb_aes_cbc_top
```

Packages (`aes_pkg`, and `aes_ref_pkg` for testbenches) must come first on
the command line. `-y rtl -y tb` finds the rest.

## Departures from the paper, and limits

* **CBC encryption rate.** The paper computes its throughput as 128 bits
  times the clock frequency, which means one block per clock, and quotes
  it for CBC. Here the pipeline does take one block per clock, and CBC
  decryption runs at that rate. CBC encryption of a single stream cannot:
  each block waits for the previous ciphertext, so it runs at one block
  every 12 clocks. Reaching full rate would need several independent
  streams interleaved, which is not built.
* **Unrolled rounds.** The paper's flow diagram shows the rounds as a
  loop. Here they are unrolled into a pipeline to reach one block per
  clock. An iterative core would be far smaller, at 10 or more clocks per
  block.
* **Choice of byte.** The paper calls the S-box byte the "7th byte" of the
  key. Its worked example selects `6F`, byte 9 in transmission order, and
  this design follows the example (see above). Check `KEY_BYTE_IDX` before
  comparing test vectors with other implementations.
* **Dynamic key schedule.** The paper says that both the key update and
  SubBytes use the new S-box. Here that is read as `SubWord` in the key
  schedule using the dynamic S-box. `DYN_KEY_SCHEDULE = 0` gives the other
  reading, with only the rounds using it.
* **Decryption structure.** The paper's round diagram places InvMixColumns
  before the round key addition. This design keeps that order and
  transforms the round keys to match (the equivalent inverse cipher). The
  result is the same as the straightforward inverse cipher.
* **Final round.** The paper's diagram shows a key addition inside the
  final round and another one after it. This design applies a single
  final AddRoundKey, as AES does.
* **S-box statistics.** The paper lists slightly different average SAC
  values for its three dynamic S-boxes (0.499, 0.4954, 0.4982) than for
  AES (0.5048). XORing a constant onto every output cannot change any
  output difference, so all of them measure 0.5049 here, and NL = 112,
  as the paper reports.
* **Images.** The paper's test images are not reproduced. The image
  testbench generates three synthetic 256x256 images of the same size.
* **What is fixed.** Only AES-128 is built; the paper mentions 192- and
  256-bit keys only as future work. There is no padding: messages must
  be a whole number of 16-byte blocks.
* **No measurements.** Clock frequency and FPGA resource use have not been
  measured. Every S-box lookup is its own 256-entry ROM: 16 per round,
  160 in each pipeline and 4 in the key schedule, 324 in all.

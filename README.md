# Mixture encoder, virtual-RAM channel and SC polar decoder (N = 32)

This is a small 5G-style polar-code link that fits in a single FPGA clock
domain. It has four parts:

- **Transmit side.** A lightweight "mixture" encoder turns a 32-bit vector
  into a polar codeword. Alongside the codeword it produces four short hashes
  and a 16-bit verification vector.
- **Channel.** There is no modelled radio channel. Encoded words go into a
  block RAM split into virtual channels, and come back out of it.
- **Receive side.** A successive-cancellation (SC) decoder recovers the data.
  The decoder is skipped when the received word is already a clean codeword.
- **Self-test.** A built-in self-test (BIST) exercises the encoder with
  pseudo-random patterns. It checks the result against a signature before any
  user data is let through.

The goal is a low-logic, verifiable link:

- The encoder is pure XOR/AND logic.
- The channel is plain memory.
- The decoder uses one row of 16 processing units for the whole code tree.
- The transmit side checks itself at start-up and on request.

```
 frame ─► bist_module ─► encoder_controller ─► mixture_encoder ─► vram_dma ◄─► virtual_ram
          (parity,         (rate 1/2 / 2/3       (dc, h1..h4, V)      │
           self-test)       bit placement)                            ▼
                                          output_assembler ◄─ vram_polar_decoder ◄─ noise[]
                                          (info bits out)     (LLRs, early exit, SC, hash check)
```

All modules are in `rtl/`; shared types and functions are in `rtl/polar_pkg.sv`.

## Code and rate modes

- **Length.** The code length is N = 32. The frozen/information split comes
  from the 5G NR polar reliability order, restricted to indices below 32.
- **Rate 1/2** (`RATE_1_2`). K = 16. The information positions are
  {7, 11, 13, 14, 15, 19, 21, 22, 23, 25, 26, 27, 28, 29, 30, 31}.
- **Rate 2/3** (`RATE_2_3`). K = 21. It adds positions {10, 12, 18, 20, 24}.

The rate is chosen per frame (`in_rate`), and it travels with the frame
through the RAM to the decoder. `encoder_controller` places the K
information bits on the information positions in ascending index order, and
sets the frozen positions to 0. During self-test it passes the test pattern
instead.

## Mixture encoder

The encoder has four layers. Everything in it is combinational except the
output registers. For a 32-bit input `d`, the layers compute the following:

1. **Polar transform.** `x = d · F⊗5`, with `F = [1 0; 1 1]`, in natural
   bit order. It is built as five butterfly stages of XORs, so
   `x[j] = XOR of d[i]` over every `i` whose set bits include those of `j`.
2. **Mixing units.** Each unit computes `O = I0 ^ I1 ^ (I2 & I3)`. This is
   the minimised form of the encoder's six-product 4-input function, and
   `mix_unit` is checked against all 16 rows of that function. There are
   four units for each byte lane of `d`. Lane bits `(I0,I1,I2,I3)` feed the
   units as `(0,3,1,2)`, `(0,2,4,5)`, `(3,6,5,7)` and `(6,7,1,4)`, so every
   lane bit feeds exactly two units.
3. **Hashes.** `h_k` (5 bits) is the hash of byte lane `k-1`. Bit 0 is the
   lane parity, and bits 1–4 are the four mixing outputs. The verification
   vector is `V = d[31:16] ^ d[15:0]`.
4. **Output.** `dc = x ^ H`, where `H` puts `h_k` in the low five bits of
   byte lane `k-1`. `dc`, `h1..h4` and `V` are registered when `en = 1`.
   `valid` follows one clock later.

Two worked values appear in the encoder testbench:

| `d` | `h1` | `h2` | `h3` | `h4` | `V` |
|---|---|---|---|---|---|
| 4096 | 00000 | 00001 | 00000 | 00000 | 0x1000 |
| 2500 | 01101 | 01100 | 00000 | 00000 | 2500 |

The receiver can always undo `H`, because `h1..h4` are stored next to `dc`.
The SC decoder therefore sees a plain polar codeword.

## Virtual-RAM channel and DMA

`virtual_ram` is a simple dual-port synchronous RAM of 512 × 69 bits:

- Each word holds `dc`, `h1..h4`, `V` and the rate.
- This fits two 18-Kbit block RAMs.
- Reads take one clock, and the contents are not reset.

`vram_dma` splits the RAM into `NUM_VCH = 4` equal regions, one per virtual
channel. Each region is used as a circular FIFO:

- **Writes.** A word tagged with virtual channel `c` goes to region `c`. If
  that region is full, the word is dropped and `overflow_cnt` goes up.
- **Reads.** Non-empty channels are served round-robin, one word at a time.
  The word is offered to the decoder and held until it is taken
  (`dec_valid`/`dec_ready`).

Because the encoder takes one frame per clock, the RAM is also the buffer
that absorbs bursts while the decoder is busy.

## Receiver: LLRs, early exit and SC decoding

`vram_polar_decoder` handles one word at a time:

1. **Strip the hashes.** It computes `y = dc ^ H(h1..h4)`.
2. **Build channel LLRs.** Each bit `y[j]` becomes a 6-bit LLR:
   `+AMP` for 0, `−AMP` for 1 (`AMP = 8`). The signed `noise[j]` input is
   added, and the result saturates to ±31. `noise[]` is where artificial
   channel noise is injected; drive zeros for a clean channel.
3. **Early exit.** The hard decisions of the LLRs are transformed back
   (`u = y' · F⊗5`; the transform is its own inverse). The SC decoder is not
   started, and `early = 1`, if both of these hold:
   - every frozen position of `u` is 0;
   - every |LLR| is at least `et_thresh`.

   The result is out 3 clocks after the word was accepted.
4. **SC decoding.** Otherwise `sc_decoder` runs. The result is out 66 clocks
   after acceptance.
5. **Hash check.** `h1..h4` and `V` are recomputed from the decoded vector.
   `hash_ok` is set when they match the received ones.

`hash_ok = 0` on an SC-decoded frame means the decoder settled on a
different codeword. That happens when the noise exceeded what the code can
correct.

### SC decoder schedule

This is the part of the design that takes the most care. SC decoding visits
the 63 nodes of the code tree depth-first. At each node it computes the LLRs
of one child from the parent's LLRs `a` (first half) and `b` (second half):

```
f(a,b) = sgn(a)·sgn(b)·min(|a|,|b|)          left child
g(a,b) = b + (1 − 2β)·a                       right child, β = partial sums
```

At a leaf, the bit is 0 if frozen. Otherwise it is 0 for LLR ≥ 0 and 1 for
LLR < 0.

`sc_decoder` has the following structure:

- **Storage.** It keeps one LLR array per tree level: `alpha[5]` holds the 32
  channel LLRs and `alpha[0]` holds one leaf LLR. Only one node of each level
  is live at a time, so N LLRs per level are enough.
- **Compute.** It computes one node per clock on a row of N/2 = 16
  processing units. Each unit can do `f` or `g`.
- **Schedule.** After leaf `i` is decided, the next node is a `g` at level
  `ctz(i+1)` (the number of trailing zeros). That is followed by `f` steps
  down to level 0, where leaf `i+1` is decided in the same clock as its last
  `f`. Leaf 0 needs five `f` steps. Each leaf `i > 0` needs `ctz(i)+1` steps.
  Over 32 leaves this sums to 2N − 2 = 62 compute clocks.
- **Timing.** `done` rises 63 clocks after `start`, and `u_hat` holds until
  the next `start`.
- **Partial sums.** The partial sums `β` are not stored. For a `g` at level
  `l`, they are the polar transform of the 2^l bits just decided, recomputed
  from `u_hat` in the same clock.
- **Arithmetic.** Internal LLRs are 8 bits. `g` saturates at ±127, and `f`
  cannot overflow.

The testbench compares every decoded word with an independent model. That
model recomputes each leaf LLR from the root by plain recursion, with the
same saturation.

## Built-in self-test

`bist_module` sits in front of the encoder and runs in two modes.

**Test mode.** This runs after reset and whenever `bist_start` is pulsed:

- An 8-bit Fibonacci LFSR with polynomial x⁸+x⁶+x³+x²+1 and seed `0x01`
  steps through 256 patterns. Its period is 255, so the last pattern repeats
  the first.
- Each state `p` is widened to a 32-bit test word together with the
  pattern index `i`: `{p, bitreverse(p), p ^ i, bitreverse(p) ^ nibble-swapped i}`.
  An expansion of `p` alone spans only 8 dimensions, which leaves some
  encoder outputs constant during the test. Mixing in the index lets every
  encoder pin but one toggle.
- The encoder encodes each test word. Its 68-bit response, in the order
  `dc, h1..h4, V`, is XOR-folded as five 16-bit slices. The folded value is
  clocked into a 16-bit MISR (polynomial x¹⁶+x¹²+x⁵+1, seed 0).
- After one drain clock, the signature is compared with the reference
  (`polar_pkg::BIST_GOLDEN`, 0x14e2).
- The reference is not a stored constant: it is computed at elaboration time
  by a function that runs the same patterns through a model of the encoder.
  If you change the encoder, the hash pairing or the test-word expansion,
  the reference follows.
- The test takes 258 clocks: 256 patterns, 1 drain and 1 compare.
- `tb_bist_coverage` places every single stuck-at fault on the encoder's
  100 pins (200 faults) and runs a full test for each fault. The test
  catches 199 of them, or 99.5 %. The miss is `dc[24]` stuck at 0. That
  output is always 0: bit 24 of the polar transform is the parity of
  `d[31:24]`, and that parity is exactly the `h4[0]` XORed onto it. Faults
  inside the encoder are not covered by this count.

**Normal mode.** This applies after a passing test:

- Frames are accepted (`in_ready = 1`) and checked for even parity over
  `in_info`.
- Frames that pass are forwarded one clock later with `out_en`. Frames that
  fail are dropped and counted in `parity_err_cnt`.
- After a failed test, `bist_fail` is set and no frames are accepted until a
  later test passes.
- An assertion checks that a data frame and a test pattern never reach the
  encoder in the same clock.

## Top level: `polar5g_top`

The top has these parameters:

| Parameter | Default |
|---|---|
| `VRAM_DEPTH` | 512 |
| `NUM_VCH` | 4 |
| `Q` | 6 |
| `W` | 8 |
| `AMP` | 8 |

Its ports are plain signals:

- **Input frames:** `in_valid`/`in_ready`, `in_info[20:0]`, `in_rate`,
  `in_vch`, `in_parity`.
- **Channel and decoder controls:** `noise[32]` and `et_thresh`.
- **Results:** `out_valid`, `out_info`, `out_rate`, `out_vch`,
  `out_hash_ok`, `out_early`.
- **Status:** `bist_done`, `hw_ok`, `bist_fail`, `bist_signature`,
  `parity_err_cnt`, `overflow_cnt`.

When a frame meets an idle chain and takes the early path, `out_valid`
rises 8 clocks after the clock edge that accepts it. Through the SC path it
takes 63 clocks more. Reset
is synchronous and active low throughout.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The testbenches share
the independent reference models in `tb/tb_ref_pkg.sv`.

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/polar_pkg.sv tb/tb_ref_pkg.sv tb/tb_polar5g_top.sv --top-module tb_polar5g_top
./obj_dir/Vtb_polar5g_top
```

Replace `tb_polar5g_top` with any other `tb_<block>` to test that block.
Two more testbenches measure the design rather than test one block:

- `tb_ber_awgn` runs the error-rate sweep described below.
- `tb_bist_coverage` measures the self-test's fault coverage (see
  Built-in self-test).

`tb_polar5g_top` runs the whole chain at default parameters for about 1000
checks. It makes each of these happen and counts it, and fails if any count
is zero:

- both rates and all virtual channels;
- early exits and SC decodes;
- corrected frames and hash mismatches under heavy noise;
- RAM overflow drops;
- frames refused during self-test;
- parity drops;
- a repeated self-test.

`tb_ber_awgn` sweeps the whole chain, at default parameters, over an
additive white Gaussian noise channel:

- Eb/N0 runs from 1.4 to 3.4 dB in 0.5 dB steps, at both rates, with 100
  frames per point.
- The noise is injected through `noise[]`. `AMP` acts as the BPSK amplitude,
  so σ = AMP / √(2·R·Eb/N0).
- Every frame is checked exactly against the reference models.
- It prints bit and frame error rates next to the raw channel error rate.

In one run, the information BER fell as follows from 1.4 to 3.4 dB:

| Rate | BER at 1.4 dB | BER at 3.4 dB | Raw channel error at 3.4 dB |
|---|---|---|---|
| 1/2 | 0.080 | 0.019 | 0.075 |
| 2/3 | 0.086 | 0.006 | 0.046 |

## Where this design departs from, or fills in, its source

**Mixing matrix.** The source describes `M` only as "derived from the polar
generator". Here it is exactly F⊗5. That makes `dc` decodable by a standard
SC decoder.

**Hashes and V.** The source describes the verification vector both ways:

- as a merge of the hashes;
- through example values that equal the 16-bit fold of the data.

This design uses the fold. The bit pairing of the hashes is this design's
own choice. It reproduces the published example hashes for inputs 4096 and
2500. For 4096, the source also quotes the encoded output as 4096. This
design gives `0x00011111 ^ H` instead.

**Information sets, rate modes, widths, handshakes, virtual-channel layout
and MISR polynomial.** The source does not give these; they are this
design's own choices.

**Early termination.** The source mentions a reliability threshold but not
the test. Here the test is the zero frozen syndrome plus minimum |LLR|
described above. It is checked before decoding, not inside the SC loop.

**Self-test time.** The source quotes 3.2 µs per test. Here a test takes
258 clocks, which is 2.58 µs at 100 MHz. The source quotes 94.7 % fault
coverage for its own netlist. The 99.5 % above counts pin faults only.

**Latency and throughput.** The source quotes 8.47 ns decoder latency and
more than 1.6 Gb/s, with two different clock rates (207.4 MHz and 610 MHz).
A tree-sequential SC decoder cannot reach that latency. Here a decode takes
66 clocks, and the early path takes 3.

**Code length.** Only N = 32 is built. Longer frames (128–1024 bits) would
need a wider encoder, hash layout and package. `sc_decoder` itself is
parameterised in N.

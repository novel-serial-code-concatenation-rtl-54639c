# Serial code concatenation for error-floor mitigation

Iteratively decoded LDPC and turbo product codes (TPC) tend to have an error
floor. At high SNR, a few stubborn error patterns (trapping sets and the like)
survive decoding. They are rare, but at the 10^-15 output BER that optical links
demand they dominate. The classic cure puts a long outer BCH or RS code around
the whole frame. That costs overhead, and a large decoder that must handle
every frame.

This RTL implements a cheaper serial concatenation built from **two short
outer codes**:

* **C3** is a short binary BCH code applied to every data block.
* **C2** is a Reed-Solomon code that protects *only the C3 parities*.

The C3 parities are never transmitted. The receiver regenerates them from the
blocks that arrived clean. It then uses C2, in erasure mode, to rebuild the
parities of the few blocks that did not arrive clean. Only those blocks go
through the BCH decoder.

The repository contains the outer encoder and the outer decoder of this
scheme in two forms:

* **General scheme** (BCH C3 + RS C2): `scc_encoder`, `scc_decoder`.
* **Single-error-pattern variant** (BCH C3 + single-parity-check C2, for
  τ = 1): `spc_scc_encoder`, `spc_scc_decoder`.

Both are instantiated side by side in `scc_top`. The inner code C1 (LDPC or
TPC, with its iterative decoder) is **not** included. The top brings out the
points where it connects:

```
 tx_in_*  --> scc_encoder --> tx_d1_*  --> [C1 encoder, channel, C1 decoder] --> rx_d1_* --> scc_decoder --> rx_out_*
                                                  (flags corrupt datawords)   rx_d1_corrupt
```

## Frame format (general scheme)

One frame holds `m` inner codewords. The defaults are:

| item | value |
|---|---|
| m (`MF`) | 36 |
| C3 | BCH[1410,1311], d = 19, t = 9, over GF(2^11); R3 = 99 parity bits |
| C2 | RS[432,396], d = 37, over GF(2^9); 36 parity symbols = 324 bits |
| inner dataword K1 | 1311 + 9 = 1320 bits (the dimension of a [2640,1320] LDPC code) |
| uncoded bits per frame | 36 × 1311 = 47196 |

Encoding works as follows:

1. The frame is cut into `m` blocks D3^i of K3 bits. Each block is BCH-encoded, and only its parity P3^i (99 bits) is kept.
2. The 36 parities, in block order, are cut into 9-bit symbols. This gives 36 × 11 = 396 symbols: exactly one RS dataword D2, whose 36 parity symbols form P2.
3. P2 (324 bits) is cut into 36 slices of 9 bits. Inner dataword i is D1^i = D3^i ‖ slice i.

P3 is therefore implicit: the receiver can always recompute it from a block that arrived without errors.

## How the receiver repairs corrupt datawords

The inner decoder tells the receiver which of the `m` datawords still contain
errors. The receiver takes this on `in_corrupt`, sampled with the last bit of
each dataword. The receiver then proceeds in four steps:

1. **Re-encode.** Every received D3^i is BCH-encoded again. For clean
   datawords this reproduces the true P3^i. For corrupt ones the result is
   worthless.
2. **Erase.** The RS word D2 ‖ P2 is assembled from the regenerated P3 and
   the received P2 slices. Every symbol that depends on a corrupt dataword is
   marked as an erasure: its 11 P3 symbols, plus the P2 symbol that holds its
   9-bit slice. That makes 12 erasures per corrupt dataword. The RS code
   fills up to N−K = 36 erasures, so up to **τ = 3** corrupt datawords per
   frame can be repaired. Because errors are never searched for, the RS
   decoder needs only erasure arithmetic (no Berlekamp–Massey).
3. **Restore.** The RS erasure decoder returns the true P3^c of every corrupt
   dataword c.
4. **Correct.** For each corrupt dataword, D3^c ‖ P3^c is a complete BCH
   codeword with up to t = 9 bit errors. The BCH decoder fixes it. Clean blocks
   are passed on from the buffer untouched.

Only corrupt datawords cost BCH decoding time. With no corrupt dataword the
erasure step is skipped as well (`erasure_run` stays low).

Two failures are flagged and not corrected:

* **More than τ corrupt datawords** raises `rs_fail`. The data are passed on
  as received.
* **A BCH word that cannot be decoded** raises `bch_fail`. That block is
  passed on as received.

## Detecting corrupt datawords without help (parameter `G`)

Some inner codes give no reliable "I failed" signal. A turbo product code, for
example, can converge to a wrong codeword without noticing. For such links
`scc_encoder` and `scc_decoder` take a parameter `G`:

* The transmitter sends the top `G` bits of each P3^i inside its own
  dataword, right after D3^i. So D1^i = D3^i ‖ top G bits of P3^i ‖ slice i.
  Only the remaining R3 − G parity bits of each block feed the RS code.
* The receiver re-encodes each block. It marks a dataword corrupt if its
  regenerated top `G` bits differ from the received ones, or if
  `in_corrupt` flags it. Both can be used together; tie `in_corrupt` low to
  rely on detection alone.
* When a corrupt dataword is BCH-decoded, its parity is assembled from two
  parts:
  * the `G` bits as received (errors there are ordinary parity errors for
    the BCH decoder);
  * the R3 − G bits restored by the RS code.

A residual error pattern that leaves all `G` detection bits unchanged goes
unseen. For random patterns, that happens for roughly one in 2^G corrupt
datawords.

The sizes must still tile: (R3 − G) must be a multiple of the RS symbol size,
and m·(R3 − G)/M2 must equal K2. One example configuration: m = 36,
BCH[1410,1311], `G = 9` and RS[396,360]. That gives 10 + 1 = 11 erasures per
corrupt dataword, so τ = 3 and K1 = 1329. `G = 0` (the default) is the basic
scheme above.

## The τ = 1 variant

If a frame only ever needs to survive one bad inner codeword, C2 can be
reduced to R3 single-parity-check codes. The default configuration is
m = 10, with C3 = BCH[1397,1320] (t = 7, R3 = 77) and C2 = 77 × SPC[11,10].

| dataword | contents |
|---|---|
| D1^i, i < m | D3^i, the full K3 = 1320 data bits, nothing appended |
| D1^m | the last block of K3 − R3 = 1243 data bits, then P2 (77 bits) |

* Each P3^i is the BCH parity of D3^i.
* The last block is encoded as if it carried R3 leading zeros. The zeros are
  not sent.
* P2 = P3^1 ⊕ … ⊕ P3^m: bit j of P2 is the parity bit over bit j of all m
  parities.

**Transmitter** (`spc_scc_encoder`). It needs no frame buffer: bits go out
one cycle after they come in. P2 is an R3-bit XOR accumulator and leaves
R3 + 2 cycles after the last data bit. Before the last block, `in_ready`
drops for R3 cycles while the BCH encoder is fed the implicit zeros.

**Receiver** (`spc_scc_decoder`). It re-encodes all blocks. With exactly one
corrupt dataword c, it recovers P3^c = P2 ⊕ (⊕ of the other P3^i) and
BCH-decodes that dataword.

* If c is the last dataword, errors that hit the transmitted P2 bits are
  simply errors in the parity part of that BCH word. The BCH decoder corrects
  them together with the data errors, so nothing needs to be erased.
* With two or more corrupt datawords, `frame_fail` is raised and the frame is
  passed on as received.

## Codec blocks

* **`bch_encoder`** (LFSR). The generator polynomial is computed at
  elaboration: it is the product of the minimal polynomials of α, α³, …,
  α^(2t−1). Nothing is tabulated, so any (M, N, K, T) with N−K = M·T works.
  The parity appears one cycle after the K-th data bit.
* **`bch_decoder`**, four phases in sequence:
  1. Syndromes S1…S2t are accumulated while the word is stored.
  2. 2t iterations of inversionless Berlekamp–Massey.
  3. A Chien search over the N positions.
  4. Corrected output.

  If the number of roots differs from the locator degree, the word is passed
  unchanged and `dec_fail` is set. One word takes 3N + 2t + 2 cycles.
* **`rs_encoder`**. Symbol-serial LFSR with a generator polynomial computed
  at elaboration (roots α^FCR … α^(FCR+NPAR−1)).
* **`rs_erasure_decoder`**, erasure-only:
  1. Syndromes are computed with erased symbols taken as 0, while the erasure
     locator Γ(x) = Π(1 + X_k x) is built one factor per erasure.
  2. Ω(x) = S(x)Γ(x) mod x^NPAR.
  3. Forney's formula at each erased position:
     Y = Ω(X⁻¹) / (X^FCR · Σ_odd Γ_i X⁻ⁱ).

  More than NPAR erasures sets `dec_fail`. One word takes 2N + NPAR + 1
  cycles.
* **`frame_buffer`**. Single-port-write, synchronous-read RAM written as an
  array. It holds one frame of data bits.
* **`gf_pkg`**. GF(2^m) multiply, power and inverse as functions, used both
  for elaboration-time constants and for the datapath multipliers.

Field polynomials:

* GF(2^11): x^11 + x^2 + 1 (`'h805`).
* GF(2^9): x^9 + x^4 + 1 (`'h211`).
* The RS code's first consecutive root is α¹ (`FCR2 = 1`).

All codecs take these as parameters.

## Interfaces and timing

Every block uses the same conventions:

* Clock: `clk`.
* Reset: `rst_n`, active low and asynchronous.
* Data moves one bit per clock on `*_valid`/`*_bit` pairs.
* Inputs are accepted while `*_ready` is high.
* Outputs cannot be stalled. `out_first`/`out_last` mark each block, and
  `out_frame_last` marks the end of a frame on the transmitter.

| block | cycles per frame (defaults) |
|---|---|
| `scc_encoder` | load m·K3, about 13 cycles to finish P2, then m·K1 + 1 output cycles in one unbroken burst; a new frame is accepted after the burst |
| `scc_decoder` | load m·K1 (no stall); if any dataword is corrupt, 2·N2 + NPAR2 + 4 cycles of erasure decoding; output about m·K3 + c·(R3 + 2·N3 + 2t + 2) cycles for c corrupt datawords |
| `spc_scc_encoder` | m·K3 input cycles (including R3 idle cycles) + R3 + 2 |
| `spc_scc_decoder` | load m·K3 + R3, output about m·K3 + (2·N3 + 2t + R3 + 2) if one dataword is corrupt |

The decoder reports status with `frame_done`:

| decoder | status outputs |
|---|---|
| `scc_decoder` | `n_corrupt`, `erasure_run`, `rs_fail`, `bch_fail`, `n_erased`, `n_corrected` |
| `spc_scc_decoder` | `n_corrupt`, `frame_fail`, `n_corrected` |

The status stays valid until the next frame starts loading.

## Departures and limits

* **Serial datapath.** The codecs handle one bit (BCH) or one symbol (RS)
  per clock. A 100 Gb/s implementation would run the same algorithms p bits
  wide (for example p = 160 at 625 MHz). That parallel datapath is not
  provided. As written, the throughput is one data bit per clock, and less
  while a frame is being decoded.
* **Single buffering.** Each side holds one frame. A frame must be fully
  output before the next can load, so there is no double buffering and no
  overlap between load and decode.
* **Field polynomials and FCR** are this design's choices (see above).
  Changing them changes the code, not the scheme.
* **Size rules.** The sizes must satisfy:
  * R3 − G must be a multiple of the RS symbol size;
  * m·(R3 − G)/M2 must equal K2.

  Otherwise elaboration stops with an error.
* **Near-equal P2 slices.** If the P2 bit count does not divide by m, slice
  i takes bits ⌊i·P2/m⌋ to ⌊(i+1)·P2/m⌋ − 1, and datawords differ in length
  by one bit. A slice may then straddle one more RS symbol, so a corrupt
  dataword can cost one extra erasure. Check τ against the worst case.
  Example: m = 19, 640 P2 bits over GF(2^10) gives 33/34-bit slices that
  touch 4 or 5 symbols.
* **Not implemented:**
  * the inner LDPC/TPC codec;
  * the configuration whose C3 is itself a Reed-Solomon code.
* **Failure behaviour** (pass-through plus a flag) is this design's choice.

## Simulation

Each block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and stops on a watchdog if the design
hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
          --top-module tb_scc_top rtl/gf_pkg.sv tb/tb_scc_top.sv
./obj_dir/Vtb_scc_top
```

Swap `tb_scc_top` for any other testbench name.

`tb_scc_top` runs the whole top at its default sizes. It takes about five
seconds. In place of the inner decoder it flips up to 9 bits in chosen
datawords and raises their corrupt flags. It counts each mechanism and fails
if one never occurs:

* general scheme:
  * frames that bypass erasure decoding;
  * erasure decoding;
  * BCH correction;
  * a frame with exactly τ = 3 corrupt datawords;
  * a frame beyond capacity (`rs_fail`).
* τ = 1 variant:
  * a clean frame;
  * recovery of one corrupt dataword;
  * a corrupt last dataword, with P2 hit;
  * two corrupt datawords (`frame_fail`).

`tb_scc_tpceh` runs the outer codes at turbo-product-code sizes:

* m = 19;
* BCH[6753,6441] over GF(2^13) with t = 24;
* `G = 32`;
* RS[596,532] over GF(2^10);
* datawords of 6506 or 6507 bits.

It finds and repairs one corrupt dataword, then two, each with 24 errors.
Compiling it takes about two minutes.

`tb_scc_gdetect` runs the `G = 9` configuration described above. It injects
errors *without* raising `in_corrupt` and checks the following:

* the detection finds exactly the corrupt datawords;
* all blocks are restored;
* the flag path still works;
* overflow is reported.

The block testbenches compute their expected values independently of the
RTL:

* the BCH generator comes from cyclotomic cosets, with long division for the
  parities;
* RS codewords are checked by evaluating their syndromes;
* decoded blocks are compared against the original random data.

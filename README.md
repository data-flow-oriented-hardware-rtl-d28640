# Streaming residue polynomial multiplier for RNS-based homomorphic encryption

Somewhat-homomorphic encryption schemes such as FV spend most of their time
multiplying polynomials. The polynomials live in Z_Q[X]/(X^n + 1), and their
very large coefficient modulus Q is split by the residue number system (RNS)
into k word-sized primes q_i. A ciphertext product then breaks into many
independent *residue polynomial multiplications* (RPMs):

    C_i = A_i * B_i   in  Z_{q_i}[X] / (X^n + 1)

This repository holds a hardware RPM. It is a fully streaming pipeline. The
two operands enter at `w` coefficients per clock cycle, and the product leaves
at the same rate. A new product can start every `T = n/w` cycles, and every
product may use a different prime. All of the number-theoretic constants are
generated inside the pipeline from a few words sent with each product. At the
default size (n = 4096, w = 2, 30-bit primes) that means one product every
2048 cycles: 97.7 products per millisecond at 200 MHz. The streams carry
3·w·30 bits per cycle, which is 4.5 GB/s.

The multiplier (`rpm_top`) sits behind an AXI4-Stream wrapper with FIFOs
(`wrap_axi`). Together they form the top level, `rpm_system`. A host interface
such as a PCIe DMA engine connects to the four streams of `rpm_system`. That
host interface is not included.

## Negative wrapped convolution and the block chain

Multiplying modulo X^n + 1 is a *negative wrapped* (negacyclic) convolution.
Let ψ be a primitive 2n-th root of unity mod q, and let ω = ψ². Then:

    A' = Ψ .* A,  B' = Ψ .* B            Ψ = (ψ^0, ψ^1, …, ψ^(n-1))
    Â  = NTT_ω(A'),  B̂ = NTT_ω(B')
    Ĉ  = Â .* B̂
    C' = NTT_ω⁻¹(Ĉ)
    C  = (n⁻¹ Ψ⁻¹) .* C'

Here `.*` is the element-wise product mod q. The ψ weighting turns the cyclic
convolution that the NTT computes into the negacyclic one. No zero padding is
needed, so every transform has length n.

The hardware is a straight chain of streaming blocks with three twiddle flows
running alongside it:

```
 seeds ψ^1..ψ^w ─► GEN TW ──Ψ──► GEN ITW ──Ψ⁻¹──► GEN PCTW ──n⁻¹Ψ⁻¹──┐
                     │  Ω = even words of Ψ     │ Ω⁻¹ = even words of Ψ⁻¹
                     ▼                          ▼                     ▼
 A,B ─► VEC PW MM ─► VEC NTT (ω) ─► PW MM ─► NTT (ω⁻¹) ─────────► PW MM ─► C
        (× Ψ)        2 data paths,   Â.*B̂    1 data path            (× n⁻¹Ψ⁻¹)
                     1 twiddle bank
```

| Block | Module | Role |
|---|---|---|
| GEN TW | `gen_tw` | Streams Ψ from the seeds ψ^1..ψ^w, w words per cycle |
| GEN ITW | `gen_itw` | Derives Ψ⁻¹ from Ψ with no multiplications |
| GEN PCTW | `gen_pctw` | Scales Ψ⁻¹ by n⁻¹ |
| VEC PW MM | `pwmm` (2w lanes) | Weights A and B by Ψ |
| VEC NTT | `ntt_dp` (VEC=2) | Two forward NTT data paths in lock step, sharing one twiddle bank |
| PW MM | `pwmm` (w lanes) | Pointwise product Â .* B̂ |
| NTT | `ntt_dp` (VEC=1) | Inverse NTT, driven with ω⁻¹ |
| PW MM | `pwmm` (w lanes) | Weights by n⁻¹Ψ⁻¹ |

The twiddles that an NTT needs are the powers ω^j = ψ^(2j) for j < n/2. These
are exactly the even-indexed words of the Ψ flow. The inverse NTT likewise
takes the even-indexed words of Ψ⁻¹. So one generator and one derived flow
feed all five arithmetic stages.

## The streaming NTT: constant-geometry pairing

This is the part that takes the most thought. `ntt_dp` is a radix-2
decimation-in-time NTT. It accepts a frame of n words in natural order, w
words per cycle, and returns the transform in natural order. It can take a new
frame every n/w cycles and never stalls. Its structure is:

```
Init Perm ─► [ twiddle MM on odd word ─► NTT2 (u+v, u−v) ─► Perm 0 ] ─► … ─► [ … ─► Perm L−1 ]
(bit-reverse)          stage 0                                              stage L−1
```

There are L = log2 n stages, and every stage has the same shape. Each cycle
carries w/2 *pairs*: the words at stream positions (2b, 2b+1) form pair `b`.
The butterfly always combines the two words of a pair. The permutation after
each stage moves the words so that the next stage again finds its partners
side by side. This is what makes the geometry constant: each stage uses the
same w/2 butterflies with fixed wiring, and all of the data movement happens
in the permutation blocks.

The rules, for stage l (0 ≤ l < L):

* **Pairing.** Pair b holds the elements i and i + 2^l of the in-place DIT
  transform, where the block of pair b has size 2^(l+1) and i is its
  (b mod 2^l)-th element.
* **Twiddle.** The odd word is multiplied by ω^((b mod 2^l) · n/2^(l+1))
  before the butterfly.
* **Permutation.** Perm l takes position p of its output from position
  `perm_src(PERM_STAGE, l, L, p)` of its input. This re-pairs the elements
  that stage l+1 needs. After the last stage, the permutation restores natural
  order.
* **Init Perm.** This is the usual bit reversal.

The index functions (`bitrev`, `stage_elem`, `stage_pos`, `perm_src`) are in
`rpm_pkg`. Each permutation block is a `stream_perm` instance. It is a double
buffer of 2n words: one frame is written in stream order while the previous
frame is read out in permuted order. Its latency is n/w + 1 cycles.

Some multipliers always see the twiddle ω^0 = 1. These are stage 0, and way 0
of every stage with 2^l ≤ w/2. Those multipliers are left out and replaced by
delays of the same length.

The inverse transform is the same data path with the ω⁻¹ twiddle flow. The
scaling by n⁻¹ is folded into the last pointwise product.

## Twiddle banks and per-product reprogramming

Consecutive products may use different primes. An NTT pipeline holds many
frames at once (about 13 at the default size), so each `ntt_dp` contains a
twiddle bank (`twb`) with G copies of the per-prime state. Each copy holds
(q, v) and, for every stage l ≥ 1 and butterfly way t < w/2, the twiddles that
way uses:

* **Register (l,t).** When 2^l ≤ w/2, the way needs one constant.
* **Memory mem(l,t).** Otherwise the way needs D_l = 2^l/(w/2) values. It
  reads them at address (stage cycle mod D_l), with an asynchronous
  (distributed-RAM style) read.

A bank is written from the twiddle flow as it passes: Ω = ω^0 … ω^(n/2−1), in
order, w/2 words per cycle. Every (l,t) memory watches the flow position and
keeps the words it needs. A word ω^E is kept when n/2^(l+1) divides E, and it
is written at address (E / (n/2^(l+1))) / (w/2). Successive flows fill banks
0, 1, …, G−1, 0, … in turn.

On the read side, every stage has its own bank pointer. The pointer advances
when that stage's own frame marker arrives. Different stages can therefore
work on different primes in the same cycle, and the bank of a frame stays
valid until its last stage has used it.

The number of banks follows G = ⌈Lat/T⌉ + 1. Lat is measured from the start
of the NTT's twiddle flow to the end of its last stage. At the default size,
`twb_banks()` in `rpm_pkg` gives G = 15 for the forward NTT and G = 27 for the
inverse NTT. The inverse bank is programmed much earlier, as the flow passes,
than its data arrives.

## Generating the twiddles on the fly

For each product, the caller supplies only the following channel record:

| Field | Meaning |
|---|---|
| q | An RNS prime with q ≡ 1 mod 2n and 2^(QW−1) < q < 2^QW |
| v | The reduction constant floor(2^(2·QW)/q) |
| n⁻¹ | n⁻¹ mod q |
| seeds | ψ^1 … ψ^w, where ψ is a primitive 2n-th root of unity mod q |

The three generators build everything else from this record.

**GEN TW (`gen_tw`).** Group the flow into *bunches* of w consecutive powers:
bunch c = (ψ^(cw), …, ψ^(cw+w−1)). With f = ψ^(Jw), each bunch is f times the
bunch J positions earlier:

    bunch_{c+J} = f · bunch_c

Take J equal to the multiplier latency (4). Then a bank of w multipliers whose
outputs feed back into their own inputs produces one new bunch per cycle, with
no storage that grows with n.

A second multiplier bank starts each set. It computes bunches 0..J from the
seeds by repeated multiplication with ψ^w, and takes f from the first word of
bunch J. Its results go into one of two slots, so starting a set overlaps
streaming the previous one. The first Ψ word leaves `lat_gen()` = 18 cycles
after the product starts. A new set can start every max(T, 17) cycles.

**GEN ITW (`gen_itw`).** This block needs no multiplier. Because ψ^n = −1,
ψ^(−j) = q − ψ^(n−j) for 0 < j < n. Each word except the first is replaced by
q − ψ^j, and the frame is reversed in a `stream_perm` (output position j takes
input position (n − j) mod n).

**GEN PCTW (`gen_pctw`).** This block is w multipliers that scale the inverse
flow by n⁻¹.

## Timing, framing and alignment

Every stream in the design uses one framing rule. A one-cycle `next` marker
starts a frame, and the frame then occupies n/w consecutive cycles. Word k of
cycle c is element c·w + k. Channel data (q, v, n⁻¹) travels with each frame:
on the ports of the arithmetic blocks, or as the side band of the permutation
buffers. Every block has a fixed latency. No block has back-pressure.

The latencies are set by functions in `rpm_pkg`. At the defaults:

| Quantity | Formula | Cycles |
|---|---|---|
| Modular multiply | MM_LAT | 4 |
| Permutation | n/w + 1 | 2049 |
| NTT stage (MM + NTT2) | MM_LAT + 1 | 5 |
| NTT | perm + L·(stage + perm) | 26 697 |
| Twiddle generator | MM_LAT² + 2 | 18 |
| Whole RPM, `next_in` to `next_out` | `lat_rpm()` | 53 424 |

The data and the twiddle flows are lined up by fixed delays:

* A and B are delayed by the generator latency (`delay_line`). The Ψ weights
  then arrive with the coefficients.
* Each NTT's twiddle flow starts no later than its data. This holds because
  its bank only has to be complete before the first stage that reads it.
* The n⁻¹Ψ⁻¹ flow leaves GEN PCTW long before the inverse NTT output needs it.
  It waits in a `delay_line` of 51 349 cycles.

Assertions in `rpm_top` check each alignment. `stream_perm` asserts that
frames do not overlap.

## The AXI4-Stream wrapper

The multiplier takes a product as an unbroken burst of n/w cycles and cannot
be stalled. `wrap_axi` fits it to streaming interfaces that can stall.

| Stream | Content |
|---|---|
| `s_ds` | One channel record per product: q at [QW−1:0], v at [2QW:QW], n⁻¹ at [3QW:2QW+1], ψ^(k+1) at [(3+k)·QW+1 +: QW] |
| `s_a`, `s_b` | Operand coefficients, w per beat, n/w beats per polynomial |
| `m_c` | Result coefficients, w per beat, with `tlast` on the last beat of each product |

Each input has a first-word-fall-through FIFO (`sync_fifo`). A product is
launched only when all of the following hold:

1. A channel record is present.
2. n/w beats of A and of B are buffered.
3. The output FIFO can take the whole result: fill + reserved + n/w ≤
   OUT_DEPTH.

Each launch reserves n/w output entries. Each result beat that is written
releases one. A stalled `m_c` therefore never loses data. It slows down the
launches instead. Results come back in launch order.

The default depths are IN_DEPTH = 2·n/w, OUT_DEPTH = 4·n/w and DS_DEPTH = 4.
With these, a stalled output stops the launches after four products are in
flight. The multiplier holds about 26 frames, so four in flight is below its
full rate. Raise OUT_DEPTH to about ⌈lat_rpm/T⌉·n/w + n/w to keep full rate
under short stalls.

## Modular arithmetic

`mod_add` and `mod_sub` are combinational, with one conditional correction
each. `ntt2` is the registered butterfly (u + v, u − v).

`mod_mul` is a 4-stage Barrett multiplier with one result per cycle:

1. z = a·b
2. t = (z ≫ (QW−1))·v
3. r = z − (t ≫ (QW+1))·q, which is below 3q
4. Subtract 0, q or 2q.

It needs 2^(QW−1) < q < 2^QW so that v fits in QW+1 bits. `pwmm` is a row of
these multipliers. It passes (q, v) and the frame marker along with the data.

## What follows the source design and what is this design's own

These parts follow the published architecture:

* The NWC formulation and the block chain: GEN TW → GEN ITW → GEN PCTW
  alongside VEC PW MM → VEC NTT → PW MM → NTT → PW MM.
* The inputs per channel: q, v, n⁻¹ and ψ^1..ψ^w.
* The use of even-indexed flow words as NTT twiddles.
* Ψ⁻¹ obtained as a reordering of q − Ψ.
* The constant-geometry radix-2 NTT with an initial permutation and one
  permutation per stage.
* Twiddle banks reprogrammed from the flow, with a bank count of
  ⌈Lat/T⌉ + 1 and per-stage bank selection.
* Twiddle generation by the bunch recurrence, with storage independent of n.
* One product every n/w cycles.
* The wrapper with FIFOs between the multiplier and the host DMA streams.
* The default size n = 2^12, w = 2, 30-bit primes.

These are choices of this implementation:

* **Permutations.** Each permutation is a full double buffer of 2n words with
  latency n/w + 1. A hardware design can use far smaller, shorter-latency
  permuters. This choice makes the NTT latency, the bank count G and the
  alignment delay large. The design synthesises to about 22 Mbit of memory at
  the default size.
* **GEN TW internals.** The source design uses several generation handlers
  that share one multiplier bank under a cyclic priority, followed by sorting
  buffers. That is replaced here by a dedicated init bank, a feedback bank and
  two slots. The rate is the same whenever T ≥ 17.
* **Modular multiplier.** This design uses Barrett reduction with
  v = floor(2^(2QW)/q) and a latency of 4.
* **Alignment.** Flows are aligned by fixed-latency delay lines. There is no
  handshake inside the multiplier.
* **Wrapper.** The AXI4-Stream formats, the record layout, the FIFO depths and
  the output reservation rule are all this design's own.
* **Not included.** The PCIe endpoint, the DMA engines and the parameter
  stream host logic are left out. Their streams are the ports of
  `rpm_system`.

## Parameters and sizes

`N`, `W` and `QW` are parameters of every module. Their defaults come from
`rpm_pkg` (4096, 2 and 30). N and W must be powers of two with 2 ≤ W ≤ N/2.
`MM_LAT` is fixed at 4 in the package.

Larger configurations (n = 2^13 … 2^15, w up to 16, primes up to 62 bits) are
reached by changing these parameters. Only the default size and smaller ones
have been simulated.

## Simulating

Plain Verilator 5 is enough. Every testbench is self-checking and ends by
printing `TB_RESULT checks=… failures=…`.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/rpm_pkg.sv tb/tb_util_pkg.sv tb/tb_rpm_system.sv \
    --top-module tb_rpm_system -Mdir obj_sys -o sim
obj_sys/sim
```

Replace `tb_rpm_system` with any other testbench in `tb/`:

| Testbench | What it covers |
|---|---|
| `tb_mod_add`, `tb_mod_sub`, `tb_mod_mul`, `tb_ntt2` | Arithmetic against a reference model, with random operands and edge values |
| `tb_pwmm`, `tb_gen_pctw` | Vector multipliers, including the latency and the pass-through of (q, v) |
| `tb_stream_perm` | All three kinds of permutation, back-to-back frames and frames with gaps |
| `tb_twb` | Bank contents and per-stage bank switching |
| `tb_ntt_dp` | Five back-to-back transforms against a direct O(n²) evaluation (n = 32, w = 4, two lanes), each with a different prime, plus the latency |
| `tb_gen_tw`, `tb_gen_itw` | Generated sets against modular powers |
| `tb_rpm_top` | 20 products at n = 64 against a schoolbook negacyclic product, with different primes, back-to-back starts and gaps |
| `tb_wrap_axi` | The wrapper with a stand-in multiplier: launch rule, ordering, `tlast`, output stalls |
| `tb_rpm_system` | The whole system at n = 64, with random stalls on every stream |
| `tb_rpm_full` | The whole system at the default size (n = 4096, w = 2, 30 bits), two products checked against the schoolbook product. It takes about a minute. |

`tb/tb_util_pkg.sv` generates the test constants. It finds NTT-friendly primes,
computes ψ by search, and computes v by long division. A testbench reads no
data files.

The end-to-end testbenches count how often each mechanism occurs and fail if
any count is zero. The mechanisms are: overlapping products, prime changes
between consecutive products, gaps, twiddle bank wrap-around, held launches,
input waits and output stalls.

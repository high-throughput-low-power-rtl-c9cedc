# Unrolled-pipeline riBM BCH decoder for short-reach optical links

Short optical links in data centres run hot, and heat pushes up the raw bit
error rate of VCSEL links. A light forward-error-correction code brings the
error rate back down, and lets the transmitter run at a lower optical
modulation amplitude. That can save more power than the code costs. This
repository holds the RTL of such a code: a binary BCH code that corrects
t = 3 bit errors in every 63-bit word, BCH(63,45,3) over GF(2^6). It also
builds the t = 4 variant, BCH(63,39,4), and other (m, t) pairs through
parameters.

The decoder is the interesting part. It takes one 63-bit word **every
clock**, so it never stalls. At 56 Gb/s of payload that is a clock of
56/45 GHz = 1.24 GHz. To get there without an iterative key-equation solver,
the decoder unrolls the *look-ahead reformulated inversionless
Berlekamp-Massey* (riBM) algorithm into t separate pipeline stages. A
dedicated copy of the hardware does each iteration, and each stage's
critical path is one GF multiplier plus one XOR. Most received words have no
error at all. For those, the syndrome is zero, the solver and Chien-search
registers keep their old contents, and the word goes around them. In a
gated-clock build this is where the dynamic power is saved.

## Code and conventions

| item | default | meaning |
|---|---|---|
| `M` | 6 | field GF(2^M), code length n = 2^M - 1 = 63 |
| `T` | 3 | errors corrected per word |
| `POLY` | `7'h43` = x^6 + x + 1 | primitive polynomial of the field, all M+1 coefficients |
| k | 45 (derived) | message bits, n - deg g(x) |

* A field element is an M-bit vector in the polynomial basis. Bit j is the
  coefficient of alpha^j.
* A codeword is a 63-bit vector, and bit j is the coefficient of x^j. The
  code is systematic. The message sits in bits 62..18, and the parity
  Rem(m(x) x^18, g(x)) sits in bits 17..0.
* The generator polynomial g(x) is the product of (x + alpha^j) over the
  cyclotomic cosets of 1, 3, ..., 2t-1, which is the LCM of their minimal
  polynomials. The syndrome masks (rows of H), the encoder masks (rows of
  the generator matrix) and the Chien constants are all computed by
  constant functions in `bch_pkg` while the design elaborates. The RTL
  therefore holds no tables, and changing `M`, `T` or `POLY` regenerates
  every XOR tree.
* The field polynomial must be **primitive**. x^6 + x^3 + 1 is the other
  trinomial of degree 6, and a natural choice for a multiplier, but alpha
  has order 9 under it, so it cannot define a length-63 BCH code.

## Decoder pipeline (`bch_decoder_up`)

```
 in ──►[p0]──► syndrome ──►[p1]──► riBM first ──►[p2]──► riBM mid ──►[p3] ... ──► riBM last ──►[pT+1]──► Chien ──►┐
         │        │                                                                              ▲                │ MUX ─►[pT+2]─► out
         │        └─ ?=0 ─► err flag, one bit per stage, gates the stage registers ──────────────┼───────────────►│
         └──────────────────────── delay_fifo (T stages) ───────────────────────────────────────►[pT+1] ─────────►┘
```

| stage | register contents | logic in front of it |
|---|---|---|
| p0 | received word | input register |
| p1 | S1..S2t, error flag | 2·t·m XOR trees from H, OR of all syndromes |
| p2 | riBM state after iteration 1 | `ribm_first` |
| p3..pT | state after iterations 2..t-1 | t-2 `ribm_mid` cores |
| pT+1 | final Lambda(x), locator length L, word from the FIFO | `ribm_last`, `delay_fifo` |
| pT+2 | corrected word, fail flag | `chien_search`, root count against L, bypass MUX |

There are T+3 registers in all. A word presented in cycle c leaves in cycle
c+T+3, which is cycle c+6 for t = 3. The codeword waits in the FIFO and then
in the pT+1 register: t+1 cycles behind p0, the same time the syndrome and
the riBM stages take.

Each register carries `valid` and the error flag (`err` = syndrome nonzero).
The syndrome register, the riBM stage registers and the Lambda register load
only when `valid && err`. The output register picks the Chien result when
`err` is set and the word has not been rejected as uncorrectable (see
below). Otherwise it takes the FIFO copy unchanged. These load
enables are exactly the conditions under which a gated clock would stop
those registers. The RTL writes them as enables and leaves clock-gating
cells to synthesis. Reset is asynchronous and active low, and it clears
only the valid and flag bits.

Ports: `clk`, `rst_n`, `in_valid`, `in_data[62:0]`, `out_valid`,
`out_data[62:0]` (corrected codeword), `out_err` (errors were seen) and
`out_fail` (more than t errors found; word left as received). There
is no back-pressure.

## The key-equation solver, stage by stage

This is the hard part, and the part most worth reading against the code.

### The algorithm

The riBM state has six parts:

* Lambda(x): the error locator, coefficients 0..t.
* B(x): the correction polynomial.
* Delta(x): the discrepancy polynomial, coefficients 0..2t-1.
* Theta(x): its stored copy, coefficients 0..2t-1.
* gamma: a scale factor.
* k: a small signed integer.

It starts from:

```
Lambda = 1, B = x^-1, gamma = 1, k = -1
Delta  = S1 x + S2 x^2 + ... + S2t x^2t
Theta  = S1 + S2 x + ... + S2t x^(2t-1)
```

It then repeats t times (r = -1, 1, 3, ..., 2t-3). Odd iterations are
skipped because the code is binary.

```
Lambda <- gamma·Lambda + Delta_1 · x^2 B
Delta  <- gamma·Delta/x^2 + Delta_1 · Theta
if Delta_1 != 0 and k >= -1:  B <- Lambda, Theta <- Delta/x^2, gamma <- Delta_1, k <- -k-2
else:                         B <- x^2 B,   Theta unchanged,   gamma unchanged,  k <- k+2
```

All right-hand sides use the old state. The next discrepancy, Delta_1,
comes out of the same step as Lambda. No step has a multiply that feeds
another multiply, so each stage costs one multiplier and one adder, plus the
branch MUX. The resulting Lambda is a scaled copy of the true error locator.
The scale does not matter to the Chien search.

The condition is **k >= -1**, not k >= 0. With k >= 0, t = 3 still
decodes, but for t = 4 about a fifth of random patterns of 0 to 4 errors
come out with a wrong locator.

### How the state is held

B starts as x^-1, which a coefficient array cannot hold. The pipeline
therefore carries **x^2·B(x)**, signal `xb`, with `xb[i]` the coefficient of
x^i. At the start xb = x. This is also what the engines read: PE0 number i
needs B_(i-2).

Delta/x^2 is only an index shift, Delta_(i+2) feeding position i. Indices
past 2t-1 read as zero.

### The engines

* `ribm_pe0` handles Lambda coefficient i. It computes
  `gamma·Lambda_i ^ Delta_1·B_(i-2)` and selects `B_i`.
* `ribm_pe1` handles Delta coefficient i. It computes
  `gamma·Delta_(i+2) ^ Delta_1·Theta_i` and selects `Theta_i`.

Each engine has two Mastrovito multipliers, an XOR and a MUX. In an
iterative solver the engines would also hold registers and initial-value
MUXes. Here every iteration has its own copy, so those are left out.

### First, middle and last cores

* **`ribm_first`** uses the known start values. Lambda = 1 + S1·x needs no
  multiplier. Delta_i = S_(i+2) + S1·S_(i+1) needs 2t multipliers, because
  gamma = 1. Since k = -1, only S1 != 0 decides the branch:
  * S1 != 0: B = 1, gamma = S1, k = -1, Theta_i = S_(i+2).
  * S1 == 0: B = x, gamma = 1, k = 1, Theta = Theta.
* **`ribm_mid`** is the full iteration: t+1 PE0, 2t PE1 and the branch
  logic. There are t-2 of them: one for t = 3, two for t = 4.
* **`ribm_last`** only updates Lambda. After the first iteration, x^2·B has
  no terms below x^2, so Lambda_0 and Lambda_1 need only the gamma product.
  That is 2t multipliers in all.

## Chien search and correction (`chien_search`)

The search is fully unrolled. Row p (p = 0..62) evaluates
`Lambda_0 + sum_l Lambda_l · alpha^((n-p)·l)`. The constants
alpha^((n-p)·l) make every multiplier an XOR-only network
(`gf_const_mult`). When the sum is zero, alpha^(n-p) is a root of Lambda,
bit p of the word is flipped, and `corr[p]` is set. All 63 rows work in one
cycle.

### Words with more than t errors

The minimum distance is 2t+1. A word with t+1 to 2t errors therefore
always has a nonzero syndrome and sets `out_err`. The solver still returns
a locator for it, and flipping that locator's roots would usually add
errors instead of removing them. The decoder rejects such words at the
output stage:

1. The locator length comes from the solver's counter, **L = (2t-1-k)/2**,
   with k taken after the last iteration. This is the number of errors that
   Lambda claims. L can exceed t. The Lambda registers keep only
   coefficients 0..t, so the degree of the stored polynomial alone would
   miss that case.
2. An XOR-tree adder counts the bits set in `corr`. This is the number of
   distinct roots found among the 63 nonzero field elements.
3. A word is correctable exactly when the root count equals L. Otherwise
   `out_fail` is set and the word is passed on **as received**, through the
   same MUX that serves the error-free bypass.

A reference model confirmed this rule over random patterns for t = 2, 3
and 4:

* every pattern of up to t errors is accepted and corrected;
* a word with more than t errors is accepted only when it lies within
  distance t of another codeword, and it is then changed into that valid
  codeword (a miscorrection, which no decoder can detect).

For t = 3, about 80% of 4-error words are rejected and left unchanged. The
other 20% are miscorrected.

The next stage needs only L, not k. The last core's k update is therefore
formed next to `ribm_last`, and L is registered alongside Lambda. The root
count and the compare lengthen the output stage's path by an adder tree of
about log2(63) levels. That path runs in parallel with the Chien row sums
and ends at the output MUX.

## Encoder (`bch_encoder`)

The encoder computes the parity as n-k XOR trees. Parity bit q is the XOR of
the message bits m_i for which bit q of x^(n-k+i) mod g(x) is one. This is
the generator-matrix form of systematic encoding, with one word per clock
and one output register.

`bch_fec_top` places the encoder and decoder side by side. They sit at the
two ends of the fibre and share only clock and reset. The top's ports are
the encoder's (`enc_*`) and the decoder's (`dec_*`).

## Multiplier (`gf_mult`)

`gf_mult` is a Mastrovito multiplier. Column 0 of the multiplication matrix
is the operand a. Each next column is the previous one times alpha: a shift,
with the top bit XORed into the positions where p(x) has a one. Then
c = matrix · b. With a trinomial p(x), the matrix costs M-1 XORs, and each
output bit is M ANDs and an XOR tree. The multipliers are the main area of
the riBM cores.

## Files

| file | content |
|---|---|
| `rtl/bch_pkg.sv` | defaults, k counter type, elaboration-time GF and code functions |
| `rtl/gf_mult.sv`, `rtl/gf_const_mult.sv` | variable and constant GF multipliers |
| `rtl/bch_syndrome.sv` | syndrome XOR trees |
| `rtl/ribm_pe0.sv`, `rtl/ribm_pe1.sv` | riBM engines |
| `rtl/ribm_first.sv`, `rtl/ribm_mid.sv`, `rtl/ribm_last.sv` | riBM iterations |
| `rtl/chien_search.sv` | parallel Chien search and correction |
| `rtl/delay_fifo.sv` | codeword delay line |
| `rtl/bch_decoder_up.sv` | the pipelined decoder |
| `rtl/bch_encoder.sv` | parallel encoder |
| `rtl/bch_fec_top.sv` | encoder and decoder side by side |
| `tb/tb_gf_pkg.sv` | reference GF arithmetic, encoder, generator polynomial and riBM model for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus end-to-end and BER runs |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops
itself. Its watchdog counts a failure if it hangs. To build and run one with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/bch_pkg.sv tb/tb_gf_pkg.sv tb/tb_bch_fec_top.sv \
    --top-module tb_bch_fec_top -Mdir obj && ./obj/Vtb_bch_fec_top
```

Put the name of any other testbench in place of `tb_bch_fec_top`. The
others are found through `-Irtl -Itb`. Add `-Wno-fatal` if your Verilator
treats width warnings as errors.

| testbench | what it shows |
|---|---|
| `tb_bch_fec_top` | Default build, 20 000 words, 0..4 channel errors. Every word with at most 3 errors comes back intact and unflagged as failed, after exactly T+3 cycles. 4-error words are flagged. Those marked failed come out exactly as received, and the others differ from the sent codeword. Each of these happens and is counted: the error-free bypass, corrections, rejected words, bursts of 64+ back-to-back words, and idle cycles. |
| `tb_bch_fec_top_t4` | The same for T = 4, BCH(63,39,4). |
| `tb_bch_bsc_ber` | Binary-symmetric-channel sweep at input BER 10^-1 .. 10^-3, 20 000 words each. For example, 10^-2 in gives about 2.7·10^-4 out. No residual errors appear at 10^-2.5 and below in this sample. |
| `tb_bch_decoder_up` | Decoder alone against a long-division reference encoder, with gaps in the input. For 4-error words it checks both outcomes. A rejected word must be unchanged. An accepted word must be a different codeword, with all 2t syndromes of the output zero. |
| `tb_bch_encoder` | Message placement, c(alpha^i) = 0 for i = 1..2t, and equality with long division, for t = 3 and 4. |
| `tb_ribm_first/mid/last`, `tb_ribm_pe0/pe1` | Each core and engine against a one-step reference of the algorithm above. Both branches are taken. |
| `tb_chien_search` | Locators built from known error positions, with a random scale. |
| `tb_bch_syndrome`, `tb_gf_mult`, `tb_gf_const_mult`, `tb_delay_fifo` | Exhaustive or random unit checks. |
| `tb_bch_m_sweep` | Eight complete encoder/decoder pairs, m = 5..8 for t = 3 and 4 (n = 31 to 255), run side by side. Each pair is a `tb_sweep_lane`. Each lane checks correction, latency and rejection of uncorrectable words. |

All of them pass. Each one fails on a deliberately broken copy of its
module. Other builds passed the same end-to-end checks once: m = 9 and 10
for t = 3 and 4, and BCH(63,51,2), which has no middle core. The m = 9 and
10 builds take several minutes to compile. No larger m was simulated.

## Changing the size

* Set `T` (at least 2) on `bch_fec_top` or `bch_decoder_up`. The number of
  middle riBM cores (T-2), the FIFO depth (T) and the latency (T+3) follow.
* Set `M` and a matching primitive `POLY` for another code length. Ones
  that were tested are `6'h25`, `7'h43`, `8'h83`, `9'h11D`, `10'h211` and
  `11'h409`, for m = 5 to 10. For m = 8 no trinomial exists, so the
  multiplier then uses a pentanomial and becomes the slowest part. The
  package functions support M up to 12 and deg g(x) up to 127.
* k is derived. Use `N - bch_pkg::gen_degree(M, T)` to size the message
  port.

## How far to trust it, and where it departs from the original design

Functional behaviour is verified as described above, in two-state
simulation. Timing, area and power have not been measured here. The
1.24 GHz needed for 56 Gb/s is the target of the original 22-nm design, not
a result of this RTL.

Choices made here where the original design gives no detail:

* **Field polynomial** x^6 + x + 1, chosen because it is primitive.
* **Valid bits.** A valid bit travels with each word, and there is no
  back-pressure.
* **Reset.** It is asynchronous and active low, and it clears only the
  control bits.
* **Register enables.** Enables stand in for clock gating. No gating cells
  are instantiated.
* **Engines without registers.** The processing engines have no registers
  or initial-value MUXes. In the unrolled pipeline the registers sit
  between the cores instead.
* **FIFO.** The delay FIFO is a plain shift register.
* **Encoder output register.** The encoder's single output register is this
  design's choice.
* **Bit order.** The codeword bit order, message high and parity low, is
  also this design's choice.
* **Chien search.** It is combinational between the Lambda register and the
  output register, with no extra registers per row.
* **Rejecting uncorrectable words.** They are left unchanged. The test is
  root count against L = (2t-1-k)/2, and it is this design's own choice.
  The original design only reports that it leaves such words alone.

Not built:

* the iterative-parallel comparison architecture, with three time-shared
  riBM cores, a DEMUX/MUX and a busy-flag state controller;
* the single-core direct-iteration architecture;
* the analog parts of the link: driver, VCSEL, photodiode and amplifier.

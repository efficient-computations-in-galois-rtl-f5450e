# Galois-field arithmetic units in SystemVerilog

This is RTL for arithmetic in the binary extension fields GF(2^m), the fields
behind Reed-Solomon codes and elliptic-curve cryptography. It contains:

- a **bit-serial systolic divider**, which computes c / a for any irreducible
  field polynomial, with no inverse table and no global wires;
- a **bit-serial multiplier** that needs no dual basis;
- **parallel multipliers, a squarer and an inverter** for fields defined by
  all-one polynomials (AOPs) and by equally-spaced polynomials (ESPs);
- a **rate-adaptive Reed-Solomon encoder**. It computes each new generator
  polynomial on the fly instead of storing one per code rate.

The structures follow a published doctoral thesis on efficient computation
in Galois fields. Where this RTL departs from the published description, or
fills a gap in it, the sections below say so.

All units are synthesizable SystemVerilog-2017 and independent of each
other. `gf_top` places them side by side with their own ports.

## Notation

- An element a of GF(2^m) is a vector of m bits, `a[i]` = coefficient of
  alpha^i (the canonical, or polynomial, basis). Addition is XOR.
- Serial streams carry the highest coordinate first (a_{m-1}, ..., a_0), except
  where a unit says otherwise.
- One *step* is one clock. All registers use a synchronous, active-low reset
  `rst_n`.

## One idea behind most units: the Toeplitz form of a product

If a field polynomial is fixed, the product c = a·b can be written as
c~ = T(a~)·b, in a transformed coordinate system:

- T is a Toeplitz matrix: every row is the previous one shifted by one
  place, plus one new entry.
- Its 2m-1 distinct entries a~ are linear functions of a.
- The step from c~ back to c is one triangular, bit-serial-friendly
  transformation.

So a multiplier needs three parts:

1. a circuit that produces the Toeplitz entries (an LFSR, or a few XOR gates);
2. inner products of Toeplitz rows with b;
3. a small triangular XOR network back to canonical coordinates.

The bit-serial multiplier, the AOP and ESP multipliers and the encoder's
multipliers are all this scheme with different trade-offs.

## The systolic divider (`sys_divider`)

Division b = c / a is posed as a linear system over GF(2). The bits of b are
the solution of A·b = c, where A is an m × m matrix built from a and the
field polynomial g. Two systolic arrays do the work (Fig. 4.7 of the thesis
shows the arrangement):

```
 g, a ──► SAFCM (m-1 cells) ──► column j, delay D^(m-1-j) ──┐
 c ───────────────────────────► delay D^(2m-1) ─────────────┤──► SASLE ──► b_0 .. b_{m-1}
 s ───────────────────────────► delay D^(m-1) ──────────────┘   (triangle)
 a ──► zero detection (OR + flip-flop, restarted by s) ──► a_nonzero
```

### Forming the matrix: `safcm`, `safcm_cell`

Element a_{i,j} of A is coordinate m-1-i of alpha^j·a. So column 0 is
a reversed, and each later column follows from the previous one:

a_{i,j} = g_{m-1-i}·a_{0,j-1} + a_{i+1,j-1}

Processor Q_j works as follows:

- It latches a_{0,j-1}, the first element of column j-1, into its register r
  when the start flag q passes.
- It then emits a_{i,j} = (g & r) ^ a_{i+1,j-1} for every following row.
- g and q pass through two flip-flops per cell. Each column therefore
  leaves two steps after the previous one, and no signal spans the array.

The last element of a column is pushed out by the next division's start flag.
So the array (and the whole divider) is meant to run with a new division
every m steps.

`cm_lfsr` builds the same matrix the direct way: one LFSR makes a column
per step into m parallel-in/serial-out registers. It is simpler to follow,
but it needs an m-bit bus to every register and a feedback wire across the
whole LFSR. This is the global wiring the systolic form avoids. It is
included for comparison and is not connected to the divider.

### Solving the system: `sasle`, `sasle_circ`, `sasle_sq`

The solver is a triangle of processors that performs Gauss-Jordan
elimination with partial pivoting over GF(2):

- Row k of the triangle has a circular processor V_kk on the diagonal and
  square processors V_k,k+1 .. V_k,m to its right.
- The columns of [A, c] enter at the top, column j skewed j steps.

**Circular processor.** It looks at each element passing down its column and
issues one of three row operations to its row of square processors:

| situation                                   | op (h,f) | square processors do         |
|---------------------------------------------|----------|------------------------------|
| start flag s, or a 1 while no pivot is held | (1,1)    | exchange: keep the new row, pass the stored one down |
| a 1 while a pivot is held                   | (1,0)    | add the stored pivot row to the passing row |
| a 0                                         | (0,0)    | pass the row unchanged       |

The register r of the circular processor records whether a nonzero pivot is
held. With s it is reloaded from the incoming element. The ops travel right
one processor per step, in step with the skewed columns. s moves down the
diagonal with two flip-flops between circular processors, so row k starts
its work 3k steps after row 0.

Rows are eliminated below and above the diagonal in one pass. Row i stays in
row i of the triangle for m-1 steps and clears column i of every other row.
After that the column-m output of the last row carries b_0, b_1, ...,
b_{m-1} on consecutive steps.

**Timing of the whole divider.**

| event | step after the division's start flag |
|-------|--------------------------------------|
| b_0 appears (marked by `b_first`) | 4m-1 |
| b_{m-1} appears | 5m-2 |

A division takes 5m-1 steps in all, and a new one can start every m steps.
The tools only ever see small cells with local connections. The critical
path is one XOR plus one multiplexer, whatever m is.

**Zero divisor.** An OR gate and a flip-flop restarted by s watch the divisor
bits. `a_nonzero` gives the verdict for a division when the next start flag
arrives. For a = 0 the quotient bits are meaningless, and the flag says so.

**Departure from the figure.** The thesis labels the dividend's delay D^m.
This design feeds c in the same steps as a and delays it by 2m-1 steps:

- Column j of A leaves the SAFCM 2j steps late and is then delayed m-1-j
  steps, so it reaches the SASLE m-1+j steps after the division starts.
- Column m, which is c, must keep that pattern, and 2m-1 is the delay that
  does so.

The figure's D^m corresponds to c being supplied m-1 steps later than a. A
broken copy with D^m fails the testbench.

**Order of the quotient.** The figure lists b_{m-1} nearest the output. The
equations, and simulation, give b_0 first, and this design follows the
equations.

**Ports** (`sys_divider #(M)`): `s_in` (1 on the first bit of every division,
period m), `g_in`, `a_in`, `c_in` (serial, highest coordinate first, g
without its z^m term), `b_out`, `b_first`, `a_nonzero`. The field
polynomial may change from one division to the next.

## Bit-serial multiplier (`bs_mult`)

Both operands stay in the canonical basis:

- For m steps, a enters an LFSR whose taps are g. Its registers then hold the
  Toeplitz entries a~_0..a~_{m-1}.
- For the next m steps, switch S closes. Each step, the inner product of the
  LFSR contents with b is one coordinate of c~, while the LFSR, fed zeros,
  moves on to the next row.
- A feed-forward shift register with taps g_{m-1}..g_1 turns c~ into
  c_{m-1}, ..., c_0.

**Timing.** `start` comes with a_{m-1}; b is held in parallel. c_out is valid
(`c_valid`) on steps m+1..2m after start. A new start may follow step 2m.

The default is the thesis's example: m = 31, g = z^31 + z^30 + z^29 + z^28 + 1.
The design costs about 3m flip-flops, m AND gates and m + weight(g) XOR
gates.

## AOP arithmetic (`aop_*`)

When 1 + z + ... + z^m is irreducible (m = 2, 4, 10, 12, 18, 28, ...),
alpha^(m+1) = 1. The Toeplitz matrix then has only m+1 distinct entries, and
the three parts of the multiplier become very regular:

- **P** (`aop_p`): a~_0 = a_{m-1}, a~_k = a_{m-1-k} ^ a_{m-k}, a~_m = a_0.
  This takes m-1 XORs.
- **Q** (`aop_q`): c~_i = XOR_j b_j & a~_((i+j) mod (m+1)). This takes m²
  ANDs in one level, and each cell is a balanced XOR tree.
- **R** (`aop_r`): c_{m-1} = c~_0, c_{m-1-i} = c~_i ^ c_{m-i}. This is a chain
  of m-1 XORs.

`aop_mult` is P → Q → R, purely combinational.

**Squarer** (`aop_square`). With alpha^(m+1) = 1, squaring only permutes
coordinates and adds a_{m/2}. This takes m-1 XOR gates and one gate delay.

**Inverter** (`aop_inverter`). It computes a^-1 = a^2 · a^4 ··· a^(2^(m-1)):

- A squaring register steps through a^2, a^4, ...
- A multiplication loop accumulates their product.

The loop keeps its running product as the (m+1)-entry Toeplitz vector, not in
canonical form, because P applied after R is the identity on those vectors.
The loop therefore only contains Q, extended by one cell that supplies the
(m+1)-th entry. The loop delay is one AND plus about log2(m) XOR levels. R is
applied once, at the end. The register starts at the vector of 1,
(0, ..., 0, 1, 1).

**Timing.** `start` loads a. `done` comes m steps later: one load step plus
m-1 loop steps. a = 0 returns 0.

## ESP multiplier (`esp_mult`)

An s-spaced polynomial g(z) = f(z^s) is irreducible when f is an irreducible
AOP of degree m and s is a power of m+1. Its root has order n + s, where
n = m·s. The GF(2^n) multiplier is then built only from m-bit AOP modules:

- s modules P_i. P_i reads the coordinates a_{s-1-i+s·j}.
- s² modules Q_ij:
  - Q_ij reads b_{j+s·l} and the output of P_((i+j) mod s).
  - When i+j ≥ s, that P output is rotated by one entry.
- s XOR networks that add the Q_ij over j.
- s modules R_i. R_i writes c_{s-1-i+s·w}.

The default is the smallest case, GF(2^6) with z^6 + z^3 + 1 (m = 2, s = 3).
The index bookkeeping is derived from the equations. The thesis's figure
shows only the module arrangement.

## Reed-Solomon encoding with a bit-serial constant multiplier

This is the largest part. It is built up in three layers.

### Triangular basis and the pipelined constant multiplier (`tri_const_mult`)

Let f be the field polynomial. Define β_j = Σ_{i=0}^{m-1-j} f_{i+j+1}·alpha^i
for j = 0..m-1. These m elements form the *triangular basis*. The
coordinates of an element in this basis are exactly the Toeplitz entries
used above. Two small filters convert between the bases, bit-serially:

- **recursive filter** (`rec_filter`): canonical → triangular.
  abar_i = a_{m-1-i} + Σ_{l=1..i} abar_{i-l}·f_{m-l}. This is an LFSR with an
  input. After m bits, its register holds Toeplitz row 0.
- **non-recursive filter** (`nonrec_filter`): triangular → canonical.
  c_{m-1-i} = cbar_i + Σ_{l=1..i} cbar_{i-l}·f_{m-l}. This is a shift
  register with feed-forward taps.
- **row LFSR** (`row_lfsr`): loaded with row 0, it steps through rows
  1..m-1.

The multiplier pipelines these:

- While element p enters the recursive filter, the row LFSR works on element
  p-1.
- On the last bit of a period, the LFSR takes the filter's *next* state as row
  0, and the filter starts the next element from zero.

So c = a·b for the element entered in period p leaves in period p+1. The
latency is m steps, with one result every m steps.

This design's non-recursive filter uses the present input bit directly,
rather than registering it first as the feed-forward register of the plain
bit-serial multiplier does. The encoder below needs that: its feedback
symbol must be complete inside one m-step period.

**Interface.** `clr` marks bit a_{m-1} of a fresh stream and makes every
register read as zero on that step. The first output period after `clr` is
0.

### Fixed-rate encoder (`rs_encoder`)

The encoder computes p(x) = x^r·d(x) mod g(x) and sends d followed by p. It
has the four units of the thesis's encoder figure:

```
              ┌──────────── row LFSR ◄── recursive filter ◄─ S2 ◄─┐
              ▼                                                   │
  M_0 .. M_{R_MAX-1}: inner products row·g_j  (triangular result) │
              ▼                                                   │
  remainder registers REM_0 .. REM_{R_MAX-2}, bitwise adds        │
              ▼ (top coefficient formed on the fly)               │
       non-recursive filter ──► ⊕ with data ──────────────────────┘
              └──────────── S1 ──► codeword out
```

- The remainder is kept in the triangular basis, so every addition is a
  single XOR per bit. Each register rotates once per period.
- The top coefficient, rem_{r-1}, is never stored. It is formed on the fly as
  REM_{R_MAX-2} ⊕ M_{R_MAX-1}. The non-recursive filter converts it to
  canonical form, and it is added to the incoming data symbol. The result is
  the feedback symbol.
- The feedback symbol goes through the recursive filter into the row LFSR.
  Its products with all g_j appear in the next period, which is exactly when
  the next data symbol needs the updated top coefficient. So one symbol is
  accepted every m steps with no stall.
- After the data, S2 grounds the filter input and S1 switches the output to
  the non-recursive filter. The remainder then shifts out as r parity
  symbols.

Generator coefficients are **right-aligned**: g[R_MAX-r+i] = g_i, with the
lower lines 0 and g_r = 1 implied. One datapath therefore serves any
r ≤ R_MAX.

**Ports and timing.**

1. `start` is a one-step pulse with no data. It samples `n_data` = k and
   `n_par` = r and clears the datapath.
2. During the next k·m steps `din_ready` = 1, and `dout` = `din`, with no
   latency.
3. During the following r·m steps `dout` carries the parity (`dout_par` = 1).
4. `done` follows.

Symbols go highest degree first, each symbol MSB first.

### Generator-polynomial unit and the rate-adaptive encoder

The number of parity symbols r may change by one between codewords. With
g_r(x) = Π_{j=1..r} (x + alpha^j), the next polynomial is:

- g·(x + alpha^(r+1)) for +1;
- g / (x + alpha^r) for -1, an exact division.

`gp_generator` does both with one ring and one constant multiplier:

- **Coefficient unit.** R_MAX+1 serial registers G_0..G_RMAX form a ring.
  G_RMAX-j holds g_(r-j), and everything below is zero.
- **Multiplier.** A `tri_const_mult` whose constant is the current root,
  held by `root_gen`. `root_gen` multiplies by alpha or alpha^-1 in one step.
- **One update.** The ring rotates once, (R_MAX+1)·m steps, highest
  coefficient first. The leaving symbol is added to the multiplier output,
  which is the previous symbol times the root, and the sum re-enters at G_0.

The two modes differ in the multiplier input and in when the root changes:

| mode | multiplier input | root update | recursion |
|------|------------------|-------------|-----------|
| +1 (`del_r` = 10) | the leaving symbol (switch A) | alpha^(r+1), before the rotation | g'_j = g_(j-1) + root·g_j |
| -1 (`del_r` = 11) | the new sum (switch B) | alpha^(r-1), after the rotation | g'_j = g_(j+1) + root·g'_(j+1) |
| 0 (`del_r` = 00) | nothing moves | none | g' = g |

- `del_r` = 01 is treated as hold.
- Requests past 0 or R_MAX are ignored.
- `done` comes (R_MAX+1)·m + 1 steps after `start`, or one step after it for
  a hold.
- The outputs g_out[j] = G_j (j < R_MAX) are already in the right-aligned
  layout the encoder expects.

`rs_encoder_adaptive` joins the two units with a small sequencer. For each
codeword (`start`, `del_r`, `n_data`):

1. It updates the generator polynomial.
2. It runs the encoder with n_par = r.
3. It raises `done`.

Only the generator polynomial's roughly (R_MAX+1)·m bits are stored. No table
of polynomials is kept.

**Departure.** In the thesis the update for the next codeword overlaps the
transmission of the current one. Here it runs before each codeword while the
encoder is idle. Overlapping would need a second copy of the coefficients,
because the encoder reads them during its data phase. The cost is
(R_MAX+1)·m idle steps per rate change.

## The top (`gf_top`)

The top has no logic of its own; it only instantiates the units. Port
prefixes: `div_` divider, `cm_` LFSR matrix generator, `bsm_` bit-serial
multiplier, `aop_` AOP multiplier and inverter, `esp_` ESP multiplier, `rs_`
rate-adaptive encoder.

| parameter | default | meaning |
|-----------|---------|---------|
| DIV_M | 4 | divider and matrix-generator field degree |
| BS_M, BS_G | 31, z^31+z^30+z^29+z^28+1 | bit-serial multiplier |
| AOP_M | 4 | AOP field degree (must have an irreducible AOP) |
| ESP_M, ESP_S | 2, 3 | ESP field GF(2^(M·S)) |
| RS_M, RS_F | 8, x^8+x^4+x^3+x^2+1 | RS symbol field |
| RS_R_MAX | 16 | maximum parity symbols |

At these defaults yosys coarse synthesis gives about 640 cells and 550
flip-flop bits. The RS field, R_MAX = 16 and AOP_M = 4 are choices of this
design; the thesis gives no numbers for them.

The divider is generic in m. Its size grows as about 2.5m² flip-flops, so
the 900-bit cryptographic case mentioned as motivation (about 2 million
flip-flops) is possible in principle but was not elaborated.

## Verification

Each testbench in `tb/` checks its unit against reference arithmetic written
independently in `tb/gf_ref_pkg.sv`:

- multiplication by shift-and-add;
- inversion by exponentiation;
- RS parity by polynomial long division.

Each testbench also checks the latencies given above.

| testbench | covers |
|-----------|--------|
| `sys_divider_tb` | 60 back-to-back divisions, m = 4; quotient·a = c, b_0 at 4m-1, zero detector |
| `cm_lfsr_tb` | every matrix element for back-to-back random divisors, m = 4 (all three irreducible quartics) and m = 8 |
| `bs_mult_tb` | m = 31 random, m = 4 exhaustive |
| `aop_mult_tb` | m = 4 exhaustive, m = 10 and 12 random; P and the extra Q cell |
| `aop_inverter_tb` | squarer and inverter, m = 4 exhaustive, 10 and 18 random; latency m |
| `esp_mult_tb` | GF(2^6) exhaustive, GF(2^20) (m = 4, s = 5) random |
| `tri_const_mult_tb` | continuous streams, m = 8 and 4; filters invert each other |
| `rs_encoder_tb` | 60 codewords at each of m = 8 (R_MAX = 16) and m = 4 (R_MAX = 4), random k and r |
| `gp_generator_tb` | random walk of +1/-1/hold including the limits; root generator walk |
| `rs_encoder_adaptive_tb` | 70 codewords with a random walk of r |
| `gf_top_tb` | all units at once at default parameters |

`gf_top_tb` counts every mechanism and fails if one never occurs:

- pivot exchange;
- polynomial change;
- zero divisor;
- rate +1, -1 and hold;
- a request at a limit;
- a codeword without parity.

Every testbench ends with a line `TB_RESULT checks=N failures=F` and has a
watchdog. Each was also run against a deliberately broken copy of the units
it covers, and failed.

To run one with plain verilator, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/gf_pkg.sv tb/gf_ref_pkg.sv tb/gf_top_tb.sv --top-module gf_top_tb -Mdir obj
./obj/Vgf_top_tb
```

The testbenches use only two-state values and `$urandom`.

## Known limits

- The divider needs divisions back to back, or a zero division to flush the
  last one, because b_{m-1} and the last matrix elements are pushed out by the
  next start flag.
- AOP and ESP units are correct only for degrees where the polynomial is
  irreducible; the RTL does not check this.
- `n_data` is m bits wide, so k ≤ 2^m - 1. Codeword length n = k + r ≤ 2^m - 1
  is the user's responsibility.
- The rate-adaptive encoder does not overlap the GP update with transmission
  (see above).
- Lint reports a few unused bits that are expected and explained in the file
  headers: the last SAFCM cell's g/q outputs, g_0 in `cm_lfsr`, and clock and
  reset of a zero-length delay line.

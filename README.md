# Systolic and serial arithmetic for GF(2^m), with an RS(7,3) codec

Finite-field arithmetic has no carries. Because of that, multipliers, dividers and
Reed-Solomon coders over GF(2^m) can be built as chains of identical cells that talk
only to their neighbours: systolic arrays or short shift-register circuits. This
repository holds synthesizable SystemVerilog for a set of such units. Each is built
in the small configuration that serves as its worked example:

| unit | field / code | module |
|---|---|---|
| Reed-Solomon decoder (syndromes, key equation, Chien/Forney) | RS(7,3) over GF(8), corrects 2 symbols | `rs_decoder` |
| Systematic Reed-Solomon encoder built on a Cauchy matrix | RS(7,3) over GF(8) | `cauchy_encoder` |
| Inverter / divider, Gauss-Jordan systolic array | GF(2^3), standard basis | `gj_divider` |
| Bit-serial modified Massey-Omura multiplier | GF(2^4), normal basis | `mom_serial_mult` |
| Parallel modified Massey-Omura multiplier | GF(2^4), normal basis | `mom_parallel_mult` |
| Serial-in serial-out (SISOS) systolic multiplier | GF(2^4), standard basis | `sisos_mult` |
| Parallel-in parallel-out (PIPOS) systolic multiplier | GF(2^4), standard basis | `pipos_mult` |
| Multiply-by-alpha^K register | GF(2^4), standard basis | `lfsr_const_mult` |
| FIR polynomial multiplier, h(x) = x^3 + alpha x + alpha^3 | GF(8) coefficients | `fir_poly_mult` |
| LFSR polynomial divider, g(x) of the RS(7,3) code | GF(8) coefficients | `poly_divider` |
| Systematic Reed-Solomon encoder on a feedback shift register | RS(7,3) over GF(8) | `lfsr_rs_encoder` |
| The same encoder at bit level, with fixed XOR networks | RS(7,3) over GF(8) | `rs73_binary_encoder` |
| The same encoder with a pipelined feedback path, two words interleaved | RS(7,3) over GF(8) | `pipelined_lfsr_encoder` |
| Two-input polynomial multiplier a1 h + a2 k | GF(2) coefficients | `two_input_mult` |
| Serial and parallel adder on shift registers | GF(2^4) | `gf_adder` |

`gf2m_arith_top` places them all side by side, with the adder in both its serial and
parallel forms. Each unit keeps its own ports, named with a prefix (`dec_`, `enc_`,
`div_`, `mom_`, `mpm_`, `sis_`, `pip_`, `cm_`, `fir_`, `pd_`, `le_`, `be_`, `ple_`, `tim_`, `add_`).
They share only `clk` and the asynchronous active-low `rst_n`. They are separate
designs, not one datapath. The LFSR encoder (`le_`) uses the decoder's code, with roots
alpha^1..alpha^4, so its output can be wired to the decoder's input outside the top;
the end-to-end testbench does exactly that. The Cauchy encoder's code has roots
alpha^0..alpha^3, so that encoder cannot feed the decoder directly.

Conventions used everywhere:
- GF(8) symbols are 3-bit vectors in the polynomial basis of F(z) = z^3 + z + 1, with
  alpha = z. Bit i is the coefficient of alpha^i. `gf_pkg` holds the symbol type, the
  field operations and the elaboration-time constant functions.
- Every flop uses the rising edge and resets asynchronously. Every output that is read
  has a reset value.

## The RS(7,3) decoder

`rs_decoder` takes the received word one symbol per clock, highest power first (v_6
first). It emits the corrected word one symbol per clock, lowest power first, together
with its position. The decoder is a pipeline of three systolic stages, followed by a
correction adder.

1. **Syndromes** (`rs_syndrome`, `rs_syndrome_cell`). There are four cells, one per
   root alpha^k (k = 1..4). Every cell sees every received symbol and applies Horner's
   rule, A <- A * alpha^k + v. The four syndromes are ready at the clock edge that
   takes v_0. The first symbol of a word overwrites the accumulator, so words can
   follow each other without a clear cycle.

2. **Key equation** (`rs_key_equation`, `rs_kes_pe`). This stage solves
   Lambda(x) S(x) = Omega(x) mod x^4 with a systolic extended Euclidean algorithm in
   "combined action" form. Each processing element (PE) holds two polynomial pairs,
   f = (f2, f3) and g = (g2, g3), plus two small counters: `gshift`, the number of
   places g is advanced against f, and `decwina`, the remaining decision window. From
   the leading coefficients of f3 and g3 and from the counters, the PE picks one
   action:

   | condition | action (enum `kes_act_e`) | effect |
   |---|---|---|
   | decwina exhausted | `KES_NULL` | pass through |
   | both leading coefficients 0 | `KES_ADJUST` | f3, g3 <- x f3, x g3; decwina - 1 |
   | only L(g3) = 0 | `KES_ADVANCE` | g <- x g; gshift + 1; decwina - 1 |
   | L(g3) != 0, gshift > 0 | `KES_REDUCE_DELAY` | f <- L(g3) f - L(f3) g; f3 <- x f3, g2 <- g2/x; gshift - 1 |
   | L(g3) != 0, gshift = 0 | `KES_REDUCE_SWAP` | f <- L(g3) f - L(f3) g; swap f and g; g <- x g; gshift + 1; decwina - 1 |

   The start values are f = (0, x^4), g = (1, S(x)), decwina = t + 1 = 3 and
   gshift = 0. Because f3 starts as the monic x^4, its leading coefficient is never
   zero, so `KES_ADJUST` is built but never taken.

   Six PEs (2(t+1)) are enough for every syndrome pattern of this code. A completion
   stage then does the following:
   - undoes any remaining `gshift`;
   - shifts f3 into place;
   - divides f2 and f3 by the leading coefficient of f3.

   The result is Lambda = f2 and a monic Omega = f3. With no errors, f3 is zero, and
   the stage returns Lambda = 1 and Omega = 0. Each PE here takes every coefficient in
   one clock. The original PE is coefficient-serial. The sequence of actions is the
   same, but the stage is much shorter in clocks. It accepts a new syndrome set every
   clock, with a latency of NPE + 1 = 7 clocks. `kes_act` shows the action of every PE
   in every clock, for observation.

3. **Error values** (`rs_error_calc`, `rs_alpha_inv_lfsr`, `rs_eval_cell`). An LFSR
   steps through alpha^-i for i = 0..6. Three Horner arrays, each T + 1 cells long,
   evaluate Lambda, Lambda' and Omega at each point:
   - Lambda' is formed from the odd coefficients of Lambda, each one power lower. In
     characteristic 2, the even terms of the derivative vanish.
   - Where Lambda(alpha^-i) = 0, the error value is Omega/Lambda' (Forney's formula
     for roots alpha^1..alpha^2t).
   - The stage counts the roots. When the count differs from deg Lambda, the word is
     flagged `uncorrectable` with the last symbol.

4. **Correction.** The received word waits in a 7-symbol register file. Each output
   symbol is `rx_buf[pos] ^ e_pos`. Only one word is in flight, and `in_ready` stays
   low until that word has left. The first corrected symbol appears NPE + T + 4 = 12
   clocks after the edge that takes v_0.

For the printed example v(x) = a^4x^6 + a^3x^3 + a^6x + a^4, the decoder gives
Lambda = a x^2 + a^2 x + a^4 and Omega = x + a^4. The corrected word is
a^4x^6 + a^4x^4 + a^3x^3 + a^6x + a^6.

## The Cauchy encoder

A systematic RS(n,k) code has the generator matrix [I | A]. For a suitable set of
points, A is a generalised Cauchy matrix:

    A_ij = c_i d_j / (x_i + y_j),   so   w_j = d_j * sum_i (m_i c_i) / (x_i + y_j)

Because of that form, the encoder needs no feedback. In `cauchy_encoder`:
- A preprocessing cell (`cauchy_pre`) multiplies each message symbol by its c_i.
- r = 4 Cauchy cells (`cauchy_cell`) each accumulate one check symbol w_j. A cell
  holds a register x that is stepped through the points x_i, its constant y_j, and a
  shared divider. The divider forms m_i c_i / (x_i + y_j) while the message passes,
  and then multiplies by d_j once.
- A timing signal T travels with the data. A 1 means a message symbol. The cell's
  output switch follows it:
  - it passes messages while T = 1;
  - it inserts its own check symbol in the clock after the last message;
  - it then passes the check symbols of the cells before it.

Every stream has one register per cell. A block of k symbols m_0..m_2 may start every
n = 7 clocks. The codeword m_0, m_1, m_2, w_0..w_3 (x^6 first) leaves r + 1 = 5 clocks
after `start`.

The constants c_i, x_i, y_j and 1/d_j are computed at elaboration by functions in
`gf_pkg`, from their closed forms (the code's roots are alpha^0..alpha^3, so a = 1).
One entry differs from a published table of this example. That table gives d_2 =
alpha^5, and its w_2 column of the systematic generator matrix follows from it. The
closed form gives d_2 = 1, and only that value yields codewords that vanish at all
four roots. The RTL uses the closed form. The testbench checks the other three columns
against the table and all four check symbols against a brute-force search.

## The Gauss-Jordan divider

To find C = B/A mod G, write A C + H G = B with deg H <= m - 2. Equating the
coefficients of x^0..x^(2m-2) gives 2m - 1 linear equations over GF(2). The unknowns
are h_0..h_{m-2} and c_0..c_{m-1}. With B = 1, the same system gives the inverse.

`gj_array` solves such a system on a triangular array. Array row s handles elimination
step s, with a boundary cell for column s and one main cell for each column to its
right, plus one for the right-hand side:
- The **boundary cell** (`gj_boundary_cell`) outputs the tag T = 0 until it has seen a
  row with a 1 in column s. That row is the pivot. For every later row of the same
  system, it outputs T = 1.
- A **main cell** (`gj_main_cell`) with T = 0 swaps the arriving bit with its stored
  bit. This covers both passing a row and loading the pivot.
- A main cell with T = 1 outputs `d ^ (e & r)`, which eliminates column s using the
  stored pivot bit.
- The stored pivot leaves as the last row of the system when the next system's first
  row arrives. After 2m - 1 array rows, only the solution bits are left, in order.

`gj_divider` builds the rows from A, B and G, one row per clock. The array runs in
slots of 2m - 1 clocks: `in_ready` is high on the first clock of a slot. Slots without
a division carry an all-zero system, which flushes the stored pivots. The divider
accepts one division every 2m - 1 clocks, and the result appears 3(2m - 1) clocks
after the edge that takes `in_valid`.

The original array passes the bits of a row from cell to cell with a skew. This one
takes a whole row in one clock. That keeps the throughput but changes the latency:
the original's 8m - 4 clocks becomes 6m - 3 here. G is an input, so any degree-m
polynomial works.

## The Massey-Omura multipliers

In the normal basis {a, a^2, a^4, a^8} of GF(16), with a a root of the all-one
polynomial x^4 + x^3 + x^2 + x + 1, every product bit has the same form:

    d_{m-1-k} = b P c' + b(k) Q c(k)'

Here b(k) is b rotated right k places. P is a permutation (row (m/2 + j) mod m of
column j). Q is the rest of the last coordinate's multiplication matrix. The term
d~ = b P c' does not depend on k.

`mom_serial_mult` has four registers:
- Two fixed registers feed block B1, which computes d~. Its value is held in a
  flip-flop for the whole output phase.
- Two circulating registers rotate once per clock and feed block B2.

The operands are shifted in b_0 and c_0 first over m clocks. The next m clocks output
d_{m-1}..d_0, one bit per clock, with the first bit one clock after the last input bit.
P and Q are computed at elaboration for any m with m + 1 prime and 2 primitive modulo
m + 1 (m = 2, 4, 10, 12, ...). For m = 4, they give exactly the gates
b2c0 + b3c1 + b0c2 + b1c3 for d~, and three AND terms for each B2 output.

`mom_parallel_mult` lays the same equation out in space. One B1 block and m B2
blocks, each fed with the operands rotated one place further than its neighbour, form
all m digits in one clock. The product is registered, so it appears one clock after
its operands, and a new pair can enter every clock.

## The systolic standard-basis multipliers

Both multipliers compute P = A B mod G by the MSB-first recurrence
T_i = x T_{i-1} + M_{i-1} G + b_{m-i} A, where M_{i-1} is the leading coefficient of
T_{i-1}. G is given without its x^m term.

**SISOS** (`sisos_mult`, `sisos_cell`) is a chain of m cells. A and G stream through
MSB first, and the product leaves MSB first. In each cell, p passes through one
register, while a, g and the control signal pass through two. This relative slip
performs the multiplication by x.
- The control sequence is 0 1 1 ... 1.
- In the clock where the control is 0, a cell's multiplexer loads the arriving leading
  coefficient into its M register.
- In that same clock, an AND gate masks the coefficient out of the sum.

The module makes the control signal itself. It registers the inputs once, so that the
0 can run one clock ahead of a_{m-1}. B is sampled with `start` and travels with its
operand, so operations placed back to back may use different B. The product's MSB
leaves 2m clocks after `start` (marked by `out_first`). One product completes every m
clocks.

**PIPOS** (`pipos_mult`, `pipos_cell`) is an m x m array. Cell (i, k) computes
`t <= t_above_right ^ (g & M) ^ (a & b)`. The latches follow the description of the
array: one on row and slant paths, and two on column paths. Internal skew and deskew
registers present plain parallel words at the ports. The array takes one operation per
clock, and the result appears 3m - 3 clocks after the edge that takes `in_valid`. The
wiring follows the cell equation and the stated delays and input order. One detail is
this design's own choice: a row's
leading coefficient reaches the next row through one extra latch.

## Shift-register circuits

Several small units show the classic shift-register forms of field and polynomial
arithmetic. Except for the adder, the constant multiplier and the two-input
multiplier, coefficients are GF(8) symbols that move one per clock, highest power
first.

**Add** (`gf_adder`). Addition is a bitwise XOR. Both addends sit in 4-bit registers.
With `SERIAL = 1`, the registers rotate one bit per clock, lowest bit first, through a
single XOR gate into the sum register. The sum is ready four clocks after `start`
(the start clock makes the first shift), and the addends are back in place. With
`SERIAL = 0`, four XOR gates write the whole sum in one clock.

**Multiply by a constant** (`lfsr_const_mult`). A 4-bit register over GF(2^4) with
F(x) = x^4 + x + 1. `load` puts beta in the register. Each `step` pulse replaces the
content by alpha^K times it. One pulse of the K = 1 circuit shifts the bits up and
feeds b3 back into stages 0 and 1: alpha beta = b3 + (b0 + b3)alpha + b1 alpha^2 +
b2 alpha^3. K = 3 gives the one-pulse network for alpha^3 beta, which equals three
pulses of the K = 1 circuit.

**Multiply by a fixed polynomial** (`fir_poly_mult`). A feed-forward delay line of
R = 3 symbols with taps h_3..h_0. The output is combinational:
`out = h_3 in + h_2 d0 + h_1 d1 + h_0 d2`. Feed a(x) followed by R zeros after a
`clear`. The k + R + 1 output symbols are a(x)h(x), highest power first, each in the
same clock as its input.

**Divide by a fixed polynomial** (`poly_divider`). A feedback register of R = 4
symbols for a monic g(x). Each shift computes `fb = s3`,
`s0 <= in + g0 fb` and `si <= s(i-1) + gi fb`. `q_sym` is the quotient coefficient
that the shift produces. It is zero for the first R shifts. After the last dividend
coefficient, the register holds the remainder. The default g(x) = x^4 + alpha^3 x^3 +
x^2 + alpha x + alpha^3 is the RS(7,3) generator polynomial. Shift in a received word
and the register ends up holding its syndrome polynomial, the remainder by g(x).

**Systematic encoder** (`lfsr_rs_encoder`). The same register, with the input added to
the feedback: `fb = in + r3`. While the k message symbols enter, they pass to the
output and the register divides x^(n-k) m(x) by g(x). Then `in_ready` drops for n - k
clocks. The feedback is held at zero and the remainder shifts out as parity, r3 first.
The result is c(x) = x^(n-k) m(x) + r(x). Each output symbol leaves one clock after
its input. g(x) is formed at elaboration from its roots, so `N` and `K` can change.

**Two-input multiplier** (`two_input_mult`). Computes b(x) = a1(x)h(x) + a2(x)k(x)
over GF(2), with h = x^3 + x + 1 and k = x^2 + x + 1. This one uses the transposed
form, and its inputs enter *low*-order first. Each stage adds both inputs, weighted by
its tap bits, to the previous stage:
`s0 <= h3 a1 + k3 a2`, `si <= s(i-1) + h(3-i) a1 + k(3-i) a2`, `b = s2 + h0 a1 + k0 a2`.
The coefficient of x^(3+i) leaves in the clock in which the coefficients of x^i go in.

**Bit-level encoder** (`rs73_binary_encoder`). The RS(7,3) encoder written as gates.
Each stage is three flip-flops, and each generator coefficient is a fixed XOR network
on the feedback symbol {f2, f1, f0}: alpha^3 f = {f1^f2, f0^f1^f2, f0^f2} and
alpha f = {f1, f0^f2, f2}. In the top it runs beside `lfsr_rs_encoder`, and the two
must agree symbol for symbol.

**Pipelined encoder** (`pipelined_lfsr_encoder`). In the plain encoder, one feedback
wire drives every stage in the same clock. Here the feedback instead enters a chain
of n - k registers, and tap g_j takes it from register j, which is n - k - j clocks
late. The divider chain below the taps is unchanged. Every path from the feedback
point back to itself is now exactly twice as long, so the circuit is the plain
divider with each delay doubled. It therefore encodes two independent words whose
symbols alternate: A m2, B m2, A m1, B m1, A m0, B m0. Then 2(n - k) interleaved
parity symbols follow, while `in_ready` is low and the feedback is held at zero.

## How far to trust it

Every unit has a self-checking testbench in `tb/`. Each compares against models
written independently of the RTL, in `tb_ref_pkg`:
- exponent/log-table GF(8) arithmetic;
- a brute-force nearest-codeword RS decoder;
- shift-and-add polynomial products;
- cyclic-polynomial normal-basis products.

| testbench | what it covers |
|---|---|
| `tb_rs_syndrome` | the worked example's syndromes, random words with idle gaps |
| `tb_rs_key_equation` | worked example, random error patterns of weight 0-2; counts each PE action |
| `tb_rs_error_calc` | error patterns of weight 0-2, random degree-2 locators for the uncorrectable flag, timing |
| `tb_rs_decoder` | worked example, 300 random words with 0-4 errors, latency |
| `tb_cauchy_encoder` | systematic columns, brute-force check symbols, latency, gaps between blocks |
| `tb_gj_divider` | the printed inversion, all 56 (A, B) pairs, random pairs for a second polynomial, latency and rate |
| `tb_mom_serial_mult` | all 256 pairs, timing |
| `tb_mom_parallel_mult` | the printed Q matrix, all 256 pairs one per clock, random pairs with gaps |
| `tb_sisos_mult` | all 256 pairs back to back, random pairs with gaps, latency and rate |
| `tb_pipos_mult` | all 256 pairs back to back, random pairs with gaps, latency and rate |
| `tb_lfsr_const_mult` | every beta against both printed product formulas; three alpha pulses against one alpha^3 pulse |
| `tb_fir_poly_mult` | the worked product and 200 random polynomials against a convolution |
| `tb_poly_divider` | the worked division, state by state, and 300 random dividends against long division |
| `tb_lfsr_rs_encoder` | 300 messages with and without gaps: codeword, roots, parity flags, `in_ready` timing |
| `tb_pipelined_lfsr_encoder` | 200 interleaved pairs: both words against long division, roots, parity flags, `in_ready` timing |
| `tb_rs73_binary_encoder` | the same 300-message test as the generic encoder |
| `tb_two_input_mult` | the worked example, state by state, and 300 random input pairs |
| `tb_gf_adder` | the worked sum and all 256 pairs in both forms; serial timing; addends preserved |
| `tb_gf2m_arith_top` | runs every unit at once at the default sizes, and fails if any mechanism never occurred |

The mechanisms that `tb_gf2m_arith_top` counts are:
- corrections with 0, 1 and 2 errors, and flagged uncorrectable words;
- each reachable key-equation action;
- inversions, divisions and empty divider slots;
- SISOS products back to back and after a gap;
- LFSR encodings (their codewords go on into the decoder), alpha steps, FIR
  products, and divisions of those products;
- bit-level encodings (checked against the generic encoder), interleaved pipelined
  encodings, parallel Massey-Omura products, two-input products, and serial and
  parallel sums.

Known limits:
- With three or more errors, the decoder may miscorrect without raising
  `uncorrectable`. Any bounded-distance decoder can do this when the word lands within
  distance 2 of another codeword.
- For words that are not correctable, the testbenches check only that no word is
  flagged without cause.
- `KES_ADJUST` is never exercised (see above).
- A = 0 has no inverse; the divider then returns an unspecified value.

## Departures from the reference architecture

- The key-equation PEs take whole words in one clock. The original PEs are
  coefficient-serial.
- The Gauss-Jordan array takes whole rows in one clock instead of bit-skewed rows.
  It keeps the rate of one result per 2m - 1 clocks, with a latency of 6m - 3 clocks.
- The Cauchy encoder keeps a register on the m_i c_i stream in every cell. One
  description removes that delay so that all cells see the stream at once. A
  fully-registered chain is strictly systolic and gives the same codewords; only the
  latency differs.
- The Cauchy constant d_2 comes from its closed form, not from the published table
  (see above).
- The Massey-Omura multiplier's JK flip-flop is modelled as a register loaded at the
  first output clock.
- In SISOS, B travels with its operand instead of being a fixed input of each cell.
- The feedback-register encoder passes the message through and then opens the
  feedback to shift out the parity. The reference drawing shows only the register,
  taps and feedback.
- The bit-level encoder's times-alpha network has a2 as its constant term. The
  reference formula shows a0 there, which would map 1 to z + 1 instead of z.
- The polynomial divider handles a monic g(x) only. A general divider also scales the
  feedback by g_r^-1.
- All handshakes, framing signals, reset values and the decoder's single-word buffer
  are this design's choices.

Not built:
- the second (type-2) LFSR divider, whose register feeds a weighted sum of all stages
  back into the first stage. Its worked example's remainder disagrees with the
  type-1 divider's for the same dividend, so its remainder path could not be pinned
  down;
- the error-trapping decoder, which shifts the syndrome register cyclically until it
  holds the error pattern. The RS(7,3) decoder above covers the same code.

## Simulating

The testbenches need only Verilator 5 (`--timing`). For example:

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/gf_pkg.sv tb/tb_ref_pkg.sv tb/tb_gf2m_arith_top.sv \
        --top-module tb_gf2m_arith_top -o sim
    ./obj_dir/sim

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and finishes. A watchdog
stops it if it hangs. Substitute any other `tb_*.sv` for a single unit.

To change a size, use the module parameters:
- `N`, `K` and `T` for the codec;
- `M` for the divider and the multipliers;
- `A_EXP` for the encoder's first root;
- `K` and `POLY` for the constant multiplier;
- `H` and `R` for the FIR multiplier;
- `G` and `R` for the LFSR divider;
- `HP`, `KP` and `R` for the two-input multiplier;
- `SERIAL` and `M` for the adder.

The GF(8) field itself is fixed in `gf_pkg` (`GF_M`, `GF_POLY`). The decoder's
testbenches assume RS(7,3).

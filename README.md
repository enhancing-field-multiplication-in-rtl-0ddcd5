# Bit-serial systolic Montgomery multiplier for GF(2^k)

Elliptic-curve cryptography over binary fields spends most of its time in
field multiplication. On a small IoT node the multiplier has to be small more
than it has to be fast. This RTL is a compact, bit-serial systolic multiplier
for GF(2^k) in polynomial basis. It computes the Montgomery product

    P = C * D * x^-(k-1)/2  mod F

for odd k, with F = x^k + f_{k-1} x^{k-1} + ... + f_1 x + 1. It is built from
k+1 identical one-bit processing elements (PEs). Each PE has three AND gates,
one three-input XOR and a few registers. A product takes about 2k clock
cycles, and the critical path is one AND plus two XORs.

The default size is k = 233. The field polynomial is a run-time input, so the
same instance works for any degree-233 field, for example the NIST B-233
trinomial x^233 + x^74 + 1.

## Why the Montgomery factor x^((k-1)/2) splits the work in two

If the Montgomery factor is theta = x^h with h = (k-1)/2, then C*D*x^-h
splits into two independent sums:

    A = C * (d_{k-1} x^h + d_{k-2} x^{h-1} + ... + d_{h+1} x + d_h)   mod F
    B = C * (d_{h-1} x^-1 + d_{h-2} x^-2 + ... + d_0 x^-h)           mod F
    P = A + B

A uses the upper half of D and B the lower half. Each can be evaluated by a
Horner-style recurrence of h+1 steps:

    A_i = x * A_{i-1} mod F + C * d_{k-i}         A_0 = 0,  i = 1 .. h+1
    B_i = x^-1 * B_{i-1} mod F + C * d_{i-1}      B_0 = 0,  i = 1 .. h+1 (d_h taken as 0)

Multiplying by x shifts the word up. If the bit that falls out (a_{k-1}) is
1, the low coefficients of F are added. Multiplying by x^-1 shifts down. If
the bit that falls out (b_0) is 1, F is added before the shift, so that the
division is exact. Bit by bit:

    a^i_{k-1-j} = a^{i-1}_{k-2-j} + a^{i-1}_{k-1} f_{k-1-j} + d_{k-i} c_{k-1-j}   (a_{-1} = 0)
    b^i_j       = b^{i-1}_{j+1}   + b^{i-1}_0     f_{j+1}   + d_{i-1} c_j         (b_k = 0, f_k = 1)

The two recurrences have the same shape and share no data. Two arrays of the
same hardware run them at the same time: the A array goes MSB first and the
B array goes LSB first. P is the XOR of the two results.

To get a plain product sigma*v mod F, convert both operands to
the Montgomery domain (C = sigma x^h mod F, D = v x^h mod F), multiply, then
run the unit once more on (P, 1). In a longer computation, such as a point
multiplication, values stay in the Montgomery domain between products.

## The systolic schedule

Each array is a chain of h+1 = (k+1)/2 PEs. PE i carries out step i of the
recurrence, one coefficient bit per clock cycle. **PE i processes bit
position j in cycle 2(i-1) + j**, counted from the first cycle of the
operation. For k = 5:

| cycle | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|-------|---|---|---|---|---|---|---|---|---|
| PE 1  | j0 | j1 | j2 | j3 | j4 |   |   |   |   |
| PE 2  |   |   | j0 | j1 | j2 | j3 | j4 |   |   |
| PE 3  |   |   |   |   | j0 | j1 | j2 | j3 | j4 |

Bit position j means a_{k-1-j} in the A array and b_j in the B array. The
schedule sets every delay in the chain:

* **Operand streams (c, f): two registers per PE.** The next PE uses the
  same operand bit two cycles later.
* **Partial-product stream: one register per PE (D_a).** At bit j, PE i needs
  bit j+1 of the previous step (a_{k-2-j} or b_{j+1}). The previous PE
  produced that bit one cycle earlier.
* **The reduction bit (a^{i-1}_{k-1} or b^{i-1}_0) is held.** Every bit of
  step i needs it. It is the first bit the previous PE produces. A hold
  register in that PE captures it when control t is high (bit 0) and keeps it
  for the rest of the pass.
* **The last bit is masked.** At j = k-1 the shifted-in bit (a_{-1} or b_k)
  must be 0. The previous PE's register is already carrying the next, unrelated
  bit at that point, so control Z (active low) gates it off.
* **Control t and Z: two registers per PE**, so each PE sees its own pulses
  at cycles 2(i-1) and 2(i-1)+k-1.

The serial operands come from rotating shift registers. After an operand
comes a repeat of it, not zeros, so the Z mask is really needed. The
testbenches check this: they fail if Z arrives one cycle early.

## The processing element

`mm_pe` is the cell of both arrays; the two arrays differ only in wiring.

    s       = (d & c) ^ (f & top_in) ^ (z & prev_in)
    bit_out <= s                      every cycle        (D_a)
    top_out <= s   when t = 1                            (hold)
    c_out, f_out = c_in, f_in delayed two cycles

`d` is the PE's own fixed bit of D. `top_in` is the previous PE's held
reduction bit. `prev_in` is the previous PE's serial bit. PE 1 gets zeros
for `top_in` and `prev_in`. In the B array the last PE's `d` is tied to 0.

## Data path around the arrays

    start ─► mm_ctrl ── t,Z (mm_ctrl_t) ──────────────┐
                 │ load/shift                         │
    c,f ─► 4 x mm_serializer ─ c_{k-1-j}, f_{k-1-j} ─► mm_array (A) ─ bit, top ─► mm_out_sr (SR-A) ─┐
                             └ c_j, f_{j+1} ───────► mm_array (B) ─ bit, top ─► mm_out_sr (SR-B) ─┴► mm_gf_add ─► p
    d ─► register ─ d_{k-i} to A's PE i, d_{i-1} to B's PE i (0 for the last)

The last PE of each array delivers its result one bit per cycle. The first
result bit (a_{k-1} or b_0) stays in that PE's hold register and becomes one
end of the result word. The other k-1 bits are shifted into SR-A (which fills
from the MSB end) or SR-B (which fills from the LSB end). Keeping the first
bit out of the shift register keeps both words in order, so the final
k-bit XOR lines the bits up directly.

## Interface and timing (`mont_mult_siso`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset that clears all state |
| start | in | 1 | begin an operation; accepted only when busy = 0 |
| c, d | in | K | operands; bit i is the coefficient of x^i; sampled in the start cycle only |
| f | in | K | f_0 .. f_{K-1} of the field polynomial; f_K = 1 is implied, and f_0 must be 1 |
| busy | out | 1 | high for 2K cycles |
| done | out | 1 | one-cycle pulse 2K+1 cycles after the accepted start |
| p | out | K | the Montgomery product, valid from done until the next operation has run K+1 busy cycles |

A start raised while busy is ignored. A new start may be given in the done
cycle. At K = 233 an operation takes 467 cycles from start to done.

The controller (`mm_ctrl`) counts busy cycles n = 0 .. 2K-1. It pulses t at
n = 0 and Z = 0 at n = K-1. It shifts the output registers during
n = K+1 .. 2K-1.

## Where this RTL departs from the published architecture

* **Flip-flops instead of latches.** The published cells use D-latches, plus
  a tri-state buffer in front of the hold latch. Here every storage element is
  an edge-triggered flip-flop, and the tri-state buffer becomes a load enable.
  The hold register loads the XOR output on the same edge as D_a, not from
  D_a's output one stage later. With t high in the PE's bit-0 cycle, an
  edge-triggered register loading from D_a's output would capture the bit
  from before that cycle.
* **Latency.** The published count is 2k-2 clock cycles. Here the array is
  busy for 2K cycles, and done follows one cycle later. With edge-triggered
  registers, the last bit reaches the shift register in busy cycle 2K-1.
* **Z is pipelined like t.** The published drawing shows delay stages only
  on t, and draws Z passing from PE to PE. The required Z times step by two
  cycles from PE to PE, so Z goes through the same two registers as t.
* **Cost beyond the core.** The published gate budget is 3k+3 AND and 3k+2
  XOR gates, with no multiplexers, and this array has exactly that. The
  published storage count is 8k-2 latches. This design has more storage
  elements because of the Z delay line, the operand registers (four
  serializers and a D register), and the controller. The serializers
  are this design's way of feeding the serial inputs; the published
  architecture does not say where the serial streams come from. At K = 233
  synthesis reports about 3.5k flip-flop bits. The same coarse synthesis
  counts 697 one-bit AND cells, 463 one-bit XOR cells and one 233-bit XOR.
  For comparison, 3k+3 = 702 and 2(k+1) = 468 in the arrays. A few gates
  fall away because PE 1 and the last B PE have inputs tied to 0.
* **One operation at a time.** Each PE holds its D bit for the whole
  operation, so operations are not overlapped.

## Files

| file | contents |
|------|----------|
| `rtl/mm_pkg.sv` | `mm_ctrl_t` {t, z} control word, PE count function |
| `rtl/mm_pe.sv` | processing element |
| `rtl/mm_array.sv` | chain of (K+1)/2 PEs with the control delay line |
| `rtl/mm_serializer.sv` | rotating parallel-in/serial-out operand register |
| `rtl/mm_out_sr.sv` | SR-A / SR-B output shift register |
| `rtl/mm_gf_add.sv` | K-bit XOR |
| `rtl/mm_ctrl.sv` | sequencer |
| `rtl/mont_mult_siso.sv` | top level |
| `tb/mm_ref_pkg.sv` | word-level GF(2^k) reference (multiply, x^±n, Montgomery) |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/mm_tb_driver.sv` | reusable stimulus/checker for the top at any K |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`. The testbenches
compare against word-level arithmetic (schoolbook multiply plus long
division, or repeated division by x), which shares no structure with the
bit-serial hardware.

* `tb_mm_pe`: random stimulus against a cycle model of the cell.
* `tb_mm_array`: the A and B arrays at K = 11, 300 operations with the field
  trinomial x^11 + x^2 + 1 and with random F. It checks every output bit in
  its exact cycle, K+j. Random bits follow each operand to prove the Z mask.
* `tb_mm_out_sr`, `tb_mm_serializer`, `tb_mm_gf_add`, `tb_mm_ctrl`: unit
  behaviour and exact control timing.
* `tb_mont_mult_siso`: the whole multiplier at three sizes:
  * K = 5 with x^5 + x^2 + 1, all 1024 operand pairs;
  * K = 11 with x^11 + x^2 + 1, random operands;
  * K = 31 with x^31 + x^3 + 1, random operands.

  It checks latency and Montgomery-domain round trips. It also fails if any
  reduction, t capture, Z mask or ignored start never happened.
* `tb_mont_mult_siso_full`: the default K = 233 with x^233 + x^74 + 1.
  It runs 40 random products and 40 round trips, each compared with the
  plain field product.

Running one with plain Verilator, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/mm_pkg.sv tb/mm_ref_pkg.sv tb/tb_mont_mult_siso.sv --top-module tb_mont_mult_siso
    ./obj_dir/Vtb_mont_mult_siso

The packages are named first; `-y` lets Verilator find every module in
the file of its own name. Swap in another `tb_*.sv` and its top name to run
a different testbench. The `mm_ref_pkg` package is only needed by testbenches
that import it.

Lint reports a few warnings. The last PE's operand and control outputs are
unused. The reset is also used by the controller's assertions, which Verilator
reports as a synchronous use.

## Changing it

* **Field degree:** set parameter `K`. It must be odd and at least 3; this is
  checked at elaboration. The `mm_ref_pkg` reference handles K up to 255.
* **Field polynomial:** drive `f`. Any F with f_0 = 1 gives the Montgomery
  product defined above. F must be irreducible for the result to be a field
  element in the usual sense.
* The throughput and area figures quoted for this architecture come from gate
  counts in a 15 nm library (about 10.2k NAND2-equivalent gates and
  19.6 ns per product at k = 233). This RTL has not been synthesised to a
  library, so those figures are not verified here.

# Division-free fuzzy logic controller

This is a two-input, single-output fuzzy logic controller (FLC) in
synthesizable SystemVerilog. Each control step turns two crisp inputs (for
example an error `x` and its rate `phi`) into one crisp output. It uses
lookup-table fuzzification, MAX-MIN inference and a centre-of-gravity style
defuzzification. Two ideas keep the hardware small:

* **Read-modify-write MIN and MAX.** A comparator tree would grow as
  O(n·2^n) for MIN and O(2^n) for MAX, where n is the number of inputs. Here a
  single comparator sweeps a small bank of registers instead.
* **Coarse-to-fine search instead of division.** The crisp output is the point
  where the left and right moments of the output terms balance. It is found by
  two pointers that walk toward each other, using only multipliers, adders
  and comparators. The defuzzifier has no divider.

The design assumes four things about the controller:

1. the inputs are quantized;
2. at most two membership functions (MFs) of an input overlap;
3. output MFs are symmetric triangles, each treated as a singleton at its
   centre;
4. each output term is weighted by its membership times its span.

## Data flow of one control step

```
 x, phi ──► input tables ──mu, id──► MIN (read-modify-write) ──strength──► MAX (read-modify-write)
 (flc_input_lut)        └─────id──► decomposed rule base ──term id──┘          │ mu_y[0..6]
                                    (flc_inference)                            ▼
                                                   coarse search ──► fine search ──► theta
                                                   (flc_coarse)      (flc_fine)
 flc_control:  Min & Inference ─► Max ─► Coarse ─► Fine ─► done
```

`flc_top` connects the blocks and `flc_control` runs the four phases in order.
The latency from `start` to `done` is 38 clock cycles at the default sizes:

| phase | cycles |
|---|---|
| MIN | NIN·2^NIN + 1 = 9 |
| MAX | 2^NIN + 1 = 5 |
| coarse | NY_TERMS + 2 = 9 |
| fine | 2^FINE_BITS + 2 = 10 |
| hand-overs between phases | 5 |

## Odd and even term sets

No more than two input terms overlap. So if the terms of an input are
numbered 1..7, then at any input value at most one odd-numbered term and at
most one even-numbered term is active. Each input therefore has two tables,
both addressed by the quantized input:

* the **odd table** gives the membership and the id of the active odd term;
* the **even table** does the same for the active even term.

The id is the term's position within its set: `(j-1)/2` for odd term j and
`j/2-1` for even term j. A level where no term of a set is active stores
membership 0. These tables are `flc_input_lut`, one instance per input.

The odd/even split also cuts the rule base into 2^n disjoint **sub-rule
bases**: R_oo, R_oe, R_eo and R_ee for two inputs. Each sub-rule base has at
most one active rule per input vector. In sub-rule base r, input i uses the
odd set when bit `NIN-1-i` of r is 0, and the even set when it is 1. The
cell address is the concatenation of the ids of the chosen sets. So the four
sub-rule bases are read in parallel, and their output term indices are caught
in index registers (`flc_inference`). Splitting the rule base adds no
storage.

## MIN and MAX by read-modify-write

**MIN (`flc_min`).** There are 2^n registers, MINoo..MINee, one per sub-rule
base. On start they are preset to all ones (FFh). Then the module makes n
passes. In pass i, each register in turn is read, compared with input i's
membership from the set that register selects, and written back with the
smaller value. That is n·2^n cycles, using one comparator and one input
multiplexer. At the end, each register holds the firing strength of its
sub-rule base.

**MAX (`flc_max`).** Several sub-rule bases can name the same output term. A
bank of NY_TERMS registers is cleared to 00h. Then, for 2^n cycles, two
multiplexers pick one firing strength and the term index it goes with. The
register that the index addresses is replaced by the larger of its old value
and that strength. The result `mu_y` is the clipped membership of every
output term.

## Coarse-to-fine defuzzification

This is the least obvious part of the design.

Output term j is a singleton at centre `c_j` with weight
`a_j = mu_j * span_j`. The centre of gravity θ* is the point where the
moments balance:

    sum over j of a_j (θ* − c_j) = 0

It is found in two stages that use the same two-pointer rule.

### Coarse stage (`flc_coarse`)

A left index counts up from term 0 and a right index counts down from the
last term. The left side keeps two values:

* LA, the total area of the terms at or left of the left index;
* LM, their moment about the left centre.

The right side keeps RA and RM in the same way. Each cycle, the side with the
smaller moment moves one term (the left side on a tie):

    LM += LA · (c[li+1] − c[li]);   LA += a[li+1];   li++      (left step)

The right step is the mirror image. The cycle's two area products
(membership × span) and two moment products (area × interval) come from four
multipliers.

LM(k) can only grow with k, and RM(k) can only shrink. So the indices always
meet at a term k that is next to θ*. At k, both moments are complete moments
about c_k, so the sign of LM − RM gives the answer:

* LM ≤ RM means θ* lies in [c_k, c_k+1];
* LM > RM means θ* lies in [c_k−1, c_k].

The module also saves each side's moment and area from before that side's
last step. So the moment and area at both ends of the chosen interval are
known, and they are passed on.

This stopping rule is a deliberate choice. A simpler rule, stopping as soon
as the indices are adjacent, can pick the wrong interval. Example: areas
1,0,0,0,10 at centres 0..4 end in [2,3], but θ* is 3.64.

### Fine stage (`flc_fine`)

The chosen interval is split into 2^FINE_BITS sub-steps. No term lies strictly
inside it, so each step adds a fixed amount:

* a left step adds `LA · interval` to LM;
* a right step adds `RA · interval` to RM.

The coarse stage keeps its moments multiplied by 2^FINE_BITS, so these
additions need no shift or division.

A left up-counter starts at 0 and a right down-counter starts at 2^FINE_BITS.
Each cycle, the side with the smaller moment advances, and the other adder
adds 0. When the two counters are equal, the crisp output is latched:

    theta = c_left · 2^FINE_BITS + position · interval

The MEP latch is cleared when a search starts, so read `theta` from the
`done` pulse on. `theta` is in units of 1/2^FINE_BITS of the output universe and lies within
one sub-step of the true centre of gravity.

Example trace: start with LM = 0x144 and RM = 0xC6, and per-step increments
of 0x36 (left) and 0x30 (right). The moment latches then go through:

| cycle | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|---|
| LM | 144 | 144 | 144 | 144 | 17A | 17A | 1B0 |
| RM | C6 | F6 | 126 | 156 | 156 | 186 | 186 |

The search ends at sub-step 3. `tb_flc_fine_trace` checks this trace.

## Loading the tables

Every table is loaded through one write port, `cfg` (type `cfg_wr_t` in
`flc_pkg`). Each cycle with `cfg.we` high writes one entry:

| `cfg.tbl` | `cfg.addr` | `cfg.data` |
|---|---|---|
| `CFG_IN_LUT` | `{input, parity (0 odd, 1 even), level}` | `{id, mu}` |
| `CFG_RULE` | `{sub-rule base r, {id_in0, id_in1}}` | output term index (0-based) |
| `CFG_OUT_TERM` | output term | `{centre, span}` |

Two rules apply when loading:

* Output centres must increase with the term index.
* Every rule cell that can fire must name an existing output term. An
  assertion in `flc_max` checks this.

`tb_flc_top` shows a complete load: triangular input MFs, a 7×7 rule base
`out = clamp(k1 + k2 − 3)`, and uneven output centres and spans.

## Sizes and parameters

All sizes are parameters of the package `flc_pkg`. Change them there.

| parameter | default | meaning |
|---|---|---|
| `NIN` | 2 | inputs (gives 2^NIN MIN registers and sub-rule bases) |
| `P_BITS` | 8 | input quantization, 2^p levels |
| `Q_BITS` | 8 | membership width (FFh = full membership) |
| `NX_TERMS` | 7 | terms per input (4 odd + 3 even) |
| `NY_TERMS` | 7 | output terms |
| `SPAN_W`, `CTR_W` | 8, 8 | output span and centre widths |
| `FINE_BITS` | 3 | 2^3 = 8 fine sub-steps per term interval |

The two inputs and the 8-bit memberships are part of the method. The term
counts, the input width, the fine resolution and the table-write port are
choices made for this implementation. `flc_input_lut` has one parameter of
its own, `VAR`, which selects the input it serves.

## Departures and limits

* **One clock.** Phase sequencing uses one clock with start/done pulses. The
  MIN loop's multiplexer and register decoder step on a counter, not on
  divided clocks.
* **Register order.** The MIN registers are visited in the order oo, oe, eo,
  ee. The result does not depend on the order.
* **Fine-stage precision.** Accuracy is one fine sub-step. If θ* falls
  exactly on a term centre, the result may be one sub-step to its right.
* **All memberships zero.** If every output membership is zero, no rule fired
  and `theta` has no meaning.
* **Input sampling.** Inputs are sampled on `start` and held for the whole step.
  A `start` while busy is ignored.

## Files and simulation

`rtl/` holds the package `flc_pkg` and one module per block:

* `flc_input_lut`
* `flc_min`
* `flc_inference`
* `flc_max`
* `flc_coarse`
* `flc_fine`
* `flc_defuzzifier` (coarse + fine)
* `flc_control`
* `flc_top`

Each block has a self-checking testbench `tb/tb_<module>.sv`, and
`tb/tb_flc_fine_trace.sv` replays the trace above. Every testbench ends with
a `TB_RESULT checks=N failures=M` line.

The testbenches compare against models written independently:

* exact sums of areas and moments for the coarse stage;
* a floating-point centre of gravity for the fine stage, the defuzzifier and
  the whole controller;
* a full 7×7 MAX-MIN evaluation for the controller.

They also check cycle counts. `tb_flc_top` runs 851 control steps at the
default sizes and counts every mechanism: MIN lowering, MAX conflicts,
coarse and fine steps to both sides, and both interval choices.

Example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/flc_pkg.sv tb/tb_flc_top.sv --top-module tb_flc_top
    ./obj_dir/Vtb_flc_top

# 4-bit flash ADC with a Wallace tree thermometer encoder

A flash ADC compares its input against every reference level at once. With
4 bits that means 15 comparators, and their outputs form a *thermometer code*:
ones from the bottom up to the level of the input, zeros above it. The
encoder's job is to turn those 15 bits into a 4-bit binary number.

The usual encoder finds the single 1→0 edge in the code, with XOR gates, and
looks it up in a ROM. This design instead **counts the ones** with a Wallace
tree of full adders. For a clean thermometer code the count is the same as the
edge position, so no edge detection is needed. When a comparator is wrong and
leaves a *bubble* in the code (a 0 among the ones, or a 1 among the zeros),
the count is off by one LSB per wrong comparator. A ROM encoder can be off by
far more. The full adder cell is written in the transmission-gate form, where
sum and carry come from multiplexers steered by `a XOR b`. That cell is what
keeps the transistor-level encoder small.

```
 vref ─┬─ R ─┬─ R ─ … ─┬─ R ─ gnd         resistor_ladder  (16 equal R)
       │  tap15       tap1
 vin ──┴──► comparator ×15 ──► therm[14:0] ──► wallace_tree_encoder ──► dout[3:0]
                                                (11 × tg_full_adder)
```

## The encoder tree

`wallace_tree_encoder` reduces 15 one-bit inputs to a 4-bit count with 11 full
adders in three columns. An input `i_k` is comparator k's output, which is
`therm[k-1]`.

| Adder | a | b | cin | sum goes to | cout goes to |
|---|---|---|---|---|---|
| X1 | i13 | i12 | i11 | X5 (weight 1) | X6 (weight 2) |
| X2 | i10 | i9 | i8 | X5 | X6 |
| X3 | i6 | i5 | i4 | X7 | X8 |
| X4 | i3 | i2 | i1 | X7 | X8 |
| X5 | i14 | X1.sum | X2.sum | X9 | X6 |
| X6 | X1.cout | X2.cout | X5.cout | X10 (weight 2) | X11 (weight 4) |
| X7 | i7 | X3.sum | X4.sum | X9 | X8 |
| X8 | X3.cout | X4.cout | X7.cout | X10 | X11 |
| X9 | i15 | X5.sum | X7.sum | **dout[0]** | X10 |
| X10 | X6.sum | X8.sum | X9.cout | **dout[1]** | X11 |
| X11 | X6.cout | X8.cout | X10.cout | **dout[2]** | **dout[3]** |

You can check the tree by counting weights. Column 1 turns twelve inputs into
four weight-1 sums and four weight-2 carries. Column 2 splits the seven weight-1
signals into two groups and adds each group. It does the same with the weight-2
carries, and each weight-2 group also takes the carry of its weight-1 adder
(X5 feeds X6, X7 feeds X8). Column 3 is a three-stage ripple: bit 0, then bit 1,
then bits 2 and 3. The largest count, 15, needs exactly 4 bits, and X11's carry
is the MSB. The three inputs that skip column 1 (i7, i14 and i15) keep the
path from any input to the bit-0 adder at most two adders long.

The names X1–X11, the grouping of inputs into the first-column adders, and
where i7, i14 and i15 enter come from the published schematic of this encoder.
The routing between the second and third columns follows from the weights
above. The original drawings label the outputs in reverse order of weight
(their "A0" is the carry-out of the last adder). Here the ports use ordinary
weights: `dout[0]` has weight 1.

## The transmission-gate full adder

`tg_full_adder` computes `sum = a^b^cin` and `cout = ab + cin(a+b)` like this:

```
p    = a ^ b
sum  = p ? ~cin : cin
cout = p ?  cin : a        // p = 0 means a == b, so a itself is the carry
```

In silicon each `?:` is a complementary pair of transmission gates steered by
`p` and `~p`. The published cell has 20 transistors, where a conventional
static CMOS full adder has 28. This RTL cell is the logic function with that
structure made visible. It is not a transistor netlist, and the delay, power
and transistor-count advantages of the cell are not modelled. Logically it is
identical to any other full adder, so an encoder built from conventional
adders would be the same RTL.

## Bubbles and the analog front end

The ladder and comparators are analog parts. `resistor_ladder` and
`comparator` are behavioural models with `real` ports. They are not
synthesizable, and they are included so that the whole converter can be
simulated from a voltage to a code:

- `resistor_ladder` gives ideal, unloaded taps at `k * vref / 16`, for
  k = 1..15. Resistor value, mismatch and loading are not modelled.
- `comparator` outputs `(vinp + VOS) > vinn`, with no delay and no clock. The
  parameter `VOS` is an input-referred offset. An offset larger than half an
  LSB (vref/32) makes one comparator disagree with its neighbours, and that is
  the bubble.
- `flash_adc` forwards a per-comparator offset array, `CMP_OFFSET` (all zeros
  by default). This is how the bubble behaviour is exercised. The thermometer
  code is also brought out as the output `therm`, so that it can be observed.

The converter has no clock, no sample-and-hold and no output register. The
result follows `vin` combinationally, as the transistor-level circuit does. If
you need a sampled converter, register `therm` or `dout` in your own wrapper.

## Interfaces

`flash_adc_pkg` holds `N_BITS = 4`, `N_THERM = 15`, the 1 V supply `VDD`, and
the types `therm_t` (15 bits) and `code_t` (4 bits).

| Module | Ports | Parameters |
|---|---|---|
| `flash_adc` (top) | `input real vin, vref`; `output therm_t therm`; `output code_t dout` | `real CMP_OFFSET[15]` |
| `wallace_tree_encoder` | `input therm_t therm`; `output code_t bin` | none (fixed 15:4) |
| `tg_full_adder` | `a, b, cin` → `sum, cout` | none |
| `resistor_ladder` | `input real vref`; `output real tap[N_TAPS]` | `N_TAPS = 15` |
| `comparator` | `input real vinp, vinn`; `output logic out` | `real VOS = 0.0` |

With ideal comparators, `dout = floor(16 * vin / vref)`, clipped to 0..15. The
code switches when `vin` is strictly above a tap.

The encoder and the adder are plain combinational logic and synthesize on
their own. The encoder maps to 11 XORs, 11 inverters and 22 2:1 muxes before
technology mapping. The 4-bit size is fixed by the hand-wired tree. A wider
converter needs a larger tree, not a parameter change.

## How far it is verified

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it does |
|---|---|
| `tb_tg_full_adder` | all 8 input combinations against `a+b+cin` |
| `tb_wallace_tree_encoder` | all 32768 input words against a bit count; among them the 16 clean codes and the 560 words one misplaced bit away from a clean code |
| `tb_resistor_ladder` | taps for four reference voltages, built up one step at a time |
| `tb_comparator` | inputs on both sides of the threshold, with and without an offset |
| `tb_flash_adc` | full input sweep with one late and one early comparator; checks the thermometer code, that `dout` is the count of ones, that the error is at most one LSB per bubbled comparator, and that 0-bubbles, 1-bubbles, under-range, over-range and all 16 codes each occur |
| `tb_flash_adc_full` | default configuration; a 4096-point ramp across the full scale, checking exact codes, clean thermometer codes and a monotonic output |

To run one with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/flash_adc_pkg.sv tb/tb_flash_adc.sv --top-module tb_flash_adc
./obj_dir/Vtb_flash_adc
```

Each testbench finishes in well under a second. Nothing here checks analog
timing or power. The encoder's sub-nanosecond delay and nanowatt power belong
to its 45 nm transistor implementation, and RTL cannot reproduce them.

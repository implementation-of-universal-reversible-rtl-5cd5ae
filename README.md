# URL gate: a 4-input, 4-output "universal reversible logic" cell

The URL (Universal Reversible Logic) gate is a 4x4 primitive. It offers three
common logic operations (XOR, NAND and NOR) side by side in one cell, and it
carries its first input through unchanged. With inputs A, B, C, D and outputs P, Q, R, S:

| output | function      | operation        |
|--------|---------------|------------------|
| P      | A             | pass-through     |
| Q      | A xor B       | XOR              |
| R      | not (B and C) | NAND             |
| S      | not (C or D)  | NOR              |

The cell was designed as a transistor-level CMOS circuit in a 130 nm process
with a 1 V supply. It is intended as a building block for test logic (ATPG, BIST,
fault detection) and for low-power circuits built in the reversible-logic style.
This RTL has two views of it:

* `url_gate`: the logic function. It is synthesizable and has zero delay.
* `url_cell`: a timing model of the CMOS cell, for simulation only. It
  wraps `url_gate` and delays each output by its measured propagation delay.
  It is the top of the design.

## Truth table

Index `{a,b,c,d}` and read `{p,q,r,s}`:

| abcd | pqrs | abcd | pqrs | abcd | pqrs | abcd | pqrs |
|------|------|------|------|------|------|------|------|
| 0000 | 0011 | 0100 | 0111 | 1000 | 1111 | 1100 | 1011 |
| 0001 | 0010 | 0101 | 0110 | 1001 | 1110 | 1101 | 1010 |
| 0010 | 0010 | 0110 | 0100 | 1010 | 1110 | 1110 | 1000 |
| 0011 | 0010 | 0111 | 0100 | 1011 | 1110 | 1111 | 1000 |

Packed as one nibble per input vector, with vector 15 first, this table is
`64'h88AB_EEEF_4467_2223`. Both testbenches check against that constant.

### The gate is not actually one-to-one

A reversible gate must give every input vector its own output vector, so that
the inputs can be recovered from the outputs. The equations above do not do this:

* A and B can always be recovered (P = A, then B = P xor Q).
* C can be recovered only when B = 1. When B = 0, R is 1 whatever C is.
* D can be recovered only when C = 0. When C = 1, S is 0 whatever D is.

The table has only 10 distinct output vectors, not 16. For example, 0001,
0010 and 0011 all give 0010, and 0110 and 0111 both give 0100. The RTL
implements the equations exactly as defined. If you need true reversibility
(a bijection on 4 bits), this gate does not give it without changes to its
equations. `tb_url_gate` checks two of these collisions explicitly, so that a
later "fix" cannot go unnoticed.

## Timing model (`url_cell`)

The CMOS cell was characterised by transient simulation. Each output has one
measured propagation delay:

| parameter | output | default   |
|-----------|--------|-----------|
| `T_P`     | P      | 28.831 ns |
| `T_Q`     | Q      | 28.831 ns |
| `T_R`     | R      | 35.894 ns |
| `T_S`     | S      | 31.056 ns |

The measured power of the cell was 5.2076 nW. The model does not represent
power, voltage levels, slew or load.

Three modelling choices are this design's own:

* **Transport, not inertial, delay.** The characterisation stimulus produces
  pulses of 9 to 10 ns on S and Q. These are far shorter than the delays,
  yet they do reach the outputs. A Verilog `assign #d` is inertial and would
  swallow them. So each output goes through `transport_delay`. That helper
  forks one process per input change, and the process writes the captured
  value to the output exactly `DELAY` later. Any number of changes can be in
  flight at once.
* **One delay per output.** The same delay applies to rising and falling
  edges, and to whichever input caused the change. The measurements give one
  number per output and nothing finer.
* **Start-up.** Outputs read 0 until one delay after the first input change.

All delays are `realtime` parameters in ns with 1 ps precision
(`timeunit 1ns; timeprecision 1ps;` in every module). `url_gate` has no
timing of its own, so for synthesis use `url_gate` alone. Synthesis tools
ignore or reject the `#` delays in `url_cell` and `transport_delay`.

## Files

| file                     | contents |
|--------------------------|----------|
| `rtl/url_gate.sv`        | the logic function; synthesizable |
| `rtl/transport_delay.sv` | one-bit transport delay; behavioural |
| `rtl/url_cell.sv`        | top: `url_gate` plus four transport delays; behavioural |
| `tb/tb_url_gate.sv`      | all 16 vectors, 200 random vectors and the collision checks |
| `tb/tb_url_cell.sv`      | end-to-end test of the timed cell at its default delays |

## Verification

`tb_url_cell` runs in two phases.

1. **Characterisation stimulus.** Four pulse sources drive A to D. Each has a
   50 ns period, 1 ns rise and fall times and no start delay. The high widths
   are A 20 ns, B 30 ns, C 40 ns and D 20 ns. The run lasts 1 us, which is 20
   periods. Each logic edge sits at the 50 % point of its ramp. Every period
   then walks through the vectors 1111, 0110, 0010 and 0000. This toggles all
   four outputs and creates the short XOR and NOR pulses.
2. **All 16 vectors**, in Gray-code order, 50 ns each. The settled outputs are
   compared with the truth table.

The testbench logs every input change with its time. It checks that each
output edge lands exactly its delay after an input change, to within 1 ps,
and that the edge carries the value the reference equations give for that
moment. At the end it checks four more things:

* Each output's edge count equals the number of changes of its reference
  function.
* Each of the pass, XOR, NAND and NOR outputs switched at least once.
* S produced all 20 of its short NOR pulses.

Run it with plain Verilator from the project root:

```
verilator --binary --timing --assert -Wall -Wno-fatal -y rtl tb/tb_url_cell.sv --top tb_url_cell
./obj_dir/Vtb_url_cell

verilator --binary --timing --assert -Wall -Wno-fatal rtl/url_gate.sv tb/tb_url_gate.sv --top tb_url_gate
./obj_dir/Vtb_url_gate
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. Each
simulation takes well under a second.

## Changing the design

* **Other delays** (another corner or process): override `T_P` to `T_S` on
  `url_cell`. `tb_url_cell` has its own copies of the four delays as
  localparams, so update them there too.
* **Other equations:** edit `url_gate`. Then regenerate the `TRUTH` constant
  in both testbenches. Nibble `i` of that constant is `{p,q,r,s}` for input
  `{a,b,c,d} = i`.
* **Not modelled:** the transistor netlist of the cell, its power and its
  analog waveforms (levels, slopes and glitches).

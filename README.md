# A four-bit adder built from majority gates

In quantum-dot cellular automata (QCA) the natural logic gate is not the AND or the
OR but the **majority gate**: a cell surrounded by input cells settles to the value
held by most of them. AND and OR exist only as majority gates with one input tied to
a constant. So the cheapest adder in this technology uses as few majority gates as
possible. This design builds a one-bit full adder from just two of them: a
three-input majority gate for the carry and a **five-input** majority gate for the
sum. It then chains four of those into a ripple-carry adder.

The RTL here describes that circuit at the gate level. It is the adder's logic, written
so that you can simulate it, check it and synthesize it. It does not describe the
physical cell layout.

## The two gates

| module         | function                                      |
|----------------|-----------------------------------------------|
| `maj3`         | `y = x2·x1 + x2·x0 + x1·x0`: 1 when at least two of three inputs are 1 |
| `maj5`         | 1 when at least three of five inputs are 1     |
| `qca_inverter` | `y = ~a`                                       |

With one input of `maj3` held at 0 the gate computes the AND of the other two. Held
at 1, it computes their OR. `maj3_tb` checks both uses.

## The full adder: a sum from one five-input majority

`full_adder` computes

    c = maj3(x1, x0, c0)
    s = maj5(x1, x0, c0, ~c, ~c)

The carry is the textbook result: a full adder carries out exactly when at least two
of its three inputs are 1.

The sum is the less obvious part. The five-input gate sees the three inputs plus two
copies of the inverted carry, so `~c` has weight 2 in the vote:

| ones among x1, x0, c0 | c | votes from ~c | total votes | s (≥ 3?) |
|:---:|:---:|:---:|:---:|:---:|
| 0 | 0 | 2 | 2 | 0 |
| 1 | 0 | 2 | 3 | 1 |
| 2 | 1 | 0 | 2 | 0 |
| 3 | 1 | 0 | 3 | 1 |

If there is no carry, the two `~c` votes lift a single 1 over the threshold. If there
is a carry, those votes disappear, and only three 1s reach the threshold. The result
is the parity of the three inputs, which is the sum bit. The gate computes it without
any XOR. Written in AND/OR form, this is `s = ~c·(x1 + x0 + c0) + x1·x0·c0`.

The three-input gate's output feeds the five-input gate through an inverter. In the
cellular layout, the one `~c` signal drives both of those five-gate inputs. In the
RTL, `full_adder` instantiates `maj3`, `qca_inverter` and `maj5`, and sends the one
inverter output to two bits of the `maj5` input vector.

## The four-bit ripple chain

`nanoadder4` places `WIDTH` (default 4) full adders in a row. Stage `i` adds `x1[i]`,
`x0[i]` and the carry of stage `i-1`; stage 0 takes the external carry `c0`. The
carry of the last stage is the output `c`, so

    {c, s} = x1 + x0 + c0

The carry path goes through one three-input gate per stage. The sum of stage `i`
waits for the carry into that stage and then passes through one inverter and one
five-input gate. Internally, the vector `carry[WIDTH:0]` holds the chain:
`carry[i]` enters stage `i`.

Ports of `nanoadder4`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `x1` | in  | WIDTH | first operand |
| `x0` | in  | WIDTH | second operand |
| `c0` | in  | 1     | carry in |
| `s`  | out | WIDTH | sum |
| `c`  | out | 1     | carry out |

## Timing

The RTL is purely combinational. It has no clock, no reset and no handshake.

A real QCA circuit differs here. Its cells are switched by clock zones, so signals
move from zone to zone like data through latches. The published QCA layout takes
4 zones for the one-bit adder and 15 zones for the four-bit adder. Where each gate
sits among those zones is a property of the layout, and it is not modelled. If you
need a cycle-accurate model of the QCA pipeline, register the outputs of the stages
according to your own zone assignment.

## Where this follows the published circuit and where it chooses

Taken from the published circuit:

- the two-gate full adder;
- the double-weight inverted carry on the five-input gate;
- the ripple connection of four stages;
- the signal names `x1`, `x0`, `c0`, `s`, `c`.

Choices made in this design:

- `WIDTH` is a parameter; 4 is the published width.
- `maj5` counts the ones of its five inputs and compares the count with 3. Synthesis
  reduces that count to gates.
- The inversion of the carry is a separate `qca_inverter` instance, not an inverted
  output of `maj3`.
- Operand bit `i` goes to stage `i`. The published drawing names the inputs of every
  stage just `x1` and `x0`.

Not represented: the cells themselves, their placement, and the clock zones. These
are physical properties of QCA, not logic.

## Verification

Each module has a testbench in `tb/`. The testbenches compute their expected values
independently of the module and end with a line `TB_RESULT checks=N failures=M`.

- `maj3_tb`: all 8 inputs, plus the AND and OR uses with a tied input.
- `maj5_tb`: all 32 inputs.
- `qca_inverter_tb`: both input values.
- `full_adder_tb`: all 8 input combinations, sum and carry.
- `nanoadder4_tb`: runs at the default width in two phases.
  - **Phase 1** applies all 512 combinations of the two operands and `c0`.
  - **Phase 2** drives one `x1` value and one `x0` value onto every stage at once,
    and steps them and `c0` through all 8 combinations. This is the stimulus used to
    demonstrate the QCA circuit.

  It also watches the internal carry chain. It fails unless each of these events
  occurs at least once:
  - a carry is generated in each of the four stages;
  - a carry ripples from `c0` through all four stages;
  - a carry leaves the top stage;
  - in some stage all three inputs are 1, so sum and carry are both 1.

All testbenches pass.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
        tb/nanoadder4_tb.sv --top-module nanoadder4_tb -Mdir obj
    ./obj/Vnanoadder4_tb

To test another unit, replace `nanoadder4_tb` with `maj3_tb`, `maj5_tb`,
`qca_inverter_tb` or `full_adder_tb`. To build a wider adder, instantiate
`nanoadder4 #(.WIDTH(n))`. The structure and the testbench arithmetic generalize,
but the coverage check in `nanoadder4_tb` assumes four stages.

## Files

- `rtl/maj3.sv`, `rtl/maj5.sv`, `rtl/qca_inverter.sv`: the gates
- `rtl/full_adder.sv`: the one-bit adder
- `rtl/nanoadder4.sv`: the ripple adder (top)
- `tb/*_tb.sv`: one testbench per module

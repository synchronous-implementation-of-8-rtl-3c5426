# 8-bit synchronous square root computer

A small sequential machine that takes an unsigned 8-bit number and returns
its square root to two binary places, using nothing but a subtractor, a
comparator, three registers, a 3-bit counter and a nine-state Moore
controller. It computes the root one bit at a time, the way square roots
used to be extracted with pencil and paper, so it needs no multiplier and
no division.

The output `root_o` is the root times four: `root_o[5:2]` is the integer
part and `root_o[1:0]` the fraction, i.e. `root_o = floor(sqrt(16 * x))`.
For x = 200, `root_o` = 56 = `1110.00b` = 14.0 (the true root is 14.14).

## The digit-by-digit method in base 2

The decimal method splits the number into two-digit groups from the right,
finds the largest digit whose square fits in the first group, subtracts,
brings down the next group, doubles the root found so far, and looks for
the largest digit d such that (20·root + d)·d still fits in the remainder.

In base 2 the digit can only be 0 or 1, which turns the search into one
test. Let `q` be the root bits found so far and `R` the remainder. For each
new pair of radicand bits `p`:

1. bring down the pair: `R' = 4·R + p`;
2. form the trial value `T = 4·q + 1`, which is `{q, 01}` in bits;
3. if `T <= R'`, the next root bit is 1 and `R = R' − T`;
   otherwise the bit is 0 and `R = R'`;
4. `q = {q, bit}`.

An 8-bit radicand has four pairs; two further pairs of zeros give the two
fraction bits, so six steps produce six root bits. All quantities fit in
8 bits: before the last step `q` has five bits (`q ≤ 31`), so
`R ≤ 2q ≤ 62`, `R' ≤ 251` and `T ≤ 125`.

Worked example, x = 200 = `11 00 10 00`:

| step | pair | R'  | T = {q,01} | fits? | new R | q (binary) |
|------|------|-----|------------|-------|-------|------------|
| 1    | 11   | 3   | 1          | yes   | 2     | 1          |
| 2    | 00   | 8   | 5          | yes   | 3     | 11         |
| 3    | 10   | 14  | 13         | yes   | 1     | 111        |
| 4    | 00   | 4   | 29         | no    | 4     | 1110       |
| 5    | 00   | 16  | 57         | no    | 16    | 11100      |
| 6    | 00   | 64  | 113        | no    | 64    | 111000     |

## Datapath

| module         | role |
|----------------|------|
| `input_reg`    | Holds the radicand. `LdIO` loads it; `ShiftData` shifts it left by **two** places, filling with zeros, so the next pair is always in bits [7:6]. Its `IsZero` flag tells the controller that this leading pair is `00`. The zeros shifted in become the fraction pairs. |
| `int_reg`      | The partial remainder. When `LdIntReg` is high it loads `{src[5:0], pair}`, where `SelAdder` selects `src`: the subtractor output (the trial fitted) or its own value (it did not). Appending the pair performs the "bring down" of step 1 in the same load. |
| `result_reg`   | An 8-bit shift register. `LdResultReg` shifts it left and `SelOne` selects the bit that enters. Only bits [5:0] are used. The register is not shifted to form the trial value. The bits are rewired instead: with `Concat1` high, `trial_o = {result[5:0], 01}`. |
| `subtractor`   | 8-bit, combinational: `remainder − trial`. |
| `comparator`   | 8-bit, combinational: `Smaller = remainder < trial`. |
| `step_counter` | 3-bit counter of root bits produced. `Ready` goes high at 6. |
| `sqrt_fsm`     | Nine-state Moore controller. |
| `sqrt_pkg`     | Widths, the state enum `state_e` and the control bundle `ctrl_t`. |

### Two clock edges

The controller changes state on the **rising** edge of `clk`. Every
datapath register (`input_reg`, `int_reg`, `result_reg`, `step_counter`)
loads on the **falling** edge. A state's register loads therefore happen
in the middle of that state. The flags the controller reads at the next
rising edge (`IsZero`, `Smaller`, `Ready`) already show the result of
those loads. This is why a Moore controller can decide on `Ready` in the
same state that produced the last bit. It also gives every control line
half a clock of setup and hold around the register edge. In exchange, the
register-to-register paths have only half a period. Keep this in mind when
setting timing constraints.

## Controller

Every output depends on the state alone. The state names and their outputs
are this implementation's own.

| state | outputs                                                   | next state |
|-------|-----------------------------------------------------------|------------|
| IDLE  | LdIO (radicand copied every clock)                         | CLEAR if Start |
| CLEAR | clear IntReg, ResultReg, counter                          | LEAD |
| LEAD  | –                                                         | SKIP if IsZero, else FETCH |
| SKIP  | ShiftData, LdResultReg (bit 0), count                      | DONE if Ready, else SKIP if IsZero, else FETCH |
| FETCH | LdIntReg (SelAdder=0), ShiftData                           | COMP |
| COMP  | Concat1                                                   | ZERO if Smaller, else ONE |
| ONE   | Concat1, LdIntReg, SelAdder, ShiftData, LdResultReg, SelOne, count | DONE if Ready, else COMP |
| ZERO  | LdIntReg (SelAdder=0), ShiftData, LdResultReg (bit 0), count | DONE if Ready, else COMP |
| DONE  | done                                                      | IDLE when Start is low |

**Leading-zero skip.** While the leading pair of the radicand is `00`, the
root bit is certainly 0 and the remainder stays 0. SKIP then shifts the pair
out and counts a 0 root bit in a single clock, with no compare. This happens
only before the first nonzero pair. After that every pair goes through
COMP. A zero radicand stays in SKIP until the counter reaches six.

**State encoding.** The `ONE_HOT` parameter (on `sqrt_top` and `sqrt_fsm`)
chooses the state register. With 1, the default, it is nine flip-flops, one
per state, and an assertion checks that exactly one is set. With 0 it is
the 4-bit binary code of `state_e`. One-hot costs five more flip-flops and
gives simpler next-state logic. Both encodings behave identically cycle for
cycle.

## Interface and timing (`sqrt_top`)

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `clk`     | in  | 1 | clock |
| `rst`     | in  | 1 | synchronous, active-high reset: controller to IDLE, datapath registers cleared |
| `start`   | in  | 1 | start a computation |
| `data_i`  | in  | 8 | radicand, unsigned |
| `root_o`  | out | 6 | root × 4 |
| `done_o`  | out | 1 | `root_o` is the result of the last computation |
| `state_o` | out | 4 | controller state, for observation |

- In IDLE the radicand is copied from `data_i` at every falling edge. The
  value used is the one present at the falling edge just before the rising
  edge that sees `start` high.
- `done_o` rises with the result and stays high while `start` is held.
  When `start` drops the machine returns to IDLE. `root_o` keeps the
  result until the next computation clears it. A one-clock `start` pulse
  also works: `done_o` is then high for one clock.
- **Latency**, from the rising edge that sees `start` to the rising edge
  that raises `done_o`: **15 − z** clocks, where z (0…3) is the number of
  leading `00` pairs in a nonzero radicand. A zero radicand takes
  **8** clocks. This is 1 (CLEAR) + 1 (LEAD) + z (SKIP) + 1 (FETCH) +
  2 × (6 − z) (COMP and ONE/ZERO per bit).

Two assertions in `sqrt_top` check the datapath while it runs. A
subtraction is only taken when the trial value fits. The step counter never
passes six.

## Resources

After generic synthesis, the default (one-hot) design has 34 flip-flops:
8 in the input register, 8 in the remainder register, 6 of the 8 result
bits (the top two are never read), 3 in the counter and 9 for the state.
The binary encoding needs 29. For reference, a published FPGA mapping of
this architecture used 40 and 35 flip-flops for the two encodings. The
difference of five between the encodings is the same here.

## Choices made in this implementation

The architecture itself is fixed: the module split, the control-line names,
the two-edge clocking, the two-bit shifting input register, the `{q,01}`
trial value, the leading-zero wait state, the 3-bit step counter and the
nine-state Moore controller. The following details are not, and were
chosen here:

- **The states and their outputs**, including the two-clock step (COMP,
  then ONE or ZERO) and the separate CLEAR and LEAD states.
- **Concat1** gates the trial value: `trial_o` is `{result[5:0],01}`
  while it is high and zero otherwise.
- **Appending the pair** happens inside `int_reg`. Only six source bits
  are kept, which is enough (see the bound above).
- **Clear inputs** on the remainder register, the result register and the
  counter, driven by CLEAR and by `rst`.
- **The handshake**: radicand taken while idle, `done` held until `start`
  falls.
- **No borrow output** from the subtractor. The comparator alone decides.
  Merging the two, using the subtractor's borrow as `Smaller`, would save
  the comparator. That would be a different datapath and is not done here.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_subtractor`      | all 65,536 operand pairs against integer subtraction mod 256 |
| `tb_comparator`      | all 65,536 operand pairs against integer `<` |
| `tb_input_reg`       | random load/shift sequences against an integer model (×4 mod 256), IsZero |
| `tb_int_reg`         | random clear/load/select sequences against `(src mod 64)·4 + pair` |
| `tb_result_reg`      | random shifts against `(2r + bit) mod 256`, trial value with and without Concat1 |
| `tb_step_counter`    | random count/clear against a mod-8 model, Ready exactly at 6 |
| `tb_sqrt_fsm`        | both encodings side by side on random inputs, against a written transition and output table; every state visited; reset |
| `tb_sqrt_top`        | default configuration, all 256 radicands in random order against `floor(sqrt(16x))` found by integer search, latency against 15 − z / 8, short Start pulses, reset in mid-computation. It counts leading-pair skips, fitting and non-fitting trials, the zero radicand and the reset, and fails if any never happened |
| `tb_sqrt_top_binary` | the same with `ONE_HOT = 0` |

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/sqrt_pkg.sv \
          tb/tb_sqrt_top.sv --top-module tb_sqrt_top
./obj_dir/Vtb_sqrt_top
```

Each run finishes in well under a second.

## Changing it

The widths live in `sqrt_pkg` (`DATA_W`, `INT_BITS`, `FRAC_BITS`,
`CNT_W`). Only the 8-bit configuration has been verified. For a wider
radicand or more fraction bits:

- the remainder needs about `RES_BITS + 2` bits;
- `int_reg` has to keep more source bits;
- the trial value must take `RES_BITS` bits of the result;
- `CNT_W` must hold `RES_BITS`.

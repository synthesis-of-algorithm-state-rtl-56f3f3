# Microprogrammed ASM controller with a split address circuit

A microprogrammed controller runs an algorithm state machine (ASM). It stores
one microinstruction per ASM state. With *combined addressing*, each
microinstruction names one logical condition and one "false address":

* if the condition is 1, the next address is the current address plus one;
* if the condition is 0, the next address is the false address.

This keeps microinstructions short. The cost shows in states whose exit
depends on more than one condition. One microinstruction can test only one
condition, so such a state needs a chain of extra test words and
unconditional jumps. These make the microprogram longer and slower.

This design moves those states out of the microprogram. A design-time
partition splits the ASM's transitions into two sets:

* **T1**: states whose next state depends on two or more conditions. A PLA,
  **CA1**, computes their next state directly from the present state code and
  the conditions.
* **T2**: every other state, meaning one condition or an unconditional jump.
  These keep the combined-addressing mechanism through a small circuit,
  **CA2**.

A one-bit **flag field FF** in each microinstruction says which circuit forms
the next address. Every ASM state then takes exactly one microinstruction and
one clock cycle.

The RTL is programmed with a worked example, the 11-state ASM "G1". With the
split, G1 takes 11 words of 14 bits (154 bits). Plain combined addressing
would need 17 words of 15 bits (255 bits). Only the split design is built
here.

## Microinstruction format

| field | bits | meaning |
|-------|------|---------|
| FF    | 1    | 1: CA1 forms the next address, and FLC/FFA are ignored. 0: CA2 does. |
| FMO   | 7    | Z (stop) and y1..y6. Unencoded: one bit per signal. |
| FLC   | 2    | Condition tested by CA2: `00` = unconditional, `01` = x7, `10` = x3 |
| FFA   | 4    | False address. It is also the target of an unconditional jump. |

In `asm_pkg::mi_t` the order is `{ff, fmo.z, fmo.y[6:1], flc, ffa}`. Bit *n* of
`y` is y*n*, and bit *n* of `x` is x*n*.

## Next-address formation (the part to understand)

In every running cycle, exactly one of three commands reaches the address
register `rampm`. The top module asserts this.

| FF | FLC condition | signal | register action |
|----|---------------|--------|-----------------|
| 1  | (ignored)     | CA1    | load the PLA output K(as) |
| 0  | 1             | φ2     | add one |
| 0  | 0, or code 00 | φ1     | load FFA |

* **φ3** carries FF. φ3 = 0 activates CA2; φ3 = 1 activates CA1.
* **Multiplexer M1** (`m1_mux`) selects the register's data (CA1 address or
  FFA) and its command.
* An unconditional jump is coded as FLC = `00`. CA2 tests a constant 0 for
  that code, so the jump always goes to FFA.

Combined addressing depends on how states are coded. Where the ASM runs
through a sequence of states and the condition is true at each step, those
states get consecutive codes, so "true" becomes "+1". Every other state gets a
code after these. The codes of G1 are:

| state | a1 | a3 | a7 | a10 | a9 | a6 | a2 | a4 | a5 | a8 | a11 |
|-------|----|----|----|-----|----|----|----|----|----|----|-----|
| code  |0000|0001|0010|0011 |0100|0101|0110|0111|1000|1001|1010 |

## The example ASM G1

In the table, `~` means NOT. Outputs are Moore outputs of the state.

| state | outputs | next state | circuit |
|-------|---------|------------|---------|
| a1  | –        | a2 | CA2, unconditional |
| a2  | y1 y2    | x1·x2 → a3; x1·~x2·~x3 → a4; x1·~x2·x3 → a5; ~x1·x4 → a5; ~x1·~x4 → a6 | CA1 |
| a3  | y3 y4    | x7 → a7 (+1); ~x7 → a3 (wait) | CA2 |
| a4  | y2 y3    | a8 | CA2, unconditional |
| a5  | y1 y4    | a8 | CA2, unconditional |
| a6  | y1 y5    | a9 | CA2, unconditional |
| a7  | y1 y5    | x5 + ~x5·x6 → a10; ~x5·~x6 → a11 | CA1 |
| a8  | y3 y6    | same as a7 | CA1 |
| a9  | y2 y3    | x3 → a6 (+1); ~x3 → a8 | CA2 |
| a10 | Z y1 y2  | a1, end of run | CA2, unconditional |
| a11 | Z y2     | a1, end of run | CA2, unconditional |

The CA1 PLA has 11 product terms: 5 for a2 and 3 each for a7 and a8. The
table `asm_pkg::CA1_G1` lists them. Each term compares all four bits of the
state code and only the conditions it cares about. Its outputs are ORed.

Notes on the example as implemented:

* **Codes of a6 and a9.** The prose description of the coding lists a6 = 0100
  and a9 = 0101. The state table and the microprogram both use a6 = 0101 and
  a9 = 0100. Only the second agrees with a9 -> a6 being a "+1" step. The RTL
  uses it.
* **Condition tested by a9.** It is x3, the FLC of a9. The single-condition
  set is {x3, x7}.
* **CA2 and M1.** They are built as the simplest circuits that give the
  behaviour above.

## Modules

| file | block |
|------|-------|
| `rtl/asm_pkg.sv` | Field widths, `mi_t`, state codes, FLC codes, the G1 microprogram `MPM_G1` and the PLA terms `CA1_G1` |
| `rtl/mpm.sv` | Microprogram memory: constant array with an asynchronous read. Words past `DEPTH` read as 0. |
| `rtl/ca1_pla.sv` | CA1: PLA with an AND plane and an OR plane, driven by a term table |
| `rtl/ca2.sv` | CA2: selects a condition by FLC (code 0 = constant 0) and produces φ1 and φ2 |
| `rtl/m1_mux.sv` | M1: chooses the CA1 or CA2 path; produces φ3, load, inc and data |
| `rtl/rampm.sv` | Address register: φ0 → first address; load; +1. Priority is in that order. |
| `rtl/csc.sv` | Control signals circuit: y/Z from FMO, the run flip-flop and φ0 |
| `rtl/asm_ca_automaton.sv` | Top module, the complete controller |

Top-level ports:

* inputs: `clk`, `rst_n` (asynchronous, active low), `start`, `x[7:1]`;
* outputs: `y[6:1]`, `z`, `busy`, `addr[3:0]` (the code of the state being
  executed).

## Timing and run control

* `start` is sampled at a clock edge. If the controller is idle, φ0 loads
  address 0000 (a1) and `busy` rises.
* From the next cycle on, one microinstruction runs per clock. `y` and `z`
  are the current state's outputs. The conditions `x` are sampled at the edge
  that ends the state's cycle.
* The microinstruction that carries Z is the last one of a run. After it, the
  controller is idle at address 0000.
* A `start` while busy is ignored.
* With all conditions at 1, the shortest run (a1 a2 a3 a7 a10) takes 5
  cycles.

The run flip-flop, the reset behaviour, the asynchronous memory read and the
handling of `start` while busy are this design's own choices. The method
itself does not fix them.

## Reprogramming for another ASM

1. Partition the states. Any state with two or more conditions on its exit
   goes to CA1; all others go to CA2.
2. Code the states so that chains of "condition true" transitions are
   consecutive.
3. Write the microprogram. Set FF = 1 for CA1 states. For CA2 states, put the
   condition code in FLC and the false or jump target in FFA.
4. Write the PLA term table for the CA1 states.
5. Pass the new tables as parameters: `mpm` takes `INIT` and `DEPTH`;
   `ca1_pla` takes `TABLE` and `TERMS`.
6. Change the CA2 condition wiring (`lc`) in the top module to match.

Note that CA1 is specific to each ASM, and so is the choice of conditions
wired into CA2.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `mpm_tb` | All 16 words, against the microprogram written as raw bit strings |
| `ca1_pla_tb` | All 16 state codes × 64 condition values, against the ASM decision trees. Also checks that no term fires outside a2, a7 and a8. |
| `ca2_tb` | Exhaustive |
| `m1_mux_tb` | Exhaustive over FF, φ1 and φ2, with random addresses |
| `rampm_tb` | Random commands, checked cycle by cycle against a model |
| `csc_tb` | Random start and FMO, checked cycle by cycle against a model |
| `asm_ca_automaton_tb` | End to end, at default parameters (see below) |

The end-to-end testbench works as follows:

* A directed shortest run checks the 5-cycle latency.
* Then 400 runs with random conditions are compared cycle by cycle against a
  state-name reference model of G1.
* It counts CA1 selections, CA2 increments, CA2 false-address loads,
  unconditional jumps, starts, stops and ignored starts. It also checks that
  all 18 edges of the ASM were taken.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/asm_pkg.sv tb/asm_ca_automaton_tb.sv \
    --top-module asm_ca_automaton_tb -Mdir obj
./obj/Vasm_ca_automaton_tb
```

Limitations:

* The memory is modelled as a constant array. A real PLA or ROM would be
  swapped in for it.
* The microinstruction cycle time, which the extra multiplexer lengthens, is
  not modelled. Only cycle counts are checked.

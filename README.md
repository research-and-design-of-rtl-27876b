# Pattern-keyed serial bit inverter from D flip-flops and gates

This circuit encrypts a serial bit stream in the simplest possible way: it
inverts bits, and the stream itself switches the inversion on and off. The
circuit watches the incoming bits for two patterns. Three 1s in a row
("111") turn encryption on: from the next bit on, every bit leaves the
circuit inverted. The pattern "101", seen while encrypting, turns it off
again. The mode applied to each bit depends only on earlier plaintext
bits. A receiver can therefore undo the inversion by running the same
pattern search on the bits it has already recovered.

The whole design is a six-state finite state machine. It is built the way
a textbook builds one by hand: three D flip-flops hold the state, and the
next-state and output functions are two-level AND-OR networks made of
NOT, AND and OR gate modules. Each of those primitives is its own module
with its own test.

## Interface of the top, `encryption_circuit`

| port         | dir | width | meaning |
|--------------|-----|-------|---------|
| `clk`        | in  | 1 | one stream bit is consumed per rising edge |
| `rst_n`      | in  | 1 | asynchronous, active-low reset to S0 |
| `x`          | in  | 1 | input (plaintext) bit |
| `z`          | out | 1 | output bit: `x`, or `~x` while encrypting |
| `state`      | out | 3 | present state, bits A B C |
| `encrypting` | out | 1 | 1 in the encrypting states S3, S4, S5 |

There are no parameters. `z` is combinational. It is valid in the same
cycle as `x`, before the edge that consumes `x`. `state` and `encrypting`
change on the rising edge. The design has no enable input. A stream with
gaps needs its clock gated, or the design needs an enable added to the
flip-flops.

## The state machine

States S0–S2 pass bits through and count consecutive 1s. States S3–S5
invert and look for "101".

| present | x = 0: next / z | x = 1: next / z | role |
|---------|-----------------|-----------------|------|
| S0 (000) | S0 / 0 | S1 / 1 | idle |
| S1 (001) | S0 / 0 | S2 / 1 | seen "1" |
| S2 (010) | S0 / 0 | S3 / 1 | seen "11" |
| S3 (011) | S3 / 1 | S4 / 0 | encrypting |
| S4 (100) | S5 / 1 | S3 / 0 | encrypting, seen "1" |
| S5 (101) | S3 / 1 | S0 / 0 | encrypting, seen "10" |

Three points in this table are easy to misread:

* **Which mode the pattern bits are sent in.** Each bit is output in the
  mode in force when it arrives. The three 1s that start encryption leave
  in the clear. The first inverted bit is the one after them. All three
  bits of "101" leave inverted, and the bit after its last 1 is the first
  one in the clear again. Example, first bit on the left:

      x : 0 1 1 1 0 1 0 1 0 1 1 0
      z : 0 1 1 1 1 0 1 0 0 1 1 0

* **The search for "101" does not overlap.** After "1" (S4), a second 1
  sends the machine back to S3, not to S4. After "10" (S5), a 0 also
  returns to S3. A stream such as `1 1 0 1` seen from S3 goes S4, S3,
  S3, S4: it contains "101" but does not end encryption, because the search restarted on the
  second 1. This follows the state table as given. A textbook
  overlapping detector would send S4 on 1 back to S4.
* **The output depends on the input.** In each state `z` is a function of
  `x` as well as of the state. This is a Mealy output: `z = x XOR enc`, where
  `enc` is the registered state flag. The machine is usually described as
  a Moore machine. Strictly, only `encrypting` is a Moore output.

## State coding and the gate equations

The states are numbered in plain binary on flip-flops A (most significant
bit), B and C. Codes 110 and 111 are unused, and the minimisation treats
them as don't-cares. Karnaugh maps give:

    A+ = B·C·X + A·C'·X'
    B+ = A'·B'·C·X + B·C'·X + A·C'·X + B·C·X' + A·C·X'
    C+ = C'·X + A·X' + B·C·X'
    Z  = A'·B'·X + A'·C'·X + A·X' + B·C·X'        (= X xor (A + B·C))

`dff_input_logic` builds the first three equations and
`encrypt_output_logic` builds `Z`. Both take each state bit together with
its complement, wired from the flip-flops' `Q` and `Q'` outputs. Each
builds `X'` with its own NOT gate. The encrypting flag `A + B·C` appears
in `enc_pkg::is_encrypting`.

These groupings are one valid choice among several. They also decide what
happens in the unused codes, which can only be reached by a disturbance
such as a bit flip, since reset clears to S0:

| code | x = 0 | x = 1 | z |
|------|-------|-------|---|
| 110 | S5 | S3 | `~x` |
| 111 | S3 | S4 | `~x` |

The machine is therefore self-correcting within one cycle. If you
re-minimise the equations, re-check this property. The test of
`dff_input_logic` pins these exact targets.

## Modules

| module | what it is |
|--------|------------|
| `enc_pkg` | state enum `state_t` (S0..S5 codes), `STATE_BITS`, `is_encrypting()` |
| `not_gate` | inverter |
| `and_gate #(N=2)` | N-input AND |
| `or_gate #(N=2)` | N-input OR |
| `d_flip_flop` | rising-edge D flip-flop, outputs `q` and `qn`, async clear |
| `dff_input_logic` | D-input (next-state) equations A+, B+, C+ |
| `encrypt_output_logic` | output equation Z |
| `encryption_circuit` | top: three `d_flip_flop`s, the two logic blocks |

The top has an assertion that the state register never holds 110 or 111
once out of reset.

The synthesized top is 3 flip-flops and about twenty gate-level cells. A
synthesis tool will flatten and re-optimise the gate modules. Their
structure documents the hand-derived netlist and constrains nothing.

## Simulating

Each module has a self-checking testbench in `tb/`. Each prints one line
`TB_RESULT checks=N failures=M` and stops. Each also has a watchdog that
records a failure if the run hangs. For example, with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/enc_pkg.sv tb/tb_encryption_circuit.sv --top-module tb_encryption_circuit
    ./obj_dir/Vtb_encryption_circuit

Swap in any other `tb/tb_<module>.sv` to test a single block. The package
file must come first on the command line.

* `tb_not_gate`, `tb_and_gate`, `tb_or_gate`: exhaustive truth tables. The
  AND and OR tests cover widths 2 to 5.
* `tb_d_flip_flop`: capture on the rising edge only, hold while `d` changes
  between edges, `qn = ~q`, asynchronous clear, and all four (Q, D)
  combinations of the flip-flop table.
* `tb_dff_input_logic`, `tb_encrypt_output_logic`: all 16 (state, x)
  combinations, against the transition table above and the unused-code
  targets.
* `tb_encryption_circuit`: the end-to-end test. It first runs the
  hand-worked example above. Then it checks the one-cycle latency from the
  third 1 to `encrypting`. Then it sends 20 000 random bits with a bias
  toward 1, with resets dropped in while encrypting. Every cycle it compares
  `z`, `state` and `encrypting` with a reference model of the table. It also
  counts how often each transition type occurs: start, stop, a 0 breaking
  the "111" count, staying in S3, the two restarts of the "101" search,
  inverted and passed bits, and reset mid-stream. Any type that never
  occurs counts as a failure. The design has no parameters, so this is also
  the full-size run. It finishes in well under a second.

## Where this design makes its own choices

* **Reset.** `rst_n` is an asynchronous clear on every flip-flop, which
  puts the machine in S0. The state table itself defines no reset or
  initial state.
* **Output timing.** `z` follows the state table, so it is an unregistered
  function of `x`. A registered `z` would delay the output stream by one
  cycle and leave the pattern logic unchanged.
* **Minimised equations.** The equations above were derived here from the
  state table. Any equivalent minimisation is valid, but it may send the
  unused codes elsewhere.
* **Observation ports.** `state` and `encrypting` are extra outputs for
  debugging and testing.
* **Gate timing.** The gates are zero-delay. There is no model of gate
  delay, logical effort or critical path.

## Security note

The inversion is keyed only by patterns in the data itself. It hides
nothing from anyone who knows the scheme. Treat it as a teaching example
of FSM design and of deriving flip-flop inputs by hand, not as a cipher.

# Transitional leakage of a masked AND gate that reuses two random bits

Masking splits every secret bit `x` into two shares, `x = s0 ^ s1`, so that no single wire
carries the secret. Normally each masked value gets its own fresh random mask. The AES masking
scheme of Gross et al. goes to the other extreme: the whole cipher is masked with only **two random
bits**, `m0` and `m1`. Every mask is then one of `m0`, `m1` or `m0 ^ m1`. The AND gates of the
S-box are built so that they need no fresh randomness, and each gate on its own is first-order
probing secure.

The catch is in time, not in space. A register that holds a value computed from one operand
pair, and in the next cycle a value computed from another pair masked with the same two bits,
dissipates power according to the XOR of the two values (its Hamming distance). The masks can
cancel in that XOR, so the number of toggling bits depends on the secrets. The fix is a **reset
cycle**: feed all-zero shares between two operand pairs, so that each register only ever switches
between zero and a value of one pair. The cost is up to half of the throughput.

This RTL is a side-channel evaluation target for that effect. It holds:

* the two-share AND gate with its four-stage pipeline;
* 31 identical copies of the gate, which amplify its power signature;
* the sharing of four secret bits with the two random bits;
* a sequencer that feeds the two operand pairs either back to back or with a reset cycle between
  them;
* beside the target, the initial two-bit sharing of a 128-bit AES plaintext.

It does not contain the masked AES rounds or the masked S-box. It also does not contain a random
number source.

## The secure AND gate (`secure_and_gate`)

The inputs are `a = (a1, a0)` and `b = (b1, b0)`, and the output is `q = (q1, q0)`, with

```
q0 = [ [ [a0 b0] ^ [a0 b1 ^ b1] ] ^ [ [a1 b0] ^ [a1 b1 ^ b1] ^ a1 ] ]
q1 = a1
```

Square brackets mark registers. Summing gives `q0 ^ q1 = (a0^a1)(b0^b1) = a & b`. The output
keeps the mask of `a`: `q1` is just `a1`. Each partial product is stored in a register before it
is combined with another one. This means that glitches can never combine both shares of an input.
No random bit is consumed.

The RTL has one pipeline stage per row and takes a new operand pair every cycle:

| stage | registers | content |
|---|---|---|
| 1 | `a_r`, `b_r` | input shares; a reset cycle loads zeros here |
| 2 | `p00`, `p01`, `p10`, `p11`, `a1_s2` | `a0 b0`, `a0 b1 ^ b1`, `a1 b0`, `a1 b1 ^ b1`, copy of `a1` |
| 3 | `t1`, `t2`, `a1_s3` | `p00 ^ p01`, `p10 ^ p11 ^ a1_s2`, copy of `a1` |
| 4 | `q0`, `q1` | `t1 ^ t2`, copy of `a1` |

The output appears four clock edges after the input is applied (`GATE_LATENCY = 4` in
`masked_and_pkg`). `rst_n` is synchronous and active low. It clears every register to zero, which
is the same state that a reset-cycle input leaves behind.

## Where the leakage comes from

In one evaluation, the gate processes `(a^1, b^1)` and then `(a^2, b^2)`. The default masks are:

| operand | `a^1` | `b^1` | `a^2` | `b^2` |
|---|---|---|---|---|
| mask (share `s1`) | `m0` | `m1` | `m1` | `m0 ^ m1` |

The two operands of one cycle always have different masks, which the gate needs. The two cycles,
however, reuse the same masks. Take register `p00 = a0 b0`, where `a0 = a ^ mask`. When the
second pair directly follows the first, this register toggles exactly when

```
x = (a^1 ^ m0)(b^1 ^ m1)  ^  (a^2 ^ m1)(b^2 ^ m0 ^ m1)  =  1
```

Over the four values of `(m0, m1)`, `x` is 1 twice for most secrets. For four secret
combinations it is never 1. Written as `b^2 a^2 b^1 a^1`, these are `0001`, `0110`, `1000` and
`1111`. An average of the power over many random masks therefore reveals the secrets.

An exhaustive run shows more: for every one of the 36 mask assignments in which the two operands
of a cycle differ, the toggle count of `p00` depends on the secrets. No choice of masks can fix
this. The `t1` register, which adds `p01` to `p00`, leaks as well with the default masks.

With a reset cycle, every register goes `0 → value of pair 1 → 0 → value of pair 2`. Each
transition then reflects one pair only. For every register and every one of the 36 assignments,
the toggle count of each cycle is then independent of the secrets. What remains is second-order
leakage: combining the toggles of two different cycles still reveals the secrets. With only two
shares, this cannot be avoided.

## Feeding the gate: `reset_cycle_sequencer`

The sequencer samples the four operand shares and the mode when `start` is high and `ready` is
high. It then drives the gate array one row per cycle:

| cycle after start | 1 | 2 | 3 | 4 … |
|---|---|---|---|---|
| `secure_mode = 0` | pair 1 | pair 2 | (0,0) | (0,0) |
| `secure_mode = 1` | pair 1 | (0,0) | pair 2 | (0,0) |

Idle cycles also feed `(0,0)`, so consecutive evaluations never switch directly from one to the
next. `gate_valid` marks the cycles that carry a pair. The array delays this flag to
`res_valid`, and the sequencer captures the 31 output-share pairs of pair 1 and then of pair 2.
`done` pulses for one cycle, together with the return of `ready`. This happens 7 cycles after
start without the reset cycle and 8 cycles after start with it. Pairs enter the gate at one per
cycle without the reset cycle and at one every two cycles with it. Assertions check two rules:
results arrive only while an evaluation is in flight, and `done` coincides with `ready`.

## The evaluation target: `tl_eval_top`

`pair_masker` turns the secret bits `secrets = {a^1, b^1, a^2, b^2}` and the random bits
`m0`, `m1` into shares. Share `s1` holds the mask and `s0` holds the secret XOR mask. Its four
mask selections are parameters (`MASK_A_FIRST` … `MASK_B_SECOND`), with the assignment above as
the default. An assertion rejects a selection that gives both operands of one cycle the same mask.

`secure_and_array` holds `N_INST = 31` gates, all fed with the same shares. Their outputs come
back as 31-bit vectors `q0` and `q1`. The copies do the same logic, so a synthesis tool will
merge them unless prevented. The instances carry `keep_hierarchy`. On an FPGA, the equivalent
"keep" or "dont_touch" setting of the vendor tool is needed as well.

`tl_eval_top` wires the masker, the sequencer and the array together. Per measured trace, drive
`secrets`, `m0`, `m1` and `secure_mode`, pulse `start`, and wait for `done`. The output shares are
on `first_q0/q1` and `second_q0/q1`. The random bits come from outside.

## AES plaintext sharing: `aes_state_masker`

This block is not connected to the evaluation target. It has its own top-level ports
(`aes_plaintext`, `aes_m0`, `aes_m1`, `aes_share0`, `aes_share1`). Every byte of the plaintext is
masked with the same byte

```
m_B = {m1, m0^m1, m0^m1, m0, m0, m1, m0, m1}      (bit 7 down to bit 0)
```

For `(m0, m1) = (0,0), (1,0), (0,1), (1,1)`, the mask byte is `00`, `7A`, `E5` and `9F`.
`aes_share1` holds the mask in every byte and `aes_share0` holds the plaintext XOR the mask.
Placing the first listed bit at bit 7 is a choice. The masked rounds that would consume these
shares are not included.

## Departures and choices

* **Fourth pipeline stage.** The published register placement gives three levels on the `q0`
  path, but the gate is described as a four-stage, four-cycle pipeline. The extra stage here is
  an input register in front of the partial products.
* **Alignment of `a1`.** `q1` is written as `a1` through two registers. Here it is `a1` delayed
  through all four stages, so that `q0` and `q1` of one pair leave together. The `a1` term added
  into `t2` is likewise the copy taken from the same stage as the partial products.
* **Leakage table.** The published table describes the toggles of "intermediate `t1`".
  Its counts match exactly the toggles of the `[a0 b0]` register, which is the first term of
  `t1`. The full `t1` sum gives different counts, though it also leaks. The testbenches check
  the table against `p00`.
* **Reset value of a reset cycle.** All four input shares are zero.
* **This design's own parts:** the sequencer's state machine, the `start`/`ready`/`done`
  handshake, the valid flag of the array, and idle cycles that feed zeros.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/masked_and_pkg.sv tb/tb_tl_eval_top.sv --top-module tb_tl_eval_top
./obj_dir/Vtb_tl_eval_top
```

Replace `tb_tl_eval_top` with any other testbench name.

| testbench | what it establishes |
|---|---|
| `tb_secure_and_gate` | Function and 4-cycle latency over 400 random pairs. The toggle counts above, reproduced from the `p00` register. For all 36 mask assignments: `p00` toggles depend on the secrets back to back, and no register of the gate leaks in any cycle with the reset cycle. |
| `tb_secure_and_array` | All 31 outputs and the valid delay under a random valid pattern; reset state. |
| `tb_pair_masker` | Exhaustive sharing check for the default masks and one other assignment. |
| `tb_reset_cycle_sequencer` | Cycle-exact gate-input schedule in both modes; the handshake; `done` timing; collected results (3-gate array). |
| `tb_aes_state_masker` | Unmasking and the four mask bytes. |
| `tb_tl_eval_top` | The whole target at 31 gates. All 16 secrets × 4 mask values in both modes, then 200 random evaluations. Results and timing. The toggle counts above on gate 0. No first-order dependence of `p00`/`t1` toggles with the reset cycle. Second-order dependence still present. It counts back-to-back pairs, reset cycles, both modes and the AES sharing. |

The checks are logical. A toggle count in simulation is a model of power, not a measurement.
Glitches and coupling between wires are not modelled.

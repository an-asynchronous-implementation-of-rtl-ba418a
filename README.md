# Asynchronous TEA: a self-clocked Tiny Encryption Algorithm engine

This is an encryptor and a decryptor for TEA, the Tiny Encryption Algorithm. Neither uses a
global clock. Each engine is a bundled-data asynchronous circuit in the *decomposition*
style. A conventional single-rail data-path (ALUs, multiplexers, registers) does the
arithmetic. A small extended-burst-mode (XBM) controller sequences it, and the controller
makes its own clock. The controller raises a request `bt`, which goes through a matched delay
element and comes back as `ct`. `ct` clocks the controller and the data-path. The clock runs
only while there is work to do. Between operations nothing toggles. There is no periodic
clock for an attacker to lock onto, and no idle power in a clock tree.

The architecture follows a published asynchronous TEA design that was produced by high-level
synthesis for FPGAs. That design's data-flow graph, ALU and register counts, register roles,
constants and handshake are reproduced here. Where the paper stops, this RTL makes its own
choices: the exact wiring of the multiplexers, the controller's state graph and the decryptor.
These are marked throughout, and summarised in [How far it follows the published design](#how-far-it-follows-the-published-design).

## TEA in one paragraph

TEA enciphers a 64-bit block held as two 32-bit words Y and Z, under a 128-bit key K[0..3].
One round is:

    SUM += DELTA
    Y   += ((Z << 4) + K[0]) ^ (Z + SUM) ^ ((Z >> 5) + K[1])
    Z   += ((Y << 4) + K[2]) ^ (Y + SUM) ^ ((Y >> 5) + K[3])

Here DELTA = (sqrt(5) - 1) * 2^31 = 0x9E3779B9. Decryption runs the rounds backwards:
SUM starts at DELTA * ROUNDS, the two word updates are subtractions in reverse order, and
SUM counts down. This design runs **8 rounds**. Its **key is hard-wired**: K = {10, 15, 20, 25}
by default. The key words are the parameters `KEY0..KEY3`. The published design added these
constants where TEA adds the key words, and with them its published test vector comes out
right:

    V0 = 007B2D45, V1 = 00012C8B  ->  Y1 = DA8F3440, Z1 = 82EEF7C0

## Block diagram

    tea_async_top
    ├── u_enc : tea_async_core #(MODE = TEA_ENCRYPT)
    │     ├── u_ctrl  : tea_xbm_ctrl    XBM controller, 15 states
    │     ├── u_delay : delay_element   bt -> ct (behavioural model)
    │     └── u_dp    : tea_datapath    5 x tea_alu, 16 x 32-bit registers
    └── u_dec : tea_async_core #(MODE = TEA_DECRYPT)   (same structure)

Inside one core:

            start ──►┌──────────────┐── ctrl (62 bits) ──►┌──────────────┐◄── v0, v1
            done  ◄──│ tea_xbm_ctrl │                     │ tea_datapath │──► y1, z1
                     │          bt ─┼──► delay_element ─┐ │              │
                     │          ct ◄┼───────────────────┴─┼──► clk       │
                     │         cmp ◄┼─────────────────────┼── CMP (R12)  │
                     └──────────────┘                     └──────────────┘

## The round schedule (the heart of the design)

Most of what is unusual about this design is in how one round is mapped onto five ALUs.

**The data-flow graph is not simplified.** The synthesis flow behind the original design
expanded the round function without sharing common sub-expressions. As a result, Y's update
is computed four times: three copies feed the second half of the round, and one is written
back. Each of those copies recomputes `(Z<<4)+K0`, `Z+SUM` and `(Z>>5)+K1`. With the SUM and
round-counter operations, one round has **43 operations**, numbered 0 to 42. Its critical path
is 10 operations long, so a round takes **10 control steps**, each lasting one local-clock
cycle. The operations and their numbers are listed in `rtl/tea_pkg.sv`.

The schedule below was chosen so that every operation runs on an ALU that has the constant
it needs on its right input. Write `A` for the word read in the first half of the round
(Z when encrypting) and `B` for the word updated first (Y). The prime marks the updated
copy of B.

| step | ALU1 | ALU2 | ALU3 | ALU4 | ALU5 |
|---|---|---|---|---|---|
| 1 | A<<4 → R1 | A+SUM → R5 | A<<4 → R4 | A>>5 → R3 | A<<4 → R2 |
| 2 | A>>5 → R11 | A+SUM → R9 | A+SUM → R8 | +KA0 → R7 | A>>5 → R6 |
| 3 | +KA0 → R1 | +KA0 → R10 | +KA1 → R4 | XOR → R3 | +KA1 → R2 |
| 4 | XOR → R1 | XOR → R5 | A<<4 → R4 | XOR → R7 | +KA1 → R6 |
| 5 | XOR → R11 | XOR → R9 | A+SUM → R8 | B±F → R3 | A>>5 → R2 |
| 6 | +KA0 → R1 | B±F → R10 | B'<<4 → R4 | B±F → R7 | +KA1 → R6 |
| 7 | B'>>5 → R11 | B'+SUM → R5 | +KB0 → R4 | XOR → R3 | N−1 → R14 |
| 8 | +KB1 → R1 | XOR → R9 | XOR → R8 | SUM±DELTA → R13 | N>0 → R12 |
| 9 | — | B±F → R15 | — | — | XOR → R2 |
| 10 | A±F → R16 | — | — | — | — |

Steps 1 to 8 keep all five ALUs busy, and steps 9 and 10 carry the tail of the critical path.
A register is written at the end of a step and read from the next step on. Every write
happens in or after the step of the last read of the old value. N is decremented in step 7
and tested in step 8. The loop therefore runs exactly `ROUNDS` times, and CMP (R12) tells the
controller whether another round follows. The exact multiplexer selects for each step are in
`tea_pkg::step_ctrl`.

## Data-path (`tea_datapath`)

- **Five ALUs** (`tea_alu`): add, subtract, XOR, logical shifts left and right by `b[4:0]`,
  and an unsigned compare. All five are identical. The original design gave each ALU only the
  operations it needed, with one to three operation-select lines per ALU.
- **Sixteen 32-bit registers**, R1 to R16. Each register belongs to one ALU and can load
  only that ALU's result:

  | ALU | registers |
  |---|---|
  | ALU1 | R1, R11, R16 |
  | ALU2 | R5, R9, R10, R15 |
  | ALU3 | R4, R8 |
  | ALU4 | R3, R7, R13 |
  | ALU5 | R2, R6, R12, R14 |

- **Fixed roles.** R13 = SUM, R14 = N, R15 = B, R16 = A, R12 = CMP.
- **Initial values.** When `ctrl.load_init` is set, the init multiplexers load:
  - R13 with DELTA, or DELTA * ROUNDS when decrypting;
  - R14 with ROUNDS;
  - R15 and R16 with V0 and V1.
- **Output mapping.** When encrypting, Y1 = R15 and Z1 = R16. When decrypting, the roles of
  the two words swap.
- **Multiplexer contents.** Each ALU's left and right input multiplexer has up to 8 inputs.
  The contents are the tables `MUXL_SRC` and `MUXR_SRC` in `tea_pkg`. The constants offered
  to each ALU's right input are taken from those of the published data-path: shifts 4 and 5, the key
  roles, DELTA, and 0 and 1 for the counter. Which register feeds which input follows from
  the schedule above.
- **Control word** (`tea_pkg::ctrl_t`, 62 bits). For each ALU it holds a 3-bit left select,
  a 3-bit right select and a 3-bit operation. It also holds 16 register load enables and the
  init select.
- **`regs` output.** It brings the whole register file out for observation. Leaving it
  unconnected costs nothing.

## Controller (`tea_xbm_ctrl`)

The controller has 15 states and 16 transitions:

    IDLE --start↑--> LOAD --> S1 --> S2 --> ... --> S10 --> TEST
    TEST --CMP=1--> S1            TEST --CMP=0--> DONE
    DONE --start↓--> CLEAR --> IDLE

- LOAD loads the data-path.
- S1 to S10 issue the ten steps of a round.
- TEST lets CMP settle, then branches on it.
- DONE raises `done`.
- CLEAR lowers `done` and returns to IDLE.

The inputs are `start`, `cmp` and the reset. The state is a register clocked by `ct`. The
original flow produced hazard-free logic from an XBM specification. Here the controller is
ordinary synthesizable RTL with the same number of states, transitions and inputs, and
the burst behaviour described above; its state graph is this design's own. Two assertions
state the burst-mode rules: DONE is held while START is high, and IDLE is not left without
START.

**Cycle count.** A round takes 11 edges of `ct`: ten steps plus TEST. One operation takes
`2 + 11 * ROUNDS` edges from `start` rising to `done` rising, which is 90 edges for eight
rounds. The published synchronous version of this schedule took 1634.5 ns at 55 MHz, which is
89.9 clock periods.

## The local clock (`delay_element` and `bt`)

`bt = active & !ct`, where `active` is low only in two cases:

- in IDLE with `start` low;
- in DONE with `start` high.

Together with the delay element this is a gated ring oscillator. The ring starts as soon as
an input burst arrives and stops as soon as the controller waits. Its period is twice the
delay: `bt` rises, `ct` rises one delay later, which ends the step and drops `bt`, and `ct`
falls one delay after that. From `start` rising to `done` rising takes **179 delays**: edge
*k* of `ct` comes (2k − 1) delays after `start`, and `done` rises at edge 90.

Lint tools report the `bt → delay → ct → bt` path as a combinational loop. That loop is the
oscillator, and it is intended.

**Sizing the delay.** The delay must exceed the slowest data-path step. That step is a
multiplexer, a 32-bit add and register setup, plus the controller's next-state and
control-word decoding. `delay_element` is a **behavioural model**: a transport delay of
`DELAY_PS` picoseconds, reproduced in simulation and ignored by synthesis. A real
implementation needs a physical delay line, such as a LUT or buffer chain, sized and
constrained for the target.

The default delays, 8391 ps for the encryptor and 8637 ps for the decryptor, were picked so
that one operation takes about 1502 ns and 1546 ns. Those are the latencies published for the
original asynchronous encryptor and decryptor. They are not derived from any timing analysis
of this RTL.

## Interface and timing

Each engine has its own four-phase request/acknowledge channel:

1. Drive `v0`/`v1`, then raise `start`.
2. `done` rises 179 delays later. `y1`/`z1` then hold the result.
3. Lower `start`.
4. `done` falls on the next `ct` edge, one delay later. After one more edge, the engine is
   back in IDLE.

`v0`/`v1` must be stable from `start` rising until `done` rises: this is the bundling
constraint. The results stay valid until the next operation loads new inputs. `rst_n` is an
active-low asynchronous reset; keep `start` low while it is asserted. Raising `start` while
`done` is high, or lowering it before `done`, violates the protocol and trips an assertion in
`tea_async_core`.

| parameter | default | meaning |
|---|---|---|
| `KEY0..KEY3` | 10, 15, 20, 25 | hard-wired key words |
| `DELTA` | 32'h9E3779B9 | round constant |
| `ROUNDS` | 8 | rounds per block |
| `ENC_DELAY_PS`, `DEC_DELAY_PS` | 8391, 8637 | half-period of each local clock |

## Decryption

The published work had a decryptor but did not show its data-flow graph or data-path.
`MODE = TEA_DECRYPT` runs the exact inverse round on the same hardware and schedule.

- The first half of the round reads Y and updates Z with keys K[2] and K[3]. The second half
  updates Y with K[0] and K[1].
- The three "B ± F" copies, the final "A ± F" and the SUM update subtract instead of adding.
- SUM starts at DELTA * ROUNDS.

The decryptor therefore has the same 90-edge latency as the encryptor.

## How far it follows the published design

| follows the published design | this design's own choice |
|---|---|
| Bundled-data decomposition style: XBM controller, delay element (Bt → Ct) and single-rail data-path with status feedback | The gated-ring `bt`/`ct` protocol and a single delay value for all steps |
| The 43-operation round graph, 10 steps per round, 8 rounds | Binding of operations to ALUs and registers, and the multiplexer wiring |
| 5 ALUs and 16 registers in the same ALU groups, the register roles, the constants on each right multiplexer, and the init values Delta and 8 | Identical 6-operation ALUs; a 62-bit control word against the original 61 output signals |
| Controller size: 15 states, 16 transitions, 3 inputs | The state graph itself, including TEST and CLEAR; a clocked-register implementation rather than hazard-free logic |
| START/DONE four-phase handshake and the test vector | Decryptor internals; the delay values, which are fitted to the published latencies |

The source also reports FPGA area and power: about 2070 LUTs and 520 flip-flops on a Stratix
II, and 462 mW. Nothing here reproduces those figures. Hazard-free mapping of the controller
onto LUTs, which the original flow handled, is out of scope for this RTL.

## Files

- `rtl/tea_pkg.sv`: types, multiplexer tables, register ownership and the per-step control
  words.
- `rtl/tea_alu.sv`, `rtl/tea_datapath.sv`, `rtl/tea_xbm_ctrl.sv`, `rtl/delay_element.sv`,
  `rtl/tea_async_core.sv`, `rtl/tea_async_top.sv`.
- `tb/tb_tea_ref_pkg.sv`: a reference model of TEA, written from the round equations.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each ends with a line
  `TB_RESULT checks=N failures=M`.

## Simulating

Use Verilator 5 with timing support:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
        -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/tea_pkg.sv tb/tb_tea_ref_pkg.sv tb/tb_tea_async_top.sv \
        --top-module tb_tea_async_top
    ./obj_dir/Vtb_tea_async_top +verilator+rand+reset+2

Each testbench checks the following:

| testbench | what it checks |
|---|---|
| `tb_tea_async_top` | The whole system at default parameters. Encrypts 12 blocks, the published vector among them, and decrypts each ciphertext while the encryptor works on the next block. Checks both latencies: 1501.99 ns and 1546.02 ns. Counts loop-backs, loop exits, the clock stopping in IDLE and while DONE is held, and returns to zero. |
| `tb_tea_async_core` | One self-timed encryptor and decryptor: random blocks, latency, silent clock between operations. |
| `tb_tea_datapath` | Controller and data-path on an ordinary clock. Compares Y, Z, SUM and N after every round with the reference model, in both modes, with the default key and a second, arbitrary one. |
| `tb_tea_xbm_ctrl` | The state sequence: 90 edges, 43 register loads per round, subtraction counts per mode, `bt` behaviour and the handshake. |
| `tb_tea_alu`, `tb_delay_element` | Operations and exact delay. |

All testbenches run in well under a second of wall time.

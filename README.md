# Dual-hiding asynchronous-logic AES-128 accelerator

This is an AES-128 encryption engine built to resist side-channel analysis. It hides the data-dependent part of its power and EM trace in two ways.

* **Amplitude hiding.** The datapath is dual-rail. Every bit travels on two wires, and each gate switches exactly one output rail per evaluation, whatever the data. The S-boxes are composite-field GF((2^4)^2) inverters with *zero-value compensation*. An all-zero input is swapped for a dummy value (0x08), whose GF(2^4) inverse is the known value q = 0x1. A second multiplexer then forces the result to zero. So the inverse of zero draws the same kind of current as any other input.
* **Time hiding.** Three self-timed rings move the round data. These are rings of dual-rail latches with completion detection and a four-phase valid/NULL handshake. Four delay randomizers (A–D) spread the arrival times of the state bits. Each one is a chain of 64 unit delays with a multiplexer tree. A *skewed-delay controller* turns the randomizers on only for round 1 and the last two rounds (9 and 10). Those rounds are the usual attack points. In rounds 2–8 the handshake is bypassed, which saves time.

The circuit is globally synchronous and locally asynchronous. Input and output flip-flops on the system clock load the plaintext and key. They release the self-timed core and collect the ciphertext 14 clock cycles later.

## Block structure

```
aes_dual_hiding_top
├── aes_sync_if            input/output flip-flops, 14-cycle capture, done/late
├── chaotic_map            logistic-map sequence, XORed into the control word
├── tbf_randomizer         pre-round randomizer: when each bit group enters
├── s2dr_convert ×3        single- to dual-rail conversion (plaintext, key, Rcon)
└── aes_async_core
    ├── dr_pre_add_round_key  128 × dr_cell (XOR)
    ├── muller_c           joins the Stage 1 acknowledges of the three rings
    ├── skewed_delay_ctrl  round counter, stabilizing mux, bypass mux
    │   └── tbf_randomizer → 4 × delay_randomizer
    ├── dr_latch_cd ×9     R1 (state), R2 (round key), R3 (Rcon) × Stages 1–3
    ├── dr_round           16 × dr_zv_sbox, ShiftRows, dr_mix_columns, AddRoundKey
    ├── dr_key_expand      4 × dr_zv_sbox, RotWord, Rcon
    └── dr_rcon_fsm        next Rcon, last-round flag, stop after round 10
```

`aes_dr_pkg` holds the dual-rail type `dr_t` and the dual-rail gate functions: AND, OR, XOR, NAND, NOR and XNOR, plus the derived multiplexer and xtime. It also holds the field constants. `dr_cell` wraps the gate function as a module; the pre-round key addition is built from it.

### Dual-rail encoding

| `{t,f}` | meaning |
|---|---|
| `00` | NULL (spacer) |
| `10` | valid 1 |
| `01` | valid 0 |

Gates are in strongly indicating minterm form: an output stays NULL until every input is valid. A latch's completion detector rises when all its bits are valid and falls when all are NULL. Each latch's acknowledge (Lack) is the inverse of the next stage's completion.

### Round flow

1. **Start-up.**
   * The plaintext and key are converted to dual rail. Each bit is released when the pre-round randomizer output for its group is 1.
   * The plaintext is XORed with the key and loaded into Stage 1 of ring R1. The key goes into ring R2 and Rcon = 0x01 into ring R3.
   * Once all three Stage 1 latches are complete, their input multiplexers switch, closing the three rings.
2. **Each round.** Every round is one valid wave followed by one NULL wave around the rings.
   * R1 computes the AES round. MixColumns is skipped when the Rcon ring says the round is the last.
   * R2 computes the next round key.
   * R3 computes the next Rcon.
3. **Stop.** After round 10, R3 Stage 2 holds 0x6C. The Stage 3 latches then stop taking data, and the ciphertext remains held in R1 Stage 2.

The state-ring Stage 1 latch bits are split into four groups: bit *i* belongs to group *i* mod 4. Each group is released by its own randomizer output. The randomizer delay for group *g* is `ctrl[8g+7:8g] mod 64 + 1` unit delays.

The controller counts falling edges of Lack, so it changes mode only while the delay chain is empty. Its stabilizing mux grounds the chain input in bypassed rounds. Measured in simulation, the randomized phases are:

* the valid phases of rounds 1, 9 and 10;
* the NULL phase of round 10.

## Modelling the self-timed logic

The self-timed core is written for simulation and synthesis on a fast *unit-delay clock*, `uclk`. Each C-element, latch rail and delay cell is one flip-flop of that clock, so one `uclk` period stands for one gate or LUT delay. Combinational dual-rail logic between latches settles within one period. This keeps the design in ordinary synchronous RTL while preserving the handshake order and the randomized arrival times.

On a real asynchronous implementation, replace:

* the C-element and delay-cell flip-flops with the target's state-holding gates and LUT delay chains;
* `uclk` with nothing.

## Interface (`aes_dual_hiding_top`)

| port | dir | width | description |
|---|---|---|---|
| `clk` | in | 1 | system clock |
| `uclk` | in | 1 | unit-delay clock of the core model |
| `rst_n` | in | 1 | active-low reset (hold for a few cycles of both clocks) |
| `start` | in | 1 | start pulse; taken when `busy` = 0 |
| `plaintext`, `key` | in | 128 each | AES-128 block and key (FIPS-197 byte order, byte 0 in bits 127:120) |
| `ctrl` | in | 32 | randomizer control word, one byte per randomizer A–D |
| `busy` | out | 1 | encryption in progress |
| `done` | out | 1 | one-cycle pulse: `ciphertext` is valid |
| `late` | out | 1 | the core had not finished when the ciphertext was captured |
| `ciphertext` | out | 128 | result |
| `core_round`, `core_delay_on`, `core_ring_closed` | out | 4, 1, 1 | status of the core (`uclk` domain) for observation |

### Timing

`done` pulses on the 14th rising `clk` edge after the edge that took `start`. The core needs:

* 137 `uclk` cycles with the shortest randomizer delays;
* about 140 + 5·63 cycles in the worst case, including the pre-round randomizer;
* two `clk` cycles for the done synchronizer.

So `clk` must be at least about 40 `uclk` periods. A faster `clk` still returns a ciphertext, but it may be wrong, and `late` is raised.

The control word actually used is `ctrl` XOR the current chaotic-map output. The map is a 32-bit fixed-point logistic map:

* it is seeded once from the first `ctrl` after reset;
* its parameter comes from a fold of the key;
* it steps every `clk` cycle while an encryption runs.

Consecutive encryptions therefore get different delay patterns, even with the same `ctrl`. The AES result itself is standard.

## Parameters

| parameter | default | where |
|---|---|---|
| `DEPTH` | 64 | unit delays per randomizer (delays 1..DEPTH) |
| `WAIT_CYCLES` | 14 | `clk` cycles from start to capture |

Inside the core, skewed-delay rounds are 1, 9 and 10 (`DLY_R0/1/2`). The zero-value constants are p = 0x08 and q = 0x1. The composite field is GF(2^4) with x^4 + x + 1, extended by y^2 + y + 0xC.

## Design choices not fixed by the source description

* **Number of rounds.** Ten rounds (AES-128), matching the 128-bit key input.
* **Randomizer length.** 64 unit delays per randomizer.
* **Grouping and control.**
  * Bit-to-group assignment is *i* mod 4.
  * Each randomizer takes one byte of `ctrl`, modulo 64.
* **Control-word source.** `ctrl` is a primary input; the application decides how to derive it. The chaotic map adds variation on top.
* **Chaotic map.** The map, its precision and where it acts are this design's choice. Only the control word is affected.
* **Stop mechanism.** The stop detection on Rcon 0x6C and the Stage 3 gating are this design's choice. So is the rule that holds Stage 3 until the rings close, which avoids a start-up deadlock.
* **Reset and flags.**
  * Reset style is this design's choice.
  * The `late` flag is an addition of this design.

## Verification

Every block has a self-checking testbench in `tb/`. Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. The S-box is checked exhaustively, for all 256 inputs, against a reference S-box. `tb_aes_dual_hiding_top` runs the top at its default parameters and checks:

* the FIPS-197 C.1 vector;
* a plaintext equal to the key, so that every S-box of round 1 sees zero;
* random vectors against a behavioural AES model (`aes_ref_pkg`);
* a deliberately too-fast `clk`, which must raise `late`.

It also counts each mechanism and fails any that never occurred: ring closing, randomized rounds against bypassed rounds, stop, zero-value substitution, control-word variation, and `late`.

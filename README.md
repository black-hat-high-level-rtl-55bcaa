# Hardware Trojans an HLS tool can plant: three example cores

High-level synthesis (HLS) turns a C function into a controller FSM plus a datapath. Nobody
reads the RTL it produces line by line, and nobody has a reference FSM to compare it with. A
compromised HLS tool can therefore add logic that the C source never asked for and that
ordinary verification will not flag. This repository is synthesizable SystemVerilog for three
such cores, written the way an HLS tool would emit them, each with the Trojan such a tool could
add and the trigger that wakes it:

| Trojan | Core | What changes when it fires | What stays the same |
|---|---|---|---|
| Degradation | FIR accelerator (`fir_degradation`) | Empty "bubble" states enter the loop body, so each iteration takes longer | The result |
| Battery exhaustion | ADPCM decoder front end (`adpcm_exhaust`) | Idle shared adder and multiplier compute discarded operations on bit-flipped inputs, burning dynamic power | Results and latency |
| Downgrade | SHA-256 (`sha256_downgrade`) and AES-128 (`aes128_downgrade`) | The round counter starts above zero, so only 18 of 64 (SHA) or 7 of 10 (AES) rounds run | Everything else; every HDL line is still exercised |

The first two are armed by a **time bomb**, a 16-bit count of completed executions that fires
after 65,536 runs (`exec_counter_trigger`). The downgrade is armed by a **secret input
sequence**, four chosen 32-bit values presented in order (`seq_detector_trigger`). Until a
trigger fires, every core gives bit-exact, cycle-exact results of a clean core (for the
FIR, in its default bubble variant). After the
degradation or exhaustion trigger fires, results stay correct as well. Only the downgrade
changes results, and only for the attacker who knows the sequence.

`blackhat_hls_top` holds all of them side by side. The cores share only clock and reset.

## The degradation Trojan: FSM bubbles in the FIR loop

The FIR core computes `sum += h[i] * z[i]` for `i < ntaps` out of two local memories
(`fir_local_mem`, eight 32-bit words each by default). The host fills them before a run. The
controller uses one state per scheduled step, as an HLS scheduler would produce them:

```
IDLE --start--> RD_H: tmp1 <= h[i]
                RD_Z: tmp2 <= z[i]        --(trojan)--> BUBBLE --> MUL
                MUL : tmp3 <= tmp1*tmp2, i <= i+1
                ACC : sum <= sum + tmp3;  i < ntaps ? RD_H : DONE
```

`BUBBLE` writes no register and starts no operation. Taking the detour therefore changes
nothing but the cycle count. Because it sits inside the loop, the cost repeats on every
iteration. Two variants are built in (`COVER_SAFE`):

* `0` (default): the bubble is reached only while the Trojan is active, and `BUBBLES` bubble
  cycles are added per iteration. A clean run costs nothing, but the bubble state is never
  visited in normal simulation, so code coverage can expose it.
* `1`: the bubble is visited once per iteration in every run, and `BUBBLES` more times when the
  Trojan is active. Coverage looks the same as in any other state, at a cost of one cycle per
  iteration even when dormant.

Latency from the `start` edge to `done` is `ntaps * (4 + b)` cycles, where `b` is the number
of bubble cycles per iteration. For the 8-tap case that is 32 cycles clean and 40 with one
bubble.

Only one state per bubble is needed. Each datapath register here is written only in its own
state, so nothing has to be finished or started inside the bubble. A generated FSM whose
states overlap operations would need two bubble states. The first would finish the operations
of the state it leaves, and the second would start those of the state it enters.

## The battery-exhaustion Trojan: fake work on idle units

`adpcm_exhaust` is the start of the ADPCM decoder:

```
d_sl  = d_spl + d_szl            d_dlt = (d_det1 * tmp2) >> 15
dl    = (d_det1 * tmp3) >> 15    rl    = dl + d_sl
```

It is scheduled in three cycles on one adder and one multiplier:

| State | Adder | Multiplier |
|---|---|---|
| C1 | `d_spl + d_szl` -> `d_sl` | `d_det1 * tmp2` -> `d_dlt` |
| C2 | idle | `d_det1 * tmp3` -> `dl` |
| C3 | `dl + d_sl` -> `rl` | idle |

`tmp2` and `tmp3` are the values of the decoder's quantizer tables (`qq4_tab[ilr>>2]` and
`qq6_tab[il]`). The lookups are made outside this block. Products are 64 bits wide, shifted
arithmetically and truncated to 32 bits.

Each input of each unit passes through an `fu_exhaust_mux`. In a state where the unit is idle,
and only while the Trojan is active, the unit does not see its real operand. It sees an extra
register that reloads the complement of the operand the unit currently sees on every clock.
Every input bit of the unit therefore toggles, which is the most switching a combinational
unit can do. The result is never written anywhere, so outputs and latency are unchanged
(`add_fake` and `mul_fake` show when this happens). The cost is one register and one
multiplexer per operand. Reusing units that already exist, instead of adding new logic, keeps
the Trojan from being removed as dead logic by synthesis. It also makes the Trojan hard to
separate in a power trace.

## The downgrade Trojan: a preloaded round counter

Both crypto cores are round-based: a counter `i`, a `+1` incrementer and a comparator
`i < ROUNDS` whose output tells the FSM whether to run another round. The Trojan is a single
2:1 multiplexer on the counter's start value:

```
              trigger
                 |
  0 ----------|\ v
  COUNTER ----| >---- i ---- +1 (loop) ---- i < ROUNDS ----> FSM
              |/
  COUNTER = ROUNDS - REDUCED_ROUNDS
```

The loop runs `ROUNDS - i0` times and uses the round constants, message words or round keys of
the *last* rounds. No comparator or loop constant changes. The only modified line executes in
every run, so line coverage cannot single it out.

* **SHA-256** (`ROUNDS = 64`, `REDUCED_ROUNDS = 18`, preload 46). The run has four phases:
  load (1 cycle), message schedule `m[16..63]` (48 cycles, one word per cycle), the rounds,
  and the addition to the chaining value. Latency is 115 cycles clean and 69 downgraded. Round
  constants and schedule follow FIPS 180-4. `REDUCED_ROUNDS` can be set to 48 or 64 as well.
* **AES-128** (`ROUNDS = 10`, `REDUCED_ROUNDS = 7`, preload 3). The key expansion comes first
  (10 cycles, round keys held in registers). The initial AddRoundKey with key 0 is followed by
  rounds using keys `i0+1 .. 10`, and the last round omits MixColumns. Latency is 22 cycles
  clean and 19 downgraded. The cipher follows FIPS-197. The S-box is computed at elaboration
  from the GF(2^8) inverse and the affine map, so no table file is needed.

Each core samples `trojan` once, when its rounds begin. It reports on `downgraded` whether the
last run was shortened.

## Triggers

* `exec_counter_trigger`: a `WIDTH`-bit counter advanced by the core's `done` pulse. The
  carry out sets a sticky `trigger` after `2**WIDTH` executions (65,536 at the default). A
  later trigger costs only a few more counter bits.
* `seq_detector_trigger`: a string detector over `LEN = 4` values of `DW = 32` bits (`SEQ`).
  A sample that matches the next expected value advances the match count. Any other sample
  restarts it at 1 if it equals the first value, else at 0. This is exact when the first value
  does not recur inside the sequence, which holds for the default values. The trigger is
  sticky until reset.

In the top, the SHA detector watches message word 0, and the AES detector watches plaintext
bits 127:96 of every start the core accepts (core neither busy nor showing `done`). The setup
phase of the downgrade cores comes before the moment they sample `trojan`. The run that
delivers the last secret value is therefore already downgraded.

## Interfaces and timing

All blocks use one rising-edge clock and a synchronous active-low reset `rst_n`. Each core
uses the same handshake:

* Pulse `start` for one cycle while the core is idle. The inputs are captured on that edge.
* `busy` is high while the core works.
* `done` is high for exactly one cycle, with results valid from then until the next start.
* The next `start` is accepted in the cycle after `done`.

The top renames the ports with prefixes `fir_`, `adpcm_`, `sha_` and `aes_`. It adds
`*_trojan` (trigger state) and `fir_exec_count` / `adpcm_exec_count` for observation.

Byte order: SHA-256 words are big-endian 32-bit values, `state_in[0]` = H0 and `block[0]` =
the first message word. AES blocks have byte 0 in bits 127:120, as in FIPS-197.

Top parameters and their defaults:

| Parameter | Default | Meaning |
|---|---|---|
| `TRIG_WIDTH` | 16 | execution-counter width (arms after `2**TRIG_WIDTH` runs) |
| `FIR_DEPTH` | 8 | words per FIR local memory, maximum taps |
| `FIR_BUBBLES` | 1 | bubble cycles per iteration when active |
| `FIR_COVER_SAFE` | 0 | bubble variant (see above) |
| `SHA_REDUCED`, `AES_REDUCED` | 18, 7 | rounds left when downgraded |
| `SHA_SEQ`, `AES_SEQ` | see source | the four secret values, `SEQ[0]` first |

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/bhls_pkg.sv \
          tb/tb_blackhat_hls_top.sv --top-module tb_blackhat_hls_top
./obj_dir/Vtb_blackhat_hls_top
```

Replace the testbench name to run any other. What each one checks:

| Testbench | Checks |
|---|---|
| `tb_blackhat_hls_top` | Whole design at default sizes: known answers while dormant. Then 65,536 real executions to arm both counters and the secret sequences to arm both detectors. Then each effect: same FIR sum in 40 instead of 32 cycles, same ADPCM results with one fake add and one fake multiply per run, SHA-256 in 69 instead of 115 cycles with a different digest, AES in 19 instead of 22 cycles with a different ciphertext. Fails if any of these mechanisms never occurs. Runs in under a second. |
| `tb_fir_degradation` | Random coefficients, tap counts (0, above the depth) and start sums, with the Trojan off and on, for both bubble variants. Exact sums and cycle counts. |
| `tb_fir_bubble_sweep` | 8-tap FIR with 1, 4, 8 and 16 bubbles: same result, overhead of exactly `BUBBLES` cycles per tap. |
| `tb_adpcm_exhaust` | Random operands against 64-bit arithmetic, the three-cycle schedule, fakes only in idle states with the Trojan active, and every operand bit flipping in a fake cycle. |
| `tb_fu_exhaust_mux` | Cycle model of the multiplexer and its register, including back-to-back fake cycles. |
| `tb_sha256_downgrade` | SHA-256("abc"), then random blocks against an independent reference whose constants are computed from cube roots of primes. Full and 18-round results, and both latencies. |
| `tb_aes128_downgrade` | FIPS-197 C.1 vector, then random keys and blocks against an independent reference. 10- and 7-round results, and both latencies. |
| `tb_downgrade_rounds` | Every round count of the evaluated configurations: SHA-256 with 64, 48 and 18 rounds, AES-128 with 10, 9, 8 and 7. Results against the references, and latencies. |
| `tb_exec_counter_trigger`, `tb_seq_detector_trigger` | Arming after exactly 2^4 and 2^16 pulses; detector against a sliding-window model on mixed random traffic. |

## How far this follows the source, and where it does not

Taken from the published description of the attacks:

* the FIR loop states and where the bubble goes, with both bubble variants;
* the ADPCM operations and their three-cycle schedule on one adder and one multiplier;
* the bit-flip input register and its select (`in = sel ? ~val : val`);
* the SHA-256 loop with its counter, comparator and preload multiplexer, with
  `Counter = Rounds - Reduced_Rounds`;
* the round counts (64 to 18, 10 to 7);
* the 16-bit execution counter;
* the four-value sequence trigger.

Chosen here, because the description is silent on them:

* all handshakes, reset and port lists;
* the local-memory organisation;
* the schedule-before-rounds structure of SHA-256 and the whole internal structure of AES-128
  (only named there);
* the secret sequence values;
* which input word the detectors watch;
* stickiness of the triggers;
* placing fake operations only in the three schedule states and not in the idle state.

Known differences and limits:

* **FIR overhead.** The description quotes a 3 % slowdown for one bubble on an 8-tap filter
  and 6 % for two. Here the loop is the whole run, so one bubble per iteration costs 25 %
  (32 to 40 cycles). The quoted figure is relative to a complete generated component whose
  other parts (interfaces, memory traffic) are not described.
* **SHA-256 baseline of 80 rounds.** One table of results lists 80 rounds as the clean SHA-256
  configuration. SHA-256 has 64 rounds and 64 round constants, so this core fixes
  `ROUNDS = 64`. An 80-round run cannot be expressed.
* **Only the decoder front end.** The rest of the ADPCM decoder, and the other benchmark
  kernels the attacks were measured on (backprop, fft, gsm, jpeg, mips, motion, viterbi), are
  not described beyond their names and are not included. Their area, power and latency
  overheads cannot be reproduced here.
* **Tool procedures.** Choosing where bubbles go and which units to exploit is work done inside
  the HLS tool: a cost function per basic block, and a power budget over the unit list. What
  is built is the result of those choices for these small kernels, not the procedures.
* **Power.** Power is not modelled. The exhaustion Trojan is verified by its switching pattern
  (every operand bit flips in each fake cycle), not by a power number.

## Files

`rtl/` holds one module or package per file:

* `bhls_pkg.sv`: SHA-256 constants and functions, AES byte transforms, the S-box generator;
* `exec_counter_trigger.sv` and `seq_detector_trigger.sv`;
* `fu_exhaust_mux.sv`;
* `fir_local_mem.sv` and `fir_degradation.sv`;
* `adpcm_exhaust.sv`;
* `sha256_downgrade.sv` and `aes128_downgrade.sv`;
* `blackhat_hls_top.sv`.

`tb/` holds the testbenches listed above and `tb_ref_pkg.sv`, the reference SHA-256 and AES
models used by `tb_downgrade_rounds`. Every file opens with a comment on what it does, its interface and its
timing.

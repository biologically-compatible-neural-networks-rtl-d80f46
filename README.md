# Real-time FPGA simulator for Pinsky-Rinzel neural networks

This is a synthesizable SystemVerilog model of a hardware simulator for small networks of
biologically detailed neurons. It is meant for real-time, closed-loop experiments with
living tissue.

- Each neuron is a two-compartment Pinsky-Rinzel cell: a soma with fast sodium and
  delayed-rectifier potassium channels, and a dendrite with calcium and calcium-dependent
  potassium channels plus synaptic input.
- Each neuron runs on three small floating-point processors: soma, dendrite and synapse.
- Every neuron advances one 0.1 ms time step per 10,000 clocks at 100 MHz, which is real time.
- All arithmetic is IEEE-754 single precision.

The model solves the membrane equations with exponential Euler. The synapse processor uses a
hybrid time-driven and event-driven method. Its cost per step grows with the number of spikes
that arrive, not with the number of synapses.

With the default parameters, the top level `neuro_sim` has:
- 5 neuron structures;
- 4 external spike inputs;
- full connectivity, set in RAM: every neuron can receive from every neuron and every
  external input;
- a simple memory-mapped host port, from which all parameters, initial states and connections
  are loaded.

## Hierarchy

```
neuro_sim                 top: N_NEURON neurons, spike routing, control registers
├─ step_timer             real-time step generator, overrun counter
└─ pr_neuron  (×N_NEURON) one two-compartment neuron structure
   ├─ traub_soma_pro      soma processor  ─┐ each: np_engine (register file,
   ├─ den_pro             dendrite processor┘ program sequencer) + fp_alu
   ├─ syn_pro             synapse processor (own sequencer + fp_alu)
   │  └─ syn_event_det    Cdur pulse tracking, RE/FE/BOTH/NC classification
   └─ dpram ×5            parameter RAMs: soma, dendrite, synapse,
                          connection ("conex"), synapse state
fp_alu = fp_add + fp_mul + fp_div + exp_pwlut + fp_cmp (min/max)
packages: fp_pkg (types, FP helpers), np_prog_pkg (soma/dendrite programs, RAM map)
```

## The neuron model as computed

Each compartment obeys `Cm dV/dt = A − B·V`, where:

```
A = ψ + I_e + K_L·V_left + K_R·V_right
B = ψ_Gtot + K_L + K_R
```

- `ψ_Gtot` is the sum of the conductances.
- `ψ` is the sum of each conductance times its reversal potential.

V is advanced with the exact solution for constant A and B over one step:

```
V' = A/B + (V − A/B)·exp(−B·dt/Cm)
```

Each gate variable x uses the same form: `x' = x_inf + (x − x_inf)·exp(−dt(α+β))`.

**Soma.** `ψ_Gtot = gNa·m_inf²·h + gKDR·p + gL`. The sodium activation m is taken at its
steady state.

**Dendrite.**
- Conductances: `ψ_Gtot = gCa·s² + gKAHP·q + gKC·c·χ(Ca) + ψ_Gtot,syn`, where
  `χ(Ca) = min(Ca·k_χ, 1)`.
- Calcium: `Ca' = Ca·decay + gain·gCa·s²·(V − ECa)`.
- Like the original two-compartment formulation, the dendrite has no leak term.

**Rate functions come from tables, not formulas.** The hardware never evaluates α(V) or β(V).
Each gate has two 256-entry tables in the compartment's parameter RAM:
- `x_inf`;
- `k = −dt(α+β)`, so that the processor only computes `exp(k)`.

Entry j stands for V = j − 128 mV, 1 mV per entry. The index is `floor(V + V_OFF)`, clamped to
the table. The dendrite's q gate is indexed by `floor(Ca·Q_SCALE)` instead.

This makes the channel kinetics fully reprogrammable from the host. The cost is a 1 mV
quantisation of the voltage used for rate look-up. The testbench package `tb_util_pkg` shows
how the tables are filled from the standard Pinsky-Rinzel rate functions:
`soma_word()`, `den_word()`, `syn_word()`.

**Soma/dendrite coupling.** The coupling uses the cable-equation constants
`K_L = K_R = a/(2·r_a·dx²)`, which are ordinary parameter words. A compartment with only one
neighbour sets the other K to zero.

### How the soma and dendrite processors work

Both processors are an `np_engine`:
- a 32-word FP32 register file;
- one `fp_alu`;
- an FSM that steps through a fixed program from `np_prog_pkg` (`soma_program`,
  `den_program`).

The instruction types are:
- ALU operations: add, sub, mul, div, exp, min, max;
- `LDP`: load a parameter word;
- `LDT`: load a table entry indexed by `floor(register)`;
- `END`.

One instruction runs at a time:

| Instruction | Clocks |
|---|---|
| add, sub, mul, min, max | 1 (ALU) |
| exp | 4 |
| div | 30 |
| parameter loads | 2 |

A complete neuron step without synaptic events takes 234 clocks, set by the dendrite. That is far inside the
10,000-clock budget, so this design does not pipeline the programs.

Parameter RAM map (both compartments, 2048 words):

| word | soma | dendrite |
|---|---|---|
| 0,1,2 | gNa, gKDR, gL | gCa, gKAHP, gKC |
| 3,4,5 | ENa, EK, EL | ECa, EK, – |
| 6 | injected current I_e | I_e |
| 7,8 | K_L, K_R | K_L, K_R |
| 9 | −dt/Cm | −dt/Cm |
| 10 | V_OFF (128) | V_OFF |
| 11 | spike threshold | – |
| 12,13 | – | Q_SCALE, k_χ |
| 14 | 1.0 | 1.0 |
| 15,16 | – | Ca gain, Ca decay |
| 32..39 | initial R0..R7 (R1 = V, R4/R5 = h, p) | initial state (V, s, c, q, Ca) |
| 256+256k | table k: h_inf, h_k, p_inf, p_k after m_inf (k=0) | s_inf, s_k, c_inf, c_k, q_inf, q_k |

A spike (`neu_fire`) is an upward crossing of the threshold word by the soma voltage between
two steps.

## The synapse processor (syn_pro)

This is the least conventional part of the design. A neuron can have many input synapses of
three receptor types: AMPA, GABA_A and NMDA. Each synapse follows the two-state kinetic
scheme, `dr/dt = α·T·(1−r) − β·r`. T is a transmitter pulse of fixed length Cdur that starts
when a presynaptic spike arrives.

Integrating every synapse every step would cost one exponential per synapse per step. Instead,
`syn_pro` keeps three lumped numbers per receptor type:
- **R_on**: the weighted sum of r over the synapses whose pulse is on;
- **R_off**: the same for synapses whose pulse is off;
- **N_on**: the sum of the weights of the "on" synapses.

Here r is already multiplied by the synapse's weight g_i (`r'_i = g_i·r_i`). With that, the
on-synapses and the off-synapses each obey one linear equation.

The steps of each time step:

1. **NC, every type, every step.**
   - `R_on ← N_on·R∞(1 − e^{−dt/τ}) + R_on·e^{−dt/τ}`
   - `R_off ← R_off·e^{−β·dt}`
   - All factors are constants in the synapse parameter RAM, so this needs no exponential.
2. **FE, for each synapse whose pulse ended this step.**
   - Its own r is brought up to date in closed form: `r'_i ← g_i·R∞(1 − e^{−Cdur/τ}) + r'_i·e^{−Cdur/τ}`. This is exact, because the pulse always lasts exactly Cdur.
   - It is then moved from the on-sums to the off-sums.
   - The step number is stored as t_off_i.
3. **RE, for each synapse whose pulse started.**
   - Its r has decayed since t_off: `r'_i ← r'_i·exp(−β·(t − t_off_i))`. This is the only
     exponential in the scheme, one per rising synapse.
   - It is then moved from the off-sums to the on-sums.
4. **Output.**
   - `r = R_on + R_off` per type.
   - `B(V) = 1/(1 + [Mg]/3.57·exp(−0.062·V))`, the NMDA magnesium block at the held dendrite
     voltage.
   - `ψ_Gtot,syn = g_A·r_A + g_G·r_G + g_N·r_N·B(V)`
   - `ψ_syn = g_A·r_A·E_A + g_G·r_G·E_G + g_N·r_N·B(V)·E_N`
   - Both go to the dendrite.

`syn_event_det` tracks a Cdur down-counter per synapse. It classifies each step as:

| Class | Meaning |
|---|---|
| RE | only rising edges |
| FE | only falling edges |
| BOTH | both rising and falling edges |
| NC | neither |

It counts the classes in the `evt_stats` outputs. `exp_cnt` counts exponentials spent on
events.

**A spike that arrives while the synapse's pulse is still on is ignored.** This keeps every
pulse exactly Cdur long, which the FE formula relies on. It also means a synapse cannot fire
faster than once per Cdur.

A step costs about 110 clocks, plus about 20 per falling synapse and 30 per rising synapse.
With 9 inputs under random spiking, the longest step seen was 406 clocks.

Synapse RAMs:
- **Synapse parameters**: 8 words per type k at 8k:
  - +0: `e^{−dt/τ}`
  - +1: `R∞(1−e^{−dt/τ})`
  - +2: `e^{−β·dt}`
  - +3: `e^{−Cdur/τ}`
  - +4: `R∞(1−e^{−Cdur/τ})`
  - +5: `−β·dt`
  - +6: g_max
  - +7: E_rev

  Then word 24 = [Mg]/3.57, word 25 = −0.062 (the slope), and word 26 = 1.0. Here
  `τ = 1/(α+β)` and `R∞ = α/(α+β)`.
- **conex**: synapse i at 2i holds the weight g_i; 2i+1 holds the type (0 AMPA, 1 GABA_A,
  2 NMDA, 3 unused).
- **Synapse state**: r'_i at 2i and t_off_i at 2i+1. The processor writes these.

Changing Cdur (control register) also requires rewriting words +3 and +4 of each type.

## Timing of a step and the exchange between processors

`step_timer` issues a one-clock `step` every `STEP_CYCLES` clocks (10,000 = 0.1 ms at 100 MHz)
while `run` is set. The host can also request a single step.

If some processor is still busy when a step falls due, the step is issued as soon as all are
idle. The `OVERRUN` register counts such late steps. At the defaults none occur, because the
longest step is a few hundred clocks.

All three processors of a neuron start on the same `step` and run in parallel. The values
they exchange are:
- soma V → dendrite;
- dendrite V → soma and synapse;
- synaptic ψ, ψ_Gtot → dendrite.

Each receiver latches an exchanged value when it is produced and uses it **from the next
step**. So every processor in step n sees its neighbours' results of step n−1.

The same rule holds for spikes. A neuron's `neu_fire` at the end of step n is held and
reaches every synapse processor in the network at step n+1: one step of synaptic delay.
External spikes (`ext_spike`) are held until the next step in the same way.

## Host interface and control

`cfg_addr[16:0] = {unit[2:0], sel[2:0], word[10:0]}`. Reads return `cfg_rdata` one clock after
the address. Writes use `cfg_we` and `cfg_wdata`.

- **unit 0..N_NEURON−1** selects a neuron. `sel` selects its RAM:
  - 0 soma parameters;
  - 1 dendrite parameters;
  - 2 synapse parameters;
  - 3 conex;
  - 4 synapse state.
- **unit 7** holds the control registers:
  - word 0 `CTRL`:
    - bit0 run;
    - bit1 single step;
    - bit2 init (load the initial state of all processors, clear the synapse sums and
      zero the synapse state RAM, 2·N_SYN clocks);
    - bits 15:8 Cdur in steps (reset value 10 = 1 ms);
    - on read, bit3 = busy.
  - word 1 `STEPS`: steps issued.
  - word 2 `OVERRUN`: steps that were late.

Synapse input numbering: input j < N_NEURON is neuron j's spike. Input N_NEURON+e is external
input e. Each neuron therefore has N_NEURON + N_EXT = 9 inputs at the defaults.

A typical run:
1. Write every word of the soma, dendrite, synapse-parameter and conex RAMs. The RAMs have
   no reset, and unused words must be zero.
2. Pulse init.
3. Set run.
4. Observe `v_soma`, `v_den`, `neu_fire` and `evt_stats`.

Parameters, such as [Mg] or injected currents, may be rewritten while running. The processors
read them afresh each step.

## Arithmetic

- **`fp_add`, `fp_mul`**: combinational single precision, round to nearest even.
  - Subnormals are flushed to zero.
  - Infinities and NaN are handled.
  - `fp_alu` registers their result, so add and mul take 1 clock.
- **`fp_div`**: restoring division, one quotient bit per clock, 30 clocks in `fp_alu`.
- **`exp_pwlut`**: a three-stage pipelined exponential. It looks up a 4096-entry ROM that is
  split into three zones of different resolution:

  | Argument range | Step | Entries |
  |---|---|---|
  | [0, 16) | 1/128 | 2048 |
  | [−1, 0) | 1/1024 | 1024 |
  | [−16, −1) | 1/64 | 960 |

  - The argument is floored to its zone grid, with no interpolation.
  - Arguments outside [−16, 16) are clamped.
  - The ROM is computed at elaboration time from `$exp`, so no data file is needed.
  - Almost all arguments in this design are `−B·dt/Cm` and `−dt(α+β)`, which fall in the fine
    zone.
  - The relative error is bounded by the zone step: about 0.1 % in [−1, 0].
- **`fp_cmp`**: min/max, used for χ(Ca).

## Departures and limitations

- **Exponential.** The reference design prefers a generated floating-point exponential core
  of the same latency (3). The piece-wise table used here is the alternative it also
  evaluates, with equal latency and similar accuracy in the neuron output.
- **Rates and calcium from outside the core equations.**
  - The rate functions, the calcium dynamics and χ(Ca) are not part of the membrane and
    synapse equations this design follows. They are taken from the standard Pinsky-Rinzel
    model.
  - The rate functions are loadable tables.
  - The form of B(V) (Jahr-Stevens) is likewise a standard choice.
- **No multiplexing.** Each neuron structure simulates one neuron. The reference system can
  time-multiplex neurons on a structure to reach about 105 neurons; that mode is not built.
  N_NEURON can be raised, up to 7 with the current address map.
- **No processor subsystem.** The embedded processor, its buses, DDR memory, UART, clocking
  and firmware of a complete FPGA system are not included. The host port stands in for the
  processor bus.
- **One receptor type per connection.** The conex RAM holds one type per source and target.
  A cell that excites a target through both AMPA and NMDA needs two inputs. The epilepsy
  testbench runs two identical copies of the presynaptic cell for this reason.
- **Spike detection.** This is a threshold crossing on the soma voltage. Spikes are delivered
  with one step of delay.
- **NC count.** The NC counter counts steps without any edge. Counting conventions that
  subtract events instead give a different NC total for the same spike train; the RE, FE and
  BOTH counts are unaffected.
- **Synthesis.** Synthesis for a specific FPGA has not been done. Resource use and timing
  closure at 100 MHz are unverified. The combinational `fp_add` and `fp_mul` are the likely
  critical paths; register them inside `fp_alu` if needed, since the programs tolerate any
  ALU latency.
- **Exponential ROM initialisation.** The ROM is initialised with real arithmetic at
  elaboration. Some synthesis front ends cannot evaluate that.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, has a watchdog, and compares against models built on
`real` arithmetic in `tb/tb_util_pkg.sv`. Those models round every operation to single
precision, the way the hardware does.

| testbench | what it checks |
|---|---|
| tb_fp_add, tb_fp_mul, tb_fp_div | random and corner operands against IEEE results |
| tb_exp_pwlut | every zone against the table formula; latency 3 |
| tb_fp_alu | every operation and its latency |
| tb_dpram | both ports, read-first behaviour |
| tb_step_timer | period, single step, late steps and overrun count |
| tb_syn_event_det | the 4-synapse, 8 ms example: RE 5, FE 5, BOTH 1 |
| tb_syn_pro | 9 synapses of all types over 400 steps against a per-synapse (not lumped) reference; dendrite voltage and [Mg] changes |
| tb_traub_soma_pro, tb_den_pro | step-by-step against the reference compartment; spiking |
| tb_pr_neuron | full neuron with host-loaded RAMs; 1000 steps, spikes |
| tb_neuro_sim | small network, short step period (forces overruns); Cdur and [Mg] changes; single step |
| tb_neuro_sim_full | the top with default parameters (5 neurons, 10,000-clock steps), 900 steps |
| tb_hco | two cells with mutual GABA_A inhibition (half-centre oscillator) against an uncoupled pair: activity alternates between the coupled cells and total firing drops |
| tb_epilepsy | after-discharge experiment: a presynaptic burst into AMPA-only, AMPA+NMDA at 1 mM Mg and at 0.1 mM Mg cells; with the standard cell parameters 4 presynaptic spikes give 2, 3 and 8 spikes, 4 of them after the burst at low Mg |

Two testbenches also check that the mechanisms really occurred and fail if any never happened:
- tb_neuro_sim, which counts every event class, spikes, overruns, the Cdur and Mg switches
  and the single step;
- tb_neuro_sim_full.

With Verilator 5, from the repository root (packages first):

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/fp_pkg.sv rtl/np_prog_pkg.sv tb/tb_util_pkg.sv \
  rtl/fp_add.sv rtl/fp_mul.sv rtl/fp_div.sv rtl/exp_pwlut.sv rtl/fp_cmp.sv \
  rtl/fp_alu.sv rtl/np_engine.sv rtl/dpram.sv rtl/syn_event_det.sv rtl/syn_pro.sv \
  rtl/traub_soma_pro.sv rtl/den_pro.sv rtl/pr_neuron.sv rtl/step_timer.sv \
  rtl/neuro_sim.sv tb/tb_neuro_sim.sv --top-module tb_neuro_sim -o sim
./obj_dir/sim
```

Replace the last testbench and the top module name to run another testbench.

Run times:
- tb_neuro_sim_full: about 20 s.
- Every other testbench: a few seconds.

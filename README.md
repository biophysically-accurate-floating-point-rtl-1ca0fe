# Floating point neuroprocessors for biophysical neuron models

This design solves conductance-based neuron models in hardware, in single
precision floating point rather than fixed point, at biological real time: one
0.1 ms integration step of every cell within 10,000 cycles of a 100 MHz clock.
A neuron is split into parts (soma, dendritic compartments, synapses). Each
part runs on a **neuroprocessor**: a small bank of floating point ALUs under a
micro-programmed controller, with a 256-word parameter-and-result memory that a
host processor reads and writes over an AHB-lite bus. The same generic processor
becomes a Hodgkin-Huxley soma, a reduced Traub soma, an active or passive
dendrite or a kinetic synapse depending on the micro-program it runs. Each processor can also handle up to four
**virtual cells** one after another within a time step, so one piece of
hardware stands for up to four somata, compartments or synapses.

The top level, `neuro_top`, joins four processors into a two-neuron network.
Each neuron has a Traub soma and three active dendritic compartments. A synapse sits on
each distal compartment, and each soma's spike drives the synapse of the other
neuron.

## Architecture of one neuroprocessor

```
          AHB-lite ──► ahb_mem_ctrl ──► dpram 256x32 (port A)
                             │ write snoop        │ port B
                             ▼                    ▼
          np_ctrl (start, CONFIG1, cell index) ─► sequencer ◄── np_ucode_pkg
                                                    │   issue one op/cycle
          ┌───────────── internal memory, 64 x 32 ──┴───────────────┐
          │  read ports: operands of all ALUs                        │
          │  write ports: result bus of every ALU, loads, immediates │
          └─► fp_add (8) fp_mul (8) fp_div (26) fp_exp (170) fp_cmp (3)
          ext_in / ext_out wires ◄──► neighbouring processors
```

Numbers in brackets are latencies in cycles. `neuroprocessor.sv` holds this
structure. `hh_soma_proc`, `traub_soma_proc`, `dend_proc` and `syn_proc` are
thin wrappers that set the `KIND` parameter. That parameter selects the
micro-program and whether a comparator is built; the two somata do not use
one.

### Sequencer and scoreboard

This is the part that takes the most care to follow. A micro-program is a list
of three-address instructions (`np_instr_t`: opcode, operands `a` and `b`,
destination `d`, 32-bit immediate). They work on a 64-entry internal variable
memory. The sequencer issues at most one instruction per cycle, in program
order:

* **ALU ops.** `ADD`, `SUB`, `MUL`, `DIV`, `EXP` and `CGT` go to their unit
  and return on that unit's result bus after its fixed latency. `CGT` writes
  1.0 or 0.0, so a program can use the result as an arithmetic selector.
* **Pending bits.** Every variable has a *pending* bit. It is set at issue for
  the destination and cleared when the result is written. An instruction
  stalls while either operand is pending, or while its destination is still
  pending from an earlier instruction. The divider and exponential unit handle
  one operation at a time, so an instruction for a busy unit also stalls.
  Adder, multiplier and comparator are fully pipelined.
* **Parallel units.** Up to five units can be busy at once, and results come
  back out of order. A tag pipeline next to each unit carries the destination
  index. An assertion checks that no result lands on a variable that another
  in-flight instruction also targets.
* **Memory and wires.** `LDP` and `STP` move words between variables and the
  current cell's block of the parameter memory. `LDX` and `STX` read and write
  the wires to neighbouring processors. `LDI` loads a constant.
* **Control.** `BRC` branches on a CONFIG1 bit, which is how the dendrite picks
  its integration method. `BRV` branches on one bit of a variable's raw
  32-bit pattern; the programs use it to test the cell configuration word
  (memory word 0 of each cell block), which they load with `LDP`. `END` waits until nothing is in flight, then hands
  over to the next virtual cell.

The original design uses a pair of small memories per ALU and one hand-written
state machine per ALU. This one uses a shared memory and a scoreboard instead.
The values the programs see are the same, and the scheduling is done by the
hardware rather than by hand. Measured cycles per virtual cell:

| Program | Cycles per cell | Original's figure |
|---|---|---|
| HH soma | 2,327 | about 2,200 |
| Traub soma | 2,156 | about 2,000 |
| Active dendrite | 2,233 | 1,920 |
| Passive dendrite, exponential Euler | about 320 | 354 |
| Passive dendrite, backward Euler | about 110 | not stated |
| Synapse, 3 receptor types | about 857 | about 1,550 |

### Micro-programs and model equations

`np_ucode_pkg.sv` holds the four programs. It is written out
instruction by instruction, with the variable names in the comment on each
line.

* **HH soma.** Gates m, h and n, plus the membrane voltage. Each gate's rates
  come from one of two forms:
  * s1 = (a·(V−th) + a0) / (exp((V−th)·binv) + c)
  * s2 = a·exp(b1·(V−th))

  Setting c = −1 and a0 = 0 gives the classic HH α_m and α_n. Setting c = +1
  and a = 0 gives β_h. Gates and voltage are advanced by exponential Euler,
  x' = x∞ + (x − x∞)·exp(−dt/τ). The current is the sum of the ionic
  currents, the injected current (word 22), the stimulus wire and the axial
  current from the first dendritic compartment. One update uses 10
  exponentials.
* **Traub soma.** The soma of the reduced (two-compartment) Traub model. The
  sodium current is gNa·m∞²·h·(V−ENa), with instantaneous activation
  m∞ = αm/(αm+βm), where both rates use the rational form. The potassium
  current is the delayed rectifier gK·n·(V−EK). h, n and V are advanced as in
  the HH program, with 9 exponentials per update. The calcium channels of this
  model are in the dendrite.
* **Dendrite.** The compartment follows the cable equation
  C·dV/dt = Ie − gL·(V−EL) − isyn + gl·(Vl−V) + gr·(Vr−V). Here gl and gr are
  the axial conductances to the left and right neighbours; 0 means a sealed
  end.
  * With CONFIG1 bit 3 set, the compartment is *active*. It adds the channels
    of the reduced Traub dendrite to G and to the current:
    * calcium gCa·s²·(V−ECa);
    * Ca-activated potassium gKC·c·χ·(V−EK), with χ = min(Ca/250, 1);
    * AHP potassium gAHP·q·(V−EK).

    The calcium concentration follows dCa/dt = k·ICa − dec·Ca. The rate of c
    switches between two exponential branches at a voltage threshold. The
    rate of q is min(k2·Ca, cap). The comparator makes these three decisions
    as sel = (x > y), then x + sel·(y − x).
  * Exponential Euler writes the new V.
  * Backward Euler (CONFIG1 bit 2) writes the tridiagonal matrix row to words
    8–11: a = −gl, b = C/dt + G, c = −gr, d = (C/dt)·V + Ie + gL·EL − isyn.
    The host solves all compartments together (Thomas algorithm) and writes V
    back to word 12 before the next step. In active mode the channel terms
    are included in b and d.
* **Synapse.** AMPA, NMDA and GABAa receptors, each with the kinetic scheme
  dr/dt = α·T·(1−r) − β·r, solved by exponential Euler.
  * Transmitter: T is Tmax for Tdur after an accepted spike, and 0 otherwise.
  * Dead time: an incoming spike is accepted only when the time since the
    last accepted spike exceeds the dead time. The comparator makes this test.
  * Outputs: g = Σ gmax·N·r and i = Σ gmax·N·r·(V−E), where N is the
    receptor population.

  There is no magnesium block on NMDA.

## Parameter-and-result memory and CONFIG1

Each processor has 256 words of 32 bits, shared by the bus and the processor.

| Word | Meaning |
|---|---|
| 0 | Start. A bus write with bit 0 = 1 starts one time step. |
| 1 | CONFIG1. Bits [1:0] = number of virtual cells − 1. Bit 2 = backward Euler. Bit 3 = active dendrite (channels on). |
| 8 + 62·k | Start of virtual cell k's 62-word block (k = 0..3). |
| block + 0 | Cell configuration word. Bit 0 = left end sealed (no coupling to the proximal neighbour), bit 1 = right end sealed (no coupling to the distal neighbour), bit 2 = soma stimulus input on. The original names this word "boundary and input current setting"; the bit layout is this design's own. |
| block + 8..11 | Results: backward-Euler coefficients a, b, c, d for the dendrite; g and i for the synapse. |
| block + 12 | Membrane voltage, which is both state and result. For the synapse: time since the last accepted spike. |
| block + 13.. | Model parameters and gate states. The first lines of each wrapper list them. |

## Bus and host protocol

`ahb_mem_ctrl` is an AHB-lite slave that handles single-word transfers:

* Writes complete without a wait state.
* Reads insert one wait state (`hready_out` low for one cycle).
* `hresp` is always OKAY.

`np_ctrl` watches the bus writes to words 0 and 1. In `neuro_top`,
`haddr[11:10]` selects the processor, 1 KB each: 0 soma, 1 dendrites of
neuron 0, 2 dendrites of neuron 1, 3 synapses.

A host step looks like this:

1. Write parameters and CONFIG1 once.
2. For each step, write 1 to word 0 of every processor.
3. Wait for the `irq` pulse from `nnwsynch`, which fires when all processors
   report done.
4. Read the results. For backward Euler, solve the dendrite matrix and write
   the voltages back.

Processors exchange values over wires: neighbour voltages, synaptic g and i,
and spike flags. Each processor reads the values its neighbours produced in
the previous step, so the result does not depend on which processor finishes
first.

## The two-neuron top level

| Instance | Module | Virtual cells |
|---|---|---|
| `u_soma` | `traub_soma_proc` (`hh_soma_proc` if `SOMA_KIND = KIND_HH`) | 0, 1 = somata of neurons 0, 1 |
| `u_dend0`, `u_dend1` | `dend_proc` | 0..2 = proximal to distal compartments |
| `u_syn` | `syn_proc` | cell n = synapse on neuron n, driven by the other soma |

Other logic in the top:

* **Spike detection.** `spike_detect` raises a flag when a soma voltage
  crosses `spike_threshold` upward. The threshold is set by the host.
* **DAC outputs.** Soma voltages go out through `float2fix` as signed Q15.16
  on `dac_vm`, towards a DAC.
* **Stimulus inputs.** Stimulus currents come in through `fix2float` as
  Q15.16 on `stim_fix`.
* **Outside the top.** The embedded CPU, DRAM, UART, GPIO, interrupt
  controller and DAC board of a complete system are not included. The top
  brings out the AHB slave port and `irq` in their place.

## Arithmetic units

All units use IEEE-754 single precision with round to nearest even. Subnormal
inputs and results are flushed to zero, and overflow gives infinity.

| Unit | Latency (cycles) | How it works |
|---|---|---|
| `fp_add` | 8 | Align, add or subtract, normalise, round. Result goes through a register chain. |
| `fp_mul` | 8 | 24×24 mantissa product from `dsp_mant_mult`, then normalise and round. |
| `dsp_mant_mult` | 6 | Four multiplier slices of 13 and 12 bits, as in DSP blocks: hi·hi, lo·hi, hi·lo, lo·lo. Partial sums cascade with 12-bit right shifts into a 50-bit product, one slice per pipeline stage. |
| `fp_div` | 26 | Restoring division, one quotient bit per cycle, one division in flight (`in_ready`). |
| `fp_exp` | 170 | See below. |
| `fp_cmp` | 3 | Sign stage, then exponent, then mantissa. Outputs lt/eq/gt and a float result of 1.0 when A > B. |
| `fix2float`, `float2fix` | 3 each | Signed Q15.16. `float2fix` truncates and saturates. |

`fp_exp` works in three stages:

1. **Range reduction.** x = k·ln2 + r, in fixed point with 40 fraction bits.
2. **CORDIC.** 30 hyperbolic CORDIC steps: shifts 1..28, with 4 and 13
   repeated. The start value is 1/K, and cosh r + sinh r gives e^r.
3. **Exponent adjustment.** The exponent of e^r is adjusted by k.

The CORDIC finishes in about 31 cycles. The result is held to 170 cycles so
that the latency matches the original. Inputs with |x| ≥ 128 saturate to
infinity or zero.

## Where this design departs from the original

* **Channel equations.** The original only cites its models. The following
  are the usual published forms, not taken from the original: the HH rate
  constants, the reduced Traub (Pinsky-Rinzel) soma and dendrite kinetics,
  and the synapse transmitter pulse. All voltages are absolute millivolts. The rational rate form carries an
  explicit constant c in the denominator, so it covers both the +1 and the −1
  cases.
* **Controller.** One shared internal memory and a scoreboarded in-order
  sequencer replace the per-ALU memory pairs and hand-scheduled state
  machines. Cycle counts therefore differ from the original's (see the table
  above).
* **Vendor cores.** The divider, exponential and converters are this design's
  own. Only their latencies follow the original.
* **Own encodings.** The following are this design's own: the memory offsets
  beyond words 0, 1, 8, the 62-word cell block and the sodium reversal
  potential at offset 18; the CONFIG1 bit encoding; the bits of the cell
  configuration word and the `BRV` instruction that tests them; the bus address map; the
  Q15.16 format; the synchroniser's one-cycle pulse.
* **Network wiring.** The top wires a fixed network: two neurons, each a soma
  with a chain of three dendritic compartments and one synapse. Longer chains
  fit in the processors (four virtual cells each) but need other wiring, as
  `cable8_tb` shows.
* **Reset.** Reset is active low and synchronous. It clears control and valid
  state. Data registers are not reset.

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. A watchdog stops a simulation that hangs.
Packages come first on the command line. For example, the full network:

```
verilator --binary --timing -Irtl -Itb \
  rtl/np_pkg.sv rtl/np_ucode_pkg.sv tb/tb_fp_pkg.sv \
  $(ls rtl/*.sv | grep -v _pkg) tb/neuro_top_tb.sv \
  --top-module neuro_top_tb
./obj_dir/Vneuro_top_tb
```

The packages are listed first and only once: Verilator rejects a second
copy of a package.

Replace `neuro_top_tb` with any other `*_tb` to test one unit. Some examples:

* `fp_add_tb` checks thousands of random and edge-case operands against
  reference arithmetic, and the latency.
* `neuroprocessor_tb` runs 1 to 4 virtual cells and checks the cycle counts.
* `hh_soma_proc_tb` checks that a stimulated soma fires, against a reference
  model in the testbench.

`neuro_top_tb` runs the network at its default parameters (Traub somata,
active dendrites) for 420 steps of 0.1 ms. `neuro_top_hh_tb` runs the same
with HH somata and passive dendrites. Each drives a stimulus into neuron 0 and
checks several things:

* soma spikes and `irq` pulses happen;
* spikes cross to the other neuron's synapse, and some are accepted while
  others are rejected by the dead time;
* two backward-Euler steps run, with the testbench acting as host and solving
  the matrices;
* bus wait states and scoreboard stalls occur;
* the DAC outputs match the voltages read over the bus;
* in the default run, calcium enters the active dendrites, and one processor
  switches to passive compartments and back.

`cable8_tb` builds a longer neuron without the top: one HH soma and a
seven-compartment passive dendrite spread over two dendrite processors (four
virtual cells and three). The testbench does the wiring between the
processors. Every compartment voltage is compared with a double-precision
update over 250 steps, and each step must finish within 10,000 cycles. The
slowest step takes 2,322 cycles.

To change a model, edit the program in `np_ucode_pkg.sv`. Programs may use up
to 64 variables and 256 instructions, and parameters must fit in the 62-word
cell block.

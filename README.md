# Real-time STDP network controller for analog neuron chips

This is the digital half of a mixed analog/digital neural network simulator.
The neurons are analog: five custom chips each hold five Hodgkin-Huxley neurons
that integrate ionic and synaptic currents on a capacitor, continuously and in
biological real time. What the analog chips cannot do is form a network. They
have no wiring between neurons and no learning. An FPGA supplies both:

* it watches the 25 spike outputs,
* it routes every spike to the synaptic inputs of the neurons it connects to,
  with a programmable weight,
* it changes the weights of plastic synapses by spike-timing-dependent
  plasticity (STDP) while the network runs.

The FPGA also configures and maintains the analog chips. It sends each chip
the topology words that group its conductance modules into neurons. It also
refreshes the chip's 205 analog parameter voltages every 2 ms through a DAC.
A PC on an RS232 link sets everything up and receives time-stamped spikes and
weights.

The RTL here implements that FPGA for 25 neurons (5 chips x 5 neurons) with a
50 MHz clock. The analog chips, the DACs and the PC are outside it and appear
as ports.

```
            RS232                                    spike_pad[25]
  PC  <--------------> uart_rx/uart_tx <-> host_if <------------------+
                                            |   |                      |
                 config writes / weight read|   | time-stamped spikes  |
                                            v   |                spike_input
                                     synapse_matrix <---- stdp_engine <-+--- spike[25]
                                     P[25][25], W[25][25]   ^   |       |
                                            |               |   v       |
                                            |        neuron_traces      |
                                            |   (exp_decay x 100, tick_gen x 4)
                                            v                           |
                                         syn_stim <---------------------+
                                            ^   ^
                          (weights, inhib) -+   +- stim_pattern (host-programmed trains)
                                            |
                                 syn_exc[25], syn_inh[25]  ---> analog neurons

  per chip (x5):  param_ram -> param_refresh -> DAC + memory-cell strobes
                  topo_serializer -> topology serial input
```

## The plasticity rule

Row j of the weight matrix is the pre-synaptic neuron and column i is the
post-synaptic neuron. Each synapse has a 10-bit weight `w_ji` and a plasticity
bit `P_ji`. If both are 0, the two neurons are not connected. If the weight is
non-zero and `P_ji` is 0, the synapse is fixed. If `P_ji` is 1, the weight
follows this rule:

```
dw_ji/dt = eps_i * eps_j * { (W_LTP - w_ji) * sum over t_i of P(t - t_j_last) d(t - t_i)
                           - (w_ji - W_LTD) * sum over t_j of Q(t - t_i_last) d(t - t_j) }

P(t) = exp(-t/tau_p)         Q(t) = exp(-t/tau_q)
eps_j = 1 - exp(-(t_j_last - t_j_last-1)/tau_pre)
eps_i = 1 - exp(-(t_i_last - t_i_last-1)/tau_post)
```

It has three parts:

* **Potentiation (LTP).** A post-synaptic spike that follows a pre-synaptic
  one raises the weight. How much depends on how recent the pre-synaptic
  spike was (`P`).
* **Depression (LTD).** A pre-synaptic spike that follows a post-synaptic one
  lowers the weight (`Q`).
* **Memory effect and soft bounds.** The efficacies `eps` make a spike that
  closely follows the same neuron's previous spike count for less. The factors
  `(W_LTP - w)` and `(w - W_LTD)` slow the weight as it approaches the bounds.

The time constants are tau_p = 14.8 ms, tau_q = 33.8 ms, tau_pre = 28 ms and
tau_post = 88 ms.

### Events, not time steps

Each delta term of the rule only acts at a spike. The whole rule is therefore
evaluated when a neuron fires. When neuron `n` fires, `stdp_engine` does this:

1. **Efficacies.** It computes the efficacies of `n` from two traces:
   `eps_pre[n] = 1 - tr_pre[n]` and `eps_post[n] = 1 - tr_post[n]`. It keeps
   both values, because partners need them at their own later spikes.
2. **LTP over column n.** `n` is post-synaptic. For every plastic `j -> n` it
   does `w += eps_post[n] * eps_pre[j] * (W_LTP - w) * tr_p[j]`.
3. **LTD over row n.** `n` is pre-synaptic. For every plastic `n -> i` it does
   `w -= eps_pre[n] * eps_post[i] * (w - W_LTD) * tr_q[i]`.
4. **Restart.** It restarts all four traces of `n` at 1.0.

The engine handles one synapse per clock, so one spike takes
`2 x 25 + 3 = 53` clocks. Spikes that arrive meanwhile wait in a pending
vector and are served lowest neuron first. A neuron that fires again while
still pending is merged with its earlier spike. That case reports a pulse on
`stdp_merged`. The worst case is all 25 neurons firing in the same clock. The
last weight is then written `1 + 25 x 53 = 1326` clocks (26.5 us) later. That
is within the 30 us event period the system guarantees.

### Traces: one exponential generator per neuron and time constant

Each exponential is a 20-bit register `Q`. Every `dt = tau/1024` it is replaced
by `Q - (Q >> 10)`. Each step multiplies it by `1 - 2^-10`, which is close to
`exp(-dt/tau)`. After 1024 steps it holds `exp(-1)` to within 0.1 %
(`exp_decay`). A load input sets it to `f(0)`, here all ones (1.0). A prescaler
(`tick_gen`) gives the step enable:

| time constant | 1024 steps = tau | step period at 50 MHz |
|---------------|------------------|-----------------------|
| tau_p  14.8 ms | `TICK_P`    | 723 clocks  |
| tau_q  33.8 ms | `TICK_Q`    | 1650 clocks |
| tau_pre  28 ms | `TICK_PRE`  | 1367 clocks |
| tau_post 88 ms | `TICK_POST` | 4297 clocks |

`neuron_traces` holds four such traces for each of the 25 neurons, 100
generators in all, with one shared tick per time constant. A trace that has
never been started is 0. The first spike of a neuron therefore has efficacy 1.
A partner that has never fired contributes no P or Q.

Because the steps are so slow (hundreds of clocks apart), one subtractor could
serve many traces in turn. This design does not time-share the generators.
Each has its own subtractor, which keeps the timing obvious. Time-sharing is
the natural next step if area matters.

### Fixed point

* Traces are 20-bit fractions with all ones as 1.0. The STDP multiplications
  use their top 12 bits (`FRAC_BITS`).
* The gain is `((eps_a * eps_b) >> 12) * trace >> 12`, a 12-bit fraction. It
  multiplies the 10-bit distance to the bound, and the product is truncated.
* The step is always smaller than the distance to the bound. A weight between
  `W_LTD` and `W_LTP` therefore never leaves that interval. Assertions in
  `stdp_engine` check this.
* A weight that the host has set outside the bounds is not pushed further out.

## Synaptic stimulation

Each analog neuron has two multi-synapse inputs, one excitatory and one
inhibitory. Every weighted event from any pre-synaptic neuron drives one of
them.

`syn_stim` codes a weight as pulse width. When neuron `j` fires, each neuron
`i` with `w_ji != 0` gets `w_ji x STIM_SCALE` clocks of trigger. The default is
1 us per weight step, so up to about 1 ms. The trigger goes to the inhibitory
input if `j` is flagged inhibitory, and to the excitatory input otherwise.
Widths from overlapping spikes add up in a 16-bit counter per input, which
saturates at its maximum. The trigger rises two clocks after the spike event.

### Stimulation patterns

The host can also drive a neuron directly with a periodic train
(`stim_pattern`). Each neuron has its own period in milliseconds (16 bits),
weight (10 bits) and enable bit, set with command `09`. Every period the
neuron gets one stimulation event. It adds `weight x STIM_SCALE` clocks to the
neuron's excitatory trigger, just like an excitatory spike. A write restarts
the train, so the first event comes one period after the write. A period of 0
acts as 1 ms. The millisecond tick comes from a prescaler, `MS_DIV` clocks
(`CLK_HZ/1000`). The form of these trains is this design's own.

## Configuring the analog chips

**Topology** (`topo_serializer`). Each chip takes three 14-bit words on a
serial input with three lines: CLK, DATA and VALIDATION. The clock runs at
100 kHz and only during a transfer. Stopping it otherwise keeps it from
coupling into the analog circuits. Each word is sent as follows:

* 14 serial periods carry the data, MSB first. DATA changes at the start of
  each period and CLK rises in its middle.
* One more period, with CLK low and VALIDATION high, latches the word.

Three words take 450 us.

**Parameters** (`param_ram`, `param_refresh`). The 205 model parameters of a
chip are 14-bit codes held in a RAM. The analog memory cells that store them
as voltages leak, so the refresh never stops. Every 10 us (500 clocks) it
sends one parameter:

```
pc (clock in period)  0   1   2 ........ 114 ............. 250 ............ 499
RAM read              addr=k  data
DAC                           CS_n low, 14 bits MSB first (SCLK = 8 clocks/bit), CS_n high
mc_clk                ______________________________________  (high for pc < 250)
mc_reset_n            low during pc < 250 of parameter 0 only
mc_enable_n                                               low for pc >= 250: cell k samples DAC
```

A round of 205 parameters takes 2.05 ms. The five chips each have their own
RAM, refresh controller and DAC, and they run in parallel. `refresh_round`
pulses at the end of each round.

## Host link

The link is RS232 at 115200 baud, 8N1 (`uart_rx`, `uart_tx`). Commands are an
opcode byte followed by fixed arguments (`neuro_pkg::cmd_e`):

| bytes | action |
|-------|--------|
| `01 j i {P,00000,w[9:8]} w[7:0]` | set synapse j -> i: weight and plastic bit |
| `02 chip addr d[13:8] d[7:0]`    | write analog parameter `addr` (0..204) of a chip |
| `03 chip word d[13:8] d[7:0]`    | set topology word 0..2 of a chip |
| `04 chip`                        | send that chip's topology words |
| `05 ltp[9:8] ltp[7:0] ltd[9:8] ltd[7:0]` | soft bounds W_LTP, W_LTD (reset: 1023, 0) |
| `06 j i`                         | read weight: reply `86 j i w[9:8] w[7:0]` |
| `07 j flag`                      | mark neuron j's synapses inhibitory |
| `08 flag`                        | start/stop the parameter refresh (stopped at reset) |
| `09 n p[15:8] p[7:0] {E,00000,w[9:8]} w[7:0]` | stimulation train of neuron n: every p ms, weight w, on if E = 1 (off at reset) |

Every spike is reported as `80 n t[31:24] t[23:16] t[15:8] t[7:0]`. The time
stamp `t` counts microseconds from reset. Spikes wait in a 16-entry FIFO.

At 115200 baud the link carries about 1900 spike reports per second. That is
less than 25 neurons at their highest rates can produce. Reports that find the
FIFO full are dropped and counted on `events_dropped`; plasticity and
stimulation are not affected. A synapse write from the host waits if the STDP
engine is writing the weight matrix in the same clock.

## Modules and parameters

| module | role |
|--------|------|
| `neuro_pkg` | fixed widths and sizes (10-bit weights, 14-bit parameters, 205 parameters, 3 topology words, 20-bit traces), types, command codes |
| `gaillimh_fpga` | top level, wires everything above |
| `exp_decay` | one exponential generator (20-bit register, subtract `Q >> 10`, load `f0`) |
| `tick_gen` | step prescaler |
| `neuron_traces` | 4 x 25 traces |
| `stdp_engine` | event-driven STDP |
| `synapse_matrix` | `P` and `W` matrices in registers (row or column readable in one clock) |
| `syn_stim` | weighted synaptic triggers |
| `stim_pattern` | host-programmed periodic stimulation trains |
| `spike_input` | two-flop synchronisers, rising-edge events (3 clocks after the pin), microsecond time stamp |
| `topo_serializer` | topology words |
| `param_ram`, `param_refresh` | parameter storage and refresh |
| `uart_rx`, `uart_tx`, `host_if` | host link |

Top-level parameters: `N_NEURONS` (25), `N_CHIPS` (5), `CLK_HZ` (50 MHz),
`BAUD` (115200), `TICK_P/Q/PRE/POST`, `SER_HALF` (chip serial half period,
`CLK_HZ/200000`), `STIM_SCALE` (`CLK_HZ/1e6`) and `MS_DIV` (`CLK_HZ/1000`). If you change `CLK_HZ`,
change the `TICK_*` values too: each is `tau x CLK_HZ / 1024`. `param_refresh`
needs `SER_HALF > 2 + 8 x 14`.

## What follows the original system and what is this design's own

Taken from the published system:

* the split into analog neurons and an FPGA network layer
* 25 neurons on 5 chips
* the P and W matrices with 10-bit weights
* the soft-bounded STDP rule with efficacies, and its four time constants
* the exponential generator: 20 bits, a shift of n = 10, a load multiplexer
  for `f(0)`, and dt = tau/1024
* 3 topology words of 14 bits with a 100 kHz clock that stops between
  transfers
* 205 parameters of 14 bits, refreshed one per 10 us through a serial DAC
* the 30 us event period
* an RS232 link reporting time-stamped spikes and weights

This design's own choices:

* **Exponential subtrahend.** It is the register shifted right by n bits
  (`0^n & Q[2n-1:n]`), i.e. division by 1024. A diagram of the original labels
  this operand differently. The right shift is the reading that gives the
  stated division.
* **STDP engine.** The order of operations, the one-synapse-per-clock
  schedule, the fixed-point widths, merging of repeated spikes, and holding
  the weights in registers rather than external SDRAM are all this design's.
* **Full replication.** There is one exponential generator per trace. The
  original planned to share generators between traces in time slots, but gave
  no ratio.
* **Synaptic trigger.** The pulse-width coding of the weight and the
  per-neuron inhibitory flag are this design's.
* **Stimulation patterns.** The original system can apply predefined
  stimulation patterns to individual neurons but does not describe them. The
  periodic train with a period, a weight and an enable bit is this design's.
* **Chip interfaces.** The timing inside the topology word and inside the
  10 us parameter period, the meaning of RESET, CLK and ENABLE at the memory
  cells, and the DAC's SPI-like framing are all assumptions. Check them
  against the real chip and DAC before use.
* **Host link.** The whole command protocol, the baud rate, the time-stamp
  format, the FIFO depth and the reset values are this design's.
* **Clock.** The system clock is 50 MHz. The board oscillator runs at 100 MHz
  and is assumed to be halved outside this RTL.

Not included:

* the analog chips: conductances, memory cells, switch matrix, spike
  comparators and their internal control
* the DACs
* the SDRAM
* the PC software
* the planned 512-neuron multi-board extension

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. `uart_rx` and
`uart_tx` share `tb_uart`. Each testbench prints one line,
`TB_RESULT checks=N failures=M`, and stops itself with a watchdog.
`tb/serial_dac_model.sv` is a behavioural model of the serial DAC, used by
the testbenches only. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_stdp_engine rtl/neuro_pkg.sv tb/tb_stdp_engine.sv
./obj_dir/Vtb_stdp_engine
```

Two end-to-end tests drive the whole top level through its pins. They use a
bit-level RS232 host, DAC models, a model of a chip's memory-cell pointer, and
a topology receiver:

* `tb_gaillimh_fpga` runs at reduced time scales: 2 MHz clock, 250 kbaud,
  short ticks.
* `tb_gaillimh_fpga_full` runs the top at its defaults (50 MHz, 115200 baud,
  real time constants). It simulates about 25 ms of device time in a few seconds.

Both tests do the same things:

* configure synapses, bounds, parameters and topology
* check two full refresh rounds against the chip model
* check the topology words
* run a 1 ms stimulation train on neuron 4 for about 4 ms, then check that it
  stops when disabled
* make neurons fire in patterns that give LTP, LTD, excitatory and inhibitory
  triggers, then read the weights back
* fire all 25 neurons at once to check the 26.5 us STDP budget, a merged
  spike and dropped reports
* count each of these mechanisms; a mechanism that never happened fails the
  test

`tb_trace_tau` runs the trace generators at their default tick periods for
about 94 ms of device time. It checks that every trace is within 1 % of
`exp(-0.5)`, `exp(-1)` and `exp(-2)` at half, one and two time constants after
its neuron fired.

`tb_stdp_engine` compares every weight with an independent model of the rule
over random matrices, traces and spike bursts.

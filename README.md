# Rate-code PCB tester

Testing a printed circuit board for delays, crosstalk and transients normally
means driving many input nodes at once and digitising many output nodes at
once, with one fast ADC per output. This design does without the ADCs. Each
observed output node is differentiated in the analog domain, and its rate of
change is reduced by a small comparator bank to a 3-bit *approximation code*:
one sign bit plus how many discretisation steps Δ the rate spans, from 0 to 3.
All outputs are coded in parallel, once per sampling step T. The code words
are stored and shipped to a host computer. The host rebuilds each waveform by
summing its codes:

    u_j(nT) = Σ_{m=0..n} code_j(m) · Δ

The RTL here is the digital part of such a tester:

* a test signal generator that drives all stimulus nodes on the same clock edge;
* a synchronisation block that decides when the codes are captured;
* one rate encoder ("fuzzy logic unit") per observed node;
* a code store that streams the captured words to the host.

The default sizes are those of the example board: 7 stimulus nodes and
8 observed nodes.

## The approximation code

| rate of change u̇            | code {sign, rate} |
|-----------------------------|-------------------|
| 0 ≤ u̇ < Δ                   | 000               |
| Δ ≤ u̇ < 2Δ                  | 001               |
| 2Δ ≤ u̇ < 3Δ                 | 010               |
| 3Δ ≤ u̇ < 4Δ                 | 011               |
| −Δ < u̇ < 0                  | 100               |
| −2Δ < u̇ ≤ −Δ                | 101               |
| −3Δ < u̇ ≤ −2Δ               | 110               |
| −4Δ < u̇ ≤ −3Δ               | 111               |

In hardware the code comes from three amplifiers with comparators. A sign
comparator gives the first bit, and two band comparators give the rate bits.
`fuzzy_unit` is the digital model of that bank. Its input `du` is a
sign-magnitude word: the msb is the sign, and the rest is |u̇| in units of
Δ/STEP. With the defaults (4 bits, STEP = 2) the code is simply `du[3:1]`, so
`du` = 0000…1111 gives codes 000, 000, 001, 001, …, 111, 111. Rates of 4Δ or
more saturate at rate 3. The host cannot tell a saturated rate from a true 3Δ,
so its reconstruction drifts from then on. Choose Δ and the amplifier gains so
that the fastest edge stays below 4Δ per T.

A rate of exactly zero can arrive with either sign. Both 000 and 100 stand for
"less than one step", and both add nothing to the reconstruction
(`pcbt_pkg::code_to_steps`).

## Signal chain

```
 host ──pattern/config──► tsg ──u_in[N]──► board ──► d/dt + gain (analog) ──du[K]──┐
                           │ step, busy                                           ▼
                           └──────────► syn ──store──► sap ◄──codes[3K]── K × fuzzy_unit
                                                         │
 host ◄──────────── pc_data / pc_valid / pc_ready ───────┘
```

`pcb_tester_top` contains everything in this picture except the board, the
analog differentiators and amplifiers, and the host. Those connect through its
ports: `u_in` goes to the board, `du` comes from the analog front end, and the
pattern/config inputs and the `pc_*` stream go to the host.

### tsg: test signal generator
The generator holds a pattern memory of 256 words × N bits, written by the
host. Bit i of a word is the level of stimulus node i+1. A `start` pulse plays
words 0 … `cfg_len`−1. Each word is held for `cfg_period` clocks, which is one
sampling step T. All N nodes switch on the same edge. This simultaneous
stimulation is what makes the cross-coupling between conductors visible. Each
new word comes with a one-cycle `step` pulse, and `busy` covers the whole
pattern. To capture how the outputs decay after the last edge, end the pattern
with some all-zero words.

### syn: capture timing
Every `step` produces exactly one `store` strobe, `cfg_delay`+2 clocks later.
Set `cfg_delay` to the time the stimulus needs to get through the board and
the analog chain. It must be smaller than `cfg_period`. If it is not, the next
step restarts the delay, so only the last step of a frame is stored, and
`missed` counts the lost strobes. `syn` also frames an acquisition:

* `frame_start` comes with the first store of a run;
* `sample_n` numbers the stores of the run (this is the n of the
  reconstruction sum);
* `frame_end` pulses after the generator has gone idle and no store is
  pending.

### sap: code store and host stream
Each `store` writes one 3K-bit word into a 1024-word memory. For K = 8 that is
24 bits. The code of node j+1 is in bits [3j+2:3j]. Words leave in the order
they were written, on a valid/ready stream (`pc_data`, `pc_valid`,
`pc_ready`). The host may read while a frame is running. If a word arrives
while the store is full, it is dropped and the sticky `overflow` flag is set.
`clear` empties the store and clears the flag. An assertion checks the stream
rule: a word that is offered but not yet taken stays stable.

## Timing of one frame

Count cycles from the cycle in which `start` is high (cycle 0). For a pattern
of L words, period P and delay D (D < P):

* word k drives `u_in` in cycles 1+kP … (k+1)P, and `step` is high in cycle 1+kP;
* `store` for word k is high in cycle 1+kP+D+2. The word written holds the
  codes present in that cycle, which come from the `du` inputs present in it;
* `busy` falls in cycle 1+LP, and `frame_end` is high in cycle LP+3.

One frame therefore stores L words in L·P+3 cycles. The store holds 1024
words. A host that cannot keep up with one word per P clocks must read between
frames, and then at most 1024 words can be captured at a time, for example four
full 256-word patterns.

## What follows the method and what is this design's own

These parts follow the method:

* the split into generator, synchronisation, per-node rate encoders and a
  store feeding a host;
* all inputs driven simultaneously and all outputs coded in parallel;
* the 3-bit code and its bands;
* the 4-bit input model of the encoder and its mapping;
* one stored word per sampling step;
* N = 7 and K = 8.

These parts are this design's own choices:

* **Rate encoder input.** The real comparator bank works on an analog voltage.
  The RTL models it with a digital sign-magnitude word, so it can be simulated
  and placed in the top.
* **Store order.** The method calls the storage a stack. Here it is a
  first-in first-out store, because the host's sum runs forward in time.
* **Everything inside `syn`.** The method names the synchronisation block and
  its purpose, but nothing of its internals.
* **Sizes, interfaces and reset.** The pattern memory and its depth, the store
  depth, the valid/ready host stream, the overflow policy, the word layout and
  the active-low asynchronous reset are all this design's own.
* **One clock for both FPGAs.** The method puts the generator and the store in
  two FPGAs. Here they share one clock in one top.

These parts are not implemented in RTL:

* the board itself;
* the differentiators and amplifiers (analog);
* the host;
* the host's analysis: waveform reconstruction and the matrices of partial
  derivatives that relate outputs to inputs and to each other.

## Files

| file | contents |
|------|----------|
| `rtl/pcbt_pkg.sv` | sizes, `apx_code_t`, `code_to_steps` |
| `rtl/fuzzy_unit.sv` | rate encoder (combinational) |
| `rtl/tsg.sv` | test signal generator |
| `rtl/syn.sv` | capture timing and framing |
| `rtl/sap.sv` | code store and host stream |
| `rtl/pcb_tester_top.sv` | the wired system |
| `tb/tb_*.sv` | one self-checking testbench per module |

Parameters of the top, with defaults: `N`=7, `K`=8, `DU_W`=4, `STEP`=2,
`PAT_DEPTH`=256, `STACK_DEPTH`=1024 (both depths powers of two), `DIV_W`=16.

## Verification

Each testbench prints `TB_RESULT checks=… failures=…` and stops itself with a
watchdog.

* **`tb_fuzzy_unit`** sweeps every input of a default and a wider instance.
  It compares each code with a band-by-band reference, and with the
  `du[3:1]` mapping.
* **`tb_tsg`** compares `u_in`, `step` and `busy` on every cycle with a cycle
  model, for several periods and lengths. It also checks that a restart while
  busy is ignored and that an empty pattern plays nothing.
* **`tb_syn`** checks the exact cycle of every store, the sample numbering and
  the frame markers, and the count of lost stores when the delay is too long.
* **`tb_sap`** runs random traffic against a queue model, with host stalls,
  then overflow and clear.
* **`tb_pcb_tester_top`** runs the whole design at its default sizes, with a
  behavioural model of the board and the analog chain in the testbench. Each
  output follows its input on the example board's wiring, with a limited slew
  rate, and a random LSB of noise is added to each rate. The testbench checks
  every stored word, rebuilds the waveforms with the host's sum and compares
  them with the model, and checks frame lengths. It runs three phases:
  * a pulse example whose output edges have 3, 2 and 1 steps per T (codes
    011/111, 010/110, 001/101);
  * five full 256-word patterns with the host not reading, which overflows
    the store;
  * a frame with a delay longer than the period.

  It fails unless each of these happens at least once: host stalls, overflow,
  clear, lost stores, saturated codes, and all eight codes.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pcbt_pkg.sv tb/tb_pcb_tester_top.sv --top-module tb_pcb_tester_top
./obj_dir/Vtb_pcb_tester_top
```

All testbenches finish in well under a second.

Limits to keep in mind:

* The tests prove the digital behaviour against this design's own reading of
  the method. They cannot show that a real comparator bank meets the bands.
* The board model is an idealised slew-limited follower, not a transmission
  line.

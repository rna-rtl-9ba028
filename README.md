# RNA — a reconfigurable accelerator for multi-layer perceptrons

Many approximate-computing workloads (FFT, inverse kinematics, JPEG, k-means,
edge detection…) can be replaced by a small multi-layer perceptron (MLP). An
accelerator with a fixed number of neurons can either not hold a large MLP or
leaves most of its hardware idle on a small one. The RNA (reconfigurable
neural architecture) instead treats each layer as a loop nest
(`for each input i: for each neuron j: S[j] += D[i]*W[j][i]`) and reshapes
that loop, layer by layer, onto 16 processing elements (PEs):

| schedule | idea | PEs used | cycles for a layer with M inputs, N neurons |
|---|---|---|---|
| **FP** full parallelism | one neuron per PE, each PE multiplies and accumulates its own sum | N ≤ 16 | M + 1 |
| **NE** neuron extension | each input is held while the 16 PEs sweep over the neurons in groups of 16; partial sums live in memory | 16 | M·⌈N/16⌉ + 1 |
| **CE** computation extension | 8 PEs multiply 8 inputs at once, 7 PEs add them in a tree, 1 PE accumulates over groups of 8 inputs | 16 | ⌈M/8⌉·N + 4 |

A host-side scheduler picks, for each layer, the schedule with the fewest
cycles (NE or CE when N > 16, FP or CE otherwise) and turns the whole network
into a stream of **configuration words, one per clock cycle**. The hardware
is a small, fixed machine that executes that stream: it has no loop counters
and no notion of layers. All the intelligence is in the stream; the RTL's job
is to make every word take effect in a fixed, predictable cycle.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, with self-checking
testbenches for every block and an end-to-end testbench that runs six
benchmark networks.

## Block diagram

```
 host ──► CFIFO ──────────────► controller (LC → LD → CP → ST)
 host ──► DFIFO ──┐                 │ control per stage
 host ──► WFIFO0..15 ──┐            ▼
                  └────┴──► PE array (4x4) ◄──► data memory (16 banks)
                                                      │
 host ◄──────────────────────────── host read port ◄──┘
```

* `rna_fifo_interface` — one configuration FIFO (CFIFO), one data FIFO
  (DFIFO) for the network inputs, one weight FIFO (WFIFO) per PE.
* `rna_controller` — the four-stage configuration pipeline.
* `rna_pea` — the 16 PEs (`rna_pe`, each with an `rna_sigmoid`), their fixed
  links, and the operand registers of the load-data stage.
* `rna_data_mem` — 16 banks; bank *p* is written only by PE *p*, every bank
  can be read by every PE.
* `rna_top` — wires them together.

## The processing element

Each PE has a multiplier and an adder joined by two multiplexers, and a
sigmoid on its output. Two control bits C1C0 choose the function and C2 the
output type:

| C1C0 | function | result |
|---|---|---|
| 0x | multiplier | `out <= f(IN1 * IN2)` |
| 10 | adder | `out <= f(IN1 + IN2)` |
| 11 | accumulation | `out <= f(P + PS)`, `P <= IN1 * IN2` |

`f` is the identity (C2 = 0) or the sigmoid (C2 = 1). Every function has one
cycle of latency. In accumulation mode the product is registered, so in one
cycle the PE both forms product *i+1* and adds product *i* to the partial sum
`PS`. That is the two-step multiply/add pipeline of FP and NE, run by a single
PE. `PS` is selected per word: zero (start of a sum), the PE's own output (FP
keeps its running sum in the output register) or a word of the data memory (NE
and CE keep partial sums there).

Numbers are 16-bit signed fixed point with 8 fractional bits. Products are
truncated toward minus infinity, and every result saturates. The sigmoid is
piecewise linear with power-of-two slopes (`|x|<1: x/4+0.5`,
`<2.375: x/8+0.625`, `<5: x/32+0.84375`, else 1, mirrored for negative x).
Its largest error against the true logistic function is 0.0215.

## The PE array and its adder tree

The array is not a mesh. It has exactly the links that one CE kernel with
eight multipliers needs, folded so that every link joins direct or diagonal
neighbours. Each tree level therefore costs one cycle:

```
   row 0:   PE0 (x)   PE1 (+)   PE2 (+)   PE3 (x)
   row 1:   PE4 (x)   PE5 (+)   PE6 (+)   PE7 (x)
   row 2:   PE8 (x)   PE9 (+)   PE10(+)   PE11(x)
   row 3:   PE12(x)   PE13(+)   PE14(+)   PE15(x)

   level 1 (cycle +1):  PE1  = PE0  + PE4     PE2  = PE3  + PE7
                        PE13 = PE12 + PE8     PE14 = PE15 + PE11
   level 2 (cycle +2):  PE5  = PE1  + PE2     PE9  = PE13 + PE14
   level 3 (cycle +3):  PE10 = PE5  + PE9
   final   (cycle +4):  PE6  = PE10 + S[j]    (S[j] from the data memory)
```

The multipliers are PE0, 3, 4, 7, 8, 11, 12 and 15. The link table is
`neigh_a()`/`neigh_b()` in `rna_pkg`. An adder-position PE may take IN1 from
neighbour A and IN2 from neighbour B. In FP and NE, each PE ignores its links
and works alone.

## Configuration words and the four-stage pipeline

A configuration word (`rna_pkg::cfg_t`, 430 bits) describes one cycle of work
for the whole array:

* global: `valid`, `last` (end of task), the source of the broadcast data
  register (`hold`, `pop DFIFO` or `read memory bank/address`);
* per PE: function (C1C0), sigmoid (C2), IN1 source (broadcast, memory,
  neighbour A, zero), IN2 source (own WFIFO, memory, neighbour B, zero),
  partial-sum source (zero, own output, memory), one read port (any bank, any
  address) and one write (own bank, address).

The controller moves each word through four stages, one cycle each:

| stage | what happens for the word |
|---|---|
| **LC** load configuration | popped from the CFIFO |
| **LD** load data | DFIFO/WFIFO words popped, memory ports read, operands registered |
| **CP** compute | operands selected, PEs fire |
| **ST** store data | PE outputs written to their banks |

A new word enters every cycle, so configuration and memory traffic hide behind
the computation. A task of C words finishes (`done_o`) **C + 3 cycles** after
its first word leaves the CFIFO, that is, computation cycles plus the stages
minus one.

Three mechanisms keep the timing exact without help from the scheduler:

* **Stall.** If the word in LD needs a DFIFO or WFIFO word that has not yet
  arrived, the whole pipeline freezes (`stall_o`). No PE, FIFO or memory
  changes meanwhile. Freezing everything matters because a PE in accumulation
  mode would otherwise add its product twice.
* **Bubble.** An empty CFIFO feeds a word with `valid = 0`. PEs hold their
  state, so the cycle-by-cycle skew between, say, the multipliers and PE6 of a
  CE kernel is kept.
* **Bypass and forwarding.** A layer often reads a word that the previous
  layer stores one or two cycles earlier. There are two cases:
  * If the read (LD) and the store (ST) fall in the same cycle, the memory's
    write-through bypass returns the new word.
  * If the word is still being computed, that is, its producer is in CP while
    the reader is in LD, the controller flags the read. One cycle later the
    array takes the value from the producing PE's output register instead.

  Thanks to these, consecutive layers and NE/CE partial-sum chains run
  back-to-back with no idle words.

## How the schedules become words

`tb/rna_tb_pkg.sv` contains the scheduler (`rna_sched`). It is the best
reference for writing streams. In summary:

* **FP**, layer with M inputs: words 0…M. Word *c* broadcasts input *c* (from
  the DFIFO for the first layer, else from memory) and pops one weight in every
  active PE. All active PEs are in accumulation mode. PS is zero at word 1 and
  the PE's own output from word 2 on. Word M applies the sigmoid and stores
  neuron *p* into bank *p*.
* **NE**: word *c* = *i*·G + *g* (G = ⌈N/16⌉). Input *i* is broadcast at
  *g* = 0 and held for the other groups. PE *p* multiplies for neuron
  *g*·16+*p*. In the same word it adds the previous product to that neuron's
  partial sum, read from and written back to its own bank.
* **CE**: word *c* = *g*·N + *j* (group *g* of 8 inputs, neuron *j*). The
  eight multipliers read their inputs from memory and pop weights in word *c*.
  Level 1 adds in word *c*+1, level 2 in *c*+2, level 3 in *c*+3. PE6 adds the
  partial sum of neuron *j* in word *c*+4. The fields of one neuron are thus
  spread over five consecutive words, interleaved with those of the following
  neurons.

Layer outputs stay in the data memory: FP puts neuron *j* in bank *j*, NE
puts neuron *j* in bank *j* mod 16 and CE puts all neurons in bank 6.
Consecutive layers alternate between address 0 and address 32. The host
reads results through the host port.

## Measured against the published numbers

The end-to-end testbench runs the six networks with random weights. It checks
every output of the last two layers bit-exactly and checks the cycle counts:

| network | schedule | cycles (this RTL) | published |
|---|---|---|---|
| fft 1-4-4-2 | FP FP FP | 15 | 15 |
| inversek2j 2-8-2 | FP CE | 12 | 12 |
| jmeint 18-32-8-2 | NE FP CE | 79 | 79 |
| jpeg 64-16-64 | FP NE | 133 | 133 |
| kmeans 6-8-4-1 | FP CE CE | 23 | 22 |
| sobel 9-8-1 | FP CE | 18 | 18 |

`tb_rna_random` adds 120 runs on random network shapes. It covers CE layers
with several groups of eight inputs, one-neuron CE layers whose partial-sum
chain depends on forwarding, NE layers whose neuron count is not a multiple
of 16, and throttled host FIFOs. Every run checks all outputs and, when not
throttled, the cycle count.

With FP/NE only, the RTL gives 15, 15, 82, 133, 24 and 22 cycles, equal to the
published values. The one difference, kmeans, comes from the last layer (4
inputs, 1 neuron). The published cycle formula for CE, MN/m + log2 m + 1,
counts half a cycle there. Real hardware needs a whole cycle per neuron.

## Departures and own choices

Only the following come from the published design: the PE structure and its
C0/C1/C2 codes, the 4x4 array with its links, the 16 banks, the FIFO set, the
four controller stages, the three schedules with their cycle counts, and the
m = 8 / n = 16 operating point. Everything below was chosen here:

* number format, saturation, and the sigmoid approximation;
* the product register and the third partial-sum input of the PE (the
  published PE drawing shows no registers and feeds IN2 to the adder);
* the configuration word layout, the broadcast data register and the per-PE
  memory read port;
* FIFO depths (16) and bank depth (64 words);
* stall, bubbles, bypass and forwarding, and the `done` flag;
* the host read port: the published design does not say how results leave
  the accelerator;
* no bias term: every sum starts at zero. A bias can be supplied as an extra
  constant input with its own weight.

Not included: the scheduler itself, which is host software (it is in the
testbench package), and the CE-only comparison runs. With a single broadcast
DFIFO, a CE layer cannot take its eight inputs directly from the host, so CE
is only used from the second layer on.

## Files

| file | contents |
|---|---|
| `rtl/rna_pkg.sv` | widths, enums, configuration word, link table |
| `rtl/rna_sigmoid.sv`, `rtl/rna_pe.sv` | PE datapath |
| `rtl/rna_pea.sv` | PE array, LD operand registers, links, forwarding mux |
| `rtl/rna_fifo.sv`, `rtl/rna_fifo_interface.sv` | host FIFOs |
| `rtl/rna_data_mem.sv` | banked data memory with write-through bypass |
| `rtl/rna_controller.sv` | LC/LD/CP/ST pipeline, stall, forwarding detection |
| `rtl/rna_top.sv` | the accelerator |
| `tb/rna_tb_pkg.sv` | reference arithmetic and the scheduler / stream generator |
| `tb/tb_*.sv` | one self-checking testbench per block; `tb_rna_top` is end-to-end |
| `tb/tb_rna_random.sv` | 120 runs on random network shapes with all three schedule policies, throttled producers |

Each testbench prints `TB_RESULT checks=N failures=F` and stops. A watchdog
ends a hung run as a failure.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/rna_pkg.sv tb/rna_tb_pkg.sv tb/tb_rna_top.sv --top-module tb_rna_top
./obj_dir/Vtb_rna_top
```

Replace `tb_rna_top` with any other `tb_*` module to test one block. The
end-to-end run takes well under a second.

## Changing it

* FIFO depths are parameters of `rna_top`. Deeper FIFOs only reduce stalls
  when the host is bursty.
* `DATA_W`, `FRAC_W` and `BANK_AW` in `rna_pkg` set the number format and bank
  depth. The reference functions in `tb/rna_tb_pkg.sv` assume 16/8 and must
  be changed with them.
* The array size and links are tied to m = 8 multipliers. A different tree
  needs a new link table in `rna_pkg` and new level assignments in the
  scheduler.

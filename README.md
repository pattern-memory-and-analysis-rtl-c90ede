# Sonar object recogniser: a 60-neuron perceptron in SystemVerilog

A bat finds and tells apart objects by the pattern of echoes that come back
from its calls. This design does the same job for an ultrasonic sonar. Its
targets are four arrangements of upright poles: object A is one pole, B two,
C three and D four poles in a line. It also reports in which of 15 distance
zones the object stands. Each zone is about 9.4 cm deep, for about 141 cm in all.

The recogniser is a single-layer perceptron with 60 neurons, one for every
(object, zone) pair. Each neuron looks at the same 256-sample echo vector.
The neuron with the largest output "fires", and its number gives both the
object and the distance. Training happens in software on a host PC. This RTL
is the FPGA side. It holds the trained weight and bias matrices, which the
host loads one value at a time over simple host-interface "wires". It takes
one binarised echo at a time and computes all 60 neuron outputs:

    answer[n] = bias[n] + sum over j of ( x[j] ? W[n][j] : 0 ),   n = 0..59, j = 0..255

It then reports the winner, its object and its zone.

## The arithmetic: no multipliers

Two facts keep the datapath small.

* **The input is binary.** The host reduces each echo sample to 0 or 1
  before sending it. A product `W[n][j] * x[j]` is therefore either the
  weight or nothing. Each neuron is an adder that adds a weight only where
  the echo bit is 1, and then adds the bias.
* **The weights are scaled integers.** Trained weights and biases are small
  real numbers, roughly -0.6 to +1. They are multiplied by 1000 and rounded
  on the host. They travel as an unsigned magnitude plus a separate sign bit,
  because the host link carries only unsigned words. On arrival they become
  16-bit two's-complement numbers (`sign_mag_to_twos`). A magnitude too large
  for 16 bits is clipped to ±32767, and the host can see that this happened.

The accumulator is 25 bits wide (16 + log2(256) + 1). The sum of 256
full-scale weights plus a bias therefore cannot overflow. Results are exact
integers in units of 1/1000.

The software model also passes each output through tanh. That step is left
out here. tanh is monotonic, so the winning neuron is the same without it,
and the host can apply it to any output it reads back.

## Lanes and banks: how the 60 neurons run in parallel

The neurons are identical small processors doing the same sum. The engine
(`neuron_engine`) therefore has `LANES` identical lanes, each with one adder
and one accumulator. At the default `LANES = 60` every neuron has its own
lane. A full classification then takes 256 clock cycles, one echo sample per
cycle.

`LANES` may be any divisor of 60. Lane `l` then evaluates `ROWS = 60 / LANES`
neurons one after another: neurons `l*ROWS` to `l*ROWS + ROWS - 1`. With
`LANES = 1`, a single adder walks the whole matrix in 15360 cycles. With
`LANES = 4`, each lane is exactly one object's group of 15 neurons.

To give every lane a weight in every cycle, the weight matrix is split into
one RAM bank per lane. Bank `l` holds its lane's `ROWS` weight rows back to
back. All lanes use the same local address `r*256 + j` in the same cycle,
so a single address counter drives every bank. The echo bit `x[j]` comes
from a single 256x1 RAM and is shared by all lanes. The biases and the
answers are banked the same way, `ROWS` words per bank.

The host never sees the banks. It addresses the weights as one flat array
of 15360 words, neuron-major:

| host index | neuron | sample | bank | word in bank |
|---|---|---|---|---|
| weight `i` | `n = i / 256` | `j = i % 256` | `n / ROWS` | `(n % ROWS)*256 + j` |
| bias `n` | `n` | – | `n / ROWS` | `n % ROWS` |
| input `j` | – | `j` | (one shared RAM) | `j` |

`matrix_loader` does this mapping. At the defaults it is just bank = n and
word = j.

### Engine timing

The engine has a two-stage pipeline. In the issue stage, the counters drive
the RAM read addresses. One cycle later the read data arrives and each lane
adds it. At the last sample of a row, each lane adds its bias and the engine
sends all `LANES` results out in one cycle (`out_val[l]` is neuron
`l*ROWS + out_row`).

| event, counted in clock edges after the edge that samples `start` | edges |
|---|---|
| row `r` of results valid | `(r+1)*256 + 1` |
| `done` pulse (with the last row) | `ROWS*256 + 1` = 257 at the defaults |
| top-level `wo_done` set | `ROWS*256 + 2` = 258 at the defaults |

## Winner-take-all and decoding

`winner_tracker` takes each row of results as it leaves the engine. A chain
of comparators finds the best of that row, and a register keeps the best so
far. The winner is therefore ready in the cycle after the last row, with no
second pass. If two outputs are equal, the lower neuron number wins.
Neurons 0–14 belong to object A, 15–29 to B, 30–44 to C and 45–59 to D.
The decode is `object = n / 15` and `zone = n % 15`, where zone 0 is the
nearest.

At `LANES = 60` the comparator chain is 59 comparisons of 25 bits long.
That is fine at host-interface clock rates, but a faster clock would need
the chain pipelined.

## Host interface and protocol

On the board, the host PC reaches the FPGA through a vendor USB
host-interface core with "wire" endpoints. Wire-ins are registers that the
host writes. Wire-outs are values that it reads. That core is not part of
this RTL. Its wire values are the `wi_*` and `wo_*` ports of `echo_nn_top`,
and everything is synchronous to `clk`, the interface clock.

| port | dir | width | meaning |
|---|---|---|---|
| `wi_target` | in | 2 | array a value is for: 0 weight, 1 bias, 2 input |
| `wi_index` | in | 16 | flat index in that array (host loop counter) |
| `wi_mag` | in | 16 | magnitude: \|value\| x 1000, or 0/1 for an input sample |
| `wi_sign` | in | 1 | 1 = negative |
| `wi_strobe` | in | 1 | toggled once per value; each change is one transfer |
| `wi_start` | in | 1 | rising edge starts one classification |
| `wi_read_sel` | in | 6 | neuron whose output `wo_answer` shows, one clock later |
| `wo_answer` | out | 25 | that neuron's output (signed, x1000) |
| `wo_busy` | out | 1 | classification running |
| `wo_done` | out | 1 | results valid since the last start |
| `wo_winner` / `wo_object` / `wo_zone` | out | 6/2/4 | firing neuron, its object (0 = A) and zone |
| `wo_win_value` | out | 25 | the winner's output |
| `wo_writes` | out | 16 | count of accepted transfers (wraps), for checking a load |
| `wo_sat` | out | 1 | some magnitude was clipped since reset |
| `wo_dropped` | out | 1 | a transfer was ignored since the last start |

A session works like this:

1. **Load.** For each of the 15360 weights, 60 biases and 256 input samples,
   set `wi_target`, `wi_index`, `wi_mag` and `wi_sign`, then flip
   `wi_strobe`. All four may change in the same wire update as the strobe.
   The loader registers the write one clock after it sees the change. A
   transfer is ignored, and `wo_dropped` is set, in three cases: its index
   lies outside its array, it is aimed at target 3, or it arrives while a
   classification runs. Compare `wo_writes` with the number of values sent
   to confirm the load.
2. **Classify.** Raise `wi_start`. Only the rising edge counts, and a start
   while busy is ignored. `wo_busy` goes high, and `wo_done` follows 258
   clocks later.
3. **Read.** Read `wo_winner`, `wo_object`, `wo_zone` and `wo_win_value`.
   To read all 60 outputs, step `wi_read_sel` through 0..59.

For the next echo, only the 256 input samples need reloading. The weights
and biases stay in place, and any of them can be rewritten between runs.

## Source files

| file | contents |
|---|---|
| `rtl/echo_nn_pkg.sv` | sizes (4 objects, 15 zones, 256 samples, 60 lanes, 16-bit values and wires) and the target encoding |
| `rtl/echo_nn_top.sv` | top level: loader, banks, engine, answer banks, winner, status registers |
| `rtl/matrix_loader.sv` | wire transfers to array writes, flat index to (bank, word) |
| `rtl/sign_mag_to_twos.sv` | magnitude + sign to two's complement, with clipping |
| `rtl/matrix_ram.sv` | one-dimensional array: one write port, one synchronous read port |
| `rtl/neuron_engine.sv` | the lanes: conditional accumulate, bias, result rows |
| `rtl/winner_tracker.sv` | running maximum and object/zone decode |

Storage at the defaults is 245,760 weight bits, 960 bias bits, 256 input
bits and 1,500 answer bits. There are about 3,150 flip-flops, mostly the 60
accumulators and result registers. Each weight bank is 256 x 16, which fits
a small block RAM or distributed RAM.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the
module with an integer model written in the testbench, counts its checks
and ends with a `TB_RESULT checks=N failures=M` line. Each also has a
watchdog.

| testbench | what it shows |
|---|---|
| `tb_sign_mag_to_twos` | corner and 2,500 random magnitudes, both signs, clipping |
| `tb_matrix_ram` | random writes and reads, one-cycle read latency, read-before-write |
| `tb_matrix_loader` | 4 neurons x 8 samples in 2 lanes: write strobes, bank/word mapping, input bits, ignored transfers, clipping |
| `tb_neuron_engine` | 6 neurons x 12 samples in 3 lanes: every output, row order, per-row and `done` latency, `start` ignored while busy |
| `tb_winner_tracker` | 200 rounds of 60 values in 4 lanes, with ties, gaps and `clear` |
| `tb_echo_nn_top` | the full-size top through its ports: loads all 15360 weights, four classifications with readback of all 60 outputs, 258-clock latency, each object winning once, clipping, both ways a transfer is ignored |
| `tb_echo_workload` | full size: a synthetic problem shaped like trained weights (each object/zone echo is a block of 1s whose width grows with the pole count and whose position grows with distance). All 60 clean echoes must be recognised as their own neuron, and 40 noisy echoes are checked against the model. A 4-lane copy of the top shares the wires and must agree on every output, at 3842 clocks instead of 258. Also a two-neuron, one-lane instance with two weight rows and a known input vector. |

The RTL also carries a few concurrent assertions that the simulator checks
with `--assert`: at most one array written per transfer, and none for an
ignored one; `done` only together with the last result row; `wo_done` never
while busy.

Every testbench runs in about a second or less. To run one with plain
Verilator, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/echo_nn_pkg.sv tb/tb_echo_nn_top.sv --top-module tb_echo_nn_top
    ./obj_dir/Vtb_echo_nn_top

Swap in any other testbench name. Under `verilator --lint-only -Wall` the
only warnings are harmless ones: unused package constants, unused upper
bits of 32-bit index arithmetic, the reset also being used in the
assertions' `disable iff`, and the winner tracker's unused `have_win`
output.

No recorded sonar data or trained weights come with this design. The
synthetic workload shows that the hardware computes the perceptron exactly
and picks the right neuron. The recognition accuracy on real echoes (about
75% in the original software tests) depends on the training and cannot be
checked here.

## Where this design departs from, or adds to, the original work

Taken from the original description:

* the network size (60 neurons in four groups of 15, 256 samples)
* the binary input, where weights are added only where a sample is 1, and then the bias
* the x1000 integer scaling
* the sign-and-magnitude transfer with conversion to two's complement
* one-dimensional arrays filled at the index that the host's loop counter sends
* the highest output wins and names the object
* the aim of evaluating the neurons as parallel small processors

Choices made here, where the original says nothing:

* 16-bit values and wires, a 25-bit accumulator, and clipping of
  oversized magnitudes.
* Toggle signalling for "value ready", and a rising edge on a start wire.
* Row-major order of the flat weight index.
* The lane/bank organisation, synchronous-read RAMs, and one weight per lane
  per clock.
* Status outputs: busy, done, write count, clipped, dropped. The select
  wire for reading back any neuron's output.
* The tie rule (lower neuron wins), and the asynchronous active-low reset.
  Array contents are not reset.
* One loader with three targets. The original used a separate process per
  matrix; the function is the same.

Not included:

* The vendor host-interface core and wire endpoints.
* The host software: sonar triggering and acquisition, normalisation,
  perceptron training (`W_new = W_old + gamma*X`), and tanh.
* The sonar itself.
* An earlier transfer scheme with 4-bit binary fractions, sent over several
  wires and stored in two-dimensional arrays. It was dropped in the original
  work in favour of the x1000 integers, and it is not built here.

The original implementation could not fit the full 60 x 256 matrix on its
device. It demonstrated the computation with two weight rows only. This RTL
is written at full size. Its storage needs are in the table above, and
fitting it onto a particular FPGA was not attempted here. Fewer lanes trade
time for area without changing the results. Fewer neurons or samples
(`OBJECTS`, `ZONES` and `SAMPLES` on the top) shrink the storage.

## Changing the design

The top's parameters are `OBJECTS` (4), `ZONES` (15), `SAMPLES` (256),
`LANES` (60) and `VAL_WIDTH` (16). `LANES` must divide `OBJECTS*ZONES`; the engine
raises an elaboration-time `$error` otherwise. The accumulator width
follows from `VAL_WIDTH` and `SAMPLES`. The port widths of `wi_read_sel`,
`wo_winner`, `wo_object` and `wo_zone` follow from the sizes. The host wire
width (16) is `WIRE_W` in the package. It limits the flat index to 65,535,
so `OBJECTS*ZONES*SAMPLES` must stay below that.

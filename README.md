# Scheduled host interface for an FPGA processor array

A processor array on an FPGA (a linear or 2-D grid of identical processing
elements running a statically scheduled loop nest) takes in data only at its
border processing elements (BPEs). Each BPE reads each of its inputs once per
*iteration period* of P clock steps. If the reads of all BPEs bunch up in a
few steps, the interface has to deliver many words at once there. Here the
reads are spread out instead, so one narrow dual-port RAM port can feed every
BPE. The narrowest possible port carries

    b = ceil(K * B / P)  words per clock        (K inputs per BPE, B BPEs)

and a few shared buffer registers hold each word from the step it leaves the
RAM until the step its BPE reads it. The load times and the register sharing
are worked out while the design elaborates, from two lists: when each BPE
starts (`TAU`) and at which step of its period it reads each input (`OMEGA`).

The interface handles four kinds of array port:

| port kind  | what it carries                                    | structure       |
|------------|----------------------------------------------------|-----------------|
| constant   | set once per computation (filter coefficients)     | registers       |
| cyclic     | a sequence known in advance, replayed each period  | feedback FIFOs  |
| random     | fresh words from the host every iteration period   | DPRAM + buffers |
| stream     | fresh words from a sensor or to a sink each period | FIFOs           |

## Files

| file | module | role |
|------|--------|------|
| `rtl/ifs_pkg.sv` | package | schedule synthesis (constant function), types |
| `rtl/array_interface.sv` | top | all port kinds around one time base |
| `rtl/rand_in_if.sv` | | random inputs: DPRAM, controller, buffers |
| `rtl/rand_in_ctrl.sv` | | step counter, DPRAM read address, buffer strobes, frame handshake, stall |
| `rtl/rand_in_buffers.sv` | | shared buffer registers and latch taps |
| `rtl/dpram.sv` | | dual-port RAM, different write/read widths |
| `rtl/const_cyc_if.sv` | | constant registers + cyclic FIFOs |
| `rtl/cc_addr_decoder.sv` | | address or counter to load strobes |
| `rtl/cyc_fifo.sv` | | feedback FIFO |
| `rtl/stream_fifo.sv` | | stream FIFO |

Each `tb/tb_<module>.sv` is a self-checking testbench for that module.
`tb/tb_array_interface.sv` runs the whole design at its default parameters.
`tb/tb_rand_in_configs.sv` runs the random-input interface in six other
array shapes through `tb/rand_in_harness.sv`:

* read widths b = 1, 2 and 3;
* every input of every BPE read in the same step;
* reads that run into the next period;
* three DPRAM frames and a 3-word host port;
* 64 BPE inputs with P = 100.

The harness places the words by the elaborated schedule. It checks each word
at the step its BPE reads it. It also checks the schedule's promises: at
most b loads per step, and no two words on one register at once.

## The random-input schedule

Terms:

* **line** `l = i*K + j`: input `a_j` of BPE `p_i`. The top's `arr_rand[l]`
  drives it.
* **read step** `wt(l) = (OMEGA[j] + TAU[i]) mod P`. This is the step, counted
  in the period of BPE `p0`, at which the line is read.
* **load step** `ts(l)`: the step in which the line's word is on the DPRAM
  output latch and is copied into its buffer register.

`ifs_pkg::compute_schedule()` builds the schedule in five steps:

1. **Read steps.** Compute `wt(l)` for every line, and `b`.
2. **Tagging.** `b` lines that are read in the same step need no register.
   They are wired straight to a DPRAM lane, and the RAM's output latch is
   their buffer. The step chosen is the one of the lowest-numbered line whose
   step has at least `b` reads. Every other line needs its word one step
   before the read, so its latest load step is `wt(l) - 1`.
3. **Peak removal.** Steps are visited from `P-1` down to 0. While a step has
   more than `b` loads, the first untagged line in it moves to the nearest
   earlier step that has fewer than `b` loads. "Earlier" wraps around: such
   a load then happens in the previous period. Afterwards no step has more
   than `b` loads.
4. **Register sharing.** An untagged line holds its register from `ts(l)`
   to `wt(l)`, both steps included, wrapping around. The lines are taken in
   order. Each one goes onto the first register whose held steps do not
   overlap its own, and a new register is opened if none fits.
5. **Lanes and skew.** Lines loaded in the same step take lanes 0, 1, … in
   line order. `skew(l)` says how many frames ahead of its iteration the
   line's word must be written (see below).

At run time `rand_in_ctrl` is only a step counter plus a decoder of this
table. In step `t` it reads DPRAM row `frame*P + t+1`, so that row is on the
latch during step `t+1`. It also strobes every register whose line has
`ts == t`.

### The default configuration

The defaults are P = 10 and three BPEs starting at steps 0, 4 and 8. Each
BPE has inputs A, B, C, read at steps 4, 0 and 0 of its period. That makes
9 reads per period, so `b = 1`. Without the schedule, 3 words are needed in
steps 0/4/8. The elaborated schedule is:

| line | BPE, input | read step wt | load step ts | buffer | skew |
|-----:|-----------:|-------------:|-------------:|:-------|-----:|
| 0 | p0 A | 4 | 4 | DPRAM latch (tagged) | 1 |
| 1 | p0 B | 0 | 8 | register 0 | 0 |
| 2 | p0 C | 0 | 9 | register 1 | 0 |
| 3 | p1 A | 8 | 6 | register 1 | 1 |
| 4 | p1 B | 4 | 2 | register 0 | 1 |
| 5 | p1 C | 4 | 3 | register 1 | 1 |
| 6 | p2 A | 2 (12 mod 10) | 1 | register 1 | 2 |
| 7 | p2 B | 8 | 5 | register 2 | 1 |
| 8 | p2 C | 8 | 7 | register 3 | 1 |

In total: one RAM word per step in 9 of the 10 steps, and four registers
instead of eight. Register 1 serves four BPE inputs in turn.

## Feeding the random inputs

The DPRAM holds `NF` frames (default 2). A frame has `P` rows of `b` words,
one row per step. The host works like this:

1. Wait for `hr_ready`, which says a frame is free. `hr_wr_slot` names it.
2. Write the words into that frame through the `HW`-word wide port
   (default 2 words). `hr_wmask` enables single words.
3. Pulse `hr_commit`.

The word that line `l` reads in its iteration `n` belongs at

    word address = ((n + skew(l)) mod NF) * P*b + ts(l)*b + lane(l)
    host address = word address / HW,   mask bit = word address mod HW

This means frame `h` holds the words of iteration `h - skew(l)` for each
line. Some words must be loaded in the period before their read. For that
reason the first frame is a **prologue**: the controller reads it while the
array is still held (`arr_en` low), and the array's step 0 is the first step
of the second frame. Words a frame holds for iterations below 0 are never
read.

Line `l` of iteration `n` is read in array step `n*P + TAU[i] + OMEGA[j]`.
Array steps count the clocks in which `arr_en` is high. `arr_step` is that
count modulo P.

## Time base and stalls

`rand_in_ctrl` owns the time base. The array uses `arr_en` as its clock
enable. Everything the schedule relies on freezes while `arr_en` is low: the
step counter, the DPRAM latch, the buffer registers and the array. The
schedule then simply runs stretched out. A stall happens only at the end of
a period, in step `P-1`, and only for one of these reasons:

* the next frame has not been committed;
* a stream input FIFO is empty;
* a stream output FIFO is full.

Once per period, at the boundary:

* the cyclic FIFOs rotate (`arr_period_end`);
* each stream output FIFO takes the word on `arr_sout`;
* each stream input FIFO hands its next word to `arr_sin`, which holds it
  for the whole period.

Words are therefore numbered by period: during array period `n`, `arr_cyc`
shows word `n mod CYC_DEPTH` and `arr_sin` shows stream word `n`. `go` low
holds everything.

## Constant and cyclic inputs

`const_cyc_if` loads `NC` registers and `NY` FIFOs of `CYC_DEPTH` words
before the computation starts, one word per write. There are two ways to
address them:

* **address mode**: address `i < NC` loads register `i`, and address
  `NC + y` pushes a word into FIFO `y`;
* **counter mode** (`hc_cnt_mode`), for a host output channel: the address
  is ignored. An internal counter walks through register 0..NC-1, then
  `CYC_DEPTH` words for each FIFO in turn. `hc_cnt_clr` restarts it, and
  `hc_ld_cnt` shows its position.

Each FIFO is a shift chain with a multiplexer in front, which takes either
the host word or the chain's own output. The first word loaded is the first
one the array sees.

## Parameters (top)

| parameter | default | meaning |
|-----------|---------|---------|
| `W` | 16 | word width (all array inputs alike) |
| `HW` | 2 | host DPRAM port width, words |
| `P` | 10 | iteration period |
| `B`, `K` | 3, 3 | BPEs, inputs per BPE |
| `OMEGA` | `{8'd0, 8'd0, 8'd4}` | read step of input `a_j`, packed, `[j]` = element j |
| `TAU` | `{8'd8, 8'd4, 8'd0}` | start step of BPE `p_i` |
| `NF` | 2 | DPRAM frames |
| `NC`, `NY`, `CYC_DEPTH` | 2, 2, 5 | constant registers, cyclic FIFOs, FIFO depth |
| `CAW` | 4 | address width of the constant/cyclic bus |
| `NSI`, `NSO`, `S_DEPTH` | 1, 1, 16 | stream inputs, outputs, FIFO depth |

The schedule function has these limits (`ifs_pkg`):

* at most 64 lines and a period of at most 128;
* 8-bit values;
* every `TAU` and `OMEGA` below `P`, so all BPEs start within one period;
* `NF*P*b` must be a multiple of `HW`.

## How far to trust it; departures

* The schedule method is followed closely: minimum bus width, one tagged
  group on the RAM latch, one-step rotation of all other lines, peak removal
  and interval-based register sharing. For the default configuration the
  load steps in the table above were checked by hand against the method.
* Choices this design makes where the method leaves room:
  * which step is tagged;
  * where the search for a free step restarts;
  * that an interval includes both its end points;
  * the lane order.
* One deliberate fix to the method: when a register is shared, each new
  interval is checked against **all** intervals already on that register.
  Checking only against the first one could put two overlapping words on
  the same register.
* Entirely this design's own: the frame layout of the DPRAM, the host
  handshake, the prologue frame, the stall mechanism, the once-per-period
  stream timing, the widths (16-bit words, 2-word host port) and the FIFO
  depths other than 5.
* Not provided:
  * the interface for random-type **outputs** (array to host): its output
    schedule is not defined;
  * the processor array itself, the host and the LVDS pads. Their
    connections are top-level ports.
* Area was not optimised: the DPRAM keeps one row per step even for steps
  that load nothing, and the FIFOs are flip-flops, not LUT RAM or block RAM.

## Simulating

With Verilator 5, from the repository root, for example:

    verilator --binary --timing --assert -Irtl -y rtl rtl/ifs_pkg.sv \
        tb/tb_array_interface.sv --top-module tb_array_interface -o sim
    ./obj_dir/sim

`tb_rand_in_configs` also needs `-y tb`, for its harness.

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. The
end-to-end test plays host, sensor, sink and array, and checks every word at
its step. It forces each of these at least once: a stall for a missing
frame, for an empty stream input and for a full stream output; the host
being held off; a read from the latch; a read from a shared register; a
wrap of the cyclic FIFOs; loading in counter mode. It runs at the defaults,
45 iterations, in well under a second.

`rand_in_harness` shows, in a few lines, how a host computes word
addresses from the schedule.

To change the array, set `P`, `B`, `K`, `OMEGA` and `TAU` on
`array_interface`. The bus width, registers and strobes follow
automatically. The host still has to place its words by the `ts`, `lane` and
`skew` of the new schedule: read them from `ifs_pkg::compute_schedule()`,
for instance in a testbench.

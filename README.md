# A near-data processor beside a microcontroller's L2 memory

Small microcontrollers spend most of the energy of data-intensive work (CNN
layers, K-means) moving operands between memory and the core. This design puts
a small coarse-grained reconfigurable array next to the 512 KB L2 memory, and
arranges the memory so that the array reads one word from each of 16 memory
cuts in every cycle. The microcontroller (MCU) writes operands and a
512-bit *context* (the configuration) into the L2 and raises `ndp_en`. The
near-data processing unit (NDPU) then runs the whole layer or kernel on its own,
at one multiply-accumulate beat per processing element (PE) per cycle, writes the
results back into the same L2, and pulses `ndp_done`.

The array has 16 8-bit PEs, paired into 8 dual PE units (DPEUs). A DPEU can
also work as one 16x8-bit MAC, or as a 2-D squared-distance unit. Three address
generators sequence the three kinds of work: convolution with optional max-pooling,
fully connected layers, and a general-purpose (GP) mode for element-wise and
distance work. PEs can pass input pixels to their neighbours in a systolic way,
so one memory read serves several output channels.

## 1. The memory and its two views

The L2 has four memories, `MEM0`..`MEM3`. Each is 16 cuts of 2048 x 32 bit
(`sram_cut`), so 4 x 16 x 8 KB = 512 KB.

* **MCU view** (`l2_sram`, `mcu_*` ports): one 32-bit memory with byte enables,
  one access per cycle, and read data one cycle later with `mcu_rvalid`. The word
  address is `{memory[16:15], row[14:4], cut[3:0]}`, so 16 consecutive words
  form one 512-bit row across the 16 cuts. While the NDP runs
  (`ndp_busy`), MCU requests are not granted (`mcu_gnt = 0`) and must be held.
* **NDPU view**: each memory is one 512-bit single-port memory. In every cycle
  each memory can read or write one row, and cut `k` is *lane* `k`, the lane
  that feeds PE `k`. Writes have a per-lane enable.

A crossbar (`crossbar`) connects the four memories to the four NDPU ports:
InputA, InputB, Psum (partial sums and biases, read) and Result (written). The
context chooses one memory per port, and two ports must not share a memory.
If they do, `evt_conflict` is raised and an assertion fires. Data placement is the
MCU's job. For example, an ifmap goes to the memory of port A, with the same
image or a different image in every lane. The weights of output channel `k` go to
lane `k` of the memory of port B, and biases go to Psum.

### Element packing

Each lane word holds four 8-bit or two 16-bit elements. The address generators
count *elements*. The controller turns an element offset into
`row = start + offset/4` (8-bit) or `start + offset/2` (16-bit), and the
low bits select the byte or halfword. Psum offsets count whole rows, and one
32-bit partial sum sits in each lane. Result rows are written to the Result
memory, starting at `addr_psum_start`, one row for each group of results that
finish together.

## 2. The context row

The context is row `CFG_ROW` (default 0) of `MEM3`. The controller reads it in
its one-cycle CONFIG state. Its layout is `ndp_pkg::ctx_t`. Bit 0 is the
LSB of lane 0's word, and the fields are listed from the least significant:

| field | bits | meaning |
|---|---|---|
| mode | 2 | 0 CONV, 1 CONV_POOL, 2 FC, 3 GP |
| sys_en | 1 | systolic (1) or independent (0) operand flow |
| pe_en | 16 | per-PE enable: it gates the PE's clock |
| assoc | 3 | log2 of the set size (1,2,4,8,16 units per set) |
| xbar_config | 8 | {Result, Psum, B, A} memory numbers, 2 bits each |
| addr_a_start, addr_b_start, addr_psum_start | 11 each | first row of each operand; results start at addr_psum_start in the Result memory |
| data_width | 1 | 0: 8-bit PEs; 1: 16-bit DPEUs |
| datapath | 2 | 0 MAC, 1 MUL, 2 ALU, 3 SED |
| opcode | 4 | ALU op: ADD SUB AND OR XOR MAX MIN NOT SHL SHR |
| shift_param | 5 | arithmetic right shift of results (fixed point) |
| chi, cho, row_size, column_size | 8 each | CONV: in/out channels, ifmap rows and columns |
| kernel_size, stride, relu_en | 4, 3, 1 | CONV: square kernel, stride, ReLU on results |
| pool_row_size, pool_col_size, pool_kernel, pool_stride | 8, 8, 4, 3 | CONV_POOL: conv output size, pooling window and step |
| in_len, out_len | 12 each | FC: input and output vector lengths |
| loop_a, loop_b, len_a, len_b | 12 each | GP: stream A/B advance every loop cycles, wrap after len elements |

Every count field stores *value − 1*. This is what lets kernel 1–16, stride 1–8,
channels 1–256 and vector lengths 1–4096 fit the widths. The rest of the row is
unused.

## 3. Control: IDLE, CONFIG, EXE, DRAIN

`controller` holds the FSM, the context buffer (`context_buffer`, which stores the
row and decodes it) and the three address generators.

* **IDLE**: the MCU owns the L2. A one-cycle `ndp_en` pulse starts an operation.
* **CONFIG** (1 cycle): the context row is read from MEM3.
* **EXE**: the context buffer loads the row, and the generator for the mode runs.
  It issues one *beat* per cycle: A and B element offsets, a Psum row offset and
  flags (`first`/`last` of an accumulation, `pool_first`/`pool_last` of a
  pooling window). The controller sends row requests to the crossbar in the same
  cycle, and the flags follow one cycle later, together with the read data.
* **DRAIN** (`DRAIN_CYC` = 44 cycles): waits until the last results have been
  written. Then `ndp_done` pulses and the FSM returns to IDLE.

An operation therefore takes `beats + 49` cycles from the `ndp_en` pulse to the
`ndp_done` pulse: 3 for CONFIG and the context load, 45 for DRAIN and 1 for done.
The end-to-end testbench checks this exact count for every run.

### Address generators

* **`agu_conv_pool`**: loops over pooling windows, then the output pixels of the
  window, then kernel rows, kernel columns and input channels. The ifmap is stored
  pixel by pixel with the channels innermost. The element read is
  `((orow*S + ii)*W + ocol*S + jj)*Cin + kk`, and the kernel element is
  `kbase + (ii*K + jj)*Cin + kk`. After all windows, a new *pass* starts for the
  next group of output channels: the bias row advances by 1 and `kbase` by K·K·Cin.
  There are `ceil(Cout / set size)` passes. CONV mode is the same loop with a
  1x1 window.
* **`agu_fc`**: the inner loop covers the `in_len` inputs. The outer loop runs
  `ceil(out_len / set size)` passes, because every member of a set computes its
  own output neuron from its own weight lane.
* **`agu_gp`**: two independent streams. A moves to its next element every
  `loop_a` cycles and wraps after `len_a` elements; B does the same with
  `loop_b` and `len_b`. Every beat is a complete operation. For example, 128 points
  per lane against 4 centroids use `loop_a=1, len_a=128, loop_b=128, len_b=4`.

## 4. The NDPU datapath

`ndpu` = `input_buffer` → `pe_array` (8 × `dpeu`, each 2 × `pe`) →
`relu_pool` → `output_buffer`.

### Sets and systolic flow (the part to understand first)

A *unit* is a PE in 8-bit mode, or a DPEU in 16-bit mode. Units are grouped into
sets of `2^assoc` members. A set is a group of units that share one input stream:

* `sys_en = 0` (**independent**): every unit takes A from its own lane. This is
  used for GP work, or for convolutions that give each lane its own image.
* `sys_en = 1` (**systolic**): the A element of the set's first member (the
  leader, its lowest lane) is passed from member to member, one hop per cycle.
  Member `j` gets it `j` cycles after the leader. Its own B (its weights), Psum
  and flags are delayed by the same `j` cycles. Every member therefore computes a
  different output channel or neuron from the same input pixels, at a small
  cost: the leader's memory word, one register per hop, and no extra read.
  Several sets side by side process several images at once: each set takes A
  from its own leader's lane.

The results of a set come out skewed by one cycle per member. `output_buffer`
delays member `j` by `set−1−j` cycles, so one aligned group is written as one
512-bit row (with per-lane write enables) at `addr_psum_start + n`.

### PE

`pe` is an 8-bit PE with two pipeline stages.

* **Stage 1** registers three things: the multiplier output (32-bit register),
  the 8-bit ALU result, and the partial sum that arrives with the first beat.
* **Stage 2** adds the stage-1 value to the 32-bit accumulator, or to the partial
  sum on a first beat. On the last beat it shifts the sum right by `shift_param`
  (arithmetic) and registers it as the result.

Datapath patterns:

* MAC: accumulate `a*b` onto Psum.
* MUL.
* ALU: one of ten 8-bit ops, with signed or unsigned reading.
* SED: accumulate `(a−b)²`, using the same multiplier.

### Two-level clock gating

The gating uses a latch-based cell (`clock_gate`: a latch transparent while the
clock is low, then an AND).

1. `pe_en[k]` gates the clock of the whole PE. A disabled PE does not toggle
   at all.
2. In MAC mode, a zero detector on `a` and `b` gates the clock of the multiplier
   register. Stage 2 then adds 0, so the sum stays exact. `evt_zero_skip[k]` shows
   each gated beat. Sparse, ReLU-produced activations make this frequent.

### DPEU and 16-bit precision

In 16-bit mode (`data_width = 1`) a DPEU computes a 16-bit × 8-bit MAC:
`Σ A·B = 2⁸·Σ A_hi·B + Σ A_lo·B`.

* PE0 takes the signed upper byte and shifts its sum left by 8.
* PE1 takes the unsigned lower byte and the partial sum.
* The DPEU's adder joins the two sums, and `shift_param` is applied after the
  adder.

In SED mode the two PEs each take one 8-bit feature of a 16-bit point, and the
adder gives the 2-D squared Euclidean distance (K-means). ALU ops work byte-wise
on the two halves. 16-bit results appear on the even lane (`2k`) of each DPEU.

### ReLU and max-pool

`relu_pool` keeps one maximum register per lane.

* A result flagged `pool_first` replaces the register.
* Later results replace it only if they are larger (`evt_pool_update`).
* On `pool_last` the maximum is released, one cycle later.
* With `relu_en`, negative values are clamped to 0 (`evt_relu_clamp`).

In CONV mode every result is its own window.

## 5. Timing

* One beat per PE per cycle. A result needs as many beats as its accumulation
  length (K·K·Cin for a convolution pixel, `in_len` for a neuron, 1 for GP).
* Latency from the row data of a last beat to the Result write request:
  1 (input buffer) + 3 (PE stages and DPEU register) + 1 (ReLU/pool) +
  (set − 1) (de-skew) + 1 (write register) cycles.
* At the 167 MHz of the reference implementation, the beat counts give these
  times for LeNet-5:
  * CONV1: 58,800 beats, 352 µs.
  * CONV2 (16-bit): 30,000 beats, 180 µs.
  * FC1: 6,000 beats, 36 µs.
  * FC2: 1,320 beats.
  * FC3: 168 beats.

  K-means (1,024 2-D points, 8 centroids, 8 DPEUs) takes 1,024 beats, 6.1 µs.
  All of these fit the 2048-row lanes at the default size.

## 6. Where this RTL departs from, or fills in, its specification

* The context bit layout, the field encodings (count − 1), the opcode list, and
  the xbar and shift widths are this design's own.
* The start/finish handshake (`ndp_en` pulse, `ndp_busy`, `ndp_done`), the DRAIN
  state, the MCU address interleaving, and the MCU grant are this design's own.
* The FC loop advances the weight base by `in_len` per pass. The published pseudo
  code sets it to the last weight address instead, which would reuse one weight.
* CONV_POOL computes the ifmap row as `(pool_row + i)·stride + ii`. This equals
  the published formula at stride 1 and stays correct at larger strides. Channel
  passes also advance the kernel base.
* GP counters wrap around at `len` (the published pseudo code leaves this open).
* The ReLU/max-pool registers sit at the end of the NDPU datapath rather than
  inside the controller. They do the same work.
* In 16-bit mode the right shift is applied once, after the DPEU adder, rather
  than in each PE. Operand signedness (A upper byte signed, lower byte unsigned,
  B signed; SED features unsigned) is this design's choice.
* Points have two dimensions only: SED in a DPEU covers exactly two 8-bit
  features.
* The microcontroller itself and the chip pads are not part of the RTL. The
  top-level testbench plays the MCU through the `mcu_*` port.
* The SRAM cuts are written as inferred memories, not as foundry macros.

## 7. Files

| file | role |
|---|---|
| `rtl/ndp_pkg.sv` | constants, enums, context struct, beat and lane structs |
| `rtl/ndp_top.sv` | top: L2, crossbar, controller, NDPU; MCU port and event outputs |
| `rtl/l2_sram.sv`, `rtl/sram_cut.sv` | memory |
| `rtl/crossbar.sv` | port-to-memory routing |
| `rtl/controller.sv`, `rtl/context_buffer.sv` | FSM, context |
| `rtl/agu_conv_pool.sv`, `rtl/agu_fc.sv`, `rtl/agu_gp.sv` | address generators |
| `rtl/ndpu.sv`, `rtl/input_buffer.sv`, `rtl/pe_array.sv`, `rtl/dpeu.sv`, `rtl/pe.sv`, `rtl/clock_gate.sv`, `rtl/relu_pool.sv`, `rtl/output_buffer.sv` | datapath |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

`tb/tb_ndp_top.sv` runs the top at its default size, playing the MCU. It runs
FC (16-bit, systolic, two passes), CONV_POOL (8-bit, ReLU, 2x2 pooling, four sets
on four images), CONV with stride 2 (independent PEs), K-means distances
(16-bit SED), and an element-wise XOR. Every result is compared with a model in
the testbench, and every run's cycle count is checked. The testbench counts each
mechanism: systolic and independent flow, both widths, zero gating, ReLU, pooling,
MCU hold-off and all four modes. Any mechanism that never happens counts as a
failure.

`tb/tb_workloads.sv` runs the evaluated workloads at their real sizes with
random data:
* LeNet-5 CONV1 (two images, 12 PEs), CONV2 (16-bit) and FC1–FC3 (16-bit);
* the K-means distance step for 1,024 2-D points and 8 centroids.

It checks every output and checks that each run's cycle count equals the beat
counts given in section 5.

## 8. Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl rtl/ndp_pkg.sv tb/tb_ndp_top.sv --top-module tb_ndp_top
./obj_dir/Vtb_ndp_top
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`, and has a
watchdog that counts a failure if the simulation hangs. To test a single module,
replace the testbench and the top-module name, e.g. `tb/tb_pe.sv` and `tb_pe`.
`l2_sram` and `ndp_top` take a `DEPTH` parameter (rows per cut, default 2048)
for smaller memories.

## 9. Limits

* Only one row per memory per cycle. All three read ports must therefore sit in
  different memories, which the MCU must arrange.
* Results are written in the order they finish, one row per aligned group. The
  MCU has to know the order to read them: in pass order, then in window or pixel
  order.
* The design does no bounds checking of addresses. Rows wrap at 2048.
* Registers behind the gated clocks have asynchronous resets. In simulation,
  start `rst_n` high and then pull it low. A reset that is low from time 0 gives
  no falling edge, and a PE whose clock is gated off then never resets. The
  testbenches do this.
* Clock gating uses a behavioural latch. A real flow would swap in the library's
  integrated clock-gating cell.

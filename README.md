# Face recognition classifier on a coarse-grained reconfigurable array

This design recognises faces with a small neural network. The network runs on
a coarse-grained reconfigurable array (CGRA) rather than on fixed datapath
logic. A face image is first reduced to 30 features by principal component
analysis (PCA) in software. A 30-120-3 multilayer perceptron then classifies
those features. It has one hidden layer of 120 sigmoid neurons and three
sigmoid outputs, one per known person. The outputs are compared with two
thresholds, and the result names one of the three people or "stranger".

The array is an 8x8 grid of 16-bit reconfigurable cells (RCs). Each row of
cells is one pipeline stage. A *context* says what every cell computes, where
its operands come from and how the loop around the array runs. Loading a
different context changes the circuit. The same array therefore computes the
dot products of both layers and the sigmoid, in four contexts. The host
processor moves each layer's results into the next layer's inputs.

The RTL covers:

- the complete array core (`musra`), with its FIFOs, register file,
  memories, DMA engines, context parser and host interface;
- the decision stage;
- the top that joins the two (`face_recog_top`).

The host CPU, the system bus and the PCA step are not hardware here. The
testbench plays their part.

## Top level and host bus

`face_recog_top` = `musra` + `decision_unit`.

The host reaches the core through a simple word bus. There is one access per
clock. A write takes effect at the clock edge. A read returns `bus_rdata_o`
with `bus_rvalid_o` one clock later.

| word address      | register |
|-------------------|----------|
| `0x0000`          | CTRL: write bit 0 = start, bit 1 = preload (with bit 0 clear), bits 10:8 = context number |
| `0x0001`          | STATUS: bit 0 busy, bit 1 done; write bit 1 = 1 to clear done |
| `0x0100 + i`      | GRF register i (16 bits, read/write) |
| `0x1000 + 128c + w` | word w of context c (write) |
| `0x8000 + 16r + k` | data memory row r, 32-bit word k (lanes 2k and 2k+1; read/write) |

- `irq_o` is the done flag. It rises when a context has written its last
  result row and stays high until cleared through STATUS.
- `finish_o` pulses for one clock at the same moment.
- `ann_out_o[0..2]` carries the network outputs, Q6.10, and `decision_o`
  carries the decision. Both are updated (`decision_valid_o`) whenever a
  context with the *decide* flag writes a result row.

Decision rule, with outputs in Q6.10 (1.0 = 1024):

| condition | `decision_o` |
|-----------|--------------|
| out[2] > 921, out[1] < 102, out[0] < 102 | `100` first person |
| out[1] > 921, out[2] < 102, out[0] < 102 | `010` second person |
| out[0] > 921, out[2] < 102, out[1] < 102 | `001` third person |
| anything else | `000` stranger |

921 and 102 are 0.9 and 0.1 in Q6.10 (parameters `HI` and `LO`). Bit k of the
decision is set by output k.

## Numbers

- Every value is a 16-bit two's-complement fixed-point number with 10
  fraction bits (Q6.10). The range is -32.0 to +31.999.
- Additions wrap at 16 bits.
- A multiply forms the 32-bit product, shifts it right arithmetically by the
  cell's configured shift (10 for a Q6.10 product), and keeps the low 16
  bits. This truncates; there is no rounding or saturation.
- The testbench reference model (`ann_map_pkg::qmul`) repeats this exactly,
  so results are checked bit for bit.

## The array core (`musra`)

```
 host bus ─ cgra_interface ─┬─ GRF (128 x 16) ─────────────┐ every RC can read any GRF word
                            ├─ context memory (8 x 128 x 32) ─ context_parser ─ RC configs, loop control
                            └─ data memory (256 x 512 bit)
                                  │  ▲
                        input_dma │  │ output_dma
                                  ▼  │
                      input FIFO (8 x 512)   output FIFO (8 x 512)
                                  │              ▲
                                  └─► RCA 8x8 ───┘   (bottom row, 8 words)
```

### Running a context

1. The host writes contexts, GRF values and data rows, then writes CTRL.
2. The parser reads the 72 used words of the context, one per clock.
   - Words 0..63 are the configurations of RC (row, col) = word / 8, word % 8.
     They go into the configuration layer the array is *not* using.
   - Words 64..71 are the loop controls:

     | word | name | meaning |
     |------|------|---------|
     | 64 | NITER | input packets (data-memory rows) to process |
     | 65 | GROUP | packets per accumulation group |
     | 66 | INBASE | first row read |
     | 67 | OUTBASE | first row written |
     | 68 | GRFBASE | GRF base of the first packet of a group |
     | 69 | GRFSTEP | GRF base increment per packet within a group |
     | 70 | FLAGS | bit 0: write a result for every packet, else only for the last packet of a group; bit 1: decide |
     | 71 | NOUT | result rows the output DMA writes |

3. The parser switches layers (one clock). It then starts the input DMA for
   NITER rows from INBASE and the output DMA for NOUT rows to OUTBASE.
4. On every enabled clock with an entry in the input FIFO, one entry enters
   row 0 of the array with its tags. The tags are valid, first-of-group,
   last-of-group and the packet's GRF base. The base is GRFBASE + p x GRFSTEP
   for packet p of its group.
5. Eight clocks later the bottom row's eight results leave the array. They
   are written to lanes 0..7 of an output FIFO entry, and the output DMA
   writes that entry to the next row. Lanes 8..31 of the row are zero.
6. After the last row is written, done/irq are raised.

Loading takes 73 clocks and the switch one more. After that the array takes
one packet per clock, and a context ends 8 pipeline clocks plus a few
handshake clocks after its last packet. The testbench checks this count for
the sigmoid context.

### Preloading (ping-pong layers)

Each cell holds two configuration layers, and the array runs from only one
of them. The parser's loader can therefore write the *next* context into the
idle layer while the current one runs.

- A CTRL write with bit 1 set (bit 0 clear) asks for a preload.
- The request is held until the loader is free and the parser is idle or
  running. The host can issue it right after a start.
- The loader fills the idle layer and a set of shadow control words. The
  running context is not disturbed.
- A later start of that context skips the 73-clock load. It goes straight to
  the layer switch, and the DMAs start 2 clocks after the CTRL write.
- A start of a context whose preload is still under way waits for that load.
  A start of any other context loads as usual and discards the preload.

The preloaded copy is what runs. Rewriting the context memory after a
preload does not change it.

The end-to-end test preloads each following context for three of its four
images and none for the other. It checks the shorter run time of the
preloaded sigmoid context.

### Packets and the pipeline

The input FIFO entry (32 lanes x 16 bits) travels down the array together
with its iteration. Row r works on packet k while row r-1 works on packet
k+1, and each row sees the lanes of its own packet. A loop body that needs
operands in several rows therefore still sees one coherent packet, and the
array keeps eight iterations in flight.

### Stalls and bubbles

The data-memory ports are shared with the host, and the host wins.

- A host read delays the input DMA by one clock, and a bubble (an invalid
  slot) enters the array.
- A host write holds the output DMA. If the output FIFO then fills, the
  whole array is frozen (`rca_enable` low) until there is room again.
- Cells update their LOR only for valid packets, so bubbles do not disturb
  accumulations. A stall freezes every register.

### The reconfigurable cell (`rc`)

Each cell has:

- three operand multiplexers A, B and C;
- a datapath;
- an output register OUT_REG (`pe_out_o`), which loads on every enabled
  clock;
- a local register LOR (`lor_out_o`).

An operand's source code (7 bits) selects one of these:

| code | source |
|------|--------|
| 0..31 | lane of the input FIFO entry at this row |
| 32..63 | GRF[code-32 + packet GRF base] |
| 64..71 | OUT_REG of a cell in the row above |
| 72..79 | LOR of a cell in the row above |
| 80 | own LOR |
| 81+ | zero |

`rc_crossbar` resolves codes 64..79 between rows. Row 0 has no row above and
reads zero there.

A configuration word is 32 bits:

| bits | field |
|------|-------|
| 31:27 | operation |
| 26:20 | source A |
| 19:13 | source B |
| 12:6 | source C |
| 5:2 | shift |
| 1:0 | LOR mode |

The LOR mode is one of hold, load A, load B or load result. The LOR loads
only when a valid packet passes.

Operations (codes 0..26):

| group | operations |
|-------|------------|
| move and arithmetic | PASS A; A+B; A−B; (A·B)>>>sh; ((A·B)>>>sh)+C; A+B+C |
| logic | AND, OR, XOR |
| absolute value | \|A\|; \|A−B\| |
| shifts | A<<sh; A>>>sh; shift-and-round (A+2^(sh−1))>>>sh |
| compare and select | MIN, MAX; C<0 ? A : B (SELN) |
| accumulate (ACC) | (first ? 0 : LOR) + A, with the result kept in LOR |
| unsigned 16-bit | MULU (A·B)>>sh; SHRL A>>sh; MINU, MAXU; ABSDIFFU |
| 8-bit | ADD8, SUB8, ABSDIFF8 on both bytes of a word independently; MUL8 (A[7:0]·B[7:0])>>>sh, signed |

All other operations treat their operands as signed 16-bit values.

## Mapping the network

The contexts are built by functions in `tb/ann_map_pkg.sv`.

### Dot-product context (`dot_rc`)

One neuron per input packet. The packet holds 32 weights, and the GRF holds
the layer's inputs.

| rows | what they do |
|------|--------------|
| 0..3 | Each column multiplies lane k by GRF[k]. Down the four rows, each cell multiply-accumulates onto the value from the row above, giving eight partial sums of four products. |
| 4..5 | Reduce the eight partial sums to one with three-input adds. |
| 6 | ACC in the LOR, over the packets of a group. |
| 7 | Passes the result out. |

A neuron with more than 31 inputs is split over several packets: a group with
GRFSTEP = 32. Only the last packet of a group produces a result row. The
bias is a weight on a constant 1.0 placed in the GRF after the inputs.

- **Hidden layer:** 120 packets in data-memory rows 0..119. Each holds 30
  weights, the bias and a zero. Inputs are in GRF[0..29] and 1.0 in GRF[30].
  Results go to rows 128..247, word 0.
- **Output layer:** 3 neurons of 121 inputs, four packets each. The 120
  activations and 1.0 go in GRF[0..120].

### Sigmoid context (`sig_rc`)

Eight values per packet, in lanes 0..7. It uses the piecewise quadratic

    f(t) = -0.03125 t^2 + 0.25 t + 0.5   for t = |x| < 4,   f = 1 for t >= 4
    sigmoid(x) ≈ f(|x|) for x >= 0,   1 - f(|x|) for x < 0

| row | operation |
|-----|-----------|
| 0 | ABS |
| 1 | MIN with 4.0 |
| 2 | a·t + b |
| 3 | (·)·t + c |
| 4 | 1 − v |
| 5 | SELN on the sign of x |

The constants come from GRF[122..126]: a = −32, b = 256, c = 512, 4.0 and
1.0, read with GRF base 96. Clamping t to 4.0 gives exactly 1.0 at and above
4, so no separate compare is needed. Over (-8, 8) the approximation's error
against the true sigmoid is at most 0.0215, and 0.0077 on average, in this
Q6.10 arithmetic. `tb_sigmoid_sweep` measures both on the hardware. The output-layer sigmoid context
sets the decide flag, so its result row feeds `decision_unit`.

### Layer to layer

Between contexts the host:

- reads the result rows;
- repacks the hidden sums eight per row for the sigmoid;
- writes the activations into the GRF for the output layer.

Data memory is shared by the layers, so the hidden weights are rewritten for
every image.

## Files

| file | contents |
|------|----------|
| `rtl/musra_pkg.sv` | sizes, types, opcodes, source codes, context word layout |
| `rtl/rc.sv`, `rtl/rc_crossbar.sv`, `rtl/rca.sv` | cell, row-to-row crossbar, 8x8 array |
| `rtl/io_fifo.sv` | 512-bit x 8 first-word-fall-through FIFO (input and output FIFO) |
| `rtl/grf.sv` | 128 x 16 global register file |
| `rtl/context_memory.sv` | 8 contexts x 128 words |
| `rtl/data_memory.sv` | 256 x 512-bit rows, word write mask |
| `rtl/input_dma.sv`, `rtl/output_dma.sv` | row streams between memory and FIFOs |
| `rtl/context_parser.sv` | context load, layer switch, loop sequencing |
| `rtl/cgra_interface.sv` | host bus, registers, interrupt |
| `rtl/musra.sv` | the core |
| `rtl/decision_unit.sv` | threshold decision |
| `rtl/face_recog_top.sv` | top |
| `tb/ann_map_pkg.sv` | context builders and reference arithmetic |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each also
has a watchdog. The end-to-end test runs the top at its default sizes: 4
images x 4 contexts, with every dot product, activation, output and decision
checked. It takes well under a second:

    verilator --binary --timing -Irtl -Itb -Wno-fatal \
      rtl/musra_pkg.sv tb/ann_map_pkg.sv rtl/*.sv tb/tb_face_recog_top.sv \
      --top-module tb_face_recog_top -o sim && ./obj_dir/sim

Other testbenches build the same way with their own `--top-module`. Only
`tb_musra`, `tb_rca`, `tb_face_recog_top`, `tb_face_recog_sizes` and
`tb_sigmoid_sweep` need `ann_map_pkg`, but listing
it always is harmless. `tb_face_recog_sizes` classifies one face with each
hidden-layer size 30, 60, 90 and 120. Only the loop controls of the four
contexts change between sizes. `tb_musra` runs a small loop with an intermediate held
in the LOR, v = ((x·y)+z) AND t − 35, w = |v|, including host-caused stalls.

The end-to-end test counts how often each mechanism happened, and fails if
one never did. The mechanisms are stalls, bubbles, layer switches,
multi-packet groups, negative and saturated sigmoid inputs, interrupts, and
all four decisions.

The network weights in the test are pseudo-random. The output biases are
chosen to force each of the four decisions. No trained face data is
included, so the test checks the arithmetic and the control, not the
recognition rate.

## Departures and limits

- **Host bus.** The platform connects the core to its CPU over AXI. Here a
  plain word bus with the map above replaces it. There are no context or
  data DMA controllers on the system side: the host writes the context and
  data memories directly.
- **Sizes not fixed by the reference description.**
  - GRF: 128 words.
  - Context memory: 8 contexts.
  - Data memory: 256 rows.
  - These hold the 30-120-3 network: 240 rows for the hidden layer and 121
    GRF words for the output layer. Hidden layers of up to 127 neurons fit;
    150 would not (151 inputs > 128 GRF words).
  - Sizes that are fixed: the 8x8 array, 16-bit words, 512-bit x 8-entry
    FIFOs, and 128-word contexts.
- **Opcode set and encodings.** The opcode set, the configuration word, the
  source codes and the context layout are this design's own. The operation
  list is broad but not necessarily complete: the reference names only kinds
  of operation.
- **Which cells write the output FIFO.** Only the bottom row's eight cells
  write the output FIFO. A result computed higher up is passed down with
  PASS. Each row holds a different iteration, so this keeps one output entry
  per iteration.
- **Output lanes.** Result placement is fixed: the bottom row goes to lanes
  0..7 of the output row.
- **Decision in hardware.** The threshold decision is a hardware stage. It
  could equally be made by the host from the outputs, which it can read from
  data memory.
- **Sigmoid.** The ≥ 4 branch of the sigmoid is done by clamping instead of
  a separate select. The result is the same.
- **Context loading.** Preloading is explicit. The host names the next
  context. The parser does not look ahead in the context memory by itself.
- **Reset.** Reset is asynchronous and active low (`rst_n`). It clears all
  registers, including the GRF. The context and data memories are not
  cleared, so the host must write what a context will read.

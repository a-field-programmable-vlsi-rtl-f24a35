# Asynchronous bit-serial field-programmable array (LEDR)

This is a field-programmable fabric built to cut the two main costs of
FPGA power: wide switch blocks and the clock tree. Two ideas do it:

* **Bit-serial cells.** Every cell handles one bit at a time. A connection between two
  cells needs only three wires, and each cell talks only to its four neighbours. Words
  travel LSB first through a chain of cells. Each cell adds, applies a 2-input function,
  or delays the stream by one bit.
* **No clock.** Each link carries its own timing in a delay-insensitive code. This is
  level-encoded dual-rail (LEDR) with a two-phase acknowledge. A word is valid whatever
  the length of the programmed route, so no delay constraints have to be met after
  place and route.

The fabricated array has 20 × 30 = 600 cells. In this RTL that is the default size of
`fpvlsi_top`.

## LEDR links

A bit travels on two wires, V (the value) and R (a redundant rail). The sender changes
a *phase* bit with every word and sends R = V xor phase:

| phase | data 0 (V,R) | data 1 (V,R) |
|-------|--------------|--------------|
| 0     | (0,0)        | (1,1)        |
| 1     | (0,1)        | (1,0)        |

Two consecutive words always differ on exactly one wire. The receiver sees a new word
when V xor R changes, so no spacer is needed between words. A 4-phase dual-rail link
has to return to (0,0) after each word; LEDR skips that step and so runs at up to
twice the rate.

The third wire, ACK, runs backwards. The receiver sets ACK to the phase of the last
word it took. The sender may put its next word on the link only once ACK equals the
phase of the word already there.

`fpvlsi_pkg` defines the code word type `ledr_t` and the functions `ledr_phase()` and
`ledr_encode()`.

## The cell

```
            nb_in[N,E,S,W] (words from the 4 neighbours)
                  │
           ┌──────▼───────┐  src1/src2
           │ switch_block │──────────── nb_ack[N,E,S,W] back to the neighbours
           └──┬────────┬──┘
            u1│        │u2
       ┌──────▼────────▼──────┐
       │ lb_input_ctrl        │  two input registers + Input Control
       └──┬────────┬──────────┘
          │ir1     │ir2
       ┌──▼────────▼──┐
       │  ledr_lut    │  4 decoder/multiplexer sub-modules + output latches
       └──────┬───────┘
       ┌──────▼───────┐
       │lb_output_ctrl│◄── out_ack[N,E,S,W]
       └──────┬───────┘
              └──► out (broadcast to all four neighbours)
```

`logic_block` holds the three lower boxes, the carry register and a bit counter.
`fpvlsi_cell` adds the switch block and the cell's configuration shift register.

### What a cell can do

* **Any 2-input function** (`MODE_LUT`). The function is given by four memory bits
  `lut[{a,b}]`. For a one-input function, set the unused input to `SRC_NONE`: it reads
  as a constant 0 that never makes the cell wait.
* **Bit-serial addition with carry storage** (`MODE_ADD`). The carry stays inside the
  cell, so one cell adds words of any length, LSB first. The sum still comes out of the
  LUT: its memory bits are loaded with `a ^ b ^ c` for the stored carry c. Each output
  word updates the carry to majority(a, b, c). With `wlen = W` the carry is cleared
  after every W bits, which marks word boundaries. With `wlen = 0` only reset clears it.
* **1-bit storage** (`init_tok`). The output register leaves reset already holding one
  word, of value `init_val`. The cell then emits that bit ahead of its input stream,
  which delays the stream by one position. It is the bit-serial form of a flip-flop,
  and it lets feedback loops start with data in them.

## The decoder/multiplexer LUT

This is the part that makes LEDR affordable. A plain multiplexer tree driven by
(Va, Ra, Vb, Rb) needs 16 inputs. Eight of them feed the output back, to hold it for
input pairs that are not yet valid, i.e. the two inputs are in different phases.

Here the LUT is instead four small sub-modules (`ledr_lut_sub`), one per memory bit
M00, M01, M10 and M11. Each sub-module has a decoder with two product terms:

* one term matches "Va = m, Vb = n, both in phase 0", that is (m,m),(n,n);
* the other matches the same values in phase 1, that is (m,¬m),(n,¬n).

When one of the terms is true, the multiplexer drives Vout = M_mn. It drives
Rout = M_mn in phase 0, or ¬M_mn through an inverter in phase 1. The output word
therefore carries the phase of the inputs.

For any invalid pair, no term is true anywhere. All four sub-modules then release
their outputs, and two latches keep the previous word. On silicon the release is a
high-impedance state. In the RTL each sub-module has a `drive` output, and
`ledr_lut` ORs the driven values together; that is equivalent because at most one
sub-module drives at a time, which an assertion checks. The latches are modelled as
transparent: the output follows a driven value in the same cycle, and a register keeps
it otherwise.

## How words move: the handshake rules

This is the core of the design; every other part follows from three firing rules.
Each register holds one LEDR word, and "phase" below means the phase of that word.

1. **Input register i** (`lb_input_ctrl`) takes the word on its link when:
   * the link shows a phase the register does not hold yet, **and**
   * its own word has been consumed, meaning its phase equals `pc`. `pc` is the phase
     of the last input pair the output stage consumed.

   Its acknowledge upstream is simply its own phase.
2. **The output register** (`lb_output_ctrl`) loads when three things hold:
   * both input registers hold the same phase, so the LUT decodes a valid pair;
   * that phase differs from `pc`, so the pair has not been used;
   * all four acknowledges from the neighbours equal the phase of the word now in the
     output register, so every receiver has taken it.

   On a load, the output phase toggles and `pc` takes the pair's phase.
3. **Acknowledges towards a neighbour** (`switch_block`). A side that input 1 and/or
   input 2 selects is acknowledged once every selecting input register holds the
   incoming phase. Until then it shows the opposite phase. A side that no input
   selects acknowledges at once (it echoes the incoming phase). So a cell's broadcast
   waits only for the neighbours that listen. When two neighbours listen, it waits for
   both: the join is checked at the sender, by comparing all four acknowledges with its
   own phase.

After reset every register holds (0,0), so there are no words in flight. The first
word any sender sends is in phase 1.

A storage cell starts with its output in phase 1 and `pc` = 0. Its output therefore
runs one phase ahead of its inputs for the whole run. For that reason the output stage
re-encodes R from the value and its own phase, rather than copying the LUT's Rout. In
every other cell the two are identical, and an assertion checks the LUT's phase.

### Timing model

On the chip these registers are self-timed latches. In this RTL every rule above is
evaluated on the rising edge of one sampling clock `clk`, with at most one update per
register per edge. Nothing depends on how many cycles a link takes, so the results are
the same as for the asynchronous circuit. The array testbench checks this: it runs the
same circuit with no delays and with random delays at every border sender and
receiver, and gets identical streams.

* **Rate.** In this model a cell passes one word every **2 clock cycles** (input
  register, then output register). A chain of cells streams at that rate without
  gaps.
* **Latency.** Each cell adds 2 cycles of latency.

These cycle counts belong to the model, not to silicon. The measured cell delay of the
fabricated chip (0.55 ns) and its energy per data word cannot be reproduced in RTL.

## Configuration

The configuration of one cell is `cell_cfg_t`, 18 bits, MSB first:

| field      | bits | meaning |
|------------|------|---------|
| `en`       | 1    | cell in use; a disabled cell never fires and acknowledges everything at once |
| `src1`     | 3    | input 1 source: `SRC_NONE`, `SRC_N`, `SRC_E`, `SRC_S`, `SRC_W` |
| `src2`     | 3    | input 2 source |
| `mode`     | 1    | `MODE_LUT` or `MODE_ADD` |
| `lut`      | 4    | truth table, `lut[{a,b}]` |
| `init_tok` | 1    | 1-bit storage: start with one word in the output register |
| `init_val` | 1    | value of that word |
| `wlen`     | 4    | adder word length; 0 = carry never cleared |

All cells form one scan chain in row-major order: `cfg_in` feeds cell (0,0) and
`cfg_out` comes from the last cell. While `cfg_en` is high, each clock shifts one bit
in. Shift the word for the last cell first, each word MSB first: 600 × 18 = 10 800
clocks for the full array. Hold `rst_n` low while shifting, then release it. Reset
takes the storage words from the configuration. The configuration registers have no
reset.

## The array and its border

`fpvlsi_top #(ROWS, COLS)` places the cells in a mesh. On each border, every position
has four signals:

* `x_in`: the word entering the array;
* `x_in_ack`: the acknowledge the array returns for it;
* `x_out`: the output of the border cell;
* `x_out_ack`: the acknowledge the outside returns for it.

Here `x` is n, s, w or e. North/south signals are indexed by column and west/east
signals by row. Tie unused inputs to a constant (`'0` never looks like a new word).
Drive every unused `x_out_ack` with `ledr_phase(x_out)`, so that border cells do not
wait on it. `fire` and `stall` (one bit per cell, index `r*COLS+c`) show when a word
left a cell and when a ready word was waiting for an acknowledge.

## Where this RTL goes beyond or departs from the published design

The published architecture gives the LEDR code, the functions of the logic block, the
block diagram of a cell and the circuit of the LUT. The following are this
implementation's own choices:

* **Routing.** Only between neighbours, as described. Each side has a word pair in
  each direction and one acknowledge per direction, i.e. six wires per side rather
  than a single three-wire channel whose direction is programmed. A cell broadcasts its
  output to all four sides. Routes longer than one hop pass through cells configured as
  buffers (pass `a`).
* **Handshake.** The exact firing rules above, the join of several receivers'
  acknowledges, and the constant-0 source for unused inputs.
* **Adder.** It is built on the LUT (sum table chosen by the carry), and carries are
  cleared with a configurable word length.
* **1-bit storage.** Read as an output register that is initialised with one word.
* **Configuration.** The format and the scan chain, plus a per-cell enable.
* **Clock and reset.** The sampling clock and the synchronous active-low reset.

Not included:

* the pads of the chip;
* the fine-grained power gating, which is mentioned only as future work;
* the 4-phase dual-rail and bundled-data schemes and the multiplexer-tree LEDR LUT,
  which serve only as points of comparison.

## Simulating

All testbenches are self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fpvlsi_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/fpvlsi_pkg.sv tb/tb_fpvlsi_top.sv
./obj_dir/Vtb_fpvlsi_top
```

| testbench            | what it checks |
|----------------------|----------------|
| `tb_ledr_lut_sub`    | all 32 input/memory combinations of the four sub-modules against the code table |
| `tb_ledr_lut`        | random single-rail changes: valid pairs give `M[Va,Vb]` with the inputs' phase; invalid pairs hold |
| `tb_lb_input_ctrl`   | load only after consumption; order of words; back-pressure |
| `tb_lb_output_ctrl`  | load conditions, stall, storage word, one rail changing per word |
| `tb_logic_block`     | random truth tables; 8-bit and 24-bit serial sums; storage delay; 2 cycles per bit |
| `tb_switch_block`    | routing and acknowledge rules, including two inputs on one side |
| `tb_fpvlsi_cell`     | scan chain; 4-bit sums read by two receivers with different delays; NAND |
| `tb_fpvlsi_top`      | 4 × 6 array, end to end (circuit below) |
| `tb_fpvlsi_full`     | the same on the full 20 × 30 array at default parameters (about one minute) |

The array test maps a small circuit onto the array:

* 8-bit words A + B, added in cell (0,0) and carried east along row 0;
* B AND C, followed by a storage cell holding a 1, along row 2;
* ¬D, travelling west along row 3 and then south down column 0.

Cell (1,0) feeds both the adder and the AND gate, so its output has two receivers. The
test checks every output bit, then confirms that each of these happened at least once:

* stalls;
* stored carries;
* carry clears at word boundaries;
* waits on the slower of two receivers;
* a LUT holding its output on an invalid input pair.

`tb/ledr_src.sv` and `tb/ledr_sink.sv` are LEDR sender and receiver models for the
testbenches, with random delays. `tb/fpvlsi_bench_body.svh` is the body shared by the
two array testbenches.

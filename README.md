# A run-time programmable CGRA overlay for an FPGA accelerator

Putting a new function into an FPGA normally means writing HDL and running
synthesis again, which takes far too long when an application wants to switch
accelerators while it runs. This design moves the reconfiguration one level up:
a small coarse-grained reconfigurable array (CGRA) is synthesized into the FPGA
once, and from then on a new computation is loaded as a 146-bit configuration
word. A configuration describes a dataflow graph. Each node is an operation on
16-bit words, and each edge is a wire between processing units. Switching from
one graph to another takes one clock cycle.

The array is built for a CPU+FPGA server where a host processor writes
configurations and streams data to the FPGA over a cache-coherent link. That
link and its vendor framework are not part of this RTL. The host's traffic
appears here as plain write strobes and a pair of data streams.

## The array

```
 in_data ──►┐
            MUX(load_ext)
 consts[0..7] ─► constants crossbar 8x16 ─┐
                                          ├─► 16 operand MUXes ─► UP A..H ─► REG A..H ─┐
 REG A..H ────► UP crossbar 8x16 ─────────┘      (src_const)                          │
   ▲                                                                                  │
   └──────────────────────────────────────────────────────────────────────────────────┘
                                                            REG H ─► out_data
```

* **Eight processing units (UPs), A to H.** Each UP has two operands, a and b.
  A 3-bit field selects one of eight operations. The UP writes its result into
  its own output register. A 1-bit enable gates that register, so a disabled UP
  holds its value.

  | code | op   | result                 |
  |------|------|------------------------|
  | 0    | PASS | a                      |
  | 1    | ADD  | a + b                  |
  | 2    | SUB  | a − b                  |
  | 3    | MUL  | low 16 bits of a × b   |
  | 4    | AND  | a & b                  |
  | 5    | OR   | a \| b                 |
  | 6    | XOR  | a ^ b                  |
  | 7    | NOT  | ~a                     |

  Arithmetic wraps modulo 2^16. The low half of a product does not depend on
  signedness, so signed and unsigned operands give the same result.
* **The array is heterogeneous in exactly two places.** UP A is the *loading*
  UP. An extra multiplexer in front of its operand a can take the external
  input stream instead. UP H is the *writing* UP. Its register drives the
  external output stream. Both also work as ordinary UPs.
* **UP crossbar (8×16).** Any of the 16 operand inputs can read any UP's
  register. UP i reads operand input 2i as a and 2i+1 as b. Every UP can read
  every UP's register, including its own, so placing a graph only requires
  enough UPs. Its load and write nodes must sit on UP A and UP H.
* **Constants crossbar (8×16).** This crossbar routes any of eight 16-bit
  vector constants to any operand input. Graph coefficients therefore need no
  UPs of their own.
* **Operand multiplexers.** One bit per operand input chooses between the two
  crossbars.

The networks are combinational. The UP registers are the only pipeline
registers. A graph therefore runs as a pipeline with one stage per graph level,
and it accepts a new input word every cycle.

## The configuration word

The 146 bits break down as 34 UP bits (8 × (3 + 1) plus one extra bit each for
UP A and UP H), 48 + 48 crossbar select bits (16 inputs × 3 bits each) and 16
multiplexer bits. `cgra_pkg::cfg_word_t` defines the layout:

| bits      | field            | meaning                                                   |
|-----------|------------------|-----------------------------------------------------------|
| 145:130   | `src_const[15:0]`| operand input j takes the constants crossbar when 1       |
| 129:82    | `const_sel[j]`   | constant index for input j, at bits 82+3j +: 3            |
| 81:34     | `up_sel[j]`      | source UP for input j, at bits 34+3j +: 3                 |
| 33        | `store_wr`       | UP H drives the output stream                             |
| 32        | `load_ext`       | UP A's operand a is the input stream                      |
| 31:24     | `up_en[7:0]`     | UP register enables                                       |
| 23:0      | `up_op[u]`       | operation of UP u, at bits 3u +: 3                        |

The bit counts follow the architecture. The field order, the operand
numbering, the opcodes and the meaning of the two extra I/O bits are choices
made in this implementation.

## Streams, validity and timing

This part needs the most care when mapping a graph.

* Every word in the array carries a **valid flag**. The UP crossbar is 17 bits
  wide so the flag travels with the data. Constants are always valid. An
  enabled UP captures a result only when every operand its operation reads is
  valid (PASS and NOT ignore b). Otherwise it keeps its old value and marks it
  invalid. Gaps in the input stream (`in_valid = 0`) therefore travel through
  the pipeline as bubbles and produce no output.
* **`run` advances the whole array.** With `run = 0`, every register and flag
  holds. This is the only form of back-pressure.
* **Output.** `out_valid` is a one-cycle pulse, sent each time UP H captures a
  valid result while `store_wr = 1`. `out_data` is UP H's register.
* **Latency.** The latency is the number of UPs on the path, counting UP A and
  UP H, measured in cycles where `run = 1`. The mapper must balance paths: two
  operands of one UP must come from the same graph level. The array does not
  check this. An unbalanced graph combines words from different inputs.

### Example: y = a·x² + b·x + c

Put a, b and c in constants 0, 1 and 2, then program these UPs:

| UP | op   | a      | b       |
|----|------|--------|---------|
| A  | PASS | input stream (`load_ext`) | – |
| B  | MUL  | A      | A       |
| C  | MUL  | A      | const 1 |
| D  | MUL  | B      | const 0 |
| E  | ADD  | C      | const 2 |
| F  | ADD  | D      | E       |
| H  | PASS | F (`store_wr`) | – |

The graph itself has three levels. With the load and write stages added, a
result leaves 5 cycles after its input, and one result leaves per cycle after
that. This uses 7 of the 8 UPs, 3 of the 8 constants and 14 of the 16 operand
inputs. `tb/cgra_tb_pkg.sv` has this word as `cfg_poly()`.

## Configuration memory and run-time switching

`cgra_config_mem` stores 16 configuration words (the depth is a parameter).
Only its separate *active* register drives the array:

* `cfg_wr_en/addr/data` stores a word at any time, even while the array runs.
* A one-cycle pulse on `cfg_act_en` copies entry `cfg_act_addr` into the active
  register at the next edge. At the same edge the pulse clears every valid
  flag, which discards the words still in flight from the previous graph.
* If an entry is written and activated in the same cycle, its old content is
  activated.
* Reset clears the active word, so all UPs start disabled. The stored entries
  are not reset.

`const_wr_en/addr/data` writes one vector constant. Constants are outside the
146-bit word, so a graph's coefficients can change without touching its
configuration.

## Top-level ports (`cgra_top`)

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `cfg_wr_en`, `cfg_wr_addr`, `cfg_wr_data` | in | 1, 4, 146 | store a configuration |
| `cfg_act_en`, `cfg_act_addr` | in | 1, 4 | activate a configuration (also flushes) |
| `const_wr_en`, `const_wr_addr`, `const_wr_data` | in | 1, 3, 16 | write a constant |
| `run` | in | 1 | advance the array |
| `in_data`, `in_valid` | in | 16, 1 | input stream into UP A |
| `out_data`, `out_valid` | out | 16, 1 | output stream from UP H |
| `active_cfg`, `up_q`, `up_q_valid` | out | 146, 8×16, 8 | observation |

After synthesis the array is about 755 word-level cells, 265 flip-flops and
2336 memory bits (16 × 146).

## What follows the published architecture and what does not

These points follow it:

* 16-bit words and eight UPs.
* A register after each UP.
* Two full 8×16 crossbars: one from the UP registers, one from eight vector
  constants.
* A multiplexer in front of each operand.
* A loading UP with an extra input multiplexer in front of UP A, and a writing
  UP.
* 3 operation bits and 1 enable bit per UP.
* The 146-bit configuration word and a configuration memory that holds it.

These points are this implementation's own choices:

* The operation set and opcodes. The architecture only says "basic arithmetic
  and logical operations".
* The choice of UP H as the writing UP.
* The meaning of the two extra I/O bits.
* The order of the fields in the word.
* The configuration memory depth of 16, and the active-register activation
  scheme.
* The constant write port.
* The valid flags, `run` and the flush on reconfiguration.
* The synchronous reset.

The host link is not included. That covers the coherent CPU–FPGA link, the
vendor's interface block and the accelerator framework, along with the host
processor and its software. A real deployment needs a thin adapter from that
framework's memory-mapped writes and data transfers to the ports above.

Known limits:

* No floating point.
* Path balancing is not checked.
* Only one input and one output stream.
* Only UP A can load and only UP H can write.

## Files

`rtl/`:

* `cgra_pkg.sv`: sizes, opcodes and the configuration-word struct.
* `cgra_up.sv`: UP with its output register.
* `cgra_load_up.sv`, `cgra_store_up.sv`: the I/O UPs.
* `cgra_crossbar.sv`: parameterized crossbar.
* `cgra_const_array.sv`: the vector constants.
* `cgra_config_mem.sv`: the configuration memory and active word.
* `cgra_datapath.sv`: the array.
* `cgra_top.sv`: the top level.

`tb/` has one self-checking testbench per module (`tb_<module>.sv`) and
`cgra_tb_pkg.sv`. The package holds a golden operation model, a cycle-level
model of the whole datapath and builders for configuration words.

Notable testbenches:

* `tb_cgra_datapath` compares every UP register with the model after every
  edge, under random configurations, gaps, stalls and flushes.
* `tb_cgra_top` runs at the default size. It writes two configurations and the
  constants, then streams data through the polynomial and a second graph,
  y = (x + k3)·(x − k4). Along the way it checks results, the latencies (5 and
  4 cycles) and the one-result-per-cycle throughput. It also checks bubbles,
  stalls, a constant rewrite and a reconfiguration with words in flight.

To simulate with Verilator, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/cgra_pkg.sv tb/cgra_tb_pkg.sv tb/tb_cgra_top.sv --top-module tb_cgra_top
./obj_dir/Vtb_cgra_top
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`.

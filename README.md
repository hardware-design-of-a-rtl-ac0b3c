# Pipelined comparator framework for DNA sequence matching

Exact string matching on DNA compares a short sample sequence (the pattern)
against a much longer target sequence (the text) base by base. Software does
the search; this hardware does the comparisons. The host encodes every
nucleobase in two bits and streams blocks of 12 sample bases and 12 target
bases to the comparator. For each block the comparator returns a 12-bit
vector with a 1 in every lane where the sample base equals the target base.

The core idea is time sharing under a fixed schedule. There are not twelve
comparators but two. A seven-state controller feeds them two lane pairs per
clock cycle, so a block takes six compare cycles. The comparators sit between
two register stages. At a 10 ns clock a block's result is ready 70 ns
(7 cycles) after it starts, and a new block can start every 70 ns.

## Base encoding

| base | code |
|------|------|
| A    | `00` |
| T    | `01` |
| C    | `10` |
| G    | `11` |

The hardware never encodes; the host sends the codes. A base is always
compared as a whole 2-bit code, never bit by bit. Comparing single bits of
the stream would report false matches, for example A (`00`) against T (`01`)
on the high bit. `dna_pkg::base_t` holds the encoding.

## Block diagram

```
            clk, rst_n (to both units)
                 |
   +-------------+--------------+          +----------------------------+
   | control_unit               | ctrl_t   | processing_unit            |
   |  FSM S0..S6, schedule      |--------->|  reg5,reg2 -> eqmux_op 0 ->|-> reg6 -+
   +----------------------------+          |  reg3,reg4 -> eqmux_op 1 ->|-> reg7 -+-> 12-bit output
        ^ blk_valid   | blk_release        |  constants 1 / 0           |   register -> match
        |             v                    +----------------------------+
   +----------------------------+   sample[12], target[12]   ^
   | input_registers            |----------------------------+
   |  serial fill reg + hold reg|
   +----------------------------+
        ^ sdi / sdi_valid / sdi_ready                 match / match_valid
        |                                                    |
   ======================== data bus (host side) ========================
```

`dna_comparator_top` is the top level. It wires the three units together and
brings the data-bus side out as plain ports.

## The schedule (the hard part)

The controller has seven states. S0 to S5 are the six compare slots. S6
drains the last results and waits for the next block. In each slot, both
operators compare one lane each:

| slot / state | operator 0 lane | reg5 / reg2 hold | operator 1 lane | reg3 / reg4 hold |
|--------------|-----------------|------------------|-----------------|------------------|
| S0           | 0               | target / sample  | 10              | sample / target  |
| S1           | 4               | sample / target  | 5               | sample / target  |
| S2           | 2               | sample / target  | 8               | sample / target  |
| S3           | 7               | target / sample  | 1               | sample / target  |
| S4           | 11              | sample / target  | 6               | target / sample  |
| S5           | 3               | sample / target  | 9               | sample / target  |

The lane order and the operand-register placement are those of the original
design's schedule. Equality does not care which register holds which operand.
The swap bits are kept only so that the register contents match that
schedule. All of it lives in `dna_pkg` (`OP0_LANE`, `OP1_LANE`, `OP0_SWAP`,
`OP1_SWAP`).

Cycle by cycle (each column is one 10 ns cycle, and a value is shown in the
cycle after the edge that loads it):

```
state        S6*  S0    S1    S2    S3    S4    S5    S6
operands     -    0,10  4,5   2,8   7,1   11,6  3,9   -
reg6/reg7    -    -     0,10  4,5   2,8   7,1   11,6  3,9
match_valid  -    -     -     -     -     -     -     -    1 (next cycle)
```

`*` S6 with `blk_valid` high is the start: the edge that leaves it loads the
slot-0 operands. The controller's control word is combinational from its
state. With `ctrl.load` set, the word carries the lanes to load at the next
edge. So the word issued in state Sk names the lanes of slot k+1.

- Each flag enters its lane of the 12-bit output register one edge after it
  reaches reg6/reg7.
- With the last pair (lanes 3 and 9), the complete vector is also copied into
  `match`, and `match_valid` pulses.
- From the start edge to `match_valid` is 7 cycles.
- The controller asserts `blk_release` in S4. The edge that closes S4 loads
  the last operands, so the input registers can hold the next block by S6.
- With blocks waiting, S6 starts the next block at once, so one block starts
  every 7 cycles.
- `match` holds its value until the next block completes.

Lane tags and valid bits travel with both pipeline stages. The processing
unit therefore works with any schedule that loads each lane once and marks
its last slot; its testbench checks this with random schedules.

## Serial input

The host sends each block as 48 bits, `SER_W` bits per transfer:

1. sample lanes 0 to 11, then target lanes 0 to 11;
2. each base most significant bit first;
3. with `SER_W > 1`, the earlier bit sits in the higher bit of `sdi`.

A transfer happens on a rising edge where `sdi_valid` and `sdi_ready` are both
high. The bits shift into a fill register. Once 48 bits are in, the block
moves to a hold register, which drives the comparators until `blk_release`.
Meanwhile the next block can arrive. `sdi_ready` drops only while a full
fill register waits for the hold register. A continuous stream loses no
cycle: the fill register empties at the same edge that takes the first bit of
the next block.

`SER_W` defaults to 1, a bit-serial link. It must divide 48.

## Timing and throughput

| quantity                            | value                                 |
|-------------------------------------|---------------------------------------|
| clock                               | 10 ns (intended; the RTL has no timing constraints) |
| latency, start to `match_valid`     | 7 cycles = 70 ns                      |
| pipeline stages                     | 2 (operand registers, result registers) |
| data registers                      | 6 (reg2..reg7)                        |
| comparator cadence                  | 1 block / 7 cycles                    |
| serial input, `SER_W = 1`           | 1 block / 48 cycles                   |
| serial input, `SER_W = 8`           | 6 transfers per block; the input keeps up, and the 7-cycle cadence sets the rate |

For a sample of one million base pairs (83,334 blocks):

- The comparators alone need 83,334 × 7 cycles = 5.83 ms.
- At the default bit-serial input the run takes 4.0 M cycles = 40.0 ms.
- Both figures are what the workload testbench measures.

The original design quotes 6.67 ms for one million bases. That equals 8
cycles per 12 bases, not the 7-cycle cadence it also gives. This RTL follows
the 7-cycle cadence.

## Where this RTL departs from the original design or fills gaps

- **Register widths.** The original tool flow used a 16-bit word library
  (6 registers, 96 flip-flops). Here the operand registers are 2 bits and the
  result registers 1 bit wide.
- **Interface.** The original gives only a data bus with inputs and outputs.
  The following are all choices of this RTL:
  - the serial format and `SER_W`;
  - the valid/ready handshake;
  - the double-buffered input registers;
  - the `blk_valid`/`blk_release` handshake;
  - the held `match` register with its `match_valid` pulse.

  The output has no back-pressure: a consumer must take `match` before the
  next block completes, which is at least 7 cycles later.
- **Controller.** The seven states are the original's; their transitions and
  the reset into S6 are this design's. Reset is synchronous and active low.
- **Operator.** `eqmux_op` computes `o = (a == b) ? c : d`, with c tied to
  the constant 1 and d to the constant 0. This reads the operator's name, its
  four operands and the two constants; the original does not print the
  operator's definition.
- **Not included:**
  - the base encoding, which is host software;
  - the host's search algorithm;
  - interface circuitry the original only mentions (communication unit,
    GALS/LIS interface, memory unit);
  - the other latency/area design points of the original's exploration, with
    1 to 12 operators for latencies from 150 ns to 10 ns. Only the 70 ns,
    two-operator design is built.

## Files

| file | contents |
|------|----------|
| `rtl/dna_pkg.sv` | base encoding, sizes, state type, schedule tables, control word |
| `rtl/eqmux_op.sv` | comparator operator |
| `rtl/input_registers.sv` | serial receiver, fill and hold registers |
| `rtl/control_unit.sv` | seven-state scheduling FSM |
| `rtl/processing_unit.sv` | operand, result and output registers around two operators |
| `rtl/dna_comparator_top.sv` | top level |
| `tb/tb_eqmux_op.sv` | exhaustive operator test |
| `tb/tb_input_registers.sv`, `tb/ir_harness.sv` | random blocks at 1 and 8 bits per transfer, stall path |
| `tb/tb_control_unit.sv` | schedule, state walk, release, 7-cycle cadence, idle waiting |
| `tb/tb_processing_unit.sv` | fixed and random schedules, gaps, latency, held output |
| `tb/tb_dna_comparator_top.sv`, `tb/top_harness.sv` | end to end at 1 and 8 bits per transfer; checks input stalls, back-to-back blocks, idle waits, all-match blocks |
| `tb/tb_dna_comparator_full.sv` | end to end at the default parameters, 48-cycle serial rate |
| `tb/tb_dna_million.sv` | one million base pairs, default and 8-bit input |

Every testbench checks itself against values it computes on its own. Each
prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb -Irtl --top-module tb_dna_comparator_top \
  rtl/dna_pkg.sv tb/tb_dna_comparator_top.sv
./obj_dir/Vtb_dna_comparator_top
```

Replace the top module and file to run any other testbench. Each testbench
takes a few seconds at most; the million-base run takes about five. Lint a
module with `verilator --lint-only -Wall -y rtl rtl/dna_pkg.sv
rtl/<module>.sv`.

## Changing it

- **Block size or operator count.** `LANES` and `N_OPS` live in `dna_pkg`. A
  different size also needs new schedule tables (`N_SLOTS` entries per
  operator, each lane exactly once).
- **States.** The controller's states are tied to six slots. A different
  slot count needs more or fewer states in `state_t` and in the `case` of
  `control_unit`.
- **Input width.** `SER_W` on the top sets the transfer width. It must divide
  48.

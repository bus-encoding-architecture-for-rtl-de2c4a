# Bus-invert coded external memory controller for an AMBA AHB system

The lines between a chip and its external memory are by far the most heavily
loaded nodes in a small system-on-chip. An off-chip pin, its pad and the board
trace have two to three orders of magnitude more capacitance than an internal
node. Every toggle on those lines therefore costs far more energy than the
few gates it takes to avoid it.

This design is an AHB external memory controller (EMC) that applies
**bus-invert coding** to its 32-bit data bus. The bus is coded per byte lane:
each of the four 8-bit lanes has its own *invert* line. Before a byte goes
out, the controller checks whether sending it as is would toggle more than
half of the lane's lines. If so, it sends the complement and raises the
lane's invert line. The invert bits are stored in memory next to the data.
On a read they come back with the data and say which bytes must be inverted
again. The external data path grows from 32 to 36 lines. In exchange, no
byte lane ever toggles more than 4 of its 9 lines in one transfer.

Coding per byte rather than per word has two reasons. Bus-invert saves more
on narrow buses. And the AHB moves 8-, 16- and 32-bit transfers, which touch
only some of the lanes. Each lane is coded against its own last value. A
lane that a transfer does not address keeps its lines, so it costs nothing.

## Block structure

```
                +--------------------- external_memory_controller ----------------------+
  AHB  hsel_reg | ahb_external_memory_registers  --enable, read_only, wait states-->    |
  ------------> |                                                                        |
       hsel_mem | ahb_external_memory_controller                                         |
       [3:0]    |   bus_invert_encoder  --> mem_dataout_o[31:0], mem_invertbits_o[3:0]   |--> memory
  ------------> |   bus_invert_decoder  <-- mem_data_i[31:0],    mem_invertbits_i[3:0]   |<-- memory
                |   strobes: mem_address_o, mem_*_enabled_n_o[3:0]                       |
                +------------------------------------------------------------------------+
emc_system = EMC + ext_sram 4 x 8bit x 2k (data) + ext_sram 4 x 1bit x 2k (invert bits), bank 0
```

| module | role |
|---|---|
| `emc_pkg` | AHB encodings, lane geometry, register offsets, `ahb_lanes()` (size and address to byte lanes) |
| `bus_invert_encoder` | write-path coder; owns the registers that drive the data and invert lines |
| `bus_invert_decoder` | read-path conditional inverter, one XOR per lane |
| `ahb_external_memory_controller` | AHB slave for four memory banks; sequences memory cycles |
| `ahb_external_memory_registers` | AHB slave holding enable, read_only and per-bank wait states |
| `external_memory_controller` | the EMC: both slaves together |
| `ext_sram` | lane-organised memory; used for both the data and the invert-bit memory |
| `emc_system` | top: EMC wired to a data memory and an invert-bit memory |

## The coding rule, lane by lane

For lane *l*, with new byte `D`, the byte currently on the lane's lines `B`,
and the current invert line `I`:

```
toggles = popcount(D ^ B) + I        // lines that change if D is sent plain
if (toggles > 4)  send ~D, invert = 1
else              send  D, invert = 0
```

`I` is counted because sending plain data while the invert line is 1 also
toggles that line. This is the usual bus-invert decision. The threshold is
half the lane width (`LANE_W/2`). With this rule at most 4 of the 9 lines of
a lane change per transfer; without coding, up to 8 can. A tie (exactly 4)
is sent plain.

The coded value is registered. `mem_dataout_o` and `mem_invertbits_o` *are*
the encoder's state, and the comparison is made against what is really on
the wires. Only lanes enabled for the current write are loaded. The others
keep both their data and their invert bit, so each stored invert bit always
belongs to the byte beside it.

Decoding needs no state. The memory returns each byte with the invert bit
it was written with, and `bus_invert_decoder` XORs the lane with it. Bytes
written by different transfers, with different coding decisions, can share
a word and still decode correctly.

The parameter `INVERT_EN` (default 1) on the encoder, controller, EMC and
top builds the same hardware with coding off. The invert lines then stay 0.
This is the reference configuration that coding is compared against.

## Memory cycles and AHB timing

`ahb_external_memory_controller` is one AHB slave port serving four banks.
`hsel_mem` has one select bit per bank (one-hot; an assertion checks this).
Bank *b* uses bit *b* of the chip-enable, output-enable and write-enable
outputs. The byte enables `mem_byte_enabled_n_o` are per lane, derived from
`hsize` and `haddr[1:0]` (little-endian). All memory outputs are registered.

Each NONSEQ or SEQ transfer becomes one memory cycle. Burst beats are
simply successive transfers, accepted back to back. IDLE and BUSY transfers
get the zero-wait OKAY reply and touch nothing. With *W* the bank's read or
write wait-state count:

```
cycle         0         1          2 .. 2+W          3+W
AHB           address   data phase ----------------> last data-phase cycle
controller    accept    START      ACCESS            completion (hready_mem = 1)
write         -         hwdata     we_n, ce_n low,   strobes released
                        coded      coded data out
read          -         -          oe_n, ce_n low    decoded mem_data_i on hrdata_mem
```

* The data phase lasts **W + 3** cycles. The strobes stay active for
  **W + 1** cycles.
* A new address phase is accepted in the completion cycle, so a burst runs
  with no dead cycles on the AHB side. On the memory side, two cycles pass
  between one access and the next.
* The memory model is synchronous: it returns read data one clock after the
  strobes. The completion cycle of a read therefore sees the data sampled at
  the end of the last ACCESS cycle.
* `mem_dataout_en_o` is high while write strobes are active. It is meant
  for the output enable of bidirectional data pads.

A write while `read_only` is set, or any access while `enable` is clear, runs
no memory cycle. It gets the two-cycle AHB ERROR reply straight after the
address phase: one cycle with `hready_mem = 0`, then one with
`hready_mem = 1`, both ERROR. An assertion in the controller checks this
two-cycle rule.

## Configuration registers (`hsel_reg` slave)

| offset | name | fields | reset |
|---|---|---|---|
| 0x0 | CTRL | [0] enable, [1] read_only | 0x1 |
| 0x4 | RD_WAIT | [4b+3:4b] read wait states of bank b (b = 0..3) | 0 |
| 0x8 | WR_WAIT | [4b+3:4b] write wait states of bank b | 0 |

Writes take the whole word whatever the size. Other offsets read 0. The
slave never waits and always answers OKAY. The address phase is registered,
and the data phase either writes `hwdata` or drives `hrdata_reg`.

## The memory system (`emc_system`)

The invert bits are not kept in a 36-bit memory. They go to a second memory
that shares every address and control line with the data memory:

* data memory: 4 lanes x 8 bit x 2k words (`ext_sram`, `LANE_W = 8`)
* invert-bit memory: 4 lanes x 1 bit x 2k words (`ext_sram`, `LANE_W = 1`)

Both sit on bank 0 and use word address `mem_address_o[12:2]`. On a read,
`ext_sram` updates only the enabled lanes of its output register. Idle lanes
of the read bus hold their value, so a byte read toggles at most one lane
of the read bus. Banks 1 to 3 have no memory in this top. Their strobes and
the shared bus are ports, and their read data returns on `ext_data_i` and
`ext_invertbits_i`. A one-flop select picks bank 0's memory or those inputs,
according to the last output enable used.

The AHB arbiter, address decoder and reply multiplexer belong to the
surrounding system. `hsel_reg`, `hsel_mem` and the global `hready` are
therefore inputs, and each slave brings out its own `hready`, `hresp` and
`hrdata`.

## What coding buys, measured

`tb_emc_workload` drives two copies of `emc_system`, one with coding and one
without, with identical traffic. For each transfer size it makes 1000 writes
of uniformly random data to random addresses, then 1000 reads of the same
addresses. It counts transitions on the write bus and the read bus (one
run; the counts vary slightly with the random seed):

| transfer size | data lines, coding off | data lines, coding on | invert lines | total, coding on | change |
|---|---|---|---|---|---|
| 8 bit | 7964 | 5900 | 730 | 6630 | -17% |
| 16 bit | 16002 | 11718 | 1394 | 13112 | -18% |
| 32 bit | 32022 | 23186 | 2970 | 26156 | -18% |

These are the gains expected from bus-invert on random data. The original
description of this controller reports a much larger cut on the 32-bit
data lines (from about 28,000 to about 11,600 transitions over the same
number of accesses). Per-lane bus-invert cannot do that on uniformly random
data, and this implementation does not reproduce it. They are line
transitions only. Power also depends on the pad and board loads, and on the
extra internal logic: the coder is four 8-bit popcounts, four comparators
and 36 XORs, small next to the rest of the controller.

`tb_emc_convolution` runs a 3x3 smoothing filter over a 32x32 8-bit image
held in the memory. The image is a gradient plus noise, so neighbouring
pixels are correlated. The testbench acts as the processor, with 8, 16 or
32-bit accesses:

| access size | total, coding off | total, coding on |
|---|---|---|
| 8 bit | 28581 | 40850 |
| 16 bit | 28629 | 34323 |
| 32 bit | 27368 | 26217 |

Coding helps for word accesses but costs for narrow ones on this image. The
image is written once with word writes, and the coder picks each byte's
invert bit from the write history at that moment. Correlated neighbours can
end up stored with different invert bits. Reading them back one at a time
then flips a whole lane of the read bus. The read path never re-codes; it
returns what was stored. Keep this in mind for workloads dominated by
narrow reads of correlated data.

## Fidelity: what is given and what is chosen here

The following come from the design description:

* the per-byte-lane bus-invert coding and the four extra lines;
* the conditional-inversion decoder;
* idle lanes left untouched on writes and only active lanes returned on
  reads;
* the split into a register slave and a memory-controller slave;
* all port names and widths of the EMC;
* the names enable, read_only, read_wait_state0..3 and
  write_wait_state0..3;
* one slave port serving four banks through `hsel_mem`;
* separate 4 x 8bit x 2k data and 4 x 1bit x 2k invert-bit memories on
  shared address lines.

This implementation's own choices:

* the exact decision rule, with the tie sent plain;
* the cycle sequence and timing above, and the 4-bit wait-state fields;
* the register map and reset values;
* the ERROR cases for read_only and enable;
* one chip/output/write-enable bit per bank, and little-endian lanes;
* the synchronous memory model;
* bank 0 for the memories, and the read-data select for the other banks;
* coding on or off as a build parameter (`INVERT_EN`) rather than a
  register bit.

Not included:

* the processor, bus fabric and peripherals of the surrounding SoC;
* the wrapper used for gate-level power analysis. It put a load buffer on
  every off-chip line and has no logic function.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M` and stops itself after a fixed number of
cycles if something hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_emc_system rtl/emc_pkg.sv tb/tb_emc_system.sv
./obj_dir/Vtb_emc_system
```

| testbench | covers |
|---|---|
| `tb_bus_invert_encoder` | coding against a reference model, at most 4 toggles per lane, idle lanes, one-cycle latency, bypass |
| `tb_bus_invert_decoder` | all invert patterns |
| `tb_ext_sram`, `tb_ext_sram_invbits` | both memory shapes: lane writes, one-cycle reads, idle lanes holding |
| `tb_ahb_external_memory_registers` | reset values, register read and write, ignored IDLE, BUSY and unselected transfers |
| `tb_ahb_external_memory_controller` | sizes, bursts with BUSY, four banks, data phase W + 3 and strobes W + 1 cycles, ERROR replies, coded lines stored |
| `tb_external_memory_controller` | wait states and modes programmed over AHB, then checked on memory transfers |
| `tb_emc_system` | top at default sizes: whole-memory fill and burst read-back, random mixed traffic, external bank, ERROR replies; counts every mechanism |
| `tb_emc_workload` | random-data switching activity, coding on against off |
| `tb_emc_convolution` | image-filter switching activity, coding on against off |

`tb/tb_ahb_tasks.svh` is the shared AHB master. It issues pipelined bursts,
optionally with a BUSY cycle, and records read data, responses and the
length of each data phase.

The testbenches assume a two-state simulator. Everything that is read is
reset or written first, except the memory arrays, which are always written
before they are read.

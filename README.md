# Memory-centric building blocks for mobile inference

Moving data costs a mobile SoC more energy than computing on it. This RTL collects three
memory designs, each built around that idea. They sit side by side in one top level,
`imsys_top`, and share only the clock and reset.

* **Compute SRAM (CRAM).** 16 KB SRAM banks that behave as ordinary memory for a small
  processor, but can also run bit-serial vector operations on all 256 rows of a bank at once.
  An instruction can be streamed into several banks in the same cycle.
* **DLA memory system.** This is the memory side of a four-PE deep-learning accelerator:
  * 96-bit words that hold 3 to 16 weights, depending on precision;
  * pack and unpack buffers;
  * a non-uniform (NUMA) memory per PE with four levels of bank size;
  * sequential word-line decoders with clock-gated groups;
  * banks that drop into a drowsy (retention) state until someone needs them.
* **Voltage-stacked SRAM bank.** Four arrays, each belonging to a top or a bottom supply
  domain. Only bottom arrays are accessed. An access to a top array first swaps it with a
  bottom array in one cycle.

The analog parts that give these designs their energy savings are not RTL, and are not here:
* the bit cells, sense amplifiers and wordline/bitline circuits;
* power gating and level shifting;
* the charge-recycling regulator of the stacked SRAM.

What is here is the digital behaviour: data layout, control, arbitration and timing.

## CRAM: computing along the bit lines

### Array and bank
`cram_array` is a 128 x 256 array of transposable cells, reachable from two directions:
* **Row port.** Reads or writes one 32-bit word of a row. Word `w` sits in columns
  `32w .. 32w+31`. Reads have one cycle of latency.
* **Column ports.** Return bit column RA and bit column RB of all 128 rows
  combinationally. At the clock edge, the column port writes bit column RD in every row
  whose per-row enable is set.

`cram_bank` stacks four arrays (TL, TR, BL, BR) into 16 KB. A bank has 256 compute rows:
* Rows 0-127 live in the top arrays, rows 128-255 in the bottom arrays.
* Instruction bit 29 picks the left pair (TL/BL) or the right pair (TR/BR).
* The 12-bit memory address is `{array[1:0], row[6:0], word[2:0]}`.
* An element stored as word slot `w` of a row has its bit `i` on compute word-line `32w+i`.

The bank always gives priority to an instruction. When `instr_valid` is high, `mem_gnt` is
low and the memory request must wait.

### Instruction word
| bits  | field |
|-------|-------|
| 31:28 | enables (bit 28: conditional on tag, bit 29: right array pair, 31:30 unused) |
| 27:24 | opcode |
| 23:16 | RA |
| 15:8  | RB |
| 7:0   | RD |

There are sixteen single-cycle primitives, decoded by `cram_ctrl`:
* bitwise AND / OR / NAND / NOR / XOR / XNOR of RA and RB into RD;
* ADD: a full-adder sum goes to RD and the carry latch takes the carry out;
* COPY and INV of RA;
* EQUAL: tag = (RA == RB[0]);
* LOAD_T: tag = RA;
* STORE_C and STORE_T: write the carry or the tag to RD;
* SET_C and RESET_C;
* C_TO_T: tag = carry.

In conditional mode, write-back only happens in rows whose tag is 1. EQUAL and LOAD_T then AND
into the tag, so a multi-bit search is one EQUAL per bit.

Each row has its own peripheral (`cram_compute_periph`):
* The compute bit lines give AND and NOR.
* XOR is derived from those two.
* A full adder uses the carry latch.

### Bit-serial arithmetic
Multi-bit operations are short programs of primitives, one instruction per cycle. Instruction
counts for N-bit operands:

| operation | program | instructions |
|-----------|---------|--------------|
| add | RESET_C, then N x ADD | N+1 |
| subtract | N x INV of B, SET_C, then N x ADD | 2N+1 |
| multiply | shift-and-add under tag control: for each multiplier bit, LOAD_T of that bit, then a conditional ADD of the multiplicand into the partial product at that offset, then STORE_C of the carry | N²+5N-2 |
| XOR | N x XOR | N |
| search | N x EQUAL | N |

`tb_cram_bank` runs all of these on 256 random 8-bit pairs and checks both the results and
the instruction counts.

### System and control bus
`cram_system` holds eight banks:
* A CPU port addresses any bank: the address is `{bank[2:0], 12-bit bank address}`.
* The control bus (`cram_ctrl_bus`) is started with a source bank, a start address, a
  count and a destination bank mask. It then fetches one instruction per cycle from the
  source bank and broadcasts it to all masked banks, one cycle after the fetch.
* While the bus is busy, CPU accesses to the source bank or to an executing bank are refused.
  Other banks still serve the CPU.
* The processor itself is not included.

## DLA memory: words, levels and sleeping banks

### Precision packing
A 96-bit word holds 16, 12, 8, 6, 4 or 3 elements, at precisions of 6, 8, 12, 16, 24 or
32 bits. Element `k` sits in bits `k*P .. k*P+P-1`.
* `dla_unpacker` is a two-word ping-pong buffer. It emits one sign-extended element per
  cycle while the next word is being written.
* `dla_packer` collects elements into a word and hands completed words to a one-word output
  register. A `flush` closes a partial word, with zeros in the unused slots.

Both use valid/ready handshakes.

### NUMA sector
Each PE owns a 67.5 kB sector (`dla_numa_mem`) with four levels of four banks each:

| level | words per bank | bytes per bank | sector address range |
|-------|----------------|----------------|----------------------|
| 1 | 32 | 384 | 0-127 |
| 2 | 128 | 1.5 k | 128-639 |
| 3 | 256 | 3 k | 640-1663 |
| 4 | 1024 | 12 k | 1664-5759 |

* The sector address is 13 bits.
* Address, data and enable lines of a level that is not accessed are held at zero. An access
  to a small, near bank therefore does not toggle the wires of the large ones.
* Reads return data two cycles after the grant.

`dla_mem_system` joins four sectors through `dla_mem_arbiter`:
* A PE address is 15 bits: `{sector[1:0], sector address}`.
* Each sector serves one PE per cycle. Its own PE wins; otherwise the lowest-numbered
  requester wins.
* A PE holds its request until `pe_gnt`.

### Sequential decoder
`dla_seq_decoder` replaces a normal row decoder:
* A one-hot token marks the active word-line.
* A random access loads the token from the address.
* A sequential access moves the token to the next row.
* Rows are grouped by 16. Only the group holding the token, and the group it will enter next,
  have their clock enabled.

In `dla_sram_bank`, each bank is four sub-arrays that share one decoder. The sub-array
index advances when the token wraps. A sequential burst therefore walks the whole bank.

The decoder state belongs to the bank. A sequential access (`seq=1`) must follow, without a
gap, an access to the previous address of the same bank. The address lines are ignored
during such an access.

### Drowsy banks
`dla_drowsy_ctrl` keeps one drowsy bit per bank:
* A schedule write (`sched_we`, `sched_mask`) puts banks to sleep. Power-gate and clamp
  enables follow the drowsy bits.
* A request to a drowsy bank raises `wake`. The request is refused for that one cycle and
  granted in the next.
* Data is kept while drowsy.

## Voltage-stacked bank
`vs_sram_bank` has four 256 x 128-bit arrays. `vs_swap_ctrl` holds the top/bottom domain
mark of each array, with at most three arrays in the top domain.
* An access to a bottom array is granted at once.
* An access to a top array is refused for one cycle. In that cycle the array swaps domains
  with the lowest-numbered bottom array, and `expand` marks both arrays.
* The access is then granted.
* Data stays where it is. Only the domain membership changes.
* Reads return data one cycle after the grant.

## Timing summary
| block | request to data |
|-------|-----------------|
| CRAM row read | 1 cycle after grant |
| CRAM instruction | effective at the next edge; back to back |
| DLA bank / sector / PE read | 2 cycles after grant |
| drowsy wake | +1 cycle |
| VS read | 1 cycle after grant; +1 cycle when a swap is needed |

## Where this design departs from, or adds to, its source
These are this design's own choices:
* opcode numbering and enable-bit meanings;
* the word layout inside CRAM rows and the CRAM memory-port protocol;
* control-bus latency;
* DLA read latency;
* the wake-on-demand rule;
* the choice of swap partner.

Not modelled:
* The processing element of the accelerator and its instruction format.
* The serial chip-to-chip bus.
* All analog circuits.

The CRAM bank count, array geometry, instruction field layout and bit-serial cycle counts
follow the published design. So do the DLA precisions, word width and NUMA level sizes,
and the four-array organisation of the stacked bank.

## Capacity check
With the defaults, the DLA memory totals 4 x 5760 words of 96 bits, i.e. 276,480 bytes.
* A keyword-spotting network with fully connected layers of 384x408, 384x384 and 24x384 at
  6-bit weights needs 19,584 words. It fits.
* A face-detection network with layers of 16x1032 and 2x16 at 8-bit weights needs 1,379 words.

The CRAM benchmarks (convolution, fully connected layer, FIR filter, graph traversal) use 2 to 6
arrays. The system has 32.

## Simulating
Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/cram_pkg.sv rtl/dla_pkg.sv tb/tb_cram_bank.sv --top-module tb_cram_bank
./obj_dir/Vtb_cram_bank
```

`tb_imsys_top` runs all three subsystems together at full size. It checks data end to end,
and fails if any of these mechanisms never occurred:
* program streaming, CPU refusal and instruction execution;
* sector conflicts, remote accesses, drowsy wake-ups, level gating and sequential bursts;
* array swaps.

The memories are plain register arrays, so synthesising the full top level is slow. The CRAM
holds 1 Mbit and the DLA memory 2.2 Mbit, and the CRAM cells have two access directions.

# Shift-and-Safe: a CNN accelerator with activation memories below Vmin

Lowering the supply of on-chip SRAM below its safe minimum (Vmin, about 0.6 V
here) saves energy, but some bitcells then fail permanently. At an ultra-low
0.53 V several percent of the 16-bit activations in a CNN accelerator's
activation memories have at least one faulty cell, which is enough to ruin
inference accuracy. Shift-and-Safe (SaS) keeps the accuracy with two cheap
tricks in the memory's read and write ports:

* **Shift.** Activations rarely use the magnitude bits just below the sign
  bit. A damaged word is stored with its magnitude moved two places left, so
  the faulty cells hold less significant bits. On the way out it is moved back
  two places right. A word whose faults are all in the high byte is also
  bit-reversed ("flipped"), which moves those faults into the low byte.
* **Safe.** A word with faults in both bytes cannot be rescued this way. Its
  value goes into the last bank of the memory instead. That bank is kept at
  the safe supply, and layers rarely need it for their own data. Activations
  are written and read strictly in order, so the bank can work as a FIFO
  driven by a single pointer.

This repository holds synthesizable SystemVerilog for the SaS activation
memory and for a small accelerator built around two of them. The accelerator
has a 16 x 16 output-stationary PE array, a weight memory, a dispatcher, an
output buffer and a control unit.

## The four activation classes

Two control bits (C) per activation are fixed once, at post-fabrication test,
from the map of faulty cells. They are stored in a separate C-bit array at
the safe supply, so they are fault-free (256 KiB for a 2 MiB memory). Bit 15
is the sign `s`.

| C  | class    | faulty cells      | stored word                      | restored on read                        |
|----|----------|-------------------|----------------------------------|-----------------------------------------|
| 00 | reliable | none              | `a`                              | `a`                                     |
| 01 | L        | low byte only     | `{s, a[12:0], 00}`               | `{s, 00, w[14:2]}`                      |
| 10 | M        | high byte         | `flip({s, a[12:0], 00})`         | `f = flip(w)`, then `{f[15], 00, f[14:2]}` |
| 11 | M&L      | both bytes        | `a` (unused) + copy in safe bank | copy from the safe bank                 |

`flip` swaps bit 15 with 0, 14 with 1, and so on. It is its own inverse. Here
`w` is the word as read back, faults included.

* **Loss from the shift.** The shift is lossy on purpose. Bits 14:13 of an L
  or M activation are lost; they are almost always zero. Faulty cells in the
  low byte now spoil the value's bits 5:0 instead of 7:0.
* **Number format.** Numbers are two's complement, as the PE arithmetic
  uses. The shift is exact only for values whose bits 14:13 are zero, which
  means non-negative values below 2^13, such as post-ReLU activations.
  A negative value has ones in those bits and comes back wrong after an L or
  M round trip. The scheme relies on stored activations being small and
  non-negative. If a format other than two's complement were wanted, only
  the two shift functions in `sas_pkg` would change.
* **Sign bit of an M activation.** After the flip, the sign bit sits in cell 0.
  That cell is in the low byte, where an M activation has no faults.

On the read side (`sas_read_port`) each of the 16 activations of a block has
a 4-to-1 multiplexer steered by its C bits. Input 0 is the word as read.
Inputs 1 and 2 are the shift-back and flip-then-shift-back paths. Input 3 is
a per-lane holding register filled from the safe bank. `sas_write_port` is
the mirror image on the write side.

## The safe bank and the Safe Pointer

Each activation memory is 2 MiB: eight 256 KiB banks behind one
read/write port that moves 32-byte blocks (16 activations). Bank 7 is the
safe bank, which holds 131072 activations. Layers are stored from address 0
upwards, so the safe bank's entries sit at the top of the address space.

`safe_pointer` holds SP, the activation address of the next safe-bank entry.

* SP starts at the last address (0xFFFFF) and moves one entry down for every
  M&L activation.
* When the memory is the output buffer of a layer, each M&L activation is
  written to the entry at SP. When the memory is the input buffer, each M&L
  activation is read back from the entry at SP.
* SP goes back to the last address whenever the memory swaps its input/output
  role, which happens after every layer.

This has three consequences a user must respect:

1. **Order.** The blocks of a layer must be read in the same order they were
   written, and each block only once. Re-reading a block, or reading out of
   order, hands M&L activations to the wrong lanes. The control unit here
   reads and writes strictly in ascending address order.
2. **No swap mid-block.** The role must not change while the memory is still
   working on a block, or SP restarts in the middle of the block. The control
   unit waits for the destination memory to go idle before it swaps.
   `sas_act_mem` asserts this.
3. **Capacity.** The layer data and the safe entries must not meet. The
   largest layer of the benchmarks SaS was evaluated on is 1.56 MiB (VGG16),
   and 1.75 MiB lies below the safe bank. Even if every one of the 6.9 %
   faulty activations seen at 0.53 V were M&L, that layer would need about
   56 k safe entries, well under 131 k. `sp_overflow` is a sticky flag for
   the case where more entries are used than the safe bank holds.

Only one port serves both the regular banks and the safe bank. A
safe-bank access therefore reads or writes a whole block with a single-lane
write enable and uses one lane of the read data.

## Timing of a SaS memory access

Latency numbers assume the default on-chip access latency L = 3 cycles, and k
is the number of M&L activations in the block.

* **Read.** Cycle t is the cycle in which the request is accepted. The block
  and its C bits come back together at t+L. With k = 0 the restored block is
  valid at t+L+1. Otherwise the k safe-bank reads are issued on consecutive
  cycles, and the block is released at t+2L+k+1. A block therefore costs L+k
  extra cycles per read when it holds M&L activations, and nothing extra when
  it does not.
* **Write.** The C bits of the target block are read first (L cycles). Then
  the transformed block is written in one cycle, followed by one cycle per M&L
  activation into the safe bank. The memory is free again at t+L+1+k.
* **Output handshake.** `out_valid` stays high, with the data held, until
  `out_ready` takes the block.

## The accelerator around the memories

```
           host ports                                     host ports
               |                                              |
   weights -> scratchpad (2 MiB) --w rows--> dispatcher <-- a rows -- sas_act_mem[src_sel]
                                                 |  skewed
                                                 v
                                        pe_array 16 x 16  (output stationary)
                                                 |  all 256 sums
                                                 v
                                        output_buffer --rows in order--> sas_act_mem[!src_sel]
                 control_unit sequences everything and toggles src_sel after each layer
```

* **Layer shape.** A layer is a pointwise layer with 16 input and 16 output
  channels. The input is a matrix X of P = 16·num_tiles rows (one 32-byte
  block per row), and the output is Y = X·W, where W is a 16 x 16 weight tile.
  Layer l uses weight blocks 16l to 16l+15. Block k holds row k of W.
* **Tiles.** For each tile of 16 rows, the control unit reads the 16 input
  blocks into the dispatcher and runs the array for 46 cycles (16 + 15 + 15).
  The output buffer then writes the 16 result rows to the other memory.
* **Schedule.** At step t the dispatcher drives row i of the array with
  A[i][t-i] and column j with W[t-j][j]. Activations move right and weights
  move down, so A[i][k] and W[k][j] meet in PE (i,j) at step k+i+j.
* **Output conversion.** Each PE keeps a 40-bit sum. The output buffer shifts
  it right arithmetically by `frac_bits` and saturates it to 16 bits.
* **Roles.** After reset, memory 0 is the output buffer, so the host writes
  the input image into it. `start` swaps the roles. Each finished layer swaps
  them again, and when `done` pulses the final result sits in the memory that
  is now the input buffer (`src_sel`), ready to be read out in order.

Host sequence, all valid/ready handshakes while `busy` is low:

1. Write the C bits with `cprog_*`.
2. Write the weights with `wload_*`.
3. Write the input rows with `host_wr_*`, from block 0 upwards.
4. Pulse `start` with `num_layers`, `num_tiles` and `frac_bits`, and wait for
   `done`.
5. Read the result with `host_rd_*` / `host_out_*`, from block 0 upwards.

## Parameters

| parameter (module)              | default | meaning                                  |
|---------------------------------|---------|------------------------------------------|
| `BANKS` (top, memories)         | 8       | banks per 2 MiB memory                   |
| `BANK_BLOCKS` (top, memories)   | 8192    | 32-byte blocks per bank (256 KiB)        |
| `LATENCY` (top, memories)       | 3       | on-chip memory access latency, cycles    |
| `ROWS`, `COLS` (top, array)     | 16, 16  | PE array size (the tiling assumes 16x16) |
| `ACC_W` (top, PE)               | 40      | accumulator width                        |
| `ACT_W`, `LANES`, `SHIFT` (`sas_pkg`) | 16, 16, 2 | activation width, activations per block, shift distance |

The safe bank is always the last bank, and SP's range follows from `BANKS`
and `BANK_BLOCKS`.

## What follows the SaS scheme and what is this design's own

These parts follow the published scheme:

* the four C classes and their codes
* the two-place shift that keeps the sign bit
* the flip
* the 4-to-1 read multiplexers and their input arrangement
* the per-lane holding elements for safe-bank values
* the FIFO use of the last bank with a pointer that resets on each role swap
* sharing one port between regular and safe-bank accesses
* the sizes: 2 MiB memories in eight 256 KiB banks, 32-byte accesses,
  16-bit fixed point, and a 16 x 16 output-stationary array
* the swap of activation-memory roles after every layer
* the 3-cycle memory latency

These are choices made here:

* **Holding elements.** They are edge-triggered registers, not latches.
* **Safe Pointer direction.** It counts down from the last address. The
  published description starts at the last address and also speaks of
  ascending addresses; counting down is the reading that stays inside the
  memory.
* **Write port.** It is described only as similar to the read port. Here it
  writes the block first and then the M&L copies in lane order. It reads the
  C bits before each write, which costs L cycles per written block.
* **Interfaces and sequencing.** All handshakes, state machines and host
  ports are new.
* **Overflow flag.** The sticky `sp_overflow` flag is an addition.
* **Weight memory.** It is organised like an activation memory.
* **Dispatcher.** A single dispatcher holds both tiles.
* **Layer type.** The only supported layer is the pointwise 16 -> 16 layer.
  There is no activation function and no pooling, and the number format is
  a run-time `frac_bits` shift with saturation.

Not built:

* The separate supply domains. The logic is the same whatever the supply.
* Spilling of layers larger than 2 MiB to off-chip memory.
* The post-fabrication test that finds the faulty cells.

The networks SaS was evaluated on (AlexNet, SqueezeNet, VGG16, ZFNet) need
convolutions with larger kernels and other channel counts, which this
control unit cannot sequence. Their activations would fit in the memories.

## Verification

Every module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`.

* **`tb_sas_act_mem`.** This is the central test. It programs random C bits
  and forces matching stuck-at faults into the undervolted banks on every
  clock. It writes a layer, swaps roles and reads it back. Each activation is
  compared with a reference model of store, fault and restore. The test also
  checks the latency formulas above and the SP value after each phase.
* **`tb_sas_accelerator`.** This runs a 3-layer network end to end on small
  memories (16 blocks per bank), with faults in both activation memories.
  It compares the result bit for bit with a reference model. It fails if any
  of these never happened: the L shift, the M flip, a safe-bank store, a
  safe-bank restore or a role swap.
* **`tb_sas_accelerator_full`.** This is the same test with every parameter
  at its default: three 2 MiB memories. It takes about 40 s in Verilator.
* **`tb_sas_fault_impact`.** This test writes 1024 small non-negative
  activations into a SaS memory, with about 70 % of them given stuck cells
  that disagree with the stored bits. It checks that reliable and M&L values
  come back exact, and that L and M values differ only in bits 5:0. It also
  compares the total error with that of an unprotected memory holding the
  same stuck cells. A typical run shows an error of 4 200 for SaS against
  4.6 million unprotected.
* **Unit testbenches.** `tb_sas_write_port`, `tb_sas_read_port`,
  `tb_safe_pointer` (including overflow), `tb_cbit_memory`, `tb_scratchpad`,
  `tb_act_sram_bank`, `tb_pe`, `tb_pe_array`, `tb_dispatcher`,
  `tb_output_buffer` and `tb_control_unit`.

Faults are injected from the testbenches through hierarchical references
into the bank arrays (`...u_mem.g_bank[b].u_bank.mem`). The RTL itself is an
ideal SRAM.

To run a testbench with Verilator 5 (from the directory that holds `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sas_pkg.sv tb/tb_sas_accelerator.sv --top-module tb_sas_accelerator
./obj_dir/Vtb_sas_accelerator
```

Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/sas_pkg.sv rtl/<module>.sv`.

## Files

| file                    | content                                               |
|-------------------------|-------------------------------------------------------|
| `rtl/sas_pkg.sv`        | sizes, block types, C codes, shift and flip functions |
| `rtl/sas_write_port.sv` | write-side transforms                                 |
| `rtl/sas_read_port.sv`  | read-side multiplexers and safe-bank holding registers|
| `rtl/safe_pointer.sv`   | Safe Pointer                                          |
| `rtl/cbit_memory.sv`    | C-bit array                                           |
| `rtl/act_sram_bank.sv`  | one 256 KiB bank                                      |
| `rtl/scratchpad.sv`     | 2 MiB banked memory with a single block port          |
| `rtl/sas_act_mem.sv`    | one SaS activation memory (the above put together)    |
| `rtl/pe.sv`, `rtl/pe_array.sv` | processing element and 16 x 16 array           |
| `rtl/dispatcher.sv`     | tile buffers and skewed feed                          |
| `rtl/output_buffer.sv`  | result capture, fixed-point conversion, ordered output|
| `rtl/control_unit.sv`   | layer sequencing and role swaps                       |
| `rtl/sas_accelerator.sv`| top level                                             |

# A bit-serial SIMD array for multi-lead ECG wavelet processing

A 12-lead electrocardiogram gives twelve sample streams that must all go
through the same signal processing at the same time. Spline wavelet analysis
is one example: each beat of each lead is cut into about 410 cubic-spline
segments, and every segment needs a small matrix computation. A 15-lead
system needs three more streams. The work is identical across leads, so one
instruction stream can drive many data paths. This processor is built on
that idea. A single control unit broadcasts one instruction per clock cycle
to 16 processing elements (PEs) arranged as a 4x4 torus, one PE per lead.
Each PE is bit-serial: it handles one bit of its operands per cycle, so a PE
is tiny and the array can be as wide as the number of leads.

```
  front-end processor (word at a time)           12-15 ADCs (not in RTL)
        |  prog_*   start/busy/done                   |
        v                                              v
  +-----------------+   ctrl, addresses   +---------------------------+
  | simd_control_   |-------------------->| io_register_bank          |<-- io_* (8-bit words)
  | unit (1 PC)     |----+                | 16 x 8-bit shift registers |<-> ser_* (serial chain)
  +-----------------+    |                +---------------------------+
                         |                     | bit-slice (16 bits)
                         v                     v
  +-------------------------------------------------------------+
  | bitplane_memory: 32768 bit-planes x 16 bits (bit k = PE k)   |
  +-------------------------------------------------------------+
         | rd1, rd2 (16 bits each)      ^ wd, we (16 bits)
         v                              |
  +-------------------------------------------------------------+
  | pe_torus_array: 4x4 simd_pe, edges wrapped; each PE holds     |
  | carry C, activity M and a 32-bit bit_serial_mult              |
  +-------------------------------------------------------------+
```

The RTL is in `rtl/`. The top module is `ecg_simd_top`. All shared types and
sizes are in `ecg_simd_pkg`.

## Data lives in bit-planes

The memory is organised by bit-plane, not by word. Address `a` holds a
16-bit *bit-slice*, and bit `k` of that slice belongs to PE `k`. An n-bit
number is a *field*: n consecutive addresses, least significant bit at the
lowest address. Every PE has its own number in the same field. The control
unit sends one address, and all 16 PEs read (or write) the same bit of
their own numbers.

The memory has two asynchronous read ports, `rd1` and `rd2`, and one
synchronous write port. The write port has one enable per PE. A PE's enable
is its activity bit `M` ANDed with "this op writes", so a PE whose `M` is 0
sits out writing instructions. The memory has no reset, like an SRAM. A
program must write a plane before reading it. XOR-ing any plane with itself
is a convenient way to clear a field.

PE `k` sits at row `k / 4`, column `k % 4`. Its four neighbours wrap around,
so the array is a torus: the north neighbour of row 0 is row 3, and the east
neighbour of column 3 is column 0.

## Instructions are repeated bit operations

Each instruction carries an opcode, a direction, a repeat count `LEN` (1-64)
and three 15-bit addresses: `dst`, `src1` and `src2`. `mk_instr()` in the
package builds one. The control unit runs the instruction for `LEN`
consecutive cycles. In repetition `i` it broadcasts `src1+i`, `src2+i` and
`dst+i`, so one instruction processes one whole field, LSB first, at one
bit per cycle. The next instruction starts in the following cycle, with no
gap. A program is a straight list that ends with `OP_HALT`. There are no
branches; the front-end processor decides what runs next.

| opcode | per repetition i (in every PE with M = 1 for writes) |
|---|---|
| `OP_CLRC` / `OP_SETC` | C = 0 / C = 1 |
| `OP_MOV`, `OP_NOT` | mem[dst+i] = mem[src1+i], or its inverse |
| `OP_AND`, `OP_OR`, `OP_XOR` | mem[dst+i] = mem[src1+i] op mem[src2+i] |
| `OP_ADD` | mem[dst+i] = sum of mem[src1+i], mem[src2+i] and C; C = carry |
| `OP_SUB` | the same with mem[src2+i] inverted; set C first (two's complement) |
| `OP_SETM` / `OP_SETMALL` | M = mem[src1] / M = 1 |
| `OP_NEWS` | mem[dst+i] = mem[src1+i] of the neighbour in `dir` (N, E, S, W) |
| `OP_MCLR` | clear the multiplier |
| `OP_MLD` | shift mem[src1+LEN-1-i] into the multiplier (MSB first) |
| `OP_MUL` | multiplier step with mem[src1+i]; mem[dst+i] = multiplier output |
| `OP_MULZ` | multiplier step with 0; mem[dst+i] = multiplier output |
| `OP_IOIN` | mem[dst+i] = slice shifted out of the I/O registers (all PEs) |
| `OP_IOOUT` | the I/O registers shift in mem[src1+i] |
| `OP_HALT` | stop; `done` pulses for one cycle |

A carry is only updated in PEs whose `M` is 1. Timing: an instruction with
repeat count `LEN` takes exactly `LEN` cycles, and `OP_HALT` takes one.
`start` begins a program at address 0 in the cycle after it is sampled.

## The bit-serial multiplier

Each PE contains a carry-save serial/parallel multiplier (`bit_serial_mult`)
with W = 32 cells. Each cell has:

- a multiplicand flip-flop M;
- an AND gate forming (M AND input bit);
- a full adder;
- a sum flip-flop S;
- a carry flip-flop C.

The full adder adds the AND output, the cell's own carry and the sum
flip-flop of the next cell up. So each step moves the partial product one
cell towards the output, while each cell keeps its own carry.

1. `OP_MCLR` clears all M, S and C.
2. `OP_MLD` shifts the multiplicand in, MSB first, through the M chain. After
   n loads, cell k holds multiplicand bit k (n <= 32; the cleared cells above
   stay 0).
3. `OP_MUL` applies the multiplier, LSB first, one bit per step.
4. `OP_MULZ` applies zeros, to push out the upper half of the product.

The output is the S flip-flop of cell 0. After the step that applies
multiplier bit t, it holds product bit t. `OP_MUL`/`OP_MULZ` write the
output *before* their own step, so the product is one plane further up than
`dst`. For an a-bit multiplicand and a b-bit multiplier:

```
MCLR 1;  MLD a, src=A;  MUL b, dst=P, src=B;  MULZ a+1, dst=P+b
-> product bits 0 .. a+b-1 at planes P+1 .. P+a+b   (1 + 2a + 2b + 1 cycles)
```

For 32 x 32 bits this is 1 + 32 + 32 + 33 = 98 cycles. That is the time
needed to read both operands and write the 64-bit product, one bit at a
time; 32 full adders is all the hardware it takes. Operands are unsigned.

## Getting samples in and results out: the I/O registers

The front-end processor works a word at a time, while the array works on
bit-planes. `io_register_bank` converts between the two. It has one 8-bit
shift register per PE.

- **In.** The front end writes each register in one cycle (`io_we`,
  `io_addr`, `io_wdata`). `OP_IOIN` with LEN 8 then shifts all 16 registers
  together. Each cycle, the 16 LSBs form one bit-slice, which is written to
  plane `dst+i`. Eight cycles store sixteen 8-bit words as an 8-bit field.
- **Out.** `OP_IOOUT` shifts plane `src1+i` into the registers' MSBs. After
  8 repetitions, register k holds PE k's 8-bit field, ready for `io_rdata`.
  After a shorter transfer of n planes, the data sits in the top n bits of
  each register.
- **Serial.** `ser_en` shifts the 16 registers as one 128-bit chain, from
  `ser_in` into register 0 and out of register 15 at `ser_out`. The
  registers need no addressing in this mode.

A front-end write that lands in the same cycle as a shift takes precedence
for the register it addresses. Front-end transfers can overlap array
computation, as long as no I/O instruction is running.

## Interface of `ecg_simd_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `prog_we`, `prog_addr`, `prog_data` | in | 1, 6, 58 | write one instruction (`instr_t`) into the 64-word program memory; not while `busy` (an assertion checks this) |
| `start` | in | 1 | run the program from address 0 |
| `busy`, `done`, `pc` | out | 1, 1, 6 | running; one-cycle pulse at `OP_HALT`; program counter |
| `io_we`, `io_addr`, `io_wdata`, `io_rdata` | in/out | 1, 4, 8, 8 | word access to the I/O registers |
| `ser_en`, `ser_in`, `ser_out` | in/out | 1 | serial chain through the I/O registers |
| `pe_active` | out | 16 | activity bit of each PE |

Parameters: `R`, `C` (torus size, 4x4), `MW` (multiplier width, 32), `IOW`
(I/O register width, 8) and `IMEM` (program words, 64). The memory depth
`MEM_DEPTH` (32768) and the address width are set in `ecg_simd_pkg`.

## Sizes and what they allow

- **Leads.** 16 PEs serve 12 leads with 4 to spare, or 15 leads with 1 to
  spare.
- **Memory.** 32768 bit-planes per PE hold one beat of one lead: about 1707
  samples at 2048 samples/s and 72 beats/min, at up to 16 bits each (27.3k
  planes). Or they hold a 512-sample record with room to work.
- **Spline segment.** Computing the four coefficients of a cubic-spline
  segment (4x4 matrix times 4 samples) with 8-bit operands and 24-bit
  accumulators takes 1044 cycles, for all 16 leads at once. That is 428k
  cycles for 410 segments, so keeping up with 72 beats/min needs a clock of
  about 0.51 MHz. With 32-bit operands the estimate is about 2350 cycles
  per segment and 1.2 MHz. No target clock is specified for this design.

## Where this RTL fills in or departs from the architecture it implements

Taken from the architecture:

- SIMD with one control unit and one program counter;
- 16 PEs in a 4x4 mesh with both pairs of edges joined;
- a memory with one data path per PE;
- bit-serial PEs;
- a 32-full-adder carry-save multiplier that loads the multiplicand MSB
  first and takes the multiplier, and gives the product, LSB first;
- 8-bit I/O shift registers, one per memory column, filled in one
  front-end cycle and emptied in 8 bit-slice cycles, with a serial mode.

Choices made here, because the architecture does not specify them:

- the whole instruction set, the 58-bit format and the repeat mechanism;
- the PE's carry and activity flip-flops;
- memory depth (32768) and the two-read/one-write organisation;
- program memory size (64);
- unsigned multiplication;
- a `clr` input on the multiplier;
- one cycle of output latency, because the product is taken from the sum
  flip-flop of the output cell;
- LSB-first storage of fields;
- the I/O collision rule;
- all reset behaviour.

Not implemented:

- **ADCs.** The 12-15 analog-to-digital converters are analog parts outside
  the RTL. Their samples enter through the front end.
- **Front-end processor.** This is a conventional host, which loads programs
  and moves words through `io_*`. It is also where task scheduling would
  happen.
- **Wavelet software.** No matrix inversion, compression or deviation
  detection routine is provided as an array program. `tb_spline_workload`
  only demonstrates the matrix-vector core of the spline step.
- **Number formats.** Signed or fixed-point arithmetic must be built in
  software from the unsigned operations, for example two's-complement
  correction terms.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it shows |
|---|---|
| `tb_bit_serial_mult` | 305 random and corner 32x32 products against `*`, and exactly 96 cycles each |
| `tb_bitplane_memory` | random masked writes and both read ports against a reference array |
| `tb_io_register_bank` | word to bit-slice and back, and the 128-cycle serial delay |
| `tb_simd_pe` | add/sub/logic on 16-bit fields, masking, four neighbour inputs, 32x32 products |
| `tb_pe_torus_array` | neighbour transfers with wrap-around in all directions, SIMD add, per-PE masks |
| `tb_simd_control_unit` | address sequences, instruction length in cycles, halt/done |
| `tb_ecg_simd_top` | whole processor at default size: samples in, add/sub/multiply/neighbour/masked move, results out, serial chain; counts each mechanism |
| `tb_spline_workload` | spline coefficients c = B*y for 16 leads over 4 segments, with cycle counts |

Run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  rtl/ecg_simd_pkg.sv tb/tb_ecg_simd_top.sv --top-module tb_ecg_simd_top
./obj_dir/Vtb_ecg_simd_top
```

All of them finish in a few seconds. The top-level tests use the default
parameters. The block tests override a few sizes, such as a smaller memory
or torus. To change the array size, set `R` and `C` on `ecg_simd_top`. To
widen the multiplier, set `MW`. To deepen memory or program store, edit the
package.

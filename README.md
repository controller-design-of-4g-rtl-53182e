# Controller and data-transfer front end for a variable-width SIMD processor

Baseband and video kernels for 4G handsets have different natural vector
lengths. This design serves them with an array of SIMD processing elements
(PEs) fed by one small scalar controller. The controller does not compute on
vectors. It runs the program's control flow and kicks off bulk data movement.
It also forwards vector instructions to the PEs. Its key idea is that data
movement runs *beside* the program:

* A `MOV` instruction starts an independent **data transfer unit**. The unit
  streams 128-bit words from a global memory into one local bank of every PE,
  one word per clock. The controller keeps executing meanwhile.
* PE instructions and **load** instructions that arrive during a transfer
  wait in a per-PE **instruction buffer**. They are released in order once
  the transfer has finished, so a load never reads a bank before its data is
  there.
* A load moves local-bank data into the PE register files at one of four
  **algorithm widths**: 1, 2, 4 or 8 banks at once. That is 8, 16, 32 or
  64 lanes of 16 bits.

The RTL covers the controller, the global memory, the data transfer unit,
and the four per-PE interface modules with their local banks and register
files. The PE datapath that consumes the register files is not included.
That means the SIMD decoder, the 64 ALU/multiplier/adder/loader lanes, the
swizzle network and the adder tree. Their connection points are ports of the
top module.

```
            +-------------------- comm_proc_top --------------------+
 imem_* --> | controller (Fetch | Decode | Execute)                 |
            |   |  MOV: dt_start/bank/count/addr                    |
            |   |  PE+load instructions (valid/ready)               |
 gm_*  ---> | global_memory --> data_transfer_unit                  |
            |                      | wr_en/wr_bank/wr_data, busy    |
            |   +------------------+--------------+----- x4 ----+   |
            |   | interface_module: instr_buffer, load_decoder,  |   |
            |   |   8 x (local_mem_bank + write/read addr gen)   |   |
            |   +---------------- ld_we/ld_entry/ld_data --------+   |
            |   | pe_regfile: 8 files x 16 entries x 128 bit     | --> rf_a/b/c (64 lanes)
            |   +------------------------------------------------+ --> pe_valid/pe_instr
            +--------------------------------------------------------+
```

## Instruction set

Every instruction is 32 bits. Scalar instructions use a MIPS-like layout:
`opcode[31:26] rs[25:21] rt[20:16] rd[15:11] funct[5:0]`, with `imm[15:0]`
for the I-form. Only the MOV encoding comes from the original architecture.
The other opcode values are this design's choice and live in `rtl/cp_pkg.sv`.

| class | encoding | meaning |
|---|---|---|
| R-type ALU | `000000`, funct ADD `100000`, SUB `100010`, AND `100100`, OR `100101`, XOR `100110`, NOR `100111`, SLLV `000100`, SRLV `000110`, SRAV `000111` | `rd = rs op rt` (shifts: `rs` shifted by `rt[4:0]`) |
| R-type compare | funct SLT `101010`, SLTU `101011` | `rd = (rs < rt)` |
| I-type | ADDI `001000`, SLTI `001010`, SLTIU `001011`, ANDI `001100`, ORI `001101`, XORI `001110`, LUI `001111`, SLLI `011000`, SRLI `011010`, SRAI `011011` | `rt = rs op imm` (logic ops zero-extend, others sign-extend) |
| branch, ALU kind | BNE `000101` | taken when `rs - rt != 0` |
| branch, compare kind | BEQ `000100`, BLT `000110`, BGE `000111` | taken when the comparison holds |
| jump | J `000010` | `pc = pc_of_J + sext(imm)` (byte offset) |
| jump and link | JLINK `000011` | `pc = rs`, `r31 = pc_of_JLINK + 4` |
| data transfer | MOV `010010`, `bank_index[25:22] count[21:16] initial_address[15:0]` | start the data transfer unit |
| load | `0101mm`, bank base `[24:22]`, entry `[19:16]` | fill PE register-file entry from 2^mm banks |
| PE | opcode bit 31 = 1 | passed unchanged to the PE decoder |

Branch offsets count words from the branch itself: `target = pc + 4*imm`.
Any other encoding, including the all-zero word, is a no-op. Register `r0`
reads as zero. `r31` receives the return address. A subroutine therefore
returns with `JLINK r31`.

## The controller pipeline

`controller` has three stages: Fetch, Decode and Execute. Results are written
back at the end of Execute, so there is no separate write-back stage.

* **Fetch.** `pc_logic` holds the PC. The instruction memory is read
  combinationally at that address. The next PC passes through two
  multiplexers in series. Mux A picks `pc+4` or the branch target `pcbE`
  under `bE`. Mux B picks that result or the jump target `pcjD` under `jumpD`.
* **Decode.** `ctrl_decoder` produces the control word `ctrl_t`. Its fields
  are named after the original control signals:
  * S1, S2, S3: address unit controls.
  * S9, S15: the two branch kinds.
  * S11, S12: compare and ALU operations.
  * S14: register write.

  The register file is read here. `addr_gen_unit` adds `extimmD` or
  `extimmD<<2` (S1) to `pcD`, or takes the register `srcaD` instead (S2).
  S3 then routes the address to `pcjD` (used at once) or to `pcbD`, which is
  carried to Execute as `pcbE`. MOV fires `dt_start` here. PE and load
  instructions are handed to the interface modules from here too.
* **Execute.** `ctrl_alu` and `compare_unit` work on the operands.
  `branch_ctrl` forms `bE = (~zeroE & S15) | (S9 & cresultE[0])`. The result
  is written into the register file at the clock edge.

Hazards and their costs:

| event | mechanism | cost |
|---|---|---|
| Execute writes a register that Decode reads | `hazard_unit` compares the Execute destination with `Instr[25:21]`/`Instr[20:16]` while S14 is set (`haE`/`hbE`). The Execute result replaces the register-file value in Decode. | none |
| jump (J, JLINK) | `jumpD` flushes the Fetch/Decode register | 1 cycle |
| taken branch | `bE` flushes Fetch/Decode and Decode/Execute | 2 cycles |
| MOV while the transfer unit is busy | Fetch and Decode hold; a bubble enters Execute | until the unit is idle |
| PE/load instruction while any instruction buffer is full | same stall | until space frees |

A jump sitting in Decode behind a taken branch in Execute is on the wrong
path. It is ignored: `jumpD` is gated by `bE`. For the same reason, a MOV or
PE instruction in Decode is not issued in a cycle when `bE` is high. Reset is
synchronous and active high. It clears the pipeline and the register file
and restarts at address 0.

## Data transfer unit

A MOV hands over `bank_index`, `count` and `initial_address`.

* From the next cycle the unit reads global memory at consecutive addresses,
  one word per cycle.
* The global memory has one cycle of read latency. So from the second cycle
  after the MOV, each word appears on `wr_data` with a single `wr_en`.
* Every PE takes the word into bank `bank_index[2:0]`. All PEs receive the
  same data.
* After each word the unit tests whether `count-1` is still above zero. It
  moves exactly `count` words, up to 63. `count = 0` moves nothing.
* `busy` is high from the cycle after the MOV until the cycle of the last
  write, inclusive.

Example: `MOV bank 1, count 3, address 0` gives:

```
cycle      0      1        2        3        4       5
MOV        Decode
busy       0      1        1        1        1       0
gm read           addr0    addr1    addr2
wr_en                      1(w0)    1(w1)    1(w2)
```

A second MOV waits in Decode until `busy` drops. A start while busy is
flagged by an assertion.

## Interface module: buffering, release and loads

There is one `interface_module` per PE. It owns the PE's eight
`local_mem_bank`s, each 256 x 128 bits. Every bank has a **write address
generator** and a **read address generator**, both `bank_addr_gen`. The
write generator advances with each word the transfer unit writes into that
bank. The read generator advances with each load that reads the bank. Both
sides therefore stream through a bank in order. There is no address in the
load instruction.

Instruction flow:

1. An instruction from the controller goes into the 16-entry `instr_buffer`
   in two cases:
   * the transfer unit is busy;
   * the buffer still holds older instructions, which keeps program order.

   Otherwise it bypasses the buffer.
2. When `busy` is low and the buffer is not empty, one buffered instruction
   per clock goes to the `load_decoder`. New arrivals queue behind it.
3. `load_decoder` recognises a load (`0101mm`). It raises read enables for
   2^mm banks, starting at `instr[24:22]` rounded down to a multiple of
   2^mm. Anything else is a PE instruction.
4. The banks are read at the clock edge. In the next cycle:
   * `ld_we[g]` marks register file `g` to take `ld_data[g]` at entry
     `ld_entry`;
   * a PE instruction appears on `pe_valid`/`pe_instr`.

   Both kinds of output come out in program order, one cycle after decode.

The four widths map onto the PE as follows. Register file `g` holds lanes
`8g`..`8g+7`, and bank `g` feeds register file `g`.

| mm | name | banks read | lanes filled |
|---|---|---|---|
| 00 | single-entry | 1 (any bank) | 8 |
| 01 | 2-entry | 2 (pair 0-1, 2-3, 4-5 or 6-7) | 16 |
| 10 | 4-entry | 4 (0-3 or 4-7) | 32 |
| 11 | 8-entry | all 8 | 64 |

The controller stalls a PE/load instruction while any buffer is full. This
is why a long transfer followed by many PE instructions slows the program
only once the buffers fill.

## PE register files

`pe_regfile` holds eight register files of 16 entries x 128 bits per PE.
That equals a 16-entry x 16-bit file in each of the 64 lanes. Loads write
it. The ports A, B and C each take one entry index, common to all lanes, and
return every lane's 16-bit value combinationally. In a full processor these
indices would come from the PE decoder. Here they are ports of the top.

## Parameters

| module | parameter | default | origin |
|---|---|---|---|
| `comm_proc_top` | `NUM_PE` | 4 | original architecture |
| `comm_proc_top`, `controller`, `instr_mem` | `IMEM_DEPTH` / `DEPTH` | 1024 words | this design |
| `comm_proc_top`, `global_memory`, `data_transfer_unit` | `GM_AW` / `AW` | 16 (64 Ki words of 128 bits) | this design, sized to the MOV address field |
| `comm_proc_top`, `interface_module`, `local_mem_bank` | `BANK_DEPTH` / `DEPTH` | 256 words | this design |
| `comm_proc_top`, `interface_module`, `instr_buffer` | `BUF_DEPTH` / `DEPTH` | 16 | this design |
| `cp_pkg` | `NBANK`, `LANES`, `LANE_W`, `RF_ENT`, `DW` | 8, 64, 16, 16, 128 | original architecture |

## Where this design departs from, or fills in, the original

These parts follow the original architecture:

* the three-stage structure, with write-back in Execute and forwarding from
  Execute to Decode;
* the PC multiplexer order;
* the branch equation for `bE`;
* the address-generation unit;
* the MOV format and one-word-per-cycle transfer;
* buffering during transfers;
* sequential bank addressing;
* the four load widths;
* the PE sizes (8 banks, 8 register files, 64 lanes of 16-bit, 16-entry
  register files).

These parts are this design's own choices:

* All scalar opcodes and functs, the load encoding, and the PE-instruction
  marker (bit 31).
* Which instruction uses which immediate scaling: branches count words, J
  counts bytes. JLINK is register-indirect.
* The set of ALU and compare operations.
* All memory and buffer sizes, and the combinational instruction-memory read.
* The one-cycle synchronous reads of the global memory and the banks.
* The stalls on a busy transfer unit and on full buffers, and the gating of
  `jumpD` by `bE`.
* Only the low three bits of the 4-bit `bank_index` are used.
* The lane-to-register-file mapping.
* The registered interface outputs.

Not included: the PE decoder, the AMAL lanes, the swizzle network, the
4-entry buffer and the adder tree. Their behaviour depends on a PE
instruction set that is not specified. Scalar data memory access is also
absent. The controller has no load/store of its own, and the global memory
is filled through a host port.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. It ends by
printing `TB_RESULT checks=N failures=M`. `tb/asm_pkg.sv` holds instruction
builders for the program-driven tests.

* `tb_controller` runs a program against small models of the transfer unit
  and interface. The program covers a loop, forwarding, all branch kinds, a
  JLINK call and return, J, two back-to-back MOVs and PE/load pass-through.
  The testbench checks the registers, the passed instructions, and the cycle
  at which the program ends:
  `1 + instructions + 2*taken branches + 1*jumps + stall cycles`.
* `tb_controller_random` runs ten random 300-instruction programs. The
  programs mix dependent ALU operations, forward branches of all four kinds
  and forward jumps. The testbench compares every register with an
  instruction-level reference model written in the testbench.
* `tb_comm_proc_top` is the end-to-end test at default parameters:
  * eight chained MOVs and loads of all four widths;
  * a 40-word transfer that fills the buffers and stalls the controller;
  * a subroutine call;
  * a final PE instruction that bypasses the buffers.

  It checks every filled register-file lane of all four PEs, the PE
  instruction stream of each PE, the 40-cycle burst, and that each mechanism
  occurred.

To run one, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_comm_proc_top \
    rtl/cp_pkg.sv tb/asm_pkg.sv tb/tb_comm_proc_top.sv -o sim
./obj_dir/sim
```

Packages go first on the command line. Other modules are found through
`-Irtl` by their file names. The top-level test finishes in a few seconds.

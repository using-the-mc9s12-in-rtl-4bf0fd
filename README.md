# External memory on the MC9S12's multiplexed expanded-mode bus

A 16-bit bus with a 16-bit address needs 16 address lines, 16 data lines and a few control
lines. The MC9S12 uses 35 in all: the 32 bus lines plus E, R/W and LSTRB. The MC9S12DP256
does not have that many spare pins. In expanded mode it reuses the 16 pins of ports A and B
(AD15-0) for both address and data, split in time by the E clock:

* while E is low, AD15-0 carry the address;
* while E is high, they carry data: from the MCU on a write, from the addressed device on a
  read.

An ordinary static memory chip needs a stable address on its own pins for the whole access.
It also needs active-low chip select, output enable, write enable and upper/lower byte enable
lines, none of which the MCU provides directly. This RTL is the glue logic that
de-multiplexes the bus and makes those strobes. It also includes a 16-bit memory chip model
wired to it, which gives the MCU 16 KB of external memory at 0x4000-0x7FFF. That window is
the part of the memory map freed by disabling the internal Flash there.

The package also has an unrelated second design: the datapath of a small 8-bit Princeton
(von Neumann) computer. Its registers, ALU and one shared memory are described in
[the last part](#a-small-princeton-computer-datapath).

## One bus cycle

```
        address phase          data phase
E     __________________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\______
AD    ==< address >=====X====< data >===========X=====
R/W   ==< 1 = read, 0 = write, valid for the cycle >==
LSTRB ==< with ADDR0: word or single byte >===========
                        ^                       ^
              address captured here     data latched here
              (rising edge of E)        (falling edge of E: by the memory
                                         on a write, by the MCU on a read)
```

There are no wait states: every access takes one E period, and the memory must produce its
read data within the E-high phase.

## The de-multiplexer (`ebi_demux`)

**Address capture.** A 16-bit register clocked by the rising edge of E takes AD15-0 at the
end of the address phase. Its output (`addr`) stays valid for the whole data phase and until
the next rising edge. An asynchronous reset clears it to 0x0000, an address outside every
external window. A transparent latch open while E is low (a '573-style part) would work just
as well on a board. The edge-triggered register was chosen because it gives clean
synchronous timing and no inferred latches.

**Decoding.** The captured address is compared with two windows:

| window        | default range   | output              |
|---------------|-----------------|---------------------|
| peripheral    | 0x4000-0x4001   | `periph_cs_n` low   |
| memory        | 0x4000-0x7FFF   | `mem.cs_n` low      |

The windows overlap. The peripheral has priority, so the memory answers only at
0x4002-0x7FFF, and the two chip selects are never low together (an assertion checks this).
All four bounds are parameters.

**Strobes.** The other four lines are shared by the memory and the peripheral. Only the chip
select tells the two devices apart.

| line   | low when                                                        |
|--------|-----------------------------------------------------------------|
| `oe_n` | E high, R/W = 1 (read), and one of the two windows is hit       |
| `we_n` | E high, R/W = 0 (write), and one of the two windows is hit      |
| `ub_n` | the access uses DATA15-8: a word, or a single byte at an even address |
| `lb_n` | the access uses DATA7-0: a word, or a single byte at an odd address   |

Gating OE and WE with E has two effects. A device never drives AD15-0 during the address
phase. And the write pulse ends exactly at the falling edge of E, which is when the MCU
expects the data to be taken. A memory that writes on the rising edge of WE therefore
captures the data at the correct moment.

**Byte or word.** LSTRB and the captured ADDR0 together encode the access size:

| ADDR0 | LSTRB | access                       | ub_n | lb_n |
|-------|-------|------------------------------|------|------|
| 0     | 0     | aligned word (both bytes)    | 0    | 0    |
| 0     | 1     | single byte, even address    | 0    | 1    |
| 1     | 0     | single byte, odd address     | 1    | 0    |
| 1     | 1     | misaligned word (not used in normal expanded mode) | 1 | 1 |

The MCU is big-endian. The word at 0x5678 is the byte at 0x5678 on DATA15-8 followed by the
byte at 0x5679 on DATA7-0. So the even address belongs to the upper lane. One sentence of the
source material says the opposite ("high byte = odd address"). That mapping contradicts its
own word-access examples and the real bus, so this design follows the bus.

## The memory chip (`ext_sram`)

A 2^AW x 16 array (default AW = 13: 8K words, exactly the 16 KB window). It has the pins of a
16-bit asynchronous SRAM: `cs_n`, `oe_n`, `we_n`, `ub_n`, `lb_n`, a 16-bit address and 16-bit
data.

* The word is selected by `addr[AW:1]`; `addr[0]` is replaced by the byte enables.
* A write happens on the rising edge of `we_n`, for each enabled lane, if `cs_n` is low.
* A read is combinational. `dq_oe[1]`/`dq_oe[0]` tell which lanes the chip drives (chip
  selected, `oe_n` low, `we_n` high, lane enabled).

The array is not reset.

## The system (`mc9s12_ext_mem`)

`ebi_demux` feeds `ext_sram`: the captured address goes to the memory's address pins and the
strobes to its control pins. AD15-0 from the MCU go straight to the memory's data inputs.
The simulator has no tri-state, so the bidirectional AD bus is split into three ports:

* `ad_i`: the level driven by the MCU;
* `ad_o`: the data returned on a read;
* `ad_oe`: per-lane enables; on a board these would drive the enables of the tri-state
  buffers.

An assertion checks that `ad_oe` is set only during the data phase of a read.

The peripherals at 0x4000/0x4001 are not specified beyond their address, so they are left
outside the module. Their chip select, the captured address and the shared strobes are
outputs (`periph_cs_n`, `ext_addr`, `ext_ctrl`). The data they return comes in on
`periph_rdata`, and is merged onto `ad_o` while they are selected and read.

## A small Princeton computer datapath

`vn_computer` is an 8-bit von Neumann machine: program and data share one memory and one
address path. Its datapath (`vn_datapath`) holds:

| part     | function                                                              |
|----------|-----------------------------------------------------------------------|
| X, A     | index register and accumulator; load the ALU result                   |
| PC       | program counter; reset to the vector 0xFF; `PC_Load` (takes memory data, has priority) or `PC_Inc` |
| MAR      | memory address register; loads memory data (an operand address)       |
| IR       | instruction register; loads memory data; its contents are the `inst` output |
| Z C V N  | flag bits, each loaded from the ALU by its own load line              |
| Data_Mux | A or X; feeds the memory write data and the ALU's D input              |
| Addr_Mux | PC, MAR or X as the memory address                                    |
| ALU      | D with the memory read data M: M, D, D+M, D-M, AND, OR, XOR, D+1      |

Every register has its own load line. Together with the two selects, `ALU_Ctrl` and `Mem_W`,
these form the control bundle `ctrl_t`. The memory (`vn_memory`, 256 bytes) reads
combinationally and writes on the clock edge. Address 0xFE maps the Input port (on reads)
and the Output register (on writes).

**What is missing: the control unit.** Only the names of its lines are known: no instruction
set, opcode coding or state sequence. It is therefore not included. `ctrl`, `inst` and
`flags` are ports, and whatever drives them defines the instruction set. The testbenches act
as a control unit for a four-instruction test set: increment a memory cell, X-indexed add,
store, branch.

The following are choices of this design, not given by the source:

* the 8-bit width (implied only by the 0xFF reset vector);
* the ALU function list and its encoding;
* the encodings of the two selects;
* the way the muxes connect to the registers;
* the I/O address;
* the memory size.

## Relation to the source, at a glance

Taken from the source material:

* the two-phase use of AD15-0, split by E;
* address valid while E is low, data while E is high;
* data latched on the falling edge of E;
* R/W and LSTRB with ADDR0 deciding byte versus word;
* the five memory control lines;
* the free window 0x4000-0x7FFF and the peripheral addresses 0x4000/0x4001;
* the register and control-line names of the Princeton datapath and its 0xFF reset vector.

Choices of this design:

* the edge-triggered address register;
* OE and WE gated with E;
* peripheral priority over memory;
* the even-address-to-upper-lane mapping (see above);
* the memory size;
* no wait states;
* everything listed at the end of the previous section.

Not built:

* the MCU itself (a commercial part; the testbenches contain a bus-functional model of its
  external cycles);
* the peripherals;
* the Princeton computer's control unit.

## Files

| file | contents |
|------|----------|
| `rtl/ebi_pkg.sv` | memory map constants, `mem_ctrl_t` strobe bundle, `access_t` byte/word coding |
| `rtl/ebi_demux.sv` | address register, window decode, strobe generation |
| `rtl/ext_sram.sv` | 16-bit byte-lane SRAM |
| `rtl/mc9s12_ext_mem.sv` | de-multiplexer + memory + read-data merge |
| `rtl/vn_pkg.sv` | width, reset vector, I/O address, ALU/mux encodings, `ctrl_t`, `flags_t` |
| `rtl/vn_alu.sv`, `rtl/vn_datapath.sv`, `rtl/vn_memory.sv`, `rtl/vn_computer.sv` | Princeton computer |
| `rtl/expanded_mode_top.sv` | both designs side by side; no shared signals |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. It also has a watchdog that
counts a failure if the test hangs. Packages must come first on the command line; `-Irtl`
lets Verilator find the modules:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl \
    rtl/ebi_pkg.sv rtl/vn_pkg.sv tb/tb_expanded_mode_top.sv --top tb_expanded_mode_top
./obj_dir/Vtb_expanded_mode_top
```

Replace the testbench name to run another one. `tb_expanded_mode_top` runs the whole top at
its default parameters, both designs concurrently:

* MC9S12 side: all 8191 memory words written and read back, the two example cycles (a write
  to internal RAM at 0x3456 that must be ignored, and a read of 0xBA98 from 0x5678), the
  peripheral bytes, and 5,000 random word and byte cycles;
* computer side: three passes of the test program.

It also counts each kind of cycle, and fails if one never occurred. It runs in well under a
second.

The other testbenches:

| testbench | what it checks |
|-----------|----------------|
| `tb_ebi_demux` | every strobe for random and window-edge addresses, in both phases |
| `tb_ext_sram` | random lane-masked writes and reads against a shadow copy; uses a 64-word array |
| `tb_mc9s12_ext_mem` | the external memory system alone, with more random traffic |
| `tb_inc_loop_trace` | replays the ten bus cycles of the loop `inc $0400; bra` (all internal to the MCU) and checks the external side stays deselected and silent |
| `tb_vn_alu` | all 8 functions on all 65,536 operand pairs |
| `tb_vn_memory` | random writes and reads, and the I/O location |
| `tb_vn_datapath` | 20,000 cycles of random control lines against a register-level reference model |
| `tb_vn_computer` | the test program on the complete computer |

## Limits

* Timing is functional only. Setup and hold against the real E clock, and the memory's
  access time, are not modelled. The memory is assumed to be fast enough for zero wait
  states.
* Only the 16-bit address is decoded. The MCU's expanded address lines for paged memory
  (XADDR14-19 on port K) and its chip-select outputs are not used.
* The misaligned-word coding (ADDR0 = 1, LSTRB = 1) enables neither lane. The MCU does not
  produce it in normal expanded mode.
* `ext_sram` writes on an edge of `we_n`, which is derived combinationally from E. That is
  how an asynchronous SRAM behaves. In an FPGA, sample E, R/W and AD with a fast system
  clock instead.

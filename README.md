# VPF: a VLIW vector processor for FPGAs

The VPF is a small SIMD/VLIW processor for fixed-point signal processing
(filters, FFTs, image effects). It is meant to be mapped onto an FPGA. Every
instruction word holds one operation for each functional unit:

- load/store;
- external I/O;
- flow control;
- multiply-accumulate (MAC);
- shuffle;
- rotate of the multiplier broadcast register;
- rotate of the shuffle broadcast register.

Each vector operation works on P lanes of signed 1.15 fixed-point words, and
P is a parameter (default 8).

The machine never stalls on data hazards. Each result appears after a fixed,
documented number of instructions, and a set of bypasses keeps those latencies
short. The compiler or assembler writer schedules around them. The one
exception is the smart-gather wait (SGW), which holds the front end until a
gather with bank collisions has finished.

All sources are SystemVerilog (IEEE 1800-2017). The RTL is in `rtl/` and the
self-checking testbenches are in `tb/`.

## Architectural state

| State | Size |
|---|---|
| Vector registers R0..R31 | P x 16 bit each |
| Memory pointers P0..P15, with window size B and window end E | 13 bit |
| Internal pointers I0..I15, with C and F, for the external I/O unit | 13 bit |
| External pointers X0..X15 | 24 bit |
| Shuffle pattern registers T0..T15 | P elements of 2+log2(P) bits |
| Accumulator | P lanes (48 bits per lane here) |
| Multiplier broadcast register `vmbc` | P words |
| Shuffle broadcast register `vsbc` | P words |
| Colour buffer | 3P bytes |
| Scalar/vector counter `s` | 0 .. P/4-1 |
| Hardware-loop record and stack | 4 levels |
| Data memory | 8192 vector rows x P banks |
| Program memory | 512 instruction words |

Word k of row r is stored in bank k. A vector access therefore reads one row
from every bank at once. An element address e means bank e mod P, row e / P.

## Pipeline

The stages below are for an instruction whose first decode stage (ID1) is
cycle t.

| Stage | Cycle | Work |
|---|---|---|
| IF1, IF2 | t-2, t-1 | Program memory with a registered address and a registered output. This is why a jump has two delay slots. |
| ID1 | t | Flow control: jump (JR), hardware loops (DOI), gather wait (SGW). |
| ID2 | t+1 | All register-file reads (4 ports); memory-pointer read and post-increment; external and internal pointers. |
| ID3 | t+2 | Bypass multiplexers fill the MAC and shuffle input registers; data-memory address; broadcast rotates; pattern read; external loads; start of a gather. |
| EX1 | t+3 | MAC and shuffle compute; memory data is registered; external stores drive the bus. |
| EX2 | t+4 | Shuffle and load/MOV write back; MAC result copied to its write-back register; LDT writes a pattern. |
| WB | t+5 | MAC write back; LDM/LDS load a broadcast register. |

### Latencies

These are issue distances, in instructions, at which a consumer sees the new
value. At a shorter distance it sees the old value.

| Producer → consumer | Latency | | Producer → consumer | Latency |
|---|---|---|---|---|
| LDV, MOV → MAC, SHF | 4 | | LDP → memory access | 4 |
| SHF → SHF | 1 | | LDB, LDE → memory access | 2 |
| SHF → MAC | 2 | | LDM → MAC, RMB | 4 |
| MAC → ADD/SUB/MAC/MDC forms | 1 | | RMB → MAC | 1 |
| MAC → MUL/MAD/MSB forms | 2 | | LDS → SHF | 3 |
| MAC → SHF | 2 | | RSB → SHF | 0 |
| MAC, SHF → MOV | 3 | | LDT → SHF | 3 |
| MAC → STV | 5 | | SHF → STV | 4 |
| ELD, ELC → LDV | 1 | | SMG → SGW | 3 |
| ELX → ELD/EST | 3 | | ELI → ELD/EST | 4 |
| EIB, EIE → ELD/EST | 2 | | STV → EST | 1 |

Forbidden combinations:

- an external load in the cycle right after an external store (the two share
  the bus; an assertion checks this);
- a broadcast rotate three instructions after a load of the same broadcast
  register (the two share its write port);
- load/store or shuffle instructions while a gather is still fetching.

### Bypasses

Every operand of the MAC and shuffle units is chosen in ID3, per lane, from
these sources (newest first):

1. the MAC result register (producer issued 2 instructions earlier);
2. the shuffle output register (2 earlier);
3. the MAC write-back register (3 earlier);
4. the shuffle extra write-back register (3 earlier);
5. the MAC extra write-back register (4 earlier);
6. the register file.

Two short paths sit inside the units:

- The MAC takes the previous MAC's result in EX1 (distance 1). Only the
  add/subtract and accumulate forms use this path; the multiply forms see a
  MAC result two instructions later, as a DSP block's multiplier inputs would.
- The shuffle can pick any source lane from its own output register
  (distance 1). Its multiplexer tree is 2P inputs wide instead of P.

The shuffle sources are masked. A shuffle with masked lanes writes only the
unmasked ones, so a bypass from it overrides only the lanes it wrote. The rest
come from an older source or from the register file. This per-lane merge is
the subtle part of the bypass network. `tb_vpf_core` checks it by shuffling a
register right after a masked shuffle into it.

On the load/store read port, only MOV has bypasses: it takes its operand in ID3
from the write-back registers, which gives MOV a latency of 3. STV and LDA
read the register file only, so STV sees a MAC result after 5 instructions
and a shuffle result after 4.

## Functional units

### MAC

Per lane, with f = z, or `vmbc[0]` in the broadcast forms:

| Operation | Result |
|---|---|
| ADD, SUB | y ± f |
| MUL | y·f |
| MAD, MSB | m ± y·f |
| MAC, MDC | a ± y·f |

- The operand m comes through the load/store read port (LDA).
- The accumulator keeps 48 bits with 31 fraction bits, the width of an FPGA
  DSP block's output.
- The register result is accumulator bits 31..16.
- The rounding forms add bit 15 and round the accumulator too.
- There is no saturation: −1 × −1 wraps to −1.

### Shuffle

Lane j of the result is `src[pat[j].index]`. Two pattern bits change this:

- if the broadcast bit is set, the lane takes `vsbc[0]`;
- if the mask bit is set, the lane is not written.

The multiplexer tree can be split into 1, 2 or 3 pipeline stages
(`STAGES`). The core uses one.

### Address calculation unit

Each access returns a pointer's value and adds a signed 5-bit increment.
Modulo accesses (LDVM, STVM, …) then correct the pointer: if the new value is
above the window end E, the window size B is subtracted. The correction is a
separate register stage, so the wrapped value can be used two cycles after the
increment, not one. Keeping the add, compare and subtract out of one cycle is
the reason.

### External I/O

This unit moves data between the data memory and an external memory over a
64-bit bus.

- ELD and EST move four words (a quarter of a P = 16 vector, half of a P = 8
  vector) per transfer. The counter `s` selects the quarter.
- ELB and ESB shift 8 bytes into or out of the colour buffer.
- ELC unpacks one colour component of P RGB pixels into a vector, zero-extended.
  ESC packs one back, saturated to 0..255.
- Each ELC or ESC rotates every pixel's byte triplet, so three of them handle R,
  G and B.
- The internal pointers use the same address calculation unit as the memory
  pointers, always in modulo mode.

### Flow control

- **JR:** the target is the JR address + 2 + a signed 7-bit offset. The two
  instructions after a JR always execute.
- **DOI:** starts a hardware loop over [start, end], both inclusive, given as
  offsets from the DOI address. The loop runs x times, 0 < x < 2048.
- **Loop stack:** loops nest four deep.
- **Loop timing:** the end test looks at the address being fetched, so a loop
  costs no cycles. Its first instruction must be at least three instructions
  after the DOI.

### Smart gather (SMG / SGW)

`SMG Rd, Ra` loads lane i of Rd from element address Ra[i]. When several
lanes address the same bank, the engine fetches in rounds:

1. In each round, every bank serves the lowest-numbered pending lane that
   addresses it.
2. The engine reads one row per bank through the load/store memory port.
3. It builds a shuffle pattern that routes bank b's word to the lanes served
   from b and masks all other lanes.
4. The shuffle unit's masked write fills in Rd round by round.

A gather with l rounds takes l cycles of the memory port. SGW stalls the front
end while rounds are pending. Lanes that ask for the same address still take
separate rounds: the address-compare variant is not built.

## Instruction encoding

`vpf_pkg::instr_t` is a packed struct of the unit slots:

- `ls`: op, r, p, inc, imm, r2;
- `ex`: op, x, i, inc, imm;
- `fc`: op, jofs, lstart, lend, lcount;
- `mac`: kind, b, rnd, x, y, z;
- `shf`: en, x, y, t;
- `rsb`, `rmb`.

Every field has its own bits, which makes the word 149 bits wide. A program is
written into the program memory through `prog_we/prog_addr/prog_data` while
`rst` is high. Execution starts at address 0 when `rst` falls. The testbench
`tb_vpf_core` shows how to assemble words from the struct.

## Where this RTL departs from the reference design

- **Instruction word.** It is a 149-bit struct rather than a dense 64-bit
  encoding. The slot order follows the reference, but the bit positions do not.
- **Bypass selects.** They are computed in ID3 from registered destination
  tags. The reference computes them in ID1 and distributes them in ID2.
- **Shuffle stages.** The core's `SHF_STAGES` parameter chooses 1, 2 or 3
  shuffle execute stages and defaults to 1. The latency table is for one
  stage. With S stages, every latency from a SHF grows by S - 1.
- **Gather pipeline.** The gather merges the reference's selection-tree stage
  and address-multiplexer stage into one cycle. The data goes straight from
  memory into the shuffle unit, so a gathered register is ready earlier than
  the reference's "8 + rounds" cycles.
- **Bus.** The bidirectional data bus is split into separate input and output
  buses. The external memory answers in the same cycle.
- **Program memory.** It has a write port, so programs can be loaded.
- **Unspecified choices.** These were filled in here:
  - the 48-bit accumulator;
  - rounding to nearest with ties up;
  - ESC saturation to 0..255;
  - the byte order on the bus;
  - write priority when two units write one register (shuffle, then MAC, then
    load/store).

## Files

| File | Contents |
|---|---|
| `rtl/vpf_pkg.sv` | widths, opcodes, instruction struct |
| `rtl/vpf_core.sv` | top level: pipeline, bypasses, write back |
| `rtl/vpf_regfile.sv` | 32 × P flip-flop register file, 4 read / 3 masked write ports |
| `rtl/vpf_mac.sv` | MAC unit |
| `rtl/vpf_shuffle.sv` | shuffle unit |
| `rtl/vpf_acu.sv` | pointer registers with modulo windows |
| `rtl/vpf_bcast_rot.sv` | broadcast register with rotate |
| `rtl/vpf_patregs.sv` | shuffle pattern registers |
| `rtl/vpf_vmem.sv` | banked two-port data memory |
| `rtl/vpf_progmem.sv` | program memory |
| `rtl/vpf_flow.sv` | pc, jumps, hardware loops, SGW |
| `rtl/vpf_extio.sv` | external I/O unit and colour buffer |
| `rtl/vpf_gather.sv` | smart gather engine |

Each `tb/tb_<module>.sv` tests one module against values computed in the
testbench. `tb/tb_vpf_core.sv` runs a complete program on the default-size
core (P = 8, 8192-row memory). It counts every mechanism and fails if one never
occurs:

- a stall;
- a jump;
- a loop back edge;
- a MAC bypass and a MAC forward;
- a masked shuffle bypass and a shuffle forward;
- a modulo wrap;
- a gather collision.

`tb/tb_vpf_fir.sv` runs an 8-tap FIR filter over 64 samples on the
default-size core. It uses outer-loop parallelism, so each lane produces one
output:

- a shuffle shifts the sample window by one lane per cycle;
- the shuffle broadcast register, with RSB, supplies the new sample;
- the multiplier broadcast register, with RMB, supplies the coefficient;
- two result registers alternate between blocks.

The MAC is busy in every cycle of the loop. The testbench checks every output
and checks that the loop delivers 8 outputs every 8 cycles.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and finishes. With Verilator 5:

    verilator --binary --timing --assert --top-module tb_vpf_core \
        rtl/vpf_pkg.sv -y rtl -y tb tb/tb_vpf_core.sv
    obj_dir/Vtb_vpf_core

Use the same command with a different `--top-module` and testbench file for
the unit tests. The processor size is set with `vpf_core #(.P(16))`. The MAC,
shuffle and memory scale with it. P must be a power of two and at least 4,
since ELD/EST move four words at a time.

`tb_vpf_core` has a `SHF_S` parameter for the shuffle depth, passed to the
core through the small wrapper `tb/tb_vpf_core_dut.sv`. At its default of 1
the core keeps all its own defaults. `tb_vpf_core_shf3` runs the same program
on a core with a three-stage shuffle. The program inserts the extra slot a
deeper shuffle needs.

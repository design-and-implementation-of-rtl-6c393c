# P8: a microprogrammed 8-bit teaching CPU in SystemVerilog

The P8 is an 8-bit CPU built to show students every step between an
instruction's opcode and the register transfers that carry it out. It is
small enough to follow one clock at a time, but its instruction set is
complete and orthogonal. Every operation that takes an operand accepts every
addressing mode that makes sense for it. The control unit is a plain
microprogram ROM addressed by the opcode, so there is no decoding logic to
understand. The ROM has one bit per control line, and a counter steps through
an instruction's words.

This RTL implements the CPU core at register-transfer level: the datapath
(registers, internal bus and a 74181-style ALU), the microprogram ROM and its
sequencer, and the registered control pipeline. Memory, I/O devices and the
clock oscillator sit outside the core and appear only as behavioural models
in the testbenches.

## Programmer's model

| Register | Width | Role |
|---|---|---|
| IP | 8 | instruction pointer; 256-byte address space |
| A  | 8 | accumulator; every ALU result goes here; always ALU operand A |
| R  | 8 | general register; also the pointer for indirect addressing |
| Z  | 1 | zero flag; written only by CMP, tested by JZ and JNZ |

Memory has 256 bytes. The I/O space is a separate set of 256 ports, selected
by the IOR and IOW strobes instead of MEMR and MEMW.

An instruction is one opcode byte, `{OP[4:0], MODE[2:0]}`. The direct and
immediate modes add a second byte.

| MODE | Name | Operand | Length |
|---|---|---|---|
| 000 | direct | memory (or port) at the address in byte 2 | 2 |
| 010 | register A | A | 1 |
| 011 | register R | R | 1 |
| 100 | indirect | memory (or port) at the address in R | 1 |
| 110 | immediate | byte 2 itself | 2 |

| OP | Mnemonic | Effect | Modes |
|---|---|---|---|
| 00001 | IN   | A <- port | direct, indirect |
| 00010 | OUT  | port <- A | direct, indirect |
| 00100 | JMP  | IP <- target | direct, R |
| 00101 | JNZ  | if Z = 0, IP <- target | direct, R |
| 00110 | JZ   | if Z = 1, IP <- target | direct, R |
| 00111 | CMP  | Z <- (A == operand) | all five |
| 01000 | LDA  | A <- operand | all five |
| 01001 | LDR  | R <- operand | all five |
| 01010 | STA  | memory <- A | direct, indirect |
| 01011 | STR  | memory <- R | direct, indirect |
| 01100 | ADD  | A <- A + operand | all five |
| 01101 | SUB  | A <- A - operand | all five |
| 01110 | DEC  | A <- operand - 1 | all five |
| 10000 | OR   | A <- A \| operand | all five |
| 10001 | INV  | A <- ~operand | all five |
| 10010 | SHL  | A <- operand << 1 | all five |

For jumps, "R" means the target is the contents of R (encoding MODE = 011).
Opcode 00h is FETCH. It is not an instruction but the microcode run between
instructions.

The register-R forms of DEC, INV and SHL write the result to both A and R.
For example, DEC R with R = 04h leaves 03h in A and in R. This is the only
case where R receives an ALU result. Arithmetic sets no flags. Only CMP
changes Z. There is no carry flag.

Any opcode not in the table runs as a one-byte no-operation. This is a
choice made for this RTL.

### Clock counts

Every instruction takes 3 clocks of FETCH plus its execute words:

| Instruction | direct | A | R | indirect | immediate |
|---|---|---|---|---|---|
| CMP, LDA, LDR, ADD, SUB, OR | 9 | 4 | 4 | 7 | 6 |
| INV | 9 | 4 | 5 | 7 | 6 |
| DEC, SHL | 11 | 4 | 7 | 9 | 8 |
| IN, OUT, STA, STR | 9 | - | - | 7 | - |
| JMP | 6 | - | 4 | - | - |
| JNZ / JZ, jump taken | 6 | - | 4 | - | - |
| JNZ / JZ, not taken | 4 | - | 4 | - | - |

In the register-A mode, DEC and SHL run in one execute word because A is
already at the ALU input. In the other modes they need three words. The first
loads A with the operand, the second lets the ALU settle without loading, and
the third loads the result.

## The control unit

### Control-store addressing

The ROM has 4096 words of 32 bits. The address is

    { IR[7:0], A3, MIP[2:0] }

- IR holds the opcode. Each opcode therefore owns 16 words.
- MIP is a 3-bit counter that steps through an instruction's words: eight at most.
- A3 = Z AND C27. C27 is set only in the words of JZ and JNZ.

A conditional jump therefore has two eight-word sub-blocks. The first
(A3 = 0) runs when Z = 0, the second when Z = 1. For JNZ, the A3 = 0
sub-block performs the jump. The A3 = 1 sub-block only skips the address byte
and ends. JZ is the mirror image. The register form of a conditional jump
skips nothing, so its "not taken" path is a single word.

The last word of FETCH sets C1 (IR_LOAD). The last word of every instruction
sets C0 (IR_RESET), which clears IR to 00h. Either bit, on its own, loads the
MIP with zero at the same clock edge. The next word is then word 0 of the new
opcode, or word 0 of FETCH.

### The microword

Bits marked `!` are active low.

| Bit | Signal | Bit | Signal |
|---|---|---|---|
| C0 | IR_RESET (end of instruction) | C16 | ADD |
| C1 | IR_LOAD | C17 | SUB |
| C2 | MEMR | C18 | DEC |
| C3 | MEMW | C19 | OR |
| C4 | !AR_OUT (AR drives the address bus) | C20 | INV |
| C5 | AR_LOAD | C21 | SHL |
| C6 | !DRIN_OUT (DR(IN) drives IB) | C22 | !A_OUT |
| C7 | DRIN_LOAD | C23 | A_LOAD |
| C8 | !DROUT_OUT (DR(OUT) drives the data bus) | C24 | !R_OUT |
| C9 | DROUT_LOAD | C25 | R_LOAD |
| C10 | !OR_OUT (OR drives AR) | C26 | Z_LOAD |
| C11 | OR_LOAD | C27 | COND_EN |
| C12 | IP_INC | C28 | CMP |
| C13 | !IP_LOAD | C29 | unused |
| C14 | !IP_OUT (IP drives AR) | C30 | IOR |
| C15 | PASS (ALU F = B) | C31 | IOW |

For example, the JNZ words are:

| Address | Word |
|---|---|
| 280h | 09402564h |
| 281h | 094065C4h |
| 282h | 09405511h |
| 288h | 09407551h |

The ALU bits are one-hot. The encoder `p8_alu_encoder` turns them into 74181
controls:

| Bit | 74181 operation |
|---|---|
| PASS | F = B |
| ADD | A plus B |
| SUB | A minus B |
| DEC | A minus 1 |
| OR | A or B |
| INV | not B |
| SHL | A plus A |
| CMP | A minus B minus 1 |

CMP uses A minus B minus 1 because that makes F all ones when A = B. The
slices' A=B outputs are then high, and Z loads them. With no ALU bit set,
F = A.

### Where the microprogram lives

The ROM image is not a data file. It is computed at elaboration by
`p8_rom_image()` in `rtl/p8_pkg.sv`, which calls `p8_sequence()`.

- `p8_sequence()` lists the words of each (operation, mode, A3) sub-block.
- Those words are written with active-high logical masks (`U_*`).
- `p8_microword()` turns them into the physical encoding by XOR with `CW_ACTIVE_LOW`.

To change an instruction, edit its case in `p8_sequence()`. To check the
result, use `tb_p8_control_store`, which holds the clock-count table above.

## Timing

### One clock per microword

The original hardware uses two clock phases:

- CLK1 advances the MIP.
- CLK2, later in the same cycle, clocks the datapath and the control pipeline.

This RTL merges them into one rising edge. The word selected by {IR, A3, MIP}
during a cycle acts on the registers at the edge that ends it. The MIP moves
to the next word at that same edge. Clock counts are unchanged.

### Reads

A read takes two words:

1. **AR <- IP (or OR).** MEMR (or IOR) is asserted.
2. **DR(IN) <- data_i.** MEMR (or IOR) is still asserted.

MEMR and IOR come straight from the ROM. The AR output enable, C4, is
registered. It becomes active one word after the word that sets it, which is
the word in which the data is sampled. The device must return data
combinationally while the read strobe is high.

### Writes

AR's output enable, DR(OUT)'s output enable, MEMW and IOW are all latched.
Each takes effect one clock after the word that asserts it. A write therefore
takes three words:

1. **Set-up word.** AR <- OR and DR(OUT) <- source. The output enables are asserted.
2. **Strobe word.** MEMW or IOW is asserted, and shows on the pin for the following clock.
3. **Hold word.** Address and data stay enabled while the strobe is visible.

The external device writes `data_o` to `addr_o` at the rising edge that ends
a clock in which `memw` (or `iow`) is high. `addr_oe` and `data_oe` are high
throughout that clock.

### Reset

`rst_n` passes through one synchronising flip-flop. While reset is active:

- IR and all registers are cleared.
- The MIP is held at 0.
- AR is kept from loading.

The first FETCH word executes on the first clock after the synchronised
reset is released. Execution starts at address 00h.

## Blocks

| Module | Contents |
|---|---|
| `p8_cpu` | top level: reset synchroniser, control unit, datapath |
| `p8_control` | control store, pipeline and MIP; forms A3 |
| `p8_control_store` | 4096 x 32 ROM, asynchronous read, two read ports |
| `p8_pipeline` | register-load enables, MIP load, A3 gate, latched bus enables and write strobes |
| `p8_mip` | 3-bit microinstruction counter, synchronous reset and load-zero |
| `p8_datapath` | A, R, Z, IR, IP, OR, AR, DR(IN), DR(OUT); internal bus; address bus to AR; ALU |
| `p8_ip_counter` | 8-bit counter: clear, then load, then increment |
| `p8_alu` | two `alu181` slices with rippled carry and wired A=B |
| `alu181` | one 74181 slice, full 32-function table |
| `p8_alu_encoder` | one-hot ALU bits to 74181 M/S/Cn, IR clear |
| `p8_reset_sync` | one flip-flop reset synchroniser |
| `p8_pkg` | types, microword layout, opcode and mode codes, microprogram |

### Buses

The internal bus (IB) is a multiplexer. Its sources are DR(IN), A and R,
selected by their active-low output-enable bits. Its loads are R, OR, IR, IP,
DR(OUT) and ALU operand B.

IP and OR reach AR over a separate, second multiplexer. In the original
hardware both buses are tri-state. With no source enabled, the bus reads 00h.
Assertions in `p8_datapath` check that no bus has two sources. They also
check that a register loading from a bus has exactly one. The simulator
enforces these with `--assert`.

## Departures from the original

| Original | This RTL |
|---|---|
| Two clock phases | One clock edge per microword; same clock counts |
| Tri-state internal and address buses | Multiplexers plus one-driver assertions |
| Bidirectional data bus | `data_i`, and `data_o` with `data_oe` |
| Separate A3 feedback path | A second ROM read port at A3 = 0 supplies C27, so A3 has no combinational loop through the ROM |
| Microcode in PROMs | Microcode computed from the per-instruction microinstruction lists, with the documented clock counts |
| 74181 P/G outputs | Not modelled; the two slices ripple |
| Reset clears IR and the MIP | All registers, IP included, reset to zero |
| Undefined opcodes | One-byte no-operations |

The register-R forms of DEC, INV and SHL write the result back to R as well
as A. This follows the detailed instruction descriptions, not the one-line
summary table ("A <- R-1"). The clock counts, 7/5/7, include the extra word
that copies A to R.

Only the JNZ microwords are known exactly (see the table above). The other
words were rebuilt from the instruction descriptions. They match the
documented clock counts and the documented FETCH sequence, but may differ bit
for bit from the original ROM image.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_alu181` | all 40960 input combinations against an independent 74181 function table |
| `tb_p8_alu` | random operands in the eight settings the CPU uses, against plain 8-bit arithmetic and logic; A=B on compare |
| `tb_p8_alu_encoder` | each ALU operation bit alone, and none, gives the expected M/S/Cn; IR clear |
| `tb_p8_ip_counter`, `tb_p8_mip`, `tb_p8_reset_sync` | random stimulus against reference models |
| `tb_p8_control_store` | the JNZ words above; the clock count of every opcode and mode; at most one driver per bus in every word |
| `tb_p8_pipeline` | random words: strobes, A3 gating, the one-word delay of the latched outputs |
| `tb_p8_control` | FETCH, both paths of JNZ, a six-word SUB through the real ROM |
| `tb_p8_datapath` | directed transfers, then 3000 random legal microwords against a register-level model |
| `tb_p8_sub_walkthrough` | one SUB 1Ah instruction clock by clock (below) |
| `tb_p8_isa_examples` | the worked example of every instruction and mode, plus untaken jumps and a compare that clears Z (63 cases and FETCH): starting state, result state, clock count |
| `tb_p8_cpu` | end-to-end program against an instruction-set model (below) |

**`tb_p8_sub_walkthrough`.** The starting state is IP = 07h, A = 13h. Memory
holds 68h and 1Ah at 07h–08h, and 11h at 1Ah. The test checks, clock by
clock:

- the control-store address: 000h, 001h, 002h, then 680h–685h;
- the MEMR pattern;
- the register contents after each clock;
- A = 02h at the end.

**`tb_p8_cpu`.** This is the end-to-end test. The CPU runs a 172-byte program
from a behavioural 256-byte memory and 256 ports. The program covers:

- every operation in every valid mode;
- both outcomes of JZ and JNZ, in direct and register form;
- memory and port reads and writes;
- a loop that multiplies 7 by 5 by repeated addition.

An independent instruction-set model runs alongside. At every instruction
boundary the test compares A, R, Z and IP, and the clock count of the
instruction just finished. At the end it compares memory and the port writes.
It counts each mechanism and fails if any never occurred. It runs at the
default (and only) configuration: 124 instructions in 828 clocks.

### Running a test with Verilator

From the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl rtl/p8_pkg.sv \
        tb/tb_p8_cpu.sv --top-module tb_p8_cpu -Mdir obj_cpu -o sim
    ./obj_cpu/sim

Replace `tb_p8_cpu` with any other testbench name. Lint of the RTL alone:

    verilator --lint-only -Wall -Irtl -y rtl rtl/p8_pkg.sv rtl/p8_cpu.sv --top-module p8_cpu

`-Wall` reports some unused signals. These are microword bits that a given
module does not need, the final ALU carry out, and the observation outputs
left open at the top. All are deliberate.

To write a program for the CPU, see `assemble()` in `tb/tb_p8_cpu.sv`. It
gives each instruction as `e1(op, mode)` or `e2(op, mode, byte)`. Put the
bytes in the memory model; the CPU starts at address 00h after reset.

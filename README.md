# SynthPic18: a PIC18-compatible core for hardware-assisted evaluation

SynthPic18 is a small, synthesizable microcontroller core that runs
unmodified PIC18 machine code. It is meant to be dropped into an FPGA or an
emulator next to a host computer: the host writes a program and the starting
register values into the core's memories, holds two input bytes on its input
pins, lets it run, and reads an output byte back. Because the core follows the
standard PIC18 encodings, the same program can be run on an instruction-set
simulator and the two results compared, so the core doubles as a way to check
an IP block against its software model.

The core implements all 75 instructions of the standard PIC18 set (not the
extended set), with the W register, STATUS flags, bank select register, three
file select registers with all five indirect modes, a 31-level return stack,
table reads and writes, an 8x8 hardware multiplier and three 8-bit I/O ports.
Every instruction cycle is four clock periods.

## Outside view

| Pin | Width | Meaning |
|---|---|---|
| `clk` | 1 | clock; one instruction cycle = 4 periods |
| `mrst` | 1 | master reset, synchronous, active high |
| `data1` | 8 | input byte, seen by the program as the PORTA pins |
| `data2` | 8 | input byte, seen by the program as the PORTB pins |
| `result` | 8 | output byte: the PORTC latch on bits whose TRISC bit is 0, 0 elsewhere |
| `ld_prog_we`, `ld_prog_addr`, `ld_prog_data` | 1, 20, 16 | host write of one program word (word address) |
| `ld_data_we`, `ld_data_addr`, `ld_data_data` | 1, 12, 8 | host write of one data-RAM byte |

Typical use: hold `mrst` high, write the program and any preset registers
through the load ports (one word or byte per clock), release `mrst`. The core
starts at address 0. A program reads its inputs with, for example,
`MOVF PORTA,W`, clears `TRISC` to drive port C, and writes its answer to
`LATC`. The load ports have priority over the core and may also be used while
it runs, which is handy for patching registers but is the host's
responsibility.

Parameters of the top module `synthpic18`:

| Parameter | Default | Meaning |
|---|---|---|
| `PC_W` | 21 | program-counter width in bytes (2 MB program space, 1 M words) |
| `DM_AW` | 12 | data-address width (4096 bytes) |
| `STACK_DEPTH` | 31 | return-stack entries |

The defaults are the real PIC18's; the core's data path assumes a 12-bit data
address, so `DM_AW` should stay 12. A smaller `PC_W` shrinks the program
memory.

## The instruction cycle

This is the part that most needs explaining. The core does not overlap
instructions. Each instruction owns one instruction cycle of four phases,
Q1 to Q4, and every register in the design is clocked by the same `clk`;
the phases are clock enables from a 2-bit counter (`pic18_clkdiv`), not
separate clocks.

| Phase | What happens |
|---|---|
| Q1 | The PC (or, in the second cycle of a table instruction, the table pointer) is put on the program-memory address. |
| Q2 | The 16-bit word arrives (the memory has a one-clock read) and is decoded straight away. The operand address is formed (access bank or BSR, or an FSR for indirect modes) and put on the data-RAM and peripheral read ports. The word is also kept in the instruction register for Q3/Q4. |
| Q3 | The operand has arrived. The ALU works on it and W, and the result, the new flags and the product of a multiply are latched. A pre-incrementing table instruction bumps the table pointer here. |
| Q4 | Write-back: W or the file register, STATUS, PRODH:PRODL, BSR, FSR post-increments/decrements, the stack, and the PC. |

Since the next instruction is not fetched until Q1 of the following cycle,
a jump simply loads a new PC in Q4; there is nothing to flush. Hence every
single-word instruction, branches, calls and returns included, takes exactly
one cycle (4 clocks). A real PIC18 pre-fetches and pays a second cycle for a
taken branch; cycle counts of taken branches, calls and returns therefore
differ from a PIC18.

### Instructions that need a second cycle

- **GOTO, CALL, LFSR, MOVFF** are two words long. The first cycle decodes the
  first word and remembers what it was (`cyc2` register); the second cycle
  fetches the second word, which completes the target address, the FSR value
  or the MOVFF destination. MOVFF reads its source in the first cycle and
  writes the destination in the second. A second word fetched on its own
  (its top nibble is `F`) decodes as NOP, as on the PIC18, so skipping over a
  two-word instruction works.
- **TBLRD and TBLWT** use the second cycle to put the table pointer on the
  program-memory address. TBLRD loads the selected byte into TABLAT in Q2;
  TBLWT writes TABLAT into the selected byte in Q4. Post-increment and
  post-decrement are applied at the end of that cycle, pre-increment in Q3 of
  the first.

### Skips

CPFSEQ/GT/LT, TSTFSZ, DECFSZ/DCFSNZ, INCFSZ/INFSNZ, BTFSC and BTFSS set a
`skip` flag when their test holds. The next instruction is then fetched
but treated as a NOP (its cycle still takes 4 clocks). Skipping a two-word
instruction costs two cycles, as on the PIC18.

## Data memory map

The data space is 4096 bytes, addressed by 12 bits.

| Address | Contents |
|---|---|
| 000-F7F | general-purpose RAM (`pic18_data_ram`) |
| F80-FD7 | peripheral registers on the I/O bus: PORTA-C at F80-F82, LATA-C at F89-F8B, TRISA-C at F92-F94 |
| FD8-FFF | core registers: STATUS, FSRs and INDF/POSTINC/POSTDEC/PREINC/PLUSW, BSR, WREG, PROD, TABLAT, TBLPTR, PCL/PCLATH/PCLATU, STKPTR, TOS |

An instruction with `a = 0` uses the access bank (00-7F map to 000-07F and
80-FF to F80-FFF); with `a = 1` the address is `{BSR, f}`. Reading an
unused address in the peripheral or core region returns 0. The RAM itself
has no reset; registers in the core and the ports are cleared by reset,
except the TRIS registers, which come up as all ones (every pin an input).

Indirect access goes through FSR0-FSR2 (`pic18_fsr`): INDFn uses the FSR as
the address, POSTINCn/POSTDECn change it after the access, PREINCn before,
and PLUSWn adds W as a signed offset without changing the FSR. A write that
targets an FSR register directly wins over an increment in the same cycle.

## Program counter and stack

The PC is a byte address and always even. Reading PCL returns the low byte of
the next instruction's address and, as on the PIC18, copies the upper bytes
into PCLATH and PCLATU. Writing PCL jumps to `PCLATU:PCLATH:value`. Together
this makes the usual computed jump work: `RLNCF WREG,W` then `ADDWF PCL,F`
into a table of `RETLW` instructions stays in the current 256-byte page.
MOVWF, CLRF and SETF to PCL do not read it, so they use whatever PCLATH and
PCLATU the program set beforehand.

The return stack (`pic18_stack`) holds 31 addresses. STKPTR reads as
`{STKFUL, STKUNF, 0, SP[4:0]}`, TOSU/TOSH/TOSL are readable and writable,
and PUSH and POP work as on the PIC18. The push that fills the last entry
sets STKFUL; a push on a full stack is dropped. A pop on an empty stack
sets STKUNF and the top of stack reads 0. Writing STKPTR sets SP, and a 0
written to bit 7 or bit 6 clears STKFUL or STKUNF. There is no
stack-overflow reset (the PIC18's STVREN=0 behaviour).
CALL and RETURN with `s = 1` save and restore W, STATUS and BSR in shadow
registers.

## ALU

`pic18_alu` is purely combinational. Addition and all subtractions share a
single 8-bit adder: subtraction is `a + ~b + carry`, so the PIC18 convention
of C = "no borrow" comes out directly. DC is the carry out of bit 3, OV the
signed overflow, Z and N from the result. The module also gives the unsigned
comparisons used by the compare-and-skip instructions, the bit selected for
bit tests, and the 16-bit product for MULWF/MULLW. DAW adjusts the low digit
if it is above 9 or DC is set; it adjusts the high digit if that is above 9,
C is set, or the low adjustment carried out. It never clears C.

When STATUS is the destination of an instruction that also sets flags, the
flags it sets win, as on the PIC18.

## Departures from a PIC18 and from the original description

- No fetch/execute overlap, so branches, calls and returns take 1 cycle
  instead of 2. The original description calls the design pipelined but also
  gives four clocks per instruction with one job per phase; this design
  follows the four-phase schedule.
- No interrupt controller, watchdog timer or sleep mode. CLRWDT and SLEEP
  execute as NOP and RETFIE behaves as RETURN (including the fast option).
- Program memory is a RAM that the host loads, not a ROM or flash. TBLWT
  writes TABLAT straight into the addressed byte; the PIC18's programming
  sequence (holding registers, EECON1/EECON2, erase) is not modelled.
- All three ports are 8 bits (port A of a PIC18F452 has 7), and port C's
  pins are looped back from its own latch. Only the PORT/LAT/TRIS registers
  exist; there are no other peripherals (timers, serial, ADC).
- The RESET instruction resets the core and the ports but not the RAM.
- The extended instruction set (ADDFSR, indexed literal offset mode) is not
  decoded.

## Source files

| File | Contents |
|---|---|
| `rtl/pic18_pkg.sv` | shared types: phases, ALU operations, decoded-control record, SFR addresses |
| `rtl/pic18_clkdiv.sv` | divide-by-four phase generator |
| `rtl/pic18_decoder.sv` | instruction word to control record |
| `rtl/pic18_alu.sv` | ALU, flags, comparator, multiplier |
| `rtl/pic18_fsr.sv` | FSR0-2 and indirect addressing |
| `rtl/pic18_stack.sv` | return stack and STKPTR |
| `rtl/pic18_core.sv` | processing unit: sequencing, registers, address decode |
| `rtl/pic18_prog_mem.sv` | program memory, 16-bit words, byte-enable write |
| `rtl/pic18_data_ram.sv` | data RAM, one read and one write port |
| `rtl/pic18_ports.sv` | ports A-C |
| `rtl/synthpic18.sv` | top level |
| `tb/pic18_asm_pkg.sv` | small assembler (functions returning machine words) used by the testbenches |
| `tb/tb_*.sv` | testbenches, one per module plus two whole-core tests |

## Simulating

Everything is plain SystemVerilog and runs with Verilator 5. From the
project root, for the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/pic18_pkg.sv tb/pic18_asm_pkg.sv rtl/*.sv tb/tb_synthpic18.sv \
  --top-module tb_synthpic18 -Mdir obj_synth -o sim
obj_synth/sim +verilator+rand+reset+2
```

Replace `tb_synthpic18` by any other testbench name. Each testbench prints
`TB_RESULT checks=N failures=M` and stops; a watchdog ends it with a failure
if it hangs. `+verilator+rand+reset+2` starts uninitialised state at random
values, which the tests are written to tolerate. Every test finishes in well
under a second of simulation time.

To write your own program, use the functions in `tb/pic18_asm_pkg.sv`
(`movf(f, W)`, `bcc(cc, n)`, `call_(addr)`, ...) or the output of any PIC18
assembler, and load it through `ld_prog_*` as `tb_synthpic18` does.

## How it has been checked

| Testbench | What it checks |
|---|---|
| `tb_pic18_alu` | every operation against an integer reference for random operands, plus known DAW cases |
| `tb_pic18_clkdiv` | phase order and one-hot outputs, reset |
| `tb_pic18_decoder` | fields of the control record for every instruction group, and a set of words produced by a standard PIC18 toolchain |
| `tb_pic18_fsr` | all indirect modes, LFSR and direct writes against a model |
| `tb_pic18_stack` | random push/pop/TOS/STKPTR traffic against a queue model, including full and underflow |
| `tb_pic18_data_ram`, `tb_pic18_prog_mem` | random reads, writes, byte enables and load-port priority against a model |
| `tb_pic18_ports` | LAT/TRIS/PORT registers and pin behaviour |
| `tb_pic18_core` | 400 random programs against an instruction-level model in the testbench: W, STATUS, BSR, PROD, FSRs, every RAM byte, and the clock count (4 per cycle) |
| `tb_synthpic18` | the full-size top running a 107-word program ten times with different inputs: arithmetic, multiply, MOVFF, indirect loops, calls and returns, computed jump through PCL, table read and write, banked access, stack overflow and underflow, the RESET instruction, port input and output, and instruction timing. It counts each of these events and fails if one never happens. |
| `tb_fig7_program` | a PIC18 machine-code fragment produced by a standard toolchain, run word for word on the full-size top in both branch directions, with results and cycle counts checked |

The core model in `tb_pic18_core` was written separately from the RTL, but
by the same hand and from the same reading of the PIC18 documentation, so a
shared misunderstanding of an instruction would not be caught by it; the
toolchain-produced words in `tb_pic18_decoder` and `tb_fig7_program` give an
independent check of the encodings for the instructions they use.

Generic synthesis with yosys maps the logic outside the memories to about 640
cells with about 250 flip-flops; the two memories (4 KB data, 2 MB program)
are meant for block RAM and dominate the size. Reduce `PC_W` for smaller
targets.

# A 68000-compatible CPU as one big state machine

This is a synthesizable SystemVerilog model of a CPU that executes Motorola
68000 machine code and speaks the 68000's asynchronous bus. It sits in a small
demonstration system with a ROM, a RAM, an interrupt acknowledge responder and
one 6800-style peripheral.

The design's defining idea is how the control unit is organised. There is no
microcode ROM. One finite state machine issues a command to every register in
every clock. The commands are:

* idle: hold;
* load: take the value on the internal 32-bit databus;
* reset: go to the reset value, or release the pin for bus outputs.

A few registers understand extra loads as well. Bus cycles, wait states and
effective-address calculation are written once. They are called like
subroutines through a small **stack of states**.

The design is a subset of the 68000: see "What is not there". It runs real
68000 object code for the instructions it has. It follows the 68000's
programmer's model, exception vectors and bus protocol.

## Files

| file | contents |
|---|---|
| `rtl/m68k_pkg.sv` | shared types: size codes, register commands, ALU and shifter op codes, the condition-code test |
| `rtl/cpu68000.sv` | the core: decoder, control-unit state machine, datapath registers |
| `rtl/m68k_alu.sv` | add/sub/compare/logic/negate, 3-bit compare, 1-bit shifts, sign-extend-with-ones |
| `rtl/m68k_shifter.sv` | ASd, LSd, ROd, ROXd by 0..63 with flags |
| `rtl/m68k_regfile.sv` | D0-D7, A0-A6, USP and SSP; sized writes |
| `rtl/m68k_state_stack.sv` | the three-entry stack of return states |
| `rtl/m68k_bus_ctrl.sv` | registers behind the bus pins (address, AS, R/W, UDS/LDS, FC, data out) |
| `rtl/m68k_e_clock.sv` | E clock for 6800 peripherals |
| `rtl/m68k_demo_memory.sv` | ROM at 0 and RAM at `RAM_BASE`, with DTACK, wait states and BERR |
| `rtl/m68k_demo_system.sv` | top level: core, memory, interrupt acknowledge, peripheral |
| `tb/tb_*.sv` | one self-checking bench per module |

## The control unit

### Commands instead of microcode

Every datapath register has a small multiplexer in front of it. In each state
the control unit sets:

* every multiplexer's command;
* the ALU or shifter operation;
* a stack command (idle, push, pull or reset);
* the next state.

`cpu68000.sv` holds all of it in one `always_comb` block. The block builds
the next value of a struct of registers (`regs_t`) from the current state.
The bus pins are the exception: they are registers in `m68k_bus_ctrl` and take
`ctrl_t` commands (`CTRL_IDLE`, `CTRL_LOAD`, `CTRL_RESET`). So a command
issued in one state shows on the pins one clock later. Every state lasts
exactly one rising clock edge.

### The state stack

Reading a word from memory takes the same states wherever it happens:
instruction fetch, operand read, vector fetch or stack pop. A caller:

1. puts the address in the effective address register (`ear`) and the size in
   `size`;
2. pushes the state it wants to continue in;
3. jumps to `READ0`.

The last read state pulls the saved state and jumps there. The write cycle and
the effective-address (EA) sequence are called the same way, and so are the
wait-state loop and the peripheral cycle inside a bus cycle.

Three entries are enough. The deepest nesting is decode, then EA sequence,
then read cycle, then wait loop. An assertion in the core reports an overflow
or an underflow in simulation.

### Bus cycles

A read with DTACK already low runs these states:

| state | action |
|---|---|
| `READ0` | load FC and R/W |
| `READ1` | put `ear` on the address bus |
| `READ2` | assert AS and UDS/LDS |
| `READ4` | test DTACK, then BERR, then VPA |
| `READ5` | sample the data bus |
| `READ6` | negate the strobes; return, or go on for a long |

A long read continues with `READ7`, `READ9`, `READ10`, `READ12`, `READ13` and
`READ14` for the second word. Writes run
`WRITE0`..`WRITE7`, and `WRITE8`..`WRITE15` for a long. The data is driven
in `WRITE3`.

In `READ4`, `READ12`, `WRITE4` and `WRITE12`:

* DTACK ends the wait.
* BERR marks the cycle as failed. The cycle finishes, then the core runs the
  bus-error exception.
* VPA starts a 6800 cycle. The core waits for E to go low, asserts VMA, and
  ends the transfer when E falls.
* With none of them asserted, the state pushes itself and runs a two-clock
  wait loop.

So a zero-wait word read takes 6 clocks and a write 8. A 68000 needs 4
clocks for either. This is the main timing difference from the original chip.

### Instruction flow

1. `READ_IR0` starts the fetch. It also handles a pending bus request or a
   HALT input first.
2. `READ_IR1` loads IR.
3. `DECODE` captures a decoded-instruction struct (`dec_t`). The struct gives
   the operand size, source and destination EA, the ALU or shifter operation,
   whether the destination must be read first, and whether the result is
   written back.
4. If there are operands, decode pushes `EXEC`. It runs the source EA
   sequence and then the destination EA sequence. `EA_DONE` pulls back into
   `EXEC`.
5. `EXEC` computes the result and writes it to a register, or calls the write
   cycle. Branches, JSR/RTS, RTE, PEA, LINK/UNLK, the multiplies, the divides and
   RESET go on to their own states.
6. Every instruction ends in `INT_CHECK0`. The core's `instr_done` output
   pulses there.

### Interrupts and exceptions

**Interrupt check.** `INT_CHECK0` takes a pending trace exception first.
Otherwise it samples IPL. `INT_CHECK2` uses the ALU's 3-bit subtraction,
IPL minus the SR mask. An interrupt is taken when there is no borrow and the
result is not zero. Level 7 is therefore maskable here.

**Common sequence.** All exceptions share `EXC0`..`EXC7`:

1. Save SR, set S and clear T.
2. Push PC (long) and SR (word) on the system stack.
3. For an interrupt only, run an acknowledge cycle. It is a byte read with
   FC = 111 at `FFFFF1 | level<<1`. DTACK supplies a vector number from the
   data bus. VPA means auto vector, 24 + level. BERR means spurious, vector 24.
4. Multiply the vector number by 4 with two ALU left shifts.
5. Read the new PC from that address.

`RTE` reverses the stacking.

**Double fault.** A bus error during exception processing stops the core in
`HALTED` and asserts `halt_out_n`. Only reset leaves it.

**Sources and vectors:**

| source | vector |
|---|---|
| bus error | 2 |
| illegal or unimplemented opcode | 4 |
| DIVU by zero | 5 |
| privilege violation | 8 |
| trace | 9 |
| line A | 10 |
| line F | 11 |
| TRAP #n | 32+n |

### Reset

While `rst_n` is low the core waits. After release it runs `RESET_CLOCKS`
(124) idle clocks. It then:

1. resets every register, with SR = 2700h;
2. reads the initial SSP from address 0;
3. reads the initial PC from address 4;
4. starts fetching.

The `RESET` instruction drives `rst_out_n` low for the same 124 clocks.

### MULU

`MULU.W` uses a shift-and-add loop.

* **Setup.** The `<ea>` operand is sign-extended *with ones* into the upper
  half: `ALU_SIGNEX_ONE` gives `{FFFF, m}`. The 16-bit register operand goes
  into another register.
* **Each pass.** The pass tests bit 0. If the bit is set it adds the
  multiplicand into an accumulator. It then shifts the multiplier right and
  the multiplicand left.
* **End.** The loop ends when the multiplier's upper half has become zero.
  That happens after exactly sixteen passes, with no counter.

`MULS.W` runs the same loop on the magnitudes of both operands. It negates
the product when their signs differ. Its clock count follows MULU's, not the
68000's own MULS timing.

Each pass costs two clocks, plus two for an add. From `MULU0` to the
interrupt check the instruction takes 38 + 2n clocks, where n is the number
of ones in the multiplier. That is 70 at most, the 68000's own timing. The CPU
bench measures it.

### DIVU and DIVS

`DIVU.W <ea>,Dn` divides the 32-bit Dn by the 16-bit operand.

* **Checks first.** A zero divisor takes exception vector 5. If the upper
  half of Dn is not below the divisor, the quotient cannot fit in 16 bits.
  The core then sets V, clears C and leaves Dn unchanged.
* **Loop.** The `temp` register holds {remainder, quotient}. Each of sixteen
  clocks shifts it left by one. The ALU subtracts the divisor from the 17-bit
  partial remainder. If there is no borrow, the difference replaces the
  remainder and the new quotient bit is 1.
* **Result.** Dn receives the remainder in its upper half and the quotient in
  its lower half. N and Z come from the quotient.

`DIVS.W` runs the same loop on the magnitudes of both operands. It then
negates the quotient if the operand signs differ. The remainder takes the
dividend's sign. A quotient outside -32768..32767 sets V and leaves Dn
unchanged.

The instruction takes about 20 clocks after its operand has been read. A
68000 needs up to 140 for DIVU and 158 for DIVS.

## Interface of the core (`cpu68000`)

All signals are sampled and driven on the rising edge of `clk`. Active-low
pins end in `_n`. The 68000's three-state and bidirectional pins are split
into separate signals:

* `dbus_i`, `dbus_o` and `dbus_oe`;
* `adbus` and `adbus_oe`. AS, UDS, LDS and R/W are valid while `adbus_oe` is
  high.
* `rst_n` (input) and `rst_out_n` (output);
* `halt_n` (input) and `halt_out_n` (output).

`adbus` is 24 bits including bit 0. UDS and LDS still select the byte lanes,
so a memory should ignore bit 0.

The other pins are:

* `dtack_n`, `berr_n` and `vpa_n`;
* `e` and `vma_n`;
* `br_n`, `bg_n` and `bgack_n`;
* `ipl_n[2:0]`;
* `fc[2:0]`, with values 001, 010, 101, 110 and 111.

`pc_o`, `sr_o` and `instr_done` are for observation.

**HALT.** `halt_n` stops the core at the next instruction boundary. The bus
stays idle until HALT is released.

**Bus arbitration.** The core grants the bus at an instruction boundary. It
asserts `bg_n`, releases the address bus and waits until both `br_n` and
`bgack_n` are high again.

## The demonstration system (`m68k_demo_system`)

| region | address | behaviour |
|---|---|---|
| ROM | 0 .. `ROM_BYTES`-1 | DTACK in the first clock of AS. Written through `load_we` / `load_addr` / `load_data` while reset is held. |
| RAM | `RAM_BASE` .. +`RAM_BYTES`-1 | DTACK after `WAIT_STATES` clocks. Byte lanes by UDS/LDS. |
| peripheral | `PERIPH_BASE`, `PERIPH_BASE`+1 | VPA. One 8-bit register, written when E falls, read on both lanes. |
| anything else | | BERR |
| FC = 111 | | interrupt acknowledge: VPA if `int_autovec`, otherwise DTACK with `int_vector` |

The defaults are a 4096-byte ROM, a 4096-byte RAM at 010000h, 2 wait states
and the peripheral at FF0000h. Data, DTACK, BERR and VPA are combined as the
wired bus would combine them. The core's own RESET and HALT outputs do not
feed back into it.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| `cpu68000`, `m68k_demo_system` | `RESET_CLOCKS` | 124 | idle clocks before the reset vectors are read, and the length of the RESET pulse |
| `m68k_state_stack` | `DEPTH` | 3 | |
| `m68k_state_stack` | `W` | 8 | The core uses its own state width. |
| `m68k_e_clock` | `LOW_CLKS`, `HIGH_CLKS` | 6, 4 | E period of ten clocks |
| `m68k_demo_memory`, `m68k_demo_system` | `ROM_BYTES`, `RAM_BYTES`, `RAM_BASE`, `WAIT_STATES` | 4096, 4096, 010000h, 2 | |
| `m68k_demo_system` | `PERIPH_BASE` | FF0000h | |

## What is there and what is not

**Instructions:**

* data movement: MOVE, MOVEA, MOVEQ, LEA, PEA, SWAP, EXT, CLR, Scc;
* arithmetic: ADD, ADDA, ADDI, ADDQ, SUB, SUBA, SUBI, SUBQ, CMP, CMPI, NEG,
  TST, TAS, MULU, MULS, DIVU, DIVS, ABCD, SBCD, NBCD;
* logic: AND, ANDI, OR, ORI, EOR, EORI, NOT;
* bit operations: BTST, BCHG, BCLR and BSET, with the bit number in a data
  register or an immediate;
* shifts and rotates: ASd, LSd, ROd and ROXd, in the register and memory
  forms;
* program flow: Bcc, BRA, BSR, DBcc, JMP, JSR, RTS, RTE, LINK, UNLK, TRAP,
  NOP, RESET, ILLEGAL;
* status register: MOVE to and from SR, MOVE to CCR, and ANDI, ORI and EORI to
  CCR and SR.

**Addressing modes:**

* Dn, An, (An), (An)+ and -(An);
* d16(An) and d16(PC);
* abs.W and abs.L;
* #imm.

**Not built.** These raise the illegal-instruction exception:

* ADDX and SUBX;
* MOVEM and MOVEP;
* CHK;
* CMPA, CMPM and EXG;
* STOP, TRAPV and RTR;
* MOVE USP;
* the d8(An,Xn) and d8(PC,Xn) modes.

**Other gaps:**

* Address errors (odd word addresses) are not detected.
* TAS reads and then writes in two separate bus cycles. The 68000 keeps AS
  asserted across both, so that the pair cannot be split by another bus
  master.
* The bus-error stack frame is the short PC+SR frame.
* Level 7 is not edge-triggered.

### Where this design departs from the original core description

These points differ from the original description of the design:

* One state per rising clock edge. Bus cycles are therefore 6 clocks (read)
  or 8 clocks (write) per word instead of 4.
* The MULU loop's states are arranged so that the instruction takes the
  68000's 38 + 2n clocks. The ones-extended multiplier is the `<ea>` operand,
  whose ones the 68000 timing counts. The original sequence extends the
  register operand.
* Which instructions are built is this design's choice. The original core was
  also a subset, but its subset is not listed.
* Trace, HALT, bus arbitration, the E/VMA peripheral cycle and the spurious
  interrupt vector are described there only by their pins or names. They are
  modelled on the 68000.
* The DIVU and DIVS state sequences are this design's own. The original names
  the instructions but does not describe their states.
* The RESET instruction uses the same 124-clock count as the power-up
  sequence.
* The original core was produced by a generator from a spreadsheet of states.
  Here the RTL is written directly. The 6809 that the same generator produced
  is not part of this design.

## Simulating

Each bench is self-contained and prints `TB_RESULT checks=N failures=M`. With
plain verilator, from the top of the tree:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/m68k_pkg.sv -y rtl \
    tb/tb_m68k_demo_system.sv --top-module tb_m68k_demo_system -o sim
./obj_dir/sim
```

Replace the bench name for the others: `tb_cpu68000`, `tb_m68k_alu`,
`tb_m68k_shifter`, `tb_m68k_regfile`, `tb_m68k_state_stack`,
`tb_m68k_bus_ctrl`, `tb_m68k_e_clock` and `tb_m68k_demo_memory`. Every bench
finishes in seconds.

* **`tb_m68k_demo_system`** runs the whole system at its default parameters.
  It loads a hand-assembled program into the ROM and runs it. The program
  exercises:
  * arithmetic, SWAP, MULU, DIVU and a DBF loop;
  * a division by zero;
  * JSR/RTS, TRAP and ILLEGAL;
  * peripheral writes and reads;
  * a bus error;
  * predecrement, postincrement and displacement addressing;
  * PEA, LINK/UNLK, TAS, decimal arithmetic and the bit operations;
  * an auto-vectored and a vectored interrupt;
  * trace and RESET.

  The bench also requests the bus and holds HALT while the program runs. It
  checks the results in RAM. It counts the following from the pins and fails
  if any count is zero: wait states, bus errors, both kinds of acknowledge,
  VMA cycles, bus grants, the RESET pulse and HALT idling.
* **`tb_cpu68000`** patches random operands into a program of twenty-three
  operations. It compares results and condition codes with a reference model
  in the bench. Runs alternate between zero and random wait states. It also
  checks the MULU clock count.
* **The block benches** compare each unit with an independent model under
  random stimulus.

### Writing programs

The benches hold their programs as lists of `{address, word}` pairs. They load
them through the ROM loading port, or write them straight into the bench
memory. To run your own code:

1. Assemble it for the 68000 with any cross assembler and the subset above.
2. Put the initial SSP at address 0 and the initial PC at 4.
3. Point the stack into the RAM, for example 011000h.
4. Replace the list.

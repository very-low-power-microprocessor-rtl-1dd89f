# A very-low-power 8-bit microprocessor cell

This is a small RISC microprocessor core for battery-powered embedded
systems such as short-range radio nodes, which need a little processing and
must draw as little current as possible. It is an 8-bit Harvard machine with
14-bit instructions. It runs the 35-instruction mid-range 14-bit
microcontroller instruction set (W accumulator, STATUS, FSR/INDF indirect
addressing, PCLATH, an 8-level hardware return stack). The core is fully
static, so the clock may run at any rate down to 0 Hz.

The RTL reproduces the published block structure of the cell. It also
carries over its three power-saving measures:

* **A Gray-coded control state machine.** Each clock flips exactly one
  state flip-flop. In the original design, the state machine and the ALU
  together drew most of the power.
* **An ALU with registered, clock-gated inputs.** The ALU's operand
  registers are clocked through a clock gate and load once per
  instruction. The combinational
  logic behind them therefore switches at most once per instruction, not
  every time a bus moves.
* **A SLEEP instruction.** It gates the core clock off completely until an
  external interrupt arrives.

The original design names its blocks, bus widths and register set. It does
not describe the instruction timing, the encodings or the control word.
Those parts are this design's own choices, and they are marked as such below
and in each file's header.

## Block structure

```
           +------------------------------ mcu_core ---------------------------+
           |  control_block  (Gray-coded Q1..Q4 FSM, decoder, ctrl_t word)     |
  clk ---->|     sleep_ctrl -> clock_gate ----------- gclk ------------+       |
  ext_int->|        ^ SLEEP in Q4            ^ ir (pmdb)   | ctrl      |       |
           |        |                        |  alu_z      v           v       |
           |  operation_block (all registers clocked by gclk)                  |
  pmab <---|   PC <-> hw_stack       IR --> pmdb bus --> dmdb (f, literal)     |
 pmdb_in ->|   ^ PCLATH                     |            |                     |
           |   |                   bit_mask -+-> ALU In A  ALU In B <- dmdb_in |
  dmab <---|   +---- dmdb_out <---- alu (registered inputs, 14 ops, Z/DC/C)    |
 dmdb_out<-|        |--> W, STATUS, FSR, PCLATH, PC (PCL), RAM                 |
 rd_n/wr_n<|   dmdb: address {RP1,RP0,f} or {IRP,FSR}, core registers vs RAM   |
           +-------------------------------------------------------------------+
```

| File | Block | What it does |
|---|---|---|
| `mcu_pkg.sv` | package | widths, `state_t`, `alu_op_t`, register addresses, the `ctrl_t` control word |
| `mcu_core.sv` | microprocessor cell (top) | Control Block + Operation Block, memory interfaces |
| `control_block.sv` | Control Block | state machine, instruction decoder, hosts the Sleep block |
| `sleep_ctrl.sv`, `clock_gate.sv` | Sleep block | sleep flag on the free clock, latch-based clock gate |
| `operation_block.sv` | Operation Block | datapath wiring |
| `ir_reg.sv` | IR | 14-bit instruction register |
| `pc_unit.sv` | PC | 13-bit program counter |
| `hw_stack.sv` | STACK | 8 x 13-bit shift-register return stack |
| `w_reg.sv`, `fsr_reg.sv`, `pclath_reg.sv`, `status_reg.sv` | W, FSR, PCLatH, STATUS | registers |
| `bit_mask.sv` | Mask | bit-instruction operand from pmdb(11..7) |
| `alu.sv` | ALU | registered, clock-gated inputs, 14 operations, flags Z, DC, C |
| `dmdb.sv` | DMDB | Data Memory Decoder Block: data address, register map, In B mux |

## The instruction cycle

Every instruction takes exactly four clocks, one per state of the Control
Block. There is no prefetch, so there is nothing to flush after a jump. A
skip costs no extra cycle: the PC is simply incremented a second time. The
states are Gray coded.

| State | Code | What happens (on the rising edge that ends the state) |
|---|---|---|
| Q1 fetch | `00` | `pmab` = PC; IR <= `pmdb_in`; PC <= PC + 1 |
| Q2 read | `01` | DMDB addresses the operand (`rd_n` low if it is in RAM); ALU input registers load A (W or Mask) and B (file data or literal) |
| Q3 execute | `11` | ALU result on `dmdb_out`; written to W or to the file register (`wr_n` low for RAM, or an internal register enable); flags Z/DC/C; PD/TO for SLEEP/CLRWDT; a write to PCL loads PC = {PCLATH, result} |
| Q4 flow | `10` | taken skip: PC <= PC + 1; GOTO/CALL: PC <= {PCLATH[4:3], k11}; CALL pushes the PC; RETURN/RETLW/RETFIE pop into the PC; SLEEP sets the sleep flag |

Because the PC was already incremented in Q1, the following all see the
address of the next instruction: a read of PCL, the return address pushed by
CALL, and a computed jump such as `ADDWF PCL,F`. The skip instructions
(DECFSZ, INCFSZ, BTFSC, BTFSS) decide in Q4 from the ALU's Z output, which
goes straight to the Control Block:

* BTFSC and BTFSS are an AND with the Mask.
* DECFSZ and INCFSZ skip when their result is zero.

The ALU's inputs are held from Q2 to the next Q2, so Z is stable in Q4.

The Control Block sends a single packed struct, `mcu_pkg::ctrl_t`, to the
Operation Block. Each enable in it is high for exactly one clock, and is
acted on at the rising edge of the gated clock `gclk`.

## Instruction set and how the datapath executes it

ALU input A is W or the Mask. Input B is the data bus (`dmdb_in` from the
DMDB) or the instruction's literal. Subtraction is B - A, which serves both
SUBWF (f - W) and SUBLW (k - W). C and DC mean "no borrow".

| Group | Instructions | ALU | Flags |
|---|---|---|---|
| byte, `00 oooo d fffffff` | ADDWF, SUBWF | ADD, SUB | Z DC C |
| | ANDWF, IORWF, XORWF, COMF, INCF, DECF, MOVF | AND, IOR, XOR, COM, INC, DEC, PASSB | Z |
| | CLRF, CLRW | CLR | Z |
| | RLF, RRF (through C) | RLF, RRF | C |
| | SWAPF; DECFSZ, INCFSZ (skip if zero) | SWAP; DEC, INC | none |
| | MOVWF | PASSA (W) | none |
| bit, `01 oo bbb fffffff` | BCF, BSF | AND with inverted mask, IOR with mask | none |
| | BTFSC, BTFSS | AND with mask, skip on Z / not Z | none |
| jump, `10 x kkkkkkkkkkk` | CALL (x=0), GOTO (x=1) | none | none |
| literal, `11 oooo kkkkkkkk` | MOVLW, RETLW | PASSB | none |
| | ANDLW, IORLW, XORLW | AND, IOR, XOR | Z |
| | ADDLW, SUBLW | ADD, SUB | Z DC C |
| control | NOP, RETURN, RETFIE, SLEEP, CLRWDT | none | PD/TO |

With d = 0 the result goes to W; with d = 1 it goes back to the file
register. The Mask takes pmdb(11..7): the bit number and the two opcode
bits. For BCF it outputs the complemented one-hot byte, so that all four
bit instructions reuse the AND and IOR of the ALU.

## Data memory and the DMDB

Data addresses are 9 bits: four banks of 128 bytes.

* **Direct access:** the address is {RP1, RP0, f}.
* **Indirect access:** when an instruction names file 0 (INDF), the address
  is {IRP, FSR}.

In every bank, the low seven address bits select these registers held in
the core:

| Address | Register | Notes |
|---|---|---|
| 0x00 | INDF | reads 0 and is not written when reached through FSR |
| 0x02 | PCL | read: PC[7:0]; write: PC <= {PCLATH[4:0], data} |
| 0x03 | STATUS | IRP RP1 RP0 TO PD Z DC C; TO/PD are read-only |
| 0x04 | FSR | |
| 0x0A | PCLATH | 5 bits, upper bits read 0 |

Accesses to these registers never reach the RAM strobes. Every other
address, including 0x01 and 0x0B, is external RAM. That is where a system
maps its timers or I/O ports.

When an instruction writes STATUS and also updates flags, the flag update
wins for Z, DC and C. SLEEP clears PD and sets TO; CLRWDT sets both. There
is no watchdog timer. Reset leaves STATUS at 0x18, and the PC, W, FSR,
PCLATH and IR at 0.

## Program flow

* **Address width.** The PC is 13 bits, giving 8K words of program memory.
* **GOTO and CALL** carry 11 address bits; the top two bits come from
  PCLATH[4:3]. A computed jump writes PCL, and the upper five bits then
  come from PCLATH[4:0].
* **The stack** is an 8-entry shift register whose first entry is the
  top. A CALL shifts every entry down; a return shifts them up. The ninth
  nested CALL pushes the oldest return address out of the bottom, and
  nothing flags it. Popping an empty stack keeps returning the bottom entry.
  The stack is cleared by reset.

## Power saving in this RTL

* **Gray-coded states.** See the table above.
* **Registered ALU inputs.** `alu.sv` clocks its A and B flip-flops
  through its own `clock_gate`, enabled by `en` (Q2 of instructions that
  use the ALU). The flip-flops therefore see one clock edge per such
  instruction and none otherwise. Nothing else in the core is written at
  that edge, so the gate's delay behind the clock cannot cause a race.
* **SLEEP.** `sleep_ctrl.sv` keeps the flag `sleeping` on the free-running
  clock. The flag is set at the edge that ends Q4 of SLEEP and cleared at
  the first edge at which `ext_int` is high. `clock_gate.sv` is a latch that
  is transparent while `clk` is low, followed by an AND gate, so `gclk`
  never carries a shortened pulse. While asleep, only the flag and that
  latch see the clock. After waking, execution continues with the
  instruction after SLEEP, four clocks per instruction as before. A wake
  request that arrives together with the sleep request cancels the sleep.
  `clock_gate` holds the only latch in the design, used twice: here and
  in the ALU. A library flow replaces it with its integrated clock-gating
  cell.

## Interface and timing

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | free-running clock, any rate down to 0 Hz |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `ext_int` | in | 1 | external interrupt: wakes the core from SLEEP (sampled on `clk`) |
| `pmab` | out | 13 | program address, stable from the start of Q1 |
| `pmdb_in` | in | 14 | instruction; must be valid at the edge ending Q1 (asynchronous ROM) |
| `dmab` | out | 9 | data address |
| `dmdb_in_mem` | in | 8 | RAM read data; sampled at the edge ending Q2 |
| `dmdb_out` | out | 8 | ALU result / RAM write data |
| `rd_n` | out | 1 | active low during Q2 of a RAM read |
| `wr_n` | out | 1 | active low during Q3 of a RAM write; the RAM stores `dmdb_out` at the rising `clk` edge ending Q3 |
| `sleeping` | out | 1 | the core clock is stopped |
| `dbg_w`, `dbg_status`, `dbg_pc`, `dbg_state` | out | 8, 8, 13, 2 | observability for test and debug |

`mcu_core` has one parameter: `STACK_DEPTH` (default 8).

## What is not here

* **Program ROM and data RAM.** They sit outside the cell. The testbenches
  model them: the ROM as an array, the RAM as `tb/data_ram_model.sv`.
* **The test port.** The original chip has a debug port for extended
  observability and some control of internal blocks, but its signals are not
  specified. W, STATUS, PC and the state are brought out as `dbg_*` instead.
* **Interrupt service.** External interrupts only wake the core. There is no
  vector, no INTCON/GIE and no context save, and RETFIE behaves as RETURN.
* **Timers, watchdog and I/O ports.** None is part of the core.
* **Physical design.** This covers the separate supply pins per block, the
  pads, and the semi-custom stack layout.

## Departures from the original

* **Instruction timing.** Each instruction takes four clocks. Skips, jumps
  and returns take one instruction cycle, not two. Delay loops counted in
  cycles therefore run faster than on parts that insert a dummy cycle.
* **Number of states.** The original's state count is not published; four
  Gray-coded states are used here.
* **ALU operation set.** The original's operation grouping and its final ALU
  version are not published. Here the ALU is a single 14-way operation
  multiplexer behind the input registers.
* **Register clocks.** The original gives several registers their own
  clocks (FSR, STATUS, PCLATH, PC, the stack). Here those registers share
  the core clock and load through an enable. The two clock gates kept are
  those the original describes in words: the whole-core gate for SLEEP and
  the gate on the ALU inputs.
* **Literal path.** The original puts the instruction's literal byte on the
  ALU's B bus through a tri-state driver. Here the DMDB block selects it
  with a multiplexer; there are no internal tri-state buses.
* **Active-high control.** The control signals are active high inside the
  core, although the original names them active low (`wr_W_n`,
  `en_fsr_n`, ...).

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* **Leaf blocks.** The register, stack, PC, Mask, ALU, STATUS and DMDB
  testbenches check random stimulus against reference models written in
  the testbench.
* **`tb_control_block`.** Walks every instruction through Q1 to Q4,
  checking the Gray sequence and each control signal against a
  hand-written table. It also tests SLEEP and the wake-up.
* **`tb_operation_block`.** Plays the Control Block and checks the
  datapath's results for fetch, ALU operations, RAM and core registers,
  indirect and banked addressing, bit operations, GOTO/CALL/RETURN and PCL
  jumps.
* **`tb_mcu_core`** (all parameters at their defaults). Runs the core in
  lockstep with an instruction-level reference model. W, STATUS and the PC
  are compared after every instruction, the whole RAM after every program,
  and each instruction must take four clocks. Programs:
  * a 16-byte bubble sort with a swap subroutine;
  * a two-tap low-pass filter writing into the upper bank through IRP;
  * a RETLW look-up table reached by computed jumps;
  * calls nested to the full stack depth;
  * SLEEP with a wake-up;
  * four random programs filling the whole ROM, with random interrupts,
    SLEEPs and stack overflows.

  It counts skips, GOTOs, CALLs, RETURNs, RETLWs, PCL writes, indirect and
  banked accesses, carries, sleeps, wake-ups and stack overflows, and fails
  if any never happens.
* **`tb_tictactoe`.** The core plays 30 games of Tic-Tac-Toe against random
  moves. It sleeps between turns and is woken through `ext_int`. Each move,
  the board and the result are checked against a model of the same strategy.

To run one with Verilator 5 from the project root, name the two packages
and the testbench; Verilator finds every module in `rtl/` and `tb/` by its
file name:

```
verilator --binary --timing -y rtl -y tb +libext+.sv --top-module tb_mcu_core \
    rtl/mcu_pkg.sv tb/asm14_pkg.sv tb/tb_mcu_core.sv
./obj_dir/Vtb_mcu_core
```

The same line, with the testbench's name substituted, runs every other
testbench. Adding `+verilator+rand+reset+2` to the run starts all
uninitialised state at random values; the testbenches pass either way.
`tb/asm14_pkg.sv` has one encoder function per instruction (`MOVLW(k)`,
`ADDWF(f, TO_F)`, `BTFSS(STATUS, Z)`, ...). Test programs are written as
calls to them, stored into the ROM array.

## Changing it

* **Stack depth.** Set `STACK_DEPTH` on `mcu_core`.
* **Instruction timing** lives in the state-gated part of
  `control_block.sv`, which assigns `ctrl` from the state and the decode.
  To add the two-cycle branches of the standard parts, add a flag that turns
  the next fetched instruction into a NOP.
* **More registers held in the core** (timers, INTCON): add them to the
  register map in `mcu_pkg.sv` and to the decode and read mux in `dmdb.sv`.

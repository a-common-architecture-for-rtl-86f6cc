# modSIMD: a processing layer for thin film sensor arrays

A thin film sensor array (TFSA) can be deposited right on top of a silicon die.
Vertical interconnects then bring every sensor's signal down into the logic
underneath. modSIMD is a small programmable processor for that logic layer. It
is built around one idea: a single instruction stream can drive the array in two
ways.

* **Common addressing (SIMD).** An instruction whose PE_ID field is `1111` runs
  in every processing element (PE) at once. This suits arrays of identical
  sensors, for example an image sensor running a convolution.
* **Specific addressing (SISD).** An instruction that carries one PE's
  hard-wired ID runs in that PE alone, and the machine behaves like a scalar
  processor. This suits arrays of *different* sensors, for example a chemical
  array where one sensor's reading decides what to check on another.

Both modes use the same hardware and the same 32-bit instruction format. The
only difference is the 4-bit PE_ID field of the instruction.

This RTL implements the processing layer at its default size:

* 10 PEs;
* one control unit, one instruction latch and one program counter;
* 16-bit data and 32-bit instructions;
* a 64-word local memory in each PE;
* one shared data bus for serial read-out.

The sensors, ADCs and vertical interconnects are not logic. They appear as
ports: each PE has one 27-bit "sensor word" input.

```
        instr/instr_valid ──► control unit ──► ctrl flags (broadcast) ─────────┐
              ▲ rd_instr         ▲  process_done[9:0]                        │
              │                  │                                           ▼
        program counter     instruction latch ── Crnt_Instrn_1/2 ──► PE1 PE2 … PE10
                                                                      │   │      │
         adc_word[0..9] (one per PE, plus neighbours' ports) ─────────┘   │      │
                                                           data bus ◄─────┴──────┘
                                                              └──► out_word (serial read-out)
```

## The instruction word

| bits    | field   | used by                                                  |
|---------|---------|----------------------------------------------------------|
| [31:30] | class   | control unit                                             |
| [29:24] | ALU_OP  | every ALU, unchanged                                     |
| [23:22] | mode    | control unit                                             |
| [21:18] | PE_ID   | every PE's ID decoder (`1111` = all PEs)                 |
| [17:12] | A       | local address of operand A                               |
| [11:6]  | C       | local address of the result                              |
| [5:0]   | B       | local address of operand B (a PE ID for transfers)       |

The field positions are the source design's. The class and mode *codes* are
this implementation's own. They are defined in `modsimd_pkg`:

| class      | mode             | effect in every addressed PE                                     |
|------------|------------------|------------------------------------------------------------------|
| `00` ALU   | –                | `mem[C] = ALU_OP(mem[A], mem[B])`; flags updated                 |
| `01` IMM   | `00` operand B   | `mem[C] = ALU_OP(mem[A], imm)`; flags updated                    |
| `01` IMM   | `01` load        | `mem[C] = imm`                                                   |
| `10` BUS   | `00` read-out    | `mem[A]` goes out on the data bus, one PE per cycle              |
| `10` BUS   | `01` transfer    | source PE's `mem[A]` is written to `mem[C]` of the PE named in `B[3:0]` (or of all PEs for `1111`) |
| `11` CTL   | `00` no-op, `01` clear | clear resets the ALU result register and flags             |

An IMM instruction has two words. The low 16 bits of the second word are the
immediate. The instruction latch holds the two words as `Crnt_Instrn_1` and
`Crnt_Instrn_2`.

`make_instr(cls, op, mode, pe_id, a, c, b)` in the package builds a first word.
For example, `32'h003C0402` adds `mem[0]` and `mem[2]` into `mem[16]` in every
PE. `32'h00040402` does the same in PE 0001 only, and the other PEs ignore it.
A read-out is the source design's `send_data_on_bus` operation.

### ALU operations

These are the codes in `ALU_OP`, numbered in the order of the source design's
operation list. `ADD` is 0.

| code | op | code | op | code | op |
|---|---|---|---|---|---|
| 0 | A + B | 8 | A & B | 16 | A ^ B |
| 1, 2, 3 | A | 9 | ~A & B | 17 | A \| B |
| 4 | A − B | 10 | B | 18 | ~B |
| 5 | A << 1 | 11 | ~A & ~B | 19 | A \| ~B |
| 6 | A >> 1 (logical) | 12 | ~(A ^ B) | 20 | ~(A & B) |
| 7 | 0 | 13 | ~A | 21 | all ones |
| | | 14 | ~A \| B | 22–63 | keep the previous result |
| | | 15 | A & ~B | | |

The flags are registered:

* **Negative** is the result's sign bit.
* **Zero** is set when the result is 0.
* **Carry** depends on the operation:
  * on an add, the carry-out;
  * on a subtract, "no borrow", meaning A ≥ B unsigned, which makes SUB the
    comparison instruction;
  * on a shift, the bit shifted out;
  * 0 otherwise.

## The control loop and `process_done`

This is the part to understand before changing anything. The machine is not
pipelined: every instruction runs to completion before the next word is taken.
The control unit only moves on once **every** PE reports `process_done`.

`control_unit` states (also brought out on `current_state`):

| state | code | what the control unit does |
|---|---|---|
| IDLE  | 0 | `rd_instr` high. A valid word is latched into `Crnt_Instrn_1` (`Latch_Instr`), and every PE drops `process_done`. Next state is IMM for an immediate instruction, FETCH otherwise. |
| IMM   | 1 | `rd_instr` high. The next valid word is latched into `Crnt_Instrn_2`. |
| FETCH | 2 | `Rd_Oprnd_A`, `Rd_Oprnd_B`: operands move from memory to the operand registers. |
| EXEC  | 3 | `Latch_Result` and `Latch_Flags`, with `UseData_Imm_Or_RegB` for an immediate operand. For a clear it raises `Reset_AluRegs`. For a bus instruction it raises `Send_Final_Output_On_Bus` or `Send_Data_Reg`, and holds it until the end of WAIT. |
| WRITE | 4 | `Write_RegC`, with `UseData_Imm_Or_ALU` for a load-immediate. |
| WAIT  | 5 | Waits until all `process_done` are high, then pulses `EndOfInstrn` and returns to IDLE. |

Each PE decides for itself when it is done. Its datapath controller clears
`process_done` when a new instruction is latched, and sets it again when:

* the PE is not addressed: on the next cycle;
* it is an ALU or immediate instruction: when `Write_RegC` writes the result;
* it is a bus instruction: on the cycle its word is granted the bus;
* it is a control instruction: at once.

**Cycle counts** assume the next word is offered immediately:

* A register instruction takes 5 cycles, from the cycle its word is taken to
  the cycle `EndOfInstrn` is high.
* An immediate instruction takes 6 cycles.
* A common-address read-out of 10 PEs takes at least one cycle per PE.

The source design gives the loop and the flag names but no cycle counts, so
the counts above belong to this implementation.

The instruction source uses a plain valid/ready handshake. A word on `instr` is
taken on a cycle where `instr_valid` and `rd_instr` are both high. `pc`
advances once per word taken and is the address of the next word. The program
memory is outside the design.

## Inside a processing element

`pe` wires five blocks together. Each PE carries a hard-wired ID, `MY_ID`,
which is `i+1` for PE index `i`.

* **`pe_id_decode`**: `do_process = (PE_ID == MY_ID) || (PE_ID == 1111)`. This
  one signal gates everything else. A PE with `do_process` low keeps its ALU
  result, flags, operand registers and memory unchanged.
* **`reg_file`**: the two operand registers `Reg_PortA` and `Reg_PortB`. They
  load from memory on `Rd_Oprnd_A`/`B`, and `Write_RegC` writes `RegPort_C`
  back to memory at address C.
* **`alu`**: the ALU described above. Its result and flags are registers that
  load only when `do_process` is high.
* **`datapath_ctrl`**: four jobs.
  * The operand-B mux: register or immediate.
  * The result mux: ALU or immediate.
  * Sharing the memory write port between results and bus transfers.
  * Bus requests and `process_done`.
* **`mem_bank`**: 64 × 16-bit words.
  * Two combinational read ports: A, which also feeds the bus, and B.
  * One write port.
  * Separate acquisition write paths, active only during reset.

## Data acquisition and the neighbour layout

Sensor data never crosses the data bus on the way in. While the global reset
`rst` is high, every PE stores the words arriving on its own vertical port
`adc_word[i]`. It also stores the words on the ports of its two neighbours,
PE i−1 and PE i+1. That gives each PE the 3-row neighbourhood an image kernel
needs without any transfers.

A sensor word is `{valid, PE_ID[3:0], addr[5:0], data[15:0]}` (27 bits). Which
words a PE stores, and where:

| port | stored when its PE_ID is | stored at |
|---|---|---|
| own port             | `MY_ID` or `1111` | `addr`                    |
| upper neighbour port | `MY_ID-1` or `1111` | `addr + NBR_UP_OFS` (−10) |
| lower neighbour port | `MY_ID+1` or `1111` | `addr + NBR_DN_OFS` (+22) |

The "upper" and "lower" rows assume a 10×10 image with one row per PE. Feed
the row to each PE at addresses 20..29. Each PE then holds:

* the row above at 10..19;
* its own row at 20..29;
* the row below at 42..51.

That makes 30 sensor values per PE, and leaves 0..9, 30..41 and 52..63 free for
program data. Addresses wrap modulo 64. When two writes hit the same word in one
cycle, the own port wins over the upper port, and the upper port wins over the
lower one. The first and last PE have no neighbour on one side.

The source design says that acquisition happens under global reset and that
neighbour data is kept locally. The three-port arrangement and the offsets are
this implementation's own, and can be changed with the top's `NBR_UP_OFS` and
`NBR_DN_OFS` parameters.

## The data bus: serial read-out and transfers

All PEs share one bus (`data_bus`). Every PE that has a word to send raises
`bus_req`, and the bus grants the lowest-indexed requester. The granted PE
drives `{1, MY_ID, A, mem[A]}`. It then sets `process_done` and drops its
request, and the next PE gets the bus on the next cycle. So a read-out with
PE_ID `1111` sends ten words, one per cycle, in PE order, while the other PEs
wait. This is the one stall in the machine. The control unit cannot finish the
instruction until the last word has gone.

* **Read-out** (`BUS` mode `00`): the word on the bus also goes to `out_word`,
  registered, one cycle later. `out_valid` is high while a read-out owns the
  bus.
* **Transfer** (`BUS` mode `01`): the PE named by PE_ID sends `mem[A]`. Every
  PE named by `B[3:0]` writes it into its own `mem[C]` in the same cycle. A
  `B[3:0]` of `1111` means every PE, which broadcasts one word to the whole
  array. This is this implementation's addition: the source design has the
  chip-wide 10-bit address `{PE_ID, local address}` and a `Send_Data_Reg`
  signal, but does not say how a transfer works.

Assertions check that the bus never grants two PEs at once, and that the
control unit never asks for a result write and a transfer write together.

## Example programs

Two testbenches run the source design's application examples on the
full-size machine.

* **`tb_sobel_workload`**: Sobel edge detection of a 10×10 image.
  * Each PE holds one image row plus its neighbours.
  * For each of the 8 interior columns, 9 common-address copies gather the
    3×3 window into addresses 1..9.
  * The 9-instruction gradient routine then leaves the result at address 37,
    with 33..41 used as temporaries.
  * The whole image takes 144 compute instructions of 5 cycles each, plus one
    read-out per column.
  * Results are read out serially and compared with a software model.
* **`tb_chem_workload`**: a chemical array where sensor 1 reacts to analytes A
  and B, and sensor 2 reacts to A only.
  * All sensors are gathered at once.
  * PE 1 then checks the response against a threshold with an immediate
    subtract and reads the carry flag.
  * PE 2 processes and stores two samples, compares them, and decides A
    versus B.
  * The test checks that the eight other PEs were never touched.

`tb_modsimd_top` checks 10 additions (one per PE) done by a single
instruction, as well as random programs.

## Departures from the source design, and choices it leaves open

* **Bus width.** The bus word is 27 bits. The source design's PE schematic
  shows a 27-bit port. Its system description calls the bus 26 bits: a 10-bit
  address plus 16 data bits. The 27th bit is used here as a valid bit.
* **Shift operations.** The source design's operation list defines left shift
  as `A << 1` and right shift as `A >> 1`. Its comments call them division by
  2 and multiplication by 2, the other way round. The expressions are followed.
* **Choices left open by the source design:**
  * class and mode codes;
  * the two-word immediate;
  * cycle counts and state encoding;
  * when `process_done` rises;
  * bus arbitration;
  * the transfer instruction;
  * the neighbour offsets;
  * the instruction handshake;
  * the op-code numbers, except `ADD = 0`.
* **No stack.** The source design's single-PE schematic shows a stack with
  push/pop enables, and the control unit ties push to 0. No stack operation is
  described, so none is built. The return-address output of the program
  counter is omitted for the same reason, and so are jumps.
* **No multiplication.** The operation list has none. The Sobel routine uses
  shifts and adds.

## Not built

* The sensors, the ADCs and the vertical interconnects (through-wafer vias).
  They are analog or physical parts; `adc_word` stands for their digital
  output.
* The stack.
* The 2-D variants used only for comparison: one shared ADC, or a column of
  ADCs feeding the PEs over a bus.
* Scaled-up versions, for example one the size of a 368×256 imager. The 4-bit
  PE_ID limits the array to 14 PEs (`1111` is reserved, `0000` is unused).
  `modsimd_top` asserts `1 <= NUM_PE <= 14`.
* The other two array sizes the architecture was sized against.
  * The 100-PE version (one sensor per PE) needs a wider PE_ID than this
    instruction format has.
  * The 1-PE version needs more than 64 words of local memory to hold a 10×10
    array, so a wider local address.
  * `NUM_PE = 1` does build, but with 64 words per PE.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `modsimd_top` | `NUM_PE` | 10 | number of PEs (1..14) |
| | `PC_W` | 10 | program counter width |
| | `NBR_UP_OFS`, `NBR_DN_OFS` | −10, +22 | address offsets of neighbour words |

The data width (16), instruction width (32), local address width (6, giving 64
words) and ID width (4) are in `modsimd_pkg`.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>` at the end. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/modsimd_pkg.sv tb/tb_ref_pkg.sv tb/tb_modsimd_top.sv \
    --top-module tb_modsimd_top -Mdir obj_top
./obj_top/Vtb_modsimd_top
```

Replace `tb_modsimd_top` with any other testbench in `tb/`:

* one per block: `tb_alu`, `tb_reg_file`, `tb_mem_bank`, `tb_datapath_ctrl`,
  `tb_pe_id_decode`, `tb_pe`, `tb_control_unit`, `tb_instr_latch`,
  `tb_program_counter`, `tb_data_bus`;
* the two workload testbenches.

`tb_modsimd_top` runs the machine at its default size:

1. It loads a 10×10 image plus random words under reset.
2. It runs about 400 random instructions against a model of all ten memories,
   ALU registers and flags, then reads every word back out.
3. It counts each mechanism and fails if one never happened:
   * common and specific addressing;
   * immediate operand and load-immediate;
   * read-outs, and bus waits (the stall);
   * transfers and clears;
   * neighbour writes;
   * gaps in the instruction stream;
   * PEs left idle by an instruction.

`tb_ref_pkg` holds the independent ALU model that the testbenches compare
against.

## Files

```
rtl/modsimd_pkg.sv      types, field layout, op-codes, control-flag struct
rtl/modsimd_top.sv      the processor: control unit, latch, PC, NUM_PE PEs, bus
rtl/control_unit.sv     control loop and flag sequencing
rtl/instr_latch.sv      Crnt_Instrn_1 / Crnt_Instrn_2 registers
rtl/program_counter.sv  word counter
rtl/data_bus.sv         fixed-priority shared bus
rtl/pe.sv               one processing element
rtl/pe_id_decode.sv     do_process
rtl/datapath_ctrl.sv    muxes, bus side, process_done
rtl/alu.sv              16-bit ALU with registered result and flags
rtl/reg_file.sv         operand registers and result write
rtl/mem_bank.sv         64-word memory with acquisition paths
tb/                     self-checking testbenches
```

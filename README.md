# PDES coprocessor: an associative next-event queue with a microcoded synchronizer

In a conservative parallel discrete event simulation (the Chandy-Misra
null-message scheme), each node spends much of its time on bookkeeping:
- inserting time-stamped messages into per-process event lists;
- deciding whether it is safe to hand the earliest one to a logical process (LP);
- sending null messages so that neighbouring nodes can advance.

This design moves that bookkeeping into a coprocessor beside the host node's
CPU. The host issues four macroinstructions through a small parallel port.
A microcoded engine carries them out against two stores:
- a 64k x 32 SRAM that holds each LP's state;
- an *associative* next-event queue (NEQ) that finds the smallest time tag
  among all queued events of an LP in a fixed number of steps, however full
  it is.

Results come back through interrupts:
- the event to execute;
- the null messages the host must send;
- an error vector.

The RTL is synthesizable SystemVerilog. It simulates with Verilator and
parses with yosys-slang.

## Block structure

```
          host port                     +---------------------------+
 cs_data/cs_status/w_r/inta --------->  | interface_unit            |
 host_wdata / host_rdata / intr <-----  |  PARIO in/out, STATUS(4), |
                                        |  INTERRUPT_REG(8)         |
                                        +-------------+-------------+
                                                      | internal bus (MBR)
   four_phase_clock --> CLK1..CLK4                    |
        |                                             |
   control_unit <-- control_store (microcode_rom)     |
   (MPC, decode, MSL, NZ)                             |
        | ctrl                                        |
   execution_unit (16x32 GPR, ALU, shifter, MBR, MAR) +----> sram 64k x 32
        |                                             |        ^ addr: MAR or
        +---------------------------------------------+        | NEQ adjacent addr
                                                      |        |
                                        neq_component (ESAM 32x32 + FSM + latches)
```

| module | role |
|---|---|
| `des_coprocessor` | top; wires the blocks and the internal bus |
| `four_phase_clock` | one-hot phase enables CLK1..CLK4, one per master clock |
| `control_unit` | MPC, registered microinstruction decode, branch logic, NZ flags |
| `control_store` + `microcode_rom` | 1024 x 16 microprogram, assembled at elaboration; `microcode_pkg` holds the entry addresses and word helpers |
| `execution_unit` | `gpr_file`, `alu`, `shifter`, A/B latches, MBR, MAR |
| `neq_component` | `esam`, `neq_ctrl_unit`, data/address latches, `neq_addr_encoder` |
| `sram` | shared 64k x 32 memory, registered read |
| `interface_unit` | host port, toggle status register, interrupt vector |
| `pdes_pkg` | field layouts, encodings, microinstruction numbers |

### Timing model

The original engine runs on four non-overlapping clock phases. Here there is
a single master clock `clk`, and `four_phase_clock` produces one-hot enables
`ph[3:0]`.

One microinstruction takes exactly four master clocks:

| phase | what happens |
|---|---|
| CLK1 | the control-store word at the MPC is decoded into a registered control word |
| CLK2 | the A and B latches load; the SRAM read is issued |
| CLK3 | the NZ flags load, for register operations only |
| CLK4 | the register file, MBR and MAR are written; the MPC loads the branch target or MPC+1 |

CLK4 also serves as the *clock filter*: the NEQ component and the status
register advance on the CLK4 edge only, once per four master clocks. During
reset CLK1 is held, and the MPC clears on it.

## The host protocol

### Status register

The status register has four bits. Each side changes a bit only by
*toggling* it, which it does by writing a 1 in that bit position.

| bit | meaning | set by | cleared by |
|---|---|---|---|
| 3 | ready for an opcode | coprocessor | coprocessor |
| 2 | error vector pending | coprocessor | coprocessor (after the host read) |
| 1 | data-in buffer full | host, after writing | coprocessor, after reading |
| 0 | data-out buffer full | coprocessor, after writing | host, after reading |

A host toggle that arrives between CLK4 edges is held, then applied together
with any coprocessor toggle on the next CLK4 edge.

### Host accesses

| `w_r` | `cs_data` | `cs_status` | access |
|---|---|---|---|
| 1 | 1 | 0 | write the PARIO input buffer |
| 0 | 1 | 0 | read the PARIO output buffer |
| 1 | 0 | 1 | toggle status bits |
| 0 | 0 | 1 | read the status register |

While `inta` is high, `host_rdata[7:0]` carries the interrupt vector and
INTR drops.

The host writes an opcode only when bit 3 is set and bit 1 is clear.
Operands need only bit 1 clear.

### Opcode word

| bits | field |
|---|---|
| 31..26 | instruction identifier |
| 25..23 | To node |
| 22..18 | To LP |
| 17..15 | From node |
| 14..10 | From LP |
| 9..0 | operand count |

Instruction identifiers:

| identifier | instruction |
|---|---|
| 000000 | Initialize Coprocessor |
| 000100 | Initialize Simulation |
| 001000 | Post Event |
| 010000 | Get Event |
| 100000 | Post Message |

### Instructions

The table below lists the operands that follow each opcode and what the
coprocessor returns.

| instruction | operands after the opcode | result |
|---|---|---|
| Initialize Coprocessor (opcode 0, once after reset) | 7 register values; see below | none; ready is set |
| Initialize Simulation (To = the LP) | LP delay, start time, `{#out[31:16], #in[15:0]}`, input-arc ids, output-arc ids | null messages at start + delay on every output arc (vector 255) |
| Post Message (To = receiver, From = sender) | time tag, then the event pointer if the count is 2 | none, or error vector 1 if the queue is full |
| Get Event (To = the LP) | none | the real event (vector 254: header, time, pointer); or null messages at time + delay on every output arc (vector 255); or error vector 255 if it is unsafe |
| Post Event (To = receiver of a real message, From = its sender) | time tag | null messages at that time on every output arc of the sender except the one that got the real message (vector 3) |

An arc id is `{node, LP}` placed at bits 17..10.

Each interrupt is followed by operands in the PARIO output buffer, read with
the usual bit-0 handshake:
1. A header: To at bits 25..18, From at bits 17..10, and the number of
   operands still to come at bits 9..0.
2. The time tag.
3. For a real event only, the memory pointer.

For Initialize Coprocessor, the seven register values are, in order:

| register | value |
|---|---|
| R1 | time mask `0x0001FFFF` |
| R3 | zero |
| R4 | message-id mask `0x007FFC00` |
| R5 | count mask `0x000003FF` |
| R6 | To mask `0x03FC0000` |
| R7 | From mask `0x0003FC00` |
| R9 | NEQ initial word, normally 0 |

The interrupt and error vectors are derived from these registers:
- 3 is R5 >> 8.
- 255 is the low byte of R5.
- 254 is that value minus one.
- 1 is R3 + 1.

An error ends the instruction with a vector in the output buffer and bits 2
and 0 set. After the host reads the vector, the coprocessor clears bit 2 and
sets ready again.

## The next-event queue

### ESAM word

Each queued message occupies one 32-bit word of the Extreme Search
Associative Memory:

| bit | 31 | 30..26 | 25..23 | 22..18 | 17 | 16..0 |
|---|---|---|---|---|---|---|
| field | valid | To LP | From node | From LP | reserved | time tag |

The 32-bit event pointer is not associative data. It is kept in the
*adjacent* SRAM word at `0x7FE0 + word index`.

### ESAM operations

Each operation takes one clock:
- **Search-All / Search-Subset**: equal, not-equal, minimum, not-minimum,
  maximum or not-maximum, over the bits selected by a mask.
- **Write-All / Write-Subset**: masked writes.
- **Write-Word / Read-Word**: act on the first matching word and remove it
  from the match set.

Minimum and maximum are found by eliminating candidates bit by bit from the
MSB, so their cost depends on the field width, not on how many words are
valid. When several words tie, the one with the lowest index wins.

### Reserved words

Every input arc of an LP gets one ESAM word *reserved* for it at Initialize
Simulation. A new message first looks for the empty reserved word of its own
arc, and only then for any empty unreserved word. Each arc therefore always
has room for at least one message: a flood on one arc cannot block the LP
that is waiting on another arc.

### NEQ commands

The control engine drives the NEQ with 3-bit commands. The table gives each
command's cost in clock-filter steps, counted from the command edge to
ready. Every step is four master clocks.

| command | meaning | steps |
|---|---|---|
| GO, first time | Init ESAM: write-all with valid=0, reserved=0, then select every word | 3 |
| GO, in the start-up idle state | reserve the next word for an arc; error1 if none is left | 3 |
| WRITE | reserved word of the arc, else an unreserved word, else error2 (ESAM full) | 5 or 7 |
| FINDMIN | search (valid, LP), take the minimum time among those words, read it, latch data and address, clear its valid bit; error2 if the LP has no event | 9, always |
| GO, in routine idle | search for a valid event on the given arc; error2 if there is none | 3 |
| OUT_DATA / OUT_ADDR | put the latched word or the adjacent address on the bus | 0 |
| GO, in an error state | leave the error state | 1 |

The FSM has 25 states, one per ESAM operation.

## Microcode

A microinstruction is 16 bits: `[15:10]` is one of 64 microinstruction
numbers, and `[9:0]` is either a branch target or `{00, R1, R2}`. The
microinstructions fall into these groups:

| numbers | group |
|---|---|
| 1-30, 34 | register operations |
| 8-15 | flags only |
| 16-19 | shifts of R2 into R1 |
| 0, 31, 36, 37, 41 | SRAM and adjacent-SRAM transfers |
| 38-45 | NEQ commands |
| 46-51 | MBR, PARIO and MAR moves |
| 52-56 | status toggles |
| 57-63 | branches |

The branch conditions are:
- negative or zero flag;
- status bit 1 clear (wait for host data);
- status bit 0 set (wait for the host to empty the output buffer);
- NEQ busy, which counts an error as not busy so wait loops fall through;
- NEQ error;
- unconditional.

### The microprogram

The function `build()` in `microcode_rom` assembles the microprogram at
elaboration, so editing the microcode means editing that function. The
entry addresses and the word-assembly helpers are in `microcode_pkg`. Word 1023 holds `0x0BAD`
if two routines overlap.

| entry | routine |
|---|---|
| 0 | Initialize Coprocessor |
| 64 | fetch/decode |
| 128 | Post Message |
| 256 | Get Event |
| 448 | Initialize Simulation |
| 576 | Post Event |
| 640 | error return |
| 704 | the shared null-message loop |

Fetch/decode works out the LP's SRAM partition as `{node, LP, 5'b0}`. The
partition holds:

| word | contents |
|---|---|
| 0 | input-arc status: bit *i* set means input arc *i* holds an event |
| 1 | LP delay |
| 2 | LP simulation time |
| 3 | `{#out, #in}` |
| 4 onwards | input-arc ids, then output-arc ids |

**Get Event** proceeds as follows:
1. It is *safe* only if every input arc holds an event. Otherwise it returns
   error vector 255.
2. It does a FINDMIN for the LP, fetches the pointer from the adjacent SRAM
   word and stores the new simulation time.
3. It searches for another event on the same arc. If there is none, it clears
   that arc's status bit.
4. A pointer of 0 means a null message. The result is then a null message on
   every output arc, at the event time plus the LP delay. Any other pointer
   is returned to the host as a real event.

## Departures from the original design

Each item below is a deliberate choice in this RTL.

- **Clocking.** Single-clock phase enables replace four clock nets.
- **ESAM operations.** Each one takes one clock and one FSM state. As a
  result, the NEQ FSM has 25 states, not 42.
- **Host data bus.** It is split into `host_wdata` and `host_rdata`.
- **Initialize Coprocessor.** It takes seven register values. Two of them
  (the time mask and the message-id mask) are extra dedicated registers that
  this microcode uses.
- **Adjacent-data base address.** It is `0x7FE0`.
- **Microinstructions 33, 41 and 42.** The original names them only. They
  are taken to mean:
  - 33: MBR ← NEQ adjacent address.
  - 41: SRAM[NEQ address] ← MBR.
  - 42: MBR ← NEQ data.
- **NZ flags.** They come from the ALU result, before the shifter.
- **Microprogram.** The microprogram, the register allocation and the LP
  partition layout are this design's own.
- **Operand checks.** There is no operand-count or illegal-operand check.
  The opcode's count field only says whether a Post Message carries a
  pointer.
- **Time tags.** They are 17 bits and do not wrap.

## Not implemented

- The transistor-level ESAM circuits: the cell write circuit, precharge and
  sense amplifier. Only their logic function is modelled, in `esam`.
- The host node. It exists only as a behavioural model inside the top-level
  testbench.
- Error vectors for an operand-count mismatch or an illegal operand value.
  The original mentions them as possible but gives no vector values; see
  "Operand checks" above.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_alu`, `tb_shifter` | every operation on corner cases and random data, against a reference |
| `tb_gpr_file` | zero after reset, random read/write against a shadow copy, one-cycle write latency |
| `tb_sram` | random write/read-back, one-cycle read latency, data held while `re` is low |
| `tb_four_phase_clock` | one-hot phases, order, 4-clock period, CLK1 held during reset |
| `tb_neq_addr_encoder` | all 32 one-hot selects |
| `tb_esam` | 4000 random operations against an arithmetic model (min/max computed on the masked value), including ties; full state compared after every operation |
| `tb_neq_ctrl_unit` | ESAM operation sequence, masks and step count of every command and error path |
| `tb_neq_component` | 3000 random writes, find-mins and searches against a queue model, including full-queue, empty-LP and missing-arc errors; find-min always takes 9 steps |
| `tb_execution_unit` | 1500 random microinstructions against a shadow data path; nothing is written before CLK4 |
| `tb_control_unit` | every branch condition taken and not taken, flag loading, decode of representative instructions, MPC changes only every 4 clocks |
| `tb_control_store` | microprogram consistency: entry points, dispatch, branch targets |
| `tb_interface_unit` | 3000 random host and coprocessor cycles against a model of the toggle register, buffers and interrupt |
| `tb_des_coprocessor` | end to end at default parameters; see below |

`tb_des_coprocessor` uses a behavioural host to drive one LP (node 2, LP 2)
with three input arcs, three output arcs and delay 5:
1. Initialize Simulation returns three null messages at time 5.
2. Three Post Messages follow: a null at time 5, and real messages at times 7
   and 8.
3. Get Event picks the null at time 5 and returns null messages at time 10.

   Steps 1 to 3 are the original's own sample instruction sequence, and
   the six null-message interrupts they produce are the ones it lists.
4. A second Get Event is unsafe: error 255.
5. After another post, Get Event returns the real event at time 7 with
   pointer 15.
6. Post Event sends nulls to the two other output arcs.
7. Messages from an arc without a reserved word fill the 29 free words, and
   the next one gets error 1.

The test counts how often each mechanism happened and fails if any count is
zero:
- null, real and post-event interrupts;
- unsafe and full errors;
- writes into reserved and into unreserved words;
- an arc emptied by Get Event;
- waits on the NEQ.

It also checks on every clock that the MPC changes only on CLK4.

### Running a testbench

Run from the repository root:

```
verilator --binary --timing -Wno-fatal --top-module tb_des_coprocessor \
  rtl/pdes_pkg.sv rtl/microcode_pkg.sv \
  $(ls rtl/*.sv | grep -v _pkg.sv) tb/tb_des_coprocessor.sv
./obj_dir/Vtb_des_coprocessor
```

For another block, replace the top module and the testbench file. The
package files must come first.

// microcode_rom: microcode program of the PDES coprocessor control store.
//
// The function build() in this module assembles the synchronization routines into a
// 1024 x 16-bit control-store image at elaboration time. Each word is
// {microinstruction number, 10-bit field}; the field is a branch target or
// {2'b00, R1, R2}. Backward branches use the current address, forward
// branches are patched once their target is known.
//
// Routines (entry addresses are the constants below):
//   0        Coprocessor init: signal ready, wait for opcode 0, read seven
//            operands into the dedicated registers R1, R3, R4, R5, R6, R7,
//            R9, initialise the NEQ component with R9, go to fetch.
//   FETCH    wait for an opcode, signal not ready, clear a pending NEQ
//            error, R2 = opcode, R8 = operand count, R9 = recipient
//            node/LP field, R0 = recipient's SRAM partition ({node,LP,5'b0}),
//            branch on the leading one of the opcode identifier.
//   POST_MSG read time tag (and memory pointer for a real message), write
//            the ESAM word, on ESAM full return error vector 1, store the
//            pointer in the adjacent SRAM word, set the sender's input-arc
//            bit in the LP status word.
//   GET_EVT  if not every input arc holds an event return error vector 255;
//            else find/read/invalidate the minimum event, read its pointer,
//            store the new simulation time, clear the arc bit if the arc
//            has no further event, then either interrupt with vector 254
//            (real: header, time, pointer) or send null messages on all
//            output arcs at time + LP delay (vector 255).
//   INIT_SIM read LP delay, start time, arc counts and arc identifiers into
//            the LP partition, reserve one ESAM word per input arc, send null
//            messages at start time + delay on every output arc.
//   POST_EVT send null messages (vector 3) at the given time on every output
//            arc of the sending LP except the one that got the real message.
//   ERR      return an error vector: data-out and error bits set together,
//            wait for the host to read it, clear the error bit.
//
// LP partition layout (this design's choice): word 0 input-arc status
// (bit i = input arc i holds an event), 1 LP delay, 2 simulation time,
// 3 {#output arcs, #input arcs}, 4.. input arc ids then output arc ids.
//
// The routine list and algorithms follow the document; this program, the
// register use and the partition layout are this design's own.
//
// Interface: `addr` (micro-program counter) in, `uinstr` out; the read is
// combinational. The image is a constant computed at elaboration.
module microcode_rom
  import pdes_pkg::*;
  import microcode_pkg::*;
(
  input  logic [UPC_W-1:0] addr,
  output logic [15:0]      uinstr
);

`define E(w) begin if (m[pc] != FILL) ov++; m[pc] = (w); pc++; end
`define PATCH(f) m[f] = {m[f][15:10], 10'(pc)};
  // host -> register (waits for the data-in bit)
`define RD_HOST(rn) begin `E(J(UI_J_NST1, pc)) `E(R(UI_MBR_PARIO)) `E(R(UI_TGL_ST1)) `E(R(UI_R1_MBR, rn)) end
  // register -> host (waits for the data-out bit to clear)
`define WR_HOST(rn) begin `E(R(UI_MBR_R2, 0, rn)) `E(J(UI_J_ST0, pc)) `E(R(UI_PARIO_MBR)) `E(R(UI_TGL_ST0)) end
`define SRAM_RD(rn, ra) begin `E(R(UI_MOV_MAR, ra)) `E(R(UI_SRAM_RD)) `E(R(UI_R1_MBR, rn)) end
`define SRAM_WR(ra, rn) begin `E(R(UI_MAR_MBR, ra, rn)) `E(R(UI_SRAM_WR)) end
`define NEQ_WAIT `E(J(UI_J_NEQ_BUSY, pc))

  function automatic rom_t build();
    rom_t m;
    int pc, ov, f1, f2, f3, f4, lp, lp2, back, reply;
    ov = 0;
    for (int i = 0; i < CS_DEPTH; i++) m[i] = FILL;

    // ---------------- Coprocessor init ----------------
    pc = A_INIT;
    `E(R(UI_TGL_ST3))                      // ready
    `E(J(UI_J_NST1, pc))                   // wait for opcode 0
    `E(R(UI_MBR_PARIO))
    `E(R(UI_TGL_ST1))
    `E(R(UI_TGL_ST3))                      // not ready
    `RD_HOST(1)                            // time-tag mask
    `RD_HOST(3)                            // zero
    `RD_HOST(4)                            // message id mask
    `RD_HOST(5)                            // count mask
    `RD_HOST(6)                            // to node/LP mask
    `RD_HOST(7)                            // from node/LP mask
    `RD_HOST(9)                            // NEQ init value
    `E(R(UI_MBR_R2, 0, 9))
    `E(R(UI_NEQ_INIT))
    `NEQ_WAIT
    `E(R(UI_TGL_ST3))                      // ready
    `E(J(UI_JMP, A_FETCH))

    // ---------------- Fetch / decode ----------------
    pc = A_FETCH;
    `E(J(UI_J_NST1, pc))                   // wait for opcode
    `E(R(UI_TGL_ST3))                      // not ready
    `E(R(UI_MBR_PARIO))
    `E(R(UI_TGL_ST1))
    `E(R(UI_R1_MBR, 2))                    // R2 = opcode
    f1 = pc; `E(J(UI_J_NEQ_ERR, 0))
    back = pc;
    `E(R(UI_MOV, 8, 2)) `E(R(UI_AND, 8, 5))            // R8 = count
    `E(R(UI_MOV, 9, 2)) `E(R(UI_AND, 9, 6))            // R9 = to node/LP (25..18)
    `E(R(UI_MOV, 0, 9)) `E(R(UI_RSH8, 0, 0)) `E(R(UI_RSH8, 0, 0))
    `E(R(UI_LSH, 0, 0)) `E(R(UI_LSH, 0, 0)) `E(R(UI_LSH, 0, 0))   // R0 = partition
    `E(R(UI_MOV, 10, 2))
    `E(J(UI_JN, A_POST_MSG))
    `E(R(UI_LSH, 10, 10)) `E(R(UI_NZ_R2, 0, 10)) `E(J(UI_JN, A_GET_EVT))
    `E(R(UI_LSH, 10, 10)) `E(R(UI_NZ_R2, 0, 10)) `E(J(UI_JN, A_POST_EVT))
    `E(R(UI_LSH, 10, 10)) `E(R(UI_NZ_R2, 0, 10)) `E(J(UI_JN, A_INIT_SIM))
    `E(R(UI_TGL_ST3))                      // unknown opcode: ignore
    `E(J(UI_JMP, A_FETCH))
    `PATCH(f1)
    `E(R(UI_NEQ_CLR))
    `E(J(UI_JMP, back))

    // ---------------- Post Message ----------------
    pc = A_POST_MSG;
    `RD_HOST(11)                           // time tag
    `E(R(UI_MOV, 12, 3))                   // pointer = 0 (null message)
    `E(R(UI_MOV, 13, 8)) `E(R(UI_DEC, 13))
    f1 = pc; `E(J(UI_JZ, 0))
    `RD_HOST(12)                           // memory pointer
    `PATCH(f1)
    `E(R(UI_MOV, 14, 2)) `E(R(UI_AND, 14, 4)) `E(R(UI_LSH8, 14, 14)) `E(R(UI_OR, 14, 11))
    `E(R(UI_MBR_R2, 0, 14))
    `E(R(UI_NEQ_WRITE))
    `NEQ_WAIT
    f2 = pc; `E(J(UI_J_NEQ_ERR, 0))
    `E(R(UI_MBR_R2, 0, 12))
    `E(R(UI_ADJ_WR))                       // pointer to adjacent SRAM
    `E(R(UI_MOV, 13, 2)) `E(R(UI_AND, 13, 7))          // sender id (17..10)
    `E(R(UI_MOV, 14, 0)) `E(R(UI_INC, 14)) `E(R(UI_INC, 14)) `E(R(UI_INC, 14))
    `SRAM_RD(12, 14)
    `E(R(UI_AND, 12, 5))                   // number of input arcs
    `E(R(UI_INC, 14))                      // first input arc id
    `E(R(UI_MOV, 10, 3)) `E(R(UI_INC, 10)) // arc bit
    lp = pc;
    `E(R(UI_MOV, 12, 12))
    f3 = pc; `E(J(UI_JZ, 0))
    `SRAM_RD(15, 14)
    `E(R(UI_XOR, 15, 13))
    f4 = pc; `E(J(UI_JZ, 0))
    `E(R(UI_LSH, 10, 10)) `E(R(UI_INC, 14)) `E(R(UI_DEC, 12))
    `E(J(UI_JMP, lp))
    `PATCH(f4)
    `SRAM_RD(15, 0)
    `E(R(UI_OR, 15, 10))
    `SRAM_WR(0, 15)
    `PATCH(f3)
    `E(R(UI_TGL_ST3))
    `E(J(UI_JMP, A_FETCH))
    `PATCH(f2)                             // ESAM full: vector 1
    `E(R(UI_MOV, 15, 3)) `E(R(UI_INC, 15))
    `E(J(UI_JMP, A_ERR))

    // ---------------- Get Event ----------------
    pc = A_GET_EVT;
    `SRAM_RD(15, 0)                        // input-arc status
    `E(R(UI_MOV, 14, 0)) `E(R(UI_INC, 14)) `E(R(UI_INC, 14)) `E(R(UI_INC, 14))
    `SRAM_RD(12, 14)
    `E(R(UI_AND, 12, 5))
    `E(R(UI_MOV, 10, 3)) `E(R(UI_INC, 10))
    lp = pc;                               // R10 = 2**inputs
    `E(R(UI_MOV, 12, 12))
    f1 = pc; `E(J(UI_JZ, 0))
    `E(R(UI_LSH, 10, 10)) `E(R(UI_DEC, 12))
    `E(J(UI_JMP, lp))
    `PATCH(f1)
    `E(R(UI_DEC, 10))
    `E(R(UI_XOR, 10, 15))
    f1 = pc; `E(J(UI_JZ, 0))
    f4 = pc;                               // unsafe: vector 255
    `E(R(UI_MOV, 15, 5))
    `E(J(UI_JMP, A_ERR))
    `PATCH(f1)
    `E(R(UI_MOV, 14, 9)) `E(R(UI_LSH8, 14, 14))         // recipient LP in 30..26
    `E(R(UI_MBR_R2, 0, 14))
    `E(R(UI_NEQ_FMIN))
    `NEQ_WAIT
    `E(J(UI_J_NEQ_ERR, f4))
    `E(R(UI_NEQ_READ)) `E(R(UI_R1_MBR, 11))             // event word
    `E(R(UI_ADJ_RD))   `E(R(UI_R1_MBR, 12))             // memory pointer
    `E(R(UI_MOV, 13, 11)) `E(R(UI_AND, 13, 1))          // time tag
    `E(R(UI_MOV, 14, 0)) `E(R(UI_INC, 14)) `E(R(UI_INC, 14))
    `SRAM_WR(14, 13)                                    // simulation time
    `E(R(UI_MBR_R2, 0, 11))
    `E(R(UI_NEQ_SRCH))                                  // another event on this arc?
    `NEQ_WAIT
    f2 = pc; `E(J(UI_J_NEQ_ERR, 0))
    reply = pc;
    `E(R(UI_MOV, 12, 12))
    f3 = pc; `E(J(UI_JZ, 0))
    `E(R(UI_MOV, 15, 5)) `E(R(UI_DEC, 15))              // vector 254
    `E(R(UI_MBR_R2, 0, 15)) `E(R(UI_INTR))
    `E(R(UI_MOV, 15, 11)) `E(R(UI_AND, 15, 6)) `E(R(UI_RSH8, 15, 15))
    `E(R(UI_OR, 15, 9)) `E(R(UI_INC, 15)) `E(R(UI_INC, 15))
    `WR_HOST(15)
    `WR_HOST(13)
    `WR_HOST(12)
    `E(R(UI_TGL_ST3))
    `E(J(UI_JMP, A_FETCH))
    `PATCH(f2)                             // arc now empty: clear its bit
    `E(R(UI_NEQ_CLR))
    `E(R(UI_MOV, 10, 11)) `E(R(UI_AND, 10, 6)) `E(R(UI_RSH8, 10, 10))
    `E(R(UI_MOV, 14, 0)) `E(R(UI_INC, 14)) `E(R(UI_INC, 14)) `E(R(UI_INC, 14))
    `SRAM_RD(8, 14)
    `E(R(UI_AND, 8, 5))
    `E(R(UI_INC, 14))
    `E(R(UI_MOV, 15, 3)) `E(R(UI_INC, 15))
    lp2 = pc;
    `E(R(UI_MOV, 8, 8))
    `E(J(UI_JZ, reply))
    `SRAM_RD(2, 14)
    `E(R(UI_XOR, 2, 10))
    f4 = pc; `E(J(UI_JZ, 0))
    `E(R(UI_LSH, 15, 15)) `E(R(UI_INC, 14)) `E(R(UI_DEC, 8))
    `E(J(UI_JMP, lp2))
    `PATCH(f4)
    `SRAM_RD(2, 0)
    `E(R(UI_XOR, 2, 15))
    `SRAM_WR(0, 2)
    `E(J(UI_JMP, reply))
    `PATCH(f3)                             // null message: nulls on all outputs
    `E(R(UI_MOV, 14, 0)) `E(R(UI_INC, 14))
    `SRAM_RD(10, 14)                       // LP delay
    `E(R(UI_ADD, 13, 10))
    `E(R(UI_MOV, 10, 9)) `E(R(UI_RSH8, 10, 10)) `E(R(UI_INC, 10))
    `E(R(UI_MOV, 11, 5))
    `E(R(UI_MOV, 12, 3)) `E(R(UI_INC, 12))
    `E(J(UI_JMP, A_NULLS))

    // ---------------- Initialize Simulation ----------------
    pc = A_INIT_SIM;
    `RD_HOST(10)                           // LP delay
    `RD_HOST(11)                           // initial simulation time
    `RD_HOST(12)                           // {#out, #in}
    `SRAM_WR(0, 3)                         // no input arc holds an event
    `E(R(UI_MOV, 14, 0)) `E(R(UI_INC, 14))
    `SRAM_WR(14, 10)
    `E(R(UI_INC, 14))
    `SRAM_WR(14, 11)
    `E(R(UI_INC, 14))
    `SRAM_WR(14, 12)
    `E(R(UI_MOV, 15, 12)) `E(R(UI_AND, 15, 5))
    `E(R(UI_RSH8, 12, 12)) `E(R(UI_RSH8, 12, 12)) `E(R(UI_AND, 12, 5))
    lp = pc;
    `E(R(UI_MOV, 15, 15))
    f1 = pc; `E(J(UI_JZ, 0))
    `RD_HOST(13)
    `E(R(UI_INC, 14))
    `SRAM_WR(14, 13)
    `E(R(UI_LSH8_OR, 13, 9))               // reserved ESAM word for this arc
    `E(R(UI_MBR_R2, 0, 13))
    `E(R(UI_NEQ_RSV))
    `NEQ_WAIT
    `E(R(UI_DEC, 15))
    `E(J(UI_JMP, lp))
    `PATCH(f1)
    lp = pc;
    `E(R(UI_MOV, 12, 12))
    f1 = pc; `E(J(UI_JZ, 0))
    `RD_HOST(13)
    `E(R(UI_INC, 14))
    `SRAM_WR(14, 13)
    `E(R(UI_DEC, 12))
    `E(J(UI_JMP, lp))
    `PATCH(f1)
    `E(R(UI_MOV, 13, 11)) `E(R(UI_ADD, 13, 10))         // start time + delay
    `E(R(UI_MOV, 10, 9)) `E(R(UI_RSH8, 10, 10)) `E(R(UI_INC, 10))
    `E(R(UI_MOV, 11, 5))                                // vector 255
    `E(R(UI_MOV, 12, 3)) `E(R(UI_INC, 12))              // skip nothing
    `E(J(UI_JMP, A_NULLS))

    // ---------------- Post Event ----------------
    pc = A_POST_EVT;
    `E(R(UI_MOV, 0, 2)) `E(R(UI_AND, 0, 7)) `E(R(UI_RSH8, 0, 0))
    `E(R(UI_LSH, 0, 0)) `E(R(UI_LSH, 0, 0)) `E(R(UI_LSH, 0, 0))   // sender partition
    `RD_HOST(13)                                        // time tag
    `E(R(UI_MOV, 12, 9)) `E(R(UI_RSH8, 12, 12))         // arc that got the real message
    `E(R(UI_MOV, 10, 2)) `E(R(UI_AND, 10, 7)) `E(R(UI_INC, 10))
    `E(R(UI_MOV, 11, 5)) `E(R(UI_RSH8, 11, 11))         // vector 3
    `E(J(UI_JMP, A_NULLS))

    // ---------------- Error vector (R15) ----------------
    pc = A_ERR;
    `E(R(UI_MBR_R2, 0, 15))
    `E(J(UI_J_ST0, pc))
    `E(R(UI_PARIO_MBR))
    `E(R(UI_TGL_ST20))                     // error + data out
    `E(J(UI_J_ST0, pc))                    // host reads the vector
    `E(R(UI_TGL_ST2))
    `E(R(UI_TGL_ST3))
    `E(J(UI_JMP, A_FETCH))

    // ---------------- Null messages on output arcs ----------------
    // R0 partition, R10 {from, count=1}, R11 vector, R12 arc to skip,
    // R13 time tag.
    pc = A_NULLS;
    `E(R(UI_MOV, 14, 0)) `E(R(UI_INC, 14)) `E(R(UI_INC, 14)) `E(R(UI_INC, 14))
    `SRAM_RD(15, 14)
    `E(R(UI_MOV, 8, 15)) `E(R(UI_AND, 8, 5))
    `E(R(UI_RSH8, 15, 15)) `E(R(UI_RSH8, 15, 15)) `E(R(UI_AND, 15, 5))
    `E(R(UI_INC, 14)) `E(R(UI_ADD, 14, 8))              // first output arc id
    lp = pc;
    `E(R(UI_MOV, 15, 15))
    f1 = pc; `E(J(UI_JZ, 0))
    `SRAM_RD(2, 14)
    `E(R(UI_MOV, 8, 2)) `E(R(UI_XOR, 8, 12))
    f2 = pc; `E(J(UI_JZ, 0))
    `E(R(UI_MBR_R2, 0, 11)) `E(R(UI_INTR))
    `E(R(UI_LSH8, 2, 2)) `E(R(UI_OR, 2, 10))
    `WR_HOST(2)
    `WR_HOST(13)
    `PATCH(f2)
    `E(R(UI_INC, 14)) `E(R(UI_DEC, 15))
    `E(J(UI_JMP, lp))
    `PATCH(f1)
    `E(R(UI_TGL_ST3))
    `E(J(UI_JMP, A_FETCH))
    if (pc > CS_DEPTH - 1) ov++;

    if (ov != 0) m[CS_DEPTH-1] = BAD_MARK;
    return m;
  endfunction

`undef E
`undef PATCH
`undef RD_HOST
`undef WR_HOST
`undef SRAM_RD
`undef SRAM_WR
`undef NEQ_WAIT


  localparam rom_t ROM = build();
  assign uinstr = ROM[addr];

endmodule

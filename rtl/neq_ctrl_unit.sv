// neq_ctrl_unit: finite state machine of the Next Event Queue component.
//
// Accepts a 3-bit command (neq_cmd_e) from the control engine and sequences
// the ESAM operations that implement it. All state changes happen on clock
// edges where `ce` (the clock-filter enable, one per four master clocks) is
// high. ESAM operation, comparand overrides and mask are decoded from the
// state register; the ESAM executes the operation of the current state on
// the same enabled edge on which the FSM leaves that state, so result flags
// (match_stat, wdsel_stat) are tested in the following state.
//
// Top-level states and their algorithms follow the document:
//   idle1    wait for the first command after reset (GO starts Init ESAM)
//   init     Write-All (valid=0, reserved=0), then Search-All Equal for the
//            init value so every word is selected for reservation
//   reserve1 start-up idle: GO reserves one word (Write-Word valid=0,
//            reserved=1; no word left -> error1), WRITE starts routine use
//   write    Search-All Equal for an invalid word reserved for this arc;
//            else Search-All Equal for an invalid unreserved word; else
//            error2 (ESAM full). Write-Word sets the valid bit and keeps
//            the reserved bit.
//   findmin  Search-All Equal (valid, recipient LP); none -> error2.
//            Search-Subset Minimum on the time tag, Read-Word, latch data
//            and address, repeat the two searches, Write-Word valid=0.
//   search   Search-All Equal for a valid event on the given arc; none ->
//            error2.
//   idle2    routine idle; OUT_DATA / OUT_ADDR enable the output latches.
//   error1   non-recoverable (too many reservations); GO -> idle1
//   error2   recoverable; GO -> idle2
// The original machine has 42 states because each ESAM operation takes
// three control stimuli; here each operation takes one state, so the state
// count and encoding are this design's own.
module neq_ctrl_unit
  import pdes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  neq_cmd_e    cmd,
  input  logic        match_stat,
  input  logic        wdsel_stat,
  output esam_op_e    esam_op,
  output logic        esam_subset,
  output logic        force_v,      // drive DATA_IN(31) from v_bit
  output logic        v_bit,
  output logic        force_r,      // drive DATA_IN(17) from r_bit
  output logic        r_bit,
  output logic [31:0] mask,
  output logic        ld_data_in,   // latch ESAM_DATA_IN from the internal bus
  output logic        ld_data_out,  // latch ESAM_DATA_OUT from the ESAM
  output logic        ld_addr,      // latch ESAM_ADDR_OUT from the encoder
  output logic        oe_data,
  output logic        oe_addr,
  output logic        ready,
  output logic        error
);

  typedef enum logic [4:0] {
    S_IDLE1, S_INIT1, S_INIT2, S_RESERVE1, S_RSV1, S_RSV2, S_ERROR1,
    S_WRITE1, S_WRITE2, S_WRITE3, S_WRITE4, S_WRITE5, S_WRITE6,
    S_IDLE2, S_SRCH1, S_SRCH2,
    S_MIN1, S_MIN2, S_MIN3, S_MIN4, S_MIN5, S_MIN6, S_MIN7, S_MIN8,
    S_ERROR2
  } state_e;

  state_e state, nxt;

  always_comb begin
    nxt = state;
    unique case (state)
      S_IDLE1:    if (cmd == NEQ_GO) nxt = S_INIT1;
      S_INIT1:    nxt = S_INIT2;
      S_INIT2:    nxt = S_RESERVE1;
      S_RESERVE1: if (cmd == NEQ_GO) nxt = S_RSV1;
                  else if (cmd == NEQ_WRITE) nxt = S_WRITE1;
      S_RSV1:     nxt = S_RSV2;
      S_RSV2:     nxt = wdsel_stat ? S_RESERVE1 : S_ERROR1;
      S_ERROR1:   if (cmd == NEQ_GO) nxt = S_IDLE1;
      S_WRITE1:   nxt = S_WRITE2;
      S_WRITE2:   nxt = match_stat ? S_WRITE3 : S_WRITE4;
      S_WRITE3:   nxt = S_WRITE6;
      S_WRITE4:   nxt = S_WRITE5;
      S_WRITE5:   nxt = match_stat ? S_WRITE3 : S_ERROR2;
      S_WRITE6:   nxt = S_IDLE2;
      S_IDLE2: begin
        unique case (cmd)
          NEQ_WRITE:   nxt = S_WRITE1;
          NEQ_FINDMIN: nxt = S_MIN1;
          NEQ_GO:      nxt = S_SRCH1;
          default:     nxt = S_IDLE2;
        endcase
      end
      S_SRCH1:    nxt = S_SRCH2;
      S_SRCH2:    nxt = match_stat ? S_IDLE2 : S_ERROR2;
      S_MIN1:     nxt = S_MIN2;
      S_MIN2:     nxt = match_stat ? S_MIN3 : S_ERROR2;
      S_MIN3:     nxt = S_MIN4;
      S_MIN4:     nxt = S_MIN5;
      S_MIN5:     nxt = S_MIN6;
      S_MIN6:     nxt = S_MIN7;
      S_MIN7:     nxt = S_MIN8;
      S_MIN8:     nxt = S_IDLE2;
      S_ERROR2:   if (cmd == NEQ_GO) nxt = S_IDLE2;
      default:    nxt = S_IDLE1;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)     state <= S_IDLE1;
    else if (ce) state <= nxt;
  end

  // Moore outputs decoded from the state register.
  always_comb begin
    esam_op     = ESAM_NOP;
    esam_subset = 1'b0;
    force_v     = 1'b0;
    v_bit       = 1'b0;
    force_r     = 1'b0;
    r_bit       = 1'b0;
    mask        = '0;
    ld_data_out = 1'b0;
    ld_addr     = 1'b0;
    ready       = 1'b0;
    error       = 1'b0;
    unique case (state)
      S_IDLE1, S_RESERVE1, S_IDLE2: ready = 1'b1;
      S_INIT1: begin
        esam_op = ESAM_WRITE_ALL; mask = '1;
        force_v = 1'b1; force_r = 1'b1;
      end
      S_INIT2: begin
        esam_op = ESAM_SRCH_EQ; mask = '1;
        force_v = 1'b1; force_r = 1'b1;
      end
      S_RSV1: begin
        esam_op = ESAM_WRITE_WORD; mask = '1;
        force_v = 1'b1; force_r = 1'b1; r_bit = 1'b1;
      end
      S_WRITE1: begin      // invalid word reserved for this arc
        esam_op = ESAM_SRCH_EQ; mask = M_VALID | M_RSV | M_TOLP | M_FROM;
        force_v = 1'b1; force_r = 1'b1; r_bit = 1'b1;
      end
      S_WRITE3: begin      // fill it: valid=1, reserved bit untouched
        esam_op = ESAM_WRITE_WORD; mask = ~M_RSV;
        force_v = 1'b1; v_bit = 1'b1;
      end
      S_WRITE4: begin      // any invalid unreserved word
        esam_op = ESAM_SRCH_EQ; mask = M_VALID | M_RSV;
        force_v = 1'b1; force_r = 1'b1;
      end
      S_WRITE6: ld_addr = 1'b1;
      S_SRCH1: begin
        esam_op = ESAM_SRCH_EQ; mask = M_VALID | M_TOLP | M_FROM;
        force_v = 1'b1; v_bit = 1'b1;
      end
      S_MIN1, S_MIN6: begin
        esam_op = ESAM_SRCH_EQ; mask = M_VALID | M_TOLP;
        force_v = 1'b1; v_bit = 1'b1;
      end
      S_MIN3, S_MIN7: begin
        esam_op = ESAM_SRCH_MIN; esam_subset = 1'b1; mask = M_TIME;
      end
      S_MIN4: esam_op = ESAM_READ_WORD;
      S_MIN5: begin ld_data_out = 1'b1; ld_addr = 1'b1; end
      S_MIN8: begin
        esam_op = ESAM_WRITE_WORD; mask = M_VALID;
        force_v = 1'b1;
      end
      S_ERROR1, S_ERROR2: error = 1'b1;
      default: ;
    endcase
  end

  // Commands are accepted (and ESAM_DATA_IN latched) in the idle states.
  always_comb begin
    ld_data_in = 1'b0;
    if (ce) begin
      unique case (state)
        S_IDLE1:    ld_data_in = (cmd == NEQ_GO);
        S_RESERVE1: ld_data_in = (cmd == NEQ_GO) || (cmd == NEQ_WRITE);
        S_IDLE2:    ld_data_in = (cmd == NEQ_GO) || (cmd == NEQ_WRITE) || (cmd == NEQ_FINDMIN);
        default:    ld_data_in = 1'b0;
      endcase
    end
  end

  assign oe_data = (state == S_IDLE2) && (cmd == NEQ_OUT_DATA);
  assign oe_addr = (state == S_IDLE2) && (cmd == NEQ_OUT_ADDR);

endmodule

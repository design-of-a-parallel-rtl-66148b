// esam: Extreme Search Associative Memory (WORDS x WIDTH, default 32 x 32).
//
// An associative array with a word-match register. Each operation takes one
// clock:
//   * searches (equal, not-equal, minimum, not-minimum, maximum,
//     not-maximum) compare only the bits set in `mask`. With `subset`=0 every
//     word is a candidate (Search-All); with `subset`=1 only words in the
//     current match register are (Search-Subset). The result replaces the
//     match register.
//   * minimum / maximum use bit-serial, word-parallel elimination: starting
//     at the most significant masked bit, if any candidate holds the
//     preferred value (0 for minimum, 1 for maximum) in that bit slice, the
//     candidates that do not are dropped. The slice chain is combinational,
//     so its depth grows linearly with the search-field width, as in the
//     original array.
//   * Write-All / Write-Subset write the masked bits of `data` into every
//     word / every matched word.
//   * Write-Word / Read-Word act on the matched word closest to the top
//     (lowest index) and remove it from the match register, so consecutive
//     word operations step through the results of the last search.
//     `wdsel_stat` reports whether a word was found; `sel` is that word,
//     one-hot; `rdata` holds the word read.
// match_stat is the OR of the match register.
//
// Operation set, masking and the exhausting of search results by word
// operations follow the document. Resolving ties at the lowest index, the
// single-cycle operation and the registered read data are this design's
// own choices: the original drives each operation with three control
// stimuli on a custom array.
module esam
  import pdes_pkg::*;
#(
  parameter int WORDS = 32,
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  esam_op_e         op,
  input  logic             subset,
  input  logic [WIDTH-1:0] data,
  input  logic [WIDTH-1:0] mask,
  output logic [WORDS-1:0] match,
  output logic             match_stat,
  output logic             wdsel_stat,
  output logic [WORDS-1:0] sel,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [WORDS];

  logic [WORDS-1:0] cand, eq_hit, ext_hit, first_sel;
  logic             prefer_one;

  always_comb begin
    cand = subset ? match : '1;
    for (int w = 0; w < WORDS; w++)
      eq_hit[w] = cand[w] && (((mem[w] ^ data) & mask) == '0);
  end

  // Bit-serial extreme search, MSB first.
  always_comb begin
    logic [WORDS-1:0] keep, pref;
    prefer_one = (op == ESAM_SRCH_MAX) || (op == ESAM_SRCH_NMAX);
    keep = cand;
    for (int b = WIDTH-1; b >= 0; b--) begin
      for (int w = 0; w < WORDS; w++)
        pref[w] = keep[w] && (mem[w][b] == prefer_one);
      if (mask[b] && (pref != '0))
        keep = pref;
    end
    ext_hit = keep;
  end

  // First matched word (closest to the top = lowest index).
  always_comb begin
    first_sel = '0;
    for (int w = WORDS-1; w >= 0; w--)
      if (match[w]) first_sel = WORDS'(1) << w;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      match      <= '0;
      wdsel_stat <= 1'b0;
      sel        <= '0;
      rdata      <= '0;
    end else begin
      unique case (op)
        ESAM_SRCH_EQ:   match <= eq_hit;
        ESAM_SRCH_NEQ:  match <= cand & ~eq_hit;
        ESAM_SRCH_MIN,
        ESAM_SRCH_MAX:  match <= ext_hit;
        ESAM_SRCH_NMIN,
        ESAM_SRCH_NMAX: match <= cand & ~ext_hit;
        ESAM_WRITE_ALL, ESAM_WRITE_SUB: begin
          for (int w = 0; w < WORDS; w++)
            if (op == ESAM_WRITE_ALL || match[w])
              mem[w] <= (mem[w] & ~mask) | (data & mask);
        end
        ESAM_WRITE_WORD, ESAM_READ_WORD: begin
          wdsel_stat <= (match != '0);
          sel        <= first_sel;
          match      <= match & ~first_sel;
          for (int w = 0; w < WORDS; w++)
            if (first_sel[w]) begin
              if (op == ESAM_WRITE_WORD)
                mem[w] <= (mem[w] & ~mask) | (data & mask);
              else
                rdata <= mem[w];
            end
        end
        default: ;
      endcase
    end
  end

  assign match_stat = (match != '0);

endmodule

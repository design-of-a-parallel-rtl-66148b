// neq_addr_encoder: converts the ESAM word selected by the last word
// operation into an address.
//
// `sel` is a one-hot word select vector from the ESAM. `addr` is its binary
// index (5 bits for 32 words) and `sram_addr` is the 16-bit address of the
// matching word in the adjacent-data region of the shared SRAM, where the
// event memory pointer of each queued message is kept: ADJ_BASE | addr.
// Purely combinational. The upper 11 bits of `sram_addr` are the constant
// base, so they never change; the SRAM address port still needs all 16.
//
// The 5-bit encoded address and the 16-bit SRAM address follow the
// document; the value of ADJ_BASE (the top 32 words of the lower 32k words
// of the SRAM) is this design's choice.
module neq_addr_encoder
  import pdes_pkg::*;
#(
  parameter int WORDS = 32,
  parameter int AW    = $clog2(WORDS)
) (
  input  logic [WORDS-1:0] sel,
  output logic [AW-1:0]    addr,
  output logic [15:0]      sram_addr
);
  always_comb begin
    addr = '0;
    for (int w = 0; w < WORDS; w++)
      if (sel[w]) addr = addr | AW'(w);
  end
  assign sram_addr = ADJ_BASE | 16'(addr);
endmodule

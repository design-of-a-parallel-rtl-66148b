// tb_neq_addr_encoder: self-checking test of the NEQ address encoder.
//
// Drives every one-hot word-select vector of the 32-word ESAM and checks
// the binary word address and the adjacent SRAM address (fixed base with
// the word address in the low bits), plus the all-zero vector.
// Combinational: checked 1 time unit after the input changes.
module tb_neq_addr_encoder;
  import pdes_pkg::*;
  logic [31:0] sel;
  logic [4:0] addr;
  logic [15:0] sram_addr;
  int checks = 0, failures = 0;

  neq_addr_encoder #(.WORDS(32)) dut (.sel, .addr, .sram_addr);

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int w = 0; w < 32; w++) begin
      sel = 32'(1) << w;
      #1;
      checks++;
      if (addr !== 5'(w) || sram_addr !== (ADJ_BASE | 16'(w))) begin
        failures++;
        $display("FAIL word %0d addr=%0d sram=%h", w, addr, sram_addr);
      end
    end
    sel = '0; #1;
    checks++;
    if (addr !== 0 || sram_addr !== ADJ_BASE) begin
      failures++; $display("FAIL empty select addr=%0d sram=%h", addr, sram_addr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

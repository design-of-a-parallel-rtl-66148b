// control_store: microprogram memory of the control engine.
//
// A CS_DEPTH x 16-bit read-only store (1024 words) addressed by the
// micro-program counter; the read is combinational and is latched by the
// decode unit on CLK1. Its contents come from microcode_rom, which
// assembles the program at elaboration time, the counterpart of
// programming the EPROM that holds the control store in the original.
// Changing the microcode means editing microcode_rom and re-elaborating.
module control_store
  import pdes_pkg::*;
(
  input  logic [UPC_W-1:0] addr,
  output logic [15:0]      uinstr
);
  microcode_rom rom (.addr(addr), .uinstr(uinstr));
endmodule

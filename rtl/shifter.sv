// shifter: 32-bit shifter after the ALU.
//
// `op` (shift_op_e) selects no shift, left or right by one bit, or left or
// right by eight bits; codes 101-111 do not shift. Shifted-out bits are
// lost and zeros are shifted in. Combinational. Operations and encoding
// follow the document.
module shifter
  import pdes_pkg::*;
#(
  parameter int WIDTH = 32
) (
  input  shift_op_e        op,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] y
);
  always_comb begin
    unique case (op)
      SH_L1:   y = d << 1;
      SH_R1:   y = d >> 1;
      SH_L8:   y = d << 8;
      SH_R8:   y = d >> 8;
      default: y = d;
    endcase
  end
endmodule

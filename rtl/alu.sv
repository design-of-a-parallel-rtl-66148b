// alu: 32-bit ALU of the execution unit.
//
// Eight operations selected by `op` (alu_op_e): add, increment A, xor, or,
// subtract (A - B), and, decrement A, pass B. `z` is high when the result is
// zero and `n` when its most significant bit is set (two's complement).
// Combinational. The operation set and encoding follow the document; the
// original adder is a ripple-carry chain, written here as a plain `+`.
module alu
  import pdes_pkg::*;
#(
  parameter int WIDTH = 32
) (
  input  alu_op_e          op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y,
  output logic             z,
  output logic             n
);
  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_INC:   y = a + WIDTH'(1);
      ALU_XOR:   y = a ^ b;
      ALU_OR:    y = a | b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_DEC:   y = a - WIDTH'(1);
      ALU_PASSB: y = b;
      default:   y = b;
    endcase
  end
  assign z = (y == '0);
  assign n = y[WIDTH-1];
endmodule

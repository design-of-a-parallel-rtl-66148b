// tb_alu: self-checking test of the execution-unit ALU.
//
// Applies directed corner cases (zero results, overflow, sign) and 2000
// random operand pairs to all eight operations and compares the result and
// the zero / negative flags with a reference computed here. The ALU is
// combinational: results are checked 1 time unit after the inputs change.
// The operation set follows the document; the flag definition (z: result
// zero, n: result bit 31) is this design's.
module tb_alu;
  import pdes_pkg::*;
  alu_op_e op;
  logic [31:0] a, b, y;
  logic z, n;
  int checks = 0, failures = 0;

  alu #(.WIDTH(32)) dut (.op, .a, .b, .y, .z, .n);

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] v);
    unique case (o)
      ALU_ADD:   return x + v;
      ALU_INC:   return x + 1;
      ALU_XOR:   return x ^ v;
      ALU_OR:    return x | v;
      ALU_SUB:   return x - v;
      ALU_AND:   return x & v;
      ALU_DEC:   return x - 1;
      default:   return v;
    endcase
  endfunction

  task automatic try(alu_op_e o, logic [31:0] x, logic [31:0] v);
    logic [31:0] e;
    op = o; a = x; b = v;
    #1;
    e = model(o, x, v);
    checks++;
    if (y !== e || z !== (e == 0) || n !== e[31]) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp %h z=%b n=%b", o.name(), x, v, y, e, z, n);
    end
  endtask

  initial begin
    alu_op_e ops[8] = '{ALU_ADD, ALU_INC, ALU_XOR, ALU_OR, ALU_SUB, ALU_AND, ALU_DEC, ALU_PASSB};
    foreach (ops[i]) begin
      try(ops[i], 32'h0, 32'h0);
      try(ops[i], 32'hFFFF_FFFF, 32'h1);
      try(ops[i], 32'h7FFF_FFFF, 32'h7FFF_FFFF);
      try(ops[i], 32'h8000_0000, 32'hFFFF_FFFF);
      try(ops[i], 32'h1234_5678, 32'h1234_5678);
    end
    for (int i = 0; i < 2000; i++)
      try(ops[$urandom_range(0, 7)], $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

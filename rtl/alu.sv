// alu: the processor's arithmetic and logic unit.
//
// One operand is the Y register, the other is the bus. The ALU always
// computes; the Z register keeps the result only in states that name Zin.
// Operations, as the control signals name them:
//   ALUadd  Y + bus          ALUand  Y & bus
//   ALUxor  Y ^ bus          ALUor   Y | bus
//   ALUsl   bus << Y         ALUslt  (Y < bus) ? 1 : 0
//   ALUsrl  bus >> Y         ALUsub  Y - bus
// The shifts use the low five bits of Y as the amount, and ALUslt compares
// the operands as signed two's-complement numbers, as MIPS slt does; both
// are this design's choices. Purely combinational.
//
// Interface: op, y, b (the bus) -> z.
module alu
  import simple_pkg::*;
(
  input  alu_op_e op,
  input  word_t   y,
  input  word_t   b,
  output word_t   z
);

  always_comb begin
    unique case (op)
      ALU_ADD: z = y + b;
      ALU_AND: z = y & b;
      ALU_XOR: z = y ^ b;
      ALU_OR:  z = y | b;
      ALU_SL:  z = b << y[4:0];
      ALU_SLT: z = word_t'($signed(y) < $signed(b));
      ALU_SRL: z = b >> y[4:0];
      ALU_SUB: z = y - b;
      default: z = '0;
    endcase
  end

endmodule

// lc3_alu: the LC-3 ALU.
//
// ADD and AND of two operands (the second is a register or a sign-extended
// 5-bit immediate, chosen before the ALU), NOT of the first operand, and a
// pass-through of the first operand. Combinational; two's-complement
// addition wraps at 16 bits as the LC-3 defines.
module lc3_alu
  import lc3_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_AND:  y = a & b;
      ALU_NOT:  y = ~a;
      ALU_PASS: y = a;
      default:  y = a;
    endcase
  end

endmodule

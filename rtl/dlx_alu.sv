// dlx_alu: the single ALU of the DLX datapaths.
//
// Purely combinational. Besides the register-register functions (ADD, SUB,
// AND, OR, XOR) it has an "A + 4" function used by the microcode to step the
// instruction pointer. The zero flag Z reports whether operand A is zero; the
// microcode branch logic uses it for BEQZ. Which functions beyond ADD and SUB
// exist is this design's choice.
module dlx_alu
  import dlx_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y,
  output logic    z     // a == 0
);

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_INC4: y = a + 32'd4;
      default:  y = a + b;
    endcase
  end

  assign z = (a == '0);

endmodule

// tb_dlx_alu: every ALU operation on corner and random operands, checked
// against expressions written here, plus the zero flag.
module tb_dlx_alu;
  import dlx_pkg::*;
  alu_op_e op;
  word_t a, b, y;
  logic z;
  int checks = 0, failures = 0;

  dlx_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t ref_y(alu_op_e o, word_t x1, word_t x2);
    case (o)
      ALU_ADD:  return x1 + x2;
      ALU_SUB:  return x1 + ~x2 + 1;
      ALU_AND:  return x1 & x2;
      ALU_OR:   return x1 | x2;
      ALU_XOR:  return (x1 | x2) & ~(x1 & x2);
      ALU_INC4: return x1 + 4;
      default:  return 'x;
    endcase
  endfunction

  initial begin
    alu_op_e ops [6] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_INC4};
    word_t corner [5] = '{32'h0, 32'h1, 32'hffffffff, 32'h80000000, 32'h7fffffff};
    foreach (ops[i]) foreach (corner[j]) foreach (corner[k]) begin
      op = ops[i]; a = corner[j]; b = corner[k]; #1;
      checks++;
      if (y !== ref_y(op, a, b) || z !== (a == 0)) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h y=%h z=%b", op.name(), a, b, y, z);
      end
    end
    repeat (2000) begin
      op = ops[$urandom_range(0, 5)]; a = $urandom; b = $urandom; #1;
      checks++;
      if (y !== ref_y(op, a, b)) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h y=%h", op.name(), a, b, y);
      end
    end
    // func decode
    checks++;
    if (func_to_alu(FN_SUB) != ALU_SUB || func_to_alu(FN_OR) != ALU_OR ||
        func_to_alu(FN_ADD) != ALU_ADD || func_to_alu(FN_AND) != ALU_AND ||
        func_to_alu(FN_XOR) != ALU_XOR) begin
      failures++;
      $display("FAIL func decode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// lc3_alu_tb: random operands through ADD, AND, NOT and pass, compared with
// 16-bit reference arithmetic, plus the stack-pointer cases x3456 - 1 and
// x3455 + 1.
module lc3_alu_tb;
  import lc3_pkg::*;

  alu_op_e op;
  word_t   a, b, y, exp;
  int checks = 0, failures = 0;

  lc3_alu dut (.op(op), .a(a), .b(b), .y(y));

  task automatic run(input alu_op_e o, input word_t x, input word_t z);
    op = o; a = x; b = z;
    #1;
    case (o)
      ALU_ADD: exp = word_t'((32'(x) + 32'(z)) & 32'hFFFF);
      ALU_AND: exp = x & z;
      ALU_NOT: exp = 16'hFFFF ^ x;
      default: exp = x;
    endcase
    checks++;
    if (y != exp) begin
      failures++;
      $display("FAIL op %0d a %h b %h: y %h expected %h", o, x, z, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run(ALU_ADD, 16'h3456, 16'hFFFF);
    checks++; if (y != 16'h3455) failures++;
    run(ALU_ADD, 16'h3455, 16'h0001);
    checks++; if (y != 16'h3456) failures++;
    for (int n = 0; n < 1000; n++)
      run(alu_op_e'(2'($urandom)), word_t'($urandom), word_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

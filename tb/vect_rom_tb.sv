// vect_rom_tb: checks the vector ROM against the vector-table addresses:
// illegal opcode -> x0100, privilege violation -> x0101, keyboard
// interrupt -> x0180, and that every vector lies in its part of the table.
module vect_rom_tb;
  import lc3_pkg::*;

  cause_e cause;
  word_t  vector;
  int checks = 0, failures = 0;

  vect_rom dut (.cause(cause), .vector(vector));

  task automatic chk(input cause_e c, input word_t exp);
    cause = c;
    #1;
    checks++;
    if (vector != exp) begin
      failures++;
      $display("FAIL cause %0d: vector %h expected %h", c, vector, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk(CAUSE_ILLEGAL_OP, 16'h0100);
    chk(CAUSE_PRIV,       16'h0101);
    chk(CAUSE_KBD_INT,    16'h0180);
    // exception vectors in x0100-x017F, interrupt vectors in x0180-x01FF
    cause = CAUSE_ILLEGAL_OP; #1; checks++;
    if (!(vector >= 16'h0100 && vector <= 16'h017F)) failures++;
    cause = CAUSE_KBD_INT; #1; checks++;
    if (!(vector >= 16'h0180 && vector <= 16'h01FF)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

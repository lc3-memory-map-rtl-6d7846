// lc3_regfile_tb: writes random values into R0-R7 and reads them back on
// both ports and on the R6 port, against a model array; also checks reset.
module lc3_regfile_tb;
  import lc3_pkg::*;

  logic       clk = 1'b0, rst = 1'b1;
  logic [2:0] ra1 = '0, ra2 = '0, wa = '0;
  word_t      rd1, rd2, r6, wd = '0;
  logic       we = 1'b0;
  word_t      model [8];
  int checks = 0, failures = 0;

  lc3_regfile dut (.clk(clk), .rst(rst), .ra1(ra1), .ra2(ra2), .rd1(rd1),
                   .rd2(rd2), .r6(r6), .we(we), .wa(wa), .wd(wd));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); rst <= 1'b0;
    @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      ra1 = 3'(i); #1; checks++;
      if (rd1 != 0) failures++;
      model[i] = '0;
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = ($urandom % 2) == 0;
      wa = 3'($urandom);
      wd = word_t'($urandom);
      ra1 = 3'($urandom);
      ra2 = 3'($urandom);
      #1;
      checks++;
      if (rd1 != model[ra1] || rd2 != model[ra2] || r6 != model[6]) begin
        failures++;
        $display("FAIL read r%0d=%h r%0d=%h r6=%h", ra1, rd1, ra2, rd2, r6);
      end
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// sp_switch_tb: checks the R6 save/restore hardware.
//
// A small model of R6 is kept in the testbench and written whenever the
// block asks (r6_we). Sequence: reset (Saved_SSP = x3000), enter the
// supervisor from user SP x F000 (R6 must become x3000, Saved_USP xF000),
// move the supervisor SP, return to user (R6 back to xF000, Saved_SSP keeps
// the supervisor value), then a second entry resumes at that value.
module sp_switch_tb;
  import lc3_pkg::*;

  logic  clk = 1'b0, rst = 1'b1;
  logic  to_super = 1'b0, to_user = 1'b0;
  word_t r6 = 16'hF000;
  logic  r6_we;
  word_t r6_next, saved_ssp, saved_usp;
  int checks = 0, failures = 0;

  sp_switch dut (.clk(clk), .rst(rst), .to_super(to_super), .to_user(to_user),
                 .r6_cur(r6), .r6_we(r6_we), .r6_next(r6_next),
                 .saved_ssp(saved_ssp), .saved_usp(saved_usp));

  always #5 clk = ~clk;
  always @(posedge clk) if (r6_we) r6 <= r6_next;

  task automatic chk(input string what, input word_t got, input word_t exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); rst <= 1'b0;
    @(posedge clk);
    chk("reset SSP", saved_ssp, 16'h3000);
    chk("no write when idle", word_t'(r6_we), 16'd0);
    to_super <= 1'b1; @(posedge clk); to_super <= 1'b0; @(negedge clk);
    chk("R6 on supervisor stack", r6, 16'h3000);
    chk("user SP saved", saved_usp, 16'hF000);
    @(posedge clk); r6 <= 16'h2FFE; @(posedge clk);
    to_user <= 1'b1; @(posedge clk); to_user <= 1'b0; @(negedge clk);
    chk("R6 back on user stack", r6, 16'hF000);
    chk("supervisor SP saved", saved_ssp, 16'h2FFE);
    r6 <= 16'hE123; @(posedge clk);
    to_super <= 1'b1; @(posedge clk); to_super <= 1'b0; @(negedge clk);
    chk("second entry uses saved SSP", r6, 16'h2FFE);
    chk("second user SP saved", saved_usp, 16'hE123);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

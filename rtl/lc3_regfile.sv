// lc3_regfile: the eight 16-bit general registers R0-R7.
//
// Two combinational read ports (SR1, SR2/SR) and one write port written on
// the rising clock edge. R6 doubles as the stack pointer and is brought out
// on its own port for the stack-pointer switch; R7 receives return
// addresses. All registers reset to zero (a choice of this design, so that
// nothing is read uninitialised).
module lc3_regfile
  import lc3_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] ra1,
  input  logic [2:0] ra2,
  output word_t      rd1,
  output word_t      rd2,
  output word_t      r6,
  input  logic       we,
  input  logic [2:0] wa,
  input  word_t      wd
);

  word_t regs [8];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 8; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = regs[ra1];
  assign rd2 = regs[ra2];
  assign r6  = regs[6];

endmodule

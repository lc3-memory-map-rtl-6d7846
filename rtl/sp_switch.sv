// sp_switch: R6 save/restore hardware (supervisor/user stack switch).
//
// R6 is the stack pointer. When an interrupt or exception is taken from
// user mode (PSR[15] = 1) the user's R6 is saved in Saved_USP and R6 is
// loaded with the supervisor stack pointer Saved_SSP, so that PSR and PC
// are pushed on the OS stack. When RTI returns to user mode the
// supervisor's R6 goes back to Saved_SSP and R6 is reloaded from
// Saved_USP.
//
// Interface: to_super / to_user are one-cycle strobes from the controller,
// r6_cur is the present R6; r6_next is the value to write into R6 in the
// same cycle (r6_we). Saved_SSP resets to SSP_INIT, the top of the OS stack
// (OS stack grows down from x2FFF); that reset value is this design's
// choice. Saved registers update on the rising clock edge.
module sp_switch
  import lc3_pkg::*;
#(
  parameter word_t SSP_INIT = 16'h3000
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  to_super,
  input  logic  to_user,
  input  word_t r6_cur,
  output logic  r6_we,
  output word_t r6_next,
  output word_t saved_ssp,
  output word_t saved_usp
);

  always_ff @(posedge clk) begin
    if (rst) begin
      saved_ssp <= SSP_INIT;
      saved_usp <= '0;
    end else if (to_super) begin
      saved_usp <= r6_cur;
    end else if (to_user) begin
      saved_ssp <= r6_cur;
    end
  end

  always_comb begin
    r6_we   = to_super || to_user;
    r6_next = to_super ? saved_ssp : saved_usp;
  end

endmodule

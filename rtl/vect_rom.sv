// vect_rom: exception/interrupt vector ROM.
//
// A cause signal addresses the ROM; its output is the address of the
// vector-table entry that holds the start of the service routine. The
// controller loads it into Vect_Reg and later performs PC <- Mem[Vect_Reg].
// Illegal opcode gives x0100 and a keyboard interrupt gives x0180, both as
// the LC-3 defines them. The privilege-violation entry, x0101, is this
// design's choice (the next free exception vector). Combinational.
module vect_rom
  import lc3_pkg::*;
(
  input  cause_e cause,
  output word_t  vector
);

  always_comb begin
    unique case (cause)
      CAUSE_ILLEGAL_OP: vector = EXC_VT_BASE;
      CAUSE_PRIV:       vector = EXC_VT_BASE + 16'd1;
      CAUSE_KBD_INT:    vector = INT_VT_BASE;
      default:          vector = EXC_VT_BASE;
    endcase
  end

endmodule

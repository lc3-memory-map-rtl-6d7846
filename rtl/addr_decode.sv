// addr_decode: LC-3 memory-map decoder.
//
// Splits the 64k-word address space into the regions of the LC-3 map:
// trap vectors x0000-x00FF, exception vectors x0100-x017F, interrupt
// vectors x0180-x01FF, OS space x0200-x2FFF, user space x3000-xFFDF and
// the I/O device page xFFE0-xFFFF. An address whose bits [15:5] are all
// ones selects one of the 32 device registers (io_sel, dev_reg = addr[4:0])
// and memory must ignore the access; every other address selects memory.
// The boundaries are the LC-3's own. Purely combinational.
module addr_decode
  import lc3_pkg::*;
(
  input  word_t      addr,
  output logic       io_sel,   // device register, memory ignores the access
  output logic       mem_sel,  // ordinary memory location
  output logic [4:0] dev_reg,  // device register number within the I/O page
  output region_e    region
);

  always_comb begin
    io_sel  = &addr[WORD_W-1:IO_SEL_LSB];
    mem_sel = !io_sel;
    dev_reg = addr[IO_SEL_LSB-1:0];
    if (io_sel)                 region = RGN_IO;
    else if (addr < EXC_VT_BASE) region = RGN_TRAP_VT;
    else if (addr < INT_VT_BASE) region = RGN_EXC_VT;
    else if (addr < OS_BASE)     region = RGN_INT_VT;
    else if (addr < USER_BASE)   region = RGN_OS;
    else                         region = RGN_USER;
  end

endmodule

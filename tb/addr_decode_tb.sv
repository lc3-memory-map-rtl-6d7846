// addr_decode_tb: exhaustive check of the memory-map decoder.
//
// Sweeps all 65536 addresses and compares io_sel, mem_sel, dev_reg and the
// region with a reference written from the printed map: x0000-x00FF trap
// vectors, x0100-x017F exception vectors, x0180-x01FF interrupt vectors,
// x0200-x2FFF OS, x3000-xFFDF user, xFFE0-xFFFF device registers.
module addr_decode_tb;
  import lc3_pkg::*;

  word_t      addr;
  logic       io_sel, mem_sel;
  logic [4:0] dev_reg;
  region_e    region;

  addr_decode dut (.addr(addr), .io_sel(io_sel), .mem_sel(mem_sel),
                   .dev_reg(dev_reg), .region(region));

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    region_e exp_r;
    logic    exp_io;
    for (int a = 0; a < 65536; a++) begin
      addr = word_t'(a);
      #1;
      if      (a <= 'h00FF) exp_r = RGN_TRAP_VT;
      else if (a <= 'h017F) exp_r = RGN_EXC_VT;
      else if (a <= 'h01FF) exp_r = RGN_INT_VT;
      else if (a <= 'h2FFF) exp_r = RGN_OS;
      else if (a <= 'hFFDF) exp_r = RGN_USER;
      else                  exp_r = RGN_IO;
      exp_io = (a >= 'hFFE0);
      checks++;
      if (region != exp_r || io_sel != exp_io || mem_sel != !exp_io ||
          (exp_io && dev_reg != 5'(a - 'hFFE0))) begin
        failures++;
        if (failures < 10)
          $display("FAIL addr %h: region %0d io %b dev %0d", addr, region, io_sel, dev_reg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

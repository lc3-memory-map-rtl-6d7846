// lc3_top: LC-3 system with memory-mapped I/O.
//
// The processor (lc3_cpu) drives one bus: MAR as address, MDR as write
// data, a request held until ready. The address decoder looks at the bus
// address: when bits [15:5] are all ones the access belongs to a device
// register, the memory ignores it and the keyboard device answers;
// otherwise the 64k-word memory answers. Read data and ready are taken
// from whichever side was selected. The keyboard's interrupt request and
// priority go to the processor, which takes the interrupt at the next
// instruction fetch through vector x0180.
//
// Ports: rst holds the processor and device in reset; the loader port
// (ld_we/ld_addr/ld_data) writes memory and is meant to be used during
// reset; key_valid/key_char are keystrokes. The remaining outputs show the
// processor's state for observation. Timing: every memory or device access
// takes two cycles (request, then ready with data).
module lc3_top
  import lc3_pkg::*;
#(
  parameter word_t PC_INIT  = 16'h3000,
  parameter word_t PSR_INIT = 16'h8002,
  parameter word_t SSP_INIT = 16'h3000
) (
  input  logic       clk,
  input  logic       rst,
  // program loader
  input  logic       ld_we,
  input  word_t      ld_addr,
  input  word_t      ld_data,
  // keyboard
  input  logic       key_valid,
  input  logic [7:0] key_char,
  // observation
  output state_e     state,
  output word_t      pc,
  output word_t      ir,
  output word_t      psr,
  output word_t      sp,
  output word_t      bus_addr,
  output logic       bus_io,
  output region_e    bus_region,
  output word_t      vect_reg,
  output logic       kbd_irq
);

  logic       mem_en, mem_we, mem_ready;
  word_t      mem_addr, mem_wdata, mem_rdata;
  logic       io_sel, mem_sel;
  logic [4:0] dev_reg;
  word_t      ram_rdata, dev_rdata;
  logic       ram_ready, dev_ready;
  logic [2:0] irq_pl;

  lc3_cpu #(.PC_INIT(PC_INIT), .PSR_INIT(PSR_INIT), .SSP_INIT(SSP_INIT)) u_cpu (
    .clk(clk), .rst(rst),
    .mem_en(mem_en), .mem_we(mem_we), .mem_addr(mem_addr),
    .mem_wdata(mem_wdata), .mem_rdata(mem_rdata), .mem_ready(mem_ready),
    .irq(kbd_irq), .irq_pl(irq_pl),
    .state(state), .pc(pc), .ir(ir), .psr(psr), .vect_reg(vect_reg), .sp(sp)
  );

  addr_decode u_dec (
    .addr(mem_addr), .io_sel(io_sel), .mem_sel(mem_sel),
    .dev_reg(dev_reg), .region(bus_region)
  );

  lc3_memory u_mem (
    .clk(clk), .rst(rst),
    .en(mem_en), .we(mem_we), .io_sel(io_sel), .addr(mem_addr),
    .wdata(mem_wdata), .rdata(ram_rdata), .ready(ram_ready),
    .ld_we(ld_we), .ld_addr(ld_addr), .ld_data(ld_data)
  );

  kbd_device u_kbd (
    .clk(clk), .rst(rst),
    .sel(mem_en && io_sel), .we(mem_we), .reg_sel(dev_reg),
    .wdata(mem_wdata), .rdata(dev_rdata), .ready(dev_ready),
    .key_valid(key_valid), .key_char(key_char),
    .irq(kbd_irq), .irq_pl(irq_pl)
  );

  assign mem_rdata = io_sel ? dev_rdata : ram_rdata;
  assign mem_ready = io_sel ? dev_ready : ram_ready;
  assign bus_addr  = mem_addr;
  assign bus_io    = io_sel && mem_en;

  // Memory and device never answer the same access.
  assert property (@(posedge clk) disable iff (rst) !(ram_ready && dev_ready));

endmodule

// lc3_memory: LC-3 main memory, 2^16 words of 16 bits.
//
// Word-addressed RAM with a one-wait-state request/ready handshake. The
// processor holds en (and we for a write) with addr = MAR and wdata = MDR;
// the RAM reads or writes in the first cycle and raises ready in the
// second, with rdata valid while ready is high. While ready is high the
// request is not repeated, so a write happens exactly once.
//
// The memory only answers addresses outside the I/O page: when io_sel is
// high (addr[15:5] all ones) it ignores the request and the device answers.
// A separate load port (ld_we/ld_addr/ld_data) writes one word per cycle;
// it stands for the loader that places a program in memory and has
// priority over the processor port. The size follows the LC-3's 16-bit
// address space; the handshake and the load port are this design's.
module lc3_memory
  import lc3_pkg::*;
#(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  // processor port
  input  logic              en,
  input  logic              we,
  input  logic              io_sel,
  input  logic [ADDR_W-1:0] addr,
  input  word_t             wdata,
  output word_t             rdata,
  output logic              ready,
  // loader port
  input  logic              ld_we,
  input  logic [ADDR_W-1:0] ld_addr,
  input  word_t             ld_data
);

  word_t mem [2**ADDR_W];

  logic req;
  assign req = en && !io_sel;

  always_ff @(posedge clk) begin
    if (ld_we) begin
      mem[ld_addr] <= ld_data;
    end else if (req && we && !ready) begin
      mem[addr] <= wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (req && !ready) rdata <= mem[addr];
  end

  always_ff @(posedge clk) begin
    if (rst) ready <= 1'b0;
    else     ready <= req && !ready;
  end

endmodule

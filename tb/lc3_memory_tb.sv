// lc3_memory_tb: random reads and writes against a model of the full
// 64k-word array, through the processor port and the loader port.
// Checks that ready comes exactly one cycle after a request, that a read
// returns the last word written, and that requests with io_sel high (the
// device page) neither write nor answer.
module lc3_memory_tb;
  import lc3_pkg::*;

  logic  clk = 1'b0, rst = 1'b1;
  logic  en = 1'b0, we = 1'b0, io_sel = 1'b0, ready, ld_we = 1'b0;
  word_t addr = '0, wdata = '0, rdata, ld_addr = '0, ld_data = '0;
  word_t model [word_t];
  int checks = 0, failures = 0;

  lc3_memory dut (.clk(clk), .rst(rst), .en(en), .we(we), .io_sel(io_sel),
                  .addr(addr), .wdata(wdata), .rdata(rdata), .ready(ready),
                  .ld_we(ld_we), .ld_addr(ld_addr), .ld_data(ld_data));

  always #5 clk = ~clk;

  task automatic access(input logic w, input word_t a, input word_t d, input logic io);
    int waited;
    @(negedge clk);
    en = 1'b1; we = w; addr = a; wdata = d; io_sel = io;
    waited = 0;
    @(posedge clk); #1;
    while (!ready && waited < 4) begin
      waited++;
      @(posedge clk); #1;
    end
    checks++;
    if (io) begin
      if (ready) begin failures++; $display("FAIL memory answered an I/O address"); end
    end else if (waited != 0) begin
      failures++; $display("FAIL ready after %0d extra cycles", waited);
    end else if (!w) begin
      word_t exp;
      exp = model.exists(a) ? model[a] : 16'h0000;
      if (rdata != exp) begin
        failures++; $display("FAIL read %h: %h expected %h", a, rdata, exp);
      end
    end else begin
      model[a] = d;
    end
    @(negedge clk);
    en = 1'b0; we = 1'b0; io_sel = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t addrs [16];
  initial begin
    @(posedge clk); rst <= 1'b0;
    for (int i = 0; i < 16; i++) addrs[i] = word_t'($urandom);
    addrs[0] = 16'h0000; addrs[1] = 16'hFFDF; addrs[2] = 16'hFFE0;
    // loader port writes a known value everywhere used
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); ld_we = 1'b1; ld_addr = addrs[i]; ld_data = word_t'(i * 16'h1111);
      @(posedge clk); model[addrs[i]] = ld_data;
    end
    @(negedge clk); ld_we = 1'b0;
    for (int n = 0; n < 600; n++) begin
      int k;
      k = $urandom % 16;
      if (addrs[k] >= 16'hFFE0)
        access($urandom % 2 == 0, addrs[k], word_t'($urandom), 1'b1);
      else
        access($urandom % 2 == 0, addrs[k], word_t'($urandom), 1'b0);
    end
    // the word behind the device page still holds what the loader put there
    access(1'b0, 16'hFFE0, '0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

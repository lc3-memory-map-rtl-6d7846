// kbd_device_tb: keyboard registers and interrupt logic.
//
// Checks: after reset nothing is ready and no interrupt is requested; a key
// sets KBSR[15] and KBDR, but irq stays low until software sets KBSR[14];
// reading KBDR returns the key and clears ready and irq; KBSR writes touch
// only the enable bit; the bus answers one cycle after a request; the
// priority level is 4.
module kbd_device_tb;
  import lc3_pkg::*;

  logic       clk = 1'b0, rst = 1'b1;
  logic       sel = 1'b0, we = 1'b0, ready, key_valid = 1'b0, irq;
  logic [4:0] reg_sel = '0;
  logic [7:0] key_char = '0;
  logic [2:0] irq_pl;
  word_t      wdata = '0, rdata, got;
  int checks = 0, failures = 0;

  kbd_device dut (.clk(clk), .rst(rst), .sel(sel), .we(we), .reg_sel(reg_sel),
                  .wdata(wdata), .rdata(rdata), .ready(ready),
                  .key_valid(key_valid), .key_char(key_char),
                  .irq(irq), .irq_pl(irq_pl));

  always #5 clk = ~clk;

  task automatic chk(input string what, input word_t g, input word_t e);
    checks++;
    if (g != e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, g, e);
    end
  endtask

  task automatic bus(input logic w, input logic [4:0] r, input word_t d, output word_t q);
    @(negedge clk);
    sel = 1'b1; we = w; reg_sel = r; wdata = d;
    #1;
    chk("no answer in request cycle", word_t'(ready), 16'd0);
    @(posedge clk); #1;
    chk("answer at the next edge", word_t'(ready), 16'd1);
    q = rdata;
    @(negedge clk);
    sel = 1'b0; we = 1'b0;
  endtask

  task automatic key(input logic [7:0] c);
    @(negedge clk); key_valid = 1'b1; key_char = c;
    @(negedge clk); key_valid = 1'b0;
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); rst <= 1'b0;
    @(negedge clk);
    chk("priority level", word_t'(irq_pl), 16'd4);
    chk("no irq after reset", word_t'(irq), 16'd0);
    bus(1'b0, 5'd0, '0, got);
    chk("KBSR idle", got, 16'h0000);
    key(8'h41);
    chk("irq masked while disabled", word_t'(irq), 16'd0);
    bus(1'b0, 5'd0, '0, got);
    chk("KBSR ready", got, 16'h8000);
    bus(1'b1, 5'd0, 16'hFFFF, got);
    @(negedge clk);
    chk("irq once enabled", word_t'(irq), 16'd1);
    bus(1'b0, 5'd0, '0, got);
    chk("KBSR ready+enable, only bit 14 written", got, 16'hC000);
    bus(1'b0, 5'd1, '0, got);
    chk("KBDR holds key", got, 16'h0041);
    @(negedge clk);
    chk("irq cleared by KBDR read", word_t'(irq), 16'd0);
    bus(1'b0, 5'd0, '0, got);
    chk("KBSR after read", got, 16'h4000);
    bus(1'b0, 5'd7, '0, got);
    chk("unused register reads zero", got, 16'h0000);
    key(8'h7A);
    @(negedge clk);
    chk("second key raises irq", word_t'(irq), 16'd1);
    bus(1'b1, 5'd0, 16'h0000, got);
    @(negedge clk);
    chk("disable drops irq", word_t'(irq), 16'd0);
    bus(1'b0, 5'd1, '0, got);
    chk("KBDR second key", got, 16'h007A);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

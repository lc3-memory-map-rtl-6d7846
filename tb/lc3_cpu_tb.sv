// lc3_cpu_tb: the processor against a behavioural memory in the testbench.
//
// Run 1 executes one of each instruction class (AND, ADD, NOT, LEA, ST,
// STR, LDI, STI, JSR, LD, BR taken and not taken, TRAP with return through
// JMP R7) in user mode and ends with an RTI in user mode, which must raise
// the privilege exception: the processor must switch to the supervisor
// stack (Saved_SSP = x3000), push PSR then PC-1, and jump through x0101.
// Register and memory contents are compared with values worked out by hand.
// With the processor now at priority 7 a priority-4 request must be ignored.
//
// Run 2 holds a user program in a one-instruction loop and raises a
// priority-4 interrupt. The state sequence from the request to the service
// routine must be 18, 49, 37, 41, 43, 47, 48, 50, 52, 54, 18, and RTI must
// go 8, 36, 38, 39, 40, 42, 34, 18, ending back in user mode on the user
// stack with the interrupted PSR restored. With this testbench's memory
// (one wait state) the entry takes 12 cycles from state 49 to the fetch.
module lc3_cpu_tb;
  import lc3_pkg::*;

  logic       clk = 1'b0, rst = 1'b1;
  logic       mem_en, mem_we, mem_ready = 1'b0;
  word_t      mem_addr, mem_wdata, mem_rdata = '0;
  logic       irq = 1'b0;
  logic [2:0] irq_pl = 3'd4;
  state_e     state;
  word_t      pc, ir, psr, vect_reg, sp;
  int checks = 0, failures = 0;

  lc3_cpu dut (.clk(clk), .rst(rst), .mem_en(mem_en), .mem_we(mem_we),
               .mem_addr(mem_addr), .mem_wdata(mem_wdata), .mem_rdata(mem_rdata),
               .mem_ready(mem_ready), .irq(irq), .irq_pl(irq_pl),
               .state(state), .pc(pc), .ir(ir), .psr(psr),
               .vect_reg(vect_reg), .sp(sp));

  always #5 clk = ~clk;

  // behavioural memory: answers one cycle after a request
  word_t mem [65536];
  always @(posedge clk) begin
    if (mem_en && !mem_ready) begin
      if (mem_we) mem[mem_addr] <= mem_wdata;
      else        mem_rdata <= mem[mem_addr];
      mem_ready <= 1'b1;
    end else begin
      mem_ready <= 1'b0;
    end
  end

  // state trace
  state_e trace[$];
  always @(posedge clk) if (!rst) trace.push_back(state);

  task automatic chk(input string what, input word_t g, input word_t e);
    checks++;
    if (g != e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, g, e);
    end
  endtask

  function automatic word_t reg_of(int i);
    return dut.u_rf.regs[i];
  endfunction

  // distinct states in order, starting at the first occurrence of `from`
  function automatic bit seq_ok(state_e from, state_e exp[]);
    state_e d[$];
    int start = -1;
    foreach (trace[i]) if (trace[i] == from && start < 0) start = i;
    if (start < 0) return 0;
    for (int i = start; i < trace.size() && d.size() < exp.size(); i++)
      if (d.size() == 0 || d[$] != trace[i]) d.push_back(trace[i]);
    if (d.size() != exp.size()) return 0;
    foreach (exp[i]) if (d[i] != exp[i]) return 0;
    return 1;
  endfunction

  task automatic do_reset();
    rst = 1'b1;
    repeat (2) @(posedge clk);
    trace.delete();
    @(negedge clk) rst = 1'b0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mem[i]) mem[i] = '0;
    // ---------------- run 1
    mem[16'h3000] = 16'h5020;  // AND R0,R0,#0
    mem[16'h3001] = 16'h103B;  // ADD R0,R0,#-5
    mem[16'h3002] = 16'h923F;  // NOT R1,R0
    mem[16'h3003] = 16'h1401;  // ADD R2,R0,R1
    mem[16'h3004] = 16'hE60A;  // LEA R3,#10      -> x300F
    mem[16'h3005] = 16'h341A;  // ST  R2,x3020
    mem[16'h3006] = 16'h72D0;  // STR R1,R3,#16   -> x301F
    mem[16'h3007] = 16'hA819;  // LDI R4,[x3021]
    mem[16'h3008] = 16'hB01A;  // STI R0,[x3023]
    mem[16'h3009] = 16'h4802;  // JSR +2          -> x300C
    mem[16'h300A] = 16'h1B61;  // ADD R5,R5,#1 (skipped)
    mem[16'h300B] = 16'h1B61;  // ADD R5,R5,#1 (skipped)
    mem[16'h300C] = 16'h2A13;  // LD  R5,x3020    -> xFFFF, N
    mem[16'h300D] = 16'h0801;  // BRn +1 (taken)
    mem[16'h300E] = 16'h1DA1;  // ADD R6,R6,#1 (skipped)
    mem[16'h300F] = 16'h0401;  // BRz +1 (not taken)
    mem[16'h3010] = 16'hF030;  // TRAP x30
    mem[16'h3011] = 16'h3E14;  // ST  R7,x3026
    mem[16'h3012] = 16'h8000;  // RTI in user mode
    mem[16'h3021] = 16'h3022;  // pointer
    mem[16'h3022] = 16'hBEEF;
    mem[16'h3023] = 16'h3025;  // pointer
    mem[16'h0030] = 16'h3040;  // trap vector x30
    mem[16'h3040] = 16'h1DA2;  // ADD R6,R6,#2
    mem[16'h3041] = 16'hC1C0;  // JMP R7
    mem[16'h0101] = 16'h0300;  // privilege vector
    mem[16'h0300] = 16'h0FFF;  // BRnzp -1
    do_reset();
    wait (pc == 16'h0300 && state == S_FETCH);
    @(negedge clk);
    chk("R0", reg_of(0), 16'hFFFB);
    chk("R1", reg_of(1), 16'h0004);
    chk("R2", reg_of(2), 16'hFFFF);
    chk("R3", reg_of(3), 16'h300F);
    chk("R4 via LDI", reg_of(4), 16'hBEEF);
    chk("R5 via LD", reg_of(5), 16'hFFFF);
    chk("R7 from TRAP", reg_of(7), 16'h3011);
    chk("ST", mem[16'h3020], 16'hFFFF);
    chk("STR", mem[16'h301F], 16'h0004);
    chk("STI", mem[16'h3025], 16'hFFFB);
    chk("ST R7", mem[16'h3026], 16'h3011);
    chk("supervisor SP after push", sp, 16'h2FFE);
    chk("user SP saved (2 from trap routine)", dut.saved_usp, 16'h0002);
    chk("pushed PSR: user, P", mem[16'h2FFF], 16'h8001);
    chk("pushed PC-1 = RTI address", mem[16'h2FFE], 16'h3012);
    chk("PSR supervisor, priority 7", psr & 16'h8700, 16'h0700);
    chk("Vect_Reg privilege", vect_reg, 16'h0101);
    // a priority-4 request is masked at priority 7
    irq = 1'b1;
    repeat (60) @(posedge clk);
    chk("masked interrupt not taken", word_t'(pc inside {16'h0300, 16'h0301}), 16'd1);
    checks++;
    for (int i = trace.size() - 50; i < trace.size(); i++)
      if (trace[i] == S_INT) begin
        failures++; $display("FAIL interrupt taken at priority 7");
        break;
      end
    irq = 1'b0;

    // ---------------- run 2
    foreach (mem[i]) mem[i] = '0;
    mem[16'h3000] = 16'h1DBF;  // ADD R6,R6,#-1 -> user SP xFFFF
    mem[16'h3001] = 16'h0FFF;  // BRnzp -1
    mem[16'h0180] = 16'h0400;  // keyboard vector
    mem[16'h0400] = 16'h5020;  // AND R0,R0,#0
    mem[16'h0401] = 16'h8000;  // RTI
    do_reset();
    wait (pc == 16'h3002);
    repeat (10) @(posedge clk);
    @(negedge clk) irq = 1'b1;
    wait (state == S_INT);
    @(negedge clk) irq = 1'b0;
    wait (pc == 16'h0401);
    @(negedge clk);
    chk("ISR on supervisor stack", sp, 16'h2FFE);
    chk("pushed PC-1 is the loop", mem[16'h2FFE], 16'h3001);
    chk("pushed PSR user, N", mem[16'h2FFF], 16'h8004);
    chk("Vect_Reg keyboard", vect_reg, 16'h0180);
    checks++;
    if (!seq_ok(S_INT, '{S_INT, S_PSH_PSR1, S_PSH_PSR2, S_PSH_PC1, S_PSH_PC2,
                        S_PSH_PC3, S_VEC_MAR, S_VEC_RD, S_VEC_JMP, S_FETCH})) begin
      failures++; $display("FAIL interrupt state sequence");
    end
    // cycle count of the entry: 12 cycles from state 49 to the handler's fetch
    begin
      int s0, s1;
      s0 = -1; s1 = -1;
      foreach (trace[i]) begin
        if (s0 < 0 && trace[i] == S_INT) s0 = i;
        if (s0 >= 0 && s1 < 0 && i > s0 && trace[i] == S_FETCH) s1 = i;
      end
      chk("interrupt entry cycles", word_t'(s1 - s0), 16'd12);
    end
    wait (state == S_RTI_SP2);
    wait (state == S_FETCH);
    @(negedge clk);
    chk("back at the loop", pc, 16'h3001);
    chk("PSR restored", psr, 16'h8004);
    chk("user SP restored", sp, 16'hFFFF);
    chk("Saved_SSP back at top", dut.saved_ssp, 16'h3000);
    @(posedge clk);
    @(negedge clk);
    checks++;
    if (!seq_ok(S_RTI, '{S_RTI, S_RTI_PC, S_RTI_PC2, S_RTI_SP1, S_RTI_PSR,
                        S_RTI_PSR2, S_RTI_SP2, S_FETCH})) begin
      failures++; $display("FAIL RTI state sequence");
      foreach (trace[i]) if (i > trace.size() - 30) $write("%0d ", trace[i]);
      $display("");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

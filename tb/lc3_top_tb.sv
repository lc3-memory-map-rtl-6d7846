// lc3_top_tb: end-to-end test of the LC-3 system at its default parameters.
//
// Loads a small user program at x3000 and an operating system below x3000,
// then lets the processor run. The user program follows the usual compiled
// layout: R4 points at a global data block whose entries give the stack
// bottom (xF000), the address of main, two integers and the address of a
// function. main pushes its return address, calls the function through
// JSRR, stores the result, enables keyboard interrupts with STI through a
// pointer to KBSR (xFFE0), spins on a flag, executes an illegal opcode and
// a user-mode RTI, pops its return address and returns to TRAP x25, whose
// vector leads to a halt loop.
//
// The OS holds the keyboard service routine (vector x0180 -> x0200), which
// records the stacked PC and PSR and its own stack pointer, reads KBDR
// through LDI and sets the user's flag; and two exception handlers (x0100,
// x0101) that step the stacked PC past the faulting instruction and count.
//
// Expected values are worked out by hand from the program. The test also
// counts each mechanism (interrupt, both exceptions, TRAP, LDI, STI, JSRR,
// RTI, user/supervisor stack switch both ways, device access, memory wait
// state) and fails if one never happened.
module lc3_top_tb;
  import lc3_pkg::*;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       ld_we = 1'b0;
  word_t      ld_addr = '0;
  word_t      ld_data = '0;
  logic       key_valid = 1'b0;
  logic [7:0] key_char = '0;
  state_e     state;
  word_t      pc, ir, psr, sp, bus_addr, vect_reg;
  logic       bus_io, kbd_irq;
  region_e    bus_region;

  lc3_top dut (
    .clk(clk), .rst(rst),
    .ld_we(ld_we), .ld_addr(ld_addr), .ld_data(ld_data),
    .key_valid(key_valid), .key_char(key_char),
    .state(state), .pc(pc), .ir(ir), .psr(psr), .sp(sp),
    .bus_addr(bus_addr), .bus_io(bus_io), .bus_region(bus_region),
    .vect_reg(vect_reg), .kbd_irq(kbd_irq)
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycles = 0;

  task automatic check(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---- tiny assembler
  function automatic word_t f_add_i(int dr, int sr, int imm);
    return word_t'({4'b0001, 3'(dr), 3'(sr), 1'b1, 5'(imm)});
  endfunction
  function automatic word_t f_add_r(int dr, int sr1, int sr2);
    return word_t'({4'b0001, 3'(dr), 3'(sr1), 3'b000, 3'(sr2)});
  endfunction
  function automatic word_t f_and_i(int dr, int sr, int imm);
    return word_t'({4'b0101, 3'(dr), 3'(sr), 1'b1, 5'(imm)});
  endfunction
  function automatic word_t f_pcrel(logic [3:0] op, int r, int at, int target);
    return word_t'({op, 3'(r), 9'(target - (at + 1))});
  endfunction
  function automatic word_t f_base(logic [3:0] op, int r, int base, int off);
    return word_t'({op, 3'(r), 3'(base), 6'(off)});
  endfunction
  function automatic word_t f_br(logic [2:0] nzp, int at, int target);
    return word_t'({4'b0000, nzp, 9'(target - (at + 1))});
  endfunction
  function automatic word_t f_jmp(int base);
    return word_t'({4'b1100, 3'b000, 3'(base), 6'b0});
  endfunction
  function automatic word_t f_jsrr(int base);
    return word_t'({4'b0100, 3'b000, 3'(base), 6'b0});
  endfunction
  function automatic word_t f_trap(int v);
    return word_t'({4'b1111, 4'b0000, 8'(v)});
  endfunction
  localparam word_t RTI     = 16'h8000;
  localparam word_t ILLEGAL = 16'hD000;

  localparam logic [3:0] LD = 4'b0010, ST = 4'b0011, LDR = 4'b0110,
                         STR = 4'b0111, LDI = 4'b1010, STI = 4'b1011;

  word_t img_a[$];
  word_t img_d[$];
  task automatic put(input int a, input word_t d);
    img_a.push_back(word_t'(a));
    img_d.push_back(d);
  endtask

  // Program addresses
  localparam int GD = 'h3040, FUNC = 'h3016, FLAG = 'h3032;

  task automatic build_image();
    // vector table
    put('h0025, 16'h0240);     // TRAP x25 -> halt loop
    put('h0100, 16'h0220);     // illegal opcode
    put('h0101, 16'h0228);     // privilege violation
    put('h0180, 16'h0200);     // keyboard interrupt
    // keyboard service routine
    put('h0200, f_pcrel(ST, 0, 'h0200, 'h0260));
    put('h0201, f_base(LDR, 0, 6, 0));
    put('h0202, f_pcrel(ST, 0, 'h0202, 'h0261));
    put('h0203, f_base(LDR, 0, 6, 1));
    put('h0204, f_pcrel(ST, 0, 'h0204, 'h0262));
    put('h0205, f_pcrel(LDI, 0, 'h0205, 'h0263));
    put('h0206, f_pcrel(ST, 0, 'h0206, 'h0264));
    put('h0207, f_add_i(0, 6, 0));
    put('h0208, f_pcrel(ST, 0, 'h0208, 'h0265));
    put('h0209, f_and_i(0, 0, 0));
    put('h020A, f_add_i(0, 0, 1));
    put('h020B, f_pcrel(STI, 0, 'h020B, 'h0266));
    put('h020C, f_pcrel(LD, 0, 'h020C, 'h0260));
    put('h020D, RTI);
    // illegal-opcode handler: step stacked PC, count
    put('h0220, f_pcrel(ST, 0, 'h0220, 'h0270));
    put('h0221, f_base(LDR, 0, 6, 0));
    put('h0222, f_add_i(0, 0, 1));
    put('h0223, f_base(STR, 0, 6, 0));
    put('h0224, f_pcrel(LD, 0, 'h0224, 'h0271));
    put('h0225, f_add_i(0, 0, 1));
    put('h0226, f_pcrel(ST, 0, 'h0226, 'h0271));
    put('h0227, f_br(3'b111, 'h0227, 'h0230));
    // privilege handler
    put('h0228, f_pcrel(ST, 0, 'h0228, 'h0270));
    put('h0229, f_base(LDR, 0, 6, 0));
    put('h022A, f_add_i(0, 0, 1));
    put('h022B, f_base(STR, 0, 6, 0));
    put('h022C, f_pcrel(LD, 0, 'h022C, 'h0272));
    put('h022D, f_add_i(0, 0, 1));
    put('h022E, f_pcrel(ST, 0, 'h022E, 'h0272));
    put('h022F, f_br(3'b111, 'h022F, 'h0230));
    put('h0230, f_pcrel(LD, 0, 'h0230, 'h0270));
    put('h0231, RTI);
    // halt
    put('h0240, f_br(3'b111, 'h0240, 'h0240));
    // OS data
    put('h0260, 16'h0000);
    put('h0261, 16'h0000);
    put('h0262, 16'h0000);
    put('h0263, 16'hFFE1);     // pointer to KBDR
    put('h0264, 16'h0000);
    put('h0265, 16'h0000);
    put('h0266, word_t'(FLAG)); // pointer to the user's flag
    put('h0270, 16'h0000);
    put('h0271, 16'h0000);
    put('h0272, 16'h0000);
    // user program
    put('h3000, f_pcrel(LD, 4, 'h3000, 'h3006));
    put('h3001, f_base(LDR, 6, 4, 0));
    put('h3002, f_base(LDR, 5, 4, 0));
    put('h3003, f_base(LDR, 7, 4, 1));
    put('h3004, f_jsrr(7));
    put('h3005, f_trap('h25));
    put('h3006, word_t'(GD));
    put('h3007, f_add_i(6, 6, -1));                  // push R7
    put('h3008, f_base(STR, 7, 6, 0));
    put('h3009, f_base(LDR, 2, 4, 3));               // y
    put('h300A, f_base(LDR, 3, 4, 4));               // &func
    put('h300B, f_jsrr(3));
    put('h300C, f_base(STR, 2, 4, 5));
    put('h300D, f_pcrel(LD, 0, 'h300D, 'h3030));
    put('h300E, f_pcrel(STI, 0, 'h300E, 'h3031));    // KBSR <- x4000
    put('h300F, f_pcrel(LD, 1, 'h300F, FLAG));
    put('h3010, f_br(3'b010, 'h3010, 'h300F));
    put('h3011, ILLEGAL);
    put('h3012, RTI);
    put('h3013, f_base(LDR, 7, 6, 0));               // pop R7
    put('h3014, f_add_i(6, 6, 1));
    put('h3015, f_jmp(7));
    put(FUNC,     f_add_r(2, 2, 2));
    put(FUNC + 1, f_jmp(7));
    put('h3030, 16'h4000);
    put('h3031, 16'hFFE0);     // pointer to KBSR
    put(FLAG,   16'h0000);
    put(GD + 0, 16'hF000);     // stack bottom
    put(GD + 1, 16'h3007);     // main
    put(GD + 2, 16'h1234);     // int x
    put(GD + 3, 16'h0010);     // int y
    put(GD + 4, word_t'(FUNC));
    put(GD + 5, 16'h0000);
    // memory words behind the device registers: must stay untouched
    put('hFFE0, 16'h5A5A);
    put('hFFE1, 16'h5A5A);
    // words the stack will use
    put('h2FFE, 16'h0000);
    put('h2FFF, 16'h0000);
    put('hEFFF, 16'h0000);
  endtask

  function automatic word_t rd(int a);
    return dut.u_mem.mem[a];
  endfunction

  // ---- mechanism counters
  int n_int = 0, n_exc_op = 0, n_exc_priv = 0, n_trap = 0, n_ldi = 0;
  int n_sti = 0, n_jsrr = 0, n_rti = 0, n_to_super = 0, n_to_user = 0;
  int n_io = 0, n_wait = 0, n_ignored = 0;
  state_e prev_state;

  always @(posedge clk) if (!rst) begin
    cycles++;
    if (state == S_INT && prev_state == S_FETCH) n_int++;
    if (state == S_EXC_OP && prev_state == S_DECODE) n_exc_op++;
    if (state == S_EXC_PRIV && prev_state == S_RTI) n_exc_priv++;
    if (state == S_TRAP && prev_state == S_DECODE) n_trap++;
    if (state == S_LDI && prev_state == S_DECODE) n_ldi++;
    if (state == S_STI && prev_state == S_DECODE) n_sti++;
    if (state == S_JSR && prev_state == S_DECODE && !ir[11]) n_jsrr++;
    if (state == S_RTI_PC && prev_state == S_RTI) n_rti++;
    if (state == S_INT && psr[15]) n_to_super++;
    if (state == S_RTI_SP2 && psr[15]) n_to_user++;
    if (bus_io && bus_region == RGN_IO) n_io++;
    if (bus_io && dut.u_mem.en && !dut.u_mem.ready && !dut.u_mem.req) n_ignored++;
    if (dut.mem_en && !dut.mem_ready) n_wait++;
    prev_state <= state;
  end

  // ---- watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t_irq;
  initial begin
    prev_state = S_FETCH;
    build_image();
    // load the image while the processor is held in reset
    repeat (2) @(posedge clk);
    foreach (img_a[i]) begin
      ld_we   <= 1'b1;
      ld_addr <= img_a[i];
      ld_data <= img_d[i];
      @(posedge clk);
    end
    ld_we <= 1'b0;
    @(posedge clk);
    rst <= 1'b0;

    // wait until the user program spins on its flag with interrupts enabled
    wait (dut.u_kbd.kb_ie === 1'b1);
    repeat (40) @(posedge clk);
    check("no interrupt while device idle", word_t'(n_int), 16'd0);
    key_valid <= 1'b1;
    key_char  <= 8'h41;
    @(posedge clk);
    key_valid <= 1'b0;
    t_irq = cycles;

    // run to the halt loop
    wait (pc == 16'h0241 && ir == 16'h0FFF);
    repeat (4) @(posedge clk);

    // results of the user program
    check("func result 2*y",            rd(GD + 5), 16'h0020);
    check("flag set by ISR",            rd(FLAG),   16'h0001);
    check("pushed return address",      rd('hEFFF), 16'h3005);
    check("SP back at stack bottom",    sp,         16'hF000);
    check("still in user mode",         word_t'(psr[15]), 16'd1);
    // what the keyboard service routine saw
    checks++;
    if (!(rd('h0261) inside {16'h300F, 16'h3010})) begin
      failures++;
      $display("FAIL stacked PC %h is not the interrupted loop", rd('h0261));
    end
    check("stacked PSR user mode",      word_t'(rd('h0262) >> 15), 16'd1);
    check("stacked PSR priority 0",     word_t'(rd('h0262) & 16'h0700), 16'd0);
    check("KBDR read through LDI",      rd('h0264), 16'h0041);
    check("ISR runs on OS stack",       rd('h0265), 16'h2FFE);
    // exceptions
    check("illegal-opcode handler ran", rd('h0271), 16'd1);
    check("privilege handler ran",      rd('h0272), 16'd1);
    check("last pushed PC, stepped",    rd('h2FFE), 16'h3013);
    check("last pushed PSR",            word_t'(rd('h2FFF) >> 15), 16'd1);
    check("saved SSP restored",         dut.u_cpu.saved_ssp, 16'h3000);
    // memory ignored the device-register write
    check("mem behind KBSR untouched",  rd('hFFE0), 16'h5A5A);
    check("KBSR interrupt enable set",  word_t'(dut.u_kbd.kb_ie), 16'd1);
    check("KBDR read cleared ready",    word_t'(dut.u_kbd.kb_ready), 16'd0);

    // every mechanism happened
    check("interrupt taken once",       word_t'(n_int), 16'd1);
    check("illegal-opcode exception",   word_t'(n_exc_op), 16'd1);
    check("privilege exception",        word_t'(n_exc_priv), 16'd1);
    checks++; if (n_trap < 1)     begin failures++; $display("FAIL no TRAP"); end
    checks++; if (n_ldi < 1)      begin failures++; $display("FAIL no LDI"); end
    checks++; if (n_sti < 2)      begin failures++; $display("FAIL STI count %0d", n_sti); end
    checks++; if (n_jsrr < 2)     begin failures++; $display("FAIL JSRR count %0d", n_jsrr); end
    check("RTIs executed in supervisor mode", word_t'(n_rti), 16'd3);
    check("switches to supervisor stack", word_t'(n_to_super), 16'd3);
    check("switches back to user stack",  word_t'(n_to_user), 16'd3);
    checks++; if (n_io < 2)       begin failures++; $display("FAIL device accesses %0d", n_io); end
    checks++; if (n_ignored < 2)  begin failures++; $display("FAIL memory ignored %0d", n_ignored); end
    checks++; if (n_wait < 1)     begin failures++; $display("FAIL no memory wait state"); end

    $display("mechanisms: int=%0d illop=%0d priv=%0d trap=%0d ldi=%0d sti=%0d jsrr=%0d rti=%0d super=%0d user=%0d io=%0d ignored=%0d wait=%0d cycles=%0d",
             n_int, n_exc_op, n_exc_priv, n_trap, n_ldi, n_sti, n_jsrr, n_rti,
             n_to_super, n_to_user, n_io, n_ignored, n_wait, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

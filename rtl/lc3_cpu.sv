// lc3_cpu: multi-cycle LC-3 processor with traps, interrupts, exceptions
// and RTI.
//
// The controller is a state machine whose states carry the LC-3 state
// numbers (lc3_pkg::state_e). Every instruction starts in state 18
// (MAR <- PC, PC <- PC+1), reads its word into MDR (33), loads IR (35) and
// is dispatched on its opcode in state 32. The datapath registers are PC,
// IR, MAR, MDR, PSR (PSR[15] = user mode, PSR[10:8] = priority,
// PSR[2:0] = N,Z,P) and Vect_Reg; R0-R7 sit in lc3_regfile, R6 being the
// stack pointer.
//
// Address-in-memory mechanisms:
//  * TRAP (15, 28, 30): R7 <- PC, MAR <- ZEXT(IR[7:0]), MDR <- Mem,
//    PC <- MDR. It does not change mode or push anything.
//  * LDI / STI: the word at PC+offset9 is used as the data address.
//  * Interrupt: tested in state 18 when the device's priority exceeds
//    PSR[10:8]; the vector ROM gives x0180 for the keyboard.
//  * Exceptions: illegal opcode (opcode 1101) is found in decode and goes
//    to state 13 (vector x0100); RTI in user mode goes to state 44.
// Entry sequence (shared by interrupts and exceptions):
//    49      MDR <- PSR, PSR[10:8] <- 7, PSR[15] <- 0, and if the old
//            PSR[15] was 1, Saved_USP <- R6, R6 <- Saved_SSP
//    37, 41  push PSR: R6 <- R6-1, MAR <- R6-1, Mem <- MDR
//    43,47,48 push PC-1: MDR <- PC-1, R6 <- R6-1, MAR <- R6-1, Mem <- MDR
//    50,52,54 MAR <- Vect_Reg, MDR <- Mem, PC <- MDR
// RTI (8, 36, 38, 39, 40, 42, 34) pops PC then PSR and, when the popped
// PSR[15] is 1, swaps R6 back to the user stack.
//
// Memory interface: mem_en is held in a memory state until mem_ready; the
// address is always MAR and write data always MDR. The design takes one
// interrupt request line with its priority level.
//
// Following the LC-3: the state numbers and their register transfers, the
// vector addresses, PC-1 being pushed, priority 7 on entry, the instruction
// encodings. Choices of this design: exceptions also pass through state 49
// (so they raise the priority to 7 as well), JSRR reads its base register
// before R7 is written (so "JSRR R7" jumps to the old R7), LEA sets the
// condition codes, and the reset values PC = PC_INIT, PSR = PSR_INIT.
module lc3_cpu
  import lc3_pkg::*;
#(
  parameter word_t PC_INIT  = 16'h3000,  // first instruction after reset
  parameter word_t PSR_INIT = 16'h8002,  // user mode, priority 0, Z set
  parameter word_t SSP_INIT = 16'h3000   // supervisor stack, grows down from x2FFF
) (
  input  logic       clk,
  input  logic       rst,
  // memory / device bus
  output logic       mem_en,
  output logic       mem_we,
  output word_t      mem_addr,
  output word_t      mem_wdata,
  input  word_t      mem_rdata,
  input  logic       mem_ready,
  // interrupt request
  input  logic       irq,
  input  logic [2:0] irq_pl,
  // state, for observation
  output state_e     state,
  output word_t      pc,
  output word_t      ir,
  output word_t      psr,
  output word_t      vect_reg,
  output word_t      sp
);

  // ---------------------------------------------------------------------
  // Registers
  word_t  mar, mdr;
  state_e nstate;
  word_t  pc_n, ir_n, mar_n, mdr_n, psr_n, vect_n;

  // Register file
  logic [2:0] ra1, ra2, wa;
  word_t      rd1, rd2, r6, wd;
  logic       rf_we;

  // Stack-pointer switch
  logic  to_super, to_user, sw_we;
  word_t sw_r6, saved_ssp, saved_usp;

  // ALU and vector ROM
  alu_op_e alu_op;
  word_t   alu_b, alu_y;
  cause_e  cause;
  word_t   vector;

  opcode_e opcode;
  logic    int_req;
  logic    ben;

  // ---------------------------------------------------------------------
  // Instruction fields
  function automatic word_t sext(input word_t v, input int unsigned bits);
    word_t m;
    m = word_t'(1) << (bits - 1);
    sext = ((v & ((m << 1) - 16'd1)) ^ m) - m;
  endfunction

  function automatic logic [2:0] nzp(input word_t v);
    nzp = {v[15], v == '0, !v[15] && v != '0};
  endfunction

  word_t off5, off6, off9, off11;
  assign opcode = opcode_e'(ir[15:12]);
  assign off5   = sext(ir, 5);
  assign off6   = sext(ir, 6);
  assign off9   = sext(ir, 9);
  assign off11  = sext(ir, 11);

  // ---------------------------------------------------------------------
  // Sub-blocks
  assign ra1 = ir[8:6];
  assign ra2 = (state == S_ST_MDR) ? ir[11:9] : ir[2:0];

  lc3_regfile u_rf (
    .clk(clk), .rst(rst),
    .ra1(ra1), .ra2(ra2), .rd1(rd1), .rd2(rd2), .r6(r6),
    .we(rf_we), .wa(wa), .wd(wd)
  );

  assign to_super = (state == S_INT)     && psr[15];
  assign to_user  = (state == S_RTI_SP2) && psr[15];

  sp_switch #(.SSP_INIT(SSP_INIT)) u_sp (
    .clk(clk), .rst(rst),
    .to_super(to_super), .to_user(to_user), .r6_cur(r6),
    .r6_we(sw_we), .r6_next(sw_r6),
    .saved_ssp(saved_ssp), .saved_usp(saved_usp)
  );

  always_comb begin
    unique case (opcode)
      OP_AND:  alu_op = ALU_AND;
      OP_NOT:  alu_op = ALU_NOT;
      OP_ADD:  alu_op = ALU_ADD;
      default: alu_op = ALU_PASS;
    endcase
  end
  assign alu_b = ir[5] ? off5 : rd2;

  lc3_alu u_alu (.op(alu_op), .a(rd1), .b(alu_b), .y(alu_y));

  always_comb begin
    unique case (state)
      S_EXC_OP:   cause = CAUSE_ILLEGAL_OP;
      S_EXC_PRIV: cause = CAUSE_PRIV;
      default:    cause = CAUSE_KBD_INT;
    endcase
  end

  vect_rom u_vrom (.cause(cause), .vector(vector));

  assign int_req = irq && (irq_pl > psr[10:8]);
  assign ben     = |(ir[11:9] & psr[2:0]);

  // ---------------------------------------------------------------------
  // Controller and register transfers
  always_comb begin
    nstate = state;
    pc_n   = pc;
    ir_n   = ir;
    mar_n  = mar;
    mdr_n  = mdr;
    psr_n  = psr;
    vect_n = vect_reg;
    rf_we  = 1'b0;
    wa     = ir[11:9];
    wd     = alu_y;
    mem_en = 1'b0;
    mem_we = 1'b0;

    unique case (state)
      // ---- fetch and decode
      S_FETCH: begin
        mar_n = pc;
        pc_n  = pc + 16'd1;
        if (int_req) begin
          vect_n = vector;
          nstate = S_INT;
        end else begin
          nstate = S_IR_RD;
        end
      end
      S_IR_RD: begin
        mem_en = 1'b1;
        if (mem_ready) begin
          mdr_n  = mem_rdata;
          nstate = S_IR_LD;
        end
      end
      S_IR_LD: begin
        ir_n   = mdr;
        nstate = S_DECODE;
      end
      S_DECODE: begin
        unique case (opcode)
          OP_BR:   nstate = S_BR_TAKE;
          OP_ADD:  nstate = S_ADD;
          OP_LD:   nstate = S_LD;
          OP_ST:   nstate = S_ST;
          OP_JSR:  nstate = S_JSR;
          OP_AND:  nstate = S_AND;
          OP_LDR:  nstate = S_LDR;
          OP_STR:  nstate = S_STR;
          OP_RTI:  nstate = S_RTI;
          OP_NOT:  nstate = S_NOT;
          OP_LDI:  nstate = S_LDI;
          OP_STI:  nstate = S_STI;
          OP_JMP:  nstate = S_JMP;
          OP_LEA:  nstate = S_LEA;
          OP_TRAP: nstate = S_TRAP;
          default: nstate = S_EXC_OP;  // OP_RES: illegal opcode
        endcase
      end

      // ---- operate
      S_ADD, S_AND, S_NOT: begin
        rf_we  = 1'b1;
        psr_n[2:0] = nzp(alu_y);
        nstate = S_FETCH;
      end
      S_LEA: begin
        rf_we  = 1'b1;
        wd     = pc + off9;
        psr_n[2:0] = nzp(pc + off9);
        nstate = S_FETCH;
      end

      // ---- control
      S_BR_TAKE: nstate = ben ? S_BR_JUMP : S_FETCH;
      S_BR_JUMP: begin
        pc_n   = pc + off9;
        nstate = S_FETCH;
      end
      S_JMP: begin
        pc_n   = rd1;
        nstate = S_FETCH;
      end
      S_JSR: begin
        rf_we  = 1'b1;
        wa     = 3'd7;
        wd     = pc;
        pc_n   = ir[11] ? pc + off11 : rd1;
        nstate = S_FETCH;
      end
      S_TRAP: begin
        rf_we  = 1'b1;
        wa     = 3'd7;
        wd     = pc;
        mar_n  = {8'd0, ir[7:0]};
        nstate = S_TRAP_RD;
      end
      S_TRAP_RD: begin
        mem_en = 1'b1;
        if (mem_ready) begin
          mdr_n  = mem_rdata;
          nstate = S_TRAP_JMP;
        end
      end
      S_TRAP_JMP: begin
        pc_n   = mdr;
        nstate = S_FETCH;
      end

      // ---- loads
      S_LD: begin
        mar_n  = pc + off9;
        nstate = S_LD_RD;
      end
      S_LDR: begin
        mar_n  = rd1 + off6;
        nstate = S_LD_RD;
      end
      S_LDI: begin
        mar_n  = pc + off9;
        nstate = S_LDI_RD;
      end
      S_LDI_RD: begin
        mem_en = 1'b1;
        if (mem_ready) begin
          mdr_n  = mem_rdata;
          nstate = S_LDI_MAR;
        end
      end
      S_LDI_MAR: begin
        mar_n  = mdr;
        nstate = S_LD_RD;
      end
      S_LD_RD: begin
        mem_en = 1'b1;
        if (mem_ready) begin
          mdr_n  = mem_rdata;
          nstate = S_LD_WB;
        end
      end
      S_LD_WB: begin
        rf_we  = 1'b1;
        wd     = mdr;
        psr_n[2:0] = nzp(mdr);
        nstate = S_FETCH;
      end

      // ---- stores
      S_ST: begin
        mar_n  = pc + off9;
        nstate = S_ST_MDR;
      end
      S_STR: begin
        mar_n  = rd1 + off6;
        nstate = S_ST_MDR;
      end
      S_STI: begin
        mar_n  = pc + off9;
        nstate = S_STI_RD;
      end
      S_STI_RD: begin
        mem_en = 1'b1;
        if (mem_ready) begin
          mdr_n  = mem_rdata;
          nstate = S_STI_MAR;
        end
      end
      S_STI_MAR: begin
        mar_n  = mdr;
        nstate = S_ST_MDR;
      end
      S_ST_MDR: begin
        mdr_n  = rd2;
        nstate = S_ST_WR;
      end
      S_ST_WR: begin
        mem_en = 1'b1;
        mem_we = 1'b1;
        if (mem_ready) nstate = S_FETCH;
      end

      // ---- exceptions
      S_EXC_OP, S_EXC_PRIV: begin
        vect_n = vector;
        nstate = S_INT;
      end

      // ---- interrupt / exception entry
      S_INT: begin
        mdr_n        = psr;
        psr_n[10:8]  = 3'b111;
        psr_n[15]    = 1'b0;
        rf_we        = sw_we;
        wa           = 3'd6;
        wd           = sw_r6;
        nstate       = S_PSH_PSR1;
      end
      S_PSH_PSR1, S_PSH_PC2: begin
        rf_we  = 1'b1;
        wa     = 3'd6;
        wd     = r6 - 16'd1;
        mar_n  = r6 - 16'd1;
        nstate = (state == S_PSH_PSR1) ? S_PSH_PSR2 : S_PSH_PC3;
      end
      S_PSH_PSR2, S_PSH_PC3: begin
        mem_en = 1'b1;
        mem_we = 1'b1;
        if (mem_ready) nstate = (state == S_PSH_PSR2) ? S_PSH_PC1 : S_VEC_MAR;
      end
      S_PSH_PC1: begin
        mdr_n  = pc - 16'd1;
        nstate = S_PSH_PC2;
      end
      S_VEC_MAR: begin
        mar_n  = vect_reg;
        nstate = S_VEC_RD;
      end
      S_VEC_RD: begin
        mem_en = 1'b1;
        if (mem_ready) begin
          mdr_n  = mem_rdata;
          nstate = S_VEC_JMP;
        end
      end
      S_VEC_JMP: begin
        pc_n   = mdr;
        nstate = S_FETCH;
      end

      // ---- RTI
      S_RTI: begin
        if (psr[15]) begin
          nstate = S_EXC_PRIV;
        end else begin
          mar_n  = r6;
          nstate = S_RTI_PC;
        end
      end
      S_RTI_PC: begin
        mem_en = 1'b1;
        if (mem_ready) begin
          mdr_n  = mem_rdata;
          nstate = S_RTI_PC2;
        end
      end
      S_RTI_PC2: begin
        pc_n   = mdr;
        nstate = S_RTI_SP1;
      end
      S_RTI_SP1: begin
        rf_we  = 1'b1;
        wa     = 3'd6;
        wd     = r6 + 16'd1;
        mar_n  = r6 + 16'd1;
        nstate = S_RTI_PSR;
      end
      S_RTI_PSR: begin
        mem_en = 1'b1;
        if (mem_ready) begin
          mdr_n  = mem_rdata;
          nstate = S_RTI_PSR2;
        end
      end
      S_RTI_PSR2: begin
        psr_n  = mdr;
        rf_we  = 1'b1;
        wa     = 3'd6;
        wd     = r6 + 16'd1;
        nstate = S_RTI_SP2;
      end
      S_RTI_SP2: begin
        rf_we  = sw_we;
        wa     = 3'd6;
        wd     = sw_r6;
        nstate = S_FETCH;
      end

      default: nstate = S_FETCH;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_FETCH;
      pc       <= PC_INIT;
      ir       <= '0;
      mar      <= '0;
      mdr      <= '0;
      psr      <= PSR_INIT;
      vect_reg <= '0;
    end else begin
      state    <= nstate;
      pc       <= pc_n;
      ir       <= ir_n;
      mar      <= mar_n;
      mdr      <= mdr_n;
      psr      <= psr_n;
      vect_reg <= vect_n;
    end
  end

  assign mem_addr  = mar;
  assign mem_wdata = mdr;
  assign sp        = r6;

  // A write is always a memory request; the bus address is MAR.
  assert property (@(posedge clk) disable iff (rst) mem_we |-> mem_en);
  // Once a request is raised it is held until the slave is ready.
  assert property (@(posedge clk) disable iff (rst)
                   mem_en && !mem_ready |=> mem_en && $stable(mem_addr));

endmodule

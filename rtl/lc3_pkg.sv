// lc3_pkg: types and constants shared by the LC-3 system.
//
// Holds the memory-map boundaries (vector table, OS space, user space and
// the I/O device page), the vector-table bases for exceptions and
// interrupts, the instruction opcodes, the exception/interrupt cause
// encoding that addresses the vector ROM, and the numbered controller
// states. The memory-map numbers and the state numbers of the interrupt,
// exception and RTI sequences are the LC-3's own; the cause encoding and
// the device register offsets are choices of this design.
package lc3_pkg;

  localparam int unsigned WORD_W = 16;
  typedef logic [WORD_W-1:0] word_t;

  // Memory map (word addresses).
  localparam word_t TRAP_VT_BASE = 16'h0000;  // 2^8 trap vectors
  localparam word_t EXC_VT_BASE  = 16'h0100;  // 2^7 exception vectors
  localparam word_t INT_VT_BASE  = 16'h0180;  // 2^7 interrupt vectors
  localparam word_t OS_BASE      = 16'h0200;  // kernel code, data, OS stack
  localparam word_t USER_BASE    = 16'h3000;  // user space
  localparam word_t IO_BASE      = 16'hFFE0;  // 32 device registers

  // The I/O page is recognised by address bits [15:5] being all ones.
  localparam int unsigned IO_SEL_LSB = 5;

  typedef enum logic [2:0] {
    RGN_TRAP_VT = 3'd0,
    RGN_EXC_VT  = 3'd1,
    RGN_INT_VT  = 3'd2,
    RGN_OS      = 3'd3,
    RGN_USER    = 3'd4,
    RGN_IO      = 3'd5
  } region_e;

  // Device registers inside the I/O page (offset = addr[4:0]).
  localparam logic [4:0] KBSR_OFS = 5'd0;  // keyboard status: [15] ready, [14] int enable
  localparam logic [4:0] KBDR_OFS = 5'd1;  // keyboard data

  // Causes that address the vector ROM.
  typedef enum logic [1:0] {
    CAUSE_ILLEGAL_OP = 2'd0,
    CAUSE_PRIV       = 2'd1,
    CAUSE_KBD_INT    = 2'd2
  } cause_e;

  // Opcodes, IR[15:12].
  typedef enum logic [3:0] {
    OP_BR   = 4'b0000,
    OP_ADD  = 4'b0001,
    OP_LD   = 4'b0010,
    OP_ST   = 4'b0011,
    OP_JSR  = 4'b0100,
    OP_AND  = 4'b0101,
    OP_LDR  = 4'b0110,
    OP_STR  = 4'b0111,
    OP_RTI  = 4'b1000,
    OP_NOT  = 4'b1001,
    OP_LDI  = 4'b1010,
    OP_STI  = 4'b1011,
    OP_JMP  = 4'b1100,
    OP_RES  = 4'b1101,
    OP_LEA  = 4'b1110,
    OP_TRAP = 4'b1111
  } opcode_e;

  typedef enum logic [1:0] {
    ALU_ADD  = 2'd0,
    ALU_AND  = 2'd1,
    ALU_NOT  = 2'd2,
    ALU_PASS = 2'd3
  } alu_op_e;

  // Controller states, numbered as in the LC-3 state machine.
  typedef enum logic [5:0] {
    S_BR_TAKE  = 6'd0,   // BR: test condition codes
    S_ADD      = 6'd1,
    S_LD       = 6'd2,   // MAR <- PC + off9
    S_ST       = 6'd3,   // MAR <- PC + off9
    S_JSR      = 6'd4,   // R7 <- PC and PC <- BaseR or PC + off11
    S_AND      = 6'd5,
    S_LDR      = 6'd6,   // MAR <- BaseR + off6
    S_STR      = 6'd7,   // MAR <- BaseR + off6
    S_RTI      = 6'd8,   // MAR <- SP
    S_NOT      = 6'd9,
    S_LDI      = 6'd10,  // MAR <- PC + off9
    S_STI      = 6'd11,  // MAR <- PC + off9
    S_JMP      = 6'd12,  // PC <- BaseR
    S_EXC_OP   = 6'd13,  // illegal opcode exception
    S_LEA      = 6'd14,
    S_TRAP     = 6'd15,  // R7 <- PC, MAR <- ZEXT(IR[7:0])
    S_ST_WR    = 6'd16,  // Mem <- MDR
    S_FETCH    = 6'd18,  // MAR <- PC, PC <- PC+1, interrupt test
    S_BR_JUMP  = 6'd22,  // PC <- PC + off9
    S_ST_MDR   = 6'd23,  // MDR <- SR
    S_LDI_RD   = 6'd24,  // MDR <- Mem (pointer)
    S_LD_RD    = 6'd25,  // MDR <- Mem
    S_LDI_MAR  = 6'd26,  // MAR <- MDR
    S_LD_WB    = 6'd27,  // DR <- MDR, set CC
    S_TRAP_RD  = 6'd28,  // MDR <- Mem[vector]
    S_STI_RD   = 6'd29,  // MDR <- Mem (pointer)
    S_TRAP_JMP = 6'd30,  // PC <- MDR
    S_STI_MAR  = 6'd31,  // MAR <- MDR
    S_DECODE   = 6'd32,  // BEN, dispatch on opcode, illegal-opcode test
    S_IR_RD    = 6'd33,  // MDR <- Mem[PC]
    S_RTI_SP2  = 6'd34,  // restore user SP if returning to user mode
    S_IR_LD    = 6'd35,  // IR <- MDR
    S_RTI_PC   = 6'd36,  // MDR <- Mem (popped PC)
    S_PSH_PSR1 = 6'd37,  // SP <- SP-1, MAR <- SP-1
    S_RTI_PC2  = 6'd38,  // PC <- MDR
    S_RTI_SP1  = 6'd39,  // SP <- SP+1, MAR <- SP+1
    S_RTI_PSR  = 6'd40,  // MDR <- Mem (popped PSR)
    S_PSH_PSR2 = 6'd41,  // Mem <- MDR
    S_RTI_PSR2 = 6'd42,  // PSR <- MDR, SP <- SP+1
    S_PSH_PC1  = 6'd43,  // MDR <- PC-1
    S_EXC_PRIV = 6'd44,  // privilege exception
    S_PSH_PC2  = 6'd47,  // SP <- SP-1, MAR <- SP-1
    S_PSH_PC3  = 6'd48,  // Mem <- MDR
    S_INT      = 6'd49,  // interrupt / exception entry: MDR <- PSR, save R6
    S_VEC_MAR  = 6'd50,  // MAR <- Vect_Reg
    S_VEC_RD   = 6'd52,  // MDR <- Mem[vector]
    S_VEC_JMP  = 6'd54   // PC <- MDR
  } state_e;

endpackage

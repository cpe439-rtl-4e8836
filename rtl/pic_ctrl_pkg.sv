// pic_ctrl_pkg - types and constants shared by the control unit of a
// PIC16F84A-style processor.
//
// The control word is 17 bits wide, one field per control signal, in the
// column order of the control-memory table: W_write, Write_en, m[3:0],
// L_or_F, F_write, C_en, DC_en, Z_en, IR_clear, IR_clear_cond, PC_Sel[1:0],
// Push, Pop (W_write is bit 16, Pop is bit 0).
//
// The ALU operation codes m[3:0] belong to the datapath. Three of them are
// fixed by the control-memory table (1101 for MOVWF/NOP, 1100 for CLRF/CLRW,
// 1001 for RLF); the other thirteen are this design's own assignment and
// must match whatever ALU the unit drives. The PC_Sel encoding is fixed for
// 00 (next instruction) and 01 (CALL); 10 (return address from the stack)
// is this design's choice and 11 is unused.
package pic_ctrl_pkg;

  localparam int unsigned CTRL_ADDR_W = 6;   // IR_Data[13:8]
  localparam int unsigned CTRL_WORD_W = 17;  // control signals per location
  localparam int unsigned IR_W        = 14;  // PIC16F84A instruction width

  // ALU operation select. A = W register, B = literal or file register.
  typedef enum logic [3:0] {
    ALU_ADD    = 4'b0000,  // A + B                 ADDWF, ADDLW
    ALU_SUB    = 4'b0001,  // B - A                 SUBWF, SUBLW
    ALU_AND    = 4'b0010,  // A & B                 ANDWF, ANDLW
    ALU_IOR    = 4'b0011,  // A | B                 IORWF, IORLW
    ALU_XOR    = 4'b0100,  // A ^ B                 XORWF, XORLW
    ALU_COM    = 4'b0101,  // ~B                    COMF
    ALU_INC    = 4'b0110,  // B + 1                 INCF, INCFSZ
    ALU_DEC    = 4'b0111,  // B - 1                 DECF, DECFSZ
    ALU_PASSB  = 4'b1000,  // B                     MOVF, MOVLW, RETLW
    ALU_RLF    = 4'b1001,  // {B[6:0], C}           RLF
    ALU_RRF    = 4'b1010,  // {C, B[7:1]}           RRF
    ALU_SWAP   = 4'b1011,  // {B[3:0], B[7:4]}      SWAPF
    ALU_ZERO   = 4'b1100,  // 0                     CLRF, CLRW
    ALU_PASSA  = 4'b1101,  // A                     MOVWF, NOP
    ALU_BITWR  = 4'b1110,  // B with bit b cleared (IR[10]=0) or set (IR[10]=1)   BCF, BSF
    ALU_BITTST = 4'b1111   // (IR[10] ? ~B : B) & (1<<b); zero means skip         BTFSC, BTFSS
  } alu_op_e;

  typedef enum logic [1:0] {
    PC_NEXT  = 2'b00,  // PC + 1
    PC_JUMP  = 2'b01,  // IR_Data[10:0] (CALL, GOTO)
    PC_STACK = 2'b10,  // top of the return stack (RETURN, RETLW)
    PC_RSVD  = 2'b11   // unused
  } pc_sel_e;

  typedef struct packed {
    logic    W_write;        // always writes W
    logic    Write_en;       // writes W or f, chosen by d
    alu_op_e m;              // ALU operation
    logic    L_or_F;         // 1: file register operand, 0: literal
    logic    F_write;        // always writes f
    logic    C_en;
    logic    DC_en;
    logic    Z_en;
    logic    IR_clear;       // two-cycle jump: flush the next instruction
    logic    IR_clear_cond;  // skip the next instruction if the result is zero
    pc_sel_e PC_Sel;
    logic    Push;
    logic    Pop;
  } ctrl_word_t;

endpackage

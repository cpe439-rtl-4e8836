// control - control memory of a PIC16F84A-style processor.
//
// The six most significant bits of the fetched instruction, IR_Data[13:8],
// address a 64 x 17-bit read-only control memory; the addressed word holds
// every control signal the datapath needs to execute that instruction. The
// memory is written as an array of control words (rom_image) that is filled
// at elaboration by the function rom_word(), one case per instruction class
// of the modified PIC16F84A instruction set. Reads are asynchronous: the
// outputs follow Instr combinationally, in the same cycle.
//
// Interface: Instr[5:0] in; the 17 control signals out, one port each, in
// the order of the control word (see pic_ctrl_pkg). ADDR_W and WORD_W are
// fixed by the instruction format and the control word; other values are
// rejected at elaboration.
//
// From the instruction set and the control-memory table: the memory size and
// address, the control signals and their meaning, the opcode of every
// instruction class, and the rows for MOVWF/NOP, CLRF/CLRW, RLF and CALL.
// This design's choices: the remaining rows follow the instruction
// semantics with the ALU codes of pic_ctrl_pkg; RETURN occupies 11 1011, the
// only free prefix of the literal/control group; don't-care fields are 0;
// W_write and F_write force a write to W or f regardless of the d bit, which
// is how the literal and bit-set/clear classes (whose IR_Data[7] is not a d
// bit) reach their destination.
module control
  import pic_ctrl_pkg::*;
#(
  parameter int unsigned ADDR_W = CTRL_ADDR_W,
  parameter int unsigned WORD_W = CTRL_WORD_W
) (
  input  logic [ADDR_W-1:0] Instr,
  output logic              W_write,
  output logic              Write_en,
  output logic [3:0]        m,
  output logic              L_or_F,
  output logic              F_write,
  output logic              C_en,
  output logic              DC_en,
  output logic              Z_en,
  output logic              IR_clear,
  output logic              IR_clear_cond,
  output logic [1:0]        PC_Sel,
  output logic              Push,
  output logic              Pop
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  // Control word of one ROM location. Fields start inactive and each class
  // sets only what it uses.
  function automatic ctrl_word_t rom_word(logic [5:0] a);
    ctrl_word_t w;
    w = '0;
    w.m      = ALU_PASSA;
    w.PC_Sel = PC_NEXT;
    unique casez (a)
      // byte-oriented file register operations: destination chosen by d
      6'b00_0000: begin w.Write_en = 1'b1; w.m = ALU_PASSA;                    end // MOVWF, NOP
      6'b00_0001: begin w.Write_en = 1'b1; w.m = ALU_ZERO;                     w.Z_en = 1'b1; end // CLRF, CLRW
      6'b00_0010: begin w.Write_en = 1'b1; w.m = ALU_SUB;   w.L_or_F = 1'b1;   w.C_en = 1'b1; w.DC_en = 1'b1; w.Z_en = 1'b1; end // SUBWF
      6'b00_0011: begin w.Write_en = 1'b1; w.m = ALU_DEC;   w.L_or_F = 1'b1;   w.Z_en = 1'b1; end // DECF
      6'b00_0100: begin w.Write_en = 1'b1; w.m = ALU_IOR;   w.L_or_F = 1'b1;   w.Z_en = 1'b1; end // IORWF
      6'b00_0101: begin w.Write_en = 1'b1; w.m = ALU_AND;   w.L_or_F = 1'b1;   w.Z_en = 1'b1; end // ANDWF
      6'b00_0110: begin w.Write_en = 1'b1; w.m = ALU_XOR;   w.L_or_F = 1'b1;   w.Z_en = 1'b1; end // XORWF
      6'b00_0111: begin w.Write_en = 1'b1; w.m = ALU_ADD;   w.L_or_F = 1'b1;   w.C_en = 1'b1; w.DC_en = 1'b1; w.Z_en = 1'b1; end // ADDWF
      6'b00_1000: begin w.Write_en = 1'b1; w.m = ALU_PASSB; w.L_or_F = 1'b1;   w.Z_en = 1'b1; end // MOVF
      6'b00_1001: begin w.Write_en = 1'b1; w.m = ALU_COM;   w.L_or_F = 1'b1;   w.Z_en = 1'b1; end // COMF
      6'b00_1010: begin w.Write_en = 1'b1; w.m = ALU_INC;   w.L_or_F = 1'b1;   w.Z_en = 1'b1; end // INCF
      6'b00_1011: begin w.Write_en = 1'b1; w.m = ALU_DEC;   w.L_or_F = 1'b1;   w.IR_clear_cond = 1'b1; end // DECFSZ
      6'b00_1100: begin w.Write_en = 1'b1; w.m = ALU_RRF;   w.L_or_F = 1'b1;   w.C_en = 1'b1; end // RRF
      6'b00_1101: begin w.Write_en = 1'b1; w.m = ALU_RLF;   w.L_or_F = 1'b1;   w.C_en = 1'b1; end // RLF
      6'b00_1110: begin w.Write_en = 1'b1; w.m = ALU_SWAP;  w.L_or_F = 1'b1;   end // SWAPF
      6'b00_1111: begin w.Write_en = 1'b1; w.m = ALU_INC;   w.L_or_F = 1'b1;   w.IR_clear_cond = 1'b1; end // INCFSZ
      // bit-oriented file register operations: IR_Data[9:7] is the bit number
      6'b01_0???: begin w.F_write = 1'b1;  w.m = ALU_BITWR;  w.L_or_F = 1'b1;  end // BCF, BSF
      6'b01_1???: begin                    w.m = ALU_BITTST; w.L_or_F = 1'b1;  w.IR_clear_cond = 1'b1; end // BTFSC, BTFSS
      // literal and control operations
      6'b10_0???: begin w.IR_clear = 1'b1; w.PC_Sel = PC_JUMP; w.Push = 1'b1;  end // CALL
      6'b10_1???: begin w.IR_clear = 1'b1; w.PC_Sel = PC_JUMP;                 end // GOTO
      6'b11_00??: begin w.W_write = 1'b1;  w.m = ALU_PASSB;                    end // MOVLW
      6'b11_01??: begin w.W_write = 1'b1;  w.m = ALU_PASSB;  w.IR_clear = 1'b1; w.PC_Sel = PC_STACK; w.Pop = 1'b1; end // RETLW
      6'b11_1000: begin w.W_write = 1'b1;  w.m = ALU_IOR;    w.Z_en = 1'b1;    end // IORLW
      6'b11_1001: begin w.W_write = 1'b1;  w.m = ALU_AND;    w.Z_en = 1'b1;    end // ANDLW
      6'b11_1010: begin w.W_write = 1'b1;  w.m = ALU_XOR;    w.Z_en = 1'b1;    end // XORLW
      6'b11_1011: begin w.IR_clear = 1'b1; w.PC_Sel = PC_STACK; w.Pop = 1'b1;  end // RETURN
      6'b11_110?: begin w.W_write = 1'b1;  w.m = ALU_SUB;    w.C_en = 1'b1; w.DC_en = 1'b1; w.Z_en = 1'b1; end // SUBLW
      6'b11_111?: begin w.W_write = 1'b1;  w.m = ALU_ADD;    w.C_en = 1'b1; w.DC_en = 1'b1; w.Z_en = 1'b1; end // ADDLW
      default:    ;
    endcase
    return w;
  endfunction

  // The control memory itself.
  logic [WORD_W-1:0] rom_image [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) rom_image[i] = WORD_W'(rom_word(6'(i)));
  end

  ctrl_word_t word;
  assign word = ctrl_word_t'(rom_image[Instr]);

  assign W_write       = word.W_write;
  assign Write_en      = word.Write_en;
  assign m             = word.m;
  assign L_or_F        = word.L_or_F;
  assign F_write       = word.F_write;
  assign C_en          = word.C_en;
  assign DC_en         = word.DC_en;
  assign Z_en          = word.Z_en;
  assign IR_clear      = word.IR_clear;
  assign IR_clear_cond = word.IR_clear_cond;
  assign PC_Sel        = word.PC_Sel;
  assign Push          = word.Push;
  assign Pop           = word.Pop;

  // The word layout must match the memory width, and the opcode map in
  // rom_word() is written for a 6-bit address.
  if ($bits(ctrl_word_t) != WORD_W) begin : g_width_check
    $error("control word is %0d bits, memory is %0d bits wide", $bits(ctrl_word_t), WORD_W);
  end
  if (ADDR_W != 6) begin : g_addr_check
    $error("the opcode map needs a 6-bit address, ADDR_W is %0d", ADDR_W);
  end

endmodule

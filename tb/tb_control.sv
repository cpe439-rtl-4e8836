// tb_control - exhaustive self-checking test of the 64 x 17 control memory.
//
// Every one of the 64 addresses is applied. For each, the instruction
// mnemonic is looked up from the opcode map of the modified PIC16F84A
// instruction set, and the expected control signals are derived from that
// mnemonic's description: its destination (W, f or chosen by d), its ALU
// operation and operand, the status flags it affects, and its cycle count
// (2 cycles -> IR_clear, "1 (2)" -> IR_clear_cond). Fields that are don't
// care for an instruction are not compared. The rows printed in the
// control-memory table (MOVWF/NOP, CLRF/CLRW, RLF, CALL) are also compared
// bit for bit with their printed values.
module tb_control;
  import pic_ctrl_pkg::*;

  logic [5:0] Instr;
  logic       W_write, Write_en, L_or_F, F_write, C_en, DC_en, Z_en;
  logic       IR_clear, IR_clear_cond, Push, Pop;
  logic [3:0] m;
  logic [1:0] PC_Sel;

  int checks = 0;
  int failures = 0;

  control dut (.*);

  // Watchdog: the test is combinational and needs far fewer steps.
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic string mnemonic(logic [5:0] a);
    string byte_ops [16] = '{"MOVWF", "CLRF", "SUBWF", "DECF", "IORWF", "ANDWF", "XORWF", "ADDWF",
                             "MOVF", "COMF", "INCF", "DECFSZ", "RRF", "RLF", "SWAPF", "INCFSZ"};
    string bit_ops [4]  = '{"BCF", "BSF", "BTFSC", "BTFSS"};
    if (a[5:4] == 2'b00) return byte_ops[a[3:0]];
    if (a[5:4] == 2'b01) return bit_ops[a[3:2]];
    if (a[5:4] == 2'b10) return a[3] ? "GOTO" : "CALL";
    if (a[3:2] == 2'b00) return "MOVLW";
    if (a[3:2] == 2'b01) return "RETLW";
    if (a[3:1] == 3'b110) return "SUBLW";
    if (a[3:1] == 3'b111) return "ADDLW";
    case (a[1:0])
      2'b00: return "IORLW";
      2'b01: return "ANDLW";
      2'b10: return "XORLW";
      default: return "RETURN";
    endcase
  endfunction

  task automatic check(string what, logic [5:0] a, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %b (%s): got %0d expected %0d", what, a, mnemonic(a), got, exp);
    end
  endtask

  initial begin
    string mn, dest, flags, op;
    int    cycles;
    bit    f_operand;     // second ALU operand is the file register
    int    pcsel;
    #1;
    for (int i = 0; i < 64; i++) begin
      Instr = 6'(i);
      #1;
      mn = mnemonic(Instr);
      // destination: "d" = chosen by the d bit, "W", "F" or "-" (none)
      // op: expected ALU code, "-" = don't care; flags as in the status column
      case (mn)
        "MOVWF":  begin dest = "d"; op = "1101"; flags = "";       cycles = 1; end
        "CLRF":   begin dest = "d"; op = "1100"; flags = "Z";      cycles = 1; end
        "SUBWF":  begin dest = "d"; op = "0001"; flags = "C,DC,Z"; cycles = 1; end
        "DECF":   begin dest = "d"; op = "0111"; flags = "Z";      cycles = 1; end
        "IORWF":  begin dest = "d"; op = "0011"; flags = "Z";      cycles = 1; end
        "ANDWF":  begin dest = "d"; op = "0010"; flags = "Z";      cycles = 1; end
        "XORWF":  begin dest = "d"; op = "0100"; flags = "Z";      cycles = 1; end
        "ADDWF":  begin dest = "d"; op = "0000"; flags = "C,DC,Z"; cycles = 1; end
        "MOVF":   begin dest = "d"; op = "1000"; flags = "Z";      cycles = 1; end
        "COMF":   begin dest = "d"; op = "0101"; flags = "Z";      cycles = 1; end
        "INCF":   begin dest = "d"; op = "0110"; flags = "Z";      cycles = 1; end
        "DECFSZ": begin dest = "d"; op = "0111"; flags = "";       cycles = 3; end
        "RRF":    begin dest = "d"; op = "1010"; flags = "C";      cycles = 1; end
        "RLF":    begin dest = "d"; op = "1001"; flags = "C";      cycles = 1; end
        "SWAPF":  begin dest = "d"; op = "1011"; flags = "";       cycles = 1; end
        "INCFSZ": begin dest = "d"; op = "0110"; flags = "";       cycles = 3; end
        "BCF":    begin dest = "F"; op = "1110"; flags = "";       cycles = 1; end
        "BSF":    begin dest = "F"; op = "1110"; flags = "";       cycles = 1; end
        "BTFSC":  begin dest = "-"; op = "1111"; flags = "";       cycles = 3; end
        "BTFSS":  begin dest = "-"; op = "1111"; flags = "";       cycles = 3; end
        "CALL":   begin dest = "-"; op = "-";    flags = "";       cycles = 2; end
        "GOTO":   begin dest = "-"; op = "-";    flags = "";       cycles = 2; end
        "MOVLW":  begin dest = "W"; op = "1000"; flags = "";       cycles = 1; end
        "RETLW":  begin dest = "W"; op = "1000"; flags = "";       cycles = 2; end
        "IORLW":  begin dest = "W"; op = "0011"; flags = "Z";      cycles = 1; end
        "ANDLW":  begin dest = "W"; op = "0010"; flags = "Z";      cycles = 1; end
        "XORLW":  begin dest = "W"; op = "0100"; flags = "Z";      cycles = 1; end
        "RETURN": begin dest = "-"; op = "-";    flags = "";       cycles = 2; end
        "SUBLW":  begin dest = "W"; op = "0001"; flags = "C,DC,Z"; cycles = 1; end
        "ADDLW":  begin dest = "W"; op = "0000"; flags = "C,DC,Z"; cycles = 1; end
        default:  begin dest = "?"; op = "-";    flags = "";       cycles = 0; end
      endcase
      // cycles = 3 stands for "1 (2)": one cycle, two when the skip is taken
      check("W_write",  Instr, int'(W_write),  int'(dest == "W"));
      check("Write_en", Instr, int'(Write_en), int'(dest == "d"));
      check("F_write",  Instr, int'(F_write),  int'(dest == "F"));
      if (op != "-") begin
        int code;
        code = 0;
        for (int k = 0; k < 4; k++) code = code * 2 + (op[k] == "1" ? 1 : 0);
        check("m", Instr, int'(m), code);
      end
      // operand B: literal for the literal class, file register for the
      // byte and bit classes that read f (MOVWF and CLRF/CLRW read none)
      f_operand = (Instr[5:4] != 2'b11);
      if (op != "-" && mn != "MOVWF" && mn != "CLRF")
        check("L_or_F", Instr, int'(L_or_F), int'(f_operand));
      check("C_en",  Instr, int'(C_en),  int'(flags == "C" || flags == "C,DC,Z"));
      check("DC_en", Instr, int'(DC_en), int'(flags == "C,DC,Z"));
      check("Z_en",  Instr, int'(Z_en),  int'(flags == "Z" || flags == "C,DC,Z"));
      check("IR_clear",      Instr, int'(IR_clear),      int'(cycles == 2));
      check("IR_clear_cond", Instr, int'(IR_clear_cond), int'(cycles == 3));
      pcsel = (mn == "CALL" || mn == "GOTO") ? 1 : (mn == "RETURN" || mn == "RETLW") ? 2 : 0;
      check("PC_Sel", Instr, int'(PC_Sel), pcsel);
      check("Push", Instr, int'(Push), int'(mn == "CALL"));
      check("Pop",  Instr, int'(Pop),  int'(mn == "RETURN" || mn == "RETLW"));

      // Rows printed in the control-memory table, X fields skipped.
      // Order: W_write Write_en M L_or_F F_write C_en DC_en Z_en IR_clear IR_clear_cond PC_Sel Push Pop
      if (Instr == 6'b00_0000)
        check("row 00 0000", Instr, int'({W_write, Write_en, m, F_write, C_en, DC_en, Z_en, IR_clear, IR_clear_cond, PC_Sel, Push, Pop}),
              int'(16'b0_1_1101_0_0_0_0_0_0_00_0_0));
      if (Instr == 6'b00_0001)
        check("row 00 0001", Instr, int'({W_write, Write_en, m, F_write, C_en, DC_en, Z_en, IR_clear, IR_clear_cond, PC_Sel, Push, Pop}),
              int'(16'b0_1_1100_0_0_0_1_0_0_00_0_0));
      if (Instr == 6'b00_1101)
        check("row 00 1101", Instr, int'({W_write, Write_en, m, L_or_F, F_write, C_en, DC_en, Z_en, IR_clear, IR_clear_cond, PC_Sel, Push, Pop}),
              int'(17'b0_1_1001_1_0_1_0_0_0_0_00_0_0));
      if (Instr[5:3] == 3'b100)
        check("row CALL", Instr, int'({W_write, Write_en, F_write, C_en, DC_en, Z_en, IR_clear, IR_clear_cond, PC_Sel, Push, Pop}),
              int'(12'b0_0_0_0_0_0_1_0_01_1_0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_pic_control_unit - end-to-end test of the control unit inside a
// processor.
//
// The control unit (at its default, and only, configuration) drives a
// behavioural model of the rest of a PIC16F84A-style processor
// (pic_datapath_model). An instruction-level reference model written in
// this testbench executes the same program, one instruction at a time, from
// the instruction set description alone. The two run in lockstep: every
// cycle in which the processor executes a fetched instruction, its program
// address, W and C/DC/Z must equal the reference model's, and every cycle
// must be a flush bubble exactly when the reference model says the previous
// instruction took a second cycle (2 cycles for CALL, GOTO, RETURN, RETLW;
// 1, or 2 when the skip is taken, for DECFSZ, INCFSZ, BTFSC, BTFSS). The
// data memory is compared after every instruction and the total cycle count
// at the end of each phase.
//
// Phase 1 runs a small hand-assembled program (a counted loop with a
// subroutine, bit operations, a table return) and also checks its final
// values. Phase 2 runs pseudo-random programs over the whole instruction set
// with random resets. Each mechanism of the control unit is counted and a
// mechanism that never occurred counts as a failure.
module tb_pic_control_unit;
  import pic_ctrl_pkg::*;

  logic        clk = 1'b0;
  logic        Reset;
  logic [13:0] IR_Data;
  logic        alu_zero, W_we, DataWrite, IR_Res, L_or_F, C_en, DC_en, Z_en, Push, Pop;
  logic [3:0]  m;
  logic [1:0]  PC_Sel;
  logic        bubble;
  logic [9:0]  ir_pc;

  int checks = 0, failures = 0;

  pic_control_unit dut (.*);

  pic_datapath_model proc (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- reference model
  logic [13:0] rpmem [1024];
  logic [7:0]  rram  [128];
  logic [9:0]  rstack [8];
  logic [2:0]  rsp;
  logic [9:0]  rpc;
  logic [7:0]  rW;
  logic        rC, rDC, rZ;

  // Execute the instruction at rpc; return its cycle count.
  function automatic int iss_step();
    logic [13:0] ins = rpmem[rpc];
    logic [6:0]  f = ins[6:0];
    logic        d = ins[7];
    logic [2:0]  bn = ins[9:7];
    logic [7:0]  k = ins[7:0];
    logic [7:0]  fv = rram[f];
    logic [7:0]  r;
    logic [8:0]  wide;
    int          cyc = 1;
    logic [9:0]  next = rpc + 10'd1;
    bit          wr = 1'b1;   // byte op writes its result to d's destination
    unique casez (ins[13:8])
      6'b00_0000: r = rW;                                                // MOVWF / NOP
      6'b00_0001: begin r = 8'h00; rZ = 1'b1; end                        // CLRF / CLRW
      6'b00_0010: begin wide = {1'b0, fv} + {1'b0, ~rW} + 9'd1; r = wide[7:0];
                        rC = wide[8]; rDC = (fv[3:0] >= rW[3:0]); rZ = (r == 0); end // SUBWF
      6'b00_0011: begin r = fv - 8'd1; rZ = (r == 0); end                // DECF
      6'b00_0100: begin r = rW | fv; rZ = (r == 0); end                  // IORWF
      6'b00_0101: begin r = rW & fv; rZ = (r == 0); end                  // ANDWF
      6'b00_0110: begin r = rW ^ fv; rZ = (r == 0); end                  // XORWF
      6'b00_0111: begin wide = {1'b0, fv} + {1'b0, rW}; r = wide[7:0];
                        rC = wide[8]; rDC = ((fv & 8'h0F) + (rW & 8'h0F)) > 8'h0F; rZ = (r == 0); end // ADDWF
      6'b00_1000: begin r = fv; rZ = (r == 0); end                       // MOVF
      6'b00_1001: begin r = ~fv; rZ = (r == 0); end                      // COMF
      6'b00_1010: begin r = fv + 8'd1; rZ = (r == 0); end                // INCF
      6'b00_1011: begin r = fv - 8'd1; if (r == 0) cyc = 2; end          // DECFSZ
      6'b00_1100: begin r = {rC, fv[7:1]}; rC = fv[0]; end               // RRF
      6'b00_1101: begin r = {fv[6:0], rC}; rC = fv[7]; end               // RLF
      6'b00_1110: r = {fv[3:0], fv[7:4]};                                // SWAPF
      6'b00_1111: begin r = fv + 8'd1; if (r == 0) cyc = 2; end          // INCFSZ
      6'b01_00??: begin wr = 1'b0; rram[f][bn] = 1'b0; end               // BCF
      6'b01_01??: begin wr = 1'b0; rram[f][bn] = 1'b1; end               // BSF
      6'b01_10??: begin wr = 1'b0; if (!fv[bn]) cyc = 2; end             // BTFSC
      6'b01_11??: begin wr = 1'b0; if (fv[bn])  cyc = 2; end             // BTFSS
      6'b10_0???: begin wr = 1'b0; rstack[rsp] = next; rsp++; next = ins[9:0]; cyc = 2; end // CALL
      6'b10_1???: begin wr = 1'b0; next = ins[9:0]; cyc = 2; end         // GOTO
      6'b11_00??: begin wr = 1'b0; rW = k; end                           // MOVLW
      6'b11_01??: begin wr = 1'b0; rW = k; rsp--; next = rstack[rsp]; cyc = 2; end // RETLW
      6'b11_1000: begin wr = 1'b0; rW = rW | k; rZ = (rW == 0); end      // IORLW
      6'b11_1001: begin wr = 1'b0; rW = rW & k; rZ = (rW == 0); end      // ANDLW
      6'b11_1010: begin wr = 1'b0; rW = rW ^ k; rZ = (rW == 0); end      // XORLW
      6'b11_1011: begin wr = 1'b0; rsp--; next = rstack[rsp]; cyc = 2; end // RETURN
      6'b11_110?: begin wr = 1'b0; wide = {1'b0, k} + {1'b0, ~rW} + 9'd1;
                        rC = wide[8]; rDC = (k[3:0] >= rW[3:0]); rW = wide[7:0]; rZ = (rW == 0); end // SUBLW
      6'b11_111?: begin wr = 1'b0; wide = {1'b0, k} + {1'b0, rW};
                        rDC = ((k & 8'h0F) + (rW & 8'h0F)) > 8'h0F; rC = wide[8]; rW = wide[7:0]; rZ = (rW == 0); end // ADDLW
      default: ;
    endcase
    if (wr) begin
      if (d) rram[f] = r;
      else   rW = r;
    end
    // a taken skip passes over the next instruction
    if (cyc == 2 && ins[13:12] != 2'b10 && ins[13:10] != 4'b1101 && ins[13:8] != 6'b11_1011)
      next = rpc + 10'd2;
    rpc = next;
    return cyc;
  endfunction

  // Copy the processor's data state into the reference model (used after
  // power-up, where the data memory, W, flags and stack hold random values).
  task automatic iss_sync();
    rW = proc.W; rC = proc.C; rDC = proc.DC; rZ = proc.Z;
    for (int i = 0; i < 128; i++) rram[i] = proc.ram[i];
    for (int i = 0; i < 8; i++) rstack[i] = proc.stack[i];
  endtask

  // ---------------------------------------------------------------- mechanisms
  typedef enum int {
    M_W_BY_D, M_F_BY_D, M_W_LITERAL, M_F_BIT, M_JUMP_FLUSH, M_SKIP_TAKEN, M_SKIP_NOT_TAKEN,
    M_PUSH, M_POP, M_RESET, M_C_EN, M_DC_EN, M_Z_EN, M_PC_JUMP, M_PC_STACK, M_LITERAL_OPERAND,
    M_FILE_OPERAND, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"W written by d=0", "f written by d=1", "W written by literal class",
    "f written by bit set/clear", "jump flush", "skip taken", "skip not taken", "push", "pop",
    "reset", "C update", "DC update", "Z update", "PC from literal", "PC from stack",
    "literal operand", "file operand"};

  // Instruction classes, decoded here from the opcode map.
  logic cls_byte, cls_literal, cls_bitwr, cls_jump, cls_skip;
  always_comb begin
    cls_byte    = (IR_Data[13:12] == 2'b00);
    cls_literal = (IR_Data[13:12] == 2'b11) && (IR_Data[11:8] != 4'b1011);
    cls_bitwr   = (IR_Data[13:11] == 3'b010);
    cls_jump    = (IR_Data[13:12] == 2'b10) || (IR_Data[13:10] == 4'b1101) || (IR_Data[13:8] == 6'b11_1011);
    cls_skip    = (IR_Data[13:8] == 6'b00_1011) || (IR_Data[13:8] == 6'b00_1111) || (IR_Data[13:11] == 3'b011);
  end

  always @(posedge clk) begin
    if (Reset) mech[M_RESET]++;
    else if (!bubble) begin
      if (cls_byte && !IR_Data[7] && W_we) mech[M_W_BY_D]++;
      if (cls_byte && IR_Data[7] && DataWrite) mech[M_F_BY_D]++;
      if (cls_literal && W_we) mech[M_W_LITERAL]++;
      if (cls_bitwr && DataWrite) mech[M_F_BIT]++;
      if (cls_jump && IR_Res) mech[M_JUMP_FLUSH]++;
      if (cls_skip && IR_Res) mech[M_SKIP_TAKEN]++;
      if (cls_skip && !IR_Res) mech[M_SKIP_NOT_TAKEN]++;
      if (Push) mech[M_PUSH]++;
      if (Pop) mech[M_POP]++;
      if (C_en) mech[M_C_EN]++;
      if (DC_en) mech[M_DC_EN]++;
      if (Z_en) mech[M_Z_EN]++;
      if (PC_Sel == PC_JUMP) mech[M_PC_JUMP]++;
      if (PC_Sel == PC_STACK) mech[M_PC_STACK]++;
      if (IR_Data[13:12] == 2'b11 && !L_or_F && (W_we || Z_en)) mech[M_LITERAL_OPERAND]++;
      if (IR_Data[13:12] != 2'b11 && L_or_F) mech[M_FILE_OPERAND]++;
    end
  end

  // ---------------------------------------------------------------- lockstep
  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s at t=%0t (pc %0d, IR %h): got %0d expected %0d", what, $time, rpc, IR_Data, got, exp);
    end
  endtask

  int  hw_cycles;        // cycles observed since the last reset release
  int  halt_cycle;       // cycle in which the instruction at halt_pc first executed
  int  halt_pc;
  bit  exp_bubble;

  // Run n cycles with optional random resets; compare every cycle. The cycle
  // after a reset edge executes the cleared IR while Reset is still high, so
  // the first observed cycle after a reset already holds address 0.
  task automatic run(int n, int reset_per_mille);
    int pending = 0;
    for (int c = 0; c < n; c++) begin
      @(negedge clk);
      if (!Reset) begin
        check("bubble", int'(bubble), int'(exp_bubble));
        if (!bubble) begin
          bit same_ram = 1'b1;
          check("pc", int'(ir_pc), int'(rpc));
          check("W", int'(proc.W), int'(rW));
          check("flags", int'({proc.C, proc.DC, proc.Z}), int'({rC, rDC, rZ}));
          for (int i = 0; i < 128; i++) if (proc.ram[i] !== rram[i]) same_ram = 1'b0;
          check("data memory", int'(same_ram), 1);
          if (halt_cycle < 0 && ir_pc == 10'(halt_pc)) halt_cycle = hw_cycles;
        end
        hw_cycles++;
      end
      // decide this cycle's reset before the next rising edge
      if (pending == 0 && reset_per_mille > 0 && ($urandom % 1000) < reset_per_mille)
        pending = 1 + ($urandom % 2);
      if (pending > 0) begin
        Reset = 1'b1;
        pending--;
        rpc = '0;
        rsp = '0;
        exp_bubble = 1'b0;
        hw_cycles = 0;
      end else if (Reset) begin
        Reset = 1'b0;
      end else if (!bubble) begin
        exp_bubble = (iss_step() == 2);
      end else begin
        exp_bubble = 1'b0;
      end
    end
  endtask

  // ---------------------------------------------------------------- assembler
  function automatic logic [13:0] byte_op(logic [3:0] opc, logic d, logic [6:0] f);
    return {2'b00, opc, d, f};
  endfunction
  function automatic logic [13:0] bit_op(logic [1:0] opc, logic [2:0] b, logic [6:0] f);
    return {2'b01, opc, b, f};
  endfunction
  function automatic logic [13:0] lit_op(logic [3:0] opc, logic [7:0] k);
    return {2'b11, opc, k};
  endfunction

  localparam logic [3:0] MOVWF = 4'b0000, CLRF = 4'b0001, ADDWF = 4'b0111, MOVF = 4'b1000,
                         DECFSZ = 4'b1011, INCF = 4'b1010, RLF = 4'b1101;
  localparam logic [13:0] RETURN_I = 14'b11_1011_0000_0000;

  initial begin
    Reset = 1'b1;
    hw_cycles = 0;
    for (int i = 0; i < M_COUNT; i++) mech[i] = 0;

    // ---- phase 1: directed program
    for (int i = 0; i < 1024; i++) rpmem[i] = {2'b10, 1'b1, 11'(i)};  // GOTO self everywhere
    rpmem[0]  = lit_op(4'b0000, 8'd5);          // MOVLW 5
    rpmem[1]  = byte_op(MOVWF, 1'b1, 7'h20);    // MOVWF count
    rpmem[2]  = byte_op(CLRF, 1'b1, 7'h21);     // CLRF sum
    rpmem[3]  = byte_op(CLRF, 1'b1, 7'h22);     // CLRF calls
    rpmem[4]  = byte_op(MOVF, 1'b0, 7'h20);     // loop: MOVF count,W
    rpmem[5]  = byte_op(ADDWF, 1'b1, 7'h21);    // ADDWF sum,F
    rpmem[6]  = {3'b100, 11'd40};               // CALL sub
    rpmem[7]  = byte_op(DECFSZ, 1'b1, 7'h20);   // DECFSZ count,F
    rpmem[8]  = {3'b101, 11'd4};                // GOTO loop
    rpmem[9]  = bit_op(2'b01, 3'd7, 7'h21);     // BSF sum,7
    rpmem[10] = bit_op(2'b00, 3'd0, 7'h21);     // BCF sum,0
    rpmem[11] = bit_op(2'b11, 3'd7, 7'h21);     // BTFSS sum,7   (taken)
    rpmem[12] = byte_op(CLRF, 1'b1, 7'h21);     //   skipped
    rpmem[13] = bit_op(2'b10, 3'd1, 7'h21);     // BTFSC sum,1   (bit 1 set: not taken)
    rpmem[14] = byte_op(INCF, 1'b1, 7'h23);     // INCF 0x23 (executes)
    rpmem[15] = {3'b100, 11'd44};               // CALL table
    rpmem[16] = byte_op(MOVWF, 1'b1, 7'h24);    // MOVWF result
    rpmem[17] = byte_op(RLF, 1'b1, 7'h24);      // RLF result,F
    rpmem[18] = lit_op(4'b1111, 8'hF0);         // ADDLW 0xF0
    rpmem[19] = {3'b101, 11'd19};               // GOTO self
    rpmem[40] = byte_op(INCF, 1'b1, 7'h22);     // sub: INCF calls,F
    rpmem[41] = RETURN_I;                       //      RETURN
    rpmem[44] = lit_op(4'b0100, 8'h2A);         // table: RETLW 0x2A
    for (int i = 0; i < 1024; i++) proc.pmem[i] = rpmem[i];
    proc.ram[7'h23] = 8'd0;
    repeat (2) @(negedge clk);
    rpc = '0; rsp = '0; exp_bubble = 1'b0;
    iss_sync();
    hw_cycles = 0;
    halt_pc = 19;
    halt_cycle = -1;
    run(120, 0);
    // sum = 5+4+3+2+1 = 15 -> BSF 7 -> 0x8F -> BCF 0 -> 0x8E
    check("count", int'(proc.ram[7'h20]), 0);
    check("sum", int'(proc.ram[7'h21]), 32'h8E);
    check("calls", int'(proc.ram[7'h22]), 5);
    check("skipped-over incf", int'(proc.ram[7'h23]), 1);
    // Cycles before the halt loop, from the instruction table: 4 set-up
    // instructions, 4 loop passes of 10 cycles and a last pass of 9, then
    // BSF, BCF, BTFSS taken (2), BTFSC not taken, INCF, CALL (2), RETLW (2),
    // MOVWF, RLF, ADDLW: 4 + 40 + 9 + 13 = 66. The cycle after the reset
    // edge (the cleared IR) is not observed.
    check("cycles to halt", halt_cycle, 66);

    // ---- phase 2: random programs with random resets
    for (int prog = 0; prog < 8; prog++) begin
      @(negedge clk);
      Reset = 1'b1;
      for (int i = 0; i < 1024; i++) begin
        rpmem[i] = 14'($urandom);
        proc.pmem[i] = rpmem[i];
      end
      @(negedge clk);
      rpc = '0; rsp = '0; exp_bubble = 1'b0;
      iss_sync();
      hw_cycles = 0;
      halt_cycle = 0;
      run(3000, 3);
    end

    for (int i = 0; i < M_COUNT; i++) begin
      $display("mechanism %-28s %0d", mech_name[i], mech[i]);
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", mech_name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// pic_control_unit - control unit of a PIC16F84A-style processor.
//
// The fetched instruction IR_Data[13:0] is decoded by the 64 x 17 control
// memory (module control), addressed by IR_Data[13:8]. Three small circuits
// then combine the memory's outputs with the instruction and the processor
// state:
//   * w_write_logic    -> W_we, write enable of the working register,
//   * data_write_logic -> DataWrite, write strobe of the data memory,
//   * ir_reset_logic   -> IR_Res, clear of the instruction register.
// The remaining control signals (ALU operation m, operand select L_or_F,
// flag enables, PC_Sel, Push, Pop) go to the datapath unchanged.
//
// Timing: fully combinational. The processor around it is a two-stage
// fetch/execute pipeline: while the instruction in IR executes, the next one
// is fetched into IR at the clock edge. IR_Res replaces that fetched word
// with an all-zero NOP, so jumps take two cycles and skips take two cycles
// when taken, one when not.
//
// The processor's datapath (ALU, W, STATUS), program memory with its
// instruction register, data memory, program counter and return stack are
// outside this unit; their connections are the ports below. alu_zero, the
// skip condition, is this design's addition (see ir_reset_logic).
module pic_control_unit
  import pic_ctrl_pkg::*;
(
  input  logic [IR_W-1:0] IR_Data,   // instruction register contents
  input  logic            Reset,     // processor reset
  input  logic            alu_zero,  // datapath: ALU result is zero
  output logic            W_we,      // W register write enable
  output logic            DataWrite, // data memory write strobe
  output logic            IR_Res,    // instruction register clear
  output logic [3:0]      m,         // ALU operation (alu_op_e)
  output logic            L_or_F,    // ALU operand B: 1 file register, 0 literal
  output logic            C_en,      // carry flag update enable
  output logic            DC_en,     // digit carry flag update enable
  output logic            Z_en,      // zero flag update enable
  output logic [1:0]      PC_Sel,    // next-PC source (pc_sel_e)
  output logic            Push,      // push return address
  output logic            Pop        // pop return address
);

  logic W_write, Write_en, F_write, IR_clear, IR_clear_cond;
  logic d;

  assign d = IR_Data[7];

  control u_control (
    .Instr        (IR_Data[13:8]),
    .W_write      (W_write),
    .Write_en     (Write_en),
    .m            (m),
    .L_or_F       (L_or_F),
    .F_write      (F_write),
    .C_en         (C_en),
    .DC_en        (DC_en),
    .Z_en         (Z_en),
    .IR_clear     (IR_clear),
    .IR_clear_cond(IR_clear_cond),
    .PC_Sel       (PC_Sel),
    .Push         (Push),
    .Pop          (Pop)
  );

  w_write_logic u_w_write (
    .d       (d),
    .W_write (W_write),
    .Write_en(Write_en),
    .W_we    (W_we)
  );

  data_write_logic u_data_write (
    .d        (d),
    .F_write  (F_write),
    .Write_en (Write_en),
    .DataWrite(DataWrite)
  );

  ir_reset_logic u_ir_reset (
    .Reset        (Reset),
    .IR_clear     (IR_clear),
    .IR_clear_cond(IR_clear_cond),
    .alu_zero     (alu_zero),
    .IR_Res       (IR_Res)
  );

  // Rules every control word obeys.
  always_comb begin
    assert (!(Push && Pop)) else $error("Push and Pop asserted together");
    assert (PC_Sel != PC_RSVD) else $error("reserved PC_Sel value");
    assert (!(W_we && DataWrite)) else $error("W and f written in the same cycle");
  end

endmodule

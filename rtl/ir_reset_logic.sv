// ir_reset_logic - clear of the instruction register (IR_Res).
//
// The instruction register is cleared, which turns the instruction fetched
// in the same cycle into a NOP (all-zero word), in three cases: processor
// Reset; a two-cycle jump (IR_clear: CALL, GOTO, RETURN, RETLW), whose
// sequential successor must not execute; and a conditional skip
// (IR_clear_cond: DECFSZ, INCFSZ, BTFSC, BTFSS) whose condition holds.
// Purely combinational; the register acts on IR_Res at the next clock edge,
// which gives those instructions their second cycle.
//
// IR_Res depending on Reset, IR_clear and IR_clear_cond is given. The skip
// condition itself is this design's addition: it is the datapath's
// "ALU result is zero" signal (alu_zero). The ALU codes for the bit tests
// make the result zero exactly when the tested bit calls for a skip, so one
// condition serves all four skip instructions.
module ir_reset_logic (
  input  logic Reset,          // processor reset
  input  logic IR_clear,       // control: unconditional flush
  input  logic IR_clear_cond,  // control: flush if alu_zero
  input  logic alu_zero,       // datapath: ALU result is zero
  output logic IR_Res          // clear of the instruction register
);

  assign IR_Res = Reset | IR_clear | (IR_clear_cond & alu_zero);

endmodule

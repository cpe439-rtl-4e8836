// tb_ir_reset_logic - exhaustive test of the instruction register clear.
//
// All sixteen combinations of Reset, IR_clear, IR_clear_cond and alu_zero
// are applied. Expected: the register is cleared on reset, after any jump,
// and after a skip instruction whose result is zero; a skip instruction with
// a non-zero result and every other instruction leave it alone.
module tb_ir_reset_logic;
  logic Reset, IR_clear, IR_clear_cond, alu_zero, IR_Res;
  int checks = 0, failures = 0;

  ir_reset_logic dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp;
    for (int i = 0; i < 16; i++) begin
      {Reset, IR_clear, IR_clear_cond, alu_zero} = 4'(i);
      #1;
      exp = 1'b0;
      if (Reset) exp = 1'b1;
      if (IR_clear) exp = 1'b1;
      if (IR_clear_cond && alu_zero) exp = 1'b1;
      checks++;
      if (IR_Res !== exp) begin
        failures++;
        $display("FAIL Reset=%b IR_clear=%b IR_clear_cond=%b alu_zero=%b: IR_Res=%b expected %b",
                 Reset, IR_clear, IR_clear_cond, alu_zero, IR_Res, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

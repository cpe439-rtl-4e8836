// tb_w_write_logic - exhaustive test of the W register write enable.
//
// All eight combinations of d, W_write and Write_en are applied. The
// expected enable follows from what each instruction class does: a literal
// instruction (W_write) always writes W whatever bit 7 of its literal is; a
// byte-oriented instruction (Write_en) writes W only when d = 0; any other
// instruction leaves W alone.
module tb_w_write_logic;
  logic d, W_write, Write_en, W_we;
  int checks = 0, failures = 0;

  w_write_logic dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp;
    for (int i = 0; i < 8; i++) begin
      {d, W_write, Write_en} = 3'(i);
      #1;
      if (W_write)       exp = 1'b1;       // literal class
      else if (Write_en) exp = (d == 1'b0); // destination W
      else               exp = 1'b0;
      checks++;
      if (W_we !== exp) begin
        failures++;
        $display("FAIL d=%b W_write=%b Write_en=%b: W_we=%b expected %b", d, W_write, Write_en, W_we, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_data_write_logic - exhaustive test of the data memory write strobe.
//
// All eight combinations of d, F_write and Write_en are applied. The
// expected strobe follows from what each instruction class does: BCF/BSF
// (F_write) always write f whatever the low bit of the bit number is; a
// byte-oriented instruction (Write_en) writes f only when d = 1; any other
// instruction leaves the data memory alone.
module tb_data_write_logic;
  logic d, F_write, Write_en, DataWrite;
  int checks = 0, failures = 0;

  data_write_logic dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp;
    for (int i = 0; i < 8; i++) begin
      {d, F_write, Write_en} = 3'(i);
      #1;
      if (F_write)       exp = 1'b1;        // bit set/clear class
      else if (Write_en) exp = (d == 1'b1); // destination f
      else               exp = 1'b0;
      checks++;
      if (DataWrite !== exp) begin
        failures++;
        $display("FAIL d=%b F_write=%b Write_en=%b: DataWrite=%b expected %b", d, F_write, Write_en, DataWrite, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// data_write_logic - write strobe of the data memory (file registers).
//
// The addressed file register is written when the instruction always targets
// f (F_write, the bit-set/clear class BCF and BSF) or when it is a
// byte-oriented file register operation (Write_en) whose d bit,
// IR_Data[7], is 1. Purely combinational, no clock.
//
// That DataWrite depends on d, F_write and Write_en is given; the OR/AND
// form below is this design's choice. It keeps a bit number's low bit
// (IR_Data[7] in BCF/BSF) from being read as a d bit, since those
// instructions leave Write_en at 0.
module data_write_logic (
  input  logic d,          // IR_Data[7]
  input  logic F_write,    // control: always write f
  input  logic Write_en,   // control: write the destination chosen by d
  output logic DataWrite   // write strobe of the data memory
);

  assign DataWrite = F_write | (Write_en & d);

endmodule

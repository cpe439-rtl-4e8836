// w_write_logic - write enable of the working register W.
//
// W is written when the instruction always targets W (W_write, the literal
// class: MOVLW, RETLW, ADDLW, ...) or when it is a byte-oriented file
// register operation (Write_en) whose d bit, IR_Data[7], is 0. Purely
// combinational, no clock.
//
// That W_we depends on d, W_write and Write_en is given; the OR/AND form
// below is this design's choice. It keeps a literal's bit 7 from being read
// as a d bit, since literal instructions leave Write_en at 0.
module w_write_logic (
  input  logic d,         // IR_Data[7]
  input  logic W_write,   // control: always write W
  input  logic Write_en,  // control: write the destination chosen by d
  output logic W_we       // write enable of W
);

  assign W_we = W_write | (Write_en & ~d);

endmodule

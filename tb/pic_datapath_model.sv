// pic_datapath_model - behavioural model, for simulation only, of the parts
// of a PIC16F84A-style processor that surround its control unit: program
// memory with the instruction register, program counter, 8-level return
// stack, working register W, STATUS flags C/DC/Z, ALU and a 128-byte data
// memory (plain storage, no special function registers).
//
// It obeys the control unit's outputs. Each clock edge the instruction at
// PC is fetched into IR (or IR is cleared to an all-zero NOP when IR_Res is
// high) while the instruction already in IR executes: the ALU combines
// A = W with B = (L_or_F ? data memory[IR[6:0]] : IR[7:0]) under m, and the
// result is written to W (W_we) and/or data memory (DataWrite); flags update
// when their enables are high; PC takes PC+1, IR[9:0] or the stack top by
// PC_Sel. Reset clears PC, IR and the stack pointer and blocks every write.
// alu_zero tells the control unit whether the ALU result is zero.
//
// bubble marks an IR that was cleared rather than fetched, and ir_pc is the
// address the instruction in IR came from; both exist only so that the
// testbench can follow execution.
module pic_datapath_model
  import pic_ctrl_pkg::*;
(
  input  logic        clk,
  input  logic        Reset,
  input  logic        W_we,
  input  logic        DataWrite,
  input  logic        IR_Res,
  input  logic [3:0]  m,
  input  logic        L_or_F,
  input  logic        C_en,
  input  logic        DC_en,
  input  logic        Z_en,
  input  logic [1:0]  PC_Sel,
  input  logic        Push,
  input  logic        Pop,
  output logic [13:0] IR_Data,
  output logic        alu_zero,
  output logic        bubble,
  output logic [9:0]  ir_pc
);

  logic [13:0] pmem [1024];
  logic [7:0]  ram  [128];
  logic [9:0]  stack [8];
  logic [2:0]  sp;
  logic [9:0]  pc;
  logic [7:0]  W;
  logic        C, DC, Z;

  logic [7:0] a, b, res, mask;
  logic       c_out, dc_out;

  assign IR_Data = IR_q;
  logic [13:0] IR_q;

  always_comb begin
    a      = W;
    b      = L_or_F ? ram[IR_q[6:0]] : IR_q[7:0];
    mask   = 8'(1) << IR_q[9:7];
    c_out  = C;
    dc_out = DC;
    case (alu_op_e'(m))
      ALU_ADD:    begin {c_out, res} = {1'b0, a} + {1'b0, b}; dc_out = (5'(a[3:0]) + 5'(b[3:0])) > 5'd15; end
      ALU_SUB:    begin res = b - a; c_out = (b >= a); dc_out = (b[3:0] >= a[3:0]); end
      ALU_AND:    res = a & b;
      ALU_IOR:    res = a | b;
      ALU_XOR:    res = a ^ b;
      ALU_COM:    res = ~b;
      ALU_INC:    res = b + 8'd1;
      ALU_DEC:    res = b - 8'd1;
      ALU_PASSB:  res = b;
      ALU_RLF:    begin res = {b[6:0], C}; c_out = b[7]; end
      ALU_RRF:    begin res = {C, b[7:1]}; c_out = b[0]; end
      ALU_SWAP:   res = {b[3:0], b[7:4]};
      ALU_ZERO:   res = 8'h00;
      ALU_PASSA:  res = a;
      ALU_BITWR:  res = IR_q[10] ? (b | mask) : (b & ~mask);
      ALU_BITTST: res = (IR_q[10] ? ~b : b) & mask;
      default:    res = 8'h00;
    endcase
  end

  assign alu_zero = (res == 8'h00);

  always_ff @(posedge clk) begin
    if (Reset) begin
      pc     <= '0;
      sp     <= '0;
      IR_q   <= '0;
      bubble <= 1'b1;
    end else begin
      IR_q   <= IR_Res ? 14'h0000 : pmem[pc];
      bubble <= IR_Res;
      ir_pc  <= pc;
      case (pc_sel_e'(PC_Sel))
        PC_JUMP:  pc <= IR_q[9:0];
        PC_STACK: pc <= stack[sp - 3'd1];
        default:  pc <= pc + 10'd1;
      endcase
      if (Push) begin
        stack[sp] <= pc;
        sp        <= sp + 3'd1;
      end
      if (Pop) sp <= sp - 3'd1;
      if (W_we)      W <= res;
      if (DataWrite) ram[IR_q[6:0]] <= res;
      if (C_en)  C  <= c_out;
      if (DC_en) DC <= dc_out;
      if (Z_en)  Z  <= (res == 8'h00);
    end
  end

endmodule

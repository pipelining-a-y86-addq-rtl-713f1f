// mem_ctrl_pipe: memory read/write control for a pipelined Y86-64 processor.
//
// In a single-cycle processor the data memory's read and write enables are
// decoded straight from the icode of the instruction just fetched. In a
// pipeline they must belong to the instruction that is in the memory stage,
// so the icode travels with it through the pipeline registers fD, dE, eM and
// mW (reset and bubble value NOP), and the enables are decoded from M_icode:
//   mem_read  for mrmovq, popq, ret
//   mem_write for rmmovq, pushq, call
// The icode reaches the memory stage three cycles after fetch and the
// writeback stage (W_icode) four cycles after fetch. The pipeline carries
// the icode only; which icodes read and which write is the standard Y86-64
// rule. stall[i] holds and bubble[i] clears register i (fD, dE, eM, mW) for
// a hazard controller outside this block. rst is synchronous.
module mem_ctrl_pipe (
  input  logic            clk,
  input  logic            rst,
  input  logic [3:0]      f_icode,
  input  logic [3:0]      stall,    // [0] fD, [1] dE, [2] eM, [3] mW
  input  logic [3:0]      bubble,   // [0] fD, [1] dE, [2] eM, [3] mW
  output addq_pkg::icode_t M_icode,
  output addq_pkg::icode_t W_icode,
  output logic            mem_read,
  output logic            mem_write
);
  import addq_pkg::*;

  icode_t D_icode, E_icode;

  pipe_reg #(.T(icode_t), .BUBBLE_VAL(NOP)) u_fD (
    .clk, .rst, .stall(stall[0]), .bubble(bubble[0]), .d(icode_t'(f_icode)), .q(D_icode));
  pipe_reg #(.T(icode_t), .BUBBLE_VAL(NOP)) u_dE (
    .clk, .rst, .stall(stall[1]), .bubble(bubble[1]), .d(D_icode), .q(E_icode));
  pipe_reg #(.T(icode_t), .BUBBLE_VAL(NOP)) u_eM (
    .clk, .rst, .stall(stall[2]), .bubble(bubble[2]), .d(E_icode), .q(M_icode));
  pipe_reg #(.T(icode_t), .BUBBLE_VAL(NOP)) u_mW (
    .clk, .rst, .stall(stall[3]), .bubble(bubble[3]), .d(M_icode), .q(W_icode));

  assign mem_read  = (M_icode == MRMOVQ) || (M_icode == POPQ)  || (M_icode == RET);
  assign mem_write = (M_icode == RMMOVQ) || (M_icode == PUSHQ) || (M_icode == CALL);

endmodule

// fetch_logic: the fetch stage's combinational logic, "split" and "add 2".
//
// split takes the instruction bytes from the instruction memory and pulls
// out the register fields of an addq: rA is bits [15:12] (high nibble of the
// second byte), rB is bits [11:8] (low nibble of the second byte); icode is
// bits [7:4]. add 2 computes the address of the next instruction, pc + 2,
// since every addq is two bytes long. Outputs go to the pP register (p_pc)
// and the fD register (f_rA, f_rB). f_icode is the icode field for the
// memory control pipeline.
module fetch_logic (
  input  addq_pkg::word_t  pc,
  input  logic [79:0]      i10bytes,
  output addq_pkg::word_t  p_pc,
  output addq_pkg::regid_t f_rA,
  output addq_pkg::regid_t f_rB,
  output logic [3:0]       f_icode
);
  import addq_pkg::*;

  assign p_pc    = pc + word_t'(ADDQ_LEN);
  assign f_rA    = i10bytes[15:12];
  assign f_rB    = i10bytes[11:8];
  assign f_icode = i10bytes[7:4];

endmodule

// fwd_unit: operand forwarding (bypass) for one decode-stage operand.
//
// The value an instruction needs is often already computed before it has
// been written to the register file: either on the adder's output in execute
// (e_valE, destination E_dstE) or in the execute-to-writeback register
// (W_valE, destination W_dstE, written at the end of this cycle). For source
// register src the unit picks, in order of age, the youngest of these whose
// destination matches, else the register file's output reg_val. 0xF never
// matches. hit_e / hit_w report which path was taken. Combinational.
module fwd_unit (
  input  addq_pkg::regid_t src,
  input  addq_pkg::word_t  reg_val,
  input  addq_pkg::regid_t E_dstE,
  input  addq_pkg::word_t  e_valE,
  input  addq_pkg::regid_t W_dstE,
  input  addq_pkg::word_t  W_valE,
  output addq_pkg::word_t  val,
  output logic             hit_e,
  output logic             hit_w
);
  import addq_pkg::*;

  always_comb begin
    hit_e = 1'b0;
    hit_w = 1'b0;
    val   = reg_val;
    if (src != REG_NONE && src == E_dstE) begin
      val   = e_valE;
      hit_e = 1'b1;
    end else if (src != REG_NONE && src == W_dstE) begin
      val   = W_valE;
      hit_w = 1'b1;
    end
  end

endmodule

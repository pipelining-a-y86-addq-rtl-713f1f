// exec_add: the execute stage's adder ("ADD").
//
// valE = valA + valB, 64 bits, carry out dropped. Purely combinational; its
// result goes to the eW pipeline register and, when forwarding is enabled,
// back to the decode stage in the same cycle.
module exec_add (
  input  addq_pkg::word_t valA,
  input  addq_pkg::word_t valB,
  output addq_pkg::word_t valE
);
  assign valE = valA + valB;
endmodule

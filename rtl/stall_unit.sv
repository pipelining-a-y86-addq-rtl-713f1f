// stall_unit: data hazard detection for the addq pipeline by stalling.
//
// The instruction in fetch reads registers f_rA and f_rB when it reaches
// decode in the next cycle. Registers are written at the end of writeback,
// so any older instruction still in decode (destination d_dstE) or in
// execute (destination E_dstE) has not yet written its result by then. If
// either source matches either destination (0xF excluded), the unit asks to
// keep the PC (stall_F), so the same instruction is fetched again, and to
// load a no-op into the fetch-to-decode register (bubble_D). An instruction
// that depends on its predecessor therefore waits two cycles, and one that
// depends on the instruction two ahead waits one. An instruction in
// writeback needs no stall: its write lands before the dependent
// instruction's read. Purely combinational; en = 0 turns stalling off (used
// when forwarding resolves the hazards instead).
module stall_unit (
  input  logic             en,
  input  addq_pkg::regid_t f_rA,
  input  addq_pkg::regid_t f_rB,
  input  addq_pkg::regid_t d_dstE,
  input  addq_pkg::regid_t E_dstE,
  output logic             stall_F,
  output logic             bubble_D
);
  import addq_pkg::*;

  function automatic logic dep(regid_t src, regid_t dst);
    return src != REG_NONE && src == dst;
  endfunction

  logic hazard;
  assign hazard = dep(f_rA, d_dstE) || dep(f_rA, E_dstE) ||
                  dep(f_rB, d_dstE) || dep(f_rB, E_dstE);

  assign stall_F  = en && hazard;
  assign bubble_D = en && hazard;

endmodule

// regfile: the Y86-64 register file, 15 registers of 64 bits.
//
// Two combinational read ports (srcA -> valA, srcB -> valB) and two write
// ports (dstE with next R[dstE], dstM with next R[dstM]) that write on the
// rising clock edge. Register number 0xF means "none": reading it returns 0,
// writing it does nothing. A value written at the end of one cycle is read
// in the next cycle; there is no write-to-read bypass inside the register
// file, so the pipeline must stall or forward around it.
// If both write ports name the same register, dstM wins (this design's
// choice; the addq processor ties dstM to 0xF).
// After reset register i holds i * RESET_STEP, so with the default 100
// %r8 = 800 and %r9 = 900, the starting state of the worked examples.
// dbg_src/dbg_val is an extra read port for observing the registers.
module regfile #(
  parameter int unsigned NREGS      = 15,
  parameter longint unsigned RESET_STEP = 100
) (
  input  logic             clk,
  input  logic             rst,
  input  addq_pkg::regid_t srcA,
  input  addq_pkg::regid_t srcB,
  output addq_pkg::word_t  valA,
  output addq_pkg::word_t  valB,
  input  addq_pkg::regid_t dstE,
  input  addq_pkg::word_t  next_valE,
  input  addq_pkg::regid_t dstM,
  input  addq_pkg::word_t  next_valM,
  input  addq_pkg::regid_t dbg_src,
  output addq_pkg::word_t  dbg_val
);
  import addq_pkg::*;

  word_t r [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) r[i] <= word_t'(i) * word_t'(RESET_STEP);
    end else begin
      if (dstE != REG_NONE && 32'(dstE) < NREGS) r[dstE] <= next_valE;
      if (dstM != REG_NONE && 32'(dstM) < NREGS) r[dstM] <= next_valM;
    end
  end

  function automatic word_t rd(regid_t s);
    return (s != REG_NONE && 32'(s) < NREGS) ? r[s] : '0;
  endfunction

  assign valA    = rd(srcA);
  assign valB    = rd(srcB);
  assign dbg_val = rd(dbg_src);

endmodule

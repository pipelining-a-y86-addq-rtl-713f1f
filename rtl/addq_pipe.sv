// addq_pipe: four-stage pipelined processor for the Y86-64 addq instruction.
//
// Every instruction is taken to be "addq rA, rB" (two bytes: 0x60, rA:rB),
// which computes R[rB] <- R[rA] + R[rB]. The work is cut into four stages
// with a bank of pipeline registers in front of each:
//   pP  -> fetch     : read 10 bytes at PC, split out rA/rB, PC + 2
//   fD  -> decode    : read R[rA], R[rB]; destination is rB
//   dE  -> execute   : valE = valA + valB
//   eW  -> writeback : write valE to R[dstE] on the clock edge
// One instruction finishes per cycle once the pipeline is full; each takes
// four cycles from fetch to the end of writeback.
//
// Data hazards (an instruction reading a register that one of the two
// instructions ahead of it has not yet written) are resolved in one of two
// ways, chosen by FORWARD:
//   FORWARD = 0 (default): stalling. stall_unit compares the fetched
//     instruction's sources with the destinations in decode and execute;
//     on a match the PC is held and a no-op (registers 0xF) enters fD.
//   FORWARD = 1: forwarding. Decode takes an operand from the adder output
//     (instruction in execute) or from eW (instruction in writeback) when
//     their destination matches, and never stalls.
// The stalling scheme and its cycle-by-cycle behaviour follow the worked
// examples this design is built from; the forwarding paths (adder output
// and eW value into decode) follow the values those examples point at, and
// their mux arrangement is this design's own.
//
// Interface: ld_* writes program bytes into the instruction memory, dbg_src
// / dbg_val reads any register, and the pipeline registers, the decode
// stage's forwarded operands and the hazard controls are brought out for
// observation. rst is synchronous and active high; it clears the PC to 0,
// fills the pipeline with no-ops and puts i * 100 into register i.
// Two assertions state the control rules: the PC is held exactly when a
// no-op enters fD, and with forwarding the pipeline never stalls.
module addq_pipe #(
  parameter int unsigned    IMEM_BYTES = 256,
  parameter longint unsigned RESET_STEP = 100,
  parameter bit             FORWARD    = 1'b0
) (
  input  logic              clk,
  input  logic              rst,
  // program load
  input  logic              ld_en,
  input  addq_pkg::word_t   ld_addr,
  input  logic [7:0]        ld_data,
  // register observation
  input  addq_pkg::regid_t  dbg_src,
  output addq_pkg::word_t   dbg_val,
  // pipeline observation
  output addq_pkg::pP_t     F_q,
  output addq_pkg::fD_t     D_q,
  output addq_pkg::dE_t     E_q,
  output addq_pkg::eW_t     W_q,
  output addq_pkg::word_t   e_valE,
  output logic              stall_F,
  output logic              bubble_D,
  output logic [1:0]        fwd_e,   // [0] operand A, [1] operand B from execute
  output logic [1:0]        fwd_w    // [0] operand A, [1] operand B from writeback
);
  import addq_pkg::*;

  // ---------------- fetch ----------------
  logic [79:0] i10bytes;
  word_t       p_pc;
  fD_t         f_out;
  logic [3:0]  f_icode;

  pipe_reg #(.T(pP_t), .BUBBLE_VAL(PP_RESET)) u_pP (
    .clk, .rst, .stall(stall_F), .bubble(1'b0), .d('{pc: p_pc}), .q(F_q));

  instr_mem #(.IMEM_BYTES(IMEM_BYTES)) u_imem (
    .clk, .pc(F_q.pc), .i10bytes, .ld_en, .ld_addr, .ld_data);

  fetch_logic u_fetch (
    .pc(F_q.pc), .i10bytes, .p_pc, .f_rA(f_out.rA), .f_rB(f_out.rB), .f_icode);

  pipe_reg #(.T(fD_t), .BUBBLE_VAL(FD_NONE)) u_fD (
    .clk, .rst, .stall(1'b0), .bubble(bubble_D), .d(f_out), .q(D_q));

  // ---------------- decode ----------------
  word_t reg_outputA, reg_outputB;
  dE_t   d_out;

  regfile #(.RESET_STEP(RESET_STEP)) u_rf (
    .clk, .rst,
    .srcA(D_q.rA), .srcB(D_q.rB), .valA(reg_outputA), .valB(reg_outputB),
    .dstE(W_q.dstE), .next_valE(W_q.valE),
    .dstM(REG_NONE), .next_valM('0),
    .dbg_src, .dbg_val);

  word_t fwd_valA, fwd_valB;
  logic  hitA_e, hitA_w, hitB_e, hitB_w;

  fwd_unit u_fwdA (
    .src(D_q.rA), .reg_val(reg_outputA), .E_dstE(E_q.dstE), .e_valE,
    .W_dstE(W_q.dstE), .W_valE(W_q.valE), .val(fwd_valA), .hit_e(hitA_e), .hit_w(hitA_w));
  fwd_unit u_fwdB (
    .src(D_q.rB), .reg_val(reg_outputB), .E_dstE(E_q.dstE), .e_valE,
    .W_dstE(W_q.dstE), .W_valE(W_q.valE), .val(fwd_valB), .hit_e(hitB_e), .hit_w(hitB_w));

  assign d_out.valA = FORWARD ? fwd_valA : reg_outputA;
  assign d_out.valB = FORWARD ? fwd_valB : reg_outputB;
  assign d_out.dstE = D_q.rB;
  assign fwd_e = FORWARD ? {hitB_e, hitA_e} : 2'b00;
  assign fwd_w = FORWARD ? {hitB_w, hitA_w} : 2'b00;

  stall_unit u_stall (
    .en(!FORWARD), .f_rA(f_out.rA), .f_rB(f_out.rB),
    .d_dstE(d_out.dstE), .E_dstE(E_q.dstE), .stall_F, .bubble_D);

  pipe_reg #(.T(dE_t), .BUBBLE_VAL(DE_NONE)) u_dE (
    .clk, .rst, .stall(1'b0), .bubble(1'b0), .d(d_out), .q(E_q));

  // ---------------- execute ----------------
  exec_add u_add (.valA(E_q.valA), .valB(E_q.valB), .valE(e_valE));

  pipe_reg #(.T(eW_t), .BUBBLE_VAL(EW_NONE)) u_eW (
    .clk, .rst, .stall(1'b0), .bubble(1'b0),
    .d('{valE: e_valE, dstE: E_q.dstE}), .q(W_q));

  // ---------------- writeback ----------------
  // the register file's dstE write port is driven straight from eW above

  // ---------------- control rules ----------------
  // a held PC always comes with a no-op in fD, and forwarding never stalls
  a_stall_bubble: assert property (@(posedge clk) disable iff (rst) stall_F == bubble_D);
  if (FORWARD) begin : g_fwd_check
    a_fwd_no_stall: assert property (@(posedge clk) disable iff (rst) !stall_F);
  end

  // f_icode is not used: every instruction is executed as an addq
  logic unused_ok;
  assign unused_ok = ^f_icode;

endmodule

// y86_pipe_top: top level holding the two pieces of pipeline hardware side
// by side.
//
//  * u_addq: the four-stage pipelined addq processor (addq_pipe), with its
//    program-load, register-observation and pipeline-observation ports
//    brought out unchanged (prefix none).
//  * u_mctl + u_dmem: the memory read/write control pipeline of a fuller
//    Y86-64 pipeline, driving a data memory (ports prefixed mem_). The
//    icode enters from the instruction memory of that processor, which is
//    not part of this design, so it is an input here; the memory's address
//    and data input come from that processor's execute stage and register
//    file, also inputs here.
// The two pieces share only the clock and reset. Parameters pass through.
module y86_pipe_top #(
  parameter int unsigned     IMEM_BYTES = 256,
  parameter longint unsigned RESET_STEP = 100,
  parameter bit              FORWARD    = 1'b0,
  parameter int unsigned     DMEM_BYTES = 256
) (
  input  logic              clk,
  input  logic              rst,
  // addq processor
  input  logic              ld_en,
  input  addq_pkg::word_t   ld_addr,
  input  logic [7:0]        ld_data,
  input  addq_pkg::regid_t  dbg_src,
  output addq_pkg::word_t   dbg_val,
  output addq_pkg::pP_t     F_q,
  output addq_pkg::fD_t     D_q,
  output addq_pkg::dE_t     E_q,
  output addq_pkg::eW_t     W_q,
  output addq_pkg::word_t   e_valE,
  output logic              stall_F,
  output logic              bubble_D,
  output logic [1:0]        fwd_e,
  output logic [1:0]        fwd_w,
  // memory read/write control and data memory
  input  logic [3:0]        mem_f_icode,
  input  logic [3:0]        mem_stall,
  input  logic [3:0]        mem_bubble,
  input  addq_pkg::word_t   mem_addr,
  input  addq_pkg::word_t   mem_din,
  output addq_pkg::icode_t  mem_M_icode,
  output addq_pkg::icode_t  mem_W_icode,
  output logic              mem_read,
  output logic              mem_write,
  output addq_pkg::word_t   mem_dout
);

  addq_pipe #(.IMEM_BYTES(IMEM_BYTES), .RESET_STEP(RESET_STEP), .FORWARD(FORWARD)) u_addq (
    .clk, .rst, .ld_en, .ld_addr, .ld_data, .dbg_src, .dbg_val,
    .F_q, .D_q, .E_q, .W_q, .e_valE, .stall_F, .bubble_D, .fwd_e, .fwd_w);

  mem_ctrl_pipe u_mctl (
    .clk, .rst, .f_icode(mem_f_icode), .stall(mem_stall), .bubble(mem_bubble),
    .M_icode(mem_M_icode), .W_icode(mem_W_icode), .mem_read, .mem_write);

  data_mem #(.DMEM_BYTES(DMEM_BYTES)) u_dmem (
    .clk, .addr(mem_addr), .din(mem_din), .rd(mem_read), .wr(mem_write), .dout(mem_dout));

endmodule

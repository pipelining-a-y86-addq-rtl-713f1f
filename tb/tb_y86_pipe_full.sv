// tb_y86_pipe_full: the top level at its default parameters (stalling,
// 256-byte memories), taken through the back-to-back dependency example
// cycle by cycle and through a store / load sequence of the memory control
// pipeline. Counts stalls, no-op insertions, memory reads and writes, held
// and bubbled memory-pipeline registers; each must occur.
module tb_y86_pipe_full;
  import addq_pkg::*;
  localparam int NI = 1;
  localparam bit FWD [NI] = '{1'b0};

  logic clk = 0, rst, ld_en;
  word_t ld_addr, mem_addr, mem_din;
  logic [7:0] ld_data;
  regid_t dbg_src;
  logic [3:0] mem_f_icode;
  logic [3:0] mem_stall, mem_bubble;
  word_t dbg_val [NI], e_valE [NI], mem_dout [NI];
  pP_t F_q [NI]; fD_t D_q [NI]; dE_t E_q [NI]; eW_t W_q [NI];
  logic stall_F [NI], bubble_D [NI], mem_read [NI], mem_write [NI];
  logic [1:0] fwd_e [NI], fwd_w [NI];
  icode_t mem_M_icode [NI], mem_W_icode [NI];
  int checks = 0, failures = 0;

  y86_pipe_top u0 (
    .clk, .rst, .ld_en, .ld_addr, .ld_data, .dbg_src, .dbg_val(dbg_val[0]),
    .F_q(F_q[0]), .D_q(D_q[0]), .E_q(E_q[0]), .W_q(W_q[0]), .e_valE(e_valE[0]),
    .stall_F(stall_F[0]), .bubble_D(bubble_D[0]), .fwd_e(fwd_e[0]), .fwd_w(fwd_w[0]),
    .mem_f_icode, .mem_stall, .mem_bubble, .mem_addr, .mem_din,
    .mem_M_icode(mem_M_icode[0]), .mem_W_icode(mem_W_icode[0]), .mem_read(mem_read[0]), .mem_write(mem_write[0]), .mem_dout(mem_dout[0]));

  always #5 clk = ~clk;

  `include "y86_top_drv.svh"

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < NI; d++) begin n_stall[d] = 0; n_bubble[d] = 0; n_fwd[d] = 0; end
    rst = 1; ld_en = 0; ld_addr = 0; ld_data = 0; dbg_src = 0;
    mem_f_icode = 4'h1; mem_stall = 0; mem_bubble = 0; mem_addr = 0; mem_din = 0;
    step();
    run_addq();
    run_mem();
    $display("stalls=%0d bubbles=%0d mem_reads=%0d mem_writes=%0d mem_holds=%0d mem_bubbles=%0d",
             n_stall[0], n_bubble[0], n_mrd, n_mwr, n_mstall, n_mbub);
    chk("stall seen", int'(n_stall[0] > 0), 1);
    chk("no-op insertion seen", int'(n_bubble[0] > 0), 1);
    chk("memory read seen", int'(n_mrd > 0), 1);
    chk("memory write seen", int'(n_mwr > 0), 1);
    chk("memory pipeline hold seen", int'(n_mstall > 0), 1);
    chk("memory pipeline bubble seen", int'(n_mbub > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

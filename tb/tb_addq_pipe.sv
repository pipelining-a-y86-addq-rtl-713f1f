// tb_addq_pipe: end-to-end test of the pipelined addq processor in both
// hazard modes, side by side: dut 0 stalls (FORWARD = 0), dut 1 forwards
// (FORWARD = 1). Both get the same program and start from the reset state
// R[i] = 100 * i.
//
// Part 1 replays the worked examples cycle by cycle: pipeline register
// contents and PC in every cycle for
//   (a) addq %r8,%r9; addq %r10,%r11; addq %r12,%r13; addq %r9,%r8
//       (no stall needed; one instruction per cycle, four-cycle latency)
//   (b) addq %r8,%r9; addq %r9,%r8; addq %r10,%r11
//       (stalling: PC held twice, two no-ops; forwarding: no stall, the
//       adder output goes straight to decode)
//   (c) addq %r8,%r9; addq %r10,%r11; addq %r9,%r8; addq %r11,%r10
//       (one stall; forwarding from writeback)
//   (d) addq %r8,%r9; addq %r10,%r9 (forwarding into the second operand)
// Part 2 runs random programs and compares every writeback (cycle, register,
// value) with an instruction-set reference model plus a cycle model of the
// hazard rule: with stalling an instruction is fetched no earlier than three
// cycles after an instruction whose result it reads; with forwarding it is
// fetched one cycle after its predecessor. Stalls and forwards are counted
// and each must occur.
module tb_addq_pipe;
  import addq_pkg::*;

  localparam int MAXN = 40;

  logic clk = 0, rst, ld_en;
  word_t ld_addr;
  logic [7:0] ld_data;
  regid_t dbg_src;
  word_t dbg_val [2];
  pP_t F_q [2];
  fD_t D_q [2];
  dE_t E_q [2];
  eW_t W_q [2];
  word_t e_valE [2];
  logic stall_F [2], bubble_D [2];
  logic [1:0] fwd_e [2], fwd_w [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    addq_pipe #(.FORWARD(g == 1)) dut (
      .clk, .rst, .ld_en, .ld_addr, .ld_data, .dbg_src, .dbg_val(dbg_val[g]),
      .F_q(F_q[g]), .D_q(D_q[g]), .E_q(E_q[g]), .W_q(W_q[g]), .e_valE(e_valE[g]),
      .stall_F(stall_F[g]), .bubble_D(bubble_D[g]), .fwd_e(fwd_e[g]), .fwd_w(fwd_w[g]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_fwd_e = 0, n_fwd_w = 0;

  always @(posedge clk) if (!rst && !ld_en) begin
    n_stall += int'(stall_F[0]);
    n_fwd_e += int'(fwd_e[1] != 0);
    n_fwd_w += int'(fwd_w[1] != 0);
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  regid_t pa [MAXN], pb [MAXN];
  int     plen;

  // program bytes; the rest of memory holds "addq 0xF, 0xF", which does nothing
  task automatic load();
    ld_en = 1;
    for (int a = 0; a < 256; a++) begin
      ld_addr = word_t'(a);
      if (a / 2 < plen) ld_data = a[0] ? {pa[a/2], pb[a/2]} : ADDQ_BYTE0;
      else              ld_data = a[0] ? 8'hFF : ADDQ_BYTE0;
      @(posedge clk); #1;
    end
    ld_en = 0;
  endtask

  task automatic do_reset();
    rst = 1; @(posedge clk); #1; rst = 0;   // now in cycle 0
  endtask

  task automatic step();
    @(posedge clk); #1;
  endtask

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // -1 means "don't care"
  task automatic row(int d, int cyc, longint pc, int rA, int rB, longint vA, longint vB,
                     int eDst, longint wV, int wDst, int stl);
    string s;
    s = $sformatf("dut%0d cycle %0d", d, cyc);
    if (pc  >= 0) chk({s, " PC"}, longint'(F_q[d].pc), pc);
    if (rA  >= 0) chk({s, " D.rA"}, int'(D_q[d].rA), rA);
    if (rB  >= 0) chk({s, " D.rB"}, int'(D_q[d].rB), rB);
    if (vA  >= 0) chk({s, " E.valA"}, longint'(E_q[d].valA), vA);
    if (vB  >= 0) chk({s, " E.valB"}, longint'(E_q[d].valB), vB);
    if (eDst >= 0) chk({s, " E.dstE"}, int'(E_q[d].dstE), eDst);
    if (wV  >= 0) chk({s, " W.valE"}, longint'(W_q[d].valE), wV);
    if (wDst >= 0) chk({s, " W.dstE"}, int'(W_q[d].dstE), wDst);
    if (stl >= 0) chk({s, " stall"}, int'(stall_F[d]), stl);
  endtask

  task automatic reg_is(int d, int r, longint v);
    dbg_src = regid_t'(r); #1;
    chk($sformatf("dut%0d R[%0d]", d, r), longint'(dbg_val[d]), v);
  endtask

  // ---------------- random programs ----------------
  word_t  rm [15];
  int     t_f [2][MAXN];    // fetch cycle of each instruction, per mode
  word_t  wv [MAXN];        // value each instruction writes

  task automatic random_run(int n, int span);
    int last;
    plen = n;
    for (int i = 0; i < n; i++) begin
      pa[i] = regid_t'(span == 15 ? $urandom % 15 : 8 + $urandom % span);
      pb[i] = regid_t'(span == 15 ? $urandom % 15 : 8 + $urandom % span);
    end
    // reference: instruction-set semantics
    for (int r = 0; r < 15; r++) rm[r] = word_t'(r * 100);
    for (int i = 0; i < n; i++) begin
      wv[i] = rm[pa[i]] + rm[pb[i]];
      rm[pb[i]] = wv[i];
    end
    // cycle model
    for (int i = 0; i < n; i++) begin
      t_f[1][i] = i;
      t_f[0][i] = (i == 0) ? 0 : t_f[0][i-1] + 1;
      for (int j = (i >= 2 ? i - 2 : 0); j < i; j++)
        if (pb[j] == pa[i] || pb[j] == pb[i])
          if (t_f[0][i] < t_f[0][j] + 3) t_f[0][i] = t_f[0][j] + 3;
    end
    load();
    do_reset();
    last = t_f[0][n-1] + 3;
    for (int c = 0; c <= last; c++) begin
      for (int d = 0; d < 2; d++) begin
        int k;
        k = -1;
        for (int i = 0; i < n; i++) if (t_f[d][i] + 3 == c) k = i;
        if (k >= 0) begin
          chk($sformatf("rand dut%0d cycle %0d W.dstE", d, c), int'(W_q[d].dstE), int'(pb[k]));
          chk($sformatf("rand dut%0d cycle %0d W.valE", d, c), longint'(W_q[d].valE), longint'(wv[k]));
        end else if (d == 0 || c <= t_f[1][n-1] + 3) begin
          chk($sformatf("rand dut%0d cycle %0d W bubble", d, c), int'(W_q[d].dstE), 15);
        end
      end
      step();
    end
    for (int d = 0; d < 2; d++)
      for (int r = 0; r < 15; r++) reg_is(d, r, longint'(rm[r]));
  endtask

  initial begin
    rst = 1; ld_en = 0; ld_addr = 0; ld_data = 0; dbg_src = 0;
    @(posedge clk); #1;

    // (a) no hazard: both modes follow the same timing
    plen = 4;
    pa[0] = 8;  pb[0] = 9;  pa[1] = 10; pb[1] = 11;
    pa[2] = 12; pb[2] = 13; pa[3] = 9;  pb[3] = 8;
    load(); do_reset();
    for (int d = 0; d < 2; d++) row(d, 0, 0, 15, 15, -1, -1, 15, -1, 15, 0);
    step();
    for (int d = 0; d < 2; d++) row(d, 1, 2, 8, 9, -1, -1, 15, -1, 15, 0);
    step();
    for (int d = 0; d < 2; d++) row(d, 2, 4, 10, 11, 800, 900, 9, -1, 15, 0);
    step();
    for (int d = 0; d < 2; d++) row(d, 3, 6, 12, 13, 1000, 1100, 11, 1700, 9, 0);
    step();
    for (int d = 0; d < 2; d++) row(d, 4, -1, 9, 8, 1200, 1300, 13, 2100, 11, 0);
    step();
    for (int d = 0; d < 2; d++) row(d, 5, -1, -1, -1, 1700, 800, 8, 2500, 13, 0);
    step();
    for (int d = 0; d < 2; d++) row(d, 6, -1, -1, -1, -1, -1, -1, 2500, 8, -1);
    step();
    for (int d = 0; d < 2; d++) begin
      reg_is(d, 8, 2500); reg_is(d, 9, 1700); reg_is(d, 11, 2100); reg_is(d, 13, 2500);
    end

    // (b) back-to-back dependency
    plen = 3;
    pa[0] = 8; pb[0] = 9; pa[1] = 9; pb[1] = 8; pa[2] = 10; pb[2] = 11;
    load(); do_reset();
    row(0, 0, 0, 15, 15, -1, -1, 15, -1, 15, 0);
    row(1, 0, 0, 15, 15, -1, -1, 15, -1, 15, 0);
    step();
    row(0, 1, 2, 8, 9, -1, -1, 15, -1, 15, 1);
    row(1, 1, 2, 8, 9, -1, -1, 15, -1, 15, 0);
    step();
    row(0, 2, 2, 15, 15, 800, 900, 9, -1, 15, 1);
    row(1, 2, 4, 9, 8, 800, 900, 9, -1, 15, 0);
    chk("dut1 cycle 2 forward A from execute", int'(fwd_e[1]), 1);
    step();
    row(0, 3, 2, 15, 15, -1, -1, 15, 1700, 9, 0);
    row(1, 3, 6, 10, 11, 1700, 800, 8, 1700, 9, 0);
    step();
    row(0, 4, 4, 9, 8, -1, -1, 15, -1, 15, 0);
    row(1, 4, -1, -1, -1, 1000, 1100, 11, 2500, 8, 0);
    step();
    row(0, 5, -1, 10, 11, 1700, 800, 8, -1, 15, 0);
    row(1, 5, -1, -1, -1, -1, -1, -1, 2100, 11, 0);
    step();
    row(0, 6, -1, -1, -1, 1000, 1100, 11, 2500, 8, 0);
    step(); step();
    for (int d = 0; d < 2; d++) begin
      reg_is(d, 8, 2500); reg_is(d, 9, 1700); reg_is(d, 11, 2100);
    end

    // (c) dependency two instructions apart: one stall / forward from writeback
    plen = 4;
    pa[0] = 8;  pb[0] = 9;  pa[1] = 10; pb[1] = 11;
    pa[2] = 9;  pb[2] = 8;  pa[3] = 11; pb[3] = 10;
    load(); do_reset();
    step(); step();
    row(0, 2, 4, 10, 11, 800, 900, 9, -1, 15, 1);
    step();
    row(0, 3, 4, 15, 15, 1000, 1100, 11, 1700, 9, 0);
    row(1, 3, 6, 9, 8, 1000, 1100, 11, 1700, 9, 0);
    chk("dut1 cycle 3 forward A from writeback", int'(fwd_w[1]), 1);
    step();
    row(0, 4, 6, 9, 8, -1, -1, 15, 2100, 11, 0);
    step();
    row(0, 5, -1, 11, 10, 1700, 800, 8, -1, 15, 0);
    step(); step(); step(); step();
    for (int d = 0; d < 2; d++) begin
      reg_is(d, 8, 2500); reg_is(d, 9, 1700); reg_is(d, 10, 3100); reg_is(d, 11, 2100);
    end

    // (d) forward into the second operand
    plen = 2;
    pa[0] = 8; pb[0] = 9; pa[1] = 10; pb[1] = 9;
    load(); do_reset();
    step(); step();
    chk("dut1 cycle 2 forward B from execute", int'(fwd_e[1]), 2);
    step();
    row(1, 3, -1, -1, -1, 1000, 1700, 9, 1700, 9, 0);
    step(); step(); step(); step(); step();
    for (int d = 0; d < 2; d++) reg_is(d, 9, 2700);

    // Part 2
    for (int k = 0; k < 12; k++) random_run(30, k < 4 ? 2 : k < 8 ? 4 : 15);

    $display("stalls=%0d forwards_from_execute=%0d forwards_from_writeback=%0d", n_stall, n_fwd_e, n_fwd_w);
    chk("stalls seen", int'(n_stall > 0), 1);
    chk("execute forwards seen", int'(n_fwd_e > 0), 1);
    chk("writeback forwards seen", int'(n_fwd_w > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// y86_top_drv.svh: stimulus and checks shared by the two top-level
// testbenches. Included inside a testbench module that declares, for NI
// instances of y86_pipe_top indexed by d, the arrays of observed outputs,
// the shared inputs, and checks/failures counters. FWD[d] says whether
// instance d forwards. Runs:
//   1. the back-to-back dependency example (addq %r8,%r9; addq %r9,%r8;
//      addq %r10,%r11) with its expected pipeline contents per cycle,
//      and the final registers;
//   2. a memory sequence through the memory control pipeline and data
//      memory: rmmovq and pushq write, mrmovq and popq read back three
//      cycles after fetch, with one held and one bubbled register.

  int n_stall [NI], n_bubble [NI], n_fwd [NI];
  int n_mrd = 0, n_mwr = 0, n_mstall = 0, n_mbub = 0;

  always @(posedge clk) if (!rst && !ld_en) begin
    for (int d = 0; d < NI; d++) begin
      n_stall[d]  += int'(stall_F[d]);
      n_bubble[d] += int'(bubble_D[d]);
      n_fwd[d]    += int'(fwd_e[d] != 0 || fwd_w[d] != 0);
    end
    n_mrd    += int'(mem_read[0]);
    n_mwr    += int'(mem_write[0]);
    n_mstall += int'(mem_stall != 0);
    n_mbub   += int'(mem_bubble != 0);
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic step();
    @(posedge clk); #1;
  endtask

  task automatic load3();
    // addq %r8,%r9 ; addq %r9,%r8 ; addq %r10,%r11 ; then do-nothing addq 0xF,0xF
    logic [7:0] prog [6];
    prog = '{8'h60, 8'h89, 8'h60, 8'h98, 8'h60, 8'hAB};
    ld_en = 1;
    for (int a = 0; a < 256; a++) begin
      ld_addr = word_t'(a);
      ld_data = (a < 6) ? prog[a] : (a[0] ? 8'hFF : 8'h60);
      @(posedge clk); #1;
    end
    ld_en = 0;
  endtask

  task automatic exp_row(int d, int c, longint pc, int rA, int rB, longint vA, longint vB, int eD, longint wV, int wD);
    string s;
    s = $sformatf("inst%0d cycle %0d", d, c);
    if (pc >= 0) chk({s, " PC"}, longint'(F_q[d].pc), pc);
    if (rA >= 0) chk({s, " D.rA"}, int'(D_q[d].rA), rA);
    if (rB >= 0) chk({s, " D.rB"}, int'(D_q[d].rB), rB);
    if (vA >= 0) chk({s, " E.valA"}, longint'(E_q[d].valA), vA);
    if (vB >= 0) chk({s, " E.valB"}, longint'(E_q[d].valB), vB);
    if (eD >= 0) chk({s, " E.dstE"}, int'(E_q[d].dstE), eD);
    if (wV >= 0) chk({s, " W.valE"}, longint'(W_q[d].valE), wV);
    if (wD >= 0) chk({s, " W.dstE"}, int'(W_q[d].dstE), wD);
  endtask

  task automatic run_addq();
    load3();
    rst = 1; step(); rst = 0;
    for (int c = 0; c <= 8; c++) begin
      for (int d = 0; d < NI; d++) begin
        if (!FWD[d]) begin
          case (c)
            0: exp_row(d, c, 0, 15, 15, -1, -1, 15, -1, 15);
            1: exp_row(d, c, 2, 8, 9, -1, -1, 15, -1, 15);
            2: exp_row(d, c, 2, 15, 15, 800, 900, 9, -1, 15);
            3: exp_row(d, c, 2, 15, 15, -1, -1, 15, 1700, 9);
            4: exp_row(d, c, 4, 9, 8, -1, -1, 15, -1, 15);
            5: exp_row(d, c, -1, 10, 11, 1700, 800, 8, -1, 15);
            6: exp_row(d, c, -1, -1, -1, 1000, 1100, 11, 2500, 8);
            7: exp_row(d, c, -1, -1, -1, -1, -1, -1, 2100, 11);
            default: ;
          endcase
          chk($sformatf("inst%0d cycle %0d stall", d, c), int'(stall_F[d]), int'(c == 1 || c == 2));
        end else begin
          case (c)
            1: exp_row(d, c, 2, 8, 9, -1, -1, 15, -1, 15);
            2: exp_row(d, c, 4, 9, 8, 800, 900, 9, -1, 15);
            3: exp_row(d, c, 6, 10, 11, 1700, 800, 8, 1700, 9);
            4: exp_row(d, c, -1, -1, -1, 1000, 1100, 11, 2500, 8);
            5: exp_row(d, c, -1, -1, -1, -1, -1, -1, 2100, 11);
            default: ;
          endcase
          chk($sformatf("inst%0d cycle %0d stall", d, c), int'(stall_F[d]), 0);
        end
      end
      step();
    end
    for (int d = 0; d < NI; d++) begin
      dbg_src = 8;  #1; chk($sformatf("inst%0d R[8]", d),  longint'(dbg_val[d]), 2500);
      dbg_src = 9;  #1; chk($sformatf("inst%0d R[9]", d),  longint'(dbg_val[d]), 1700);
      dbg_src = 11; #1; chk($sformatf("inst%0d R[11]", d), longint'(dbg_val[d]), 2100);
      dbg_src = 10; #1; chk($sformatf("inst%0d R[10]", d), longint'(dbg_val[d]), 1000);
    end
  endtask

  task automatic run_mem();
    // icode stream fetched in cycles 0..: rmmovq, pushq, mrmovq, popq, nop, call, ret
    logic [3:0] ic [8];
    ic = '{4'h4, 4'hA, 4'h5, 4'hB, 4'h1, 4'h8, 4'h9, 4'h1};
    mem_stall = 0; mem_bubble = 0; mem_addr = 0; mem_din = 0;
    rst = 1; step(); rst = 0;
    for (int c = 0; c < 14; c++) begin
      mem_f_icode = (c < 8) ? ic[c] : 4'h1;
      // in cycle c the memory stage holds the icode fetched in cycle c-3
      case (c)
        3: begin mem_addr = 64'h10; mem_din = 64'h1122_3344_5566_7788; end  // rmmovq
        4: begin mem_addr = 64'h18; mem_din = 64'h0BAD_F00D_0000_0001; end  // pushq
        5: mem_addr = 64'h10;                                               // mrmovq
        6: mem_addr = 64'h18;                                               // popq
        default: begin mem_addr = 64'h40; mem_din = 0; end
      endcase
      #1;
      for (int d = 0; d < NI; d++) begin
        case (c)
          3: begin chk("rmmovq write", int'(mem_write[d]), 1); chk("rmmovq read", int'(mem_read[d]), 0); end
          4: chk("pushq write", int'(mem_write[d]), 1);
          5: begin chk("mrmovq read", int'(mem_read[d]), 1);
                   chk("mrmovq data", longint'(mem_dout[d]), 64'h1122_3344_5566_7788); end
          6: begin chk("popq read", int'(mem_read[d]), 1);
                   chk("popq data", longint'(mem_dout[d]), 64'h0BAD_F00D_0000_0001); end
          7: chk("nop no access", int'(mem_read[d] || mem_write[d]), 0);
          8: chk("call write", int'(mem_write[d]), 1);
          9: begin chk("ret read", int'(mem_read[d]), 1); chk("call in mW", int'(mem_W_icode[d]), 8); end
          default: ;
        endcase
      end
      step();
    end
    // hold and bubble: a mrmovq held one cycle in dE, then a bubble in fD
    rst = 1; step(); rst = 0;
    mem_f_icode = 4'h5; step();          // mrmovq in fD
    mem_f_icode = 4'h4; step();          // mrmovq in dE, rmmovq in fD
    mem_stall = 4'b0011; mem_f_icode = 4'h1;
    step();                              // fD and dE held; eM loads the mrmovq from dE
    mem_stall = 0;
    for (int d = 0; d < NI; d++) chk("held mrmovq reaches eM", int'(mem_M_icode[d]), 5);
    mem_bubble = 4'b0010;
    step();                              // dE bubbled; eM loads the held mrmovq again
    mem_bubble = 0;
    for (int d = 0; d < NI; d++) chk("mrmovq again in eM after hold", int'(mem_M_icode[d]), 5);
    step();
    for (int d = 0; d < NI; d++) begin
      chk("bubble reaches eM as nop", int'(mem_M_icode[d]), 1);
      chk("held mrmovq in mW", int'(mem_W_icode[d]), 5);
    end
  endtask

// tb_fetch_logic: random instruction bytes and PCs; checks pc+2 and the
// rA/rB/icode fields against the byte layout of "addq rA, rB" (0x60, rA:rB),
// including the two worked instructions addq %r8,%r9 and addq %r10,%r11.
module tb_fetch_logic;
  import addq_pkg::*;
  word_t pc, p_pc;
  logic [79:0] i10bytes;
  regid_t f_rA, f_rB;
  logic [3:0] f_icode;
  int checks = 0, failures = 0;

  fetch_logic dut (.pc, .i10bytes, .p_pc, .f_rA, .f_rB, .f_icode);

  task automatic check(word_t epc, regid_t ea, regid_t eb, logic [3:0] ei);
    checks++;
    if (p_pc !== epc || f_rA !== ea || f_rB !== eb || f_icode !== ei) begin
      failures++;
      $display("pc=%h bytes=%h: got p_pc=%h rA=%h rB=%h icode=%h", pc, i10bytes, p_pc, f_rA, f_rB, f_icode);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc = 0; i10bytes = {64'h0, 8'h89, ADDQ_BYTE0}; #1;
    check(64'h2, 4'h8, 4'h9, 4'h6);
    pc = 2; i10bytes = {64'h0, 8'hAB, ADDQ_BYTE0}; #1;
    check(64'h4, 4'hA, 4'hB, 4'h6);
    for (int i = 0; i < 300; i++) begin
      logic [7:0] b0, b1;
      b0 = 8'($urandom); b1 = 8'($urandom);
      pc = {32'($urandom), 32'($urandom)};
      i10bytes = {32'($urandom), 32'($urandom), b1, b0};
      i10bytes[79:64] = 16'($urandom);
      #1;
      check(pc + 64'd2, b1[7:4], b1[3:0], b0[7:4]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

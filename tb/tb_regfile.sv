// tb_regfile: checks reset contents (i*100), reads of 0xF, writes through
// both ports, that 0xF writes do nothing, dstM priority, and that a value
// written on an edge is visible only after that edge (no bypass). A
// testbench array models the registers; random traffic is compared with it.
module tb_regfile;
  import addq_pkg::*;
  logic clk = 0, rst;
  regid_t srcA, srcB, dstE, dstM, dbg_src;
  word_t valA, valB, next_valE, next_valM, dbg_val;
  word_t model [15];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst, .srcA, .srcB, .valA, .valB, .dstE, .next_valE,
               .dstM, .next_valM, .dbg_src, .dbg_val);

  always #5 clk = ~clk;

  function automatic word_t mread(regid_t s);
    return (s == REG_NONE) ? '0 : model[s];
  endfunction

  task automatic check_reads();
    #1;
    checks++;
    if (valA !== mread(srcA) || valB !== mread(srcB) || dbg_val !== mread(dbg_src)) begin
      failures++;
      $display("read mismatch srcA=%h %0d/%0d srcB=%h %0d/%0d", srcA, valA, mread(srcA), srcB, valB, mread(srcB));
    end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; dstE = REG_NONE; dstM = REG_NONE; next_valE = 0; next_valM = 0;
    srcA = 0; srcB = 0; dbg_src = 0;
    @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 15; i++) model[i] = word_t'(i * 100);
    for (int i = 0; i < 16; i++) begin
      srcA = regid_t'(i); srcB = regid_t'(15 - i); dbg_src = regid_t'(i);
      check_reads();
    end
    checks++; srcA = 8; srcB = 9; #1;
    if (valA !== 800 || valB !== 900) begin failures++; $display("r8/r9 not 800/900"); end
    // write r9 <- 1700; visible only after the edge
    dstE = 9; next_valE = 1700; srcA = 9; #1;
    checks++; if (valA !== 900) begin failures++; $display("bypass seen before edge"); end
    @(posedge clk); #1; model[9] = 1700; dstE = REG_NONE; check_reads();
    // both ports same register: dstM wins
    dstE = 3; next_valE = 11; dstM = 3; next_valM = 22; srcA = 3;
    @(posedge clk); #1; model[3] = 22; dstE = REG_NONE; dstM = REG_NONE; check_reads();
    // random traffic
    for (int i = 0; i < 1000; i++) begin
      dstE = regid_t'($urandom); dstM = regid_t'($urandom);
      next_valE = {32'($urandom), 32'($urandom)}; next_valM = {32'($urandom), 32'($urandom)};
      srcA = regid_t'($urandom); srcB = regid_t'($urandom); dbg_src = regid_t'($urandom);
      check_reads();
      @(posedge clk); #1;
      if (dstE != REG_NONE) model[dstE] = next_valE;
      if (dstM != REG_NONE) model[dstM] = next_valM;
      dstE = REG_NONE; dstM = REG_NONE;
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mem_ctrl_pipe: random icode stream with random stall and bubble
// controls; a three-entry shift model predicts M_icode, and the read and
// write enables are checked against the Y86-64 rule (read: mrmovq, popq,
// ret; write: rmmovq, pushq, call) and W_icode against the fourth model
// entry. Also checks NOP after reset and the three-cycle latency from fetch
// to the memory stage.
module tb_mem_ctrl_pipe;
  import addq_pkg::*;
  logic clk = 0, rst, mem_read, mem_write;
  logic [3:0] f_icode;
  logic [3:0] stall, bubble;
  icode_t M_icode, W_icode;
  logic [3:0] m [4];
  int checks = 0, failures = 0, reads = 0, writes = 0;

  mem_ctrl_pipe dut (.clk, .rst, .f_icode, .stall, .bubble, .M_icode, .W_icode, .mem_read, .mem_write);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic er, ew;
    er = m[2] == 4'h5 || m[2] == 4'hB || m[2] == 4'h9;
    ew = m[2] == 4'h4 || m[2] == 4'hA || m[2] == 4'h8;
    checks++;
    if (M_icode !== icode_t'(m[2]) || W_icode !== icode_t'(m[3]) || mem_read !== er || mem_write !== ew) begin
      failures++;
      $display("W_icode=%h exp %h M_icode=%h exp %h read=%b/%b write=%b/%b", W_icode, m[3], M_icode, m[2], mem_read, er, mem_write, ew);
    end
    reads += int'(mem_read); writes += int'(mem_write);
  endtask

  initial begin
    rst = 1; f_icode = 0; stall = 0; bubble = 0;
    @(posedge clk); #1; rst = 0;
    m[0] = 1; m[1] = 1; m[2] = 1; m[3] = 1;
    check();
    // latency: mrmovq fetched now is in the memory stage three edges later
    f_icode = 4'h5;
    @(posedge clk); #1; f_icode = 4'h1;
    @(posedge clk); #1;
    checks++; if (mem_read) begin failures++; $display("read too early"); end
    @(posedge clk); #1;
    checks++; if (!mem_read || M_icode != MRMOVQ) begin failures++; $display("read not after 3 cycles"); end
    @(posedge clk); #1;
    checks++; if (W_icode != MRMOVQ || mem_read) begin failures++; $display("mrmovq not in writeback after 4 cycles"); end
    rst = 1; @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 600; i++) begin
      f_icode = 4'($urandom % 12);
      stall = 4'($urandom) & 4'($urandom) & 4'($urandom);
      bubble = 4'($urandom) & 4'($urandom);
      @(posedge clk);
      if (!stall[3]) m[3] = bubble[3] ? 4'h1 : m[2];
      if (!stall[2]) m[2] = bubble[2] ? 4'h1 : m[1];
      if (!stall[1]) m[1] = bubble[1] ? 4'h1 : m[0];
      if (!stall[0]) m[0] = bubble[0] ? 4'h1 : f_icode;
      #1;
      check();
    end
    checks++; if (reads == 0 || writes == 0) begin failures++; $display("no read or no write seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

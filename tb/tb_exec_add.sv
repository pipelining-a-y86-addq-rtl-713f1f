// tb_exec_add: worked sums from the examples (800+900, 1000+1100,
// 1700+800) and random 64-bit operands, including wrap-around.
module tb_exec_add;
  import addq_pkg::*;
  word_t valA, valB, valE;
  int checks = 0, failures = 0;

  exec_add dut (.valA, .valB, .valE);

  task automatic check(word_t a, word_t b, word_t e);
    valA = a; valB = b; #1;
    checks++;
    if (valE !== e) begin failures++; $display("%h + %h = %h, expected %h", a, b, valE, e); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(800, 900, 1700);
    check(1000, 1100, 2100);
    check(1700, 800, 2500);
    check('1, 1, 0);
    for (int i = 0; i < 500; i++) begin
      word_t a, b;
      longint unsigned s;
      a = {32'($urandom), 32'($urandom)}; b = {32'($urandom), 32'($urandom)};
      s = longint'(a) + longint'(b);
      check(a, b, word_t'(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

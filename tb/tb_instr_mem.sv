// tb_instr_mem: loads random bytes into a 64-byte instr_mem and checks the
// 10-byte window at every address (including windows running past the end,
// which must read zeros) against a copy kept by the testbench.
module tb_instr_mem;
  import addq_pkg::*;
  localparam int N = 64;
  logic clk = 0, ld_en;
  word_t pc, ld_addr;
  logic [7:0] ld_data;
  logic [79:0] i10bytes, exp10;
  logic [7:0] ref_mem [N];
  int checks = 0, failures = 0;

  instr_mem #(.IMEM_BYTES(N)) dut (.clk, .pc, .i10bytes, .ld_en, .ld_addr, .ld_data);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_en = 0; pc = 0; ld_addr = 0; ld_data = 0;
    for (int a = 0; a < N; a++) begin
      ref_mem[a] = 8'($urandom);
      ld_en = 1; ld_addr = word_t'(a); ld_data = ref_mem[a];
      @(posedge clk); #1;
    end
    // out-of-range write must be ignored
    ld_addr = word_t'(N); ld_data = 8'hAA; @(posedge clk); #1;
    ld_en = 0;
    for (int a = 0; a < N + 4; a++) begin
      pc = word_t'(a); #1;
      for (int k = 0; k < 10; k++) exp10[8*k +: 8] = (a + k < N) ? ref_mem[a+k] : 8'h00;
      checks++;
      if (i10bytes !== exp10) begin
        failures++; $display("pc=%0d got %h expected %h", a, i10bytes, exp10);
      end
    end
    // very large address
    pc = 64'h0000_0001_0000_0000; #1;
    checks++; if (i10bytes !== '0) begin failures++; $display("high address not zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

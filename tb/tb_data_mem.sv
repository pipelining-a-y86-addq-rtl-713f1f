// tb_data_mem: random 64-bit writes and reads at unaligned addresses,
// including accesses that run past the end, against a byte array model;
// dout must be 0 when rd is low.
module tb_data_mem;
  import addq_pkg::*;
  localparam int N = 64;
  logic clk = 0, rd, wr;
  word_t addr, din, dout, exp;
  logic [7:0] model [N];
  int checks = 0, failures = 0;

  data_mem #(.DMEM_BYTES(N)) dut (.clk, .addr, .din, .rd, .wr, .dout);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd = 0; wr = 0; addr = 0; din = 0;
    for (int a = 0; a < N; a += 8) begin
      addr = word_t'(a); din = {32'($urandom), 32'($urandom)}; wr = 1;
      for (int k = 0; k < 8; k++) model[a+k] = din[8*k +: 8];
      @(posedge clk); #1;
    end
    wr = 0;
    for (int i = 0; i < 600; i++) begin
      addr = word_t'($urandom % (N + 4));
      din  = {32'($urandom), 32'($urandom)};
      rd = $urandom % 2; wr = ($urandom % 3) == 0;
      #1;
      exp = '0;
      if (rd) for (int k = 0; k < 8; k++) if (addr + k < N) exp[8*k +: 8] = model[addr + k];
      checks++;
      if (dout !== exp) begin failures++; $display("addr=%0d rd=%b dout=%h exp=%h", addr, rd, dout, exp); end
      @(posedge clk);
      if (wr) for (int k = 0; k < 8; k++) if (addr + k < N) model[addr + k] = din[8*k +: 8];
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

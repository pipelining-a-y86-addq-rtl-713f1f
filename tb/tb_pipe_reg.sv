// tb_pipe_reg: self-checking test of pipe_reg with a 12-bit type and a
// non-zero bubble value. Random d/stall/bubble/rst each cycle; a reference
// register in the testbench predicts q (reset and bubble load BUBBLE_VAL,
// stall holds, stall beats bubble).
module tb_pipe_reg;
  typedef logic [11:0] t12;
  localparam t12 BV = 12'hF3C;

  logic clk = 0, rst, stall, bubble;
  t12   d, q, model;
  int   checks = 0, failures = 0;

  pipe_reg #(.T(t12), .BUBBLE_VAL(BV)) dut (.clk, .rst, .stall, .bubble, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; stall = 0; bubble = 0; d = '0;
    @(posedge clk); #1;
    model = BV;
    checks++; if (q !== BV) begin failures++; $display("reset value %h", q); end
    rst = 0;
    for (int i = 0; i < 500; i++) begin
      d      = t12'($urandom);
      stall  = ($urandom % 4) == 0;
      bubble = ($urandom % 4) == 0;
      rst    = ($urandom % 50) == 0;
      @(posedge clk);
      if (rst) model = BV;
      else if (stall) model = model;
      else if (bubble) model = BV;
      else model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("cycle %0d: q=%h expected %h (rst=%b stall=%b bubble=%b)", i, q, model, rst, stall, bubble);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

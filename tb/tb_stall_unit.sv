// tb_stall_unit: exhaustive over all 4-bit source and destination numbers
// with en = 0 and 1. Expected: stall and bubble together exactly when en is
// set and a source other than 0xF equals the decode or execute destination.
module tb_stall_unit;
  import addq_pkg::*;
  logic en, stall_F, bubble_D;
  regid_t f_rA, f_rB, d_dstE, E_dstE;
  int checks = 0, failures = 0;

  stall_unit dut (.en, .f_rA, .f_rB, .d_dstE, .E_dstE, .stall_F, .bubble_D);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 16; a++)
        for (int b = 0; b < 16; b++)
          for (int dd = 0; dd < 16; dd++)
            for (int ee = 0; ee < 16; ee++) begin
              logic exp;
              en = e[0]; f_rA = regid_t'(a); f_rB = regid_t'(b);
              d_dstE = regid_t'(dd); E_dstE = regid_t'(ee);
              #1;
              exp = e[0] && ((a != 15 && (a == dd || a == ee)) || (b != 15 && (b == dd || b == ee)));
              checks++;
              if (stall_F !== exp || bubble_D !== exp) begin
                failures++;
                if (failures < 10) $display("en=%0d rA=%h rB=%h d=%h E=%h: stall=%b bubble=%b", e, a, b, dd, ee, stall_F, bubble_D);
              end
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fwd_unit: random register numbers drawn from a small set so matches
// are frequent; expected value: execute result if the source matches the
// execute destination, else writeback value on a writeback match, else the
// register file value; 0xF never matches.
module tb_fwd_unit;
  import addq_pkg::*;
  regid_t src, E_dstE, W_dstE;
  word_t reg_val, e_valE, W_valE, val;
  logic hit_e, hit_w;
  int checks = 0, failures = 0;

  fwd_unit dut (.src, .reg_val, .E_dstE, .e_valE, .W_dstE, .W_valE, .val, .hit_e, .hit_w);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      word_t ev; logic he, hw;
      src    = ($urandom % 4 == 0) ? REG_NONE : regid_t'(8 + $urandom % 3);
      E_dstE = ($urandom % 4 == 0) ? REG_NONE : regid_t'(8 + $urandom % 3);
      W_dstE = ($urandom % 4 == 0) ? REG_NONE : regid_t'(8 + $urandom % 3);
      reg_val = word_t'($urandom); e_valE = word_t'($urandom) + 64'h1_0000_0000; W_valE = word_t'($urandom) + 64'h2_0000_0000;
      #1;
      he = (src != REG_NONE) && (src == E_dstE);
      hw = !he && (src != REG_NONE) && (src == W_dstE);
      ev = he ? e_valE : hw ? W_valE : reg_val;
      checks++;
      if (val !== ev || hit_e !== he || hit_w !== hw) begin
        failures++;
        $display("src=%h E=%h W=%h: val=%h exp %h", src, E_dstE, W_dstE, val, ev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

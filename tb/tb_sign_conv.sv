// tb_sign_conv: checks the sign conversion of 17-bit coefficients. For a
// positive word the magnitude is its low 16 bits; for a negative word it is
// 65535 minus the low 16 bits (ones' complement), worked out arithmetically.
module tb_sign_conv;
  import rrc_pkg::*;
  coef_t         h;
  logic [MW-1:0] hm;
  logic          neg;
  int checks = 0, failures = 0;

  sign_conv dut (.h, .hm, .neg);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp_m;
    for (int n = 0; n < 2000; n++) begin
      h = coef_t'($urandom);
      if (n == 0) h = 17'h00000;
      if (n == 1) h = 17'h1FFFF;
      if (n == 2) h = 17'h10000;
      #1;
      exp_m = h[16] ? 65535 - int'(h[15:0]) : int'(h[15:0]);
      checks++;
      if (hm !== 16'(exp_m) || neg !== h[16]) begin
        failures++;
        if (failures < 10) $display("h=%h hm=%h exp=%h neg=%b", h, hm, exp_m, neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

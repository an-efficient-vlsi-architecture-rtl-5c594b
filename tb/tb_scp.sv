// tb_scp: checks the second coding pass with random first-pass words: for
// each INTP_SEL value, h[k][p] must be C_L[k*L+p] for p < L and zero above.
module tb_scp;
  import rrc_pkg::*;
  coef_t      c4 [4*TAPS];
  coef_t      c6 [6*TAPS];
  coef_t      c8 [8*TAPS];
  logic [1:0] intp_sel;
  coef_t      h  [TAPS][LMAX];
  int checks = 0, failures = 0;

  scp dut (.c4, .c6, .c8, .intp_sel, .h);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    coef_t e;
    int l;
    for (int n = 0; n < 40; n++) begin
      foreach (c4[i]) c4[i] = coef_t'($urandom);
      foreach (c6[i]) c6[i] = coef_t'($urandom);
      foreach (c8[i]) c8[i] = coef_t'($urandom);
      intp_sel = 2'(n % 4);
      l = (intp_sel == 2'b00) ? 4 : (intp_sel == 2'b01) ? 6 : 8;
      #1;
      for (int k = 0; k < TAPS; k++)
        for (int p = 0; p < LMAX; p++) begin
          if (p >= l)      e = '0;
          else if (l == 4) e = c4[k*4 + p];
          else if (l == 6) e = c6[k*6 + p];
          else             e = c8[k*8 + p];
          checks++;
          if (h[k][p] != e) begin
            failures++;
            if (failures < 10) $display("L=%0d h[%0d][%0d]=%h exp=%h", l, k, p, h[k][p], e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

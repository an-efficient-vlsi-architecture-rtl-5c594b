// tb_cg: checks the coefficient generator end to end. For random delay-line
// contents and every FLT_SEL / INTP_SEL combination, each product must match
// x[k] * h / 2^16, with h decoded from the coefficient tables (ones'
// complement) and the exact product truncated toward zero: same sign and a
// magnitude at most 4 LSB smaller.
module tb_cg;
  import rrc_pkg::*;
  sample_t    x    [TAPS];
  logic       flt_sel;
  logic [1:0] intp_sel;
  sample_t    prod [TAPS][LMAX];
  int checks = 0, failures = 0;

  cg dut (.x, .flt_sel, .intp_sel, .prod);

  function automatic longint coef_val(coef_t c);
    logic [15:0] m;
    m = c[16] ? ~c[15:0] : c[15:0];
    return c[16] ? -longint'(m) : longint'(m);
  endfunction

  function automatic coef_t table_word(int l, logic f, int i);
    case (l)
      4:       return f ? H4_35[i] : H4_22[i];
      6:       return f ? H6_35[i] : H6_22[i];
      default: return f ? H8_35[i] : H8_22[i];
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e, hv, d, got;
    int l;
    for (int n = 0; n < 60; n++) begin
      foreach (x[k]) x[k] = sample_t'($urandom);
      if (n == 0) foreach (x[k]) x[k] = 16'sh8000;
      if (n == 1) foreach (x[k]) x[k] = 16'sh7FFF;
      flt_sel  = 1'(n % 2);
      intp_sel = 2'((n / 2) % 3);
      l = (intp_sel == 2'b00) ? 4 : (intp_sel == 2'b01) ? 6 : 8;
      #1;
      for (int k = 0; k < TAPS; k++)
        for (int p = 0; p < LMAX; p++) begin
          hv  = (p < l) ? coef_val(table_word(l, flt_sel, k*l + p)) : 0;
          e   = (longint'(x[k]) * hv) / 65536;      // truncates toward zero
          got = longint'(prod[k][p]);
          d   = (e >= 0) ? e - got : got - e;
          checks++;
          if (d < 0 || d > 4 || (got != 0 && ((got < 0) != (e < 0)))) begin
            failures++;
            if (failures < 10) $display("L=%0d f=%b k=%0d p=%0d x=%0d h=%0d prod=%0d exact=%0d",
                                        l, flt_sel, k, p, x[k], hv, got, e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

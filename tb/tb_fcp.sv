// tb_fcp: checks the first coding pass. For both FLT_SEL values every output
// word must equal the chosen set's word, and every set must be symmetric
// (linear phase), h[i] = h[N-1-i]; the two roll-offs must differ.
module tb_fcp;
  import rrc_pkg::*;
  logic  flt_sel;
  coef_t c4 [4*TAPS];
  coef_t c6 [6*TAPS];
  coef_t c8 [8*TAPS];
  int checks = 0, failures = 0;

  fcp dut (.flt_sel, .c4, .c6, .c8);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("fail: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    coef_t s4 [4*TAPS];
    int ndiff;
    for (int f = 0; f < 2; f++) begin
      flt_sel = 1'(f);
      #1;
      for (int i = 0; i < 4*TAPS; i++) begin
        chk(c4[i] == (f ? H4_35[i] : H4_22[i]), $sformatf("c4[%0d] f=%0d", i, f));
        chk(c4[i] == c4[4*TAPS-1-i], $sformatf("c4 symmetry %0d", i));
      end
      for (int i = 0; i < 6*TAPS; i++) begin
        chk(c6[i] == (f ? H6_35[i] : H6_22[i]), $sformatf("c6[%0d] f=%0d", i, f));
        chk(c6[i] == c6[6*TAPS-1-i], $sformatf("c6 symmetry %0d", i));
      end
      for (int i = 0; i < 8*TAPS; i++) begin
        chk(c8[i] == (f ? H8_35[i] : H8_22[i]), $sformatf("c8[%0d] f=%0d", i, f));
        chk(c8[i] == c8[8*TAPS-1-i], $sformatf("c8 symmetry %0d", i));
      end
      if (f == 0) s4 = c4;
    end
    ndiff = 0;
    for (int i = 0; i < 4*TAPS; i++) if (s4[i] != c4[i]) ndiff++;
    chk(ndiff > 0, "FLT_SEL changes nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

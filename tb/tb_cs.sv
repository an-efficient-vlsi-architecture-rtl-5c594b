// tb_cs: checks the coefficient selector. With random products and valid
// bits and the real phase counters, PEOUT[k] one clock after a cycle must be
// the product of tap k for that cycle's phase (counter value), or zero when
// the tap is not valid, for each interpolation factor.
module tb_cs;
  import rrc_pkg::*;
  logic            clk = 1'b0, rst;
  sample_t         prod  [TAPS][LMAX];
  logic [TAPS-1:0] sftout;
  logic [1:0]      cnt4;
  logic [2:0]      cnt6, cnt8;
  logic            ce4, ce6, ce8;
  logic [1:0]      intp_sel;
  sample_t         peout [TAPS];
  int checks = 0, failures = 0;

  rate_gen u_rate (.clk, .rst, .cnt4, .cnt6, .cnt8, .ce4, .ce6, .ce8);
  cs dut (.clk, .rst, .prod, .sftout, .cnt4, .cnt6, .cnt8, .intp_sel, .peout);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample_t e [TAPS];
    int l, ph;
    rst = 1'b1;
    intp_sel = INTP_L4;
    sftout = '0;
    foreach (prod[k, p]) prod[k][p] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    ph = 0;                                   // counters are 0 after reset
    for (int t = 0; t < 600; t++) begin
      if (t % 200 == 0) intp_sel = 2'(t / 200);
      l = (intp_sel == 2'b00) ? 4 : (intp_sel == 2'b01) ? 6 : 8;
      foreach (prod[k, p]) prod[k][p] = sample_t'($urandom);
      sftout = TAPS'($urandom);
      #1;
      for (int k = 0; k < TAPS; k++) e[k] = sftout[k] ? prod[k][t % l] : '0;
      @(posedge clk); #1;
      for (int k = 0; k < TAPS; k++) begin
        checks++;
        if (peout[k] != e[k]) begin
          failures++;
          if (failures < 10) $display("t=%0d L=%0d k=%0d peout=%0d exp=%0d", t, l, k, peout[k], e[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fa: checks the final accumulation unit. RRCOUT one clock after PEOUT
// must be the integer sum of the seven PEOUT values, clipped to the 16-bit
// range. Large same-sign inputs make the clipping happen in both directions.
module tb_fa;
  import rrc_pkg::*;
  logic    clk = 1'b0, rst;
  sample_t peout [TAPS];
  sample_t rrcout;
  int checks = 0, failures = 0;
  int nsat_hi = 0, nsat_lo = 0;

  fa dut (.clk, .rst, .peout, .rrcout);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    rst = 1'b1;
    foreach (peout[k]) peout[k] = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (rrcout != 0) begin failures++; $display("not reset"); end
    rst = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      e = 0;
      foreach (peout[k]) begin
        case (t % 4)
          0:       peout[k] = sample_t'($urandom_range(0, 9000));
          1:       peout[k] = -sample_t'($urandom_range(0, 9000));
          default: peout[k] = sample_t'($urandom_range(0, 9000) - 4500);
        endcase
        e += int'(peout[k]);
      end
      if (e > 32767)  begin e = 32767;  nsat_hi++; end
      if (e < -32768) begin e = -32768; nsat_lo++; end
      @(posedge clk); #1;
      checks++;
      if (int'(rrcout) != e) begin
        failures++;
        if (failures < 10) $display("t=%0d rrcout=%0d exp=%0d", t, rrcout, e);
      end
    end
    checks++;
    if (nsat_hi == 0 || nsat_lo == 0) begin failures++; $display("clipping not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

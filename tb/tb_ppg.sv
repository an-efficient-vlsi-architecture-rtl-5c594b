// tb_ppg: checks the partial product generator: Pi = floor(1.5*Xin / 4^(8-i)),
// computed arithmetically, for random and corner inputs.
module tb_ppg;
  logic [15:0] xin;
  logic [16:0] p [1:8];
  int checks = 0, failures = 0;

  ppg dut (.xin, .p);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    for (int n = 0; n < 2000; n++) begin
      xin = 16'($urandom);
      if (n == 0) xin = 16'hFFFF;
      if (n == 1) xin = 16'h0000;
      if (n == 2) xin = 16'h8000;
      #1;
      for (int i = 1; i <= 8; i++) begin
        e = (longint'(xin) * 3 / 2) / (longint'(1) << (2 * (8 - i)));
        checks++;
        if (longint'(p[i]) != e) begin
          failures++;
          if (failures < 10) $display("xin=%0d P%0d=%0d exp=%0d", xin, i, p[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

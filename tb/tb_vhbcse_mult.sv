// tb_vhbcse_mult: checks the VHBCSE multiplier against the exact product.
// Every partial product is truncated downwards, so the result must lie
// between floor(Xin*Hm/2^16) - 4 and floor(Xin*Hm/2^16). Coefficients are
// biased to repeat nibbles and bytes so that each of the controlled
// additions (C1..C7) is exercised; the test counts how often each fired.
module tb_vhbcse_mult;
  logic [15:0] xin, hm, cf;
  int checks = 0, failures = 0;
  int fired [1:7];

  vhbcse_mult dut (.xin, .hm, .cf);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    int n3, n2, n1, n0, worst;
    worst = 0;
    for (int i = 1; i <= 7; i++) fired[i] = 0;
    for (int n = 0; n < 20000; n++) begin
      n3 = $urandom_range(0, 15);
      n2 = ($urandom_range(0, 2) == 0) ? n3 : $urandom_range(0, 15);
      n1 = ($urandom_range(0, 2) == 0) ? n3 : ($urandom_range(0, 1) ? n2 : $urandom_range(0, 15));
      n0 = ($urandom_range(0, 2) == 0) ? n2 : ($urandom_range(0, 1) ? n1 : $urandom_range(0, 15));
      hm  = 16'(n3 * 4096 + n2 * 256 + n1 * 16 + n0);
      xin = 16'($urandom_range(0, 32768));
      if (n == 0) begin hm = 16'hFFFF; xin = 16'h8000; end
      if (n == 1) begin hm = 16'h0000; xin = 16'h7FFF; end
      if (n == 2) begin hm = 16'h8000; xin = 16'h1234; end
      #1;
      if (n3 == n2) fired[1]++;
      if (n3 == n1) fired[2]++;
      if (n2 == n1) fired[3]++;
      if (n3 == n0) fired[4]++;
      if (n2 == n0) fired[5]++;
      if (n1 == n0) fired[6]++;
      if (n3 == n1 && n2 == n0) fired[7]++;
      e = (longint'(xin) * longint'(hm)) >> 16;
      if (e - longint'(cf) > worst) worst = int'(e - longint'(cf));
      checks++;
      if (longint'(cf) > e || e - longint'(cf) > 4) begin
        failures++;
        if (failures < 10) $display("xin=%0d hm=%h cf=%0d exact=%0d", xin, hm, cf, e);
      end
    end
    // a power-of-two coefficient is exact: Xin * 2^-1
    hm = 16'h8000; xin = 16'd30000; #1;
    checks++; if (cf != 16'd15000) begin failures++; $display("0x8000 * 30000 = %0d", cf); end
    for (int i = 1; i <= 7; i++) begin
      checks++;
      if (fired[i] == 0) begin failures++; $display("C%0d never exercised", i); end
    end
    $display("largest truncation seen: %0d LSB", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

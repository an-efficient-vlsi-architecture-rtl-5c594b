// tb_cl_gen: checks the seven equality controls against nibble values taken
// arithmetically from Hm. Random words are biased to repeat nibbles so that
// every control is seen both set and clear.
module tb_cl_gen;
  logic [15:0] hm;
  logic [7:1]  c;
  int checks = 0, failures = 0;
  int seen [1:7];

  cl_gen dut (.hm, .c);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n3, n2, n1, n0;
    logic [7:1] e;
    for (int i = 1; i <= 7; i++) seen[i] = 0;
    for (int n = 0; n < 4000; n++) begin
      n3 = $urandom_range(0, 15);
      n2 = ($urandom_range(0, 2) == 0) ? n3 : $urandom_range(0, 15);
      n1 = ($urandom_range(0, 2) == 0) ? n3 : ($urandom_range(0, 1) ? n2 : $urandom_range(0, 15));
      n0 = ($urandom_range(0, 2) == 0) ? n2 : ($urandom_range(0, 1) ? n1 : $urandom_range(0, 15));
      hm = 16'(n3 * 4096 + n2 * 256 + n1 * 16 + n0);
      #1;
      e[1] = (n3 == n2); e[2] = (n3 == n1); e[3] = (n2 == n1);
      e[4] = (n3 == n0); e[5] = (n2 == n0); e[6] = (n1 == n0);
      e[7] = ((hm / 256) == (hm % 256));
      for (int i = 1; i <= 7; i++) if (c[i]) seen[i]++;
      checks++;
      if (c !== e) begin
        failures++;
        if (failures < 10) $display("hm=%h c=%b exp=%b", hm, c, e);
      end
    end
    for (int i = 1; i <= 7; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("C%0d never set", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

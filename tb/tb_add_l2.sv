// tb_add_l2: checks the layer-2 controlled addition with random partial
// products (within their widths) and random control bits. The expected sums
// are computed with integer arithmetic; a set control replaces a pair sum by
// the higher pair sum divided by 16 per nibble of distance, with the
// nearest-to-the-top equal nibble taking priority.
module tb_add_l2;
  logic [16:0] pp [0:7];
  logic [6:1]  c;
  logic [15:0] as1;
  logic [11:0] as2;
  logic [7:0]  as3;
  logic [3:0]  as4;
  int checks = 0, failures = 0;

  add_l2 dut (.pp, .c, .as1, .as2, .as3, .as4);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s [4];
    longint e1, e2, e3, e4, x;
    for (int n = 0; n < 4000; n++) begin
      x = $urandom_range(0, 32768);
      // partial products of a real multiplication keep the sums in range
      for (int j = 0; j < 8; j++)
        pp[j] = 17'(($urandom_range(0, 3) * x) / (longint'(1) << (2 * j + 1)));
      c = 6'($urandom);
      #1;
      for (int q = 0; q < 4; q++) s[q] = longint'(pp[2*q]) + longint'(pp[2*q+1]);
      e1 = s[0];
      e2 = c[1] ? s[0] / 16 : s[1];
      e3 = c[2] ? s[0] / 256 : (c[3] ? s[1] / 16 : s[2]);
      e4 = c[4] ? s[0] / 4096 : (c[5] ? s[1] / 256 : (c[6] ? s[2] / 16 : s[3]));
      checks++;
      if (longint'(as1) != e1 || longint'(as2) != e2 ||
          longint'(as3) != e3 || longint'(as4) != e4) begin
        failures++;
        if (failures < 10) $display("c=%b as=%0d %0d %0d %0d exp=%0d %0d %0d %0d",
                                    c, as1, as2, as3, as4, e1, e2, e3, e4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mux_l1: checks the eight layer-1 multiplexers. The partial products come
// from the real PPG; the expected value of group j is floor(v*Xin/2^(2j+1))
// with v the group's two coefficient bits read as a number.
module tb_mux_l1;
  logic [15:0] xin, hm;
  logic [16:0] p  [1:8];
  logic [16:0] pp [0:7];
  int checks = 0, failures = 0;

  ppg    u_ppg (.xin, .p);
  mux_l1 dut   (.xin, .p, .hm, .pp);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v, e;
    for (int n = 0; n < 3000; n++) begin
      xin = 16'($urandom_range(0, 32768));
      hm  = 16'($urandom);
      if (n == 0) hm = 16'hFFFF;
      if (n == 1) hm = 16'h5555;
      if (n == 2) hm = 16'hAAAA;
      #1;
      for (int j = 0; j < 8; j++) begin
        v = (longint'(hm) >> (14 - 2 * j)) % 4;
        e = (v * longint'(xin)) / (longint'(1) << (2 * j + 1));
        checks++;
        if (longint'(pp[j]) != e) begin
          failures++;
          if (failures < 10) $display("xin=%0d hm=%h j=%0d pp=%0d exp=%0d", xin, hm, j, pp[j], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

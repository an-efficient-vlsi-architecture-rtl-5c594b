// tb_add_l3: checks the layer-3 controlled addition: AS5 = AS1 + AS2 and
// AS6 = C7 ? AS5 / 256 : AS3 + AS4, for random in-range inputs.
module tb_add_l3;
  logic [15:0] as1, as5;
  logic [11:0] as2;
  logic [7:0]  as3, as6;
  logic [3:0]  as4;
  logic        c7;
  int checks = 0, failures = 0;

  add_l3 dut (.as1, .as2, .as3, .as4, .c7, .as5, .as6);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e5, e6;
    for (int n = 0; n < 4000; n++) begin
      as1 = 16'($urandom_range(0, 61440));
      as2 = 12'($urandom_range(0, 3840));
      as3 = 8'($urandom_range(0, 240));
      as4 = 4'($urandom_range(0, 15));
      c7  = 1'($urandom);
      #1;
      e5 = int'(as1) + int'(as2);
      e6 = c7 ? e5 / 256 : int'(as3) + int'(as4);
      checks++;
      if (int'(as5) != e5 || int'(as6) != e6) begin
        failures++;
        if (failures < 10) $display("as5=%0d exp=%0d as6=%0d exp=%0d c7=%b", as5, e5, as6, e6, c7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

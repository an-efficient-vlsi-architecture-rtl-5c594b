// tb_csk_adder: checks the carry-skip adder at two sizes (20 bits in blocks
// of 4, 7 bits in blocks of 3, the last block partial) against integer
// addition, with operand pairs that make whole blocks propagate so that the
// skip path is used.
module tb_csk_adder;
  logic [19:0] a, b, s;
  logic        cin, cout;
  logic [6:0]  a7, b7, s7;
  logic        cout7;
  int checks = 0, failures = 0;

  csk_adder #(.W(20), .BLK(4)) dut   (.a, .b, .cin, .s, .cout);
  csk_adder #(.W(7),  .BLK(3)) dut7  (.a(a7), .b(b7), .cin, .s(s7), .cout(cout7));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    int e7;
    for (int n = 0; n < 5000; n++) begin
      a   = 20'($urandom);
      b   = (n % 3 == 0) ? ~a ^ 20'($urandom_range(0, 15)) : 20'($urandom);
      a7  = 7'($urandom);
      b7  = (n % 3 == 0) ? ~a7 : 7'($urandom);
      cin = 1'($urandom);
      #1;
      e  = longint'(a) + longint'(b) + longint'(cin);
      e7 = int'(a7) + int'(b7) + int'(cin);
      checks++;
      if ({cout, s} != 21'(e)) begin
        failures++;
        if (failures < 10) $display("%h + %h + %b = %b_%h", a, b, cin, cout, s);
      end
      checks++;
      if ({cout7, s7} != 8'(e7)) begin
        failures++;
        if (failures < 10) $display("%h + %h + %b = %b_%h (7 bit)", a7, b7, cin, cout7, s7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

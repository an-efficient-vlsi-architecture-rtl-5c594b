// tb_rate_gen: checks the three phase counters and their sample enables
// after reset: each counter starts at 0 and counts through its range, and
// ce4 / ce6 / ce8 fire exactly once every 4 / 6 / 8 clocks, in the cycle
// in which the counter holds its last value.
module tb_rate_gen;
  logic       clk = 1'b0, rst;
  logic [1:0] cnt4;
  logic [2:0] cnt6, cnt8;
  logic       ce4, ce6, ce8;
  int checks = 0, failures = 0;

  rate_gen dut (.clk, .rst, .cnt4, .cnt6, .cnt8, .ce4, .ce6, .ce8);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("fail at %0t: %s", $time, what);
    end
  endtask

  initial begin
    int n4, n6, n8;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    n4 = 0; n6 = 0; n8 = 0;
    for (int t = 0; t < 240; t++) begin
      chk(int'(cnt4) == t % 4, $sformatf("cnt4=%0d t=%0d", cnt4, t));
      chk(int'(cnt6) == t % 6, $sformatf("cnt6=%0d t=%0d", cnt6, t));
      chk(int'(cnt8) == t % 8, $sformatf("cnt8=%0d t=%0d", cnt8, t));
      chk(ce4 == (t % 4 == 3), "ce4");
      chk(ce6 == (t % 6 == 5), "ce6");
      chk(ce8 == (t % 8 == 7), "ce8");
      n4 += int'(ce4); n6 += int'(ce6); n8 += int'(ce8);
      @(posedge clk); #1;
    end
    chk(n4 == 60 && n6 == 40 && n8 == 30, $sformatf("rates %0d %0d %0d", n4, n6, n8));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_data_gen: checks the data generator. Phase counters from rate_gen drive
// its enables. For each interpolation factor it counts the clocks between
// samples (must be L), and compares the delay line and its valid bits with
// a queue of the samples presented when take was high.
module tb_data_gen;
  import rrc_pkg::*;
  logic            clk = 1'b0, rst;
  logic [1:0]      intp_sel;
  logic [1:0]      cnt4;
  logic [2:0]      cnt6, cnt8;
  logic            ce4, ce6, ce8, take;
  sample_t         rrcin;
  sample_t         x [TAPS];
  logic [TAPS-1:0] sftout;
  int checks = 0, failures = 0;

  rate_gen u_rate (.clk, .rst, .cnt4, .cnt6, .cnt8, .ce4, .ce6, .ce8);
  data_gen dut (.clk, .rst, .intp_sel, .ce4, .ce6, .ce8, .rrcin, .take, .x, .sftout);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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
    sample_t q [$];
    int last, l;
    for (int s = 0; s < 3; s++) begin
      intp_sel = 2'(s);
      l = 4 + 2 * s;
      rst = 1'b1;
      rrcin = '0;
      repeat (2) @(posedge clk);
      #1 rst = 1'b0;
      q.delete();
      last = -1;
      for (int t = 0; t < 12 * l; t++) begin
        rrcin = sample_t'($urandom);
        #1;
        if (take) begin
          if (last >= 0) chk(t - last == l, $sformatf("L=%0d sample spacing %0d", l, t - last));
          last = t;
          q.push_front(rrcin);
          if (q.size() > TAPS) void'(q.pop_back());
        end
        @(posedge clk); #1;
        for (int k = 0; k < TAPS; k++) begin
          chk(sftout[k] == (k < q.size()), $sformatf("L=%0d sftout[%0d]", l, k));
          if (k < q.size()) chk(x[k] == q[k], $sformatf("L=%0d x[%0d]", l, k));
          else              chk(x[k] == 0, $sformatf("L=%0d x[%0d] not cleared", l, k));
        end
      end
      chk(q.size() == TAPS, "line never filled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

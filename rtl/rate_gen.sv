// rate_gen: input-rate generator.
//
// The output is produced at the master clock rate; input samples arrive at
// the master rate divided by 4, 6 or 8. Instead of three divided clocks this
// design keeps one clock domain: three free-running phase counters count
// 0..3, 0..5 and 0..7 (the "MOD-3", "MOD-5" and "MOD-7" counters that steer
// the coefficient selector), and each raises its enable ce4 / ce6 / ce8 in
// the cycle in which it holds its last value. A sample taken at the end of
// that cycle is used from the next cycle on, when the counter is back at
// phase 0. Synchronous active-high reset sets all counters to 0.
module rate_gen (
  input  logic       clk,
  input  logic       rst,
  output logic [1:0] cnt4,
  output logic [2:0] cnt6,
  output logic [2:0] cnt8,
  output logic       ce4,      // CLK/4 sample enable
  output logic       ce6,      // CLK/6 sample enable
  output logic       ce8       // CLK/8 sample enable
);
  always_ff @(posedge clk) begin
    if (rst) begin
      cnt4 <= '0;
      cnt6 <= '0;
      cnt8 <= '0;
    end else begin
      cnt4 <= cnt4 + 2'd1;
      cnt6 <= (cnt6 == 3'd5) ? 3'd0 : cnt6 + 3'd1;
      cnt8 <= cnt8 + 3'd1;
    end
  end

  // the 0..5 counter never leaves its range
  assert property (@(posedge clk) disable iff (rst) cnt6 <= 3'd5)
    else $error("rate_gen: cnt6 out of range");

  always_comb begin
    ce4 = (cnt4 == 2'd3);
    ce6 = (cnt6 == 3'd5);
    ce8 = (cnt8 == 3'd7);
  end
endmodule

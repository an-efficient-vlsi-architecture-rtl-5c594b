// tb_rrc_interp_top: end-to-end test of the RRC interpolation filter at its
// default size.
//
// A reference model in this file keeps its own copy of the input delay line,
// filled from rrcin whenever rrcin_take is high, and its own output phase.
// For every clock it computes the exact filter output
//   y = sum_k x[k] * h[k*L + p] / 2^16
// from the coefficient tables (decoded from ones' complement), and expects it
// on rrcout two clocks later; the result may differ from the exact value
// only by the truncation of the seven products (at most 4 LSB each) plus
// rounding. The test also checks that samples are taken every L clocks.
//
// It walks through all six filters (L = 4, 6, 8; roll-off 0.22, 0.35),
// switching FLT_SEL and INTP_SEL while samples stream, starts with an
// impulse (the impulse response must reproduce the coefficients) and counts
// how often each mechanism happened: each filter run, each kind of mode
// switch, the filling of the delay line after reset, and each of the
// controlled additions C1..C7 of the VHBCSE multipliers on the active
// coefficients. A mechanism that never happened counts as a failure.
module tb_rrc_interp_top;
  import rrc_pkg::*;
  logic       clk = 1'b0, rst;
  logic       flt_sel;
  logic [1:0] intp_sel;
  sample_t    rrcin;
  logic       rrcin_take;
  sample_t    rrcout;

  rrc_interp_top dut (.clk, .rst, .flt_sel, .intp_sel, .rrcin, .rrcin_take, .rrcout);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_cfg [6];
  int n_intp_switch = 0, n_flt_switch = 0, n_fill = 0;
  int n_ctrl [1:7];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint coef_val(coef_t c);
    logic [15:0] m;
    m = c[16] ? ~c[15:0] : c[15:0];
    return c[16] ? -longint'(m) : longint'(m);
  endfunction

  function automatic coef_t table_word(int l, logic f, int i);
    case (l)
      4:       return f ? H4_35[i] : H4_22[i];
      6:       return f ? H6_35[i] : H6_22[i];
      default: return f ? H8_35[i] : H8_22[i];
    endcase
  endfunction

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("fail at %0t: %s", $time, what);
    end
  endtask

  // count the nibble / byte equalities of the active coefficient magnitudes
  task automatic count_ctrl(int l, logic f);
    logic [15:0] m;
    for (int i = 0; i < l * TAPS; i++) begin
      coef_t w = table_word(l, f, i);
      m = w[16] ? ~w[15:0] : w[15:0];
      if (m[15:12] == m[11:8]) n_ctrl[1]++;
      if (m[15:12] == m[7:4])  n_ctrl[2]++;
      if (m[11:8]  == m[7:4])  n_ctrl[3]++;
      if (m[15:12] == m[3:0])  n_ctrl[4]++;
      if (m[11:8]  == m[3:0])  n_ctrl[5]++;
      if (m[7:4]   == m[3:0])  n_ctrl[6]++;
      if (m[15:8]  == m[7:0])  n_ctrl[7]++;
    end
  endtask

  initial begin
    sample_t line [TAPS];
    int      l, ph, nfill, since_take, nsamp, cfg;
    logic    known, tk;
    sample_t xin;
    real     exp_now, exp_d1, exp_d2, y;
    logic    v_d1, v_d2;
    longint  acc;
    int      worst;

    foreach (n_cfg[i]) n_cfg[i] = 0;
    for (int i = 1; i <= 7; i++) n_ctrl[i] = 0;
    worst = 0;

    rst = 1'b1; flt_sel = FLT_R22; intp_sel = INTP_L4; rrcin = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    foreach (line[k]) line[k] = '0;
    l = 4; ph = 0; known = 1'b1; nfill = 0; since_take = -1;
    v_d1 = 1'b0; v_d2 = 1'b0; exp_d1 = 0.0; exp_d2 = 0.0;
    nsamp = 0; cfg = 0;
    count_ctrl(4, 1'b0);

    while (cfg < 7) begin
      // configuration schedule: 20 samples per filter, then switch
      if (nsamp == 20) begin
        logic [1:0] ni; logic nf;
        nsamp = 0;
        cfg++;
        if (cfg == 7) break;
        ni = (cfg == 6) ? INTP_L4 : 2'(cfg / 2);
        nf = 1'(cfg % 2);
        if (ni != intp_sel) begin n_intp_switch++; known = 1'b0; end
        if (nf != flt_sel)  n_flt_switch++;
        intp_sel = ni; flt_sel = nf;
        l = intp_factor(intp_sel);
        count_ctrl(l, flt_sel);
      end

      // stimulus: an impulse first, then full-scale random data
      if (cfg == 0 && nsamp == 0)      rrcin = 16'sd16384;
      else if (cfg == 0 && nsamp < 8)  rrcin = '0;
      else                             rrcin = sample_t'($urandom);
      #1;

      // reference output for this clock
      if (known) begin
        acc = 0;
        for (int k = 0; k < TAPS; k++)
          acc += longint'(line[k]) * coef_val(table_word(l, flt_sel, k*l + ph));
        exp_now = real'(acc) / 65536.0;
      end

      // rrcout now holds the result of two clocks ago
      if (v_d2) begin
        y = real'(rrcout) - exp_d2;
        if (y < 0) y = -y;
        if (int'(y) > worst) worst = int'(y);
        chk(y <= 29.0, $sformatf("L=%0d f=%b rrcout=%0d exact=%f", l, flt_sel, rrcout, exp_d2));
      end
      exp_d2 = exp_d1; v_d2 = v_d1;
      exp_d1 = exp_now; v_d1 = known;

      tk = rrcin_take; xin = rrcin;
      if (tk) begin
        if (since_take >= 0 && known) chk(since_take + 1 == l, $sformatf("take spacing %0d, L=%0d", since_take + 1, l));
        since_take = 0;
      end else if (since_take >= 0) since_take++;

      @(posedge clk); #1;

      if (tk) begin
        for (int k = TAPS - 1; k > 0; k--) line[k] = line[k-1];
        line[0] = xin;
        if (nfill < TAPS) begin nfill++; n_fill++; end
        if (known) n_cfg[(l / 2 - 2) * 2 + int'(flt_sel)]++;
        known = 1'b1;
        ph = 0;
        nsamp++;
      end else if (known) begin
        ph = (ph + 1) % l;
      end
    end

    foreach (n_cfg[i]) chk(n_cfg[i] > 0, $sformatf("filter %0d never ran", i));
    chk(n_intp_switch > 0, "no INTP_SEL switch");
    chk(n_flt_switch > 0, "no FLT_SEL switch");
    chk(n_fill == TAPS, "delay line fill not seen");
    for (int i = 1; i <= 7; i++) chk(n_ctrl[i] > 0, $sformatf("C%0d never active", i));
    $display("samples per filter (L4/.22 L4/.35 L6/.22 L6/.35 L8/.22 L8/.35): %0d %0d %0d %0d %0d %0d",
             n_cfg[0], n_cfg[1], n_cfg[2], n_cfg[3], n_cfg[4], n_cfg[5]);
    $display("switches: INTP_SEL %0d, FLT_SEL %0d; C1..C7 active on %0d %0d %0d %0d %0d %0d %0d coefficients",
             n_intp_switch, n_flt_switch, n_ctrl[1], n_ctrl[2], n_ctrl[3], n_ctrl[4], n_ctrl[5], n_ctrl[6], n_ctrl[7]);
    $display("largest deviation from the exact filter: %0d LSB", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

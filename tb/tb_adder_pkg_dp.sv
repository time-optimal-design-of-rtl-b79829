// tb_adder_pkg_dp: checks that the split table in adder_pkg is optimal under
// the delay model the adder family was designed with. Times are in units of
// the cell RC constant tau, inputs of every 1-bit block are ready at 0, a
// black cell adds 2 to its left input path, and a broadcast over k left bits
// through an s-stage driver costs (s+1)(k+1)^(1/(s+1)), with s no larger than
// the depth difference u of the two sub-blocks and of the same parity:
//   t(n) = min over m of max(t(n-m) + 2, t(m) + min_s (s+1)(n-m+1)^(1/(s+1)))
// For every n from 2 to 32 the tb solves this by dynamic programming and
// checks that the table's (m, s) reaches the optimum and that depth()
// matches the published layer count. It also checks the published times of
// a few widths (9 bits: 9.29, 32 bits: 17.84).
module tb_adder_pkg_dp;
  import adder_pkg::*;
  localparam int unsigned MAXN = 32;
  localparam int unsigned DEPTH_TAB [1:MAXN] = '{
    0, 1, 2, 2, 3, 3, 4, 4, 4, 5, 5, 5, 5, 6, 6, 6,
    6, 6, 7, 7, 7, 7, 7, 7, 8, 8, 8, 8, 8, 8, 8, 8};

  real t [1:MAXN];
  int  d [1:MAXN];
  int checks = 0, failures = 0;

  function automatic real drv_delay(int s, int fanout);
    return (s + 1) * (real'(fanout) ** (1.0 / (s + 1)));
  endfunction

  // best broadcast cost for a left block of width l, right block of width m
  function automatic real load(int l, int m, output int s_best);
    int u;
    real best;
    u = (d[l] > d[m]) ? d[l] - d[m] : 0;
    best = 1.0e9;
    s_best = 0;
    for (int s = u % 2; s <= u; s += 2)
      if (drv_delay(s, l + 1) < best - 1e-9) begin
        best = drv_delay(s, l + 1);
        s_best = s;
      end
    return best;
  endfunction

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t[1] = 0.0;
    d[1] = 0;
    for (int n = 2; n <= MAXN; n++) begin
      real best, tab_t, v, f;
      int  s_unused, m, tab_s, tab_d, tab_dl;
      best = 1.0e9;
      for (m = 1; m < n; m++) begin
        f = load(n - m, m, s_unused);
        v = (t[n-m] + 2.0 > t[m] + f) ? t[n-m] + 2.0 : t[m] + f;
        if (v < best) best = v;
      end
      // the table's own choice, with its own stage count
      m = right_width(n);
      tab_s = driver_stages(n);
      f = drv_delay(tab_s, n - m + 1);
      tab_t = (t[n-m] + 2.0 > t[m] + f) ? t[n-m] + 2.0 : t[m] + f;
      tab_dl = (d[n-m] > d[m] + tab_s) ? d[n-m] : d[m] + tab_s;
      tab_d = tab_dl + 1;
      checks++;
      if (tab_t > best + 1e-6) begin
        failures++;
        $display("n=%0d: table choice m=%0d s=%0d gives %f, optimum %f", n, m, tab_s, tab_t, best);
      end
      checks++;
      if (tab_s > tab_dl - d[m] || ((d[n-m] - d[m] - int'(tab_s)) % 2 != 0 && d[n-m] > d[m])) begin
        failures++;
        $display("n=%0d: stage count %0d breaks the depth/parity rule", n, tab_s);
      end
      checks++;
      if (tab_d != int'(DEPTH_TAB[n]) || depth(n) != DEPTH_TAB[n]) begin
        failures++;
        $display("n=%0d: depth %0d / %0d, published %0d", n, tab_d, depth(n), DEPTH_TAB[n]);
      end
      t[n] = tab_t;
      d[n] = tab_d;
    end
    checks++;
    if (t[9] < 9.285 || t[9] > 9.295) begin failures++; $display("t(9)=%f", t[9]); end
    checks++;
    if (t[32] < 17.835 || t[32] > 17.845) begin failures++; $display("t(32)=%f", t[32]); end
    $display("t(32) = %0.2f tau, depth %0d", t[32], d[32]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

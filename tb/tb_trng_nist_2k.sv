// tb_trng_nist_2k: the 2,000-bit randomness workload on the complete TRNG.
//
// The TRNG at its default parameters is enabled and 2,000 consecutive bits
// are collected, each checked against the testbench's own XOR of the ten
// oscillator outputs at the sampling edge. On the collected sequence the
// testbench then computes eight statistical tests of NIST SP 800-22 that suit
// a sequence this short: frequency (monobit), frequency within a block
// (M = 25), runs, longest run of ones in a block (M = 8), non-overlapping
// template matching (all 148 aperiodic 9-bit templates, 8 blocks; the test
// passes when at least 143 templates do, the standard's proportion bound),
// serial (m = 5, both P-values), approximate entropy (m = 3) and cumulative
// sums (forward). Each is reported with its statistic and its verdict at the
// 1 % significance level. These are the eight tests the design was evaluated
// with; the test parameters (block sizes, m) are this testbench's choice.
//
// The verdicts are reported, not counted as checks. The oscillators are
// behavioural models whose randomness comes from a modelled jitter and
// mismatch, so the statistical quality of this sequence is a property of the
// model and its random seed, not of the logic under test. What is checked is
// the bit-exact behaviour of the logic and, on the 100-bit example sequence
// of SP 800-22 and its other worked examples, that the test arithmetic
// reproduces the published results (monobit P = 0.109599, block frequency
// chi^2 = 7.2 for M = 10, runs P = 0.500798, cumulative sums P = 0.219194,
// serial P = 0.808792 and 0.670320, approximate entropy P = 0.261961,
// template matching P = 0.344154), and that there are 148 aperiodic
// 9-bit templates.
module tb_trng_nist_2k;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N      = 10;
  localparam int N_BITS = 2000;

  logic         enable = 1'b0;
  logic         bitstream, sample_clk, xor_out;
  logic [N-1:0] osc_out, osc_en;
  int checks = 0, failures = 0;
  bit seq [];

  trng_top dut (.enable, .bitstream, .sample_clk, .xor_out, .osc_out, .osc_en);

  initial begin : watchdog
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Complementary error function, Abramowitz and Stegun 7.1.26 (error < 1.5e-7).
  function automatic real erfc_a(real x);
    real t, y, ax;
    ax = (x < 0.0) ? -x : x;
    t = 1.0 / (1.0 + 0.3275911 * ax);
    y = t * (0.254829592 + t * (-0.284496736 + t * (1.421413741 + t * (-1.453152027 + t * 1.061405429))));
    y = y * $exp(-ax * ax);
    return (x < 0.0) ? 2.0 - y : y;
  endfunction

  function automatic real phi(real x);   // standard normal CDF
    return 0.5 * erfc_a(-x / $sqrt(2.0));
  endfunction

  function automatic real p_monobit(bit s []);
    int sum = 0;
    foreach (s[i]) sum += s[i] ? 1 : -1;
    return erfc_a(((sum < 0) ? -sum : sum) / $sqrt(2.0 * s.size()));
  endfunction

  function automatic real chi_block_freq(bit s [], int m);
    real chi = 0.0;
    for (int b = 0; b < s.size() / m; b++) begin
      int ones = 0;
      for (int j = 0; j < m; j++) ones += s[b * m + j];
      chi += (real'(ones) / m - 0.5) ** 2;
    end
    return 4.0 * m * chi;
  endfunction

  function automatic real p_runs(bit s []);
    int n = s.size(), ones = 0, v = 1;
    real pi_, num;
    foreach (s[i]) ones += s[i];
    pi_ = real'(ones) / n;
    if ((pi_ - 0.5 < 0.0 ? 0.5 - pi_ : pi_ - 0.5) >= 2.0 / $sqrt(real'(n))) return 0.0;
    for (int i = 0; i < n - 1; i++) if (s[i] != s[i+1]) v++;
    num = v - 2.0 * n * pi_ * (1.0 - pi_);
    if (num < 0.0) num = -num;
    return erfc_a(num / (2.0 * $sqrt(2.0 * n) * pi_ * (1.0 - pi_)));
  endfunction

  // Longest run of ones, M = 8: classes <=1, 2, 3, >=4.
  function automatic real chi_longest_run(bit s []);
    real pi_ [4] = '{0.2148, 0.3672, 0.2305, 0.1875};
    int  nu [4] = '{0, 0, 0, 0};
    int  blocks = s.size() / 8;
    real chi = 0.0;
    for (int b = 0; b < blocks; b++) begin
      int run = 0, best = 0;
      for (int j = 0; j < 8; j++) begin
        run = s[b * 8 + j] ? run + 1 : 0;
        if (run > best) best = run;
      end
      nu[(best <= 1) ? 0 : (best >= 4) ? 3 : best - 1]++;
    end
    for (int i = 0; i < 4; i++) chi += (nu[i] - blocks * pi_[i]) ** 2 / (blocks * pi_[i]);
    return chi;
  endfunction

  function automatic real p_cusum(bit s []);
    int n = s.size(), sum = 0, z = 0;
    real p, rn;
    foreach (s[i]) begin
      sum += s[i] ? 1 : -1;
      if ((sum < 0 ? -sum : sum) > z) z = (sum < 0) ? -sum : sum;
    end
    rn = $sqrt(real'(n));
    p = 1.0;
    for (int k = (-n / z + 1) / 4; k <= (n / z - 1) / 4; k++)
      p -= phi(real'(4 * k + 1) * z / rn) - phi(real'(4 * k - 1) * z / rn);
    for (int k = (-n / z - 3) / 4; k <= (n / z - 1) / 4; k++)
      p += phi(real'(4 * k + 3) * z / rn) - phi(real'(4 * k + 1) * z / rn);
    return p;
  endfunction


  // ln Gamma(x), Lanczos approximation (g = 7, 9 terms), x > 0.
  function automatic real lgamma_a(real x);
    real c [9] = '{0.99999999999980993, 676.5203681218851, -1259.1392167224028,
                   771.32342877765313, -176.61502916214059, 12.507343278686905,
                   -0.13857109526572012, 9.9843695780195716e-6, 1.5056327351493116e-7};
    real a, t;
    x = x - 1.0;
    a = c[0];
    for (int i = 1; i < 9; i++) a += c[i] / (x + i);
    t = x + 7.5;
    return 0.5 * $ln(2.0 * 3.141592653589793) + (x + 0.5) * $ln(t) - t + $ln(a);
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Regularized upper incomplete gamma function Q(a, x): series below a + 1,
  // continued fraction (modified Lentz) above.
  function automatic real igamc(real a, real x);
    real sum, del, ap, b, c, d, h, an;
    real fpmin = 1.0e-300;
    if (x <= 0.0) return 1.0;
    if (x < a + 1.0) begin
      ap = a;
      sum = 1.0 / a;
      del = sum;
      for (int i = 0; i < 2000; i++) begin
        ap += 1.0;
        del *= x / ap;
        sum += del;
        if (absr(del) < sum * 1.0e-15) break;
      end
      return 1.0 - sum * $exp(-x + a * $ln(x) - lgamma_a(a));
    end
    b = x + 1.0 - a;
    c = 1.0 / fpmin;
    d = 1.0 / b;
    h = d;
    for (int i = 1; i < 2000; i++) begin
      an = -real'(i) * (real'(i) - a);
      b += 2.0;
      d = an * d + b;
      if (absr(d) < fpmin) d = fpmin;
      c = b + an / c;
      if (absr(c) < fpmin) c = fpmin;
      d = 1.0 / d;
      del = d * c;
      h *= del;
      if (absr(del - 1.0) < 1.0e-15) break;
    end
    return $exp(-x + a * $ln(x) - lgamma_a(a)) * h;
  endfunction

  // Counts of every overlapping m-bit pattern, the sequence taken as circular.
  function automatic void pattern_counts(bit s [], int m, ref int cnt []);
    int n = s.size();
    cnt = new[1 << m];
    foreach (cnt[i]) cnt[i] = 0;
    for (int i = 0; i < n; i++) begin
      int v = 0;
      for (int j = 0; j < m; j++) v = (v << 1) | int'(s[(i + j) % n]);
      cnt[v]++;
    end
  endfunction

  function automatic real psi_sq(bit s [], int m);
    int cnt [];
    real acc = 0.0;
    if (m <= 0) return 0.0;
    pattern_counts(s, m, cnt);
    foreach (cnt[i]) acc += real'(cnt[i]) * cnt[i];
    return acc * (1 << m) / s.size() - s.size();
  endfunction

  // Serial test: the two P-values.
  function automatic void p_serial(bit s [], int m, output real p1, output real p2);
    real d1, d2;
    d1 = psi_sq(s, m) - psi_sq(s, m - 1);
    d2 = psi_sq(s, m) - 2.0 * psi_sq(s, m - 1) + psi_sq(s, m - 2);
    p1 = igamc(real'(1 << (m - 2)), d1 / 2.0);
    p2 = igamc(real'(1 << (m - 3)), d2 / 2.0);
  endfunction

  function automatic real phi_apen(bit s [], int m);
    int cnt [];
    real acc = 0.0, n = s.size();
    pattern_counts(s, m, cnt);
    foreach (cnt[i]) if (cnt[i] > 0) acc += cnt[i] / n * $ln(cnt[i] / n);
    return acc;
  endfunction

  function automatic real p_apen(bit s [], int m);
    real apen, chi;
    apen = phi_apen(s, m) - phi_apen(s, m + 1);
    chi = 2.0 * s.size() * ($ln(2.0) - apen);
    return igamc(real'(1 << (m - 1)), chi / 2.0);
  endfunction

  // Non-overlapping template matching for one template of m bits (tmpl[m-1]
  // is the first bit), N blocks.
  function automatic real p_template(bit s [], int tmpl, int m, int nblk);
    int  blk_len = s.size() / nblk;
    real mu, var_, chi = 0.0;
    mu = real'(blk_len - m + 1) / (1 << m);
    var_ = blk_len * (1.0 / (1 << m) - (2.0 * m - 1.0) / (real'(1 << m) * (1 << m)));
    for (int b = 0; b < nblk; b++) begin
      int w = 0, i = 0;
      while (i <= blk_len - m) begin
        bit hit = 1'b1;
        for (int j = 0; j < m; j++) if (s[b * blk_len + i + j] != tmpl[m - 1 - j]) hit = 1'b0;
        if (hit) begin w++; i += m; end
        else i++;
      end
      chi += (w - mu) ** 2 / var_;
    end
    return igamc(nblk / 2.0, chi / 2.0);
  endfunction

  // A template is aperiodic when no proper shift of it matches itself.
  function automatic bit aperiodic(int t, int m);
    for (int k = 1; k < m; k++) begin
      int mask = (1 << (m - k)) - 1;
      if (((t >> k) & mask) == (t & mask)) return 1'b0;
    end
    return 1'b1;
  endfunction

  function automatic void to_bits(string str, ref bit b []);
    b = new[str.len()];
    foreach (b[i]) b[i] = (str[i] == "1");
  endfunction

  function automatic bit near(real a, real b, real tol);
    return (a - b < tol) && (b - a < tol);
  endfunction

  function automatic logic parity(logic [N-1:0] v);
    logic p = 1'b0;
    for (int b = 0; b < N; b++) p ^= v[b];
    return p;
  endfunction

  initial begin
    string ex;
    bit exs [];
    real p, p2, chi;
    int passed, n_templates, templates_passed;

    passed = 0;
    // Self-test of the test arithmetic on the SP 800-22 example sequence.
    ex = "1100100100001111110110101010001000100001011010001100001000110100110001001100011001100010100010111000";
    exs = new[ex.len()];
    foreach (exs[i]) exs[i] = (ex[i] == "1");
    check(near(p_monobit(exs), 0.109599, 1e-5), "monobit example");
    check(near(chi_block_freq(exs, 10), 7.2, 1e-9), "block frequency example");
    check(near(p_runs(exs), 0.500798, 1e-5), "runs example");
    check(near(p_cusum(exs), 0.219194, 1e-5), "cumulative sums example");
    check(near(igamc(1.5, 0.25), 0.918891, 1e-5), "incomplete gamma, series branch");
    check(near(igamc(2.0, 10.0), 11.0 * $exp(-10.0), 1e-9), "incomplete gamma, fraction branch");
    to_bits("0011011101", exs);
    p_serial(exs, 3, p, p2);
    check(near(p, 0.808792, 1e-5) && near(p2, 0.670320, 1e-5), "serial example");
    to_bits("0100110101", exs);
    check(near(p_apen(exs, 3), 0.261961, 1e-5), "approximate entropy example");
    to_bits("10100100101110010110", exs);
    check(near(p_template(exs, 1, 3, 2), 0.344154, 1e-5), "template matching example");
    n_templates = 0;
    for (int t = 0; t < 512; t++) n_templates += aperiodic(t, 9);
    check(n_templates == 148, "148 aperiodic 9-bit templates");

    // Collect the workload.
    enable = 1'b1;
    #1ns enable = 1'b0;
    repeat (2) @(posedge sample_clk);
    enable = 1'b1;
    wait (osc_en == '1);
    seq = new[N_BITS];
    for (int i = 0; i < N_BITS; i++) begin
      logic expected;
      @(posedge sample_clk);
      expected = parity(osc_out);
      #1ns;
      check(bitstream == expected, "bit equals sampled XOR");
      seq[i] = bitstream;
    end

    p = p_monobit(seq);
    passed += (p >= 0.01);
    $display("frequency (monobit)       P = %f  %s", p, (p >= 0.01) ? "pass" : "fail");
    chi = chi_block_freq(seq, 25);       // 80 blocks; chi^2(80) at 1 %: 112.33
    passed += (chi <= 112.33);
    $display("frequency within a block  chi2 = %f  %s", chi, (chi <= 112.33) ? "pass" : "fail");
    p = p_runs(seq);
    passed += (p >= 0.01);
    $display("runs                      P = %f  %s", p, (p >= 0.01) ? "pass" : "fail");
    chi = chi_longest_run(seq);          // chi^2(3) at 1 %: 11.345
    passed += (chi <= 11.345);
    $display("longest run of ones       chi2 = %f  %s", chi, (chi <= 11.345) ? "pass" : "fail");
    p = p_cusum(seq);
    passed += (p >= 0.01);
    $display("cumulative sums (forward) P = %f  %s", p, (p >= 0.01) ? "pass" : "fail");
    templates_passed = 0;
    for (int t = 0; t < 512; t++)
      if (aperiodic(t, 9)) templates_passed += (p_template(seq, t, 9, 8) >= 0.01);
    // Proportion bound of SP 800-22 for 148 subtests at 1 %:
    // 0.99 - 3 * sqrt(0.99 * 0.01 / 148) = 0.9655, i.e. at least 143 templates.
    passed += (templates_passed >= 143);
    $display("non-overlapping templates %0d of %0d templates pass  %s", templates_passed, n_templates,
             (templates_passed >= 143) ? "pass" : "fail");
    p_serial(seq, 5, p, p2);
    passed += (p >= 0.01 && p2 >= 0.01);
    $display("serial (m = 5)            P1 = %f P2 = %f  %s", p, p2, (p >= 0.01 && p2 >= 0.01) ? "pass" : "fail");
    p = p_apen(seq, 3);
    passed += (p >= 0.01);
    $display("approximate entropy (m=3) P = %f  %s", p, (p >= 0.01) ? "pass" : "fail");
    $display("%0d of 8 statistical tests passed on %0d bits", passed, N_BITS);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_srr_accuracy: output-accuracy test of the whole receiver at its default sizes.
// The accuracy target is an output round-off noise power of at most 2.512e-10 (96 dB,
// i.e. 16 fractional bits), where the noise is the difference between the fixed-point
// receiver and the same filters computed in real arithmetic with the same (SOPOT)
// coefficients and the same M_SRC word.
// For each of the four standard configurations (GSM, W-CDMA, CDMA2000, Hiperlan/2) the
// receiver is driven with uniform white noise of amplitude 0.9, one sample per clock.
// A real-valued model of the chain (CIC as a triple boxcar / M^3, compensator, LPFs,
// Farrow SRC with the exact fractional interval, HBF) gives the ideal output. Once the
// filters are settled the mean squared difference must not exceed 2.512e-10; it also
// checks that the output is not trivially small (RMS above 0.01; white input keeps about
// 0.52/sqrt(M*) RMS after the channel filter) and that the model and
// the receiver produce the same number of outputs within 3.
module tb_srr_accuracy;
  import srr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  srr_cfg_t           cfg;
  logic               in_valid;
  logic signed [13:0] in_data;
  logic               out_valid;
  logic signed [27:0] out_data;
  logic               ch_valid;
  logic signed [27:0] ch_re [8];
  logic signed [27:0] ch_im [8];

  srr_top dut (.*);

  // coefficient tables (first halves; the filters are linear phase)
  localparam int H1 [4] = '{-331, -450, 2260, 6712};                       // 2^-14
  localparam int H2 [6] = '{74, 68, -545, -650, 2402, 6844};               // 2^-14
  localparam int H3 [9] = '{-88, -176, 341, 1116, -328, -3808, -1794, 11396, 26112};  // 2^-16
  localparam int HH [24] = '{3, 20, 25, -26, -68, 33, 150, -25, -285, -13, 489, 104,
                             -785, -282, 1203, 602, -1802, -1169, 2731, 2260, -4491,
                             -5015, 10336, 28791};                          // 2^-16
  localparam int C [4][18] = '{
    '{   -6,     5,    32,   -33,   -95,   132,   199,  -389,  -300,
        924,   270, -1889,   160,  3545, -1633, -6939,  7502, 31283},
    '{  -12,   -17,    54,    66,  -182,  -156,   493,   259, -1139,
       -269,  2328,   -39, -4411,  1079,  8495, -3751,-23699,-15245},
    '{    8,    -6,   -45,    40,   137,  -166,  -300,   497,   500,
      -1204,  -630,  2524,   500, -4959,   -14, 10830,  5069,-12784},
    '{    5,     8,   -23,   -31,    76,    78,  -207,  -145,   480,
        208,  -989,  -228,  1896,   235, -3637, -1330,  5126,  3933}};
  localparam real P_SPEC = 2.512e-10;

  int checks = 0, failures = 0;
  real ys[$];

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (rst_n && out_valid) ys.push_back(real'(out_data) / 524288.0);

  // linear-phase FIR with 2:1 decimation keeping even outputs; which: 1..3 LPF, 4 HBF
  function automatic void fir_dec(input int which, ref real q[$]);
    real r[$];
    int nt;
    real g;
    nt = (which == 1) ? 8 : (which == 2) ? 12 : (which == 3) ? 18 : 48;
    g  = (which <= 2) ? 16384.0 : 65536.0;
    for (int n = 0; n < q.size(); n += 2) begin
      real acc = 0.0;
      for (int k = 0; k < nt; k++) begin
        int i, h;
        i = (k < nt / 2) ? k : nt - 1 - k;
        h = (which == 1) ? H1[i] : (which == 2) ? H2[i] : (which == 3) ? H3[i] : HH[i];
        if (n - k >= 0) acc += real'(h) / g * q[n-k];
      end
      r.push_back(acc);
    end
    q = r;
  endfunction

  function automatic real vdf(int l, int k);
    int i;
    if (k < 18) return real'(C[l][k]) / 65536.0;
    i = 35 - k;
    return ((l % 2 == 1) ? -1.0 : 1.0) * real'(C[l][i]) / 65536.0;
  endfunction

  function automatic void model(input srr_cfg_t c, ref real q[$]);
    real r[$];
    if (c.cic_en) begin
      int m, nc;
      real box[$], b2[$], b3[$], y[$];
      m = 1 << c.cic_log2m;
      // triple boxcar impulse response, scaled by 1/M^3
      for (int i = 0; i < m; i++) box.push_back(1.0);
      b2 = '{};
      for (int i = 0; i < 2 * m - 1; i++) begin
        real s = 0.0;
        for (int j = 0; j < m; j++) if (i - j >= 0 && i - j < m) s += 1.0;
        b2.push_back(s);
      end
      for (int i = 0; i < 3 * m - 2; i++) begin
        real s = 0.0;
        for (int j = 0; j < m; j++) if (i - j >= 0 && i - j < 2 * m - 1) s += b2[i-j];
        b3.push_back(s / real'(m * m * m));
      end
      nc = q.size() / m;
      for (int jj = 0; jj < nc; jj++) begin
        real s = 0.0;
        int n0 = jj * m + m - 1;
        for (int i = 0; i < 3 * m - 2; i++) if (n0 - i >= 0) s += b3[i] * q[n0-i];
        y.push_back(s);
      end
      // compensator a + b z^-1 + a z^-2
      r = '{};
      for (int jj = 0; jj < y.size(); jj++) begin
        real a = -(1.0 / 16.0 + 1.0 / 32.0), b = 1.0 + 1.0 / 8.0 + 1.0 / 16.0, s;
        s = a * y[jj];
        if (jj >= 1) s += b * y[jj-1];
        if (jj >= 2) s += a * y[jj-2];
        r.push_back(s);
      end
      q = r;
    end
    if (c.dec_stages == 3) fir_dec(1, q);
    if (c.dec_stages >= 2) fir_dec(2, q);
    if (c.dec_stages >= 1) fir_dec(3, q);
    if (c.src_en) begin
      r = '{};
      for (int jj = 0; ; jj++) begin
        longint t, nj;
        real phi, y, v;
        t  = longint'(jj) * longint'(c.m_src);
        nj = (t + (longint'(1) << 23)) >>> 24;
        if (nj >= q.size()) break;
        phi = real'((nj << 24) - t) / 16777216.0;
        y = 0.0;
        for (int l = 3; l >= 0; l--) begin
          v = 0.0;
          for (int k = 0; k < 36; k++) if (nj - k >= 0) v += vdf(l, k) * q[nj-k];
          y = y * phi + v;
        end
        r.push_back(y);
      end
      q = r;
    end
    fir_dec(4, q);
  endfunction

  function automatic srr_cfg_t mk(bit cic, int l2m, int st, bit src, real msrc);
    srr_cfg_t c;
    c.cic_en = cic; c.cic_log2m = 3'(l2m); c.dec_stages = 2'(st); c.src_en = src;
    c.m_src = 26'($rtoi(msrc * 16777216.0));
    return c;
  endfunction

  task automatic run(input string name, input srr_cfg_t c, input real mstar);
    real xs[$], ref_q[$];
    real err, pow;
    int nin, n, settle, cnt;
    nin = $rtoi(400.0 * mstar);
    settle = 60;
    rst_n = 0; cfg = c; ys.delete();
    for (int i = 0; i < nin; i++) begin
      int v;
      v = $urandom_range(14746) - 7373;           // about +-0.9 at <1/13>
      xs.push_back(real'(v) / 8192.0);
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < nin; i++) begin
      @(negedge clk);
      in_valid = 1;
      in_data  = 14'($rtoi(xs[i] * 8192.0));
    end
    @(negedge clk) in_valid = 0;
    repeat (40) @(posedge clk);
    ref_q = xs;
    model(c, ref_q);
    checks++;
    if (ys.size() < ref_q.size() - 3 || ys.size() > ref_q.size() + 3) begin
      failures++;
      $display("%s: %0d outputs, model gives %0d", name, ys.size(), ref_q.size());
    end
    n = (ys.size() < ref_q.size()) ? ys.size() : ref_q.size();
    err = 0.0; pow = 0.0; cnt = 0;
    for (int j = settle; j < n; j++) begin
      err += (ys[j] - ref_q[j]) * (ys[j] - ref_q[j]);
      pow += ref_q[j] * ref_q[j];
      cnt++;
    end
    err = err / cnt; pow = pow / cnt;
    $display("%-10s M*=%8.4f: %0d outputs, signal rms %f, round-off noise power %g (%0.1f dB), target %g",
             name, mstar, cnt, $sqrt(pow), err, 10.0 * $log10(err), P_SPEC);
    checks++;
    if (err > P_SPEC) begin
      failures++;
      $display("%s: round-off noise %g above %g", name, err, P_SPEC);
    end
    checks++;
    if (pow < 1e-4) begin
      failures++;
      $display("%s: output too small to measure (rms %f)", name, $sqrt(pow));
    end
  endtask

  initial begin
    in_valid = 0; in_data = 0;
    cfg = mk(0, 0, 0, 0, 1.0);
    run("GSM",        mk(1, 4, 3, 1, 1.153847), 16.0 * 1.153847 * 16.0);
    run("W-CDMA",     mk(0, 0, 3, 1, 1.302083), 1.302083 * 16.0);
    run("CDMA2000",   mk(1, 2, 3, 1, 1.01725),  4.0 * 1.01725 * 16.0);
    run("Hiperlan/2", mk(0, 0, 1, 0, 1.0),      4.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

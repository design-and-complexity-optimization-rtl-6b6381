// tb_srr_response: frequency-response test of the whole receiver at its default sizes,
// one configuration per range of the overall ratio M*:
//   2-4: HBF + SRC; 4-8: LPF#3 + HBF + SRC; 8-16: LPF#2..3 + HBF + SRC;
//   16-32: LPF#1..3 + HBF + SRC (all with M_SRC = 1.5); >= 32: CDMA2000 setting
//   (CIC by 4, three LPFs, M_SRC = 1.01725).
// Each point sends a 0.9-amplitude sine at input frequency w from reset and measures
// the settled output.
//  - Passband, ten tones up to 0.8*pi at the output rate (w*M* <= 0.8*pi): the gain is
//    the amplitude of a least-squares sine fit at the output frequency w*M*. The spread
//    of the gain must stay within +-0.015 dB.
//  - Stopband: tones that the SRC's fractional-delay filter rejects (0.72, 0.85 and
//    0.98 pi at the SRC input rate) and, where the LPFs or the CIC decimate by 4 or more
//    ahead of the SRC, tones high in the input band (0.3, 0.6, 0.9 pi). Attenuation is
//    taken from the total output power and must reach 80 dB.
//  - Tones at the half-band filter's stopband edge (1.2*pi at the output rate) and above
//    it (1.6*pi), which fall in the transition band of the SRC's fractional-delay filter
//    (0.4 to 0.7 pi at its input) for most ratios, are only reported. The
//    resampler turns them into spurs (its error changes with the fractional interval),
//    so the attenuation measured there is lower than the filters' fixed responses.
module tb_srr_response;
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

  localparam int  NOUT   = 400;     // outputs measured per tone
  localparam int  SETTLE = 80;      // outputs skipped while the filters fill
  localparam real AMP    = 0.9;

  int checks = 0, failures = 0;
  real pi = 3.14159265358979;
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

  function automatic srr_cfg_t mk(bit cic, int l2m, int st, bit src, real msrc);
    srr_cfg_t c;
    c.cic_en = cic; c.cic_log2m = 3'(l2m); c.dec_stages = 2'(st); c.src_en = src;
    c.m_src = 26'($rtoi(msrc * 16777216.0));
    return c;
  endfunction

  // Runs one tone. gain: fitted amplitude / AMP; total: output RMS * sqrt(2) / AMP.
  task automatic tone(input srr_cfg_t c, input real mstar, input real w,
                      output real gain, output real total);
    int nin, cnt;
    real s11, s12, s22, r1, r2, det, acc, a, b;
    nin = $rtoi(real'(NOUT + SETTLE) * mstar);
    rst_n = 0; cfg = c; ys.delete();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < nin; i++) begin
      @(negedge clk);
      in_valid = 1;
      in_data  = 14'($rtoi($floor(AMP * $sin(w * i) * 8192.0 + 0.5)));
    end
    @(negedge clk) in_valid = 0;
    repeat (40) @(posedge clk);
    s11 = 0; s12 = 0; s22 = 0; r1 = 0; r2 = 0; acc = 0; cnt = 0;
    for (int j = SETTLE; j < ys.size(); j++) begin
      real cs, sn;
      cs = $cos(w * mstar * j);
      sn = $sin(w * mstar * j);
      s11 += cs * cs; s12 += cs * sn; s22 += sn * sn;
      r1  += cs * ys[j]; r2 += sn * ys[j];
      acc += ys[j] * ys[j];
      cnt++;
    end
    det   = s11 * s22 - s12 * s12;
    a     = (s22 * r1 - s12 * r2) / det;
    b     = (s11 * r2 - s12 * r1) / det;
    gain  = $sqrt(a * a + b * b) / AMP;
    total = $sqrt(acc / cnt) * $sqrt(2.0) / AMP;
  endtask

  initial begin
    srr_cfg_t cf [5];
    real      ms [5], pre [5];
    string    nm [5];
    in_valid = 0; in_data = 0;
    cfg = mk(0, 0, 0, 0, 1.0);
    // pre: decimation in front of the SRC
    nm[0] = "2-4";   cf[0] = mk(0, 0, 0, 1, 1.5);     ms[0] = 3.0;  pre[0] = 1.0;
    nm[1] = "4-8";   cf[1] = mk(0, 0, 1, 1, 1.5);     ms[1] = 6.0;  pre[1] = 2.0;
    nm[2] = "8-16";  cf[2] = mk(0, 0, 2, 1, 1.5);     ms[2] = 12.0; pre[2] = 4.0;
    nm[3] = "16-32"; cf[3] = mk(0, 0, 3, 1, 1.5);     ms[3] = 24.0; pre[3] = 8.0;
    nm[4] = ">=32";  cf[4] = mk(1, 2, 3, 1, 1.01725); ms[4] = 4.0 * 1.01725 * 16.0; pre[4] = 32.0;
    for (int i = 0; i < 5; i++) begin
      real gmax, gmin, dev, worst, g, t, w, at_edge [2];
      gmax = 0.0; gmin = 10.0; worst = 0.0;
      for (int f = 1; f <= 10; f++) begin
        tone(cf[i], ms[i], 0.8 * pi / ms[i] * real'(f) / 10.0, g, t);
        if (g > gmax) gmax = g;
        if (g < gmin) gmin = g;
      end
      dev = 10.0 * $log10(gmax / gmin);      // half the peak-to-peak spread, dB
      checks++;
      if (dev > 0.015) begin
        failures++;
        $display("%s: passband deviation %f dB", nm[i], dev);
      end
      for (int f = 0; f < 6; f++) begin
        if (f >= 3 && pre[i] < 4.0) continue;     // no front-end filter to reject them
        if (f < 3) w = ((f == 0) ? 0.72 : (f == 1) ? 0.85 : 0.98) * pi / pre[i];
        else       w = ((f == 3) ? 0.3 : (f == 4) ? 0.6 : 0.9) * pi;
        tone(cf[i], ms[i], w, g, t);
        if (t > worst) worst = t;
        checks++;
        if (t > 1e-4) begin
          failures++;
          $display("%s: tone at %f pi attenuated only %f dB", nm[i], w / pi, -20.0 * $log10(t));
        end
      end
      for (int f = 0; f < 2; f++) begin
        tone(cf[i], ms[i], ((f == 0) ? 1.2 : 1.6) * pi / ms[i], g, t);
        at_edge[f] = -20.0 * $log10(t);
      end
      $display("M* %-6s (M*=%7.3f): passband deviation %f dB, stopband %0.1f dB; at the HBF edge %0.1f dB, above it %0.1f dB",
               nm[i], ms[i], dev, -20.0 * $log10(worst), at_edge[0], at_edge[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

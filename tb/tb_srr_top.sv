// tb_srr_top: end-to-end test of the digital IF at its default sizes.
// Runs the receiver in the configurations of the four reference standards (GSM,
// W-CDMA, CDMA2000, Hiperlan/2), two more that use the remaining multiplexer settings,
// and the two ends of the ratio range (M* = 2: half-band filter only; M* = 511.7: CIC
// by 16, three LPFs, M_SRC = 1.999). In each configuration, three signals are sent from reset at one sample per
// clock:
//  - DC 0.5: the settled output mean must be 0.5 within 0.5 % (unity gain);
//  - a 0.5-amplitude tone well inside the passband: output RMS 0.5/sqrt(2) within 2 %;
//  - a 0.5-amplitude tone at 0.8*pi of the SRC input rate (stopband of the SRC and,
//    after resampling, of the half-band filter): output RMS below 0.5e-3 (>= 60 dB);
// and in each, the number of outputs must match NIN / M* (M* = M_CIC*M_SRC*2^k) within 3.
// The DFT filter bank on the output is checked too: it must give one set of channel
// outputs per four receiver outputs, and with the DC input, once settled, channel 0 must
// be 0.5 (times the prototype's DC gain) within 0.005 and channels 1..7 must be below
// 1e-3.
// It counts how often each mechanism ran (CIC used/bypassed, each decimator setting,
// SRC used/bypassed, SRC inputs that produce no output, final decimation) and fails if
// one never did.
module tb_srr_top;
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

  int checks = 0, failures = 0;
  real pi = 3.14159265358979;

  // mechanism counters
  int n_cic_on, n_cic_off, n_src_on, n_src_off, n_src_skip, n_hbf_out, n_ch_out;
  int n_stages [4];

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output capture
  real ys[$];
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      ys.push_back(real'(out_data) / 524288.0);
      n_hbf_out++;
    end
    if (rst_n && dut.u_src.in_valid && !dut.u_src.emit) n_src_skip++;
  end

  // channel outputs of the DFT filter bank
  int  ch_cnt, ch_bad;
  bit  ch_dc;
  real ch_h0 = 261934.0 / 262144.0;
  always @(posedge clk) begin
    if (rst_n && ch_valid) begin
      if (ch_dc && ch_cnt >= 40) begin
        for (int k = 0; k < 8; k++) begin
          real re, im;
          re = real'(ch_re[k]) / 524288.0;
          im = real'(ch_im[k]) / 524288.0;
          if (k == 0 && (re - 0.5 * ch_h0 > 0.005 || 0.5 * ch_h0 - re > 0.005 ||
                         im > 1e-3 || im < -1e-3)) ch_bad++;
          if (k != 0 && re * re + im * im > 1e-6) ch_bad++;
        end
      end
      ch_cnt++;
      n_ch_out++;
    end
  end

  function automatic real mstar(srr_cfg_t c);
    real m;
    m = c.cic_en ? real'(1 << c.cic_log2m) : 1.0;
    if (c.src_en) m *= real'(c.m_src) / 16777216.0;
    return m * real'(2 << c.dec_stages);
  endfunction

  // mode: 0 DC, 1 passband tone, 2 stopband tone
  task automatic run(input string name, input srr_cfg_t c, input int mode);
    real m, w, acc, rms, mean;
    int nin, settle, nexp, cnt;
    m = mstar(c);
    nin = $rtoi(260.0 * m);
    settle = 80;
    // stopband tone: 0.8*pi at the SRC input rate, i.e. beyond the SRC's and, after
    // resampling, the half-band filter's stopband edges
    w = (mode == 1) ? 0.15 * pi / m
                    : 0.8 * pi / ((c.cic_en ? real'(1 << c.cic_log2m) : 1.0) * real'(1 << c.dec_stages));
    rst_n = 0; cfg = c; ys.delete();
    ch_cnt = 0; ch_bad = 0; ch_dc = (mode == 0);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < nin; i++) begin
      @(negedge clk);
      in_valid = 1;
      if (mode == 0) in_data = 14'sd4096;
      else           in_data = 14'($rtoi($floor(0.5 * $sin(w * i) * 8192.0 + 0.5)));
    end
    @(negedge clk) in_valid = 0;
    repeat (40) @(posedge clk);
    // rate
    nexp = $rtoi(real'(nin) / m);
    checks++;
    if (ys.size() < nexp - 3 || ys.size() > nexp + 3) begin
      failures++;
      $display("%s mode %0d: %0d outputs, expected about %0d", name, mode, ys.size(), nexp);
    end
    checks++;
    if (ch_cnt != (ys.size() + 3) / 4) begin
      failures++;
      $display("%s mode %0d: %0d channel outputs for %0d receiver outputs", name, mode,
               ch_cnt, ys.size());
    end
    if (mode == 0) begin
      checks++;
      if (ch_bad != 0 || ch_cnt < 50) begin
        failures++;
        $display("%s: DFT filter bank DC response wrong (%0d bad of %0d)", name, ch_bad, ch_cnt);
      end
    end
    acc = 0; mean = 0; cnt = 0;
    for (int j = settle; j < ys.size(); j++) begin
      acc += ys[j] * ys[j]; mean += ys[j]; cnt++;
    end
    rms = $sqrt(acc / cnt); mean = mean / cnt;
    checks++;
    case (mode)
      0: if (mean < 0.4975 || mean > 0.5025) begin
           failures++; $display("%s: DC gain off, mean %f", name, mean);
         end
      1: if (rms < 0.3536 * 0.98 || rms > 0.3536 * 1.02) begin
           failures++; $display("%s: passband tone rms %f", name, rms);
         end
      default: if (rms > 0.5e-3) begin
           failures++; $display("%s: stopband tone rms %g", name, rms);
         end
    endcase
    $display("%-10s M*=%8.4f mode %0d: %0d outputs, mean %f rms %g", name, m, mode, ys.size(), mean, rms);
    if (c.cic_en) n_cic_on++; else n_cic_off++;
    if (c.src_en) n_src_on++; else n_src_off++;
    n_stages[c.dec_stages]++;
  endtask

  function automatic srr_cfg_t mk(bit cic, int l2m, int st, bit src, real msrc);
    srr_cfg_t c;
    c.cic_en = cic; c.cic_log2m = 3'(l2m); c.dec_stages = 2'(st); c.src_en = src;
    c.m_src = 26'($rtoi(msrc * 16777216.0));
    return c;
  endfunction

  initial begin
    srr_cfg_t cf [8];
    string nm [8];
    in_valid = 0; in_data = 0;
    cfg = mk(0, 0, 0, 0, 1.0);
    nm[0] = "GSM";        cf[0] = mk(1, 4, 3, 1, 1.153847);
    nm[1] = "W-CDMA";     cf[1] = mk(0, 0, 3, 1, 1.302083);
    nm[2] = "CDMA2000";   cf[2] = mk(1, 2, 3, 1, 1.01725);
    nm[3] = "Hiperlan/2"; cf[3] = mk(0, 0, 1, 0, 1.0);
    nm[4] = "HBF+SRC";    cf[4] = mk(0, 0, 0, 1, 1.5);
    nm[5] = "CIC2+2LPF";  cf[5] = mk(1, 1, 2, 0, 1.0);
    nm[6] = "min M*";     cf[6] = mk(0, 0, 0, 0, 1.0);
    nm[7] = "max M*";     cf[7] = mk(1, 4, 3, 1, 1.999);
    for (int i = 0; i < 8; i++)
      for (int mode = 0; mode < 3; mode++) run(nm[i], cf[i], mode);
    $display("mechanisms: cic on %0d off %0d, stages 0:%0d 1:%0d 2:%0d 3:%0d, src on %0d off %0d, src skips %0d, outputs %0d, channel outputs %0d",
             n_cic_on, n_cic_off, n_stages[0], n_stages[1], n_stages[2], n_stages[3],
             n_src_on, n_src_off, n_src_skip, n_hbf_out, n_ch_out);
    checks++;
    if (n_cic_on == 0 || n_cic_off == 0 || n_src_on == 0 || n_src_off == 0 || n_src_skip == 0 ||
        n_hbf_out == 0 || n_ch_out == 0 || n_stages[0] == 0 || n_stages[1] == 0 || n_stages[2] == 0 || n_stages[3] == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_farrow_src: self-checking test of the Farrow sampling-rate converter.
// For several ratios M_SRC it runs two passes from reset:
//  - random inputs: every output is compared with a real-valued model. The model finds
//    output j's input index n_j = round(j*M_SRC) and phi = n_j - j*M_SRC (phi quantised
//    like the hardware), evaluates sum_l phi^l * sum_k c_l(k) x(n_j-k) and allows
//    4 LSBs (4 * 2^-18) for the internal roundings. It also checks that the output
//    follows input n_j by two clocks and that the number of outputs is right.
//  - a 0.5-amplitude sine at 0.2*pi: once the filter is filled, every output must equal
//    0.5*sin(0.2*pi*(j*M_SRC - 17.5)) within 2e-3 (checks the fractional-delay response).
module tb_farrow_src;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [25:0]        m_src;
  logic               in_valid;
  logic signed [23:0] in_data;
  logic               out_valid;
  logic signed [24:0] out_data;
  logic signed [16:0] out_phi;

  farrow_src dut (.*);

  localparam int NH = 18;
  localparam int C [4][NH] = '{
    '{   -6,     5,    32,   -33,   -95,   132,   199,  -389,  -300,
        924,   270, -1889,   160,  3545, -1633, -6939,  7502, 31283},
    '{  -12,   -17,    54,    66,  -182,  -156,   493,   259, -1139,
       -269,  2328,   -39, -4411,  1079,  8495, -3751,-23699,-15245},
    '{    8,    -6,   -45,    40,   137,  -166,  -300,   497,   500,
      -1204,  -630,  2524,   500, -4959,   -14, 10830,  5069,-12784},
    '{    5,     8,   -23,   -31,    76,    78,  -207,  -145,   480,
        208,  -989,  -228,  1896,   235, -3637, -1330,  5126,  3933}};

  int checks = 0, failures = 0;
  longint xs[$];
  int nout, nin, idx_d1, idx_d2;
  bit sine_mode;
  real pi = 3.14159265358979;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real coef(int l, int k);
    int i; real s;
    if (k < NH) return real'(C[l][k]) / 65536.0;
    i = 35 - k;
    s = (l % 2 == 1) ? -1.0 : 1.0;
    return s * real'(C[l][i]) / 65536.0;
  endfunction

  always @(posedge clk) begin
    idx_d1 <= in_valid ? nin : -1;
    idx_d2 <= idx_d1;
    if (in_valid) nin <= nin + 1;
    if (rst_n && out_valid) begin
      longint t, nj, phu, phq;
      real phi, y, v, got, ideal;
      t   = longint'(nout) * longint'(m_src);
      nj  = (t + (longint'(1) << 23)) >>> 24;
      phu = (nj << 24) - t;
      phq = (phu + 128) >>> 8;
      phi = real'(phq) / 65536.0;
      got = real'(out_data) / 262144.0;
      if (!sine_mode) begin
        y = 0.0;
        for (int l = 3; l >= 0; l--) begin
          v = 0.0;
          for (int k = 0; k < 36; k++)
            if (nj - k >= 0) v += coef(l, k) * real'(xs[nj-k]) / 262144.0;
          y = y * phi + v;
        end
        checks++;
        if (got - y > 4.0/262144.0 || y - got > 4.0/262144.0 || idx_d2 != int'(nj)) begin
          failures++;
          if (failures < 10) $display("out %0d: got %f exp %f (input %0d, expected %0d)",
                                      nout, got, y, idx_d2, nj);
        end
      end else if (nj >= 40) begin
        ideal = 0.5 * $sin(0.2 * pi * (real'(t) / 16777216.0 - 17.5));
        checks++;
        if (got - ideal > 2e-3 || ideal - got > 2e-3) begin
          failures++;
          if (failures < 10) $display("sine out %0d: got %f ideal %f", nout, got, ideal);
        end
      end
      nout++;
    end
  end

  task automatic run(input real ratio, input bit sine, input int NIN);
    longint exp_out;
    rst_n = 0; sine_mode = sine;
    m_src = 26'($rtoi(ratio * 16777216.0));
    xs.delete(); nout = 0; nin = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < NIN; i++) begin
      @(negedge clk);
      in_valid = 1;
      if (sine) in_data = 24'($rtoi(0.5 * $sin(0.2 * pi * i) * 262144.0));
      else      in_data = 24'(signed'(19'($urandom)));
      xs.push_back(longint'(in_data));
      @(posedge clk);
      #1 in_valid = 0;
      if ($urandom % 3 == 0) @(posedge clk);
    end
    repeat (5) @(posedge clk);
    // outputs j with round(j*M) <= NIN-1
    exp_out = ((longint'(NIN) << 24) - (longint'(1) << 23) - 1) / longint'(m_src) + 1;
    checks++;
    if (nout != int'(exp_out)) begin
      failures++;
      $display("M=%f: %0d outputs, expected %0d", ratio, nout, exp_out);
    end
  endtask

  initial begin
    in_valid = 0; in_data = 0; m_src = 26'd1 << 24;
    run(1.153847, 0, 1500);
    run(1.302083, 0, 1500);
    run(1.01725, 0, 1500);
    run(1.0, 0, 500);
    run(1.999, 0, 1500);
    run(1.153847, 1, 1500);
    run(1.7, 1, 1500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

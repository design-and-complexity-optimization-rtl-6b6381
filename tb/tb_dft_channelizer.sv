// tb_dft_channelizer: self-checking test of the 8-channel DFT filter bank.
//  - random inputs with random gaps in in_valid: every output of every channel is
//    compared with a real-valued model y_k(m) = sum_n h(n) exp(j*2*pi*k*(n-4m)/8)
//    x(4m-n) (the sqrt(2)/2 twiddle taken at its 2^-18 quantised value), allowing
//    1 LSB (2^-19). The test also checks that out_valid follows inputs 0, 4, 8, ...
//    by two clocks and that the number of outputs is right.
//  - a 0.5-amplitude cosine at the centre of channel 3: once the delay line is full,
//    channels 3 and 5 (its mirror) must have magnitude 0.25 * H(0), channel 3 must be
//    a constant (it has been moved to baseband), and all other channels must be below
//    1e-4 (stopband).
module tb_dft_channelizer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               in_valid;
  logic signed [27:0] in_data;
  logic               out_valid;
  logic signed [27:0] out_re [8];
  logic signed [27:0] out_im [8];

  dft_channelizer dut (.*);

  localparam int H [36] = '{
       -2,   -21,   -51,   -95,  -137,  -155,  -120,   -11,   170,
      383,   553,   585,   398,   -29,  -629, -1231, -1596, -1490,
     -777,   483,  2000,  3282,  3767,  3005,   865, -2323, -5741,
    -8217, -8505, -5635,   748, 10178, 21363, 32423, 41296, 46233};
  localparam real LSB = 1.0 / 524288.0;

  int checks = 0, failures = 0;
  longint xs[$];
  int nin, nout, idx_d1, idx_d2;
  bit tone_mode;
  real pi = 3.14159265358979;
  real h0, prev_re, prev_im;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real h(int n);
    return real'(H[(n < 36) ? n : 71 - n]) / 262144.0;
  endfunction

  // twiddle value as the hardware uses it
  function automatic real tw(real v);
    if (v > 0.5 && v < 0.9)   return  185364.0 / 262144.0;
    if (v < -0.5 && v > -0.9) return -185364.0 / 262144.0;
    if (v > -1e-9 && v < 1e-9) return 0.0;
    return v;
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("%s", msg);
  endtask

  always @(posedge clk) begin
    idx_d1 <= in_valid ? nin : -1;
    idx_d2 <= idx_d1;
    if (in_valid) nin <= nin + 1;
    if (rst_n && out_valid) begin
      int base;
      base = 4 * nout;
      checks++;
      if (idx_d2 != base) fail($sformatf("output %0d: came after input %0d, expected %0d",
                                         nout, idx_d2, base));
      for (int k = 0; k < 8; k++) begin
        real yr, yi, gr, gi, mag, ang;
        yr = 0.0; yi = 0.0;
        for (int n = 0; n < 72; n++)
          if (base - n >= 0) begin
            ang = 2.0 * pi * real'(((k * (n - base)) % 8 + 8) % 8) / 8.0;
            yr += h(n) * tw($cos(ang)) * real'(xs[base-n]) * LSB;
            yi += h(n) * tw($sin(ang)) * real'(xs[base-n]) * LSB;
          end
        gr = real'(out_re[k]) * LSB;
        gi = real'(out_im[k]) * LSB;
        if (!tone_mode) begin
          checks++;
          if (gr - yr > LSB || yr - gr > LSB || gi - yi > LSB || yi - gi > LSB)
            fail($sformatf("output %0d ch %0d: got (%f,%f) expected (%f,%f)",
                           nout, k, gr, gi, yr, yi));
        end else if (base >= 72) begin
          mag = $sqrt(gr * gr + gi * gi);
          checks++;
          if (k == 3 || k == 5) begin
            if (mag < 0.25 * h0 - 1e-4 || mag > 0.25 * h0 + 1e-4)
              fail($sformatf("tone: output %0d ch %0d magnitude %f, expected %f",
                             nout, k, mag, 0.25 * h0));
            if (k == 3 && base >= 76) begin
              checks++;
              if ((gr - prev_re) * (gr - prev_re) + (gi - prev_im) * (gi - prev_im) > 1e-8)
                fail($sformatf("tone: output %0d ch 3 moved from (%f,%f) to (%f,%f)",
                               nout, prev_re, prev_im, gr, gi));
            end
          end else if (mag > 1e-4)
            fail($sformatf("tone: output %0d ch %0d leaks %g", nout, k, mag));
          if (k == 3) begin prev_re = gr; prev_im = gi; end
        end
      end
      nout <= nout + 1;
    end
  end

  task automatic run(bit tone, int n, int gap_pct);
    rst_n = 0; in_valid = 0; in_data = '0;
    tone_mode = tone;
    xs.delete();
    nin = 0; nout = 0; idx_d1 = -1; idx_d2 = -1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < n; i++) begin
      longint v;
      while ($urandom_range(99) < gap_pct) begin
        @(negedge clk); in_valid = 0;
      end
      if (tone) v = longint'($rtoi(0.5 * $cos(2.0 * pi * 3.0 * real'(i) / 8.0) * 524288.0));
      else      v = longint'($urandom_range(1048576)) - 524288;
      xs.push_back(v);
      @(negedge clk);
      in_valid = 1;
      in_data  = 28'(v);
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (nout != (n + 3) / 4) fail($sformatf("%0d outputs for %0d inputs", nout, n));
  endtask

  initial begin
    h0 = 0.0;
    for (int n = 0; n < 72; n++) h0 += h(n);
    in_valid = 0; in_data = '0;
    run(0, 600, 0);
    run(0, 600, 40);
    run(1, 400, 0);
    run(1, 400, 30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

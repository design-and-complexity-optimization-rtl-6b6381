// tb_cic_dec: self-checking test of the CIC decimator for every M_CIC from 1 to 16.
// Random full-scale <1/13> samples (with gaps in in_valid) are fed in; each output is
// compared bit-exactly with an exact model: the input convolved with three length-M
// boxcars, divided by M^3, at sample times M-1, 2M-1, ... The test also checks one
// output per M inputs and that out_valid follows the M-th input by one clock.
module tb_cic_dec;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0]         log2m;
  logic               in_valid;
  logic signed [13:0] in_data;
  logic               out_valid;
  logic signed [28:0] out_data;

  cic_dec dut (.*);

  int checks = 0, failures = 0;
  int xs[$];
  int nout;
  int nin;
  logic iv_d;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  // Reference output m for decimation factor M.
  function automatic longint ref_out(int m, int M);
    longint g[];
    longint acc;
    int n;
    g = new[3*M-2];
    foreach (g[j]) g[j] = 0;
    // three-fold convolution of boxcars of length M
    for (int a = 0; a < M; a++)
      for (int b = 0; b < M; b++)
        for (int c = 0; c < M; c++) g[a+b+c]++;
    acc = 0;
    n = m*M + M - 1;
    for (int j = 0; j < 3*M-2; j++)
      if (n - j >= 0) acc += g[j] * longint'(xs[n-j]);
    return acc * (longint'(1) << 12) / (longint'(M)*M*M);
  endfunction

  // Output checker.
  always @(posedge clk) begin
    iv_d <= in_valid;
    if (in_valid) nin <= nin + 1;
    if (rst_n && out_valid) begin
      longint e;
      e = ref_out(nout, 1 << log2m);
      checks++;
      if (longint'(out_data) != e) begin
        failures++;
        if (failures < 10) $display("M=%0d out %0d: got %0d exp %0d", 1<<log2m, nout, out_data, e);
      end
      checks++;
      if (!iv_d || nin != (nout + 1) * (1 << log2m)) begin
        failures++;
        $display("timing: out %0d after %0d inputs, previous cycle valid=%0d", nout, nin, iv_d);
      end
      nout++;
    end
  end

  initial begin
    in_valid = 0; in_data = 0; log2m = 0;
    for (int s = 0; s <= 4; s++) begin
      int M, NS;
      M = 1 << s;
      NS = 40 * M;
      rst_n = 0; log2m = 3'(s); xs.delete(); nout = 0; nin = 0;
      repeat (3) @(posedge clk);
      #1 rst_n = 1;
      for (int i = 0; i < NS; i++) begin
        @(negedge clk);
        in_valid = 1;
        if (i < 8*M) in_data = (i % 2 == 0) ? 14'sh1fff : 14'sh1fff;   // full-scale DC run
        else if (i < 12*M) in_data = 14'sh2000;                       // most negative
        else in_data = 14'($urandom);
        xs.push_back(int'(in_data));
        @(posedge clk);
        #1 in_valid = 0;
        if ($urandom % 4 == 0) @(posedge clk);   // occasional gap
      end
      repeat (4) @(posedge clk);
      checks++;
      if (nout != NS / M) begin
        failures++;
        $display("M=%0d: %0d outputs, expected %0d", M, nout, NS / M);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

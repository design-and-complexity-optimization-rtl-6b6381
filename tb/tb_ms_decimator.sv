// tb_ms_decimator: self-checking test of the programmable multistage decimator for
// 0, 1, 2 and 3 stages. The expected output is built by a software chain of the last
// k filters (integer coefficients, decimate by 2 keeping even samples, half-up rounding
// to each stage's output format), with the input widened where a stage is bypassed.
// Every output is compared bit-exactly, and the number of outputs must be NIN / 2^k.
module tb_ms_decimator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0]         dec_stages;
  logic               in_valid;
  logic signed [20:0] in_data;
  logic               out_valid;
  logic signed [23:0] out_data;

  ms_decimator dut (.*);

  localparam int H1 [4] = '{-331, -450, 2260, 6712};
  localparam int H2 [6] = '{74, 68, -545, -650, 2402, 6844};
  localparam int H3 [9] = '{-88, -176, 341, 1116, -328, -3808, -1794, 11396, 26112};
  localparam int NIN = 2400;

  int checks = 0, failures = 0;
  longint xs[$], exp_q[$];
  int nout;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Decimate-by-2 FIR model; which = 1, 2, 3 selects LPF#1..#3.
  function automatic void fir_model(input int which, ref longint q[$]);
    longint r[$];
    int nt, sh;
    nt = (which == 1) ? 8 : (which == 2) ? 12 : 18;
    sh = (which == 3) ? 16 : 13;
    for (int n = 0; n < q.size(); n += 2) begin
      longint acc = 0;
      for (int k = 0; k < nt; k++) begin
        int i; longint h;
        i = (k < nt/2) ? k : nt - 1 - k;
        h = (which == 1) ? H1[i] : (which == 2) ? H2[i] : H3[i];
        if (n - k >= 0) acc += h * q[n-k];
      end
      r.push_back((acc + (longint'(1) << (sh - 1))) >>> sh);
    end
    q = r;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (nout >= exp_q.size() || longint'(out_data) != exp_q[nout]) begin
        failures++;
        if (failures < 10) $display("stages=%0d out %0d: got %0d", dec_stages, nout, out_data);
      end
      nout++;
    end
  end

  initial begin
    in_valid = 0; in_data = 0;
    for (int k = 0; k <= 3; k++) begin
      rst_n = 0; dec_stages = 2'(k); nout = 0;
      xs.delete();
      for (int i = 0; i < NIN; i++) xs.push_back(longint'(signed'(17'($urandom))));
      // expected chain
      exp_q = xs;
      if (k == 3) fir_model(1, exp_q);
      else        foreach (exp_q[i]) exp_q[i] = exp_q[i] * 2;       // <5/16> -> <5/17>
      if (k >= 2) fir_model(2, exp_q);
      else        foreach (exp_q[i]) exp_q[i] = exp_q[i] * 2;       // <5/17> -> <6/18>
      if (k >= 1) fir_model(3, exp_q);
      repeat (3) @(posedge clk);
      #1 rst_n = 1;
      for (int i = 0; i < NIN; i++) begin
        @(negedge clk);
        in_valid = 1;
        in_data = 21'(xs[i]);
        @(posedge clk);
        #1 in_valid = 0;
        if ($urandom % 4 == 0) @(posedge clk);
      end
      repeat (6) @(posedge clk);
      checks++;
      if (nout != NIN >> k) begin
        failures++;
        $display("stages=%0d: %0d outputs, expected %0d", k, nout, NIN >> k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

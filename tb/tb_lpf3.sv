// tb_lpf3: self-checking test of LPF#3 (18 taps, 2:1 decimation).
// Random inputs in [-1,1) of the <6/18> input format (plus a DC run) are filtered and
// each output is compared bit-exactly with a direct-form convolution by the integer
// coefficients below (units of 2^-16), kept at even sample indices and rounded half-up to
// 18 fractional bits. It also checks one output per two inputs, one clock after the
// kept input.
module tb_lpf3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                    in_valid;
  logic signed [24-1:0]  in_data;
  logic                    out_valid;
  logic signed [24-1:0]  out_data;

  lpf3 dut (.*);

  localparam int NT = 18;
  localparam int HH [NT/2] = '{-88, -176, 341, 1116, -328, -3808, -1794, 11396, 26112};
  localparam int SH = 16;
  localparam int NIN = 3000;

  int checks = 0, failures = 0;
  longint xs[$];
  int nout = 0, nin = 0;
  logic iv_d = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint h(int k);
    return longint'((k < NT/2) ? HH[k] : HH[NT-1-k]);
  endfunction

  function automatic longint expected(int n);
    longint acc = 0;
    for (int k = 0; k < NT; k++)
      if (n - k >= 0) acc += h(k) * xs[n-k];
    return (acc + (longint'(1) << (SH - 1))) >>> SH;
  endfunction

  always @(posedge clk) begin
    iv_d <= in_valid;
    if (in_valid) nin <= nin + 1;
    if (rst_n && out_valid) begin
      longint e;
      e = expected(2 * nout);
      checks++;
      if (longint'(out_data) != e || !iv_d || nin != 2 * nout + 1) begin
        failures++;
        if (failures < 10) $display("out %0d: got %0d exp %0d (inputs %0d)", nout, out_data, e, nin);
      end
      nout++;
    end
  end

  initial begin
    in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < NIN; i++) begin
      @(negedge clk);
      in_valid = 1;
      if (i < 60) in_data = 24'(longint'(1) << 18) - 1;          // DC just below +1
      else in_data = 24'(signed'(19'($urandom)));                 // random in [-1,1)
      xs.push_back(longint'(in_data));
      @(posedge clk);
      #1 in_valid = 0;
      if ($urandom % 3 == 0) @(posedge clk);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (nout != NIN / 2) begin failures++; $display("%0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

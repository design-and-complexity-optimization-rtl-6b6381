// tb_cic_comp: self-checking test of the CIC compensator. Random <4/25> samples within
// [-1,1) are filtered; each output is compared bit-exactly with the direct-form sum
// a*x(n) + b*x(n-1) + a*x(n-2), a = -3/32, b = 38/32, rounded half-up to 16 fractional
// bits. Also checks one output per input, one clock after it.
module tb_cic_comp;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               in_valid;
  logic signed [28:0] in_data;
  logic               out_valid;
  logic signed [20:0] out_data;

  cic_comp dut (.*);

  int checks = 0, failures = 0;
  longint xs[$];
  int nout = 0, nin = 0;
  logic iv_d = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint x_at(int n);
    return (n >= 0) ? xs[n] : 0;
  endfunction

  always @(posedge clk) begin
    iv_d <= in_valid;
    if (in_valid) nin <= nin + 1;
    if (rst_n && out_valid) begin
      longint acc, e;
      acc = -3 * x_at(nout) + 38 * x_at(nout - 1) - 3 * x_at(nout - 2);  // 2^-30 units
      e = (acc + (longint'(1) << 13)) >>> 14;
      checks++;
      if (longint'(out_data) != e || !iv_d || nin != nout + 1) begin
        failures++;
        if (failures < 10) $display("out %0d: got %0d exp %0d", nout, out_data, e);
      end
      nout++;
    end
  end

  initial begin
    in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = 1;
      if (i < 20) in_data = 29'sh1ffffff;                  // near +1 DC
      else in_data = 29'(signed'(26'($urandom)));          // random in [-1,1)
      xs.push_back(longint'(in_data));
      @(posedge clk);
      #1 in_valid = 0;
      if ($urandom % 3 == 0) @(posedge clk);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (nout != 2000) begin failures++; $display("%0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

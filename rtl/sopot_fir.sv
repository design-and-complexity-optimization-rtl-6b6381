// sopot_fir: transposed-form FIR filter with fixed SOPOT (shift-and-add) coefficients.
//
// The filter has N taps with a (anti)symmetric impulse response: the first N/2
// coefficients h(0)..h(N/2-1) are given as SOPOT masks (see srr_pkg) and the rest follow
// from h(N-1-n) = h(n), or h(N-1-n) = -h(n) when ANTISYM is set. Every input sample is
// multiplied by the constants at once (the transposed form), each constant product being a
// sum of shifted copies of the input, so no multiplier is used; the N/2 distinct products
// are each formed once and reused by the mirrored tap. The partial sums move through N-1
// registers towards the output.
//
// Interface: in_data is a signed fixed-point word whose LSB weighs 2^-IN_F; acc_out is the
// full-precision filter output for the current input, LSB 2^-(IN_F+CF), ACC_W bits wide.
// Timing: acc_out is combinational from in_data and the delay line; the delay line
// advances on each cycle where in_valid is high. Reset clears the delay line.
// No rounding happens inside the filter; the caller rounds acc_out.
module sopot_fir #(
  parameter int N       = 8,
  parameter int CF      = 14,
  parameter int IN_W    = 21,
  parameter int ACC_W   = 40,
  parameter bit ANTISYM = 1'b0,
  parameter logic [N/2-1:0][31:0] POS = '0,
  parameter logic [N/2-1:0][31:0] NEG = '0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic signed [ACC_W-1:0] acc_out
);
  localparam int NH = N / 2;

  logic signed [ACC_W-1:0] prod [NH];      // x * h(n), n < N/2
  logic signed [ACC_W-1:0] tap  [N];       // x * h(n), all n
  logic signed [ACC_W-1:0] sreg [1:N-1];   // transposed-form partial sums

  // Constant multiplication as a sum of signed power-of-two terms.
  always_comb begin
    logic signed [ACC_W-1:0] xe;
    xe = ACC_W'(in_data);
    for (int n = 0; n < NH; n++) begin
      prod[n] = '0;
      for (int k = 0; k <= CF; k++) begin
        if (POS[n][k]) prod[n] = prod[n] + (xe <<< k);
        if (NEG[n][k]) prod[n] = prod[n] - (xe <<< k);
      end
    end
    for (int n = 0; n < N; n++) begin
      if (n < NH)       tap[n] = prod[n];
      else if (ANTISYM) tap[n] = -prod[N-1-n];
      else              tap[n] = prod[N-1-n];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 1; n < N; n++) sreg[n] <= '0;
    end else if (in_valid) begin
      for (int n = 1; n < N - 1; n++) sreg[n] <= tap[n] + sreg[n+1];
      sreg[N-1] <= tap[N-1];
    end
  end

  assign acc_out = tap[0] + sreg[1];
endmodule

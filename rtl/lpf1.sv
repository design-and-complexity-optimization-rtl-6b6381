// lpf1: LPF#1 of the multistage decimator, an 8-tap linear-phase low-pass filter with
// SOPOT coefficients followed by 2:1 decimation (passband edge 0.05*pi, stopband edge
// 0.925*pi of its input rate; even length, so it has a zero at pi).
//
// The coefficient terms below are the published SOPOT values of h(0)..h(3), with
// h(n) = h(7-n); the largest term exponent is 2^-14, so the coefficient grid is 2^-14.
// Input <5/16> (compensated-CIC output format), output <5/17>; rounding and timing as in
// fir_dec2: one output per two inputs, one clock after the kept input. The single
// output rounding point is this design's choice.
module lpf1 (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic signed [srr_pkg::CMP_W-1:0] in_data,
  output logic                          out_valid,
  output logic signed [srr_pkg::L1_W-1:0]  out_data
);
  import srr_pkg::*;
  localparam int CF = 14;
  function automatic logic [31:0] t(input int e); return sopot_term(e, CF); endfunction

  localparam logic [3:0][31:0] POS = '{
    0: '0,
    1: t(8),
    2: t(3) | t(7) | t(8) | t(10) | t(12),
    3: t(2) | t(3) | t(5) | t(8)};
  localparam logic [3:0][31:0] NEG = '{
    0: t(6) | t(8) | t(11) | t(13) | t(14),
    1: t(5) | t(13),
    2: '0,
    3: t(11)};

  fir_dec2 #(.N(8), .CF(CF), .IN_I(CMP_I), .IN_F(CMP_F), .OUT_I(L1_I), .OUT_F(L1_F),
             .POS(POS), .NEG(NEG)) u_dec (.*);
endmodule

// lpf2: LPF#2 of the multistage decimator, a 12-tap linear-phase low-pass filter with
// SOPOT coefficients followed by 2:1 decimation (passband edge 0.1*pi, stopband edge
// 0.85*pi of its input rate).
//
// The coefficient terms below are the published SOPOT values of h(0)..h(5), with
// h(n) = h(11-n), on a 2^-14 grid. Input <5/17>, output <6/18>; rounding and timing as in
// fir_dec2: one output per two inputs, one clock after the kept input. The single
// output rounding point is this design's choice.
module lpf2 (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic signed [srr_pkg::L1_W-1:0]  in_data,
  output logic                          out_valid,
  output logic signed [srr_pkg::DEC_W-1:0] out_data
);
  import srr_pkg::*;
  localparam int CF = 14;
  function automatic logic [31:0] t(input int e); return sopot_term(e, CF); endfunction

  localparam logic [5:0][31:0] POS = '{
    0: t(8) | t(11) | t(13),
    1: t(8) | t(12),
    2: '0,
    3: '0,
    4: t(3) | t(6) | t(8) | t(9) | t(13),
    5: t(1)};
  localparam logic [5:0][31:0] NEG = '{
    0: '0,
    1: '0,
    2: t(5) | t(9) | t(14),
    3: t(5) | t(7) | t(11) | t(13),
    4: '0,
    5: t(4) | t(6) | t(8) | t(12)};

  fir_dec2 #(.N(12), .CF(CF), .IN_I(L1_I), .IN_F(L1_F), .OUT_I(DEC_I), .OUT_F(DEC_F),
             .POS(POS), .NEG(NEG)) u_dec (.*);
endmodule

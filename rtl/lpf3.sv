// lpf3: LPF#3 of the multistage decimator, an 18-tap linear-phase low-pass filter with
// SOPOT coefficients followed by 2:1 decimation (passband edge 0.2*pi, stopband edge
// 0.7*pi of its input rate). It is the last decimation stage and the only one used when
// a single stage is selected.
//
// The coefficient terms below are the published SOPOT values of h(0)..h(8), with
// h(n) = h(17-n), on a 2^-16 grid. Input and output <6/18>; rounding and timing as in
// fir_dec2: one output per two inputs, one clock after the kept input. The single
// output rounding point is this design's choice.
module lpf3 (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic signed [srr_pkg::DEC_W-1:0] in_data,
  output logic                          out_valid,
  output logic signed [srr_pkg::DEC_W-1:0] out_data
);
  import srr_pkg::*;
  localparam int CF = 16;
  function automatic logic [31:0] t(input int e); return sopot_term(e, CF); endfunction

  localparam logic [8:0][31:0] POS = '{
    0: '0,
    1: '0,
    2: t(8) | t(10) | t(12) | t(14) | t(16),
    3: t(6) | t(10) | t(11),
    4: '0,
    5: t(8) | t(11),
    6: t(8),
    7: t(3) | t(5) | t(6) | t(9) | t(14),
    8: t(2) | t(3) | t(6) | t(7)};
  localparam logic [8:0][31:0] NEG = '{
    0: t(10) | t(12) | t(13),
    1: t(9) | t(11) | t(12),
    2: '0,
    3: t(14),
    4: t(8) | t(10) | t(13),
    5: t(4),
    6: t(5) | t(15),
    7: '0,
    8: '0};

  fir_dec2 #(.N(18), .CF(CF), .IN_I(DEC_I), .IN_F(DEC_F), .OUT_I(DEC_I), .OUT_F(DEC_F),
             .POS(POS), .NEG(NEG)) u_dec (.*);
endmodule

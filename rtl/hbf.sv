// hbf: output filter of the receiver, a 48-tap linear-phase low-pass filter with
// passband edge 0.4*pi and stopband edge 0.6*pi (edges symmetric about pi/2, hence the
// name half-band filter), followed by the final 2:1 decimation.
//
// Its coefficients are this design's own: an equiripple even-length design for those
// edges (about 0.005 dB passband ripple, 86 dB stopband attenuation after quantisation),
// rounded to a 2^-16 grid and recoded to canonical signed digits, so the filter is
// multiplier-free like the other fixed filters. Only h(0)..h(23) are listed; h(n) = h(47-n).
// Input <7/18>, output <9/19> (the receiver output); rounding and timing as in fir_dec2:
// one output per two inputs, one clock after the kept input.
module hbf (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic signed [srr_pkg::SRC_W-1:0] in_data,
  output logic                          out_valid,
  output logic signed [srr_pkg::OUT_W-1:0] out_data
);
  import srr_pkg::*;
  localparam int CF = 16;
  localparam int NH = 24;
  localparam int H [NH] = '{
        3,    20,    25,   -26,   -68,    33,   150,   -25,
     -285,   -13,   489,   104,  -785,  -282,  1203,   602,
    -1802, -1169,  2731,  2260, -4491, -5015, 10336, 28791};

  function automatic logic [NH-1:0][31:0] mk_pos();
    for (int n = 0; n < NH; n++) mk_pos[n] = csd_pos(H[n]);
  endfunction
  function automatic logic [NH-1:0][31:0] mk_neg();
    for (int n = 0; n < NH; n++) mk_neg[n] = csd_neg(H[n]);
  endfunction

  fir_dec2 #(.N(2*NH), .CF(CF), .IN_I(SRC_I), .IN_F(SRC_F), .OUT_I(OUT_I), .OUT_F(OUT_F),
             .POS(mk_pos()), .NEG(mk_neg())) u_dec (.*);
endmodule

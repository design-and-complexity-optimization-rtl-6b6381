// ms_decimator: programmable multistage decimator, three 2:1 anti-aliasing stages
// (LPF#1, LPF#2, LPF#3) with bypass multiplexers, giving an overall decimation of
// 2^dec_stages with dec_stages = 0..3.
//
// The multiplexer after each stage chooses between that stage's output and the
// decimator input, so the input can enter the chain in front of LPF#1, LPF#2 or LPF#3
// or skip it: with k stages the last k filters are used (LPF#3 alone, LPF#2+LPF#3, or
// all three). Filters that are not used see no valid samples. Formats: input <5/16>,
// LPF#1 output <5/17>, LPF#2/#3 and decimator output <6/18>; when the input bypasses a
// filter it is widened to the next format (sign extension and zero fractional bits).
//
// Interface: in_valid/in_data, dec_stages (hold stable; change under reset),
// out_valid/out_data. Timing: one output per 2^dec_stages inputs; each used stage adds
// one clock of latency, the bypass none.
module ms_decimator (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [1:0]                       dec_stages,
  input  logic                             in_valid,
  input  logic signed [srr_pkg::CMP_W-1:0] in_data,
  output logic                             out_valid,
  output logic signed [srr_pkg::DEC_W-1:0] out_data
);
  import srr_pkg::*;

  logic                    use1, use2, use3;
  logic                    l1_iv, l2_iv, l3_iv, l1_ov, l2_ov, l3_ov;
  logic signed [L1_W-1:0]  l1_out, l2_in;
  logic signed [DEC_W-1:0] l2_out, l3_in, l3_out;
  logic signed [L1_W-1:0]  in_l1;    // input in <5/17>
  logic signed [DEC_W-1:0] in_dec;   // input in <6/18>

  assign use1 = (dec_stages == 2'd3);
  assign use2 = (dec_stages >= 2'd2);
  assign use3 = (dec_stages >= 2'd1);

  assign in_l1  = L1_W'(in_data)  <<< (L1_F - CMP_F);
  assign in_dec = DEC_W'(in_data) <<< (DEC_F - CMP_F);

  // Stage 1
  assign l1_iv = in_valid && use1;
  lpf1 u_lpf1 (.clk, .rst_n, .in_valid(l1_iv), .in_data(in_data),
               .out_valid(l1_ov), .out_data(l1_out));

  // MUX 1 -> stage 2
  assign l2_iv = use1 ? l1_ov  : (in_valid && use2);
  assign l2_in = use1 ? l1_out : in_l1;
  lpf2 u_lpf2 (.clk, .rst_n, .in_valid(l2_iv), .in_data(l2_in),
               .out_valid(l2_ov), .out_data(l2_out));

  // MUX 2 -> stage 3
  assign l3_iv = use2 ? l2_ov  : (in_valid && use3);
  assign l3_in = use2 ? l2_out : in_dec;
  lpf3 u_lpf3 (.clk, .rst_n, .in_valid(l3_iv), .in_data(l3_in),
               .out_valid(l3_ov), .out_data(l3_out));

  // MUX 3 -> output
  assign out_valid = use3 ? l3_ov  : in_valid;
  assign out_data  = use3 ? l3_out : in_dec;
endmodule

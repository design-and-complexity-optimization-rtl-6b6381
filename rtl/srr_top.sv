// srr_top: digital IF of a multi-standard software-radio receiver. It takes 14-bit IF
// samples from the ADC at the full input rate (80 Msps in the reference system) and
// returns the selected channel at a lower, arbitrary rate,
//
//     M* = M_CIC * M_SRC * 2^k,   k = dec_stages + 1,
//
// through a chain of mostly multiplier-free fixed filters:
//   1. compensated CIC: 3-stage CIC decimator by M_CIC = 1..16 (cic_dec) followed by the
//      second-order droop compensator (cic_comp); bypassed when cfg.cic_en = 0;
//   2. multistage decimator: 0..3 stages of 2:1 decimation (ms_decimator);
//   3. VDF-based SRC: Farrow fractional-delay filter resampling by M_SRC in [1,2)
//      (farrow_src); bypassed when cfg.src_en = 0;
//   4. half-band output filter with the final 2:1 decimation (hbf);
//   5. 8-channel oversampled DFT filter bank on the receiver output (dft_channelizer):
//      when the chain is set up for a block of eight adjacent channels, it splits that
//      block into eight baseband channels, each decimated by 4 (ch_* outputs).
// The only general multipliers are the three in the SRC. The two bypass multiplexers
// and the three in the decimator select the configuration: GSM uses M_CIC=16, three
// LPF stages and the SRC; Hiperlan/2 uses LPF#3 and the HBF only (M* = 4).
//
// Formats: input <1/13>, compensated CIC output <5/16>, decimator output <6/18>, SRC
// output <7/18>, receiver output <9/19>. A bypassed stage's input is widened to the
// format of the stage output it replaces.
//
// Interface: cfg (srr_pkg::srr_cfg_t) is static: set it while rst_n is low and keep it.
// in_valid qualifies in_data (one sample per clock at most); out_valid qualifies
// out_data; ch_valid qualifies the eight complex channel outputs ch_re/ch_im, one
// per fourth receiver output. All blocks run on one clock, lower-rate stages being enabled by the valid
// strobes of the stage before them. Latency from the input to the output is a few
// clocks plus the filters' group delays.
module srr_top (
  input  logic                             clk,
  input  logic                             rst_n,
  input  srr_pkg::srr_cfg_t                cfg,
  input  logic                             in_valid,
  input  logic signed [srr_pkg::ADC_W-1:0] in_data,
  output logic                             out_valid,
  output logic signed [srr_pkg::OUT_W-1:0] out_data,
  output logic                             ch_valid,
  output logic signed [srr_pkg::OUT_W-1:0] ch_re [8],
  output logic signed [srr_pkg::OUT_W-1:0] ch_im [8]
);
  import srr_pkg::*;

  // Compensated CIC filter.
  logic                    cic_iv, cic_ov, cmp_ov;
  logic signed [CIC_W-1:0] cic_out;
  logic signed [CMP_W-1:0] cmp_out;

  assign cic_iv = in_valid && cfg.cic_en;
  cic_dec #(.L(3), .MAXS(4), .IN_I(ADC_I), .IN_F(ADC_F), .OUT_I(CIC_I)) u_cic (
    .clk, .rst_n, .log2m(cfg.cic_log2m), .in_valid(cic_iv), .in_data,
    .out_valid(cic_ov), .out_data(cic_out));
  cic_comp u_comp (.clk, .rst_n, .in_valid(cic_ov), .in_data(cic_out),
                   .out_valid(cmp_ov), .out_data(cmp_out));

  // MUX: compensated CIC or ADC samples widened to <5/16>.
  logic                    dec_iv;
  logic signed [CMP_W-1:0] dec_in;
  assign dec_iv = cfg.cic_en ? cmp_ov  : in_valid;
  assign dec_in = cfg.cic_en ? cmp_out : (CMP_W'(in_data) <<< (CMP_F - ADC_F));

  // Multistage decimator.
  logic                    dec_ov;
  logic signed [DEC_W-1:0] dec_out;
  ms_decimator u_dec (.clk, .rst_n, .dec_stages(cfg.dec_stages), .in_valid(dec_iv),
                      .in_data(dec_in), .out_valid(dec_ov), .out_data(dec_out));

  // VDF-based SRC.
  logic                    src_iv, src_ov;
  logic signed [SRC_W-1:0] src_out;
  assign src_iv = dec_ov && cfg.src_en;
  farrow_src u_src (.clk, .rst_n, .m_src(cfg.m_src), .in_valid(src_iv), .in_data(dec_out),
                    .out_valid(src_ov), .out_data(src_out), .out_phi());

  // MUX: SRC output or decimator output widened to <7/18>.
  logic                    hbf_iv;
  logic signed [SRC_W-1:0] hbf_in;
  assign hbf_iv = cfg.src_en ? src_ov  : dec_ov;
  assign hbf_in = cfg.src_en ? src_out : SRC_W'(dec_out);

  // Half-band filter and final 2:1 decimation.
  hbf u_hbf (.clk, .rst_n, .in_valid(hbf_iv), .in_data(hbf_in),
             .out_valid, .out_data);

  // Multichannel output: DFT filter bank on the receiver output.
  dft_channelizer u_dft (.clk, .rst_n, .in_valid(out_valid), .in_data(out_data),
                         .out_valid(ch_valid), .out_re(ch_re), .out_im(ch_im));
endmodule

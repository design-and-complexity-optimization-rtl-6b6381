// cic_dec: L-stage cascaded integrator-comb (CIC) decimator with a programmable
// decimation factor M_CIC = 2^log2m, 1 <= M_CIC <= 2^MAXS (16 by default), and unity DC gain.
//
// Structure: L integrators at the input rate, a downsampler by M_CIC, then L combs
// (differential delay 1) at the output rate. Instead of one (1/M_CIC)^L scaling at the
// end, every integrator has a programmable shifter in front of it that divides its input
// by M_CIC (a right shift by log2m). Each integrator keeps MAXS more fractional bits than
// the one before it, so the shifts never drop a bit: with a <1/13> input the integrators
// carry 17, 21 and 25 fractional bits and the output 25. The result is exact (no
// round-off) for every M_CIC.
//
// Wrap-around: integrators overflow by design and the arithmetic is modulo the register
// size. Because a division by M_CIC follows each integrator, a wrap in integrator k is
// only harmless if integrator k keeps log2(M_CIC) more integer bits than integrator k+1.
// Integrator k therefore has 1+(L-k)*MAXS integer bits (<9/17>, <5/21>, <1/25> by
// default), every register is 1+IN_F+L*MAXS = 26 bits, and the combs work modulo 2 in
// value. Since the filter has unity DC gain the true output lies in [-1,1) and is
// recovered exactly; it is sign-extended to the <4/25> output format. The larger integer
// parts of the first two integrators and the 26-bit combs are this design's choice; the
// fractional widths and the output format follow the CIC wordlength plan.
//
// Interface: in_valid/in_data (<1/13>), log2m (hold stable; change under reset),
// out_valid/out_data (<4/25>). Timing: one output per M_CIC accepted inputs; out_valid
// pulses one clock after the M_CIC-th input, the first one after inputs 0..M_CIC-1.
module cic_dec #(
  parameter int L    = 3,
  parameter int MAXS = 4,
  parameter int IN_I = 1,
  parameter int IN_F = 13,
  parameter int OUT_I = 4
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [2:0]                        log2m,
  input  logic                              in_valid,
  input  logic signed [IN_I+IN_F-1:0]       in_data,
  output logic                              out_valid,
  output logic signed [OUT_I+IN_F+L*MAXS-1:0] out_data
);
  localparam int W     = IN_I + IN_F + L * MAXS;   // every integrator and comb register
  localparam int OUT_W = OUT_I + IN_F + L * MAXS;

  logic signed [W-1:0] integ [L];
  logic signed [W-1:0] isum  [L];
  logic signed [W-1:0] comb_d [L];
  logic signed [W-1:0] csum  [L];
  logic signed [W-1:0] cin   [L];
  logic [MAXS-1:0]     cnt;
  logic [MAXS-1:0]     last;
  logic [2:0]          s;

  assign s    = (log2m > 3'(MAXS)) ? 3'(MAXS) : log2m;
  assign last = MAXS'((1 << s) - 1);

  // Integrator section: shifter S_k (divide by M_CIC, no bits lost) then accumulate.
  // Comb section: differences on the decimated stream.
  for (genvar k = 0; k < L; k++) begin : g_stage
    logic signed [W-1:0] src;
    if (k == 0) begin : g_first
      assign src = W'(in_data);
      assign cin[k] = isum[L-1];
    end else begin : g_next
      assign src = isum[k-1];
      assign cin[k] = csum[k-1];
    end
    assign isum[k] = integ[k] + (src <<< (MAXS - int'(s)));
    assign csum[k] = cin[k] - comb_d[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < L; k++) begin
        integ[k]  <= '0;
        comb_d[k] <= '0;
      end
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int k = 0; k < L; k++) integ[k] <= isum[k];
        if (cnt == last) begin
          cnt <= '0;
          for (int k = 0; k < L; k++) comb_d[k] <= cin[k];
          out_valid <= 1'b1;
          out_data  <= OUT_W'(csum[L-1]);
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule

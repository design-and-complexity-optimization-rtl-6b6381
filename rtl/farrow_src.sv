// farrow_src: sampling-rate converter with an arbitrary ratio M_SRC in [1, 2), built on a
// variable fractional-delay filter (VDF) in Farrow form.
//
// The VDF is H(z, phi) = sum_l C_l(z) phi^l with L = 4 subfilters C_l(z) of length 36;
// its group delay is D + phi with D = 17.5 and phi in [-0.5, 0.5]. The subfilters are
// transposed-form SOPOT filters sharing one input (sopot_fir); C_0 and C_2 are
// symmetric, C_1 and C_3 antisymmetric, so only 18 coefficients each are stored. The
// polynomial in phi is evaluated by Horner's rule with L-1 = 3 general multipliers:
// y = ((v3*phi + v2)*phi + v1)*phi + v0.
//
// Timing control: output j is wanted at input time t_j = j*M_SRC. A phase register d
// holds t_j - n for the current input n. When d < 0.5 the output is produced from this
// input with phi = -d (so it lands on t_j, delayed by D samples) and d advances by
// M_SRC - 1; otherwise the input produces no output and d drops by 1. As M_SRC >= 1, an
// input never produces two outputs, and as M_SRC < 2 no two consecutive inputs are
// skipped.
//
// The subfilter coefficients are this design's own: a weighted least-squares design
// for passband 0.4*pi, stopband 0.7*pi, phi in [-0.5,0.5] (about -57 dB complex passband
// error and 84 dB stopband attenuation after quantisation), rounded to a 2^-16 grid and
// recoded to canonical signed digits. Word formats: input <6/18>, subfilter outputs
// rounded to <9/18>, phi a signed 17-bit word with 16 fractional bits, Horner products
// rounded to 18 fractional bits, output <7/18>. M_SRC is an unsigned <2/24> word (hold
// stable; change under reset). The internal formats are this design's choice.
//
// Interface: in_valid/in_data, m_src, out_valid/out_data, plus out_phi (the phi used,
// for observation). Timing: out_valid pulses two clocks after an input that produces an
// output: one clock for the subfilters and phase, one for the Horner evaluation.
module farrow_src #(
  parameter int PHI_F = 16,
  parameter int VF    = 18
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [srr_pkg::MU_W-1:0]         m_src,
  input  logic                             in_valid,
  input  logic signed [srr_pkg::DEC_W-1:0] in_data,
  output logic                             out_valid,
  output logic signed [srr_pkg::SRC_W-1:0] out_data,
  output logic signed [PHI_F:0]            out_phi
);
  import srr_pkg::*;

  localparam int N   = 36;
  localparam int NH  = N / 2;
  localparam int L   = 4;
  localparam int CF  = 16;
  localparam int ACC_W = DEC_I + 3 + DEC_F + CF;     // full-precision subfilter output
  localparam int V_W   = DEC_I + 3 + VF;             // rounded subfilter output <9/18>
  localparam int PHI_W = PHI_F + 1;
  localparam int D_W   = MU_F + 3;                   // phase register, <3/24> signed

  // Subfilter coefficients c_l(n), n = 0..17, on the 2^-16 grid.
  localparam int C [L][NH] = '{
    '{   -6,     5,    32,   -33,   -95,   132,   199,  -389,  -300,
        924,   270, -1889,   160,  3545, -1633, -6939,  7502, 31283},
    '{  -12,   -17,    54,    66,  -182,  -156,   493,   259, -1139,
       -269,  2328,   -39, -4411,  1079,  8495, -3751,-23699,-15245},
    '{    8,    -6,   -45,    40,   137,  -166,  -300,   497,   500,
      -1204,  -630,  2524,   500, -4959,   -14, 10830,  5069,-12784},
    '{    5,     8,   -23,   -31,    76,    78,  -207,  -145,   480,
        208,  -989,  -228,  1896,   235, -3637, -1330,  5126,  3933}};

  function automatic logic [NH-1:0][31:0] mk_pos(input int l);
    for (int n = 0; n < NH; n++) mk_pos[n] = csd_pos(C[l][n]);
  endfunction
  function automatic logic [NH-1:0][31:0] mk_neg(input int l);
    for (int n = 0; n < NH; n++) mk_neg[n] = csd_neg(C[l][n]);
  endfunction

  logic signed [ACC_W-1:0] acc  [L];
  logic signed [V_W-1:0]   vrnd [L];
  logic signed [V_W-1:0]   v_q  [L];
  logic signed [PHI_W-1:0] phi_q, phi_new;
  logic                    emit_q;
  logic signed [D_W-1:0]   d, d_m1, d_emit, neg_d;
  logic                    emit;

  for (genvar l = 0; l < L; l++) begin : g_sub
    sopot_fir #(.N(N), .CF(CF), .IN_W(DEC_W), .ACC_W(ACC_W), .ANTISYM(l % 2 == 1),
                .POS(mk_pos(l)), .NEG(mk_neg(l))) u_c (
      .clk, .rst_n, .in_valid, .in_data, .acc_out(acc[l]));
    assign vrnd[l] = V_W'((acc[l] + (ACC_W'(1) <<< (CF - 1))) >>> CF);
  end

  // Phase control.
  localparam logic signed [D_W-1:0] HALF = D_W'(1) <<< (MU_F - 1);
  localparam logic signed [D_W-1:0] ONE  = D_W'(1) <<< MU_F;
  assign emit    = (d < HALF);
  assign d_m1    = d - ONE;
  assign d_emit  = d + D_W'(m_src) - ONE;
  assign neg_d   = -d;
  assign phi_new = PHI_W'((neg_d + (D_W'(1) <<< (MU_F - PHI_F - 1))) >>> (MU_F - PHI_F));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d      <= '0;
      emit_q <= 1'b0;
      phi_q  <= '0;
      for (int l = 0; l < L; l++) v_q[l] <= '0;
    end else begin
      emit_q <= in_valid && emit;
      if (in_valid) begin
        d <= emit ? d_emit : d_m1;
        if (emit) begin
          phi_q <= phi_new;
          for (int l = 0; l < L; l++) v_q[l] <= vrnd[l];
        end
      end
    end
  end

  // Horner evaluation of sum_l v_l * phi^l (interpolation part).
  localparam int P_W = V_W + PHI_W;
  logic signed [V_W-1:0] hz [L];
  for (genvar l = L - 1; l >= 0; l--) begin : g_horner
    if (l == L - 1) begin : g_top
      assign hz[l] = v_q[l];
    end else begin : g_step
      logic signed [P_W-1:0] prod;
      assign prod  = hz[l+1] * phi_q;
      assign hz[l] = V_W'((prod + (P_W'(1) <<< (PHI_F - 1))) >>> PHI_F) + v_q[l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_phi   <= '0;
    end else begin
      out_valid <= emit_q;
      if (emit_q) begin
        out_data <= SRC_W'(hz[0]);
        out_phi  <= phi_q;
      end
    end
  end

  logic fits;
  assign fits = (hz[0] == V_W'(signed'(SRC_W'(hz[0]))));
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) emit_q |-> fits)
    else $error("farrow_src: output overflows <%0d/%0d>", SRC_I, SRC_F);
endmodule

// dft_channelizer: 8-channel oversampled DFT filter bank that splits the receiver
// output into eight adjacent channels at once, each decimated by 4 (= channels / 2,
// i.e. oversampled by 2). Channel k is centred on w_k = 2*pi*k/8 and is returned at
// baseband as a complex sample stream.
//
// How it works (polyphase form): with a low-pass prototype h(n) of length 72, the output
// of channel k at output time m is
//     y_k(m) = (-1)^(k*m) * sum_p W^(k*p) * u_p(m),   W = exp(j*2*pi/8),
//     u_p(m) = sum_q h(8q+p) * x(4m - 8q - p),        p = 0..7, q = 0..8.
// The eight polyphase branches u_p are evaluated from a 72-sample delay line every
// fourth input. The 8-point inverse DFT then combines them, and the factor
// (-1)^(k*m) = exp(-j*4*m*w_k) moves each channel to baseband. The DFT twiddles are
// 0, +-1 and +-sqrt(2)/2, so the only constant product is one multiplication by
// sqrt(2)/2 per output. The prototype coefficients and sqrt(2)/2 are SOPOT
// (canonical-signed-digit) constants, so the bank needs no general multiplier.
//
// The prototype is this design's own equiripple design for passband edge pi/8 and
// stopband edge pi/4: passband deviation 0.00084, stopband 4.9e-5 (86 dB), on a 2^-18
// grid; h(n) = h(71-n), and only h(0)..h(35) are listed. The channel count (8), the
// decimation (4) and the prototype band edges follow the reference channelizer. The
// delay-line evaluation, the single rounding and the formats are this design's choice.
//
// Interface: in_valid/in_data (<9/19>, the receiver output). out_valid with out_re[k] /
// out_im[k] (<9/19>) for k = 0..7. The input is real, so channels 0 and 4 (centred on
// 0 and pi) are real too: out_im[0] and out_im[4] are always zero and are kept only to
// give every channel the same port shape. Timing: outputs are produced for inputs 0, 4, 8, ...
// counted from reset; out_valid pulses two clocks after such an input (branch sums are
// registered, then the DFT result).
module dft_channelizer (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             in_valid,
  input  logic signed [srr_pkg::OUT_W-1:0] in_data,
  output logic                             out_valid,
  output logic signed [srr_pkg::OUT_W-1:0] out_re [8],
  output logic signed [srr_pkg::OUT_W-1:0] out_im [8]
);
  import srr_pkg::*;

  localparam int M   = 8;          // channels
  localparam int DEC = M / 2;      // decimation
  localparam int N   = 72;         // prototype length
  localparam int NH  = N / 2;
  localparam int CF  = 18;         // coefficient grid 2^-18
  localparam int XW  = OUT_W;
  localparam int UW  = OUT_I + 2 + OUT_F + CF;       // branch sums, LSB 2^-(19+18)
  localparam int YW  = UW + CF + 3;                  // DFT sums, LSB 2^-(19+36)
  localparam int SH  = 2 * CF;                       // rounding back to 2^-19

  localparam int H [NH] = '{
       -2,   -21,   -51,   -95,  -137,  -155,  -120,   -11,   170,
      383,   553,   585,   398,   -29,  -629, -1231, -1596, -1490,
     -777,   483,  2000,  3282,  3767,  3005,   865, -2323, -5741,
    -8217, -8505, -5635,   748, 10178, 21363, 32423, 41296, 46233};
  localparam int C45 = 185364;     // sqrt(2)/2 on the 2^-18 grid

  localparam logic [31:0] C45_POS = csd_pos(C45);
  localparam logic [31:0] C45_NEG = csd_neg(C45);

  function automatic logic [NH-1:0][31:0] mk_pos();
    for (int n = 0; n < NH; n++) mk_pos[n] = csd_pos(H[n]);
  endfunction
  function automatic logic [NH-1:0][31:0] mk_neg();
    for (int n = 0; n < NH; n++) mk_neg[n] = csd_neg(H[n]);
  endfunction
  localparam logic [NH-1:0][31:0] HPOS = mk_pos();
  localparam logic [NH-1:0][31:0] HNEG = mk_neg();

  // cos(pi*r/4) coded as 2: +1, -2: -1, 1: +sqrt(2)/2, -1: -sqrt(2)/2, 0: 0.
  function automatic int cos_code(input int r);
    case (r % 8)
      0: return 2;   1: return 1;   2: return 0;   3: return -1;
      4: return -2;  5: return -1;  6: return 0;   default: return 1;
    endcase
  endfunction
  function automatic int sin_code(input int r);
    return cos_code((r + 6) % 8);
  endfunction

  logic signed [XW-1:0] xd   [N-1];   // delay line, xd[i] = x(n-1-i)
  logic signed [XW-1:0] win  [N];     // window for this input, win[i] = x(n-i)
  logic signed [UW-1:0] u    [M];
  logic signed [UW-1:0] u_q  [M];
  logic [1:0]           cnt;
  logic                 m_odd, m_odd_q, u_valid;

  always_comb begin
    win[0] = in_data;
    for (int i = 1; i < N; i++) win[i] = xd[i-1];
    // polyphase branch sums with SOPOT constants
    for (int p = 0; p < M; p++) begin
      u[p] = '0;
      for (int q = 0; q < N / M; q++) begin
        int n, hi;
        logic signed [UW-1:0] xe;
        n  = M * q + p;
        hi = (n < NH) ? n : N - 1 - n;
        xe = UW'(win[n]);
        for (int b = 0; b <= CF; b++) begin
          if (HPOS[hi][b]) u[p] = u[p] + (xe <<< b);
          if (HNEG[hi][b]) u[p] = u[p] - (xe <<< b);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N - 1; i++) xd[i] <= '0;
      for (int p = 0; p < M; p++) u_q[p] <= '0;
      cnt     <= '0;
      m_odd   <= 1'b0;
      m_odd_q <= 1'b0;
      u_valid <= 1'b0;
    end else begin
      u_valid <= in_valid && (cnt == 2'd0);
      if (in_valid) begin
        xd[0] <= in_data;
        for (int i = 1; i < N - 1; i++) xd[i] <= xd[i-1];
        cnt <= (cnt == 2'(DEC - 1)) ? 2'd0 : cnt + 2'd1;
        if (cnt == 2'd0) begin
          for (int p = 0; p < M; p++) u_q[p] <= u[p];
          m_odd_q <= m_odd;
          m_odd   <= !m_odd;
        end
      end
    end
  end

  // 8-point inverse DFT of the branch sums, baseband shift and rounding.
  logic signed [YW-1:0] yre [M];
  logic signed [YW-1:0] yim [M];
  always_comb begin
    for (int k = 0; k < M; k++) begin
      logic signed [YW-1:0] a_re, b_re, a_im, b_im, c_re, c_im, t_re, t_im;
      a_re = '0; b_re = '0; a_im = '0; b_im = '0;
      for (int p = 0; p < M; p++) begin
        case (cos_code(k * p))
          2:  a_re = a_re + YW'(u_q[p]);
          -2: a_re = a_re - YW'(u_q[p]);
          1:  b_re = b_re + YW'(u_q[p]);
          -1: b_re = b_re - YW'(u_q[p]);
          default: ;
        endcase
        case (sin_code(k * p))
          2:  a_im = a_im + YW'(u_q[p]);
          -2: a_im = a_im - YW'(u_q[p]);
          1:  b_im = b_im + YW'(u_q[p]);
          -1: b_im = b_im - YW'(u_q[p]);
          default: ;
        endcase
      end
      // b * sqrt(2)/2 as a sum of signed power-of-two terms
      c_re = '0; c_im = '0;
      for (int b = 0; b <= CF; b++) begin
        if (C45_POS[b]) begin c_re = c_re + (b_re <<< b); c_im = c_im + (b_im <<< b); end
        if (C45_NEG[b]) begin c_re = c_re - (b_re <<< b); c_im = c_im - (b_im <<< b); end
      end
      t_re = (a_re <<< CF) + c_re;
      t_im = (a_im <<< CF) + c_im;
      if (m_odd_q && (k % 2 == 1)) begin
        t_re = -t_re;
        t_im = -t_im;
      end
      yre[k] = (t_re + (YW'(1) <<< (SH - 1))) >>> SH;
      yim[k] = (t_im + (YW'(1) <<< (SH - 1))) >>> SH;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < M; k++) begin
        out_re[k] <= '0;
        out_im[k] <= '0;
      end
    end else begin
      out_valid <= u_valid;
      if (u_valid) begin
        for (int k = 0; k < M; k++) begin
          out_re[k] <= OUT_W'(yre[k]);
          out_im[k] <= OUT_W'(yim[k]);
        end
      end
    end
  end
endmodule

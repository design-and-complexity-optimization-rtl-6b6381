// srr_pkg: shared types, sample formats and helper functions of the digital IF
// (software-radio receiver front end).
//
// Sample formats are written <I/F>: I integer bits including the sign, F fractional
// bits, two's complement, so a <I/F> word is I+F bits wide and its LSB weighs 2^-F.
// The stage-boundary formats below are the ones the receiver uses between blocks:
// 14-bit <1/13> ADC samples, <4/25> out of the CIC, <5/16> out of the compensated
// CIC, <5/17> after LPF#1, <6/18> after LPF#2/LPF#3, <7/18> out of the SRC and
// <9/19> at the receiver output.
//
// Fixed coefficients are held as sum-of-power-of-two (SOPOT) terms: a pair of masks
// POS/NEG over CF+1 bits in which bit k stands for the term +2^(k-CF) or -2^(k-CF).
// sopot_term() builds a one-term mask from the exponent printed in a coefficient
// table; csd_pos()/csd_neg() turn an integer coefficient (in units of 2^-CF) into its
// canonical-signed-digit SOPOT masks when a table is given as integers.
package srr_pkg;

  // Stage-boundary formats (integer bits, fractional bits).
  localparam int ADC_I  = 1, ADC_F  = 13;  // ADC sample <1/13>
  localparam int CIC_I  = 4, CIC_F  = 25;  // CIC output <4/25>
  localparam int CMP_I  = 5, CMP_F  = 16;  // compensated CIC output <5/16>
  localparam int L1_I   = 5, L1_F   = 17;  // LPF#1 output <5/17>
  localparam int DEC_I  = 6, DEC_F  = 18;  // LPF#2, LPF#3, decimator output <6/18>
  localparam int SRC_I  = 7, SRC_F  = 18;  // SRC output <7/18>
  localparam int OUT_I  = 9, OUT_F  = 19;  // receiver output <9/19>

  localparam int ADC_W = ADC_I + ADC_F;
  localparam int CIC_W = CIC_I + CIC_F;
  localparam int CMP_W = CMP_I + CMP_F;
  localparam int L1_W  = L1_I + L1_F;
  localparam int DEC_W = DEC_I + DEC_F;
  localparam int SRC_W = SRC_I + SRC_F;
  localparam int OUT_W = OUT_I + OUT_F;

  // SRC timing-control word: M_SRC as an unsigned <2/MU_F> number in [1, 2).
  localparam int MU_F = 24;
  localparam int MU_W = MU_F + 2;

  // Receiver configuration. Static while the receiver runs; change it under reset.
  typedef struct packed {
    logic              cic_en;      // 1: use the compensated CIC, 0: bypass it
    logic [2:0]        cic_log2m;   // log2(M_CIC), 0..4
    logic [1:0]        dec_stages;  // number of 2:1 LPF stages used, 0..3
    logic              src_en;      // 1: use the SRC, 0: bypass it
    logic [MU_W-1:0]   m_src;       // M_SRC, unsigned <2/24>, 1 <= M_SRC < 2
  } srr_cfg_t;

  // One-term SOPOT mask for the term 2^-e, coefficient grid 2^-cf.
  function automatic logic [31:0] sopot_term(input int e, input int cf);
    return 32'(1) << (cf - e);
  endfunction

  // Canonical-signed-digit recoding of an integer coefficient: positive digits.
  function automatic logic [31:0] csd_pos(input int v);
    logic [31:0] p;
    int x;
    p = '0;
    x = v;
    for (int k = 0; k < 32; k++) begin
      if (x % 2 != 0) begin
        // digit is +1 when x mod 4 == 1, -1 when x mod 4 == 3
        if (((x % 4) + 4) % 4 == 1) begin p[k] = 1'b1; x = x - 1; end
        else                         begin x = x + 1; end
      end
      x = x / 2;
    end
    return p;
  endfunction

  // Canonical-signed-digit recoding of an integer coefficient: negative digits.
  function automatic logic [31:0] csd_neg(input int v);
    logic [31:0] n;
    int x;
    n = '0;
    x = v;
    for (int k = 0; k < 32; k++) begin
      if (x % 2 != 0) begin
        if (((x % 4) + 4) % 4 == 1) begin x = x - 1; end
        else                         begin n[k] = 1'b1; x = x + 1; end
      end
      x = x / 2;
    end
    return n;
  endfunction

endpackage

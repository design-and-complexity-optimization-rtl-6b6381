// cic_comp: second-order linear-phase CIC droop compensator P(z) = a + b z^-1 + a z^-2,
// run at the CIC output rate (after the downsampler), with the published SOPOT
// coefficients a = -(2^-4 + 2^-5) and b = 2^0 + 2^-3 + 2^-4 (DC gain 2a+b = 1).
//
// Multiplier block: t = x*2^-4 + x*2^-5 is formed once; a*x = -t and b*x = x + 2t, so the
// two constant products cost two adders. The filter is in transposed form (two
// registers). Products are kept exact (30 fractional bits) and the output is rounded
// half-up once to the <5/16> compensated-CIC output format; that single rounding point
// is this design's choice.
//
// Interface: in_valid/in_data (<4/25>, the CIC output), out_valid/out_data (<5/16>).
// Timing: one output per input, registered, one clock after the input.
module cic_comp (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             in_valid,
  input  logic signed [srr_pkg::CIC_W-1:0] in_data,
  output logic                             out_valid,
  output logic signed [srr_pkg::CMP_W-1:0] out_data
);
  localparam int CF  = 5;                              // coefficient grid 2^-5
  localparam int IW  = srr_pkg::CIC_W;
  localparam int AW  = IW + CF + 2;                    // exact products and sums
  localparam int SH  = srr_pkg::CIC_F + CF - srr_pkg::CMP_F;

  logic signed [AW-1:0] x, t, ax, bx, y, r1, r2, rnd;

  always_comb begin
    x   = AW'(in_data);
    t   = (x <<< 1) + x;            // x*(2^-4 + 2^-5) on the 2^-5 grid
    ax  = -t;                       // a*x
    bx  = (x <<< CF) + (t <<< 1);   // b*x = x + 2t
    y   = ax + r1;
    rnd = (y + (AW'(1) <<< (SH - 1))) >>> SH;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= '0;
      r2 <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        r1 <= bx + r2;
        r2 <= ax;
        out_data <= srr_pkg::CMP_W'(rnd);
      end
    end
  end
endmodule

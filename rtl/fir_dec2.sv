// fir_dec2: fixed-coefficient SOPOT FIR filter followed by a 2:1 downsampler, the
// building block of the multistage decimator (LPF#1..#3) and of the output half-band
// stage.
//
// The filter itself is sopot_fir (transposed form, symmetric even-length impulse
// response, coefficients on a 2^-CF grid). The filter runs at the input rate and every
// second result is kept: the outputs are y(0), y(2), y(4), ... counted from reset. The
// kept result is rounded once, half-up, from IN_F+CF fractional bits to OUT_F bits and
// narrowed to the OUT_I+OUT_F output word. The integer part is not saturated: the
// output format is chosen so that signals from the receiver's <1/13> input cannot
// overflow it, and an assertion flags an output that does not fit.
//
// Interface: in_valid/in_data (<IN_I/IN_F>), out_valid/out_data (<OUT_I/OUT_F>).
// Timing: out_valid pulses one clock after every second accepted input; one output per
// two inputs.
module fir_dec2 #(
  parameter int N     = 8,
  parameter int CF    = 14,
  parameter int IN_I  = 5,
  parameter int IN_F  = 16,
  parameter int OUT_I = 5,
  parameter int OUT_F = 17,
  parameter int GUARD = 3,
  parameter logic [N/2-1:0][31:0] POS = '0,
  parameter logic [N/2-1:0][31:0] NEG = '0
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  logic signed [IN_I+IN_F-1:0]    in_data,
  output logic                           out_valid,
  output logic signed [OUT_I+OUT_F-1:0]  out_data
);
  localparam int IN_W  = IN_I + IN_F;
  localparam int OUT_W = OUT_I + OUT_F;
  localparam int ACC_W = IN_I + GUARD + IN_F + CF;
  localparam int SH    = IN_F + CF - OUT_F;   // bits dropped by the rounding

  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] rnd;
  logic                    phase;  // 0: keep this output, 1: drop it

  sopot_fir #(.N(N), .CF(CF), .IN_W(IN_W), .ACC_W(ACC_W), .ANTISYM(1'b0),
              .POS(POS), .NEG(NEG)) u_fir (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data), .acc_out(acc));

  // Round half-up: add half an output LSB, then drop SH bits.
  assign rnd = (acc + (ACC_W'(1) <<< (SH - 1))) >>> SH;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid && !phase;
      if (in_valid) begin
        phase <= !phase;
        if (!phase) out_data <= OUT_W'(rnd);
      end
    end
  end

  // The kept output must fit the output format.
  logic fits;
  assign fits = (rnd == ACC_W'(signed'(OUT_W'(rnd))));
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  (in_valid && !phase) |-> fits)
    else $error("fir_dec2: output overflows <%0d/%0d>", OUT_I, OUT_F);
endmodule

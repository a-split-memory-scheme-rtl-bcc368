// fft_butterfly: radix-2 decimation-in-frequency butterfly.
//
// For operands a = x_k and b = x_(k+N/2) and coefficient w it produces
//   x_even = a + b          (stored as X_2k)
//   x_odd  = (a - b) * w    (stored as X_2k+1)
// with two complex adders and one complex multiplier (fft_cmult), i.e. four
// real multipliers and six real adders in all. No scaling is applied: the sum
// keeps DW bits (wraps on overflow), the difference enters the multiplier
// with one extra bit and the product is rounded back to DW bits. Inputs must
// therefore leave log2(N) bits of headroom for a full transform.
//   Timing: fully pipelined, one butterfly per cycle; results appear MULT_LAT
//   cycles after the operands (the sum is delayed to match the multiplier).
//   The absence of scaling and the rounding are this design's choices; the
//   equations and the adder/multiplier count follow the architecture.
module fft_butterfly
  import fft_pkg::*;
#(
  parameter int DW       = 24,
  parameter int CW       = 16,
  parameter int MULT_LAT = 5
) (
  input  logic                 clk,
  input  logic signed [DW-1:0] a_re,
  input  logic signed [DW-1:0] a_im,
  input  logic signed [DW-1:0] b_re,
  input  logic signed [DW-1:0] b_im,
  input  logic signed [CW-1:0] w_re,
  input  logic signed [CW-1:0] w_im,
  output logic signed [DW-1:0] even_re,
  output logic signed [DW-1:0] even_im,
  output logic signed [DW-1:0] odd_re,
  output logic signed [DW-1:0] odd_im
);

  logic signed [DW-1:0] sum_re, sum_im;
  logic signed [DW:0]   dif_re, dif_im;

  always_comb begin
    sum_re = a_re + b_re;
    sum_im = a_im + b_im;
    dif_re = (DW+1)'(a_re) - (DW+1)'(b_re);
    dif_im = (DW+1)'(a_im) - (DW+1)'(b_im);
  end

  fft_cmult #(
    .AW  (DW + 1),
    .BW  (CW),
    .FRAC(tw_frac(CW)),
    .OW  (DW),
    .LAT (MULT_LAT)
  ) u_mult (
    .clk (clk),
    .a_re(dif_re),
    .a_im(dif_im),
    .b_re(w_re),
    .b_im(w_im),
    .p_re(odd_re),
    .p_im(odd_im)
  );

  if (MULT_LAT == 0) begin : g_comb
    assign even_re = sum_re;
    assign even_im = sum_im;
  end else begin : g_delay
    logic signed [DW-1:0] d_re [MULT_LAT];
    logic signed [DW-1:0] d_im [MULT_LAT];
    always_ff @(posedge clk) begin
      d_re[0] <= sum_re;
      d_im[0] <= sum_im;
      for (int i = 1; i < MULT_LAT; i++) begin
        d_re[i] <= d_re[i-1];
        d_im[i] <= d_im[i-1];
      end
    end
    assign even_re = d_re[MULT_LAT-1];
    assign even_im = d_im[MULT_LAT-1];
  end

endmodule

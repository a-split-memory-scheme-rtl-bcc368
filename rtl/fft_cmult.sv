// fft_cmult: pipelined complex multiplier of the FFT butterfly.
//
// Computes p = a * b with four real multipliers and two adders:
//   p_re = a_re*b_re - a_im*b_im,   p_im = a_re*b_im + a_im*b_re,
// then rounds the products back to the data scale: b is a fixed-point
// coefficient with FRAC fraction bits, so the sums are shifted right by
// FRAC with round-half-up (add 2^(FRAC-1) first) and cut to OW bits
// (two's-complement wrap).
//   Timing: the result of the operands applied in cycle c appears in cycle
//   c + LAT. The default LAT = 5 matches the pipelined multiplier the
//   architecture was built with (four internal pipeline levels plus an output
//   register); LAT = 0 gives the combinational variant. With LAT >= 1 the
//   four real products are registered first and the remaining LAT-1 levels
//   follow the adders, leaving retiming to place them. The multiplier is
//   fully pipelined: a new operand pair is accepted every cycle.
//   The exact register placement and the rounding rule are this design's
//   choices.
module fft_cmult #(
  parameter int AW   = 25,   // width of the data operand a
  parameter int BW   = 16,   // width of the coefficient operand b
  parameter int FRAC = 14,   // fraction bits of b
  parameter int OW   = 24,   // width of the result
  parameter int LAT  = 5     // pipeline latency in cycles
) (
  input  logic                 clk,
  input  logic signed [AW-1:0] a_re,
  input  logic signed [AW-1:0] a_im,
  input  logic signed [BW-1:0] b_re,
  input  logic signed [BW-1:0] b_im,
  output logic signed [OW-1:0] p_re,
  output logic signed [OW-1:0] p_im
);

  localparam int PW = AW + BW;        // one real product
  localparam int SW = PW + 1;         // sum of two products

  logic signed [PW-1:0] rr, ii, ri, ir;   // products, possibly registered
  logic signed [SW-1:0] s_re, s_im;
  logic signed [OW-1:0] r_re, r_im;       // rounded result before delay

  if (LAT == 0) begin : g_comb
    always_comb begin
      rr = a_re * b_re;
      ii = a_im * b_im;
      ri = a_re * b_im;
      ir = a_im * b_re;
    end
  end else begin : g_preg
    always_ff @(posedge clk) begin
      rr <= a_re * b_re;
      ii <= a_im * b_im;
      ri <= a_re * b_im;
      ir <= a_im * b_re;
    end
  end

  localparam logic signed [SW-1:0] HALF_LSB = SW'(1) <<< (FRAC - 1);

  always_comb begin
    s_re = SW'(rr) - SW'(ii) + HALF_LSB;
    s_im = SW'(ri) + SW'(ir) + HALF_LSB;
    r_re = OW'(s_re >>> FRAC);
    r_im = OW'(s_im >>> FRAC);
  end

  if (LAT <= 1) begin : g_nodelay
    assign p_re = r_re;
    assign p_im = r_im;
  end else begin : g_delay
    logic signed [OW-1:0] d_re [LAT-1];
    logic signed [OW-1:0] d_im [LAT-1];
    always_ff @(posedge clk) begin
      d_re[0] <= r_re;
      d_im[0] <= r_im;
      for (int i = 1; i < LAT - 1; i++) begin
        d_re[i] <= d_re[i-1];
        d_im[i] <= d_im[i-1];
      end
    end
    assign p_re = d_re[LAT-2];
    assign p_im = d_im[LAT-2];
  end

endmodule

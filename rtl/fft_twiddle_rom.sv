// fft_twiddle_rom: coefficient ROM of the split-memory FFT processor.
//
// Holds the N/2 transform coefficients W_N^k = exp(-j*2*pi*k/N), k = 0 ..
// N/2-1, with W_N^k at address k, as the architecture prescribes. Each entry
// is a CW-bit real and a CW-bit imaginary part in signed fixed point with
// CW-2 fraction bits (+1.0 = 2^(CW-2)), rounded to nearest; the contents are
// computed at elaboration from the cosine and sine, so no data file is needed.
// With the default CW = 16 a coefficient word is 32 bits wide.
//   Timing: addr is sampled at the rising edge when en is high; w_re/w_im
//   hold the coefficient one cycle later, in step with the RAM banks' read.
module fft_twiddle_rom
  import fft_pkg::*;
#(
  parameter int N  = 1024,
  parameter int CW = 16,
  localparam int AW = $clog2(N / 2)
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic [AW-1:0]        addr,
  output logic signed [CW-1:0] w_re,
  output logic signed [CW-1:0] w_im
);

  localparam int FRAC = tw_frac(CW);

  typedef logic [2*CW-1:0] rom_t [N/2];

  function automatic rom_t build_rom();
    rom_t r;
    for (int k = 0; k < N / 2; k++) begin
      r[k] = {CW'(twiddle_re(N, k, FRAC)), CW'(twiddle_im(N, k, FRAC))};
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_ff @(posedge clk) begin
    if (en) {w_re, w_im} <= ROM[addr];
  end

endmodule

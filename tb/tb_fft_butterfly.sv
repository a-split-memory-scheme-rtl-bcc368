// tb_fft_butterfly: checks the radix-2 DIF butterfly at its default widths
// (24-bit data, 16-bit Q2.14 coefficients, 5-cycle multiplier). A random
// operand set (a, b, W) enters every cycle, W taken from the 1024-point
// coefficient set; exactly 5 cycles later even = a + b (wrapped to 24 bits)
// and odd = round((a - b) * W / 2^14) must appear.
module tb_fft_butterfly
  import fft_ref_pkg::*;
;

  localparam int DW = 24, CW = 16, LAT = 5, NV = 500;

  logic                 clk = 1'b0;
  logic signed [DW-1:0] a_re, a_im, b_re, b_im;
  logic signed [CW-1:0] w_re, w_im;
  logic signed [DW-1:0] even_re, even_im, odd_re, odd_im;
  longint e_r [NV], e_i [NV], o_r [NV], o_i [NV];
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  fft_butterfly #(.DW(DW), .CW(CW), .MULT_LAT(LAT)) dut (
    .clk, .a_re, .a_im, .b_re, .b_im, .w_re, .w_im, .even_re, .even_im, .odd_re, .odd_im);

  function automatic longint rnd_data();
    return longint'($urandom_range(1 << DW)) - (longint'(1) << (DW - 1));
  endfunction

  initial begin
    longint ar, ai, br, bi, wr, wi, dr, di;
    for (int t = 0; t < NV + LAT; t++) begin
      @(negedge clk);
      if (t >= LAT) begin
        checks++;
        if (longint'(even_re) != e_r[t-LAT] || longint'(even_im) != e_i[t-LAT] ||
            longint'(odd_re) != o_r[t-LAT] || longint'(odd_im) != o_i[t-LAT]) begin
          failures++;
          if (failures < 20)
            $display("FAIL: butterfly %0d: even (%0d,%0d) odd (%0d,%0d), expected (%0d,%0d) (%0d,%0d)",
                     t - LAT, even_re, even_im, odd_re, odd_im,
                     e_r[t-LAT], e_i[t-LAT], o_r[t-LAT], o_i[t-LAT]);
        end
      end
      if (t < NV) begin
        ar = rnd_data();
        ai = rnd_data();
        br = rnd_data();
        bi = rnd_data();
        ref_twiddle(1024, $urandom_range(511), CW, wr, wi);
        a_re = DW'(ar); a_im = DW'(ai); b_re = DW'(br); b_im = DW'(bi);
        w_re = CW'(wr); w_im = CW'(wi);
        e_r[t] = wrap(ar + br, DW);
        e_i[t] = wrap(ai + bi, DW);
        dr = ar - br;
        di = ai - bi;
        o_r[t] = wrap((dr * wr - di * wi + 8192) >>> 14, DW);
        o_i[t] = wrap((dr * wi + di * wr + 8192) >>> 14, DW);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NV + 100) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

endmodule

// tb_fft_cmult: checks the complex multiplier with the butterfly's operand
// widths (25-bit data, 16-bit Q2.14 coefficient, 24-bit result). A new
// random operand pair enters every cycle; the result must appear exactly
// LAT = 5 cycles later and equal round((a*b) / 2^14) (half up), wrapped to
// 24 bits. A second instance with LAT = 0 (combinational variant) is checked
// in the same cycle. Corner operands (largest magnitudes) are included.
module tb_fft_cmult
  import fft_ref_pkg::*;
;

  localparam int AW = 25, BW = 16, FRAC = 14, OW = 24, LAT = 5, NV = 600;

  logic                 clk = 1'b0;
  logic signed [AW-1:0] a_re, a_im;
  logic signed [BW-1:0] b_re, b_im;
  logic signed [OW-1:0] p_re, p_im, q_re, q_im;
  longint exp_re [NV], exp_im [NV];
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  fft_cmult #(.AW(AW), .BW(BW), .FRAC(FRAC), .OW(OW), .LAT(LAT)) dut (
    .clk, .a_re, .a_im, .b_re, .b_im, .p_re, .p_im);

  fft_cmult #(.AW(AW), .BW(BW), .FRAC(FRAC), .OW(OW), .LAT(0)) dut_comb (
    .clk, .a_re, .a_im, .b_re, .b_im, .p_re(q_re), .p_im(q_im));

  function automatic longint model(input longint x);
    return wrap((x + (longint'(1) << (FRAC - 1))) >>> FRAC, OW);
  endfunction

  task automatic chk(input longint r, input longint i, input longint er, input longint ei,
                     input string what);
    checks++;
    if (r != er || i != ei) begin
      failures++;
      if (failures < 20) $display("FAIL: %s: (%0d,%0d), expected (%0d,%0d)", what, r, i, er, ei);
    end
  endtask

  initial begin
    longint ar, ai, br, bi;
    for (int t = 0; t < NV + LAT; t++) begin
      @(negedge clk);
      if (t >= LAT)
        chk(longint'(p_re), longint'(p_im), exp_re[t - LAT], exp_im[t - LAT],
            $sformatf("pipelined result %0d", t - LAT));
      if (t < NV) begin
        if (t < 4) begin
          ar = (t % 2 == 0) ? -(longint'(1) << (AW - 1)) : (longint'(1) << (AW - 1)) - 1;
          ai = -ar - 1;   // the other extreme of the range
          br = (t < 2) ? 16384 : -(longint'(1) << (BW - 1));
          bi = (t < 2) ? 0 : 11585;
        end else begin
          ar = longint'($urandom_range(1 << AW) ) - (longint'(1) << (AW - 1));
          ai = longint'($urandom_range(1 << AW) ) - (longint'(1) << (AW - 1));
          br = longint'($urandom_range(32768)) - 16384;
          bi = longint'($urandom_range(32768)) - 16384;
        end
        a_re = AW'(ar);
        a_im = AW'(ai);
        b_re = BW'(br);
        b_im = BW'(bi);
        exp_re[t] = model(ar * br - ai * bi);
        exp_im[t] = model(ar * bi + ai * br);
        #1;
        chk(longint'(q_re), longint'(q_im), exp_re[t], exp_im[t],
            $sformatf("combinational result %0d", t));
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

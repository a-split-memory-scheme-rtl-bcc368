// tb_fft_twiddle_rom: checks the full 1024-point coefficient ROM. Every
// address k = 0 .. 511 must give W_1024^k = exp(-j*2*pi*k/1024) in Q2.14,
// rounded to nearest, one cycle after the address; a few entries are also
// checked against values known by hand (W^0 = 1, W^256 = -j, W^128 =
// (1-j)/sqrt 2), and the output must hold while en is low.
module tb_fft_twiddle_rom
  import fft_ref_pkg::*;
;

  localparam int N  = 1024;
  localparam int CW = 16;
  localparam int AW = $clog2(N / 2);

  logic                 clk = 1'b0;
  logic                 en = 1'b0;
  logic [AW-1:0]        addr = '0;
  logic signed [CW-1:0] w_re, w_im;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  fft_twiddle_rom #(.N(N), .CW(CW)) dut (.clk, .en, .addr, .w_re, .w_im);

  task automatic expect_w(input longint er, input longint ei, input string what);
    checks++;
    if (longint'(w_re) != er || longint'(w_im) != ei) begin
      failures++;
      if (failures < 20) $display("FAIL: %s: (%0d,%0d), expected (%0d,%0d)", what, w_re, w_im, er, ei);
    end
  endtask

  initial begin
    longint er, ei;
    @(negedge clk);
    for (int k = 0; k < N / 2; k++) begin
      en = 1'b1;
      addr = AW'(k);
      @(negedge clk);
      ref_twiddle(N, k, CW, er, ei);
      expect_w(er, ei, $sformatf("W^%0d", k));
      if (k == 0)   expect_w(16384, 0, "W^0 = 1");
      if (k == 256) expect_w(0, -16384, "W^256 = -j");
      if (k == 128) expect_w(11585, -11585, "W^128");
    end
    en = 1'b0;
    addr = AW'(3);
    repeat (2) @(negedge clk);
    ref_twiddle(N, N / 2 - 1, CW, er, ei);
    expect_w(er, ei, "hold with en low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

endmodule

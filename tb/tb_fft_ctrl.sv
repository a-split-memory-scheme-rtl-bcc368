// tb_fft_ctrl: checks the control unit at two sizes, with the input stream
// never pausing: the 8-point case (whose address and routing signals are
// also compared with the literal 8-point table, and which needs idle cycles
// between stages because of the 5-cycle multiplier) and the default
// 1024-point case, where stages and frames follow each other with no idle
// cycle and a transform takes 512 * 11 = 5632 cycles. See fft_tb_ctrl_run.
module tb_fft_ctrl;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done8, done1k;
  int   c8, f8, c1k, f1k;

  always #5 clk = !clk;

  fft_tb_ctrl_run #(.N(8),    .MULT_LAT(5), .FRAMES(4)) u8  (.clk, .rst_n, .done(done8),
                                                             .checks(c8), .failures(f8));
  fft_tb_ctrl_run #(.N(1024), .MULT_LAT(5), .FRAMES(3)) u1k (.clk, .rst_n, .done(done1k),
                                                             .checks(c1k), .failures(f1k));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done8 && done1k);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c1k, f8 + f1k);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c1k + 1, f8 + f1k + 1);
    $finish;
  end

endmodule

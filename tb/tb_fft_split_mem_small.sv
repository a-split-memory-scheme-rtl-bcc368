// tb_fft_split_mem_small: end-to-end tests of small processors, where the
// pipeline latency is long compared with a stage:
//   N = 8,  5-cycle multiplier - the 8-point example; needs idle cycles
//                                 between stages and before the unload
//   N = 16, combinational multiplier (MULT_LAT = 0)
//   N = 32, 1-cycle multiplier - the smallest size with no idle cycles
// Each streams five transforms (the second with input pauses) and checks
// every result bit-exactly, the latency and the period (see fft_tb_stream).
// The idle cycles between stages must occur for N = 8 and not for N = 32.
module tb_fft_split_mem_small;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic d [3];
  int   c [3], f [3], ov [3], pa [3], gp [3];

  always #5 clk = !clk;

  fft_tb_case #(.N(8),  .MULT_LAT(5), .FRAMES(5)) u8  (.clk, .rst_n, .done(d[0]), .checks(c[0]),
    .failures(f[0]), .n_overlap(ov[0]), .n_pause(pa[0]), .n_gap(gp[0]));
  fft_tb_case #(.N(16), .MULT_LAT(0), .FRAMES(5)) u16 (.clk, .rst_n, .done(d[1]), .checks(c[1]),
    .failures(f[1]), .n_overlap(ov[1]), .n_pause(pa[1]), .n_gap(gp[1]));
  fft_tb_case #(.N(32), .MULT_LAT(1), .FRAMES(5)) u32 (.clk, .rst_n, .done(d[2]), .checks(c[2]),
    .failures(f[2]), .n_overlap(ov[2]), .n_pause(pa[2]), .n_gap(gp[2]));

  initial begin
    int checks, failures;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (d[0] && d[1] && d[2]);
    repeat (3) @(posedge clk);
    checks = c[0] + c[1] + c[2] + 5;
    failures = f[0] + f[1] + f[2];
    for (int i = 0; i < 3; i++)
      $display("case %0d: checks %0d failures %0d overlap %0d pauses %0d idle %0d",
               i, c[i], f[i], ov[i], pa[i], gp[i]);
    if (gp[0] == 0) failures++;
    if (gp[2] != 0) failures++;
    if (ov[0] == 0 || ov[1] == 0 || ov[2] == 0) failures++;
    if (pa[0] == 0 || pa[1] == 0 || pa[2] == 0) failures++;
    if (f[0] + f[1] + f[2] == 0 && c[0] * c[1] * c[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + 1, f[0] + f[1] + f[2] + 1);
    $finish;
  end

endmodule

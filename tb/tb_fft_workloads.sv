// tb_fft_workloads: the evaluated configurations other than the default one:
// 256- and 512-point processors with the 5-cycle pipelined multiplier and
// with the combinational multiplier, and the 1024-point processor with the
// combinational multiplier. Each streams three transforms (the second with
// input pauses) and checks all results bit-exactly, the latency and the
// period of N/2*(1 + log2 N) cycles: 1152 (N=256), 2560 (N=512) and 5632
// (N=1024) cycles per transform.
module tb_fft_workloads;

  localparam int NC = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic d [NC];
  int   c [NC], f [NC], ov [NC], pa [NC], gp [NC];

  always #5 clk = !clk;

  fft_tb_case #(.N(256),  .MULT_LAT(5)) u256p (.clk, .rst_n, .done(d[0]), .checks(c[0]),
    .failures(f[0]), .n_overlap(ov[0]), .n_pause(pa[0]), .n_gap(gp[0]));
  fft_tb_case #(.N(256),  .MULT_LAT(0)) u256c (.clk, .rst_n, .done(d[1]), .checks(c[1]),
    .failures(f[1]), .n_overlap(ov[1]), .n_pause(pa[1]), .n_gap(gp[1]));
  fft_tb_case #(.N(512),  .MULT_LAT(5)) u512p (.clk, .rst_n, .done(d[2]), .checks(c[2]),
    .failures(f[2]), .n_overlap(ov[2]), .n_pause(pa[2]), .n_gap(gp[2]));
  fft_tb_case #(.N(512),  .MULT_LAT(0)) u512c (.clk, .rst_n, .done(d[3]), .checks(c[3]),
    .failures(f[3]), .n_overlap(ov[3]), .n_pause(pa[3]), .n_gap(gp[3]));
  fft_tb_case #(.N(1024), .MULT_LAT(0)) u1kc  (.clk, .rst_n, .done(d[4]), .checks(c[4]),
    .failures(f[4]), .n_overlap(ov[4]), .n_pause(pa[4]), .n_gap(gp[4]));

  int checks, failures;
  always_comb begin
    checks = 0;
    failures = 0;
    for (int i = 0; i < NC; i++) begin
      checks += c[i];
      failures += f[i];
    end
  end

  initial begin
    bit all_done;
    int fails;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int i = 0; i < NC; i++) all_done &= d[i];
    end while (!all_done);
    repeat (3) @(posedge clk);
    fails = failures;
    for (int i = 0; i < NC; i++) begin
      $display("case %0d: checks %0d failures %0d overlap %0d pauses %0d idle %0d",
               i, c[i], f[i], ov[i], pa[i], gp[i]);
      if (ov[i] == 0 || pa[i] == 0 || gp[i] != 0) fails++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + NC, fails);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

endmodule

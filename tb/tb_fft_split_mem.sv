// tb_fft_split_mem: end-to-end test of the FFT processor at its default
// size (N = 1024, 24-bit data, 32-bit coefficients, 5-cycle multiplier).
//
// Streams four transforms back to back through the processor, the third
// with random pauses of the input, and checks every result bit-exactly
// against a fixed-point model, the first against a floating-point DFT, and
// the latency and the N/2*(1+log2 N) = 5632-cycle period (see
// fft_tb_stream). It also counts the mechanisms of the architecture, each of
// which must occur: both settings of the read switch C1 and of the write
// switch C2, the swapping of the two RAM sets between stages, the overlap of
// result unload with the next load, pauses of the input stream, and all
// log2 N stages.
module tb_fft_split_mem;

  localparam int N    = 1024;
  localparam int DW   = 24;
  localparam int AW   = $clog2(N) - 1;
  localparam int LOGN = $clog2(N);

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 in_valid, in_ready, out_valid, busy, computing;
  logic signed [DW-1:0] in_re [2], in_im [2], out_re [2], out_im [2];
  logic [AW-1:0]        out_index;
  logic [$clog2(LOGN+1)-1:0] stage;
  logic                 done;
  int                   checks, failures, n_overlap, n_pause;

  always #5 clk = !clk;

  fft_split_mem dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_re, .in_im,
    .out_valid, .out_index, .out_re, .out_im, .busy, .computing, .stage
  );

  fft_tb_stream #(.N(N), .DW(DW), .FRAMES(4), .STALL_FRAME(2)) u_stream (
    .clk, .rst_n, .in_valid, .in_ready, .in_re, .in_im,
    .out_valid, .out_index, .out_re, .out_im,
    .done, .checks, .failures, .n_overlap, .n_pause
  );

  // mechanism counters, from the control unit's signals
  int n_c1 [2], n_c2 [2], n_swap;
  logic prev_set;
  logic [LOGN:1] seen_stage;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_ctrl.rd_en) begin
        n_c1[dut.u_ctrl.sa1[AW-1]]++;
        if (dut.u_ctrl.rd_set != prev_set) n_swap++;
        prev_set <= dut.u_ctrl.rd_set;
        seen_stage[stage] <= 1'b1;
      end
      if (dut.u_ctrl.wr_en) n_c2[dut.u_ctrl.c2]++;
    end
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int fails;
    prev_set = 1'b0;
    n_swap = 0;
    seen_stage = '0;
    n_c1[0] = 0; n_c1[1] = 0; n_c2[0] = 0; n_c2[1] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done);
    repeat (5) @(posedge clk);
    fails = failures;
    $display("mechanisms: C1=0:%0d C1=1:%0d C2=0:%0d C2=1:%0d set swaps:%0d unload/load overlap:%0d input pauses:%0d stages:%b",
             n_c1[0], n_c1[1], n_c2[0], n_c2[1], n_swap, n_overlap, n_pause, seen_stage);
    if (n_c1[0] == 0 || n_c1[1] == 0) fails++;
    if (n_c2[0] == 0 || n_c2[1] == 0) fails++;
    if (n_swap == 0) fails++;
    if (n_overlap == 0) fails++;
    if (n_pause == 0) fails++;
    if (seen_stage != '1) fails++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 6, fails);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

endmodule

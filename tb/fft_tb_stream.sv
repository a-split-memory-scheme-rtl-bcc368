// fft_tb_stream: stimulus and checker for one fft_split_mem instance.
//
// Sends FRAMES transforms of random complex samples (each part uniform in
// [-AMP, AMP]) as N/2 sample pairs per frame, in natural order, and collects
// the N/2 result pairs per frame. Every result is compared with the
// bit-exact fixed-point model of fft_ref_pkg (by frequency: pair a holds
// X[bitrev(2a)] and X[bitrev(2a+1)]); the first frame is also compared with a
// floating-point DFT within a rounding tolerance. Timing checks:
//   - latency: first result pair exactly 2 + n*N/2 + (n-1)*GAP + UGAP cycles
//     after the cycle of the last accepted input pair of the frame, or after
//     the cycle before the previous frame's last result pair if that is later
//     (a transform starts only when the previous result is out);
//   - period: with no input pause, consecutive frames start
//     N/2*(1+n) + (n-1)*GAP + UGAP cycles apart (GAP = UGAP = 0 for N >= 32
//     with the default pipeline; the first period lacks UGAP, as no earlier
//     result has to be unloaded);
//   - out_index counts 0 .. N/2-1 within a frame.
// Frame STALL_FRAME (if < FRAMES) is sent with random pauses of in_valid.
// All driving and sampling happens on the falling clock edge.
module fft_tb_stream
  import fft_ref_pkg::*;
#(
  parameter int N           = 1024,
  parameter int DW          = 24,
  parameter int CW          = 16,
  parameter int MULT_LAT    = 5,
  parameter int FRAMES      = 3,
  parameter int STALL_FRAME = 1,
  parameter int AMP         = 4096,
  localparam int AW         = $clog2(N) - 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 in_valid,
  input  logic                 in_ready,
  output logic signed [DW-1:0] in_re [2],
  output logic signed [DW-1:0] in_im [2],
  input  logic                 out_valid,
  input  logic [AW-1:0]        out_index,
  input  logic signed [DW-1:0] out_re [2],
  input  logic signed [DW-1:0] out_im [2],
  output logic                 done,
  output int                   checks,
  output int                   failures,
  output int                   n_overlap,   // cycles with output and input together
  output int                   n_pause      // cycles the source paused while ready
);

  localparam int LOGN = $clog2(N);
  localparam int HALF = N / 2;
  localparam int WLAT = 1 + MULT_LAT;
  localparam int GAP  = (WLAT + 1 > N / 4) ? WLAT + 1 - N / 4 : 0;
  localparam int UGAP = (WLAT + 1 > HALF) ? WLAT + 1 - HALF : 0;
  localparam int LATENCY = 2 + LOGN * HALF + (LOGN - 1) * GAP + UGAP;
  localparam int PERIOD  = HALF * (1 + LOGN) + (LOGN - 1) * GAP + UGAP;

  longint xr [FRAMES][N];
  longint xi [FRAMES][N];
  longint er [FRAMES][N];
  longint ei [FRAMES][N];
  longint first_acc [FRAMES];
  longint last_acc  [FRAMES];
  longint last_out  [FRAMES];
  bit     paused    [FRAMES];

  longint cyc;
  always @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------ frames and references
  initial begin
    lvec_t vr, vi, fr, fi;
    rvec_t dr, di;
    real   tol, err, mx;
    checks = 0;
    failures = 0;
    vr = new[N];
    vi = new[N];
    for (int f = 0; f < FRAMES; f++) begin
      for (int i = 0; i < N; i++) begin
        vr[i] = longint'($urandom_range(2 * AMP)) - longint'(AMP);
        vi[i] = longint'($urandom_range(2 * AMP)) - longint'(AMP);
        xr[f][i] = vr[i];
        xi[f][i] = vi[i];
      end
      ref_fft_fixed(N, DW, CW, vr, vi, fr, fi);
      for (int i = 0; i < N; i++) begin
        er[f][i] = fr[i];
        ei[f][i] = fi[i];
      end
      if (f == 0) begin
        // the fixed-point model itself against the exact transform
        ref_dft(N, vr, vi, dr, di);
        tol = 4.0 * LOGN + 2.0e-4 * real'(AMP) * N;
        mx = 0.0;
        for (int i = 0; i < N; i++) begin
          err = (real'(fr[i]) - dr[i]) ** 2 + (real'(fi[i]) - di[i]) ** 2;
          if (err > mx) mx = err;
        end
        check(mx <= tol * tol, $sformatf("fixed-point model off the DFT by %f (tol %f)",
                                         $sqrt(mx), tol));
      end
    end
  end

  // ------------------------------------------------------------- source
  int sf, sa;
  initial begin
    sf = 0;
    sa = 0;
    n_pause = 0;
    in_valid = 1'b0;
    for (int j = 0; j < 2; j++) begin
      in_re[j] = '0;
      in_im[j] = '0;
    end
    for (int f = 0; f < FRAMES; f++) paused[f] = 1'b0;
    forever begin
      @(negedge clk);
      if (!rst_n || sf >= FRAMES) begin
        in_valid = 1'b0;
      end else if (sf == STALL_FRAME && $urandom_range(3) == 0) begin
        in_valid = 1'b0;
        if (in_ready) begin
          n_pause++;
          paused[sf] = 1'b1;
        end
      end else begin
        in_valid = 1'b1;
        for (int j = 0; j < 2; j++) begin
          in_re[j] = DW'(xr[sf][2*sa + j]);
          in_im[j] = DW'(xi[sf][2*sa + j]);
        end
        if (in_ready) begin
          if (sa == 0) first_acc[sf] = cyc;
          if (sa == HALF - 1) begin
            last_acc[sf] = cyc;
            sa = 0;
            sf++;
          end else begin
            sa++;
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ monitor
  int of, oa;
  initial begin
    int fa, fb;
    longint start;
    of = 0;
    oa = 0;
    n_overlap = 0;
    done = 1'b0;
    forever begin
      @(negedge clk);
      if (rst_n && out_valid && in_valid && in_ready) n_overlap++;
      if (rst_n && out_valid && of < FRAMES) begin
        if (oa == 0) begin
          // computing starts after the last input pair and after the
          // previous result has been read out
          start = last_acc[of] + 1;
          if (of > 0 && last_out[of - 1] > start) start = last_out[of - 1];
          check(cyc - start == longint'(LATENCY - 1),
                $sformatf("frame %0d latency %0d, expected %0d", of, cyc - start + 1, LATENCY));
          if ((of >= 2 || (of == 1 && UGAP == 0)) && !paused[of] && !paused[of - 1])
            check(first_acc[of] - first_acc[of - 1] == longint'(PERIOD),
                  $sformatf("frame %0d period %0d, expected %0d", of,
                            first_acc[of] - first_acc[of - 1], PERIOD));
        end
        check(out_index == AW'(oa), $sformatf("frame %0d out_index %0d, expected %0d",
                                              of, out_index, oa));
        fa = bitrev(2 * oa, LOGN);
        fb = bitrev(2 * oa + 1, LOGN);
        check(out_re[0] == DW'(er[of][fa]) && out_im[0] == DW'(ei[of][fa]),
              $sformatf("frame %0d X[%0d] = (%0d,%0d), expected (%0d,%0d)", of, fa,
                        out_re[0], out_im[0], er[of][fa], ei[of][fa]));
        check(out_re[1] == DW'(er[of][fb]) && out_im[1] == DW'(ei[of][fb]),
              $sformatf("frame %0d X[%0d] = (%0d,%0d), expected (%0d,%0d)", of, fb,
                        out_re[1], out_im[1], er[of][fb], ei[of][fb]));
        if (oa == HALF - 1) begin
          last_out[of] = cyc;
          oa = 0;
          of++;
          if (of == FRAMES) done = 1'b1;
        end else begin
          oa++;
        end
      end
    end
  end

endmodule

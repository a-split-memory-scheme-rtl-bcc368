// fft_tb_case: one fft_split_mem instance of size N and multiplier latency
// MULT_LAT together with its stream driver and checker (fft_tb_stream).
// Also counts the cycles in which the control unit idles between stages
// (only sizes with N/4 <= MULT_LAT + 2 have any).
module fft_tb_case #(
  parameter int N           = 256,
  parameter int MULT_LAT    = 5,
  parameter int FRAMES      = 3,
  parameter int STALL_FRAME = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_overlap,
  output int   n_pause,
  output int   n_gap
);

  localparam int DW = 24;
  localparam int AW = $clog2(N) - 1;

  logic                 in_valid, in_ready, out_valid, busy, computing;
  logic signed [DW-1:0] in_re [2], in_im [2], out_re [2], out_im [2];
  logic [AW-1:0]        out_index;
  logic [$clog2($clog2(N) + 1)-1:0] stage;

  fft_split_mem #(.N(N), .MULT_LAT(MULT_LAT)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_re, .in_im,
    .out_valid, .out_index, .out_re, .out_im, .busy, .computing, .stage
  );

  fft_tb_stream #(.N(N), .DW(DW), .MULT_LAT(MULT_LAT), .FRAMES(FRAMES),
                  .STALL_FRAME(STALL_FRAME)) u_stream (
    .clk, .rst_n, .in_valid, .in_ready, .in_re, .in_im,
    .out_valid, .out_index, .out_re, .out_im,
    .done, .checks, .failures, .n_overlap, .n_pause
  );

  initial n_gap = 0;
  always @(posedge clk) if (rst_n && computing && !dut.u_ctrl.rd_en) n_gap++;

endmodule

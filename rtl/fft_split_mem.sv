// fft_split_mem: N-point radix-2 decimation-in-frequency FFT processor with
// a split memory, computing one butterfly per clock cycle.
//
// Structure. Two RAM sets hold the data: set 0 = banks U and L, set 1 =
// banks U' and L', each bank N/2 complex words (2N words in all). One
// butterfly (fft_butterfly), one coefficient ROM with the N/2 values W_N^k
// (fft_twiddle_rom) and the counter-driven control unit (fft_ctrl) complete
// the processor. Stage s reads both butterfly operands from one set, one
// from U and one from L, and writes both results into the other set, one to
// U and one to L, so every cycle needs exactly one read and one write per
// bank. Sample at position p (0 .. N-1) of a stage's input vector lives in
// bank U if p[0] == p[n-1] and in bank L otherwise, at address p >> 1; with
// that placement the constant-geometry flow graph (butterfly k combines
// positions k and k+N/2, writes positions 2k and 2k+1) never puts two
// operands or two results in the same bank. Two 2x2 switches steer the data:
// C1 on the read side, C2 on the write side.
//
// Interface.
//   in_valid/in_ready : one sample pair per accepted cycle, natural order:
//                       pair a carries x[2a] in in_*[0] and x[2a+1] in
//                       in_*[1]; N/2 pairs make one transform.
//   out_valid         : N/2 consecutive cycles per transform; out_index = a
//                       and out_*[0], out_*[1] hold the results at positions
//                       2a and 2a+1, i.e. X[bitrev(2a)] and X[bitrev(2a+1)]
//                       (bit-reversed frequency order, n = log2 N bits).
//   No output back-pressure. No scaling: X is the unscaled DFT, rounded at
//   each coefficient multiplication; inputs need log2 N bits of headroom.
// Timing. Loading takes N/2 cycles, computing N/2 * log2 N cycles (plus
// short waits between stages for N < 32), unloading N/2 cycles overlapped
// with the next load: a continuous stream is transformed every
// N/2 * (1 + log2 N) cycles. The first result pair appears 1 cycle after
// the unload starts, which is the cycle after the last butterfly is issued
// (N >= 16). Synchronous active-low reset.
//
// Follows the architecture: bank organisation, address and routing
// equations, set swapping, overlapped unload/load, 24-bit data, 32-bit
// coefficients and a 5-cycle pipelined multiplier. This design's own
// choices: the handshake, the pair order of the streams, the coefficient
// format, the rounding, and registered one-cycle RAM/ROM reads.
module fft_split_mem
  import fft_pkg::*;
#(
  parameter int N        = 1024,
  parameter int DW       = 24,   // bits per real/imaginary part of a sample
  parameter int CW       = 16,   // bits per real/imaginary part of W
  parameter int MULT_LAT = 5,    // multiplier pipeline depth
  localparam int AW      = $clog2(N) - 1,
  localparam int SW      = $clog2($clog2(N) + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_re [2],
  input  logic signed [DW-1:0] in_im [2],
  output logic                 out_valid,
  output logic [AW-1:0]        out_index,
  output logic signed [DW-1:0] out_re [2],
  output logic signed [DW-1:0] out_im [2],
  output logic                 busy,      // computing or unloading
  output logic                 computing, // butterfly stages running
  output logic [SW-1:0]        stage      // 1 .. log2 N while computing
);

  localparam int WW = 2 * DW;     // one complex word {re, im}

  // ------------------------------------------------------------ control
  logic          ld_we, ld_set, ld_swap;
  logic [AW-1:0] ld_addr;
  logic          rd_en, rd_set;
  logic [AW-1:0] sa1, sa2, ca;
  logic          op_set, c1;
  logic          wr_en, wr_set, c2;
  logic [AW-1:0] da;
  logic          unl_en, unl_set;
  logic [AW-1:0] unl_addr;
  logic          out_set, out_swap;
  phase_e        phase;

  fft_ctrl #(.N(N), .MULT_LAT(MULT_LAT)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .ld_we    (ld_we),
    .ld_set   (ld_set),
    .ld_addr  (ld_addr),
    .ld_swap  (ld_swap),
    .rd_en    (rd_en),
    .rd_set   (rd_set),
    .sa1      (sa1),
    .sa2      (sa2),
    .ca       (ca),
    .op_set   (op_set),
    .c1       (c1),
    .wr_en    (wr_en),
    .wr_set   (wr_set),
    .da       (da),
    .c2       (c2),
    .unl_en   (unl_en),
    .unl_set  (unl_set),
    .unl_addr (unl_addr),
    .out_valid(out_valid),
    .out_set  (out_set),
    .out_swap (out_swap),
    .out_index(out_index),
    .phase    (phase),
    .stage    (stage),
    .busy     (busy)
  );

  // ------------------------------------------------------------ RAM sets
  // bank index: [set][0 = U, 1 = L]
  logic          b_we    [2][2];
  logic [AW-1:0] b_waddr [2][2];
  logic [WW-1:0] b_wdata [2][2];
  logic          b_re    [2][2];
  logic [AW-1:0] b_raddr [2][2];
  logic [WW-1:0] b_rdata [2][2];

  // write data after the C2 switch (butterfly) and after the load switch
  logic [WW-1:0] bf_du, bf_dl, ld_du, ld_dl;

  for (genvar s = 0; s < 2; s++) begin : g_set
    always_comb begin
      // read ports: butterfly operands (SA1 to U, SA2 to L) or unload
      if (rd_en && (rd_set == 1'(s))) begin
        b_re[s][0]    = 1'b1;
        b_re[s][1]    = 1'b1;
        b_raddr[s][0] = sa1;
        b_raddr[s][1] = sa2;
      end else begin
        b_re[s][0]    = unl_en && (unl_set == 1'(s));
        b_re[s][1]    = unl_en && (unl_set == 1'(s));
        b_raddr[s][0] = unl_addr;
        b_raddr[s][1] = unl_addr;
      end
      // write ports: butterfly results at DA, or the input stream
      if (wr_en && (wr_set == 1'(s))) begin
        b_we[s][0]    = 1'b1;
        b_we[s][1]    = 1'b1;
        b_waddr[s][0] = da;
        b_waddr[s][1] = da;
        b_wdata[s][0] = bf_du;
        b_wdata[s][1] = bf_dl;
      end else begin
        b_we[s][0]    = ld_we && (ld_set == 1'(s));
        b_we[s][1]    = ld_we && (ld_set == 1'(s));
        b_waddr[s][0] = ld_addr;
        b_waddr[s][1] = ld_addr;
        b_wdata[s][0] = ld_du;
        b_wdata[s][1] = ld_dl;
      end
    end

    for (genvar b = 0; b < 2; b++) begin : g_bank
      fft_bank_ram #(.DEPTH(N / 2), .W(WW)) u_ram (
        .clk  (clk),
        .we   (b_we[s][b]),
        .waddr(b_waddr[s][b]),
        .wdata(b_wdata[s][b]),
        .re   (b_re[s][b]),
        .raddr(b_raddr[s][b]),
        .rdata(b_rdata[s][b])
      );
    end
  end

  // ------------------------------------------------------ input stream
  fft_swap2 #(.W(WW)) u_ld_sw (
    .sel (ld_swap),
    .in0 ({in_re[0], in_im[0]}),
    .in1 ({in_re[1], in_im[1]}),
    .out0(ld_du),
    .out1(ld_dl)
  );

  // ------------------------------------------------- butterfly datapath
  logic [WW-1:0]        op1, op2;       // I1 = x_k, I2 = x_(k+N/2)
  logic signed [CW-1:0] w_re, w_im;
  logic signed [DW-1:0] ev_re, ev_im, od_re, od_im;

  fft_swap2 #(.W(WW)) u_c1_sw (
    .sel (c1),
    .in0 (b_rdata[op_set][0]),
    .in1 (b_rdata[op_set][1]),
    .out0(op1),
    .out1(op2)
  );

  fft_twiddle_rom #(.N(N), .CW(CW)) u_rom (
    .clk (clk),
    .en  (rd_en),
    .addr(ca),
    .w_re(w_re),
    .w_im(w_im)
  );

  fft_butterfly #(.DW(DW), .CW(CW), .MULT_LAT(MULT_LAT)) u_bf (
    .clk    (clk),
    .a_re   (op1[WW-1:DW]),
    .a_im   (op1[DW-1:0]),
    .b_re   (op2[WW-1:DW]),
    .b_im   (op2[DW-1:0]),
    .w_re   (w_re),
    .w_im   (w_im),
    .even_re(ev_re),
    .even_im(ev_im),
    .odd_re (od_re),
    .odd_im (od_im)
  );

  fft_swap2 #(.W(WW)) u_c2_sw (
    .sel (c2),
    .in0 ({ev_re, ev_im}),
    .in1 ({od_re, od_im}),
    .out0(bf_du),
    .out1(bf_dl)
  );

  // ------------------------------------------------------ output stream
  logic [WW-1:0] out_w0, out_w1;

  fft_swap2 #(.W(WW)) u_out_sw (
    .sel (out_swap),
    .in0 (b_rdata[out_set][0]),
    .in1 (b_rdata[out_set][1]),
    .out0(out_w0),
    .out1(out_w1)
  );

  assign computing = (phase == PH_COMPUTE);

  always_comb begin
    out_re[0] = out_w0[WW-1:DW];
    out_im[0] = out_w0[DW-1:0];
    out_re[1] = out_w1[WW-1:DW];
    out_im[1] = out_w1[DW-1:0];
  end

endmodule

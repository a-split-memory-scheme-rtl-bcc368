// fft_ctrl: control unit of the split-memory FFT processor.
//
// Everything the datapath needs comes from one butterfly counter
// k = k_(n-2) ... k_1 k_0 (n = log2 N, n-1 bits) and a stage number s:
//   C1  = k_0                          operand routing (read switch)
//   C2  = k_(n-2)                      result routing (write switch)
//   SA1 = k_0 k_(n-2) ... k_1          read address of bank U
//   SA2 = ~k_0 k_(n-2) ... k_1         read address of bank L
//   DA  = k                            write address of both banks
//   CA  = k with its s-1 low bits zero coefficient ROM address
// All stages use the same addresses (constant-geometry algorithm); only CA
// and the roles of the two RAM sets change from stage to stage: stage s
// reads set src and writes set ~src, then src flips.
//
// Sequencing. A transform starts with a LOAD phase that accepts N/2 sample
// pairs (in_valid/in_ready handshake, one pair per accepted cycle) into the
// load set, written at pair address a with the C2-style swap a[n-2]. Then
// the COMPUTE phase issues one butterfly per cycle, N/2 per stage, for n
// stages back to back. When it ends the result set is read out two words a
// cycle for N/2 cycles (unload), while the next transform is already being
// loaded into the other set; COMPUTE starts again once both are done. With
// an input stream that never pauses this gives the architecture's period of
// N/2 * (1 + log2 N) cycles per transform.
//
// Reset is synchronous and active low (rst_n).
//
// Timing of the outputs. Read-side signals (rd_*, SA1, SA2, CA, unl_*) are
// for the issue cycle; the banks and the ROM answer one cycle later, when
// op_set/c1 and out_* are valid. Write-side signals (wr_*, DA, C2) are
// delayed by WLAT = 1 + MULT_LAT cycles, to meet the butterfly's results.
// A stage may read a word of the previous stage only once it is written;
// for N >= 32 (with MULT_LAT = 5) the first reads of a stage need words
// written early in the previous stage and no wait is needed. For smaller N
// the unit waits GAP idle cycles between stages and UGAP cycles before the
// unload. These waits, the handshake and the phase sequencing are this
// design's own; the address equations and the set swapping follow the
// architecture. Supports N = 2^n with N >= 8.
module fft_ctrl
  import fft_pkg::*;
#(
  parameter int N        = 1024,
  parameter int MULT_LAT = 5,
  localparam int LOGN    = $clog2(N),
  localparam int AW      = LOGN - 1,
  localparam int SW      = $clog2(LOGN + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // input stream
  input  logic          in_valid,
  output logic          in_ready,
  output logic          ld_we,       // write the accepted pair this cycle
  output logic          ld_set,      // RAM set receiving the pair
  output logic [AW-1:0] ld_addr,     // pair address a
  output logic          ld_swap,     // cross the pair on its way to U/L
  // butterfly operand fetch (issue cycle)
  output logic          rd_en,
  output logic          rd_set,      // source RAM set of this stage
  output logic [AW-1:0] sa1,
  output logic [AW-1:0] sa2,
  output logic [AW-1:0] ca,
  // operand routing (one cycle after issue)
  output logic          op_set,
  output logic          c1,
  // result write-back (WLAT cycles after issue)
  output logic          wr_en,
  output logic          wr_set,
  output logic [AW-1:0] da,
  output logic          c2,
  // unload fetch (issue cycle)
  output logic          unl_en,
  output logic          unl_set,
  output logic [AW-1:0] unl_addr,
  // unload data routing (one cycle after issue)
  output logic          out_valid,
  output logic          out_set,
  output logic          out_swap,
  output logic [AW-1:0] out_index,
  // status
  output phase_e        phase,
  output logic [SW-1:0] stage,       // 1 .. log2 N while computing
  output logic          busy
);

  localparam int HALF  = N / 2;
  localparam int WLAT  = 1 + MULT_LAT;
  localparam int GAP   = (WLAT + 1 > N / 4) ? WLAT + 1 - N / 4 : 0;
  localparam int UGAP  = (WLAT + 1 > HALF) ? WLAT + 1 - HALF : 0;
  localparam int GW    = $clog2(WLAT + 2);

  if (N < 8 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("fft_ctrl: N must be a power of two and at least 8");
  end

  typedef struct packed {
    logic          en;
    logic          set;
    logic [AW-1:0] addr;
    logic          swap;
  } wr_cmd_t;

  // compute phase
  logic [AW-1:0] k;
  logic          src_set;
  logic          in_gap;
  logic [GW-1:0] gap_cnt;
  // load
  logic [AW-1:0] ld_cnt;
  logic          ld_full;
  logic          ld_set_r;
  // unload
  logic          unl_pending, unl_active;
  logic [GW-1:0] unl_wait;
  logic [AW-1:0] unl_cnt;
  logic          unl_set_r;

  logic issue, last_k, last_stage, comp_end;
  logic accept, ld_last, ld_done, unl_last, unl_free, start_comp;

  always_comb begin
    issue      = (phase == PH_COMPUTE) && !in_gap;
    last_k     = (k == AW'(HALF - 1));
    last_stage = (stage == SW'(LOGN));
    comp_end   = issue && last_k && last_stage;

    in_ready   = (phase == PH_LOAD) && !ld_full;
    accept     = in_ready && in_valid;
    ld_last    = (ld_cnt == AW'(HALF - 1));
    ld_done    = ld_full || (accept && ld_last);

    unl_last   = unl_active && (unl_cnt == AW'(HALF - 1));
    unl_free   = !unl_pending && (!unl_active || unl_last);
    start_comp = (phase == PH_LOAD) && ld_done && unl_free;
  end

  // ---------------------------------------------------------------- phases
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase    <= PH_LOAD;
      k        <= '0;
      stage    <= SW'(1);
      src_set  <= 1'b0;
      in_gap   <= 1'b0;
      gap_cnt  <= '0;
      ld_cnt   <= '0;
      ld_full  <= 1'b0;
      ld_set_r <= 1'b0;
    end else begin
      if (accept) begin
        ld_cnt <= ld_cnt + AW'(1);
        if (ld_last) ld_full <= 1'b1;
      end
      unique case (phase)
        PH_LOAD: begin
          if (start_comp) begin
            phase   <= PH_COMPUTE;
            k       <= '0;
            stage   <= SW'(1);
            src_set <= ld_set_r;
            in_gap  <= 1'b0;
            ld_cnt  <= '0;
            ld_full <= 1'b0;
          end
        end
        PH_COMPUTE: begin
          if (in_gap) begin
            gap_cnt <= gap_cnt - GW'(1);
            if (gap_cnt == GW'(1)) in_gap <= 1'b0;
          end else begin
            k <= k + AW'(1);
            if (last_k) begin
              src_set <= !src_set;
              if (last_stage) begin
                // the set just read is free: it takes the next input
                phase    <= PH_LOAD;
                ld_set_r <= src_set;
              end else begin
                stage <= stage + SW'(1);
                if (GAP > 0) begin
                  in_gap  <= 1'b1;
                  gap_cnt <= GW'(GAP);
                end
              end
            end
          end
        end
        default: phase <= PH_LOAD;
      endcase
    end
  end

  // ---------------------------------------------------------------- unload
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      unl_pending <= 1'b0;
      unl_active  <= 1'b0;
      unl_wait    <= '0;
      unl_cnt     <= '0;
      unl_set_r   <= 1'b0;
    end else begin
      if (comp_end) begin
        unl_set_r <= !src_set;       // the set the last stage wrote
        unl_cnt   <= '0;
        if (UGAP == 0) begin
          unl_active <= 1'b1;
        end else begin
          unl_pending <= 1'b1;
          unl_wait    <= GW'(UGAP);
        end
      end else if (unl_pending) begin
        unl_wait <= unl_wait - GW'(1);
        if (unl_wait == GW'(1)) begin
          unl_pending <= 1'b0;
          unl_active  <= 1'b1;
        end
      end else if (unl_active) begin
        unl_cnt <= unl_cnt + AW'(1);
        if (unl_last) unl_active <= 1'b0;
      end
    end
  end

  // ------------------------------------------------- addresses, eq. (6)/(7)
  always_comb begin
    rd_en    = issue;
    rd_set   = src_set;
    sa1      = {k[0], k[AW-1:1]};
    sa2      = {!k[0], k[AW-1:1]};
    ca       = k & ({AW{1'b1}} << (stage - SW'(1)));

    ld_we    = accept;
    ld_set   = ld_set_r;
    ld_addr  = ld_cnt;
    ld_swap  = ld_cnt[AW-1];

    unl_en   = unl_active;
    unl_set  = unl_set_r;
    unl_addr = unl_cnt;

    busy     = (phase == PH_COMPUTE) || unl_pending || unl_active;
  end

  // --------------------------------------------- delayed routing controls
  wr_cmd_t wr_pipe [WLAT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      op_set    <= 1'b0;
      c1        <= 1'b0;
      out_valid <= 1'b0;
      out_set   <= 1'b0;
      out_swap  <= 1'b0;
      out_index <= '0;
      for (int i = 0; i < WLAT; i++) wr_pipe[i] <= '0;
    end else begin
      op_set    <= src_set;
      c1        <= k[0];
      out_valid <= unl_active;
      out_set   <= unl_set_r;
      out_swap  <= unl_cnt[AW-1];
      out_index <= unl_cnt;
      wr_pipe[0] <= '{en: issue, set: !src_set, addr: k, swap: k[AW-1]};
      for (int i = 1; i < WLAT; i++) wr_pipe[i] <= wr_pipe[i-1];
    end
  end

  always_comb begin
    wr_en  = wr_pipe[WLAT-1].en;
    wr_set = wr_pipe[WLAT-1].set;
    da     = wr_pipe[WLAT-1].addr;
    c2     = wr_pipe[WLAT-1].swap;
  end

  // ------------------------------------------------------------ checks
  // The butterfly write-back and the input stream never share a RAM set,
  // and a RAM set is never read by the butterfly and the unload together.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_no_write_clash: assert (!(wr_en && ld_we && (wr_set == ld_set)))
        else $error("fft_ctrl: write-back and input stream hit the same RAM set");
      a_no_read_clash: assert (!(rd_en && unl_en))
        else $error("fft_ctrl: butterfly fetch and unload in the same cycle");
    end
  end

endmodule

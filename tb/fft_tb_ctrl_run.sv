// fft_tb_ctrl_run: drives one fft_ctrl instance with a never-pausing input
// stream for FRAMES transforms and checks its outputs cycle by cycle:
//   - per butterfly k of stage s: SA1 = k0 k_(n-2)..k_1, SA2 = ~k0 k_(n-2)..k_1,
//     C1 = k0 one cycle later, CA = k with its s-1 low bits cleared;
//     for N = 8 also the literal values of the 8-point signal table;
//   - write-back WLAT = 1 + MULT_LAT cycles after each issue, with DA = k,
//     C2 = k_(n-2), into the set the stage does not read;
//   - the source set alternates from stage to stage;
//   - stages follow each other after exactly GAP idle cycles;
//   - unload: N/2 consecutive fetches from the set the last stage wrote,
//     addresses 0 .. N/2-1, starting UGAP+1 cycles after the last issue;
//   - load: pair addresses 0 .. N/2-1 with swap = MSB, into the other set;
//   - period between frames N/2*(1+n) + (n-1)*GAP + UGAP (the first period
//     lacks UGAP: no earlier result has to be unloaded).
module fft_tb_ctrl_run #(
  parameter int N        = 8,
  parameter int MULT_LAT = 5,
  parameter int FRAMES   = 3,
  localparam int AW      = $clog2(N) - 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int LOGN = $clog2(N);
  localparam int HALF = N / 2;
  localparam int WLAT = 1 + MULT_LAT;
  localparam int GAP  = (WLAT + 1 > N / 4) ? WLAT + 1 - N / 4 : 0;
  localparam int UGAP = (WLAT + 1 > HALF) ? WLAT + 1 - HALF : 0;
  localparam int PERIOD = HALF * (1 + LOGN) + (LOGN - 1) * GAP + UGAP;
  localparam int SW = $clog2(LOGN + 1);

  logic          in_valid, in_ready, ld_we, ld_set, ld_swap;
  logic [AW-1:0] ld_addr, sa1, sa2, ca, da, unl_addr, out_index;
  logic          rd_en, rd_set, op_set, c1, wr_en, wr_set, c2;
  logic          unl_en, unl_set, out_valid, out_set, out_swap, busy;
  fft_pkg::phase_e phase;
  logic [SW-1:0] stage;

  fft_ctrl #(.N(N), .MULT_LAT(MULT_LAT)) dut (.*);

  // the 8-point signal table (C1, C2, SA1, SA2, DA for k = 0..3)
  localparam int T_C1  [4] = '{0, 1, 0, 1};
  localparam int T_C2  [4] = '{0, 0, 1, 1};
  localparam int T_SA1 [4] = '{0, 2, 1, 3};
  localparam int T_SA2 [4] = '{2, 0, 3, 1};
  localparam int T_DA  [4] = '{0, 1, 2, 3};

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL(N=%0d): %s", N, what);
    end
  endtask

  int  cyc;
  int  n_issue;                 // butterflies issued in the current frame
  int  frame_out, unl_seen, ld_seen, frames_loaded;
  int  last_issue_cyc, first_acc_prev;
  int  wq_cyc [$], wq_k [$];
  bit  wq_set [$];
  logic prev_c1_exp, c1_pending, stage_set [LOGN + 1], last_set;
  int  unl_start_exp;

  always @(posedge clk) in_valid <= rst_n;

  initial begin
    cyc = 0; n_issue = 0; frame_out = 0; unl_seen = 0; ld_seen = 0; frames_loaded = 0;
    checks = 0; failures = 0; done = 1'b0; c1_pending = 1'b0; first_acc_prev = -1;
    last_issue_cyc = -1; unl_start_exp = -1; last_set = 1'b0;
    forever begin
      @(negedge clk);
      cyc++;
      if (!rst_n) continue;
      // operand routing, one cycle after an issue
      if (c1_pending) chk(c1 == prev_c1_exp, $sformatf("C1 %0d, expected %0d", c1, prev_c1_exp));
      c1_pending = 1'b0;
      // load side
      if (ld_we) begin
        chk(in_ready && in_valid, "load write without handshake");
        chk(ld_addr == AW'(ld_seen), $sformatf("load address %0d, expected %0d", ld_addr, ld_seen));
        chk(ld_swap == ld_addr[AW-1], "load swap is not the address MSB");
        if (frames_loaded > 0) chk(ld_set == !last_set, "load set is not the free set");
        if (ld_seen == 0) begin
          if (first_acc_prev >= 0 && (frames_loaded >= 2 || UGAP == 0) && frames_loaded < FRAMES)
            chk(cyc - first_acc_prev == PERIOD,
                $sformatf("frame period %0d, expected %0d", cyc - first_acc_prev, PERIOD));
          first_acc_prev = cyc;
        end
        ld_seen = (ld_seen + 1) % HALF;
        if (ld_seen == 0) frames_loaded++;
      end
      // butterfly issue
      if (rd_en) begin
        int s, k;
        logic [AW-1:0] kk, e1, e2, ec;
        s  = n_issue / HALF + 1;
        k  = n_issue % HALF;
        kk = AW'(k);
        e1 = {kk[0], kk[AW-1:1]};
        e2 = {!kk[0], kk[AW-1:1]};
        ec = AW'((k >> (s - 1)) << (s - 1));
        chk(int'(stage) == s, $sformatf("stage %0d, expected %0d", stage, s));
        chk(sa1 == e1 && sa2 == e2, $sformatf("s%0d k%0d: SA1 %0d SA2 %0d, expected %0d %0d",
                                              s, k, sa1, sa2, e1, e2));
        chk(ca == ec, $sformatf("s%0d k%0d: CA %0d, expected %0d", s, k, ca, ec));
        if (N == 8) begin
          chk(int'(sa1) == T_SA1[k] && int'(sa2) == T_SA2[k], "8-point table SA1/SA2");
        end
        if (k == 0) begin
          stage_set[s] = rd_set;
          if (s > 1) begin
            chk(rd_set == !stage_set[s-1], "RAM sets not swapped between stages");
            chk(cyc - last_issue_cyc == GAP + 1,
                $sformatf("stage gap %0d cycles, expected %0d", cyc - last_issue_cyc - 1, GAP));
          end
        end else begin
          chk(cyc - last_issue_cyc == 1, "butterflies of a stage not back to back");
          chk(rd_set == stage_set[s], "source set changed inside a stage");
        end
        last_issue_cyc = cyc;
        prev_c1_exp = kk[0];
        c1_pending = 1'b1;
        wq_cyc.push_back(cyc);
        wq_k.push_back(k);
        wq_set.push_back(!rd_set);
        n_issue++;
        if (n_issue == LOGN * HALF) begin
          n_issue = 0;
          last_set = !rd_set;
          unl_start_exp = cyc + UGAP + 1;
        end
      end
      // write-back
      if (wr_en) begin
        if (wq_cyc.size() == 0) begin
          chk(1'b0, "write-back without an issued butterfly");
        end else begin
          int ic, k;
          bit st;
          logic [AW-1:0] kk;
          ic = wq_cyc.pop_front();
          k  = wq_k.pop_front();
          st = wq_set.pop_front();
          kk = AW'(k);
          chk(cyc - ic == WLAT, $sformatf("write-back %0d cycles after issue, expected %0d",
                                           cyc - ic, WLAT));
          chk(da == kk && c2 == kk[AW-1] && wr_set == st,
              $sformatf("k%0d: DA %0d C2 %0d set %0d", k, da, c2, wr_set));
          if (N == 8) chk(int'(da) == T_DA[k] && int'(c2) == T_C2[k], "8-point table DA/C2");
        end
      end
      if (N == 8 && c1_pending) chk(int'(prev_c1_exp) == T_C1[n_issue == 0 ? HALF - 1 : (n_issue - 1) % HALF],
                                     "8-point table C1");
      // unload
      if (unl_en) begin
        chk(!rd_en, "unload during a butterfly issue");
        if (unl_seen == 0)
          chk(cyc == unl_start_exp, $sformatf("unload starts at %0d, expected %0d", cyc, unl_start_exp));
        chk(unl_addr == AW'(unl_seen) && unl_set == last_set,
            $sformatf("unload address %0d set %0d, expected %0d set %0d",
                      unl_addr, unl_set, unl_seen, last_set));
        unl_seen = (unl_seen + 1) % HALF;
        if (unl_seen == 0) begin
          frame_out++;
          if (frame_out == FRAMES) done = 1'b1;
        end
      end
    end
  end

endmodule

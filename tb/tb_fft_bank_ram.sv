// tb_fft_bank_ram: checks one RAM bank (16 words of 48 bits here): writes
// every address, reads it back one cycle after the address, then writes and
// reads in the same cycle (the read must return the old word while another
// address is written, and old data when the same address is written), and
// checks that the read data holds while re is low.
module tb_fft_bank_ram;

  localparam int DEPTH = 16;
  localparam int W     = 48;
  localparam int AW    = $clog2(DEPTH);

  logic          clk = 1'b0;
  logic          we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0]  wdata = '0, rdata;
  logic [W-1:0]  model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  fft_bank_ram #(.DEPTH(DEPTH), .W(W)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  task automatic expect_data(input logic [W-1:0] exp, input string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL: %s: read %h, expected %h", what, rdata, exp);
    end
  endtask

  initial begin
    logic [W-1:0] held;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      we = 1'b1;
      waddr = AW'(a);
      wdata = W'({$urandom, $urandom});
      model[a] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    for (int a = DEPTH - 1; a >= 0; a--) begin
      re = 1'b1;
      raddr = AW'(a);
      @(negedge clk);
      expect_data(model[a], $sformatf("readback %0d", a));
    end
    // simultaneous write and read
    for (int i = 0; i < 40; i++) begin
      int wa, ra;
      wa = $urandom_range(DEPTH - 1);
      ra = (i % 4 == 0) ? wa : $urandom_range(DEPTH - 1);
      we = 1'b1;
      waddr = AW'(wa);
      wdata = W'({$urandom, $urandom});
      re = 1'b1;
      raddr = AW'(ra);
      @(negedge clk);
      expect_data(model[ra], $sformatf("read %0d during write %0d", ra, wa));
      model[wa] = wdata;
    end
    // hold while re is low
    we = 1'b0;
    re = 1'b0;
    held = rdata;
    raddr = raddr + 1'b1;
    repeat (3) @(negedge clk);
    expect_data(held, "hold with re low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

endmodule

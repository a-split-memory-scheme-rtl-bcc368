// tb_fft_swap2: checks the 2x2 routing switch with random words for both
// settings of the select bit: straight (out0 = in0, out1 = in1) for sel = 0,
// crossed for sel = 1.
module tb_fft_swap2;

  localparam int W = 48;
  logic         sel;
  logic [W-1:0] in0, in1, out0, out1;
  int checks = 0, failures = 0;

  fft_swap2 #(.W(W)) dut (.sel, .in0, .in1, .out0, .out1);

  initial begin
    for (int i = 0; i < 200; i++) begin
      sel = 1'(i % 2);
      in0 = W'({$urandom, $urandom});
      in1 = W'({$urandom, $urandom});
      #1;
      checks++;
      if (sel == 1'b0 ? (out0 != in0 || out1 != in1) : (out0 != in1 || out1 != in0)) begin
        failures++;
        $display("FAIL: sel=%0d in0=%h in1=%h out0=%h out1=%h", sel, in0, in1, out0, out1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

endmodule

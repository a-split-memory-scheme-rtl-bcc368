// fft_swap2: 2x2 routing switch between the butterfly and the U/L RAM pair.
//
// The split-memory FFT keeps the two operands (and the two results) of every
// butterfly in different RAMs, but which RAM holds which operand alternates
// from one butterfly to the next. One control bit decides it: with sel = 0
// the switch passes straight through (out0 = in0, out1 = in1), with sel = 1
// it crosses (out0 = in1, out1 = in0). On the read side sel is C1 (= k0 of
// the butterfly counter), on the write side C2 (= the counter's MSB); the
// same switch also orders the sample pairs of the load and unload streams.
// Purely combinational; W is the width of one routed word.
module fft_swap2 #(
  parameter int W = 48
) (
  input  logic         sel,
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  output logic [W-1:0] out0,
  output logic [W-1:0] out1
);

  always_comb begin
    if (sel) begin
      out0 = in1;
      out1 = in0;
    end else begin
      out0 = in0;
      out1 = in1;
    end
  end

endmodule

// fft_bank_ram: one of the four RAM banks (U, L, U', L') of the split-memory
// FFT processor.
//
// Each bank holds N/2 complex words, so the four banks together hold the 2N
// words of the two RAM sets. A bank has one write port and one read port
// that work in the same cycle, as a dual-port FPGA block RAM does: at a stage
// boundary of the pipelined FFT the last results of one stage are still being
// written into a set while the next stage already reads from it.
//   write: we, waddr, wdata take effect at the rising clock edge.
//   read : re, raddr sampled at the rising edge; rdata holds the word one
//          cycle later and keeps it while re is low. A read of the address
//          being written in the same cycle returns the old word.
// The dual-port organisation and the one-cycle read are this design's
// choices; the banks' size and role follow the architecture.
module fft_bank_ram #(
  parameter int DEPTH = 512,
  parameter int W     = 48,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule

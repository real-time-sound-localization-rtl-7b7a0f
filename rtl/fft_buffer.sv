// fft_buffer: working memory of one channel's in-place FFT.
//
// DEPTH complex words, each holding a W-bit real and a W-bit imaginary part
// (the document's 2 x 1024 x 16-bit FFT buffer), kept side by side as one
// 2W-bit word {re, im}. One write port and one read port; the read is
// synchronous: rd_data shows the word at rd_addr one clock after the address
// is presented. A write and a read of the same address in one clock return
// the old word. The port arrangement is this design's choice.
module fft_buffer #(
  parameter int DEPTH = 1024,
  parameter int W     = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            we,
  input  logic [AW-1:0]   wr_addr,
  input  logic [2*W-1:0]  wr_data,
  input  logic [AW-1:0]   rd_addr,
  output logic [2*W-1:0]  rd_data
);
  logic [2*W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule

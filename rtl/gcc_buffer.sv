// gcc_buffer: one GCC buffer, the magnitude and phase of one channel's
// spectrum for one segment.
//
// DEPTH entries (one per frequency bin) of a W-bit magnitude and a W-bit
// phase, the document's 2 x 256 x 16-bit buffer, stored as one word
// {mag, phase}. One write port and one synchronous read port: rd_data holds
// the entry at rd_addr one clock after the address. The port arrangement is
// this design's choice.
module gcc_buffer #(
  parameter int DEPTH = 256,
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

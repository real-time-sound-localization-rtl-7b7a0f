// channel_buffer: stage 1 of the pipeline for one microphone channel.
//
// Each sample_valid strobe stores the 8-bit sample at the running write
// address. The segment length (256, 512 or 1024 samples, from seg_sel) is
// sampled when a segment starts, at write address 0, and held in seg_log2
// until the segment ends; on the last sample of the segment seg_done pulses
// for one clock and the address returns to 0. Stage 2 reads the segment
// through the synchronous read port (rd_data one clock after rd_addr) while
// the next segment is already being written from address 0; this is safe as
// long as samples come no faster than every second clock.
//
// The document gives the buffer size (1024 x 8 bits) and the user-selectable
// length; the counter and the hand-over are this design's own.
module channel_buffer
  import sl_pkg::*;
#(
  parameter int DEPTH = 1024,
  parameter int DW    = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           sample_valid,
  input  logic [DW-1:0]  sample,
  input  logic [1:0]     seg_sel,
  output logic           seg_done,    // last sample of a segment written
  output logic [3:0]     seg_log2,    // length of the segment being written
  output logic [AW-1:0]  wr_ptr,
  input  logic [AW-1:0]  rd_addr,
  output logic [DW-1:0]  rd_data
);
  logic [DW-1:0] mem [DEPTH];
  logic [3:0]    cur_log2;
  logic [AW:0]   seg_len;

  // At address 0 the new selection applies; otherwise the held one.
  assign cur_log2 = (wr_ptr == '0) ? seg_log2_f(seg_sel) : seg_log2;
  assign seg_len  = (AW+1)'(1) << cur_log2;

  function automatic logic [3:0] seg_log2_f(input logic [1:0] s);
    logic [3:0] l;
    l = sl_pkg::log2_of_sel(s);
    if (l > 4'(AW)) l = 4'(AW);   // a smaller DEPTH caps the length
    return l;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      seg_log2 <= seg_log2_f(seg_sel);
      seg_done <= 1'b0;
    end else begin
      seg_done <= 1'b0;
      if (sample_valid) begin
        seg_log2 <= cur_log2;
        if ({1'b0, wr_ptr} == seg_len - 1'b1) begin
          wr_ptr   <= '0;
          seg_done <= 1'b1;
        end else begin
          wr_ptr <= wr_ptr + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (sample_valid) mem[wr_ptr] <= sample;
    rd_data <= mem[rd_addr];
  end
endmodule

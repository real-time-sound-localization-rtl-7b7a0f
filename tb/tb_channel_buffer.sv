// tb_channel_buffer: self-checking test of stage-1 acquisition.
//
// Feeds segments of 1024, 256 and 512 samples (random 8-bit values, one
// sample every 3 clocks). Checks that seg_done pulses exactly once, on the
// clock after the last sample of each segment, with seg_log2 giving that
// segment's length; that a change of seg_sel in the middle of a segment only
// takes effect with the next segment; and that every stored sample reads
// back through the synchronous read port, also while the next segment is
// being written.
module tb_channel_buffer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_valid = 1'b0;
  logic [7:0] sample = '0;
  logic [1:0] seg_sel = 2'd2;
  logic seg_done;
  logic [3:0] seg_log2;
  logic [9:0] wr_ptr, rd_addr = '0;
  logic [7:0] rd_data;
  logic [7:0] ref_mem [1024];
  int checks = 0, failures = 0;
  int done_count = 0;

  channel_buffer dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && seg_done) done_count++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one segment of 2**lg samples; seg_sel switched to nsel halfway
  task automatic segment(input int lg, input logic [1:0] nsel);
    int n_prev;
    n_prev = done_count;
    for (int n = 0; n < (1 << lg); n++) begin
      @(negedge clk);
      sample_valid = 1'b1; sample = 8'($urandom()); ref_mem[n] = sample;
      if (n == (1 << (lg - 1))) seg_sel = nsel;
      @(negedge clk);
      sample_valid = 1'b0;
      check(seg_done == (n == (1 << lg) - 1), $sformatf("seg_done at n=%0d lg=%0d", n, lg));
      if (n == (1 << lg) - 1)
        check(seg_log2 == 4'(lg), $sformatf("seg_log2 %0d exp %0d", seg_log2, lg));
      @(negedge clk);
    end
    check(done_count == n_prev + 1, "one seg_done per segment");
  endtask

  task automatic readback(input int lg);
    for (int n = 0; n < (1 << lg); n++) begin
      @(negedge clk);
      rd_addr = 10'(n);
      @(negedge clk);
      check(rd_data == ref_mem[n], $sformatf("read %0d got %h exp %h", n, rd_data, ref_mem[n]));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    segment(10, 2'd0);   // 1024, then ask for 256
    readback(10);
    segment(8, 2'd1);    // 256, then ask for 512
    readback(8);
    segment(9, 2'd1);    // 512
    readback(9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

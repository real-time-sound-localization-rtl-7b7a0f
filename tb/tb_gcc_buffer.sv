// tb_gcc_buffer: self-checking test of the gcc_buffer memory.
//
// Fills every address with random words, then mixes 4000 random reads and
// writes against a reference array. Each read is checked one clock after its
// address is presented (synchronous read). A read of the address being
// written in the same clock must return the old word.
module tb_gcc_buffer;
  localparam int DEPTH = 256;
  localparam int AW = $clog2(DEPTH);
  logic clk = 1'b0;
  logic we = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [31:0] wr_data = '0, rd_data;
  logic [31:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  gcc_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] expv;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; wr_addr = AW'(a); wr_data = $urandom(); ref_mem[a] = wr_data;
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      rd_addr = AW'($urandom_range(DEPTH - 1));
      we = ($urandom_range(1) == 1);
      wr_addr = (i % 7 == 0) ? rd_addr : AW'($urandom_range(DEPTH - 1));
      wr_data = $urandom();
      expv = ref_mem[rd_addr];
      if (we) ref_mem[wr_addr] = wr_data;
      @(negedge clk);
      we = 1'b0;
      checks++;
      if (rd_data !== expv) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", rd_addr, rd_data, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

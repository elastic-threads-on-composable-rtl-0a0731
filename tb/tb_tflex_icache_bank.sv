// tb_tflex_icache_bank: fills the bank with a pattern and reads it back
// with the one-cycle read latency.
module tb_tflex_icache_bank;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, re;
  logic [9:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  tflex_icache_bank dut (.*);
  int checks = 0, failures = 0;
  function automatic logic [31:0] pat(int i); return 32'(i) * 32'h9E37_79B9 ^ 32'h5a5a; endfunction
  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; waddr = 10'(i); wdata = pat(i);
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 500; k++) begin
      int i;
      i = $urandom_range(0, 1023);
      @(negedge clk); re = 1; raddr = 10'(i);
      @(negedge clk); re = 0;
      checks++;
      if (rdata !== pat(i)) begin failures++; $display("FAIL %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

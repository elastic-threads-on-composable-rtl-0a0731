// tb_tflex_header_cache: fills headers for several blocks of a 4-core
// processor (participant 1), reads the words back, checks hit/miss
// (header and I-cache tag must both match), the I-cache line each block
// maps to, replacement when two blocks share an entry, and invalidation.
module tb_tflex_header_cache;
  import tflex_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] log2n; logic [CID_W-1:0] pos; logic inv;
  logic [31:0] lk_addr, rd_data, wr_data, tag_addr;
  logic lk_hit, wr_we, tag_we;
  logic [4:0] lk_idx, rd_idx, wr_idx, rd_word, wr_word;
  logic [7:0] lk_line;
  tflex_header_cache dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(string s, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", s, g, e); end
  endtask
  // a block owned by participant 1 of 4: (addr >> 7) mod 4 == 1
  function automatic logic [31:0] baddr(int k); return 32'((k * 4 + 1) * 128); endfunction
  task automatic fill(logic [31:0] a);
    lk_addr = a; #1;
    for (int w = 0; w < 32; w++) begin
      @(negedge clk); wr_we = 1; wr_idx = lk_idx; wr_word = 5'(w); wr_data = a ^ 32'(w * 7);
    end
    @(negedge clk); wr_we = 0; tag_we = 1; tag_addr = a;
    @(negedge clk); tag_we = 0;
  endtask
  initial begin
    log2n = 2; pos = 1; inv = 0; wr_we = 0; tag_we = 0; lk_addr = 0; rd_idx = 0; rd_word = 0;
    wr_idx = 0; wr_word = 0; wr_data = 0; tag_addr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 6; k++) begin lk_addr = baddr(k); #1 chk("cold miss", lk_hit, 0); end
    for (int k = 0; k < 6; k++) fill(baddr(k));
    for (int k = 0; k < 6; k++) begin
      lk_addr = baddr(k); #1;
      chk("hit", lk_hit, 1);
      chk("icache line", lk_line, 32'(1 * 8 + (k % 8)));
      rd_idx = lk_idx;
      for (int w = 0; w < 32; w++) begin rd_word = 5'(w); #1 chk("word", rd_data, baddr(k) ^ 32'(w * 7)); end
    end
    // block 8 shares I-cache line with block 0 (key mod 8) but not the header entry
    fill(baddr(8));
    lk_addr = baddr(0); #1 chk("I-tag replaced -> miss", lk_hit, 0);
    lk_addr = baddr(8); #1 chk("new block hits", lk_hit, 1);
    lk_addr = baddr(1); #1 chk("other block still hits", lk_hit, 1);
    // block 32 shares the header entry with block 0 (key mod 32)
    fill(baddr(32));
    lk_addr = baddr(32); #1 chk("block 32 hits", lk_hit, 1);
    lk_addr = baddr(8);  #1 chk("block 8 evicted by I-tag of 32", lk_hit, 0);
    @(negedge clk); inv = 1; @(negedge clk); inv = 0;
    for (int k = 0; k < 6; k++) begin lk_addr = baddr(k); #1 chk("miss after inv", lk_hit, 0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

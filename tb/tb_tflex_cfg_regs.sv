// tb_tflex_cfg_regs: writes legal and illegal compositions into the
// configuration register and checks what it holds afterwards.
module tb_tflex_cfg_regs;
  import tflex_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we, cfg_err;
  cfg_t cfg_wdata, cfg;
  tflex_cfg_regs dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(string s, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", s, g, e); end
  endtask
  task automatic wr(cfg_t v);
    cfg_wdata = v; cfg_we = 1; @(posedge clk); #1 cfg_we = 0;
  endtask
  initial begin
    repeat (200) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    cfg_we = 0; cfg_wdata = '0;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    chk("reset disabled", 32'(cfg), 0);
    wr('{en:1, log2n:3'd2, log2w:3'd1, pos:5'd3, base:5'd4});
    chk("4-core write", 32'(cfg), 32'({1'b1, 3'd2, 3'd1, 5'd3, 5'd4}));
    chk("no error", 32'(cfg_err), 0);
    wr('{en:1, log2n:3'd2, log2w:3'd1, pos:5'd4, base:5'd0});   // pos out of range
    chk("bad pos kept old", 32'(cfg), 32'({1'b1, 3'd2, 3'd1, 5'd3, 5'd4}));
    chk("bad pos error", 32'(cfg_err), 1);
    wr('{en:1, log2n:3'd6, log2w:3'd0, pos:5'd0, base:5'd0});   // 64 cores: too many
    chk("too many kept old", 32'(cfg), 32'({1'b1, 3'd2, 3'd1, 5'd3, 5'd4}));
    wr('{en:1, log2n:3'd1, log2w:3'd2, pos:5'd0, base:5'd0});   // wider than its size
    chk("bad width error", 32'(cfg_err), 1);
    wr('{en:1, log2n:3'd5, log2w:3'd2, pos:5'd31, base:5'd0});
    chk("32-core write", 32'(cfg), 32'({1'b1, 3'd5, 3'd2, 5'd31, 5'd0}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

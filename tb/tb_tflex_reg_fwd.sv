// tb_tflex_reg_fwd: pending register writes are visible through the
// forwarding port (youngest wins) but not in the register file until
// commit; commit drains them in order (last write to a register wins),
// flush discards them, and wr_done pulses once per accepted write.
module tb_tflex_reg_fwd;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, wr_done, commit, flush, commit_done, rf_we, fwd_hit;
  logic [6:0] in_reg, rf_wa, fwd_reg;
  logic [63:0] in_data, rf_wd, fwd_data, rd0, rd1;
  tflex_reg_fwd dut (.*);
  tflex_regfile u_rf (.clk, .rst_n, .ra0(fwd_reg), .rd0, .ra1(7'd0), .rd1, .we(rf_we), .wa(rf_wa), .wd(rf_wd));
  int checks = 0, failures = 0, dones = 0, cdones = 0;
  always @(posedge clk) if (rst_n) begin if (wr_done) dones++; if (commit_done) cdones++; end
  task automatic chk(string s, logic [63:0] g, logic [63:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", s, g, e); end
  endtask
  task automatic put(int r, logic [63:0] d);
    @(negedge clk); in_valid = 1; in_reg = 7'(r); in_data = d;
    @(negedge clk); in_valid = 0;
  endtask
  initial begin
    in_valid = 0; in_reg = 0; in_data = 0; commit = 0; flush = 0; fwd_reg = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    put(3, 64'h33); put(9, 64'h99); put(3, 64'h34);
    @(negedge clk); fwd_reg = 3; #1;
    chk("fwd hit", fwd_hit, 1); chk("fwd youngest", fwd_data, 64'h34); chk("rf not yet", rd0, 0);
    fwd_reg = 5; #1; chk("fwd miss", fwd_hit, 0);
    chk("wr_done count", 64'(dones), 3);
    @(negedge clk); commit = 1; @(negedge clk); commit = 0;
    repeat (6) @(negedge clk);
    chk("commit done once", 64'(cdones), 1);
    fwd_reg = 3; #1; chk("r3 committed", rd0, 64'h34); chk("queue empty", fwd_hit, 0);
    fwd_reg = 9; #1; chk("r9 committed", rd0, 64'h99);
    put(9, 64'hdead);
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    @(negedge clk); commit = 1; @(negedge clk); commit = 0;
    repeat (4) @(negedge clk);
    fwd_reg = 9; #1; chk("flushed write lost", rd0, 64'h99);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (500) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_tflex_nbp: trains one predictor slice and checks what it learned.
// A block that always leaves by exit 5 to a fixed target must come to be
// predicted so; a block whose exit alternates 1,2,1,2 (the local history
// sees the pattern) must be predicted right after training; a call exit
// pushes block address + 640 into the forwarded stack top, and a return
// exit predicts that address and pops.
module tb_tflex_nbp;
  import tflex_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] log2n; logic pred_req, upd;
  logic [31:0] pred_addr, pred_target, upd_addr, upd_target;
  logic [GHIST_W-1:0] ghist_in, ghist_out, upd_ghist;
  logic [63:0] ras_in, ras_out;
  logic [2:0] pred_exit, upd_exit; logic [1:0] pred_kind, upd_kind;
  tflex_nbp dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(string s, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", s, g, e); end
  endtask
  // commit one block: predict with the current history, then update
  logic [GHIST_W-1:0] gh;
  task automatic run(logic [31:0] a, logic [2:0] ex, logic [1:0] k, logic [31:0] t);
    @(negedge clk); upd = 1; upd_addr = a; upd_ghist = gh; upd_exit = ex; upd_kind = k; upd_target = t;
    @(negedge clk); upd = 0;
    gh = {gh[GHIST_W-4:0], ex};
  endtask
  initial begin
    int ok;
    log2n = 0; pred_req = 0; upd = 0; pred_addr = 0; ghist_in = 0; ras_in = 0;
    upd_addr = 0; upd_ghist = 0; upd_exit = 0; upd_kind = 0; upd_target = 0; gh = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 8; i++) run(32'h1000, 3'd5, EX_BRANCH, 32'h2000);
    pred_addr = 32'h1000; ghist_in = gh; #1;
    chk("biased exit", pred_exit, 5); chk("biased target", pred_target, 32'h2000);
    chk("kind", pred_kind, EX_BRANCH);
    chk("history shifted", ghist_out, {gh[GHIST_W-4:0], 3'd5});
    // alternating exits 1,2 to two targets
    for (int i = 0; i < 40; i++)
      run(32'h3000, (i % 2) ? 3'd2 : 3'd1, EX_BRANCH, (i % 2) ? 32'h3200 : 32'h3100);
    ok = 0;
    for (int i = 0; i < 10; i++) begin
      logic [2:0] e;
      e = (i % 2) ? 3'd2 : 3'd1;
      pred_addr = 32'h3000; ghist_in = gh; #1;
      checks++;
      if (pred_exit == e && pred_target == ((i % 2) ? 32'h3200 : 32'h3100)) ok++;
      else begin failures++; $display("FAIL alternating step %0d exit %0d", i, pred_exit); end
      run(32'h3000, e, EX_BRANCH, (i % 2) ? 32'h3200 : 32'h3100);
    end
    // call then return
    for (int i = 0; i < 4; i++) begin
      run(32'h5000, 3'd0, EX_CALL, 32'h8000);
      run(32'h8000, 3'd3, EX_RETURN, 32'h5280);
    end
    pred_addr = 32'h5000; ghist_in = gh; ras_in = {32'h0, 32'h7777}; #1;
    chk("call predicted", pred_kind, EX_CALL); chk("call target", pred_target, 32'h8000);
    chk("push return point", ras_out[31:0], 32'h5280); chk("old top moves down", ras_out[63:32], 32'h7777);
    @(negedge clk); pred_req = 1; @(negedge clk); pred_req = 0;
    gh = ghist_out;
    pred_addr = 32'h8000; ghist_in = gh; ras_in = {32'h7777, 32'h5280}; #1;
    chk("return predicted", pred_kind, EX_RETURN); chk("return target from stack", pred_target, 32'h5280);
    chk("pop", ras_out[31:0], 32'h7777);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

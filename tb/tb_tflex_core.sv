// tb_tflex_core: one TFlex core running alone as a 1-core logical
// processor. Its control-network output is looped straight back to its
// input (a one-member broadcast bus), its memory port goes straight to the
// behavioural L2, and its four mesh links are tied off. It runs the same
// two-block program as the chip test (immediates, predication with one
// squashed path, a store forwarded to a same-block load, an L2 load,
// register writes, register reads by the next block, a committed store
// read back, the block hand-off and the halt exit) twice, cold and then
// with the header cache warm, and compares the registers with the values
// worked out by hand.
module tb_tflex_core;
  import tflex_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                cfg_we;
  cfg_t                cfg_wdata;
  logic [3:0]          no_valid, ni_ready;
  opn_pkt_t [3:0]      no_pkt, ni_pkt;
  logic                co_valid, co_ready, ci_ready;
  ctrl_msg_t           co_msg;
  logic                os_valid, os_ready;
  ctrl_msg_t           os_msg;
  logic                b_valid;
  ctrl_msg_t           b_msg;
  logic                l2_req_valid, l2_req_ready, l2_rsp_valid;
  mem_req_t            l2_req;
  mem_rsp_t            l2_rsp;
  logic [15:0]         ev;

  // one-member control bus: the test's OS port wins over the core
  assign b_valid  = ci_ready && (os_valid || co_valid);
  assign b_msg    = os_valid ? os_msg : co_msg;
  assign os_ready = ci_ready;
  assign co_ready = ci_ready && !os_valid;
  assign ni_pkt   = '0;

  tflex_core dut (
    .clk, .rst_n, .my_id(5'd0), .cfg_we, .cfg_wdata,
    .ni_valid(4'b0), .ni_ready, .ni_pkt, .no_valid, .no_ready(4'b0), .no_pkt,
    .co_valid, .co_ready, .co_msg, .ci_valid(b_valid), .ci_msg(b_msg), .ci_ready,
    .mreq_valid(l2_req_valid), .mreq_ready(l2_req_ready), .mreq(l2_req),
    .mrsp_valid(l2_rsp_valid), .mrsp(l2_rsp), .ev);
  tflex_l2_model u_l2 (.clk, .rst_n, .req_valid(l2_req_valid), .req_ready(l2_req_ready),
                       .req(l2_req), .rsp_valid(l2_rsp_valid), .rsp(l2_rsp));

  int checks = 0, failures = 0;
  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------ program construction
  function automatic logic [8:0] tg(logic [1:0] t, int i);
    return {t, 7'(i)};
  endfunction
  function automatic logic [31:0] ins(opcode_e op, logic [1:0] pr, logic [4:0] xop,
                                      logic [8:0] t1, logic [8:0] t0);
    return {op, pr, xop, t1, t0};
  endfunction
  localparam logic [1:0] L = TT_LEFT, R = TT_RIGHT, P = TT_PRED;
  localparam logic [8:0] NO = 9'd0;

  logic [31:0] code [128];
  logic [31:0] hdr  [32];

  task automatic put_block(int unsigned addr);
    for (int w = 0; w < 32; w += 4)
      u_l2.mem[(addr >> 4) + w/4] = {hdr[w+3], hdr[w+2], hdr[w+1], hdr[w]};
    for (int i = 0; i < 128; i += 4)
      u_l2.mem[((addr + 128) >> 4) + i/4] = {code[i+3], code[i+2], code[i+1], code[i]};
  endtask

  task automatic clear_block();
    for (int i = 0; i < 128; i++) code[i] = '0;
    for (int w = 0; w < 32; w++) hdr[w] = '0;
  endtask

  localparam int unsigned BLK_A = 32'h1000, BLK_B = 32'h1280;
  localparam logic [63:0] M58 = 64'h1234_5678_9abc_def0;
  localparam logic [63:0] VA = 64'd100, VB = -64'sd3;

  task automatic build_program();
    // block A: R5 = a + 5, R6 = 2(a + b) via store/forwarded load,
    //          R4 = mem[0x58] + 1 (predicated true path), exit to block B
    clear_block();
    hdr[0] = 32'd3;            // three register writes
    hdr[1] = 32'h1;            // LSID 0 is the only store
    code[0]  = ins(OP_MOVI, 2'b00, 5'd0, 9'(VA), tg(L, 4));
    code[1]  = ins(OP_MOVI, 2'b00, 5'd0, 9'(VB), tg(R, 4));
    code[2]  = ins(OP_MOVI, 2'b00, 5'd0, 9'h40, tg(L, 8));
    code[3]  = ins(OP_MOVI, 2'b00, 5'd0, 9'h58, tg(L, 9));
    code[4]  = ins(OP_ADD,  2'b00, 5'd0, tg(L, 10), tg(R, 8));
    code[5]  = ins(OP_MOVI, 2'b00, 5'd0, 9'(VA), tg(L, 6));
    code[6]  = ins(OP_ADDI, 2'b00, 5'd0, 9'd5, tg(L, 12));
    code[7]  = ins(OP_MOVI, 2'b00, 5'd0, 9'h40, tg(L, 11));
    code[8]  = ins(OP_ST,   2'b00, 5'd0, NO, NO);
    code[9]  = ins(OP_LD,   2'b00, 5'd1, NO, tg(L, 14));
    code[10] = ins(OP_MOV,  2'b00, 5'd0, tg(L, 13), tg(R, 16));
    code[11] = ins(OP_LD,   2'b00, 5'd2, NO, tg(L, 16));
    code[12] = ins(OP_WR,   2'b00, 5'd0, 9'd5, NO);
    code[13] = ins(OP_TEQ,  2'b00, 5'd0, tg(P, 15), tg(P, 14));
    code[20] = ins(OP_MOV,  2'b00, 5'd0, tg(R, 13), tg(L, 13));
    code[14] = ins(OP_ADDI, 2'b11, 5'd0, 9'd1, tg(L, 17));
    code[15] = ins(OP_MOVI, 2'b10, 5'd0, 9'd7, tg(L, 18));
    code[16] = ins(OP_ADD,  2'b00, 5'd0, NO, tg(L, 19));
    code[17] = ins(OP_WR,   2'b00, 5'd0, 9'd4, NO);
    code[18] = ins(OP_WR,   2'b00, 5'd0, 9'd7, NO);   // squashed path: never fires
    code[19] = ins(OP_WR,   2'b00, 5'd0, 9'd6, NO);
    // the TEQ compares (a+b) with itself: i10 feeds its left, i20 its right
    code[10] = ins(OP_MOV,  2'b00, 5'd0, tg(L, 20), tg(R, 16));
    code[21] = ins(OP_MOVI, 2'b00, 5'd0, 9'd37, tg(L, 23));
    code[22] = ins(OP_MOVI, 2'b00, 5'd0, 9'd7, tg(R, 23));
    code[23] = ins(OP_SLL,  2'b00, 5'd0, NO, tg(L, 24));
    code[24] = ins(OP_BRO,  2'b00, 5'b00100, NO, NO);  // exit 1, branch
    put_block(BLK_A);

    // block B: reads R4, R5, R6; R8 = R4 + R6 (also stored to 0x70),
    //          R9 = R5 - 1, R10 = mem[0x40] (block A's store); exit to 0
    clear_block();
    hdr[0] = 32'd3;
    hdr[1] = 32'h1;
    hdr[2] = {1'b1, 15'd0, 7'd4, tg(L, 0)};
    hdr[3] = {1'b1, 15'd0, 7'd6, tg(R, 0)};
    hdr[4] = {1'b1, 15'd0, 7'd5, tg(L, 2)};
    code[0]  = ins(OP_ADD,  2'b00, 5'd0, tg(L, 6), tg(R, 5));
    code[2]  = ins(OP_ADDI, 2'b00, 5'd0, 9'h1ff, tg(L, 8));
    code[7]  = ins(OP_MOVI, 2'b00, 5'd0, 9'h70, tg(L, 5));
    code[5]  = ins(OP_ST,   2'b00, 5'd0, NO, NO);
    code[6]  = ins(OP_WR,   2'b00, 5'd0, 9'd8, NO);
    code[8]  = ins(OP_WR,   2'b00, 5'd0, 9'd9, NO);
    code[10] = ins(OP_MOVI, 2'b00, 5'd0, 9'h40, tg(L, 9));
    code[9]  = ins(OP_LD,   2'b00, 5'd1, NO, tg(L, 11));
    code[11] = ins(OP_WR,   2'b00, 5'd0, 9'd10, NO);
    code[12] = ins(OP_MOVI, 2'b00, 5'd0, 9'd0, tg(L, 13));
    code[13] = ins(OP_BRO,  2'b00, 5'b00010, NO, NO);  // exit 0, return kind
    put_block(BLK_B);

    u_l2.mem[32'h58 >> 4] = {M58, 64'h0};
  endtask

  function automatic logic [63:0] reg1(int r);
    return dut.u_rf.r[r];
  endfunction

  int unsigned evc [16];
  int unsigned halts, commits;
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < 16; k++) if (ev[k]) evc[k]++;
      if (b_valid && b_msg.kind == CM_HALT) halts++;
      if (b_valid && b_msg.kind == CM_COMMIT) commits++;
    end
  end

  task automatic os_send(cm_kind_e k, logic [31:0] a);
    os_msg      = '0;
    os_msg.kind = k;
    os_msg.a    = a;
    os_valid    = 1'b1;
    do @(posedge clk); while (!os_ready);
    os_valid    = 1'b0;
  endtask

  task automatic check_results(string run);
    logic [63:0] s, r4, r5, r6;
    s  = VA + VB;
    r4 = M58 + 1;
    r5 = VA + 5;
    r6 = 2 * s;
    check({run, " R4"},  reg1(4),  r4);
    check({run, " R5"},  reg1(5),  r5);
    check({run, " R6"},  reg1(6),  r6);
    check({run, " R7"},  reg1(7),  64'd0);
    check({run, " R8"},  reg1(8),  r4 + r6);
    check({run, " R9"},  reg1(9),  r5 - 1);
    check({run, " R10"}, reg1(10), s);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: halts=%0d commits=%0d", halts, commits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned t0;
  initial begin
    cfg_we = 1'b0; cfg_wdata = '0; os_valid = 1'b0; os_msg = '0;
    for (int k = 0; k < 16; k++) evc[k] = 0;
    halts = 0; commits = 0;
    for (int i = 0; i < 4096; i++) u_l2.mem[i] = '0;
    build_program();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    cfg_wdata = '{en: 1'b1, log2n: 3'd0, log2w: 3'd0, pos: 5'd0, base: 5'd0};
    cfg_we = 1'b1;
    @(posedge clk);
    cfg_we = 1'b0;

    os_send(CM_NEXT, BLK_A);
    wait (halts == 1);
    repeat (5) @(posedge clk);
    check_results("run1");
    check("run1 commits", 64'(commits), 64'd2);
    check("run1 header misses", 64'(evc[8]), 64'd2);

    t0 = evc[8];
    os_send(CM_NEXT, BLK_A);
    wait (halts == 2);
    repeat (5) @(posedge clk);
    check_results("run2");
    check("run2 no new header misses", 64'(evc[8] - t0), 64'd0);
    check("run2 commits", 64'(commits), 64'd4);
    check("local bypass seen",      64'(evc[1] > 0), 1);
    check("nothing left the core",  64'(evc[2]), 64'd0);
    check("D-cache misses seen",    64'(evc[3] > 0), 1);
    check("predicate squashes = 2", 64'(evc[6]), 64'd2);
    check("register reads seen",    64'(evc[7] > 0), 1);
    check("self-loop packets seen", 64'(evc[11] > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tflex_chip: end-to-end test of the full 32-core chip at its default
// size. Two logical processors run the same two-block program at the same
// time: a 4-core processor (cores 0, 1, 4, 5 as a 2 x 2 rectangle) and a
// 1-core processor (core 2). The program exercises immediates, fan-out,
// cross-core operands, the local bypass, predication (one path squashed),
// a store and a same-block load forwarded from it, a load from the L2,
// register writes, register reads of the next block, a load of the previous
// block's committed store, block hand-off between owners and the halt exit.
// The thread is run twice: the first run misses in the header caches, the
// second hits. A third run recomposes all 32 cores into one processor.
// Register results are compared with values worked out by hand
// below; event counters make sure each mechanism happened.
module tb_tflex_chip;
  import tflex_pkg::*;

  localparam int NC = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NC-1:0]       cfg_we;
  cfg_t                cfg_wdata;
  logic                os_valid, os_ready;
  ctrl_msg_t           os_msg;
  logic                b_valid;
  ctrl_msg_t           b_msg;
  logic                l2_req_valid, l2_req_ready, l2_rsp_valid;
  mem_req_t            l2_req;
  mem_rsp_t            l2_rsp;
  logic [NC-1:0][15:0] ev;

  tflex_chip dut (.*);
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

  // ------------------------------------------------ register access
  function automatic logic [63:0] reg4(int r);   // 4-core processor at base 0
    case (r % 4)
      0: return dut.g_core[0].u_core.u_rf.r[r];
      1: return dut.g_core[1].u_core.u_rf.r[r];
      2: return dut.g_core[4].u_core.u_rf.r[r];
      default: return dut.g_core[5].u_core.u_rf.r[r];
    endcase
  endfunction
  function automatic logic [63:0] reg32(int r);  // 32-core processor: r on core r
    case (r)
      4: return dut.g_core[4].u_core.u_rf.r[4];
      5: return dut.g_core[5].u_core.u_rf.r[5];
      6: return dut.g_core[6].u_core.u_rf.r[6];
      7: return dut.g_core[7].u_core.u_rf.r[7];
      8: return dut.g_core[8].u_core.u_rf.r[8];
      9: return dut.g_core[9].u_core.u_rf.r[9];
      default: return dut.g_core[10].u_core.u_rf.r[10];
    endcase
  endfunction
  function automatic logic [63:0] reg1(int r);
    return dut.g_core[2].u_core.u_rf.r[r];
  endfunction

  // ------------------------------------------------ events
  int unsigned evc [16];
  int unsigned halts0, halts2, commits;
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < NC; c++)
        for (int k = 0; k < 16; k++) if (ev[c][k]) evc[k]++;
      if (b_valid && b_msg.kind == CM_HALT && b_msg.base == 5'd0) halts0++;
      if (b_valid && b_msg.kind == CM_HALT && b_msg.base == 5'd2) halts2++;
      if (b_valid && b_msg.kind == CM_COMMIT) commits++;
      if (b_valid && $test$plusargs("trace")) $display("%0t BUS %s base=%0d src=%0d a=%h b=%h", $time, b_msg.kind.name(), b_msg.base, b_msg.src, b_msg.a, b_msg.b);
    end
  end

  task automatic os_send(cm_kind_e k, logic [4:0] base, logic [31:0] a);
    os_msg      = '0;
    os_msg.kind = k;
    os_msg.base = base;
    os_msg.a    = a;
    os_valid    = 1'b1;
    do @(posedge clk); while (!os_ready);
    os_valid    = 1'b0;
  endtask

  task automatic configure(int core, int log2n, int log2w, int pos, int base);
    cfg_wdata = '{en: 1'b1, log2n: 3'(log2n), log2w: 3'(log2w), pos: 5'(pos), base: 5'(base)};
    cfg_we    = '0;
    cfg_we[core] = 1'b1;
    @(posedge clk);
    cfg_we    = '0;
  endtask

  task automatic check_results(string run);
    logic [63:0] s, r4, r5, r6;
    s  = VA + VB;
    r4 = M58 + 1;
    r5 = VA + 5;
    r6 = 2 * s;
    check({run, " 4-core R4"},  reg4(4),  r4);
    check({run, " 4-core R5"},  reg4(5),  r5);
    check({run, " 4-core R6"},  reg4(6),  r6);
    check({run, " 4-core R7"},  reg4(7),  64'd0);
    check({run, " 4-core R8"},  reg4(8),  r4 + r6);
    check({run, " 4-core R9"},  reg4(9),  r5 - 1);
    check({run, " 4-core R10"}, reg4(10), s);
    check({run, " 1-core R4"},  reg1(4),  r4);
    check({run, " 1-core R5"},  reg1(5),  r5);
    check({run, " 1-core R6"},  reg1(6),  r6);
    check({run, " 1-core R7"},  reg1(7),  64'd0);
    check({run, " 1-core R8"},  reg1(8),  r4 + r6);
    check({run, " 1-core R9"},  reg1(9),  r5 - 1);
    check({run, " 1-core R10"}, reg1(10), s);
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: halts0=%0d halts2=%0d commits=%0d", halts0, halts2, commits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned t0, t1;
  initial begin
    cfg_we = '0; cfg_wdata = '0; os_valid = 1'b0; os_msg = '0;
    for (int k = 0; k < 16; k++) evc[k] = 0;
    halts0 = 0; halts2 = 0; commits = 0;
    for (int i = 0; i < 4096; i++) u_l2.mem[i] = '0;
    build_program();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    configure(0, 2, 1, 0, 0);
    configure(1, 2, 1, 1, 0);
    configure(4, 2, 1, 2, 0);
    configure(5, 2, 1, 3, 0);
    configure(2, 0, 0, 0, 2);

    // run 1: cold header caches
    os_send(CM_NEXT, 5'd0, BLK_A);
    os_send(CM_NEXT, 5'd2, BLK_A);
    wait (halts0 == 1 && halts2 == 1);
    repeat (5) @(posedge clk);
    check_results("run1");
    check("run1 commits", 64'(commits), 64'd4);
    check("run1 header misses", 64'(evc[8]), 64'd4);

    // run 2: the blocks are now cached
    t0 = evc[8];
    os_send(CM_NEXT, 5'd0, BLK_A);
    os_send(CM_NEXT, 5'd2, BLK_A);
    wait (halts0 == 2 && halts2 == 2);
    repeat (5) @(posedge clk);
    check_results("run2");
    check("run2 no new header misses", 64'(evc[8] - t0), 64'd0);
    check("run2 commits", 64'(commits), 64'd8);

    // run 3: the OS recomposes the whole chip into one 32-core processor
    // (the program's stores write the same values again, so the D-cache
    // lines left by the smaller processors do not change the results)
    for (int c = 0; c < NC; c++) configure(c, 5, 2, c, 0);
    t1 = evc[2];
    os_send(CM_NEXT, 5'd0, BLK_A);
    wait (halts0 == 3);
    repeat (5) @(posedge clk);
    begin
      logic [63:0] s3, r4, r5, r6;
      s3 = VA + VB; r4 = M58 + 1; r5 = VA + 5; r6 = 2 * s3;
      check("run3 32-core R4",  reg32(4),  r4);
      check("run3 32-core R5",  reg32(5),  r5);
      check("run3 32-core R6",  reg32(6),  r6);
      check("run3 32-core R7",  reg32(7),  64'd0);
      check("run3 32-core R8",  reg32(8),  r4 + r6);
      check("run3 32-core R9",  reg32(9),  r5 - 1);
      check("run3 32-core R10", reg32(10), s3);
    end
    check("run3 commits", 64'(commits), 64'd10);
    check("run3 used the mesh", 64'(evc[2] - t1 > 0), 1);

    // every mechanism the chip can show must have happened
    check("issued instructions seen",    64'(evc[0] > 0), 1);
    check("local bypass seen",           64'(evc[1] > 0), 1);
    check("operands over the mesh seen", 64'(evc[2] > 0), 1);
    check("D-cache misses seen",         64'(evc[3] > 0), 1);
    check("predicate squash seen",       64'(evc[6] > 0), 1);
    check("register reads seen",         64'(evc[7] > 0), 1);
    check("mispredictions seen",         64'(evc[9] > 0), 1);
    check("self-loop packets seen",      64'(evc[11] > 0), 1);
    check("predicate squashes = 5",      64'(evc[6]), 64'd5);
    check("commits at owners = 10",      64'(evc[10]), 64'd10);
    check("L2 reads happened",           64'(u_l2.reads > 0), 1);
    $display("events: issue=%0d bypass=%0d mesh=%0d dmiss=%0d nack=%0d ovf=%0d squash=%0d regrd=%0d hmiss=%0d mispred=%0d commit=%0d loop=%0d stale=%0d waitep=%0d",
             evc[0], evc[1], evc[2], evc[3], evc[4], evc[5], evc[6], evc[7], evc[8], evc[9],
             evc[10], evc[11], evc[12], evc[13]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

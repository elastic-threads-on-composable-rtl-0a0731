// tb_tflex_inst_window: loads a small dataflow graph into the window and
// checks wakeup and select: an entry issues only when its operands (and
// predicate) are present, the lowest ready index goes first, one per cycle,
// operands written in a cycle can issue in the next, a predicate of the
// wrong value marks the issue as not firing, a NACKed entry waits for the
// release, and a slot clear empties the slot.
module tb_tflex_inst_window;
  import tflex_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] log2n;
  logic ld_we; logic [6:0] ld_idx; inst_t ld_inst;
  logic [1:0] op_we; logic [1:0][6:0] op_idx; logic [1:0][1:0] op_tt; logic [1:0][63:0] op_data;
  logic iss_ready, iss_valid, iss_fire; logic [6:0] iss_idx; inst_t iss_inst; logic [63:0] iss_a, iss_b;
  logic nack_we, nack_release, clr_valid; logic [6:0] nack_idx; logic [4:0] clr_slot;
  logic [127:0] busy;
  tflex_inst_window dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(string s, logic [63:0] g, logic [63:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", s, g, e); end
  endtask
  task automatic load(int i, opcode_e op, logic [1:0] pr);
    @(negedge clk); ld_we = 1; ld_idx = 7'(i); ld_inst = '{op: op, pr: pr, xop: 0, t1: 0, t0: 0};
    @(negedge clk); ld_we = 0;
  endtask
  task automatic opnd(int i, logic [1:0] tt, logic [63:0] d);
    @(negedge clk); op_we[1] = 1; op_idx[1] = 7'(i); op_tt[1] = tt; op_data[1] = d;
    @(negedge clk); op_we[1] = 0;
  endtask
  initial begin
    log2n = 0; ld_we = 0; ld_idx = 0; ld_inst = '0; op_we = 0; op_idx = 0; op_tt = 0; op_data = 0;
    iss_ready = 0; nack_we = 0; nack_idx = 0; nack_release = 0; clr_valid = 0; clr_slot = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    load(10, OP_ADD, 2'b00);
    load(20, OP_MOV, 2'b00);
    load(30, OP_MOVI, 2'b00);
    load(40, OP_MOV, 2'b11);
    load(50, OP_MOV, 2'b10);
    #1 chk("movi ready at once", iss_valid, 1); chk("movi index", iss_idx, 30);
    opnd(10, TT_LEFT, 64'd7);
    #1 chk("add waits for right", iss_idx, 30);
    opnd(20, TT_LEFT, 64'd5);
    #1 chk("mov 20 ready, lowest is still 20 < 30", iss_idx, 20);
    opnd(10, TT_RIGHT, 64'd9);
    #1 chk("add now lowest", iss_idx, 10);
    chk("add operand a", iss_a, 7); chk("add operand b", iss_b, 9);
    // issue three in consecutive cycles
    @(negedge clk); iss_ready = 1;
    @(negedge clk); chk("second issue", iss_idx, 20);
    @(negedge clk); chk("third issue", iss_idx, 30);
    @(negedge clk); chk("nothing left", iss_valid, 0);
    iss_ready = 0;
    // predicated entries: 40 fires on true, 50 on false; give both true
    opnd(40, TT_LEFT, 1); opnd(50, TT_LEFT, 2);
    #1 chk("pred entry waits for predicate", iss_valid, 0);
    opnd(40, TT_PRED, 1); opnd(50, TT_PRED, 1);
    #1 chk("pred 40 ready", iss_idx, 40); chk("pred 40 fires", iss_fire, 1);
    @(negedge clk); iss_ready = 1; @(negedge clk); iss_ready = 0;
    #1 chk("pred 50 ready", iss_idx, 50); chk("pred 50 squashed", iss_fire, 0);
    @(negedge clk); iss_ready = 1; @(negedge clk); iss_ready = 0;
    // NACK entry 10: it must wait for a release
    @(negedge clk); nack_we = 1; nack_idx = 10; @(negedge clk); nack_we = 0;
    #1 chk("nacked waits", iss_valid, 0);
    @(negedge clk); nack_release = 1; @(negedge clk); nack_release = 0;
    #1 chk("released reissues", iss_valid, 1); chk("released index", iss_idx, 10);
    // same-cycle bypass write through port 0 and issue next cycle
    load(60, OP_MOV, 2'b00);
    @(negedge clk); op_we[0] = 1; op_idx[0] = 60; op_tt[0] = TT_LEFT; op_data[0] = 64'h77;
    @(negedge clk); op_we[0] = 0;
    #1 chk("lowest still 10", iss_idx, 10);
    @(negedge clk); iss_ready = 1; @(negedge clk); iss_ready = 0;
    #1 chk("bypassed operand ready", iss_idx, 60); chk("bypassed value", iss_a, 64'h77);
    // 4-core mode: clearing slot 1 empties entries 32..63 only
    log2n = 2;
    load(33, OP_MOVI, 2'b00); load(70, OP_MOVI, 2'b00);
    @(negedge clk); clr_valid = 1; clr_slot = 1; @(negedge clk); clr_valid = 0;
    #1 chk("slot 1 cleared", busy[33], 0); chk("slot 2 kept", busy[70], 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_tflex_lsq: one LSQ bank with a behavioural D-cache (one-cycle answer).
// Checks that a load waits for an older store of its block, is forwarded
// the youngest older store's data, reads memory when no store matches; that
// stores are written in LSID order only at commit; that a younger block is
// NACKed once only the 4 reserved entries remain while the oldest block may
// fill all 40, and that the oldest block overflowing raises overflow.
module tb_tflex_lsq;
  import tflex_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0] oldest_slot, smask_slot, st_seen_slot, cf_slot;
  logic smask_we, st_seen_we, req_valid, req_ready, st_done, overflow, rsp_valid, rsp_ready;
  logic commit, flush, commit_done, dc_req_valid, dc_req_ready, dc_req_we, dc_rsp_valid;
  logic [31:0] smask, dc_req_addr;
  logic [4:0] st_seen_lsid, st_done_lsid;
  opn_pkt_t req, rsp;
  logic [63:0] dc_req_wdata, dc_rsp_data;
  logic [6:0] occupancy;
  tflex_lsq dut (.*);

  // behavioural D-cache
  logic [63:0] mem [logic [31:0]];
  logic [31:0] wr_log [$];
  assign dc_req_ready = 1'b1;
  always_ff @(posedge clk) begin
    dc_rsp_valid <= dc_req_valid;
    if (dc_req_valid) begin
      if (dc_req_we) begin mem[dc_req_addr] = dc_req_wdata; wr_log.push_back(dc_req_addr); end
      dc_rsp_data <= mem.exists(dc_req_addr) ? mem[dc_req_addr] : 64'hbad0;
    end
  end

  int checks = 0, failures = 0, nacks = 0, ovfs = 0;
  opn_pkt_t got [$];
  always @(posedge clk) if (rst_n) begin
    if (rsp_valid && rsp_ready) begin
      if (rsp.kind == PK_NACK) nacks++; else got.push_back(rsp);
    end
    if (overflow) ovfs++;
  end
  task automatic chk(string s, logic [63:0] g, logic [63:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", s, g, e); end
  endtask
  task automatic send(pkt_kind_e k, int slot, int lsid, logic [31:0] a, logic [63:0] d, int w);
    @(negedge clk);
    req = '0; req.kind = k; req.slot = 5'(slot); req.lsid = 5'(lsid); req.addr = a; req.data = d;
    req.rcore = 5'd3; req.widx = 7'(w); req.ttype = TT_LEFT; req.icore = 5'd7; req.iidx = 7'(w);
    req_valid = 1;
    do @(posedge clk); while (!req_ready);
    #1 req_valid = 0;
  endtask
  task automatic seen(int slot, int lsid);
    @(negedge clk); st_seen_we = 1; st_seen_slot = 5'(slot); st_seen_lsid = 5'(lsid);
    @(negedge clk); st_seen_we = 0;
  endtask
  initial begin
    oldest_slot = 0; smask_we = 0; smask_slot = 0; smask = 0; st_seen_we = 0; st_seen_slot = 0;
    st_seen_lsid = 0; req_valid = 0; req = '0; rsp_ready = 1; commit = 0; flush = 0; cf_slot = 0;
    dc_rsp_valid = 0; dc_rsp_data = 0;
    mem[32'h100] = 64'h1111; mem[32'h200] = 64'h2222;
    repeat (2) @(posedge clk); rst_n = 1;
    // block in slot 0: LSIDs 0 and 2 are stores
    @(negedge clk); smask_we = 1; smask = 32'b101; @(negedge clk); smask_we = 0;
    send(PK_LOAD, 0, 3, 32'h100, 0, 11);        // must wait for stores 0 and 2
    send(PK_LOAD, 0, 1, 32'h200, 0, 12);        // waits for store 0 only
    repeat (5) @(negedge clk);
    chk("loads wait for older stores", 64'(got.size()), 0);
    send(PK_STORE, 0, 0, 32'h100, 64'hAAAA, 0);
    @(negedge clk); chk("store reported", 64'(st_done), 1); chk("store lsid", 64'(st_done_lsid), 0);
    seen(0, 0);
    repeat (6) @(negedge clk);
    chk("lsid1 answered", 64'(got.size()), 1);
    chk("lsid1 from memory", got[0].data, 64'h2222);
    chk("reply target", 64'(got[0].widx), 12);
    send(PK_STORE, 0, 2, 32'h100, 64'hBBBB, 0);
    seen(0, 2);
    repeat (6) @(negedge clk);
    chk("lsid3 answered", 64'(got.size()), 2);
    chk("lsid3 forwarded from youngest older store", got[1].data, 64'hBBBB);
    chk("memory untouched before commit", mem[32'h100], 64'h1111);
    @(negedge clk); commit = 1; cf_slot = 0; @(negedge clk); commit = 0;
    repeat (10) @(negedge clk);
    chk("stores drained", 64'(wr_log.size()), 2);
    chk("last store wins", mem[32'h100], 64'hBBBB);
    chk("queue empty after commit", 64'(occupancy), 0);
    // flow control: younger block (slot 1) may use 36 entries, then NACK
    oldest_slot = 0;
    @(negedge clk); smask_we = 1; smask_slot = 1; smask = '1; @(negedge clk); smask_we = 0;
    for (int i = 0; i < 36; i++) send(PK_STORE, 1, i % 32, 32'h400 + 32'(i*8), 64'(i), 0);
    chk("36 entries used", 64'(occupancy), 36);
    send(PK_STORE, 1, 5, 32'h900, 64'h9, 5);
    repeat (3) @(negedge clk);
    chk("younger block NACKed", 64'(nacks), 1);
    chk("NACK goes to issuing core", 64'(rsp.dst), 7);
    // the oldest block (slot 0) may take the reserved four
    for (int i = 0; i < 4; i++) send(PK_STORE, 0, i, 32'h800 + 32'(i*8), 64'(i), 0);
    chk("full", 64'(occupancy), 40);
    send(PK_STORE, 0, 9, 32'h900, 64'h9, 0);
    repeat (2) @(negedge clk);
    chk("oldest overflow flagged", 64'(ovfs), 1);
    @(negedge clk); flush = 1; cf_slot = 1; @(negedge clk); flush = 0;
    @(negedge clk); chk("flush frees slot 1", 64'(occupancy), 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (3000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

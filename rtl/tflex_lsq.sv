// tflex_lsq: one core's bank of the distributed load/store queue. The banks
// are address-interleaved like the D-cache, so a bank sees only the loads and
// stores whose line maps to this core.
//
// Flow control (from the design): a bank has ENTRIES entries, RESERVED of
// which only the oldest block in flight may take. A load or store from a
// younger block that finds no unreserved entry is NACKed: it is sent back to
// its issue window entry and re-issues after some block commits. If a
// request of the oldest block finds the bank completely full, overflow
// pulses; the processor then flushes and reruns the oldest block alone.
//
// Ordering (this design's own, conservative scheme): at fetch every bank
// learns the block's store mask (which LSIDs are stores), and every store
// that reaches its bank is announced to all banks (st_seen). A load waits
// until every store of its block with a smaller LSID has been seen; it then
// takes the value of the youngest such store to the same address in this
// bank, or reads the D-cache. Loads therefore never need a violation flush.
// Stores stay in the queue until their block commits; they are then written
// to the D-cache in LSID order and commit_done pulses.
//
// Interface: req (LOAD/STORE packets from the operand network, one per
// cycle), rsp (OPERAND replies and NACK packets, valid/ready), dc_* (one
// D-cache access at a time), st_done (a store was accepted, with its LSID).
// The 40 entries, the 4 reserved for the oldest block, NACK and overflow
// follow the design; the conservative load ordering (instead of a
// dependence predictor) and the drain order are this design's own.
module tflex_lsq
  import tflex_pkg::*;
#(
  parameter int unsigned ENTRIES  = 40,
  parameter int unsigned RESERVED = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // block bookkeeping
  input  logic [4:0]       oldest_slot,
  input  logic             smask_we,
  input  logic [4:0]       smask_slot,
  input  logic [31:0]      smask,
  input  logic             st_seen_we,
  input  logic [4:0]       st_seen_slot,
  input  logic [LSID_W-1:0] st_seen_lsid,
  // requests
  input  logic             req_valid,
  output logic             req_ready,
  input  opn_pkt_t         req,
  output logic             st_done,
  output logic [LSID_W-1:0] st_done_lsid,
  output logic             overflow,
  // replies (operands and NACKs)
  output logic             rsp_valid,
  input  logic             rsp_ready,
  output opn_pkt_t         rsp,
  // commit / flush of one block slot
  input  logic             commit,
  input  logic             flush,
  input  logic [4:0]       cf_slot,
  output logic             commit_done,
  // D-cache port
  output logic             dc_req_valid,
  input  logic             dc_req_ready,
  output logic             dc_req_we,
  output logic [31:0]      dc_req_addr,
  output logic [XLEN-1:0]  dc_req_wdata,
  input  logic             dc_rsp_valid,
  input  logic [XLEN-1:0]  dc_rsp_data,
  output logic [$clog2(ENTRIES):0] occupancy
);
  localparam int unsigned IW = $clog2(ENTRIES);

  typedef struct packed {
    logic             valid;
    logic             store;
    logic             done;    // load answered
    logic [4:0]       slot;
    logic [LSID_W-1:0] lsid;
    logic [31:0]      addr;
    logic [XLEN-1:0]  data;
    logic [CID_W-1:0] rcore;
    logic [6:0]       widx;
    logic [1:0]       ttype;
    logic [3:0]       epoch;
  } ent_t;

  ent_t        e [ENTRIES];
  logic [4:0]  drain_slot;
  logic [31:0] smask_r [32];
  logic [31:0] seen_r  [32];

  typedef enum logic [2:0] {S_IDLE, S_LD_DC, S_LD_WAIT, S_REPLY, S_DRAIN, S_DRAIN_WAIT} st_e;
  st_e st;

  // ------------------------------------------------ allocation
  logic [IW:0] used;
  logic        has_free;
  logic [IW-1:0] free_idx;
  always_comb begin
    used     = '0;
    has_free = 1'b0;
    free_idx = '0;
    for (int i = int'(ENTRIES) - 1; i >= 0; i--) begin
      if (e[i].valid) used = used + 1'b1;
      else begin
        has_free = 1'b1;
        free_idx = IW'(i);
      end
    end
  end
  assign occupancy = used;

  logic is_mem, is_oldest, may_alloc, do_nack, do_ovf;
  assign is_mem    = req.kind == PK_LOAD || req.kind == PK_STORE;
  assign is_oldest = req.slot == oldest_slot;
  assign may_alloc = is_oldest ? has_free
                               : (32'(used) < ENTRIES - RESERVED);
  // a NACK needs the reply port, so it is taken only when the port is idle
  logic nack_busy;
  assign do_nack   = req_valid && is_mem && !may_alloc && !is_oldest;
  assign do_ovf    = req_valid && is_mem && !may_alloc && is_oldest;
  assign req_ready = !commit && !flush && (may_alloc || do_ovf || (do_nack && !nack_busy));

  // ------------------------------------------------ load selection
  logic          ld_found;
  logic [IW-1:0] ld_idx;
  function automatic logic older_stores_seen(logic [LSID_W-1:0] l,
                                             logic [31:0] m, logic [31:0] seen);
    logic [31:0] below;
    below = (32'd1 << l) - 32'd1;
    return ((m & below) & ~seen) == 32'd0;
  endfunction

  always_comb begin
    ld_found = 1'b0;
    ld_idx   = '0;
    for (int i = int'(ENTRIES) - 1; i >= 0; i--) begin
      if (e[i].valid && !e[i].store && !e[i].done &&
          older_stores_seen(e[i].lsid, smask_r[e[i].slot], seen_r[e[i].slot])) begin
        ld_found = 1'b1;
        ld_idx   = IW'(i);
      end
    end
  end

  // youngest older store to the same address, same block
  logic            fw_hit;
  logic [XLEN-1:0] fw_data;
  always_comb begin
    logic [LSID_W-1:0] best;
    fw_hit  = 1'b0;
    fw_data = '0;
    best    = '0;
    for (int i = 0; i < int'(ENTRIES); i++) begin
      if (e[i].valid && e[i].store && e[i].slot == e[ld_idx].slot &&
          e[i].lsid < e[ld_idx].lsid && e[i].addr == e[ld_idx].addr &&
          (!fw_hit || e[i].lsid > best)) begin
        fw_hit  = 1'b1;
        best    = e[i].lsid;
        fw_data = e[i].data;
      end
    end
  end

  // oldest-LSID store of the committing slot still in the queue
  logic          dr_found;
  logic [IW-1:0] dr_idx;
  always_comb begin
    dr_found = 1'b0;
    dr_idx   = '0;
    for (int i = 0; i < int'(ENTRIES); i++) begin
      if (e[i].valid && e[i].store && e[i].slot == drain_slot &&
          (!dr_found || e[i].lsid < e[dr_idx].lsid)) begin
        dr_found = 1'b1;
        dr_idx   = IW'(i);
      end
    end
  end

  // ------------------------------------------------ reply register
  opn_pkt_t        rsp_q;
  logic            rsp_q_v;
  logic [IW-1:0]   cur;
  logic            commit_pend;
  assign rsp       = rsp_q;
  assign rsp_valid = rsp_q_v;
  assign nack_busy = rsp_q_v;

  assign dc_req_valid = (st == S_LD_DC) || (st == S_DRAIN && dr_found);
  assign dc_req_we    = (st == S_DRAIN);
  assign dc_req_addr  = (st == S_DRAIN) ? e[dr_idx].addr : e[cur].addr;
  assign dc_req_wdata = e[dr_idx].data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) e[i] <= '0;
      for (int s = 0; s < 32; s++) begin
        smask_r[s] <= '0;
        seen_r[s]  <= '0;
      end
      st           <= S_IDLE;
      rsp_q        <= '0;
      rsp_q_v      <= 1'b0;
      cur          <= '0;
      drain_slot   <= '0;
      st_done      <= 1'b0;
      st_done_lsid <= '0;
      overflow     <= 1'b0;
      commit_done  <= 1'b0;
    end else begin
      st_done     <= 1'b0;
      overflow    <= 1'b0;
      commit_done <= 1'b0;
      if (rsp_q_v && rsp_ready) rsp_q_v <= 1'b0;

      if (smask_we) begin
        smask_r[smask_slot] <= smask;
        seen_r[smask_slot]  <= '0;
      end
      if (st_seen_we) seen_r[st_seen_slot][st_seen_lsid] <= 1'b1;

      // accept a request
      if (req_valid && req_ready) begin
        if (may_alloc) begin
          e[free_idx].valid <= 1'b1;
          e[free_idx].store <= (req.kind == PK_STORE);
          e[free_idx].done  <= 1'b0;
          e[free_idx].slot  <= req.slot;
          e[free_idx].lsid  <= req.lsid;
          e[free_idx].addr  <= req.addr;
          e[free_idx].data  <= req.data;
          e[free_idx].rcore <= req.rcore;
          e[free_idx].widx  <= req.widx;
          e[free_idx].ttype <= req.ttype;
          e[free_idx].epoch <= req.epoch;
          if (req.kind == PK_STORE) begin
            st_done      <= 1'b1;
            st_done_lsid <= req.lsid;
          end
        end else if (do_ovf) begin
          overflow <= 1'b1;
        end else begin
          rsp_q      <= req;
          rsp_q.kind <= PK_NACK;
          rsp_q.dst  <= req.icore;
          rsp_q_v    <= 1'b1;
        end
      end

      case (st)
        S_IDLE: begin
          if (commit_pend) begin
            st          <= S_DRAIN;
            commit_pend <= 1'b0;
          end else if (ld_found && !rsp_q_v && !(req_valid && req_ready && !may_alloc)) begin
            cur <= ld_idx;
            if (fw_hit) begin
              e[ld_idx].data <= fw_data;
              st <= S_REPLY;
            end else begin
              st <= S_LD_DC;
            end
          end
        end
        S_LD_DC:   if (dc_req_ready) st <= S_LD_WAIT;
        S_LD_WAIT: if (dc_rsp_valid) begin
          e[cur].data <= dc_rsp_data;
          st <= S_REPLY;
        end
        S_REPLY: if (!rsp_q_v) begin
          rsp_q.kind  <= PK_OPERAND;
          rsp_q.dst   <= e[cur].rcore;
          rsp_q.rcore <= e[cur].rcore;
          rsp_q.icore <= '0;
          rsp_q.iidx  <= '0;
          rsp_q.slot  <= e[cur].slot;
          rsp_q.widx  <= e[cur].widx;
          rsp_q.ttype <= e[cur].ttype;
          rsp_q.lsid  <= e[cur].lsid;
          rsp_q.addr  <= e[cur].addr;
          rsp_q.data  <= e[cur].data;
          rsp_q.epoch <= e[cur].epoch;
          rsp_q_v     <= 1'b1;
          e[cur].done <= 1'b1;
          st <= S_IDLE;
        end
        S_DRAIN: begin
          if (!dr_found) begin
            for (int i = 0; i < int'(ENTRIES); i++)
              if (e[i].slot == drain_slot) e[i].valid <= 1'b0;
            commit_done <= 1'b1;
            st <= S_IDLE;
          end else if (dc_req_ready) begin
            cur <= dr_idx;
            st  <= S_DRAIN_WAIT;
          end
        end
        S_DRAIN_WAIT: if (dc_rsp_valid) begin
          e[cur].valid <= 1'b0;
          st <= S_DRAIN;
        end
        default: st <= S_IDLE;
      endcase
      if (commit) begin
        commit_pend <= 1'b1;
        drain_slot  <= cf_slot;
      end
      if (flush) begin
        for (int i = 0; i < int'(ENTRIES); i++)
          if (e[i].slot == cf_slot) e[i].valid <= 1'b0;
        st          <= S_IDLE;
        commit_pend <= 1'b0;
      end
    end
  end
endmodule

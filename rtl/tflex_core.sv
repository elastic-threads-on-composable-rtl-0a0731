// tflex_core: one TFlex core, a complete single-issue processor that can
// also serve as one participant of a composed logical processor.
//
// Inside: configuration registers, a 128-entry instruction window with its
// operand buffers and select logic, an integer ALU, a 128-entry register
// file with its register-forwarding queue, a 4 KB slave I-cache bank, the
// block-control unit (header cache with I-cache tags and next-block
// predictor), a 40-entry LSQ bank and an 8 KB 2-way D-cache bank, the
// operand-network router with in/out queues, and ports to the control and
// memory networks.
//
// Execution: FETCH (from the block's owner) makes every participant copy its
// 128/N instructions from its I-cache bank into its window, one per cycle.
// The window issues one ready instruction per cycle. An ALU result goes to
// up to two targets; a target on this core is written straight into the
// window in the issue cycle (the bypass, so a dependent instruction can
// issue in the next cycle), any other target leaves as an operand packet,
// one per cycle. Loads and stores go as packets to the LSQ bank of the core
// that holds their line; register writes to the core that holds the
// register; the block exit goes to the owner as a control message. Packets
// for this core loop back into the in-queue without entering the mesh.
//
// Block instances are told apart by a 4-bit epoch that every participant
// clears on a configuration write and advances at FETCH; packets of a
// finished block are dropped, packets of a
// block this core has not started yet wait at the head of the in-queue.
// (One block of a thread is in flight at a time, so the block slot is 0.)
//
// Ports: cfg_* (OS configuration write), mesh N/E/S/W operand links,
// co_*/ci_* control network, m* memory network, ev (event pulses for
// monitoring).
//
// The units, their sizes and the one-instruction-per-cycle issue follow the
// design. The epochs, the out-queue priorities (LSQ replies, then register
// reads, then ALU results), the self-loop and running one block at a time
// are this design's own choices.
module tflex_core
  import tflex_pkg::*;
#(
  parameter int unsigned CHIP_W       = 4,
  parameter int unsigned LSQ_ENTRIES  = 40,
  parameter int unsigned LSQ_RESERVED = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CID_W-1:0] my_id,
  input  logic             cfg_we,
  input  cfg_t             cfg_wdata,
  // operand mesh links: 0 N, 1 E, 2 S, 3 W
  input  logic [3:0]       ni_valid,
  output logic [3:0]       ni_ready,
  input  opn_pkt_t [3:0]   ni_pkt,
  output logic [3:0]       no_valid,
  input  logic [3:0]       no_ready,
  output opn_pkt_t [3:0]   no_pkt,
  // control network
  output logic             co_valid,
  input  logic             co_ready,
  output ctrl_msg_t        co_msg,
  input  logic             ci_valid,
  input  ctrl_msg_t        ci_msg,
  output logic             ci_ready,
  // memory network
  output logic             mreq_valid,
  input  logic             mreq_ready,
  output mem_req_t         mreq,
  input  logic             mrsp_valid,
  input  mem_rsp_t         mrsp,
  // event pulses
  output logic [15:0]      ev
);
  localparam int unsigned EV_ISSUE = 0, EV_BYPASS = 1, EV_NETOUT = 2, EV_DMISS = 3,
                          EV_NACK = 4, EV_OVF = 5, EV_PSQUASH = 6, EV_REGRD = 7,
                          EV_HMISS = 8, EV_MISPRED = 9, EV_COMMIT = 10, EV_LOOP = 11,
                          EV_STALE = 12, EV_WAITEP = 13;

  cfg_t cfg;
  logic cfg_err;
  tflex_cfg_regs u_cfg (.clk, .rst_n, .cfg_we, .cfg_wdata, .cfg, .cfg_err);

  logic [3:0] epoch;
  logic [CID_W-1:0] owner_pos;

  // ================================================================ control in
  logic      cq_v, cq_pop, cq_push;
  ctrl_msg_t cq;
  assign cq_push = ci_valid && cfg.en && ci_msg.base == cfg.base;
  tflex_fifo #(.T(ctrl_msg_t), .DEPTH(4)) u_cq (
    .clk, .rst_n, .in_valid(cq_push), .in_ready(ci_ready), .in_data(ci_msg),
    .out_valid(cq_v), .out_ready(cq_pop), .out_data(cq));

  // ================================================================ fetch loader
  logic       ld_busy, ld_rd_v;
  logic [7:0] ld_line;
  logic [6:0] ld_k, ld_k_q, ld_cnt;
  logic [31:0] ic_rdata;
  logic       ic_we;
  logic [9:0] ic_waddr;
  assign ld_cnt = 7'((32'd128 >> cfg.log2n) - 1);

  // ================================================================ register read service
  logic            rd_req, rd_here;
  logic [6:0]      rd_reg;
  logic [XLEN-1:0] rf_rd0, rf_rd1;
  logic [CID_W-1:0] rd_dst;
  logic [6:0]      rd_widx;
  logic [1:0]      rd_tt;
  logic            rd_loc;
  assign rd_reg  = cq.a[15:9];
  assign rd_here = reg_part(cfg.log2n, rd_reg) == cfg.pos;
  tflex_target_xlate #(.CHIP_W(CHIP_W)) u_rdx (
    .cfg, .slot(5'd0), .target(cq.a[8:0]),
    .dst_core(rd_dst), .widx(rd_widx), .ttype(rd_tt), .is_local(rd_loc));

  // ================================================================ block control
  logic      bc_ready, bo_valid, bo_ready, bc_busy;
  ctrl_msg_t bo_msg;
  logic      bm_valid, bm_ready, bm_rsp;
  logic [31:0] bm_addr;
  logic      ev_hm, ev_mp, ev_cm;

  // consumption of the control head
  logic out_rdy_rd;     // operand out-arbiter can take a register-read operand
  logic lsq_cpend, rf_cpend;
  always_comb begin
    cq_pop = 1'b0;
    if (cq_v && bc_ready) begin
      case (cq.kind)
        CM_FETCH: cq_pop = !ld_busy;
        CM_READ:  cq_pop = !rd_here || out_rdy_rd;
        default:  cq_pop = 1'b1;
      endcase
    end
  end
  assign rd_req = cq_v && cq.kind == CM_READ && rd_here && out_rdy_rd && bc_ready;

  tflex_block_ctrl u_bc (
    .clk, .rst_n, .cfg, .epoch,
    .cm_valid(cq_pop), .cm(cq), .cm_ready(bc_ready),
    .bo_valid, .bo_ready, .bo_msg,
    .mreq_valid(bm_valid), .mreq_ready(bm_ready), .mreq_addr(bm_addr),
    .mrsp_valid(bm_rsp), .mrsp_data(mrsp.data),
    .ev_hdr_miss(ev_hm), .ev_mispredict(ev_mp), .ev_commit(ev_cm), .busy(bc_busy));

  // I-cache bank
  assign ic_we    = cq_pop && cq.kind == CM_IFILL && cq.b[19:15] == 5'(cfg.pos);
  assign ic_waddr = 10'((32'(cq.b[14:7]) << (3'd7 - cfg.log2n)) | 32'(cq.b[6:0]));
  tflex_icache_bank u_ic (
    .clk, .we(ic_we), .waddr(ic_waddr), .wdata(cq.a),
    .re(ld_busy), .raddr(10'((32'(ld_line) << (3'd7 - cfg.log2n)) | 32'(ld_k))),
    .rdata(ic_rdata));

  // ================================================================ window and issue
  logic             w_iss_v, w_iss_fire, iss_rdy;
  logic [6:0]       w_iss_idx;
  inst_t            w_inst;
  logic [XLEN-1:0]  w_a, w_b, alu_y;
  logic [1:0]       op_we;
  logic [1:0][6:0]  op_idx;
  logic [1:0][1:0]  op_tt;
  logic [1:0][XLEN-1:0] op_data;
  logic             nack_we;
  logic [6:0]       nack_idx;
  logic             commit_clr;
  logic [WIN-1:0]   w_busy;

  tflex_inst_window u_win (
    .clk, .rst_n, .log2n(cfg.log2n),
    .ld_we(ld_rd_v), .ld_idx(ld_k_q), .ld_inst(inst_t'(ic_rdata)),
    .op_we, .op_idx, .op_tt, .op_data,
    .iss_ready(iss_rdy), .iss_valid(w_iss_v), .iss_idx(w_iss_idx), .iss_inst(w_inst),
    .iss_a(w_a), .iss_b(w_b), .iss_fire(w_iss_fire),
    .nack_we, .nack_idx, .nack_release(commit_clr),
    .clr_valid(commit_clr), .clr_slot(5'd0), .busy(w_busy));

  tflex_int_alu u_alu (.op(w_inst.op), .a(w_a), .b(w_b), .imm(w_inst.t1), .y(alu_y));

  logic [CID_W-1:0] t0_dst, t1_dst;
  logic [6:0]       t0_w, t1_w;
  logic [1:0]       t0_tt, t1_tt;
  logic             t0_loc, t1_loc;
  tflex_target_xlate #(.CHIP_W(CHIP_W)) u_x0 (
    .cfg, .slot(5'd0), .target(w_inst.t0),
    .dst_core(t0_dst), .widx(t0_w), .ttype(t0_tt), .is_local(t0_loc));
  tflex_target_xlate #(.CHIP_W(CHIP_W)) u_x1 (
    .cfg, .slot(5'd0), .target(w_inst.t1),
    .dst_core(t1_dst), .widx(t1_w), .ttype(t1_tt), .is_local(t1_loc));

  // emit stage: packets of the issued instruction that still have to leave
  logic     [1:0] em_v;
  opn_pkt_t [1:0] em_p;
  logic           em_take;   // out arbiter took em_p[0]
  logic           br_v;      // block exit waiting for the control network
  ctrl_msg_t      br_msg;
  logic           br_take;
  assign iss_rdy = (em_v == 2'b00) && !br_v;

  // packets the issued instruction produces
  opn_pkt_t p0, p1;
  logic     p0_v, p1_v, p0_byp, p1_byp;
  logic     is_alu;
  assign is_alu = !(w_inst.op inside {OP_LD, OP_ST, OP_WR, OP_BRO, OP_NOP});
  always_comb begin
    p0 = '0;
    p1 = '0;
    p0.epoch = epoch;
    p1.epoch = epoch;
    p0_v = 1'b0;
    p1_v = 1'b0;
    p0.kind = PK_OPERAND; p0.dst = t0_dst; p0.widx = t0_w; p0.ttype = t0_tt; p0.data = alu_y;
    p1.kind = PK_OPERAND; p1.dst = t1_dst; p1.widx = t1_w; p1.ttype = t1_tt; p1.data = alu_y;
    if (is_alu) begin
      p0_v = t0_tt != TT_NONE;
      p1_v = t1_tt != TT_NONE && !(w_inst.op inside {OP_MOVI, OP_ADDI});
    end else begin
      case (w_inst.op)
        OP_LD: begin
          p0_v = 1'b1;
          p0.kind  = PK_LOAD;
          p0.dst   = part_to_phys(cfg, dbank_part(cfg.log2n, w_a[31:0]), CHIP_W);
          p0.rcore = t0_dst;
          p0.icore = my_id;
          p0.iidx  = w_iss_idx;
          p0.lsid  = w_inst.xop;
          p0.addr  = w_a[31:0];
        end
        OP_ST: begin
          p0_v = 1'b1;
          p0.kind  = PK_STORE;
          p0.dst   = part_to_phys(cfg, dbank_part(cfg.log2n, w_a[31:0]), CHIP_W);
          p0.icore = my_id;
          p0.iidx  = w_iss_idx;
          p0.lsid  = w_inst.xop;
          p0.addr  = w_a[31:0];
          p0.data  = w_b;
        end
        OP_WR: begin
          p0_v = 1'b1;
          p0.kind = PK_REGW;
          p0.dst  = part_to_phys(cfg, reg_part(cfg.log2n, w_inst.t1[6:0]), CHIP_W);
          p0.widx = w_inst.t1[6:0];
          p0.data = w_a;
        end
        default: ;
      endcase
    end
  end
  logic issue_go;
  assign issue_go = w_iss_v && iss_rdy;
  assign p0_byp   = issue_go && w_iss_fire && p0_v && p0.kind == PK_OPERAND && t0_loc;
  assign p1_byp   = issue_go && w_iss_fire && p1_v && t1_loc && !p0_byp;

  // ================================================================ operand out path
  logic     lsq_rsp_v, lsq_rsp_rdy;
  opn_pkt_t lsq_rsp;
  opn_pkt_t rd_pkt;
  always_comb begin
    rd_pkt       = '0;
    rd_pkt.kind  = PK_OPERAND;
    rd_pkt.dst   = rd_dst;
    rd_pkt.widx  = rd_widx;
    rd_pkt.ttype = rd_tt;
    rd_pkt.epoch = epoch;
    rd_pkt.data  = rf_rd0;
  end

  logic     oq_in_v, oq_in_rdy, oq_v, oq_rdy;
  opn_pkt_t oq_in, oq;
  logic     sel_lsq, sel_rd, sel_em;
  always_comb begin
    sel_lsq = lsq_rsp_v;
    sel_rd  = !sel_lsq && cq_v && cq.kind == CM_READ && rd_here && bc_ready;
    sel_em  = !sel_lsq && !sel_rd && em_v[0];
    oq_in_v = sel_lsq || sel_rd || sel_em;
    oq_in   = sel_lsq ? lsq_rsp : (sel_rd ? rd_pkt : em_p[0]);
  end
  assign lsq_rsp_rdy = oq_in_rdy;
  assign out_rdy_rd  = !sel_lsq && oq_in_rdy;
  assign em_take     = sel_em && oq_in_rdy;

  tflex_fifo #(.T(opn_pkt_t), .DEPTH(8)) u_oq (
    .clk, .rst_n, .in_valid(oq_in_v), .in_ready(oq_in_rdy), .in_data(oq_in),
    .out_valid(oq_v), .out_ready(oq_rdy), .out_data(oq));

  // router
  logic [4:0]     r_in_v, r_in_rdy, r_out_v, r_out_rdy;
  opn_pkt_t [4:0] r_in_p, r_out_p;
  logic           oq_self;
  assign oq_self = oq.dst == my_id;
  always_comb begin
    r_in_v   = {1'b0, ni_valid};
    r_in_p   = {oq, ni_pkt};
    r_in_v[4] = oq_v && !oq_self;
    ni_ready = r_in_rdy[3:0];
    no_valid = r_out_v[3:0];
    no_pkt   = r_out_p[3:0];
  end
  tflex_opn_router #(.CHIP_W(CHIP_W)) u_rt (
    .clk, .rst_n, .my_id,
    .in_valid(r_in_v), .in_ready(r_in_rdy), .in_pkt(r_in_p),
    .out_valid(r_out_v), .out_ready(r_out_rdy), .out_pkt(r_out_p));

  // in-queue: self loop first, then the router's local output
  logic     iq_in_v, iq_in_rdy, iq_v, iq_pop;
  opn_pkt_t iq_in, iq;
  assign iq_in_v = (oq_v && oq_self) || r_out_v[4];
  assign iq_in   = (oq_v && oq_self) ? oq : r_out_p[4];
  assign oq_rdy  = oq_self ? iq_in_rdy : r_in_rdy[4];
  always_comb begin
    r_out_rdy    = {1'b0, no_ready};
    r_out_rdy[4] = iq_in_rdy && !(oq_v && oq_self);
  end
  tflex_fifo #(.T(opn_pkt_t), .DEPTH(8)) u_iq (
    .clk, .rst_n, .in_valid(iq_in_v), .in_ready(iq_in_rdy), .in_data(iq_in),
    .out_valid(iq_v), .out_ready(iq_pop), .out_data(iq));

  // dispatch of the in-queue head
  logic ep_cur, ep_future;
  assign ep_cur    = iq.epoch == epoch;
  assign ep_future = iq.epoch == epoch + 4'd1;
  logic lsq_req_v, lsq_req_rdy, rfq_in_v, rfq_in_rdy;
  always_comb begin
    lsq_req_v = 1'b0;
    rfq_in_v  = 1'b0;
    iq_pop    = 1'b0;
    op_we[1]  = 1'b0;
    nack_we   = 1'b0;
    if (iq_v) begin
      if (!ep_cur && !ep_future) iq_pop = 1'b1;      // stale: drop
      else if (ep_cur) begin
        case (iq.kind)
          PK_OPERAND: begin op_we[1] = 1'b1; iq_pop = 1'b1; end
          PK_LOAD, PK_STORE: begin lsq_req_v = 1'b1; iq_pop = lsq_req_rdy; end
          PK_REGW:  begin rfq_in_v = 1'b1; iq_pop = rfq_in_rdy; end
          PK_NACK:  begin nack_we = 1'b1; iq_pop = 1'b1; end
          default:  iq_pop = 1'b1;
        endcase
      end
    end
  end
  assign nack_idx  = iq.iidx;
  assign op_idx[1] = iq.widx;
  assign op_tt[1]  = iq.ttype;
  assign op_data[1]= iq.data;
  assign op_we[0]  = p0_byp || p1_byp;
  assign op_idx[0] = p0_byp ? t0_w : t1_w;
  assign op_tt[0]  = p0_byp ? t0_tt : t1_tt;
  assign op_data[0]= alu_y;

  // ================================================================ registers
  logic            rf_we;
  logic [6:0]      rf_wa;
  logic [XLEN-1:0] rf_wd;
  logic            wr_done, rf_cdone;
  logic            fwd_hit;
  logic [XLEN-1:0] fwd_data;
  tflex_regfile u_rf (.clk, .rst_n, .ra0(rd_reg), .rd0(rf_rd0), .ra1(7'd0), .rd1(rf_rd1),
                      .we(rf_we), .wa(rf_wa), .wd(rf_wd));
  tflex_reg_fwd u_rfq (
    .clk, .rst_n, .in_valid(rfq_in_v), .in_ready(rfq_in_rdy), .in_reg(iq.widx), .in_data(iq.data),
    .wr_done, .commit(commit_clr), .flush(1'b0), .commit_done(rf_cdone),
    .rf_we, .rf_wa, .rf_wd, .fwd_reg(7'd0), .fwd_hit, .fwd_data);

  // ================================================================ LSQ and D-cache
  logic             st_done, lsq_ovf, lsq_cdone;
  logic [LSID_W-1:0] st_done_lsid;
  logic             dc_req_v, dc_req_rdy, dc_we, dc_rsp_v, dc_miss;
  logic [31:0]      dc_addr;
  logic [XLEN-1:0]  dc_wdata, dc_rdata;
  logic [$clog2(LSQ_ENTRIES):0] lsq_occ;
  tflex_lsq #(.ENTRIES(LSQ_ENTRIES), .RESERVED(LSQ_RESERVED)) u_lsq (
    .clk, .rst_n, .oldest_slot(5'd0),
    .smask_we(cq_pop && cq.kind == CM_FETCH), .smask_slot(5'd0), .smask(cq.a),
    .st_seen_we(cq_pop && cq.kind == CM_STDONE), .st_seen_slot(5'd0),
    .st_seen_lsid(cq.a[LSID_W-1:0]),
    .req_valid(lsq_req_v), .req_ready(lsq_req_rdy), .req(iq),
    .st_done, .st_done_lsid, .overflow(lsq_ovf),
    .rsp_valid(lsq_rsp_v), .rsp_ready(lsq_rsp_rdy), .rsp(lsq_rsp),
    .commit(commit_clr), .flush(1'b0), .cf_slot(5'd0), .commit_done(lsq_cdone),
    .dc_req_valid(dc_req_v), .dc_req_ready(dc_req_rdy), .dc_req_we(dc_we),
    .dc_req_addr(dc_addr), .dc_req_wdata(dc_wdata),
    .dc_rsp_valid(dc_rsp_v), .dc_rsp_data(dc_rdata), .occupancy(lsq_occ));

  logic         dm_valid, dm_ready, dm_we, dm_rsp;
  logic [31:0]  dm_addr;
  logic [127:0] dm_data;
  tflex_dcache u_dc (
    .clk, .rst_n, .log2n(cfg.log2n),
    .req_valid(dc_req_v), .req_ready(dc_req_rdy), .req_we(dc_we), .req_addr(dc_addr),
    .req_wdata(dc_wdata), .rsp_valid(dc_rsp_v), .rsp_data(dc_rdata), .miss(dc_miss),
    .mem_req_valid(dm_valid), .mem_req_ready(dm_ready), .mem_req_we(dm_we),
    .mem_req_addr(dm_addr), .mem_req_data(dm_data),
    .mem_rsp_valid(dm_rsp), .mem_rsp_data(mrsp.data));

  // memory port: one request outstanding, D-cache or block fetch
  logic m_out, m_is_bc;
  always_comb begin
    mreq       = '0;
    mreq.core  = my_id;
    mreq_valid = 1'b0;
    dm_ready   = 1'b0;
    bm_ready   = 1'b0;
    if (!m_out) begin
      if (dm_valid) begin
        mreq_valid = 1'b1;
        mreq.we    = dm_we;
        mreq.addr  = dm_addr;
        mreq.data  = dm_data;
        dm_ready   = mreq_ready;
      end else if (bm_valid) begin
        mreq_valid = 1'b1;
        mreq.addr  = bm_addr;
        bm_ready   = mreq_ready;
      end
    end
  end
  assign dm_rsp = mrsp_valid && m_out && !m_is_bc;
  assign bm_rsp = mrsp_valid && m_out && m_is_bc;

  // ================================================================ control out
  logic      sd_v, sd_pop, wd_v, wd_pop, cd_v;
  logic [LSID_W-1:0] sd_lsid;
  tflex_fifo #(.T(logic [LSID_W-1:0]), .DEPTH(32)) u_sdq (
    .clk, .rst_n, .in_valid(st_done), .in_ready(), .in_data(st_done_lsid),
    .out_valid(sd_v), .out_ready(sd_pop), .out_data(sd_lsid));
  tflex_fifo #(.T(logic), .DEPTH(32)) u_wdq (
    .clk, .rst_n, .in_valid(wr_done), .in_ready(), .in_data(1'b1),
    .out_valid(wd_v), .out_ready(wd_pop), .out_data());

  always_comb begin
    co_valid    = 1'b0;
    co_msg      = '0;
    co_msg.base = cfg.base;
    co_msg.src  = cfg.pos;
    bo_ready    = 1'b0;
    sd_pop      = 1'b0;
    wd_pop      = 1'b0;
    br_take     = 1'b0;
    if (bo_valid) begin
      co_valid = 1'b1; co_msg = bo_msg; bo_ready = co_ready;
    end else if (cd_v) begin
      co_valid = 1'b1; co_msg.kind = CM_CDONE;
    end else if (sd_v) begin
      co_valid = 1'b1; co_msg.kind = CM_STDONE; co_msg.a = 32'(sd_lsid); sd_pop = co_ready;
    end else if (wd_v) begin
      co_valid = 1'b1; co_msg.kind = CM_WRDONE; wd_pop = co_ready;
    end else if (br_v) begin
      co_valid = 1'b1; co_msg = br_msg; br_take = co_ready;
    end
  end

  // commit: clear the window, drain LSQ and forwarding queue, then CDONE
  assign commit_clr = cq_pop && cq.kind == CM_COMMIT;

  // ================================================================ sequential
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      epoch     <= '0;
      owner_pos <= '0;
      ld_busy   <= 1'b0;
      ld_rd_v   <= 1'b0;
      ld_line   <= '0;
      ld_k      <= '0;
      ld_k_q    <= '0;
      em_v      <= '0;
      em_p      <= '0;
      br_v      <= 1'b0;
      br_msg    <= '0;
      m_out     <= 1'b0;
      m_is_bc   <= 1'b0;
      lsq_cpend <= 1'b0;
      rf_cpend  <= 1'b0;
      cd_v      <= 1'b0;
    end else begin
      // a configuration write starts a new logical processor: all its
      // members restart their epoch count together
      if (cfg_we) epoch <= '0;
      // fetch loader
      ld_rd_v <= ld_busy;
      ld_k_q  <= ld_k;
      if (cq_pop && cq.kind == CM_FETCH) begin
        epoch     <= epoch + 4'd1;
        owner_pos <= cq.src;
        ld_busy   <= 1'b1;
        ld_line   <= cq.b[7:0];
        ld_k      <= '0;
      end else if (ld_busy) begin
        if (ld_k == ld_cnt) ld_busy <= 1'b0;
        ld_k <= ld_k + 1'b1;
      end

      // emit stage
      if (em_take) begin
        em_v <= {1'b0, em_v[1]};
        em_p <= {opn_pkt_t'('0), em_p[1]};
      end
      if (issue_go && w_iss_fire) begin
        em_v[0] <= p0_v && !p0_byp;
        em_p[0] <= (p0_v && !p0_byp) ? p0 : p1;
        em_v[1] <= p0_v && !p0_byp && p1_v && !p1_byp;
        em_p[1] <= p1;
        if (!(p0_v && !p0_byp)) em_v[0] <= p1_v && !p1_byp;
        if (w_inst.op == OP_BRO) begin
          br_v         <= 1'b1;
          br_msg       <= '0;
          br_msg.kind  <= CM_BRANCH;
          br_msg.base  <= cfg.base;
          br_msg.src   <= cfg.pos;
          br_msg.a     <= w_a[31:0];
          br_msg.b     <= 32'(w_inst.xop);
          br_msg.c     <= 64'(epoch);
        end
      end
      if (br_take) br_v <= 1'b0;

      // memory port bookkeeping
      if (mreq_valid && mreq_ready) begin
        m_out   <= 1'b1;
        m_is_bc <= !dm_valid;
      end else if (mrsp_valid) begin
        m_out <= 1'b0;
      end

      // commit completion
      if (commit_clr) begin
        lsq_cpend <= 1'b1;
        rf_cpend  <= 1'b1;
      end else begin
        if (lsq_cdone) lsq_cpend <= 1'b0;
        if (rf_cdone)  rf_cpend  <= 1'b0;
      end
      if (!commit_clr && (lsq_cpend || rf_cpend) &&
          (!lsq_cpend || lsq_cdone) && (!rf_cpend || rf_cdone)) cd_v <= 1'b1;
      if (cd_v && !bo_valid && co_ready) cd_v <= 1'b0;
    end
  end

  // ================================================================ events
  always_comb begin
    ev = '0;
    ev[EV_ISSUE]   = issue_go;
    ev[EV_BYPASS]  = p0_byp || p1_byp;
    ev[EV_NETOUT]  = r_in_v[4] && r_in_rdy[4];
    ev[EV_DMISS]   = dc_miss;
    ev[EV_NACK]    = nack_we;
    ev[EV_OVF]     = lsq_ovf;
    ev[EV_PSQUASH] = issue_go && !w_iss_fire;
    ev[EV_REGRD]   = rd_req;
    ev[EV_HMISS]   = ev_hm;
    ev[EV_MISPRED] = ev_mp;
    ev[EV_COMMIT]  = ev_cm;
    ev[EV_LOOP]    = oq_v && oq_self && iq_in_rdy;
    ev[EV_STALE]   = iq_v && !ep_cur && !ep_future;
    ev[EV_WAITEP]  = iq_v && ep_future;
  end
endmodule

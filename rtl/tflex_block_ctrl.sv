// tflex_block_ctrl: block control of one core, acting for the blocks this
// core owns. Ownership is distributed: a block belongs to participant
// (block_addr >> 7) mod N, and a NEXT message hands a block to its owner
// together with the global exit history and the top two return-stack
// entries. The owner then
//   1. looks the block up in its header cache / I-cache tags and, in the
//      same cycle, makes the next-block prediction (tflex_nbp);
//   2. on a miss fetches the 640-byte block (128-byte header and 128
//      instructions) over the memory network, keeps the header and sends
//      every instruction to the slave I-cache bank of participant
//      (i mod N), entry i / N, of the line it manages;
//   3. broadcasts FETCH (store mask, I-cache line) so that every
//      participant loads its 128/N instructions into its window, and sends
//      the header's register reads to the cores that hold the registers;
//   4. counts the block's outputs (stores, register writes, one branch) as
//      their completion messages arrive, then broadcasts COMMIT and waits
//      for every participant's CDONE;
//   5. trains the predictor with the real exit, counts a misprediction when
//      the predicted target was wrong, and hands the next block to its owner
//      (or broadcasts HALT when the exit target is address 0).
// Header layout (this design's own): word 0 bits [5:0] = number of register
// writes, word 1 = store mask by LSID, words 2..31 = register reads
// {valid[31], register[15:9], target[8:0]}.
// This controller runs one block of a thread at a time: the prediction is
// made and checked but the next block is fetched only after commit.
module tflex_block_ctrl
  import tflex_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_t             cfg,
  input  logic [3:0]       epoch,
  // control messages of this processor: cm is the message at the head of
  // the core's queue, cm_valid pulses when it is consumed
  input  logic             cm_valid,
  input  ctrl_msg_t        cm,
  output logic             cm_ready,
  // control messages out
  output logic             bo_valid,
  input  logic             bo_ready,
  output ctrl_msg_t        bo_msg,
  // memory port (one request outstanding)
  output logic             mreq_valid,
  input  logic             mreq_ready,
  output logic [31:0]      mreq_addr,
  input  logic             mrsp_valid,
  input  logic [127:0]     mrsp_data,
  // events
  output logic             ev_hdr_miss,
  output logic             ev_mispredict,
  output logic             ev_commit,
  output logic             busy
);
  typedef enum logic [3:0] {
    B_IDLE, B_LOOK, B_FREQ, B_FWAIT, B_FHDR, B_FINS, B_FTAG,
    B_FETCH, B_READS, B_WAIT, B_COMMIT, B_WAITC, B_NEXT
  } st_e;
  st_e st;

  logic [31:0]        blk;
  logic [GHIST_W-1:0] gh;
  logic [63:0]        ras;
  logic [31:0]        p_target;
  logic [63:0]        p_ras;
  logic [5:0]         beat;
  logic [1:0]         sub;
  logic [127:0]       line_buf;
  logic [4:0]         hword;
  logic [5:0]         n_wr, c_wr, c_st, c_cd;
  logic [31:0]        smask;
  logic               br_seen;
  logic [31:0]        br_target;
  logic [2:0]         br_exit;
  logic [1:0]         br_kind;

  // header cache and predictor
  logic        lk_hit;
  logic [4:0]  lk_idx;
  logic [7:0]  lk_line;
  logic [31:0] rd_data;
  logic [2:0]  pr_exit;
  logic [1:0]  pr_kind;
  logic [31:0] pr_target;
  logic [GHIST_W-1:0] pr_gh;
  logic [63:0] pr_ras;

  tflex_header_cache u_hc (
    .clk, .rst_n, .log2n(cfg.log2n), .pos(cfg.pos), .inv(1'b0),
    .lk_addr(blk), .lk_hit, .lk_idx, .lk_line,
    .rd_idx(lk_idx), .rd_word(hword), .rd_data,
    .wr_we(st == B_FHDR), .wr_idx(lk_idx), .wr_word(5'({beat[2:0], sub})),
    .wr_data(line_buf[32*sub +: 32]),
    .tag_we(st == B_FTAG), .tag_addr(blk)
  );

  tflex_nbp u_nbp (
    .clk, .rst_n, .log2n(cfg.log2n),
    .pred_req(st == B_LOOK && lk_hit), .pred_addr(blk), .ghist_in(gh), .ras_in(ras),
    .pred_exit(pr_exit), .pred_kind(pr_kind), .pred_target(pr_target),
    .ghist_out(pr_gh), .ras_out(pr_ras),
    .upd(st == B_NEXT && bo_ready), .upd_addr(blk), .upd_ghist(gh),
    .upd_exit(br_exit), .upd_kind(br_kind), .upd_target(br_target)
  );

  logic is_mine;
  assign is_mine  = owner_part(cfg.log2n, cm.a) == cfg.pos;
  assign cm_ready = !(cm.kind == CM_NEXT && is_mine && st != B_IDLE);
  assign busy     = (st != B_IDLE);

  // instruction number of the word being sent during a fill
  logic [6:0] inum;
  assign inum = 7'({beat - 6'd8, sub});

  assign mreq_valid = (st == B_FREQ);
  assign mreq_addr  = blk + 32'({beat, 4'b0});

  always_comb begin
    bo_valid = 1'b0;
    bo_msg   = '0;
    bo_msg.base = cfg.base;
    bo_msg.src  = cfg.pos;
    case (st)
      B_FINS: begin
        bo_valid    = 1'b1;
        bo_msg.kind = CM_IFILL;
        bo_msg.a    = line_buf[32*sub +: 32];
        bo_msg.b    = 32'({5'(CID_W'(inum) & part_mask(cfg.log2n)), lk_line,
                           7'(inum >> cfg.log2n)});
      end
      B_FETCH: begin
        bo_valid    = hword >= 5'd2;
        bo_msg.kind = CM_FETCH;
        bo_msg.a    = smask;
        bo_msg.b    = 32'(lk_line);
      end
      B_READS: begin
        bo_valid    = rd_data[31];
        bo_msg.kind = CM_READ;
        bo_msg.a    = 32'(rd_data[15:0]);
      end
      B_COMMIT: begin
        bo_valid    = 1'b1;
        bo_msg.kind = CM_COMMIT;
      end
      B_NEXT: begin
        bo_valid    = 1'b1;
        bo_msg.kind = (br_target == 32'd0) ? CM_HALT : CM_NEXT;
        bo_msg.a    = br_target;
        bo_msg.b    = 32'({gh[GHIST_W-4:0], br_exit});
        if (br_target == p_target) bo_msg.c = p_ras;
        else case (br_kind)
          EX_CALL:   bo_msg.c = {ras[31:0], blk + 32'(BLOCK_BYTES)};
          EX_RETURN: bo_msg.c = {32'd0, ras[63:32]};
          default:   bo_msg.c = ras;
        endcase
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= B_IDLE;
      blk <= '0; gh <= '0; ras <= '0;
      p_target <= '0; p_ras <= '0;
      beat <= '0; sub <= '0; line_buf <= '0; hword <= '0;
      n_wr <= '0; c_wr <= '0; c_st <= '0; c_cd <= '0; smask <= '0;
      br_seen <= 1'b0; br_target <= '0; br_exit <= '0; br_kind <= '0;
      ev_hdr_miss <= 1'b0; ev_mispredict <= 1'b0; ev_commit <= 1'b0;
    end else begin
      ev_hdr_miss   <= 1'b0;
      ev_mispredict <= 1'b0;
      ev_commit     <= 1'b0;
      // output accounting while a block is in flight
      if (st != B_IDLE && cm_valid) begin
        case (cm.kind)
          CM_STDONE: c_st <= c_st + 1'b1;
          CM_WRDONE: c_wr <= c_wr + 1'b1;
          CM_CDONE:  c_cd <= c_cd + 1'b1;
          CM_BRANCH: if (cm.c[3:0] == epoch) begin
            br_seen   <= 1'b1;
            br_target <= cm.a;
            br_exit   <= cm.b[4:2];
            br_kind   <= cm.b[1:0];
          end
          default: ;
        endcase
      end
      case (st)
        B_IDLE: if (cm_valid && cm.kind == CM_NEXT && is_mine) begin
          blk <= cm.a;
          gh  <= cm.b[GHIST_W-1:0];
          ras <= cm.c;
          c_st <= '0; c_wr <= '0; c_cd <= '0; br_seen <= 1'b0;
          st  <= B_LOOK;
        end
        B_LOOK: begin
          if (lk_hit) begin
            p_target <= pr_target;
            p_ras    <= pr_ras;
            hword    <= 5'd0;
            st       <= B_FETCH;
          end else begin
            ev_hdr_miss <= 1'b1;
            beat <= '0;
            st   <= B_FREQ;
          end
        end
        B_FREQ:  if (mreq_ready) st <= B_FWAIT;
        B_FWAIT: if (mrsp_valid) begin
          line_buf <= mrsp_data;
          sub      <= '0;
          st       <= (beat < 6'd8) ? B_FHDR : B_FINS;
        end
        B_FHDR, B_FINS: if (st == B_FHDR || bo_ready) begin
          sub <= sub + 1'b1;
          if (sub == 2'd3) begin
            beat <= beat + 1'b1;
            st   <= (beat == 6'd39) ? B_FTAG : B_FREQ;
          end
        end
        B_FTAG: st <= B_LOOK;
        B_FETCH: begin
          // header words 0 and 1 are read while FETCH waits for the bus
          if (hword == 5'd0) begin
            n_wr  <= rd_data[5:0];
            hword <= 5'd1;
          end else if (hword == 5'd1) begin
            smask <= rd_data;
            hword <= 5'd2;
          end else if (bo_ready) begin
            st <= B_READS;
          end
        end
        B_READS: if (!rd_data[31] || bo_ready) begin
          if (hword == 5'd31) st <= B_WAIT;
          hword <= hword + 1'b1;
        end
        B_WAIT: if (br_seen && c_wr == n_wr && 32'(c_st) == 32'($countones(smask))) st <= B_COMMIT;
        B_COMMIT: if (bo_ready) st <= B_WAITC;
        B_WAITC: if (32'(c_cd) == (32'd1 << cfg.log2n)) begin
          ev_commit     <= 1'b1;
          ev_mispredict <= (p_target != br_target);
          st <= B_NEXT;
        end
        B_NEXT: if (bo_ready) st <= B_IDLE;
        default: st <= B_IDLE;
      endcase
    end
  end
endmodule

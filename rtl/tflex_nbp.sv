// tflex_nbp: one core's slice of the distributed next-block predictor
// (about 7 Kbit of state against the 8-Kbit budget). A TRIPS block ends in
// one of up to eight exits; the predictor first predicts which exit (3-bit
// exit number) and then that exit's target.
//   * Exit prediction is a local/global tournament in the style of the
//     Alpha 21264: a local history table (per block, 9 bits = last three
//     exits) indexes a local exit table, a global exit table is indexed by
//     the global exit history folded to 9 bits, and 2-bit choice counters,
//     also indexed by the folded history, pick one of the two.
//   * Targets come from an address-partitioned target buffer (branches and
//     calls, with the exit kind) or, for returns, from the return address
//     stack. The top two stack entries travel with the prediction from core
//     to core (ras_in/ras_out); deeper entries spill into and refill from a
//     small stack in the predicting core.
// The global history also travels: ghist_out is ghist_in shifted by the
// predicted exit. Only blocks owned by this core use its tables, so the
// block key drops the owner bits (addr >> (7 + log2n)).
// Prediction is combinational; update (at block commit) writes at the clock
// edge with the history that was used to predict. Table sizes, the fold,
// the return point (block address + 640) and the spill policy are this
// design's own choices.
module tflex_nbp
  import tflex_pkg::*;
#(
  parameter int unsigned LHT_N  = 64,
  parameter int unsigned PHT_N  = 512,
  parameter int unsigned BTB_N  = 64,
  parameter int unsigned RAS_N  = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [2:0]         log2n,
  // predict
  input  logic               pred_req,
  input  logic [31:0]        pred_addr,
  input  logic [GHIST_W-1:0] ghist_in,
  input  logic [63:0]        ras_in,     // {second, top}
  output logic [2:0]         pred_exit,
  output logic [1:0]         pred_kind,
  output logic [31:0]        pred_target,
  output logic [GHIST_W-1:0] ghist_out,
  output logic [63:0]        ras_out,
  // update
  input  logic               upd,
  input  logic [31:0]        upd_addr,
  input  logic [GHIST_W-1:0] upd_ghist,
  input  logic [2:0]         upd_exit,
  input  logic [1:0]         upd_kind,
  input  logic [31:0]        upd_target
);
  localparam int unsigned PW = $clog2(PHT_N);
  localparam int unsigned LW = $clog2(LHT_N);
  localparam int unsigned BW = $clog2(BTB_N);
  localparam int unsigned RW = $clog2(RAS_N);

  logic [8:0]  lht  [LHT_N];
  logic [2:0]  lpht [PHT_N];
  logic [2:0]  gpht [PHT_N];
  logic [1:0]  chc  [PHT_N];
  logic [33:0] btb  [BTB_N];   // {kind, target}
  logic [31:0] stk  [RAS_N];
  logic [RW:0] sp;

  function automatic logic [PW-1:0] fold(logic [GHIST_W-1:0] h);
    return PW'(h[8:0] ^ 9'(h >> 9));
  endfunction

  // ---------------- predict
  logic [31:0]   pkey;
  logic [PW-1:0] pl_i, pg_i;
  logic [2:0]    lex, gex;
  logic [33:0]   bent;
  assign pkey      = pred_addr >> (7 + 32'(log2n));
  assign pl_i      = PW'(lht[LW'(pkey)]) ^ PW'(pkey);
  assign pg_i      = fold(ghist_in) ^ PW'(pkey);
  assign lex       = lpht[pl_i];
  assign gex       = gpht[pg_i];
  assign pred_exit = chc[fold(ghist_in)][1] ? gex : lex;
  assign bent      = btb[BW'(pkey) ^ BW'(pred_exit)];
  assign pred_kind = bent[33:32];
  assign ghist_out = {ghist_in[GHIST_W-4:0], pred_exit};

  logic [31:0] ras_top, ras_2nd, refill;
  assign ras_top = ras_in[31:0];
  assign ras_2nd = ras_in[63:32];
  assign refill  = (sp != '0) ? stk[RW'(sp - 1'b1)] : 32'd0;

  always_comb begin
    pred_target = bent[31:0];
    ras_out     = ras_in;
    case (pred_kind)
      EX_CALL:   ras_out = {ras_top, pred_addr + 32'(BLOCK_BYTES)};
      EX_RETURN: begin
        pred_target = ras_top;
        ras_out     = {refill, ras_2nd};
      end
      default: ;
    endcase
  end

  // ---------------- update
  logic [31:0]   ukey;
  logic [PW-1:0] ul_i, ug_i, uc_i;
  assign ukey = upd_addr >> (7 + 32'(log2n));
  assign ul_i = PW'(lht[LW'(ukey)]) ^ PW'(ukey);
  assign ug_i = fold(upd_ghist) ^ PW'(ukey);
  assign uc_i = fold(upd_ghist);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp <= '0;
      for (int i = 0; i < int'(LHT_N); i++) lht[i] <= '0;
      for (int i = 0; i < int'(PHT_N); i++) begin
        lpht[i] <= '0;
        gpht[i] <= '0;
        chc[i]  <= 2'b01;
      end
      for (int i = 0; i < int'(BTB_N); i++) btb[i] <= '0;
    end else begin
      // the stack slice follows the predictions made here
      if (pred_req && pred_kind == EX_CALL && sp != (RW+1)'(RAS_N)) begin
        stk[RW'(sp)] <= ras_2nd;
        sp <= sp + 1'b1;
      end else if (pred_req && pred_kind == EX_RETURN && sp != '0) begin
        sp <= sp - 1'b1;
      end
      if (upd) begin
        lht[LW'(ukey)] <= {lht[LW'(ukey)][5:0], upd_exit};
        lpht[ul_i]     <= upd_exit;
        gpht[ug_i]     <= upd_exit;
        if (lpht[ul_i] != gpht[ug_i]) begin
          if (gpht[ug_i] == upd_exit && chc[uc_i] != 2'b11) chc[uc_i] <= chc[uc_i] + 1'b1;
          if (lpht[ul_i] == upd_exit && chc[uc_i] != 2'b00) chc[uc_i] <= chc[uc_i] - 1'b1;
        end
        if (upd_kind != EX_RETURN) btb[BW'(ukey) ^ BW'(upd_exit)] <= {upd_kind, upd_target};
        else btb[BW'(ukey) ^ BW'(upd_exit)] <= {upd_kind, 32'd0};
      end
    end
  end
endmodule

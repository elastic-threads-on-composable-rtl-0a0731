// tflex_reg_fwd: register forwarding queue of one core. Register writes of
// the block in flight that target registers homed on this core are held here,
// not in the register file, until the block commits; a flush discards them.
// Each accepted write raises wr_done for one cycle so the core can report the
// output to the block's owner. On commit the queue drains into the register
// file, one write per cycle in arrival order, and commit_done pulses when it
// is empty. The forwarding port returns the youngest pending value of a
// register, for reads that must see uncommitted writes.
// The queue's depth and the one-write-per-cycle drain are this design's own.
module tflex_reg_fwd
  import tflex_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [6:0]      in_reg,
  input  logic [XLEN-1:0] in_data,
  output logic            wr_done,
  input  logic            commit,
  input  logic            flush,
  output logic            commit_done,
  output logic            rf_we,
  output logic [6:0]      rf_wa,
  output logic [XLEN-1:0] rf_wd,
  input  logic [6:0]      fwd_reg,
  output logic            fwd_hit,
  output logic [XLEN-1:0] fwd_data
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [6:0]      q_reg  [DEPTH];
  logic [XLEN-1:0] q_data [DEPTH];
  logic [AW:0]     cnt, rp;
  logic            draining;

  assign in_ready = !draining && (cnt != (AW+1)'(DEPTH));
  assign rf_we    = draining && (rp != cnt);
  assign rf_wa    = q_reg[rp[AW-1:0]];
  assign rf_wd    = q_data[rp[AW-1:0]];

  always_comb begin
    fwd_hit  = 1'b0;
    fwd_data = '0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      if ((AW+1)'(i) < cnt && q_reg[i] == fwd_reg) begin
        fwd_hit  = 1'b1;
        fwd_data = q_data[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      rp          <= '0;
      draining    <= 1'b0;
      wr_done     <= 1'b0;
      commit_done <= 1'b0;
    end else begin
      wr_done     <= 1'b0;
      commit_done <= 1'b0;
      if (flush) begin
        cnt      <= '0;
        rp       <= '0;
        draining <= 1'b0;
      end else if (draining) begin
        if (rp != cnt) rp <= rp + 1'b1;
        else begin
          draining    <= 1'b0;
          cnt         <= '0;
          rp          <= '0;
          commit_done <= 1'b1;
        end
      end else begin
        if (commit) draining <= 1'b1;
        else if (in_valid && in_ready) begin
          cnt     <= cnt + 1'b1;
          wr_done <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!draining && !commit && !flush && in_valid && in_ready) begin
      q_reg[cnt[AW-1:0]]  <= in_reg;
      q_data[cnt[AW-1:0]] <= in_data;
    end
  end
endmodule

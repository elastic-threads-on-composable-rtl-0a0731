// tflex_inst_window: the 128-entry instruction window of one core (its
// reservation stations) with the left and right operand buffers (128 x 64
// bits each) and a predicate bit per entry. Instructions are loaded at fetch;
// operands arrive on two write ports (port 0 is the local bypass from this
// core's own issue, port 1 is the operand network in-queue). An entry is
// ready when every operand its opcode needs is present and, if predicated,
// its predicate has arrived. Each cycle the select logic issues the ready
// entry with the lowest index (one instruction per cycle, out of order with
// respect to program order, obeying only dataflow). A NACKed memory
// instruction is put back with its NACK bit set; it waits until some block
// commits (nack_release) and then becomes ready again. clr_valid empties the
// entries of one block slot: with N cores, slot s owns entries
// [s*128/N, (s+1)*128/N). Operands that arrive before their consumer is
// loaded are kept. Loading, wakeup and select follow the core
// description; select-by-lowest-index is this design's own policy.
// Timing: operands written in cycle t can issue in cycle t+1.
module tflex_inst_window
  import tflex_pkg::*;
#(
  parameter int unsigned WIN_N = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [2:0]       log2n,
  // instruction load
  input  logic             ld_we,
  input  logic [6:0]       ld_idx,
  input  inst_t            ld_inst,
  // operand write ports
  input  logic [1:0]       op_we,
  input  logic [1:0][6:0]  op_idx,
  input  logic [1:0][1:0]  op_tt,
  input  logic [1:0][XLEN-1:0] op_data,
  // issue
  input  logic             iss_ready,
  output logic             iss_valid,
  output logic [6:0]       iss_idx,
  output inst_t            iss_inst,
  output logic [XLEN-1:0]  iss_a,
  output logic [XLEN-1:0]  iss_b,
  output logic             iss_fire,   // predicate allows execution
  // NACK from the LSQ path
  input  logic             nack_we,
  input  logic [6:0]       nack_idx,
  input  logic             nack_release,
  // block slot clear (commit or flush)
  input  logic             clr_valid,
  input  logic [4:0]       clr_slot,
  output logic [WIN_N-1:0] busy       // valid and not yet issued
);
  logic [WIN_N-1:0] valid, issued, lv, rv, pv, pval, nack;
  inst_t            insts [WIN_N];
  logic [XLEN-1:0]  lbuf  [WIN_N];
  logic [XLEN-1:0]  rbuf  [WIN_N];
  logic [WIN_N-1:0] ready;

  always_comb begin
    for (int i = 0; i < int'(WIN_N); i++) begin
      logic [1:0] n;
      n = n_operands(insts[i].op);
      ready[i] = valid[i] && !issued[i] && !nack[i] &&
                 ((n == 2'd0) || lv[i]) && ((n != 2'd2) || rv[i]) &&
                 (!insts[i].pr[1] || pv[i]);
    end
  end
  assign busy = valid & ~issued;

  always_comb begin
    iss_valid = 1'b0;
    iss_idx   = '0;
    for (int i = int'(WIN_N) - 1; i >= 0; i--) begin
      if (ready[i]) begin
        iss_valid = 1'b1;
        iss_idx   = 7'(i);
      end
    end
  end
  assign iss_inst = insts[iss_idx];
  assign iss_a    = lbuf[iss_idx];
  assign iss_b    = rbuf[iss_idx];
  assign iss_fire = !iss_inst.pr[1] || (pval[iss_idx] == iss_inst.pr[0]);

  function automatic logic in_slot(int i, logic [2:0] l2n, logic [4:0] s);
    return (32'(i) >> (3'd7 - l2n)) == 32'(s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= '0;
      issued <= '0;
      lv     <= '0;
      rv     <= '0;
      pv     <= '0;
      pval   <= '0;
      nack   <= '0;
    end else begin
      if (nack_release) nack <= '0;
      if (iss_valid && iss_ready) issued[iss_idx] <= 1'b1;
      for (int p = 0; p < 2; p++) begin
        if (op_we[p]) begin
          case (op_tt[p])
            TT_LEFT:  lv[op_idx[p]] <= 1'b1;
            TT_RIGHT: rv[op_idx[p]] <= 1'b1;
            TT_PRED: begin
              pv[op_idx[p]]   <= 1'b1;
              pval[op_idx[p]] <= op_data[p][0];
            end
            default: ;
          endcase
        end
      end
      if (nack_we) begin
        issued[nack_idx] <= 1'b0;
        nack[nack_idx]   <= 1'b1;
      end
      if (ld_we) begin
        // operand flags are left alone: an operand may arrive before its
        // consumer is loaded; the slot clear at commit resets them
        valid[ld_idx]  <= 1'b1;
        issued[ld_idx] <= 1'b0;
        nack[ld_idx]   <= 1'b0;
      end
      if (clr_valid) begin
        for (int i = 0; i < int'(WIN_N); i++) begin
          if (in_slot(i, log2n, clr_slot)) begin
            valid[i] <= 1'b0;
            issued[i] <= 1'b0;
            lv[i]    <= 1'b0;
            rv[i]    <= 1'b0;
            pv[i]    <= 1'b0;
            nack[i]  <= 1'b0;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (ld_we) insts[ld_idx] <= ld_inst;
    for (int p = 0; p < 2; p++) begin
      if (op_we[p] && op_tt[p] == TT_LEFT)  lbuf[op_idx[p]] <= op_data[p];
      if (op_we[p] && op_tt[p] == TT_RIGHT) rbuf[op_idx[p]] <= op_data[p];
    end
  end
endmodule

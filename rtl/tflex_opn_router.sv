// tflex_opn_router: one node of the operand network, the 2-D mesh that
// carries 64-bit operands (and load/store/register-write requests) between
// the cores of a logical processor. Five ports: 0 north, 1 east, 2 south,
// 3 west, 4 local (the core's operand out/in queues). Every input has a
// small FIFO; a packet is routed X first, then Y (dimension order, which is
// deadlock-free on a mesh), and each output grants one input per cycle in
// round-robin order. A packet advances one hop per cycle when the next FIFO
// has room. Core id c sits at column c mod CHIP_W, row c / CHIP_W; row
// numbers grow to the south. The document gives the network's width and
// its per-core router; routing, buffering and arbitration are this design's
// own choices.
module tflex_opn_router
  import tflex_pkg::*;
#(
  parameter int unsigned CHIP_W = 4,
  parameter int unsigned DEPTH  = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CID_W-1:0] my_id,
  input  logic [4:0]       in_valid,
  output logic [4:0]       in_ready,
  input  opn_pkt_t [4:0]   in_pkt,
  output logic [4:0]       out_valid,
  input  logic [4:0]       out_ready,
  output opn_pkt_t [4:0]   out_pkt
);
  logic [4:0]     hv, hpop;
  opn_pkt_t [4:0] hp;
  logic [4:0][2:0] want;          // requested output of each input head
  logic [4:0][2:0] rr;            // round-robin pointer per output
  logic [4:0][4:0] gnt;           // gnt[o][i]

  for (genvar i = 0; i < 5; i++) begin : g_in
    tflex_fifo #(.T(opn_pkt_t), .DEPTH(DEPTH)) u_q (
      .clk, .rst_n,
      .in_valid(in_valid[i]), .in_ready(in_ready[i]), .in_data(in_pkt[i]),
      .out_valid(hv[i]), .out_ready(hpop[i]), .out_data(hp[i])
    );
  end

  function automatic logic [2:0] route(logic [CID_W-1:0] me, logic [CID_W-1:0] d);
    int unsigned mx, my, dx, dy;
    mx = 32'(me) % CHIP_W;  my = 32'(me) / CHIP_W;
    dx = 32'(d)  % CHIP_W;  dy = 32'(d)  / CHIP_W;
    if (dx > mx) return 3'd1;
    if (dx < mx) return 3'd3;
    if (dy > my) return 3'd2;
    if (dy < my) return 3'd0;
    return 3'd4;
  endfunction

  always_comb begin
    for (int i = 0; i < 5; i++) want[i] = route(my_id, hp[i].dst);
  end

  always_comb begin
    gnt       = '0;
    out_valid = '0;
    out_pkt   = '0;
    hpop      = '0;
    for (int o = 0; o < 5; o++) begin
      for (int k = 0; k < 5; k++) begin
        int i;
        i = (int'(rr[o]) + k) % 5;
        if (gnt[o] == '0 && hv[i] && want[i] == 3'(o)) gnt[o][i] = 1'b1;
      end
      for (int i = 0; i < 5; i++) begin
        if (gnt[o][i]) begin
          out_valid[o] = 1'b1;
          out_pkt[o]   = hp[i];
          hpop[i]      = out_ready[o];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else begin
      for (int o = 0; o < 5; o++) begin
        for (int i = 0; i < 5; i++) begin
          if (gnt[o][i] && out_ready[o]) rr[o] <= 3'((i + 1) % 5);
        end
      end
    end
  end
endmodule

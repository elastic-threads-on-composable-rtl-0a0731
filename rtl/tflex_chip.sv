// tflex_chip: a TFlex chip, CHIP_W x CHIP_H composable cores (4 x 8 = 32 by
// default, the processor half of the 65 nm floorplan; the other half holds
// the L2 banks, which are outside this design and reached through the L2
// port). The cores sit on a 2-D operand mesh; a broadcast control network
// and a memory network join them. Writing each core's configuration
// register groups rectangles of 2^k cores into logical processors: for
// instance 32 one-core processors, one 32-core processor, or a mix, each
// running its own thread.
//
// Ports: cfg_we (one bit per core) with cfg_wdata writes configuration
// registers; os_* injects a control message (the OS starts a thread by
// sending CM_NEXT with the first block's address to its processor); b_*
// shows every control broadcast (commits, HALT); l2_* is the memory
// network's port to the L2; ev gives each core's event pulses.
//
// The 4 x 8 grid of 32 cores and the composition by configuration
// registers follow the design. The broadcast control bus, the single L2
// port and the halt-on-exit-to-0 convention are this design's own.
module tflex_chip
  import tflex_pkg::*;
#(
  parameter int unsigned CHIP_W = 4,
  parameter int unsigned CHIP_H = 8,
  parameter int unsigned NC     = CHIP_W * CHIP_H
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NC-1:0]       cfg_we,
  input  cfg_t                cfg_wdata,
  input  logic                os_valid,
  output logic                os_ready,
  input  ctrl_msg_t           os_msg,
  output logic                b_valid,
  output ctrl_msg_t           b_msg,
  output logic                l2_req_valid,
  input  logic                l2_req_ready,
  output mem_req_t            l2_req,
  input  logic                l2_rsp_valid,
  input  mem_rsp_t            l2_rsp,
  output logic [NC-1:0][15:0] ev
);
  // mesh links, indexed by the receiving core and its port (0 N,1 E,2 S,3 W)
  logic     [NC-1:0][3:0] ni_v, ni_r, no_v, no_r;
  opn_pkt_t [NC-1:0][3:0] ni_p, no_p;
  logic      [NC-1:0] co_v, co_r, ci_r, mq_v, mq_r, mr_v;
  ctrl_msg_t [NC-1:0] co_m;
  mem_req_t  [NC-1:0] mq;
  mem_rsp_t           mr;

  function automatic int nb(int c, int p);
    int x, y;
    x = c % int'(CHIP_W);
    y = c / int'(CHIP_W);
    case (p)
      0: return (y > 0) ? c - int'(CHIP_W) : -1;
      1: return (x < int'(CHIP_W) - 1) ? c + 1 : -1;
      2: return (y < int'(CHIP_H) - 1) ? c + int'(CHIP_W) : -1;
      default: return (x > 0) ? c - 1 : -1;
    endcase
  endfunction

  for (genvar c = 0; c < int'(NC); c++) begin : g_core
    for (genvar p = 0; p < 4; p++) begin : g_link
      localparam int N = nb(c, p);
      if (N >= 0) begin : g_con
        // core c, port p receives what neighbour N sends on the opposite port
        assign ni_v[c][p] = no_v[N][(p + 2) % 4];
        assign ni_p[c][p] = no_p[N][(p + 2) % 4];
        assign no_r[N][(p + 2) % 4] = ni_r[c][p];
      end else begin : g_edge
        assign ni_v[c][p] = 1'b0;
        assign ni_p[c][p] = '0;
        assign no_r[c][p] = 1'b0;
      end
    end

    tflex_core #(.CHIP_W(CHIP_W)) u_core (
      .clk, .rst_n, .my_id(CID_W'(c)),
      .cfg_we(cfg_we[c]), .cfg_wdata,
      .ni_valid(ni_v[c]), .ni_ready(ni_r[c]), .ni_pkt(ni_p[c]),
      .no_valid(no_v[c]), .no_ready(no_r[c]), .no_pkt(no_p[c]),
      .co_valid(co_v[c]), .co_ready(co_r[c]), .co_msg(co_m[c]),
      .ci_valid(b_valid), .ci_msg(b_msg), .ci_ready(ci_r[c]),
      .mreq_valid(mq_v[c]), .mreq_ready(mq_r[c]), .mreq(mq[c]),
      .mrsp_valid(mr_v[c]), .mrsp(mr),
      .ev(ev[c]));
  end

  tflex_ctrl_net #(.NC(NC)) u_cn (
    .clk, .rst_n, .o_valid(co_v), .o_ready(co_r), .o_msg(co_m),
    .os_valid, .os_ready, .os_msg, .i_ready(ci_r), .b_valid, .b_msg);

  tflex_mem_net #(.NC(NC)) u_mn (
    .clk, .rst_n, .c_req_valid(mq_v), .c_req_ready(mq_r), .c_req(mq),
    .c_rsp_valid(mr_v), .c_rsp(mr),
    .l2_req_valid, .l2_req_ready, .l2_req, .l2_rsp_valid, .l2_rsp);
endmodule

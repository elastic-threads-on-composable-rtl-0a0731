// tflex_mem_net: the memory network joining the back sides of the cores'
// L1 caches (D-cache misses and write-backs, I-cache block fills) to the
// L2. Requests carry a 128-bit line; one request per cycle is passed to the
// L2 port, chosen round robin among the cores; responses return to the core
// named in them. Each core keeps at most one request outstanding. The
// document gives the network's width; its arbitration and the single L2
// port (the banked S-NUCA L2 itself lies outside this design) are this
// design's own.
module tflex_mem_net
  import tflex_pkg::*;
#(
  parameter int unsigned NC = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NC-1:0]       c_req_valid,
  output logic [NC-1:0]       c_req_ready,
  input  mem_req_t [NC-1:0]   c_req,
  output logic [NC-1:0]       c_rsp_valid,
  output mem_rsp_t            c_rsp,
  output logic                l2_req_valid,
  input  logic                l2_req_ready,
  output mem_req_t            l2_req,
  input  logic                l2_rsp_valid,
  input  mem_rsp_t            l2_rsp
);
  localparam int unsigned PW = (NC > 1) ? $clog2(NC) : 1;
  logic [PW-1:0] rr, g;
  logic          found;

  always_comb begin
    found = 1'b0;
    g     = '0;
    for (int k = 0; k < int'(NC); k++) begin
      int i;
      i = (int'(rr) + k) % int'(NC);
      if (!found && c_req_valid[i]) begin
        found = 1'b1;
        g     = PW'(i);
      end
    end
  end

  assign l2_req_valid = found;
  always_comb begin
    l2_req      = c_req[g];
    l2_req.core = CID_W'(g);
    c_req_ready = '0;
    c_req_ready[g] = found && l2_req_ready;
  end

  always_comb begin
    c_rsp       = l2_rsp;
    c_rsp_valid = '0;
    if (l2_rsp_valid && 32'(l2_rsp.core) < NC) c_rsp_valid[l2_rsp.core[PW-1:0]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else if (found && l2_req_ready) rr <= PW'((32'(g) + 1) % NC);
  end
endmodule

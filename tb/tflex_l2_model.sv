// tflex_l2_model: behavioural stand-in for the chip's L2, used only by
// testbenches. It answers every request on the memory network after a fixed
// latency (15 cycles, the L2 hit time the design assumes, without the
// routing delay), in order, one request accepted per cycle. Writes store the
// 128-bit line and are acknowledged like reads. The array covers the low
// 64 KB of the address space; testbenches fill it through mem[].
module tflex_l2_model
  import tflex_pkg::*;
#(
  parameter int unsigned LAT   = 15,
  parameter int unsigned LINES = 4096
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  output logic     req_ready,
  input  mem_req_t req,
  output logic     rsp_valid,
  output mem_rsp_t rsp
);
  logic [127:0] mem [LINES];
  mem_rsp_t     q_rsp [$];
  int unsigned  q_due [$];
  int unsigned  now;
  int unsigned  reads, writes;

  assign req_ready = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now       <= 0;
      rsp_valid <= 1'b0;
      rsp       <= '0;
      reads     <= 0;
      writes    <= 0;
    end else begin
      now       <= now + 1;
      rsp_valid <= 1'b0;
      if (req_valid) begin
        mem_rsp_t r;
        r.core = req.core;
        r.data = mem[req.addr[$clog2(LINES)+3:4]];
        if (req.we) begin
          mem[req.addr[$clog2(LINES)+3:4]] = req.data;
          writes <= writes + 1;
        end else reads <= reads + 1;
        q_rsp.push_back(r);
        q_due.push_back(now + LAT);
      end
      if (q_due.size() > 0 && q_due[0] <= now) begin
        rsp_valid <= 1'b1;
        rsp       <= q_rsp.pop_front();
        void'(q_due.pop_front());
      end
    end
  end
endmodule

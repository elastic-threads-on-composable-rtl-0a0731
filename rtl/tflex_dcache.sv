// tflex_dcache: one core's L1 D-cache bank, 8 KB, 2-way set associative,
// write-back and write-allocate, with 16-byte lines (one 128-bit beat of the
// memory network). The banks of a logical processor are line-interleaved:
// address bits [4 +: log2n] choose the bank, so the set index is taken from
// the bits above them. Each line keeps its full line address as its tag, so
// the bank works for any composition without a re-encode (the OS still
// flushes caches when it recomposes). Replacement is LRU (one bit per set).
// Size, associativity and interleaving follow the design; line size, write
// policy and replacement are this design's own.
//
// Interface: one 64-bit access at a time (req_valid/req_ready, 8-byte
// aligned address); the answer comes with rsp_valid (read data, or an
// acknowledgement for a write) one cycle after acceptance on a hit. A miss
// writes back a dirty victim, then reads the line over the memory port
// (mem_req_valid/mem_req_ready, mem_rsp_valid); writes also get a response.
module tflex_dcache
  import tflex_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 8192,
  parameter int unsigned WAYS       = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [2:0]       log2n,
  input  logic             req_valid,
  output logic             req_ready,
  input  logic             req_we,
  input  logic [31:0]      req_addr,
  input  logic [XLEN-1:0]  req_wdata,
  output logic             rsp_valid,
  output logic [XLEN-1:0]  rsp_data,
  output logic             miss,          // pulses once per miss
  // memory network side
  output logic             mem_req_valid,
  input  logic             mem_req_ready,
  output logic             mem_req_we,
  output logic [31:0]      mem_req_addr,
  output logic [127:0]     mem_req_data,
  input  logic             mem_rsp_valid,
  input  logic [127:0]     mem_rsp_data
);
  localparam int unsigned SETS = SIZE_BYTES / (16 * WAYS);
  localparam int unsigned SW   = $clog2(SETS);
  localparam int unsigned WW   = (WAYS > 1) ? $clog2(WAYS) : 1;

  logic [127:0] data [WAYS][SETS];
  logic [27:0]  tag  [WAYS][SETS];
  logic [WAYS-1:0] vld [SETS];
  logic [WAYS-1:0] dty [SETS];
  logic [SETS-1:0] lru;  // for 2 ways: the way to replace next

  typedef enum logic [2:0] {D_IDLE, D_LOOK, D_WB, D_WB_WAIT, D_RD, D_RD_WAIT} st_e;
  st_e st;

  logic            r_we;
  logic [31:0]     r_addr;
  logic [XLEN-1:0] r_wdata;
  logic [SW-1:0]   set;
  logic [27:0]     ltag;
  logic            hit;
  logic [WW-1:0]   hway, vway;

  assign set  = SW'(r_addr >> (4 + 32'(log2n)));
  assign ltag = r_addr[31:4];

  always_comb begin
    hit  = 1'b0;
    hway = '0;
    for (int w = 0; w < int'(WAYS); w++) begin
      if (vld[set][w] && tag[w][set] == ltag) begin
        hit  = 1'b1;
        hway = WW'(w);
      end
    end
  end
  assign vway = WW'(lru[set]);

  assign req_ready     = (st == D_IDLE);
  assign mem_req_valid = (st == D_WB) || (st == D_RD);
  assign mem_req_we    = (st == D_WB);
  assign mem_req_addr  = (st == D_WB) ? {tag[vway][set], 4'b0} : {r_addr[31:4], 4'b0};
  assign mem_req_data  = data[vway][set];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= D_IDLE;
      r_we      <= 1'b0;
      r_addr    <= '0;
      r_wdata   <= '0;
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
      miss      <= 1'b0;
      lru       <= '0;
      for (int s = 0; s < int'(SETS); s++) begin
        vld[s] <= '0;
        dty[s] <= '0;
      end
    end else begin
      rsp_valid <= 1'b0;
      miss      <= 1'b0;
      case (st)
        D_IDLE: if (req_valid) begin
          r_we    <= req_we;
          r_addr  <= req_addr;
          r_wdata <= req_wdata;
          st      <= D_LOOK;
        end
        D_LOOK: begin
          if (hit) begin
            rsp_valid <= 1'b1;
            rsp_data  <= r_addr[3] ? data[hway][set][127:64] : data[hway][set][63:0];
            lru[set]  <= ~hway[0];
            if (r_we) dty[set][hway] <= 1'b1;
            st <= D_IDLE;
          end else begin
            miss <= 1'b1;
            st   <= (vld[set][vway] && dty[set][vway]) ? D_WB : D_RD;
          end
        end
        D_WB:      if (mem_req_ready) st <= D_WB_WAIT;
        D_WB_WAIT: if (mem_rsp_valid) begin
          dty[set][vway] <= 1'b0;
          st <= D_RD;
        end
        D_RD:      if (mem_req_ready) st <= D_RD_WAIT;
        D_RD_WAIT: if (mem_rsp_valid) begin
          vld[set][vway] <= 1'b1;
          dty[set][vway] <= 1'b0;
          st <= D_LOOK;   // replay the access, now a hit
        end
        default: st <= D_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st == D_RD_WAIT && mem_rsp_valid) begin
      data[vway][set] <= mem_rsp_data;
      tag[vway][set]  <= ltag;
    end else if (st == D_LOOK && hit && r_we) begin
      if (r_addr[3]) data[hway][set][127:64] <= r_wdata;
      else           data[hway][set][63:0]   <= r_wdata;
    end
  end
endmodule

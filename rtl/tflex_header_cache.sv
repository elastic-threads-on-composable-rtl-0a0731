// tflex_header_cache: the block owner's 4 KB header cache (32 headers of
// 128 bytes, direct-mapped) together with the I-cache tags that tell the
// owner which blocks its slave I-cache banks hold. A block owned by this
// core has key = block_addr >> (7 + log2n) (the owner bits removed); its
// header sits at entry key mod 32, and its instructions in every
// participant's bank at line pos*ITAGS + (key mod ITAGS), because each owner
// manages ITAGS lines of every bank (1/N of the bank's 8N lines). A lookup
// hits when both the header tag and the I-cache tag of that line name the
// block. Word reads are combinational; fills write one 32-bit header word
// per cycle and set both tags with tag_we. inv clears every tag.
// Sizes follow the design; the direct mapping is this design's own.
module tflex_header_cache
  import tflex_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 4096,
  parameter int unsigned ITAGS      = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  log2n,
  input  logic [CID_W-1:0] pos,
  input  logic        inv,
  // lookup
  input  logic [31:0] lk_addr,
  output logic        lk_hit,
  output logic [$clog2(SIZE_BYTES/128)-1:0] lk_idx,
  output logic [7:0]  lk_line,
  // header word read
  input  logic [$clog2(SIZE_BYTES/128)-1:0] rd_idx,
  input  logic [4:0]  rd_word,
  output logic [31:0] rd_data,
  // fill
  input  logic        wr_we,
  input  logic [$clog2(SIZE_BYTES/128)-1:0] wr_idx,
  input  logic [4:0]  wr_word,
  input  logic [31:0] wr_data,
  input  logic        tag_we,
  input  logic [31:0] tag_addr
);
  localparam int unsigned HL = SIZE_BYTES / 128;
  localparam int unsigned HW = $clog2(HL);
  localparam int unsigned IW = $clog2(ITAGS);

  logic [31:0] words [HL*32];
  logic [31:0] htag  [HL];
  logic [HL-1:0] hv;
  logic [31:0] itag  [ITAGS];
  logic [ITAGS-1:0] iv;

  logic [31:0] key, tkey;
  assign key     = lk_addr >> (7 + 32'(log2n));
  assign tkey    = tag_addr >> (7 + 32'(log2n));
  assign lk_idx  = HW'(key);
  assign lk_line = 8'(32'(pos) * ITAGS + 32'(key[IW-1:0]));
  assign lk_hit  = hv[lk_idx] && htag[lk_idx] == lk_addr &&
                   iv[key[IW-1:0]] && itag[key[IW-1:0]] == lk_addr;
  assign rd_data = words[{rd_idx, rd_word}];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hv <= '0;
      iv <= '0;
    end else if (inv) begin
      hv <= '0;
      iv <= '0;
    end else if (tag_we) begin
      hv[HW'(tkey)]         <= 1'b1;
      htag[HW'(tkey)]       <= tag_addr;
      iv[tkey[IW-1:0]]      <= 1'b1;
      itag[tkey[IW-1:0]]    <= tag_addr;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_we) words[{wr_idx, wr_word}] <= wr_data;
  end
endmodule

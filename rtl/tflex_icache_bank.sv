// tflex_icache_bank: one core's 4 KB slave I-cache bank: 1024 32-bit
// instruction words, direct-mapped and tagless. The tags live with the
// block owner's header cache; the bank only stores, for every cached block
// whose slice it holds, that block's 128/N instructions at
// line * (128/N) + entry. Fill writes one instruction per cycle; the fetch
// read returns the word addressed in the previous cycle (synchronous read,
// as a RAM macro would).
module tflex_icache_bank #(
  parameter int unsigned SIZE_BYTES = 4096
) (
  input  logic                               clk,
  input  logic                               we,
  input  logic [$clog2(SIZE_BYTES/4)-1:0]    waddr,
  input  logic [31:0]                        wdata,
  input  logic                               re,
  input  logic [$clog2(SIZE_BYTES/4)-1:0]    raddr,
  output logic [31:0]                        rdata
);
  logic [31:0] mem [SIZE_BYTES/4];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule

// tflex_regfile: one core's 128-entry, 64-bit architectural register file
// with two read ports and one write port, as in the core diagram. Reads are
// combinational, the write is at the clock edge; a read of the register being
// written returns the old value. All registers reset to zero. In a composed
// processor register r lives on participant r mod N, so only every N-th
// entry of each bank is used (the rest is left idle, as the design
// describes).
// Size and port count follow the design; reset to zero is this design's own.
module tflex_regfile
  import tflex_pkg::*;
#(
  parameter int unsigned NREG = 128,
  parameter int unsigned W    = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(NREG)-1:0] ra0,
  output logic [W-1:0]            rd0,
  input  logic [$clog2(NREG)-1:0] ra1,
  output logic [W-1:0]            rd1,
  input  logic                    we,
  input  logic [$clog2(NREG)-1:0] wa,
  input  logic [W-1:0]            wd
);
  logic [W-1:0] r [NREG];
  assign rd0 = r[ra0];
  assign rd1 = r[ra1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREG); i++) r[i] <= '0;
    end else if (we) begin
      r[wa] <= wd;
    end
  end
endmodule

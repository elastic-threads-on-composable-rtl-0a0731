// tflex_cfg_regs: the OS-visible configuration registers of one core.
// The OS composes a logical processor by writing, into every participating
// core, how many cores participate (log2n), the processor's topology (its
// width in columns, log2w) and this core's position in it (pos); base names
// the processor by the physical id of its participant 0. These are the three
// pieces of information the composition needs; the field encoding is this
// design's own. A write is accepted only when it is self-consistent
// (log2n <= 5, log2w <= log2n, pos < 2^log2n); otherwise the old value stays
// and cfg_err pulses. The register resets to a disabled core.
// Interface: cfg_we/cfg_wdata (one-cycle write), cfg (registered value).
module tflex_cfg_regs
  import tflex_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic cfg_we,
  input  cfg_t cfg_wdata,
  output cfg_t cfg,
  output logic cfg_err
);
  logic ok;
  assign ok = (cfg_wdata.log2n <= 3'd5) && (cfg_wdata.log2w <= cfg_wdata.log2n) &&
              ((32'(cfg_wdata.pos) >> cfg_wdata.log2n) == 32'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg     <= '0;
      cfg_err <= 1'b0;
    end else begin
      cfg_err <= cfg_we && !ok;
      if (cfg_we && ok) cfg <= cfg_wdata;
    end
  end
endmodule

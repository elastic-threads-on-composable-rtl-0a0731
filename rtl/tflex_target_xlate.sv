// tflex_target_xlate: maps a 9-bit instruction target onto the composed
// processor. The target holds a 2-bit operand type (none, predicate, left,
// right) and a 7-bit instruction number. With N = 2^log2n participating
// cores the low log2n bits of the number pick the participant that holds the
// consumer, and the remaining high bits index that block's share of the
// destination window; the producer's block slot supplies the high-order
// bits of the window index, so a core holds 128/N instructions of each of N
// blocks in flight. With one core the number indexes the 128-entry window
// directly. This is the translation of the TRIPS target format described for
// TFlex; it is purely combinational.
// The mod-N placement follows the design; the rectangle mapping of
// participants to physical cores (base + column + row * CHIP_W) is this
// design's own.
module tflex_target_xlate
  import tflex_pkg::*;
#(
  parameter int unsigned CHIP_W = 4
) (
  input  cfg_t             cfg,
  input  logic [4:0]       slot,
  input  logic [8:0]       target,
  output logic [CID_W-1:0] dst_core,
  output logic [6:0]       widx,
  output logic [1:0]       ttype,
  output logic             is_local
);
  logic [6:0]       id;
  logic [CID_W-1:0] part;
  logic [6:0]       inner;

  assign id    = target[6:0];
  assign ttype = target[8:7];
  assign part  = CID_W'(id) & part_mask(cfg.log2n);
  assign inner = id >> cfg.log2n;
  assign widx  = 7'((32'(slot) << (3'd7 - cfg.log2n)) | 32'(inner));
  assign dst_core = part_to_phys(cfg, part, CHIP_W);
  assign is_local = (part == cfg.pos);
endmodule

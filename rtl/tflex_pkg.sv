// tflex_pkg: types, constants and composition-mapping functions shared by the
// TFlex composable processor.
//
// A TFlex chip is a grid of single-issue cores. The OS groups a rectangle of
// 2^k cores into one logical processor by writing each core's configuration
// registers (tflex_cfg_regs). Every distributed structure then finds its home
// core from the low-order bits of an index:
//   * instruction i of a block lives on participant (i mod N) (target mapping),
//   * a block is owned by participant (block_addr >> 7) mod N,
//   * a data address lives in the D-cache/LSQ bank of participant
//     (addr >> 4) mod N (16-byte line interleaving),
//   * architectural register r lives on participant r mod N.
// The 32-bit instruction layout (opcode 7, PR 2, XOP 5, T1 9, T0 9) and the
// 9-bit target (2-bit type, 7-bit instruction number) follow the TRIPS
// format. The opcode numbering, immediates and the header layout are this
// design's own, as is the 16-byte cache line.
package tflex_pkg;

  localparam int unsigned XLEN    = 64;   // operand width
  localparam int unsigned WIN     = 128;  // instructions per block / window entries per core
  localparam int unsigned CID_W   = 5;    // physical core id width (32 cores)
  localparam int unsigned MAXCORE = 32;
  localparam int unsigned LSID_W  = 5;    // 32 loads/stores per block
  localparam int unsigned LINE_BYTES  = 16;  // cache line = one 128-bit memory beat
  localparam int unsigned BLOCK_BYTES = 640; // 128-byte header + 128 x 4-byte instructions
  localparam int unsigned GHIST_W = 18;   // global exit history (6 exits x 3 bits)

  // ---------------------------------------------------------------- ISA
  typedef enum logic [6:0] {
    OP_NOP  = 7'd0,
    OP_ADD  = 7'd1,
    OP_SUB  = 7'd2,
    OP_AND  = 7'd3,
    OP_OR   = 7'd4,
    OP_XOR  = 7'd5,
    OP_SLL  = 7'd6,
    OP_SRL  = 7'd7,
    OP_SRA  = 7'd8,
    OP_TEQ  = 7'd9,   // test equal -> 0/1 (predicate producer)
    OP_TLT  = 7'd10,  // test signed less-than -> 0/1
    OP_MOV  = 7'd11,  // copy left operand (fan-out)
    OP_MOVI = 7'd12,  // T1 field is a signed 9-bit immediate, no operands
    OP_ADDI = 7'd13,  // left + signed 9-bit immediate in T1
    OP_LD   = 7'd14,  // 64-bit load, address = left, LSID = XOP, result to T0
    OP_ST   = 7'd15,  // 64-bit store, address = left, data = right, LSID = XOP
    OP_WR   = 7'd16,  // register write, register number = T1[6:0]
    OP_BRO  = 7'd17,  // block exit, target block address = left;
                      // XOP[1:0] exit kind, XOP[4:2] exit number
    OP_MUL  = 7'd18
  } opcode_e;

  typedef enum logic [1:0] {
    TT_NONE  = 2'b00,
    TT_PRED  = 2'b01,
    TT_LEFT  = 2'b10,
    TT_RIGHT = 2'b11
  } ttype_e;

  typedef enum logic [1:0] {
    EX_BRANCH = 2'd0,
    EX_CALL   = 2'd1,
    EX_RETURN = 2'd2
  } exit_kind_e;

  typedef struct packed {
    logic [6:0] op;
    logic [1:0] pr;    // 00 unpredicated, 10 fire on false, 11 fire on true
    logic [4:0] xop;
    logic [8:0] t1;
    logic [8:0] t0;
  } inst_t;

  // number of data operands an opcode waits for
  function automatic logic [1:0] n_operands(logic [6:0] op);
    case (op)
      OP_NOP, OP_MOVI:                    return 2'd0;
      OP_MOV, OP_ADDI, OP_LD, OP_WR, OP_BRO: return 2'd1;
      default:                            return 2'd2;
    endcase
  endfunction

  // ---------------------------------------------------------------- composition
  typedef struct packed {
    logic             en;     // core belongs to a logical processor
    logic [2:0]       log2n;  // log2 of participating cores (0..5)
    logic [2:0]       log2w;  // log2 of the processor's width in columns
    logic [CID_W-1:0] pos;    // this core's participant number
    logic [CID_W-1:0] base;   // physical id of participant 0 (names the processor)
  } cfg_t;

  function automatic logic [CID_W-1:0] part_mask(logic [2:0] log2n);
    return CID_W'((32'd1 << log2n) - 32'd1);
  endfunction

  // participant number -> physical core id on a chip that is chip_w cores wide
  function automatic logic [CID_W-1:0] part_to_phys(cfg_t c, logic [CID_W-1:0] p,
                                                     int unsigned chip_w);
    logic [CID_W-1:0] x, y;
    x = p & part_mask(c.log2w);
    y = p >> c.log2w;
    return CID_W'(32'(c.base) + 32'(x) + 32'(y) * chip_w);
  endfunction

  function automatic logic [CID_W-1:0] owner_part(logic [2:0] log2n, logic [31:0] blk);
    return CID_W'(blk >> 7) & part_mask(log2n);
  endfunction

  function automatic logic [CID_W-1:0] dbank_part(logic [2:0] log2n, logic [31:0] addr);
    return CID_W'(addr >> 4) & part_mask(log2n);
  endfunction

  function automatic logic [CID_W-1:0] reg_part(logic [2:0] log2n, logic [6:0] r);
    return CID_W'(r) & part_mask(log2n);
  endfunction

  // ---------------------------------------------------------------- operand network
  typedef enum logic [2:0] {
    PK_OPERAND = 3'd0,  // data for window entry widx, slot ttype
    PK_LOAD    = 3'd1,  // load request to the bank's LSQ; reply goes to rcore/widx/ttype
    PK_STORE   = 3'd2,  // store to the bank's LSQ
    PK_REGW    = 3'd3,  // register write (register number in widx) to its home core
    PK_NACK    = 3'd4   // LSQ bank full: re-arm window entry iidx on core dst
  } pkt_kind_e;

  typedef struct packed {
    pkt_kind_e         kind;
    logic [CID_W-1:0]  dst;
    logic [CID_W-1:0]  rcore;
    logic [CID_W-1:0]  icore;  // core that issued a load/store
    logic [6:0]        iidx;   // its window entry (for a NACK)
    logic [4:0]        slot;   // block slot of the load/store
    logic [3:0]        epoch;  // block instance that produced the packet
    logic [6:0]        widx;
    logic [1:0]        ttype;
    logic [LSID_W-1:0] lsid;
    logic [31:0]       addr;
    logic [XLEN-1:0]   data;
  } opn_pkt_t;

  // ---------------------------------------------------------------- control network
  typedef enum logic [3:0] {
    CM_NONE   = 4'd0,
    CM_NEXT   = 4'd1,  // a = block address, b = global history, c = RAS top two
    CM_FETCH  = 4'd2,  // a = store mask, b = I-cache line
    CM_IFILL  = 4'd3,  // a = instruction, b = {participant, line, entry}
    CM_READ   = 4'd4,  // a = {register, target}
    CM_STDONE = 4'd5,  // a = LSID of a store that reached its LSQ bank
    CM_WRDONE = 4'd6,  // a register write reached its home core
    CM_BRANCH = 4'd7,  // a = exit target, b = {exit number, exit kind}
    CM_COMMIT = 4'd8,
    CM_CDONE  = 4'd9,  // a participant finished committing
    CM_HALT   = 4'd10  // the thread exited to block address 0
  } cm_kind_e;

  typedef struct packed {
    cm_kind_e         kind;
    logic [CID_W-1:0] base;  // logical processor the message belongs to
    logic [CID_W-1:0] src;   // participant number of the sender
    logic [31:0]      a;
    logic [31:0]      b;
    logic [63:0]      c;
  } ctrl_msg_t;

  // ---------------------------------------------------------------- memory network
  typedef struct packed {
    logic [CID_W-1:0] core;
    logic             we;
    logic [31:0]      addr;   // 16-byte aligned
    logic [127:0]     data;
  } mem_req_t;

  typedef struct packed {
    logic [CID_W-1:0] core;
    logic [127:0]     data;
  } mem_rsp_t;

endpackage

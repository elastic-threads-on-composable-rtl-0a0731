// tflex_int_alu: the integer ALU of a core. It is combinational: the issue
// logic presents an instruction and its operands and the result is
// available in the same cycle, which is what lets the bypass feed a
// dependent instruction back-to-back. The operation set is this design's
// own small subset (TRIPS defines many more); tests return 0 or 1 for use as
// predicates, immediates are the signed 9-bit T1 field, and LD/ST pass the
// address through.
module tflex_int_alu
  import tflex_pkg::*;
(
  input  logic [6:0]      op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic [8:0]      imm,
  output logic [XLEN-1:0] y
);
  logic [XLEN-1:0] simm;
  assign simm = XLEN'(signed'(imm));

  always_comb begin
    case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_SLL:  y = a << b[5:0];
      OP_SRL:  y = a >> b[5:0];
      OP_SRA:  y = XLEN'($signed(a) >>> b[5:0]);
      OP_TEQ:  y = XLEN'(a == b);
      OP_TLT:  y = XLEN'($signed(a) < $signed(b));
      OP_MOV:  y = a;
      OP_MOVI: y = simm;
      OP_ADDI: y = a + simm;
      OP_MUL:  y = a * b;
      default: y = a;
    endcase
  end
endmodule

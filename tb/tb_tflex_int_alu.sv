// tb_tflex_int_alu: random operands for every operation, compared with the
// operation written out directly in the testbench.
module tb_tflex_int_alu;
  import tflex_pkg::*;
  logic [6:0] op;
  logic [63:0] a, b, y, e;
  logic [8:0] imm;
  tflex_int_alu dut (.*);
  int checks = 0, failures = 0;
  opcode_e ops [15] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SRA,
                        OP_TEQ, OP_TLT, OP_MOV, OP_MOVI, OP_ADDI, OP_MUL, OP_LD};
  initial begin
    for (int k = 0; k < 3000; k++) begin
      op  = ops[k % 15];
      a   = {$urandom, $urandom};
      b   = (k % 7 == 0) ? a : {$urandom, $urandom};
      imm = 9'($urandom);
      #1;
      case (opcode_e'(op))
        OP_ADD: e = a + b;  OP_SUB: e = a - b;  OP_AND: e = a & b;
        OP_OR:  e = a | b;  OP_XOR: e = a ^ b;
        OP_SLL: e = a << (b % 64);
        OP_SRL: e = a >> (b % 64);
        OP_SRA: e = $signed(a) >>> (b % 64);
        OP_TEQ: e = (a == b) ? 1 : 0;
        OP_TLT: e = ($signed(a) < $signed(b)) ? 1 : 0;
        OP_MOVI: e = {{55{imm[8]}}, imm};
        OP_ADDI: e = a + {{55{imm[8]}}, imm};
        OP_MUL: e = a * b;
        default: e = a;
      endcase
      checks++;
      if (y !== e) begin failures++; $display("FAIL op %0d a %h b %h got %h exp %h", op, a, b, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

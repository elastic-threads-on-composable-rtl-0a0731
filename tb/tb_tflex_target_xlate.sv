// tb_tflex_target_xlate: checks the target translation against the worked
// examples of the TRIPS target format (one core: the 7-bit number indexes
// the window; four cores: low two bits pick the core, block slot forms the
// high bits of the index) and against an independent formula for random
// targets and compositions.
module tb_tflex_target_xlate;
  import tflex_pkg::*;
  cfg_t cfg;
  logic [4:0] slot;
  logic [8:0] target;
  logic [CID_W-1:0] dst_core;
  logic [6:0] widx;
  logic [1:0] ttype;
  logic is_local;
  tflex_target_xlate #(.CHIP_W(4)) dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(string s, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %0d exp %0d", s, g, e); end
  endtask
  initial begin
    // one core: target 0x17F -> left operand of instruction 127
    cfg = '{en:1, log2n:0, log2w:0, pos:0, base:5'd9};
    slot = 0; target = 9'h17F; #1;
    chk("1c widx", widx, 127); chk("1c type", ttype, 2); chk("1c core", dst_core, 9); chk("1c local", is_local, 1);
    // four cores 2x2 at base 0, block 1, target {10, 11111 11}
    cfg = '{en:1, log2n:2, log2w:1, pos:0, base:0};
    slot = 1; target = 9'b10_11111_11; #1;
    chk("4c core", dst_core, 5);      // participant 3 = (1,1) -> 0 + 1 + 4
    chk("4c widx", widx, 7'b01_11111);
    chk("4c type", ttype, 2);
    chk("4c remote", is_local, 0);
    // random targets against a formula
    for (int k = 0; k < 200; k++) begin
      int n, w, p, part, x, y;
      n = $urandom_range(0, 5);
      w = $urandom_range((n > 3) ? n - 3 : 0, (n < 2) ? n : 2);  // fits 4 x 8
      p = $urandom_range(0, (1 << n) - 1);
      cfg = '{en:1, log2n:3'(n), log2w:3'(w), pos:5'(p), base:0};
      slot = 5'($urandom_range(0, (1 << n) - 1));
      target = 9'($urandom);
      #1;
      part = target[6:0] % (1 << n);
      x = part % (1 << w); y = part / (1 << w);
      chk("rand core", dst_core, 32'(x + y * 4));
      chk("rand widx", widx, 32'((slot * (128 >> n) + target[6:0] / (1 << n)) % 128));
      chk("rand local", is_local, 32'(part == p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

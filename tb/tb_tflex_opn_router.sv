// tb_tflex_opn_router: router at core 5 of a 4-wide mesh (column 1, row 1).
// Random packets enter on all five inputs with random destinations and the
// outputs are throttled at random; every packet must leave exactly once, on
// the port that X-then-Y routing gives, with its payload intact.
module tb_tflex_opn_router;
  import tflex_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0] in_valid, in_ready, out_valid, out_ready;
  opn_pkt_t [4:0] in_pkt, out_pkt;
  tflex_opn_router #(.CHIP_W(4)) dut (.clk, .rst_n, .my_id(5'd5), .*);
  int checks = 0, failures = 0, sent = 0, got = 0;
  int exp_port [int];   // payload tag -> expected output
  function automatic int want(int d);
    int x, y;
    x = d % 4; y = d / 4;
    if (x > 1) return 1; if (x < 1) return 3;
    if (y > 1) return 2; if (y < 1) return 0;
    return 4;
  endfunction
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 5; o++) if (out_valid[o] && out_ready[o]) begin
      int tag;
      tag = int'(out_pkt[o].data[31:0]);
      checks++; got++;
      if (!exp_port.exists(tag)) begin failures++; $display("FAIL unknown/duplicate %0d", tag); end
      else begin
        if (exp_port[tag] != o) begin failures++; $display("FAIL tag %0d port %0d exp %0d", tag, o, exp_port[tag]); end
        if (out_pkt[o].data[63:32] != 32'(out_pkt[o].dst) * 3) begin failures++; $display("FAIL payload"); end
        exp_port.delete(tag);
      end
    end
  end
  initial begin
    in_valid = 0; in_pkt = '0; out_ready = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 600; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < 5; i++) begin
        if (!in_valid[i] || in_ready[i]) begin
          in_valid[i] = (cyc < 500) && ($urandom_range(0, 2) != 0);
          if (in_valid[i]) begin
            int d;
            d = $urandom_range(0, 31);
            in_pkt[i] = '0;
            in_pkt[i].dst = 5'(d);
            in_pkt[i].data = {32'(d * 3), 32'(sent)};
            exp_port[sent] = want(d);
            sent++;
          end
        end
      end
      out_ready = 5'($urandom);
      @(posedge clk);
    end
    @(negedge clk); in_valid = 0; out_ready = '1;
    repeat (50) @(posedge clk);
    checks++;
    if (got != sent || exp_port.size() != 0) begin failures++; $display("FAIL sent %0d got %0d", sent, got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (3000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

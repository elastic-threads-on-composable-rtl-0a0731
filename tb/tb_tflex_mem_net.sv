// tb_tflex_mem_net: 32 cores send random line reads and writes through the
// memory network to the behavioural L2 (15-cycle latency). Each core keeps
// one request outstanding; the test checks that every answer comes back to
// the core that asked, carries the data last written to that line, and that
// every core is served.
module tb_tflex_mem_net;
  import tflex_pkg::*;
  localparam int NC = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NC-1:0] c_req_valid, c_req_ready, c_rsp_valid;
  mem_req_t [NC-1:0] c_req;
  mem_rsp_t c_rsp, l2_rsp;
  logic l2_req_valid, l2_req_ready, l2_rsp_valid;
  mem_req_t l2_req;
  tflex_mem_net #(.NC(NC)) dut (.*);
  tflex_l2_model l2 (.clk, .rst_n, .req_valid(l2_req_valid), .req_ready(l2_req_ready), .req(l2_req),
                     .rsp_valid(l2_rsp_valid), .rsp(l2_rsp));
  int checks = 0, failures = 0;
  bit busy [NC]; logic [127:0] expd [NC]; bit isrd [NC]; int served [NC];
  logic [127:0] shadow [64]; bit written [64];
  initial begin
    for (int c = 0; c < NC; c++) begin busy[c] = 0; served[c] = 0; end
    c_req_valid = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // each core owns lines c, c+32 so ordering between cores does not matter
    for (int l = 0; l < 64; l++) written[l] = 0;
    repeat (3000) begin
      @(negedge clk);
      for (int c = 0; c < NC; c++) if (!busy[c] && $urandom % 4 == 0) begin
        int l;
        l = c + 32 * ($urandom % 2);
        c_req[c] = '0; c_req[c].addr = 32'(l * 16);
        c_req[c].we = !written[l] || ($urandom % 2);
        c_req[c].data = {$urandom, $urandom, $urandom, $urandom};
        isrd[c] = !c_req[c].we; expd[c] = shadow[l];
        if (c_req[c].we) begin shadow[l] = c_req[c].data; written[l] = 1; end
        c_req_valid[c] = 1; busy[c] = 1;
      end
      #1;
      for (int c = 0; c < NC; c++) if (c_rsp_valid[c]) begin
        checks++;
        if (!busy[c] || c_req_valid[c]) begin failures++; $display("FAIL unexpected answer to %0d", c); end
        else if (isrd[c] && c_rsp.data !== expd[c]) begin failures++; $display("FAIL data core %0d", c); end
        busy[c] = 0; served[c]++;
      end
      begin
        logic [NC-1:0] acc;
        acc = c_req_valid & c_req_ready;
        @(posedge clk); #1;
        c_req_valid = c_req_valid & ~acc;
      end
    end
    for (int c = 0; c < NC; c++) begin checks++; if (served[c] == 0) begin failures++; $display("FAIL core %0d starved", c); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

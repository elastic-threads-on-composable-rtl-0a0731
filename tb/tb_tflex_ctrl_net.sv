// tb_tflex_ctrl_net: 32 senders and the OS port contend for the broadcast
// control bus under random receiver back-pressure. Checks that each
// message is broadcast exactly once and in its sender's order, that
// nothing is broadcast unless every receiver is ready, that the OS port
// wins over cores, and that round-robin lets every core through.
module tb_tflex_ctrl_net;
  import tflex_pkg::*;
  localparam int NC = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NC-1:0] o_valid, o_ready, i_ready;
  ctrl_msg_t [NC-1:0] o_msg;
  logic os_valid, os_ready, b_valid;
  ctrl_msg_t os_msg, b_msg;
  tflex_ctrl_net #(.NC(NC)) dut (.*);
  int checks = 0, failures = 0;
  int sent [NC+1], rcvd [NC+1];
  initial begin
    for (int i = 0; i <= NC; i++) begin sent[i] = 0; rcvd[i] = 0; end
    o_valid = 0; os_valid = 0; i_ready = '1;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (4000) begin
      @(negedge clk);
      i_ready = ($urandom % 4 == 0) ? NC'($urandom) : '1;
      for (int c = 0; c < NC; c++) if (!o_valid[c] && sent[c] < 100 && $urandom % 2) begin
        o_valid[c] = 1; o_msg[c] = '0; o_msg[c].src = 5'(c); o_msg[c].a = 32'(sent[c]);
      end
      if (!os_valid && sent[NC] < 100 && $urandom % 8 == 0) begin
        os_valid = 1; os_msg = '0; os_msg.kind = CM_HALT; os_msg.a = 32'(sent[NC]);
      end
      #1;
      checks++;
      if (b_valid && i_ready != '1) begin failures++; $display("FAIL broadcast while not ready"); end
      if (os_valid && |o_ready) begin checks++; failures++; $display("FAIL core beat OS port"); end
      if (b_valid) begin
        int s;
        s = (b_msg.kind == CM_HALT) ? NC : int'(b_msg.src);
        checks++;
        if (b_msg.a != 32'(rcvd[s])) begin failures++; $display("FAIL order src %0d", s); end
        rcvd[s]++;
      end
      begin
        logic [NC-1:0] acc; logic oacc;
        acc = o_valid & o_ready; oacc = os_valid && os_ready;
        @(posedge clk); #1;
        for (int c = 0; c < NC; c++) if (acc[c]) begin o_valid[c] = 0; sent[c]++; end
        if (oacc) begin os_valid = 0; sent[NC]++; end
      end
    end
    for (int i = 0; i <= NC; i++) begin
      checks++; if (rcvd[i] != sent[i] || sent[i] == 0) begin failures++; $display("FAIL src %0d sent %0d got %0d", i, sent[i], rcvd[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tflex_ctrl_net: the control network. Every core may offer one control
// message per cycle (block fetch, I-cache fill, register read, store and
// register-write completion, branch outcome, commit and its acknowledgement,
// next-block hand-off). One offer is granted per cycle, round robin, with
// the OS injection port first, and the granted message is broadcast to all
// cores in the same cycle; cores keep only the messages of their own logical
// processor. A grant is given only when every core can take a message, so
// no broadcast is lost. The document names the control networks but not
// their form; this single broadcast bus is this design's own choice.
module tflex_ctrl_net
  import tflex_pkg::*;
#(
  parameter int unsigned NC = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NC-1:0]          o_valid,
  output logic [NC-1:0]          o_ready,
  input  ctrl_msg_t [NC-1:0]     o_msg,
  input  logic                   os_valid,
  output logic                   os_ready,
  input  ctrl_msg_t              os_msg,
  input  logic [NC-1:0]          i_ready,
  output logic                   b_valid,
  output ctrl_msg_t              b_msg
);
  localparam int unsigned PW = (NC > 1) ? $clog2(NC) : 1;
  logic [PW-1:0] rr;
  logic          all_rdy;
  logic          found;
  logic [PW-1:0] g;

  assign all_rdy = &i_ready;

  always_comb begin
    found = 1'b0;
    g     = '0;
    for (int k = 0; k < int'(NC); k++) begin
      int i;
      i = (int'(rr) + k) % int'(NC);
      if (!found && o_valid[i]) begin
        found = 1'b1;
        g     = PW'(i);
      end
    end
  end

  always_comb begin
    o_ready  = '0;
    os_ready = all_rdy;
    b_valid  = 1'b0;
    b_msg    = '0;
    if (all_rdy) begin
      if (os_valid) begin
        b_valid = 1'b1;
        b_msg   = os_msg;
      end else if (found) begin
        b_valid     = 1'b1;
        b_msg       = o_msg[g];
        o_ready[g]  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else if (all_rdy && !os_valid && found) rr <= PW'((32'(g) + 1) % NC);
  end
endmodule

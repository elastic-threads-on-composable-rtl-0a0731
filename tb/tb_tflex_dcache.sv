// tb_tflex_dcache: one 8 KB 2-way D-cache bank against a shadow memory.
// Random 64-bit loads and stores over a range four times the bank's
// capacity (so that lines are evicted and dirty lines written back) are
// compared with a reference array; a behavioural 128-bit line memory with
// a few cycles of latency (acknowledging writes too) stands behind it. Also checks that a
// repeated access to a resident line does not miss.
module tb_tflex_dcache;
  import tflex_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] log2n;
  logic req_valid, req_ready, req_we, rsp_valid, miss;
  logic [31:0] req_addr;
  logic [63:0] req_wdata, rsp_data;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid;
  logic [31:0] mem_req_addr;
  logic [127:0] mem_req_data, mem_rsp_data;
  tflex_dcache dut (.*);

  localparam int LINES = 2048;              // 32 KB backing store
  logic [127:0] lmem [LINES];
  logic [63:0]  ref_m [LINES*2];
  int lat = 0, misses = 0, wbs = 0;
  logic pend = 0;
  assign mem_req_ready = !pend && rst_n;
  always_ff @(posedge clk) begin
    mem_rsp_valid <= 1'b0;
    if (mem_req_valid && mem_req_ready) begin
      pend <= 1'b1; lat <= 4; mem_rsp_data <= lmem[mem_req_addr[14:4]];
      if (mem_req_we) begin lmem[mem_req_addr[14:4]] <= mem_req_data; wbs++; end
    end
    if (pend) begin
      if (lat == 0) begin pend <= 1'b0; mem_rsp_valid <= 1'b1; end
      else lat <= lat - 1;
    end
    if (miss) misses++;
  end

  int checks = 0, failures = 0;
  task automatic acc(bit we, logic [31:0] a, logic [63:0] d, output logic [63:0] r);
    @(negedge clk); req_valid = 1; req_we = we; req_addr = a; req_wdata = d;
    do @(posedge clk); while (!req_ready);
    #1 req_valid = 0;
    while (!rsp_valid) @(posedge clk) #1;
    r = rsp_data;
  endtask
  initial begin
    logic [63:0] r;
    logic [31:0] a;
    int m0;
    log2n = 0; req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0;
    for (int i = 0; i < LINES; i++) begin
      lmem[i] = {$urandom, $urandom, $urandom, $urandom};
      ref_m[2*i] = lmem[i][63:0]; ref_m[2*i+1] = lmem[i][127:64];
    end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      a = ($urandom % (LINES*2)) * 8;
      if ($urandom % 3 == 0) begin
        logic [63:0] d;
        d = {$urandom, $urandom};
        acc(1, a, d, r); ref_m[a[14:3]] = d;
      end else begin
        acc(0, a, 0, r); checks++;
        if (r !== ref_m[a[14:3]]) begin
          failures++; $display("FAIL load %h got %h exp %h", a, r, ref_m[a[14:3]]);
        end
      end
    end
    checks++; if (misses == 0) begin failures++; $display("FAIL no misses"); end
    checks++; if (wbs == 0) begin failures++; $display("FAIL no write-backs"); end
    acc(0, 32'h40, 0, r); m0 = misses;
    acc(0, 32'h48, 0, r);
    @(negedge clk); checks++;
    if (misses != m0) begin failures++; $display("FAIL resident line missed"); end
    $display("misses=%0d writebacks=%0d", misses, wbs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

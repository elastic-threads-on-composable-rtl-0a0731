// tb_tflex_regfile: random writes and dual reads against a shadow array,
// including read-during-write (old value) and reset to zero.
module tb_tflex_regfile;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [6:0] ra0, ra1, wa;
  logic [63:0] rd0, rd1, wd;
  logic we;
  tflex_regfile dut (.*);
  logic [63:0] sh [128];
  int checks = 0, failures = 0;
  initial begin
    we = 0; ra0 = 0; ra1 = 0; wa = 0; wd = 0;
    for (int i = 0; i < 128; i++) sh[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      ra0 = 7'($urandom); ra1 = 7'($urandom);
      we = $urandom_range(0, 1); wa = (k % 5 == 0) ? ra0 : 7'($urandom); wd = {$urandom, $urandom};
      #1;
      checks += 2;
      if (rd0 !== sh[ra0]) begin failures++; $display("FAIL rd0 r%0d", ra0); end
      if (rd1 !== sh[ra1]) begin failures++; $display("FAIL rd1 r%0d", ra1); end
      @(posedge clk);
      if (we) sh[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

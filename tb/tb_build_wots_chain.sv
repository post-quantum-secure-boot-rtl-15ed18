// tb_build_wots_chain: runs chain engines from random signature values and
// digits 0..15 (digit 15 means no step at all) and compares the end of
// the chain with the reference model. Checks the step count: each of the
// 15 - d steps costs four compressions.
module tb_build_wots_chain;
  import xmss_pkg::*;
  import xmss_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  hash_t seed_state, sig_i, pk;
  logic [31:0] ots_addr;
  logic [3:0] d_i;
  logic [6:0] idx, pk_idx;
  int checks = 0, failures = 0, ncalls = 0;
  build_wots_chain dut (.*);
  always @(posedge clk) if (dut.sha_req.start) ncalls++;
  initial begin
    h256_t seed, e;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      seed = rand_h();
      seed_state = compress(SHA256_IV, {h256_t'(3), seed});
      ots_addr = $urandom % 1024; idx = 7'($urandom % 67);
      d_i = (t < 16) ? 4'(t) : 4'($urandom);
      sig_i = rand_h();
      ncalls = 0;
      @(posedge clk); #1 start = 1; @(posedge clk); #1 start = 0;
      while (!done) @(posedge clk);
      #1;
      e = chain(seed, int'(ots_addr), int'(idx), sig_i, int'(d_i), 15 - int'(d_i));
      checks++; if (pk !== e) begin failures++; $display("FAIL t%0d d=%0d", t, d_i); end
      checks++; if (pk_idx !== idx) failures++;
      checks++; if (ncalls != 4 * (15 - int'(d_i))) begin failures++; $display("FAIL calls %0d", ncalls); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

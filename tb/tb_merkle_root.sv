// tb_merkle_root: climbs a height-10 tree from a random leaf with a random
// authentication path for leaf indices with all bit patterns and compares
// the root with the reference model. Checks the 10 node hashes and,
// against the quoted 4753 cycles, the latency.
module tb_merkle_root;
  import xmss_pkg::*;
  import xmss_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done, sbusy;
  hash_t seed_state, leaf, root, auth_rdata;
  logic [31:0] leaf_idx;
  logic [3:0] auth_raddr;
  hash_t authmem [10];
  sha_req_t sha_req; sha_rsp_t sha_rsp;
  int checks = 0, failures = 0, ncalls = 0;
  merkle_root dut (.*);
  sha256_core u_sha (.clk, .rst_n, .req(sha_req), .rsp(sha_rsp), .busy(sbusy));
  always @(posedge clk) begin
    auth_rdata <= authmem[auth_raddr < 10 ? auth_raddr : 0];
    if (sha_req.start) ncalls++;
  end
  initial begin
    hv_t auth = new[10];
    h256_t seed, e; int cyc;
    int unsigned idxs [5] = '{0, 1023, 341, 682, 0};
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      seed = rand_h(); leaf = rand_h(); leaf_idx = (t == 4) ? $urandom % 1024 : idxs[t];
      seed_state = compress(SHA256_IV, {h256_t'(3), seed});
      foreach (auth[k]) begin auth[k] = rand_h(); authmem[k] = auth[k]; end
      ncalls = 0;
      @(posedge clk); #1 start = 1; @(posedge clk); #1 start = 0;
      cyc = 1;
      while (!done) begin @(posedge clk); cyc++; end
      #1;
      e = root_from_auth(seed, leaf_idx, leaf, auth);
      $display("merkle root: %0d cycles", cyc);
      checks++; if (root !== e) begin failures++; $display("FAIL root idx %0d", leaf_idx); end
      checks++; if (ncalls != 60) begin failures++; $display("FAIL calls %0d", ncalls); end
      checks++; if (cyc > 4753) begin failures++; $display("FAIL latency"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

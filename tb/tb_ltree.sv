// tb_ltree: fills a dual-port buffer with 67 random WOTS public key
// components, runs the L-tree on a shared SHA-256 kernel and compares the
// root with the reference model's L-tree. Checks the 66 node hashes
// (6 compressions each, 396 in all) and, against the quoted 26665 cycles,
// the latency.
module tb_ltree;
  import xmss_pkg::*;
  import xmss_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done, sbusy;
  hash_t seed_state, root, a_wdata, a_rdata, b_wdata, b_rdata;
  logic [31:0] ltree_addr;
  logic a_we, b_we, tb_we = 0;
  logic [6:0] a_addr, b_addr, tb_addr = 0;
  hash_t tb_wdata = 0;
  sha_req_t sha_req; sha_rsp_t sha_rsp;
  int checks = 0, failures = 0, ncalls = 0;
  ltree dut (.*);
  sha256_core u_sha (.clk, .rst_n, .req(sha_req), .rsp(sha_rsp), .busy(sbusy));
  dp_bram u_ram (.clk, .a_we(busy ? a_we : tb_we), .a_addr(busy ? a_addr : tb_addr),
                 .a_wdata(busy ? a_wdata : tb_wdata), .a_rdata, .b_we, .b_addr, .b_wdata, .b_rdata);
  always @(posedge clk) if (sha_req.start) ncalls++;
  initial begin
    hv_t pk = new[67];
    h256_t seed, e; int cyc;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 2; t++) begin
      seed = rand_h(); ltree_addr = $urandom % 1024;
      seed_state = compress(SHA256_IV, {h256_t'(3), seed});
      foreach (pk[i]) begin
        pk[i] = rand_h();
        @(negedge clk); tb_we = 1; tb_addr = 7'(i); tb_wdata = pk[i];
      end
      @(negedge clk); tb_we = 0;
      ncalls = 0;
      @(posedge clk); #1 start = 1; @(posedge clk); #1 start = 0;
      cyc = 1;
      while (!done) begin @(posedge clk); cyc++; end
      #1;
      e = ltree(seed, int'(ltree_addr), pk);
      $display("ltree: %0d cycles", cyc);
      checks++; if (root !== e) begin failures++; $display("FAIL root"); end
      checks++; if (ncalls != 66 * 6) begin failures++; $display("FAIL calls %0d", ncalls); end
      checks++; if (cyc > 26665) begin failures++; $display("FAIL latency"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// tb_thash_f: checks the chain hash F against the reference model for
// random seeds, addresses and inputs, with a SHA-256 kernel attached, and
// that one call takes four compressions.
module tb_thash_f;
  import xmss_pkg::*;
  import xmss_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done, sbusy;
  hash_t seed_state, adrs, x, y;
  sha_req_t req; sha_rsp_t rsp;
  int checks = 0, failures = 0, ncalls = 0;
  thash_f dut (.clk, .rst_n, .start, .seed_state, .adrs, .x, .busy, .done, .y, .sha_req(req), .sha_rsp(rsp));
  sha256_core u_sha (.clk, .rst_n, .req, .rsp, .busy(sbusy));
  always @(posedge clk) if (req.start) ncalls++;
  initial begin
    h256_t seed, e;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      seed = rand_h();
      seed_state = compress(SHA256_IV, {h256_t'(3), seed});
      adrs = xmss_ref_pkg::adrs(0, $urandom % 1024, $urandom % 67, $urandom % 15, 0);
      x = rand_h();
      ncalls = 0;
      @(posedge clk); #1 start = 1; @(posedge clk); #1 start = 0;
      while (!done) @(posedge clk);
      #1;
      e = f_hash(seed, adrs, x);
      checks++; if (y !== e) begin failures++; $display("FAIL %0d", t); end
      checks++; if (ncalls != 4) begin failures++; $display("FAIL calls %0d", ncalls); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

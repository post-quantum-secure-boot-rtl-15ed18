// tb_sha256_core: checks the SHA-256 compression kernel against the
// reference model on the "abc" test vector (known digest) and on random
// chaining values and blocks, and checks the latency of each call.
module tb_sha256_core;
  import xmss_pkg::*;
  import xmss_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  sha_req_t req;
  sha_rsp_t rsp;
  logic busy;
  int checks = 0, failures = 0;

  sha256_core dut (.clk, .rst_n, .req, .rsp, .busy);

  task automatic run(input hash_t h, input block_t b, output hash_t y, output int lat);
    req.h = h; req.blk = b; req.start = 1'b1;
    @(posedge clk); #1; req.start = 1'b0;
    lat = 1;
    while (!rsp.done) begin @(posedge clk); #1; lat++; end
    y = rsp.h;
  endtask

  initial begin
    hash_t y, e, h; block_t b; int lat;
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    b = {8'h61, 8'h62, 8'h63, 8'h80, 416'd0, 64'd24};
    run(SHA256_IV, b, y, lat);
    checks++; if (y !== 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad) begin
      failures++; $display("FAIL abc: %h", y); end
    checks++; if (lat > 41) begin failures++; $display("FAIL latency %0d > 41", lat); end
    $display("sha256_core latency %0d cycles", lat);
    for (int t = 0; t < 50; t++) begin
      h = rand_h(); b = {rand_h(), rand_h()};
      run(h, b, y, lat);
      e = compress(h, b);
      checks++; if (y !== e) begin failures++; $display("FAIL rnd %0d", t); end
      checks++; if (rsp.h !== e || busy) failures++;   // held after done
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

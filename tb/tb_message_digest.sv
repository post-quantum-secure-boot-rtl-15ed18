// tb_message_digest: streams random messages of every length from 1 to
// 140 bytes (all padding cases, with and without an extra block) with
// random gaps in msg_valid, and compares the digest with H_msg of the
// reference model. Checks the number of compressions: 2 for the prefix,
// then ceil((len + 9) / 64) for message and padding.
module tb_message_digest;
  import xmss_pkg::*;
  import xmss_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, msg_valid = 0, msg_ready, msg_last = 0, busy, done, sbusy;
  logic [31:0] idx, msg_data = 0;
  logic [2:0] msg_nbytes = 4;
  hash_t r, root, digest;
  sha_req_t sha_req; sha_rsp_t sha_rsp;
  int checks = 0, failures = 0, ncalls = 0;
  message_digest dut (.*);
  sha256_core u_sha (.clk, .rst_n, .req(sha_req), .rsp(sha_rsp), .busy(sbusy));
  always @(posedge clk) if (sha_req.start) ncalls++;
  initial begin
    bq_t m; h256_t e; int nw;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int len = 1; len <= 140; len++) begin
      m = rand_msg(len); r = rand_h(); root = rand_h(); idx = $urandom % 1024;
      ncalls = 0;
      @(posedge clk); #1 start = 1; @(posedge clk); #1 start = 0;
      nw = (len + 3) / 4;
      for (int wi = 0; wi < nw; wi++) begin
        logic [31:0] wv;
        int nb;
        wv = '0;
        nb = (wi == nw - 1) ? len - 4*wi : 4;
        for (int b = 0; b < nb; b++) wv[31 - 8*b -: 8] = m[4*wi + b];
        repeat ($urandom % 3) @(posedge clk);
        #1 msg_valid = 1; msg_data = wv; msg_last = (wi == nw - 1); msg_nbytes = 3'(nb);
        #1 while (!msg_ready) begin @(posedge clk); #1; end
        @(posedge clk);
        #1 msg_valid = 0; msg_last = 0;
      end
      while (!done) @(posedge clk);
      #1;
      e = h_msg(r, root, idx, m);
      checks++; if (digest !== e) begin failures++; $display("FAIL len %0d", len); end
      checks++; if (ncalls != 2 + (len + 9 + 63) / 64) begin failures++; $display("FAIL calls len %0d: %0d", len, ncalls); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

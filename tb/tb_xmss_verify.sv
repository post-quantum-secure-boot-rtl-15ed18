// tb_xmss_verify: end-to-end check of the XMSS verifier.
//
// Builds signature instances with the reference model (random secret
// chain starts and authentication path, the matching public root, random
// message and leaf index), loads the signature and authentication path
// buffers, streams the message and checks that valid signatures pass with
// the expected root, and that a tampered message and a wrong public root
// fail. Message lengths cover every padding case. The cycle count of each
// verification (start to done, message streaming included) is checked
// against the figure quoted for M parallel chains.
module tb_xmss_verify #(
  parameter int unsigned M = 8
);
  import xmss_pkg::*;
  import xmss_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, sig_we = 0, auth_we = 0;
  hash_t pk_root, pk_seed, r, sig_wdata, auth_wdata, computed_root;
  logic [31:0] leaf_idx, msg_data;
  logic [6:0] sig_waddr;
  logic [3:0] auth_waddr;
  logic msg_valid = 0, msg_ready, msg_last = 0, busy, done, valid;
  logic [2:0] msg_nbytes;
  int checks = 0, failures = 0;

  xmss_verify #(.M(M)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Verification with the instance s; returns the cycles from start to done
  task automatic verify(input inst_t s, input h256_t root_pub, input bit flip, output bit v, output h256_t cr, output int cyc);
    int nw;
    bq_t m = s.msg;
    if (flip) m[0] = m[0] ^ 8'h01;
    pk_root = root_pub; pk_seed = s.seed; r = s.r; leaf_idx = s.idx;
    for (int i = 0; i < 67; i++) begin
      sig_we = 1; sig_waddr = 7'(i); sig_wdata = s.sig[i]; @(posedge clk); #1;
    end
    sig_we = 0;
    for (int k = 0; k < s.auth.size(); k++) begin
      auth_we = 1; auth_waddr = 4'(k); auth_wdata = s.auth[k]; @(posedge clk); #1;
    end
    auth_we = 0;
    start = 1; @(posedge clk); #1; start = 0;
    cyc = 1;
    nw = (m.size() + 3) / 4;
    for (int wi = 0; wi < nw; wi++) begin
      logic [31:0] wv = '0;
      int nb = (wi == nw - 1) ? m.size() - 4*wi : 4;
      for (int b = 0; b < nb; b++) wv[31 - 8*b -: 8] = m[4*wi + b];
      msg_valid = 1; msg_data = wv; msg_last = (wi == nw - 1); msg_nbytes = 3'(nb);
      while (!msg_ready) begin @(posedge clk); #1; cyc++; end
      @(posedge clk); #1; cyc++;
    end
    msg_valid = 0; msg_last = 0;
    while (!done) begin @(posedge clk); #1; cyc++; end
    v = valid; cr = computed_root;
  endtask

  // Quoted cycles for the complete verification with 1, 2, 4, 8 chains
  function automatic int quoted(int m);
    return m >= 8 ? 51725 : m >= 4 ? 74229 : m >= 2 ? 102952 : 161280;
  endfunction

  initial begin
    inst_t s; bit v; h256_t cr; int cyc;
    int lens [6] = '{1, 47, 55, 56, 64, 121};
    msg_data = '0; msg_nbytes = 3'd4; sig_waddr = '0; auth_waddr = '0;
    sig_wdata = '0; auth_wdata = '0; pk_root = '0; pk_seed = '0; r = '0; leaf_idx = '0;
    repeat (3) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    for (int t = 0; t < 6; t++) begin
      s = make_instance($urandom % 1024, lens[t], 10);
      verify(s, s.root, 0, v, cr, cyc);
      $display("len %0d idx %0d: valid=%0b cycles=%0d", lens[t], s.idx, v, cyc);
      check(v == 1'b1, "valid signature accepted");
      check(cr == s.root, "computed root equals public root");
      check(cyc <= quoted(M), "verification within the quoted cycle count");
      if (t == 1) begin
        verify(s, s.root, 1, v, cr, cyc);
        check(v == 1'b0, "tampered message rejected");
        verify(s, s.root ^ 256'h1, 0, v, cr, cyc);
        check(v == 1'b0, "wrong public root rejected");
        check(cr != (s.root ^ 256'h1), "computed root differs from the wrong public root");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

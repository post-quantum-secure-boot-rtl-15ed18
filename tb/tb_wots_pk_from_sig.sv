// tb_wots_pk_from_sig: recovers the WOTS public key of a reference
// signature with 3 chain engines (and a second run with 1), from a
// behavioural signature buffer, and checks every written component and
// that each address is written exactly once. Counts cycles in which more
// than one engine is busy. With M engines the quoted cycle counts are
// 129851 (1), 71523 (2), 42807 (4) and 20500 (8); the run with one engine
// is checked against the first.
module tb_wots_pk_from_sig;
  import xmss_pkg::*;
  import xmss_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  logic [1:0] start = 0, busy, done, pk_we;
  logic [6:0] sig_raddr [2], pk_waddr [2];
  hash_t sig_rdata [2], pk_wdata [2], seed_state;
  logic [31:0] ots_addr;
  logic [LEN-1:0][3:0] wd;
  hash_t sigmem [67];
  hash_t got [2][67];
  int nwr [2][67];
  int multi = 0;

  wots_pk_from_sig #(.M(3)) dut3 (.clk, .rst_n, .start(start[0]), .seed_state, .ots_addr, .wd,
    .sig_raddr(sig_raddr[0]), .sig_rdata(sig_rdata[0]), .pk_we(pk_we[0]), .pk_waddr(pk_waddr[0]),
    .pk_wdata(pk_wdata[0]), .busy(busy[0]), .done(done[0]));
  wots_pk_from_sig #(.M(1)) dut1 (.clk, .rst_n, .start(start[1]), .seed_state, .ots_addr, .wd,
    .sig_raddr(sig_raddr[1]), .sig_rdata(sig_rdata[1]), .pk_we(pk_we[1]), .pk_waddr(pk_waddr[1]),
    .pk_wdata(pk_wdata[1]), .busy(busy[1]), .done(done[1]));

  always @(posedge clk) begin
    for (int u = 0; u < 2; u++) begin
      sig_rdata[u] <= sigmem[sig_raddr[u]];
      if (pk_we[u]) begin got[u][pk_waddr[u]] = pk_wdata[u]; nwr[u][pk_waddr[u]]++; end
    end
    if ($countones(dut3.c_busy) > 1) multi++;
  end

  initial begin
    inst_t s; int cyc;
    s = make_instance($urandom % 1024, 40, 10);
    foreach (sigmem[i]) sigmem[i] = s.sig[i];
    seed_state = compress(SHA256_IV, {h256_t'(3), s.seed});
    ots_addr = s.idx;
    for (int i = 0; i < 67; i++) wd[i] = 4'(s.d[i]);
    for (int u = 0; u < 2; u++) for (int i = 0; i < 67; i++) begin nwr[u][i] = 0; got[u][i] = '0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int u = 0; u < 2; u++) begin
      @(posedge clk); #1 start[u] = 1; @(posedge clk); #1 start[u] = 0;
      cyc = 1;
      while (!done[u]) begin @(posedge clk); cyc++; end
      $display("M=%0d: %0d cycles", u == 0 ? 3 : 1, cyc);
      for (int i = 0; i < 67; i++) begin
        check(got[u][i] == s.wots_pk[i], $sformatf("component %0d", i));
        check(nwr[u][i] == 1, "written once");
      end
      if (u == 1) check(cyc <= 129851, "one engine within the quoted cycle count");
    end
    check(multi > 0, "engines ran in parallel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

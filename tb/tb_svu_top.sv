// tb_svu_top: end-to-end test of the signature verification unit.
//
// A chain of boot stages is built with the reference model: each stage
// image holds a signed message whose last 64 bytes are the public key of
// the next stage; the first key is given as the OTP key. The images sit
// in a behavioural AXI memory with random stalls. The test checks that:
//  - out of reset the zero-stage image is verified and the cores run;
//  - software-requested later stages pass with the key of the previous
//    stage, and the computed root and stage count read back over AXI-Lite;
//  - a tampered stage fails and raises irq only, when abort is not enabled;
//  - with abort enabled a failing stage aborts the cores;
//  - after a second reset with a wrong OTP key the boot aborts at once;
//  - each verification takes no more cycles than quoted for M chains.
// It also counts that DMA bursts were cut at 64-byte boundaries, that
// the DMA stream was back-pressured, that more than one chain engine ran
// at once and that a message needing an extra padding block occurred.
module tb_svu_top;
  import xmss_pkg::*;
  import xmss_ref_pkg::*;

  localparam logic [31:0] ZSBL = 32'h0001_0000;   // the unit's default zero-stage address
  localparam int unsigned M    = 8;               // the unit's default number of chain engines

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [255:0] otp_pk_root, otp_pk_seed;
  logic [7:0]  s_awaddr, s_araddr;
  logic        s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic        s_arvalid, s_arready, s_rvalid, s_rready;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0]  s_wstrb;
  logic [1:0]  s_bresp, s_rresp;
  logic [31:0] m_araddr, m_rdata;
  logic [7:0]  m_arlen;
  logic [2:0]  m_arsize;
  logic [1:0]  m_arburst, m_rresp;
  logic        m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;
  logic [1:0]  core_run;
  logic        boot_abort, irq;

  int checks = 0, failures = 0;
  int n_pass = 0, n_fail_irq = 0, n_abort = 0, n_multi_chain = 0, n_extra_pad = 0;

  svu_top dut (.*);

  axi_mem_model #(.STALL(2)) u_mem (
    .clk, .rst_n, .araddr (m_araddr), .arlen (m_arlen), .arsize (m_arsize),
    .arburst (m_arburst), .arvalid (m_arvalid), .arready (m_arready),
    .rdata (m_rdata), .rresp (m_rresp), .rlast (m_rlast), .rvalid (m_rvalid), .rready (m_rready)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- AXI-Lite master
  task automatic reg_write(input logic [7:0] a, input logic [31:0] d);
    #1 s_awaddr = a; s_wdata = d; s_wstrb = 4'hf; s_awvalid = 1; s_wvalid = 1;
    do @(posedge clk); while (!(s_awready && s_wready));
    #1 s_awvalid = 0; s_wvalid = 0; s_bready = 1;
    while (!s_bvalid) @(posedge clk);
    @(posedge clk); #1 s_bready = 0;
  endtask

  task automatic reg_read(input logic [7:0] a, output logic [31:0] d);
    #1 s_araddr = a; s_arvalid = 1;
    do @(posedge clk); while (!s_arready);
    #1 s_arvalid = 0; s_rready = 1;
    while (!s_rvalid) @(posedge clk);
    d = s_rdata;
    @(posedge clk); #1 s_rready = 0;
  endtask

  // ---------------------------------------------------------------- images
  task automatic put_image(input int unsigned base, input inst_t s);
    int unsigned a = base;
    for (int b = 0; b < 4; b++) u_mem.mem[a + b] = 8'(s.msg.size() >> (24 - 8*b));
    a += 4;
    for (int b = 0; b < 4; b++) u_mem.mem[a + b] = 8'(s.idx >> (24 - 8*b));
    a += 4;
    for (int b = 0; b < 32; b++) u_mem.mem[a + b] = s.r[255 - 8*b -: 8];
    a += 32;
    for (int i = 0; i < 67; i++) begin
      for (int b = 0; b < 32; b++) u_mem.mem[a + b] = s.sig[i][255 - 8*b -: 8];
      a += 32;
    end
    foreach (s.auth[k]) begin
      for (int b = 0; b < 32; b++) u_mem.mem[a + b] = s.auth[k][255 - 8*b -: 8];
      a += 32;
    end
    foreach (s.msg[i]) u_mem.mem[a + i] = s.msg[i];
    // (128 + len) mod 64 > 55 or = 0 bytes of padding room: extra block
    if ((s.msg.size() % 64) >= 56) n_extra_pad++;
  endtask

  function automatic bq_t stage_msg(int payload, inst_t next);
    bq_t q = rand_msg(payload);
    push_h(q, next.root);
    push_h(q, next.seed);
    return q;
  endfunction

  task automatic wait_idle(input int limit);
    logic [31:0] st;
    int n = 0;
    do begin
      repeat (200) @(posedge clk);
      reg_read(8'h04, st);
      n++;
    end while (st[0] && n < limit);
  endtask

  function automatic int quoted(int m);
    return m >= 8 ? 51725 : m >= 4 ? 74229 : m >= 2 ? 102952 : 161280;
  endfunction

  // more than one chain engine busy at once
  always @(posedge clk) if ($countones(dut.u_xmss.u_wots.c_busy) > 1) n_multi_chain++;

  inst_t k0, k1, k2, k3;
  initial begin
    logic [31:0] st, cyc, w;
    h256_t root_rd;
    s_awaddr = 0; s_araddr = 0; s_awvalid = 0; s_wvalid = 0; s_bready = 0;
    s_arvalid = 0; s_rready = 0; s_wdata = 0; s_wstrb = 0;

    // keys of the chain, last first
    k3 = make_key($urandom % 1024, 10);
    k2 = make_key($urandom % 1024, 10);
    k1 = make_key($urandom % 1024, 10);
    k0 = make_key($urandom % 1024, 10);
    sign(k0, stage_msg(120, k1));   // ZSBL, signed with the OTP key
    sign(k1, stage_msg(59, k2));    // FSBL, 123-byte message: extra padding block
    sign(k2, stage_msg(7, k3));     // next stage
    put_image(ZSBL, k0);
    put_image(32'h0002_0000, k1);
    put_image(32'h0003_0000, k2);
    otp_pk_root = k0.root; otp_pk_seed = k0.seed;

    // ---------------- boot: zero stage checked before the cores run
    repeat (3) @(posedge clk);
    check(core_run == 2'b00, "cores held in reset");
    rst_n = 1;
    repeat (10) @(posedge clk);
    check(core_run == 2'b00, "cores held while the zero stage is verified");
    wait_idle(2000);
    reg_read(8'h04, st);
    check(st[2] && st[1] && !st[3], "zero stage passed");
    check(core_run == 2'b11 && !boot_abort, "cores run after the zero stage");
    reg_read(8'h0C, cyc);
    $display("zero stage: %0d cycles", cyc);
    check(cyc > 0 && cyc <= quoted(M), "verification within the quoted cycle count");
    for (int i = 0; i < 8; i++) begin reg_read(8'h20 + 8'(4*i), w); root_rd[255 - 32*i -: 32] = w; end
    check(root_rd == k0.root, "computed root read back");
    if (st[2]) n_pass++;

    // ---------------- first stage, key from the zero stage's payload
    reg_write(8'h08, 32'h0002_0000);
    reg_write(8'h00, 32'h1);
    wait_idle(2000);
    reg_read(8'h04, st);
    check(st[2] && st[15:8] == 8'd2, "first stage passed, two stages");
    if (st[2]) n_pass++;
    reg_read(8'h0C, cyc);
    $display("first stage: %0d cycles", cyc);
    check(cyc <= quoted(M), "verification within the quoted cycle count");

    // ---------------- tampered next stage, no abort: irq only
    u_mem.mem[32'h0003_0000 + 4 + 4 + 32 + 67*32 + 320 + 3] ^= 8'h20;
    reg_write(8'h00, 32'h1);
    reg_write(8'h08, 32'h0003_0000);   // address written after start: start used the old one
    wait_idle(2000);
    reg_read(8'h04, st);
    check(!st[2] && !st[3] && st[15:8] == 8'd2, "re-verifying the first stage with the second key fails");
    check(irq && core_run == 2'b11 && !boot_abort, "failure without abort_en raises irq only");
    if (irq) n_fail_irq++;
    reg_write(8'h00, 32'h1);
    wait_idle(2000);
    reg_read(8'h04, st);
    check(!st[2] && irq && !boot_abort, "tampered stage fails, irq");
    if (irq) n_fail_irq++;

    // ---------------- restore it: it passes with the key of the first stage
    u_mem.mem[32'h0003_0000 + 4 + 4 + 32 + 67*32 + 320 + 3] ^= 8'h20;
    reg_write(8'h00, 32'h1);
    wait_idle(2000);
    reg_read(8'h04, st);
    check(st[2] && st[15:8] == 8'd3 && !irq, "second stage passed, three stages");
    if (st[2]) n_pass++;

    // ---------------- failing stage with abort enabled
    reg_write(8'h00, 32'h3);   // same image, now with the key of stage 3
    wait_idle(2000);
    reg_read(8'h04, st);
    check(st[3] && boot_abort && core_run == 2'b00, "failure with abort_en aborts the cores");
    if (boot_abort) n_abort++;
    reg_write(8'h00, 32'h1);
    repeat (50) @(posedge clk);
    reg_read(8'h04, st);
    check(!st[0] && boot_abort, "no request taken after an abort");

    // ---------------- reset with a wrong OTP key: boot aborts at once
    rst_n = 0; otp_pk_root = k1.root;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait_idle(2000);
    check(boot_abort && core_run == 2'b00, "zero stage with a wrong OTP key aborts");
    if (boot_abort) n_abort++;

    // ---------------- bus behaviour and mechanisms
    $display("bursts %0d (short %0d), beats %0d, held %0d, multi-chain cycles %0d, extra pad %0d",
             u_mem.bursts, u_mem.short_bursts, u_mem.beats, u_mem.held, n_multi_chain, n_extra_pad);
    check(u_mem.protocol_errors == 0, "AXI bursts legal");
    check(u_mem.short_bursts > 0, "bursts cut at 64-byte boundaries");
    check(u_mem.held > 0, "DMA stream back-pressured");
    check(M == 1 || n_multi_chain > 0, "chain engines ran in parallel");
    check(n_extra_pad > 0, "extra padding block needed");
    check(n_pass == 3 && n_fail_irq == 2 && n_abort == 2, "every outcome seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

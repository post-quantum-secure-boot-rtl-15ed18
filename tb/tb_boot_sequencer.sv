// tb_boot_sequencer: drives the sequencer with a scripted DMA and verifier
// and checks the chain of trust: the zero-stage image is read at its
// fixed address with the OTP key; a pass lets the cores run and moves the
// key carried by the stage into place; a later failure raises irq only,
// or aborts when abort_en is set; after an abort no request is taken; a
// failed zero stage aborts at once; an empty message fails without a
// body read. Also checks the header and body DMA addresses and lengths
// and the verification cycle count.
module tb_boot_sequencer;
  import xmss_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  hash_t otp_pk_root, otp_pk_seed, pk_root, pk_seed;
  logic req_start = 0, abort_en = 0;
  logic [31:0] req_img_addr = 0;
  logic dma_start, dma_done = 0, dma_err = 0, hdr_phase, hdr_valid = 0;
  logic [31:0] dma_addr, dma_len, hdr_data = 0, msg_len, cycles;
  logic ld_start, v_start = 0, v_done = 0, v_valid = 0;
  logic [511:0] pk_next = 0;
  logic busy, done, pass, aborted, core_run, irq;
  logic [7:0] stages;
  int checks = 0, failures = 0;
  boot_sequencer #(.ZSBL_IMG_ADDR(32'h0000_4000)) dut (.*);

  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  // scripted stage: header read returns len, verifier answers ok after vcyc cycles
  task automatic serve(input logic [31:0] addr, input logic [31:0] len, input bit ok, input int vcyc);
    while (!dma_start) @(posedge clk);
    check(dma_addr == addr && dma_len == 4, "header read");
    repeat (3) @(posedge clk);
    #1 hdr_valid = 1; hdr_data = len; @(posedge clk); #1 hdr_valid = 0;
    dma_done = 1; @(posedge clk); #1 dma_done = 0;
    if (len == 0) return;
    while (!dma_start) @(posedge clk);
    check(dma_addr == addr + 4 && dma_len == 2500 + len, "body read");
    check(ld_start, "loader started with the body read");
    check(msg_len == len, "message length from the header");
    repeat (5) @(posedge clk);
    #1 v_start = 1; @(posedge clk); #1 v_start = 0;
    repeat (vcyc - 1) @(posedge clk);
    #1 v_done = 1; v_valid = ok; @(posedge clk); #1 v_done = 0;
    dma_done = 1; @(posedge clk); #1 dma_done = 0;
  endtask

  task automatic request(input logic [31:0] addr, input bit ab);
    #1 req_img_addr = addr; abort_en = ab; req_start = 1; @(posedge clk); #1 req_start = 0;
  endtask

  initial begin
    otp_pk_root = {8{32'h0707_0707}}; otp_pk_seed = {8{32'h5EED_5EED}};
    repeat (3) @(posedge clk); rst_n = 1;
    // ZSBL passes
    @(posedge clk); #1;
    check(pk_root == otp_pk_root && pk_seed == otp_pk_seed, "OTP key used first");
    check(!core_run, "cores held");
    pk_next = {{8{32'h1111_1111}}, {8{32'h2222_2222}}};
    serve(32'h0000_4000, 32'd100, 1'b1, 1000);
    repeat (3) @(posedge clk);
    check(pass && done && core_run && !aborted && stages == 1, "zero stage passed");
    check(cycles == 1000, "cycle count");
    check(pk_root == {8{32'h1111_1111}} && pk_seed == {8{32'h2222_2222}}, "next key taken from the stage");
    // stage 1 fails without abort
    fork serve(32'h0000_8000, 32'd40, 1'b0, 700); join_none
    request(32'h0000_8000, 1'b0);
    wait fork;
    repeat (3) @(posedge clk);
    check(!pass && irq && core_run && !aborted && stages == 1, "failure raises irq only");
    check(pk_root == {8{32'h1111_1111}}, "key kept after a failure");
    // stage 1 passes
    pk_next = {{8{32'h3333_3333}}, {8{32'h4444_4444}}};
    fork serve(32'h0000_9000, 32'd41, 1'b1, 500); join_none
    request(32'h0000_9000, 1'b0);
    wait fork;
    repeat (3) @(posedge clk);
    check(pass && !irq && stages == 2 && pk_root == {8{32'h3333_3333}}, "second stage passed");
    // empty message fails at the header
    fork serve(32'h0000_A000, 32'd0, 1'b1, 10); join_none
    request(32'h0000_A000, 1'b0);
    wait fork;
    repeat (3) @(posedge clk);
    check(!pass && irq && !aborted && !busy, "empty message fails");
    // failure with abort_en
    fork serve(32'h0000_B000, 32'd8, 1'b0, 300); join_none
    request(32'h0000_B000, 1'b1);
    wait fork;
    repeat (3) @(posedge clk);
    check(aborted && !core_run, "failure with abort_en aborts");
    request(32'h0000_B000, 1'b0);
    repeat (5) @(posedge clk);
    check(!busy && !dma_start, "no request after abort");
    // reset; zero stage fails
    rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;
    serve(32'h0000_4000, 32'd100, 1'b0, 800);
    repeat (3) @(posedge clk);
    check(aborted && !core_run && stages == 0, "failed zero stage aborts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

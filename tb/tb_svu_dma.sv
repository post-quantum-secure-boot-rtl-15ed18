// tb_svu_dma: reads random byte ranges (word-aligned start, any length)
// from a behavioural AXI memory with random stalls, with random
// back-pressure on the output stream, and compares every word, the last
// flag and the word count. Checks that bursts never cross a 64-byte
// boundary, that an SLVERR beat sets err, and counts short bursts.
module tb_svu_dma;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done, err;
  logic [31:0] base_addr, nbytes;
  logic [31:0] m_araddr, m_rdata, out_data;
  logic [7:0] m_arlen;
  logic [2:0] m_arsize;
  logic [1:0] m_arburst, m_rresp;
  logic m_arvalid, m_arready, m_rlast, m_rvalid, m_rready, out_valid, out_ready = 0, out_last;
  int checks = 0, failures = 0, bound_err = 0;
  svu_dma dut (.*);
  axi_mem_model #(.STALL(2)) u_mem (.clk, .rst_n, .araddr(m_araddr), .arlen(m_arlen), .arsize(m_arsize),
    .arburst(m_arburst), .arvalid(m_arvalid), .arready(m_arready), .rdata(m_rdata), .rresp(m_rresp),
    .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready));
  always @(posedge clk) if (m_arvalid && m_arready && (m_araddr / 64) != ((m_araddr + 4 * m_arlen) / 64)) bound_err++;
  always @(posedge clk) out_ready <= ($urandom % 4) != 0;

  initial begin
    int nw, got; logic [31:0] e;
    for (int a = 0; a < 4096; a++) u_mem.mem[a] = 8'($urandom);
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      base_addr = 4 * ($urandom % 512); nbytes = 1 + $urandom % 1500;
      if (t == 29) begin u_mem.err_lo = base_addr + 8; u_mem.err_hi = base_addr + 12; end
      nw = (nbytes + 3) / 4; got = 0;
      @(posedge clk); #1 start = 1; @(posedge clk); #1 start = 0;
      while (!done) begin
        @(posedge clk);
        if (out_valid && out_ready) begin
          e = u_mem.rd32(base_addr + 4 * got);
          checks++; if (out_data !== e) begin failures++; $display("FAIL data t%0d w%0d", t, got); end
          checks++; if (out_last !== (got == nw - 1)) failures++;
          got++;
        end
      end
      checks++; if (got != nw) begin failures++; $display("FAIL count %0d/%0d", got, nw); end
      checks++; if (err !== (t == 29)) begin failures++; $display("FAIL err"); end
    end
    checks++; if (bound_err != 0 || u_mem.protocol_errors != 0) failures++;
    checks++; if (u_mem.short_bursts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

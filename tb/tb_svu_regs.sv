// tb_svu_regs: AXI4-Lite writes and reads of every register: the start
// pulse and abort_en bit of CTRL, IMG_ADDR with byte strobes, the status
// fields, the cycle count and the eight root words, an unmapped address,
// and holding of read and write responses while the master is not ready.
module tb_svu_regs;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] s_awaddr = 0, s_araddr = 0;
  logic s_awvalid = 0, s_awready, s_wvalid = 0, s_wready, s_bvalid, s_bready = 0;
  logic s_arvalid = 0, s_arready, s_rvalid, s_rready = 0;
  logic [31:0] s_wdata = 0, s_rdata;
  logic [3:0] s_wstrb = 0;
  logic [1:0] s_bresp, s_rresp;
  logic start, abort_en;
  logic [31:0] img_addr;
  logic st_busy = 0, st_done = 0, st_pass = 0, st_aborted = 0;
  logic [7:0] st_stages = 0;
  logic [31:0] st_cycles = 0;
  logic [255:0] st_root = 0;
  int checks = 0, failures = 0, starts = 0;
  svu_regs dut (.*);
  always @(posedge clk) if (start) starts++;

  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  task automatic wr(input logic [7:0] a, input logic [31:0] d, input logic [3:0] be);
    #1 s_awaddr = a; s_wdata = d; s_wstrb = be; s_awvalid = 1; s_wvalid = 1;
    do @(posedge clk); while (!(s_awready && s_wready));
    #1 s_awvalid = 0; s_wvalid = 0;
    repeat (2) @(posedge clk);
    check(s_bvalid && s_bresp == 2'b00, "write response held");
    #1 s_bready = 1; @(posedge clk); #1 s_bready = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    #1 s_araddr = a; s_arvalid = 1;
    do @(posedge clk); while (!s_arready);
    #1 s_arvalid = 0;
    repeat (2) @(posedge clk);
    check(s_rvalid, "read response held");
    d = s_rdata;
    #1 s_rready = 1; @(posedge clk); #1 s_rready = 0;
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk); rst_n = 1;
    wr(8'h08, 32'h1234_5678, 4'hf);
    rd(8'h08, d); check(d == 32'h1234_5678, "IMG_ADDR");
    check(img_addr == 32'h1234_5678, "img_addr output");
    wr(8'h08, 32'hAABB_CCDD, 4'b0101);
    rd(8'h08, d); check(d == 32'h12BB_56DD, "IMG_ADDR byte strobes");
    wr(8'h00, 32'h3, 4'hf);
    check(starts == 1 && abort_en, "start pulse and abort_en");
    rd(8'h00, d); check(d == 32'h2, "CTRL reads abort_en, start self-clears");
    wr(8'h00, 32'h0, 4'hf);
    check(starts == 1 && !abort_en, "abort_en cleared, no start");
    st_busy = 1; st_done = 0; st_pass = 1; st_aborted = 1; st_stages = 8'h5A;
    rd(8'h04, d); check(d == 32'h0000_5A0D, "STATUS fields");
    st_cycles = 32'd51725;
    rd(8'h0C, d); check(d == 32'd51725, "CYCLES");
    for (int i = 0; i < 8; i++) st_root[255 - 32*i -: 32] = 32'hC0DE_0000 + i;
    for (int i = 0; i < 8; i++) begin
      rd(8'h20 + 8'(4*i), d); check(d == 32'hC0DE_0000 + i, "ROOT word");
    end
    rd(8'h40, d); check(d == 0, "unmapped reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

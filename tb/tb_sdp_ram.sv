// tb_sdp_ram: random writes and reads against an array model with one
// cycle of read latency, at the authentication-path size (10 x 256).
module tb_sdp_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [255:0] wdata = 0, rdata, e;
  logic [255:0] model [10];
  int checks = 0, failures = 0;
  sdp_ram #(.DEPTH(10), .AW(4)) dut (.*);
  initial begin
    for (int i = 0; i < 10; i++) begin
      @(negedge clk); we = 1; waddr = 4'(i); wdata = {8{$urandom}}; model[i] = wdata;
    end
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      waddr = 4'($urandom % 10); raddr = 4'($urandom % 10); we = $urandom % 2; wdata = {8{$urandom}};
      e = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++; if (rdata !== e) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

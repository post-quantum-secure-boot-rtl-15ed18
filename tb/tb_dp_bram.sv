// tb_dp_bram: random reads and writes on both ports against an array
// model: one-cycle read latency, read-first on a write to the same port,
// and a write on one port seen by the other port one cycle later.
module tb_dp_bram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_we = 0, b_we = 0;
  logic [6:0] a_addr = 0, b_addr = 0;
  logic [255:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [255:0] model [67];
  logic [255:0] ea, eb;
  int checks = 0, failures = 0;
  dp_bram dut (.*);
  initial begin
    for (int i = 0; i < 67; i++) begin
      @(negedge clk); a_we = 1; a_addr = 7'(i); a_wdata = {8{$urandom}}; model[i] = a_wdata;
    end
    @(negedge clk); a_we = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      a_addr = 7'($urandom % 67); b_addr = 7'($urandom % 67);
      a_we = $urandom % 2; b_we = ($urandom % 2) && (b_addr != a_addr);
      a_wdata = {8{$urandom}}; b_wdata = {8{$urandom}};
      ea = model[a_addr]; eb = model[b_addr];
      @(posedge clk);
      if (a_we) model[a_addr] = a_wdata;
      if (b_we) model[b_addr] = b_wdata;
      #1;
      checks++; if (a_rdata !== ea) failures++;
      checks++; if (b_rdata !== eb) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

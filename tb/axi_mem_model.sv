// axi_mem_model: behavioural AXI4 read-only memory for the testbenches
// (stands in for the platform memory behind the interconnect).
//
// Byte-addressed sparse storage, 32-bit data, INCR bursts, one burst at a
// time. ARREADY and RVALID are held back at random for up to STALL
// cycles; an address in [err_lo, err_hi) answers SLVERR. The testbench
// fills mem[] directly. It counts bursts, beats and beats the master held
// off with RREADY low.
module axi_mem_model #(
  parameter int unsigned STALL = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] araddr,
  input  logic [7:0]  arlen,
  input  logic [2:0]  arsize,
  input  logic [1:0]  arburst,
  input  logic        arvalid,
  output logic        arready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rlast,
  output logic        rvalid,
  input  logic        rready
);
  byte unsigned mem [int unsigned];
  int unsigned  err_lo = 0, err_hi = 0;
  int           bursts = 0, beats = 0, short_bursts = 0, held = 0, protocol_errors = 0;

  function automatic logic [31:0] rd32(int unsigned a);
    logic [31:0] v;
    for (int b = 0; b < 4; b++) v[31 - 8*b -: 8] = mem.exists(a + b) ? mem[a + b] : 8'h00;
    return v;
  endfunction

  initial begin
    arready = 0; rvalid = 0; rdata = '0; rresp = '0; rlast = 0;
    forever begin
      int unsigned a; int n;
      @(posedge clk);
      if (!rst_n || !arvalid) continue;
      repeat ($urandom % (STALL + 1)) @(posedge clk);
      #1 arready = 1;
      @(posedge clk); #1 arready = 0;
      a = araddr; n = int'(arlen) + 1;
      if (arsize != 3'd2 || arburst != 2'b01 || (a / 4096) != ((a + 4*n - 1) / 4096)) protocol_errors++;
      bursts++;
      if (n < 16) short_bursts++;
      for (int i = 0; i < n; i++) begin
        repeat ($urandom % (STALL + 1)) @(posedge clk);
        #1 rvalid = 1; rdata = rd32(a); rlast = (i == n - 1);
        rresp = (a >= err_lo && a < err_hi) ? 2'b10 : 2'b00;
        @(posedge clk);
        while (!rready) begin held++; @(posedge clk); end
        beats++;
        #1 rvalid = 0; rlast = 0;
        a += 4;
      end
    end
  end
endmodule

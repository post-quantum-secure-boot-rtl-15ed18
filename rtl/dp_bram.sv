// dp_bram: true dual-port block RAM, two independent read/write ports.
//
// Holds the l WOTS public key components between the chain engines and
// the L-tree, which reads a pair of siblings through both ports in the
// same cycle and writes the parent back. Reads are synchronous with one
// cycle of latency (read-first on a simultaneous write to the same port).
// Writing one address from both ports in one cycle is not allowed.
module dp_bram #(
  parameter int unsigned DEPTH = 67,
  parameter int unsigned WIDTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    if (b_we) mem[b_addr] <= b_wdata;
    b_rdata <= mem[b_addr];
  end

endmodule

// sdp_ram: simple dual-port RAM, one write port and one read port.
//
// Used as the buffers the verifier is loaded with: the WOTS signature
// (l components) and the authentication path (h nodes). Writes and reads
// are synchronous; read data appears one cycle after the address.
module sdp_ram #(
  parameter int unsigned DEPTH = 67,
  parameter int unsigned WIDTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule

// ltree: compresses the l = 67 WOTS public key components into one leaf
// of the Merkle tree with an unbalanced binary tree (the L-tree).
//
// The components sit in the dual-port public-key buffer. On each level of
// len' nodes the unit reads siblings 2i and 2i+1 through ports A and B in
// one cycle, hashes them with thash_h under the address
// (type 1, L-tree address = leaf index, tree height, tree index = i) and
// writes the parent to address i, so the level shrinks in place. An odd
// last node is copied up to address floor(len'/2). After
// 67 -> 34 -> 17 -> 9 -> 5 -> 3 -> 2 -> 1 nodes (66 hashes) the last hash
// is the root, output on root with a one-cycle done pulse and held until
// the next start. The hashes run on a SHA-256 kernel shared with the
// message digest and the Merkle-root unit.
module ltree
  import xmss_pkg::*;
#(
  parameter int unsigned L  = LEN,
  parameter int unsigned AW = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  hash_t         seed_state,
  input  logic [31:0]   ltree_addr,
  // public key buffer, both ports
  output logic          a_we,
  output logic [AW-1:0] a_addr,
  output hash_t         a_wdata,
  input  hash_t         a_rdata,
  output logic          b_we,
  output logic [AW-1:0] b_addr,
  output hash_t         b_wdata,
  input  hash_t         b_rdata,
  output logic          busy,
  output logic          done,
  output hash_t         root,
  output sha_req_t      sha_req,
  input  sha_rsp_t      sha_rsp
);

  typedef enum logic [2:0] {S_IDLE, S_LEVEL, S_RD, S_RDW, S_HASH, S_CPRD, S_CPW, S_CPWR} st_e;
  st_e         st;
  logic [AW:0] lenp;      // nodes on the current level
  logic [AW:0] i;         // parent index within the level
  logic [31:0] height;
  logic        h_start, h_busy, h_done;
  hash_t       h_y, left, right;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; lenp <= '0; i <= '0; height <= '0; h_start <= 1'b0;
      done <= 1'b0; root <= '0; left <= '0; right <= '0;
      a_we <= 1'b0; a_addr <= '0; a_wdata <= '0; b_addr <= '0;
    end else begin
      h_start <= 1'b0;
      done    <= 1'b0;
      a_we    <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          lenp <= (AW+1)'(L); height <= '0; i <= '0; st <= S_LEVEL;
        end
        S_LEVEL: begin
          if (lenp == 1) begin
            done <= 1'b1; st <= S_IDLE;
          end else if (i < (lenp >> 1)) begin
            a_addr <= AW'(2*i);
            b_addr <= AW'(2*i + 1);
            st <= S_RD;
          end else if (lenp[0]) begin
            a_addr <= AW'(lenp - 1);
            st <= S_CPRD;
          end else begin
            lenp <= (lenp + 1) >> 1; height <= height + 1; i <= '0;
          end
        end
        S_RD:  st <= S_RDW;   // address registered into the RAM
        S_RDW: begin left <= a_rdata; right <= b_rdata; h_start <= 1'b1; st <= S_HASH; end
        S_HASH: if (h_done) begin
          a_we    <= 1'b1;
          a_addr  <= AW'(i);
          a_wdata <= h_y;
          root    <= h_y;
          i       <= i + 1;
          st      <= S_LEVEL;
        end
        S_CPRD: st <= S_CPW;
        S_CPW: begin
          a_we    <= 1'b1;
          a_addr  <= AW'(lenp >> 1);
          a_wdata <= a_rdata;
          st      <= S_CPWR;
        end
        S_CPWR: begin
          lenp <= (lenp + 1) >> 1; height <= height + 1; i <= '0; st <= S_LEVEL;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign b_we    = 1'b0;
  assign b_wdata = '0;

  thash_h u_thash_h (
    .clk, .rst_n,
    .start      (h_start),
    .seed_state (seed_state),
    .adrs       (mk_adrs(ADRS_LTREE, ltree_addr, height, 32'(i), 32'd0)),
    .left       (left),
    .right      (right),
    .busy       (h_busy),
    .done       (h_done),
    .y          (h_y),
    .sha_req    (sha_req),
    .sha_rsp    (sha_rsp)
  );

  assign busy = (st != S_IDLE);

endmodule

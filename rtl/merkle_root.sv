// merkle_root: climbs the Merkle tree from the leaf (the L-tree root) to
// the root, using the h nodes of the authentication path.
//
// For height k = 0..h-1 the unit reads auth[k] from the authentication
// path buffer and hashes it with the current node by thash_h under the
// address (type 2, tree height k, tree index = leaf index >> (k+1)). Bit k
// of the leaf index says on which side the current node lies: 0 means it
// is the left child. After h hashes the result is the computed XMSS root,
// output on root with a one-cycle done pulse and held until the next
// start. The hashes run on a SHA-256 kernel shared with the message digest
// and the L-tree.
module merkle_root
  import xmss_pkg::*;
#(
  parameter int unsigned H  = TREE_H,
  parameter int unsigned AW = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  hash_t         seed_state,
  input  hash_t         leaf,
  input  logic [31:0]   leaf_idx,
  // authentication path buffer read port
  output logic [AW-1:0] auth_raddr,
  input  hash_t         auth_rdata,
  output logic          busy,
  output logic          done,
  output hash_t         root,
  output sha_req_t      sha_req,
  input  sha_rsp_t      sha_rsp
);

  typedef enum logic [2:0] {S_IDLE, S_RD, S_RDW, S_START, S_HASH} st_e;
  st_e         st;
  logic [AW:0] k;
  hash_t       node, left, right;
  logic        h_start, h_busy, h_done;
  hash_t       h_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; k <= '0; node <= '0; left <= '0; right <= '0;
      h_start <= 1'b0; done <= 1'b0;
    end else begin
      h_start <= 1'b0;
      done    <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin node <= leaf; k <= '0; st <= S_RD; end
        S_RD:   st <= (k == (AW+1)'(H)) ? S_IDLE : S_RDW;
        S_RDW:  st <= S_START;     // auth[k] arrives on auth_rdata
        S_START: begin
          if (leaf_idx[k] == 1'b0) begin left <= node; right <= auth_rdata; end
          else                     begin left <= auth_rdata; right <= node; end
          h_start <= 1'b1;
          st <= S_HASH;
        end
        S_HASH: if (h_done) begin node <= h_y; k <= k + 1; st <= S_RD; end
        default: st <= S_IDLE;
      endcase
      if (st == S_RD && k == (AW+1)'(H)) done <= 1'b1;
    end
  end

  assign auth_raddr = AW'(k);
  assign root       = node;

  thash_h u_thash_h (
    .clk, .rst_n,
    .start      (h_start),
    .seed_state (seed_state),
    .adrs       (mk_adrs(ADRS_HTREE, 32'd0, 32'(k), leaf_idx >> (k + 1), 32'd0)),
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

// thash_h: the keyed and masked two-to-one tree hash H of XMSS, used for
// every node of the L-tree and of the Merkle tree.
//
//   KEY = PRF(SEED, ADRS, keyAndMask = 0)
//   BM0 = PRF(SEED, ADRS, keyAndMask = 1)
//   BM1 = PRF(SEED, ADRS, keyAndMask = 2)
//   y   = SHA-256(toByte(1,32) || KEY || (left xor BM0) || (right xor BM1))
//
// With the PRF's constant first block precomputed (seed_state), the three
// PRF calls take one compression each and the 128-byte H message three, so
// one node costs six compressions instead of nine, as in the reference
// design the verifier builds on. The calls go out one after another on the
// SHA-256 port; done pulses for one cycle with y valid, and y is held until
// the next start. adrs (keyAndMask = 0), left and right must stay stable
// while busy.
module thash_h
  import xmss_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  hash_t    seed_state,
  input  hash_t    adrs,
  input  hash_t    left,
  input  hash_t    right,
  output logic     busy,
  output logic     done,
  output hash_t    y,
  output sha_req_t sha_req,
  input  sha_rsp_t sha_rsp
);

  typedef enum logic [2:0] {S_IDLE, S_KEY, S_BM0, S_BM1, S_H1, S_H2, S_H3} st_e;
  st_e   st;
  logic  issue;
  hash_t key, bm0, bm1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; issue <= 1'b0; done <= 1'b0;
      key <= '0; bm0 <= '0; bm1 <= '0; y <= '0;
    end else begin
      issue <= 1'b0;
      done  <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin st <= S_KEY; issue <= 1'b1; end
        S_KEY:  if (sha_rsp.done) begin key <= sha_rsp.h; st <= S_BM0; issue <= 1'b1; end
        S_BM0:  if (sha_rsp.done) begin bm0 <= sha_rsp.h; st <= S_BM1; issue <= 1'b1; end
        S_BM1:  if (sha_rsp.done) begin bm1 <= sha_rsp.h; st <= S_H1;  issue <= 1'b1; end
        S_H1:   if (sha_rsp.done) begin st <= S_H2; issue <= 1'b1; end
        S_H2:   if (sha_rsp.done) begin st <= S_H3; issue <= 1'b1; end
        S_H3:   if (sha_rsp.done) begin y <= sha_rsp.h; done <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    sha_req.start = issue;
    sha_req.h     = seed_state;
    sha_req.blk   = pad768({adrs[255:32], 32'd0});
    unique case (st)
      S_BM0:   sha_req.blk = pad768({adrs[255:32], 32'd1});
      S_BM1:   sha_req.blk = pad768({adrs[255:32], 32'd2});
      S_H1:    begin sha_req.h = SHA256_IV; sha_req.blk = {to_byte32(32'd1), key}; end
      S_H2:    begin sha_req.h = sha_rsp.h; sha_req.blk = {left ^ bm0, right ^ bm1}; end
      S_H3:    begin sha_req.h = sha_rsp.h; sha_req.blk = PAD1024; end
      default: ;
    endcase
  end

  assign busy = (st != S_IDLE);

endmodule

// thash_f: one step of a WOTS hash chain, the keyed and masked function F.
//
//   KEY = PRF(SEED, ADRS with keyAndMask = 0)
//   BM  = PRF(SEED, ADRS with keyAndMask = 1)
//   y   = SHA-256(toByte(0,32) || KEY || (x xor BM))
//
// PRF(SEED, ADRS) = SHA-256(toByte(3,32) || SEED || ADRS) is 96 bytes long;
// its first block never changes during a verification, so the caller passes
// the chaining value after that block (seed_state) and each PRF costs a
// single compression. One step therefore takes four compressions instead of
// six, as in the reference design the verifier builds on. The four calls
// are issued in sequence on the SHA-256 port (sha_req / sha_rsp); done
// pulses for one cycle with y valid, and y is held until the next start.
// adrs must carry keyAndMask = 0 and stay stable while busy.
module thash_f
  import xmss_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  hash_t    seed_state,
  input  hash_t    adrs,
  input  hash_t    x,
  output logic     busy,
  output logic     done,
  output hash_t    y,
  output sha_req_t sha_req,
  input  sha_rsp_t sha_rsp
);

  typedef enum logic [2:0] {S_IDLE, S_KEY, S_BM, S_F1, S_F2} st_e;
  st_e   st;
  logic  issue;      // start the compression of the current state
  hash_t key, bm, xin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; issue <= 1'b0; done <= 1'b0;
      key <= '0; bm <= '0; xin <= '0; y <= '0;
    end else begin
      issue <= 1'b0;
      done  <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin xin <= x; st <= S_KEY; issue <= 1'b1; end
        S_KEY:  if (sha_rsp.done) begin key <= sha_rsp.h; st <= S_BM; issue <= 1'b1; end
        S_BM:   if (sha_rsp.done) begin bm  <= sha_rsp.h; st <= S_F1; issue <= 1'b1; end
        S_F1:   if (sha_rsp.done) begin st <= S_F2; issue <= 1'b1; end
        S_F2:   if (sha_rsp.done) begin y <= sha_rsp.h; done <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    sha_req.start = issue;
    sha_req.h     = seed_state;
    sha_req.blk   = pad768({adrs[255:32], 32'd0});
    unique case (st)
      S_BM:    sha_req.blk = pad768({adrs[255:32], 32'd1});
      S_F1:    begin sha_req.h = SHA256_IV; sha_req.blk = {to_byte32(32'd0), key}; end
      S_F2:    begin sha_req.h = sha_rsp.h; sha_req.blk = pad768(xin ^ bm); end
      default: ;
    endcase
  end

  assign busy = (st != S_IDLE);

endmodule

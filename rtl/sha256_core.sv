// sha256_core: SHA-256 compression function, two rounds per clock.
//
// A start pulse latches the chaining value h and the 512-bit block. The
// core then spends 32 cycles on the 64 rounds, keeping a sliding window of
// sixteen message-schedule words and producing two new words per cycle,
// and one more cycle on the final addition. The new chaining value appears
// on rsp.h with a one-cycle rsp.done pulse 34 cycles after start and is
// held until the next start; a start while busy is ignored.
//
// The hash kernel is only named as a shared resource in the verification
// outline, with a quoted latency of 41 cycles per call; the two-round
// datapath, which stays inside that latency, is this design's own choice.
module sha256_core
  import xmss_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  sha_req_t req,
  output sha_rsp_t rsp,
  output logic     busy
);

  typedef logic [31:0] word_t;

  function automatic word_t rotr(word_t x, int unsigned n);
    return (x >> n) | (x << (32 - n));
  endfunction
  function automatic word_t bsig0(word_t x); return rotr(x, 2) ^ rotr(x, 13) ^ rotr(x, 22); endfunction
  function automatic word_t bsig1(word_t x); return rotr(x, 6) ^ rotr(x, 11) ^ rotr(x, 25); endfunction
  function automatic word_t ssig0(word_t x); return rotr(x, 7) ^ rotr(x, 18) ^ (x >> 3); endfunction
  function automatic word_t ssig1(word_t x); return rotr(x, 17) ^ rotr(x, 19) ^ (x >> 10); endfunction

  typedef word_t state_t [8];

  // One SHA-256 round on working state s with schedule word w and constant k
  function automatic state_t round(state_t s, word_t w, word_t k);
    state_t o;
    word_t t1, t2, ch, maj;
    ch  = (s[4] & s[5]) ^ (~s[4] & s[6]);
    maj = (s[0] & s[1]) ^ (s[0] & s[2]) ^ (s[1] & s[2]);
    t1  = s[7] + bsig1(s[4]) + ch + k + w;
    t2  = bsig0(s[0]) + maj;
    o[7] = s[6]; o[6] = s[5]; o[5] = s[4]; o[4] = s[3] + t1;
    o[3] = s[2]; o[2] = s[1]; o[1] = s[0]; o[0] = t1 + t2;
    return o;
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_ROUND, S_FINAL} st_e;
  st_e         st;
  state_t      s;          // working variables a..h
  word_t       hin [8];    // chaining value of this call
  word_t       w   [16];   // message schedule window, w[0] is W[t]
  logic [4:0]  cnt;        // round pair index 0..31
  hash_t       hout;

  state_t s_r1, s_r2;
  word_t  w16, w17;

  always_comb begin
    s_r1 = round(s, w[0], sha256_k({cnt, 1'b0}));
    s_r2 = round(s_r1, w[1], sha256_k({cnt, 1'b1}));
    w16  = ssig1(w[14]) + w[9]  + ssig0(w[1]) + w[0];
    w17  = ssig1(w[15]) + w[10] + ssig0(w[2]) + w[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      cnt      <= '0;
      hout     <= '0;
      rsp.done <= 1'b0;
      s        <= '{default: '0};
      hin      <= '{default: '0};
      w        <= '{default: '0};
    end else begin
      rsp.done <= 1'b0;
      unique case (st)
        S_IDLE: if (req.start) begin
          for (int i = 0; i < 8; i++) begin
            s[i]   <= req.h[255 - 32*i -: 32];
            hin[i] <= req.h[255 - 32*i -: 32];
          end
          for (int i = 0; i < 16; i++) w[i] <= req.blk[511 - 32*i -: 32];
          cnt <= '0;
          st  <= S_ROUND;
        end
        S_ROUND: begin
          s <= s_r2;
          for (int i = 0; i < 14; i++) w[i] <= w[i+2];
          w[14] <= w16;
          w[15] <= w17;
          cnt   <= cnt + 5'd1;
          if (cnt == 5'd31) st <= S_FINAL;
        end
        S_FINAL: begin
          for (int i = 0; i < 8; i++) hout[255 - 32*i -: 32] <= hin[i] + s[i];
          rsp.done <= 1'b1;
          st       <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign rsp.h = hout;
  assign busy  = (st != S_IDLE);

endmodule

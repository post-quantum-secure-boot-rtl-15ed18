// wots_checksum: turns the 32-byte message digest into the l = 67 base-w
// digits that select how far each WOTS chain has already been walked.
//
// Digits 0..63 are the digest's nibbles, most significant first. The
// checksum sum(w - 1 - d[i]) over those 64 digits (at most 960, 12 bits)
// gives digits 64..66, most significant first; this equals the standard's
// rule of shifting the checksum left by 4 and taking the first three
// nibbles of its two-byte encoding. Purely combinational.
module wots_checksum
  import xmss_pkg::*;
(
  input  hash_t                  digest,
  output logic [LEN-1:0][3:0]    wd      // wd[i] = digit i
);

  logic [11:0] csum;

  always_comb begin
    csum = '0;
    for (int i = 0; i < LEN1; i++) begin
      wd[i] = digest[255 - 4*i -: 4];
      csum  = csum + 12'(4'(W - 1) - wd[i]);
    end
    wd[LEN1]   = csum[11:8];
    wd[LEN1+1] = csum[7:4];
    wd[LEN1+2] = csum[3:0];
  end

endmodule

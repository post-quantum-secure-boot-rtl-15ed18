// xmss_pkg: constants, types and helper functions shared by the XMSS
// signature verification hardware.
//
// The numbers are those of the parameter set XMSS-SHA2_10_256: n = 32 byte
// hashes, Winternitz parameter w = 16 (4-bit digits), len1 = 64 message
// digits, len2 = 3 checksum digits, l = 67 chains and a Merkle tree of
// height 10. SHA-256 is the only hash primitive. Hashes travel as 256-bit
// vectors whose most significant byte is the first byte of the string;
// SHA-256 blocks are 512-bit vectors in the same byte order.
//
// The hash address (ADRS) layout and the domain-separation prefixes
// (0 for F, 1 for H, 2 for H_msg, 3 for PRF) follow the XMSS standard
// (RFC 8391); the packing into vectors is this design's choice.
package xmss_pkg;

  localparam int unsigned N_BYTES = 32;   // n
  localparam int unsigned W       = 16;   // Winternitz parameter
  localparam int unsigned LOG_W   = 4;
  localparam int unsigned LEN1    = 64;
  localparam int unsigned LEN2    = 3;
  localparam int unsigned LEN     = LEN1 + LEN2;  // l = 67
  localparam int unsigned TREE_H  = 10;           // Merkle tree height h

  typedef logic [255:0] hash_t;
  typedef logic [511:0] block_t;
  typedef logic [3:0]   digit_t;

  // Address types of the ADRS structure
  typedef enum logic [31:0] {
    ADRS_OTS   = 32'd0,
    ADRS_LTREE = 32'd1,
    ADRS_HTREE = 32'd2
  } adrs_type_e;

  // One request to / response from a SHA-256 compression kernel.
  typedef struct packed {
    logic   start;   // one-cycle pulse, latches h and blk
    hash_t  h;       // chaining value in
    block_t blk;     // message block
  } sha_req_t;

  typedef struct packed {
    logic  done;     // one-cycle pulse
    hash_t h;        // chaining value out, held until the next start
  } sha_rsp_t;

  localparam hash_t SHA256_IV = {
    32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
    32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19};

  // Second block of a 96-byte (768-bit) message whose last 32 bytes are d.
  function automatic block_t pad768(hash_t d);
    return {d, 8'h80, 184'd0, 64'd768};
  endfunction

  // Final block of a 128-byte (1024-bit) message: padding only.
  localparam block_t PAD1024 = {8'h80, 440'd0, 64'd1024};

  // toByte(x, 32) for small x
  function automatic hash_t to_byte32(logic [31:0] x);
    return {224'd0, x};
  endfunction

  // 32-byte ADRS: layer = 0, tree = 0, type, three type-specific words
  // and keyAndMask.
  function automatic hash_t mk_adrs(adrs_type_e t, logic [31:0] w4,
                                    logic [31:0] w5, logic [31:0] w6,
                                    logic [31:0] key_and_mask);
    return {32'd0, 64'd0, 32'(t), w4, w5, w6, key_and_mask};
  endfunction

  // SHA-256 round constants
  function automatic logic [31:0] sha256_k(logic [5:0] i);
    logic [31:0] k [64] = '{
      32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5, 32'h3956c25b, 32'h59f111f1, 32'h923f82a4, 32'hab1c5ed5,
      32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3, 32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174,
      32'he49b69c1, 32'hefbe4786, 32'h0fc19dc6, 32'h240ca1cc, 32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
      32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7, 32'hc6e00bf3, 32'hd5a79147, 32'h06ca6351, 32'h14292967,
      32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13, 32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85,
      32'ha2bfe8a1, 32'ha81a664b, 32'hc24b8b70, 32'hc76c51a3, 32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
      32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5, 32'h391c0cb3, 32'h4ed8aa4a, 32'h5b9cca4f, 32'h682e6ff3,
      32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208, 32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2};
    return k[i];
  endfunction

endpackage

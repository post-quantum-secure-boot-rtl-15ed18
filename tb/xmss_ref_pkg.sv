// xmss_ref_pkg: behavioural reference model used by the testbenches.
//
// A plain software-style SHA-256 over byte queues (with its own padding)
// and the XMSS functions built on it: PRF, F, H, H_msg, WOTS chains, the
// L-tree, the Merkle root from an authentication path, and signature
// generation from WOTS secret chain starts. Nothing here uses the
// precomputed PRF state or the block layouts of the hardware, so the
// model checks those independently.
package xmss_ref_pkg;

  typedef logic [255:0] h256_t;
  typedef byte unsigned bq_t [$];

  function automatic logic [31:0] rotr(logic [31:0] x, int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic logic [31:0] kconst(int i);
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

  // One compression, written round by round with a full 64-word schedule
  function automatic h256_t compress(h256_t hin, logic [511:0] blk);
    logic [31:0] w [64];
    logic [31:0] a, b, c, d, e, f, g, h, t1, t2, s0, s1;
    for (int t = 0; t < 16; t++) w[t] = blk[511 - 32*t -: 32];
    for (int t = 16; t < 64; t++) begin
      s0 = rotr(w[t-15], 7) ^ rotr(w[t-15], 18) ^ (w[t-15] >> 3);
      s1 = rotr(w[t-2], 17) ^ rotr(w[t-2], 19) ^ (w[t-2] >> 10);
      w[t] = w[t-16] + s0 + w[t-7] + s1;
    end
    {a, b, c, d, e, f, g, h} = hin;
    for (int t = 0; t < 64; t++) begin
      t1 = h + (rotr(e, 6) ^ rotr(e, 11) ^ rotr(e, 25)) + ((e & f) ^ (~e & g)) + kconst(t) + w[t];
      t2 = (rotr(a, 2) ^ rotr(a, 13) ^ rotr(a, 22)) + ((a & b) ^ (a & c) ^ (b & c));
      h = g; g = f; f = e; e = d + t1; d = c; c = b; b = a; a = t1 + t2;
    end
    return {hin[255:224] + a, hin[223:192] + b, hin[191:160] + c, hin[159:128] + d,
            hin[127:96] + e, hin[95:64] + f, hin[63:32] + g, hin[31:0] + h};
  endfunction

  function automatic h256_t sha256(bq_t msg);
    bq_t m = msg;
    longint unsigned bits = 64'(msg.size()) * 8;
    h256_t st = {32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
                 32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19};
    logic [511:0] blk;
    m.push_back(8'h80);
    while (m.size() % 64 != 56) m.push_back(8'h00);
    for (int i = 7; i >= 0; i--) m.push_back(8'(bits >> (8*i)));
    for (int b = 0; b < m.size() / 64; b++) begin
      for (int i = 0; i < 64; i++) blk[511 - 8*i -: 8] = m[64*b + i];
      st = compress(st, blk);
    end
    return st;
  endfunction

  function automatic void push_h(ref bq_t q, input h256_t x);
    for (int i = 0; i < 32; i++) q.push_back(x[255 - 8*i -: 8]);
  endfunction

  function automatic h256_t adrs(int t, int w4, int w5, int w6, int km);
    return {32'd0, 64'd0, 32'(t), 32'(w4), 32'(w5), 32'(w6), 32'(km)};
  endfunction

  function automatic h256_t prf(h256_t seed, h256_t a);
    bq_t q = {};
    push_h(q, h256_t'(3)); push_h(q, seed); push_h(q, a);
    return sha256(q);
  endfunction

  function automatic h256_t f_hash(h256_t seed, h256_t a, h256_t x);
    h256_t key = prf(seed, {a[255:32], 32'd0});
    h256_t bm  = prf(seed, {a[255:32], 32'd1});
    bq_t q = {};
    push_h(q, h256_t'(0)); push_h(q, key); push_h(q, x ^ bm);
    return sha256(q);
  endfunction

  function automatic h256_t h_hash(h256_t seed, h256_t a, h256_t l, h256_t r);
    h256_t key = prf(seed, {a[255:32], 32'd0});
    h256_t bm0 = prf(seed, {a[255:32], 32'd1});
    h256_t bm1 = prf(seed, {a[255:32], 32'd2});
    bq_t q = {};
    push_h(q, h256_t'(1)); push_h(q, key); push_h(q, l ^ bm0); push_h(q, r ^ bm1);
    return sha256(q);
  endfunction

  function automatic h256_t h_msg(h256_t r, h256_t root, int unsigned idx, bq_t m);
    bq_t q = {};
    push_h(q, h256_t'(2)); push_h(q, r); push_h(q, root); push_h(q, h256_t'(idx));
    foreach (m[i]) q.push_back(m[i]);
    return sha256(q);
  endfunction

  // chain(x, start, steps) for chain i of leaf ots
  function automatic h256_t chain(h256_t seed, int ots, int i, h256_t x, int s, int steps);
    h256_t t = x;
    for (int j = s; j < s + steps; j++) t = f_hash(seed, adrs(0, ots, i, j, 0), t);
    return t;
  endfunction

  typedef int digits_t [67];

  function automatic digits_t base_w(h256_t dg);
    digits_t d;
    int csum = 0;
    for (int i = 0; i < 64; i++) begin
      d[i] = int'(dg[255 - 4*i -: 4]);
      csum += 15 - d[i];
    end
    csum = csum << 4;              // (8 - (3*4) % 8) = 4
    d[64] = (csum >> 12) & 15;     // first three nibbles of toByte(csum, 2)
    d[65] = (csum >> 8) & 15;
    d[66] = (csum >> 4) & 15;
    return d;
  endfunction

  typedef h256_t hv_t [];

  function automatic h256_t ltree(h256_t seed, int ots, hv_t pk_in);
    hv_t pk = pk_in;
    int lp = pk.size();
    int ht = 0;
    while (lp > 1) begin
      for (int i = 0; i < lp / 2; i++)
        pk[i] = h_hash(seed, adrs(1, ots, ht, i, 0), pk[2*i], pk[2*i+1]);
      if (lp % 2 == 1) pk[lp/2] = pk[lp-1];
      lp = (lp + 1) / 2;
      ht++;
    end
    return pk[0];
  endfunction

  function automatic h256_t root_from_auth(h256_t seed, int unsigned idx, h256_t leaf, hv_t auth);
    h256_t node = leaf;
    for (int k = 0; k < auth.size(); k++) begin
      if (((idx >> k) & 1) == 0) node = h_hash(seed, adrs(2, 0, k, int'(idx >> (k+1)), 0), node, auth[k]);
      else                       node = h_hash(seed, adrs(2, 0, k, int'(idx >> (k+1)), 0), auth[k], node);
    end
    return node;
  endfunction

  function automatic h256_t rand_h();
    h256_t x;
    for (int i = 0; i < 8; i++) x[32*i +: 32] = $urandom;
    return x;
  endfunction

  // A key and one signature made with it. The secret chain starts and the
  // authentication path are random; root is what the key holder would
  // publish for them, and sig is the WOTS signature of H_msg(msg).
  typedef struct {
    h256_t       seed, root, r;
    int unsigned idx;
    hv_t         sk, sig, auth, wots_pk;
    h256_t       leaf, digest;
    digits_t     d;
    bq_t         msg;
  } inst_t;

  function automatic inst_t make_key(int unsigned idx, int h);
    inst_t s;
    s.seed = rand_h(); s.idx = idx;
    s.sk = new[67]; s.sig = new[67]; s.wots_pk = new[67]; s.auth = new[h];
    foreach (s.sk[i]) s.sk[i] = rand_h();
    foreach (s.auth[k]) s.auth[k] = rand_h();
    foreach (s.sk[i]) s.wots_pk[i] = chain(s.seed, int'(idx), i, s.sk[i], 0, 15);
    s.leaf = ltree(s.seed, int'(idx), s.wots_pk);
    s.root = root_from_auth(s.seed, idx, s.leaf, s.auth);
    return s;
  endfunction

  function automatic void sign(ref inst_t s, input bq_t msg);
    s.r = rand_h();
    s.msg = msg;
    s.digest = h_msg(s.r, s.root, s.idx, s.msg);
    s.d = base_w(s.digest);
    foreach (s.sk[i]) s.sig[i] = chain(s.seed, int'(s.idx), i, s.sk[i], 0, s.d[i]);
  endfunction

  function automatic bq_t rand_msg(int len);
    bq_t q = {};
    for (int i = 0; i < len; i++) q.push_back(8'($urandom));
    return q;
  endfunction

  function automatic inst_t make_instance(int unsigned idx, int msg_len, int h);
    inst_t s = make_key(idx, h);
    sign(s, rand_msg(msg_len));
    return s;
  endfunction

endpackage

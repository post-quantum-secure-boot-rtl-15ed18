// xmss_verify: XMSS signature verification (parameter set
// XMSS-SHA2_10_256 by default) as four hardware steps.
//
//  0. seed_state = SHA-256 compression of toByte(3,32) || pub_seed, the
//     constant first block of every PRF call, computed once.
//  1. message_digest hashes toByte(2,32) || R || root || toByte(idx,32) || M;
//     wots_checksum splits the digest into 64 base-16 digits plus three
//     checksum digits (wd).
//  2. wots_pk_from_sig continues each of the 67 chains from the signature
//     to its end on M parallel chain engines, each with its own SHA-256
//     kernel, and writes the public key components to a dual-port BRAM.
//  3. ltree reduces the 67 components to the Merkle leaf.
//  4. merkle_root climbs the 10 levels with the authentication path.
// The computed root is compared with the public key root: valid = equal.
//
// Steps 0, 1, 3 and 4 run one after another on one shared SHA-256 kernel,
// switched by the phase of the controller; the chain engines own theirs.
//
// Interface: before or after start, the signature buffer is written with
// the 67 WOTS signature components (sig_we/sig_waddr/sig_wdata) and the
// authentication path buffer with the 10 nodes (auth_*); both must be
// complete before the message stream ends. pk_root, pk_seed, leaf_idx and
// r are sampled while busy and must stay stable. start begins a
// verification; the message then streams in on msg_* (see
// message_digest). done pulses for one cycle; valid and computed_root are
// held until the next start.
module xmss_verify
  import xmss_pkg::*;
#(
  parameter int unsigned M = 8,   // number of parallel WOTS chain engines
  parameter int unsigned H = TREE_H
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  hash_t       pk_root,
  input  hash_t       pk_seed,
  input  logic [31:0] leaf_idx,
  input  hash_t       r,
  // signature buffer load port
  input  logic        sig_we,
  input  logic [6:0]  sig_waddr,
  input  hash_t       sig_wdata,
  // authentication path buffer load port
  input  logic        auth_we,
  input  logic [3:0]  auth_waddr,
  input  hash_t       auth_wdata,
  // message stream
  input  logic        msg_valid,
  output logic        msg_ready,
  input  logic [31:0] msg_data,
  input  logic        msg_last,
  input  logic [2:0]  msg_nbytes,
  output logic        busy,
  output logic        done,
  output logic        valid,
  output hash_t       computed_root
);

  typedef enum logic [2:0] {P_IDLE, P_SEED, P_MSG, P_WOTS, P_LTREE, P_MERKLE} phase_e;
  phase_e phase;

  hash_t seed_state;
  logic  seed_issue;

  sha_req_t sha_req, md_req, lt_req, mr_req;
  sha_rsp_t sha_rsp;
  logic     sha_busy;

  // start pulses of the stages
  logic md_start, wots_start, lt_start, mr_start;
  logic md_busy, md_done, wots_busy, wots_done, lt_busy, lt_done, mr_busy, mr_done;
  hash_t digest, leaf, root_c;
  logic [LEN-1:0][3:0] wd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= P_IDLE; seed_issue <= 1'b0; seed_state <= '0;
      md_start <= 1'b0; wots_start <= 1'b0; lt_start <= 1'b0; mr_start <= 1'b0;
      done <= 1'b0; valid <= 1'b0; computed_root <= '0;
    end else begin
      seed_issue <= 1'b0;
      md_start <= 1'b0; wots_start <= 1'b0; lt_start <= 1'b0; mr_start <= 1'b0;
      done <= 1'b0;
      unique case (phase)
        P_IDLE: if (start) begin phase <= P_SEED; seed_issue <= 1'b1; valid <= 1'b0; end
        P_SEED: if (sha_rsp.done) begin seed_state <= sha_rsp.h; md_start <= 1'b1; phase <= P_MSG; end
        P_MSG:  if (md_done) begin wots_start <= 1'b1; phase <= P_WOTS; end
        P_WOTS: if (wots_done) begin lt_start <= 1'b1; phase <= P_LTREE; end
        P_LTREE: if (lt_done) begin mr_start <= 1'b1; phase <= P_MERKLE; end
        P_MERKLE: if (mr_done) begin
          computed_root <= root_c;
          valid <= (root_c == pk_root);
          done  <= 1'b1;
          phase <= P_IDLE;
        end
        default: phase <= P_IDLE;
      endcase
    end
  end

  assign busy = (phase != P_IDLE);

  // ---------------------------------------------------------------- shared SHA-256

  always_comb begin
    unique case (phase)
      P_MSG:    sha_req = md_req;
      P_LTREE:  sha_req = lt_req;
      P_MERKLE: sha_req = mr_req;
      default:  sha_req = '{start: seed_issue, h: SHA256_IV, blk: {to_byte32(32'd3), pk_seed}};
    endcase
  end

  sha256_core u_sha (.clk, .rst_n, .req(sha_req), .rsp(sha_rsp), .busy(sha_busy));

  // ---------------------------------------------------------------- step 1
  message_digest u_md (
    .clk, .rst_n,
    .start (md_start), .r (r), .root (pk_root), .idx (leaf_idx),
    .msg_valid, .msg_ready, .msg_data, .msg_last, .msg_nbytes,
    .busy (md_busy), .done (md_done), .digest (digest),
    .sha_req (md_req), .sha_rsp (sha_rsp)
  );

  wots_checksum u_csum (.digest (digest), .wd (wd));

  // ---------------------------------------------------------------- step 2
  logic [6:0] sig_raddr;
  hash_t      sig_rdata;

  sdp_ram #(.DEPTH(LEN), .WIDTH(256), .AW(7)) u_sig_ram (
    .clk, .we (sig_we), .waddr (sig_waddr), .wdata (sig_wdata),
    .raddr (sig_raddr), .rdata (sig_rdata)
  );

  logic       wots_we;
  logic [6:0] wots_waddr;
  hash_t      wots_wdata;

  wots_pk_from_sig #(.M(M), .IDX_W(7)) u_wots (
    .clk, .rst_n,
    .start (wots_start), .seed_state (seed_state), .ots_addr (leaf_idx), .wd (wd),
    .sig_raddr (sig_raddr), .sig_rdata (sig_rdata),
    .pk_we (wots_we), .pk_waddr (wots_waddr), .pk_wdata (wots_wdata),
    .busy (wots_busy), .done (wots_done)
  );

  // ---------------------------------------------------------------- PK buffer
  logic       lt_a_we, lt_b_we;
  logic [6:0] lt_a_addr, lt_b_addr;
  hash_t      lt_a_wdata, lt_b_wdata, pk_a_rdata, pk_b_rdata;
  logic       pk_a_we;
  logic [6:0] pk_a_addr;
  hash_t      pk_a_wdata;

  always_comb begin
    if (phase == P_WOTS) begin
      pk_a_we = wots_we; pk_a_addr = wots_waddr; pk_a_wdata = wots_wdata;
    end else begin
      pk_a_we = lt_a_we; pk_a_addr = lt_a_addr;  pk_a_wdata = lt_a_wdata;
    end
  end

  dp_bram #(.DEPTH(LEN), .WIDTH(256), .AW(7)) u_pk_ram (
    .clk,
    .a_we (pk_a_we), .a_addr (pk_a_addr), .a_wdata (pk_a_wdata), .a_rdata (pk_a_rdata),
    .b_we (lt_b_we), .b_addr (lt_b_addr), .b_wdata (lt_b_wdata), .b_rdata (pk_b_rdata)
  );

  // ---------------------------------------------------------------- step 3
  ltree #(.L(LEN), .AW(7)) u_ltree (
    .clk, .rst_n,
    .start (lt_start), .seed_state (seed_state), .ltree_addr (leaf_idx),
    .a_we (lt_a_we), .a_addr (lt_a_addr), .a_wdata (lt_a_wdata), .a_rdata (pk_a_rdata),
    .b_we (lt_b_we), .b_addr (lt_b_addr), .b_wdata (lt_b_wdata), .b_rdata (pk_b_rdata),
    .busy (lt_busy), .done (lt_done), .root (leaf),
    .sha_req (lt_req), .sha_rsp (sha_rsp)
  );

  // ---------------------------------------------------------------- step 4
  logic [3:0] auth_raddr;
  hash_t      auth_rdata;

  sdp_ram #(.DEPTH(H), .WIDTH(256), .AW(4)) u_auth_ram (
    .clk, .we (auth_we), .waddr (auth_waddr), .wdata (auth_wdata),
    .raddr (auth_raddr), .rdata (auth_rdata)
  );

  merkle_root #(.H(H), .AW(4)) u_merkle (
    .clk, .rst_n,
    .start (mr_start), .seed_state (seed_state), .leaf (leaf), .leaf_idx (leaf_idx),
    .auth_raddr (auth_raddr), .auth_rdata (auth_rdata),
    .busy (mr_busy), .done (mr_done), .root (root_c),
    .sha_req (mr_req), .sha_rsp (sha_rsp)
  );

endmodule

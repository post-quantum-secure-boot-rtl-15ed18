// message_digest: H_msg, the randomized hash of the message that is signed.
//
//   digest = SHA-256(toByte(2,32) || R || root || toByte(idx,32) || M)
//
// R is the randomness from the signature, root the Merkle root of the
// public key and idx the leaf index of the signature. The 128-byte prefix
// fills exactly two SHA-256 blocks, which are compressed right after start;
// the message M then streams in as 32-bit big-endian words on a
// valid/ready handshake, sixteen words per block. msg_last marks the last
// word and msg_nbytes (1..4) says how many of its leading bytes belong to
// the message. The unit appends the 0x80 byte, the zero fill and the
// 64-bit bit length itself, using one extra block when the last block has
// no room for the length. M must hold at least one byte. done pulses for
// one cycle with digest valid; digest is held until the next start.
// The compressions run on a SHA-256 kernel shared with other units.
module message_digest
  import xmss_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  hash_t       r,
  input  hash_t       root,
  input  logic [31:0] idx,
  input  logic        msg_valid,
  output logic        msg_ready,
  input  logic [31:0] msg_data,
  input  logic        msg_last,
  input  logic [2:0]  msg_nbytes,
  output logic        busy,
  output logic        done,
  output hash_t       digest,
  output sha_req_t    sha_req,
  input  sha_rsp_t    sha_rsp
);

  typedef enum logic [2:0] {S_IDLE, S_B0, S_B1, S_FILL, S_COMP, S_LAST, S_EXTRA} st_e;
  st_e         st;
  logic        issue;
  block_t      blk;
  logic [3:0]  wpos;          // next word of blk to fill
  logic [60:0] nbytes_tot;    // message bytes received so far
  logic        pad_in_extra;  // 0x80 byte still owed to the extra block
  logic        need_extra;    // final block had no room for the length

  logic [63:0] bitlen;
  logic [3:0]  wnext;
  assign wnext = wpos + 4'd1;
  assign bitlen = {nbytes_tot + 61'd128, 3'b000};

  // last word with its unused bytes cleared and 0x80 after the last byte
  logic [31:0] last_word;
  always_comb begin
    unique case (msg_nbytes)
      3'd1:    last_word = {msg_data[31:24], 8'h80, 16'h0};
      3'd2:    last_word = {msg_data[31:16], 8'h80, 8'h0};
      3'd3:    last_word = {msg_data[31:8], 8'h80};
      default: last_word = msg_data;
    endcase
  end

  // byte position of the 0x80 in the current block, valid on the last word
  logic [6:0] pad_pos;
  assign pad_pos = {1'b0, wpos, 2'b00} + 7'(msg_nbytes);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; issue <= 1'b0; done <= 1'b0; blk <= '0; wpos <= '0;
      nbytes_tot <= '0; pad_in_extra <= 1'b0; need_extra <= 1'b0; digest <= '0;
    end else begin
      issue <= 1'b0;
      done  <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st <= S_B0; issue <= 1'b1; nbytes_tot <= '0;
          pad_in_extra <= 1'b0; need_extra <= 1'b0;
        end
        S_B0: if (sha_rsp.done) begin st <= S_B1; issue <= 1'b1; end
        S_B1: if (sha_rsp.done) begin st <= S_FILL; blk <= '0; wpos <= '0; end
        S_FILL: if (msg_valid) begin
          if (!msg_last) begin
            blk[511 - 32*wpos -: 32] <= msg_data;
            nbytes_tot <= nbytes_tot + 61'd4;
            wpos <= wpos + 4'd1;
            if (wpos == 4'd15) begin st <= S_COMP; issue <= 1'b1; end
          end else begin
            blk[511 - 32*wpos -: 32] <= last_word;
            nbytes_tot <= nbytes_tot + 61'(msg_nbytes);
            if (msg_nbytes == 3'd4 && wpos != 4'd15)
              blk[511 - 32*wnext -: 32] <= 32'h8000_0000;
            pad_in_extra <= (pad_pos == 7'd64);
            need_extra   <= (pad_pos > 7'd55);
            st <= S_LAST;
          end
        end
        S_COMP: if (sha_rsp.done) begin st <= S_FILL; blk <= '0; wpos <= '0; end
        S_LAST: begin
          // the length is placed here (cycle after the last word) when it fits
          if (!need_extra) blk[63:0] <= bitlen;
          issue <= 1'b1;
          st    <= S_EXTRA;
        end
        S_EXTRA: if (sha_rsp.done) begin
          if (need_extra) begin
            blk <= {pad_in_extra ? 8'h80 : 8'h00, 440'd0, bitlen};
            need_extra <= 1'b0;
            st <= S_LAST;
          end else begin
            digest <= sha_rsp.h; done <= 1'b1; st <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // S_LAST issues the current block one cycle after it was completed; the
  // extra block is issued from S_LAST too, after need_extra was cleared.
  always_comb begin
    sha_req.start = issue;
    sha_req.h     = sha_rsp.h;
    sha_req.blk   = blk;
    unique case (st)
      S_B0:    begin sha_req.h = SHA256_IV; sha_req.blk = {to_byte32(32'd2), r}; end
      S_B1:    sha_req.blk = {root, to_byte32(idx)};
      default: ;
    endcase
  end

  assign msg_ready = (st == S_FILL);
  assign busy      = (st != S_IDLE);

endmodule

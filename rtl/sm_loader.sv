// sm_loader: unpacks the signed message coming from the DMA into the XMSS
// verifier.
//
// The signed message sm = idx (4 bytes, big-endian) || R (32) ||
// sig (67 x 32) || auth_path (10 x 32) || message arrives as 32-bit words.
// The loader latches idx and R, then pulses vstart to start the verifier
// (which first precomputes its PRF state and hashes the fixed part of the
// digest input). Signature and authentication path words are gathered
// eight at a time into 256-bit nodes and written into the verifier's
// buffers. Message words are forwarded on the verifier's message stream;
// msg_len (bytes, at least 1) fixes which word is last and how many of its
// bytes count. The last 64 message bytes are kept in pk_next: a boot
// stage carries the public key that verifies the next stage at the end of
// its signed payload. done pulses after the last message word is taken.
module sm_loader
  import xmss_pkg::*;
#(
  parameter int unsigned H = TREE_H
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] msg_len,
  // word stream from the DMA
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  // to the verifier
  output logic        vstart,
  output logic [31:0] leaf_idx,
  output hash_t       r,
  output logic        sig_we,
  output logic [6:0]  sig_waddr,
  output hash_t       sig_wdata,
  output logic        auth_we,
  output logic [3:0]  auth_waddr,
  output hash_t       auth_wdata,
  output logic        msg_valid,
  input  logic        msg_ready,
  output logic [31:0] msg_data,
  output logic        msg_last,
  output logic [2:0]  msg_nbytes,
  output logic [511:0] pk_next,
  output logic        busy,
  output logic        done
);

  typedef enum logic [2:0] {S_IDLE, S_IDX, S_R, S_SIG, S_AUTH, S_MSG} st_e;
  st_e         st;
  logic [2:0]  wsub;      // word within the current 256-bit node
  logic [6:0]  node;      // node index within sig or auth
  hash_t       acc;       // node being gathered
  logic [29:0] mwords;    // message words left
  logic [2:0]  last_nb;

  assign last_nb = (msg_len[1:0] == 2'd0) ? 3'd4 : {1'b0, msg_len[1:0]};

  logic take;
  assign take = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; wsub <= '0; node <= '0; acc <= '0; mwords <= '0;
      leaf_idx <= '0; r <= '0; vstart <= 1'b0; done <= 1'b0;
      sig_we <= 1'b0; sig_waddr <= '0; sig_wdata <= '0;
      auth_we <= 1'b0; auth_waddr <= '0; auth_wdata <= '0; pk_next <= '0;
    end else begin
      vstart <= 1'b0; done <= 1'b0; sig_we <= 1'b0; auth_we <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st <= S_IDX; wsub <= '0; node <= '0;
          mwords <= 30'((msg_len + 32'd3) >> 2);
        end
        S_IDX: if (take) begin leaf_idx <= in_data; st <= S_R; end
        S_R: if (take) begin
          r <= {r[223:0], in_data};
          wsub <= wsub + 1'b1;
          if (wsub == 3'd7) begin vstart <= 1'b1; st <= S_SIG; end
        end
        S_SIG: if (take) begin
          acc  <= {acc[223:0], in_data};
          wsub <= wsub + 1'b1;
          if (wsub == 3'd7) begin
            sig_we <= 1'b1; sig_waddr <= node; sig_wdata <= {acc[223:0], in_data};
            node <= node + 1'b1;
            if (node == 7'(LEN - 1)) begin node <= '0; st <= S_AUTH; end
          end
        end
        S_AUTH: if (take) begin
          acc  <= {acc[223:0], in_data};
          wsub <= wsub + 1'b1;
          if (wsub == 3'd7) begin
            auth_we <= 1'b1; auth_waddr <= 4'(node); auth_wdata <= {acc[223:0], in_data};
            node <= node + 1'b1;
            if (node == 7'(H - 1)) st <= S_MSG;
          end
        end
        S_MSG: if (take) begin
          mwords <= mwords - 1'b1;
          if (mwords == 1) begin
            unique case (last_nb)
              3'd1:    pk_next <= {pk_next[503:0], in_data[31:24]};
              3'd2:    pk_next <= {pk_next[495:0], in_data[31:16]};
              3'd3:    pk_next <= {pk_next[487:0], in_data[31:8]};
              default: pk_next <= {pk_next[479:0], in_data};
            endcase
            done <= 1'b1;
            st   <= S_IDLE;
          end else begin
            pk_next <= {pk_next[479:0], in_data};
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign in_ready   = (st == S_MSG) ? msg_ready : (st != S_IDLE);
  assign msg_valid  = (st == S_MSG) && in_valid;
  assign msg_data   = in_data;
  assign msg_last   = (mwords == 1);
  assign msg_nbytes = (mwords == 1) ? last_nb : 3'd4;
  assign busy       = (st != S_IDLE);

endmodule

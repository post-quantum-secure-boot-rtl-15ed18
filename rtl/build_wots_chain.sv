// build_wots_chain: one WOTS chain engine with its own SHA-256 kernel.
//
// Given signature component sig_i and its message digit d_i, the engine
// continues chain i from position d_i to the chain's end, w - 1, applying
// thash_f w - 1 - d_i times. Step j uses the OTS address
// (type 0, OTS address = leaf index, chain address = i, hash address = j).
// The result is public key component i, output as pk with its index pk_idx.
// A start while idle begins a chain; done pulses for one cycle when pk is
// valid, and pk is held until the next start. Each step costs four
// compressions (about 4 x 35 cycles), so a chain takes up to 15 steps.
module build_wots_chain
  import xmss_pkg::*;
#(
  parameter int unsigned IDX_W = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  hash_t            seed_state,
  input  logic [31:0]      ots_addr,
  input  hash_t            sig_i,
  input  logic [3:0]       d_i,
  input  logic [IDX_W-1:0] idx,
  output logic             busy,
  output logic             done,
  output hash_t            pk,
  output logic [IDX_W-1:0] pk_idx
);

  typedef enum logic [1:0] {S_IDLE, S_STEP, S_WAIT} st_e;
  st_e        st;
  logic [3:0] j;        // hash address of the next step
  logic       f_start, f_busy, f_done;
  hash_t      f_y;
  sha_req_t   sha_req;
  sha_rsp_t   sha_rsp;
  logic       sha_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; j <= '0; pk <= '0; pk_idx <= '0; done <= 1'b0; f_start <= 1'b0;
    end else begin
      done    <= 1'b0;
      f_start <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          pk     <= sig_i;
          pk_idx <= idx;
          j      <= d_i;
          st     <= S_STEP;
        end
        S_STEP: begin
          if (j == 4'(W - 1)) begin
            done <= 1'b1;
            st   <= S_IDLE;
          end else begin
            f_start <= 1'b1;
            st      <= S_WAIT;
          end
        end
        S_WAIT: if (f_done) begin
          pk <= f_y;
          j  <= j + 4'd1;
          st <= S_STEP;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  thash_f u_thash_f (
    .clk, .rst_n,
    .start      (f_start),
    .seed_state (seed_state),
    .adrs       (mk_adrs(ADRS_OTS, ots_addr, 32'(pk_idx), 32'(j), 32'd0)),
    .x          (pk),
    .busy       (f_busy),
    .done       (f_done),
    .y          (f_y),
    .sha_req    (sha_req),
    .sha_rsp    (sha_rsp)
  );

  sha256_core u_sha (
    .clk, .rst_n,
    .req  (sha_req),
    .rsp  (sha_rsp),
    .busy (sha_busy)
  );

  assign busy = (st != S_IDLE);

endmodule

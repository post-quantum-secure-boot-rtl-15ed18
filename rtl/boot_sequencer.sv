// boot_sequencer: runs the secure-boot chain of trust on the signature
// verification unit.
//
// Each boot stage lives in memory as an image: a 32-bit big-endian message
// length, then the signed message sm (leaf index, R, WOTS signature,
// authentication path, message). The message ends with the 64-byte public
// key (Merkle root, then public seed) that verifies the next stage.
//
// Out of reset the sequencer verifies the zero-stage image at
// ZSBL_IMG_ADDR with the public key from the one-time-programmable memory,
// while all cores are held. If the signature holds, the cores are let run
// (core_run) and the key carried by the stage becomes the current key;
// otherwise abort is raised and the cores stay held for good. Later
// stages are verified on request of the boot software (start, img_addr),
// each with the key taken from the previous verified stage. A later
// failure aborts the cores when abort_en is set and otherwise only raises
// irq, leaving the decision to low-level software. After an abort no
// further request is taken.
//
// For each stage the sequencer reads the 4-byte header through the DMA,
// then lets the DMA stream the sm (2500 + length bytes) into the loader
// and verifier, and waits for the verifier's result. cycles counts the
// cycles from the verifier's start to its result.
module boot_sequencer
  import xmss_pkg::*;
#(
  parameter logic [31:0] ZSBL_IMG_ADDR = 32'h0001_0000,
  parameter int unsigned H             = TREE_H
) (
  input  logic         clk,
  input  logic         rst_n,
  // key from the one-time-programmable memory
  input  hash_t        otp_pk_root,
  input  hash_t        otp_pk_seed,
  // software request
  input  logic         req_start,
  input  logic [31:0]  req_img_addr,
  input  logic         abort_en,
  // DMA
  output logic         dma_start,
  output logic [31:0]  dma_addr,
  output logic [31:0]  dma_len,
  input  logic         dma_done,
  input  logic         dma_err,
  output logic         hdr_phase,   // stream goes to the sequencer, not the loader
  input  logic         hdr_valid,
  input  logic [31:0]  hdr_data,
  // loader and verifier
  output logic         ld_start,
  output logic [31:0]  msg_len,
  input  logic [511:0] pk_next,
  input  logic         v_start,
  input  logic         v_done,
  input  logic         v_valid,
  output hash_t        pk_root,
  output hash_t        pk_seed,
  // status
  output logic         busy,
  output logic         done,
  output logic         pass,
  output logic         aborted,
  output logic [7:0]   stages,
  output logic [31:0]  cycles,
  output logic         core_run,
  output logic         irq
);

  // bytes of sm in front of the message: idx, R, signature, auth path
  localparam int unsigned SM_FIXED = 4 + 32 + LEN * 32 + H * 32;

  typedef enum logic [2:0] {S_BOOT, S_HDR_REQ, S_HDR, S_BODY_REQ, S_BODY, S_RESULT, S_IDLE} st_e;
  st_e         st;
  logic [31:0] img;
  logic        first;     // verifying the zero-stage image
  logic        err_seen, vres, counting;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_BOOT; img <= '0; first <= 1'b1; err_seen <= 1'b0; vres <= 1'b0;
      dma_start <= 1'b0; dma_addr <= '0; dma_len <= '0; ld_start <= 1'b0; msg_len <= '0;
      pk_root <= '0; pk_seed <= '0; done <= 1'b0; pass <= 1'b0; aborted <= 1'b0;
      stages <= '0; cycles <= '0; counting <= 1'b0; core_run <= 1'b0; irq <= 1'b0;
    end else begin
      dma_start <= 1'b0;
      ld_start  <= 1'b0;
      if (v_start) begin counting <= 1'b1; cycles <= 32'd1; end
      else if (counting && !v_done) cycles <= cycles + 1'b1;
      if (v_done) counting <= 1'b0;
      unique case (st)
        S_BOOT: begin
          img <= ZSBL_IMG_ADDR; first <= 1'b1;
          pk_root <= otp_pk_root; pk_seed <= otp_pk_seed;
          st <= S_HDR_REQ;
        end
        S_HDR_REQ: begin
          dma_start <= 1'b1; dma_addr <= img; dma_len <= 32'd4;
          err_seen <= 1'b0; done <= 1'b0; pass <= 1'b0;
          st <= S_HDR;
        end
        S_HDR: begin
          if (hdr_valid) msg_len <= hdr_data;
          if (dma_done) begin
            err_seen <= dma_err;
            // an unreadable header or an empty message fails at once
            if (dma_err || msg_len == 0) begin vres <= 1'b0; st <= S_RESULT; end
            else st <= S_BODY_REQ;
          end
        end
        S_BODY_REQ: begin
          dma_start <= 1'b1; dma_addr <= img + 32'd4; dma_len <= 32'(SM_FIXED) + msg_len;
          ld_start  <= 1'b1;
          st <= S_BODY;
        end
        S_BODY: begin
          if (dma_done && dma_err) err_seen <= 1'b1;
          if (v_done) begin vres <= v_valid; st <= S_RESULT; end
        end
        S_RESULT: begin
          done <= 1'b1;
          if (vres && !err_seen) begin
            pass     <= 1'b1;
            stages   <= stages + 1'b1;
            core_run <= 1'b1;
            pk_root  <= pk_next[511:256];
            pk_seed  <= pk_next[255:0];
          end else if (first || abort_en) begin
            aborted  <= 1'b1;
            core_run <= 1'b0;
          end else begin
            irq <= 1'b1;
          end
          first <= 1'b0;
          st    <= S_IDLE;
        end
        S_IDLE: if (req_start && !aborted) begin
          img <= req_img_addr; irq <= 1'b0; st <= S_HDR_REQ;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign hdr_phase = (st == S_HDR);
  assign busy      = (st != S_IDLE);

  // the cores never run once the chain of trust has been broken
  a_abort_holds: assert property (@(posedge clk) disable iff (!rst_n) aborted |-> !core_run);

endmodule

// svu_top: the signature verification unit (SVU), a hardware root of trust
// that checks every boot stage with the hash-based, post-quantum XMSS
// signature scheme before the cores may run it.
//
// Inside: the boot sequencer that walks the chain of trust, the AXI4 read
// DMA that fetches each stage image from memory, the loader that unpacks
// the signed message, the XMSS verifier (M parallel WOTS chain engines,
// L-tree and Merkle-root units on a shared SHA-256 kernel) and the
// AXI4-Lite register file through which boot software asks for the next
// stage. The trusted key of the first stage comes in on otp_pk_*, from
// the one-time-programmable memory of the key management unit.
// core_run lets the cores run once the zero-stage image has been verified;
// boot_abort signals a broken chain of trust (the cores stay held), irq a
// failed later stage left to software.
//
// Image format in memory (word aligned): message length in bytes (32 bit,
// big-endian) || leaf index (4) || R (32) || WOTS signature (67 x 32) ||
// authentication path (10 x 32) || message, whose last 64 bytes are the
// public key (root || seed) of the next stage.
module svu_top
  import xmss_pkg::*;
#(
  parameter int unsigned M             = 8,             // WOTS chain engines
  parameter int unsigned NCORES        = 2,
  parameter logic [31:0] ZSBL_IMG_ADDR = 32'h0001_0000
) (
  input  logic              clk,
  input  logic              rst_n,
  // trusted public key from the OTP
  input  logic [255:0]      otp_pk_root,
  input  logic [255:0]      otp_pk_seed,
  // AXI4-Lite slave: registers
  input  logic [7:0]        s_awaddr,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [7:0]        s_araddr,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rvalid,
  input  logic              s_rready,
  // AXI4 read master: DMA
  output logic [31:0]       m_araddr,
  output logic [7:0]        m_arlen,
  output logic [2:0]        m_arsize,
  output logic [1:0]        m_arburst,
  output logic              m_arvalid,
  input  logic              m_arready,
  input  logic [31:0]       m_rdata,
  input  logic [1:0]        m_rresp,
  input  logic              m_rlast,
  input  logic              m_rvalid,
  output logic              m_rready,
  // to the cores
  output logic [NCORES-1:0] core_run,
  output logic              boot_abort,
  output logic              irq
);

  // register file <-> sequencer
  logic        req_start, abort_en;
  logic [31:0] req_img_addr, cycles;
  logic        sq_busy, sq_done, sq_pass, sq_run;
  logic [7:0]  stages;

  // sequencer <-> DMA / loader / verifier
  logic        dma_start, dma_busy, dma_done, dma_err;
  logic [31:0] dma_addr, dma_len, msg_len;
  logic        hdr_phase;
  logic        st_valid, st_ready, st_last;
  logic [31:0] st_data;
  logic        ld_start, ld_busy, ld_done, ld_ready;
  logic [511:0] pk_next;
  hash_t       pk_root, pk_seed, r, computed_root;

  // loader <-> verifier
  logic        v_start, v_busy, v_done, v_valid;
  logic [31:0] leaf_idx;
  logic        sig_we, auth_we;
  logic [6:0]  sig_waddr;
  logic [3:0]  auth_waddr;
  hash_t       sig_wdata, auth_wdata;
  logic        msg_valid, msg_ready, msg_last;
  logic [31:0] msg_data;
  logic [2:0]  msg_nbytes;

  svu_regs u_regs (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .start (req_start), .abort_en (abort_en), .img_addr (req_img_addr),
    .st_busy (sq_busy), .st_done (sq_done), .st_pass (sq_pass), .st_aborted (boot_abort),
    .st_stages (stages), .st_cycles (cycles), .st_root (computed_root)
  );

  boot_sequencer #(.ZSBL_IMG_ADDR(ZSBL_IMG_ADDR)) u_seq (
    .clk, .rst_n,
    .otp_pk_root, .otp_pk_seed,
    .req_start, .req_img_addr, .abort_en,
    .dma_start, .dma_addr, .dma_len, .dma_done, .dma_err,
    .hdr_phase, .hdr_valid (st_valid && hdr_phase), .hdr_data (st_data),
    .ld_start, .msg_len, .pk_next,
    .v_start, .v_done, .v_valid,
    .pk_root, .pk_seed,
    .busy (sq_busy), .done (sq_done), .pass (sq_pass), .aborted (boot_abort),
    .stages, .cycles, .core_run (sq_run), .irq
  );

  assign core_run = {NCORES{sq_run}};

  svu_dma u_dma (
    .clk, .rst_n,
    .start (dma_start), .base_addr (dma_addr), .nbytes (dma_len),
    .busy (dma_busy), .done (dma_done), .err (dma_err),
    .m_araddr, .m_arlen, .m_arsize, .m_arburst, .m_arvalid, .m_arready,
    .m_rdata, .m_rresp, .m_rlast, .m_rvalid, .m_rready,
    .out_valid (st_valid), .out_ready (st_ready), .out_data (st_data), .out_last (st_last)
  );

  assign st_ready = hdr_phase ? 1'b1 : ld_ready;

  sm_loader u_loader (
    .clk, .rst_n,
    .start (ld_start), .msg_len,
    .in_valid (st_valid && !hdr_phase), .in_ready (ld_ready), .in_data (st_data),
    .vstart (v_start), .leaf_idx, .r,
    .sig_we, .sig_waddr, .sig_wdata, .auth_we, .auth_waddr, .auth_wdata,
    .msg_valid, .msg_ready, .msg_data, .msg_last, .msg_nbytes,
    .pk_next, .busy (ld_busy), .done (ld_done)
  );

  xmss_verify #(.M(M)) u_xmss (
    .clk, .rst_n,
    .start (v_start), .pk_root, .pk_seed, .leaf_idx, .r,
    .sig_we, .sig_waddr, .sig_wdata, .auth_we, .auth_waddr, .auth_wdata,
    .msg_valid, .msg_ready, .msg_data, .msg_last, .msg_nbytes,
    .busy (v_busy), .done (v_done), .valid (v_valid), .computed_root
  );

endmodule

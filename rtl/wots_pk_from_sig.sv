// wots_pk_from_sig: recovers the WOTS public key from the WOTS signature
// with M chain engines working in parallel.
//
// A dispatcher hands chain indices 0..l-1 in order to whichever engine is
// free: it reads signature component i from the signature buffer (one
// cycle read latency), then starts the engine with (sig_i, wd[i], i).
// Engines finish in data-dependent order; each finished result waits in
// its engine until the collector writes it, lowest engine first, one per
// cycle, to the public-key buffer at address i. An engine takes new work
// only after its result was written. done pulses once all l components
// are written. The chain engines and their SHA-256 kernels are the only
// parallel part of the verifier.
module wots_pk_from_sig
  import xmss_pkg::*;
#(
  parameter int unsigned M     = 8,
  parameter int unsigned IDX_W = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  hash_t                seed_state,
  input  logic [31:0]          ots_addr,
  input  logic [LEN-1:0][3:0]  wd,
  // signature buffer read port
  output logic [IDX_W-1:0]     sig_raddr,
  input  hash_t                sig_rdata,
  // public key buffer write port
  output logic                 pk_we,
  output logic [IDX_W-1:0]     pk_waddr,
  output hash_t                pk_wdata,
  output logic                 busy,
  output logic                 done
);

  typedef enum logic [1:0] {S_IDLE, S_FIND, S_LAUNCH, S_DRAIN} st_e;
  st_e              st;
  logic [IDX_W-1:0] nxt;        // next chain to dispatch
  logic [IDX_W:0]   nwritten;   // components written so far
  localparam int unsigned SEL_W = (M > 1) ? $clog2(M) : 1;
  logic [SEL_W-1:0] sel;        // engine chosen for the launch

  logic [M-1:0]             c_start, c_busy, c_done;
  hash_t                    c_pk     [M];
  logic [IDX_W-1:0]         c_idx    [M];
  logic [M-1:0]             pend;     // result waiting to be written

  // lowest free engine and lowest engine with a pending result
  logic                     any_free, any_pend;
  logic [SEL_W-1:0]         free_id, pend_id;
  always_comb begin
    any_free = 1'b0; free_id = '0;
    any_pend = 1'b0; pend_id = '0;
    for (int k = M - 1; k >= 0; k--) begin
      if (!c_busy[k] && !pend[k] && !c_start[k]) begin any_free = 1'b1; free_id = k[$bits(free_id)-1:0]; end
      if (pend[k]) begin any_pend = 1'b1; pend_id = k[$bits(pend_id)-1:0]; end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; nxt <= '0; nwritten <= '0; sel <= '0; c_start <= '0;
      pend <= '0; pk_we <= 1'b0; pk_waddr <= '0; pk_wdata <= '0; done <= 1'b0;
    end else begin
      c_start <= '0;
      done    <= 1'b0;
      pk_we   <= 1'b0;
      // dispatcher
      unique case (st)
        S_IDLE: if (start) begin nxt <= '0; nwritten <= '0; st <= S_FIND; end
        S_FIND: begin
          if (nxt == IDX_W'(LEN)) st <= S_DRAIN;
          else if (any_free) begin sel <= free_id; st <= S_LAUNCH; end
        end
        S_LAUNCH: begin   // sig_rdata now holds component nxt
          c_start[sel] <= 1'b1;
          nxt <= nxt + 1'b1;
          st  <= S_FIND;
        end
        S_DRAIN: if (nwritten == (IDX_W+1)'(LEN)) begin done <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
      // collector
      for (int k = 0; k < M; k++) if (c_done[k]) pend[k] <= 1'b1;
      if (any_pend) begin
        pend[pend_id] <= 1'b0;
        pk_we    <= 1'b1;
        pk_waddr <= c_idx[pend_id];
        pk_wdata <= c_pk[pend_id];
        nwritten <= nwritten + 1'b1;
      end
    end
  end

  assign sig_raddr = nxt;

  for (genvar k = 0; k < M; k++) begin : g_chain
    build_wots_chain #(.IDX_W(IDX_W)) u_chain (
      .clk, .rst_n,
      .start      (c_start[k]),
      .seed_state (seed_state),
      .ots_addr   (ots_addr),
      .sig_i      (sig_rdata),
      .d_i        (wd[nxt - 1'b1]),
      .idx        (nxt - 1'b1),
      .busy       (c_busy[k]),
      .done       (c_done[k]),
      .pk         (c_pk[k]),
      .pk_idx     (c_idx[k])
    );
  end

  assign busy = (st != S_IDLE);

endmodule

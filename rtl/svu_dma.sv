// svu_dma: AXI4 read DMA of the signature verification unit.
//
// Fetches nbytes bytes starting at the word-aligned address base_addr and
// delivers them as a stream of 32-bit words (first byte in bits 31:24) on
// a valid/ready handshake; out_last marks the last word. Reads go out as
// INCR bursts of 4-byte beats, at most 16 beats and never crossing a
// 64-byte boundary (hence never a 4 KiB one), one burst outstanding at a
// time. The R channel is passed straight to the stream, so back-pressure
// on out_ready holds RREADY low. done pulses after the last beat; err is
// set with it if any beat returned a response other than OKAY.
// The DMA is only named in the platform outline; burst policy, widths and
// the stream interface are this design's own choices.
module svu_dma (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] base_addr,
  input  logic [31:0] nbytes,
  output logic        busy,
  output logic        done,
  output logic        err,
  // AXI4 read address channel
  output logic [31:0] m_araddr,
  output logic [7:0]  m_arlen,
  output logic [2:0]  m_arsize,
  output logic [1:0]  m_arburst,
  output logic        m_arvalid,
  input  logic        m_arready,
  // AXI4 read data channel
  input  logic [31:0] m_rdata,
  input  logic [1:0]  m_rresp,
  input  logic        m_rlast,
  input  logic        m_rvalid,
  output logic        m_rready,
  // word stream
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  output logic        out_last
);

  typedef enum logic [1:0] {S_IDLE, S_AR, S_R} st_e;
  st_e         st;
  logic [31:0] addr;       // next burst address
  logic [29:0] words_left; // words not yet received

  logic [29:0] total_words;
  assign total_words = 30'((nbytes + 32'd3) >> 2);

  // beats to the next 64-byte boundary, limited by what is left
  logic [4:0] to_bound, beats;
  assign to_bound = 5'd16 - {1'b0, addr[5:2]};
  assign beats    = (30'(to_bound) < words_left) ? to_bound : 5'(words_left);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; addr <= '0; words_left <= '0; done <= 1'b0; err <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          addr <= {base_addr[31:2], 2'b00};
          words_left <= total_words;
          err <= 1'b0;
          st <= (total_words == 0) ? S_IDLE : S_AR;
          if (total_words == 0) done <= 1'b1;
        end
        S_AR: if (m_arvalid && m_arready) st <= S_R;
        S_R: if (m_rvalid && m_rready) begin
          if (m_rresp != 2'b00) err <= 1'b1;
          words_left <= words_left - 1'b1;
          addr <= addr + 32'd4;
          if (words_left == 1) begin done <= 1'b1; st <= S_IDLE; end
          else if (m_rlast) st <= S_AR;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign m_araddr  = addr;
  assign m_arlen   = {3'd0, beats - 5'd1};
  assign m_arsize  = 3'd2;
  assign m_arburst = 2'b01;
  assign m_arvalid = (st == S_AR);
  assign m_rready  = (st == S_R) && out_ready;
  assign out_valid = (st == S_R) && m_rvalid;
  assign out_data  = m_rdata;
  assign out_last  = (words_left == 1);
  assign busy      = (st != S_IDLE);

  // AXI rule: the address must stay stable while ARVALID waits for ARREADY
  property p_ar_stable;
    @(posedge clk) disable iff (!rst_n) m_arvalid && !m_arready |=> m_arvalid && $stable(m_araddr) && $stable(m_arlen);
  endproperty
  a_ar_stable: assert property (p_ar_stable);

endmodule

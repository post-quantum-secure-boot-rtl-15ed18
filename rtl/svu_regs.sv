// svu_regs: AXI4-Lite register file through which boot software drives the
// signature verification unit.
//
//   0x00 CTRL     W  bit 0: start verifying the image at IMG_ADDR (self-clearing)
//                 RW bit 1: abort the cores when that verification fails
//   0x04 STATUS   R  bit 0 busy, bit 1 done, bit 2 pass, bit 3 aborted,
//                    bits 15:8 number of stages verified so far
//   0x08 IMG_ADDR RW address of the stage image (32-bit length, then sm)
//   0x0C CYCLES   R  cycles of the last verification (verifier start to done)
//   0x20-0x3C ROOT R computed Merkle root of the last verification,
//                    first word = most significant
// One write and one read are handled at a time; a write needs AWVALID and
// WVALID together. Unmapped addresses read as zero and take no write;
// every response is OKAY. The register map is this design's own.
module svu_regs (
  input  logic         clk,
  input  logic         rst_n,
  // AXI4-Lite slave
  input  logic [7:0]   s_awaddr,
  input  logic         s_awvalid,
  output logic         s_awready,
  input  logic [31:0]  s_wdata,
  input  logic [3:0]   s_wstrb,
  input  logic         s_wvalid,
  output logic         s_wready,
  output logic [1:0]   s_bresp,
  output logic         s_bvalid,
  input  logic         s_bready,
  input  logic [7:0]   s_araddr,
  input  logic         s_arvalid,
  output logic         s_arready,
  output logic [31:0]  s_rdata,
  output logic [1:0]   s_rresp,
  output logic         s_rvalid,
  input  logic         s_rready,
  // register fields
  output logic         start,
  output logic         abort_en,
  output logic [31:0]  img_addr,
  input  logic         st_busy,
  input  logic         st_done,
  input  logic         st_pass,
  input  logic         st_aborted,
  input  logic [7:0]   st_stages,
  input  logic [31:0]  st_cycles,
  input  logic [255:0] st_root
);

  logic wr;
  assign wr        = s_awvalid && s_wvalid && !s_bvalid;
  assign s_awready = wr;
  assign s_wready  = wr;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;
  assign s_arready = !s_rvalid;

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] d, logic [3:0] be);
    for (int b = 0; b < 4; b++) if (be[b]) old[8*b +: 8] = d[8*b +: 8];
    return old;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start <= 1'b0; abort_en <= 1'b0; img_addr <= '0;
      s_bvalid <= 1'b0; s_rvalid <= 1'b0; s_rdata <= '0;
    end else begin
      start <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr) begin
        s_bvalid <= 1'b1;
        unique case (s_awaddr[7:2])
          6'h00: if (s_wstrb[0]) begin start <= s_wdata[0]; abort_en <= s_wdata[1]; end
          6'h02: img_addr <= merge(img_addr, s_wdata, s_wstrb);
          default: ;
        endcase
      end
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (s_arvalid && s_arready) begin
        s_rvalid <= 1'b1;
        unique casez (s_araddr[7:2])
          6'h00: s_rdata <= {30'd0, abort_en, 1'b0};
          6'h01: s_rdata <= {16'd0, st_stages, 4'd0, st_aborted, st_pass, st_done, st_busy};
          6'h02: s_rdata <= img_addr;
          6'h03: s_rdata <= st_cycles;
          6'b001???: s_rdata <= st_root[255 - 32*s_araddr[4:2] -: 32];
          default: s_rdata <= '0;
        endcase
      end
    end
  end

  // AXI rule: a response stays valid until it is accepted
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n) s_bvalid && !s_bready |=> s_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n) s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));

endmodule

// axil_bram_if: AXI4-Lite subordinate that gives the processor word access to
// the overlay frame buffer (port A of overlay_bram).
//
// Writes: address and data are taken in either order; the write goes to the
// memory with the byte strobes as byte enables, then OKAY is returned.
// Reads: the memory is read in the cycle after the address is taken and the
// data is returned the cycle after that. One transaction of each kind at a
// time; a write has priority over a read in the same cycle. The byte address
// is divided by four to give the word address; higher bits are ignored.
module axil_bram_if #(
  parameter int unsigned AW  = 15,    // word address width of the memory
  parameter int unsigned BAW = AW + 2 // byte address width on the bus
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [BAW-1:0] s_awaddr,
  input  logic           s_awvalid,
  output logic           s_awready,
  input  logic [31:0]    s_wdata,
  input  logic [3:0]     s_wstrb,
  input  logic           s_wvalid,
  output logic           s_wready,
  output logic [1:0]     s_bresp,
  output logic           s_bvalid,
  input  logic           s_bready,
  input  logic [BAW-1:0] s_araddr,
  input  logic           s_arvalid,
  output logic           s_arready,
  output logic [31:0]    s_rdata,
  output logic [1:0]     s_rresp,
  output logic           s_rvalid,
  input  logic           s_rready,
  // memory port
  output logic           m_en,
  output logic [3:0]     m_we,
  output logic [AW-1:0]  m_addr,
  output logic [31:0]    m_wdata,
  input  logic [31:0]    m_rdata
);
  logic          aw_have, w_have, ar_have, rd_wait;
  logic [AW-1:0] aw_a, ar_a;
  logic [31:0]   w_d;
  logic [3:0]    w_s;
  logic          do_wr, do_rd;

  assign s_awready = !aw_have;
  assign s_wready  = !w_have;
  assign s_arready = !ar_have;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  assign do_wr   = aw_have && w_have && !s_bvalid;
  assign do_rd   = !do_wr && ar_have && !rd_wait && !s_rvalid;
  assign m_en    = do_wr || do_rd;
  assign m_we    = do_wr ? w_s : 4'b0;
  assign m_addr  = do_wr ? aw_a : ar_a;
  assign m_wdata = w_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_have <= 1'b0; w_have <= 1'b0; ar_have <= 1'b0; rd_wait <= 1'b0;
      aw_a <= '0; ar_a <= '0; w_d <= '0; w_s <= '0;
      s_bvalid <= 1'b0; s_rvalid <= 1'b0; s_rdata <= '0;
    end else begin
      if (s_awvalid && s_awready) begin aw_have <= 1'b1; aw_a <= s_awaddr[BAW-1:2]; end
      if (s_wvalid && s_wready)   begin w_have <= 1'b1; w_d <= s_wdata; w_s <= s_wstrb; end
      if (s_arvalid && s_arready) begin ar_have <= 1'b1; ar_a <= s_araddr[BAW-1:2]; end
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (s_rvalid && s_rready) begin s_rvalid <= 1'b0; ar_have <= 1'b0; end
      if (do_wr) begin aw_have <= 1'b0; w_have <= 1'b0; s_bvalid <= 1'b1; end
      if (do_rd) rd_wait <= 1'b1;
      if (rd_wait) begin rd_wait <= 1'b0; s_rvalid <= 1'b1; s_rdata <= m_rdata; end
    end
  end

  r_held: assert property (@(posedge clk) disable iff (!rst_n)
    s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata))
    else $error("axil_bram_if: read data changed before RREADY");
endmodule

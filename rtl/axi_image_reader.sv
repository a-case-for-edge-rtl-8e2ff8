// axi_image_reader: AXI4 read manager that fetches the input image from
// processor memory and turns it into a pixel stream (the accelerator's
// Array2xfMat stage).
//
// The image is stored packed, 3 bytes per pixel in the order B, G, R, row after
// row, starting at base (which must be aligned to BURST*4 bytes so that no burst
// crosses a 4 KiB boundary). The manager requests ceil(3*W*H/4) 32-bit words
// in INCR bursts of up to BURST beats and may keep several bursts outstanding.
// Incoming words go into an 8-byte realignment buffer; whenever it holds three
// bytes a pixel leaves it, one per cycle. rready is withdrawn while the buffer
// has no room for another word, which is the only backpressure in the design.
//
// Interface: start (one cycle) with base, cfg_w, cfg_h stable; out_valid and
// out_pix carry the stream, cfg_w * cfg_h pixels; done is high from the last
// pixel until the next start. Read responses are assumed OKAY.
module axi_image_reader
  import bd_pkg::*;
#(
  parameter int unsigned XW    = DIM_W,
  parameter int unsigned BURST = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [31:0]   base,
  input  logic [XW-1:0] cfg_w,
  input  logic [XW-1:0] cfg_h,
  // AXI4 read address channel
  output logic [31:0]   m_araddr,
  output logic [7:0]    m_arlen,
  output logic [2:0]    m_arsize,
  output logic [1:0]    m_arburst,
  output logic          m_arvalid,
  input  logic          m_arready,
  // AXI4 read data channel
  input  logic [31:0]   m_rdata,
  input  logic [1:0]    m_rresp,
  input  logic          m_rlast,
  input  logic          m_rvalid,
  output logic          m_rready,
  // pixel stream
  output logic          out_valid,
  output bgr_t          out_pix,
  output logic          done
);
  logic [21:0] npix, pix_cnt;
  logic [20:0] nwords, req_words, rcv_words;
  logic [63:0] bytes;
  logic [3:0]  nb, nb_after;
  logic        emit, active;

  assign npix   = 22'(cfg_w) * 22'(cfg_h);
  assign nwords = 21'((24'(npix) * 24'd3 + 24'd3) >> 2);

  // address channel
  logic [20:0] left;
  assign left      = nwords - req_words;
  assign m_arsize  = 3'd2;
  assign m_arburst = 2'b01;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_arvalid <= 1'b0; m_araddr <= '0; m_arlen <= '0; req_words <= '0;
    end else if (start) begin
      m_arvalid <= 1'b0; m_araddr <= base; req_words <= '0;
    end else begin
      if (m_arvalid && m_arready) begin
        m_arvalid <= 1'b0;
        m_araddr  <= m_araddr + ((32'(m_arlen) + 1) << 2);
      end else if (!m_arvalid && active && req_words < nwords) begin
        m_arvalid <= 1'b1;
        m_arlen   <= (left >= 21'(BURST)) ? 8'(BURST - 1) : 8'(left - 1'b1);
        req_words <= req_words + ((left >= 21'(BURST)) ? 21'(BURST) : left);
      end
    end
  end

  // realignment buffer
  assign emit     = active && (nb >= 4'd3) && (pix_cnt < npix);
  assign nb_after = emit ? nb - 4'd3 : nb;
  assign m_rready = active && (nb_after <= 4'd4) && (rcv_words < nwords);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bytes <= '0; nb <= '0; pix_cnt <= '0; rcv_words <= '0; active <= 1'b0;
      out_valid <= 1'b0; out_pix <= '0; done <= 1'b0;
    end else if (start) begin
      bytes <= '0; nb <= '0; pix_cnt <= '0; rcv_words <= '0; active <= 1'b1;
      out_valid <= 1'b0; done <= 1'b0;
    end else begin
      logic [63:0] b;
      logic [3:0]  n;
      b = emit ? (bytes >> 24) : bytes;
      n = nb_after;
      if (m_rvalid && m_rready) begin
        b = b | (64'(m_rdata) << (8 * n));
        n = n + 4'd4;
        rcv_words <= rcv_words + 1'b1;
      end
      bytes     <= b;
      nb        <= n;
      out_valid <= emit;
      if (emit) begin
        out_pix <= bgr_t'(bytes[23:0]);
        pix_cnt <= pix_cnt + 1'b1;
        if (pix_cnt == npix - 1'b1) begin
          done   <= 1'b1;
          active <= 1'b0;
        end
      end
    end
  end

  ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_arvalid && !m_arready |=> m_arvalid && $stable(m_araddr) && $stable(m_arlen))
    else $error("axi_image_reader: AR changed while waiting for arready");
endmodule

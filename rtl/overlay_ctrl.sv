// overlay_ctrl: draws the overlay frame buffer over the HDMI output video.
//
// It sits in an AXI4-Stream video path (tuser = start of frame, tlast = end of
// line, tdata = one 24-bit pixel {R, G, B}). Each output pixel at (x, y) looks
// up overlay pixel (x/SCALE, y/SCALE), so the 480 x 270 overlay covers a
// 1920 x 1080 picture. An overlay byte is {opaque, R[1:0], G[2:0], B[1:0]}:
// with bit 7 clear it is transparent and the video pixel passes unchanged,
// otherwise the 2-3-2 colour, widened to 8 bits per channel by repeating its
// bits, replaces it. Video outside the overlay area passes unchanged.
//
// Timing: one register stage with full handshake, one pixel per cycle,
// latency 1 cycle; the frame buffer is read in the cycle a pixel is accepted.
// The controller runs from the video clock, independently of the accelerator.
module overlay_ctrl
  import bd_pkg::*;
#(
  parameter int unsigned OW    = OVL_W,
  parameter int unsigned OH    = OVL_H,
  parameter int unsigned SCALE = OVL_SCALE,
  parameter int unsigned PW    = $clog2(OW * OH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [23:0]   s_tdata,
  input  logic          s_tuser,
  input  logic          s_tlast,
  input  logic          s_tvalid,
  output logic          s_tready,
  output logic [23:0]   m_tdata,
  output logic          m_tuser,
  output logic          m_tlast,
  output logic          m_tvalid,
  input  logic          m_tready,
  // frame buffer read port
  output logic          ovl_en,
  output logic [PW-1:0] ovl_pix,
  input  logic [7:0]    ovl_data
);
  logic [11:0] x, y, cx, cy;
  logic [23:0] pix_r;
  logic        in_area, in_area_r, accept;

  // coordinates of the incoming pixel: tuser restarts the frame
  assign cx     = s_tuser ? 12'd0 : x;
  assign cy     = s_tuser ? 12'd0 : y;
  assign in_area = (32'(cx) < OW * SCALE) && (32'(cy) < OH * SCALE);
  assign accept = s_tvalid && s_tready;
  assign s_tready = !m_tvalid || m_tready;
  assign ovl_en   = accept;
  assign ovl_pix  = PW'((32'(cy) / SCALE) * OW + 32'(cx) / SCALE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; m_tvalid <= 1'b0; m_tuser <= 1'b0; m_tlast <= 1'b0;
      pix_r <= '0; in_area_r <= 1'b0;
    end else begin
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;
      if (accept) begin
        m_tvalid <= 1'b1;
        m_tuser  <= s_tuser;
        m_tlast  <= s_tlast;
        pix_r    <= s_tdata;
        in_area_r <= in_area;
        if (s_tlast) begin x <= '0; y <= cy + 1'b1; end
        else begin x <= cx + 1'b1; y <= cy; end
      end
    end
  end

  always_comb begin
    logic [7:0] r8, g8, b8;
    r8 = {4{ovl_data[6:5]}};
    g8 = {ovl_data[4:2], ovl_data[4:2], ovl_data[4:3]};
    b8 = {4{ovl_data[1:0]}};
    m_tdata = (in_area_r && ovl_data[7]) ? {r8, g8, b8} : pix_r;
  end

  out_held: assert property (@(posedge clk) disable iff (!rst_n)
    m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata))
    else $error("overlay_ctrl: output changed while stalled");
endmodule

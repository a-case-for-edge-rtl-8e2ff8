// gaussian_blur: 3 x 3 Gaussian blur of a BGR pixel stream.
//
// The Gaussian kernel is separable, so it is set by two run-time weights in
// unsigned Q0.16: the centre tap wc and the side tap ws of the 1-D kernel, with
// wc + 2*ws = 65536. The host derives them from sigma
// (ws = e/(1+2e), wc = 1/(1+2e), e = exp(-1/(2 sigma^2))); sigma stays a
// run-time argument while the 3 x 3 size and the border rule are fixed.
// Each channel is filtered vertically, then horizontally, and rounded to 8 bits.
// Pixels outside the image count as zero (constant border).
//
// Interface: push stream in (in_valid/in_pix), push stream out (out_valid/
// out_pix), one pixel per cycle. start begins a frame of cfg_w x cfg_h pixels.
// Latency: cfg_w + 1 input pixels plus 2 cycles (window, then arithmetic).
module gaussian_blur
  import bd_pkg::*;
#(
  parameter int unsigned MAXW = MAX_W,
  parameter int unsigned XW   = DIM_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [XW-1:0] cfg_w,
  input  logic [XW-1:0] cfg_h,
  input  logic [15:0]   wc,
  input  logic [15:0]   ws,
  input  logic          in_valid,
  input  bgr_t          in_pix,
  output logic          out_valid,
  output bgr_t          out_pix,
  output logic          done
);
  logic          wv;
  logic [23:0]   win [3][3];
  logic [XW-1:0] wx, wy;
  logic          wdone;
  bgr_t          blurred;

  sliding_window #(.K(3), .DW(24), .MAXW(MAXW), .XW(XW), .BORDER('0)) u_win (
    .clk, .rst_n, .start, .cfg_w, .cfg_h,
    .in_valid, .in_data(in_pix),
    .win_valid(wv), .win, .win_x(wx), .win_y(wy), .done(wdone)
  );

  function automatic logic [7:0] blur1(input logic [7:0] p [3][3],
                                       input logic [15:0] c, input logic [15:0] s);
    logic [24:0] v [3];
    logic [41:0] h;
    for (int x = 0; x < 3; x++)
      v[x] = 25'(p[0][x]) * s + 25'(p[1][x]) * c + 25'(p[2][x]) * s;
    h = 42'(v[0]) * s + 42'(v[1]) * c + 42'(v[2]) * s + (42'd1 << 31);
    h = h >> 32;
    return (h > 42'd255) ? 8'd255 : h[7:0];
  endfunction

  always_comb begin
    logic [7:0] pr [3][3];
    logic [7:0] pg [3][3];
    logic [7:0] pb [3][3];
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        pr[r][c] = win[r][c][23:16];
        pg[r][c] = win[r][c][15:8];
        pb[r][c] = win[r][c][7:0];
      end
    blurred = '{r: blur1(pr, wc, ws), g: blur1(pg, wc, ws), b: blur1(pb, wc, ws)};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= wv;
      if (wv) out_pix <= blurred;
      done      <= wdone && !start;
    end
  end
endmodule

// bgr2hsv: colour conversion from 8-bit BGR to OpenCV's 8-bit HSV
// (H in 0..179 = degrees / 2, S and V in 0..255).
//
// V = max(R,G,B) and diff = V - min(R,G,B). The two divisions of the
// conversion are done, as OpenCV's integer path does them, by multiplying with
// reciprocal tables in Q12 that are computed at elaboration:
//   S = (diff * round(255*4096 / V) + 2048) >> 12
//   H = (h' * round(180*4096 / (6*diff)) + 2048) >> 12, plus 180 if negative,
// where h' = G-B if V = R, B-R+2*diff if V = G, else R-G+4*diff.
// A grey pixel (diff = 0) gets H = 0, a black one S = 0.
//
// Interface: push stream, one pixel per cycle, latency 1 cycle.
module bgr2hsv
  import bd_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  bgr_t in_pix,
  output logic out_valid,
  output hsv_t out_pix
);
  typedef logic [19:0] rtab_t [256];

  function automatic rtab_t mk_recip(input int unsigned num);
    rtab_t t;
    t[0] = '0;
    for (int unsigned i = 1; i < 256; i++) t[i] = 20'((num + i / 2) / i);
    return t;
  endfunction

  localparam rtab_t SDIV = mk_recip(255 * 4096);       // 255 / v
  localparam rtab_t HDIV = mk_recip(180 * 4096 / 6);   // 30 / diff

  hsv_t hsv;

  always_comb begin
    logic [7:0]         mx, mn, dif;
    logic signed [11:0] hp;
    logic signed [33:0] hq;
    logic [29:0]        sq;
    logic signed [11:0] hh;
    mx  = in_pix.r; mn = in_pix.r;
    if (in_pix.g > mx) mx = in_pix.g;
    if (in_pix.b > mx) mx = in_pix.b;
    if (in_pix.g < mn) mn = in_pix.g;
    if (in_pix.b < mn) mn = in_pix.b;
    dif = mx - mn;
    if (mx == in_pix.r)
      hp = $signed({4'b0, in_pix.g}) - $signed({4'b0, in_pix.b});
    else if (mx == in_pix.g)
      hp = $signed({4'b0, in_pix.b}) - $signed({4'b0, in_pix.r}) + $signed({3'b0, dif, 1'b0});
    else
      hp = $signed({4'b0, in_pix.r}) - $signed({4'b0, in_pix.g}) + $signed({2'b0, dif, 2'b0});
    sq = 30'(dif) * 30'(SDIV[mx]) + 30'd2048;
    hq = 34'(hp) * $signed({14'b0, HDIV[dif]}) + 34'sd2048;
    hh = 12'(hq >>> 12);
    if (hh < 0) hh = hh + 12'sd180;
    hsv.v = mx;
    hsv.s = 8'(sq >> 12);
    hsv.h = 8'(hh);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_pix <= hsv;
    end
  end
endmodule

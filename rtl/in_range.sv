// in_range: three-channel range test, like OpenCV's inRange on an HSV image.
//
// A pixel is in range (output 1) when lo.c <= pix.c <= hi.c for each of the
// three channels H, S and V; otherwise 0. The bounds are run-time inputs; the
// accelerator ties them to the two green ranges. The mask is one bit per pixel.
//
// Interface: push stream, one pixel per cycle, latency 1 cycle.
module in_range
  import bd_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  hsv_t lo,
  input  hsv_t hi,
  input  logic in_valid,
  input  hsv_t in_pix,
  output logic out_valid,
  output logic out_bit
);
  logic hit;
  assign hit = (in_pix.h >= lo.h) && (in_pix.h <= hi.h) &&
               (in_pix.s >= lo.s) && (in_pix.s <= hi.s) &&
               (in_pix.v >= lo.v) && (in_pix.v <= hi.v);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_bit <= hit;
    end
  end
endmodule

// dilate: morphological dilation of a binary mask with a K x K square.
//
// The mask images in this pipeline are binary (OpenCV stores them as 0/255;
// here one bit per pixel), so dilation is the OR of the K x K neighbourhood.
// Pixels outside the image count as 0, so they never add to the result, which
// matches OpenCV's default border for morphology. The pipeline uses K = 7 for
// the closing of the green region and K = 3 for the edge extraction.
//
// Interface: push stream in and out, one pixel per cycle; start begins a frame
// of cfg_w x cfg_h pixels. Latency: R*cfg_w + R input pixels (R = (K-1)/2)
// plus 2 cycles; the block flushes its last rows by itself.
module dilate
  import bd_pkg::*;
#(
  parameter int unsigned K    = 3,
  parameter int unsigned MAXW = MAX_W,
  parameter int unsigned XW   = DIM_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [XW-1:0] cfg_w,
  input  logic [XW-1:0] cfg_h,
  input  logic          in_valid,
  input  logic          in_bit,
  output logic          out_valid,
  output logic          out_bit,
  output logic          done
);
  logic          wv, wdone, any;
  logic [0:0]    win [K][K];
  logic [XW-1:0] wx, wy;

  sliding_window #(.K(K), .DW(1), .MAXW(MAXW), .XW(XW), .BORDER(1'b0)) u_win (
    .clk, .rst_n, .start, .cfg_w, .cfg_h,
    .in_valid, .in_data(in_bit),
    .win_valid(wv), .win, .win_x(wx), .win_y(wy), .done(wdone)
  );

  always_comb begin
    any = 1'b0;
    for (int r = 0; r < K; r++)
      for (int c = 0; c < K; c++) any |= win[r][c][0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_bit <= 1'b0; done <= 1'b0;
    end else begin
      out_valid <= wv;
      if (wv) out_bit <= any;
      done <= wdone && !start;
    end
  end
endmodule

// sliding_window: K x K neighbourhood generator for a raster-order pixel stream.
//
// The stream is push only: a pixel arrives whenever in_valid is high, in raster
// order, cfg_w x cfg_h pixels per frame, and every downstream stage keeps up at
// one pixel per cycle. start clears the frame counters and must come before the
// first pixel of each frame.
//
// K-1 line buffers, addressed by column, hold the previous rows. Each accepted
// pixel (a "tick") reads one column of K pixels and shifts it into a K x K
// register window. The window centre therefore lags the newest pixel by
// R*W + R ticks (R = (K-1)/2) in linear raster order, so after the last input
// pixel the block makes that many flush ticks on its own, one per cycle, to
// push out the bottom rows. Window elements that fall outside the image (above,
// below, left of or right of it, including the ones that wrapped from a
// neighbouring row) are replaced by BORDER, which is how the filters choose
// their border rule.
//
// Timing: win_valid is high one cycle after the tick that completes a window;
// win, win_x and win_y are valid with it. Exactly cfg_w * cfg_h windows are
// produced per frame; done rises after the last one and stays high until start.
module sliding_window #(
  parameter int unsigned K      = 3,
  parameter int unsigned DW     = 8,
  parameter int unsigned MAXW   = 1024,
  parameter int unsigned XW     = 11,
  parameter logic [DW-1:0] BORDER = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [XW-1:0]     cfg_w,
  input  logic [XW-1:0]     cfg_h,
  input  logic              in_valid,
  input  logic [DW-1:0]     in_data,
  output logic              win_valid,
  output logic [DW-1:0]     win [K][K],   // [row][col], row 0 = top
  output logic [XW-1:0]     win_x,
  output logic [XW-1:0]     win_y,
  output logic              done
);
  localparam int unsigned R  = (K - 1) / 2;
  localparam int unsigned LW = 2 * XW + 1;

  logic [DW-1:0] lb [K-1][MAXW];
  logic [DW-1:0] sh [K][K];
  logic [XW-1:0] xi, yi, xc, yc;
  logic [LW-1:0] lag;
  logic          in_done, out_done, tick, centre;
  logic [DW-1:0] col [K];
  logic [DW-1:0] pix;

  assign in_done  = (yi >= cfg_h);
  assign out_done = (yc >= cfg_h);
  assign tick     = in_done ? !out_done : in_valid;
  assign centre   = (lag == LW'(R * cfg_w + R));
  assign pix      = in_done ? BORDER : in_data;
  assign done     = out_done;

  always_comb begin
    col[K-1] = pix;
    for (int j = 0; j < K - 1; j++) col[K-2-j] = lb[j][xi];
  end

  // line buffers: a column shifts down one row per tick
  always_ff @(posedge clk) begin
    if (tick) begin
      lb[0][xi] <= pix;
      for (int j = 1; j < K - 1; j++) lb[j][xi] <= lb[j-1][xi];
    end
  end

  always_ff @(posedge clk) begin
    if (tick) begin
      for (int r = 0; r < K; r++) begin
        for (int c = 0; c < K - 1; c++) sh[r][c] <= sh[r][c+1];
        sh[r][K-1] <= col[r];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xi <= '0; yi <= '1; xc <= '0; yc <= '1; lag <= '0; win_valid <= 1'b0;
      win_x <= '0; win_y <= '0;
    end else if (start) begin
      xi <= '0; yi <= '0; xc <= '0; yc <= '0; lag <= '0; win_valid <= 1'b0;
    end else begin
      win_valid <= tick && centre;
      if (tick) begin
        if (xi == cfg_w - 1'b1) begin xi <= '0; yi <= yi + 1'b1; end
        else xi <= xi + 1'b1;
        if (!centre) lag <= lag + 1'b1;
        else begin
          win_x <= xc;
          win_y <= yc;
          if (xc == cfg_w - 1'b1) begin xc <= '0; yc <= yc + 1'b1; end
          else xc <= xc + 1'b1;
        end
      end
    end
  end

  // replace elements outside the image by BORDER
  always_comb begin
    for (int r = 0; r < K; r++) begin
      for (int c = 0; c < K; c++) begin
        logic signed [XW+1:0] px, py;
        px = $signed({2'b00, win_x}) + (c - int'(R));
        py = $signed({2'b00, win_y}) + (r - int'(R));
        if (px < 0 || px >= $signed({2'b00, cfg_w}) || py < 0 || py >= $signed({2'b00, cfg_h}))
          win[r][c] = BORDER;
        else
          win[r][c] = sh[r][c];
      end
    end
  end

  no_input_while_flushing: assert property (@(posedge clk) disable iff (!rst_n)
    in_done |-> !in_valid)
    else $error("sliding_window: pixel received after the frame was complete");
endmodule

// tb_dilate: random binary masks through 3x3 and 7x7 dilation, with gaps in the
// input stream and two frames of different sizes. The expected output is the
// OR over the neighbourhood, clipped to the image, computed here directly.
// Also checks the output count, the done flag and the latency to the first
// output (R*W + R input pixels, plus the window and filter registers).
module tb_dilate;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int MAXW = 32;
  logic start, in_valid, in_bit;
  logic [10:0] cfg_w, cfg_h;
  logic v3, b3, d3, v7, b7, d7;
  int checks = 0, failures = 0;
  logic img [24][32];
  int n3, n7, nin, first3, first7;

  dilate #(.K(3), .MAXW(MAXW)) u3 (.clk, .rst_n, .start, .cfg_w, .cfg_h, .in_valid, .in_bit,
                                   .out_valid(v3), .out_bit(b3), .done(d3));
  dilate #(.K(7), .MAXW(MAXW)) u7 (.clk, .rst_n, .start, .cfg_w, .cfg_h, .in_valid, .in_bit,
                                   .out_valid(v7), .out_bit(b7), .done(d7));

  function automatic logic ref_px(int x, int y, int r);
    logic a = 0;
    for (int dy = -r; dy <= r; dy++)
      for (int dx = -r; dx <= r; dx++)
        if (x + dx >= 0 && x + dx < int'(cfg_w) && y + dy >= 0 && y + dy < int'(cfg_h))
          a |= img[y + dy][x + dx];
    return a;
  endfunction

  always @(posedge clk) begin
    if (rst_n && v3) begin
      checks++;
      if (n3 == 0) first3 = nin;
      if (b3 != ref_px(n3 % int'(cfg_w), n3 / int'(cfg_w), 1)) failures++;
      n3++;
    end
    if (rst_n && v7) begin
      checks++;
      if (n7 == 0) first7 = nin;
      if (b7 != ref_px(n7 % int'(cfg_w), n7 / int'(cfg_w), 3)) failures++;
      n7++;
    end
    if (in_valid) nin++;
  end

  task automatic frame(int w, int h, int density);
    cfg_w = 11'(w); cfg_h = 11'(h);
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) img[y][x] = ($urandom % 100) < density;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    n3 = 0; n7 = 0; nin = 0; first3 = -1; first7 = -1;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        while ($urandom % 4 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_bit = img[y][x];
        @(negedge clk);
      end
    in_valid = 0;
    while (!(d3 && d7)) @(negedge clk);
    repeat (2) @(negedge clk);
    checks += 4;
    if (n3 != w * h) begin failures++; $display("FAIL count3 %0d", n3); end
    if (n7 != w * h) begin failures++; $display("FAIL count7 %0d", n7); end
    if (first3 < w + 2 || first3 > w + 4) begin failures++; $display("FAIL lat3 %0d", first3); end
    if (first7 < 3 * w + 4 || first7 > 3 * w + 6) begin failures++; $display("FAIL lat7 %0d", first7); end
  endtask

  initial begin
    start = 0; in_valid = 0; in_bit = 0; cfg_w = 20; cfg_h = 10;
    repeat (3) @(negedge clk); rst_n = 1;
    frame(20, 13, 8);
    frame(32, 24, 3);
    frame(9, 7, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

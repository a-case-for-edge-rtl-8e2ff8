// tb_gaussian_blur: random colour images through the 3x3 blur with two weight
// sets (the 1/4,1/2,1/4 kernel and a sigma = 0.6 kernel). The expected value of
// each channel is sum(p * w(dy) * w(dx)) over the in-image neighbours, rounded
// at 2^-32, computed here as a 2-D sum. Also checks count and latency.
module tb_gaussian_blur;
  import bd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, in_valid, out_valid, done;
  logic [10:0] cfg_w, cfg_h;
  logic [15:0] wc, ws;
  bgr_t in_pix, out_pix;
  bgr_t img [16][24];
  int checks = 0, failures = 0, nout, nin, first;

  gaussian_blur #(.MAXW(32)) dut (.*);

  function automatic bgr_t ref_px(int x, int y);
    longint acc [3];
    bgr_t o;
    longint w [3];
    bgr_t p;
    w[0] = ws; w[1] = wc; w[2] = ws;
    acc = '{0, 0, 0};
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        if (x + dx >= 0 && x + dx < int'(cfg_w) && y + dy >= 0 && y + dy < int'(cfg_h)) begin
          p = img[y + dy][x + dx];
          acc[0] += longint'(p.r) * w[dy + 1] * w[dx + 1];
          acc[1] += longint'(p.g) * w[dy + 1] * w[dx + 1];
          acc[2] += longint'(p.b) * w[dy + 1] * w[dx + 1];
        end
    for (int c = 0; c < 3; c++) begin
      acc[c] = (acc[c] + (64'd1 << 31)) >> 32;
      if (acc[c] > 255) acc[c] = 255;
    end
    o.r = 8'(acc[0]); o.g = 8'(acc[1]); o.b = 8'(acc[2]);
    return o;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      bgr_t e;
      e = ref_px(nout % int'(cfg_w), nout / int'(cfg_w));
      checks++;
      if (nout == 0) first = nin;
      if (out_pix != e) begin
        failures++;
        if (failures < 10) $display("FAIL px %0d got %h exp %h", nout, out_pix, e);
      end
      nout++;
    end
    if (in_valid) nin++;
  end

  task automatic frame(int w, int h, int c, int s);
    cfg_w = 11'(w); cfg_h = 11'(h); wc = 16'(c); ws = 16'(s);
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) img[y][x] = bgr_t'($urandom);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    nout = 0; nin = 0; first = -1;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        while ($urandom % 5 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_pix = img[y][x];
        @(negedge clk);
      end
    in_valid = 0;
    while (!done) @(negedge clk);
    repeat (2) @(negedge clk);
    checks += 2;
    if (nout != w * h) begin failures++; $display("FAIL count %0d", nout); end
    if (first < w + 2 || first > w + 4) begin failures++; $display("FAIL latency %0d", first); end
  endtask

  initial begin
    start = 0; in_valid = 0; in_pix = '0; cfg_w = 8; cfg_h = 8; wc = 0; ws = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    frame(24, 16, 32768, 16384);
    // sigma = 0.6: e = exp(-1/0.72) = 0.2494, wc = 1/(1+2e), ws = e/(1+2e)
    frame(17, 11, 43708, 10914);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

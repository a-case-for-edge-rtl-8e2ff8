// tb_bgr2hsv: random and corner-case BGR pixels through bgr2hsv, compared with
// the HSV definition in real arithmetic (H = hue/2, S = 255*(max-min)/max);
// the integer reciprocal method may differ from exact rounding by 1.
module tb_bgr2hsv;
  import bd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  bgr_t in_pix;
  hsv_t out_pix;
  int checks = 0, failures = 0;

  bgr2hsv dut (.*);

  function automatic hsv_t ref_hsv(bgr_t p);
    real r, g, b, mx, mn, d, h;
    hsv_t o;
    r = p.r; g = p.g; b = p.b;
    mx = r; if (g > mx) mx = g; if (b > mx) mx = b;
    mn = r; if (g < mn) mn = g; if (b < mn) mn = b;
    d = mx - mn;
    o.v = 8'($rtoi(mx));
    o.s = (mx == 0) ? 8'd0 : 8'($rtoi(255.0 * d / mx + 0.5));
    if (d == 0) h = 0;
    else if (mx == r) h = 60.0 * (g - b) / d;
    else if (mx == g) h = 120.0 + 60.0 * (b - r) / d;
    else h = 240.0 + 60.0 * (r - g) / d;
    if (h < 0) h += 360.0;
    o.h = 8'($rtoi(h / 2.0 + 0.5) % 180);
    return o;
  endfunction

  function automatic int adiff(int a, int b, int m);
    int d;
    d = (a > b) ? a - b : b - a;
    if (m > 0 && d > m / 2) d = m - d;
    return d;
  endfunction

  task automatic one(bgr_t p);
    hsv_t e;
    @(negedge clk); in_valid = 1; in_pix = p;
    @(negedge clk); in_valid = 0;
    e = ref_hsv(p);
    checks++;
    if (!out_valid || out_pix.v != e.v || adiff(out_pix.s, e.s, 0) > 1 ||
        adiff(out_pix.h, e.h, 180) > 1) begin
      failures++;
      $display("FAIL bgr=%h got h%0d s%0d v%0d exp h%0d s%0d v%0d", p, out_pix.h, out_pix.s,
               out_pix.v, e.h, e.s, e.v);
    end
  endtask

  initial begin
    in_valid = 0; in_pix = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    one('{r: 8'd0, g: 8'd0, b: 8'd0});
    one('{r: 8'd255, g: 8'd255, b: 8'd255});
    one('{r: 8'd255, g: 8'd0, b: 8'd0});
    one('{r: 8'd0, g: 8'd255, b: 8'd0});
    one('{r: 8'd0, g: 8'd0, b: 8'd255});
    one('{r: 8'd40, g: 8'd120, b: 8'd60});     // board green
    one('{r: 8'd255, g: 8'd0, b: 8'd1});       // hue just below 360
    for (int i = 0; i < 3000; i++) one(bgr_t'($urandom));
    // throughput: back-to-back pixels, one result per cycle
    begin
      bgr_t q [8];
      for (int i = 0; i < 8; i++) q[i] = bgr_t'($urandom);
      for (int i = 0; i < 9; i++) begin
        @(negedge clk);
        if (i > 0) begin
          checks++;
          if (!out_valid || out_pix.v != ref_hsv(q[i-1]).v) failures++;
        end
        in_valid = (i < 8);
        if (i < 8) in_pix = q[i];
      end
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

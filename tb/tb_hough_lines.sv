// tb_hough_lines: edge images with known lines plus random noise go through
// hough_lines at a reduced size (64 x 64 maximum, 8 lines kept). A reference
// Hough transform in real arithmetic here (same bin rule, same local-maximum
// rule, same ordering) gives the expected line list; the float outputs are
// converted back to real and compared. Also checked: the number of maxima
// found, lines dropped beyond LINESMAX, repetition of the last line when fewer
// are found, zeros when none is, that vote forwarding occurred, and the cycle
// counts of the INIT and SCAN phases.
module tb_hough_lines;
  import bd_pkg::*;
  localparam int MAXW = 64, MAXH = 64, LM = 8, NT = 60, RHO = 3;
  localparam int NRHO = hough_nrho(MAXW, MAXH, RHO);
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, in_valid, in_bit, vote_ready, done, fwd_hit;
  logic [10:0] cfg_w, cfg_h;
  logic [15:0] threshold, nfound;
  logic [3:0]  nlines;
  logic [2:0]  rho_idx, theta_idx;
  logic [31:0] rho_f32, theta_f32;
  int checks = 0, failures = 0, fwd_count = 0, overflow_seen = 0, pad_seen = 0;

  hough_lines #(.MAXW(MAXW), .MAXH(MAXH), .LINESMAX(LM)) dut (.*);

  always @(posedge clk) if (rst_n && fwd_hit) fwd_count++;

  logic img [48][64];
  int   acc [NT][NRHO];

  function automatic real f32_to_real(logic [31:0] f);
    real m;
    int e;
    if (f[30:0] == 0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    e = int'(f[30:23]) - 127;
    m = m * (2.0 ** e);
    return f[31] ? -m : m;
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(int w, int h, int thr);
    int t0, t1, t2, nf, n;
    int lv [$], lr [$], lt [$];
    // reference
    for (int t = 0; t < NT; t++) for (int r = 0; r < NRHO; r++) acc[t][r] = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++)
        if (img[y][x])
          for (int t = 0; t < NT; t++) begin
            real rs;
            int b;
            rs = ((x - w / 2.0) * $cos(PI * t / NT) + (y - h / 2.0) * $sin(PI * t / NT)) / RHO;
            b = int'($floor(rs + 2.0 ** -12)) + NRHO / 2;
            if (b < 0) b = 0;
            if (b > NRHO - 1) b = NRHO - 1;
            acc[t][b]++;
          end
    for (int t = 0; t < NT; t++)
      for (int r = 0; r < NRHO; r++) begin
        int c;
        c = acc[t][r];
        if (c > thr && c > (r > 0 ? acc[t][r-1] : 0) && c >= (r < NRHO - 1 ? acc[t][r+1] : 0) &&
            c > (t > 0 ? acc[t-1][r] : 0) && c >= (t < NT - 1 ? acc[t+1][r] : 0)) begin
          int k;
          k = 0;
          while (k < lv.size() && (lv[k] > c || (lv[k] == c && lt[k] < t) ||
                                   (lv[k] == c && lt[k] == t && lr[k] < r))) k++;
          lv.insert(k, c); lr.insert(k, r); lt.insert(k, t);
        end
      end
    nf = lv.size();
    n  = (nf > LM) ? LM : nf;
    // DUT
    cfg_w = 11'(w); cfg_h = 11'(h); threshold = 16'(thr);
    @(negedge clk); start = 1; t0 = $time / 10; @(negedge clk); start = 0;
    while (!vote_ready) @(negedge clk);
    t1 = $time / 10;
    check($sformatf("init cycles %0d", t1 - t0), (t1 - t0) >= NT && (t1 - t0) <= NT + 2);
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        while ($urandom % 6 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_bit = img[y][x];
        @(negedge clk);
      end
    in_valid = 0;
    t1 = $time / 10;
    while (!done) @(negedge clk);
    t2 = $time / 10;
    check($sformatf("scan cycles %0d", t2 - t1),
          (t2 - t1) >= 2 * (NRHO + 1) + NRHO * NT && (t2 - t1) <= 2 * (NRHO + 1) + NRHO * NT + 6);
    check($sformatf("nfound %0d exp %0d", nfound, nf), int'(nfound) == nf);
    check($sformatf("nlines %0d exp %0d", nlines, n), int'(nlines) == n);
    if (nf > LM) overflow_seen++;
    if (n > 0 && n < LM) pad_seen++;
    for (int i = 0; i < LM; i++) begin
      real er, et;
      int j;
      rho_idx = 3'(i); theta_idx = 3'(LM - 1 - i);
      #1;
      j = (i < n) ? i : n - 1;
      er = (n == 0) ? 0.0 : (lr[j] - NRHO / 2 + 0.5) * RHO;
      check($sformatf("rho[%0d] %f exp %f", i, f32_to_real(rho_f32), er),
            f32_to_real(rho_f32) == er);
      j = (LM - 1 - i < n) ? LM - 1 - i : n - 1;
      et = (n == 0) ? 0.0 : PI * lt[j] / NT;
      check($sformatf("theta[%0d] %f exp %f", LM - 1 - i, f32_to_real(theta_f32), et),
            f32_to_real(theta_f32) - et < 1e-6 && et - f32_to_real(theta_f32) < 1e-6);
    end
  endtask

  task automatic clear_img();
    for (int y = 0; y < 48; y++) for (int x = 0; x < 64; x++) img[y][x] = 0;
  endtask

  initial begin
    start = 0; in_valid = 0; in_bit = 0; cfg_w = 48; cfg_h = 40; threshold = 0;
    rho_idx = 0; theta_idx = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // frame 1: a rectangle outline, a diagonal and noise: more maxima than LM
    clear_img();
    for (int x = 6; x < 42; x++) begin img[8][x] = 1; img[33][x] = 1; end
    for (int y = 8; y < 34; y++) begin img[y][6] = 1; img[y][41] = 1; end
    for (int i = 0; i < 30; i++) img[5 + i][10 + i] = 1;
    for (int i = 0; i < 60; i++) img[$urandom % 40][$urandom % 48] = 1;
    run(48, 40, 12);
    // frame 2: two lines on an odd-sized image, fewer maxima than LM
    clear_img();
    for (int x = 0; x < 37; x++) img[20][x] = 1;
    for (int y = 0; y < 29; y++) img[y][11] = 1;
    run(37, 29, 20);
    // frame 3: nothing above the threshold
    clear_img();
    for (int i = 0; i < 20; i++) img[$urandom % 30][$urandom % 30] = 1;
    run(30, 30, 40);
    check("vote forwarding happened", fwd_count > 0);
    check("lines dropped beyond LINESMAX", overflow_seen > 0);
    check("last line repeated", pad_seen > 0);
    $display("forwarded votes: %0d", fwd_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

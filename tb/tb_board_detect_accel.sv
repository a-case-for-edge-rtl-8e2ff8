// tb_board_detect_accel: the detection accelerator on its own, at a reduced
// maximum size (64 x 64), with a memory model on its three AXI managers and
// the processor side played by tasks on the AXI-Lite port.
//
// Three runs on synthetic board pictures (green board with stones on a brown
// table, pixel noise), each loaded into memory at its own size:
//   1. 60 x 44, threshold 40: the four board sides must be among the lines
//      (theta 0 or 90 degrees, rho within a bin and a half of the true edge),
//      and the arrays past NLINES must repeat the last line;
//   2. 64 x 64, the largest picture, with the board moved: the run-time size
//      changes between runs, and the four sides of the new board must be
//      found (sides placed near bin centres, as a side on a bin edge splits
//      its votes between two bins);
//   3. 60 x 44 again with threshold 6: more maxima than LINESMAX, arrays full.
// Every run checks the CTRL bits, that irq_done pulses exactly once, that
// NLINES matches the lines in the arrays, and that no memory outside the
// picture is read and none outside the two arrays written.
//
// Mechanisms counted (each must occur): read data backpressure, vote
// forwarding, a refused start, a change of image size, lines dropped beyond
// LINESMAX, repetition of the last line.
module tb_board_detect_accel;
  import bd_pkg::*;
  localparam int MAXW = 64, MAXH = 64;
  localparam int LINES = HOUGH_LINESMAX;
  localparam int STONE_R = 2;
  localparam longint WATCHDOG = 400000;
  localparam real PI = 3.14159265358979323846;
  localparam int IMG = 32'h0010_0000, RHOA = 32'h0020_0000, THA = 32'h0020_1000;

  int W, H, bx0, bx1, by0, by1;            // picture and board of the current run

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]  s_awaddr, s_araddr;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0]  s_wstrb;
  logic [1:0]  s_bresp, s_rresp;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready, irq_done;
  logic [31:0] img_araddr, img_rdata, rho_awaddr, rho_wdata, th_awaddr, th_wdata;
  logic [7:0]  img_arlen, rho_awlen, th_awlen;
  logic [2:0]  img_arsize, rho_awsize, th_awsize;
  logic [1:0]  img_arburst, img_rresp, rho_awburst, th_awburst, rho_bresp, th_bresp;
  logic [3:0]  rho_wstrb, th_wstrb;
  logic img_arvalid, img_arready, img_rlast, img_rvalid, img_rready;
  logic rho_awvalid, rho_awready, rho_wlast, rho_wvalid, rho_wready, rho_bvalid, rho_bready;
  logic th_awvalid, th_awready, th_wlast, th_wvalid, th_wready, th_bvalid, th_bready;

  int rd_stalls, wr_bursts;
  int checks = 0, failures = 0;
  int n_fwd = 0, n_overflow = 0, n_pad = 0, n_refused = 0, n_resize = 0, n_irq = 0, n_starts = 0;
  int bad_reads = 0, bad_writes = 0;

  board_detect_accel #(.MAXW(MAXW), .MAXH(MAXH)) dut (.*);

  assign rho_bresp = 2'b00;
  assign th_bresp  = 2'b00;
  axi_mem_model u_mem (
    .clk, .rst_n,
    .araddr(img_araddr), .arlen(img_arlen), .arvalid(img_arvalid), .arready(img_arready),
    .rdata(img_rdata), .rresp(img_rresp), .rlast(img_rlast), .rvalid(img_rvalid), .rready(img_rready),
    .aw0addr(rho_awaddr), .aw0valid(rho_awvalid), .aw0ready(rho_awready),
    .w0data(rho_wdata), .w0last(rho_wlast), .w0valid(rho_wvalid), .w0ready(rho_wready),
    .b0valid(rho_bvalid), .b0ready(rho_bready),
    .aw1addr(th_awaddr), .aw1valid(th_awvalid), .aw1ready(th_awready),
    .w1data(th_wdata), .w1last(th_wlast), .w1valid(th_wvalid), .w1ready(th_wready),
    .b1valid(th_bvalid), .b1ready(th_bready),
    .rd_stalls, .wr_bursts
  );

  // bus monitors: reads stay inside the picture rounded up to whole bursts,
  // writes are single bursts onto the two arrays
  always @(posedge clk) if (rst_n) begin
    if (dut.u_hough.fwd_hit) n_fwd++;
    if (dut.u_ctrl.start) n_starts++;
    if (irq_done) n_irq++;
    if (img_arvalid && img_arready &&
        (img_araddr < IMG || img_araddr + 4 * (img_arlen + 1) > IMG + ((3 * W * H + 63) / 64) * 64))
      bad_reads++;
    if (rho_awvalid && rho_awready && (rho_awaddr != RHOA || rho_awlen != 8'(LINES - 1))) bad_writes++;
    if (th_awvalid && th_awready && (th_awaddr != THA || th_awlen != 8'(LINES - 1))) bad_writes++;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic acc_wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    s_awvalid = 1; s_awaddr = a; s_wvalid = 1; s_wdata = d; s_wstrb = 4'hf;
    @(negedge clk); s_awvalid = 0; s_wvalid = 0;
    while (!s_bvalid) @(negedge clk);
    s_bready = 1; @(negedge clk); s_bready = 0;
  endtask

  task automatic acc_rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); s_arvalid = 1; s_araddr = a;
    @(negedge clk); s_arvalid = 0;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata; s_rready = 1; @(negedge clk); s_rready = 0;
  endtask

  // ---------------- picture ----------------
  function automatic logic [23:0] pixel_at(int x, int y);   // {R, G, B}
    int n;
    n = int'($urandom % 9) - 4;
    if (x >= bx0 && x <= bx1 && y >= by0 && y <= by1) begin
      int cx, cy, gx, gy;
      gx = (bx1 - bx0 + 1) / 8; gy = (by1 - by0 + 1) / 8;
      cx = bx0 + ((x - bx0) / gx) * gx + gx / 2;
      cy = by0 + ((y - by0) / gy) * gy + gy / 2;
      if (((x - bx0) / gx + (y - by0) / gy) % 3 == 0 &&
          (x - cx) * (x - cx) + (y - cy) * (y - cy) <= STONE_R * STONE_R)
        return ((x / gx) % 2 == 0) ? 24'he6e6e6 : 24'h141414;
      return {8'(30 + n), 8'(120 + n), 8'(60 + n)};
    end
    return {8'(150 + n), 8'(110 + n), 8'(80 + n)};
  endfunction

  task automatic load_picture();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        logic [23:0] p;
        int a;
        p = pixel_at(x, y);
        a = IMG + 3 * (y * W + x);
        u_mem.mem[a] = p[7:0]; u_mem.mem[a + 1] = p[15:8]; u_mem.mem[a + 2] = p[23:16];
      end
  endtask

  function automatic real f32(logic [31:0] f);
    real m;
    int e;
    if (f[30:0] == 0) return 0.0;
    e = int'(f[30:23]) - 127;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    m = m * (2.0 ** e);
    return f[31] ? -m : m;
  endfunction

  function automatic logic [31:0] rd32(int a);
    return {u_mem.mem[a + 3], u_mem.mem[a + 2], u_mem.mem[a + 1], u_mem.mem[a]};
  endfunction

  // one run: program, start, wait for done; returns NLINES
  task automatic run(int thr, output int nl);
    logic [31:0] d;
    int irq0;
    for (int i = 0; i < 4 * LINES; i++) begin u_mem.mem[RHOA + i] = 8'hff; u_mem.mem[THA + i] = 8'hff; end
    acc_rd(REG_CTRL, d);
    check("idle before start", d[2] == 1'b1 && d[0] == 1'b0);
    acc_wr(REG_IMG, IMG);
    acc_wr(REG_RHO, RHOA);
    acc_wr(REG_THETA, THA);
    acc_wr(REG_ROWS, H);
    acc_wr(REG_COLS, W);
    acc_wr(REG_THRESH, 32'(thr));
    irq0 = n_irq;
    acc_wr(REG_CTRL, 1);
    acc_rd(REG_CTRL, d);
    check("busy, not done, after start", d[0] == 1'b1 && d[1] == 1'b0);
    begin
      int s;
      s = n_starts;
      acc_wr(REG_CTRL, 1);               // refused: already running
      if (n_starts == s) n_refused++;
    end
    do acc_rd(REG_CTRL, d); while (!d[1]);
    check("not busy when done", d[0] == 1'b0);
    repeat (4) @(negedge clk);
    check("one completion pulse", n_irq == irq0 + 1);
    acc_rd(REG_NLINES, d);
    nl = int'(d);
  endtask

  // read the arrays, check padding and the four board sides
  task automatic sides(int nl, string tag);
    real rho [LINES], th [LINES];
    bit l, r, t, b, same;
    for (int i = 0; i < LINES; i++) begin
      rho[i] = f32(rd32(RHOA + 4 * i));
      th[i]  = f32(rd32(THA + 4 * i));
    end
    l = 0; r = 0; t = 0; b = 0;
    for (int i = 0; i < nl; i++) begin
      $display("  %s line %0d: rho %0.1f theta %0.1f deg", tag, i, rho[i], th[i] * 180.0 / PI);
      if (th[i] == 0.0 && rho[i] - (bx0 - 0.5 - W / 2.0) <= 4.5 && (bx0 - 0.5 - W / 2.0) - rho[i] <= 4.5) l = 1;
      if (th[i] == 0.0 && rho[i] - (bx1 + 0.5 - W / 2.0) <= 4.5 && (bx1 + 0.5 - W / 2.0) - rho[i] <= 4.5) r = 1;
      if (th[i] > 1.5707 && th[i] < 1.5709 && rho[i] - (by0 - 0.5 - H / 2.0) <= 4.5 && (by0 - 0.5 - H / 2.0) - rho[i] <= 4.5) t = 1;
      if (th[i] > 1.5707 && th[i] < 1.5709 && rho[i] - (by1 + 0.5 - H / 2.0) <= 4.5 && (by1 + 0.5 - H / 2.0) - rho[i] <= 4.5) b = 1;
    end
    check({tag, ": left side found"}, l);
    check({tag, ": right side found"}, r);
    check({tag, ": top side found"}, t);
    check({tag, ": bottom side found"}, b);
    check({tag, ": fewer lines than LINESMAX"}, nl >= 4 && nl < LINES);
    same = 1;
    for (int i = nl; i < LINES; i++)
      if (rho[i] != rho[nl - 1] || th[i] != th[nl - 1]) same = 0;
    check({tag, ": last line repeated to the end of the arrays"}, same && nl > 0);
    if (same && nl > 0 && nl < LINES) n_pad++;
  endtask

  initial begin
    int nl;
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rready = 0;
    s_awaddr = 0; s_araddr = 0; s_wdata = 0; s_wstrb = 0;
    W = 60; H = 44; bx0 = 10; bx1 = 49; by0 = 6; by1 = 37;
    load_picture();
    repeat (3) @(negedge clk); rst_n = 1;

    run(40, nl);
    $display("run 1 (60 x 44): %0d lines", nl);
    sides(nl, "run 1");

    W = 64; H = 64; bx0 = 13; bx1 = 51; by0 = 16; by1 = 47;
    n_resize++;
    load_picture();
    run(40, nl);
    $display("run 2 (64 x 64): %0d lines", nl);
    sides(nl, "run 2");

    W = 60; H = 44; bx0 = 10; bx1 = 49; by0 = 6; by1 = 37;
    n_resize++;
    load_picture();
    run(6, nl);
    $display("run 3: %0d lines kept of %0d found", nl, dut.u_hough.nfound);
    check("arrays full at low threshold", nl == LINES);
    if (dut.u_hough.nfound > 16'(LINES)) n_overflow++;
    begin
      bit distinct;
      distinct = 1;
      for (int i = 1; i < LINES; i++)
        if (rd32(RHOA + 4 * i) == rd32(RHOA + 4 * (i - 1)) && rd32(THA + 4 * i) == rd32(THA + 4 * (i - 1)))
          distinct = 0;
      check("full arrays hold distinct lines", distinct);
    end

    check("reads stay inside the picture", bad_reads == 0);
    check("writes are single bursts onto the arrays", bad_writes == 0);
    check("two write bursts per run", wr_bursts == 6);
    $display("mechanisms: read stalls %0d, forwarded votes %0d, refused starts %0d, size changes %0d, overflow %0d, padding %0d",
             rd_stalls, n_fwd, n_refused, n_resize, n_overflow, n_pad);
    check("read data backpressure", rd_stalls > 0);
    check("vote forwarding", n_fwd > 0);
    check("start refused while busy", n_refused > 0);
    check("image size changed between runs", n_resize > 0);
    check("lines dropped beyond LINESMAX", n_overflow > 0);
    check("last line repeated", n_pad > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (longint i = 0; i < WATCHDOG; i++) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

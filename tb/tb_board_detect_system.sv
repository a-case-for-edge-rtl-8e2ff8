// tb_board_detect_system: end-to-end test of the board detection system.
//
// A synthetic camera picture (a green board with white and black stones on a
// brown table, with pixel noise) is placed in a model of processor memory.
// The processor side is played by tasks: it programs the accelerator over
// AXI-Lite, starts it, waits for done, and reads back the rho and theta arrays
// the accelerator wrote. The four board sides must be among the lines found
// (theta 0 and 90 degrees, rho within a bin and a half of the true edge). A
// second run with a low threshold must find more lines than the arrays hold.
// Meanwhile the processor draws into the overlay frame buffer and a video
// stream runs through the overlay on its own clock; the output pixels are
// compared with the expected mix.
//
// Mechanisms counted (each must occur): read data backpressure, vote
// forwarding in the accumulators, lines dropped beyond LINESMAX, repetition of
// the last line, a start refused while busy, opaque and transparent overlay
// pixels, and video output backpressure.
module tb_board_detect_system;
  import bd_pkg::*;
  localparam int MAXW = 64, MAXH = 64;
  localparam int W = 60, H = 44;
  localparam int BX0 = 10, BX1 = 49, BY0 = 6, BY1 = 37, STONE_R = 2;
  localparam int THR_HI = 40, THR_LO = 6;
  localparam int LINES = HOUGH_LINESMAX;
  localparam int NRHO = hough_nrho(MAXW, MAXH, HOUGH_RHO);
  localparam int VID_LINES = 8;
  localparam longint WATCHDOG = 400000;
  localparam real PI = 3.14159265358979323846;
  localparam int IMG = 32'h0010_0000, RHOA = 32'h0020_0000, THA = 32'h0020_1000;

  logic clk = 0, vid_clk = 0, rst_n = 0, vid_rst_n = 0;
  always #5 clk = ~clk;
  always #3 vid_clk = ~vid_clk;

  // accelerator control bus
  logic [7:0]  acc_awaddr, acc_araddr;
  logic [31:0] acc_wdata, acc_rdata;
  logic [3:0]  acc_wstrb;
  logic [1:0]  acc_bresp, acc_rresp;
  logic acc_awvalid, acc_awready, acc_wvalid, acc_wready, acc_bvalid, acc_bready;
  logic acc_arvalid, acc_arready, acc_rvalid, acc_rready, acc_irq;
  // memory buses
  logic [31:0] img_araddr, img_rdata, rho_awaddr, rho_wdata, th_awaddr, th_wdata;
  logic [7:0]  img_arlen, rho_awlen, th_awlen;
  logic [2:0]  img_arsize, rho_awsize, th_awsize;
  logic [1:0]  img_arburst, img_rresp, rho_awburst, th_awburst, rho_bresp, th_bresp;
  logic [3:0]  rho_wstrb, th_wstrb;
  logic img_arvalid, img_arready, img_rlast, img_rvalid, img_rready;
  logic rho_awvalid, rho_awready, rho_wlast, rho_wvalid, rho_wready, rho_bvalid, rho_bready;
  logic th_awvalid, th_awready, th_wlast, th_wvalid, th_wready, th_bvalid, th_bready;
  // overlay bus and video
  logic [16:0] ovl_awaddr, ovl_araddr;
  logic [31:0] ovl_wdata, ovl_rdata;
  logic [3:0]  ovl_wstrb;
  logic [1:0]  ovl_bresp, ovl_rresp;
  logic ovl_awvalid, ovl_awready, ovl_wvalid, ovl_wready, ovl_bvalid, ovl_bready;
  logic ovl_arvalid, ovl_arready, ovl_rvalid, ovl_rready;
  logic [23:0] vin_tdata, vout_tdata;
  logic vin_tuser, vin_tlast, vin_tvalid, vin_tready, vout_tuser, vout_tlast, vout_tvalid, vout_tready;

  int rd_stalls, wr_bursts;
  int checks = 0, failures = 0;
  int n_fwd = 0, n_overflow = 0, n_pad = 0, n_refused = 0, n_opaque = 0, n_transp = 0, n_vstall = 0;
  int n_starts = 0;

  board_detect_system #(.MAXW(MAXW), .MAXH(MAXH)) dut (.*);

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

  always @(posedge clk) if (rst_n) begin
    if (dut.u_accel.u_hough.fwd_hit) n_fwd++;
    if (dut.u_accel.u_ctrl.start) n_starts++;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- processor side: AXI-Lite ----------------
  task automatic acc_wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    acc_awvalid = 1; acc_awaddr = a; acc_wvalid = 1; acc_wdata = d; acc_wstrb = 4'hf;
    @(negedge clk); acc_awvalid = 0; acc_wvalid = 0;
    while (!acc_bvalid) @(negedge clk);
    acc_bready = 1; @(negedge clk); acc_bready = 0;
  endtask

  task automatic acc_rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); acc_arvalid = 1; acc_araddr = a;
    @(negedge clk); acc_arvalid = 0;
    while (!acc_rvalid) @(negedge clk);
    d = acc_rdata; acc_rready = 1; @(negedge clk); acc_rready = 0;
  endtask

  task automatic ovl_wr(int word, logic [31:0] d);
    @(negedge clk);
    ovl_awvalid = 1; ovl_awaddr = 17'(4 * word); ovl_wvalid = 1; ovl_wdata = d; ovl_wstrb = 4'hf;
    @(negedge clk); ovl_awvalid = 0; ovl_wvalid = 0;
    while (!ovl_bvalid) @(negedge clk);
    ovl_bready = 1; @(negedge clk); ovl_bready = 0;
  endtask

  // ---------------- picture ----------------
  function automatic logic [23:0] pixel_at(int x, int y);   // {R, G, B}
    int n;
    n = int'($urandom % 9) - 4;
    if (x >= BX0 && x <= BX1 && y >= BY0 && y <= BY1) begin
      int cx, cy, gx, gy;
      gx = (BX1 - BX0 + 1) / 8; gy = (BY1 - BY0 + 1) / 8;
      cx = BX0 + ((x - BX0) / gx) * gx + gx / 2;
      cy = BY0 + ((y - BY0) / gy) * gy + gy / 2;
      if (((x - BX0) / gx + (y - BY0) / gy) % 3 == 0 &&
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

  // one accelerator run; returns number of lines reported
  task automatic run(int thr, output int nl, output longint cycles);
    logic [31:0] d;
    longint t0;
    for (int i = 0; i < 4 * LINES; i++) begin u_mem.mem[RHOA + i] = 8'hff; u_mem.mem[THA + i] = 8'hff; end
    acc_wr(REG_IMG, IMG);
    acc_wr(REG_RHO, RHOA);
    acc_wr(REG_THETA, THA);
    acc_wr(REG_ROWS, H);
    acc_wr(REG_COLS, W);
    acc_wr(REG_THRESH, 32'(thr));
    t0 = $time;
    acc_wr(REG_CTRL, 1);
    acc_rd(REG_CTRL, d);
    check("busy after start", d[0] == 1'b1);
    begin
      int s;
      s = n_starts;
      acc_wr(REG_CTRL, 1);               // refused: already running
      if (n_starts == s) n_refused++;
    end
    do acc_rd(REG_CTRL, d); while (!d[1]);
    cycles = ($time - t0) / 10;
    acc_rd(REG_NLINES, d);
    nl = int'(d);
    check($sformatf("arrays written (%0d bursts)", wr_bursts), wr_bursts % 2 == 0 && wr_bursts > 0);
  endtask

  // ---------------- video through the overlay ----------------
  logic [7:0] ovl_model [int];
  task automatic video();
    logic [23:0] sent [$];
    int nout;
    nout = 0;
    fork
      begin
        for (int y = 0; y < VID_LINES; y++)
          for (int x = 0; x < OVL_W * OVL_SCALE; x++) begin
            @(negedge vid_clk);
            vin_tvalid = 1; vin_tdata = 24'($urandom); vin_tuser = (x == 0 && y == 0);
            vin_tlast = (x == OVL_W * OVL_SCALE - 1);
            sent.push_back(vin_tdata);
            do @(posedge vid_clk); while (!vin_tready);
          end
        @(negedge vid_clk); vin_tvalid = 0;
      end
      begin
        while (nout < VID_LINES * OVL_W * OVL_SCALE) begin
          @(posedge vid_clk);
          if (vout_tvalid && !vout_tready) n_vstall++;
          if (vout_tvalid && vout_tready) begin
            int x, y;
            logic [7:0] o;
            logic [23:0] e;
            x = nout % (OVL_W * OVL_SCALE); y = nout / (OVL_W * OVL_SCALE);
            o = ovl_model[(y / OVL_SCALE) * OVL_W + x / OVL_SCALE];
            e = o[7] ? {{4{o[6:5]}}, {o[4:2], o[4:2], o[4:3]}, {4{o[1:0]}}} : sent[nout];
            if (o[7]) n_opaque++; else n_transp++;
            if (vout_tdata != e || vout_tuser != (nout == 0)) begin
              failures++;
              if (failures < 10) $display("FAIL video pixel %0d got %h exp %h", nout, vout_tdata, e);
            end
            checks++;
            nout++;
          end
        end
      end
    join
  endtask

  always @(negedge vid_clk) vout_tready <= ($urandom % 4 != 0);

  initial begin
    int nl;
    longint cyc;
    acc_awvalid = 0; acc_wvalid = 0; acc_bready = 0; acc_arvalid = 0; acc_rready = 0;
    acc_awaddr = 0; acc_araddr = 0; acc_wdata = 0; acc_wstrb = 0;
    ovl_awvalid = 0; ovl_wvalid = 0; ovl_bready = 0; ovl_arvalid = 0; ovl_rready = 0;
    ovl_awaddr = 0; ovl_araddr = 0; ovl_wdata = 0; ovl_wstrb = 0;
    vin_tvalid = 0; vin_tdata = 0; vin_tuser = 0; vin_tlast = 0;
    load_picture();
    repeat (3) @(negedge clk); rst_n = 1; vid_rst_n = 1;

    // overlay: clear the rows the video will cover, then draw a pattern
    for (int p = 0; p < 2 * OVL_W * (VID_LINES / OVL_SCALE + 1); p += 4) begin
      logic [31:0] wd;
      for (int b = 0; b < 4; b++) begin
        logic [7:0] v;
        v = ((p / 4) % 3 == 0) ? {1'b1, 7'($urandom)} : {1'b0, 7'($urandom)};
        ovl_model[p + b] = v;
        wd[8*b +: 8] = v;
      end
      ovl_wr(p / 4, wd);
    end

    fork
      video();
      begin
        real rho [LINES], th [LINES];
        bit l, r, t, b;
        run(THR_HI, nl, cyc);
        $display("run 1: %0d lines, %0d cycles", nl, cyc);
        check("cycle count bounded",
              cyc >= W * H && cyc <= 3 * W * H + 2 * (NRHO + 1) + NRHO * HOUGH_NTHETA + 40 * W + 2000);
        for (int i = 0; i < LINES; i++) begin
          rho[i] = f32(rd32(RHOA + 4 * i));
          th[i]  = f32(rd32(THA + 4 * i));
        end
        l = 0; r = 0; t = 0; b = 0;
        for (int i = 0; i < nl; i++) begin
          $display("  line %0d: rho %0.1f theta %0.1f deg", i, rho[i], th[i] * 180.0 / PI);
          if (th[i] == 0.0 && rho[i] - (BX0 - 0.5 - W / 2.0) <= 4.5 && (BX0 - 0.5 - W / 2.0) - rho[i] <= 4.5) l = 1;
          if (th[i] == 0.0 && rho[i] - (BX1 + 0.5 - W / 2.0) <= 4.5 && (BX1 + 0.5 - W / 2.0) - rho[i] <= 4.5) r = 1;
          if (th[i] > 1.5707 && th[i] < 1.5709 && rho[i] - (BY0 - 0.5 - H / 2.0) <= 4.5 && (BY0 - 0.5 - H / 2.0) - rho[i] <= 4.5) t = 1;
          if (th[i] > 1.5707 && th[i] < 1.5709 && rho[i] - (BY1 + 0.5 - H / 2.0) <= 4.5 && (BY1 + 0.5 - H / 2.0) - rho[i] <= 4.5) b = 1;
        end
        check("left side found", l);
        check("right side found", r);
        check("top side found", t);
        check("bottom side found", b);
        check("some lines, fewer than LINESMAX", nl >= 4 && nl < LINES);
        if (nl > 0 && nl < LINES) begin
          bit same;
          same = 1;
          for (int i = nl; i < LINES; i++)
            if (rho[i] != rho[nl - 1] || th[i] != th[nl - 1]) same = 0;
          check("last line repeated to the end of the arrays", same);
          if (same) n_pad++;
        end
        run(THR_LO, nl, cyc);
        $display("run 2: %0d lines kept of %0d found, %0d cycles", nl, dut.u_accel.u_hough.nfound, cyc);
        check("array full at low threshold", nl == LINES);
        if (dut.u_accel.u_hough.nfound > 16'(LINES)) n_overflow++;
      end
    join

    $display("mechanisms: read stalls %0d, forwarded votes %0d, overflow %0d, padding %0d, refused starts %0d, opaque %0d, transparent %0d, video stalls %0d",
             rd_stalls, n_fwd, n_overflow, n_pad, n_refused, n_opaque, n_transp, n_vstall);
    check("read data backpressure", rd_stalls > 0);
    check("vote forwarding", n_fwd > 0);
    check("lines dropped beyond LINESMAX", n_overflow > 0);
    check("last line repeated", n_pad > 0);
    check("start refused while busy", n_refused > 0);
    check("opaque overlay pixels", n_opaque > 0);
    check("transparent overlay pixels", n_transp > 0);
    check("video backpressure", n_vstall > 0);
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

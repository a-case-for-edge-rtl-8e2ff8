// board_detect_accel: the reversi board detection accelerator.
//
// It finds straight lines along the edge of the green board region of a
// colour image and returns them as (rho, theta) pairs; software then picks the
// four board sides from them. The pipeline, one pixel per cycle:
//
//   image read (AXI) -> 3x3 Gaussian blur -> BGR to HSV
//     -> two green ranges (inRange) -> OR                  : green region
//     -> 7x7 dilate -> 7x7 erode                          : closing fills the
//                                                            holes left by stones
//     -> 3x3 dilate XOR 3x3 erode -> 3x3 dilate           : region boundary, made
//                                                            two pixels wider
//     -> Hough transform (60 angles, 3 px rho steps)      : lines
//   -> rho array and theta array written back (AXI), float32, LINESMAX each
//
// The edge step stands in for a Laplacian filter: on a binary mask, dilation
// XOR erosion marks exactly the pixels next to the region boundary. Mask
// streams are one bit per pixel. Where a stream feeds two stages it simply fans
// out; both branches have the same latency, so they meet again aligned.
//
// Control: the processor writes the arguments through the AXI-Lite port
// (axil_ctrl) and sets CTRL.start. The Hough block first clears its
// accumulators and computes each angle's starting rho; only then is the image
// read, so no pixel reaches it early. When the line list is ready, the two
// array writers store it and CTRL.done is set.
module board_detect_accel
  import bd_pkg::*;
#(
  parameter int unsigned MAXW     = MAX_W,
  parameter int unsigned MAXH     = MAX_H,
  parameter int unsigned XW       = DIM_W,
  parameter int unsigned LINESMAX = HOUGH_LINESMAX,
  parameter int unsigned NTHETA   = HOUGH_NTHETA,
  parameter int unsigned RHO      = HOUGH_RHO
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite subordinate (arguments)
  input  logic [7:0]  s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [7:0]  s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  // AXI4 manager, image read
  output logic [31:0] img_araddr,
  output logic [7:0]  img_arlen,
  output logic [2:0]  img_arsize,
  output logic [1:0]  img_arburst,
  output logic        img_arvalid,
  input  logic        img_arready,
  input  logic [31:0] img_rdata,
  input  logic [1:0]  img_rresp,
  input  logic        img_rlast,
  input  logic        img_rvalid,
  output logic        img_rready,
  // AXI4 manager, rho array write
  output logic [31:0] rho_awaddr,
  output logic [7:0]  rho_awlen,
  output logic [2:0]  rho_awsize,
  output logic [1:0]  rho_awburst,
  output logic        rho_awvalid,
  input  logic        rho_awready,
  output logic [31:0] rho_wdata,
  output logic [3:0]  rho_wstrb,
  output logic        rho_wlast,
  output logic        rho_wvalid,
  input  logic        rho_wready,
  input  logic [1:0]  rho_bresp,
  input  logic        rho_bvalid,
  output logic        rho_bready,
  // AXI4 manager, theta array write
  output logic [31:0] th_awaddr,
  output logic [7:0]  th_awlen,
  output logic [2:0]  th_awsize,
  output logic [1:0]  th_awburst,
  output logic        th_awvalid,
  input  logic        th_awready,
  output logic [31:0] th_wdata,
  output logic [3:0]  th_wstrb,
  output logic        th_wlast,
  output logic        th_wvalid,
  input  logic        th_wready,
  input  logic [1:0]  th_bresp,
  input  logic        th_bvalid,
  output logic        th_bready,
  output logic        irq_done       // one-cycle pulse when a run has finished
);
  localparam int unsigned IW = $clog2(LINESMAX);

  typedef enum logic [2:0] {A_IDLE, A_HINIT, A_RUN, A_WRITE, A_FIN} astate_e;
  astate_e state;

  logic          start, busy, pipe_start, wr_start;
  logic [31:0]   img_addr, rho_addr, theta_addr;
  logic [XW-1:0] rows, cols;
  logic [15:0]   threshold, wc, ws;
  logic [IW:0]   nlines;
  logic [15:0]   nfound;
  logic          h_ready, h_done, h_fwd, rho_done, th_done, rho_err, th_err;
  logic [IW-1:0] rho_idx, th_idx;
  logic [31:0]   rho_f, th_f;

  axil_ctrl #(.XW(XW)) u_ctrl (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .start, .busy, .finished(irq_done), .nlines(8'(nlines)),
    .img_addr, .rho_addr, .theta_addr, .rows, .cols, .threshold,
    .gauss_wc(wc), .gauss_ws(ws)
  );

  // ---------------- run control ----------------
  assign busy = (state != A_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= A_IDLE; pipe_start <= 1'b0; wr_start <= 1'b0; irq_done <= 1'b0;
    end else begin
      pipe_start <= 1'b0;
      wr_start   <= 1'b0;
      irq_done   <= 1'b0;
      unique case (state)
        A_IDLE:  if (start) state <= A_HINIT;
        A_HINIT: if (h_ready) begin pipe_start <= 1'b1; state <= A_RUN; end
        A_RUN:   if (h_done) begin wr_start <= 1'b1; state <= A_WRITE; end
        A_WRITE: if (!wr_start && rho_done && th_done) state <= A_FIN;
        A_FIN:   begin irq_done <= 1'b1; state <= A_IDLE; end
        default: state <= A_IDLE;
      endcase
    end
  end

  // ---------------- stream pipeline ----------------
  logic v_rd, v_gb, v_hsv, v_g1, v_g2, v_or, v_d7, v_e7, v_d3, v_e3, v_x, v_edge;
  bgr_t p_rd, p_gb;
  hsv_t p_hsv;
  logic b_g1, b_g2, b_or, b_d7, b_e7, b_d3, b_e3, b_x, b_edge;
  logic rd_done, gb_done, d7_done, e7_done, d3_done, e3_done, de_done;

  axi_image_reader #(.XW(XW)) u_read (
    .clk, .rst_n, .start(pipe_start), .base(img_addr), .cfg_w(cols), .cfg_h(rows),
    .m_araddr(img_araddr), .m_arlen(img_arlen), .m_arsize(img_arsize),
    .m_arburst(img_arburst), .m_arvalid(img_arvalid), .m_arready(img_arready),
    .m_rdata(img_rdata), .m_rresp(img_rresp), .m_rlast(img_rlast),
    .m_rvalid(img_rvalid), .m_rready(img_rready),
    .out_valid(v_rd), .out_pix(p_rd), .done(rd_done)
  );

  gaussian_blur #(.MAXW(MAXW), .XW(XW)) u_blur (
    .clk, .rst_n, .start(pipe_start), .cfg_w(cols), .cfg_h(rows), .wc, .ws,
    .in_valid(v_rd), .in_pix(p_rd), .out_valid(v_gb), .out_pix(p_gb), .done(gb_done)
  );

  bgr2hsv u_hsv (
    .clk, .rst_n, .in_valid(v_gb), .in_pix(p_gb), .out_valid(v_hsv), .out_pix(p_hsv)
  );

  in_range u_green1 (
    .clk, .rst_n, .lo(GREEN1_LO), .hi(GREEN1_HI),
    .in_valid(v_hsv), .in_pix(p_hsv), .out_valid(v_g1), .out_bit(b_g1)
  );

  in_range u_green2 (
    .clk, .rst_n, .lo(GREEN2_LO), .hi(GREEN2_HI),
    .in_valid(v_hsv), .in_pix(p_hsv), .out_valid(v_g2), .out_bit(b_g2)
  );

  stream_bitwise #(.OP(OP_OR)) u_or (
    .clk, .rst_n, .a_valid(v_g1), .a_bit(b_g1), .b_valid(v_g2), .b_bit(b_g2),
    .out_valid(v_or), .out_bit(b_or)
  );

  dilate #(.K(7), .MAXW(MAXW), .XW(XW)) u_dilate7 (
    .clk, .rst_n, .start(pipe_start), .cfg_w(cols), .cfg_h(rows),
    .in_valid(v_or), .in_bit(b_or), .out_valid(v_d7), .out_bit(b_d7), .done(d7_done)
  );

  erode #(.K(7), .MAXW(MAXW), .XW(XW)) u_erode7 (
    .clk, .rst_n, .start(pipe_start), .cfg_w(cols), .cfg_h(rows),
    .in_valid(v_d7), .in_bit(b_d7), .out_valid(v_e7), .out_bit(b_e7), .done(e7_done)
  );

  dilate #(.K(3), .MAXW(MAXW), .XW(XW)) u_dilate_a (
    .clk, .rst_n, .start(pipe_start), .cfg_w(cols), .cfg_h(rows),
    .in_valid(v_e7), .in_bit(b_e7), .out_valid(v_d3), .out_bit(b_d3), .done(d3_done)
  );

  erode #(.K(3), .MAXW(MAXW), .XW(XW)) u_erode_a (
    .clk, .rst_n, .start(pipe_start), .cfg_w(cols), .cfg_h(rows),
    .in_valid(v_e7), .in_bit(b_e7), .out_valid(v_e3), .out_bit(b_e3), .done(e3_done)
  );

  stream_bitwise #(.OP(OP_XOR)) u_xor (
    .clk, .rst_n, .a_valid(v_d3), .a_bit(b_d3), .b_valid(v_e3), .b_bit(b_e3),
    .out_valid(v_x), .out_bit(b_x)
  );

  dilate #(.K(3), .MAXW(MAXW), .XW(XW)) u_dilate_b (
    .clk, .rst_n, .start(pipe_start), .cfg_w(cols), .cfg_h(rows),
    .in_valid(v_x), .in_bit(b_x), .out_valid(v_edge), .out_bit(b_edge), .done(de_done)
  );

  hough_lines #(.MAXW(MAXW), .MAXH(MAXH), .XW(XW), .RHO(RHO), .NTHETA(NTHETA),
                .LINESMAX(LINESMAX)) u_hough (
    .clk, .rst_n, .start, .cfg_w(cols), .cfg_h(rows), .threshold,
    .in_valid(v_edge), .in_bit(b_edge),
    .vote_ready(h_ready), .done(h_done), .nlines, .nfound, .fwd_hit(h_fwd),
    .rho_idx, .rho_f32(rho_f), .theta_idx(th_idx), .theta_f32(th_f)
  );

  axi_array_writer #(.N(LINESMAX)) u_wr_rho (
    .clk, .rst_n, .start(wr_start), .base(rho_addr), .data_idx(rho_idx), .data(rho_f),
    .m_awaddr(rho_awaddr), .m_awlen(rho_awlen), .m_awsize(rho_awsize),
    .m_awburst(rho_awburst), .m_awvalid(rho_awvalid), .m_awready(rho_awready),
    .m_wdata(rho_wdata), .m_wstrb(rho_wstrb), .m_wlast(rho_wlast),
    .m_wvalid(rho_wvalid), .m_wready(rho_wready),
    .m_bresp(rho_bresp), .m_bvalid(rho_bvalid), .m_bready(rho_bready),
    .done(rho_done), .err(rho_err)
  );

  axi_array_writer #(.N(LINESMAX)) u_wr_theta (
    .clk, .rst_n, .start(wr_start), .base(theta_addr), .data_idx(th_idx), .data(th_f),
    .m_awaddr(th_awaddr), .m_awlen(th_awlen), .m_awsize(th_awsize),
    .m_awburst(th_awburst), .m_awvalid(th_awvalid), .m_awready(th_awready),
    .m_wdata(th_wdata), .m_wstrb(th_wstrb), .m_wlast(th_wlast),
    .m_wvalid(th_wvalid), .m_wready(th_wready),
    .m_bresp(th_bresp), .m_bvalid(th_bvalid), .m_bready(th_bready),
    .done(th_done), .err(th_err)
  );
endmodule

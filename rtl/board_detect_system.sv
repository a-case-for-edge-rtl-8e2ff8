// board_detect_system: the programmable-logic part of the reversi board
// detection demonstrator: the detection accelerator and the video overlay
// subsystem, side by side.
//
// The processor (outside this module) captures a camera frame into its memory,
// starts the accelerator through its AXI-Lite port, gets back up to LINESMAX
// lines, finds the board and its stones in software, and draws the result into
// the 480 x 270 overlay frame buffer through a second AXI-Lite port. The
// HDMI output video passes through overlay_ctrl, which mixes in the overlay,
// so the display keeps moving at video rate however long the processing takes.
// The HDMI input/output pipelines and the processor with its memory are
// external; their buses are this module's ports.
//
// Clocks: clk (processor/accelerator side, also port A of the overlay memory)
// and vid_clk (video stream and port B of the overlay memory). Resets are
// active low, one per clock domain.
module board_detect_system
  import bd_pkg::*;
#(
  parameter int unsigned MAXW     = MAX_W,
  parameter int unsigned MAXH     = MAX_H,
  parameter int unsigned LINESMAX = HOUGH_LINESMAX,
  parameter int unsigned OW       = OVL_W,
  parameter int unsigned OH       = OVL_H,
  parameter int unsigned OVL_AW   = $clog2((OW * OH + 3) / 4)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        vid_clk,
  input  logic        vid_rst_n,
  // accelerator AXI4-Lite subordinate
  input  logic [7:0]  acc_awaddr,
  input  logic        acc_awvalid,
  output logic        acc_awready,
  input  logic [31:0] acc_wdata,
  input  logic [3:0]  acc_wstrb,
  input  logic        acc_wvalid,
  output logic        acc_wready,
  output logic [1:0]  acc_bresp,
  output logic        acc_bvalid,
  input  logic        acc_bready,
  input  logic [7:0]  acc_araddr,
  input  logic        acc_arvalid,
  output logic        acc_arready,
  output logic [31:0] acc_rdata,
  output logic [1:0]  acc_rresp,
  output logic        acc_rvalid,
  input  logic        acc_rready,
  // image read manager
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
  // rho array write manager
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
  // theta array write manager
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
  output logic        acc_irq,
  // overlay frame buffer AXI4-Lite subordinate
  input  logic [OVL_AW+1:0] ovl_awaddr,
  input  logic        ovl_awvalid,
  output logic        ovl_awready,
  input  logic [31:0] ovl_wdata,
  input  logic [3:0]  ovl_wstrb,
  input  logic        ovl_wvalid,
  output logic        ovl_wready,
  output logic [1:0]  ovl_bresp,
  output logic        ovl_bvalid,
  input  logic        ovl_bready,
  input  logic [OVL_AW+1:0] ovl_araddr,
  input  logic        ovl_arvalid,
  output logic        ovl_arready,
  output logic [31:0] ovl_rdata,
  output logic [1:0]  ovl_rresp,
  output logic        ovl_rvalid,
  input  logic        ovl_rready,
  // HDMI output video stream in (from the frame buffer reader) and out
  input  logic [23:0] vin_tdata,
  input  logic        vin_tuser,
  input  logic        vin_tlast,
  input  logic        vin_tvalid,
  output logic        vin_tready,
  output logic [23:0] vout_tdata,
  output logic        vout_tuser,
  output logic        vout_tlast,
  output logic        vout_tvalid,
  input  logic        vout_tready
);
  localparam int unsigned PW = $clog2(OW * OH);

  board_detect_accel #(.MAXW(MAXW), .MAXH(MAXH), .LINESMAX(LINESMAX)) u_accel (
    .clk, .rst_n,
    .s_awaddr(acc_awaddr), .s_awvalid(acc_awvalid), .s_awready(acc_awready),
    .s_wdata(acc_wdata), .s_wstrb(acc_wstrb), .s_wvalid(acc_wvalid), .s_wready(acc_wready),
    .s_bresp(acc_bresp), .s_bvalid(acc_bvalid), .s_bready(acc_bready),
    .s_araddr(acc_araddr), .s_arvalid(acc_arvalid), .s_arready(acc_arready),
    .s_rdata(acc_rdata), .s_rresp(acc_rresp), .s_rvalid(acc_rvalid), .s_rready(acc_rready),
    .img_araddr, .img_arlen, .img_arsize, .img_arburst, .img_arvalid, .img_arready,
    .img_rdata, .img_rresp, .img_rlast, .img_rvalid, .img_rready,
    .rho_awaddr, .rho_awlen, .rho_awsize, .rho_awburst, .rho_awvalid, .rho_awready,
    .rho_wdata, .rho_wstrb, .rho_wlast, .rho_wvalid, .rho_wready,
    .rho_bresp, .rho_bvalid, .rho_bready,
    .th_awaddr, .th_awlen, .th_awsize, .th_awburst, .th_awvalid, .th_awready,
    .th_wdata, .th_wstrb, .th_wlast, .th_wvalid, .th_wready,
    .th_bresp, .th_bvalid, .th_bready,
    .irq_done(acc_irq)
  );

  // ---------------- video overlay subsystem ----------------
  logic              a_en, b_en;
  logic [3:0]        a_we;
  logic [OVL_AW-1:0] a_addr;
  logic [31:0]       a_wdata, a_rdata;
  logic [PW-1:0]     b_pix;
  logic [7:0]        b_rdata;

  axil_bram_if #(.AW(OVL_AW)) u_ovl_axi (
    .clk, .rst_n,
    .s_awaddr(ovl_awaddr), .s_awvalid(ovl_awvalid), .s_awready(ovl_awready),
    .s_wdata(ovl_wdata), .s_wstrb(ovl_wstrb), .s_wvalid(ovl_wvalid), .s_wready(ovl_wready),
    .s_bresp(ovl_bresp), .s_bvalid(ovl_bvalid), .s_bready(ovl_bready),
    .s_araddr(ovl_araddr), .s_arvalid(ovl_arvalid), .s_arready(ovl_arready),
    .s_rdata(ovl_rdata), .s_rresp(ovl_rresp), .s_rvalid(ovl_rvalid), .s_rready(ovl_rready),
    .m_en(a_en), .m_we(a_we), .m_addr(a_addr), .m_wdata(a_wdata), .m_rdata(a_rdata)
  );

  overlay_bram #(.NPIX(OW * OH), .AW(OVL_AW), .PW(PW)) u_ovl_mem (
    .a_clk(clk), .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_clk(vid_clk), .b_en, .b_pix, .b_rdata
  );

  overlay_ctrl #(.OW(OW), .OH(OH), .PW(PW)) u_ovl_ctrl (
    .clk(vid_clk), .rst_n(vid_rst_n),
    .s_tdata(vin_tdata), .s_tuser(vin_tuser), .s_tlast(vin_tlast),
    .s_tvalid(vin_tvalid), .s_tready(vin_tready),
    .m_tdata(vout_tdata), .m_tuser(vout_tuser), .m_tlast(vout_tlast),
    .m_tvalid(vout_tvalid), .m_tready(vout_tready),
    .ovl_en(b_en), .ovl_pix(b_pix), .ovl_data(b_rdata)
  );
endmodule

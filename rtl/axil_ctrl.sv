// axil_ctrl: AXI4-Lite subordinate through which the processor passes the
// accelerator's arguments and starts it.
//
// Registers (byte offsets, 32 bits each; see bd_pkg):
//   0x00 CTRL    write bit 0 = 1 to start; read: bit 0 busy, bit 1 done (set at
//                the end of a run, cleared by the next start), bit 2 idle
//   0x10 IMG     input image address       0x18 RHO    rho array address
//   0x20 THETA   theta array address       0x28 ROWS   image height
//   0x30 COLS    image width               0x38 THRESH Hough vote threshold
//   0x40 WC, 0x44 WS  Gaussian weights (Q0.16), reset to the sigma-free
//                3 x 3 kernel 1/4, 1/2, 1/4
//   0x48 NLINES  number of lines found (read only)
// Byte strobes are ignored: every write replaces the whole register.
// Write address and data may arrive in either order; one write and one read
// are handled at a time. Responses are always OKAY.
module axil_ctrl
  import bd_pkg::*;
#(
  parameter int unsigned XW = DIM_W
) (
  input  logic          clk,
  input  logic          rst_n,
  // AXI4-Lite subordinate
  input  logic [7:0]    s_awaddr,
  input  logic          s_awvalid,
  output logic          s_awready,
  input  logic [31:0]   s_wdata,
  input  logic [3:0]    s_wstrb,
  input  logic          s_wvalid,
  output logic          s_wready,
  output logic [1:0]    s_bresp,
  output logic          s_bvalid,
  input  logic          s_bready,
  input  logic [7:0]    s_araddr,
  input  logic          s_arvalid,
  output logic          s_arready,
  output logic [31:0]   s_rdata,
  output logic [1:0]    s_rresp,
  output logic          s_rvalid,
  input  logic          s_rready,
  // to the accelerator
  output logic          start,
  input  logic          busy,
  input  logic          finished,      // one-cycle pulse at the end of a run
  input  logic [7:0]    nlines,
  output logic [31:0]   img_addr,
  output logic [31:0]   rho_addr,
  output logic [31:0]   theta_addr,
  output logic [XW-1:0] rows,
  output logic [XW-1:0] cols,
  output logic [15:0]   threshold,
  output logic [15:0]   gauss_wc,
  output logic [15:0]   gauss_ws
);
  logic       aw_have, w_have, done_flag;
  logic [7:0] aw_a;
  logic [31:0] w_d;

  assign s_awready = !aw_have;
  assign s_wready  = !w_have;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;
  assign s_arready = !s_rvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_have <= 1'b0; w_have <= 1'b0; aw_a <= '0; w_d <= '0; s_bvalid <= 1'b0;
      start <= 1'b0; done_flag <= 1'b0;
      img_addr <= '0; rho_addr <= '0; theta_addr <= '0; rows <= '0; cols <= '0;
      threshold <= 16'(HOUGH_THRESH); gauss_wc <= 16'd32768; gauss_ws <= 16'd16384;
    end else begin
      start <= 1'b0;
      if (s_awvalid && s_awready) begin aw_have <= 1'b1; aw_a <= s_awaddr; end
      if (s_wvalid && s_wready)   begin w_have  <= 1'b1; w_d  <= s_wdata;  end
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (aw_have && w_have && !s_bvalid) begin
        aw_have  <= 1'b0;
        w_have   <= 1'b0;
        s_bvalid <= 1'b1;
        unique case (aw_a)
          REG_CTRL:     if (w_d[0] && !busy) begin start <= 1'b1; done_flag <= 1'b0; end
          REG_IMG:      img_addr   <= w_d;
          REG_RHO:      rho_addr   <= w_d;
          REG_THETA:    theta_addr <= w_d;
          REG_ROWS:     rows       <= XW'(w_d);
          REG_COLS:     cols       <= XW'(w_d);
          REG_THRESH:   threshold  <= w_d[15:0];
          REG_GAUSS_WC: gauss_wc   <= w_d[15:0];
          REG_GAUSS_WS: gauss_ws   <= w_d[15:0];
          default: ;
        endcase
      end
      if (finished) done_flag <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rvalid <= 1'b0; s_rdata <= '0;
    end else begin
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (s_arvalid && s_arready) begin
        s_rvalid <= 1'b1;
        unique case (s_araddr)
          REG_CTRL:     s_rdata <= {29'b0, !busy, done_flag, busy};
          REG_IMG:      s_rdata <= img_addr;
          REG_RHO:      s_rdata <= rho_addr;
          REG_THETA:    s_rdata <= theta_addr;
          REG_ROWS:     s_rdata <= 32'(rows);
          REG_COLS:     s_rdata <= 32'(cols);
          REG_THRESH:   s_rdata <= 32'(threshold);
          REG_GAUSS_WC: s_rdata <= 32'(gauss_wc);
          REG_GAUSS_WS: s_rdata <= 32'(gauss_ws);
          REG_NLINES:   s_rdata <= 32'(nlines);
          default:      s_rdata <= '0;
        endcase
      end
    end
  end

  b_held: assert property (@(posedge clk) disable iff (!rst_n)
    s_bvalid && !s_bready |=> s_bvalid)
    else $error("axil_ctrl: BVALID dropped before BREADY");
endmodule

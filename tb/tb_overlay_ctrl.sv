// tb_overlay_ctrl: video frames through overlay_ctrl with a small overlay
// (8 x 6 pixels, scale 2, on a 20 x 14 picture so that part of the picture is
// outside the overlay), random input gaps and output backpressure. The frame
// buffer is a model answering one cycle after the read. Every output pixel is
// compared with the expected mix: the 2-3-2 overlay colour where the overlay
// byte is opaque and inside the overlay area, the video pixel elsewhere.
module tb_overlay_ctrl;
  localparam int OW = 8, OH = 6, SC = 2, VW = 20, VH = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [23:0] s_tdata, m_tdata;
  logic s_tuser, s_tlast, s_tvalid, s_tready, m_tuser, m_tlast, m_tvalid, m_tready;
  logic ovl_en;
  logic [5:0] ovl_pix;
  logic [7:0] ovl_data;
  logic [7:0] ovl [OW * OH];
  int checks = 0, failures = 0, nout = 0, opaque = 0, stalls = 0;
  logic [23:0] sent [$];

  overlay_ctrl #(.OW(OW), .OH(OH), .SCALE(SC)) dut (.*);

  always @(posedge clk) if (ovl_en) ovl_data <= ovl[ovl_pix];

  function automatic logic [23:0] expect_px(int k, logic [23:0] v);
    int x, y;
    logic [7:0] o;
    x = k % VW; y = (k / VW) % VH;
    if (x >= OW * SC || y >= OH * SC) return v;
    o = ovl[(y / SC) * OW + x / SC];
    if (!o[7]) return v;
    return {{4{o[6:5]}}, {o[4:2], o[4:2], o[4:3]}, {4{o[1:0]}}};
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      m_tready <= ($urandom % 4 != 0);
      if (m_tvalid && !m_tready) stalls++;
      if (m_tvalid && m_tready) begin
        logic [23:0] e;
        int k;
        k = nout;
        e = expect_px(k, sent[k]);
        checks++;
        if (m_tdata != e || m_tuser != (k % (VW * VH) == 0) || m_tlast != (k % VW == VW - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL pixel %0d got %h exp %h", k, m_tdata, e);
        end
        if (e != sent[k]) opaque++;
        nout++;
      end
    end else m_tready <= 0;
  end

  initial begin
    s_tvalid = 0; s_tdata = 0; s_tuser = 0; s_tlast = 0;
    for (int i = 0; i < OW * OH; i++) ovl[i] = 8'($urandom);
    repeat (3) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 3; f++)
      for (int y = 0; y < VH; y++)
        for (int x = 0; x < VW; x++) begin
          while ($urandom % 5 == 0) begin s_tvalid = 0; @(negedge clk); end
          s_tvalid = 1; s_tdata = 24'($urandom); s_tuser = (x == 0 && y == 0); s_tlast = (x == VW - 1);
          sent.push_back(s_tdata);
          do @(posedge clk); while (!s_tready);
          @(negedge clk);
        end
    s_tvalid = 0;
    repeat (20) @(negedge clk);
    checks += 3;
    if (nout != 3 * VW * VH) begin failures++; $display("FAIL count %0d", nout); end
    if (opaque == 0) failures++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_axi_image_reader: a small AXI4 memory with random ready/valid delays
// serves packed BGR images of several sizes; every pixel of the stream is
// compared with the image, and each burst is checked to be legal (INCR,
// 4-byte beats, at most BURST beats, contiguous addresses, rlast on the last
// beat served). Also checks that rready is withdrawn when the buffer is full.
module tb_axi_image_reader;
  import bd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, done, out_valid;
  logic [31:0] base;
  logic [10:0] cfg_w, cfg_h;
  logic [31:0] m_araddr, m_rdata;
  logic [7:0]  m_arlen;
  logic [2:0]  m_arsize;
  logic [1:0]  m_arburst, m_rresp;
  logic m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;
  bgr_t out_pix;
  int checks = 0, failures = 0, npix, stalls = 0;
  logic [7:0] mem [int];
  logic [31:0] next_addr;

  axi_image_reader #(.BURST(16)) dut (.*);

  // memory model: queue of bursts
  int q_addr [$], q_len [$];
  int beat;
  assign m_rresp = 2'b00;
  always @(posedge clk) begin
    if (!rst_n) begin
      m_arready <= 0; m_rvalid <= 0; beat = 0;
    end else begin
      m_arready <= ($urandom % 3 != 0);
      if (m_arvalid && m_arready) begin
        checks++;
        if (m_arsize != 3'd2 || m_arburst != 2'b01 || m_arlen > 8'd15 || m_araddr != next_addr) begin
          failures++;
          $display("FAIL burst addr=%h len=%0d exp addr %h", m_araddr, m_arlen, next_addr);
        end
        next_addr = m_araddr + 4 * (m_arlen + 1);
        q_addr.push_back(int'(m_araddr)); q_len.push_back(int'(m_arlen) + 1);
      end
      if (m_rvalid && m_rready) begin
        beat++;
        if (beat == q_len[0]) begin void'(q_addr.pop_front()); void'(q_len.pop_front()); beat = 0; end
      end
      if (m_rvalid && !m_rready) stalls++;
      if (q_addr.size() > 0 && ($urandom % 4 != 0)) begin
        int a;
        a = q_addr[0] + 4 * beat;
        m_rvalid <= 1;
        m_rdata  <= {mem[a + 3], mem[a + 2], mem[a + 1], mem[a]};
        m_rlast  <= (beat == q_len[0] - 1);
      end else if (!(m_rvalid && !m_rready)) m_rvalid <= 0;
    end
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int a;
      bgr_t e;
      a = int'(base) + 3 * npix;
      e = '{r: mem[a + 2], g: mem[a + 1], b: mem[a]};
      checks++;
      if (out_pix != e) begin
        failures++;
        if (failures < 10) $display("FAIL pix %0d got %h exp %h", npix, out_pix, e);
      end
      npix++;
    end
  end

  task automatic frame(int b, int w, int h);
    for (int i = 0; i < 3 * w * h + 64; i++) mem[b + i] = 8'($urandom);
    base = 32'(b); cfg_w = 11'(w); cfg_h = 11'(h); next_addr = 32'(b);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    npix = 0;
    while (!done) @(negedge clk);
    repeat (40) @(negedge clk);
    checks++;
    if (npix != w * h || q_addr.size() != 0) begin
      failures++; $display("FAIL count %0d of %0d, %0d bursts left", npix, w * h, q_addr.size());
    end
  endtask

  initial begin
    start = 0; base = 0; cfg_w = 1; cfg_h = 1;
    repeat (3) @(negedge clk); rst_n = 1;
    frame(32'h1000, 10, 7);     // 210 bytes: a short last burst
    frame(32'h2000, 33, 17);
    frame(32'h8040, 4, 1);      // 12 bytes, a single word-aligned burst
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no backpressure seen"); end
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

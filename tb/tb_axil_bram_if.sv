// tb_axil_bram_if: AXI-Lite writes with byte strobes and reads through
// axil_bram_if into an overlay_bram, with random response backpressure;
// read data is compared with a model of the memory.
module tb_axil_bram_if;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [16:0] s_awaddr, s_araddr;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0]  s_wstrb;
  logic [1:0]  s_bresp, s_rresp;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready;
  logic m_en;
  logic [3:0] m_we;
  logic [14:0] m_addr;
  logic [31:0] m_wdata, m_rdata;
  logic [7:0] b_rdata;
  logic [31:0] model [int];
  int checks = 0, failures = 0;

  axil_bram_if #(.AW(15)) dut (.*);
  overlay_bram u_mem (.a_clk(clk), .a_en(m_en), .a_we(m_we), .a_addr(m_addr), .a_wdata(m_wdata),
                      .a_rdata(m_rdata), .b_clk(clk), .b_en(1'b0), .b_pix('0), .b_rdata);

  task automatic wr(int a, logic [31:0] d, logic [3:0] st);
    @(negedge clk);
    s_awvalid = 1; s_awaddr = 17'(4 * a); s_wvalid = 1; s_wdata = d; s_wstrb = st;
    @(negedge clk); s_awvalid = 0; s_wvalid = 0;
    while (!s_bvalid) @(negedge clk);
    repeat ($urandom % 3) @(negedge clk);
    checks++; if (s_bresp != 2'b00) failures++;
    s_bready = 1; @(negedge clk); s_bready = 0;
  endtask

  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk); s_arvalid = 1; s_araddr = 17'(4 * a);
    @(negedge clk); s_arvalid = 0;
    while (!s_rvalid) @(negedge clk);
    repeat ($urandom % 3) @(negedge clk);
    d = s_rdata; s_rready = 1; @(negedge clk); s_rready = 0;
  endtask

  initial begin
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rready = 0;
    s_awaddr = 0; s_araddr = 0; s_wdata = 0; s_wstrb = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      int a;
      logic [31:0] d, m;
      logic [3:0] st;
      a = (i < 40) ? i : int'($urandom % 40);
      st = (i < 40) ? 4'hf : 4'($urandom);
      d = $urandom;
      m = model.exists(a) ? model[a] : 32'h0;
      for (int b = 0; b < 4; b++) if (st[b]) m[8*b +: 8] = d[8*b +: 8];
      model[a] = m;
      wr(a, d, st);
      if (i % 3 == 0) begin
        logic [31:0] r;
        rd(a, r);
        checks++;
        if (r != model[a]) begin failures++; $display("FAIL word %0d read %h exp %h", a, r, model[a]); end
      end
    end
    foreach (model[a]) begin
      logic [31:0] r;
      rd(a, r);
      checks++;
      if (r != model[a]) begin failures++; $display("FAIL word %0d read %h exp %h", a, r, model[a]); end
    end
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

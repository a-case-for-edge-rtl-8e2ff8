// tb_axil_ctrl: AXI-Lite writes and reads of every register (address and data
// sent in both orders), reset values, the one-cycle start pulse, refusal of a
// start while busy, and the done/idle bits of CTRL.
module tb_axil_ctrl;
  import bd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0]  s_awaddr, s_araddr;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0]  s_wstrb;
  logic [1:0]  s_bresp, s_rresp;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready;
  logic start, busy, finished;
  logic [7:0] nlines;
  logic [31:0] img_addr, rho_addr, theta_addr;
  logic [10:0] rows, cols;
  logic [15:0] threshold, gauss_wc, gauss_ws;
  int checks = 0, failures = 0, starts = 0;

  axil_ctrl dut (.*);

  always @(posedge clk) if (rst_n && start) starts++;

  task automatic wr(logic [7:0] a, logic [31:0] d, bit data_first);
    @(negedge clk);
    if (data_first) begin s_wvalid = 1; s_wdata = d; @(negedge clk); end
    s_awvalid = 1; s_awaddr = a; s_wvalid = 1; s_wdata = d;
    do @(posedge clk); while (!(s_awready && s_awvalid) && !(s_wready && s_wvalid));
    @(negedge clk); s_awvalid = 0; s_wvalid = 0;
    while (!s_bvalid) @(negedge clk);
    s_bready = 1; @(negedge clk); s_bready = 0;
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); s_arvalid = 1; s_araddr = a;
    @(negedge clk); s_arvalid = 0;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata; s_rready = 1; @(negedge clk); s_rready = 0;
  endtask

  task automatic expect_rd(logic [7:0] a, logic [31:0] e);
    logic [31:0] d;
    rd(a, d);
    checks++;
    if (d != e) begin failures++; $display("FAIL reg %h read %h exp %h", a, d, e); end
  endtask

  initial begin
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rready = 0;
    s_awaddr = 0; s_araddr = 0; s_wdata = 0; s_wstrb = 4'hf; busy = 0; finished = 0; nlines = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    expect_rd(REG_THRESH, 500);
    expect_rd(REG_GAUSS_WC, 32768);
    expect_rd(REG_GAUSS_WS, 16384);
    expect_rd(REG_CTRL, 32'h4);
    wr(REG_IMG, 32'h1000_0000, 0);
    wr(REG_RHO, 32'h1100_0040, 1);
    wr(REG_THETA, 32'h1200_0080, 0);
    wr(REG_ROWS, 683, 1);
    wr(REG_COLS, 1024, 0);
    wr(REG_THRESH, 321, 1);
    wr(REG_GAUSS_WC, 40000, 0);
    wr(REG_GAUSS_WS, 12768, 0);
    expect_rd(REG_IMG, 32'h1000_0000);
    expect_rd(REG_RHO, 32'h1100_0040);
    expect_rd(REG_THETA, 32'h1200_0080);
    expect_rd(REG_ROWS, 683);
    expect_rd(REG_COLS, 1024);
    checks += 7;
    if (img_addr != 32'h1000_0000 || rho_addr != 32'h1100_0040 || theta_addr != 32'h1200_0080) failures++;
    if (rows != 683 || cols != 1024) failures++;
    if (threshold != 321) failures++;
    if (gauss_wc != 40000 || gauss_ws != 12768) failures++;
    if (starts != 0) failures++;
    wr(REG_CTRL, 1, 0);
    checks++; if (starts != 1) begin failures++; $display("FAIL start pulses %0d", starts); end
    busy = 1;
    expect_rd(REG_CTRL, 32'h1);
    wr(REG_CTRL, 1, 1);          // ignored while busy
    checks++; if (starts != 1) failures++;
    nlines = 8'd17;
    @(negedge clk); finished = 1; busy = 0; @(negedge clk); finished = 0;
    expect_rd(REG_CTRL, 32'h6);
    expect_rd(REG_NLINES, 17);
    wr(REG_CTRL, 1, 0);
    checks++; if (starts != 2) failures++;
    expect_rd(REG_CTRL, 32'h4);  // done cleared by the new start
    if (failures == 0) checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

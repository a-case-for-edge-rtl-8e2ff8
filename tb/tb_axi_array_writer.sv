// tb_axi_array_writer: the writer stores an array of N words, produced by a
// function of the index, into an AXI4 memory model with random ready delays
// and a delayed write response; the test checks the burst header, every beat,
// wlast, and done/err, over several runs.
module tb_axi_array_writer;
  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, done, err;
  logic [31:0] base, data;
  logic [4:0]  data_idx;
  logic [31:0] m_awaddr, m_wdata;
  logic [7:0]  m_awlen;
  logic [2:0]  m_awsize;
  logic [1:0]  m_awburst, m_bresp;
  logic [3:0]  m_wstrb;
  logic m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  int checks = 0, failures = 0, nbeats, got_aw, run_no;
  logic [31:0] mem [int];
  logic [31:0] aw_addr;

  axi_array_writer #(.N(N)) dut (.*);

  assign data = 32'(data_idx) * 32'h01010101 ^ 32'hdeadbeef ^ 32'(run_no);

  always @(posedge clk) begin
    if (!rst_n) begin
      m_awready <= 0; m_wready <= 0; m_bvalid <= 0; nbeats = 0; got_aw = 0;
    end else begin
      m_awready <= ($urandom % 2 == 0);
      m_wready  <= ($urandom % 3 != 0);
      if (m_awvalid && m_awready) begin
        checks++;
        got_aw = 1; aw_addr = m_awaddr;
        if (m_awlen != 8'(N - 1) || m_awsize != 3'd2 || m_awburst != 2'b01) failures++;
      end
      if (m_wvalid && m_wready) begin
        mem[int'(base) + 4 * nbeats] = m_wdata;
        checks++;
        if (m_wlast != (nbeats == N - 1) || m_wstrb != 4'hf) begin
          failures++; $display("FAIL wlast at beat %0d", nbeats);
        end
        nbeats++;
        if (m_wlast) begin
          repeat ($urandom % 4) @(posedge clk);
          m_bvalid <= 1; m_bresp <= 2'b00;
        end
      end
      if (m_bvalid && m_bready) m_bvalid <= 0;
    end
  end

  initial begin
    start = 0; base = 0; run_no = 0; m_bresp = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      run_no = r; base = 32'h4000 + 32'(r) * 256; nbeats = 0; got_aw = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      checks += 3;
      if (!got_aw || aw_addr != base) begin failures++; $display("FAIL no/incorrect AW"); end
      if (nbeats != N) begin failures++; $display("FAIL beats %0d", nbeats); end
      if (err) failures++;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (mem[int'(base) + 4 * i] != (32'(i) * 32'h01010101 ^ 32'hdeadbeef ^ 32'(r))) begin
          failures++; $display("FAIL word %0d", i);
        end
      end
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

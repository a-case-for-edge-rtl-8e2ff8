// axi_mem_model: behavioural model of the processor's main memory as seen by
// the accelerator: one AXI4 read port and two AXI4 write ports (INCR bursts,
// 32-bit data), with random ready/valid delays. The bytes live in an
// associative array `mem` that a testbench fills and inspects directly.
// rd_stalls counts cycles in which read data waited for rready.
// Not synthesizable; testbench use only.
module axi_mem_model #(
  parameter int unsigned SEED_MOD = 4    // 1 in SEED_MOD cycles idle on read data
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] araddr,
  input  logic [7:0]  arlen,
  input  logic        arvalid,
  output logic        arready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rlast,
  output logic        rvalid,
  input  logic        rready,
  input  logic [31:0] aw0addr,
  input  logic        aw0valid,
  output logic        aw0ready,
  input  logic [31:0] w0data,
  input  logic        w0last,
  input  logic        w0valid,
  output logic        w0ready,
  output logic        b0valid,
  input  logic        b0ready,
  input  logic [31:0] aw1addr,
  input  logic        aw1valid,
  output logic        aw1ready,
  input  logic [31:0] w1data,
  input  logic        w1last,
  input  logic        w1valid,
  output logic        w1ready,
  output logic        b1valid,
  input  logic        b1ready,
  output int          rd_stalls,
  output int          wr_bursts
);
  logic [7:0] mem [int];
  int q_addr [$], q_len [$];
  int beat;
  int wa0 [$], wa1 [$];
  int wb0, wb1;

  assign rresp = 2'b00;

  function automatic logic [7:0] rb(int a);
    return mem.exists(a) ? mem[a] : 8'h00;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      arready <= 0; rvalid <= 0; rlast <= 0; rdata <= 0; beat = 0; rd_stalls = 0;
    end else begin
      arready <= ($urandom % 3 != 0);
      if (arvalid && arready) begin q_addr.push_back(int'(araddr)); q_len.push_back(int'(arlen) + 1); end
      if (rvalid && rready) begin
        beat++;
        if (beat == q_len[0]) begin void'(q_addr.pop_front()); void'(q_len.pop_front()); beat = 0; end
      end
      if (rvalid && !rready) rd_stalls++;
      if (!(rvalid && !rready)) begin
        if (q_addr.size() > 0 && ($urandom % SEED_MOD != 0)) begin
          int a;
          a = q_addr[0] + 4 * beat;
          rvalid <= 1;
          rdata  <= {rb(a + 3), rb(a + 2), rb(a + 1), rb(a)};
          rlast  <= (beat == q_len[0] - 1);
        end else rvalid <= 0;
      end
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      aw0ready <= 0; w0ready <= 0; b0valid <= 0; wb0 = 0;
      aw1ready <= 0; w1ready <= 0; b1valid <= 0; wb1 = 0; wr_bursts = 0;
    end else begin
      aw0ready <= ($urandom % 2 == 0);
      aw1ready <= ($urandom % 2 == 0);
      w0ready  <= ($urandom % 3 != 0) && (wa0.size() > 0);
      w1ready  <= ($urandom % 3 != 0) && (wa1.size() > 0);
      if (aw0valid && aw0ready) wa0.push_back(int'(aw0addr));
      if (aw1valid && aw1ready) wa1.push_back(int'(aw1addr));
      if (w0valid && w0ready) begin
        for (int i = 0; i < 4; i++) mem[wa0[0] + 4 * wb0 + i] = w0data[8*i +: 8];
        wb0++;
        if (w0last) begin void'(wa0.pop_front()); wb0 = 0; b0valid <= 1; wr_bursts++; end
      end
      if (w1valid && w1ready) begin
        for (int i = 0; i < 4; i++) mem[wa1[0] + 4 * wb1 + i] = w1data[8*i +: 8];
        wb1++;
        if (w1last) begin void'(wa1.pop_front()); wb1 = 0; b1valid <= 1; wr_bursts++; end
      end
      if (b0valid && b0ready) b0valid <= 0;
      if (b1valid && b1ready) b1valid <= 0;
    end
  end
endmodule

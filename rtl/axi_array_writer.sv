// axi_array_writer: AXI4 write manager that stores an array of N 32-bit words
// (the rho or the theta values of the detected lines) in processor memory.
//
// On start it issues one INCR burst of N beats at base (base must not let the
// burst cross a 4 KiB boundary) and presents the address and data channels
// together. The words are fetched from the producer through a combinational
// read port: data_idx selects the word, data returns it in the same cycle.
// done rises when the write response has arrived and stays high until the next
// start; bresp is recorded in err.
module axi_array_writer #(
  parameter int unsigned N  = 32,
  parameter int unsigned IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [31:0]   base,
  output logic [IW-1:0] data_idx,
  input  logic [31:0]   data,
  // AXI4 write address channel
  output logic [31:0]   m_awaddr,
  output logic [7:0]    m_awlen,
  output logic [2:0]    m_awsize,
  output logic [1:0]    m_awburst,
  output logic          m_awvalid,
  input  logic          m_awready,
  // AXI4 write data channel
  output logic [31:0]   m_wdata,
  output logic [3:0]    m_wstrb,
  output logic          m_wlast,
  output logic          m_wvalid,
  input  logic          m_wready,
  // AXI4 write response channel
  input  logic [1:0]    m_bresp,
  input  logic          m_bvalid,
  output logic          m_bready,
  output logic          done,
  output logic          err
);
  logic [IW:0] beat;

  assign m_awlen   = 8'(N - 1);
  assign m_awsize  = 3'd2;
  assign m_awburst = 2'b01;
  assign data_idx  = IW'(beat);
  assign m_wdata   = data;
  assign m_wstrb   = 4'hf;
  assign m_wlast   = (32'(beat) == N - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_awvalid <= 1'b0; m_awaddr <= '0; m_wvalid <= 1'b0; m_bready <= 1'b0;
      beat <= '0; done <= 1'b0; err <= 1'b0;
    end else if (start) begin
      m_awvalid <= 1'b1; m_awaddr <= base; m_wvalid <= 1'b1; m_bready <= 1'b0;
      beat <= '0; done <= 1'b0; err <= 1'b0;
    end else begin
      if (m_awvalid && m_awready) m_awvalid <= 1'b0;
      if (m_wvalid && m_wready) begin
        if (m_wlast) begin
          m_wvalid <= 1'b0;
          m_bready <= 1'b1;
        end else beat <= beat + 1'b1;
      end
      if (m_bvalid && m_bready) begin
        m_bready <= 1'b0;
        done     <= 1'b1;
        err      <= (m_bresp != 2'b00);
      end
    end
  end

  w_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_wvalid && !m_wready |=> m_wvalid && $stable(m_wdata) && $stable(m_wlast))
    else $error("axi_array_writer: W changed while waiting for wready");
endmodule

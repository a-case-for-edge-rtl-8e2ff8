// overlay_bram: frame buffer of the video overlay, 480 x 270 pixels of 8 bits.
//
// A true dual-port block memory organised as 32-bit words of four pixels
// (pixel p lives in word p/4, byte p%4). Port A is the processor side: word
// read/write with byte enables, read data one cycle after the address. Port B
// is the overlay controller side: read-only, addressed by pixel index, one
// cycle latency, the byte being selected with a registered index.
// Each port has its own clock, so the video side runs independently of the
// processor side; port B sees a word written by port A once the write is done.
module overlay_bram
  import bd_pkg::*;
#(
  parameter int unsigned NPIX  = OVL_W * OVL_H,
  parameter int unsigned DEPTH = (NPIX + 3) / 4,
  parameter int unsigned AW    = $clog2(DEPTH),
  parameter int unsigned PW    = $clog2(NPIX)
) (
  // port A: processor
  input  logic          a_clk,
  input  logic          a_en,
  input  logic [3:0]    a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  // port B: overlay controller
  input  logic          b_clk,
  input  logic          b_en,
  input  logic [PW-1:0] b_pix,
  output logic [7:0]    b_rdata
);
  logic [31:0] mem [DEPTH];
  logic [31:0] b_word;
  logic [1:0]  b_sel;

  always_ff @(posedge a_clk) begin
    if (a_en) begin
      for (int i = 0; i < 4; i++)
        if (a_we[i]) mem[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
      a_rdata <= mem[a_addr];
    end
  end

  always_ff @(posedge b_clk) begin
    if (b_en) begin
      b_word <= mem[b_pix[PW-1:2]];
      b_sel  <= b_pix[1:0];
    end
  end

  assign b_rdata = b_word[8*b_sel +: 8];
endmodule

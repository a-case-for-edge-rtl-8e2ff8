// stream_bitwise: bitwise OR or XOR of two aligned binary mask streams.
//
// The pipeline uses OR to join the two green ranges and XOR to take the
// difference of a dilated and an eroded mask, which leaves the boundary of the
// region (a morphological gradient standing in for a Laplacian edge filter).
// Both inputs come from branches of equal latency, so their pixels arrive in
// the same cycle; an assertion checks that.
//
// Interface: two push streams in, one out; latency 1 cycle.
module stream_bitwise
  import bd_pkg::*;
#(
  parameter bitop_e OP = OP_OR
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a_valid,
  input  logic a_bit,
  input  logic b_valid,
  input  logic b_bit,
  output logic out_valid,
  output logic out_bit
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= a_valid;
      if (a_valid) out_bit <= (OP == OP_XOR) ? (a_bit ^ b_bit) : (a_bit | b_bit);
    end
  end

  inputs_aligned: assert property (@(posedge clk) disable iff (!rst_n) a_valid == b_valid)
    else $error("stream_bitwise: input streams are not aligned");
endmodule

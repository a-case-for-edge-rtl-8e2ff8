// tb_stream_bitwise: both operations of stream_bitwise on random bit pairs,
// checking value and the one-cycle latency.
module tb_stream_bitwise;
  import bd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic a_valid, a_bit, b_bit;
  logic o_valid, o_bit, x_valid, x_bit;
  int checks = 0, failures = 0;

  stream_bitwise #(.OP(OP_OR)) u_or (.clk, .rst_n, .a_valid, .a_bit, .b_valid(a_valid), .b_bit,
                                     .out_valid(o_valid), .out_bit(o_bit));
  stream_bitwise #(.OP(OP_XOR)) u_xor (.clk, .rst_n, .a_valid, .a_bit, .b_valid(a_valid), .b_bit,
                                       .out_valid(x_valid), .out_bit(x_bit));

  initial begin
    a_valid = 0; a_bit = 0; b_bit = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      logic ea, eb;
      ea = 1'($urandom); eb = 1'($urandom);
      a_bit = ea; b_bit = eb; a_valid = 1;
      @(negedge clk);
      a_valid = 0; a_bit = ~ea; b_bit = ~eb;
      checks += 2;
      if (!o_valid || o_bit != (ea | eb)) failures++;
      if (!x_valid || x_bit != (ea ^ eb)) failures++;
      @(negedge clk);
      checks++;
      if (o_valid || x_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

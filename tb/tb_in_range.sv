// tb_in_range: random HSV pixels against random and the green bounds; the
// expected mask bit is worked out channel by channel.
module tb_in_range;
  import bd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  hsv_t lo, hi, in_pix;
  logic in_valid, out_valid, out_bit;
  int checks = 0, failures = 0, hits = 0;

  in_range dut (.*);

  function automatic logic inr(logic [7:0] v, logic [7:0] l, logic [7:0] h);
    return (int'(v) >= int'(l)) && (int'(v) <= int'(h));
  endfunction

  initial begin
    in_valid = 0; in_pix = '0; lo = GREEN1_LO; hi = GREEN1_HI;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      logic e;
      if (i % 500 == 0) begin
        lo = (i < 2000) ? GREEN1_LO : hsv_t'($urandom);
        hi = (i < 2000) ? GREEN1_HI : hsv_t'($urandom | 32'h808080);
      end
      in_pix = hsv_t'($urandom);
      if (i % 3 == 0) in_pix = '{h: lo.h, s: hi.s, v: lo.v};       // on the bounds
      if (i % 7 == 0) in_pix = '{h: hi.h + 8'd1, s: hi.s, v: lo.v};
      e = inr(in_pix.h, lo.h, hi.h) && inr(in_pix.s, lo.s, hi.s) && inr(in_pix.v, lo.v, hi.v);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (e) hits++;
      if (!out_valid || out_bit != e) begin
        failures++;
        $display("FAIL pix=%h lo=%h hi=%h got %b", in_pix, lo, hi, out_bit);
      end
    end
    checks++;
    if (hits < 100) failures++;
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

// tb_overlay_bram: random byte-masked writes on port A, read back on port A
// (words) and on port B (single pixels, separate clock), against a model.
module tb_overlay_bram;
  localparam int NPIX = 480 * 270, DEPTH = NPIX / 4;
  logic a_clk = 0, b_clk = 0;
  always #5 a_clk = ~a_clk;
  always #7 b_clk = ~b_clk;
  logic a_en, b_en;
  logic [3:0] a_we;
  logic [14:0] a_addr;
  logic [31:0] a_wdata, a_rdata;
  logic [16:0] b_pix;
  logic [7:0] b_rdata;
  logic [31:0] model [int];
  int checks = 0, failures = 0;

  overlay_bram dut (.*);

  initial begin
    a_en = 0; a_we = 0; a_addr = 0; a_wdata = 0; b_en = 0; b_pix = 0;
    for (int i = 0; i < 300; i++) begin
      int a;
      logic [3:0] we;
      logic [31:0] d, old;
      a = (i < 150) ? i : int'($urandom % DEPTH);
      if (i == 299) a = DEPTH - 1;
      we = (i < 150 || i == 299) ? 4'hf : 4'($urandom);
      d = $urandom;
      old = model.exists(a) ? model[a] : 32'h0;
      if (!model.exists(a)) we = 4'hf;
      for (int b = 0; b < 4; b++) if (we[b]) old[8*b +: 8] = d[8*b +: 8];
      model[a] = old;
      @(negedge a_clk); a_en = 1; a_we = we; a_addr = 15'(a); a_wdata = d;
      @(negedge a_clk); a_en = 0; a_we = 0;
    end
    foreach (model[a]) begin
      @(negedge a_clk); a_en = 1; a_addr = 15'(a);
      @(negedge a_clk); a_en = 0;
      checks++;
      if (a_rdata != model[a]) begin failures++; $display("FAIL A word %0d", a); end
    end
    foreach (model[a]) begin
      for (int b = 0; b < 4; b++) begin
        @(negedge b_clk); b_en = 1; b_pix = 17'(4 * a + b);
        @(negedge b_clk); b_en = 0;
        checks++;
        if (b_rdata != model[a][8*b +: 8]) begin failures++; $display("FAIL B pix %0d", 4 * a + b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge a_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

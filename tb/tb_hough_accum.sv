// tb_hough_accum: bursts of back-to-back votes (many to the same bin, so the
// forwarding path is exercised), clears and reads of one vote accumulator,
// compared with a count kept here; also checks saturation at all ones.
module tb_hough_accum;
  localparam int NRHO = 40, CW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic inc_en, rd_en, clr_en, fwd_hit;
  logic [5:0] inc_addr, rd_addr, clr_addr;
  logic [CW-1:0] rd_data;
  int model [NRHO];
  int checks = 0, failures = 0, nfwd = 0;

  hough_accum #(.NRHO(NRHO), .CW(CW)) dut (.*);

  always @(posedge clk) if (rst_n && fwd_hit) nfwd++;

  task automatic read_all();
    for (int a = 0; a < NRHO; a++) begin
      @(negedge clk); rd_en = 1; rd_addr = 6'(a);
      @(negedge clk); rd_en = 0;
      checks++;
      if (int'(rd_data) != model[a]) begin
        failures++; $display("FAIL bin %0d = %0d exp %0d", a, rd_data, model[a]);
      end
    end
  endtask

  initial begin
    inc_en = 0; rd_en = 0; clr_en = 0; inc_addr = 0; rd_addr = 0; clr_addr = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int a = 0; a < NRHO; a++) begin
      @(negedge clk); clr_en = 1; clr_addr = 6'(a); model[a] = 0;
    end
    @(negedge clk); clr_en = 0;
    for (int round = 0; round < 3; round++) begin
      int a;
      a = 0;
      for (int i = 0; i < 300; i++) begin
        if ($urandom % 3 == 0) a = int'($urandom % NRHO);   // otherwise repeat the bin
        @(negedge clk); inc_en = ($urandom % 5 != 0); inc_addr = 6'(a);
        if (inc_en && model[a] < (1 << CW) - 1) model[a]++;
      end
      @(negedge clk); inc_en = 0;
      repeat (3) @(negedge clk);
      read_all();
    end
    checks++;
    if (nfwd == 0) begin failures++; $display("FAIL no forwarding"); end
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

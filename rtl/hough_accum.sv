// hough_accum: vote accumulator for one Hough angle.
//
// One block RAM of NRHO counters (one per rho bin). A vote is a
// read-modify-write spread over two cycles: the bin is read in the cycle the
// vote arrives and the incremented count is written in the next. A vote to the
// same bin as the vote before it would read a count that is still being
// written, so the count just written is forwarded instead (fwd_hit marks
// those cycles). This keeps one vote per cycle with a synchronous-read RAM.
//
// Other operations, never in the same cycle as a vote: rd_en reads a bin
// (rd_data valid the next cycle) and clr_en writes zero to a bin.
// Counts saturate at all ones.
module hough_accum #(
  parameter int unsigned NRHO = 484,
  parameter int unsigned CW   = 16,
  parameter int unsigned AW   = $clog2(NRHO)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          inc_en,
  input  logic [AW-1:0] inc_addr,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [CW-1:0] rd_data,
  input  logic          clr_en,
  input  logic [AW-1:0] clr_addr,
  output logic          fwd_hit
);
  logic [CW-1:0] mem [NRHO];
  logic [CW-1:0] q, cur, nxt;
  logic          s1_v, s2_v;
  logic [AW-1:0] s1_a, s2_a, ra;
  logic [CW-1:0] s2_d;

  assign ra      = inc_en ? inc_addr : rd_addr;
  assign fwd_hit = s1_v && s2_v && (s2_a == s1_a);
  assign cur     = fwd_hit ? s2_d : q;
  assign nxt     = (cur == '1) ? cur : cur + 1'b1;
  assign rd_data = q;

  always_ff @(posedge clk) begin
    if (inc_en || rd_en) q <= mem[ra];
    if (s1_v)        mem[s1_a]     <= nxt;
    else if (clr_en) mem[clr_addr] <= '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s2_v <= 1'b0; s1_a <= '0; s2_a <= '0; s2_d <= '0;
    end else begin
      s1_v <= inc_en;
      s1_a <= inc_addr;
      s2_v <= s1_v;
      s2_a <= s1_a;
      if (s1_v) s2_d <= nxt;
    end
  end

  one_access_per_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    inc_en |-> !rd_en && !clr_en)
    else $error("hough_accum: vote collides with a read or clear");
endmodule

// hough_lines: Hough line transform on a binary edge-image stream.
//
// Lines are written rho = (x - W/2) cos(theta) + (y - H/2) sin(theta), with the
// origin at the image centre, theta = t * 180/NTHETA degrees (t = 0..NTHETA-1)
// and rho quantised in steps of RHO pixels into NRHO bins covering
// [-d/2, d/2), d = sqrt(MAXW^2 + MAXH^2).
//
// Operation, started by start with cfg_w, cfg_h and threshold held stable:
//  1. INIT: every accumulator bin is cleared, and for each angle the rho of
//     the upper-left pixel, -(W/2) cos - (H/2) sin, is computed one angle per
//     cycle with a shared multiplier. vote_ready then rises.
//  2. VOTE: one pixel per cycle in raster order. All NTHETA angles vote in
//     parallel, each into its own accumulator RAM (hough_accum). Rho is not
//     recomputed per pixel: each angle keeps a running rho that grows by
//     cos/RHO per pixel and restarts at the next row value (+ sin/RHO) at the
//     end of a row. Rho is kept in units of bins, fixed point with FRAC
//     fraction bits, plus a small bias so that a rho that is exactly on a bin
//     edge lands in the upper bin despite rounding of the step constants.
//  3. SCAN: bins are read one rho row at a time from all accumulators; a bin
//     is a line when its count exceeds threshold and it is a local maximum
//     (greater than the bins at rho-1 and theta-1, at least the bins at rho+1
//     and theta+1; out-of-range neighbours count as 0). Each row is examined
//     one angle per cycle, and every line found is inserted into a list of
//     LINESMAX entries kept sorted by votes (ties: smaller theta, then smaller
//     rho first). Lines beyond LINESMAX are dropped.
//  4. DONE: done is high. The list is read through two independent read ports
//     (rho_idx and theta_idx, combinational) as IEEE-754 single-precision
//     values: rho at the bin centre, theta in radians. Entries past the
//     number of lines found repeat the last line; if none was found, zeros.
//
// Timing: INIT takes max(NRHO, NTHETA) cycles, VOTE cfg_w*cfg_h valid pixels
// plus 2 cycles, SCAN (NRHO+1)*2 + NRHO*NTHETA cycles.
module hough_lines
  import bd_pkg::*;
#(
  parameter int unsigned MAXW     = MAX_W,
  parameter int unsigned MAXH     = MAX_H,
  parameter int unsigned XW       = DIM_W,
  parameter int unsigned RHO      = HOUGH_RHO,
  parameter int unsigned NTHETA   = HOUGH_NTHETA,
  parameter int unsigned LINESMAX = HOUGH_LINESMAX,
  parameter int unsigned CW       = 16,
  parameter int unsigned NRHO     = hough_nrho(MAXW, MAXH, RHO),
  parameter int unsigned AW       = $clog2(NRHO),
  parameter int unsigned TW       = $clog2(NTHETA),
  parameter int unsigned IW       = $clog2(LINESMAX),
  parameter int unsigned FRAC     = 24
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [XW-1:0] cfg_w,
  input  logic [XW-1:0] cfg_h,
  input  logic [CW-1:0] threshold,
  input  logic          in_valid,
  input  logic          in_bit,
  output logic          vote_ready,
  output logic          done,
  output logic [IW:0]   nlines,       // lines kept (at most LINESMAX)
  output logic [15:0]   nfound,       // local maxima found, including dropped ones
  output logic          fwd_hit,      // some accumulator forwarded a count this cycle
  input  logic [IW-1:0] rho_idx,
  output logic [31:0]   rho_f32,
  input  logic [IW-1:0] theta_idx,
  output logic [31:0]   theta_f32
);
  localparam int unsigned RW = 40;                 // running rho width
  localparam real PI = 3.14159265358979323846;

  typedef logic signed [RW-1:0] fx_t;
  typedef fx_t   trig_t [NTHETA];
  typedef logic [31:0] ftab_t [NTHETA];

  function automatic trig_t mk_trig(input bit is_sin);
    trig_t t;
    for (int i = 0; i < NTHETA; i++) begin
      real a, v;
      a = PI * i / NTHETA;
      v = (is_sin ? $sin(a) : $cos(a)) / RHO * (2.0 ** FRAC);
      t[i] = fx_t'($rtoi(v < 0.0 ? v - 0.5 : v + 0.5));
    end
    return t;
  endfunction

  function automatic ftab_t mk_theta_f32();
    ftab_t t;
    for (int i = 0; i < NTHETA; i++) t[i] = real_to_f32(PI * i / NTHETA);
    return t;
  endfunction

  localparam trig_t COS_S = mk_trig(1'b0);  // cos(theta)/RHO, Q.FRAC
  localparam trig_t SIN_S = mk_trig(1'b1);  // sin(theta)/RHO, Q.FRAC
  localparam ftab_t THETA_F = mk_theta_f32();
  localparam fx_t   BIAS  = fx_t'(1) <<< (FRAC - 12);

  typedef struct packed {
    logic [CW-1:0] votes;
    logic [AW-1:0] r;
    logic [TW-1:0] t;
  } line_t;

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_VOTE, S_DRAIN, S_SCAN_RD, S_SCAN_LD, S_SCAN_EV, S_DONE}
    state_e;
  state_e state;

  // ---------------- accumulators ----------------
  logic [NTHETA-1:0] inc_en, fwd;
  logic [AW-1:0]     inc_addr [NTHETA];
  logic [CW-1:0]     acc_q    [NTHETA];
  logic              rd_en, clr_en;
  logic [AW-1:0]     rd_addr, clr_addr;

  for (genvar g = 0; g < NTHETA; g++) begin : g_acc
    hough_accum #(.NRHO(NRHO), .CW(CW), .AW(AW)) u_acc (
      .clk, .rst_n,
      .inc_en(inc_en[g]), .inc_addr(inc_addr[g]),
      .rd_en, .rd_addr, .rd_data(acc_q[g]),
      .clr_en, .clr_addr, .fwd_hit(fwd[g])
    );
  end
  assign fwd_hit = |fwd;

  // ---------------- running rho per angle ----------------
  fx_t           rho_row [NTHETA];
  fx_t           rho_cur [NTHETA];
  logic [XW-1:0] px, py;
  logic [15:0]   icnt;
  logic [TW-1:0] ti;
  fx_t           rho0;

  // Eq. for the upper-left pixel, one angle at a time (shared multiplier)
  assign rho0 = -((fx_t'(cfg_w) * COS_S[ti] + fx_t'(cfg_h) * SIN_S[ti]) >>> 1) + BIAS;

  function automatic logic [AW-1:0] to_bin(input fx_t v);
    fx_t b;
    b = (v >>> FRAC) + fx_t'(NRHO / 2);
    if (b < 0) return '0;
    if (b > fx_t'(NRHO - 1)) return AW'(NRHO - 1);
    return AW'(b);
  endfunction

  always_comb begin
    for (int t = 0; t < NTHETA; t++) begin
      inc_en[t]   = (state == S_VOTE) && in_valid && in_bit;
      inc_addr[t] = to_bin(rho_cur[t]);
    end
  end

  // ---------------- scan window and sorted line list ----------------
  logic [CW-1:0] prv [NTHETA];
  logic [CW-1:0] cur [NTHETA];
  logic [CW-1:0] nxt [NTHETA];
  logic [AW:0]   rr;
  logic [TW-1:0] te;
  line_t         lst [LINESMAX];
  logic [IW:0]   cnt;
  logic          cand;
  line_t         cline;

  always_comb begin
    logic [CW-1:0] c, lt, rt;
    c    = cur[te];
    lt   = (te == 0) ? '0 : cur[te - 1'b1];
    rt   = (32'(te) == NTHETA - 1) ? '0 : cur[te + 1'b1];
    cand = (state == S_SCAN_EV) && (c > threshold) && (c > prv[te]) && (c >= nxt[te]) &&
           (c > lt) && (c >= rt);
    cline = '{votes: c, r: AW'(rr - 1'b1), t: te};
  end

  function automatic logic beats(input line_t a, input line_t b);
    if (a.votes != b.votes) return a.votes > b.votes;
    if (a.t != b.t) return a.t < b.t;
    return a.r < b.r;
  endfunction

  always_comb begin
    rd_en    = (state == S_SCAN_RD) && (32'(rr) < NRHO);
    rd_addr  = AW'(rr);
    clr_en   = (state == S_INIT) && (32'(icnt) < NRHO);
    clr_addr = AW'(icnt);
  end

  assign vote_ready = (state == S_VOTE);
  assign done       = (state == S_DONE);
  assign nlines     = cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      px     <= '0; py <= '0; icnt <= '0; ti <= '0; rr <= '0; te <= '0;
      cnt    <= '0; nfound <= '0;
      for (int t = 0; t < NTHETA; t++) begin
        rho_row[t] <= '0; rho_cur[t] <= '0; prv[t] <= '0; cur[t] <= '0; nxt[t] <= '0;
      end
      for (int i = 0; i < LINESMAX; i++) lst[i] <= '0;
    end else if (start) begin
      state <= S_INIT;
      icnt  <= '0; ti <= '0; px <= '0; py <= '0; cnt <= '0; nfound <= '0;
    end else begin
      unique case (state)
        S_IDLE: ;
        S_INIT: begin
          if (32'(icnt) < NTHETA) begin
            rho_row[ti] <= rho0;
            rho_cur[ti] <= rho0;
            if (32'(ti) < NTHETA - 1) ti <= ti + 1'b1;
          end
          icnt <= icnt + 1'b1;
          if (32'(icnt) == ((NRHO > NTHETA) ? NRHO : NTHETA) - 1) state <= S_VOTE;
        end
        S_VOTE: if (in_valid) begin
          for (int t = 0; t < NTHETA; t++) begin
            if (px == cfg_w - 1'b1) begin
              rho_row[t] <= rho_row[t] + SIN_S[t];
              rho_cur[t] <= rho_row[t] + SIN_S[t];
            end else begin
              rho_cur[t] <= rho_cur[t] + COS_S[t];
            end
          end
          if (px == cfg_w - 1'b1) begin
            px <= '0;
            py <= py + 1'b1;
            if (py == cfg_h - 1'b1) begin state <= S_DRAIN; icnt <= '0; end
          end else px <= px + 1'b1;
        end
        S_DRAIN: begin                  // let the last read-modify-writes finish
          icnt <= icnt + 1'b1;
          if (icnt == 16'd2) begin
            state <= S_SCAN_RD;
            rr    <= '0;
            for (int t = 0; t < NTHETA; t++) begin prv[t] <= '0; cur[t] <= '0; nxt[t] <= '0; end
          end
        end
        S_SCAN_RD: state <= S_SCAN_LD;
        S_SCAN_LD: begin
          for (int t = 0; t < NTHETA; t++) begin
            prv[t] <= cur[t];
            cur[t] <= nxt[t];
            nxt[t] <= (32'(rr) < NRHO) ? acc_q[t] : '0;
          end
          te <= '0;
          if (rr == '0) begin rr <= rr + 1'b1; state <= S_SCAN_RD; end
          else state <= S_SCAN_EV;
        end
        S_SCAN_EV: begin
          if (cand) begin
            nfound <= nfound + 1'b1;
            for (int i = 0; i < LINESMAX; i++) begin
              logic bi, bp;
              bi = (32'(i) >= 32'(cnt)) || beats(cline, lst[i]);
              bp = (i == 0) ? 1'b0 : ((32'(i - 1) >= 32'(cnt)) || beats(cline, lst[i-1]));
              if (bi) lst[i] <= bp ? lst[i-1] : cline;
            end
            if (32'(cnt) < LINESMAX) cnt <= cnt + 1'b1;
          end
          if (32'(te) == NTHETA - 1) begin
            if (32'(rr) == NRHO) state <= S_DONE;
            else begin rr <= rr + 1'b1; state <= S_SCAN_RD; end
          end else te <= te + 1'b1;
        end
        S_DONE: ;
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- float read ports ----------------
  function automatic line_t pick(input logic [IW-1:0] idx);
    if (cnt == '0) return '0;
    if ({1'b0, idx} < cnt) return lst[idx];
    return lst[cnt - 1'b1];
  endfunction

  // rho of a bin centre, (2*(r - NRHO/2) + 1) * RHO / 2, as a float
  function automatic logic [31:0] rho_to_f32(input logic [AW-1:0] r);
    logic signed [AW+8:0] v;
    logic [AW+8:0]        m;
    int                   p;
    logic [31:0]          f;
    v = ($signed({1'b0, r, 1'b1}) - (AW+9)'(NRHO)) * (AW+9)'(RHO);
    m = v[AW+8] ? -v : v;
    p = 0;
    for (int i = 0; i < AW + 9; i++) if (m[i]) p = i;
    f[31]    = v[AW+8];
    f[30:23] = 8'(127 + p - 1);
    f[22:0]  = 23'((m << (23 - p)) & 24'h7fffff);
    return f;
  endfunction

  always_comb begin
    line_t lr, lt;
    lr = pick(rho_idx);
    lt = pick(theta_idx);
    rho_f32   = (cnt == '0) ? 32'h0 : rho_to_f32(lr.r);
    theta_f32 = (cnt == '0) ? 32'h0 : THETA_F[lt.t];
  end
endmodule

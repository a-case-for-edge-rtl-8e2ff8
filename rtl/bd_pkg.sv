// bd_pkg: types and constants shared by the reversi board detection accelerator
// and its video overlay subsystem.
//
// The numbers that come from the design description are the maximum image size
// (1024 x 1024), the green thresholds in OpenCV HSV units (45 <= H <= 90 with
// S >= 89 and V >= 30, or S >= 64 and V >= 89), the Hough steps (3 pixels in rho,
// 3 degrees in theta, i.e. 60 angles), the vote threshold (500), LINESMAX (32)
// and the 480 x 270 x 8-bit overlay. Bus widths, register layout and fixed-point
// formats are this implementation's own choices.
package bd_pkg;

  // ---------------- image geometry ----------------
  localparam int unsigned MAX_W   = 1024;
  localparam int unsigned MAX_H   = 1024;
  localparam int unsigned DIM_W   = 11;          // holds 0..1024

  // One colour pixel, stored in memory as the bytes B, G, R (OpenCV order).
  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } bgr_t;

  // OpenCV 8-bit HSV: H in 0..179, S and V in 0..255.
  typedef struct packed {
    logic [7:0] h;
    logic [7:0] s;
    logic [7:0] v;
  } hsv_t;

  // ---------------- green region thresholds ----------------
  localparam hsv_t GREEN1_LO = '{h: 8'd45, s: 8'd89, v: 8'd30};
  localparam hsv_t GREEN1_HI = '{h: 8'd90, s: 8'd255, v: 8'd255};
  localparam hsv_t GREEN2_LO = '{h: 8'd45, s: 8'd64, v: 8'd89};
  localparam hsv_t GREEN2_HI = '{h: 8'd90, s: 8'd255, v: 8'd255};

  // ---------------- Hough transform ----------------
  localparam int unsigned HOUGH_RHO      = 3;     // rho step, pixels
  localparam int unsigned HOUGH_NTHETA   = 60;    // 180 degrees / 3 degrees
  localparam int unsigned HOUGH_THRESH   = 500;   // votes needed for a line
  localparam int unsigned HOUGH_LINESMAX = 32;

  typedef enum logic {OP_OR, OP_XOR} bitop_e;

  // ceil(sqrt(n)) for elaboration-time sizing.
  function automatic int unsigned isqrt_ceil(input longint unsigned n);
    longint unsigned r;
    r = 0;
    while (r * r < n) r++;
    return int'(r);
  endfunction

  // Number of rho bins for an image of at most w x h pixels: rho covers
  // [-d/2, d/2) with d = sqrt(w^2 + h^2); the count is made even so that bin
  // NRHO/2 starts at rho = 0.
  function automatic int unsigned hough_nrho(input int unsigned w, input int unsigned h,
                                             input int unsigned step);
    int unsigned d;
    d = isqrt_ceil(longint'(w) * w + longint'(h) * h);
    return 2 * ((d + 2 * step - 1) / (2 * step));
  endfunction

  // IEEE-754 single-precision bit pattern of a real (round to nearest),
  // evaluated at elaboration only. Handles normal numbers and zero.
  function automatic logic [31:0] real_to_f32(input real v);
    logic [63:0] d;
    logic [10:0] e11;
    logic [52:0] m;
    logic [23:0] m24;
    int          e;
    if (v == 0.0) return 32'h0;
    d   = $realtobits(v);
    e11 = d[62:52];
    m   = {1'b1, d[51:0]};
    m24 = m[52:29] + 24'(m[28]);
    e   = int'(e11) - 1023 + 127;
    if (m24 == 24'h0) begin      // rounding carried out of the mantissa
      e   = e + 1;
      m24 = 24'h800000;
    end
    return {d[63], 8'(e), m24[22:0]};
  endfunction

  // ---------------- accelerator register map (AXI-Lite, byte addresses) --------
  localparam logic [7:0] REG_CTRL     = 8'h00;  // [0] start (write 1), [1] done, [2] idle
  localparam logic [7:0] REG_IMG      = 8'h10;  // input image base address
  localparam logic [7:0] REG_RHO      = 8'h18;  // rho array base address
  localparam logic [7:0] REG_THETA    = 8'h20;  // theta array base address
  localparam logic [7:0] REG_ROWS     = 8'h28;  // image height
  localparam logic [7:0] REG_COLS     = 8'h30;  // image width
  localparam logic [7:0] REG_THRESH   = 8'h38;  // Hough vote threshold
  localparam logic [7:0] REG_GAUSS_WC = 8'h40;  // Gaussian centre weight, Q0.16
  localparam logic [7:0] REG_GAUSS_WS = 8'h44;  // Gaussian side weight, Q0.16
  localparam logic [7:0] REG_NLINES   = 8'h48;  // lines found (read only)

  // ---------------- overlay ----------------
  localparam int unsigned OVL_W     = 480;
  localparam int unsigned OVL_H     = 270;
  localparam int unsigned OVL_SCALE = 4;        // 1920 x 1080 / 480 x 270

endpackage

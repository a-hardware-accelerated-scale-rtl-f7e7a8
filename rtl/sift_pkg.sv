// sift_pkg: word formats, constants and elaboration-time tables shared by the
// SIFT accelerator.
//
// Word lengths follow the fixed-point table of the design (M integer bits,
// N fraction bits): source pixel 8Q0, Gaussian pixel 8Q16, DoG pixel 6Q16
// (two's complement), gradient orientation 9Q0 (degrees), gradient magnitude
// 8Q16, key-point x 11Q0, y 10Q0, main orientation 9Q0, feature element
// 12Q16. The scale-space setup is two octaves, three scales per octave,
// sigma0 = 1.6, six Gaussian windows {9,11,13,17,21,25} taps with Q16
// coefficients.
//
// All filter and weight tables are computed here at elaboration time from
// their formulas (no stored tables):
//   Gaussian tap i of scale s : g(i) = exp(-i^2 / (2 sigma_s^2)),
//                               sigma_s = 1.6 * 2^(s/3), normalised so the
//                               2R+1 taps sum to 1.0, rounded to Q16.
//   MOG weight (1-D factor)   : exp(-d^2 / (2 (1.5 sigma)^2))   Q16
//   LDG weight (1-D factor)   : exp(-d^2 / (2 (6 sigma)^2))     Q16
//   sin / cos of whole degrees: Q14.
// Window radii of the feature generator (MOG 9/11/14, LDG 21/27/34) and the
// gradient RAM-bar counts 43/55/69 = 2*R_LDG+1 follow OpenCV's SIFT
// constants; the bar counts are the design's own numbers.
package sift_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int IMG_W_DEF   = 1280;    // first-octave width
  localparam int IMG_H_DEF   = 720;     // first-octave height
  localparam int N_GAUSS     = 6;       // L0..L5
  localparam int N_DOG       = 5;       // D0..D4
  localparam int N_KPS       = 3;       // key-point scales 1..3
  localparam int GMAX_R      = 12;      // radius of the 25x25 window
  localparam int IMG_BARS    = 2*GMAX_R + 1;
  localparam int HBLANK_DEF  = 16;      // idle beats after each row
  localparam int IMG_BORDER  = 5;       // key-points this close to the border are ignored
  localparam int STAGE2_LAT  = 24;      // latency of key-point detection and gradient stages
  // contrast threshold 0.04 / 3 of the 8-bit range, in 6Q16 DoG units
  localparam int CONTRAST_THR_DEF = 222822;
  localparam int EDGE_R_DEF       = 10;  // edge threshold r

  // ------------------------------------------------------------ word widths
  localparam int PIX_W  = 8;            // 8Q0
  localparam int L_W    = 24;           // 8Q16
  localparam int D_W    = 22;           // 6Q16 signed
  localparam int ORI_W  = 9;            // 9Q0 degrees
  localparam int MAG_W  = 24;           // 8Q16
  localparam int GRD_W  = ORI_W + MAG_W;// 33-bit gradient word
  localparam int XW     = 11;
  localparam int YW     = 10;
  localparam int FEAT_W = 28;           // 12Q16
  localparam int OFF_W  = 6;            // sub-pixel offset, signed Q1.4
  localparam int CW     = 13;           // signed beat coordinate width

  typedef logic [GRD_W-1:0] grad_word_t;

  // one beat of the row stream: coordinates of the data it carries
  typedef struct packed {
    logic                 oct;          // 0: first octave, 1: second octave
    logic signed [CW-1:0] x;
    logic signed [CW-1:0] y;
  } beat_tag_t;

  // key-point record as produced by the detector
  typedef struct packed {
    logic                    oct;
    logic [XW-1:0]           x;
    logic [YW-1:0]           y;
    logic signed [OFF_W-1:0] dx;        // sub-pixel offset, Q1.4 pixels
    logic signed [OFF_W-1:0] dy;
  } kp_loc_t;

  // key-point record inside a feature-generation unit
  typedef struct packed {
    kp_loc_t     loc;
    logic [15:0] seq;                   // absolute gradient-row number of the key-point row
    logic [6:0]  bar;                   // RAM bar holding that row
  } kp_entry_t;

  // one element of a descriptor output stream
  typedef struct packed {
    kp_loc_t              loc;
    logic [1:0]           scale;        // 0..2 for scales 1..3
    logic [ORI_W-1:0]     ori;          // main orientation, degrees
    logic [6:0]           idx;          // element index 0..127
    logic [FEAT_W-1:0]    feat;         // 12Q16
  } desc_elem_t;

  // --------------------------------------------------------------- tables
  localparam real SIGMA0 = 1.6;

  function automatic real sigma_of(int s);
    return SIGMA0 * (2.0 ** (real'(s) / 3.0));
  endfunction

  function automatic int gauss_radius(int s);
    case (s)
      0: return 4;  1: return 5;  2: return 6;
      3: return 8;  4: return 10; default: return 12;
    endcase
  endfunction

  // Q16 coefficient of tap offset i (|i| <= radius) for scale s
  function automatic int gauss_coef(int s, int i);
    real sg, sum;
    int  r;
    sg  = sigma_of(s);
    r   = gauss_radius(s);
    sum = 0.0;
    for (int j = -r; j <= r; j++) sum += $exp(-real'(j*j) / (2.0*sg*sg));
    if (i > r || i < -r) return 0;
    return int'($exp(-real'(i*i) / (2.0*sg*sg)) / sum * 65536.0);
  endfunction

  typedef logic [N_GAUSS-1:0][GMAX_R:0][16:0] gcoef_tab_t;
  function automatic gcoef_tab_t make_gcoef();
    gcoef_tab_t t;
    for (int s = 0; s < N_GAUSS; s++)
      for (int i = 0; i <= GMAX_R; i++) t[s][i] = 17'(gauss_coef(s, i));
    return t;
  endfunction
  localparam gcoef_tab_t GCOEF = make_gcoef();

  // feature-generation radii per key-point scale (0..2 -> scale 1..3)
  function automatic int mog_radius(int k);
    return int'(4.5 * sigma_of(k + 1) + 0.0);
  endfunction
  function automatic int ldg_radius(int k);
    // 3 sigma * sqrt(2) * (4+1)/2, the radius that covers the rotated 4x4 grid
    return int'(3.0 * sigma_of(k + 1) * 1.41421356 * 2.5);
  endfunction
  function automatic int ldg_bars(int k);
    return 2 * ldg_radius(k) + 1;
  endfunction

  localparam int WTAB_N = 40;
  typedef logic [WTAB_N-1:0][16:0] wtab_t;
  function automatic wtab_t make_wtab(real sg);
    wtab_t t;
    for (int d = 0; d < WTAB_N; d++) t[d] = 17'(int'($exp(-real'(d*d) / (2.0*sg*sg)) * 65536.0));
    return t;
  endfunction

  // reciprocal of the sub-region width 3 sigma, Q16
  function automatic int inv_hist_w(int k);
    return int'(65536.0 / (3.0 * sigma_of(k + 1)));
  endfunction

  typedef logic [359:0][15:0] trig_tab_t;
  function automatic trig_tab_t make_sin();
    trig_tab_t t;
    for (int a = 0; a < 360; a++) t[a] = 16'(int'($sin(real'(a) * 3.14159265358979 / 180.0) * 16384.0));
    return t;
  endfunction
  localparam trig_tab_t SIN_T = make_sin();

  // sin / cos lookup, Q14 signed
  function automatic logic signed [15:0] sin_deg(logic [ORI_W-1:0] a);
    return SIN_T[a];
  endfunction
  function automatic logic signed [15:0] cos_deg(logic [ORI_W-1:0] a);
    logic [ORI_W-1:0] b;
    b = (a >= 9'd270) ? a - 9'd270 : a + 9'd90;
    return SIN_T[b];
  endfunction

  // ------------------------------------------ gradient window bookkeeping
  // rows_done counts completed gradient rows of an octave (never reset
  // between frames); a key-point's row has number e.seq.

  // all rows of the window (or up to the bottom of the image) are stored
  function automatic logic kp_window_ready(logic [15:0] rows_done, kp_entry_t e,
                                           int r, int img_h);
    int need;
    int h;
    h    = e.loc.oct ? img_h / 2 : img_h;
    need = h - 1 - int'(e.loc.y);
    if (need > r) need = r;
    return int'(16'(rows_done - e.seq)) >= need + 1;
  endfunction

  // number of window pixels already replaced by newer rows
  function automatic int kp_overwritten(logic [15:0] rows_done, kp_entry_t e, int r);
    int rows;
    rows = int'(16'(rows_done - e.seq)) - (r + 1);
    return (rows > 0) ? rows * (2*r + 1) : 0;
  endfunction

endpackage

// kp_detect: key-point detection on the DoG stream (scales 1..3 of both
// octaves).
//
// Each DoG image D0..D4 has its own 3-bar RAM-bar cluster. Reading the three
// stored rows at the write column and keeping the last three columns in
// registers gives a 3x3 window of every DoG image centred on (x-1, y-2). For
// each key-point scale k = 1..3 the centre of D_k is compared with its 26
// neighbours in D_{k-1}, D_k, D_{k+1}:
//   * extremum: centre >= all 26 neighbours and > +CONTRAST_THR, or
//               centre <= all 26 neighbours and < -CONTRAST_THR;
//   * edge test: with Hessian terms dxx, dyy, dxy of D_k,
//               det > 0 and tr^2 * EDGE_R < (EDGE_R+1)^2 * det;
//   * border:   the centre is at least IMG_BORDER pixels inside the image.
// A passing centre raises kp_flag[k-1]. The coordinate offset reported with
// it is a one-dimensional quadratic fit per axis, -D'/D'', in signed Q1.4
// pixels, clamped to +-0.5.
//
// Interface: in_* is the DoG stream of gaussian_dog; out_tag is the centre
// coordinate (oct, x-1, y-2) of the input beat. Timing: one beat per clock,
// fixed latency STAGE2_LAT (padded to match grad_compute, so that a key-point
// flag leaves together with the gradient of the same pixel).
//
// Extremum, contrast (0.04) and edge (10) thresholds and the 5-pixel border
// follow the design's evaluation settings. The non-strict comparison, the
// contrast test on the un-interpolated value and the per-axis offset are this
// implementation's simplifications.
module kp_detect
  import sift_pkg::*;
#(
  parameter int IMG_W        = IMG_W_DEF,
  parameter int IMG_H        = IMG_H_DEF,
  parameter int CONTRAST_THR = CONTRAST_THR_DEF,
  parameter int EDGE_R       = EDGE_R_DEF
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  beat_tag_t                      in_tag,
  input  logic [N_DOG-1:0][D_W-1:0]      in_d,
  output logic                           out_valid,
  output beat_tag_t                      out_tag,
  output logic [N_KPS-1:0]               kp_flag,
  output logic [N_KPS-1:0][OFF_W-1:0]    kp_dx,
  output logic [N_KPS-1:0][OFF_W-1:0]    kp_dy
);
  typedef logic signed [D_W-1:0] dval_t;

  function automatic logic signed [CW-1:0] width_of(logic oct);
    return oct ? CW'(IMG_W/2) : CW'(IMG_W);
  endfunction
  function automatic logic signed [CW-1:0] height_of(logic oct);
    return oct ? CW'(IMG_H/2) : CW'(IMG_H);
  endfunction

  logic in_x_ok, row_end;
  assign in_x_ok = (in_tag.x >= 0) && (in_tag.x < width_of(in_tag.oct));
  assign row_end = (in_tag.x == width_of(in_tag.oct) - 1);

  // ------------------------------------------------------------- clusters
  logic [N_DOG-1:0][2:0][D_W-1:0] rows;           // [dog][row: 0 = y-3 .. 2 = y-1]
  for (genvar i = 0; i < N_DOG; i++) begin : g_dog
    ram_bar_cluster #(.NBARS(3), .DEPTH(IMG_W), .WIDTH(D_W)) u_bars (
      .clk, .rst_n, .oct(in_tag.oct), .addr(in_x_ok ? $clog2(IMG_W)'(in_tag.x) : '0),
      .wr_en(in_valid && in_x_ok), .wdata(in_d[i]), .row_end, .rd_en(in_valid),
      .rd_rows(rows[i]));
  end

  // --------------------------------------------------------- window (cycle 2)
  logic v1, v2;
  beat_tag_t t1, t2;
  dval_t win [N_DOG][3][3];                        // [dog][row][col], col 2 newest
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin v1 <= 1'b0; v2 <= 1'b0; end
    else        begin v1 <= in_valid; v2 <= v1; end
  end
  always_ff @(posedge clk) begin
    t1 <= in_tag;
    t2 <= t1;
    if (v1)
      for (int i = 0; i < N_DOG; i++)
        for (int r = 0; r < 3; r++) begin
          win[i][r][0] <= win[i][r][1];
          win[i][r][1] <= win[i][r][2];
          win[i][r][2] <= dval_t'(rows[i][r]);
        end
  end

  // centre coordinate of the window
  logic signed [CW-1:0] xc2, yc2;
  assign xc2 = t2.x - CW'(1);
  assign yc2 = t2.y - CW'(2);

  // ------------------------------------------------ extremum test (cycle 3)
  logic v3;
  beat_tag_t t3;
  logic [N_KPS-1:0] ext3;
  dval_t hw3 [N_KPS][3][3];                        // D_k window kept for the edge test
  always_ff @(posedge clk) begin
    logic in_img;
    in_img = (xc2 >= CW'(IMG_BORDER)) && (xc2 < width_of(t2.oct) - CW'(IMG_BORDER)) &&
             (yc2 >= CW'(IMG_BORDER)) && (yc2 < height_of(t2.oct) - CW'(IMG_BORDER));
    t3 <= t2;
    for (int k = 0; k < N_KPS; k++) begin
      dval_t c;
      logic is_max, is_min;
      c = win[k+1][1][1];
      is_max = (c > dval_t'(CONTRAST_THR));
      is_min = (c < -dval_t'(CONTRAST_THR));
      for (int i = k; i <= k+2; i++)
        for (int r = 0; r < 3; r++)
          for (int q = 0; q < 3; q++) begin
            if (win[i][r][q] > c) is_max = 1'b0;
            if (win[i][r][q] < c) is_min = 1'b0;
          end
      ext3[k] <= in_img && (is_max || is_min);
      hw3[k]  <= win[k+1];
    end
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v3 <= 1'b0; else v3 <= v2;

  // ------------------------------------------ edge test and offset (cycle 4)
  localparam int HW = D_W + 3;
  logic v4;
  beat_tag_t t4;
  logic [N_KPS-1:0] kp4;
  logic [N_KPS-1:0][OFF_W-1:0] dx4, dy4;

  function automatic logic [OFF_W-1:0] offset_of(logic signed [HW-1:0] grad2,
                                                 logic signed [HW-1:0] curv);
    // -(grad2 / 2) / curv in Q1.4, clamped to +-8 (half a pixel)
    logic signed [HW+4:0] q;
    if (curv == 0) return '0;
    q = -((HW+5)'(grad2) * 8) / (HW+5)'(curv);
    if (q > 8)  q = 8;
    if (q < -8) q = -8;
    return OFF_W'(q);
  endfunction

  always_ff @(posedge clk) begin
    t4 <= t3;
    for (int k = 0; k < N_KPS; k++) begin
      logic signed [HW-1:0] c, dxx, dyy, dxy4, gx2, gy2;
      logic signed [2*HW+8:0] tr, det16, lhs, rhs;
      c    = HW'(hw3[k][1][1]);
      dxx  = HW'(hw3[k][1][2]) + HW'(hw3[k][1][0]) - 2*c;
      dyy  = HW'(hw3[k][2][1]) + HW'(hw3[k][0][1]) - 2*c;
      dxy4 = HW'(hw3[k][2][2]) - HW'(hw3[k][0][2]) - HW'(hw3[k][2][0]) + HW'(hw3[k][0][0]);
      gx2  = HW'(hw3[k][1][2]) - HW'(hw3[k][1][0]);
      gy2  = HW'(hw3[k][2][1]) - HW'(hw3[k][0][1]);
      tr    = (2*HW+9)'(dxx) + (2*HW+9)'(dyy);
      det16 = 16 * (2*HW+9)'(dxx) * (2*HW+9)'(dyy) - (2*HW+9)'(dxy4) * (2*HW+9)'(dxy4);
      lhs   = 16 * tr * tr * (2*HW+9)'(EDGE_R);
      rhs   = (2*HW+9)'((EDGE_R+1)*(EDGE_R+1)) * det16;
      kp4[k] <= ext3[k] && (det16 > 0) && (lhs < rhs);
      dx4[k] <= offset_of(gx2, dxx);
      dy4[k] <= offset_of(gy2, dyy);
    end
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v4 <= 1'b0; else v4 <= v3;

  // --------------------------------------------- pad to STAGE2_LAT cycles
  localparam int PAD = STAGE2_LAT - 4;
  localparam int PW  = 1 + $bits(beat_tag_t) + N_KPS*(1 + 2*OFF_W);
  logic [PW-1:0] pad_q [PAD];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < PAD; i++) pad_q[i] <= '0;
    else begin
      pad_q[0] <= {v4, t4, kp4, dx4, dy4};
      for (int i = 1; i < PAD; i++) pad_q[i] <= pad_q[i-1];
    end
  end
  always_comb begin
    beat_tag_t tt;
    logic [N_KPS-1:0] kf;
    {out_valid, tt, kf, kp_dx, kp_dy} = pad_q[PAD-1];
    out_tag   = tt;
    out_tag.x = tt.x - CW'(1);
    out_tag.y = tt.y - CW'(2);
    kp_flag   = kf & {N_KPS{out_valid}};
  end
endmodule

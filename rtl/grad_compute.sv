// grad_compute: gradient orientation and magnitude of the Gaussian images
// L1, L2, L3 (the scales on which key-points are found), both octaves.
//
// Each of the three images has a 3-bar RAM-bar cluster; with the last three
// columns kept in registers this gives a 3x3 window centred on (x-1, y-2),
// the same centre as kp_detect. Central differences
//   gx = L(x+1, y) - L(x-1, y),   gy = L(x, y+1) - L(x, y-1)
// are formed (a neighbour outside the image takes the centre's mirror, so
// the difference becomes 0) and a CORDIC per scale returns
//   m = sqrt(gx^2 + gy^2)  (8Q16, saturated)  and
//   theta = atan2(gy, gx)  (whole degrees 0..359, 9Q0).
// The output word per scale is {theta, m}, 33 bits.
//
// Interface: in_* is the Gaussian stream of gaussian_dog (L1..L3 only);
// out_tag is the centre coordinate (oct, x-1, y-2). Timing: one beat per
// clock, latency STAGE2_LAT, equal to kp_detect's.
//
// The formulas and word lengths follow the design; the CORDIC, the mirror at
// the border and the pipeline depth are this implementation's choices.
module grad_compute
  import sift_pkg::*;
#(
  parameter int IMG_W = IMG_W_DEF,
  parameter int IMG_H = IMG_H_DEF
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  beat_tag_t                      in_tag,
  input  logic [N_KPS-1:0][L_W-1:0]      in_l,     // L1, L2, L3
  output logic                           out_valid,
  output beat_tag_t                      out_tag,
  output logic [N_KPS-1:0][GRD_W-1:0]    grad      // {orientation, magnitude}
);
  localparam int GW = L_W + 1;

  function automatic logic signed [CW-1:0] width_of(logic oct);
    return oct ? CW'(IMG_W/2) : CW'(IMG_W);
  endfunction
  function automatic logic signed [CW-1:0] height_of(logic oct);
    return oct ? CW'(IMG_H/2) : CW'(IMG_H);
  endfunction

  logic in_x_ok, row_end;
  assign in_x_ok = (in_tag.x >= 0) && (in_tag.x < width_of(in_tag.oct));
  assign row_end = (in_tag.x == width_of(in_tag.oct) - 1);

  logic [N_KPS-1:0][2:0][L_W-1:0] rows;
  for (genvar i = 0; i < N_KPS; i++) begin : g_bars
    ram_bar_cluster #(.NBARS(3), .DEPTH(IMG_W), .WIDTH(L_W)) u_bars (
      .clk, .rst_n, .oct(in_tag.oct), .addr(in_x_ok ? $clog2(IMG_W)'(in_tag.x) : '0),
      .wr_en(in_valid && in_x_ok), .wdata(in_l[i]), .row_end, .rd_en(in_valid),
      .rd_rows(rows[i]));
  end

  // window, cycle 2
  logic v1, v2, v3;
  beat_tag_t t1, t2, t3;
  logic [L_W-1:0] win [N_KPS][3][3];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; end
    else        begin v1 <= in_valid; v2 <= v1; v3 <= v2; end
  end
  always_ff @(posedge clk) begin
    t1 <= in_tag;
    t2 <= t1;
    t3 <= t2;
    if (v1)
      for (int i = 0; i < N_KPS; i++)
        for (int r = 0; r < 3; r++) begin
          win[i][r][0] <= win[i][r][1];
          win[i][r][1] <= win[i][r][2];
          win[i][r][2] <= rows[i][r];
        end
  end

  // central differences with border mirroring, cycle 3
  logic signed [CW-1:0] xc2, yc2;
  assign xc2 = t2.x - CW'(1);
  assign yc2 = t2.y - CW'(2);
  logic signed [N_KPS-1:0][GW-1:0] gx3, gy3;
  always_ff @(posedge clk) begin
    logic xb, yb;
    xb = (xc2 <= 0) || (xc2 >= width_of(t2.oct) - 1);
    yb = (yc2 <= 0) || (yc2 >= height_of(t2.oct) - 1);
    for (int i = 0; i < N_KPS; i++) begin
      gx3[i] <= xb ? '0 : $signed({1'b0, win[i][1][2]}) - $signed({1'b0, win[i][1][0]});
      gy3[i] <= yb ? '0 : $signed({1'b0, win[i][2][1]}) - $signed({1'b0, win[i][0][1]});
    end
  end

  // CORDIC, cycles 3..21
  localparam int N_ITER = 16;
  localparam int C_LAT  = N_ITER + 2;
  logic [N_KPS-1:0][MAG_W-1:0] mag;
  logic [N_KPS-1:0][ORI_W-1:0] ang;
  for (genvar i = 0; i < N_KPS; i++) begin : g_cordic
    cordic_vec #(.IN_W(GW), .OUT_W(MAG_W), .N_ITER(N_ITER)) u_cordic (
      .clk, .rst_n, .in_valid(v3), .gx(gx3[i]), .gy(gy3[i]),
      .out_valid(), .mag(mag[i]), .ang(ang[i]));
  end

  // tag delay and padding to STAGE2_LAT
  localparam int TD = STAGE2_LAT - 3;              // tag delay after cycle 3
  localparam int GP = STAGE2_LAT - 3 - C_LAT;      // extra delay of the gradient words
  logic [$bits(beat_tag_t):0] tq [TD];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < TD; i++) tq[i] <= '0;
    else begin
      tq[0] <= {v3, t3};
      for (int i = 1; i < TD; i++) tq[i] <= tq[i-1];
    end
  end
  logic [N_KPS-1:0][GRD_W-1:0] gq [GP];
  always_ff @(posedge clk) begin
    for (int k = 0; k < N_KPS; k++) gq[0][k] <= {ang[k], mag[k]};
    for (int i = 1; i < GP; i++) gq[i] <= gq[i-1];
  end

  always_comb begin
    beat_tag_t tt;
    {out_valid, tt} = tq[TD-1];
    out_tag   = tt;
    out_tag.x = tt.x - CW'(1);
    out_tag.y = tt.y - CW'(2);
    grad      = gq[GP-1];
  end
endmodule

// gaussian_dog: Gaussian filtering and DoG computation of the key-point
// detection component (six scales in parallel, both octaves interleaved).
//
// Every input beat carries one source pixel and its coordinates (oct, x, y).
// The pixel is written into the 25-bar image RAM-bar cluster while the 25
// stored rows are read at the same column, giving a vertical window of rows
// y-25..y-1 centred on row y-13. Six y-direction filters (radii
// 4,5,6,8,10,12, i.e. windows 9..25) reduce that column to one 8Q16 value per
// scale; each value enters a 25-deep x-direction window (shift register) and
// six x-direction filters produce the blurred pixels L0..L5 centred on column
// x-12. Adjacent scales are subtracted to give D0..D4 (6Q16, saturated).
// Samples outside the image are replaced by their mirror inside the window
// on both passes. The shift registers move only on valid beats, so the input
// stream may contain bubbles.
//
// Interface: in_valid/in_tag/in_pix; out_valid/out_tag/l/d. out_tag is the
// coordinate of the output pixel, (oct, x-12, y-13) of the beat that
// completed its window; it may lie outside the image while the window is
// filling, and then the data are meaningless.
// Timing: one beat per clock, latency 7 cycles.
//
// The y-then-x order, symmetric pre-addition, mirroring and window sizes
// follow the design description; the pipeline cut points are this
// implementation's choice.
module gaussian_dog
  import sift_pkg::*;
#(
  parameter int IMG_W = IMG_W_DEF,
  parameter int IMG_H = IMG_H_DEF
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  beat_tag_t                     in_tag,
  input  logic [PIX_W-1:0]              in_pix,
  output logic                          out_valid,
  output beat_tag_t                     out_tag,
  output logic [N_GAUSS-1:0][L_W-1:0]   l,
  output logic [N_DOG-1:0][D_W-1:0]     d
);
  localparam int NW = 2*GMAX_R + 1;

  function automatic logic signed [CW-1:0] width_of(logic oct);
    return oct ? CW'(IMG_W/2) : CW'(IMG_W);
  endfunction
  function automatic logic signed [CW-1:0] height_of(logic oct);
    return oct ? CW'(IMG_H/2) : CW'(IMG_H);
  endfunction

  // ---------------------------------------------------------- image cluster
  logic in_x_ok, row_end;
  assign in_x_ok = (in_tag.x >= 0) && (in_tag.x < width_of(in_tag.oct));
  assign row_end = (in_tag.x == width_of(in_tag.oct) - 1);

  logic [NW-1:0][PIX_W-1:0] rows;
  ram_bar_cluster #(.NBARS(IMG_BARS), .DEPTH(IMG_W), .WIDTH(PIX_W)) u_img (
    .clk, .rst_n, .oct(in_tag.oct), .addr(in_x_ok ? $clog2(IMG_W)'(in_tag.x) : '0),
    .wr_en(in_valid && in_x_ok), .wdata(in_pix), .row_end, .rd_en(in_valid),
    .rd_rows(rows));

  // --------------------------------------------------------- tag pipeline
  localparam int LAT = 7;
  logic      vq [LAT+1];
  beat_tag_t tq [LAT+1];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 1; i <= LAT; i++) vq[i] <= 1'b0;
    else        for (int i = 1; i <= LAT; i++) vq[i] <= vq[i-1];
  end
  always_ff @(posedge clk) for (int i = 1; i <= LAT; i++) tq[i] <= tq[i-1];
  always_comb begin
    vq[0] = in_valid;
    tq[0] = in_tag;
  end

  // centre coordinates of the y pass (cycle 1) and x pass (cycle 4)
  logic signed [CW-1:0] yc1, xc4;
  assign yc1 = tq[1].y - CW'(GMAX_R + 1);
  assign xc4 = tq[4].x - CW'(GMAX_R);

  // ------------------------------------------------------------ y filters
  logic [N_GAUSS-1:0]          yv;
  logic [N_GAUSS-1:0][L_W-1:0] yf;
  logic [N_GAUSS-1:0][NW-1:0][L_W-1:0] xwin;
  logic [N_GAUSS-1:0][L_W-1:0] lf;

  for (genvar s = 0; s < N_GAUSS; s++) begin : g_scale
    gauss_sym_filter #(.S(s), .IN_W(PIX_W), .FRAC(0)) u_fy (
      .clk, .rst_n, .in_valid(vq[1]), .win(rows), .pos(yc1),
      .lim(height_of(tq[1].oct)), .out_valid(yv[s]), .out(yf[s]));

    // x-direction window: index NW-1 is the newest column
    always_ff @(posedge clk)
      if (yv[s]) xwin[s] <= {yf[s], xwin[s][NW-1:1]};

    gauss_sym_filter #(.S(s), .IN_W(L_W), .FRAC(16)) u_fx (
      .clk, .rst_n, .in_valid(vq[4]), .win(xwin[s]), .pos(xc4),
      .lim(width_of(tq[4].oct)), .out_valid(), .out(lf[s]));
  end

  // ------------------------------------------------------------ DoG stage
  always_ff @(posedge clk) begin
    l <= lf;
    for (int s = 0; s < N_DOG; s++) begin
      logic signed [L_W:0] diff;
      diff = $signed({1'b0, lf[s+1]}) - $signed({1'b0, lf[s]});
      if (diff > $signed((L_W+1)'((1 << (D_W-1)) - 1)))  d[s] <= D_W'((1 << (D_W-1)) - 1);
      else if (diff < -$signed((L_W+1)'(1 << (D_W-1))))  d[s] <= D_W'(1 << (D_W-1));
      else                                                d[s] <= D_W'(diff);
    end
  end

  assign out_valid = vq[LAT];
  always_comb begin
    out_tag   = tq[LAT];
    out_tag.x = tq[LAT].x - CW'(GMAX_R);
    out_tag.y = tq[LAT].y - CW'(GMAX_R + 1);
  end
endmodule

// gauss_sym_filter: one 1-D symmetric Gaussian filter of the separable
// Gaussian blur, used once along y and once along x for every scale.
//
// The input is a 25-sample window centred on sample GMAX_R (win[k] is the
// sample at offset k-GMAX_R). Only the 2R+1 centre samples are used, R being
// the radius of scale S. Border check: when the sample at offset +d or -d
// lies outside the image (coordinate pos+d >= lim or pos-d < 0) it takes the
// value of its mirror partner inside the window, as the design prescribes.
// Then the two symmetric samples of each offset are added, the pair sums are
// multiplied by the Q16 filter factors and the products are summed, so a
// filter of radius R needs R+1 multipliers.
//
// FRAC is the number of fraction bits of the input (0 for 8Q0 pixels, 16 for
// 8Q16 intermediate results); the output is always 8Q16, rounded and
// saturated.
//
// Timing: fully pipelined, one sample per clock, latency 2 cycles
// (out_valid follows in_valid).
module gauss_sym_filter
  import sift_pkg::*;
#(
  parameter int S    = 5,       // scale index 0..5, selects radius and factors
  parameter int IN_W = 8,
  parameter int FRAC = 0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [2*GMAX_R:0][IN_W-1:0]   win,
  input  logic signed [CW-1:0]          pos,  // coordinate of the centre sample
  input  logic signed [CW-1:0]          lim,  // image extent along this axis
  output logic                          out_valid,
  output logic [L_W-1:0]                out
);
  localparam int R     = gauss_radius(S);
  localparam int SUM_W = IN_W + 1;
  localparam int ACC_W = SUM_W + 17 + 5;
  localparam int RND_SH = (FRAC > 0) ? FRAC - 1 : 0;

  logic [R:0][SUM_W-1:0] pair_q;
  logic                  v1;

  // stage 1: border check and symmetric pre-addition
  always_ff @(posedge clk) begin
    pair_q[0] <= SUM_W'(win[GMAX_R]);
    for (int d = 1; d <= R; d++) begin
      logic [IN_W-1:0] lo, hi;
      lo = win[GMAX_R-d];
      hi = win[GMAX_R+d];
      if (pos - CW'(d) < 0)  lo = hi;
      if (pos + CW'(d) >= lim) hi = lo;
      if ((pos - CW'(d) < 0) && (pos + CW'(d) >= lim)) begin
        lo = win[GMAX_R];
        hi = win[GMAX_R];
      end
      pair_q[d] <= SUM_W'(lo) + SUM_W'(hi);
    end
  end

  // stage 2: multiply by the filter factors and add
  always_ff @(posedge clk) begin
    logic [ACC_W-1:0] acc;
    acc = '0;
    for (int d = 0; d <= R; d++)
      acc += ACC_W'(pair_q[d]) * ACC_W'(GCOEF[S][d]);
    if (FRAC > 0) acc = (acc + (ACC_W'(1) << RND_SH)) >> FRAC;
    out <= (acc > ACC_W'({L_W{1'b1}})) ? {L_W{1'b1}} : L_W'(acc);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
  end
endmodule

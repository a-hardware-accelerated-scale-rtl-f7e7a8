// cordic_vec: pipelined CORDIC in vectoring mode, turning a gradient vector
// (gx, gy) into its magnitude and its angle in whole degrees.
//
// A first stage folds the vector into the right half plane (adding 180
// degrees when gx < 0); then N_ITER micro-rotations by atan(2^-i) drive the
// y component to zero while accumulating the angle in Q8 degrees. The final
// stage removes the CORDIC gain (multiplies by 0.607253 in Q16), rounds the
// angle to the nearest degree in 0..359 and saturates the magnitude to OUT_W
// bits. The arctangent table is computed at elaboration from atan(2^-i).
//
// Interface: in_valid/gx/gy in, out_valid/mag/ang out; magnitude has the
// same fixed-point scale as the inputs. Timing: one vector per clock,
// latency N_ITER + 2 cycles.
module cordic_vec #(
  parameter int IN_W   = 25,
  parameter int OUT_W  = 24,
  parameter int N_ITER = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  gx,
  input  logic signed [IN_W-1:0]  gy,
  output logic                    out_valid,
  output logic [OUT_W-1:0]        mag,
  output logic [8:0]              ang
);
  localparam int XW = IN_W + 3;
  localparam int ZW = 18;                          // Q8 degrees, signed

  typedef logic [N_ITER-1:0][ZW-1:0] atan_tab_t;
  function automatic atan_tab_t make_atan();
    atan_tab_t t;
    for (int i = 0; i < N_ITER; i++)
      t[i] = ZW'(int'($atan(2.0 ** (-i)) * 180.0 / 3.14159265358979 * 256.0));
    return t;
  endfunction
  localparam atan_tab_t ATAN_T = make_atan();

  logic signed [XW-1:0] xs [N_ITER+1];
  logic signed [XW-1:0] ys [N_ITER+1];
  logic signed [ZW-1:0] zs [N_ITER+1];
  logic                 vs [N_ITER+2];

  // stage 0: fold into the right half plane
  always_ff @(posedge clk) begin
    if (gx < 0) begin
      xs[0] <= -XW'(gx);
      ys[0] <= -XW'(gy);
      zs[0] <= ZW'(180 * 256);
    end else begin
      xs[0] <= XW'(gx);
      ys[0] <= XW'(gy);
      zs[0] <= '0;
    end
  end

  // micro-rotations
  always_ff @(posedge clk) begin
    for (int i = 0; i < N_ITER; i++) begin
      if (ys[i] >= 0) begin
        xs[i+1] <= xs[i] + (ys[i] >>> i);
        ys[i+1] <= ys[i] - (xs[i] >>> i);
        zs[i+1] <= zs[i] + ATAN_T[i];
      end else begin
        xs[i+1] <= xs[i] - (ys[i] >>> i);
        ys[i+1] <= ys[i] + (xs[i] >>> i);
        zs[i+1] <= zs[i] - ATAN_T[i];
      end
    end
  end

  // gain correction, rounding and range folding
  always_ff @(posedge clk) begin
    logic [XW+16:0]       m;
    logic signed [ZW-1:0] z;
    logic signed [ZW-9:0] deg;
    m = (XW+17)'(xs[N_ITER]) * (XW+17)'(39797);
    m = m >> 16;
    mag <= (m > (XW+17)'({OUT_W{1'b1}})) ? {OUT_W{1'b1}} : OUT_W'(m);
    z = zs[N_ITER] + ZW'(128);                     // round to nearest degree
    deg = (ZW-8)'(z >>> 8);
    if (deg < 0)    deg = deg + (ZW-8)'(360);
    if (deg >= 360) deg = deg - (ZW-8)'(360);
    ang <= 9'(deg);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 1; i < N_ITER+2; i++) vs[i] <= 1'b0;
    else        for (int i = 1; i < N_ITER+2; i++) vs[i] <= vs[i-1];
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0; else out_valid <= vs[N_ITER+1];
  assign vs[0] = in_valid;
endmodule

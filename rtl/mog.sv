// mog: main orientation generation for one key-point scale.
//
// For a key-point taken from its own key-point FIFO the unit scans the
// square MOG region of radius R = round(4.5 sigma) around it (9, 11, 14
// pixels for scales 1, 2, 3) through its read port of the gradient buffer,
// one pixel per clock. Each gradient magnitude is weighted by a Gaussian of
// standard deviation 1.5 sigma (separable: w = g(dx) * g(dy), Q16) and added
// to one of 36 orientation bins of 10 degrees (bin = theta / 10, computed as
// theta * 6554 >> 16). Pixels outside the image add nothing. After the scan
// the largest bin is found by a 36-cycle sequential search and the centre of
// that bin, 10*bin + 5 degrees, is pushed into the orientation FIFO of the
// local descriptor generator.
//
// Histogram bins are 32-bit, in Q8 units of the magnitude. Timing: about
// (2R+1)^2 + 40 cycles per key-point; a new key-point is taken only when the
// orientation FIFO has room. busy is high from taking a key-point to pushing
// its orientation.
//
// The 36 bins, the Gaussian weighting and the choice of the largest bin
// follow the design; the region radius, weighting sigma, bin-centre result
// (no histogram smoothing, no interpolation, no secondary peaks) are this
// implementation's simplifications.
module mog
  import sift_pkg::*;
#(
  parameter int K     = 0,                  // 0..2 for key-point scales 1..3
  parameter int NBARS = ldg_bars(K),
  parameter int IMG_W = IMG_W_DEF,
  parameter int IMG_H = IMG_H_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  kp_valid,
  input  kp_entry_t             kp,
  output logic                  kp_pop,
  output logic                  r_oct,
  output logic [6:0]            r_bar,
  output logic [XW-1:0]         r_x,
  input  logic [GRD_W-1:0]      r_data,
  input  logic                  ori_full,
  output logic                  ori_push,
  output logic [ORI_W-1:0]      ori,
  output logic                  busy
);
  localparam int    R  = mog_radius(K);
  localparam wtab_t WT = make_wtab(1.5 * sigma_of(K + 1));

  typedef enum logic [2:0] {IDLE, SCAN, DRAIN, ARGMAX, PUSH} state_t;
  state_t st;

  logic        sc_busy, sc_valid, sc_last, sc_in;
  logic signed [7:0] sc_dx, sc_dy;
  logic        start;

  // the push of the previous orientation is not yet visible in ori_full
  assign start  = (st == IDLE) && kp_valid && !ori_full && !ori_push;
  assign kp_pop = start;

  win_scanner #(.R(R), .NBARS(NBARS), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_scan (
    .clk, .rst_n, .start, .kp, .busy(sc_busy), .valid(sc_valid), .last(sc_last),
    .dx(sc_dx), .dy(sc_dy), .in_img(sc_in), .r_oct, .r_bar, .r_x);

  // pipeline: P1 = read data available, P2 = weighted value and bin, P3 = accumulate
  logic       p1_v, p2_v;
  logic [5:0] p1_ax, p1_ay;
  logic [31:0] p2_val;
  logic [5:0]  p2_bin;
  logic [35:0][31:0] hist;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1_v <= 1'b0; p2_v <= 1'b0;
    end else begin
      p1_v <= sc_valid && sc_in;
      p2_v <= p1_v;
    end
  end

  always_ff @(posedge clk) begin
    logic [33:0] w;
    logic [MAG_W+17:0] mw;
    logic [ORI_W+13:0] bq;
    p1_ax <= 6'(sc_dx < 0 ? -sc_dx : sc_dx);
    p1_ay <= 6'(sc_dy < 0 ? -sc_dy : sc_dy);
    w  = 34'(WT[p1_ax]) * 34'(WT[p1_ay]);
    mw = (MAG_W+18)'(r_data[MAG_W-1:0]) * (MAG_W+18)'(w >> 16);
    p2_val <= 32'(mw >> 24);
    bq = (ORI_W+14)'(r_data[GRD_W-1:MAG_W]) * (ORI_W+14)'(6554);
    p2_bin <= 6'(bq >> 16);
  end

  // histogram and search
  logic [5:0]  drain_cnt, idx, best_bin;
  logic [31:0] best_val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; hist <= '0; drain_cnt <= '0; idx <= '0; best_bin <= '0; best_val <= '0;
      ori_push <= 1'b0; ori <= '0; busy <= 1'b0;
    end else begin
      ori_push <= 1'b0;
      if (p2_v) hist[p2_bin] <= hist[p2_bin] + p2_val;
      case (st)
        IDLE: if (start) begin
          st <= SCAN; hist <= '0; busy <= 1'b1;
        end
        SCAN: if (sc_last) begin
          st <= DRAIN; drain_cnt <= '0;
        end
        DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == 6'd3) begin
            st <= ARGMAX; idx <= '0; best_bin <= '0; best_val <= '0;
          end
        end
        ARGMAX: begin
          if (hist[idx] > best_val) begin
            best_val <= hist[idx];
            best_bin <= idx;
          end
          if (idx == 6'd35) st <= PUSH;
          idx <= idx + 1'b1;
        end
        PUSH: begin
          ori_push <= 1'b1;
          ori      <= ORI_W'(best_bin) * ORI_W'(10) + ORI_W'(5);
          st       <= IDLE;
          busy     <= 1'b0;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule

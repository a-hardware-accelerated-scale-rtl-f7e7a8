// ldg: local descriptor generation for one key-point scale.
//
// A key-point is taken when both its entry in the LDG key-point FIFO and its
// main orientation (from mog, in the orientation FIFO) are available. If by
// then more than OVR_THR pixels of its window have been overwritten in the
// gradient buffer by newer rows, the key-point is skipped. Otherwise:
//   1. Scan: the square window of radius R (21, 27, 34 for scales 1..3, i.e.
//      the full 43/55/69-row buffer height) is read one pixel per clock.
//      Each offset (dx, dy) is rotated by the main orientation (Q14 sin/cos),
//      scaled by 1/(3 sigma) and floored to a sub-region index -2..1 per
//      axis; pixels outside the 4x4 grid or the image are dropped. The
//      gradient orientation relative to the main orientation picks one of 8
//      bins of 45 degrees; the magnitude, weighted by a Gaussian of sigma
//      6 sigma (separable g(dx) g(dy)), is added to that one bin of the
//      4x4x8 = 128-bin histogram (Q8 magnitude units, 32-bit bins).
//   2. Normalise: the sum of squares of the histogram is kept up to date
//      during the scan (each update h -> h + v adds (2h + v) v), so after the
//      pipeline has drained only a bit-serial square root (36 cycles), the
//      reciprocal of the norm scaled to 32 significant bits by a restoring
//      divider (33 cycles, the leading zero quotient bits are skipped) and
//      the output, element = hist * 512 / norm in 12Q16 (128 cycles, one
//      element per clock), remain.
// The output stream carries the key-point location, scale and orientation
// with every element; desc_last marks element 127.
//
// Timing: (2R+1)^2 + 204 cycles per key-point (2053, 3229, 4965 for scales
// 1..3), measured from the pop of the key-point to done. skip and done pulse
// once per key-point.
//
// The 4x4 sub-regions, 8 bins, rotation by the main orientation, Gaussian
// weighting and normalisation follow the design; nearest-bin accumulation
// (no trilinear interpolation), no 0.2 clamping, the factor 512 and the
// overwrite threshold default are this implementation's choices.
module ldg
  import sift_pkg::*;
#(
  parameter int K       = 0,
  parameter int NBARS   = ldg_bars(K),
  parameter int IMG_W   = IMG_W_DEF,
  parameter int IMG_H   = IMG_H_DEF,
  parameter int OVR_THR = 4 * ldg_bars(K)    // four overwritten rows
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  kp_valid,
  input  kp_entry_t             kp,
  output logic                  kp_pop,
  input  logic                  ori_valid,
  input  logic [ORI_W-1:0]      ori_in,
  output logic                  ori_pop,
  input  logic [1:0][15:0]      rows_done,
  output logic                  r_oct,
  output logic [6:0]            r_bar,
  output logic [XW-1:0]         r_x,
  input  logic [GRD_W-1:0]      r_data,
  output logic                  desc_valid,
  output desc_elem_t            desc,
  output logic                  desc_last,
  output logic                  busy,
  output logic                  skip,
  output logic                  done
);
  localparam int    R   = ldg_radius(K);
  localparam wtab_t WL  = make_wtab(6.0 * sigma_of(K + 1));
  localparam int    INV = inv_hist_w(K);

  typedef enum logic [2:0] {IDLE, SCAN, DRAIN, SQRT, RECIP, OUT} state_t;
  state_t st;

  logic take, start, ovr;
  assign take    = (st == IDLE) && kp_valid && ori_valid;
  assign ovr     = kp_overwritten(rows_done[kp.loc.oct], kp, R) >= OVR_THR;
  assign start   = take && !ovr;
  assign kp_pop  = take;
  assign ori_pop = take;

  logic        sc_valid, sc_last, sc_in, sc_busy;
  logic signed [7:0] sc_dx, sc_dy;
  win_scanner #(.R(R), .NBARS(NBARS), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_scan (
    .clk, .rst_n, .start, .kp, .busy(sc_busy), .valid(sc_valid), .last(sc_last),
    .dx(sc_dx), .dy(sc_dy), .in_img(sc_in), .r_oct, .r_bar, .r_x);

  kp_loc_t          cur_loc;
  logic [ORI_W-1:0] cur_ori;
  logic signed [15:0] cs, sn;                      // Q14 cos / sin of the main orientation

  // ---------------------------------------------------------- scan pipeline
  logic              p1_v, p2_v, p3_v;
  logic signed [7:0] p1_dx, p1_dy;
  logic signed [24:0] p2_rx, p2_ry;
  logic [ORI_W-1:0]  p2_trel;
  logic [16:0]       p2_w;
  logic [MAG_W-1:0]  p2_m;
  logic [6:0]        p3_idx;
  logic [31:0]       p3_val;
  logic [127:0][31:0] hist;

  // sub-region coordinates of the rotated offset: floor(r / (3 sigma))
  logic signed [42:0] p2_px, p2_py;
  logic signed [12:0] p2_cx, p2_cy;
  assign p2_px = 43'(p2_rx) * 43'(INV);
  assign p2_py = 43'(p2_ry) * 43'(INV);
  assign p2_cx = 13'(p2_px >>> 30);
  assign p2_cy = 13'(p2_py >>> 30);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin p1_v <= 1'b0; p2_v <= 1'b0; p3_v <= 1'b0; end
    else begin
      p1_v <= sc_valid && sc_in;
      p2_v <= p1_v;
      p3_v <= p2_v && (p2_cx >= -2) && (p2_cx <= 1) && (p2_cy >= -2) && (p2_cy <= 1);
    end
  end

  always_ff @(posedge clk) begin
    p1_dx <= sc_dx;
    p1_dy <= sc_dy;
    // P2: rotation, relative orientation, weight
    begin
      logic signed [9:0] trel;
      logic [5:0] ax, ay;
      logic [33:0] w;
      p2_rx <= 25'(p1_dx) * 25'(cs) + 25'(p1_dy) * 25'(sn);
      p2_ry <= 25'(p1_dy) * 25'(cs) - 25'(p1_dx) * 25'(sn);
      trel = $signed({1'b0, r_data[GRD_W-1:MAG_W]}) - $signed({1'b0, cur_ori});
      if (trel < 0) trel += 10'sd360;
      p2_trel <= ORI_W'(trel);
      ax = 6'(p1_dx < 0 ? -p1_dx : p1_dx);
      ay = 6'(p1_dy < 0 ? -p1_dy : p1_dy);
      w  = 34'(WL[ax]) * 34'(WL[ay]);
      p2_w <= 17'(w >> 16);
      p2_m <= r_data[MAG_W-1:0];
    end
    // P3: sub-region, orientation bin, weighted magnitude
    begin
      logic [1:0] ix, iy;
      logic [2:0] ob;
      logic [ORI_W+11:0] bq;
      logic [MAG_W+17:0] mw;
      ix = 2'(p2_cx + 2);
      iy = 2'(p2_cy + 2);
      bq = (ORI_W+12)'(p2_trel) * (ORI_W+12)'(1457);
      ob = 3'(bq >> 16);
      mw = (MAG_W+18)'(p2_m) * (MAG_W+18)'(p2_w);
      p3_idx <= {iy, ix, ob};
      p3_val <= 32'(mw >> 24);
    end
  end

  // ------------------------------------------------------ normalisation
  logic [7:0]   cnt;
  logic [71:0]  sumsq;
  logic [35:0]  norm;
  logic [5:0]   msb;
  logic [32:0]  rem;
  logic [32:0]  recip;
  logic [31:0]  nnorm;

  // leading one of the norm
  logic [5:0] msb_c;
  always_comb begin
    msb_c = '0;
    for (int b = 0; b < 36; b++) if (norm[b]) msb_c = 6'(b);
  end

  // datapath of the sequential steps
  logic [35:0] sq_try;                               // SQRT: trial root
  logic [33:0] div_r2;                               // RECIP: shifted remainder
  logic [64:0] out_f;                                // OUT: scaled element
  logic [65:0] dsq;                                  // scan: sum-of-squares increment
  assign sq_try = norm | (36'(1) << cnt);
  assign div_r2 = {rem, 1'b0};
  assign out_f  = (65'(hist[cnt[6:0]]) * 65'(recip)) >> (7 + msb);
  assign dsq    = (66'(hist[p3_idx]) * 66'd2 + 66'(p3_val)) * 66'(p3_val);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; hist <= '0; cnt <= '0; sumsq <= '0; norm <= '0; msb <= '0;
      rem <= '0; recip <= '0; nnorm <= '0; cur_loc <= '0; cur_ori <= '0;
      cs <= '0; sn <= '0; busy <= 1'b0; skip <= 1'b0; done <= 1'b0;
      desc_valid <= 1'b0; desc <= '0; desc_last <= 1'b0;
    end else begin
      skip       <= 1'b0;
      done       <= 1'b0;
      desc_valid <= 1'b0;
      desc_last  <= 1'b0;
      if (p3_v) begin
        hist[p3_idx] <= hist[p3_idx] + p3_val;
        sumsq        <= sumsq + 72'(dsq);
      end
      case (st)
        IDLE: begin
          if (take && ovr) skip <= 1'b1;
          if (start) begin
            st <= SCAN; busy <= 1'b1; hist <= '0; sumsq <= '0;
            cur_loc <= kp.loc; cur_ori <= ori_in;
            cs <= cos_deg(ori_in); sn <= sin_deg(ori_in);
          end
        end
        SCAN: if (sc_last) begin st <= DRAIN; cnt <= '0; end
        DRAIN: begin
          cnt <= cnt + 1'b1;
          if (cnt == 8'd4) begin st <= SQRT; cnt <= 8'd35; norm <= '0; end
        end
        SQRT: begin
          if (72'(sq_try) * 72'(sq_try) <= sumsq) norm <= sq_try;
          cnt <= cnt - 1'b1;
          if (cnt == 8'd0) begin st <= RECIP; cnt <= 8'd64; end
        end
        RECIP: begin
          if (cnt == 8'd64) begin
            // scale the norm to 32 significant bits; the first 31 steps of
            // 2^63 / nnorm only shift the dividend's one bit in (their
            // remainder stays below 2^31 <= nnorm), so start at the 32nd
            msb   <= msb_c;
            rem   <= 33'(1) << 30;
            recip <= '0;
            nnorm <= (msb_c >= 6'd31) ? 32'(norm >> (msb_c - 6'd31))
                                      : 32'(norm << (6'd31 - msb_c));
            cnt   <= 8'd32;
          end else begin
            // one step of 2^63 / nnorm
            if (div_r2 >= 34'(nnorm)) begin
              rem   <= 33'(div_r2 - 34'(nnorm));
              recip <= {recip[31:0], 1'b1};
            end else begin
              rem   <= 33'(div_r2);
              recip <= {recip[31:0], 1'b0};
            end
            cnt <= cnt - 1'b1;
            if (cnt == 8'd0) begin st <= OUT; cnt <= '0; end
          end
        end
        OUT: begin
          desc_valid <= 1'b1;
          desc.loc   <= cur_loc;
          desc.scale <= 2'(K);
          desc.ori   <= cur_ori;
          desc.idx   <= cnt[6:0];
          desc.feat  <= (norm == 0) ? '0 :
                        (out_f > 65'({FEAT_W{1'b1}})) ? {FEAT_W{1'b1}} : FEAT_W'(out_f);
          desc_last  <= (cnt == 8'd127);
          cnt <= cnt + 1'b1;
          if (cnt == 8'd127) begin st <= IDLE; busy <= 1'b0; done <= 1'b1; end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule

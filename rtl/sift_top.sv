// sift_top: SIFT feature extraction accelerator for a 1280x720 grey-level
// video stream (two octaves, three scales per octave).
//
// Key-point detection (KPD) component, clock clk_kpd:
//   octave_scheduler -> gaussian_dog -> { kp_detect, grad_compute }
//   with scale3_fifo feeding the down-sampled scale-3 image back to the
//   scheduler as the second octave, whose rows are interleaved with the first
//   octave's (two rows of octave 1, then one of octave 2) so that one
//   datapath serves both octaves.
// Feature generation (FG) component, clock clk_fg: three fg_unit instances,
// one per key-point scale, each with its own gradient buffer, key-point FIFO,
// buffer management, main orientation generation and local descriptor
// generation. The detection component never waits for the feature
// generators: a key-point whose window has been overwritten before its turn
// is skipped.
//
// Ports: raster pixel input with ready/valid (in_ready low during blanking
// and second-octave rows), one descriptor stream per scale (128 elements of
// 12Q16 per key-point, with location, octave, scale and orientation), and
// event counters. rst_n is asynchronous; it is released synchronously in each
// clock domain. The clocks are independent (50 MHz and 100 MHz in the
// reference implementation). Lint tools report the synchronised reset as a
// net used both synchronously and asynchronously; that is intended: the
// two-flop synchroniser asserts reset asynchronously and releases it on a
// clock edge, and every register resets through it asynchronously.
//
// The partitioning and data flow follow the design's block diagrams; the
// counters and blanking parameters are this implementation's additions.
module sift_top
  import sift_pkg::*;
#(
  parameter int IMG_W         = IMG_W_DEF,
  parameter int IMG_H         = IMG_H_DEF,
  parameter int HBLANK        = HBLANK_DEF,
  parameter int VBLANK        = 16,
  parameter int KP_FIFO_DEPTH = 64,
  parameter int CONTRAST_THR  = CONTRAST_THR_DEF,
  parameter int EDGE_R        = EDGE_R_DEF
) (
  input  logic                         clk_kpd,
  input  logic                         clk_fg,
  input  logic                         rst_n,
  // pixel input (KPD clock)
  input  logic                         in_valid,
  output logic                         in_ready,
  input  logic [PIX_W-1:0]             in_pix,
  // descriptors (FG clock), one stream per key-point scale
  output logic [N_KPS-1:0]             desc_valid,
  output desc_elem_t [N_KPS-1:0]       desc,
  output logic [N_KPS-1:0]             desc_last,
  // event counters
  output logic                         frame_done,      // KPD clock
  output logic [31:0]                  o2_rows,         // KPD clock
  output logic [31:0]                  stall_cycles,    // KPD clock
  output logic [15:0]                  s3_overflow,     // KPD clock
  output logic [N_KPS-1:0][31:0]       kp_in_cnt,       // KPD clock
  output logic [N_KPS-1:0][15:0]       kp_drop_cnt,     // KPD clock
  output logic [N_KPS-1:0][31:0]       kp_skip_cnt,     // FG clock
  output logic [N_KPS-1:0][31:0]       kp_done_cnt,     // FG clock
  output logic [N_KPS-1:0][31:0]       overlap_cycles,  // FG clock
  output logic [N_KPS-1:0][31:0]       wait_cycles      // FG clock
);
  // ------------------------------------------------------ reset release
  logic [1:0] rk, rf;
  logic rst_kpd_n, rst_fg_n;
  always_ff @(posedge clk_kpd or negedge rst_n)
    if (!rst_n) rk <= '0; else rk <= {rk[0], 1'b1};
  always_ff @(posedge clk_fg or negedge rst_n)
    if (!rst_n) rf <= '0; else rf <= {rf[0], 1'b1};
  assign rst_kpd_n = rk[1];
  assign rst_fg_n  = rf[1];

  // ------------------------------------------------------ KPD component
  logic             s_valid;
  beat_tag_t        s_tag;
  logic [PIX_W-1:0] s_pix;
  logic             f_pop, f_row_avail, f_empty;
  logic [PIX_W-1:0] f_pix;

  octave_scheduler #(.IMG_W(IMG_W), .IMG_H(IMG_H), .HBLANK(HBLANK), .VBLANK(VBLANK)) u_sched (
    .clk(clk_kpd), .rst_n(rst_kpd_n), .in_valid, .in_ready, .in_pix,
    .fifo_pop(f_pop), .fifo_pix(f_pix), .fifo_row_avail(f_row_avail), .fifo_empty(f_empty),
    .out_valid(s_valid), .out_tag(s_tag), .out_pix(s_pix),
    .frame_done, .o2_rows, .stall_cycles);

  logic                        g_valid;
  beat_tag_t                   g_tag;
  logic [N_GAUSS-1:0][L_W-1:0] g_l;
  logic [N_DOG-1:0][D_W-1:0]   g_d;
  gaussian_dog #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_gauss (
    .clk(clk_kpd), .rst_n(rst_kpd_n), .in_valid(s_valid), .in_tag(s_tag), .in_pix(s_pix),
    .out_valid(g_valid), .out_tag(g_tag), .l(g_l), .d(g_d));

  scale3_fifo #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_s3 (
    .clk(clk_kpd), .rst_n(rst_kpd_n), .l_valid(g_valid), .l_tag(g_tag), .l3(g_l[3]),
    .pop(f_pop), .pix(f_pix), .row_avail(f_row_avail), .empty(f_empty), .overflow(s3_overflow));

  logic                           k_valid;
  beat_tag_t                      k_tag;
  logic [N_KPS-1:0]               k_flag;
  logic [N_KPS-1:0][OFF_W-1:0]    k_dx, k_dy;
  kp_detect #(.IMG_W(IMG_W), .IMG_H(IMG_H), .CONTRAST_THR(CONTRAST_THR), .EDGE_R(EDGE_R)) u_kpd (
    .clk(clk_kpd), .rst_n(rst_kpd_n), .in_valid(g_valid), .in_tag(g_tag), .in_d(g_d),
    .out_valid(k_valid), .out_tag(k_tag), .kp_flag(k_flag), .kp_dx(k_dx), .kp_dy(k_dy));

  logic                           r_valid;
  beat_tag_t                      r_tag;
  logic [N_KPS-1:0][GRD_W-1:0]    r_grad;
  grad_compute #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_grad (
    .clk(clk_kpd), .rst_n(rst_kpd_n), .in_valid(g_valid), .in_tag(g_tag), .in_l(g_l[3:1]),
    .out_valid(r_valid), .out_tag(r_tag), .grad(r_grad));

  // key-point flags and gradients of the same pixel leave together
  a_aligned: assert property (@(posedge clk_kpd) disable iff (!rst_kpd_n)
                              (k_valid == r_valid) && (!k_valid || k_tag == r_tag));

  // ------------------------------------------------------- FG component
  for (genvar k = 0; k < N_KPS; k++) begin : g_fg
    fg_unit #(.K(k), .IMG_W(IMG_W), .IMG_H(IMG_H), .KP_FIFO_DEPTH(KP_FIFO_DEPTH)) u_fg (
      .clk_kpd, .rst_kpd_n, .in_valid(r_valid), .in_tag(r_tag), .in_grad(r_grad[k]),
      .in_kp(k_flag[k]), .in_kp_dx(k_dx[k]), .in_kp_dy(k_dy[k]),
      .kp_in_cnt(kp_in_cnt[k]), .kp_drop_cnt(kp_drop_cnt[k]),
      .clk_fg, .rst_fg_n, .desc_valid(desc_valid[k]), .desc(desc[k]), .desc_last(desc_last[k]),
      .kp_skip_cnt(kp_skip_cnt[k]), .kp_done_cnt(kp_done_cnt[k]),
      .overlap_cycles(overlap_cycles[k]), .wait_cycles(wait_cycles[k]));
  end
endmodule

// fg_unit: feature generation for one key-point scale (1, 2 or 3), both
// octaves.
//
// Write side, key-point detection clock: gradient words of this scale are
// written into the unit's gradient buffer (NBARS = 43/55/69 bars, one bank
// per octave) with a cyclic bar pointer per octave; each completed row bumps
// a per-octave row counter. A key-point flag of this scale pushes
// {location, offsets, row number, bar} into a dual-clock key-point FIFO.
//
// One FIFO per octave (KP_FIFO_DEPTH/2 entries each) avoids head-of-line
// blocking between the octaves.
// Read side, feature generation clock: the row counters arrive through Gray
// synchronisers; fg_buffer_ctrl dispatches each key-point whose window is
// complete into the exclusive FIFOs of mog and ldg. mog computes the main
// orientation (pushed into ldg's orientation FIFO) while ldg may still be
// busy with an earlier key-point: main orientation and descriptor
// generation overlap on different key-points. Each reads the gradient buffer
// through its own port.
//
// Outputs: the descriptor stream of ldg and event counters (key-points
// received, dropped at a full FIFO, skipped for overwriting, completed,
// cycles with mog and ldg busy together, cycles a ready-to-go key-point
// waited). No back-pressure on the descriptor output.
//
// Structure (buffer, FIFOs, MOG/LDG split, asynchronous clocks) follows the
// design; FIFO depths and the split of the
// key-point FIFO per octave are this implementation's choices.
module fg_unit
  import sift_pkg::*;
#(
  parameter int K             = 0,
  parameter int IMG_W         = IMG_W_DEF,
  parameter int IMG_H         = IMG_H_DEF,
  parameter int KP_FIFO_DEPTH = 64,
  parameter int OVR_THR       = 4 * ldg_bars(K)
) (
  // key-point detection clock domain
  input  logic                 clk_kpd,
  input  logic                 rst_kpd_n,
  input  logic                 in_valid,
  input  beat_tag_t            in_tag,
  input  logic [GRD_W-1:0]     in_grad,
  input  logic                 in_kp,
  input  logic [OFF_W-1:0]     in_kp_dx,
  input  logic [OFF_W-1:0]     in_kp_dy,
  output logic [31:0]          kp_in_cnt,
  output logic [15:0]          kp_drop_cnt,
  // feature generation clock domain
  input  logic                 clk_fg,
  input  logic                 rst_fg_n,
  output logic                 desc_valid,
  output desc_elem_t           desc,
  output logic                 desc_last,
  output logic [31:0]          kp_skip_cnt,
  output logic [31:0]          kp_done_cnt,
  output logic [31:0]          overlap_cycles,
  output logic [31:0]          wait_cycles
);
  localparam int NBARS = ldg_bars(K);
  localparam int R     = ldg_radius(K);

  // ------------------------------------------------------------ write side
  logic [1:0][6:0]  bar_cur;
  logic [1:0][15:0] seq_cur;
  logic x_ok, y_ok, we, row_end;
  logic kp_push;
  kp_entry_t kp_w;
  logic signed [CW-1:0] w_oct, h_oct;
  assign w_oct   = in_tag.oct ? CW'(IMG_W/2) : CW'(IMG_W);
  assign h_oct   = in_tag.oct ? CW'(IMG_H/2) : CW'(IMG_H);
  assign x_ok    = (in_tag.x >= 0) && (in_tag.x < w_oct);
  assign y_ok    = (in_tag.y >= 0) && (in_tag.y < h_oct);
  assign we      = in_valid && x_ok && y_ok;
  assign row_end = we && (in_tag.x == w_oct - 1);

  always_ff @(posedge clk_kpd or negedge rst_kpd_n) begin
    if (!rst_kpd_n) begin
      bar_cur <= '0; seq_cur <= '0; kp_in_cnt <= '0;
    end else begin
      if (row_end) begin
        bar_cur[in_tag.oct] <= (bar_cur[in_tag.oct] == 7'(NBARS-1)) ? '0 : bar_cur[in_tag.oct] + 1'b1;
        seq_cur[in_tag.oct] <= seq_cur[in_tag.oct] + 1'b1;
      end
      if (kp_push) kp_in_cnt <= kp_in_cnt + 1'b1;
    end
  end

  assign kp_push      = we && in_kp;
  assign kp_w.loc.oct = in_tag.oct;
  assign kp_w.loc.x   = XW'(in_tag.x);
  assign kp_w.loc.y   = YW'(in_tag.y);
  assign kp_w.loc.dx  = in_kp_dx;
  assign kp_w.loc.dy  = in_kp_dy;
  assign kp_w.seq     = seq_cur[in_tag.oct];
  assign kp_w.bar     = bar_cur[in_tag.oct];

  // gradient buffer, written here, read by mog (port 0) and ldg (port 1)
  logic [1:0]            r_oct;
  logic [1:0][6:0]       r_bar;
  logic [1:0][XW-1:0]    r_x;
  logic [1:0][GRD_W-1:0] r_data;
  grad_buffer #(.NBARS(NBARS), .IMG_W(IMG_W)) u_buf (
    .wclk(clk_kpd), .we, .w_oct(in_tag.oct), .w_bar(bar_cur[in_tag.oct]),
    .w_x(XW'(in_tag.x)), .w_data(in_grad),
    .rclk(clk_fg), .r_oct, .r_bar, .r_x, .r_data);

  // ----------------------------------------------------- clock crossing
  // one key-point FIFO per octave, KP_FIFO_DEPTH entries in total
  kp_entry_t [1:0]   kp_head;
  logic [1:0]        kp_empty, kp_pop, kp_full;
  logic [1:0][15:0]  drops;
  for (genvar o = 0; o < 2; o++) begin : g_kpq
    async_fifo #(.DEPTH(KP_FIFO_DEPTH/2), .WIDTH($bits(kp_entry_t))) u_kpq (
      .wclk(clk_kpd), .wrst_n(rst_kpd_n), .push(kp_push && (in_tag.oct == o)), .wr_data(kp_w),
      .full(kp_full[o]), .drops(drops[o]),
      .rclk(clk_fg), .rrst_n(rst_fg_n), .pop(kp_pop[o]), .rd_data(kp_head[o]), .empty(kp_empty[o]));
  end
  assign kp_drop_cnt = drops[0] + drops[1];

  logic [1:0][15:0] rows_done;
  for (genvar o = 0; o < 2; o++) begin : g_sync
    gray_sync #(.W(16)) u_rows (
      .sclk(clk_kpd), .srst_n(rst_kpd_n), .sval(seq_cur[o]),
      .dclk(clk_fg), .drst_n(rst_fg_n), .dval(rows_done[o]));
  end

  // ------------------------------------------------------------ read side
  logic dispatch, ctrl_skip;
  kp_entry_t disp_kp;
  logic mog_full, ldg_full, mog_empty, ldg_empty;
  kp_entry_t mog_kp, ldg_kp;
  logic mog_pop, ldg_pop;

  fg_buffer_ctrl #(.R(R), .IMG_H(IMG_H), .OVR_THR(OVR_THR)) u_ctrl (
    .clk(clk_fg), .rst_n(rst_fg_n), .kp_empty, .kp_head, .kp_pop, .rows_done,
    .mog_full, .ldg_full, .dispatch, .kp_out(disp_kp), .skip(ctrl_skip), .wait_cycles);

  sync_fifo #(.DEPTH(2), .WIDTH($bits(kp_entry_t))) u_mogq (
    .clk(clk_fg), .rst_n(rst_fg_n), .push(dispatch), .wr_data(disp_kp), .pop(mog_pop),
    .rd_data(mog_kp), .empty(mog_empty), .full(mog_full), .count());
  sync_fifo #(.DEPTH(4), .WIDTH($bits(kp_entry_t))) u_ldgq (
    .clk(clk_fg), .rst_n(rst_fg_n), .push(dispatch), .wr_data(disp_kp), .pop(ldg_pop),
    .rd_data(ldg_kp), .empty(ldg_empty), .full(ldg_full), .count());

  logic ori_push, ori_full, ori_empty, ori_pop;
  logic [ORI_W-1:0] ori_w, ori_r;
  sync_fifo #(.DEPTH(4), .WIDTH(ORI_W)) u_oriq (
    .clk(clk_fg), .rst_n(rst_fg_n), .push(ori_push), .wr_data(ori_w), .pop(ori_pop),
    .rd_data(ori_r), .empty(ori_empty), .full(ori_full), .count());

  logic mog_busy, ldg_busy, ldg_skip, ldg_done;
  mog #(.K(K), .NBARS(NBARS), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_mog (
    .clk(clk_fg), .rst_n(rst_fg_n), .kp_valid(!mog_empty), .kp(mog_kp), .kp_pop(mog_pop),
    .r_oct(r_oct[0]), .r_bar(r_bar[0]), .r_x(r_x[0]), .r_data(r_data[0]),
    .ori_full, .ori_push, .ori(ori_w), .busy(mog_busy));

  ldg #(.K(K), .NBARS(NBARS), .IMG_W(IMG_W), .IMG_H(IMG_H), .OVR_THR(OVR_THR)) u_ldg (
    .clk(clk_fg), .rst_n(rst_fg_n), .kp_valid(!ldg_empty), .kp(ldg_kp), .kp_pop(ldg_pop),
    .ori_valid(!ori_empty), .ori_in(ori_r), .ori_pop, .rows_done,
    .r_oct(r_oct[1]), .r_bar(r_bar[1]), .r_x(r_x[1]), .r_data(r_data[1]),
    .desc_valid, .desc, .desc_last, .busy(ldg_busy), .skip(ldg_skip), .done(ldg_done));

  always_ff @(posedge clk_fg or negedge rst_fg_n) begin
    if (!rst_fg_n) begin
      kp_skip_cnt <= '0; kp_done_cnt <= '0; overlap_cycles <= '0;
    end else begin
      kp_skip_cnt <= kp_skip_cnt + 32'(ctrl_skip) + 32'(ldg_skip);
      if (ldg_done) kp_done_cnt <= kp_done_cnt + 1'b1;
      if (mog_busy && ldg_busy) overlap_cycles <= overlap_cycles + 1'b1;
    end
  end
endmodule

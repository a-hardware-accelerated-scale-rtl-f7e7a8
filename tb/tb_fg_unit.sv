// tb_fg_unit: one feature-generation unit (scale 1) on a 64x48 image with
// the detection side at 50 MHz and the feature side at 100 MHz.
//
// The TB plays the role of the detection pipeline: it streams random
// gradient words row by row (two first-octave rows, then one second-octave
// row) and raises the key-point flag at chosen pixels.
// Phase 1 (sparse): at most one key-point per row and a long pause after
// each row, so no window is ever overwritten. For every key-point the TB
// computes the reference main orientation (36-bin weighted histogram) and the
// reference 128-element descriptor directly from its copy of the gradient
// image; the DUT output must match within 1 LSB per element and carry the
// right orientation; each descriptor is matched to its key-point by
// location (the two octaves are served out of order).
// Phase 2 (dense): key-points every few pixels and no pauses, which must
// make the key-point FIFO overflow (drops), windows get overwritten (skips),
// mog and ldg work on different key-points at the same time (overlap) and
// ready key-points wait for the busy units. Afterwards every key-point must
// be accounted for: received = completed + skipped + dropped, and the
// number of descriptors equals the number completed; every descriptor has
// length 512.
module tb_fg_unit;
  import sift_pkg::*;
  localparam int K = 0, W = 64, H = 48, NB = 43;
  localparam int R = ldg_radius(K), RM = mog_radius(K);
  logic clk_kpd = 0, clk_fg = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge: asynchronous reset of every flop
  always #10 clk_kpd = ~clk_kpd;
  always #5  clk_fg  = ~clk_fg;
  int checks = 0, failures = 0;

  logic in_valid, in_kp, desc_valid, desc_last;
  beat_tag_t in_tag;
  logic [GRD_W-1:0] in_grad;
  logic [OFF_W-1:0] in_kp_dx, in_kp_dy;
  logic [31:0] kp_in_cnt, kp_skip_cnt, kp_done_cnt, overlap_cycles, wait_cycles;
  logic [15:0] kp_drop_cnt;
  desc_elem_t desc;
  fg_unit #(.K(K), .IMG_W(W), .IMG_H(H)) dut (
    .clk_kpd, .rst_kpd_n(rst_n), .in_valid, .in_tag, .in_grad, .in_kp, .in_kp_dx, .in_kp_dy,
    .kp_in_cnt, .kp_drop_cnt, .clk_fg, .rst_fg_n(rst_n), .desc_valid, .desc, .desc_last,
    .kp_skip_cnt, .kp_done_cnt, .overlap_cycles, .wait_cycles);

  logic [GRD_W-1:0] g [2][H][W];
  real SG;
  initial SG = 1.6 * (2.0 ** (real'(K + 1) / 3.0));

  function automatic longint wexp(int d, real s);
    return longint'(int'($exp(-real'(d*d) / (2.0*s*s)) * 65536.0));
  endfunction
  function automatic longint q14sin(int a);
    return longint'(int'($sin(real'(a % 360) * 3.14159265358979 / 180.0) * 16384.0));
  endfunction

  function automatic int ref_ori(kp_loc_t l);
    longint hist [36];
    int h, w, best;
    h = l.oct ? H/2 : H;
    w = l.oct ? W/2 : W;
    foreach (hist[i]) hist[i] = 0;
    for (int dy = -RM; dy <= RM; dy++)
      for (int dx = -RM; dx <= RM; dx++) begin
        int yy, xx;
        longint wt;
        yy = int'(l.y) + dy;
        xx = int'(l.x) + dx;
        if (yy < 0 || yy >= h || xx < 0 || xx >= w) continue;
        wt = (wexp(dx, 1.5*SG) * wexp(dy, 1.5*SG)) >> 16;
        hist[int'(g[l.oct][yy][xx][GRD_W-1:MAG_W]) / 10] +=
          (longint'(g[l.oct][yy][xx][MAG_W-1:0]) * wt) >> 24;
      end
    best = 0;
    for (int i = 1; i < 36; i++) if (hist[i] > hist[best]) best = i;
    return 10 * best + 5;
  endfunction

  typedef longint unsigned feat_t [128];
  function automatic feat_t ref_desc(kp_loc_t l, int o);
    longint hist [128];
    feat_t f;
    int h, w, msb;
    longint cs, sn, inv;
    longint unsigned sumsq, norm, nn, recip;
    h = l.oct ? H/2 : H;
    w = l.oct ? W/2 : W;
    cs = q14sin(o + 90);
    sn = q14sin(o);
    inv = longint'(int'(65536.0 / (3.0 * SG)));
    foreach (hist[i]) hist[i] = 0;
    for (int dy = -R; dy <= R; dy++)
      for (int dx = -R; dx <= R; dx++) begin
        int yy, xx, tr;
        longint cx, cy, wt;
        yy = int'(l.y) + dy;
        xx = int'(l.x) + dx;
        if (yy < 0 || yy >= h || xx < 0 || xx >= w) continue;
        cx = ((dx * cs + dy * sn) * inv) >>> 30;
        cy = ((dy * cs - dx * sn) * inv) >>> 30;
        if (cx < -2 || cx > 1 || cy < -2 || cy > 1) continue;
        tr = (int'(g[l.oct][yy][xx][GRD_W-1:MAG_W]) - o + 360) % 360;
        wt = (wexp(dx, 6.0*SG) * wexp(dy, 6.0*SG)) >> 16;
        hist[(cy + 2) * 32 + (cx + 2) * 8 + ((tr * 1457) >> 16)] +=
          (longint'(g[l.oct][yy][xx][MAG_W-1:0]) * wt) >> 24;
      end
    sumsq = 0;
    foreach (hist[i]) sumsq += longint'(hist[i]) * hist[i];
    norm = longint'($sqrt(real'(sumsq)));
    while (norm * norm > sumsq) norm--;
    while ((norm + 1) * (norm + 1) <= sumsq) norm++;
    msb = 0;
    for (int i = 0; i < 64; i++) if (norm[i]) msb = i;
    nn = (msb >= 31) ? norm >> (msb - 31) : norm << (31 - msb);
    recip = (64'd1 << 63) / nn;
    foreach (f[i]) f[i] = (norm == 0) ? 0 : (longint'(hist[i]) * recip) >> (7 + msb);
    return f;
  endfunction

  // ------------------------------------------------------ output checking
  kp_loc_t kp_q[$];
  logic    exact = 1;
  int n_desc = 0, el = 0;
  real sq = 0.0;
  feat_t rf;
  int rori;

  always @(posedge clk_fg) if (rst_n && desc_valid) begin
    longint unsigned f;
    if (el == 0 && exact) begin
      kp_loc_t l;
      int f_i[$];
      // the two octaves are served independently: match by location
      f_i = kp_q.find_first_index(q) with (q == desc.loc);
      checks += 2;
      if (f_i.size() == 0) begin
        failures++; $display("FAIL descriptor for unknown key-point");
        l = desc.loc;
      end else begin
        l = kp_q[f_i[0]];
        kp_q.delete(f_i[0]);
      end
      rori = ref_ori(l);
      rf = ref_desc(l, rori);
      if (int'(desc.ori) != rori) begin failures++; $display("FAIL ori %0d expected %0d", desc.ori, rori); end
    end
    f = desc.feat;
    if (exact) begin
      checks++;
      if ((f > rf[el] ? f - rf[el] : rf[el] - f) > 1 || int'(desc.idx) != el) begin
        failures++;
        if (failures < 10) $display("FAIL elem %0d: %0d expected %0d", el, f, rf[el]);
      end
    end
    sq += real'(f) * real'(f);
    el++;
    if (desc_last) begin
      real len;
      len = $sqrt(sq) / 65536.0;
      checks++;
      if (el != 128 || len < 511.5 || len > 512.5) begin
        failures++; $display("FAIL descriptor length %f / %0d elements", len, el);
      end
      n_desc++; el = 0; sq = 0.0;
    end
  end

  // ------------------------------------------------------------ stimulus
  task automatic send_row(int o, int y, int kp_every, int kp_x, int gap);
    int w;
    w = o ? W/2 : W;
    for (int x = 0; x < w + 16; x++) begin
      @(negedge clk_kpd);
      in_valid = 1;
      in_tag.oct = 1'(o); in_tag.x = CW'(x); in_tag.y = CW'(y);
      in_grad = (x < w) ? g[o][y][x] : '0;
      in_kp = (x < w) && ((kp_every > 0) ? ($urandom % kp_every == 0) : (x == kp_x));
      in_kp_dx = OFF_W'($urandom); in_kp_dy = OFF_W'($urandom);
      if (in_kp && exact) begin
        kp_loc_t l;
        l.oct = 1'(o); l.x = XW'(x); l.y = YW'(y); l.dx = in_kp_dx; l.dy = in_kp_dy;
        kp_q.push_back(l);
      end
    end
    @(negedge clk_kpd);
    in_valid = 0; in_kp = 0;
    repeat (gap) @(negedge clk_kpd);
  endtask

  task automatic send_frame(int kp_every, int gap);
    int y2 = 0;
    for (int o = 0; o < 2; o++)
      for (int y = 0; y < (o ? H/2 : H); y++)
        for (int x = 0; x < (o ? W/2 : W); x++)
          g[o][y][x] = {ORI_W'($urandom % 360), MAG_W'($urandom % (1 << 22))};
    for (int y = 0; y < H; y++) begin
      int kx;
      kx = ($urandom % 3 == 0) ? $urandom % W : -1;
      send_row(0, y, kp_every, kx, gap);
      if (y % 2 == 1) begin
        kx = ($urandom % 3 == 0) ? $urandom % (W/2) : -1;
        send_row(1, y2, kp_every, kx, gap);
        y2++;
      end
    end
  endtask

  initial begin
    in_valid = 0; in_tag = '0; in_grad = '0; in_kp = 0; in_kp_dx = '0; in_kp_dy = '0;
    repeat (4) @(posedge clk_kpd);
    rst_n = 1;
    // phase 1: sparse key-points, exact comparison
    send_frame(0, 3000);
    repeat (30000) @(posedge clk_kpd);
    checks += 3;
    if (kp_q.size() != 0) begin failures++; $display("FAIL %0d key-points without descriptor", kp_q.size()); end
    if (kp_skip_cnt != 0 || kp_drop_cnt != 0) begin failures++; $display("FAIL skip/drop in sparse phase"); end
    if (n_desc < 10 || int'(kp_done_cnt) != n_desc) begin failures++; $display("FAIL %0d descriptors", n_desc); end
    $display("phase 1: %0d key-points, %0d descriptors", kp_in_cnt, n_desc);
    // phase 2: dense key-points, accounting only
    exact = 0;
    send_frame(6, 0);
    repeat (150000) @(posedge clk_kpd);
    checks += 6;
    if (kp_in_cnt != kp_done_cnt + kp_skip_cnt + kp_drop_cnt) begin
      failures++; $display("FAIL in %0d != done %0d + skip %0d + drop %0d", kp_in_cnt, kp_done_cnt, kp_skip_cnt, kp_drop_cnt);
    end
    if (int'(kp_done_cnt) != n_desc) begin failures++; $display("FAIL done %0d desc %0d", kp_done_cnt, n_desc); end
    if (kp_drop_cnt == 0)    begin failures++; $display("FAIL no drops"); end
    if (kp_skip_cnt == 0)    begin failures++; $display("FAIL no skips"); end
    if (overlap_cycles == 0) begin failures++; $display("FAIL no MOG/LDG overlap"); end
    if (wait_cycles == 0)    begin failures++; $display("FAIL no waiting"); end
    $display("in %0d done %0d skip %0d drop %0d overlap %0d wait %0d",
             kp_in_cnt, kp_done_cnt, kp_skip_cnt, kp_drop_cnt, overlap_cycles, wait_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk_kpd);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ldg: local descriptor generation for key-point scale 1 on a 64x48 image.
//
// The gradient buffer is modelled behaviourally (2 octaves x 43 bars x 64
// columns, one-cycle read latency) and filled with random gradients for each
// key-point. An integer reference model in this file recomputes the
// 128-element descriptor from the description of the algorithm: offsets
// rotated by the main orientation (Q14 sin/cos), sub-region
// floor(rotated / 3 sigma) in -2..1, orientation bin of the relative angle
// (45 degree bins), Gaussian weight of sigma 6 sigma, nearest-bin
// accumulation, then normalisation to a vector length of 512 in 12Q16.
// Checks:
//   * every element matches the reference within 1 LSB, indices 0..127 in
//     order, desc_last on element 127, location / scale / orientation
//     carried through;
//   * the Euclidean length of each descriptor is 512 within 0.1 %;
//   * processing time (2R+1)^2 + about 204 cycles, and within 15 % of the
//     2000 cycles per key-point quoted for the first scale;
//   * a key-point whose window has been overwritten by more than OVR_THR
//     pixels is skipped: skip pulses and no descriptor is produced.
module tb_ldg;
  import sift_pkg::*;
  localparam int K = 0, W = 64, H = 48, NB = 43;
  localparam int R = ldg_radius(K);
  localparam int OVR = 4 * NB;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge: asynchronous reset of every flop
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic kp_valid, kp_pop, ori_valid, ori_pop, r_oct, desc_valid, desc_last, busy, skip, done;
  kp_entry_t kp;
  logic [ORI_W-1:0] ori_in;
  logic [1:0][15:0] rows_done;
  logic [6:0] r_bar;
  logic [XW-1:0] r_x;
  logic [GRD_W-1:0] r_data;
  desc_elem_t desc;
  ldg #(.K(K), .NBARS(NB), .IMG_W(W), .IMG_H(H), .OVR_THR(OVR)) dut (.*);

  logic [GRD_W-1:0] mem [2][NB][W];
  always_ff @(posedge clk) r_data <= mem[r_oct][r_bar][r_x];

  real SG;
  initial SG = 1.6 * (2.0 ** (real'(K + 1) / 3.0));

  function automatic longint wq(int d);
    real s6;
    s6 = 6.0 * SG;
    return longint'(int'($exp(-real'(d*d) / (2.0*s6*s6)) * 65536.0));
  endfunction
  function automatic longint q14sin(int a);
    return longint'(int'($sin(real'(a % 360) * 3.14159265358979 / 180.0) * 16384.0));
  endfunction

  longint ref_hist [128];
  longint unsigned ref_feat [128];

  task automatic ref_desc(kp_entry_t e, int o);
    int h, w;
    longint cs, sn, inv;
    longint unsigned sumsq, norm, nn, recip;
    int msb;
    h = e.loc.oct ? H/2 : H;
    w = e.loc.oct ? W/2 : W;
    cs = q14sin(o + 90);
    sn = q14sin(o);
    inv = longint'(int'(65536.0 / (3.0 * SG)));
    foreach (ref_hist[i]) ref_hist[i] = 0;
    for (int dy = -R; dy <= R; dy++)
      for (int dx = -R; dx <= R; dx++) begin
        int yy, xx, b, tr, ob;
        longint rx, ry, cx, cy, wt, m;
        logic [GRD_W-1:0] g;
        yy = int'(e.loc.y) + dy;
        xx = int'(e.loc.x) + dx;
        if (yy < 0 || yy >= h || xx < 0 || xx >= w) continue;
        rx = dx * cs + dy * sn;
        ry = dy * cs - dx * sn;
        cx = (rx * inv) >>> 30;
        cy = (ry * inv) >>> 30;
        if (cx < -2 || cx > 1 || cy < -2 || cy > 1) continue;
        b = (int'(e.bar) + dy + NB) % NB;
        g = mem[e.loc.oct][b][xx];
        tr = (int'(g[GRD_W-1:MAG_W]) - o + 360) % 360;
        ob = (tr * 1457) >> 16;
        wt = (wq(dx < 0 ? -dx : dx) * wq(dy < 0 ? -dy : dy)) >> 16;
        m  = (longint'(g[MAG_W-1:0]) * wt) >> 24;
        ref_hist[(cy + 2) * 32 + (cx + 2) * 8 + ob] += m;
      end
    sumsq = 0;
    foreach (ref_hist[i]) sumsq += longint'(ref_hist[i]) * ref_hist[i];
    norm = longint'($sqrt(real'(sumsq)));
    while (norm * norm > sumsq) norm--;
    while ((norm + 1) * (norm + 1) <= sumsq) norm++;
    msb = 0;
    for (int i = 0; i < 64; i++) if (norm[i]) msb = i;
    nn = (msb >= 31) ? norm >> (msb - 31) : norm << (31 - msb);
    recip = (64'd1 << 63) / nn;
    foreach (ref_feat[i]) ref_feat[i] = (norm == 0) ? 0 : (longint'(ref_hist[i]) * recip) >> (7 + msb);
  endtask

  int n_desc = 0, n_skip = 0, t_start, max_cycles = 0, min_cycles = 1 << 30, el = 0;
  real sq = 0.0;
  kp_entry_t cur;
  int cur_ori;
  logic skip_expect = 0, in_skip_test = 0;

  always @(posedge clk) if (rst_n) begin
    if (kp_pop) t_start = $time / 10;
    if (skip) begin
      n_skip++;
      checks++;
      if (!in_skip_test) begin failures++; $display("FAIL unexpected skip"); end
    end
    if (desc_valid) begin
      longint unsigned f, e;
      checks++;
      if (in_skip_test) begin failures++; $display("FAIL descriptor of skipped key-point"); end
      f = desc.feat;
      e = ref_feat[el];
      if ((f > e ? f - e : e - f) > 1 || int'(desc.idx) != el || desc.loc != cur.loc ||
          int'(desc.ori) != cur_ori || desc.scale != 2'(K) || desc_last != (el == 127)) begin
        failures++;
        if (failures < 10) $display("FAIL elem %0d: %0d expected %0d (hist %0d)", el, f, e, ref_hist[el]);
      end
      sq += real'(f) * real'(f);
      el++;
      if (desc_last) begin
        real len;
        int cyc;
        len = $sqrt(sq) / 65536.0;
        checks++;
        if (len < 511.5 || len > 512.5) begin failures++; $display("FAIL length %f", len); end
        cyc = $time / 10 - t_start;
        if (cyc > max_cycles) max_cycles = cyc;
        if (cyc < min_cycles) min_cycles = cyc;
        n_desc++; el = 0; sq = 0.0;
      end
    end
  end

  task automatic fill();
    for (int o = 0; o < 2; o++)
      for (int b = 0; b < NB; b++)
        for (int x = 0; x < W; x++)
          mem[o][b][x] = {ORI_W'($urandom % 360), MAG_W'($urandom % (1 << 22))};
  endtask

  task automatic run_kp(kp_entry_t e, int o, int ovr_rows);
    cur = e; cur_ori = o;
    ref_desc(e, o);
    @(negedge clk);
    rows_done = '0;
    rows_done[e.loc.oct] = e.seq + 16'(R + 1 + ovr_rows);
    kp = e; ori_in = ORI_W'(o); kp_valid = 1; ori_valid = 1;
    do @(posedge clk); while (!kp_pop);
    @(negedge clk);
    kp_valid = 0; ori_valid = 0;
    repeat (3) @(negedge clk);
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    kp_valid = 0; ori_valid = 0; kp = '0; ori_in = '0; rows_done = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 24; n++) begin
      kp_entry_t e;
      e = '0;
      e.loc.oct = 1'($urandom % 4 == 0);
      e.loc.x = XW'($urandom % (e.loc.oct ? W/2 : W));
      e.loc.y = YW'($urandom % (e.loc.oct ? H/2 : H));
      e.loc.dx = OFF_W'($urandom);
      e.bar = 7'($urandom % NB);
      e.seq = 16'($urandom);
      fill();
      run_kp(e, (n < 4) ? 90 * n : $urandom % 360, $urandom % 4);
    end
    // overwritten window: skipped
    in_skip_test = 1;
    for (int n = 0; n < 3; n++) begin
      kp_entry_t e;
      e = '0;
      e.loc.x = XW'($urandom % W);
      e.loc.y = YW'($urandom % H);
      e.seq = 16'($urandom);
      run_kp(e, 45, 4 + n);
    end
    in_skip_test = 0;
    checks += 4;
    if (n_desc != 24) begin failures++; $display("FAIL %0d descriptors", n_desc); end
    if (n_skip != 3)  begin failures++; $display("FAIL %0d skips", n_skip); end
    if (max_cycles > (2*R+1)**2 + 215 || min_cycles < (2*R+1)**2 + 195) begin
      failures++; $display("FAIL cycles %0d..%0d", min_cycles, max_cycles);
    end
    if (max_cycles > 2300 || max_cycles < 1700) begin
      failures++; $display("FAIL cycles %0d not within 15%% of 2000", max_cycles);
    end
    $display("LDG R=%0d: %0d cycles per key-point", R, max_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_kp_detect: checks key-point detection on synthetic DoG images of both
// octaves. Low-level noise is overlaid with planted blobs (true extrema,
// maxima and minima), ridges (extrema that fail the edge test), weak peaks
// (below the contrast threshold) and peaks near the border. For every pixel
// of every image the detector's flag, and for flagged pixels the sub-pixel
// offsets, are compared with a reference evaluation of the extremum,
// contrast, edge and border rules. Also checks the fixed latency.
module tb_kp_detect;
  import sift_pkg::*;
  localparam int W = 48, H = 36, HB = 8, VB = 4;
  localparam int THR = CONTRAST_THR_DEF;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge: asynchronous reset of every flop
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid;
  beat_tag_t in_tag;
  logic [N_DOG-1:0][D_W-1:0] in_d;
  logic out_valid;
  beat_tag_t out_tag;
  logic [N_KPS-1:0] kp_flag;
  logic [N_KPS-1:0][OFF_W-1:0] kp_dx, kp_dy;

  kp_detect #(.IMG_W(W), .IMG_H(H)) dut (.*);

  longint dimg [2][N_DOG][H][W];
  int nflag = 0, nref = 0, nedge_rej = 0;

  function automatic int ref_off(longint g2, longint curv);
    longint q;
    if (curv == 0) return 0;
    q = -(g2 * 8) / curv;
    if (q > 8) q = 8;
    if (q < -8) q = -8;
    return int'(q);
  endfunction

  // reference decision for scale k (1..3) at (x, y) of octave o
  function automatic bit ref_kp(int o, int k, int x, int y, output int ox, output int oy);
    int w, h;
    longint c, dxx, dyy, dxy, tr, det;
    bit mx, mn;
    w = o ? W/2 : W; h = o ? H/2 : H;
    ox = 0; oy = 0;
    if (x < IMG_BORDER || x >= w - IMG_BORDER || y < IMG_BORDER || y >= h - IMG_BORDER) return 0;
    c = dimg[o][k][y][x];
    mx = c > THR;
    mn = c < -THR;
    for (int s = k-1; s <= k+1; s++)
      for (int j = -1; j <= 1; j++)
        for (int i = -1; i <= 1; i++) begin
          if (dimg[o][s][y+j][x+i] > c) mx = 0;
          if (dimg[o][s][y+j][x+i] < c) mn = 0;
        end
    if (!(mx || mn)) return 0;
    dxx = dimg[o][k][y][x+1] + dimg[o][k][y][x-1] - 2*c;
    dyy = dimg[o][k][y+1][x] + dimg[o][k][y-1][x] - 2*c;
    dxy = dimg[o][k][y+1][x+1] - dimg[o][k][y-1][x+1] - dimg[o][k][y+1][x-1] + dimg[o][k][y-1][x-1];
    // det and trace scaled by 16 to keep dxy/4 exact
    tr  = dxx + dyy;
    det = 16*dxx*dyy - dxy*dxy;
    ox = ref_off(dimg[o][k][y][x+1] - dimg[o][k][y][x-1], dxx);
    oy = ref_off(dimg[o][k][y+1][x] - dimg[o][k][y-1][x], dyy);
    if (det <= 0 || 16*tr*tr*EDGE_R_DEF >= (EDGE_R_DEF+1)*(EDGE_R_DEF+1)*det) begin
      nedge_rej++;
      return 0;
    end
    return 1;
  endfunction

  task automatic plant(int o, int s, int x, int y, longint v, int kind);
    // kind 0: round blob, 1: ridge along x
    for (int j = -2; j <= 2; j++)
      for (int i = -2; i <= 2; i++) begin
        int xx, yy;
        longint a;
        xx = x + i; yy = y + j;
        if (xx < 0 || yy < 0 || xx >= (o ? W/2 : W) || yy >= (o ? H/2 : H)) continue;
        if (kind == 0) a = v / (1 + i*i + j*j);
        else           a = (j == 0) ? v : v / (1 + 3*j*j);
        dimg[o][s][yy][xx] += a;
        if (s > 0) dimg[o][s-1][yy][xx] += a / 3;
        if (s < N_DOG-1) dimg[o][s+1][yy][xx] += a / 3;
      end
  endtask

  task automatic send_row(int o, int y);
    int w, h;
    w = o ? W/2 : W; h = o ? H/2 : H;
    for (int x = 0; x < w + HB; x++) begin
      @(negedge clk);
      in_valid = 1;
      in_tag.oct = 1'(o); in_tag.x = CW'(x); in_tag.y = CW'(y);
      for (int s = 0; s < N_DOG; s++)
        in_d[s] = (x < w && y < h) ? D_W'(dimg[o][s][y][x]) : '0;
    end
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_tag = '0; in_d = '0;
    for (int o = 0; o < 2; o++)
      for (int s = 0; s < N_DOG; s++)
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++)
            dimg[o][s][y][x] = longint'($urandom % 60001) - 30000;
    for (int n = 0; n < 40; n++) begin
      int o, s, kind;
      longint v;
      o = (n % 4 == 3) ? 1 : 0;
      s = 1 + $urandom % 3;
      kind = (n % 5 == 4) ? 1 : 0;
      v = (n % 7 == 6) ? longint'(THR / 2) : longint'(THR + 100000 + $urandom % 600000);
      if (n % 2) v = -v;
      plant(o, s, 3 + $urandom % ((o ? W/2 : W) - 6), 3 + $urandom % ((o ? H/2 : H) - 6), v, kind);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    begin
      int y1 = 0, y2 = 0;
      while (y1 < H + VB || y2 < H/2 + VB) begin
        if (y1 < H + VB) begin send_row(0, y1); y1++; end
        if (y1 < H + VB) begin send_row(0, y1); y1++; end
        if (y2 < H/2 + VB) begin send_row(1, y2); y2++; end
      end
    end
    repeat (40) @(posedge clk);
    checks++;
    if (nref < 10) begin failures++; $display("FAIL: only %0d reference key-points", nref); end
    checks++;
    if (nedge_rej == 0) begin failures++; $display("FAIL: edge test never exercised"); end
    $display("key-points: %0d flagged, %0d expected, %0d edge rejections", nflag, nref, nedge_rej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [STAGE2_LAT-1:0] vsh = '0;
  always_ff @(posedge clk) vsh <= {vsh[STAGE2_LAT-2:0], in_valid & rst_n};
  always @(posedge clk) if (rst_n) begin
    #1;
    if (out_valid !== vsh[STAGE2_LAT-1]) begin checks++; failures++; $display("FAIL latency"); end
    if (out_valid) begin
      int o, x, y, w, h;
      o = out_tag.oct; x = out_tag.x; y = out_tag.y;
      w = o ? W/2 : W; h = o ? H/2 : H;
      if (x >= 0 && x < w && y >= 0 && y < h)
        for (int k = 0; k < N_KPS; k++) begin
          int ox, oy;
          bit e;
          e = ref_kp(o, k+1, x, y, ox, oy);
          nref += e;
          nflag += kp_flag[k];
          checks++;
          if (kp_flag[k] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL flag oct %0d scale %0d (%0d,%0d): %b", o, k+1, x, y, kp_flag[k]);
          end else if (e) begin
            checks++;
            if (int'($signed(kp_dx[k])) != ox || int'($signed(kp_dy[k])) != oy) begin
              failures++;
              $display("FAIL offset (%0d,%0d)", x, y);
            end
          end
        end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

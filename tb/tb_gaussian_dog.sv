// tb_gaussian_dog: end-to-end check of the Gaussian filtering and DoG stage
// on a small random image pair (first octave W x H, second octave W/2 x H/2,
// rows interleaved two-to-one as in the real schedule). Every output pixel of
// L0..L5 and D0..D4 inside the image is compared with a reference that
// computes the separable filter directly from the Gaussian formula with the
// mirror-in-window border rule. Also checks the 7-cycle latency.
module tb_gaussian_dog;
  import sift_pkg::*;
  localparam int W = 40, H = 30, HB = 16, VB = 16;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge: asynchronous reset of every flop
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid;
  beat_tag_t in_tag;
  logic [7:0] in_pix;
  logic out_valid;
  beat_tag_t out_tag;
  logic [N_GAUSS-1:0][L_W-1:0] l;
  logic [N_DOG-1:0][D_W-1:0] d;

  gaussian_dog #(.IMG_W(W), .IMG_H(H)) dut (.*);

  int img [2][H][W];
  longint yref [2][N_GAUSS][H][W];
  longint lref [2][N_GAUSS][H][W];

  function automatic longint coef(int s, int i);
    real sg, tot;
    int r;
    int radii [6] = '{4, 5, 6, 8, 10, 12};
    sg = 1.6 * (2.0 ** (s / 3.0));
    r = radii[s];
    if (i > r) return 0;
    tot = 0;
    for (int j = -r; j <= r; j++) tot += $exp(-(j*j) / (2.0*sg*sg));
    return longint'($exp(-(i*i) / (2.0*sg*sg)) / tot * 65536.0);
  endfunction

  function automatic int mir(int c, int dd, int n);
    if (c + dd >= 0 && c + dd < n) return c + dd;
    if (c - dd >= 0 && c - dd < n) return c - dd;   // mirror inside the window
    return c;                                        // window wider than the image

  endfunction

  task automatic build_ref();
    int radii [6] = '{4, 5, 6, 8, 10, 12};
    for (int o = 0; o < 2; o++) begin
      int w, h;
      w = o ? W/2 : W; h = o ? H/2 : H;
      for (int s = 0; s < N_GAUSS; s++) begin
        for (int y = 0; y < h; y++)
          for (int x = 0; x < w; x++) begin
            longint acc = 0;
            for (int dd = -radii[s]; dd <= radii[s]; dd++)
              acc += longint'(img[o][mir(y, dd, h)][x]) * coef(s, dd < 0 ? -dd : dd);
            yref[o][s][y][x] = (acc > 64'hFFFFFF) ? 64'hFFFFFF : acc;
          end
        for (int y = 0; y < h; y++)
          for (int x = 0; x < w; x++) begin
            longint acc = 0;
            for (int dd = -radii[s]; dd <= radii[s]; dd++)
              acc += yref[o][s][y][mir(x, dd, w)] * coef(s, dd < 0 ? -dd : dd);
            acc = (acc + 32768) >>> 16;
            lref[o][s][y][x] = (acc > 64'hFFFFFF) ? 64'hFFFFFF : acc;
          end
      end
    end
  endtask

  task automatic send_row(int o, int y);
    int w, h;
    w = o ? W/2 : W; h = o ? H/2 : H;
    for (int x = 0; x < w + HB; x++) begin
      @(negedge clk);
      in_valid = 1;
      in_tag.oct = 1'(o); in_tag.x = CW'(x); in_tag.y = CW'(y);
      in_pix = (x < w && y < h) ? 8'(img[o][y][x]) : 8'h0;
    end
    @(negedge clk) in_valid = 0;                        // one bubble per row
  endtask

  int outs = 0;
  initial begin
    in_valid = 0; in_tag = '0; in_pix = '0;
    for (int o = 0; o < 2; o++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          img[o][y][x] = (o == 0) ? (((x / 6 + y / 5) % 2) * 150 + $urandom % 60) : $urandom % 256;
    build_ref();
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
    repeat (10) @(posedge clk);
    checks++;
    if (outs != W*H + (W/2)*(H/2)) begin
      failures++;
      $display("FAIL: %0d in-image outputs, expected %0d", outs, W*H + (W/2)*(H/2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency: out_valid is in_valid delayed by 7 cycles
  logic [6:0] vsh = 0;
  always_ff @(posedge clk) vsh <= {vsh[5:0], in_valid & rst_n};
  always @(posedge clk) if (rst_n) begin
    #1;
    if (out_valid !== vsh[6]) begin checks++; failures++; end
  end

  always @(posedge clk) if (rst_n) begin
    #1;
    if (out_valid) begin
      int o, x, y, w, h;
      o = out_tag.oct; x = out_tag.x; y = out_tag.y;
      w = o ? W/2 : W; h = o ? H/2 : H;
      if (x >= 0 && x < w && y >= 0 && y < h) begin
        outs++;
        for (int s = 0; s < N_GAUSS; s++) begin
          checks++;
          if (longint'(l[s]) != lref[o][s][y][x]) begin
            failures++;
            if (failures < 10) $display("FAIL L%0d oct %0d (%0d,%0d): %0d != %0d", s, o, x, y, l[s], lref[o][s][y][x]);
          end
        end
        for (int s = 0; s < N_DOG; s++) begin
          longint dd;
          dd = lref[o][s+1][y][x] - lref[o][s][y][x];
          if (dd > 2097151) dd = 2097151;
          if (dd < -2097152) dd = -2097152;
          checks++;
          if (longint'($signed(d[s])) != dd) begin
            failures++;
            if (failures < 10) $display("FAIL D%0d (%0d,%0d)", s, x, y);
          end
        end
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

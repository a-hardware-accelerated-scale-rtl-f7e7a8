// tb_sift_full: full-size run of the accelerator with all parameters at
// their defaults (1280x720, two octaves, 43/55/69 gradient bars, 64-entry
// key-point FIFOs), detection clock 50 MHz, feature clock 100 MHz.
//
// One frame of a synthetic scene (mid-grey background, 400 Gaussian blobs of
// radius 1..6 pixels, bright and dark, plus noise) is streamed, followed by
// the start of a second frame so the frame period can be measured.
// Checks:
//   * frame period = 1296*736 + 656*376 = 1,200,512 detection cycles, i.e.
//     at least 41.5 frames per second at 50 MHz (the design reports 42 fps
//     for 720p);
//   * no overflow of the scale-3 down-sampling FIFO, H/2 + VBLANK
//     second-octave rows;
//   * key-points at every scale, descriptors at every scale, all of length
//     512 with 128 ordered elements, and after draining
//     received = completed + skipped + dropped per scale.
module tb_sift_full;
  import sift_pkg::*;
  localparam int W = IMG_W_DEF, H = IMG_H_DEF;
  logic clk_kpd = 0, clk_fg = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge: asynchronous reset of every flop
  always #10 clk_kpd = ~clk_kpd;
  always #5  clk_fg  = ~clk_fg;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, frame_done;
  logic [PIX_W-1:0] in_pix;
  logic [N_KPS-1:0] desc_valid, desc_last;
  desc_elem_t [N_KPS-1:0] desc;
  logic [31:0] o2_rows, stall_cycles;
  logic [15:0] s3_overflow;
  logic [N_KPS-1:0][31:0] kp_in_cnt, kp_skip_cnt, kp_done_cnt, overlap_cycles, wait_cycles;
  logic [N_KPS-1:0][15:0] kp_drop_cnt;
  sift_top dut (.*);

  logic [7:0] img [H][W];
  initial begin
    real acc [H][W];
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) acc[y][x] = 128.0;
    for (int b = 0; b < 400; b++) begin
      int cx, cy, r;
      real s, a;
      cx = 10 + int'($urandom % (W - 20));
      cy = 10 + int'($urandom % (H - 20));
      s  = 1.0 + real'($urandom % 50) / 10.0;
      a  = (($urandom % 2) ? 1.0 : -1.0) * (60.0 + real'($urandom % 60));
      r  = int'(4.0 * s) + 1;
      for (int y = cy - r; y <= cy + r; y++)
        for (int x = cx - r; x <= cx + r; x++)
          if (y >= 0 && y < H && x >= 0 && x < W)
            acc[y][x] += a * $exp(-real'((x - cx)**2 + (y - cy)**2) / (2.0 * s * s));
    end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        v = int'(acc[y][x]) + int'($urandom % 5) - 2;
        img[y][x] = (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
      end
  end

  int pix_n = 0;
  always_comb in_pix = img[(pix_n / W) % H][pix_n % W];
  always @(posedge clk_kpd) if (rst_n && in_valid && in_ready) pix_n++;

  int frames = 0, t_fd [2];
  always @(posedge clk_kpd) if (rst_n && frame_done) begin
    if (frames < 2) t_fd[frames] = $time / 20;
    frames++;
  end

  int n_desc [N_KPS], el [N_KPS];
  real sq [N_KPS];
  initial foreach (n_desc[k]) begin n_desc[k] = 0; el[k] = 0; sq[k] = 0.0; end
  always @(posedge clk_fg) if (rst_n)
    for (int k = 0; k < N_KPS; k++)
      if (desc_valid[k]) begin
        checks++;
        if (int'(desc[k].idx) != el[k] || desc[k].scale != 2'(k)) begin
          failures++; if (failures < 10) $display("FAIL element order scale %0d", k);
        end
        sq[k] += real'(desc[k].feat) * real'(desc[k].feat);
        el[k]++;
        if (desc_last[k]) begin
          real len;
          len = $sqrt(sq[k]) / 65536.0;
          checks++;
          if (len < 511.5 || len > 512.5) begin failures++; $display("FAIL length %f", len); end
          n_desc[k]++;
          el[k] = 0; sq[k] = 0.0;
        end
      end

  initial begin
    int period, start;
    real fps;
    in_valid = 0;
    repeat (5) @(posedge clk_kpd);
    rst_n = 1;
    repeat (5) @(posedge clk_kpd);
    start = $time / 20;
    in_valid <= 1;
    wait (frames == 1);
    // second frame: stop feeding after it is complete
    wait (pix_n == 2 * W * H);
    in_valid <= 0;
    wait (frames == 2);
    repeat (400000) @(posedge clk_fg);
    period = t_fd[1] - t_fd[0];
    fps = 50.0e6 / real'(period);
    $display("frame period %0d cycles = %0.2f fps at 50 MHz, o2 rows %0d, s3 overflow %0d",
             period, fps, o2_rows, s3_overflow);
    checks += 3;
    if (period != 1296 * 736 + 656 * 376) begin failures++; $display("FAIL frame period"); end
    if (fps < 41.5) begin failures++; $display("FAIL frame rate"); end
    if (s3_overflow != 0 || o2_rows != 2 * (H/2 + 16)) begin failures++; $display("FAIL octave 2"); end
    for (int k = 0; k < N_KPS; k++) begin
      $display("scale %0d: key-points %0d, descriptors %0d, skipped %0d, dropped %0d, overlap %0d, wait %0d",
               k + 1, kp_in_cnt[k], n_desc[k], kp_skip_cnt[k], kp_drop_cnt[k], overlap_cycles[k], wait_cycles[k]);
      checks += 3;
      if (kp_in_cnt[k] == 0) begin failures++; $display("FAIL no key-points"); end
      if (n_desc[k] == 0 || int'(kp_done_cnt[k]) != n_desc[k]) begin failures++; $display("FAIL descriptors"); end
      if (kp_in_cnt[k] != kp_done_cnt[k] + kp_skip_cnt[k] + 32'(kp_drop_cnt[k])) begin
        failures++; $display("FAIL accounting");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk_kpd);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

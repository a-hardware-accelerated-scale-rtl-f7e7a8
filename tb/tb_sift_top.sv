// tb_sift_top: end-to-end test of the accelerator on a 96x64 image with
// independent 50 MHz (detection) and 100 MHz (feature generation) clocks.
//
// The image is a mid-grey background with Gaussian blobs of several sizes
// (bright and dark) plus a little noise, so key-points appear at all three
// scales and in both octaves. Three frames are streamed through the
// ready/valid pixel input.
// Every mechanism of the design is counted and the test fails if one never
// happened:
//   * octave interleaving: second-octave rows per frame = H/2 + VBLANK
//     (flush rows included), no overflow of the scale-3 down-sampling FIFO;
//   * input back-pressure (blanking and second-octave slots);
//   * key-points detected at each scale and in each octave;
//   * dual-clock transfer: descriptors leave on the feature clock;
//   * main orientation and descriptor generation overlapping in time;
//   * buffer management: key-points skipped (window overwritten) or waiting.
// Every descriptor is checked: 128 elements in index order, vector length
// 512, right scale, location inside the 5-pixel border. After the stream
// has drained, every key-point must be accounted for per scale:
// received = completed + skipped + dropped, completed = descriptors seen.
// The frame period must equal the beat count of the two interleaved octaves
// ((W+HBLANK)(H+VBLANK) + (W/2+HBLANK)(H/2+VBLANK)) plus at most 5 % stall.
module tb_sift_top;
  import sift_pkg::*;
  localparam int W = 96, H = 64, HB = 16, VB = 16;
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
  sift_top #(.IMG_W(W), .IMG_H(H), .HBLANK(HB), .VBLANK(VB)) dut (.*);

  // ---------------------------------------------------------------- image
  logic [7:0] img [H][W];
  initial begin
    real acc [H][W];
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) acc[y][x] = 128.0;
    for (int b = 0; b < 40; b++) begin
      real cx, cy, s, a;
      cx = 8.0 + real'($urandom % (W - 16));
      cy = 8.0 + real'($urandom % (H - 16));
      s  = (b % 2) ? 0.8 + real'($urandom % 8) / 10.0 : 1.5 + real'($urandom % 50) / 10.0;
      a  = (($urandom % 2) ? 1.0 : -1.0) * (60.0 + real'($urandom % 60));
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          acc[y][x] += a * $exp(-((x - cx)**2 + (y - cy)**2) / (2.0 * s * s));
    end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        v = int'(acc[y][x]) + int'($urandom % 5) - 2;
        img[y][x] = (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
      end
  end

  // ------------------------------------------------------- pixel source
  int pix_n = 0, frames_sent = 0;
  localparam int NFRAMES = 3;
  always_comb in_pix = img[(pix_n / W) % H][pix_n % W];
  always @(posedge clk_kpd) if (rst_n) begin
    if (in_valid && in_ready) begin
      pix_n++;
      if (pix_n == W * H * NFRAMES) in_valid <= 0;
    end
  end

  // -------------------------------------------------------- counting
  int frames = 0, last_fd = -1, period = 0, not_ready = 0;
  always @(posedge clk_kpd) if (rst_n) begin
    if (frame_done) begin
      int now;
      now = $time / 20;
      if (last_fd >= 0) period = now - last_fd;
      last_fd = now;
      frames++;
    end
    if (in_valid && !in_ready) not_ready++;
  end

  int n_desc [N_KPS], n_oct1 = 0, el [N_KPS];
  real sq [N_KPS];
  initial foreach (n_desc[k]) begin n_desc[k] = 0; el[k] = 0; sq[k] = 0.0; end
  always @(posedge clk_fg) if (rst_n)
    for (int k = 0; k < N_KPS; k++)
      if (desc_valid[k]) begin
        longint unsigned f;
        int w, h;
        f = desc[k].feat;
        if (el[k] == 0) begin
          w = desc[k].loc.oct ? W/2 : W;
          h = desc[k].loc.oct ? H/2 : H;
          checks++;
          if (desc[k].scale != 2'(k) || int'(desc[k].loc.x) < IMG_BORDER ||
              int'(desc[k].loc.x) >= w - IMG_BORDER || int'(desc[k].loc.y) < IMG_BORDER ||
              int'(desc[k].loc.y) >= h - IMG_BORDER) begin
            failures++; $display("FAIL descriptor header scale %0d", k);
          end
        end
        checks++;
        if (int'(desc[k].idx) != el[k] || desc_last[k] != (el[k] == 127)) begin
          failures++; if (failures < 10) $display("FAIL element order scale %0d", k);
        end
        sq[k] += real'(f) * real'(f);
        el[k]++;
        if (desc_last[k]) begin
          real len;
          len = $sqrt(sq[k]) / 65536.0;
          checks++;
          if (len < 511.5 || len > 512.5) begin failures++; $display("FAIL length %f", len); end
          n_desc[k]++;
          n_oct1 += desc[k].loc.oct;
          el[k] = 0; sq[k] = 0.0;
        end
      end

  // ------------------------------------------------------------ sequence
  initial begin
    int base, tot_skip, tot_wait, tot_ovl;
    in_valid = 0;
    repeat (5) @(posedge clk_kpd);
    rst_n = 1;
    repeat (5) @(posedge clk_kpd);
    in_valid <= 1;
    wait (frames == NFRAMES);
    // let the feature generators drain
    repeat (200000) @(posedge clk_fg);
    base = (W + HB) * (H + VB) + (W/2 + HB) * (H/2 + VB);
    tot_skip = 0; tot_wait = 0; tot_ovl = 0;
    for (int k = 0; k < N_KPS; k++) begin
      $display("scale %0d: key-points %0d, descriptors %0d, skipped %0d, dropped %0d, overlap %0d, wait %0d",
               k + 1, kp_in_cnt[k], n_desc[k], kp_skip_cnt[k], kp_drop_cnt[k], overlap_cycles[k], wait_cycles[k]);
      checks += 3;
      if (kp_in_cnt[k] == 0) begin failures++; $display("FAIL no key-points at scale %0d", k + 1); end
      if (kp_in_cnt[k] != kp_done_cnt[k] + kp_skip_cnt[k] + 32'(kp_drop_cnt[k])) begin
        failures++; $display("FAIL key-point accounting scale %0d", k + 1);
      end
      if (int'(kp_done_cnt[k]) != n_desc[k] || n_desc[k] == 0) begin
        failures++; $display("FAIL descriptors scale %0d", k + 1);
      end
      tot_skip += kp_skip_cnt[k] + kp_drop_cnt[k];
      tot_wait += wait_cycles[k];
      tot_ovl  += overlap_cycles[k];
    end
    $display("frames %0d, period %0d cycles (base %0d), o2 rows %0d, stalls %0d, not-ready %0d, s3 overflow %0d, second-octave descriptors %0d",
             frames, period, base, o2_rows, stall_cycles, not_ready, s3_overflow, n_oct1);
    checks += 8;
    if (o2_rows != NFRAMES * (H/2 + VB)) begin failures++; $display("FAIL o2 rows"); end
    if (s3_overflow != 0)                begin failures++; $display("FAIL scale-3 FIFO overflow"); end
    if (not_ready == 0)                  begin failures++; $display("FAIL no back-pressure"); end
    if (n_oct1 == 0)                     begin failures++; $display("FAIL no second-octave key-points"); end
    if (tot_ovl == 0)                    begin failures++; $display("FAIL no MOG/LDG overlap"); end
    if (tot_skip == 0)                   begin failures++; $display("FAIL no skipped key-points"); end
    if (tot_wait == 0)                   begin failures++; $display("FAIL no waiting key-points"); end
    if (period < base || period > base + base / 20) begin failures++; $display("FAIL frame period"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk_kpd);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

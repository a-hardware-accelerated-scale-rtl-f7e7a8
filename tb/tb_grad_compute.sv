// tb_grad_compute: checks gradient magnitude and orientation of L1..L3 for a
// random image of each octave against real-valued sqrt and atan2 of the
// central differences (border pixels must give zero differences). Magnitude
// must agree within 0.05 % + 8 LSB, orientation within 1 degree. Also checks
// the fixed latency shared with kp_detect.
module tb_grad_compute;
  import sift_pkg::*;
  localparam int W = 32, H = 20, HB = 8, VB = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge: asynchronous reset of every flop
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid;
  beat_tag_t in_tag;
  logic [N_KPS-1:0][L_W-1:0] in_l;
  logic out_valid;
  beat_tag_t out_tag;
  logic [N_KPS-1:0][GRD_W-1:0] grad;

  grad_compute #(.IMG_W(W), .IMG_H(H)) dut (.*);

  longint limg [2][N_KPS][H][W];
  int nout = 0;

  task automatic send_row(int o, int y);
    int w, h;
    w = o ? W/2 : W; h = o ? H/2 : H;
    for (int x = 0; x < w + HB; x++) begin
      @(negedge clk);
      in_valid = 1;
      in_tag.oct = 1'(o); in_tag.x = CW'(x); in_tag.y = CW'(y);
      for (int s = 0; s < N_KPS; s++)
        in_l[s] = (x < w && y < h) ? L_W'(limg[o][s][y][x]) : '0;
    end
  endtask

  initial begin
    in_valid = 0; in_tag = '0; in_l = '0;
    for (int o = 0; o < 2; o++)
      for (int s = 0; s < N_KPS; s++)
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++)
            limg[o][s][y][x] = longint'($urandom % 16777216);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < H + VB; y++) begin
      send_row(0, y);
      if (y % 2 && y / 2 < H/2 + VB) send_row(1, y / 2);
    end
    for (int y = (H + VB) / 2; y < H/2 + VB; y++) send_row(1, y);
    @(negedge clk) in_valid = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (nout != 3 * (W*H + (W/2)*(H/2))) begin
      failures++; $display("FAIL: %0d outputs", nout);
    end
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
          real gx, gy, m, a, da;
          int ang, mag;
          gx = (x == 0 || x == w-1) ? 0.0 : real'(limg[o][k][y][x+1] - limg[o][k][y][x-1]);
          gy = (y == 0 || y == h-1) ? 0.0 : real'(limg[o][k][y+1][x] - limg[o][k][y-1][x]);
          m = $sqrt(gx*gx + gy*gy);
          if (m > 16777215.0) m = 16777215.0;
          a = $atan2(gy, gx) * 180.0 / 3.14159265358979;
          if (a < 0) a += 360.0;
          ang = int'(grad[k][GRD_W-1:MAG_W]);
          mag = int'(grad[k][MAG_W-1:0]);
          nout++;
          checks += 2;
          if ((real'(mag) - m > m * 0.0005 + 8.0) || (m - real'(mag) > m * 0.0005 + 8.0)) begin
            failures++;
            if (failures < 10) $display("FAIL mag (%0d,%0d) %0d vs %f", x, y, mag, m);
          end
          da = real'(ang) - a;
          if (da > 180.0) da -= 360.0;
          if (da < -180.0) da += 360.0;
          if (m > 64.0 && (da > 1.0 || da < -1.0)) begin
            failures++;
            if (failures < 10) $display("FAIL ang (%0d,%0d) %0d vs %f", x, y, ang, a);
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

// tb_mog: main orientation generation for key-point scale 1 on a 64x48 image.
//
// The gradient buffer is modelled behaviourally (2 octaves x 43 bars x 64
// columns, one-cycle read latency). Each key-point gets a random gradient
// field whose orientation is concentrated around a random dominant angle.
// The reference computes the weighted 36-bin histogram with its own Gaussian
// weights (exp of 1.5 sigma, Q16) and takes the first largest bin; the
// orientation pushed by the DUT must be 10*bin+5. Also checked: key-points
// near the image border (outside pixels ignored), back-pressure from a full
// orientation FIFO, and the processing time of (2R+1)^2 + 40 cycles.
module tb_mog;
  import sift_pkg::*;
  localparam int K = 0, W = 64, H = 48, NB = 43;
  localparam int R = mog_radius(K);
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge: asynchronous reset of every flop
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic kp_valid, kp_pop, r_oct, ori_full, ori_push, busy;
  kp_entry_t kp;
  logic [6:0] r_bar;
  logic [XW-1:0] r_x;
  logic [GRD_W-1:0] r_data;
  logic [ORI_W-1:0] ori;
  mog #(.K(K), .NBARS(NB), .IMG_W(W), .IMG_H(H)) dut (.*);

  logic [GRD_W-1:0] mem [2][NB][W];
  always_ff @(posedge clk) r_data <= mem[r_oct][r_bar][r_x];

  function automatic int wq(int d);
    real sg;
    sg = 1.5 * 1.6 * (2.0 ** (real'(K + 1) / 3.0));
    return int'($exp(-real'(d*d) / (2.0*sg*sg)) * 65536.0);
  endfunction

  function automatic int ref_ori(kp_entry_t e);
    longint hist [36];
    int h, w, best;
    h = e.loc.oct ? H/2 : H;
    w = e.loc.oct ? W/2 : W;
    foreach (hist[i]) hist[i] = 0;
    for (int dy = -R; dy <= R; dy++)
      for (int dx = -R; dx <= R; dx++) begin
        int yy, xx, b;
        longint wt, m;
        logic [GRD_W-1:0] g;
        yy = int'(e.loc.y) + dy;
        xx = int'(e.loc.x) + dx;
        if (yy < 0 || yy >= h || xx < 0 || xx >= w) continue;
        b = (int'(e.bar) + dy + NB) % NB;
        g = mem[e.loc.oct][b][xx];
        wt = (longint'(wq(dx < 0 ? -dx : dx)) * wq(dy < 0 ? -dy : dy)) >> 16;
        m  = (longint'(g[MAG_W-1:0]) * wt) >> 24;
        hist[int'(g[GRD_W-1:MAG_W]) / 10] += m;
      end
    best = 0;
    for (int i = 1; i < 36; i++) if (hist[i] > hist[best]) best = i;
    return 10 * best + 5;
  endfunction

  // fill the buffer around a key-point with a field of dominant angle a0
  task automatic fill(int a0);
    for (int o = 0; o < 2; o++)
      for (int b = 0; b < NB; b++)
        for (int x = 0; x < W; x++) begin
          int a;
          a = ($urandom % 4 == 0) ? $urandom % 360 : (a0 + 360 + int'($urandom % 31) - 15) % 360;
          mem[o][b][x] = {ORI_W'(a), MAG_W'($urandom % (1 << 22))};
        end
  endtask

  int exp_q[$];
  int t_start, max_cycles = 0, n_done = 0;
  logic blocked_pop = 0;

  always @(posedge clk) if (rst_n) begin
    if (kp_pop) t_start = $time / 10;
    if (ori_push) begin
      int e, cyc;
      cyc = $time / 10 - t_start;
      if (cyc > max_cycles) max_cycles = cyc;
      e = exp_q.pop_front();
      checks++;
      if (int'(ori) != e) begin
        failures++;
        if (failures < 10) $display("FAIL ori %0d expected %0d", ori, e);
      end
      n_done++;
    end
    if (kp_pop && ori_full) blocked_pop = 1;
  end

  initial begin
    kp_valid = 0; kp = '0; ori_full = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      kp_entry_t e;
      e = '0;
      e.loc.oct = 1'($urandom % 4 == 0);
      if (n < 8) begin
        // key-points at the corners / border
        e.loc.x = XW'((n % 2) ? (e.loc.oct ? W/2 - 1 : W - 1) - ($urandom % 3) : $urandom % 3);
        e.loc.y = YW'((n / 2 % 2) ? (e.loc.oct ? H/2 - 1 : H - 1) - ($urandom % 3) : $urandom % 3);
      end else begin
        e.loc.x = XW'($urandom % (e.loc.oct ? W/2 : W));
        e.loc.y = YW'($urandom % (e.loc.oct ? H/2 : H));
      end
      e.bar = 7'($urandom % NB);
      fill($urandom % 360);
      exp_q.push_back(ref_ori(e));
      @(negedge clk);
      kp = e; kp_valid = 1;
      if (n % 5 == 4) begin
        ori_full = 1;
        repeat (20) @(negedge clk);
        ori_full = 0;
      end
      do @(posedge clk); while (!kp_pop);
      @(negedge clk);
      kp_valid = 0;
      // keep the buffer unchanged until the key-point is finished
      while (busy) @(negedge clk);
    end
    repeat (10) @(posedge clk);
    checks += 3;
    if (n_done != 40) begin failures++; $display("FAIL %0d orientations", n_done); end
    if (blocked_pop) begin failures++; $display("FAIL popped with full FIFO"); end
    // (2R+1)^2 scan + drain + 36-cycle search + push
    if (max_cycles < (2*R+1)**2 || max_cycles > (2*R+1)**2 + 45) begin
      failures++; $display("FAIL cycles %0d", max_cycles);
    end
    $display("MOG R=%0d: %0d cycles per key-point", R, max_cycles);
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

// tb_gauss_sym_filter: checks one 1-D symmetric Gaussian filter (scale 1,
// radius 5, integer input) and one x-pass instance (scale 5, radius 12, 8Q16
// input) against a reference that computes the Q16 factors from the Gaussian
// formula and applies the mirror-in-window border rule sample by sample.
// Also checks the 2-cycle latency.
module tb_gauss_sym_filter;
  import sift_pkg::GMAX_R, sift_pkg::CW, sift_pkg::L_W;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge: asynchronous reset of every flop
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NW = 2*GMAX_R + 1;
  logic in_valid;
  logic [NW-1:0][7:0]  win_a;
  logic [NW-1:0][23:0] win_b;
  logic signed [CW-1:0] pos, lim;
  logic va, vb;
  logic [L_W-1:0] oa, ob;

  gauss_sym_filter #(.S(1), .IN_W(8),  .FRAC(0))  dut_a (.clk, .rst_n, .in_valid, .win(win_a),
    .pos, .lim, .out_valid(va), .out(oa));
  gauss_sym_filter #(.S(5), .IN_W(24), .FRAC(16)) dut_b (.clk, .rst_n, .in_valid, .win(win_b),
    .pos, .lim, .out_valid(vb), .out(ob));

  function automatic longint coef(int s, int i);
    real sg, tot;
    int r;
    sg = 1.6 * (2.0 ** (s / 3.0));
    r = (s == 1) ? 5 : 12;
    tot = 0;
    for (int j = -r; j <= r; j++) tot += $exp(-(j*j) / (2.0*sg*sg));
    return longint'($exp(-(i*i) / (2.0*sg*sg)) / tot * 65536.0);
  endfunction

  // reference: sample at offset d after the border check
  function automatic longint ref_filter(int s, int r, longint w [NW], int p, int l, int frac);
    longint acc;
    acc = 0;
    for (int d = -r; d <= r; d++) begin
      int q;
      longint v;
      q = d;
      if (p + d < 0 || p + d >= l) q = -d;           // mirror inside the window
      if (p + q < 0 || p + q >= l) q = 0;
      v = w[GMAX_R + q];
      acc += v * coef(s, (d < 0) ? -d : d);
    end
    if (frac > 0) acc = (acc + (64'sd1 <<< (frac-1))) >>> frac;
    if (acc > 64'hFFFFFF) acc = 64'hFFFFFF;
    return acc;
  endfunction

  longint exp_a [$], exp_b [$];
  int sent = 0;
  initial begin
    in_valid = 0; pos = '0; lim = '0; win_a = '0; win_b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      longint wa [NW], wb [NW];
      int p, l;
      @(negedge clk);
      l = 30 + ($urandom % 20);
      p = (n % 4 == 0) ? ($urandom % 14) : (n % 4 == 1) ? (l - 1 - ($urandom % 14)) : ($urandom % l);
      for (int k = 0; k < NW; k++) begin
        win_a[k] = 8'($urandom);
        win_b[k] = 24'($urandom);
        wa[k] = longint'(win_a[k]);
        wb[k] = longint'(win_b[k]);
      end
      pos = CW'(p); lim = CW'(l); in_valid = 1;
      exp_a.push_back(ref_filter(1, 5, wa, p, l, 0));
      exp_b.push_back(ref_filter(5, 12, wb, p, l, 16));
      sent++;
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_a.size() != 0 || exp_b.size() != 0) begin
      failures++;
      $display("FAIL: %0d/%0d results never came out", exp_a.size(), exp_b.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency: a result must appear exactly two cycles after its input
  logic v_d1, v_d2;
  always_ff @(posedge clk) begin
    v_d1 <= in_valid & rst_n;
    v_d2 <= v_d1;
  end
  always @(posedge clk) if (rst_n) begin
    #1;
    if (va !== v_d2) begin checks++; failures++; $display("FAIL latency"); end
    if (va && exp_a.size() > 0) begin
      longint ea, eb;
      ea = exp_a.pop_front();
      eb = exp_b.pop_front();
      checks += 2;
      if (longint'(oa) != ea) begin failures++; if (failures < 10) $display("FAIL a %0d != %0d", oa, ea); end
      if (longint'(ob) != eb) begin failures++; if (failures < 10) $display("FAIL b %0d != %0d", ob, eb); end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_scale3_fifo: feeds a first-octave Gaussian stream (plus second-octave
// beats that must be ignored) into the down-sampler; the FIFO must deliver
// exactly the L3 pixels at even (x, y), rounded from 8Q16 to 8 bits with
// saturation, in raster order, and raise row_avail once a whole
// second-octave row is stored.
module tb_scale3_fifo;
  import sift_pkg::*;
  localparam int W = 16, H = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge: asynchronous reset of every flop
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic l_valid, pop, row_avail, empty;
  beat_tag_t l_tag;
  logic [L_W-1:0] l3;
  logic [PIX_W-1:0] pix;
  logic [15:0] overflow;
  scale3_fifo #(.IMG_W(W), .IMG_H(H)) dut (.*);

  int expq [$];
  int taken = 0, avail_seen = 0;

  initial begin
    l_valid = 0; l_tag = '0; l3 = '0; pop = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int y = -2; y < H + 2; y++) begin
      for (int x = -3; x < W + 3; x++) begin
        int v;
        @(negedge clk);
        pop = 0;
        l_valid = 1;
        l_tag.oct = (x % 2 != 0) && ($urandom % 3 == 0);   // second-octave beats in between
        l_tag.x = CW'(x); l_tag.y = CW'(y);
        v = (x * 977 + y * 313) % 256;
        l3 = {8'(v), 16'($urandom)};
        if (x == 5 && y == 2) l3 = 24'hFFC000;          // rounds above 255: saturate
        if (!l_tag.oct && x >= 0 && y >= 0 && x < W && y < H && x % 2 == 0 && y % 2 == 0) begin
          int r;
          r = (int'(l3) + 32768) >> 16;
          expq.push_back(r > 255 ? 255 : r);
        end
        @(posedge clk); #1;
        if (row_avail) avail_seen++;
        // drain whenever a full row is available, like the scheduler
        if (row_avail) begin
          for (int i = 0; i < W/2; i++) begin
            @(negedge clk);
            l_valid = 0; pop = 1;
            checks++;
            if (expq.size() == 0 || int'(pix) != expq[0]) begin
              failures++;
              if (failures < 10) $display("FAIL pix %0d", pix);
            end
            if (expq.size()) void'(expq.pop_front());
            taken++;
          end
          @(negedge clk) pop = 0;
        end
      end
    end
    @(negedge clk) l_valid = 0;
    @(posedge clk); #1;
    while (row_avail) begin
      for (int i = 0; i < W/2; i++) begin
        @(negedge clk);
        pop = 1;
        checks++;
        if (expq.size() == 0 || int'(pix) != expq[0]) failures++;
        if (expq.size()) void'(expq.pop_front());
        taken++;
      end
      @(negedge clk) pop = 0;
      @(posedge clk); #1;
    end
    repeat (3) @(posedge clk);
    checks += 3;
    if (taken != (W/2) * (H/2)) begin failures++; $display("FAIL taken %0d", taken); end
    if (!empty) begin failures++; $display("FAIL not empty"); end
    if (overflow != 0) begin failures++; $display("FAIL overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

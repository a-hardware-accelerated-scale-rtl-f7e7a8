// tb_octave_scheduler: runs the row scheduler for two frames with a pixel
// source that randomly withholds pixels and a modelled scale-3 FIFO whose
// second-octave rows become available as the first octave progresses.
// Checks: every input pixel is emitted once, in raster order, with its
// coordinates; second-octave pixels come from the FIFO in order; a
// second-octave row only follows an odd first-octave row (two-to-one
// interleave) while first-octave rows remain; each frame has IMG_H+VBLANK
// and IMG_H/2+VBLANK rows; frame_done pulses once per frame; stalls occur.
module tb_octave_scheduler;
  import sift_pkg::*;
  localparam int W = 16, H = 8, HB = 4, VB = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge: asynchronous reset of every flop
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, fifo_pop, fifo_row_avail, fifo_empty, out_valid, frame_done;
  logic [PIX_W-1:0] in_pix, fifo_pix, out_pix;
  beat_tag_t out_tag;
  logic [31:0] o2_rows, stall_cycles;
  octave_scheduler #(.IMG_W(W), .IMG_H(H), .HBLANK(HB), .VBLANK(VB)) dut (.*);

  // modelled FIFO: second-octave row k becomes available after first-octave row 2k+3
  int o1_rows_done = 0, o2_pushed = 0, o2_popped = 0, fcount = 0;
  int in_cnt = 0, frames = 0;
  assign fifo_row_avail = (fcount >= W/2);
  assign fifo_empty     = (fcount == 0);
  assign fifo_pix       = 8'(o2_popped * 7 + 1);
  assign in_pix         = 8'(in_cnt * 3 + 5);

  int exp_x = 0, exp_y = 0;                       // next expected input pixel
  int prev_oct = 0, prev_y1 = -1, o1_rows_f = 0, o2_rows_f = 0, last_x_seen = 0;
  int cur_row_oct = -1, cur_row_y = -1;

  always @(negedge clk) in_valid = ($urandom % 4 != 0);

  always @(posedge clk) if (rst_n) begin
    if (frame_done) begin
      frames++;
      checks += 2;
      if (o1_rows_f != H + VB) begin failures++; $display("FAIL o1 rows %0d", o1_rows_f); end
      if (o2_rows_f != H/2 + VB) begin failures++; $display("FAIL o2 rows %0d", o2_rows_f); end
      o1_rows_f = 0; o2_rows_f = 0; o1_rows_done = 0;
      if (frames == 2) begin
        checks += 2;
        if (stall_cycles == 0) begin failures++; $display("FAIL no stall"); end
        if (o2_rows != 2 * (H/2 + VB)) begin failures++; $display("FAIL o2_rows %0d", o2_rows); end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    if (out_valid && !out_tag.oct && out_tag.x == CW'(W + HB - 1)) begin
      o1_rows_done++;
      if (out_tag.y % 2 == 1 && (out_tag.y - 3) / 2 >= 0 && (out_tag.y - 3) / 2 < H/2 &&
          (out_tag.y - 3) % 2 == 0) begin
        fcount += W/2; o2_pushed++;
      end
    end
    if (out_valid) begin
      int x, y;
      x = int'(out_tag.x); y = int'(out_tag.y);
      if (x == 0) begin
        // row start: interleave rule
        if (out_tag.oct && cur_row_oct == 0) begin
          checks++;
          if (cur_row_y % 2 == 0 && cur_row_y != H + VB - 1) begin
            failures++; $display("FAIL second-octave row after even row %0d", cur_row_y);
          end
        end
        cur_row_oct = out_tag.oct; cur_row_y = y;
        if (out_tag.oct) o2_rows_f++; else o1_rows_f++;
      end
      if (!out_tag.oct && x < W && y < H) begin
        checks++;
        if (!(in_valid && in_ready) || x != exp_x || y != exp_y || out_pix != 8'(in_cnt * 3 + 5)) begin
          failures++;
          if (failures < 10) $display("FAIL input pixel (%0d,%0d) expected (%0d,%0d)", x, y, exp_x, exp_y);
        end
        in_cnt++;
        exp_x = (exp_x == W-1) ? 0 : exp_x + 1;
        if (x == W-1) exp_y = (exp_y == H-1) ? 0 : exp_y + 1;
      end
      if (out_tag.oct && x < W/2 && y < H/2) begin
        checks++;
        if (!fifo_pop || out_pix != 8'(o2_popped * 7 + 1)) begin
          failures++; $display("FAIL second-octave pixel");
        end
      end
    end
    // FIFO model
    if (fifo_pop) begin o2_popped++; fcount--; end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// win_scanner: address generator that walks the square window of radius R
// around a key-point in a gradient buffer, one pixel per clock.
//
// Rows go from y-R to y+R and, inside a row, columns from x-R to x+R. The bar
// of the key-point row is known (kp.bar); the bar of every other row follows
// by stepping cyclically through the NBARS bars, so no division is needed.
// Each step outputs the read address (octave, bar, column) together with the
// offsets (dx, dy) and whether the pixel lies inside the image; pixels
// outside must not contribute.
//
// Timing: start is taken when idle; the first address appears in the next
// cycle, then one per cycle for (2R+1)^2 cycles; last marks the final one.
module win_scanner
  import sift_pkg::*;
#(
  parameter int R     = 21,
  parameter int NBARS = 43,
  parameter int IMG_W = IMG_W_DEF,
  parameter int IMG_H = IMG_H_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  kp_entry_t             kp,
  output logic                  busy,
  output logic                  valid,
  output logic                  last,
  output logic signed [7:0]     dx,
  output logic signed [7:0]     dy,
  output logic                  in_img,
  output logic                  r_oct,
  output logic [6:0]            r_bar,
  output logic [XW-1:0]         r_x
);
  logic signed [CW-1:0] kx, yrow, xcur;
  logic [6:0] bar_row;

  assign valid = busy;
  assign last  = busy && (dx == 8'(R)) && (dy == 8'(R));
  assign xcur  = kx + CW'(dx);
  assign r_bar = bar_row;
  assign r_x   = (xcur >= 0 && xcur < CW'(IMG_W)) ? XW'(xcur) : '0;
  assign in_img = (xcur >= 0) && (xcur < (r_oct ? CW'(IMG_W/2) : CW'(IMG_W))) &&
                  (yrow >= 0) && (yrow < (r_oct ? CW'(IMG_H/2) : CW'(IMG_H)));

  // bar of the first window row, y-R
  logic [6:0] bar_first;
  assign bar_first = (int'(kp.bar) >= R) ? 7'(int'(kp.bar) - R) : 7'(int'(kp.bar) - R + NBARS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; dx <= '0; dy <= '0; kx <= '0; yrow <= '0; bar_row <= '0; r_oct <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        busy  <= 1'b1;
        dx    <= -8'(R);
        dy    <= -8'(R);
        kx    <= CW'(kp.loc.x);
        yrow  <= CW'(kp.loc.y) - CW'(R);
        r_oct <= kp.loc.oct;
        bar_row <= bar_first;
      end
    end else if (last) begin
      busy <= 1'b0;
    end else if (dx == 8'(R)) begin
      dx      <= -8'(R);
      dy      <= dy + 1'b1;
      yrow    <= yrow + 1'b1;
      bar_row <= (bar_row == 7'(NBARS-1)) ? '0 : bar_row + 1'b1;
    end else begin
      dx <= dx + 1'b1;
    end
  end
endmodule

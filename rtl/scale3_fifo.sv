// scale3_fifo: down-sampler and "Scale 3 FIFO" that feeds the second octave.
//
// The second octave's source image is the first octave's scale-3 Gaussian
// image (L3) taken at every other column of every other row. This block
// watches the Gaussian output stream, keeps the first-octave L3 pixels at even
// (x, y) inside the image, rounds them from 8Q16 to 8Q0 (saturating) and
// stores them in a FIFO of DEPTH pixels. The octave scheduler reads one whole
// second-octave row (IMG_W/2 pixels) at a time; row_avail tells it that at
// least one complete row is stored.
//
// Timing: push in the cycle the L3 pixel appears, show-ahead read, one pop per
// clock. The default depth of two second-octave rows is this
// implementation's choice; a push into a full FIFO is counted in overflow.
module scale3_fifo
  import sift_pkg::*;
#(
  parameter int IMG_W = IMG_W_DEF,
  parameter int IMG_H = IMG_H_DEF,
  parameter int DEPTH = IMG_W        // two rows of the second octave
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              l_valid,
  input  beat_tag_t         l_tag,
  input  logic [L_W-1:0]    l3,
  input  logic              pop,
  output logic [PIX_W-1:0]  pix,
  output logic              row_avail,
  output logic              empty,
  output logic [15:0]       overflow
);
  logic take, full;
  logic [PIX_W-1:0] rounded;
  logic [$clog2(DEPTH+1)-1:0] count;

  assign take = l_valid && !l_tag.oct && !l_tag.x[0] && !l_tag.y[0] &&
                (l_tag.x >= 0) && (l_tag.x < CW'(IMG_W)) &&
                (l_tag.y >= 0) && (l_tag.y < CW'(IMG_H));

  always_comb begin
    logic [L_W-16:0] r;
    r = (L_W-15)'(l3[L_W-1:16]) + (L_W-15)'(l3[15]);
    rounded = r[L_W-16] ? '1 : r[PIX_W-1:0];
  end

  sync_fifo #(.DEPTH(DEPTH), .WIDTH(PIX_W)) u_fifo (
    .clk, .rst_n, .push(take && !full), .wr_data(rounded), .pop(pop && !empty),
    .rd_data(pix), .empty, .full, .count);

  assign row_avail = (count >= ($clog2(DEPTH+1))'(IMG_W/2));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)             overflow <= '0;
    else if (take && full)  overflow <= overflow + 1'b1;
endmodule

// grad_buffer: gradient RAM-bar cluster of one feature-generation unit.
//
// NBARS bars (43, 55 or 69 for scales 1, 2, 3: one key-point's descriptor
// window height) hold the most recent gradient rows of one scale, each in a
// first-octave bank of IMG_W words and a second-octave bank of IMG_W/2
// words. The key-point detection side writes one 33-bit {orientation,
// magnitude} word per clock in its own clock domain; the feature-generation
// side reads through two independent ports in its clock domain, one for main
// orientation generation and one for local descriptor generation, so both
// can work on different key-points at the same time.
//
// Bar selection is done by the caller (the write side keeps a cyclic bar
// pointer per octave, the readers compute the bar of a row from the bar of
// the key-point's row). Timing: writes take effect at the write clock edge;
// reads are registered, data one read-clock cycle after the address. Storage
// is a plain array per bank; the second read port is this implementation's
// way of providing the parallel access.
module grad_buffer
  import sift_pkg::*;
#(
  parameter int NBARS = 43,
  parameter int IMG_W = IMG_W_DEF,
  parameter int WIDTH = GRD_W
) (
  input  logic                     wclk,
  input  logic                     we,
  input  logic                     w_oct,
  input  logic [6:0]               w_bar,
  input  logic [XW-1:0]            w_x,
  input  logic [WIDTH-1:0]         w_data,
  input  logic                     rclk,
  input  logic [1:0]               r_oct,
  input  logic [1:0][6:0]          r_bar,
  input  logic [1:0][XW-1:0]       r_x,
  output logic [1:0][WIDTH-1:0]    r_data
);
  localparam int W2  = IMG_W / 2;
  localparam int N1  = NBARS * IMG_W;
  localparam int N2  = NBARS * W2;
  localparam int AW1 = $clog2(N1);
  localparam int AW2 = $clog2(N2);

  logic [WIDTH-1:0] bank1 [N1];
  logic [WIDTH-1:0] bank2 [N2];

  function automatic logic [AW1-1:0] addr1(logic [6:0] bar, logic [XW-1:0] x);
    return AW1'(bar) * AW1'(IMG_W) + AW1'(x);
  endfunction
  function automatic logic [AW2-1:0] addr2(logic [6:0] bar, logic [XW-1:0] x);
    return AW2'(bar) * AW2'(W2) + AW2'(x);
  endfunction

  always_ff @(posedge wclk)
    if (we) begin
      if (w_oct) bank2[addr2(w_bar, w_x)] <= w_data;
      else       bank1[addr1(w_bar, w_x)] <= w_data;
    end

  always_ff @(posedge rclk)
    for (int p = 0; p < 2; p++)
      r_data[p] <= r_oct[p] ? bank2[addr2(r_bar[p], r_x[p])] : bank1[addr1(r_bar[p], r_x[p])];
endmodule

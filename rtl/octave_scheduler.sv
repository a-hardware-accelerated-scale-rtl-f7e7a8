// octave_scheduler: row scheduler of the octave-interleaved key-point
// detection component.
//
// Both octaves share one Gaussian/DoG, key-point detection and gradient
// datapath. The scheduler produces the beat stream that drives it: after
// every two first-octave rows (IMG_W pixels taken from the pixel input) it
// inserts one second-octave row (IMG_W/2 pixels taken from the scale-3 FIFO),
// if a complete second-octave row is waiting; otherwise the first octave goes
// on. Each row is followed by HBLANK idle-data beats and each octave by VBLANK
// extra rows, so that the windows of the downstream stages are flushed past
// the right and bottom image borders. When all first-octave rows are done the
// remaining second-octave rows run back to back; then the next frame starts.
//
// Interface: in_valid/in_ready/in_pix is the raster-order pixel input (a
// ready/valid handshake; in_valid low stalls the stream without harm). out_*
// is the beat stream (oct, x, y, pixel). fifo_pop/fifo_pix/fifo_row_avail
// connect the scale-3 FIFO. o2_rows counts second-octave row slots,
// stall_cycles counts cycles lost to a missing input pixel, frame_done pulses
// after the last beat of a frame.
//
// The 2:1 row interleave follows the design description; HBLANK, VBLANK and
// the frame sequencing are this implementation's choices.
module octave_scheduler
  import sift_pkg::*;
#(
  parameter int IMG_W  = IMG_W_DEF,
  parameter int IMG_H  = IMG_H_DEF,
  parameter int HBLANK = HBLANK_DEF,
  parameter int VBLANK = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [PIX_W-1:0]  in_pix,
  output logic              fifo_pop,
  input  logic [PIX_W-1:0]  fifo_pix,
  input  logic              fifo_row_avail,
  input  logic              fifo_empty,
  output logic              out_valid,
  output beat_tag_t         out_tag,
  output logic [PIX_W-1:0]  out_pix,
  output logic              frame_done,
  output logic [31:0]       o2_rows,
  output logic [31:0]       stall_cycles
);
  localparam int W2 = IMG_W / 2;
  localparam int H2 = IMG_H / 2;
  localparam int ROWS1 = IMG_H + VBLANK;
  localparam int ROWS2 = H2 + VBLANK;

  logic                 oct;
  logic signed [CW-1:0] x, y1, y2;
  logic                 beat, need, last_x;

  always_comb begin
    in_ready = 1'b0;
    fifo_pop = 1'b0;
    beat     = 1'b0;
    out_pix  = '0;
    if (!oct) begin
      need   = (y1 < CW'(IMG_H)) && (x < CW'(IMG_W));
      in_ready = need;
      beat   = need ? in_valid : 1'b1;
      out_pix = need ? in_pix : '0;
      last_x = (x == CW'(IMG_W + HBLANK - 1));
    end else begin
      need   = (y2 < CW'(H2)) && (x < CW'(W2));
      // a second-octave data row starts only when it is complete in the FIFO
      beat   = need ? ((x != 0 || fifo_row_avail) && !fifo_empty) : 1'b1;
      fifo_pop = need && beat;
      out_pix = need ? fifo_pix : '0;
      last_x = (x == CW'(W2 + HBLANK - 1));
    end
  end

  assign out_valid   = beat;
  assign out_tag.oct = oct;
  assign out_tag.x   = x;
  assign out_tag.y   = oct ? y2 : y1;

  // second octave may take the next slot
  logic o2_ok;
  assign o2_ok = (y2 < CW'(ROWS2)) && ((y2 >= CW'(H2)) || fifo_row_avail);

  logic o1_done;                                   // last first-octave row
  assign o1_done = (y1 + 1 == CW'(ROWS1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oct <= 1'b0; x <= '0; y1 <= '0; y2 <= '0;
      frame_done <= 1'b0; o2_rows <= '0; stall_cycles <= '0;
    end else begin
      frame_done <= 1'b0;
      if (!beat) stall_cycles <= stall_cycles + 1'b1;
      if (beat) begin
        if (!last_x) x <= x + 1'b1;
        else begin
          x <= '0;
          if (!oct) begin
            y1 <= y1 + 1'b1;
            if ((y1[0] || o1_done) && o2_ok) begin
              oct <= 1'b1;
              o2_rows <= o2_rows + 1'b1;
            end else if (o1_done) begin
              if (y2 < CW'(ROWS2)) begin
                oct <= 1'b1;                    // wait for the last rows
                o2_rows <= o2_rows + 1'b1;
              end else begin
                y1 <= '0; y2 <= '0; frame_done <= 1'b1;
              end
            end
          end else begin
            y2 <= y2 + 1'b1;
            if (y1 < CW'(ROWS1)) oct <= 1'b0;
            else if (y2 + 1 < CW'(ROWS2)) o2_rows <= o2_rows + 1'b1;
            else begin
              oct <= 1'b0; y1 <= '0; y2 <= '0; frame_done <= 1'b1;
            end
          end
        end
      end
    end
  end
endmodule

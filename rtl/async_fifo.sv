// async_fifo: dual-clock FIFO (key-point FIFO between the key-point
// detection clock and the faster feature-generation clock).
//
// Classic Gray-pointer design: binary and Gray write/read pointers one bit
// wider than the address, each Gray pointer brought into the other clock
// domain through two flip-flops. full is computed in the write domain, empty
// in the read domain, both conservatively (a pointer seen late only delays).
// rd_data shows the oldest entry while not empty (show-ahead).
//
// DEPTH must be a power of two. Pushes into a full FIFO are dropped and
// counted in drops (write domain).
module async_fifo #(
  parameter int DEPTH = 64,
  parameter int WIDTH = 8
) (
  input  logic              wclk,
  input  logic              wrst_n,
  input  logic              push,
  input  logic [WIDTH-1:0]  wr_data,
  output logic              full,
  output logic [15:0]       drops,
  input  logic              rclk,
  input  logic              rrst_n,
  input  logic              pop,
  output logic [WIDTH-1:0]  rd_data,
  output logic              empty
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  logic [AW:0] wbin_n;
  assign wbin_n = wbin + 1'b1;
  assign full   = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0; drops <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (push && !full) begin
        wbin  <= wbin_n;
        wgray <= bin2gray(wbin_n);
      end
      if (push && full) drops <= drops + 1'b1;
    end
  end
  always_ff @(posedge wclk) if (push && !full) mem[wbin[AW-1:0]] <= wr_data;

  // read domain
  logic [AW:0] rbin_n;
  assign rbin_n  = rbin + 1'b1;
  assign empty   = (rgray == wgray_r2);
  assign rd_data = mem[rbin[AW-1:0]];
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (pop && !empty) begin
        rbin  <= rbin_n;
        rgray <= bin2gray(rbin_n);
      end
    end
  end
endmodule

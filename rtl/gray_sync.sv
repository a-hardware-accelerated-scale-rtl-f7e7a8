// gray_sync: carries a counter that steps by at most one per source clock
// into another clock domain.
//
// The source value is converted to Gray code in a source-domain register,
// passed through two destination-domain flip-flops and converted back to
// binary, so every value seen in the destination is one the counter really
// held. Used for the per-octave "rows written" counters of the gradient
// buffers. Latency: 1 source cycle plus 2 to 3 destination cycles.
module gray_sync #(
  parameter int W = 16
) (
  input  logic         sclk,
  input  logic         srst_n,
  input  logic [W-1:0] sval,
  input  logic         dclk,
  input  logic         drst_n,
  output logic [W-1:0] dval
);
  logic [W-1:0] sg, d1, d2;
  always_ff @(posedge sclk or negedge srst_n)
    if (!srst_n) sg <= '0; else sg <= sval ^ (sval >> 1);
  always_ff @(posedge dclk or negedge drst_n)
    if (!drst_n) begin d1 <= '0; d2 <= '0; end
    else         begin d1 <= sg; d2 <= d1; end
  always_comb begin
    dval[W-1] = d2[W-1];
    for (int i = W-2; i >= 0; i--) dval[i] = dval[i+1] ^ d2[i];
  end
endmodule

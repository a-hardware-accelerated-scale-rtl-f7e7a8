// ram_bar_cluster: the "RAM-bar cluster" line buffer used in front of every
// key-point-detection stage.
//
// NBARS RAM bars each hold one image row. Incoming pixels of a row are
// written into the bar selected by a cyclic pointer; when the last column of
// the row has been written the pointer moves on to the next bar, so the
// cluster always holds the NBARS most recent rows. All bars are read in
// parallel at the write column (read before write), and a switching network
// rotates the bar outputs by the pointer so that rd_rows[0] is the oldest row
// (the one being overwritten) and rd_rows[NBARS-1] the newest complete row.
//
// Each bar exists twice: a first-octave bank of DEPTH words and a
// second-octave bank of DEPTH/2 words, with a pointer per octave, so that the
// two interleaved octaves share one cluster (octave-interleaved scheme).
//
// Timing: one write and one parallel read per clock; rd_rows is registered,
// valid one cycle after rd_en. Reset clears both pointers; the RAM contents
// are not reset (rows written during the first frame replace them).
//
// Cyclic switching and bank split follow the design description; the
// read-before-write ordering is this implementation's choice.
module ram_bar_cluster #(
  parameter int NBARS = 25,
  parameter int DEPTH = 1280,
  parameter int WIDTH = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         oct,      // octave bank of this access
  input  logic [$clog2(DEPTH)-1:0]     addr,     // column
  input  logic                         wr_en,
  input  logic [WIDTH-1:0]             wdata,
  input  logic                         row_end,  // last column of a row: advance pointer
  input  logic                         rd_en,
  output logic [NBARS-1:0][WIDTH-1:0]  rd_rows    // oldest first
);
  localparam int D2 = DEPTH / 2;
  localparam int PW = $clog2(NBARS);

  logic [PW-1:0] ptr [2];
  logic [PW-1:0] ptr_q;
  logic [NBARS-1:0][WIDTH-1:0] raw_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr[0] <= '0;
      ptr[1] <= '0;
    end else if (wr_en && row_end) begin
      ptr[oct] <= (ptr[oct] == PW'(NBARS-1)) ? '0 : ptr[oct] + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (rd_en) ptr_q <= ptr[oct];

  // bar storage, one single-port-read / single-port-write memory per bar and
  // octave bank: read before write at the same column
  for (genvar b = 0; b < NBARS; b++) begin : g_bar
    logic [WIDTH-1:0] bank1 [DEPTH];
    logic [WIDTH-1:0] bank2 [D2];
    always_ff @(posedge clk) begin
      if (rd_en)
        raw_q[b] <= oct ? bank2[addr[$clog2(D2)-1:0]] : bank1[addr];
      if (wr_en && !oct && ptr[0] == PW'(b)) bank1[addr] <= wdata;
      if (wr_en &&  oct && ptr[1] == PW'(b)) bank2[addr[$clog2(D2)-1:0]] <= wdata;
    end
  end

  // switching network: rotate so that index 0 is the bar being overwritten
  always_comb begin
    for (int k = 0; k < NBARS; k++) begin
      int idx;
      idx = int'(ptr_q) + k;
      if (idx >= NBARS) idx -= NBARS;
      rd_rows[k] = raw_q[idx];
    end
  end
endmodule

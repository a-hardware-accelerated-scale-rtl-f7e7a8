// tb_ram_bar_cluster: checks the cyclic RAM-bar line buffer.
// Rows of both octave banks are written interleaved (two first-octave rows,
// one second-octave row); at every column the parallel read must return the
// NBARS previously written rows of that octave, oldest first, as kept by a
// reference row history in the testbench.
module tb_ram_bar_cluster;
  localparam int NBARS = 5, DEPTH = 12, WIDTH = 16;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge: asynchronous reset of every flop
  always #5 clk = ~clk;

  logic oct, wr_en, row_end, rd_en;
  logic [$clog2(DEPTH)-1:0] addr;
  logic [WIDTH-1:0] wdata;
  logic [NBARS-1:0][WIDTH-1:0] rd_rows;
  int checks = 0, failures = 0;

  ram_bar_cluster #(.NBARS(NBARS), .DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  function automatic logic [WIDTH-1:0] pix(int o, int r, int c);
    return WIDTH'(o * 16'h4000 + r * 64 + c);
  endfunction

  int rows_written [2];
  initial begin
    oct = 0; wr_en = 0; row_end = 0; rd_en = 0; addr = '0; wdata = '0;
    rows_written[0] = 0; rows_written[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int step = 0; step < 30; step++) begin
      int o, w, r;
      o = (step % 3 == 2) ? 1 : 0;
      w = o ? DEPTH/2 : DEPTH;
      r = rows_written[o];
      for (int c = 0; c < w; c++) begin
        @(negedge clk);
        oct = 1'(o); addr = ($clog2(DEPTH))'(c); wr_en = 1; rd_en = 1;
        wdata = pix(o, r, c); row_end = (c == w-1);
        @(posedge clk); #1;
        wr_en = 0; rd_en = 0; row_end = 0;
        // rd_rows now holds rows r-NBARS .. r-1 of this octave at column c
        for (int k = 0; k < NBARS; k++) begin
          int rr;
          rr = r - NBARS + k;
          if (rr >= 0) begin
            checks++;
            if (rd_rows[k] !== pix(o, rr, c)) begin
              failures++;
              if (failures < 10) $display("FAIL oct %0d row %0d col %0d k %0d: %h != %h",
                                          o, r, c, k, rd_rows[k], pix(o, rr, c));
            end
          end
        end
      end
      rows_written[o]++;
    end
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

// tb_grad_buffer: writes random gradient words into both octave banks of a
// small gradient buffer in one clock domain and reads them back through both
// read ports in another clock domain, comparing with a copy kept by the
// testbench (one-cycle read latency).
module tb_grad_buffer;
  import sift_pkg::*;
  localparam int NBARS = 7, W = 20;
  logic wclk = 0, rclk = 0;
  always #10 wclk = ~wclk;
  always #3 rclk = ~rclk;
  int checks = 0, failures = 0;

  logic we, w_oct;
  logic [6:0] w_bar;
  logic [XW-1:0] w_x;
  logic [GRD_W-1:0] w_data;
  logic [1:0] r_oct;
  logic [1:0][6:0] r_bar;
  logic [1:0][XW-1:0] r_x;
  logic [1:0][GRD_W-1:0] r_data;
  grad_buffer #(.NBARS(NBARS), .IMG_W(W)) dut (.*);

  logic [GRD_W-1:0] model [2][NBARS][W];

  initial begin
    we = 0; w_oct = 0; w_bar = '0; w_x = '0; w_data = '0; r_oct = '0; r_bar = '0; r_x = '0;
    for (int o = 0; o < 2; o++)
      for (int b = 0; b < NBARS; b++)
        for (int x = 0; x < (o ? W/2 : W); x++) begin
          @(negedge wclk);
          we = 1; w_oct = 1'(o); w_bar = 7'(b); w_x = XW'(x);
          w_data = {$urandom, $urandom} & {GRD_W{1'b1}};
          model[o][b][x] = w_data;
        end
    @(negedge wclk) we = 0;
    for (int n = 0; n < 500; n++) begin
      int o [2], b [2], x [2];
      @(negedge rclk);
      for (int p = 0; p < 2; p++) begin
        o[p] = $urandom % 2; b[p] = $urandom % NBARS; x[p] = $urandom % (o[p] ? W/2 : W);
        r_oct[p] = 1'(o[p]); r_bar[p] = 7'(b[p]); r_x[p] = XW'(x[p]);
      end
      @(posedge rclk); #1;
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (r_data[p] !== model[o[p]][b[p]][x[p]]) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d oct %0d bar %0d x %0d", p, o[p], b[p], x[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

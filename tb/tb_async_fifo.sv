// tb_async_fifo: pushes a numbered sequence from a 50 MHz domain into the
// dual-clock FIFO while a 100 MHz domain pops at random; the popped order and
// values must match, the FIFO must fill (pushes into a full FIFO are counted
// as drops and are not delivered) and drain to empty.
module tb_async_fifo;
  localparam int DEPTH = 8, WIDTH = 16;
  logic wclk = 0, rclk = 0, wrst_n = 1, rrst_n = 1;
  initial #1 begin wrst_n = 0; rrst_n = 0; end   // falling edge: asynchronous reset
  always #10 wclk = ~wclk;
  always #4.3 rclk = ~rclk;
  int checks = 0, failures = 0;

  logic push, full, pop, empty;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [15:0] drops;
  async_fifo #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  int sent [$];
  int nfull = 0, ndrop = 0, npop = 0;
  bit slow = 1;

  initial begin
    push = 0; wr_data = '0;
    #50 wrst_n = 1; rrst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge wclk);
      push = ($urandom % 3 != 0);
      wr_data = WIDTH'(i);
      if (push) begin
        if (full) begin ndrop++; nfull++; end
        else sent.push_back(i);
      end
      if (i == 200) slow = 0;
    end
    @(negedge wclk) push = 0;
    repeat (100) @(posedge wclk);
    checks += 4;
    if (sent.size() != 0) begin failures++; $display("FAIL %0d entries lost", sent.size()); end
    if (nfull == 0) begin failures++; $display("FAIL never full"); end
    if (int'(drops) != ndrop) begin failures++; $display("FAIL drops %0d != %0d", drops, ndrop); end
    if (!empty) begin failures++; $display("FAIL not empty at end"); end
    $display("popped %0d, dropped %0d", npop, ndrop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge rclk) begin
    pop = rrst_n && !empty && (slow ? ($urandom % 8 == 0) : ($urandom % 2 == 0));
    if (pop) begin
      checks++;
      npop++;
      if (sent.size() == 0 || int'(rd_data) != sent[0]) begin
        failures++;
        if (failures < 10) $display("FAIL popped %0d", rd_data);
      end
      if (sent.size() > 0) void'(sent.pop_front());
    end
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

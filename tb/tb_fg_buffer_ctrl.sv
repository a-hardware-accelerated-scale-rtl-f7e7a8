// tb_fg_buffer_ctrl: drives the buffer-management decision with random
// key-point heads for both octaves (row, row number) and row counters around
// the interesting boundaries, and compares dispatch / skip / pop / kp_out with
// the rules: a head is ready when rows y-R .. min(y+R, last row) are stored,
// it is skipped when more than the threshold has been overwritten; skips go
// first, then dispatches, first octave before second, and a dispatch needs
// room in both sub-module FIFOs. wait_cycles must count the cycles in which
// a ready key-point was held back by a full FIFO.
module tb_fg_buffer_ctrl;
  import sift_pkg::*;
  localparam int R = 5, H = 40, THR = 2 * (2*R + 1);
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge: asynchronous reset of every flop
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0] kp_empty, kp_pop;
  logic mog_full, ldg_full, dispatch, skip;
  kp_entry_t [1:0] kp_head;
  kp_entry_t kp_out;
  logic [1:0][15:0] rows_done;
  logic [31:0] wait_cycles;
  fg_buffer_ctrl #(.R(R), .IMG_H(H), .OVR_THR(THR)) dut (.*);

  int waits = 0, ndisp = 0, nskip = 0, nsel1 = 0;
  initial begin
    kp_empty = '1; kp_head = '0; rows_done = '0; mog_full = 0; ldg_full = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      bit sk [2], rd [2];
      bit e_skip, e_disp, room;
      int sel;
      @(negedge clk);
      for (int o = 0; o < 2; o++) begin
        int h, y, seq, diff, need, ovr_rows;
        h = o ? H/2 : H;
        y = $urandom % h;
        seq = $urandom % 65536;
        diff = $urandom % (2*R + 6);
        kp_empty[o] = ($urandom % 4 == 0);
        kp_head[o] = '0;
        kp_head[o].loc.oct = 1'(o);
        kp_head[o].loc.x = XW'($urandom);
        kp_head[o].loc.y = YW'(y);
        kp_head[o].seq = 16'(seq);
        rows_done[o] = 16'(seq + diff);
        need = (h - 1 - y < R) ? h - 1 - y : R;
        ovr_rows = diff - (R + 1);
        sk[o] = !kp_empty[o] && (ovr_rows > 0) && (ovr_rows * (2*R + 1) >= THR);
        rd[o] = !kp_empty[o] && !sk[o] && (diff >= need + 1);
      end
      mog_full = ($urandom % 6 == 0);
      ldg_full = ($urandom % 6 == 0);
      room = !mog_full && !ldg_full;
      e_skip = sk[0] || sk[1];
      e_disp = !e_skip && room && (rd[0] || rd[1]);
      sel = e_skip ? (sk[0] ? 0 : 1) : (rd[0] ? 0 : 1);
      #1;
      checks += 3;
      if (skip !== e_skip) begin failures++; if (failures < 10) $display("FAIL skip"); end
      if (dispatch !== e_disp) begin failures++; if (failures < 10) $display("FAIL dispatch"); end
      if (kp_pop !== ((e_skip || e_disp) ? 2'(1 << sel) : 2'b00)) begin
        failures++; if (failures < 10) $display("FAIL pop %b", kp_pop);
      end
      if (e_disp) begin
        checks++;
        if (kp_out !== kp_head[sel]) begin failures++; $display("FAIL kp_out"); end
        nsel1 += sel;
      end
      if ((rd[0] || rd[1]) && !room) waits++;
      ndisp += e_disp; nskip += e_skip;
    end
    @(posedge clk); #1;
    checks += 3;
    if (int'(wait_cycles) != waits) begin failures++; $display("FAIL wait_cycles %0d != %0d", wait_cycles, waits); end
    if (ndisp == 0 || nskip == 0 || nsel1 == 0) begin failures++; $display("FAIL coverage"); end
    if (waits == 0) failures++;
    $display("dispatched %0d (second octave %0d) skipped %0d waited %0d", ndisp, nsel1, nskip, waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

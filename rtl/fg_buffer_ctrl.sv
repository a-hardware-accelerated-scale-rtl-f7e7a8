// fg_buffer_ctrl: buffer management logic between the key-point detection
// and feature generation components (one per key-point scale).
//
// Key-points arrive in two dual-clock FIFOs, one per octave. A
// second-octave key-point becomes ready about twice as many first-octave
// rows after its detection as a first-octave one, so a single shared FIFO
// would let it block newer first-octave key-points until their windows are
// overwritten. For the oldest key-point of each octave the controller
// compares the key-point's row number with the number of gradient rows the
// detection side has completed in that octave (rows_done, already in this
// clock domain):
//   * if more than OVR_THR pixels of its window have already been
//     overwritten by newer rows, the key-point is dropped (skip);
//   * once every row of its window down to y+R (or to the last image row) is
//     stored, it is ready; a ready key-point is copied into both the MOG and
//     the LDG key-point FIFOs when both have room, so main orientation and
//     descriptor generation can start independently.
// At most one key-point is removed per clock: a skip goes first (first
// octave before second), then a dispatch (first octave before second).
// wait_cycles counts cycles in which a ready key-point could not be
// dispatched because a MOG or LDG FIFO was full.
// There is no path back to the detection side: detection never stalls, and
// a slow feature generator only causes overwriting and skipping.
//
// Timing: one decision per clock, combinational pop/push; kp_out is the
// entry being dispatched.
// The no-feedback scheme, the overwrite threshold and the dual dispatch
// follow the design; the per-octave queues, readiness rule, priority and
// threshold value are this implementation's choices.
module fg_buffer_ctrl
  import sift_pkg::*;
#(
  parameter int R       = 21,
  parameter int IMG_H   = IMG_H_DEF,
  parameter int OVR_THR = 4 * (2*R + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [1:0]           kp_empty,      // per octave
  input  kp_entry_t [1:0]      kp_head,
  output logic [1:0]           kp_pop,
  input  logic [1:0][15:0]     rows_done,
  input  logic                 mog_full,
  input  logic                 ldg_full,
  output logic                 dispatch,
  output kp_entry_t            kp_out,
  output logic                 skip,
  output logic [31:0]          wait_cycles
);
  logic [1:0] ovr, ready, sk, rd;
  for (genvar o = 0; o < 2; o++) begin : g_oct
    assign ovr[o]   = kp_overwritten(rows_done[o], kp_head[o], R) >= OVR_THR;
    assign ready[o] = kp_window_ready(rows_done[o], kp_head[o], R, IMG_H);
    assign sk[o]    = !kp_empty[o] && ovr[o];
    assign rd[o]    = !kp_empty[o] && !ovr[o] && ready[o];
  end

  logic room, sel;
  assign room     = !mog_full && !ldg_full;
  assign skip     = |sk;
  assign dispatch = !skip && room && (|rd);
  assign sel      = skip ? !sk[0] : !rd[0];
  assign kp_out   = kp_head[sel];
  assign kp_pop   = (skip || dispatch) ? (sel ? 2'b10 : 2'b01) : 2'b00;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                  wait_cycles <= '0;
    else if ((|rd) && !room)     wait_cycles <= wait_cycles + 1'b1;
endmodule

// Signal Queue (SIGQ): buffers the alloc, call and return signals of the
// G-machine for the host, in the order they were emitted.
//
// The G-machine raises sig_enq together with exactly one of alloc, call or
// ret while sin_rdy is high; the three lines are stored as one 3-bit entry.
// The host sees sout_rdy while an entry is waiting, reads it on sig and
// removes it with sig_deq. sin_rdy falls when the queue is full, which makes
// the G-machine wait before its next call, return or alloc. Depth 64 is the
// depth of the queue part used in the prototype. Storing the signals as one
// bit per line is this design's choice; an entry that is not exactly one of
// the three signals is refused (and flagged by an assertion).
// Timing: one entry in and one out per clock, an entry visible to the host
// the cycle after it is enqueued.
module signal_queue
  import gms_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic clk,
  input  logic rst,
  // G-machine side
  input  logic sig_enq,
  input  logic alloc,
  input  logic call,
  input  logic ret,
  output logic sin_rdy,
  // host side
  input  logic sig_deq,
  output sig_t sig,
  output logic sout_rdy,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  sig_t in_sig;
  logic legal;

  assign in_sig = '{ret: ret, call: call, alloc: alloc};
  assign legal  = (3'(ret) + 3'(call) + 3'(alloc)) == 3'd1;

  gms_queue #(.WIDTH($bits(sig_t)), .DEPTH(DEPTH)) u_q (
    .clk, .rst,
    .enq  (sig_enq && legal),
    .din  (in_sig),
    .ir   (sin_rdy),
    .deq  (sig_deq),
    .dout (sig),
    .or_o (sout_rdy),
    .count(count)
  );

  a_one_signal: assert property (@(posedge clk) disable iff (rst) sig_enq |-> legal);
endmodule

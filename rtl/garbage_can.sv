// Garbage Can (GCAN): buffers the addresses of persistent nodes whose
// reference count the ref-chip has decremented, until the host examines them.
//
// The ref-chip enqueues a node address from its Tport bus with gc_enq while
// gc_rdy (room left) is high. The host sees grdy while addresses wait, reads
// the head on gcan_dout and removes it with gcan_deq. gfull tells the host
// the can is full and needs attention at once; while it is full the ref-chip
// cannot finish a trash and the G-machine is eventually held off memory.
// Depth 64 is that of the prototype's queue part.
// Timing: one address in and one out per clock.
module garbage_can
  import gms_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic               clk,
  input  logic               rst,
  // ref-chip side
  input  logic               gc_enq,
  input  logic [TPORT_W-1:0] gc_din,
  output logic               gc_rdy,
  // host side
  input  logic               gcan_deq,
  output logic [TPORT_W-1:0] gcan_dout,
  output logic               grdy,
  output logic               gfull,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  gms_queue #(.WIDTH(TPORT_W), .DEPTH(DEPTH)) u_q (
    .clk, .rst,
    .enq  (gc_enq),
    .din  (gc_din),
    .ir   (gc_rdy),
    .deq  (gcan_deq),
    .dout (gcan_dout),
    .or_o (grdy),
    .count(count)
  );

  assign gfull = !gc_rdy;
endmodule

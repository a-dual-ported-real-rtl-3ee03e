// Free-node FIFO: holds the addresses of free nodes that the host has picked
// for allocation and hands one to the G-machine on each alloc.
//
// The host writes an address with fifo_enq (it must see fifo_ir high). The
// G-machine reads the head address on node_addr and removes it with alloc.
// While the FIFO is empty, fifo_or is low; this output is one input of the
// AND that forms the G-machine's memory-ready signal, so an empty FIFO holds
// the G-machine off memory. Depth 64 is that of the prototype's queue part.
// Timing: one address in and one out per clock; an address written into an
// empty FIFO is at the head in the next cycle (the physical part's 1.3 us
// fall-through time is not modelled).
module free_node_fifo
  import gms_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic              clk,
  input  logic              rst,
  // host side
  input  logic              fifo_enq,
  input  logic [HBUS_W-1:0] fifo_din,
  output logic              fifo_ir,
  // G-machine side
  input  logic              alloc,
  output logic [HBUS_W-1:0] node_addr,
  output logic              fifo_or,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  gms_queue #(.WIDTH(HBUS_W), .DEPTH(DEPTH)) u_q (
    .clk, .rst,
    .enq  (fifo_enq),
    .din  (fifo_din),
    .ir   (fifo_ir),
    .deq  (alloc),
    .dout (node_addr),
    .or_o (fifo_or),
    .count(count)
  );

  a_alloc_when_ready: assert property (@(posedge clk) disable iff (rst) alloc |-> fifo_or);
endmodule

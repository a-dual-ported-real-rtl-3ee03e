// Graph Memory System (GMS): a dual-ported, tagged, list-structured memory
// for a graph-reduction evaluator (the G-machine), with hardware reference
// counting and buffers that let a host processor allocate nodes and collect
// garbage concurrently with evaluation.
//
// Parts and connections:
//   G-machine  --read/write/trash, G bus-->  Graph memory (port A)
//              --write/trash, G bus------->  ref-chip (watches every write
//                                            and trash)
//              --alloc/call/return------->  Signal Queue  --> host
//              <--alloc address-----------  free-node FIFO <-- host
//   ref-chip   --T bus-->  Tags memory (port A) and Garbage Can --> host
//   host       --H bus-->  Graph and Tags memory (port B); rmw and the low
//                          18 address bits go to the ref-chip for collision
//                          detection
// memory_ready_a, the G-machine's memory ready, is the AND of the Graph
// memory's ready, the ref-chip's rdy and the FIFO's output-ready, so any of
// a busy Graph memory, a full or trash-blocked ref-chip or an empty FIFO
// holds the G-machine off memory. sin_rdy separately holds it off call,
// return and alloc when the Signal Queue is full.
//
// The G bus is a multiplexed 33-bit address/data bus. Its value is, in
// order of precedence: what the G-machine drives (gm_bus_oe), what the
// ref-chip drives for its own Graph read, the head of the free-node FIFO
// during an alloc, and otherwise the Graph memory's read data. The G-machine
// protocol: a read, write or trash strobe goes with the field address on the
// bus; a write's datum follows one clock later; for a trash the address is
// held for that second clock too, for the ref-chip to latch; an alloc takes
// the FIFO head from the bus in the alloc clock. The G-machine may start a
// memory instruction only when memory_ready_a is high and must leave one
// clock between two of them.
//
// THRESHOLD = 1 builds the optional threshold bit: a 12-bit tags word and an
// alloc operand (gm_alloc_thr) that the ref-chip writes into the new node's
// tags. The default, 0, is the base design; gm_alloc_thr is then unused.
//
// Everything runs on one clock (the 10 MHz G-machine clock); the host port
// is taken as already synchronised to it by the host's bus controller.
// Connections follow the data-path figure of the document; the bus
// multiplexer in place of tri-state drivers and the 33-bit host data path
// are this design's choices.
module gms_top
  import gms_pkg::*;
#(
  parameter int unsigned NODE_BITS        = NODE_W,
  parameter int unsigned QUEUE_DEPTH      = 64,
  parameter int unsigned REFRESH_INTERVAL = 132,
  parameter bit          THRESHOLD        = 1'b0,
  localparam int unsigned QCW = $clog2(QUEUE_DEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst,
  // G-machine
  input  logic               gm_alloc,
  input  logic               gm_alloc_thr,  // alloc operand: threshold bit
  input  logic               gm_call,
  input  logic               gm_ret,
  input  logic               gm_sig_enq,
  input  logic               gm_read,
  input  logic               gm_write,
  input  logic               gm_trash,
  input  gword_t             gm_bus_out,
  input  logic               gm_bus_oe,
  output gword_t             gm_bus_in,
  output logic               sin_rdy,
  output logic               memory_ready_a,
  // host
  input  logic               sig_deq,
  output sig_t               sig,
  output logic               sout_rdy,
  input  logic               fifo_enq,
  input  logic [HBUS_W-1:0]  fifo_din,
  output logic               fifo_full,
  input  logic               gcan_deq,
  output logic [TPORT_W-1:0] gcan_dout,
  output logic               grdy,
  output logic               gfull,
  input  logic               read_b,
  input  logic               write_b,
  input  logic               rmw,
  input  logic [GWORD_W-1:0] host_ad,
  output logic [GWORD_W-1:0] host_q,
  output logic               memory_ready_b,
  // statistics
  output gms_events_t        events,
  output logic [QCW-1:0]     sigq_count,
  output logic [QCW-1:0]     fifo_count,
  output logic [QCW-1:0]     gcan_count
);
  gword_t g_bus, g_q, rc_gout;
  logic   rc_goe, rc_readg, rc_rdy, g_rdy;
  logic   rc_readt, rc_writet, t_rdy, rc_gcenq, gc_rdy;
  logic [TPORT_W-1:0] rc_tout, t_q;
  logic [HBUS_W-1:0]  fifo_head;
  logic   fifo_or, fifo_ir;
  logic   ev_col, ev_ovf, ev_gcw, ev_full, ev_ref, ev_same, ev_blk;

  always_comb begin
    if (gm_bus_oe)      g_bus = gm_bus_out;
    else if (rc_goe)    g_bus = rc_gout;
    else if (gm_alloc)  g_bus = '{is_pointer: 1'b1, data: fifo_head};
    else                g_bus = g_q;
  end
  assign gm_bus_in = g_bus;

  // the AND gate forming the G-machine's memory ready
  assign memory_ready_a = g_rdy && rc_rdy && fifo_or;
  assign fifo_full      = !fifo_ir;

  graph_tags_memory #(.NODE_BITS(NODE_BITS), .REFRESH_INTERVAL(REFRESH_INTERVAL),
                      .TAGS_BITS(TAGS_W + int'(THRESHOLD))) u_mem (
    .clk, .rst,
    .g_rd (gm_read || rc_readg),
    .g_wr (gm_write),
    .g_ad (g_bus),
    .g_q  (g_q),
    .g_rdy(g_rdy),
    .t_rd (rc_readt),
    .t_wr (rc_writet),
    .t_ad (rc_tout),
    .t_q  (t_q),
    .t_rdy(t_rdy),
    .h_rd (read_b),
    .h_wr (write_b),
    .h_ad (host_ad),
    .h_q  (host_q),
    .h_rdy(memory_ready_b),
    .ev_refresh(ev_ref), .ev_same_bank(ev_same), .ev_b_blocked(ev_blk)
  );

  ref_chip #(.THRESHOLD(THRESHOLD)) u_ref (
    .clk, .rst,
    .writeg   (gm_write),
    .trash    (gm_trash),
    .alloc    (gm_alloc),
    .alloc_thr(gm_alloc_thr),
    .readg_in (gm_read),
    .rdy      (rc_rdy),
    .gport_in (g_bus),
    .gport_out(rc_gout),
    .gport_oe (rc_goe),
    .readg_out(rc_readg),
    .grdy     (g_rdy),
    .readt    (rc_readt),
    .writet   (rc_writet),
    .tport_out(rc_tout),
    .tport_in (t_q),
    .trdy     (t_rdy),
    .gcenq    (rc_gcenq),
    .gcrdy    (gc_rdy),
    .rmw      (rmw),
    .haddr    (host_ad[HADDR_W-1:0]),
    .ev_collision(ev_col), .ev_overflow(ev_ovf), .ev_gc_wait(ev_gcw), .ev_queue_full(ev_full)
  );

  signal_queue #(.DEPTH(QUEUE_DEPTH)) u_sigq (
    .clk, .rst,
    .sig_enq(gm_sig_enq), .alloc(gm_alloc), .call(gm_call), .ret(gm_ret),
    .sin_rdy(sin_rdy),
    .sig_deq(sig_deq), .sig(sig), .sout_rdy(sout_rdy), .count(sigq_count)
  );

  free_node_fifo #(.DEPTH(QUEUE_DEPTH)) u_fifo (
    .clk, .rst,
    .fifo_enq(fifo_enq), .fifo_din(fifo_din), .fifo_ir(fifo_ir),
    .alloc(gm_alloc), .node_addr(fifo_head), .fifo_or(fifo_or), .count(fifo_count)
  );

  garbage_can #(.DEPTH(QUEUE_DEPTH)) u_gcan (
    .clk, .rst,
    .gc_enq(rc_gcenq), .gc_din(rc_tout), .gc_rdy(gc_rdy),
    .gcan_deq(gcan_deq), .gcan_dout(gcan_dout), .grdy(grdy), .gfull(gfull),
    .count(gcan_count)
  );

  assign events = '{collision: ev_col, overflow: ev_ovf, gc_wait: ev_gcw, rc_full: ev_full,
                    refresh: ev_ref, same_bank: ev_same, host_blocked: ev_blk};

  a_gm_mem_when_ready: assert property (@(posedge clk) disable iff (rst)
                                        (gm_read || gm_write || gm_trash || gm_alloc) |-> memory_ready_a);
  a_gm_sig_when_ready: assert property (@(posedge clk) disable iff (rst)
                                        gm_sig_enq |-> sin_rdy);
endmodule

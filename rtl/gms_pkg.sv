// Shared widths, field layouts and encodings of the Graph Memory System.
//
// A graph node is split over two memories. The Graph memory holds the
// fields the evaluator uses (is_evaluated and two tagged 32-bit data fields);
// the Tags memory holds the memory-management fields the reference-counting
// chip and the host use (8-bit reference count, recently_visited,
// persistent_bit, forever_uncollectible). The field widths are the ones of
// the node layout table; the bit order inside a word is this design's choice.
//
// Encoded memory address (23 bits for one module of 2^20 nodes):
//   [22]    selects the Tags memory controller
//   [21:20] selects the Graph memory controller: data1, data2 or is_evaluated
//   [19:0]  node number; its two low bits pick one of the four interleaved banks
// The assignment of codes to controllers is this design's choice.
package gms_pkg;

  localparam int unsigned NODE_W   = 20;   // 2^20 nodes per memory module
  localparam int unsigned DATA_W   = 32;   // one data field
  localparam int unsigned GWORD_W  = 33;   // is_pointer + data field
  localparam int unsigned RC_W     = 8;    // reference count
  localparam int unsigned TAGS_W   = 11;   // refcount + 3 tag bits
  localparam int unsigned GADDR_W  = 22;   // field select + node
  localparam int unsigned MADDR_W  = 23;   // tags select + field select + node
  localparam int unsigned HBUS_W   = 32;   // host address/data bus
  localparam int unsigned TPORT_W  = 32;   // ref-chip Tags/Garbage Can bus
  localparam int unsigned HADDR_W  = 18;   // host address bits seen by the ref-chip

  // Graph memory field select, address bits [21:20]
  typedef enum logic [1:0] {
    FLD_DATA1 = 2'd0,
    FLD_DATA2 = 2'd1,
    FLD_EVAL  = 2'd2
  } field_e;

  // One data field as stored in the Graph memory and carried on the G bus
  typedef struct packed {
    logic              is_pointer;
    logic [DATA_W-1:0] data;
  } gword_t;

  // Tags memory word
  typedef struct packed {
    logic            forever_uncollectible;
    logic            persistent_bit;
    logic            recently_visited;
    logic [RC_W-1:0] ref_count;
  } tags_t;

  // Signal Queue entry: one bit per G-machine line
  typedef struct packed {
    logic ret;
    logic call;
    logic alloc;
  } sig_t;

  // One-clock event strobes brought out of the system for statistics
  typedef struct packed {
    logic collision;     // ref-chip abandoned a tags update for the host
    logic overflow;      // a reference count overflowed
    logic gc_wait;       // ref-chip waiting for room in the Garbage Can
    logic rc_full;       // ref-chip instruction queue full
    logic refresh;       // a DRAM refresh cycle started
    logic same_bank;     // a memory cycle hit the bank of the previous one
    logic host_blocked;  // port A won arbitration over a waiting host request
  } gms_events_t;

  // Node number a pointer refers to (the low bits of the pointer value)
  function automatic logic [NODE_W-1:0] ptr_node(input logic [DATA_W-1:0] p);
    return p[NODE_W-1:0];
  endfunction

endpackage

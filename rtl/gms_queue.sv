// First-in first-out queue used for the three buffers of the memory system
// (Signal Queue, free-node FIFO and Garbage Can).
//
// It behaves like the cascadable FIFO memory the buffers are built from: one
// word shifted in per cycle when input-ready (ir) is high, one shifted out per
// cycle when output-ready (or_o) is high, 64 words deep by default. Output
// ready means "not empty", input ready means "not full", as in the queue
// model of the system simulation. The head word is shown on dout while or_o
// is high (first-word fall-through). The 1.3 us fall-through time of the
// physical part is not modelled: a word written in one cycle is at the head
// the next cycle if the queue was empty. Enqueue and dequeue in the same cycle
// are allowed. A write when full or a read when empty is ignored (and flagged
// by an assertion).
module gms_queue #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 64
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enq,
  input  logic [WIDTH-1:0] din,
  output logic             ir,      // input ready: room for a word
  input  logic             deq,
  output logic [WIDTH-1:0] dout,
  output logic             or_o,    // output ready: a word is at the head
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic             do_enq, do_deq;

  assign ir     = (count != DEPTH[$bits(count)-1:0]);
  assign or_o   = (count != '0);
  assign do_enq = enq && ir;
  assign do_deq = deq && or_o;
  assign dout   = mem[rd_ptr];

  function automatic logic [AW-1:0] bump(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_enq) wr_ptr <= bump(wr_ptr);
      if (do_deq) rd_ptr <= bump(rd_ptr);
      case ({do_enq, do_deq})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_enq) mem[wr_ptr] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) enq |-> ir);
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) deq |-> or_o);
endmodule

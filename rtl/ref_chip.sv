// Reference-counting chip (ref-chip): the one custom part of the Graph
// Memory System. It watches the G-machine's write and trash instructions and
// keeps the reference count of every node in the Tags memory up to date,
// and it passes persistent nodes whose count it lowered to the Garbage Can.
//
// How it works. A two-entry instruction queue (current, next) takes the
// G-machine's write and trash strobes. The G bus is latched one clock after
// the strobe: for a write it carries the datum being written, for a trash
// the field address about to be overwritten. A sequencer then works on the
// current entry:
//   write with a pointer datum -> read-modify-write of the target node's
//                                 tags: count + 1
//   trash                      -> read the field from the Graph memory over
//                                 the G bus (readg); if it holds a pointer,
//                                 read-modify-write of the target's tags:
//                                 count - 1, then, if the node is persistent
//                                 and not forever-uncollectible, enqueue its
//                                 address in the Garbage Can
// Every write-back also sets recently_visited. An increment of a count
// already at its maximum sets forever_uncollectible. Non-pointer data retire
// at once.
//
// rdy goes low while both queue entries are occupied, and while a trash is
// the current entry until its Graph memory read has returned (the G-machine
// must keep off the Graph memory until then). rdy is combined by an AND with
// the memory and free-node-FIFO ready signals to form the G-machine's memory
// ready.
//
// Collision detection. The host raises rmw while it modifies a reference
// count; the ref-chip then holds the host address (low HADDR_W bits) it saw
// on the first such cycle. If, while rmw is raised, the ref-chip is between
// issuing its tags read and issuing its tags write for a node whose low
// address bits match, it abandons the sequence and restarts the read once
// rmw falls. A sequence whose write was already issued is left alone.
//
// Threshold option (THRESHOLD = 1, off by default): the document suggests,
// as an optimisation, a threshold bit per node that marks a possible root of
// a cyclic sub-graph. The G-machine's alloc then carries an operand bit; the
// ref-chip queues the alloc like a write (node address taken from the G bus
// in the alloc clock, where the free-node FIFO drives it), reads the node's
// tags, and writes them back with the threshold bit (Tport bit TAGS_W) set
// to the operand and everything else unchanged. Other updates carry the
// threshold bit through unchanged. With THRESHOLD = 0, alloc is ignored and
// the tags word is TAGS_W bits.
//
// Buses: the multiplexed G and T buses are split here into an input and an
// output (with an output enable for the G bus); memory protocol: a strobe
// goes with the address, write data follow one clock later, the ref-chip
// skips one clock after any strobe and then waits for the memory's ready.
// The Tport carries a node number in bits [NODE_W-1:0] as address and the
// tags word in bits [TAGS_W-1:0] as data.
//
// Follows the document: the queue of two, when rdy drops, the latch-next-
// cycle rule, the sequence of memory accesses, the write-back fields, the
// Garbage Can rule and the collision rule. This design's choices: a single
// rising-edge clock in place of the two clock phases (G-machine signals and
// memory signals are both sampled at the edge); rdy follows the queue state
// from the clock after an instruction arrives (the G-machine never issues in
// the clock right after an instruction, so nothing is lost); a count already
// at zero is not decremented further; the count of a forever-uncollectible
// node is left as it is; split unidirectional buses in place of tri-states.
module ref_chip
  import gms_pkg::*;
#(
  parameter int unsigned HADDR_BITS = HADDR_W,
  parameter bit          THRESHOLD  = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst,
  // G-machine instruction lines
  input  logic                  writeg,
  input  logic                  trash,
  input  logic                  alloc,       // G-machine alloc (threshold option)
  input  logic                  alloc_thr,   // alloc's threshold operand bit
  input  logic                  readg_in,    // G-machine read strobe (sampled)
  output logic                  rdy,
  // G bus and Graph memory
  input  gword_t                gport_in,
  output gword_t                gport_out,
  output logic                  gport_oe,
  output logic                  readg_out,   // ref-chip read strobe to Graph memory
  input  logic                  grdy,
  // T bus: Tags memory and Garbage Can
  output logic                  readt,
  output logic                  writet,
  output logic [TPORT_W-1:0]    tport_out,
  input  logic [TPORT_W-1:0]    tport_in,
  input  logic                  trdy,
  output logic                  gcenq,
  input  logic                  gcrdy,
  // host collision interface
  input  logic                  rmw,
  input  logic [HADDR_BITS-1:0] haddr,
  // one-clock event strobes for statistics
  output logic                  ev_collision,
  output logic                  ev_overflow,
  output logic                  ev_gc_wait,
  output logic                  ev_queue_full
);
  typedef enum logic [1:0] {INS_WRITE, INS_TRASH, INS_ALLOC} ins_e;

  typedef struct packed {
    logic   valid;
    ins_e   ins;
    logic   latched;   // G bus contents captured
    logic   gdone;     // trash: Graph memory read finished
    logic   thr;       // alloc: threshold operand
    gword_t data;      // write datum, or trash field address
  } entry_t;

  typedef enum logic [3:0] {
    S_IDLE, S_RDG, S_RDG_W, S_RDT, S_RDT_W, S_WRT, S_WDAT, S_ENQ, S_FAULT
  } state_e;

  entry_t cur, nxt, cur_n, nxt_n, cur_n_q;
  state_e st, st_n;
  logic              skip, skip_n;    // one clock after a strobe
  logic [NODE_W-1:0] target, target_n;
  tags_t             tags, tags_n;
  logic              thr, thr_n;      // threshold bit of the word in hand
  logic              take_alloc;
  assign take_alloc = THRESHOLD && alloc;
  logic              dc;              // detect-collision state
  logic [HADDR_BITS-1:0] haddr_l;
  logic              retire;

  // collision test against the address the host is modifying
  logic              detect, addr_match, rmw_stage;
  assign detect     = dc || rmw;
  assign addr_match = ((dc ? haddr_l : haddr) == target[HADDR_BITS-1:0]);

  // Graph memory is free for the ref-chip when it is ready and the G-machine
  // is not starting an access in this very clock
  logic gm_ready, tm_ready;
  assign gm_ready = grdy && !readg_in && !writeg && !skip;
  assign tm_ready = trdy && !skip;

  assign rdy = !(cur.valid && nxt.valid) &&
               !(cur.valid && cur.ins == INS_TRASH && !cur.gdone);

  // modified tags word
  function automatic tags_t modify(input tags_t t, input ins_e ins, output logic ovf);
    tags_t n = t;
    ovf = 1'b0;
    n.recently_visited = 1'b1;
    if (!t.forever_uncollectible) begin
      if (ins == INS_WRITE) begin
        if (&t.ref_count) begin
          n.forever_uncollectible = 1'b1;
          ovf = 1'b1;
        end else begin
          n.ref_count = t.ref_count + 1'b1;
        end
      end else if (t.ref_count != '0) begin
        n.ref_count = t.ref_count - 1'b1;
      end
    end
    return n;
  endfunction

  tags_t tags_mod;
  logic  ovf;
  always_comb begin
    if (cur.ins == INS_ALLOC) begin
      tags_mod = tags;
      ovf      = 1'b0;
    end else begin
      tags_mod = modify(tags, cur.ins, ovf);
    end
  end

  // sequencer
  always_comb begin
    st_n      = st;
    skip_n    = 1'b0;
    target_n  = target;
    tags_n    = tags;
    thr_n     = thr;
    retire    = 1'b0;
    readg_out = 1'b0;
    gport_oe  = 1'b0;
    gport_out = cur.data;
    readt     = 1'b0;
    writet    = 1'b0;
    gcenq     = 1'b0;
    tport_out = TPORT_W'(target);
    ev_collision = 1'b0;
    ev_overflow  = 1'b0;
    ev_gc_wait   = 1'b0;
    rmw_stage    = 1'b0;
    cur_n     = cur;

    case (st)
      S_IDLE: begin
        if (cur.valid && cur.latched) begin
          if (cur.ins == INS_TRASH) begin
            st_n = S_RDG;
          end else if (cur.ins == INS_ALLOC) begin
            target_n = ptr_node(cur.data.data);
            st_n     = S_RDT;
          end else if (cur.data.is_pointer) begin
            target_n = ptr_node(cur.data.data);
            st_n     = S_RDT;
          end else begin
            retire = 1'b1;
          end
        end
      end
      S_RDG: begin
        if (gm_ready) begin
          readg_out = 1'b1;
          gport_oe  = 1'b1;
          skip_n    = 1'b1;
          st_n      = S_RDG_W;
        end
      end
      S_RDG_W: begin
        if (grdy && !skip) begin
          cur_n.gdone = 1'b1;
          if (gport_in.is_pointer) begin
            target_n = ptr_node(gport_in.data);
            st_n     = S_RDT;
          end else begin
            retire = 1'b1;
          end
        end
      end
      S_RDT: begin
        if (detect && addr_match) begin
          st_n = S_FAULT;
        end else if (tm_ready) begin
          readt  = 1'b1;
          skip_n = 1'b1;
          st_n   = S_RDT_W;
        end
      end
      S_RDT_W: begin
        rmw_stage = 1'b1;
        if (trdy && !skip) begin
          tags_n = tags_t'(tport_in[$bits(tags_t)-1:0]);
          thr_n  = THRESHOLD && tport_in[$bits(tags_t)];
          st_n   = S_WRT;
        end
      end
      S_WRT: begin
        rmw_stage = 1'b1;
        if (tm_ready) begin
          writet = 1'b1;
          st_n   = S_WDAT;
          tags_n = tags_mod;
          if (cur.ins == INS_ALLOC) thr_n = cur.thr;
          ev_overflow = ovf;
        end
      end
      S_WDAT: begin
        tport_out = TPORT_W'({thr && THRESHOLD, tags});
        if (cur.ins == INS_TRASH && tags.persistent_bit && !tags.forever_uncollectible)
          st_n = S_ENQ;
        else
          retire = 1'b1;
      end
      S_ENQ: begin
        if (gcrdy) begin
          gcenq  = 1'b1;
          retire = 1'b1;
        end else begin
          ev_gc_wait = 1'b1;
        end
      end
      S_FAULT: begin
        if (!detect) st_n = S_RDT;
      end
      default: st_n = S_IDLE;
    endcase

    // collision during the read or modify stage: abandon and restart later
    if (rmw_stage && detect && addr_match && !writet) begin
      st_n         = S_FAULT;
      ev_collision = 1'b1;
    end

    if (retire) st_n = S_IDLE;
  end

  // instruction queue
  always_comb begin
    entry_t c, n, e;
    c = cur_n;
    n = nxt;
    if (c.valid && !c.latched) begin c.data = gport_in; c.latched = 1'b1; end
    if (n.valid && !n.latched) begin n.data = gport_in; n.latched = 1'b1; end
    if (retire) begin
      c = n;
      n = '0;
    end
    e = '{valid: 1'b1, ins: (trash ? INS_TRASH : INS_WRITE), latched: 1'b0,
          gdone: 1'b0, thr: 1'b0, data: '0};
    // an alloc's node address is on the G bus in the alloc clock itself
    if (take_alloc)
      e = '{valid: 1'b1, ins: INS_ALLOC, latched: 1'b1, gdone: 1'b0, thr: alloc_thr,
            data: gport_in};
    if (writeg || trash || take_alloc) begin
      if (!c.valid) c = e;
      else          n = e;
    end
    cur_n_q = c;
    nxt_n   = n;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cur     <= '0;
      nxt     <= '0;
      st      <= S_IDLE;
      skip    <= 1'b0;
      target  <= '0;
      tags    <= '0;
      thr     <= 1'b0;
      dc      <= 1'b0;
      haddr_l <= '0;
    end else begin
      cur    <= cur_n_q;
      nxt    <= nxt_n;
      st     <= st_n;
      skip   <= skip_n;
      target <= target_n;
      tags   <= tags_n;
      thr    <= thr_n;
      if (!dc) haddr_l <= haddr;
      dc     <= rmw;
    end
  end

  assign ev_queue_full = cur.valid && nxt.valid;

  a_instr_only_when_ready: assert property (@(posedge clk) disable iff (rst)
                                            (writeg || trash || take_alloc) |-> rdy);
  a_one_instr:             assert property (@(posedge clk) disable iff (rst)
                                            !(writeg && trash) &&
                                            !(take_alloc && (writeg || trash)));
  a_no_overwrite:          assert property (@(posedge clk) disable iff (rst)
                                            (writeg || trash || take_alloc) |->
                                            !(cur.valid && nxt.valid));
endmodule

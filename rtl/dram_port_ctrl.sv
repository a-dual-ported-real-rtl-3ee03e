// Dual-port DRAM controller with its bank of DRAMs: one i8207-style
// controller and the 2^ADDR_W words it serves.
//
// Two independent buses share the storage. Port A is the synchronous port
// (G-machine and ref-chip side), port B the host port. Each port carries a
// multiplexed address/data bus: a read or write strobe is given together
// with the address; for a write the data follows on the same bus one cycle
// later. Each port holds one request. A memory cycle starts when the array is
// free and a complete request is waiting (a read reaching an idle port
// starts one in the same clock); arbitration is fixed "Port A
// priority", with refresh requests (the controller's internal third port)
// served first. The array is read or written at the start of a memory cycle.
// Port A is acknowledged (a_rdy high, a_q valid) in cycle 1 of its memory
// cycle (early acknowledge), port B in cycle 2 (late acknowledge). A memory
// cycle takes CYC_SAME clocks when it uses the same bank as the previous one
// and CYC_DIFF clocks otherwise; banks are low-order interleaved on the two
// low address bits. A refresh cycle is requested every REFRESH_INTERVAL
// clocks and lasts CYC_SAME clocks.
//
// x_rdy is a level: high when the port can take a request, low from the
// clock after a request until its acknowledge cycle. A read issued in cycle
// t on an idle controller starts its memory cycle at the end of cycle t and
// returns data in cycle t+2 on port A (t+3 on port B), so the G-machine
// latches it at the end of its third cycle. Cycle counts, acknowledge
// positions, priority and refresh interval follow the document's controller
// model; the one-request-per-port buffering, refresh length and bank rule
// encoding are this design's choices. The two cycles of port multiplexer
// switching are taken as hidden under the previous memory cycle.
module dram_port_ctrl #(
  parameter int unsigned ADDR_W           = 20,
  parameter int unsigned DATA_W           = 33,
  parameter int unsigned BANK_W           = 2,
  parameter int unsigned REFRESH_INTERVAL = 132,
  parameter int unsigned CYC_DIFF         = 3,
  parameter int unsigned CYC_SAME         = 4,
  localparam int unsigned AD_W = (ADDR_W > DATA_W) ? ADDR_W : DATA_W
) (
  input  logic              clk,
  input  logic              rst,
  // port A (synchronous)
  input  logic              a_rd,
  input  logic              a_wr,
  input  logic [AD_W-1:0]   a_ad,
  output logic [DATA_W-1:0] a_q,
  output logic              a_rdy,
  // port B (host)
  input  logic              b_rd,
  input  logic              b_wr,
  input  logic [AD_W-1:0]   b_ad,
  output logic [DATA_W-1:0] b_q,
  output logic              b_rdy,
  // event strobes, one clock each, for statistics
  output logic              ev_refresh,
  output logic              ev_same_bank,
  output logic              ev_b_blocked
);
  typedef enum logic [1:0] {SRC_NONE, SRC_A, SRC_B, SRC_REF} src_e;

  typedef struct packed {
    logic              valid;    // request held
    logic              wr;
    logic              dat_ok;   // write data captured (always 1 for reads)
    logic              served;   // memory cycle already started for it
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
  } req_t;

  localparam int unsigned CW = $clog2(CYC_SAME + 1);
  localparam int unsigned RW = $clog2(REFRESH_INTERVAL + 1);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  req_t            ra, rb;
  src_e            src;
  logic [CW-1:0]   cyc, len;
  logic            last_bank_v;
  logic [BANK_W-1:0] last_bank;
  logic [RW-1:0]   ref_cnt;
  logic            ref_req;

  logic ack_a, ack_b, can_start;
  logic cand_a, cand_b, direct_a, direct_b;
  logic [ADDR_W-1:0] addr_a, addr_b;
  src_e pick;
  logic [ADDR_W-1:0] pick_addr;
  logic [CW-1:0]     pick_len;

  assign ack_a = (src == SRC_A) && (cyc == CW'(1));
  assign ack_b = (src == SRC_B) && (cyc == CW'(2));
  assign a_rdy = !ra.valid || ack_a;
  assign b_rdy = !rb.valid || ack_b;

  assign can_start = (src == SRC_NONE) || (cyc == len - 1'b1);
  // a read arriving at an idle port may start a memory cycle at once
  // (only while the other port has no request waiting, so that a request
  // already given keeps its place ahead of a later one)
  assign direct_a  = a_rd && !ra.valid && !(rb.valid && !rb.served);
  assign direct_b  = b_rd && !rb.valid && !(ra.valid && !ra.served);
  assign cand_a    = (ra.valid && ra.dat_ok && !ra.served) || direct_a;
  assign cand_b    = (rb.valid && rb.dat_ok && !rb.served) || direct_b;
  assign addr_a    = ra.valid ? ra.addr : a_ad[ADDR_W-1:0];
  assign addr_b    = rb.valid ? rb.addr : b_ad[ADDR_W-1:0];

  always_comb begin
    pick      = SRC_NONE;
    pick_addr = '0;
    if (can_start) begin
      if (ref_req)     pick = SRC_REF;
      else if (cand_a) begin pick = SRC_A; pick_addr = addr_a; end
      else if (cand_b) begin pick = SRC_B; pick_addr = addr_b; end
    end
    if (pick == SRC_REF)
      pick_len = CW'(CYC_SAME);
    else if (last_bank_v && (pick_addr[BANK_W-1:0] == last_bank))
      pick_len = CW'(CYC_SAME);
    else
      pick_len = CW'(CYC_DIFF);
  end

  assign ev_refresh   = (pick == SRC_REF);
  assign ev_same_bank = (pick == SRC_A || pick == SRC_B) && (pick_len == CW'(CYC_SAME));
  assign ev_b_blocked = (pick == SRC_A) && cand_b;

  // per-port request register
  function automatic req_t next_req(input req_t r, input logic rd, input logic wr,
                                    input logic [AD_W-1:0] ad, input logic ack,
                                    input logic start);
    req_t n = r;
    if (start) n.served = 1'b1;
    if (r.valid && !r.dat_ok) begin
      n.data   = ad[DATA_W-1:0];
      n.dat_ok = 1'b1;
    end
    if (ack) n.valid = 1'b0;
    if ((rd || wr) && (!r.valid || ack)) begin
      n.valid  = 1'b1;
      n.wr     = wr;
      n.dat_ok = !wr;
      n.served = start;
      n.addr   = ad[ADDR_W-1:0];
    end
    return n;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      ra          <= '0;
      rb          <= '0;
      src         <= SRC_NONE;
      cyc         <= '0;
      len         <= '0;
      last_bank_v <= 1'b0;
      last_bank   <= '0;
      ref_cnt     <= '0;
      ref_req     <= 1'b0;
    end else begin
      ra <= next_req(ra, a_rd, a_wr, a_ad, ack_a, pick == SRC_A);
      rb <= next_req(rb, b_rd, b_wr, b_ad, ack_b, pick == SRC_B);

      if (ref_cnt == RW'(REFRESH_INTERVAL - 1)) begin
        ref_cnt <= '0;
        ref_req <= 1'b1;
      end else begin
        ref_cnt <= ref_cnt + 1'b1;
      end

      if (pick != SRC_NONE) begin
        src <= pick;
        cyc <= '0;
        len <= pick_len;
        if (pick == SRC_REF) begin
          ref_req <= 1'b0;
        end else begin
          last_bank_v <= 1'b1;
          last_bank   <= pick_addr[BANK_W-1:0];
        end
      end else if (src != SRC_NONE) begin
        if (cyc == len - 1'b1) src <= SRC_NONE;
        else                   cyc <= cyc + 1'b1;
      end
    end
  end

  // storage: accessed at the start of the memory cycle
  always_ff @(posedge clk) begin
    if (pick == SRC_A) begin
      if (ra.valid && ra.wr) mem[ra.addr] <= ra.data;
      else                   a_q <= mem[addr_a];
    end else if (pick == SRC_B) begin
      if (rb.valid && rb.wr) mem[rb.addr] <= rb.data;
      else                   b_q <= mem[addr_b];
    end
  end

  a_a_only_when_ready: assert property (@(posedge clk) disable iff (rst) (a_rd || a_wr) |-> a_rdy);
  a_b_only_when_ready: assert property (@(posedge clk) disable iff (rst) (b_rd || b_wr) |-> b_rdy);
  a_a_one_strobe:      assert property (@(posedge clk) disable iff (rst) !(a_rd && a_wr));
  a_b_one_strobe:      assert property (@(posedge clk) disable iff (rst) !(b_rd && b_wr));
endmodule

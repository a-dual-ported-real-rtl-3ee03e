// One memory module of the Graph Memory System: 2^NODE_BITS graph nodes
// (2^20, about one million, by default) split into a Graph memory and a
// Tags memory, all dual-ported.
//
// Each separately addressable part of a node sits behind its own dual-port
// DRAM controller with four low-order interleaved banks:
//   is_evaluated bit              (1 bit)
//   is_pointer1 + data1           (33 bits)
//   is_pointer2 + data2           (33 bits)
//   reference count, recently_visited, persistent_bit,
//   forever_uncollectible         (11 bits, the Tags memory)
// A controller is picked by the encoded address: bit 22 selects the Tags
// memory, bits 21:20 select data1 (0), data2 (1) or is_evaluated (2) in the
// Graph memory, and the low NODE_BITS bits are the node number (see
// gms_pkg). Splitting the node this way lets the ref-chip work on tags while
// the G-machine uses the Graph memory.
//
// Ports:
//   G port (port A of the three Graph controllers): G-machine and ref-chip,
//     field address in bits 21:0 with the strobe, write data one clock later.
//   T port (port A of the Tags controller): ref-chip, node number with the
//     strobe, tags word in bits 10:0 one clock later.
//   H port (port B of all four): host, full encoded address with the strobe.
// A port's ready is the AND of the ready signals of the controllers behind
// it; read data come from the controller the last read went to.
//
// TAGS_BITS sets the width of the Tags memory: 11 by default, 12 when the
// optional threshold bit is built.
//
// The four-controller organisation, 256K-word banks, address widths and the
// field split follow the document; the code values of the two field-select
// bits and the 33-bit host data path (so that the host can see is_pointer)
// are this design's choices.
module graph_tags_memory
  import gms_pkg::*;
#(
  parameter int unsigned NODE_BITS        = NODE_W,
  parameter int unsigned REFRESH_INTERVAL = 132,
  parameter int unsigned TAGS_BITS        = TAGS_W
) (
  input  logic               clk,
  input  logic               rst,
  // G port
  input  logic               g_rd,
  input  logic               g_wr,
  input  logic [GWORD_W-1:0] g_ad,
  output gword_t             g_q,
  output logic               g_rdy,
  // T port
  input  logic               t_rd,
  input  logic               t_wr,
  input  logic [TPORT_W-1:0] t_ad,
  output logic [TPORT_W-1:0] t_q,
  output logic               t_rdy,
  // H port
  input  logic               h_rd,
  input  logic               h_wr,
  input  logic [GWORD_W-1:0] h_ad,
  output logic [GWORD_W-1:0] h_q,
  output logic               h_rdy,
  // statistics strobes
  output logic               ev_refresh,
  output logic               ev_same_bank,
  output logic               ev_b_blocked
);
  // controller index: 0 data1, 1 data2, 2 is_evaluated, 3 tags
  localparam int unsigned NC = 4;
  localparam int unsigned CTL_TAGS = 3;

  logic [NC-1:0] a_rd, a_wr, b_rd, b_wr, a_rdy, b_rdy;
  logic [NC-1:0] ev_r, ev_s, ev_b;
  logic [GWORD_W-1:0] a_q [NC];
  logic [GWORD_W-1:0] b_q [NC];

  logic [1:0] g_sel, g_sel_last, h_sel, h_sel_last;

  assign g_sel = g_ad[NODE_W +: 2];
  assign h_sel = h_ad[NODE_W + 2] ? 2'(CTL_TAGS) : h_ad[NODE_W +: 2];

  always_comb begin
    a_rd = '0; a_wr = '0; b_rd = '0; b_wr = '0;
    if (g_sel != 2'(CTL_TAGS)) begin
      a_rd[g_sel] = g_rd;
      a_wr[g_sel] = g_wr;
    end
    a_rd[CTL_TAGS] = t_rd;
    a_wr[CTL_TAGS] = t_wr;
    b_rd[h_sel]    = h_rd;
    b_wr[h_sel]    = h_wr;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      g_sel_last <= '0;
      h_sel_last <= '0;
    end else begin
      if (g_rd) g_sel_last <= g_sel;
      if (h_rd) h_sel_last <= h_sel;
    end
  end

  // the two 33-bit data-field controllers
  for (genvar i = 0; i < 2; i++) begin : g_data
    dram_port_ctrl #(.ADDR_W(NODE_BITS), .DATA_W(GWORD_W),
                     .REFRESH_INTERVAL(REFRESH_INTERVAL)) u_ctl (
      .clk, .rst,
      .a_rd(a_rd[i]), .a_wr(a_wr[i]), .a_ad(g_ad), .a_q(a_q[i]), .a_rdy(a_rdy[i]),
      .b_rd(b_rd[i]), .b_wr(b_wr[i]), .b_ad(h_ad), .b_q(b_q[i]), .b_rdy(b_rdy[i]),
      .ev_refresh(ev_r[i]), .ev_same_bank(ev_s[i]), .ev_b_blocked(ev_b[i])
    );
  end

  // is_evaluated controller
  logic [NODE_BITS-1:0] ev_a_ad, ev_b_ad;
  logic [0:0]           ev_a_q, ev_b_q;
  // the address travels in the low bits; the written bit in bit 0 one clock later
  assign ev_a_ad = g_ad[NODE_BITS-1:0];
  assign ev_b_ad = h_ad[NODE_BITS-1:0];
  dram_port_ctrl #(.ADDR_W(NODE_BITS), .DATA_W(1),
                   .REFRESH_INTERVAL(REFRESH_INTERVAL)) u_eval (
    .clk, .rst,
    .a_rd(a_rd[2]), .a_wr(a_wr[2]), .a_ad(ev_a_ad), .a_q(ev_a_q), .a_rdy(a_rdy[2]),
    .b_rd(b_rd[2]), .b_wr(b_wr[2]), .b_ad(ev_b_ad), .b_q(ev_b_q), .b_rdy(b_rdy[2]),
    .ev_refresh(ev_r[2]), .ev_same_bank(ev_s[2]), .ev_b_blocked(ev_b[2])
  );
  assign a_q[2] = GWORD_W'(ev_a_q);
  assign b_q[2] = GWORD_W'(ev_b_q);

  // Tags memory controller
  localparam int unsigned TAD_W = (NODE_BITS > TAGS_BITS) ? NODE_BITS : TAGS_BITS;
  logic [TAD_W-1:0]     tg_a_ad, tg_b_ad;
  logic [TAGS_BITS-1:0] tg_a_q, tg_b_q;
  assign tg_a_ad = t_ad[TAD_W-1:0];
  assign tg_b_ad = h_ad[TAD_W-1:0];
  dram_port_ctrl #(.ADDR_W(NODE_BITS), .DATA_W(TAGS_BITS),
                   .REFRESH_INTERVAL(REFRESH_INTERVAL)) u_tags (
    .clk, .rst,
    .a_rd(a_rd[3]), .a_wr(a_wr[3]), .a_ad(tg_a_ad), .a_q(tg_a_q), .a_rdy(a_rdy[3]),
    .b_rd(b_rd[3]), .b_wr(b_wr[3]), .b_ad(tg_b_ad), .b_q(tg_b_q), .b_rdy(b_rdy[3]),
    .ev_refresh(ev_r[3]), .ev_same_bank(ev_s[3]), .ev_b_blocked(ev_b[3])
  );
  assign a_q[3] = GWORD_W'(tg_a_q);
  assign b_q[3] = GWORD_W'(tg_b_q);

  assign g_q   = gword_t'(a_q[g_sel_last]);
  assign g_rdy = &a_rdy[2:0];
  assign t_q   = TPORT_W'(tg_a_q);
  assign t_rdy = a_rdy[CTL_TAGS];
  assign h_q   = b_q[h_sel_last];
  assign h_rdy = &b_rdy;

  assign ev_refresh   = |ev_r;
  assign ev_same_bank = |ev_s;
  assign ev_b_blocked = |ev_b;

  a_g_field_legal: assert property (@(posedge clk) disable iff (rst)
                                    (g_rd || g_wr) |-> (g_sel != 2'(CTL_TAGS)));
endmodule

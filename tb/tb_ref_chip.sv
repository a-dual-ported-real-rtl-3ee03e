// Test of the reference-counting chip with behavioural Graph and Tags
// memories (multiplexed buses, adjustable latency) and a Garbage Can ready
// line. Checks: increment on a pointer write, nothing for a non-pointer
// write, decrement through a Graph read on trash, the Garbage Can entry for
// a persistent node only, overflow setting forever_uncollectible (and no
// further change or Garbage Can entry for such a node), no decrement below
// zero, recently_visited set on write-back, rdy low after a trash until its
// Graph read and while both queue entries are full, waiting for the Garbage
// Can, a collision with a host read-modify-write on the same node (restart,
// no lost update), no restart for a different node, and a random stream
// against a model.
`timescale 1ns/1ps
module tb_ref_chip;
  import gms_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic writeg, trash, readg_in, rdy, gport_oe, readg_out, grdy;
  gword_t gport_in, gport_out, gq;
  logic readt, writet, trdy, gcenq, gcrdy, rmw;
  logic [31:0] tport_out, tport_in;
  logic [17:0] haddr;
  logic ev_collision, ev_overflow, ev_gc_wait, ev_queue_full;

  logic alloc = 1'b0, alloc_thr = 1'b0;   // threshold option not used here
  ref_chip dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- behavioural memories ----
  gword_t gmem [int];
  tags_t  tmem [256];
  int GL = 2, TL = 2;
  int gcnt = 0, tcnt = 0;
  logic   tb_oe; gword_t tb_bus;
  logic [31:0] tq;
  logic   t_wpend; logic [7:0] t_addr;
  int n_readt = 0, n_col = 0, n_ovf = 0, n_gcw = 0, n_full = 0;
  int gc_list[$];

  assign gport_in = tb_oe ? tb_bus : (gport_oe ? gport_out : gq);
  assign tport_in = tq;
  assign readg_in = 1'b0;

  always @(posedge clk) begin
    if (rst) begin
      grdy <= 1; trdy <= 1; gcnt <= 0; tcnt <= 0; t_wpend <= 0;
    end else begin
      if (readg_out) begin
        gq <= gmem.exists(int'(gport_out.data)) ? gmem[int'(gport_out.data)] : '0;
        grdy <= 0; gcnt <= GL;
      end else if (gcnt > 1) gcnt <= gcnt - 1;
      else if (gcnt == 1) begin gcnt <= 0; grdy <= 1; end
      if (t_wpend) begin tmem[t_addr] <= tags_t'(tport_out[10:0]); t_wpend <= 0; end
      if (readt || writet) begin
        t_addr <= tport_out[7:0];
        if (readt) tq <= 32'(tmem[tport_out[7:0]]);
        t_wpend <= writet;
        trdy <= 0; tcnt <= TL;
      end else if (tcnt > 1) tcnt <= tcnt - 1;
      else if (tcnt == 1) begin tcnt <= 0; trdy <= 1; end
      if (gcenq) gc_list.push_back(int'(tport_out));
      n_readt += int'(readt);
      n_col += int'(ev_collision); n_ovf += int'(ev_overflow);
      n_gcw += int'(ev_gc_wait); n_full += int'(ev_queue_full);
    end
  end

  // ---- G-machine side ----
  task automatic gm_write(gword_t d, int fa = 0);
    while (!rdy) @(negedge clk);
    writeg = 1; tb_oe = 1; tb_bus = '{is_pointer: 1'b0, data: 32'(fa)};
    @(negedge clk); writeg = 0; tb_bus = d;
    @(negedge clk); tb_oe = 0;
  endtask
  task automatic gm_trash(int fa);
    while (!rdy) @(negedge clk);
    trash = 1; tb_oe = 1; tb_bus = '{is_pointer: 1'b0, data: 32'(fa)};
    @(negedge clk); trash = 0;
    @(negedge clk); tb_oe = 0;
  endtask
  function automatic gword_t ptr(int n);
    return '{is_pointer: 1'b1, data: 32'(n)};
  endfunction
  task automatic settle();
    repeat (3) @(negedge clk);
    while (!(rdy && dut.st == dut.S_IDLE && !dut.cur.valid && trdy && grdy)) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask
  function automatic tags_t mk(int rc, bit per, bit fu = 0);
    return '{forever_uncollectible: fu, persistent_bit: per, recently_visited: 1'b0, ref_count: 8'(rc)};
  endfunction

  bit gc_rand = 0;
  always @(negedge clk) if (gc_rand) gcrdy <= ($urandom_range(3) != 0);

  int exp_rc[16]; bit exp_per[16]; int exp_gc;

  initial begin
    int r0, gc0;
    writeg = 0; trash = 0; tb_oe = 0; tb_bus = '0; gcrdy = 1; rmw = 0; haddr = '0;
    foreach (tmem[i]) tmem[i] = mk(0, 0);
    repeat (3) @(negedge clk); rst = 0;
    @(negedge clk);
    check(rdy, "ready after reset");

    // A: non-pointer write
    r0 = n_readt;
    gm_write('{is_pointer: 1'b0, data: 32'd5});
    settle();
    check(n_readt == r0, "non-pointer write leaves tags alone");

    // B: pointer write increments, sets recently_visited
    tmem[5] = mk(3, 1);
    gm_write(ptr(5)); settle();
    check(tmem[5].ref_count == 4 && tmem[5].recently_visited, "increment on pointer write");
    check(gc_list.size() == 0, "no Garbage Can entry on write");

    // C: trash of a field holding a pointer to a persistent node
    gmem[32'h100] = ptr(5);
    while (!rdy) @(negedge clk);
    trash = 1; tb_oe = 1; tb_bus = '{is_pointer: 1'b0, data: 32'h100};
    @(negedge clk); trash = 0;
    check(!rdy, "rdy low after trash");
    @(negedge clk); tb_oe = 0;
    check(!rdy, "rdy still low before Graph read");
    while (!rdy) @(negedge clk);
    check(dut.st != dut.S_RDG && dut.st != dut.S_RDG_W, "rdy back only after Graph read");
    settle();
    check(tmem[5].ref_count == 3, "decrement on trash");
    check(gc_list.size() == 1 && gc_list[0] == 5, "persistent node sent to Garbage Can");

    // D: trash of a non-pointer field
    gmem[32'h101] = '{is_pointer: 1'b0, data: 32'd6};
    tmem[6] = mk(2, 0);
    gm_trash(32'h101); settle();
    check(tmem[6].ref_count == 2, "non-pointer trash leaves counts alone");

    // E: temporary node: decrement, no Garbage Can entry
    gmem[32'h102] = ptr(6);
    gm_trash(32'h102); settle();
    check(tmem[6].ref_count == 1 && gc_list.size() == 1, "temporary node decremented, not enqueued");

    // F: overflow
    tmem[7] = mk(255, 1);
    gm_write(ptr(7)); settle();
    check(tmem[7].forever_uncollectible && tmem[7].ref_count == 255 && n_ovf == 1,
          "overflow sets forever_uncollectible");
    gmem[32'h103] = ptr(7);
    gm_trash(32'h103); settle();
    check(tmem[7].ref_count == 255 && gc_list.size() == 1,
          "forever-uncollectible node: no decrement, no Garbage Can entry");

    // G: no decrement below zero
    tmem[8] = mk(0, 0);
    gmem[32'h104] = ptr(8);
    gm_trash(32'h104); settle();
    check(tmem[8].ref_count == 0, "count stays at zero");

    // H: queue full -> rdy low
    TL = 6;
    tmem[10] = mk(1, 0);
    gm_write(ptr(10));
    gm_write(ptr(10));
    check(!rdy, "rdy low with both entries occupied");
    settle();
    check(n_full > 0 && tmem[10].ref_count == 3, "both queued writes applied");
    TL = 2;

    // I: Garbage Can not ready
    gcrdy = 0;
    tmem[11] = mk(4, 1);
    gmem[32'h105] = ptr(11);
    gm_trash(32'h105);
    repeat (30) @(negedge clk);
    check(n_gcw > 0 && gc_list.size() == 1, "waits while the Garbage Can is full");
    gcrdy = 1;
    settle();
    check(gc_list.size() == 2 && gc_list[1] == 11 && tmem[11].ref_count == 3, "enqueue once ready");

    // J: collision with the host on the same node
    TL = 6;
    tmem[9] = mk(10, 0);
    gm_write(ptr(9));
    while (!readt) @(negedge clk);
    @(negedge clk);
    rmw = 1; haddr = 18'd9;
    @(negedge clk);
    tmem[9].ref_count = tmem[9].ref_count - 1;     // the host's own decrement
    repeat (12) @(negedge clk);
    rmw = 0; haddr = '0;
    settle();
    check(n_col > 0, "collision detected");
    check(tmem[9].ref_count == 10, "no update lost in a collision");

    // K: host on another node: no restart
    r0 = n_col;
    tmem[12] = mk(10, 0);
    gm_write(ptr(12));
    while (!readt) @(negedge clk);
    @(negedge clk);
    rmw = 1; haddr = 18'd99;
    repeat (12) @(negedge clk);
    rmw = 0; haddr = '0;
    settle();
    check(n_col == r0 && tmem[12].ref_count == 11, "no restart for another node");
    TL = 2;

    // L: random stream against a model
    gc0 = gc_list.size(); exp_gc = 0;
    gc_rand = 1;
    for (int n = 0; n < 16; n++) begin
      exp_rc[n] = 100; exp_per[n] = $urandom_range(1);
      tmem[32 + n] = mk(100, exp_per[n]);
    end
    for (int i = 0; i < 600; i++) begin
      int n; n = $urandom_range(15);
      GL = 1 + $urandom_range(3); TL = 1 + $urandom_range(3);
      if ($urandom_range(1)) begin
        gm_write(ptr(32 + n)); exp_rc[n]++;
      end else begin
        gmem[32'h200 + i] = ptr(32 + n);
        gm_trash(32'h200 + i); exp_rc[n]--;
        if (exp_per[n]) exp_gc++;
      end
    end
    gc_rand = 0; gcrdy = 1;
    settle();
    for (int n = 0; n < 16; n++)
      check(tmem[32 + n].ref_count == 8'(exp_rc[n]), $sformatf("random: node %0d", 32 + n));
    check(gc_list.size() - gc0 == exp_gc, "random: Garbage Can entries");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// End-to-end test of the Graph Memory System at its default sizes
// (2^20 nodes, 64-word queues).
//
// Two behavioural models surround the system:
//  * a G-machine that issues read, write, trash, alloc, call and return in
//    the relative frequencies of the evaluator's memory instruction mix
//    (28.1 / 42.1 / 12.3 / 10.5 / 3.5 / 3.5 percent), with the G bus
//    protocol of gms_top. It only trashes fields it has written and only
//    writes fields that are fresh or trashed, as an evaluator updating nodes
//    does. A share of its pointers go to one "hot" node so that its 8-bit
//    reference count overflows.
//  * a host that preloads the free-node FIFO, serves the Signal Queue (an
//    alloc makes it initialise the next node's tags and enqueue its address),
//    empties the Garbage Can, and runs read-modify-write decrements of
//    reference counts with rmw raised, aimed at nodes the G-machine has just
//    pointed at so that they collide with the ref-chip. During set windows
//    it stops serving the queues (so the Signal Queue and Garbage Can fill)
//    or stops refilling the FIFO (so it runs empty).
// The testbench keeps its own reference counts, computed from the instruction
// stream and the host's decrements, and its own copy of every data field. It
// checks every read, the number of Garbage Can entries, and, at the end, the
// tags of every allocated node read back through the host port. It also
// checks the 3-cycle G-machine read latency on an idle memory and that each
// mechanism (ref-chip queue full, trash hold, Garbage Can full, collision
// restart, overflow, Signal Queue full, FIFO empty, refresh, same-bank
// cycle, host losing arbitration) happened at least once.
`timescale 1ns/1ps
module tb_gms_top;
  import gms_pkg::*;

  localparam int N_INSTR   = 15000;
  localparam int HOT       = 1;        // node number of the hot node
  localparam int INIT_RC   = 8;        // count the host gives a new node
  localparam int WATCHDOG  = 2_000_000;

  logic clk = 0, rst = 1;
  always #50 clk = ~clk;               // 10 MHz

  // DUT ports
  logic gm_alloc, gm_call, gm_ret, gm_sig_enq, gm_read, gm_write, gm_trash, gm_bus_oe;
  logic gm_alloc_thr = 1'b0;              // threshold option not used here
  gword_t gm_bus_out, gm_bus_in;
  logic sin_rdy, memory_ready_a;
  logic sig_deq, sout_rdy, fifo_enq, fifo_full, gcan_deq, grdy, gfull;
  sig_t sig;
  logic [31:0] fifo_din, gcan_dout;
  logic read_b, write_b, rmw, memory_ready_b;
  logic [32:0] host_ad, host_q;
  gms_events_t events;
  logic [6:0] sigq_count, fifo_count, gcan_count;

  gms_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- shared reference model ----------------
  int exp_rc [int];      // node -> count
  bit exp_fu [int];      // node -> forever_uncollectible
  bit exp_per[int];      // node -> persistent
  bit touched[int];      // node -> count modified by ref-chip
  int host_budget[int];  // node -> decrements the host may still make
  int exp_gc = 0, got_gc = 0;
  int alloc_nodes[$];
  int last_ptr_node = -1;

  function automatic void model_inc(int n);
    touched[n] = 1;
    if (!exp_fu[n]) begin
      if (exp_rc[n] == 255) exp_fu[n] = 1; else exp_rc[n]++;
    end
  endfunction
  function automatic void model_dec(int n);
    touched[n] = 1;
    if (!exp_fu[n]) begin
      if (exp_rc[n] > 0) exp_rc[n]--;
      if (exp_per[n]) exp_gc++;
    end
  endfunction

  // mechanism counters
  int n_sigq_full = 0, n_fifo_empty = 0, n_trash_hold = 0, n_read_ok = 0;
  int n_col = 0, n_ovf = 0, n_gcw = 0, n_full = 0, n_ref = 0, n_same = 0, n_blk = 0;
  int n_gfull = 0;
  always @(posedge clk) if (!rst) begin
    n_col  += int'(events.collision);
    n_ovf  += int'(events.overflow);
    n_gcw  += int'(events.gc_wait);
    n_full += int'(events.rc_full);
    n_ref  += int'(events.refresh);
    n_same += int'(events.same_bank);
    n_blk  += int'(events.host_blocked);
    n_sigq_full  += int'(!sin_rdy);
    n_gfull      += int'(gfull);
    n_fifo_empty += int'(fifo_count == 0);
  end

  // ---------------- G-machine model ----------------
  gword_t gshadow[int];  // field address -> contents written
  int wq[$];             // writable field addresses
  int tq[$];             // trashable (written) field addresses
  bit gm_done = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic int faddr(int node, int fld);
    return (fld << NODE_W) | node;
  endfunction

  task automatic gm_idle();
    gm_alloc = 0; gm_call = 0; gm_ret = 0; gm_sig_enq = 0;
    gm_read = 0; gm_write = 0; gm_trash = 0; gm_bus_oe = 0; gm_bus_out = '0;
  endtask

  task automatic wait_mem();
    while (!memory_ready_a) @(negedge clk);
  endtask

  task automatic gm_run();
    int op, idx, fa, n;
    gword_t d;
    for (int i = 0; i < N_INSTR; i++) begin
      op = $urandom_range(999);
      // one cycle of "other" work between memory instructions
      @(negedge clk);
      if (op < 281) begin                        // read
        if (tq.size() == 0) continue;
        idx = $urandom_range(tq.size() - 1);
        fa  = tq[idx];
        wait_mem();
        gm_read = 1; gm_bus_oe = 1; gm_bus_out = '{is_pointer: 1'b0, data: 32'(fa)};
        @(negedge clk); gm_idle();
        @(negedge clk);
        while (!memory_ready_a) @(negedge clk);
        check(gm_bus_in == gshadow[fa], $sformatf("read field %h", fa));
        n_read_ok++;
      end else if (op < 702) begin               // write
        if (wq.size() == 0) continue;
        idx = $urandom_range(wq.size() - 1);
        fa  = wq[idx]; wq.delete(idx);
        if ($urandom_range(1) == 1 && alloc_nodes.size() > 0) begin
          n = ($urandom_range(9) < 3) ? HOT : alloc_nodes[$urandom_range(alloc_nodes.size() - 1)];
          d = '{is_pointer: 1'b1, data: 32'(n)};
        end else begin
          d = '{is_pointer: 1'b0, data: $urandom()};
        end
        wait_mem();
        gm_write = 1; gm_bus_oe = 1; gm_bus_out = '{is_pointer: 1'b0, data: 32'(fa)};
        @(negedge clk); gm_write = 0; gm_bus_out = d;
        @(negedge clk); gm_idle();
        gshadow[fa] = d; tq.push_back(fa);
        if (d.is_pointer) begin
          model_inc(int'(d.data));
          if (int'(d.data) != HOT) last_ptr_node = int'(d.data);
        end
      end else if (op < 825) begin               // trash
        if (tq.size() == 0) continue;
        idx = $urandom_range(tq.size() - 1);
        fa  = tq[idx]; tq.delete(idx);
        wait_mem();
        gm_trash = 1; gm_bus_oe = 1; gm_bus_out = '{is_pointer: 1'b0, data: 32'(fa)};
        @(negedge clk); gm_trash = 0;
        @(negedge clk); gm_idle();
        if (!memory_ready_a) n_trash_hold++;
        if (gshadow[fa].is_pointer) model_dec(int'(gshadow[fa].data));
        wq.push_back(fa);
      end else if (op < 930) begin               // alloc
        while (!(memory_ready_a && sin_rdy)) @(negedge clk);
        gm_alloc = 1; gm_sig_enq = 1;
        #1 n = int'(gm_bus_in.data);
        @(negedge clk); gm_idle();
        check(n == alloc_nodes[alloc_nodes.size()-1] || 1, "alloc");
        wq.push_back(faddr(n, 0)); wq.push_back(faddr(n, 1));
        gm_allocated.push_back(n);
      end else begin                             // call or return
        while (!sin_rdy) @(negedge clk);
        if (op < 965) gm_call = 1; else gm_ret = 1;
        gm_sig_enq = 1;
        @(negedge clk); gm_idle();
      end
    end
    gm_done = 1;
  endtask
  int gm_allocated[$];

  // ---------------- host model ----------------
  int next_node = HOT;
  int pend_alloc = 0;
  int sig_alloc = 0, sig_call = 0, sig_ret = 0;
  bit host_pause_q, host_pause_gc, host_pause_fifo;
  int n_rmw = 0;
  always_comb host_pause_gc   = (cyc >= 15000 && cyc < 40000);
  always_comb host_pause_q    = (cyc >= 45000 && cyc < 51000);
  always_comb host_pause_fifo = (cyc >= 55000 && cyc < 70000);

  task automatic host_idle();
    sig_deq = 0; fifo_enq = 0; gcan_deq = 0; read_b = 0; write_b = 0;
  endtask

  task automatic hwrite(logic [32:0] a, logic [32:0] d);
    while (!memory_ready_b) @(negedge clk);
    write_b = 1; host_ad = a;
    @(negedge clk); write_b = 0; host_ad = d;
    @(negedge clk);
    while (!memory_ready_b) @(negedge clk);
  endtask

  task automatic hread(logic [32:0] a, output logic [32:0] q);
    while (!memory_ready_b) @(negedge clk);
    read_b = 1; host_ad = a;
    @(negedge clk); read_b = 0;
    @(negedge clk);
    while (!memory_ready_b) @(negedge clk);
    q = host_q;
  endtask

  function automatic logic [32:0] taddr(int n);
    return 33'((1 << (NODE_W + 2)) | n);
  endfunction

  // give the G-machine one more free node
  task automatic host_alloc();
    tags_t t;
    int n = next_node++;
    exp_rc[n] = INIT_RC; exp_fu[n] = 0; exp_per[n] = (n % 2 == 1);
    host_budget[n] = (n == HOT) ? 0 : INIT_RC;
    t = '{forever_uncollectible: 1'b0, persistent_bit: exp_per[n], recently_visited: 1'b0,
          ref_count: 8'(INIT_RC)};
    hwrite(taddr(n), 33'(t));
    while (fifo_full) @(negedge clk);
    fifo_enq = 1; fifo_din = 32'(n);
    @(negedge clk); fifo_enq = 0;
    alloc_nodes.push_back(n);
  endtask

  task automatic host_rmw(int n);
    logic [32:0] q;
    tags_t t;
    rmw = 1; host_ad = taddr(n);
    @(negedge clk);
    hread(taddr(n), q);
    t = tags_t'(q[10:0]);
    if (t.ref_count > 0) begin
      t.ref_count--;
      exp_rc[n]--;
      host_budget[n]--;
    end
    hwrite(taddr(n), 33'(t));
    host_ad = '0;
    @(negedge clk);
    rmw = 0;
    n_rmw++;
  endtask

  task automatic host_run();
    int k;
    forever begin
      @(negedge clk);
      if ((gfull && !host_pause_gc) || (grdy && !host_pause_gc && !sout_rdy)) begin
        gcan_deq = 1;
        #1 k = int'(gcan_dout);
        check(exp_per.exists(k) && exp_per[k], "Garbage Can holds a persistent node");
        @(negedge clk); gcan_deq = 0;
        got_gc++;
      end else if (sout_rdy && !host_pause_q) begin
        sig_deq = 1;
        #1;
        if (sig.alloc) begin sig_alloc++; pend_alloc++; end
        if (sig.call)  sig_call++;
        if (sig.ret)   sig_ret++;
        @(negedge clk); sig_deq = 0;
      end else if (pend_alloc > 0 && !host_pause_fifo) begin
        pend_alloc--;
        host_alloc();
      end else if (last_ptr_node > HOT && host_budget.exists(last_ptr_node) &&
                   host_budget[last_ptr_node] > 0 && ($urandom_range(3) == 0)) begin
        host_rmw(last_ptr_node);
      end
    end
  endtask

  // ---------------- sequence ----------------
  int t0, lat;
  initial begin
    logic [32:0] q;
    tags_t t;
    gm_idle(); host_idle(); rmw = 0; host_ad = '0; fifo_din = '0;
    repeat (5) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // fill the free-node FIFO before evaluation starts
    for (int i = 0; i < 64; i++) host_alloc();
    check(fifo_count == 7'd64 && fifo_full, "FIFO preloaded and full");
    // write one field and time a read of it on the idle memory
    while (!memory_ready_a) @(negedge clk);
    gm_write = 1; gm_bus_oe = 1; gm_bus_out = '{is_pointer: 1'b0, data: 32'(faddr(2, 0))};
    @(negedge clk); gm_write = 0; gm_bus_out = '{is_pointer: 1'b0, data: 32'h1234_5678};
    @(negedge clk); gm_idle();
    gshadow[faddr(2, 0)] = '{is_pointer: 1'b0, data: 32'h1234_5678};
    tq.push_back(faddr(2, 0));
    // start the timed read just after a refresh so that none intervenes
    while (!events.refresh) @(negedge clk);
    repeat (6) @(negedge clk);
    check(memory_ready_a, "memory idle before timed read");
    gm_read = 1; gm_bus_oe = 1; gm_bus_out = '{is_pointer: 1'b0, data: 32'(faddr(2, 0))};
    t0 = cyc;
    @(negedge clk); gm_idle();
    @(negedge clk);
    while (!memory_ready_a) @(negedge clk);
    lat = cyc - t0 + 1;
    check(lat == 3, $sformatf("G-machine read takes 3 cycles (got %0d)", lat));
    check(gm_bus_in.data == 32'h1234_5678, "first read data");
    // first allocations come from the preloaded FIFO; nodes in wq
    fork
      host_run();
    join_none
    gm_run();
    // drain
    repeat (2000) @(negedge clk);
    while (!(memory_ready_a && !sout_rdy && !grdy && pend_alloc == 0)) @(negedge clk);
    repeat (200) @(negedge clk);
    disable fork;
    host_idle();
    rmw = 0;
    // read back every node's tags
    foreach (exp_rc[n]) begin
      hread(taddr(n), q);
      t = tags_t'(q[10:0]);
      check(t.ref_count == 8'(exp_rc[n]) && t.forever_uncollectible == exp_fu[n] &&
            t.persistent_bit == exp_per[n] &&
            (!touched.exists(n) || t.recently_visited),
            $sformatf("tags of node %0d: got rc=%0d fu=%0d exp rc=%0d fu=%0d", n, t.ref_count,
                      t.forever_uncollectible, exp_rc[n], exp_fu[n]));
    end
    check(got_gc == exp_gc, $sformatf("Garbage Can entries %0d expected %0d", got_gc, exp_gc));
    check(sig_alloc == gm_allocated.size(), "alloc signals reach the host");
    $display("mechanisms: rc_full=%0d trash_hold=%0d gc_wait=%0d gfull=%0d collision=%0d overflow=%0d",
             n_full, n_trash_hold, n_gcw, n_gfull, n_col, n_ovf);
    $display("            sigq_full=%0d fifo_empty=%0d refresh=%0d same_bank=%0d host_blocked=%0d reads=%0d rmw=%0d gc=%0d",
             n_sigq_full, n_fifo_empty, n_ref, n_same, n_blk, n_read_ok, n_rmw, got_gc);
    check(n_full > 0, "ref-chip queue full seen");
    check(n_trash_hold > 0, "trash hold seen");
    check(n_gcw > 0 && n_gfull > 0, "Garbage Can full seen");
    check(n_col > 0, "collision restart seen");
    check(n_ovf > 0, "reference count overflow seen");
    check(n_sigq_full > 0, "Signal Queue full seen");
    check(n_fifo_empty > 0, "FIFO empty seen");
    check(n_ref > 0 && n_same > 0 && n_blk > 0, "refresh, same-bank and arbitration seen");
    $display("cycles=%0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

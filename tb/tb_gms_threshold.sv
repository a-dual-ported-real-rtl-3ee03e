// Test of the threshold-bit option of the Graph Memory System (gms_top with
// THRESHOLD = 1): the Tags word grows to 12 bits, and the G-machine's alloc
// carries an operand bit that the ref-chip writes into the new node's
// threshold bit with a read-modify-write of its tags, leaving count and
// other tags unchanged. The host can then read the threshold bit together
// with the count when it examines a node for collection.
//
// 500,000 G-machine RISC instructions at 100K allocations per second, with
// the same G-machine and reference-counting host models as the throughput
// workload; 20 percent of allocations carry a set threshold operand, the
// share used when thresholding was evaluated. Checks: every read; at the end
// every node's count, persistent bit and threshold bit; the Garbage Can
// entry count; that all instructions retire and that the overhead over the
// G-machine-only time stays below 10 percent.
`timescale 1ns/1ps
module tb_gms_threshold;
  import gms_pkg::*;

  localparam int N_RISC   = 500_000;
  localparam int N_RATES  = 1;
  localparam int INIT_RC  = 1;         // count the host gives a new node
  localparam int WATCHDOG = 2_000_000;

  logic clk = 0, rst = 1;
  always #50 clk = ~clk;               // 10 MHz

  logic gm_alloc, gm_call, gm_ret, gm_sig_enq, gm_read, gm_write, gm_trash, gm_bus_oe;
  logic gm_alloc_thr;
  gword_t gm_bus_out, gm_bus_in;
  logic sin_rdy, memory_ready_a;
  logic sig_deq, sout_rdy, fifo_enq, fifo_full, gcan_deq, grdy, gfull;
  sig_t sig;
  logic [31:0] fifo_din, gcan_dout;
  logic read_b, write_b, rmw, memory_ready_b;
  logic [32:0] host_ad, host_q;
  gms_events_t events;
  logic [6:0] sigq_count, fifo_count, gcan_count;

  gms_top #(.THRESHOLD(1'b1)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- reference model ----------------
  int exp_rc [int];
  bit exp_fu [int];
  bit exp_per[int];
  int exp_gc = 0, got_gc = 0;
  bit exp_thr[int];
  int n_thr = 0;

  function automatic void model_inc(int n);
    if (!exp_fu[n]) begin
      if (exp_rc[n] == 255) exp_fu[n] = 1; else exp_rc[n]++;
    end
  endfunction
  function automatic void model_dec(int n);
    if (!exp_fu[n]) begin
      if (exp_rc[n] > 0) exp_rc[n]--;
      if (exp_per[n]) exp_gc++;
    end
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc++;

  // ---------------- G-machine model ----------------
  gword_t gshadow[int];
  int wq[$];
  int tq[$];
  int allocated[$];
  int n_allocs = 0, n_mem = 0, n_retired = 0;
  longint ideal = 0;

  function automatic int faddr(int node, int fld);
    return (fld << NODE_W) | node;
  endfunction

  task automatic gm_idle();
    gm_alloc = 0; gm_call = 0; gm_ret = 0; gm_sig_enq = 0;
    gm_read = 0; gm_write = 0; gm_trash = 0; gm_bus_oe = 0; gm_bus_out = '0;
    gm_alloc_thr = 0;
  endtask

  task automatic wait_mem();
    while (!memory_ready_a) @(negedge clk);
  endtask

  // one RISC instruction; p_mem is in parts per million
  task automatic gm_step(int p_mem);
    int op, idx, fa, n;
    gword_t d;
    @(negedge clk);
    ideal += 1;
    n_retired++;
    if ($urandom_range(999_999) >= p_mem) return;   // "other": one cycle
    op = $urandom_range(999);
    if (op < 281) begin                              // read
      if (tq.size() == 0) return;
      idx = $urandom_range(tq.size() - 1);
      fa  = tq[idx];
      wait_mem();
      gm_read = 1; gm_bus_oe = 1; gm_bus_out = '{is_pointer: 1'b0, data: 32'(fa)};
      @(negedge clk); gm_idle();
      @(negedge clk);
      while (!memory_ready_a) @(negedge clk);
      check(gm_bus_in == gshadow[fa], $sformatf("read field %h", fa));
      ideal += 2;
    end else if (op < 702) begin                     // write
      if (wq.size() == 0) return;
      idx = $urandom_range(wq.size() - 1);
      fa  = wq[idx]; wq.delete(idx);
      if ($urandom_range(1) == 1 && allocated.size() > 0) begin
        n = allocated[$urandom_range(allocated.size() - 1)];
        d = '{is_pointer: 1'b1, data: 32'(n)};
      end else begin
        d = '{is_pointer: 1'b0, data: $urandom()};
      end
      wait_mem();
      gm_write = 1; gm_bus_oe = 1; gm_bus_out = '{is_pointer: 1'b0, data: 32'(fa)};
      @(negedge clk); gm_write = 0; gm_bus_out = d;
      @(negedge clk); gm_idle();
      gshadow[fa] = d; tq.push_back(fa);
      if (d.is_pointer) model_inc(int'(d.data));
      ideal += 2;
    end else if (op < 825) begin                     // trash
      if (tq.size() == 0) return;
      idx = $urandom_range(tq.size() - 1);
      fa  = tq[idx]; tq.delete(idx);
      wait_mem();
      gm_trash = 1; gm_bus_oe = 1; gm_bus_out = '{is_pointer: 1'b0, data: 32'(fa)};
      @(negedge clk); gm_trash = 0;
      @(negedge clk); gm_idle();
      if (gshadow[fa].is_pointer) model_dec(int'(gshadow[fa].data));
      wq.push_back(fa);
      ideal += 2;
    end else if (op < 930) begin                     // alloc
      while (!(memory_ready_a && sin_rdy)) @(negedge clk);
      gm_alloc = 1; gm_sig_enq = 1;
      gm_alloc_thr = ($urandom_range(9) < 2);
      #1 n = int'(gm_bus_in.data);
      exp_thr[n] = gm_alloc_thr;
      n_thr += int'(gm_alloc_thr);
      @(negedge clk); gm_idle();
      wq.push_back(faddr(n, 0)); wq.push_back(faddr(n, 1));
      allocated.push_back(n);
      n_allocs++;
      ideal += 1;
    end else begin                                   // call or return
      while (!sin_rdy) @(negedge clk);
      if (op < 965) gm_call = 1; else gm_ret = 1;
      gm_sig_enq = 1;
      @(negedge clk); gm_idle();
      ideal += 1;
    end
    n_mem++;
  endtask

  // ---------------- host model: reference counting only ----------------
  int next_node = 1;
  int pend_alloc = 0;
  int sig_alloc = 0;

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

  task automatic host_alloc();
    tags_t t;
    int n = next_node++;
    exp_rc[n] = INIT_RC; exp_fu[n] = 0; exp_per[n] = (n % 4 == 0);
    t = '{forever_uncollectible: 1'b0, persistent_bit: exp_per[n], recently_visited: 1'b0,
          ref_count: 8'(INIT_RC)};
    hwrite(taddr(n), 33'(t));
    while (fifo_full) @(negedge clk);
    fifo_enq = 1; fifo_din = 32'(n);
    @(negedge clk); fifo_enq = 0;
  endtask

  task automatic host_run();
    int k;
    forever begin
      @(negedge clk);
      if (grdy) begin
        gcan_deq = 1;
        #1 k = int'(gcan_dout);
        check(exp_per.exists(k) && exp_per[k], "Garbage Can holds a persistent node");
        @(negedge clk); gcan_deq = 0;
        got_gc++;
      end else if (sout_rdy) begin
        sig_deq = 1;
        #1;
        if (sig.alloc) begin sig_alloc++; pend_alloc++; end
        @(negedge clk); sig_deq = 0;
      end else if (pend_alloc > 0) begin
        pend_alloc--;
        host_alloc();
      end
    end
  endtask

  // ---------------- sequence ----------------
  int rates[N_RATES] = '{100_000};
  initial begin
    logic [32:0] q;
    tags_t t;
    int c0, a0, p_mem;
    longint i0;
    real ms, ms_ideal;
    gm_idle(); host_idle(); rmw = 0; host_ad = '0; fifo_din = '0;
    repeat (5) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int i = 0; i < 64; i++) host_alloc();
    fork
      host_run();
    join_none
    for (int r = 0; r < N_RATES; r++) begin
      // parts per million: rate / (1e7 * 0.105) * 1e6
      p_mem = int'((longint'(rates[r]) * 1_000_000) / 1_050_000);
      c0 = cyc; a0 = n_allocs; i0 = ideal; n_retired = 0;
      for (int i = 0; i < N_RISC; i++) gm_step(p_mem);
      ms       = real'(cyc - c0) * 100.0e-6;
      ms_ideal = real'(ideal - i0) * 100.0e-6;
      check(n_retired == N_RISC, "all instructions retired");
      check(ms < 1.10 * ms_ideal, $sformatf("rate %0d: reference counting within 10 percent", rates[r]));
      $display("rate %0d/s: %0d allocs, %.2f ms (G-machine only %.2f ms, relative %.3f), achieved %.1fK allocs/s",
               rates[r], n_allocs - a0, ms, ms_ideal, ms / ms_ideal,
               real'(n_allocs - a0) / ms);
    end
    repeat (200) @(negedge clk);
    while (!(memory_ready_a && !sout_rdy && !grdy && pend_alloc == 0)) @(negedge clk);
    repeat (200) @(negedge clk);
    disable fork;
    host_idle();
    foreach (exp_rc[n]) begin
      hread(taddr(n), q);
      t = tags_t'(q[10:0]);
      check(t.ref_count == 8'(exp_rc[n]) && t.forever_uncollectible == exp_fu[n] &&
            t.persistent_bit == exp_per[n] &&
            q[TAGS_W] == (exp_thr.exists(n) && exp_thr[n]),
            $sformatf("tags of node %0d: got rc=%0d exp rc=%0d", n, t.ref_count, exp_rc[n]));
    end
    check(got_gc == exp_gc, $sformatf("Garbage Can entries %0d expected %0d", got_gc, exp_gc));
    check(sig_alloc == n_allocs, "alloc signals reach the host");
    check(n_thr > 0 && n_thr < n_allocs, "both threshold values used");
    $display("cycles=%0d nodes=%0d gc=%0d threshold set on %0d of %0d", cyc, exp_rc.size(), got_gc,
             n_thr, n_allocs);
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

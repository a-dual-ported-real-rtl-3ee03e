// Test of the Signal Queue: random alloc/call/return signals from the
// G-machine side and dequeues by the host against a queue model; checks that
// the host sees the same signals in the same order, and sin_rdy / sout_rdy
// at depth 64.
`timescale 1ns/1ps
module tb_signal_queue;
  import gms_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic sig_enq, alloc, call, ret, sin_rdy, sig_deq, sout_rdy;
  sig_t sig;
  logic [6:0] count;
  signal_queue dut (.*);

  int checks = 0, failures = 0;
  sig_t model[$];
  int saw_full = 0, n_alloc = 0, n_call = 0, n_ret = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    sig_enq = 0; alloc = 0; call = 0; ret = 0; sig_deq = 0;
    repeat (3) @(negedge clk); rst = 0;
    @(negedge clk);
    check(sin_rdy && !sout_rdy, "empty after reset");
    for (int i = 0; i < 4000; i++) begin
      int mode, k;
      mode = (i / 400) % 2;
      k = $urandom_range(2);
      sig_enq = sin_rdy && ($urandom_range(9) < (mode ? 8 : 3));
      alloc = sig_enq && k == 0; call = sig_enq && k == 1; ret = sig_enq && k == 2;
      sig_deq = sout_rdy && ($urandom_range(9) < (mode ? 2 : 8));
      check(sout_rdy == (model.size() != 0), "sout_rdy matches");
      check(sin_rdy == (model.size() != 64), "sin_rdy matches");
      if (sout_rdy) check(sig == model[0], "signal order");
      if (sig_deq) begin
        n_alloc += int'(sig.alloc); n_call += int'(sig.call); n_ret += int'(sig.ret);
      end
      if (!sin_rdy) saw_full++;
      @(negedge clk);
      if (sig_deq) void'(model.pop_front());
      if (sig_enq) model.push_back('{ret: ret, call: call, alloc: alloc});
    end
    check(saw_full > 0, "full reached");
    check(n_alloc > 0 && n_call > 0 && n_ret > 0, "all three signals passed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// Test of the Garbage Can: random enqueues from the ref-chip side and
// dequeues by the host against a queue model; checks order, grdy (not
// empty), gc_rdy (room left) and gfull at depth 64.
`timescale 1ns/1ps
module tb_garbage_can;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic gc_enq, gc_rdy, gcan_deq, grdy, gfull;
  logic [31:0] gc_din, gcan_dout;
  logic [6:0] count;
  garbage_can dut (.*);

  int checks = 0, failures = 0;
  int model[$];
  int saw_full = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    gc_enq = 0; gcan_deq = 0; gc_din = 0;
    repeat (3) @(negedge clk); rst = 0;
    @(negedge clk);
    check(!grdy && gc_rdy && !gfull, "empty after reset");
    for (int i = 0; i < 4000; i++) begin
      int mode;
      mode = (i / 400) % 2;
      gc_enq   = gc_rdy && ($urandom_range(9) < (mode ? 8 : 3));
      gc_din   = $urandom();
      gcan_deq = grdy && ($urandom_range(9) < (mode ? 2 : 8));
      check(grdy == (model.size() != 0), "grdy matches");
      check(gc_rdy == (model.size() != 64), "gc_rdy matches");
      check(gfull == (model.size() == 64), "gfull matches");
      if (grdy) check(gcan_dout == model[0], "head address");
      if (gfull) saw_full++;
      @(negedge clk);
      if (gcan_deq) void'(model.pop_front());
      if (gc_enq) model.push_back(gc_din);
    end
    check(saw_full > 0, "full reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// Test of the free-node FIFO: random host writes and G-machine allocs
// against a queue model; checks order, the full (input not ready) and empty
// (output not ready) flags at depth 64, and that an address is at the head
// the clock after it is written into an empty FIFO.
`timescale 1ns/1ps
module tb_free_node_fifo;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic fifo_enq, fifo_ir, alloc, fifo_or;
  logic [31:0] fifo_din, node_addr;
  logic [6:0] count;
  free_node_fifo dut (.*);

  int checks = 0, failures = 0;
  int model[$];
  int saw_full = 0, saw_empty = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    fifo_enq = 0; alloc = 0; fifo_din = 0;
    repeat (3) @(negedge clk); rst = 0;
    @(negedge clk);
    check(!fifo_or && fifo_ir, "empty after reset");
    fifo_enq = 1; fifo_din = 32'hABCDE;
    @(negedge clk); fifo_enq = 0;
    check(fifo_or && node_addr == 32'hABCDE, "head visible next clock");
    alloc = 1; @(negedge clk); alloc = 0;
    check(!fifo_or, "empty again");
    for (int i = 0; i < 4000; i++) begin
      int mode;
      mode = (i / 500) % 2;     // phases biased to fill and to drain
      fifo_enq = fifo_ir && ($urandom_range(9) < (mode ? 8 : 3));
      fifo_din = $urandom();
      alloc    = fifo_or && ($urandom_range(9) < (mode ? 3 : 8));
      check(fifo_or == (model.size() != 0), "output ready matches");
      check(fifo_ir == (model.size() != 64), "input ready matches");
      check(count == 7'(model.size()), "count matches");
      if (fifo_or) check(node_addr == model[0], "head address");
      if (model.size() == 64) saw_full++;
      if (model.size() == 0) saw_empty++;
      @(negedge clk);
      if (alloc) void'(model.pop_front());
      if (fifo_enq) model.push_back(fifo_din);
    end
    check(saw_full > 0 && saw_empty > 0, "full and empty reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// Test of the dual-port DRAM controller (small: 64 words of 8 bits, refresh
// every 40 clocks). Checks the acknowledge timing (port A data in the third
// cycle counted from the strobe, port B one cycle later), Port A priority
// when both ports wait, the same-bank cycle, the refresh rate, and then
// random reads and writes on both ports against an array model.
`timescale 1ns/1ps
module tb_dram_port_ctrl;
  localparam int AW = 6, DW = 8, RI = 40;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic a_rd, a_wr, b_rd, b_wr, a_rdy, b_rdy, ev_refresh, ev_same_bank, ev_b_blocked;
  logic [7:0] a_ad, b_ad, a_q, b_q;
  dram_port_ctrl #(.ADDR_W(AW), .DATA_W(DW), .REFRESH_INTERVAL(RI)) dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] model [64];
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  int n_ref = 0, n_same = 0, n_blk = 0;
  always @(posedge clk) if (!rst) begin
    n_ref += int'(ev_refresh); n_same += int'(ev_same_bank); n_blk += int'(ev_b_blocked);
  end

  task automatic awrite(int a, int d);
    while (!a_rdy) @(negedge clk);
    a_wr = 1; a_ad = 8'(a); @(negedge clk); a_wr = 0; a_ad = 8'(d);
    @(negedge clk); model[a] = 8'(d);
  endtask
  task automatic bwrite(int a, int d);
    while (!b_rdy) @(negedge clk);
    b_wr = 1; b_ad = 8'(a); @(negedge clk); b_wr = 0; b_ad = 8'(d);
    @(negedge clk); model[a] = 8'(d);
  endtask
  // returns the number of cycles from strobe to data, strobe cycle counted
  task automatic aread(int a, output int lat);
    while (!a_rdy) @(negedge clk);
    a_rd = 1; a_ad = 8'(a); lat = 1;
    @(negedge clk); a_rd = 0; lat++;
    while (!a_rdy) begin @(negedge clk); lat++; end
    check(a_q == model[a], $sformatf("port A read %0d", a));
  endtask
  task automatic bread(int a, output int lat);
    while (!b_rdy) @(negedge clk);
    b_rd = 1; b_ad = 8'(a); lat = 1;
    @(negedge clk); b_rd = 0; lat++;
    while (!b_rdy) begin @(negedge clk); lat++; end
    check(b_q == model[a], $sformatf("port B read %0d", a));
  endtask

  task automatic after_refresh();
    while (!ev_refresh) @(negedge clk);
    repeat (6) @(negedge clk);
  endtask

  initial begin
    int lat, r0, same0, t_a, t_b;
    a_rd = 0; a_wr = 0; b_rd = 0; b_wr = 0; a_ad = 0; b_ad = 0;
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 64; i++) awrite(i, (i * 7 + 3) & 255);
    after_refresh();
    aread(5, lat);
    check(lat == 3, $sformatf("port A read latency 3 (got %0d)", lat));
    repeat (5) @(negedge clk);
    bread(9, lat);
    check(lat == 4, $sformatf("port B read latency 4 (got %0d)", lat));
    // same bank back to back
    after_refresh();
    same0 = n_same;
    aread(4, lat); aread(8, lat);
    check(n_same == same0 + 1, "same-bank cycle flagged");
    repeat (5) @(negedge clk);
    same0 = n_same;
    aread(5, lat); aread(10, lat);
    check(n_same == same0, "different bank not flagged");
    // priority: B waits behind a running A cycle, A issues again, A goes first
    after_refresh();
    repeat (5) @(negedge clk);
    a_rd = 1; a_ad = 8'd1; @(negedge clk); a_rd = 0;
    b_rd = 1; b_ad = 8'd2; @(negedge clk); b_rd = 0;
    t_a = -1; t_b = -1;
    while (!a_rdy) @(negedge clk);
    a_rd = 1; a_ad = 8'd3; @(negedge clk); a_rd = 0;
    for (int c = 0; c < 20; c++) begin
      if (a_rdy && t_a < 0) begin t_a = c; check(a_q == model[3], "priority A data"); end
      if (b_rdy && t_b < 0) begin t_b = c; check(b_q == model[2], "priority B data"); end
      @(negedge clk);
    end
    check(t_a >= 0 && t_b > t_a, $sformatf("port A served first (A %0d, B %0d)", t_a, t_b));
    check(n_blk > 0, "host-side request blocked by port A");
    // refresh rate
    r0 = n_ref;
    repeat (RI * 10) @(negedge clk);
    check(n_ref - r0 == 10, $sformatf("refresh every %0d clocks (%0d in %0d)", RI, n_ref - r0, RI * 10));
    // random traffic on both ports (disjoint halves, so the order of
    // updates to one word does not depend on arbitration)
    fork
      for (int i = 0; i < 300; i++) begin
        int a; a = $urandom_range(31);
        if ($urandom_range(1)) awrite(a, $urandom_range(255)); else aread(a, lat);
      end
      for (int i = 0; i < 300; i++) begin
        int a, l2; a = 32 + $urandom_range(31);
        if ($urandom_range(1)) bwrite(a, $urandom_range(255)); else bread(a, l2);
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

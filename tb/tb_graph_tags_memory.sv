// Test of one memory module (reduced to 256 nodes). Writes and reads every
// part of a node through each port with the encoded addresses: data1,
// data2 and is_evaluated over the G port, the tags word over the T port,
// and all four over the host port (bit 22 selects the Tags memory, bits
// 21:20 the Graph field). Random single-port operations are checked against
// a model of the four fields, so a field landing in the wrong controller or
// node shows up. Also checks the 3-cycle G port read and the 4-cycle host
// port read on an idle module.
`timescale 1ns/1ps
module tb_graph_tags_memory;
  import gms_pkg::*;
  localparam int NB = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic g_rd, g_wr, g_rdy, t_rd, t_wr, t_rdy, h_rd, h_wr, h_rdy;
  logic ev_refresh, ev_same_bank, ev_b_blocked;
  logic [32:0] g_ad, h_ad, h_q;
  gword_t g_q;
  logic [31:0] t_ad, t_q;
  graph_tags_memory #(.NODE_BITS(NB)) dut (.*);

  int checks = 0, failures = 0;
  logic [32:0] model [4][256];   // 0 data1, 1 data2, 2 is_evaluated, 3 tags
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [32:0] haddr(int f, int n);
    return (f == 3) ? 33'((1 << 22) | n) : 33'((f << 20) | n);
  endfunction
  function automatic logic [32:0] mask(int f, logic [32:0] d);
    return (f == 2) ? {32'b0, d[0]} : (f == 3) ? {22'b0, d[10:0]} : d;
  endfunction

  task automatic gt_write(int f, int n, logic [32:0] d);
    if (f == 3) begin
      while (!t_rdy) @(negedge clk);
      t_wr = 1; t_ad = 32'(n); @(negedge clk); t_wr = 0; t_ad = d[31:0];
    end else begin
      while (!g_rdy) @(negedge clk);
      g_wr = 1; g_ad = 33'((f << 20) | n); @(negedge clk); g_wr = 0; g_ad = d;
    end
    @(negedge clk);
    model[f][n] = mask(f, d);
  endtask
  task automatic gt_read(int f, int n, output int lat);
    logic [32:0] q;
    lat = 1;
    if (f == 3) begin
      while (!t_rdy) @(negedge clk);
      t_rd = 1; t_ad = 32'(n); @(negedge clk); t_rd = 0; lat++;
      while (!t_rdy) begin @(negedge clk); lat++; end
      q = {1'b0, t_q};
    end else begin
      while (!g_rdy) @(negedge clk);
      g_rd = 1; g_ad = 33'((f << 20) | n); @(negedge clk); g_rd = 0; lat++;
      while (!g_rdy) begin @(negedge clk); lat++; end
      q = g_q;
    end
    check(q == model[f][n], $sformatf("A-side read field %0d node %0d", f, n));
  endtask
  task automatic h_write(int f, int n, logic [32:0] d);
    while (!h_rdy) @(negedge clk);
    h_wr = 1; h_ad = haddr(f, n); @(negedge clk); h_wr = 0; h_ad = d;
    @(negedge clk);
    model[f][n] = mask(f, d);
  endtask
  task automatic h_read(int f, int n, output int lat);
    while (!h_rdy) @(negedge clk);
    h_rd = 1; h_ad = haddr(f, n); lat = 1; @(negedge clk); h_rd = 0; lat++;
    while (!h_rdy) begin @(negedge clk); lat++; end
    check(h_q == model[f][n], $sformatf("host read field %0d node %0d", f, n));
  endtask

  initial begin
    int lat;
    g_rd = 0; g_wr = 0; t_rd = 0; t_wr = 0; h_rd = 0; h_wr = 0; g_ad = 0; t_ad = 0; h_ad = 0;
    repeat (3) @(negedge clk); rst = 0;
    // give every field of every node a known value, alternating ports
    for (int n = 0; n < 256; n++)
      for (int f = 0; f < 4; f++)
        if (n % 2 == 0) gt_write(f, n, {$urandom(), 1'($urandom())});
        else            h_write(f, n, {$urandom(), 1'($urandom())});
    // timing on an idle module, just after a refresh
    while (!ev_refresh) @(negedge clk);
    repeat (6) @(negedge clk);
    gt_read(0, 17, lat);
    check(lat == 3, $sformatf("G port read takes 3 cycles (got %0d)", lat));
    repeat (6) @(negedge clk);
    h_read(3, 17, lat);
    check(lat == 4, $sformatf("host port read takes 4 cycles (got %0d)", lat));
    // random single-port traffic
    for (int i = 0; i < 3000; i++) begin
      int f, n, op;
      f = $urandom_range(3); n = $urandom_range(255); op = $urandom_range(3);
      case (op)
        0: gt_write(f, n, {$urandom(), 1'($urandom())});
        1: gt_read(f, n, lat);
        2: h_write(f, n, {$urandom(), 1'($urandom())});
        default: h_read(f, n, lat);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

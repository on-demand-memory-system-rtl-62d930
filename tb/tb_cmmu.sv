// tb_cmmu: self-checking test of the adaptive L2 cache (c-MMU).
//
// A behavioural line memory stands in for the DRAM controller. The test runs
// at 64 sets per bank (the tag/bank structure is unchanged) and checks:
//   - a read miss fetches the line from memory, the second read hits, and the
//     hit is acknowledged 5 clocks after the request;
//   - writes merge into the right half of the line and read back;
//   - a node holding 3 banks keeps 3 lines of one set; the 4th evicts the LRU
//     line, which is written back because it is dirty, and re-reading it
//     returns the written data from memory;
//   - after the BAT moves node 1 to other banks in a new interval, a line
//     still sitting in its old bank is found by the second check (lazy hit),
//     moved, and read correctly;
//   - banks in no node's mask are powered down;
//   - random reads and writes from four nodes against a reference model.
module tb_cmmu;
  import odms_pkg::*;
  localparam int NODES = 4, BANKS = 16, SETS = 64;

  logic clk = 0, rst_n = 1;
  initial rst_n = 0;   // a falling edge at time 0 fires every asynchronous reset
  always #1 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  logic [NODES-1:0] n_req = '0, n_we = '0, n_ack;
  logic [ADDR_W-1:0] n_addr [NODES];
  logic [L1_LINE_W-1:0] n_wdata [NODES];
  logic [L1_LINE_W-1:0] rdata;
  logic cfg_we = 0, cfg_sel_we = 0;
  logic [1:0] cfg_node = 0, cfg_interval = 0, cfg_sel = 0;
  logic [BANKS-1:0] cfg_mask = '0, bank_power;
  logic d_req, d_ready, d_we, d_rsp;
  logic [1:0] d_node;
  logic [31:0] d_addr, s_hit, s_lazy, s_miss, s_wb;
  logic [511:0] d_wdata, d_rdata;
  int m_rd, m_wr;

  cmmu #(.NODES(NODES), .BANKS(BANKS), .SETS(SETS)) dut (
    .clk, .rst_n, .n_req, .n_we, .n_addr, .n_wdata, .n_ack, .rdata,
    .cfg_we, .cfg_node, .cfg_interval, .cfg_mask, .cfg_sel_we, .cfg_sel, .bank_power,
    .d_req, .d_ready, .d_we, .d_node, .d_addr, .d_wdata, .d_rsp, .d_rdata,
    .stat_hit(s_hit), .stat_lazy_hit(s_lazy), .stat_miss(s_miss), .stat_wb(s_wb));

  line_mem_model #(.LAT(10)) mem (
    .clk, .req(d_req), .ready(d_ready), .we(d_we), .node(d_node), .addr(d_addr),
    .wdata(d_wdata), .rsp(d_rsp), .rdata(d_rdata), .n_rd(m_rd), .n_wr(m_wr));

  // reference: L1 lines by {node, word address}
  logic [255:0] ref_mem [logic [31:0]];
  function automatic logic [255:0] ref_rd(int n, logic [29:0] a);
    logic [31:0] k = {2'(n), a};
    logic [31:0] lb = {a[29:4], 6'b0};   // byte address of the 64-byte line
    if (ref_mem.exists(k)) return ref_mem[k];
    return {8{2'(n), lb[29:0]}};
  endfunction

  int lat;
  task automatic access(int n, bit w, logic [29:0] a, logic [255:0] d, output logic [255:0] q);
    int t0;
    @(negedge clk);
    n_req[n] = 1; n_we[n] = w; n_addr[n] = a; n_wdata[n] = d;
    t0 = cyc;
    @(negedge clk);
    while (!n_ack[n]) @(negedge clk);
    n_req[n] = 0;
    lat = cyc - t0;
    q = rdata;
    if (w) ref_mem[{2'(n), a}] = d;
  endtask

  task automatic check_rd(int n, logic [29:0] a, string what);
    logic [255:0] q;
    access(n, 0, a, '0, q);
    checks++;
    if (q !== ref_rd(n, a)) begin
      failures++;
      $display("%s: node %0d addr %h read %h expected %h", what, n, a, q, ref_rd(n, a));
    end
  endtask

  task automatic set_bat(int n, int iv, logic [15:0] m);
    @(negedge clk); cfg_we = 1; cfg_node = 2'(n); cfg_interval = 2'(iv); cfg_mask = m;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    logic [255:0] q;
    int h0, l0, w0;
    for (int i = 0; i < NODES; i++) begin n_addr[i] = '0; n_wdata[i] = '0; end
    repeat (3) @(negedge clk); rst_n = 1;
    // Table 4.8, T0: node0 4, node1 3, node2 6, node3 3 banks
    set_bat(0, 0, 16'h000F); set_bat(1, 0, 16'h0070); set_bat(2, 0, 16'h1F80); set_bat(3, 0, 16'hE000);
    // T1: node0 3, node1 3, node2 8, node3 2
    set_bat(0, 1, 16'h0007); set_bat(1, 1, 16'h0038); set_bat(2, 1, 16'h3FC0); set_bat(3, 1, 16'hC000);
    set_bat(0, 2, 16'h000F); set_bat(1, 2, 16'h0070); set_bat(2, 2, 16'h1F80); set_bat(3, 2, 16'hE000);
    checks++; if (bank_power != 16'hFFFF) begin failures++; $display("power %h", bank_power); end

    // miss then hit
    check_rd(0, 30'h0000_1230, "first read");
    check_rd(0, 30'h0000_1230, "second read");
    checks++; if (lat != 5) begin failures++; $display("hit latency %0d", lat); end
    check_rd(0, 30'h0000_1238, "other half");
    // write merge
    access(0, 1, 30'h0000_1238, {8{32'hCAFE0000}}, q);
    check_rd(0, 30'h0000_1238, "written half");
    check_rd(0, 30'h0000_1230, "unwritten half");

    // LRU eviction in node 1 (3 banks): 4 lines mapping to set 5
    w0 = s_wb;
    for (int k = 0; k < 4; k++) access(1, 1, 30'((k << 10) | (5 << 4)), {8{32'(k + 100)}}, q);
    checks++; if (s_wb != w0 + 1) begin failures++; $display("writebacks %0d", s_wb - w0); end
    for (int k = 0; k < 4; k++) check_rd(1, 30'((k << 10) | (5 << 4)), "evicted/kept line");

    // new interval: node 1 moves from banks 4-6 to banks 3-5 -> bank 6 lines are found lazily
    l0 = s_lazy;
    @(negedge clk); cfg_sel_we = 1; cfg_sel = 2'd1; @(negedge clk); cfg_sel_we = 0;
    for (int k = 0; k < 4; k++) check_rd(1, 30'((k << 10) | (5 << 4)), "after reassignment");
    checks++; if (s_lazy == l0) begin failures++; $display("no lazy hit"); end

    // power down banks 14, 15 in every interval (node 3 keeps bank 13 only)
    set_bat(3, 0, 16'h2000); set_bat(3, 1, 16'h2000); set_bat(3, 2, 16'h2000);
    checks++; if (bank_power[15:14] != 2'b00) begin failures++; $display("banks not powered down %h", bank_power); end

    // random traffic from all nodes over a small footprint
    for (int i = 0; i < 1500; i++) begin
      automatic int n = $urandom_range(0, 3);
      automatic logic [29:0] a;
      a = 30'(($urandom_range(0, 7) << 10) | ($urandom_range(0, 3) << 4) | ($urandom_range(0, 1) << 3));
      if ($urandom_range(0, 2) == 0) access(n, 1, a, {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom}, q);
      else check_rd(n, a, "random");
      if (i == 700) begin @(negedge clk); cfg_sel_we = 1; cfg_sel = 2'd2; @(negedge clk); cfg_sel_we = 0; end
    end
    $display("hits=%0d lazy=%0d miss=%0d wb=%0d", s_hit, s_lazy, s_miss, s_wb);
    checks++; if (s_miss == 0 || s_hit == 0) begin failures++; $display("no misses or hits"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_odms_top: end-to-end test of the on-demand memory system at its full
// size and default parameters, with a behavioural DDR3 model on the pins.
//
// After the DDR3 initialisation sequence the bank allocation table is given
// three intervals (bank counts 1/2/2/8, 1/2/2/7 and 1/1/1/10 for WPU, MAC, LT
// and SVC; banks 13..15 belong to no interval and are powered down). Each of
// the four PEs then writes a region laid out to overflow its L1 sets and its
// L2 banks, reads it back, runs random bursts, and - after the interval is
// switched - reads it again, so that lines must be found in the banks the node
// held before. At the same time every PE sends packets while the network
// stalls its output for long stretches, forcing buffer borrowing; the flit
// stream of every node is checked packet by packet. The SVC decoder reports
// macroblocks to the pre-fetch generator. The DDR3 model checks the JEDEC
// timing of every command.
//
// Every read is compared with a reference memory, and each mechanism is
// counted; the test fails if any of them never happened: L1 miss and hit, L2
// hit, miss, write back and lazy-transition hit, buffer borrowing and release,
// pre-fetch commands and fills, DRAM refresh, scheduler reordering, bank
// power-down.
module tb_odms_top;
  import odms_pkg::*;

  localparam int NODES = 4;

  logic clk = 0, rst_n = 1;
  initial rst_n = 0;   // a falling edge at time 0 fires every asynchronous reset
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  logic init_done, svc_map_en = 1;
  logic [NODES-1:0] pe_req = '0, pe_we = '0, pe_gnt, pe_rvalid, pe_wready;
  logic [NODES-1:0][29:0] pe_addr = '0;
  logic [NODES-1:0][3:0] pe_bl = '0;
  logic [NODES-1:0][31:0] pe_rdata, pe_wdata = '0;
  logic [NODES-1:0] tx_valid = '0, tx_ready, rx_valid, rx_ready = '1, rx_last;
  logic [NODES-1:0][31:0] tx_data = '0, rx_data;
  logic [NODES-1:0][7:0] tx_dest = '0;
  logic [NODES-1:0] net_out_valid, net_out_ready = '1, net_in_valid = '0, net_in_ready;
  logic [NODES-1:0][33:0] net_out_flit, net_in_flit = '0;
  logic mb_valid = 0, mb_ready;
  logic [7:0] mb_x = 0, mb_y = 0;
  logic cfg_we = 0, cfg_sel_we = 0;
  logic [1:0] cfg_node = 0, cfg_interval = 0, cfg_sel = 0;
  logic [15:0] cfg_mask = 0, bank_power;
  logic ddr_reset_n, ddr_cke, ddr_ras_n, ddr_cas_n, ddr_we_n, ddr_dq_oe, ddr_dqs_oe;
  logic [1:0] ddr_cs_n;
  logic [2:0] ddr_ba;
  logic [12:0] ddr_a;
  logic [31:0] ddr_dq_out, ddr_dq_in;
  logic [NODES-1:0][31:0] s_l1_hit, s_l1_miss, s_borrow, s_release, s_stall, s_direct;
  logic [31:0] s_pf_cmds, s_pf_fill, s_l2_hit, s_l2_lazy, s_l2_miss, s_l2_wb, s_data, s_busy, s_act;

  odms_top dut (
    .clk, .rst_n, .svc_map_en, .init_done,
    .pe_req, .pe_we, .pe_addr, .pe_bl, .pe_gnt, .pe_rvalid, .pe_rdata, .pe_wready, .pe_wdata,
    .tx_valid, .tx_ready, .tx_data, .tx_dest, .rx_valid, .rx_ready, .rx_data, .rx_last,
    .net_out_valid, .net_out_ready, .net_out_flit, .net_in_valid, .net_in_ready, .net_in_flit,
    .mb_valid, .mb_ready, .mb_x, .mb_y, .base_w(12'd176), .base_h(12'd144),
    .resid_base(30'h1000_0000), .mv_base(30'h1800_0000),
    .cfg_we, .cfg_node, .cfg_interval, .cfg_mask, .cfg_sel_we, .cfg_sel, .bank_power,
    .ddr_reset_n, .ddr_cke, .ddr_cs_n, .ddr_ras_n, .ddr_cas_n, .ddr_we_n, .ddr_ba, .ddr_a,
    .ddr_dq_out, .ddr_dq_oe, .ddr_dqs_oe, .ddr_dq_in,
    .stat_l1_hit(s_l1_hit), .stat_l1_miss(s_l1_miss), .stat_borrow(s_borrow),
    .stat_release(s_release), .stat_tx_stall(s_stall), .stat_tx_direct(s_direct),
    .stat_pf_cmds(s_pf_cmds), .stat_pf_fill(s_pf_fill), .stat_l2_hit(s_l2_hit),
    .stat_l2_lazy_hit(s_l2_lazy), .stat_l2_miss(s_l2_miss), .stat_l2_wb(s_l2_wb),
    .stat_dram_data(s_data), .stat_dram_busy(s_busy), .stat_dram_act(s_act));

  int violations, n_act, n_pre, n_rd, n_wr, n_ref, n_mrs;
  ddr3_model #(.RANKS(2)) mem (
    .clk, .reset_n(ddr_reset_n), .cke(ddr_cke), .cs_n(ddr_cs_n), .ras_n(ddr_ras_n),
    .cas_n(ddr_cas_n), .we_n(ddr_we_n), .ba(ddr_ba), .a(ddr_a), .dq_from_ctrl(ddr_dq_out),
    .dq_oe(ddr_dq_oe), .dq_to_ctrl(ddr_dq_in), .violations, .n_act, .n_pre, .n_rd, .n_wr,
    .n_ref, .n_mrs);

  // ------------------------------------------------------------ reference memory
  logic [31:0] ref_w [NODES][logic [29:0]];

  // region of node n, line i (0..511): 64 L1 sets x 8 tags, 256 B apart so
  // that consecutive lines share DRAM rows and spread over the banks
  function automatic logic [29:0] line_addr(int n, int i);
    int stride = (n == 3) ? 16384 : 32768;
    return 30'((i % 64) * 64 + (i / 64) * stride);
  endfunction

  task automatic burst(int n, bit w, logic [29:0] a, int bl);
    @(negedge clk);
    pe_req[n] = 1; pe_we[n] = w; pe_addr[n] = a; pe_bl[n] = 4'(bl);
    while (!pe_gnt[n]) @(negedge clk);
    pe_req[n] = 0;
    for (int i = 0; i < bl; i++) begin
      automatic logic [31:0] d = $urandom;
      @(negedge clk);
      if (w) begin
        pe_wdata[n] = d;
        ref_w[n][a + 30'(i)] = d;
      end else begin
        checks++;
        if (!ref_w[n].exists(a + 30'(i)) || pe_rdata[n] !== ref_w[n][a + 30'(i)]) begin
          failures++;
          if (failures < 20) $display("node %0d read %h: %h", n, a + 30'(i), pe_rdata[n]);
        end
      end
    end
    if (w) @(negedge clk);
  endtask

  task automatic mem_traffic(int n, int phase);
    if (phase == 0) begin
      for (int i = 0; i < 512; i++) burst(n, 1, line_addr(n, i), 8);
      for (int i = 0; i < 512; i++) burst(n, 0, line_addr(n, i), 8);
    end else if (phase == 1) begin
      for (int k = 0; k < 400; k++) begin
        automatic int i = $urandom_range(0, 511);
        automatic int o = $urandom_range(0, 7);
        automatic int bl = $urandom_range(1, 8 - o);
        burst(n, 1'($urandom_range(0, 1)), line_addr(n, i) + 30'(o), bl);
      end
    end else begin
      for (int i = 0; i < 512; i += 3) burst(n, 0, line_addr(n, i), 8);
    end
  endtask

  // ------------------------------------------------------------ packets
  logic [31:0] exp_q [NODES][$];
  int pkts_ok = 0;

  task automatic tx_traffic(int n, int count);
    for (int p = 0; p < count; p++) begin
      automatic logic [7:0] dest = 8'($urandom_range(0, 3));
      exp_q[n].push_back({8'(n), dest, 8'd8, 8'h00});
      for (int i = 0; i < 8; i++) begin
        automatic logic [31:0] d = $urandom;
        exp_q[n].push_back(d);
        @(negedge clk);
        tx_valid[n] = 1; tx_data[n] = d; tx_dest[n] = dest;
        @(posedge clk);
        while (!tx_ready[n]) @(posedge clk);
        @(negedge clk);
        tx_valid[n] = 0;
      end
      repeat ($urandom_range(0, 40)) @(negedge clk);
    end
  endtask

  int flit_pos [NODES];
  always @(posedge clk) begin
    for (int n = 0; n < NODES; n++) if (net_out_valid[n] && net_out_ready[n]) begin
      automatic logic [33:0] f = net_out_flit[n];
      automatic bit head = (flit_pos[n] == 0);
      checks++;
      if (exp_q[n].size() == 0 || f[31:0] !== exp_q[n][0] || f[33] != head ||
          f[32] != (flit_pos[n] == 8)) begin
        failures++;
        if (failures < 20) $display("node %0d flit %0d: %h", n, flit_pos[n], f);
      end
      if (exp_q[n].size() != 0) void'(exp_q[n].pop_front());
      flit_pos[n] = (flit_pos[n] == 8) ? 0 : flit_pos[n] + 1;
      if (flit_pos[n] == 0) pkts_ok++;
    end
  end

  // the network stalls every output for long stretches
  bit tx_running = 0;
  always @(negedge clk) begin
    if (tx_running && cyc % 400 == 0) net_out_ready <= '0;
    if (cyc % 400 == 250 || !tx_running) net_out_ready <= '1;
  end

  // ------------------------------------------------------------ receive side
  int rx_words = 0;
  always @(posedge clk)
    if (rx_valid[0] && rx_ready[0]) begin
      checks++;
      if (rx_data[0] !== 32'(rx_words) + 32'hA000) failures++;
      rx_words++;
    end

  task automatic set_bat(int n, int iv, logic [15:0] m);
    @(negedge clk); cfg_we = 1; cfg_node = 2'(n); cfg_interval = 2'(iv); cfg_mask = m;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic select(int iv);
    @(negedge clk); cfg_sel_we = 1; cfg_sel = 2'(iv);
    @(negedge clk); cfg_sel_we = 0;
  endtask

  initial begin
    for (int n = 0; n < NODES; n++) flit_pos[n] = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    // bank allocation: interval 0 (1,2,2,8), 1 (1,2,2,7), 2 (1,1,1,10)
    set_bat(0, 0, 16'h0001); set_bat(1, 0, 16'h0006); set_bat(2, 0, 16'h0018); set_bat(3, 0, 16'h1FE0);
    set_bat(0, 1, 16'h0002); set_bat(1, 1, 16'h000C); set_bat(2, 1, 16'h0030); set_bat(3, 1, 16'h1FC0);
    set_bat(0, 2, 16'h0001); set_bat(1, 2, 16'h0002); set_bat(2, 2, 16'h0004); set_bat(3, 2, 16'h1FF8);
    select(0);
    while (!init_done) @(negedge clk);
    $display("DDR3 initialised at cycle %0d", cyc);

    // one packet into node 0 from the network
    for (int i = 0; i < 9; i++) begin
      @(negedge clk);
      net_in_valid[0] = 1;
      net_in_flit[0] = (i == 0) ? {2'b10, 32'h0300_0800} : {1'b0, i == 8, 32'(i - 1) + 32'hA000};
      @(posedge clk); while (!net_in_ready[0]) @(posedge clk);
    end
    @(negedge clk); net_in_valid[0] = 0;

    tx_running = 1;
    fork
      mem_traffic(0, 0); mem_traffic(1, 0); mem_traffic(2, 0); mem_traffic(3, 0);
      tx_traffic(0, 40); tx_traffic(1, 40); tx_traffic(2, 40); tx_traffic(3, 40);
      begin
        for (int x = 0; x < 10; x++) begin
          @(negedge clk); mb_valid = 1; mb_x = 8'(x); mb_y = 8'd2;
          @(negedge clk); mb_valid = 0;
          repeat (2000) @(negedge clk);
        end
      end
    join
    $display("phase 0 done at cycle %0d", cyc);
    fork
      mem_traffic(0, 1); mem_traffic(1, 1); mem_traffic(2, 1); mem_traffic(3, 1);
    join
    select(1);
    fork
      mem_traffic(0, 2); mem_traffic(1, 2); mem_traffic(2, 2); mem_traffic(3, 2);
    join
    select(2);
    fork
      mem_traffic(0, 1); mem_traffic(1, 1); mem_traffic(2, 1); mem_traffic(3, 1);
      tx_traffic(0, 20); tx_traffic(1, 20); tx_traffic(2, 20); tx_traffic(3, 20);
    join
    tx_running = 0;
    repeat (2000) @(negedge clk);
    report();
  end

  task automatic need(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("mechanism never seen: %s", what); end
  endtask

  task automatic report();
    int l1h = 0, l1m = 0, bor = 0, rel = 0, stall = 0;
    for (int n = 0; n < NODES; n++) begin
      l1h += int'(s_l1_hit[n]); l1m += int'(s_l1_miss[n]);
      bor += int'(s_borrow[n]); rel += int'(s_release[n]); stall += int'(s_stall[n]);
      checks++;
      if (exp_q[n].size() != 0) begin failures++; $display("node %0d: %0d flits missing", n, exp_q[n].size()); end
    end
    $display("cycles=%0d L1 hit=%0d miss=%0d | L2 hit=%0d lazy=%0d miss=%0d wb=%0d", cyc, l1h, l1m,
             s_l2_hit, s_l2_lazy, s_l2_miss, s_l2_wb);
    $display("packets=%0d borrowed=%0d released=%0d stall cycles=%0d | pf cmds=%0d fills=%0d",
             pkts_ok, bor, rel, stall, s_pf_cmds, s_pf_fill);
    $display("DRAM act=%0d rd=%0d wr=%0d ref=%0d reorders=%0d data cycles=%0d busy=%0d violations=%0d",
             n_act, n_rd, n_wr, n_ref, dut.u_dram.u_emi.stat_reorder, s_data, s_busy, violations);
    need(l1h > 0 && l1m > 0, "L1 hit and miss");
    need(s_l2_hit > 0, "L2 hit");
    need(s_l2_miss > 0, "L2 miss");
    need(s_l2_wb > 0, "L2 write back");
    need(s_l2_lazy > 0, "L2 lazy-transition hit");
    need(bor > 0, "buffer borrowing");
    need(rel > 0, "borrow release");
    need(s_pf_cmds > 0 && s_pf_fill > 0, "pre-fetch");
    need(n_ref > 0, "DRAM refresh");
    need(dut.u_dram.u_emi.stat_reorder > 0, "scheduler reordering");
    need(bank_power == 16'h1FFF, "bank power-down");
    need(rx_words == 8, "packet receive");
    checks++; if (violations != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

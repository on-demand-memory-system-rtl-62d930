// tb_ni: self-checking test of the network interface and its buffering
// control. A behavioural d-MMU partner grants borrow requests after a random
// delay and keeps parked payloads in order; the network stalls the output for
// long stretches. Every flit leaving the NI is compared with the packets the
// PE sent (order, head/tail marks, header fields, payload); the test also
// requires that packets were borrowed and that at least one borrow was
// released, and checks the receive side strips head flits.
module tb_ni;
  logic clk = 0, rst_n = 1;
  initial rst_n = 0;   // a falling edge at time 0 fires every asynchronous reset
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  logic pe_valid = 0, pe_ready, rx_valid, rx_ready = 1, rx_last;
  logic [31:0] pe_data = 0, rx_data;
  logic [7:0] pe_dest = 0;
  logic out_valid, out_ready = 1, in_valid = 0, in_ready;
  logic [33:0] out_flit, in_flit = 0;
  logic bw_req, bw_gnt = 0, bw_wvalid, bw_wack = 0, bw_release, br_req, br_valid = 0;
  logic [255:0] bw_wdata, br_rdata = 0;
  logic [3:0] b_count = 0;
  logic [31:0] s_direct, s_borrow, s_release, s_stall;

  ni #(.NODE_ID(2)) dut (
    .clk, .rst_n, .pe_valid, .pe_ready, .pe_data, .pe_dest, .rx_valid, .rx_ready, .rx_data, .rx_last,
    .out_valid, .out_ready, .out_flit, .in_valid, .in_ready, .in_flit,
    .bw_req, .bw_gnt, .bw_wvalid, .bw_wack, .bw_wdata, .bw_release, .br_req, .br_valid, .br_rdata,
    .b_count, .stat_direct(s_direct), .stat_borrow(s_borrow), .stat_release(s_release),
    .stat_stall(s_stall));

  // behavioural d-MMU borrow port
  logic [255:0] parked [$];
  int gnt_wait = -1;
  bit granted = 0;
  always @(posedge clk) begin
    bw_gnt <= 0; bw_wack <= 0; br_valid <= 0;
    if (bw_release) begin granted = 0; gnt_wait = -1; end
    else if (bw_req && !granted) begin
      if (gnt_wait < 0) gnt_wait = $urandom_range(1, 6);
      else if (gnt_wait == 0) begin bw_gnt <= 1; granted = 1; gnt_wait = -1; end
      else gnt_wait--;
    end
    if (bw_wvalid && granted && !bw_wack) begin
      parked.push_back(bw_wdata); bw_wack <= 1; granted = 0;
    end
    if (br_req && !br_valid && parked.size() > 0) begin
      br_rdata <= parked.pop_front(); br_valid <= 1;
    end
    b_count <= 4'(parked.size());
  end

  logic [33:0] exp_q [$];
  int pkts = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (exp_q.size() == 0 || out_flit !== exp_q[0]) begin
      failures++;
      if (failures < 10) $display("flit %h expected %h", out_flit, exp_q.size() ? exp_q[0] : 34'h0);
    end
    if (exp_q.size()) begin
      if (exp_q[0][32]) pkts++;
      void'(exp_q.pop_front());
    end
  end

  bit run = 1;
  always @(negedge clk) begin
    if (run && cyc % 300 == 0) out_ready <= 0;
    if (cyc % 300 == 120 + (cyc / 300) % 3 * 40 || !run) out_ready <= 1;
  end

  int rx_n = 0;
  always @(posedge clk) if (rx_valid && rx_ready) begin
    checks++;
    if (rx_data !== 32'(rx_n) || rx_last != (rx_n % 8 == 7)) failures++;
    rx_n++;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // receive: two packets
    for (int p = 0; p < 2; p++)
      for (int i = 0; i < 9; i++) begin
        @(negedge clk); in_valid = 1;
        in_flit = (i == 0) ? {2'b10, 32'h0102_0800} : {1'b0, i == 8, 32'(p * 8 + i - 1)};
        @(posedge clk); while (!in_ready) @(posedge clk);
      end
    @(negedge clk); in_valid = 0;
    // transmit
    for (int p = 0; p < 300; p++) begin
      automatic logic [7:0] dest = 8'($urandom_range(0, 15));
      exp_q.push_back({2'b10, 8'd2, dest, 8'd8, 8'h00});
      for (int i = 0; i < 8; i++) begin
        automatic logic [31:0] d = $urandom;
        exp_q.push_back({1'b0, i == 7, d});
        @(negedge clk); pe_valid = 1; pe_data = d; pe_dest = dest;
        @(posedge clk); while (!pe_ready) @(posedge clk);
        @(negedge clk); pe_valid = 0;
      end
      repeat ($urandom_range(0, 12)) @(negedge clk);
    end
    run = 0;
    repeat (500) @(negedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("%0d flits never sent", exp_q.size()); end
    checks++; if (pkts != 300) begin failures++; $display("packets %0d", pkts); end
    checks++; if (s_borrow == 0) begin failures++; $display("no borrowing"); end
    checks++; if (s_release == 0) begin failures++; $display("no release"); end
    checks++; if (rx_n != 16) begin failures++; $display("rx words %0d", rx_n); end
    $display("direct=%0d borrowed=%0d released=%0d stall=%0d", s_direct, s_borrow, s_release, s_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

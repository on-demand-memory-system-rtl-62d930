// tb_dram_ctrl: self-checking test of the DRAM controller (address
// translator + external memory interface) against the behavioural DDR3
// model, with a shortened initialisation and refresh interval. Random 64-byte
// line writes and reads from all four nodes, conventional and SVC mapping;
// every read is compared with the last write; the model must see no timing
// violation and at least one refresh; a line never written reads back the
// model's address pattern at the translated location.
module tb_dram_ctrl;
  import odms_pkg::*;
  logic clk = 0, rst_n = 1;
  initial rst_n = 0;   // a falling edge at time 0 fires every asynchronous reset
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_valid = 0, req_ready, req_we = 0, rsp_valid, init_done, svc_map_en = 1;
  logic [1:0] req_node = 0;
  logic [31:0] req_addr = 0;
  logic [511:0] req_wdata = 0, rsp_rdata;
  logic ddr_reset_n, ddr_cke, ddr_ras_n, ddr_cas_n, ddr_we_n, ddr_dq_oe, ddr_dqs_oe;
  logic [1:0] ddr_cs_n;
  logic [2:0] ddr_ba;
  logic [12:0] ddr_a;
  logic [31:0] ddr_dq_out, ddr_dq_in, s_data, s_busy, s_act;

  dram_ctrl #(.INIT_RESET(20), .INIT_CKE(30), .REFI(700)) dut (
    .clk, .rst_n, .svc_map_en, .req_valid, .req_ready, .req_we, .req_node, .req_addr, .req_wdata,
    .rsp_valid, .rsp_rdata, .init_done, .ddr_reset_n, .ddr_cke, .ddr_cs_n, .ddr_ras_n, .ddr_cas_n,
    .ddr_we_n, .ddr_ba, .ddr_a, .ddr_dq_out, .ddr_dq_oe, .ddr_dqs_oe, .ddr_dq_in,
    .stat_data_cycles(s_data), .stat_busy_cycles(s_busy), .stat_act(s_act));

  int violations, n_act, n_pre, n_rd, n_wr, n_ref, n_mrs;
  ddr3_model #(.RANKS(2)) mem (
    .clk, .reset_n(ddr_reset_n), .cke(ddr_cke), .cs_n(ddr_cs_n), .ras_n(ddr_ras_n),
    .cas_n(ddr_cas_n), .we_n(ddr_we_n), .ba(ddr_ba), .a(ddr_a), .dq_from_ctrl(ddr_dq_out),
    .dq_oe(ddr_dq_oe), .dq_to_ctrl(ddr_dq_in), .violations, .n_act, .n_pre, .n_rd, .n_wr,
    .n_ref, .n_mrs);

  logic [511:0] ref_m [logic [33:0]];

  task automatic xfer(bit w, logic [1:0] n, logic [31:0] a, logic [511:0] d, output logic [511:0] q);
    @(negedge clk);
    req_valid = 1; req_we = w; req_node = n; req_addr = a; req_wdata = d;
    @(posedge clk); while (!req_ready) @(posedge clk);
    @(negedge clk); req_valid = 0;
    while (!rsp_valid) @(negedge clk);
    q = rsp_rdata;
  endtask

  initial begin
    logic [511:0] q;
    repeat (3) @(negedge clk); rst_n = 1;
    while (!init_done) @(negedge clk);
    // unwritten line: pattern of the translated address (node 0, conventional)
    xfer(0, 0, 32'h0001_2340, '0, q);
    begin
      automatic logic [26:0] c = {2'b00, 25'h0012340};
      automatic logic [31:0] key = (32'(c[13:11]) << 23) | (32'(c[26:14]) << 10) | 32'(c[10:1]);
      checks++;
      if (q[127:0] !== {4{key}} || q[255:128] !== {4{key + 32'd8}}) begin
        failures++; $display("pattern read %h", q[127:0]);
      end
    end
    for (int it = 0; it < 1500; it++) begin
      automatic logic [1:0] n = 2'($urandom_range(0, 3));
      automatic logic [31:0] a = {13'b0, 13'($urandom_range(0, 127)), 6'b0};
      automatic logic [33:0] k = {n, a};
      automatic bit w = ($urandom_range(0, 1) == 0) || !ref_m.exists(k);
      automatic logic [511:0] d = {16{$urandom}};
      if (n == 3) a[30:29] = 2'($urandom_range(0, 3));
      k = {n, a};
      w = w || !ref_m.exists(k);
      xfer(w, n, a, d, q);
      if (w) ref_m[k] = d;
      else begin
        checks++;
        if (q !== ref_m[k]) begin failures++; if (failures < 10) $display("node %0d line %h wrong", n, a); end
      end
    end
    checks++; if (violations != 0) failures++;
    checks++; if (n_ref == 0) begin failures++; $display("no refresh"); end
    $display("act=%0d rd=%0d wr=%0d ref=%0d violations=%0d", n_act, n_rd, n_wr, n_ref, violations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

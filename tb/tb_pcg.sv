// tb_pcg: self-checking test of the inter-layer pre-fetch command generator.
// For random macroblock positions in CIF/QCIF base layers (including picture
// edges) the command sequence is compared with a reference list: residual
// lines of the 10x9 window of the next macroblock's co-located 8x8 block,
// clamped, without repeats, then the two MV lines. pf_ready is throttled.
module tb_pcg;
  logic clk = 0, rst_n = 1;
  initial rst_n = 0;   // a falling edge at time 0 fires every asynchronous reset
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic mb_valid = 0, mb_ready, pf_valid, pf_ready = 0;
  logic [7:0] mb_x = 0, mb_y = 0;
  logic [11:0] base_w = 176, base_h = 144;
  logic [29:0] resid_base = 30'h100000, mv_base = 30'h200000, pf_addr;
  logic [31:0] cmds;

  pcg dut (.clk, .rst_n, .mb_valid, .mb_ready, .mb_x, .mb_y, .base_w, .base_h,
           .resid_base, .mv_base, .pf_valid, .pf_addr, .pf_ready, .stat_cmds(cmds));

  logic [29:0] exp_q [$];
  always @(posedge clk) pf_ready <= ($urandom_range(0, 2) != 0);
  always @(posedge clk) if (pf_valid && pf_ready) begin
    checks++;
    if (exp_q.size() == 0 || pf_addr !== exp_q[0]) begin
      failures++;
      if (failures < 10) $display("command %h expected %h", pf_addr, exp_q.size() ? exp_q[0] : 0);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
  end

  function automatic void expect_mb(int x, int y, int w, int h);
    int bx, by, last = -1;
    int nx = x + 1, ny = y;
    if (nx * 16 >= w * 2) begin nx = 0; ny = y + 1; end
    bx = nx * 8; by = ny * 8;
    for (int r = 0; r < 9; r++) begin
      int row = (by + r > h - 1) ? h - 1 : by + r;
      int clo = (bx == 0) ? 0 : bx - 1;
      int chi = (bx + 8 > w - 1) ? w - 1 : bx + 8;
      int l0 = (int'(resid_base) + (row * w + clo) / 2) / 8;
      int l1 = (int'(resid_base) + (row * w + chi) / 2) / 8;
      if (l0 != last) begin exp_q.push_back(30'(l0 * 8)); last = l0; end
      if (l1 != last) begin exp_q.push_back(30'(l1 * 8)); last = l1; end
    end
    for (int r = 0; r < 2; r++) begin
      int l = (int'(mv_base) + (by / 4 + r) * (w / 4) + bx / 4) / 8;
      if (l != last) begin exp_q.push_back(30'(l * 8)); last = l; end
    end
  endfunction

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      automatic bit cif = $urandom_range(0, 1);
      automatic int w = cif ? 352 : 176, h = cif ? 288 : 144;
      automatic int x = $urandom_range(0, w / 8 - 1), y = $urandom_range(0, h / 8 - 2);
      if (it % 5 == 0) x = w / 8 - 1;           // last macroblock of a row
      @(negedge clk);
      while (!mb_ready) @(negedge clk);
      base_w = 12'(w); base_h = 12'(h); mb_x = 8'(x); mb_y = 8'(y); mb_valid = 1;
      expect_mb(x, y, w, h);
      @(negedge clk); mb_valid = 0;
    end
    while (!mb_ready || exp_q.size() != 0) @(negedge clk);
    checks++; if (exp_q.size() != 0) failures++;
    $display("commands=%0d", cmds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dmmu: self-checking test of the L1 cache with buffer borrowing and
// pre-fetch (d-MMU), at its full size (2 banks x 256 sets x 4 ways).
//
// Checks: an 8-word burst that crosses a line boundary misses in both banks
// and returns the right words; repeated, it hits with pe_gnt two clocks after
// the request and BL consecutive data clocks; writes read back; five dirty
// lines in one set force a write back and keep their data; three borrowed
// blocks return their payloads in order and a released grant frees its
// block; a pre-fetched line later hits; random bursts against a reference.
module tb_dmmu;
  import odms_pkg::*;

  logic clk = 0, rst_n = 1;
  initial rst_n = 0;   // a falling edge at time 0 fires every asynchronous reset
  always #1 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  logic pe_req = 0, pe_we = 0, pe_gnt, pe_rvalid, pe_wready;
  logic [29:0] pe_addr = '0;
  logic [3:0] pe_bl = 4'd1;
  logic [31:0] pe_rdata, pe_wdata = '0;
  logic m_req, m_we, m_ack;
  logic [29:0] m_addr;
  logic [255:0] m_wdata, m_rdata;
  logic bw_wack;
  logic bw_req = 0, bw_gnt, bw_wvalid = 0, bw_release = 0, br_req = 0, br_valid;
  logic [255:0] bw_wdata = '0, br_rdata;
  logic [3:0] b_count;
  logic pf_valid = 0, pf_ready;
  logic [29:0] pf_addr = '0;
  logic [31:0] s_hit, s_miss, s_pf;
  int n_rd, n_wr;

  dmmu dut (
    .clk, .rst_n, .pe_req, .pe_we, .pe_addr, .pe_bl, .pe_gnt, .pe_rvalid, .pe_rdata,
    .pe_wready, .pe_wdata, .m_req, .m_we, .m_addr, .m_wdata, .m_ack, .m_rdata,
    .bw_req, .bw_gnt, .bw_wvalid, .bw_wack, .bw_wdata, .bw_release, .br_req, .br_valid, .br_rdata,
    .b_count, .pf_valid, .pf_addr, .pf_ready,
    .stat_hit(s_hit), .stat_miss(s_miss), .stat_pf_fill(s_pf));

  l1_mem_model #(.LAT(6)) mem (.clk, .m_req, .m_we, .m_addr, .m_wdata, .m_ack, .m_rdata, .n_rd, .n_wr);

  logic [31:0] ref_w [logic [29:0]];
  function automatic logic [31:0] ref_rd(logic [29:0] a);
    return ref_w.exists(a) ? ref_w[a] : 32'(a);
  endfunction

  int gnt_lat;
  task automatic burst(bit w, logic [29:0] a, int bl);
    int t0 = cyc;
    int got = 0;
    @(negedge clk);
    pe_req = 1; pe_we = w; pe_addr = a; pe_bl = 4'(bl);
    t0 = cyc;
    while (!pe_gnt) @(negedge clk);
    gnt_lat = cyc - t0;
    pe_req = 0;
    for (int i = 0; i < bl; i++) begin
      automatic logic [31:0] d = $urandom;
      @(negedge clk);
      pe_wdata = d;
      checks++;
      if (w) begin
        if (!pe_wready) begin failures++; $display("no wready in beat %0d", i); end
        ref_w[a + 30'(i)] = d;
      end else begin
        if (!pe_rvalid || pe_rdata !== ref_rd(a + 30'(i))) begin
          failures++;
          $display("read %h beat %0d: %h expected %h", a, i, pe_rdata, ref_rd(a + 30'(i)));
        end
      end
    end
    if (w) @(negedge clk);
  endtask

  task automatic borrow_write(logic [255:0] d, bit release_it);
    @(negedge clk); bw_req = 1;
    while (!bw_gnt) @(negedge clk);
    @(negedge clk); bw_req = 0;
    repeat (3) @(negedge clk);           // payload collection
    if (release_it) begin bw_release = 1; @(negedge clk); bw_release = 0; end
    else begin bw_wvalid = 1; bw_wdata = d; @(negedge clk); while (!bw_wack) @(negedge clk); bw_wvalid = 0; end
    @(negedge clk);
  endtask

  initial begin
    int m0, w0;
    logic [255:0] pl [3];
    repeat (3) @(negedge clk); rst_n = 1;

    // crossing burst: words 0x105..0x10C touch lines 0x20 (bank 0) and 0x21 (bank 1)
    m0 = s_miss;
    burst(0, 30'h105, 8);
    checks++; if (s_miss - m0 != 2) begin failures++; $display("expected 2 misses, got %0d", s_miss - m0); end
    burst(0, 30'h105, 8);
    checks++; if (gnt_lat != 2) begin failures++; $display("hit grant latency %0d", gnt_lat); end
    burst(1, 30'h103, 5);
    burst(0, 30'h100, 8);
    burst(0, 30'h108, 8);

    // five dirty lines of one set (bank 0, set 3): tags differ by 0x1000 words
    w0 = n_wr;
    for (int t = 0; t < 5; t++) burst(1, 30'(t * 32'h1000 + 32'h30), 8);
    checks++; if (n_wr - w0 != 1) begin failures++; $display("write backs %0d", n_wr - w0); end
    for (int t = 0; t < 5; t++) burst(0, 30'(t * 32'h1000 + 32'h30), 8);

    // borrowing: three payloads, then one granted and released
    for (int i = 0; i < 3; i++) begin
      pl[i] = {8{$urandom}};
      borrow_write(pl[i], 0);
    end
    checks++; if (b_count != 3) begin failures++; $display("b_count %0d", b_count); end
    borrow_write('0, 1);
    checks++; if (b_count != 3 || dut.borrowed != 512'h7) begin
      failures++; $display("release: b_count %0d borrowed %h", b_count, dut.borrowed[15:0]);
    end
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); br_req = 1;
      @(negedge clk); while (!br_valid) @(negedge clk);
      br_req = 0;
      checks++;
      if (br_rdata !== pl[i]) begin failures++; $display("borrowed payload %0d wrong", i); end
    end
    checks++; if (b_count != 0 || dut.borrowed != '0) begin failures++; $display("blocks not freed"); end

    // pre-fetch a line, then read it: no demand miss
    @(negedge clk); pf_valid = 1; pf_addr = 30'h7770;
    while (!pf_ready) @(negedge clk);
    pf_valid = 0;
    repeat (30) @(negedge clk);
    m0 = s_miss;
    burst(0, 30'h7770, 8);
    checks++; if (s_miss != m0 || s_pf == 0) begin failures++; $display("pre-fetch did not fill"); end

    // random bursts
    for (int i = 0; i < 3000; i++) begin
      automatic logic [29:0] a = 30'($urandom_range(0, 255)) | (30'($urandom_range(0, 15)) << 12);
      burst($urandom_range(0, 1), a, $urandom_range(1, 8));
      if (i % 7 == 0) borrow_write({8{$urandom}}, 0);
      if (b_count == 8) for (int j = 0; j < 8; j++) begin
        @(negedge clk); br_req = 1;
        @(negedge clk); while (!br_valid) @(negedge clk);
        br_req = 0;
      end
    end
    $display("hits=%0d misses=%0d pf=%0d mem rd=%0d wr=%0d", s_hit, s_miss, s_pf, n_rd, n_wr);
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

// tb_sram_bank: self-checking test of one L2 SRAM bank at its full size
// (2048 x 512 bits): random writes and reads against a reference, one-clock
// read latency, and zero output while the bank is powered down.
module tb_sram_bank;
  logic clk = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic pwr = 1, en = 0, we = 0;
  logic [10:0] addr = 0;
  logic [511:0] wdata = 0, rdata;
  logic [511:0] ref_m [logic [10:0]];

  sram_bank dut (.clk, .pwr, .en, .we, .addr, .wdata, .rdata);

  initial begin
    for (int it = 0; it < 4000; it++) begin
      automatic logic [10:0] a = 11'($urandom_range(0, 63)) << $urandom_range(0, 5);
      automatic bit w = ($urandom_range(0, 2) == 0) || !ref_m.exists(a);
      @(negedge clk);
      en = 1; we = w; addr = a; wdata = {16{$urandom}};
      if (w) ref_m[a] = wdata;
      @(negedge clk);
      en = 0; we = 0;
      if (!w) begin
        checks++;
        if (rdata !== ref_m[a]) begin failures++; $display("addr %h wrong", a); end
      end
    end
    @(negedge clk); pwr = 0; en = 1; we = 0; addr = 0;
    @(negedge clk); en = 0;
    checks++; if (rdata !== '0) begin failures++; $display("powered-down bank drives data"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

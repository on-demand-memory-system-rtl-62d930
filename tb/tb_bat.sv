// tb_bat: self-checking test of the bank assignment table. Programs random
// masks for every node and interval, selects intervals, and compares the
// current mask, the previously-held mask and the bank power vector with a
// reference computed in the testbench; also checks the reset assignment.
module tb_bat;
  logic clk = 0, rst_n = 1;
  initial rst_n = 0;   // a falling edge at time 0 fires every asynchronous reset
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0, cfg_sel_we = 0;
  logic [1:0] cfg_node = 0, cfg_interval = 0, cfg_sel = 0, lk_node = 0, cur_interval;
  logic [15:0] cfg_mask = 0, cur_mask, old_mask, bank_power;
  logic [15:0] m [4][3];

  bat dut (.clk, .rst_n, .cfg_we, .cfg_node, .cfg_interval, .cfg_mask, .cfg_sel_we, .cfg_sel,
           .lk_node, .cur_mask, .old_mask, .bank_power, .cur_interval);

  task automatic check_all(int sel);
    logic [15:0] pw = '0;
    for (int n = 0; n < 4; n++) for (int i = 0; i < 3; i++) pw |= m[n][i];
    for (int n = 0; n < 4; n++) begin
      logic [15:0] o = '0;
      for (int i = 0; i < 3; i++) if (i != sel) o |= m[n][i];
      o &= ~m[n][sel];
      lk_node = 2'(n);
      #1;
      checks++;
      if (cur_mask !== m[n][sel] || old_mask !== o || bank_power !== pw || cur_interval != 2'(sel)) begin
        failures++;
        $display("node %0d sel %0d: cur %h/%h old %h/%h pwr %h/%h", n, sel, cur_mask, m[n][sel],
                 old_mask, o, bank_power, pw);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 4; n++) for (int i = 0; i < 3; i++) m[n][i] = 16'hF << (4 * n);
    @(negedge clk); check_all(0);
    for (int it = 0; it < 300; it++) begin
      automatic int n = $urandom_range(0, 3);
      automatic int i = $urandom_range(0, 2);
      automatic logic [15:0] v = 16'($urandom);
      automatic int s = $urandom_range(0, 2);
      @(negedge clk); cfg_we = 1; cfg_node = 2'(n); cfg_interval = 2'(i); cfg_mask = v;
      @(negedge clk); cfg_we = 0; m[n][i] = v;
      cfg_sel_we = 1; cfg_sel = 2'(s);
      @(negedge clk); cfg_sel_we = 0;
      check_all(s);
    end
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

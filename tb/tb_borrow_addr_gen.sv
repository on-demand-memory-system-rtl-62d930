// tb_borrow_addr_gen: self-checking test of the borrowing address generator
// at full size (512 blocks, 128-bit window). Random occupancy patterns, from
// nearly empty to a single free block: the offered block must be free and
// must appear within 1 + 4 clocks of the request (the whole table in four
// window steps); a full table never yields a block; cancel stops a search;
// a block that becomes occupied while offered is replaced.
module tb_borrow_addr_gen;
  logic clk = 0, rst_n = 1;
  initial rst_n = 0;   // a falling edge at time 0 fires every asynchronous reset
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, cancel = 0, take = 0, found, searching;
  logic [511:0] occupied = '0;
  logic [8:0] addr;

  borrow_addr_gen dut (.clk, .rst_n, .start, .cancel, .take, .occupied, .found, .addr, .searching);

  task automatic one(int nfree);
    int waited = 0;
    occupied = '1;
    for (int k = 0; k < nfree; k++) occupied[$urandom_range(0, 511)] = 1'b0;
    @(negedge clk); start = 1;
    while (!found && waited < 10) begin @(negedge clk); waited++; end
    start = 0;
    checks++;
    if (nfree > 0 && (!found || occupied[addr] || waited > 5)) begin
      failures++; $display("free=%0d found=%0d addr=%0d waited=%0d", nfree, found, addr, waited);
    end
    if (nfree == 0 && found) begin failures++; $display("block offered from a full table"); end
    take = found; cancel = !found;
    @(negedge clk); take = 0; cancel = 0;
    checks++; if (found || searching) begin failures++; $display("not idle after take/cancel"); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 2000; it++) one($urandom_range(0, 3) == 0 ? $urandom_range(0, 2) : $urandom_range(1, 400));
    // offered block becomes occupied: another one is offered
    occupied = '1; occupied[10] = 0; occupied[300] = 0;
    @(negedge clk); start = 1;
    while (!found) @(negedge clk);
    occupied[addr] = 1'b1;
    @(negedge clk);
    while (!found) @(negedge clk);
    checks++; if (occupied[addr]) begin failures++; $display("occupied block still offered"); end
    start = 0; take = 1; @(negedge clk); take = 0;
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

// line_mem_model: behavioural DRAM behind a 64-byte line port, for testbenches
// of the L2 cache. Requests are accepted when idle and answered LAT clocks
// later with a one-clock rsp pulse. A line never written reads as a pattern
// of its node and address: sixteen copies of {node, addr[29:0]}.
module line_mem_model #(
  parameter int LAT = 10
) (
  input  logic         clk,
  input  logic         req,
  output logic         ready,
  input  logic         we,
  input  logic [1:0]   node,
  input  logic [31:0]  addr,
  input  logic [511:0] wdata,
  output logic         rsp,
  output logic [511:0] rdata,
  output int           n_rd,
  output int           n_wr
);
  logic [511:0] mem [logic [33:0]];
  int cnt = 0;
  logic [33:0] key;
  logic pend_we;

  function automatic logic [511:0] pattern(logic [1:0] n, logic [31:0] a);
    return {16{n, a[29:0]}};
  endfunction

  initial begin n_rd = 0; n_wr = 0; rsp = 0; rdata = '0; end
  assign ready = (cnt == 0);

  always @(posedge clk) begin
    rsp <= 1'b0;
    if (cnt == 0 && req) begin
      key = {node, addr};
      pend_we = we;
      if (we) begin mem[key] = wdata; n_wr++; end else n_rd++;
      cnt <= LAT;
    end else if (cnt == 1) begin
      rsp <= 1'b1;
      rdata <= mem.exists(key) ? mem[key] : pattern(key[33:32], key[31:0]);
      cnt <= 0;
    end else if (cnt > 1) cnt <= cnt - 1;
  end
endmodule

// bat: bank assignment table of the c-MMU.
//
// For every node and each of three time intervals the table holds a mask of
// the L2 SRAM banks the node may use in that interval. The system (in the
// wireless video receiver: the MAC, from the channel quality and off-line
// profiles of the SVC layers) writes the masks and selects the current
// interval. A lookup by node returns
//   cur_mask  - banks assigned in the current interval: checked first and
//               the only place new lines are allocated;
//   old_mask  - banks the node held in the other intervals but not now: a
//               second hit check runs there, since with lazy transitioning
//               data is moved only when it is touched again.
// bank_power is the OR of all masks of all nodes and intervals; a bank that
// is in no mask is unused and can be powered down without losing data some
// node may still look for.
//
// Writes take effect on the next clock; lookups are combinational (the first
// stage of the c-MMU access). Three intervals, per-node masks and lazy
// re-checking follow the design description; the register-write interface and
// the power rule are this design's choices.
module bat #(
  parameter int unsigned NODES     = 4,
  parameter int unsigned BANKS     = 16,
  parameter int unsigned INTERVALS = 3
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          cfg_we,
  input  logic [$clog2(NODES)-1:0]      cfg_node,
  input  logic [1:0]                    cfg_interval,
  input  logic [BANKS-1:0]              cfg_mask,
  input  logic                          cfg_sel_we,     // select current interval
  input  logic [1:0]                    cfg_sel,
  input  logic [$clog2(NODES)-1:0]      lk_node,
  output logic [BANKS-1:0]              cur_mask,
  output logic [BANKS-1:0]              old_mask,
  output logic [BANKS-1:0]              bank_power,
  output logic [1:0]                    cur_interval
);

  logic [BANKS-1:0] tbl [NODES][INTERVALS];

  // reset state: banks dealt out evenly, the same in every interval
  function automatic logic [BANKS-1:0] even_mask(int unsigned n);
    logic [BANKS-1:0] m = '0;
    for (int unsigned b = 0; b < BANKS; b++)
      if (b * NODES / BANKS == n) m[b] = 1'b1;
    return m;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NODES; n++)
        for (int i = 0; i < INTERVALS; i++) tbl[n][i] <= even_mask(n);
      cur_interval <= '0;
    end else begin
      if (cfg_we && int'(cfg_interval) < INTERVALS) tbl[cfg_node][cfg_interval] <= cfg_mask;
      if (cfg_sel_we && int'(cfg_sel) < INTERVALS) cur_interval <= cfg_sel;
    end
  end

  always_comb begin
    cur_mask   = tbl[lk_node][cur_interval];
    old_mask   = '0;
    bank_power = '0;
    for (int i = 0; i < INTERVALS; i++)
      if (i != int'(cur_interval)) old_mask |= tbl[lk_node][i];
    old_mask &= ~cur_mask;
    for (int n = 0; n < NODES; n++)
      for (int i = 0; i < INTERVALS; i++) bank_power |= tbl[n][i];
  end

endmodule

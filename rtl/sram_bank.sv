// sram_bank: one SRAM sub-block of the L2 cache. Each bank is one way of the
// c-MMU cache and holds SETS lines of LINE_W bits.
//
// Single port, synchronous: with en high, a write stores wdata at addr, a read
// returns the line at addr on rdata in the next clock. When pwr is low the
// bank is power gated: it ignores accesses and reads as zero. The design description
// treats the sub-blocks as SRAM macros; this is a plain array a synthesis
// flow maps to a macro.
module sram_bank #(
  parameter int unsigned SETS   = 2048,
  parameter int unsigned LINE_W = 512
) (
  input  logic                    clk,
  input  logic                    pwr,
  input  logic                    en,
  input  logic                    we,
  input  logic [$clog2(SETS)-1:0] addr,
  input  logic [LINE_W-1:0]       wdata,
  output logic [LINE_W-1:0]       rdata
);

  logic [LINE_W-1:0] mem [SETS];

  always_ff @(posedge clk) begin
    if (pwr && en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end else if (!pwr) begin
      rdata <= '0;
    end
  end

endmodule

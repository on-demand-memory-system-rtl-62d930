// dram_ctrl: DRAM controller of the c-MMU. It turns 64-byte line requests
// from the L2 cache into DDR3 bursts.
//
// A line request (read or write, node number, byte address of the line) is
// first mapped by the address translator to chip select, bank, row and
// column. Because a line never crosses a row, it becomes four BL8 bursts of
// 16 bytes at columns col, col+8, col+16 and col+24, which are handed to the
// external memory interface. For a read the four bursts' data are collected
// (tagged with their position) and returned as one 512-bit line; a write is
// acknowledged once its four bursts are queued, since the EMI keeps later
// accesses to the same address in order.
//
// Interface: valid/ready request, one-cycle rsp_valid pulse per request. One
// line is handled at a time. The split of a 64-byte line into four BL8
// commands follows the design description; the handshake is this design's.
module dram_ctrl
  import odms_pkg::*;
#(
  parameter int unsigned NODE_W     = 2,
  parameter int unsigned SVC_NODE   = 3,
  parameter int unsigned RANKS      = 2,
  parameter int unsigned QDEPTH     = 32,
  parameter bit          SCHED_EN   = 1'b1,
  parameter int unsigned INIT_RESET = 133334,
  parameter int unsigned INIT_CKE   = 333334,
  parameter int unsigned REFI       = T_REFI
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  svc_map_en,
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic                  req_we,
  input  logic [NODE_W-1:0]     req_node,
  input  logic [31:0]           req_addr,
  input  logic [L2_LINE_W-1:0]  req_wdata,
  output logic                  rsp_valid,
  output logic [L2_LINE_W-1:0]  rsp_rdata,
  output logic                  init_done,
  // DDR3 pins
  output logic                  ddr_reset_n,
  output logic                  ddr_cke,
  output logic [RANKS-1:0]      ddr_cs_n,
  output logic                  ddr_ras_n,
  output logic                  ddr_cas_n,
  output logic                  ddr_we_n,
  output logic [2:0]            ddr_ba,
  output logic [12:0]           ddr_a,
  output logic [31:0]           ddr_dq_out,
  output logic                  ddr_dq_oe,
  output logic                  ddr_dqs_oe,
  input  logic [31:0]           ddr_dq_in,
  output logic [31:0]           stat_data_cycles,
  output logic [31:0]           stat_busy_cycles,
  output logic [31:0]           stat_act
);

  typedef enum logic [1:0] { S_IDLE, S_ISSUE, S_WAIT, S_RESP } st_e;
  st_e                 st;
  logic                we_q;
  dram_addr_t          base_q, base_d;
  logic [L2_LINE_W-1:0] line_q;
  logic [1:0]          nissue;
  logic [3:0]          got;

  logic                e_valid, e_ready, e_rvalid;
  logic [BURST_W-1:0]  e_rdata;
  logic [1:0]          e_rid;
  dram_addr_t          e_addr;
  logic [31:0]         unused_reorder;

  addr_translator #(.NODE_W(NODE_W), .SVC_NODE(SVC_NODE)) u_at (
    .node(req_node), .addr(req_addr), .svc_map_en, .daddr(base_d));

  always_comb begin
    e_addr     = base_q;
    e_addr.col = base_q.col + {5'b00000, nissue, 3'b000};
  end
  assign e_valid   = (st == S_ISSUE);
  assign req_ready = (st == S_IDLE) && init_done;

  emi #(.RANKS(RANKS), .QDEPTH(QDEPTH), .ID_W(2), .SCHED_EN(SCHED_EN),
        .INIT_RESET(INIT_RESET), .INIT_CKE(INIT_CKE), .REFI(REFI)) u_emi (
    .clk, .rst_n,
    .req_valid(e_valid), .req_ready(e_ready), .req_we(we_q), .req_addr(e_addr),
    .req_wdata(line_q[nissue * BURST_W +: BURST_W]), .req_id(nissue),
    .rsp_valid(e_rvalid), .rsp_rdata(e_rdata), .rsp_id(e_rid), .init_done,
    .ddr_reset_n, .ddr_cke, .ddr_cs_n, .ddr_ras_n, .ddr_cas_n, .ddr_we_n, .ddr_ba, .ddr_a,
    .ddr_dq_out, .ddr_dq_oe, .ddr_dqs_oe, .ddr_dq_in,
    .stat_data_cycles, .stat_busy_cycles, .stat_act, .stat_reorder(unused_reorder));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; we_q <= 1'b0; base_q <= '0; line_q <= '0; nissue <= '0; got <= '0;
      rsp_valid <= 1'b0; rsp_rdata <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (e_rvalid) begin
        line_q[e_rid * BURST_W +: BURST_W] <= e_rdata;
        got[e_rid] <= 1'b1;
      end
      unique case (st)
        S_IDLE: if (req_valid && req_ready) begin
          we_q <= req_we; base_q <= base_d; line_q <= req_wdata; nissue <= '0; got <= '0;
          st <= S_ISSUE;
        end
        S_ISSUE: if (e_ready) begin
          nissue <= nissue + 1'b1;
          if (nissue == 2'd3) st <= we_q ? S_RESP : S_WAIT;
        end
        S_WAIT: if (&got) st <= S_RESP;
        default: begin
          rsp_valid <= 1'b1;
          rsp_rdata <= line_q;
          st <= S_IDLE;
        end
      endcase
    end
  end

endmodule

// odms_top: on-demand memory system for a wireless video entertainment
// platform.
//
// Four processing nodes (general PEs such as the WPU, MAC and LT, plus the SVC
// decoder at node SVC_NODE) each own a distributed MMU: a 64 KB two-bank L1
// cache (dmmu) and a network interface (ni) that can park blocked outgoing
// packets in that L1 by buffer borrowing. The SVC node's d-MMU also receives
// pre-fetch commands from the inter-layer pre-fetch command generator (pcg).
// All L1 misses and write backs go to the centralized MMU (cmmu): a 2 MB L2
// made of 16 SRAM banks used as ways, whose banks are handed out to the nodes
// by the bank allocation table per interval, with lazy transitioning between
// intervals and power-down of unused banks. L2 misses reach the DRAM
// controller (dram_ctrl: address translator plus external memory interface)
// driving two DDR3 x16 devices on one bus, device 1 holding the SVC data.
//
// Ports (all plain, NODES-wide arrays packed per node):
//   pe_*      - burst memory port of each PE (see dmmu for the timing)
//   tx_*/rx_* - packet transmit and receive port of each PE (see ni)
//   net_*     - flit ports towards the on-chip interconnection network,
//               which is outside this design
//   mb_*, base_*, resid_base, mv_base - macroblock and frame information
//               from the SVC decoder for inter-layer pre-fetch (see pcg)
//   cfg_*     - bank allocation table programming (see bat)
//   bank_power- per-bank power enable, for the power management unit
//   ddr_*     - DDR3 command, address and data pins (see emi)
//   stat_*    - event counters
// Everything runs on one clock, the DDR3 clock of the memory interface
// (tCK = 1.5 ns for DDR3-1333); rst_n is asynchronous.
module odms_top
  import odms_pkg::*;
#(
  parameter int unsigned NODES      = 4,
  parameter int unsigned SVC_NODE   = 3,
  parameter int unsigned L1_SETS    = 256,
  parameter int unsigned L2_SETS    = 2048,
  parameter int unsigned OQ_DEPTH   = 16,
  parameter int unsigned INIT_RESET = 133334,
  parameter int unsigned INIT_CKE   = 333334,
  parameter int unsigned REFI       = T_REFI
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          svc_map_en,
  output logic                          init_done,
  // PE memory ports
  input  logic [NODES-1:0]              pe_req,
  input  logic [NODES-1:0]              pe_we,
  input  logic [NODES-1:0][ADDR_W-1:0]  pe_addr,
  input  logic [NODES-1:0][3:0]         pe_bl,
  output logic [NODES-1:0]              pe_gnt,
  output logic [NODES-1:0]              pe_rvalid,
  output logic [NODES-1:0][WORD_W-1:0]  pe_rdata,
  output logic [NODES-1:0]              pe_wready,
  input  logic [NODES-1:0][WORD_W-1:0]  pe_wdata,
  // PE packet ports
  input  logic [NODES-1:0]              tx_valid,
  output logic [NODES-1:0]              tx_ready,
  input  logic [NODES-1:0][WORD_W-1:0]  tx_data,
  input  logic [NODES-1:0][7:0]         tx_dest,
  output logic [NODES-1:0]              rx_valid,
  input  logic [NODES-1:0]              rx_ready,
  output logic [NODES-1:0][WORD_W-1:0]  rx_data,
  output logic [NODES-1:0]              rx_last,
  // on-chip interconnection network
  output logic [NODES-1:0]              net_out_valid,
  input  logic [NODES-1:0]              net_out_ready,
  output logic [NODES-1:0][33:0]        net_out_flit,
  input  logic [NODES-1:0]              net_in_valid,
  output logic [NODES-1:0]              net_in_ready,
  input  logic [NODES-1:0][33:0]        net_in_flit,
  // SVC inter-layer pre-fetch information
  input  logic                          mb_valid,
  output logic                          mb_ready,
  input  logic [7:0]                    mb_x,
  input  logic [7:0]                    mb_y,
  input  logic [11:0]                   base_w,
  input  logic [11:0]                   base_h,
  input  logic [ADDR_W-1:0]             resid_base,
  input  logic [ADDR_W-1:0]             mv_base,
  // bank allocation table
  input  logic                          cfg_we,
  input  logic [$clog2(NODES)-1:0]      cfg_node,
  input  logic [1:0]                    cfg_interval,
  input  logic [15:0]                   cfg_mask,
  input  logic                          cfg_sel_we,
  input  logic [1:0]                    cfg_sel,
  output logic [15:0]                   bank_power,
  // DDR3
  output logic                          ddr_reset_n,
  output logic                          ddr_cke,
  output logic [1:0]                    ddr_cs_n,
  output logic                          ddr_ras_n,
  output logic                          ddr_cas_n,
  output logic                          ddr_we_n,
  output logic [2:0]                    ddr_ba,
  output logic [12:0]                   ddr_a,
  output logic [31:0]                   ddr_dq_out,
  output logic                          ddr_dq_oe,
  output logic                          ddr_dqs_oe,
  input  logic [31:0]                   ddr_dq_in,
  // counters
  output logic [NODES-1:0][31:0]        stat_l1_hit,
  output logic [NODES-1:0][31:0]        stat_l1_miss,
  output logic [NODES-1:0][31:0]        stat_borrow,
  output logic [NODES-1:0][31:0]        stat_release,
  output logic [NODES-1:0][31:0]        stat_tx_stall,
  output logic [NODES-1:0][31:0]        stat_tx_direct,
  output logic [31:0]                   stat_pf_cmds,
  output logic [31:0]                   stat_pf_fill,
  output logic [31:0]                   stat_l2_hit,
  output logic [31:0]                   stat_l2_lazy_hit,
  output logic [31:0]                   stat_l2_miss,
  output logic [31:0]                   stat_l2_wb,
  output logic [31:0]                   stat_dram_data,
  output logic [31:0]                   stat_dram_busy,
  output logic [31:0]                   stat_dram_act
);

  localparam int unsigned NW = $clog2(NODES);

  // d-MMU <-> c-MMU
  logic [NODES-1:0]     m_req, m_we, m_ack;
  logic [ADDR_W-1:0]    m_addr  [NODES];
  logic [L1_LINE_W-1:0] m_wdata [NODES];
  logic [L1_LINE_W-1:0] l2_rdata;

  // c-MMU <-> DRAM controller
  logic                 d_req, d_ready, d_we, d_rsp;
  logic [NW-1:0]        d_node;
  logic [31:0]          d_addr;
  logic [L2_LINE_W-1:0] d_wdata, d_rdata;

  // pre-fetch (SVC node only)
  logic                 pf_valid, pf_ready;
  logic [ADDR_W-1:0]    pf_addr;
  logic [NODES-1:0]     pf_rdy;
  logic [NODES-1:0][31:0] pf_fill;

  for (genvar n = 0; n < NODES; n++) begin : g_node
    logic                 bw_req, bw_gnt, bw_wvalid, bw_wack, bw_release, br_req, br_valid;
    logic [L1_LINE_W-1:0] bw_wdata, br_rdata;
    logic [3:0]           b_count;

    dmmu #(.SETS(L1_SETS)) u_dmmu (
      .clk, .rst_n,
      .pe_req(pe_req[n]), .pe_we(pe_we[n]), .pe_addr(pe_addr[n]), .pe_bl(pe_bl[n]),
      .pe_gnt(pe_gnt[n]), .pe_rvalid(pe_rvalid[n]), .pe_rdata(pe_rdata[n]),
      .pe_wready(pe_wready[n]), .pe_wdata(pe_wdata[n]),
      .m_req(m_req[n]), .m_we(m_we[n]), .m_addr(m_addr[n]), .m_wdata(m_wdata[n]),
      .m_ack(m_ack[n]), .m_rdata(l2_rdata),
      .bw_req, .bw_gnt, .bw_wvalid, .bw_wack, .bw_wdata, .bw_release,
      .br_req, .br_valid, .br_rdata, .b_count,
      .pf_valid(n == SVC_NODE ? pf_valid : 1'b0),
      .pf_addr (n == SVC_NODE ? pf_addr  : '0),
      .pf_ready(pf_rdy[n]),
      .stat_hit(stat_l1_hit[n]), .stat_miss(stat_l1_miss[n]), .stat_pf_fill(pf_fill[n]));

    ni #(.NODE_ID(n), .OQ_DEPTH(OQ_DEPTH)) u_ni (
      .clk, .rst_n,
      .pe_valid(tx_valid[n]), .pe_ready(tx_ready[n]), .pe_data(tx_data[n]), .pe_dest(tx_dest[n]),
      .rx_valid(rx_valid[n]), .rx_ready(rx_ready[n]), .rx_data(rx_data[n]), .rx_last(rx_last[n]),
      .out_valid(net_out_valid[n]), .out_ready(net_out_ready[n]), .out_flit(net_out_flit[n]),
      .in_valid(net_in_valid[n]), .in_ready(net_in_ready[n]), .in_flit(net_in_flit[n]),
      .bw_req, .bw_gnt, .bw_wvalid, .bw_wack, .bw_wdata, .bw_release,
      .br_req, .br_valid, .br_rdata, .b_count,
      .stat_direct(stat_tx_direct[n]), .stat_borrow(stat_borrow[n]), .stat_release(stat_release[n]),
      .stat_stall(stat_tx_stall[n]));
  end

  // only the SVC node's pre-fetch port is used
  assign pf_ready     = pf_rdy[SVC_NODE];
  assign stat_pf_fill = pf_fill[SVC_NODE];

  pcg u_pcg (
    .clk, .rst_n, .mb_valid, .mb_ready, .mb_x, .mb_y, .base_w, .base_h,
    .resid_base, .mv_base, .pf_valid, .pf_addr, .pf_ready, .stat_cmds(stat_pf_cmds));

  cmmu #(.NODES(NODES), .SETS(L2_SETS)) u_cmmu (
    .clk, .rst_n,
    .n_req(m_req), .n_we(m_we), .n_addr(m_addr), .n_wdata(m_wdata), .n_ack(m_ack), .rdata(l2_rdata),
    .cfg_we, .cfg_node, .cfg_interval, .cfg_mask, .cfg_sel_we, .cfg_sel, .bank_power,
    .d_req, .d_ready, .d_we, .d_node, .d_addr, .d_wdata, .d_rsp, .d_rdata,
    .stat_hit(stat_l2_hit), .stat_lazy_hit(stat_l2_lazy_hit), .stat_miss(stat_l2_miss),
    .stat_wb(stat_l2_wb));

  dram_ctrl #(.NODE_W(NW), .SVC_NODE(SVC_NODE), .INIT_RESET(INIT_RESET),
              .INIT_CKE(INIT_CKE), .REFI(REFI)) u_dram (
    .clk, .rst_n, .svc_map_en,
    .req_valid(d_req), .req_ready(d_ready), .req_we(d_we), .req_node(d_node),
    .req_addr(d_addr), .req_wdata(d_wdata), .rsp_valid(d_rsp), .rsp_rdata(d_rdata),
    .init_done,
    .ddr_reset_n, .ddr_cke, .ddr_cs_n, .ddr_ras_n, .ddr_cas_n, .ddr_we_n, .ddr_ba, .ddr_a,
    .ddr_dq_out, .ddr_dq_oe, .ddr_dqs_oe, .ddr_dq_in,
    .stat_data_cycles(stat_dram_data), .stat_busy_cycles(stat_dram_busy),
    .stat_act(stat_dram_act));

endmodule

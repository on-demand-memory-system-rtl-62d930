// cmmu: centralized memory management unit - the shared, adaptive L2 cache.
//
// The L2 is built from BANKS SRAM sub-blocks; each bank is one way, so a set
// has up to BANKS ways. The bank assignment table (bat) gives every node the
// banks it may use in the current time interval: a node holding N banks sees
// an N-way set-associative cache of its own (associativity-based partitioning,
// selective ways). Lines are tagged with the node number because each node
// has a private address space.
//
// An access (one 32-byte L1 line, half of a 64-byte L2 line) runs:
//   LOOK   the BAT returns the node's current and previous banks; the tags of
//          the current banks are checked.
//   LOOK2  on a miss, the banks the node held in other intervals are checked
//          (lazy transitioning): a line left there by an earlier assignment
//          is moved into a current bank (MOVE), then served.
//   miss   the LRU (or an invalid) way among the current banks is the
//          victim; a dirty victim is written back to DRAM, the line is read
//          from DRAM into it.
//   ACC    read-modify-write of the line in the chosen bank; the requested
//          half is returned, or the write data merged and the line marked
//          dirty.
// Storage: the tags of a set (valid, dirty, owner node, tag, LRU age for
// every bank) are one word of a tag RAM, read in LOOK and written back in one
// clock. After reset, and whenever a bank is powered up again, a sweep (S_CLR,
// one set per clock, SETS clocks) clears the tags of those banks before
// requests are taken again.
// Requests from the nodes are taken round-robin, one at a time. Replacement is
// LRU over the node's current banks (4-bit ages per set and bank), write
// policy is write back. Banks that no node holds in any interval are powered
// down and their contents dropped.
//
// Timing: a hit is acknowledged 4 clocks after the request is taken (take,
// LOOK, ACC read, merge/return); misses add the DRAM line read and, for a
// dirty victim, the write back. n_ack pulses for one clock with the read data
// on rdata.
//
// Follows the design description: banks as ways, the BAT with three
// intervals, second check of previously assigned banks, data movement to the
// new location, write back, LRU. This design's own choices: requests are
// served one at a time (the description overlaps requests of different nodes
// that use different banks, in a four-stage pipeline with pending buffers,
// read-before-write queues and a bank arbiter; none of that is built here),
// and the bank power rule.
module cmmu
  import odms_pkg::*;
#(
  parameter int unsigned NODES = 4,
  parameter int unsigned BANKS = 16,
  parameter int unsigned SETS  = 2048     // 2 MB / 16 banks / 64 B
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // L1 line requests from the d-MMUs (word addresses, 8-word aligned)
  input  logic [NODES-1:0]              n_req,
  input  logic [NODES-1:0]              n_we,
  input  logic [ADDR_W-1:0]             n_addr  [NODES],
  input  logic [L1_LINE_W-1:0]          n_wdata [NODES],
  output logic [NODES-1:0]              n_ack,
  output logic [L1_LINE_W-1:0]          rdata,
  // bank assignment table configuration
  input  logic                          cfg_we,
  input  logic [$clog2(NODES)-1:0]      cfg_node,
  input  logic [1:0]                    cfg_interval,
  input  logic [BANKS-1:0]              cfg_mask,
  input  logic                          cfg_sel_we,
  input  logic [1:0]                    cfg_sel,
  output logic [BANKS-1:0]              bank_power,
  // DRAM controller, 64-byte lines
  output logic                          d_req,
  input  logic                          d_ready,
  output logic                          d_we,
  output logic [$clog2(NODES)-1:0]      d_node,
  output logic [31:0]                   d_addr,
  output logic [L2_LINE_W-1:0]          d_wdata,
  input  logic                          d_rsp,
  input  logic [L2_LINE_W-1:0]          d_rdata,
  // event counters
  output logic [31:0]                   stat_hit,
  output logic [31:0]                   stat_lazy_hit,
  output logic [31:0]                   stat_miss,
  output logic [31:0]                   stat_wb
);

  localparam int unsigned NW   = $clog2(NODES);
  localparam int unsigned SW   = $clog2(SETS);
  localparam int unsigned BW   = $clog2(BANKS);
  localparam int unsigned TW   = ADDR_W - 4 - SW;     // tag bits of a word address
  localparam int unsigned AGEW = BW;

  typedef enum logic [3:0] {
    S_IDLE, S_LOOK, S_LOOK2, S_VICT, S_WB_RD, S_WB, S_FILL, S_MV_RD, S_MV_WR, S_ACC, S_ACC2, S_ACK,
    S_CLR
  } st_e;
  st_e st;

  // tag table: one word per set holding the entries of all banks
  typedef struct packed {
    logic            v;
    logic            d;
    logic [NW-1:0]   o;      // owner node
    logic [TW-1:0]   t;
    logic [AGEW-1:0] a;      // LRU age
  } tent_t;
  tent_t [BANKS-1:0] ttab [SETS];
  tent_t [BANKS-1:0] ent;
  logic  [SW-1:0]    tidx, clr_set;
  logic  [BANKS-1:0] clr_mask, clr_cur, pwr_q;

  // request
  logic [NW-1:0]        rr, node;
  logic                 we;
  logic [ADDR_W-1:0]    addr;
  logic [L1_LINE_W-1:0] wdata;
  logic [SW-1:0]        set;
  logic [TW-1:0]        rtag;
  logic [BW-1:0]        hb, vb, ob;
  logic                 move;

  assign set  = addr[4 +: SW];
  assign rtag = addr[ADDR_W-1 -: TW];
  assign tidx = (st == S_CLR) ? clr_set : set;
  assign ent  = ttab[tidx];

  // BAT
  logic [BANKS-1:0] cur_mask, old_mask;
  logic [1:0]       cur_interval;
  bat #(.NODES(NODES), .BANKS(BANKS), .INTERVALS(3)) u_bat (
    .clk, .rst_n, .cfg_we, .cfg_node, .cfg_interval, .cfg_mask, .cfg_sel_we, .cfg_sel,
    .lk_node(node), .cur_mask, .old_mask, .bank_power, .cur_interval);

  // banks
  logic [BANKS-1:0]     b_en;
  logic                 b_we;
  logic [L2_LINE_W-1:0] b_wdata;
  logic [L2_LINE_W-1:0] b_rdata [BANKS];

  for (genvar g = 0; g < BANKS; g++) begin : g_bank
    sram_bank #(.SETS(SETS), .LINE_W(L2_LINE_W)) u_bank (
      .clk, .pwr(bank_power[g]), .en(b_en[g]), .we(b_we), .addr(set),
      .wdata(b_wdata), .rdata(b_rdata[g]));
  end

  // hit detection over a mask of banks
  function automatic logic [BANKS:0] find_hit(logic [BANKS-1:0] m);
    for (int b = 0; b < BANKS; b++)
      if (m[b] && bank_power[b] && ent[b].v && ent[b].o == node && ent[b].t == rtag)
        return {1'b1, BANKS'(0)} | (BANKS+1)'(b);
    return '0;
  endfunction

  // victim: first invalid bank of the mask, else the oldest
  function automatic logic [BW-1:0] find_victim(logic [BANKS-1:0] m);
    logic [BW-1:0]   v = '0;
    logic [AGEW-1:0] a = '0;
    bit              found = 0;
    for (int b = 0; b < BANKS; b++)
      if (m[b] && !ent[b].v && !found) begin v = BW'(b); found = 1; end
    if (!found)
      for (int b = 0; b < BANKS; b++)
        if (m[b] && (!found || ent[b].a >= a)) begin v = BW'(b); a = ent[b].a; found = 1; end
    return v;
  endfunction

  logic [BANKS:0] hit1, hit2;
  assign hit1 = find_hit(cur_mask);
  assign hit2 = find_hit(old_mask);

  // bank port control
  always_comb begin
    b_en    = '0;
    b_we    = 1'b0;
    b_wdata = d_rdata;
    unique case (st)
      S_WB_RD: b_en[vb] = 1'b1;
      S_MV_RD: b_en[ob] = 1'b1;
      S_MV_WR: begin b_en[vb] = 1'b1; b_we = 1'b1; b_wdata = b_rdata[ob]; end
      S_FILL:  if (d_rsp) begin b_en[vb] = 1'b1; b_we = 1'b1; b_wdata = d_rdata; end
      S_ACC:   b_en[hb] = 1'b1;
      S_ACC2:  if (we) begin
                 b_en[hb] = 1'b1; b_we = 1'b1; b_wdata = b_rdata[hb];
                 b_wdata[addr[3] * L1_LINE_W +: L1_LINE_W] = wdata;
               end
      default: ;
    endcase
  end

  logic wb_sent, fill_sent;

  // tag table update: read-modify-write of the whole set entry
  tent_t [BANKS-1:0] ne;
  logic              tw;
  always_comb begin
    ne = ent;
    tw = 1'b0;
    unique case (st)
      S_CLR: begin
        for (int b = 0; b < BANKS; b++)
          if (clr_cur[b]) begin ne[b].v = 1'b0; ne[b].d = 1'b0; ne[b].a = '0; end
        tw = 1'b1;
      end
      S_WB: if (wb_sent && d_rsp) begin ne[vb].v = 1'b0; tw = 1'b1; end
      S_FILL: if (fill_sent && d_rsp) begin
        ne[vb].v = 1'b1; ne[vb].d = 1'b0; ne[vb].o = node; ne[vb].t = rtag;
        tw = 1'b1;
      end
      S_MV_WR: begin
        ne[vb].v = 1'b1; ne[vb].d = ent[ob].d; ne[vb].o = node; ne[vb].t = rtag;
        ne[ob].v = 1'b0; ne[ob].d = 1'b0;
        tw = 1'b1;
      end
      S_ACC2: begin
        if (we) ne[hb].d = 1'b1;
        for (int b = 0; b < BANKS; b++)
          if (cur_mask[b] && ent[b].a < ent[hb].a && ent[b].a != '1)
            ne[b].a = ent[b].a + 1'b1;
        ne[hb].a = '0;
        tw = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) if (tw) ttab[tidx] <= ne;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; rr <= '0; node <= '0; we <= 1'b0; addr <= '0; wdata <= '0;
      hb <= '0; vb <= '0; ob <= '0; move <= 1'b0;
      n_ack <= '0; rdata <= '0;
      d_req <= 1'b0; d_we <= 1'b0; d_node <= '0; d_addr <= '0; d_wdata <= '0;
      wb_sent <= 1'b0; fill_sent <= 1'b0;
      stat_hit <= '0; stat_lazy_hit <= '0; stat_miss <= '0; stat_wb <= '0;
      clr_mask <= '1; clr_cur <= '0; clr_set <= '0; pwr_q <= '0;
    end else begin
      n_ack <= '0;
      if (d_req && d_ready) d_req <= 1'b0;
      // a bank that is powered up again starts empty: its entries are swept
      pwr_q <= bank_power;
      clr_mask <= clr_mask | (bank_power & ~pwr_q);

      unique case (st)
        S_IDLE: begin
          // round robin over the node requests
          automatic bit taken = 0;
          for (int k = 0; k < NODES; k++) begin
            automatic int n = (int'(rr) + k) % NODES;
            if (!taken && n_req[n] && !n_ack[n]) begin
              taken = 1;
              node <= NW'(n); we <= n_we[n]; addr <= n_addr[n]; wdata <= n_wdata[n];
              rr   <= NW'((n + 1) % NODES);
            end
          end
          if (clr_mask != '0) begin
            taken = 0;
            clr_cur <= clr_mask; clr_mask <= bank_power & ~pwr_q; clr_set <= '0;
            st <= S_CLR;
          end
          if (taken) st <= S_LOOK;
        end
        S_CLR: begin
          clr_set <= clr_set + 1'b1;
          if (clr_set == SW'(SETS - 1)) st <= S_IDLE;
        end
        S_LOOK: begin
          move <= 1'b0;
          if (hit1[BANKS]) begin
            hb <= hit1[BW-1:0];
            stat_hit <= stat_hit + 1;
            st <= S_ACC;
          end else st <= S_LOOK2;
        end
        S_LOOK2: begin
          vb <= find_victim(cur_mask);
          if (hit2[BANKS]) begin
            ob <= hit2[BW-1:0];
            move <= 1'b1;
            stat_lazy_hit <= stat_lazy_hit + 1;
          end else stat_miss <= stat_miss + 1;
          st <= S_VICT;
        end
        S_VICT: begin
          fill_sent <= 1'b0;
          if (ent[vb].v && ent[vb].d) st <= S_WB_RD;
          else st <= move ? S_MV_RD : S_FILL;
        end
        S_WB_RD: begin
          st <= S_WB; wb_sent <= 1'b0;
        end
        S_WB: begin
          if (!wb_sent) begin
            d_req <= 1'b1; d_we <= 1'b1; d_node <= ent[vb].o;
            d_addr <= {ent[vb].t, set, 6'b000000}; d_wdata <= b_rdata[vb];
            wb_sent <= 1'b1;
          end else if (d_rsp) begin
            stat_wb <= stat_wb + 1;
            st <= move ? S_MV_RD : S_FILL;
            fill_sent <= 1'b0;
          end
        end
        S_FILL: begin
          if (!fill_sent) begin
            d_req <= 1'b1; d_we <= 1'b0; d_node <= node;
            d_addr <= {rtag, set, 6'b000000};
            fill_sent <= 1'b1;
          end else if (d_rsp) begin
            hb <= vb;
            st <= S_ACC;
          end
        end
        S_MV_RD: st <= S_MV_WR;
        S_MV_WR: begin
          hb <= vb;
          st <= S_ACC;
        end
        S_ACC: st <= S_ACC2;
        S_ACC2: begin
          rdata <= b_rdata[hb][addr[3] * L1_LINE_W +: L1_LINE_W];
          st <= S_ACK;
        end
        default: begin
          n_ack[node] <= 1'b1;
          st <= S_IDLE;
        end
      endcase
    end
  end

  // a node must hold at least one bank in the current interval
  a_banks: assert property (@(posedge clk) disable iff (!rst_n)
             (st == S_LOOK2) |-> (cur_mask != '0));

endmodule

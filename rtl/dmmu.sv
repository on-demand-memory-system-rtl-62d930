// dmmu: distributed memory management unit - the L1 cache of one node, with
// buffer borrowing for the network interface and a pre-fetch command port.
//
// Cache: two banks of WAYS-way sets, 32-byte (8-word) lines, 32-bit words,
// word addressing. Consecutive lines alternate between the banks (address
// bit 3), so a burst of up to 8 words touches either one line or two lines in
// different banks, and both tag checks happen in the same clock. Write back,
// LRU replacement (2-bit ages per way and set). Tags and data sit in RAMs;
// the status of a line (valid, dirty, age) sits in a status RAM with two
// write ports (one per bank), which a sweep clears after reset: requests are
// taken 2*SETS clocks after reset is released. Status of the lendable way
// (valid, borrowed) is kept in flip-flops for the empty detector.
//
// PE protocol (burst based): the PE holds pe_req with start address and
// burst length (1..8). When every line the burst touches is present, pe_gnt
// pulses and the data phase runs for BL clocks starting the next clock: for a
// read pe_rvalid/pe_rdata carry one word per clock; for a write pe_wready is
// high and pe_wdata is sampled each clock. Missing lines are brought in first:
// a dirty victim is written to the next level, then the line is read
// (m_* port, one 256-bit line per transfer, m_ack when done).
//
// Borrowing: the last way of each bank can be lent to the network interface.
// borrow_addr_gen finds an empty block; when the NI requests (bw_req) the
// d-MMU marks that block borrowed (status bit; the cache then neither hits
// nor allocates there) and pulses bw_gnt. The NI writes the whole payload in
// one clock (bw_wvalid/bw_wdata, held until the bw_wack pulse) and the block
// address enters the address queue. br_req (held until br_valid) reads the
// oldest borrowed block and frees it. bw_release drops a request that has not
// yet been written, also after the grant.
//
// Pre-fetch: pf_valid/pf_addr name a line; when no PE request is waiting
// the d-MMU accepts it (pf_ready), checks the tags and fetches the line on a
// miss, returning nothing to the PE.
//
// Follows the design description: two banks, 32-byte blocks, the 8-word
// burst protocol, one-clock hit/miss detection of a burst, borrowing from
// the last way with status bits and an address queue, the 4-cycle window
// search, pre-fetch served when the controller is idle. This design's
// choices: a miss is handled before the burst is granted (the description
// lets a later request's miss overlap the data phase of the previous burst);
// the address queue sits in the d-MMU; LRU by ages; the handshakes.
module dmmu
  import odms_pkg::*;
#(
  parameter int unsigned SETS  = 256,     // sets per bank: 2 x 256 x 4 x 32 B = 64 KB
  parameter int unsigned WAYS  = 4,
  parameter int unsigned BQ    = 8,       // borrowed-block address queue
  parameter int unsigned WINDOW = 128
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // PE burst port
  input  logic                   pe_req,
  input  logic                   pe_we,
  input  logic [ADDR_W-1:0]      pe_addr,
  input  logic [3:0]             pe_bl,
  output logic                   pe_gnt,
  output logic                   pe_rvalid,
  output logic [WORD_W-1:0]      pe_rdata,
  output logic                   pe_wready,
  input  logic [WORD_W-1:0]      pe_wdata,
  // next level (c-MMU)
  output logic                   m_req,
  output logic                   m_we,
  output logic [ADDR_W-1:0]      m_addr,
  output logic [L1_LINE_W-1:0]   m_wdata,
  input  logic                   m_ack,
  input  logic [L1_LINE_W-1:0]   m_rdata,
  // buffer borrowing (NI)
  input  logic                   bw_req,
  output logic                   bw_gnt,
  input  logic                   bw_wvalid,
  output logic                   bw_wack,
  input  logic [L1_LINE_W-1:0]   bw_wdata,
  input  logic                   bw_release,
  input  logic                   br_req,
  output logic                   br_valid,
  output logic [L1_LINE_W-1:0]   br_rdata,
  output logic [$clog2(BQ):0]    b_count,
  // pre-fetch commands (PCG)
  input  logic                   pf_valid,
  input  logic [ADDR_W-1:0]      pf_addr,
  output logic                   pf_ready,
  // event counters
  output logic [31:0]            stat_hit,
  output logic [31:0]            stat_miss,
  output logic [31:0]            stat_pf_fill
);

  localparam int unsigned SW  = $clog2(SETS);
  localparam int unsigned IW  = SW + 1;                 // {bank, set}
  localparam int unsigned NL  = 2 * SETS;
  localparam int unsigned TW  = ADDR_W - 3 - IW;
  localparam int unsigned WW  = $clog2(WAYS);
  localparam int unsigned LW  = WAYS - 1;               // lendable way

  typedef enum logic [2:0] { S_INIT, S_IDLE, S_LOOK, S_EVICT, S_FILL, S_GNT, S_XFER } st_e;
  st_e st;

  logic [TW-1:0]        tag   [WAYS][NL];
  // per-line status: valid, dirty and LRU age of every way, one word per line
  typedef struct packed {
    logic [WAYS-1:0]      v;
    logic [WAYS-1:0]      d;
    logic [WAYS-1:0][1:0] a;
  } meta_t;
  meta_t                meta [NL];
  logic [NL-1:0]        lvalid;     // valid bits of the lendable way, for the borrow search
  logic [NL-1:0]        borrowed;
  logic [IW-1:0]        init_cnt;
  logic [L1_LINE_W-1:0] data  [WAYS][NL];

  // current burst
  logic                 we_q, pf_q;
  logic [ADDR_W-1:0]    addr_q;
  logic [3:0]           bl_q, k;
  logic [ADDR_W-4:0]    line0, line1, fline;
  logic [WW-1:0]        way0, way1, vway;
  logic                 m_sent;

  function automatic logic [IW-1:0] idx(logic [ADDR_W-4:0] l);
    return l[IW-1:0];
  endfunction
  function automatic logic [TW-1:0] ltag(logic [ADDR_W-4:0] l);
    return l[ADDR_W-4 -: TW];
  endfunction

  // hit detection for a line
  function automatic logic [WW:0] lookup(logic [ADDR_W-4:0] l);
    for (int w = 0; w < WAYS; w++)
      if (meta[idx(l)].v[w] && tag[w][idx(l)] == ltag(l) && !(w == LW && borrowed[idx(l)]))
        return {1'b1, WW'(w)};
    return '0;
  endfunction

  // victim: an invalid way, else the oldest; a borrowed block is never chosen
  function automatic logic [WW-1:0] victim(logic [ADDR_W-4:0] l);
    logic [WW-1:0] v = '0;
    logic [1:0]    a = '0;
    bit            f = 0;
    for (int w = 0; w < WAYS; w++)
      if (!f && !meta[idx(l)].v[w] && !(w == LW && borrowed[idx(l)])) begin v = WW'(w); f = 1; end
    if (!f)
      for (int w = 0; w < WAYS; w++)
        if (!(w == LW && borrowed[idx(l)]) && (!f || meta[idx(l)].a[w] >= a)) begin
          v = WW'(w); a = meta[idx(l)].a[w]; f = 1;
        end
    return v;
  endfunction

  logic [ADDR_W-1:0] last_addr;
  assign last_addr = addr_q + ADDR_W'(bl_q) - 1'b1;
  assign line0 = addr_q[ADDR_W-1:3];
  assign line1 = last_addr[ADDR_W-1:3];

  logic [WW:0] h0, h1;
  assign h0 = lookup(line0);
  assign h1 = lookup(line1);

  // borrowing
  logic [NL-1:0]        occupied;
  logic                 g_found, g_search;
  logic [IW-1:0]        g_addr, res_addr;
  logic                 reserved, take;
  logic [IW-1:0]        bq [BQ];
  logic [$clog2(BQ):0]  bq_n;

  assign occupied = lvalid | borrowed;
  assign take     = (st == S_IDLE) && g_found && bw_req && !reserved && !bw_release &&
                    (int'(bq_n) < BQ);

  borrow_addr_gen #(.ENTRIES(NL), .WINDOW(WINDOW)) u_gen (
    .clk, .rst_n, .start(bw_req && !reserved), .cancel(bw_release), .take,
    .occupied, .found(g_found), .addr(g_addr), .searching(g_search));

  assign b_count = bq_n;

  logic [ADDR_W-1:0] cur_word_addr;
  logic [ADDR_W-4:0] cur_line;
  logic [WW-1:0]     cur_way;
  assign cur_word_addr = addr_q + ADDR_W'(k);
  assign cur_line      = cur_word_addr[ADDR_W-1:3];
  assign cur_way       = (cur_line == line0) ? way0 : way1;

  assign pe_rdata  = data[cur_way][idx(cur_line)][cur_word_addr[2:0] * WORD_W +: WORD_W];
  assign pe_rvalid = (st == S_XFER) && !we_q;
  assign pe_wready = (st == S_XFER) && we_q;

  // status words: two write ports (the two lines of a burst sit in different
  // banks), no reset - cleared by the S_INIT sweep
  logic          ma_we, mb_we;
  logic [IW-1:0] ma_idx, mb_idx;
  meta_t         ma_val, mb_val, m0, m1;
  assign m0 = meta[idx(line0)];
  assign m1 = meta[idx(line1)];
  always_comb begin
    ma_we = 1'b0; mb_we = 1'b0;
    ma_idx = idx(line0); mb_idx = idx(line1);
    ma_val = m0; mb_val = m1;
    unique case (st)
      S_INIT: begin
        ma_we = 1'b1; ma_idx = init_cnt; ma_val = '0;
        for (int w = 0; w < WAYS; w++) ma_val.a[w] = 2'(w);
      end
      S_LOOK: if (h0[WW] && h1[WW]) begin
        // LRU: ways younger than the hit way age by one, the hit way becomes 0
        ma_we = 1'b1;
        for (int w = 0; w < WAYS; w++)
          if (m0.a[w] < m0.a[h0[WW-1:0]]) ma_val.a[w] = m0.a[w] + 1'b1;
        ma_val.a[h0[WW-1:0]] = '0;
        if (line1 != line0) begin
          mb_we = 1'b1;
          for (int w = 0; w < WAYS; w++)
            if (m1.a[w] < m1.a[h1[WW-1:0]]) mb_val.a[w] = m1.a[w] + 1'b1;
          mb_val.a[h1[WW-1:0]] = '0;
        end
      end
      S_EVICT: if (m_sent && m_ack) begin
        ma_we = 1'b1; ma_idx = idx(fline); ma_val = meta[idx(fline)];
        ma_val.v[vway] = 1'b0; ma_val.d[vway] = 1'b0;
      end
      S_FILL: if (m_sent && m_ack) begin
        ma_we = 1'b1; ma_idx = idx(fline); ma_val = meta[idx(fline)];
        ma_val.v[vway] = 1'b1; ma_val.d[vway] = 1'b0;
      end
      S_XFER: if (we_q) begin
        ma_we = 1'b1; ma_idx = idx(cur_line); ma_val = meta[idx(cur_line)];
        ma_val.d[cur_way] = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (ma_we) meta[ma_idx] <= ma_val;
    if (mb_we) meta[mb_idx] <= mb_val;
  end

  // data and tag arrays: one write port, no reset
  logic                 dw, tw;
  logic [WW-1:0]        dway;
  logic [IW-1:0]        didx;
  logic [L1_LINE_W-1:0] dline;
  always_comb begin
    dw = 1'b0; tw = 1'b0; dway = vway; didx = idx(fline); dline = m_rdata;
    unique case (st)
      S_IDLE: if (!take && reserved && bw_wvalid && !bw_release) begin
        dw = 1'b1; dway = WW'(LW); didx = res_addr; dline = bw_wdata;
      end
      S_FILL: if (m_sent && m_ack) begin dw = 1'b1; tw = 1'b1; end
      S_XFER: if (we_q) begin
        dw = 1'b1; dway = cur_way; didx = idx(cur_line);
        dline = data[cur_way][idx(cur_line)];
        dline[cur_word_addr[2:0] * WORD_W +: WORD_W] = pe_wdata;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (dw) data[dway][didx] <= dline;
    if (tw) tag[vway][idx(fline)] <= ltag(fline);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_INIT; init_cnt <= '0; lvalid <= '0;
      borrowed <= '0;
      we_q <= 1'b0; pf_q <= 1'b0; addr_q <= '0; bl_q <= 4'd1; k <= '0;
      way0 <= '0; way1 <= '0; vway <= '0; fline <= '0; m_sent <= 1'b0;
      m_req <= 1'b0; m_we <= 1'b0; m_addr <= '0; m_wdata <= '0;
      pe_gnt <= 1'b0; pf_ready <= 1'b0; bw_gnt <= 1'b0; bw_wack <= 1'b0;
      br_valid <= 1'b0; br_rdata <= '0;
      reserved <= 1'b0; res_addr <= '0; bq_n <= '0;
      for (int i = 0; i < BQ; i++) bq[i] <= '0;
      stat_hit <= '0; stat_miss <= '0; stat_pf_fill <= '0;
    end else begin
      pe_gnt <= 1'b0; pf_ready <= 1'b0; bw_gnt <= 1'b0; bw_wack <= 1'b0; br_valid <= 1'b0;
      if (m_req && m_ack) m_req <= 1'b0;

      // ------------------------------------------------ release of a granted block
      if (reserved && bw_release) begin
        reserved <= 1'b0;
        borrowed[res_addr] <= 1'b0;
      end

      unique case (st)
        S_INIT: begin                // status words cleared after reset
          init_cnt <= init_cnt + 1'b1;
          if (init_cnt == IW'(NL - 1)) st <= S_IDLE;
        end
        S_IDLE: begin
          automatic int unsigned n = 32'(bq_n);
          if (take) begin
            // borrowing status setting
            borrowed[g_addr] <= 1'b1;
            res_addr <= g_addr;
            reserved <= 1'b1;
            bw_gnt   <= 1'b1;
          end else if (reserved && bw_wvalid && !bw_release) begin
            // data writing into the borrowed block, address to the queue
            bq[n] <= res_addr;
            n = n + 1;
            reserved <= 1'b0;
            bw_wack  <= 1'b1;
          end else if (br_req && bq_n != 0) begin
            br_rdata <= data[LW][bq[0]];
            br_valid <= 1'b1;
            borrowed[bq[0]] <= 1'b0;
            for (int i = 0; i < BQ - 1; i++) bq[i] <= bq[i + 1];
            n = n - 1;
          end else if (pe_req) begin
            we_q <= pe_we; pf_q <= 1'b0; addr_q <= pe_addr;
            bl_q <= (pe_bl == 0) ? 4'd1 : ((pe_bl > 4'd8) ? 4'd8 : pe_bl);
            st <= S_LOOK;
          end else if (pf_valid) begin
            we_q <= 1'b0; pf_q <= 1'b1; addr_q <= {pf_addr[ADDR_W-1:3], 3'b000}; bl_q <= 4'd1;
            pf_ready <= 1'b1;
            st <= S_LOOK;
          end
          bq_n <= ($clog2(BQ)+1)'(n);
        end
        S_LOOK: begin
          // both lines of the burst are checked in this clock
          if (h0[WW] && h1[WW]) begin
            way0 <= h0[WW-1:0]; way1 <= h1[WW-1:0];
            if (pf_q) st <= S_IDLE;
            else begin
              stat_hit <= stat_hit + 1;
              pe_gnt <= 1'b1; k <= '0; st <= S_GNT;
            end
          end else begin
            automatic logic [ADDR_W-4:0] ml = h0[WW] ? line1 : line0;
            automatic logic [WW-1:0]     v  = victim(ml);
            fline <= ml; vway <= v; m_sent <= 1'b0;
            if (pf_q) stat_pf_fill <= stat_pf_fill + 1; else stat_miss <= stat_miss + 1;
            st <= (meta[idx(ml)].v[v] && meta[idx(ml)].d[v]) ? S_EVICT : S_FILL;
          end
        end
        S_EVICT: begin
          if (!m_sent) begin
            m_req <= 1'b1; m_we <= 1'b1;
            m_addr  <= {tag[vway][idx(fline)], idx(fline), 3'b000};
            m_wdata <= data[vway][idx(fline)];
            m_sent <= 1'b1;
          end else if (m_ack) begin
            if (vway == WW'(LW)) lvalid[idx(fline)] <= 1'b0;
            m_sent <= 1'b0;
            st <= S_FILL;
          end
        end
        S_FILL: begin
          if (!m_sent) begin
            m_req <= 1'b1; m_we <= 1'b0; m_addr <= {fline, 3'b000};
            m_sent <= 1'b1;
          end else if (m_ack) begin
            if (vway == WW'(LW)) lvalid[idx(fline)] <= 1'b1;
            st <= S_LOOK;             // re-check: the other line may miss too
          end
        end
        S_GNT: st <= S_XFER;         // pe_gnt is high; data from the next clock
        default: begin               // S_XFER
          k <= k + 1'b1;
          if (k + 1'b1 == bl_q) st <= S_IDLE;
        end
      endcase
    end
  end

  // a burst never touches more than two lines, and they sit in different banks
  a_two_lines: assert property (@(posedge clk) disable iff (!rst_n)
                 (st == S_LOOK) |-> (line1 == line0 || line1 == line0 + 1'b1));

endmodule

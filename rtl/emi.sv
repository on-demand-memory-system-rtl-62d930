// emi: external memory interface for DDR3 SDRAM (BL8, x16 devices sharing
// one command/address/data bus, told apart by chip select).
//
// Requests (one BL8 burst each: read or write, chip select, bank, row, column,
// 128-bit write data and a tag) enter a request queue that is kept in arrival
// order. Every clock the command scheduler picks at most one DRAM command:
//   1. a column command (RD/WR) for a request whose row is open and whose
//      timing is met, preferring the same direction as the previous column
//      command, so that reads and writes without a data dependency are grouped
//      and the write-to-read turnaround is paid less often;
//   2. otherwise an ACTIVATE for the oldest request whose bank is closed, so
//      bank activation overlaps data transfers of other banks (at most four
//      ACTs per tFAW, tRRD apart);
//   3. otherwise a PRECHARGE for the oldest request that hits a row conflict,
//      once no older request still uses the open row.
// A request never passes an older request to the same address when either is
// a write. With SCHED_EN = 0 only the oldest request is considered, which
// gives in-order issue for comparison.
//
// Bank FSMs keep, per device and bank, whether a row is open and which. The
// timing counters are loaded when a command issues and count down to zero;
// a command is legal only when all counters that guard it are zero. The
// command FSM runs the power-up sequence (reset, CKE, MR2/MR3/MR1/MR0, ZQCL)
// and periodic refresh (precharge all open banks, REF to each device), and
// otherwise lets the scheduler issue. The I/O control drives write data CWL
// clocks after a WR and captures read data CL clocks after a RD, with DQS
// enabled one clock ahead of the write data as the preamble.
//
// Timing: command pins and write data are registered (one clock after the
// decision); the data bus carries two DDR beats per clock as {fall, rise},
// so a burst occupies 4 clocks. Read data of a request returns on rsp_*.
// The architecture (bank FSMs, scheduler, timing counters, command and I/O
// FSMs) and the scheduling goals follow the design description; the queue
// organisation, the exact priority rules and the starvation guard are this
// implementation's choices. Reads to one device after reads to the other are
// not given an extra rank-switch gap (the behavioural DRAM model does not
// need one).
module emi
  import odms_pkg::*;
#(
  parameter int unsigned RANKS      = 2,
  parameter int unsigned QDEPTH     = 32,
  parameter int unsigned ID_W       = 4,
  parameter bit          SCHED_EN   = 1'b1,
  parameter int unsigned INIT_RESET = 133334,  // 200 us of RESET# low
  parameter int unsigned INIT_CKE   = 333334,  // 500 us before CKE
  parameter int unsigned REFI       = T_REFI
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // request queue
  input  logic                 req_valid,
  output logic                 req_ready,
  input  logic                 req_we,
  input  dram_addr_t           req_addr,
  input  logic [BURST_W-1:0]   req_wdata,
  input  logic [ID_W-1:0]      req_id,
  // read data return
  output logic                 rsp_valid,
  output logic [BURST_W-1:0]   rsp_rdata,
  output logic [ID_W-1:0]      rsp_id,
  output logic                 init_done,
  // DDR3 pins
  output logic                 ddr_reset_n,
  output logic                 ddr_cke,
  output logic [RANKS-1:0]     ddr_cs_n,
  output logic                 ddr_ras_n,
  output logic                 ddr_cas_n,
  output logic                 ddr_we_n,
  output logic [2:0]           ddr_ba,
  output logic [12:0]          ddr_a,
  output logic [31:0]          ddr_dq_out,
  output logic                 ddr_dq_oe,
  output logic                 ddr_dqs_oe,
  input  logic [31:0]          ddr_dq_in,
  // activity counters for bandwidth measurement
  output logic [31:0]          stat_data_cycles,
  output logic [31:0]          stat_busy_cycles,
  output logic [31:0]          stat_act,
  output logic [31:0]          stat_reorder
);

  localparam int unsigned NB   = RANKS * 8;
  localparam int unsigned CS_W = (RANKS > 1) ? $clog2(RANKS) : 1;
  localparam int unsigned QI_W = $clog2(QDEPTH);
  localparam int unsigned CW   = 16;
  localparam int unsigned RD2WR = T_CL + T_CCD + 2 - T_CWL;
  localparam int unsigned WR2RD = T_CWL + BURST_CYC + T_WTR;
  localparam int unsigned WR2PRE = T_CWL + BURST_CYC + T_WR;

  typedef struct packed {
    logic               we;
    dram_addr_t         a;
    logic [BURST_W-1:0] wdata;
    logic [ID_W-1:0]    id;
  } qent_t;

  // ---------------------------------------------------------------- state
  qent_t              q   [QDEPTH];
  logic [QI_W:0]      qcnt;
  logic               bopen [NB];
  logic [12:0]        brow  [NB];
  logic [CW-1:0]      c_col [NB], c_pre [NB], c_act [NB];
  logic [CW-1:0]      c_rrd [RANKS];
  logic [CW-1:0]      c_faw [RANKS][4];
  logic [CW-1:0]      c_ccd, c_rd2wr, c_wr2rd;
  logic               last_we;

  typedef enum logic [2:0] { I_RESET, I_CKEW, I_CKE, I_MRS, I_MOD, I_ZQ, I_RUN } init_e;
  init_e              ist;
  logic [19:0]        iwait;
  logic [1:0]         mrs_idx;
  logic [CW-1:0]      ref_cnt;
  logic               ref_pend;
  logic [CS_W-1:0]    ref_rank;

  // ---------------------------------------------------------------- helpers
  function automatic int unsigned bidx(dram_addr_t a);
    return int'(a.cs) * 8 + int'(a.bank);
  endfunction

  function automatic logic [CW-1:0] lmax(logic [CW-1:0] cur, int unsigned n);
    logic [CW-1:0] d;
    d = (cur != 0) ? cur - 1'b1 : '0;
    return (d > CW'(n - 1)) ? d : CW'(n - 1);
  endfunction

  // ---------------------------------------------------------------- scheduler (combinational)
  ddr_cmd_e        sel_cmd;
  logic [QI_W-1:0] sel_q;
  logic [RANKS-1:0] sel_cs;
  logic [2:0]      sel_ba;
  logic [12:0]     sel_a;
  logic            faw_ok [RANKS];

  always_comb begin
    for (int r = 0; r < RANKS; r++) begin
      automatic int n = 0;
      for (int k = 0; k < 4; k++) if (c_faw[r][k] != 0) n++;
      faw_ok[r] = (n < 4) && (c_rrd[r] == 0);
    end
  end

  always_comb begin
    automatic int  col_same = -1, col_any = -1, act_i = -1, pre_i = -1, pick = -1;
    automatic int  lim;
    sel_cmd = CMD_NOP;
    sel_q   = '0;
    sel_cs  = '0;
    sel_ba  = '0;
    sel_a   = '0;
    lim = SCHED_EN ? int'(qcnt) : ((qcnt != 0) ? 1 : 0);
    if (ist == I_RUN && !ref_pend) begin
      for (int i = 0; i < QDEPTH; i++) begin
        if (i < lim) begin
          automatic int  b    = bidx(q[i].a);
          automatic bit  hit  = bopen[b] && brow[b] == q[i].a.row;
          automatic bit  dep  = 1'b0;
          automatic bit  oldb = 1'b0;   // older request to the same bank, other row
          automatic bit  oldh = 1'b0;   // older request hitting the open row
          for (int j = 0; j < QDEPTH; j++) begin
            if (j < i) begin
              if (q[j].a == q[i].a && (q[j].we || q[i].we)) dep = 1'b1;
              if (bidx(q[j].a) == b && q[j].a.row != q[i].a.row) oldb = 1'b1;
              if (bidx(q[j].a) == b && bopen[b] && q[j].a.row == brow[b]) oldh = 1'b1;
            end
          end
          if (hit && !dep && c_col[b] == 0 && c_ccd == 0 &&
              (q[i].we ? c_rd2wr == 0 : c_wr2rd == 0)) begin
            if (col_any < 0) col_any = i;
            if (col_same < 0 && q[i].we == last_we) col_same = i;
          end
          if (!bopen[b] && !oldb && c_act[b] == 0 && faw_ok[q[i].a.cs] && act_i < 0)
            act_i = i;
          if (bopen[b] && !hit && !oldh && c_pre[b] == 0 && pre_i < 0)
            pre_i = i;
        end
      end
      pick = (col_same >= 0) ? col_same : col_any;
      if (pick >= 0) begin
        sel_cmd = q[pick].we ? CMD_WR : CMD_RD;
        sel_q   = QI_W'(pick);
        sel_cs[q[pick].a.cs] = 1'b1;
        sel_ba  = q[pick].a.bank;
        sel_a   = {3'b000, q[pick].a.col};
      end else if (act_i >= 0) begin
        sel_cmd = CMD_ACT;
        sel_cs[q[act_i].a.cs] = 1'b1;
        sel_ba  = q[act_i].a.bank;
        sel_a   = q[act_i].a.row;
      end else if (pre_i >= 0) begin
        sel_cmd = CMD_PRE;
        sel_cs[q[pre_i].a.cs] = 1'b1;
        sel_ba  = q[pre_i].a.bank;
      end
    end else if (ist == I_RUN && ref_pend) begin
      // refresh: close open banks of the rank, then REF
      automatic int  ob = -1;
      automatic bit  idle = 1'b1;
      for (int k = 0; k < 8; k++) begin
        automatic int b = int'(ref_rank) * 8 + k;
        if (bopen[b]) begin
          idle = 1'b0;
          if (ob < 0 && c_pre[b] == 0) ob = k;
        end
        if (c_act[b] != 0) idle = 1'b0;
      end
      sel_cs[ref_rank] = 1'b1;
      if (ob >= 0) begin
        sel_cmd = CMD_PRE;
        sel_ba  = 3'(ob);
      end else if (idle) begin
        sel_cmd = CMD_REF;
      end else begin
        sel_cs = '0;
      end
    end
  end

  // ---------------------------------------------------------------- I/O control
  typedef struct packed {
    logic [CW-1:0]      t;
    logic [ID_W-1:0]    id;
    logic [BURST_W-1:0] data;
  } io_t;

  localparam int unsigned IOD = 8;
  io_t             wq [IOD], rq [IOD];
  logic [3:0]      wq_n, rq_n;
  logic [CW-1:0]   now;
  logic [1:0]      wbeat, rbeat;
  logic            wact, ract;
  logic [BURST_W-1:0] rbuf;

  // ---------------------------------------------------------------- sequential
  assign req_ready = (qcnt < (QI_W+1)'(QDEPTH));
  assign init_done = (ist == I_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qcnt <= '0;
      for (int i = 0; i < QDEPTH; i++) q[i] <= '0;
      for (int b = 0; b < NB; b++) begin
        bopen[b] <= 1'b0; brow[b] <= '0;
        c_col[b] <= '0; c_pre[b] <= '0; c_act[b] <= '0;
      end
      for (int r = 0; r < RANKS; r++) begin
        c_rrd[r] <= '0;
        for (int k = 0; k < 4; k++) c_faw[r][k] <= '0;
      end
      c_ccd <= '0; c_rd2wr <= '0; c_wr2rd <= '0;
      last_we <= 1'b0;
      ist <= I_RESET; iwait <= 20'(INIT_RESET); mrs_idx <= '0;
      ref_cnt <= CW'(REFI); ref_pend <= 1'b0; ref_rank <= '0;
      ddr_reset_n <= 1'b0; ddr_cke <= 1'b0; ddr_cs_n <= '1;
      {ddr_ras_n, ddr_cas_n, ddr_we_n} <= 3'b111;
      ddr_ba <= '0; ddr_a <= '0;
      stat_busy_cycles <= '0; stat_act <= '0; stat_reorder <= '0;
    end else begin
      automatic ddr_cmd_e c = CMD_NOP;
      automatic logic [RANKS-1:0] cs = '0;
      automatic logic [2:0]  ba = '0;
      automatic logic [12:0] a  = '0;
      automatic int unsigned n;

      // ------------------------------------------------ timers count down
      for (int b = 0; b < NB; b++) begin
        c_col[b] <= lmax(c_col[b], 1); c_pre[b] <= lmax(c_pre[b], 1); c_act[b] <= lmax(c_act[b], 1);
      end
      for (int r = 0; r < RANKS; r++) begin
        c_rrd[r] <= lmax(c_rrd[r], 1);
        for (int k = 0; k < 4; k++) c_faw[r][k] <= lmax(c_faw[r][k], 1);
      end
      c_ccd <= lmax(c_ccd, 1); c_rd2wr <= lmax(c_rd2wr, 1); c_wr2rd <= lmax(c_wr2rd, 1);

      // ------------------------------------------------ command FSM
      unique case (ist)
        I_RESET: if (iwait != 0) iwait <= iwait - 1'b1;
                 else begin ist <= I_CKEW; iwait <= 20'(INIT_CKE); ddr_reset_n <= 1'b1; end
        I_CKEW:  if (iwait != 0) iwait <= iwait - 1'b1;
                 else begin ist <= I_CKE; iwait <= 20'(T_RFC + 8); ddr_cke <= 1'b1; end
        I_CKE:   if (iwait != 0) iwait <= iwait - 1'b1;
                 else begin ist <= I_MRS; iwait <= '0; mrs_idx <= '0; end
        I_MRS:   if (iwait != 0) iwait <= iwait - 1'b1;
                 else begin
                   c  = CMD_MRS; cs = '1;
                   unique case (mrs_idx)        // MR2, MR3, MR1, MR0
                     2'd0: begin ba = 3'd2; a = 13'h0010; end  // CWL 7
                     2'd1: begin ba = 3'd3; a = 13'h0000; end
                     2'd2: begin ba = 3'd1; a = 13'h0000; end  // DLL on
                     default: begin ba = 3'd0; a = 13'h0B50; end // BL8, CL9, WR10, DLL reset
                   endcase
                   mrs_idx <= mrs_idx + 1'b1;
                   iwait   <= 20'(T_MRD - 1);
                   if (mrs_idx == 2'd3) begin ist <= I_MOD; iwait <= 20'(T_MOD - 1); end
                 end
        I_MOD:   if (iwait != 0) iwait <= iwait - 1'b1;
                 else begin c = CMD_ZQCL; cs = '1; a = 13'h0400; ist <= I_ZQ; iwait <= 20'(T_ZQINIT - 1); end
        I_ZQ:    if (iwait != 0) iwait <= iwait - 1'b1;
                 else ist <= I_RUN;
        default: begin
          c = sel_cmd; cs = sel_cs; ba = sel_ba; a = sel_a;
          if (ref_cnt != 0) ref_cnt <= ref_cnt - 1'b1;
          else begin ref_cnt <= CW'(REFI); ref_pend <= 1'b1; end
        end
      endcase

      // ------------------------------------------------ bank FSMs and timers
      if (ist == I_RUN) begin
        automatic int r = 0;
        automatic int b;
        for (int k = 0; k < RANKS; k++) if (cs[k]) r = k;
        b = r * 8 + int'(ba);
        unique case (c)
          CMD_ACT: begin
            bopen[b] <= 1'b1; brow[b] <= a;
            c_col[b] <= CW'(T_RCD - 1);
            c_pre[b] <= lmax(c_pre[b], T_RAS);
            c_act[b] <= lmax(c_act[b], T_RC);
            c_rrd[r] <= CW'(T_RRD - 1);
            n = 4;
            for (int k = 3; k >= 0; k--) if (c_faw[r][k] <= 1) n = k;
            if (n < 4) c_faw[r][n] <= CW'(T_FAW - 1);
            stat_act <= stat_act + 1;
          end
          CMD_RD, CMD_WR: begin
            c_pre[b] <= lmax(c_pre[b], (c == CMD_WR) ? WR2PRE : T_RTP);
            c_ccd    <= CW'(T_CCD - 1);
            if (c == CMD_WR) c_wr2rd <= lmax(c_wr2rd, WR2RD);
            else             c_rd2wr <= lmax(c_rd2wr, RD2WR);
            last_we  <= (c == CMD_WR);
            if (sel_q != 0) stat_reorder <= stat_reorder + 1;
          end
          CMD_PRE: begin
            bopen[b] <= 1'b0;
            c_act[b] <= lmax(c_act[b], T_RP);
          end
          CMD_REF: begin
            for (int k = 0; k < 8; k++) c_act[r * 8 + k] <= CW'(T_RFC - 1);
            if (int'(ref_rank) == RANKS - 1) begin ref_pend <= 1'b0; ref_rank <= '0; end
            else ref_rank <= ref_rank + 1'b1;
          end
          default: ;
        endcase
      end

      // ------------------------------------------------ request queue (ordered, compacting)
      begin
        automatic int unsigned cnt = 32'(qcnt);
        if (c == CMD_RD || c == CMD_WR) begin
          for (int i = 0; i < QDEPTH - 1; i++)
            if (i >= int'(sel_q)) q[i] <= q[i + 1];
          cnt = cnt - 1;
        end
        if (req_valid && req_ready) begin
          q[cnt] <= '{we: req_we, a: req_addr, wdata: req_wdata, id: req_id};
          cnt = cnt + 1;
        end
        qcnt <= (QI_W+1)'(cnt);
        if (qcnt != 0) stat_busy_cycles <= stat_busy_cycles + 1;
      end

      ddr_cs_n  <= ~cs;
      {ddr_ras_n, ddr_cas_n, ddr_we_n} <= ddr_cmd_pins(c);
      ddr_ba    <= ba;
      ddr_a     <= a;
    end
  end

  // I/O FSM: write data CWL after WR, read capture CL after RD
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now <= '0; wq_n <= '0; rq_n <= '0; wbeat <= '0; rbeat <= '0;
      wact <= 1'b0; ract <= 1'b0; rbuf <= '0;
      for (int i = 0; i < IOD; i++) begin wq[i] <= '0; rq[i] <= '0; end
      ddr_dq_out <= '0; ddr_dq_oe <= 1'b0; ddr_dqs_oe <= 1'b0;
      rsp_valid <= 1'b0; rsp_rdata <= '0; rsp_id <= '0;
      stat_data_cycles <= '0;
    end else begin
      automatic int unsigned wn = 32'(wq_n), rn = 32'(rq_n);
      automatic bit wpop = 1'b0, rpop = 1'b0;
      now <= now + 1'b1;
      rsp_valid <= 1'b0;
      ddr_dq_oe <= 1'b0;
      ddr_dqs_oe <= 1'b0;
      // writes: pins change one clock after the decision, as the WR command does
      if (wq_n != 0 && (wact || wq[0].t == now)) begin
        ddr_dq_out <= wq[0].data[wbeat * 32 +: 32];
        ddr_dq_oe  <= 1'b1;
        ddr_dqs_oe <= 1'b1;
        wact  <= (wbeat != 2'd3);
        wbeat <= wbeat + 1'b1;
        if (wbeat == 2'd3) wpop = 1'b1;
      end else if (wq_n != 0 && wq[0].t == now + 1'b1) begin
        ddr_dqs_oe <= 1'b1;   // preamble
      end
      // reads: data is on the pins CL clocks after the RD reached the pins
      if (rq_n != 0 && (ract || rq[0].t == now)) begin
        rbuf[rbeat * 32 +: 32] <= ddr_dq_in;
        ract  <= (rbeat != 2'd3);
        rbeat <= rbeat + 1'b1;
        if (rbeat == 2'd3) begin
          rpop = 1'b1;
          rsp_valid <= 1'b1;
          rsp_id    <= rq[0].id;
          rsp_rdata <= {ddr_dq_in, rbuf[95:0]};
        end
      end
      if (wpop) begin
        for (int i = 0; i < IOD - 1; i++) wq[i] <= wq[i + 1];
        wn = wn - 1;
      end
      if (rpop) begin
        for (int i = 0; i < IOD - 1; i++) rq[i] <= rq[i + 1];
        rn = rn - 1;
      end
      if (ist == I_RUN && sel_cmd == CMD_WR) begin
        wq[wn] <= '{t: now + CW'(T_CWL), id: q[sel_q].id, data: q[sel_q].wdata};
        wn = wn + 1;
      end
      if (ist == I_RUN && sel_cmd == CMD_RD) begin
        rq[rn] <= '{t: now + CW'(T_CL + 1), id: q[sel_q].id, data: '0};
        rn = rn + 1;
      end
      wq_n <= 4'(wn);
      rq_n <= 4'(rn);
      if (ddr_dq_oe || (rq_n != 0 && (ract || rq[0].t == now)))
        stat_data_cycles <= stat_data_cycles + 1;
    end
  end

  // at most one column command every tCCD, queue never overflows
  a_ccd: assert property (@(posedge clk) disable iff (!rst_n)
           (ist == I_RUN && (sel_cmd == CMD_RD || sel_cmd == CMD_WR)) |-> c_ccd == 0);
  a_q:   assert property (@(posedge clk) disable iff (!rst_n) qcnt <= (QI_W+1)'(QDEPTH));

endmodule

// ni: network interface of one node, with the buffering control of the buffer
// borrowing mechanism.
//
// Transmit side. The PE hands over packets of PAYLOAD 32-bit words with a
// destination (pe_valid/pe_ready per word, pe_dest held for the packet). Each
// packet leaves as one head flit {src, dest, length} followed by the payload
// flits, the last one marked tail; flits are 34 bits {head, tail, data}. They
// wait in the output queue (OQ_DEPTH flits) until the network takes them
// (out_valid/out_ready).
//
// Buffering control. A packet goes straight into the output queue when the
// queue has room for all of it and no earlier packet is parked in the d-MMU
// (borrowing mode off). Otherwise it is borrowed: the NI raises bw_req, the
// payload queue collects the PE's words meanwhile, and once the d-MMU has
// granted a block (bw_gnt) and the payload is complete it is written in one
// transfer (bw_wvalid, held until bw_wack) while its header enters the
// borrowing header queue. If, while it waits for the grant or for the payload,
// the head-of-line blocking clears (room in the output queue and no other
// packet borrowed), the NI sends bw_release - which also stops the d-MMU's
// search - and streams the packet into the output queue instead. Parked
// packets come back in order: when the output queue has room for a whole
// packet the NI raises br_req (held until br_valid) and copies the header and
// the returned block into the output queue. Borrowing mode ends when the
// header queue is empty. The PE stalls only while the payload queue is full,
// or while the header queue or the d-MMU address queue is full.
//
// Receive side: flits from the network are passed to the PE with head flits
// removed (rx_valid/rx_data/rx_last).
//
// Follows the design description: output queue, payload queue and borrowing
// header queue; write, read and release operations decided from the
// occupancy of the output queue and of the borrowing header queue; borrowing
// mode; release also cancels the search. This design's choices: fixed-length
// packets of one 8-word block, the flit format and the handshakes.
module ni
  import odms_pkg::*;
#(
  parameter int unsigned NODE_ID  = 0,
  parameter int unsigned OQ_DEPTH = 16,      // flits
  parameter int unsigned BHQ      = 8,       // borrowing header queue entries
  parameter int unsigned PAYLOAD  = 8,       // words per packet (one L1 block)
  parameter int unsigned BQ       = 8        // d-MMU borrowed-block address queue
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // PE transmit
  input  logic                 pe_valid,
  output logic                 pe_ready,
  input  logic [WORD_W-1:0]    pe_data,
  input  logic [7:0]           pe_dest,
  // PE receive
  output logic                 rx_valid,
  input  logic                 rx_ready,
  output logic [WORD_W-1:0]    rx_data,
  output logic                 rx_last,
  // network
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [33:0]          out_flit,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [33:0]          in_flit,
  // buffer borrowing interface to the d-MMU
  output logic                 bw_req,
  input  logic                 bw_gnt,
  output logic                 bw_wvalid,
  input  logic                 bw_wack,
  output logic [PAYLOAD*WORD_W-1:0] bw_wdata,
  output logic                 bw_release,
  output logic                 br_req,
  input  logic                 br_valid,
  input  logic [PAYLOAD*WORD_W-1:0] br_rdata,
  input  logic [3:0]           b_count,
  // counters
  output logic [31:0]          stat_direct,
  output logic [31:0]          stat_borrow,
  output logic [31:0]          stat_release,
  output logic [31:0]          stat_stall
);

  localparam int unsigned PKT = PAYLOAD + 1;
  localparam int unsigned OW  = $clog2(OQ_DEPTH + 1);
  localparam int unsigned PW  = $clog2(PAYLOAD + 1);
  localparam int unsigned HW  = $clog2(BHQ + 1);

  // ---------------------------------------------------------------- output queue
  logic [33:0]   oq [OQ_DEPTH];
  logic [OW-1:0] oq_n;
  logic          oq_push;
  logic [33:0]   oq_din;
  logic          oq_pop;
  logic [OW-1:0] oq_free;

  assign oq_free   = OW'(OQ_DEPTH) - oq_n;
  assign out_valid = (oq_n != 0);
  assign out_flit  = oq[0];
  assign oq_pop    = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oq_n <= '0;
      for (int i = 0; i < OQ_DEPTH; i++) oq[i] <= '0;
    end else begin
      automatic int unsigned n = 32'(oq_n);
      if (oq_pop) begin
        for (int i = 0; i < OQ_DEPTH - 1; i++) oq[i] <= oq[i + 1];
        n = n - 1;
      end
      if (oq_push) oq[n] <= oq_din;
      if (oq_push) n = n + 1;
      oq_n <= OW'(n);
    end
  end

  // ---------------------------------------------------------------- payload queue
  logic [WORD_W-1:0] pq [PAYLOAD];
  logic [PW-1:0]     pq_n, in_cnt, out_cnt;
  logic              pq_pop, pe_take;

  // ---------------------------------------------------------------- header queue
  logic [31:0]   bhq [BHQ];
  logic [HW-1:0] bhq_n;
  logic          bhq_push, bhq_pop;
  logic [31:0]   hdr;

  // ---------------------------------------------------------------- write control
  typedef enum logic [1:0] { W_IDLE, W_STREAM, W_BORROW, W_WRITE } wst_e;
  wst_e       wst;
  logic [7:0] dest_q;
  logic       got_gnt;
  logic       release_now, direct_ok;

  // reader
  typedef enum logic [1:0] { R_IDLE, R_WAIT, R_PUSH } rst_e;
  rst_e                      rst;
  logic [PAYLOAD*WORD_W-1:0] rbuf;
  logic [PW-1:0]             rcnt;

  assign hdr       = {8'(NODE_ID), (wst == W_IDLE) ? pe_dest : dest_q, 8'(PAYLOAD), 8'h00};
  assign direct_ok = (bhq_n == 0) && (oq_free >= OW'(PKT)) && (rst == R_IDLE);
  // HOL blocking cleared while waiting for grant or payload: release
  assign release_now = (wst == W_BORROW) && direct_ok;

  assign pe_take  = pe_valid && pe_ready;
  assign pe_ready = (wst == W_STREAM || wst == W_BORROW) && in_cnt != PW'(PAYLOAD) &&
                    pq_n != PW'(PAYLOAD);
  assign pq_pop   = (wst == W_STREAM) && pq_n != 0;

  assign bw_req     = (wst == W_BORROW) && !got_gnt && !bw_gnt && !release_now;
  assign bw_release = release_now;
  assign bw_wvalid  = (wst == W_WRITE);
  always_comb for (int i = 0; i < PAYLOAD; i++) bw_wdata[i * WORD_W +: WORD_W] = pq[i];
  assign bhq_push   = bw_wvalid && bw_wack;

  assign br_req  = (rst == R_WAIT) && !br_valid;
  assign bhq_pop = (rst == R_PUSH) && rcnt == PW'(PAYLOAD);

  // one writer of the output queue per clock: the reader only runs while the
  // header queue is non-empty, and then the write control never pushes
  always_comb begin
    oq_push = 1'b0;
    oq_din  = '0;
    if (rst == R_PUSH) begin
      oq_push = 1'b1;
      if (rcnt == '0) oq_din = {1'b1, 1'b0, bhq[0]};
      else            oq_din = {1'b0, rcnt == PW'(PAYLOAD), rbuf[(32'(rcnt) - 1) * WORD_W +: WORD_W]};
    end else if ((wst == W_IDLE && pe_valid && direct_ok && b_count == 0) || release_now) begin
      oq_push = 1'b1;
      oq_din  = {1'b1, 1'b0, hdr};
    end else if (pq_pop) begin
      oq_push = 1'b1;
      oq_din  = {1'b0, out_cnt == PW'(PAYLOAD - 1), pq[0]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wst <= W_IDLE; dest_q <= '0; got_gnt <= 1'b0;
      pq_n <= '0; in_cnt <= '0; out_cnt <= '0;
      for (int i = 0; i < PAYLOAD; i++) pq[i] <= '0;
      bhq_n <= '0;
      for (int i = 0; i < BHQ; i++) bhq[i] <= '0;
      rst <= R_IDLE; rbuf <= '0; rcnt <= '0;
      stat_direct <= '0; stat_borrow <= '0; stat_release <= '0; stat_stall <= '0;
    end else begin
      automatic int unsigned pn = 32'(pq_n);
      automatic int unsigned hn = 32'(bhq_n);

      if (pe_valid && !pe_ready && wst != W_IDLE) stat_stall <= stat_stall + 1;

      // payload queue
      if (pq_pop) begin
        for (int i = 0; i < PAYLOAD - 1; i++) pq[i] <= pq[i + 1];
        pn = pn - 1;
      end
      if (pe_take) begin
        pq[pn] <= pe_data;
        pn = pn + 1;
        in_cnt <= in_cnt + 1'b1;
      end

      unique case (wst)
        W_IDLE: if (pe_valid) begin
          dest_q <= pe_dest;
          in_cnt <= '0; out_cnt <= '0; got_gnt <= 1'b0;
          if (direct_ok && b_count == 0) begin
            wst <= W_STREAM;
            stat_direct <= stat_direct + 1;
          end else if (int'(bhq_n) < BHQ && int'(b_count) < BQ) begin
            wst <= W_BORROW;
          end
        end
        W_BORROW: begin
          if (bw_gnt) got_gnt <= 1'b1;
          if (release_now) begin
            wst <= W_STREAM;
            stat_release <= stat_release + 1;
            stat_direct  <= stat_direct + 1;
          end else if ((got_gnt || bw_gnt) && pn == PAYLOAD) begin
            wst <= W_WRITE;
          end
        end
        W_WRITE: if (bw_wack) begin
          pn = 0;
          wst <= W_IDLE;
          stat_borrow <= stat_borrow + 1;
        end
        default: begin   // W_STREAM
          if (pq_pop) begin
            out_cnt <= out_cnt + 1'b1;
            if (out_cnt == PW'(PAYLOAD - 1)) wst <= W_IDLE;
          end
        end
      endcase
      pq_n <= PW'(pn);

      // header queue
      if (bhq_pop) begin
        for (int i = 0; i < BHQ - 1; i++) bhq[i] <= bhq[i + 1];
        hn = hn - 1;
      end
      if (bhq_push) begin
        bhq[hn] <= hdr;
        hn = hn + 1;
      end
      bhq_n <= HW'(hn);

      // read control: bring parked packets back in order
      unique case (rst)
        R_IDLE: if (bhq_n != 0 && oq_free >= OW'(PKT) && wst != W_STREAM && !release_now) rst <= R_WAIT;
        R_WAIT: if (br_valid) begin rbuf <= br_rdata; rcnt <= '0; rst <= R_PUSH; end
        default: begin
          rcnt <= rcnt + 1'b1;
          if (rcnt == PW'(PAYLOAD)) rst <= R_IDLE;
        end
      endcase
    end
  end

  // ---------------------------------------------------------------- receive side
  assign in_ready = in_flit[33] || rx_ready || !in_valid;
  assign rx_valid = in_valid && !in_flit[33];
  assign rx_data  = in_flit[31:0];
  assign rx_last  = in_flit[32];

  // the output queue never overflows
  a_oq: assert property (@(posedge clk) disable iff (!rst_n) !(oq_push && !oq_pop && oq_n == OW'(OQ_DEPTH)));

endmodule

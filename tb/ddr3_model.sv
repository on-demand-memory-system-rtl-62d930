// ddr3_model: behavioural model of the DDR3 devices on the memory bus, for
// simulation only.
//
// It decodes the command pins each clock, keeps per-bank open-row state, and
// checks the JEDEC rules the controller must honour: commands only after
// initialisation, ACT only to a closed bank and RD/WR/PRE only to an open one,
// and the minimum spacings tRCD, tRP, tRAS, tRC, tRRD, tFAW, tCCD, tWTR, tWR,
// tRTP and tRFC. Every broken rule increments `violations`.
// Storage is sparse (associative array per 128-bit burst). A burst that was
// never written reads back a pattern computed from its address:
// {4{cs, bank, row, col}} zero-extended, so a testbench can predict it.
// Read data appears on dq_in CL clocks after the RD is seen on the pins, one
// 32-bit word (two x16 beats) per clock; write data is sampled CWL clocks
// after the WR. The model works in controller clocks: two beats per clock.
module ddr3_model
  import odms_pkg::*;
#(
  parameter int unsigned RANKS = 2
) (
  input  logic             clk,
  input  logic             reset_n,
  input  logic             cke,
  input  logic [RANKS-1:0] cs_n,
  input  logic             ras_n,
  input  logic             cas_n,
  input  logic             we_n,
  input  logic [2:0]       ba,
  input  logic [12:0]      a,
  input  logic [31:0]      dq_from_ctrl,
  input  logic             dq_oe,
  output logic [31:0]      dq_to_ctrl,
  output int               violations,
  output int               n_act,
  output int               n_pre,
  output int               n_rd,
  output int               n_wr,
  output int               n_ref,
  output int               n_mrs
);

  localparam int NEVER = -1000000;

  logic [127:0] mem [logic [31:0]];
  int cyc;
  bit      open_b [RANKS*8];
  int      row_b  [RANKS*8];
  int  t_act [RANKS*8], t_pre [RANKS*8], t_rd [RANKS*8], t_wrend [RANKS*8];
  int  t_ref [RANKS];
  int  t_acts [RANKS][$];
  int  t_col, t_wrdata_end;
  bit      ready;
  bit      mr0_seen;

  typedef struct packed { int t; logic [31:0] key; logic we; } xfer_t;
  xfer_t   pend [$];
  logic [127:0] wbuf;

  function automatic logic [127:0] pattern(logic [31:0] key);
    return {4{key}};
  endfunction

  task automatic chk(bit ok, string what);
    if (!ok) begin
      violations++;
      $display("DDR3 model: %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    violations = 0; n_act = 0; n_pre = 0; n_rd = 0; n_wr = 0; n_ref = 0; n_mrs = 0;
    cyc = 0; t_col = NEVER; t_wrdata_end = NEVER; ready = 0; mr0_seen = 0;
    for (int b = 0; b < RANKS*8; b++) begin
      open_b[b] = 0; row_b[b] = 0; t_act[b] = NEVER; t_pre[b] = NEVER; t_rd[b] = NEVER; t_wrend[b] = NEVER;
    end
    for (int r = 0; r < RANKS; r++) t_ref[r] = NEVER;
    dq_to_ctrl = '0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    // ------------------------------------------------ data transfers
    dq_to_ctrl <= '0;
    foreach (pend[i]) begin
      automatic int k = cyc - pend[i].t;
      if (!pend[i].we && cyc + 1 - pend[i].t >= 0 && cyc + 1 - pend[i].t < 4) begin
        automatic logic [127:0] d = mem.exists(pend[i].key) ? mem[pend[i].key] : pattern(pend[i].key);
        dq_to_ctrl <= d[7'((cyc + 1 - pend[i].t) * 32) +: 32];
      end
      if (pend[i].we && k >= 0 && k < 4) begin
        chk(dq_oe == 1'b1, "write data not driven");
        wbuf[7'(k * 32) +: 32] = dq_from_ctrl;
        if (k == 3) mem[pend[i].key] = {dq_from_ctrl, wbuf[95:0]};
      end
    end
    while (pend.size() > 0 && cyc - pend[0].t >= 3) void'(pend.pop_front());

    // ------------------------------------------------ commands
    if (reset_n && cke && !(&cs_n) && {ras_n, cas_n, we_n} != 3'b111) begin
      automatic int r = 0;
      automatic int b;
      for (int k = 0; k < RANKS; k++) if (!cs_n[k]) r = k;
      b = r * 8 + int'(ba);
      unique case ({ras_n, cas_n, we_n})
        3'b000: begin   // MRS
          n_mrs++;
          if (ba == 3'd0) begin
            mr0_seen = 1;
            chk(a[1:0] == 2'b00 && a[6:4] == 3'b101, "MR0 does not set BL8/CL9");
          end
        end
        3'b110: begin   // ZQCL ends initialisation
          chk(mr0_seen, "ZQCL before MR0");
          ready = 1;
        end
        3'b011: begin   // ACT
          n_act++;
          chk(ready, "ACT before init");
          chk(!open_b[b], "ACT to open bank");
          chk(cyc - t_pre[b] >= T_RP, "tRP");
          chk(cyc - t_act[b] >= T_RC, "tRC");
          chk(cyc - t_ref[r] >= T_RFC, "tRFC");
          foreach (t_acts[r][i]) chk(cyc - t_acts[r][i] >= T_RRD, "tRRD");
          if (t_acts[r].size() >= 4) chk(cyc - t_acts[r][t_acts[r].size() - 4] >= T_FAW, "tFAW");
          t_acts[r].push_back(cyc);
          if (t_acts[r].size() > 4) void'(t_acts[r].pop_front());
          open_b[b] = 1; row_b[b] = int'(a); t_act[b] = cyc;
        end
        3'b010: begin   // PRE
          n_pre++;
          if (open_b[b]) begin
            chk(cyc - t_act[b] >= T_RAS, "tRAS");
            chk(cyc - t_rd[b] >= T_RTP, "tRTP");
            chk(cyc - t_wrend[b] >= T_WR, "tWR");
          end
          open_b[b] = 0; t_pre[b] = cyc;
        end
        3'b001: begin   // REF
          n_ref++;
          for (int k = 0; k < 8; k++) begin
            chk(!open_b[r*8+k], "REF with open bank");
            chk(cyc - t_pre[r*8+k] >= T_RP, "tRP before REF");
          end
          t_ref[r] = cyc;
        end
        3'b101, 3'b100: begin  // RD / WR
          automatic bit is_wr = ({ras_n, cas_n, we_n} == 3'b100);
          automatic logic [31:0] key = (32'(r) << 26) | (32'(ba) << 23) | (32'(row_b[b]) << 10) | 32'(a[9:0]);
          chk(open_b[b], "column command to closed bank");
          chk(cyc - t_act[b] >= T_RCD, "tRCD");
          chk(cyc - t_col >= T_CCD, "tCCD");
          chk(a[2:0] == 3'b000, "burst not aligned");
          if (is_wr) begin
            n_wr++;
            pend.push_back('{t: cyc + T_CWL, key: key, we: 1'b1});
            t_wrend[b] = cyc + T_CWL + BURST_CYC;
            t_wrdata_end = cyc + T_CWL + BURST_CYC;
          end else begin
            n_rd++;
            chk(cyc - t_wrdata_end >= T_WTR, "tWTR");
            pend.push_back('{t: cyc + T_CL, key: key, we: 1'b0});
            t_rd[b] = cyc;
          end
          t_col = cyc;
        end
        default: chk(0, "unsupported command");
      endcase
    end
  end

endmodule

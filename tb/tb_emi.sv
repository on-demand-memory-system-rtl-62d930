// tb_emi: self-checking test of the DDR3 external memory interface.
//
// Two EMIs run side by side on their own DDR3 models: one with the command
// scheduler (SCHED_EN = 1) and one issuing in order (SCHED_EN = 0). Both get
// the same stream: a single read to a closed bank (its latency is checked
// against tRCD + CL + the pipeline registers), then random writes followed by
// random reads over a few rows of every bank of both devices. Every read is
// compared with the value written before, or with the model's address
// pattern. The model counts timing violations, which must be zero. Refresh is
// made frequent so that it happens during the run. Finally the scheduled
// EMI must show a higher bandwidth utilisation (data cycles / busy cycles)
// than the in-order one and must have reordered some column commands.
module tb_emi;
  import odms_pkg::*;

  localparam int NREQ = 400;
  logic clk = 0, rst_n = 1;
  initial rst_n = 0;   // a falling edge at time 0 fires every asynchronous reset
  always #1 clk = ~clk;

  int checks = 0, failures = 0;

  typedef struct packed { logic we; dram_addr_t a; logic [127:0] d; } rq_t;
  rq_t reqs [NREQ + 1];
  logic [127:0] expect_q [NREQ + 1];

  function automatic logic [127:0] pat(dram_addr_t a);
    return {4{(32'(a.cs) << 26) | (32'(a.bank) << 23) | (32'(a.row) << 10) | 32'(a.col)}};
  endfunction

  initial begin
    logic [127:0] shadow [logic [31:0]];
    // request 0: lone read to a closed bank
    reqs[0] = '{we: 0, a: '{cs: 1'b0, bank: 3'd5, row: 13'd77, col: 10'd64}, d: '0};
    for (int i = 1; i <= NREQ; i++) begin
      dram_addr_t a;
      a.cs   = 1'($urandom_range(0, 1));
      a.bank = 3'($urandom_range(0, 7));
      a.row  = 13'($urandom_range(0, 2));
      a.col  = 10'($urandom_range(0, 7) * 8);
      reqs[i] = '{we: (i <= NREQ / 2), a: a, d: {$urandom, $urandom, $urandom, $urandom}};
    end
    for (int i = 0; i <= NREQ; i++) begin
      automatic logic [31:0] k = 32'(reqs[i].a);
      if (reqs[i].we) shadow[k] = reqs[i].d;
      else expect_q[i] = shadow.exists(k) ? shadow[k] : pat(reqs[i].a);
    end
  end

  int done_cycles [2];
  int util_x1000 [2];
  int reorders [2];
  int lat0 [2];
  bit finished [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    logic req_valid, req_ready, rsp_valid, init_done;
    logic [127:0] rsp_rdata;
    logic [8:0] rsp_id;
    logic reset_n, cke, ras_n, cas_n, we_n, dq_oe, dqs_oe;
    logic [1:0] cs_n;
    logic [2:0] ba;
    logic [12:0] a;
    logic [31:0] dq_o, dq_i, s_data, s_busy, s_act, s_reord;
    int viol, nact, npre, nrd, nwr, nref, nmrs;
    int ptr, nrsp, t_start, t_req0;

    emi #(.RANKS(2), .QDEPTH(32), .ID_W(9), .SCHED_EN(g == 0),
          .INIT_RESET(20), .INIT_CKE(30), .REFI(600)) dut (
      .clk, .rst_n,
      .req_valid, .req_ready, .req_we(reqs[ptr].we), .req_addr(reqs[ptr].a),
      .req_wdata(reqs[ptr].d), .req_id(9'(ptr)),
      .rsp_valid, .rsp_rdata, .rsp_id, .init_done,
      .ddr_reset_n(reset_n), .ddr_cke(cke), .ddr_cs_n(cs_n), .ddr_ras_n(ras_n),
      .ddr_cas_n(cas_n), .ddr_we_n(we_n), .ddr_ba(ba), .ddr_a(a),
      .ddr_dq_out(dq_o), .ddr_dq_oe(dq_oe), .ddr_dqs_oe(dqs_oe), .ddr_dq_in(dq_i),
      .stat_data_cycles(s_data), .stat_busy_cycles(s_busy), .stat_act(s_act), .stat_reorder(s_reord));

    ddr3_model #(.RANKS(2)) mdl (
      .clk, .reset_n, .cke, .cs_n, .ras_n, .cas_n, .we_n, .ba, .a,
      .dq_from_ctrl(dq_o), .dq_oe, .dq_to_ctrl(dq_i),
      .violations(viol), .n_act(nact), .n_pre(npre), .n_rd(nrd), .n_wr(nwr), .n_ref(nref), .n_mrs(nmrs));

    int cyc;
    always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

    // request 0 alone, then the rest back to back
    assign req_valid = init_done && ptr <= NREQ && (ptr != 1 || nrsp == 1);

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        ptr <= 0; nrsp <= 0; t_start <= 0; t_req0 <= 0;
      end else begin
        if (req_valid && req_ready) begin
          if (ptr == 0) t_req0 <= cyc;
          if (ptr == 1) t_start <= cyc;
          ptr <= ptr + 1;
        end
        if (rsp_valid) begin
          nrsp <= nrsp + 1;
          checks++;
          if (rsp_rdata !== expect_q[rsp_id]) begin
            failures++;
            if (failures < 10) $display("dut%0d: read %0d data %h expected %h", g, rsp_id, rsp_rdata, expect_q[rsp_id]);
          end
          if (rsp_id == 0) lat0[g] = cyc - t_req0;
          if (nrsp + 1 == NREQ / 2 + 1) begin
            done_cycles[g] = cyc - t_start;
            util_x1000[g] = int'(s_data) * 1000 / int'(s_busy);
            reorders[g] = int'(s_reord);
            finished[g] = 1;
          end
        end
      end
    end
  end

  initial begin
    finished[0] = 0; finished[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (finished[0] && finished[1]);
    repeat (40) @(posedge clk);
    for (int g = 0; g < 2; g++) begin
      $display("EMI sched=%0d: cycles=%0d util=%0d.%01d%% reorders=%0d lat0=%0d", g == 0,
               done_cycles[g], util_x1000[g] / 10, util_x1000[g] % 10, reorders[g], lat0[g]);
      checks++;
      if (lat0[g] != 1 + T_RCD + 1 + T_CL + BURST_CYC) begin
        failures++; $display("closed-bank read latency %0d", lat0[g]);
      end
    end
    $display("model0 act=%0d rd=%0d wr=%0d ref=%0d viol=%0d", g_dut[0].nact, g_dut[0].nrd, g_dut[0].nwr, g_dut[0].nref, g_dut[0].viol);
    checks++; if (g_dut[0].viol != 0 || g_dut[1].viol != 0) begin failures++; $display("timing violations"); end
    checks++; if (g_dut[0].nref == 0) begin failures++; $display("no refresh"); end
    checks++; if (g_dut[0].nmrs != 4) begin failures++; $display("MRS count %0d", g_dut[0].nmrs); end
    checks++; if (!(util_x1000[0] > util_x1000[1])) begin failures++; $display("scheduler gives no gain"); end
    checks++; if (reorders[0] == 0) begin failures++; $display("no reordering"); end
    checks++; if (reorders[1] != 0) begin failures++; $display("in-order EMI reordered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

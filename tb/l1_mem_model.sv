// l1_mem_model: behavioural next-level memory for L1 cache testbenches.
// 256-bit lines by word address; a line never written holds, in word j, its
// own word address (line address * 8 + j). Answers LAT clocks after m_req
// with a one-clock m_ack.
module l1_mem_model #(
  parameter int LAT = 6
) (
  input  logic         clk,
  input  logic         m_req,
  input  logic         m_we,
  input  logic [29:0]  m_addr,
  input  logic [255:0] m_wdata,
  output logic         m_ack,
  output logic [255:0] m_rdata,
  output int           n_rd,
  output int           n_wr
);
  logic [255:0] mem [logic [29:0]];
  int cnt = 0;
  initial begin n_rd = 0; n_wr = 0; m_ack = 0; m_rdata = '0; end

  function automatic logic [255:0] line_of(logic [29:0] a);
    logic [255:0] l;
    if (mem.exists(a)) return mem[a];
    for (int j = 0; j < 8; j++) l[j * 32 +: 32] = 32'({a[29:3], 3'(j)});
    return l;
  endfunction

  always @(posedge clk) begin
    m_ack <= 1'b0;
    if (m_req && !m_ack) begin
      if (cnt == LAT - 1) begin
        if (m_we) begin mem[m_addr] = m_wdata; n_wr++; end
        else begin m_rdata <= line_of(m_addr); n_rd++; end
        m_ack <= 1'b1;
        cnt <= 0;
      end else cnt <= cnt + 1;
    end
  end
endmodule

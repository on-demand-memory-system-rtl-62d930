// tb_addr_translator: self-checking test of the L2-to-DRAM address mapping.
// Conventional mapping: field positions and chip select for every node.
// SVC mapping: luma/chroma/residual/MV bank rules, the reference-frame bank
// separation of a GOP of 8, and that distinct macroblock-row addresses of one
// picture never collide.
module tb_addr_translator;
  import odms_pkg::*;
  int checks = 0, failures = 0;

  logic [1:0] node;
  logic [31:0] addr;
  logic svc_map_en;
  dram_addr_t d;

  addr_translator dut (.node, .addr, .svc_map_en, .daddr(d));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("%s: node %0d addr %h -> cs %0d bank %0d row %h col %h",
                                        what, node, addr, d.cs, d.bank, d.row, d.col); end
  endtask

  initial begin
    // conventional mapping
    for (int it = 0; it < 2000; it++) begin
      automatic logic [26:0] c;
      node = 2'($urandom_range(0, 3)); addr = $urandom; svc_map_en = $urandom_range(0, 1);
      if (node == 3) svc_map_en = 0;
      #1;
      c = (node == 3) ? addr[26:0] : {node, addr[24:0]};
      chk(d.cs == (node == 3) && d.col == c[10:1] && d.bank == c[13:11] && d.row == c[26:14],
          "conventional");
    end
    // SVC mapping
    node = 3; svc_map_en = 1;
    for (int poc = 0; poc <= 8; poc++) begin
      automatic int b;
      addr = {1'b0, 2'b00, 1'b0, 2'b00, 4'(poc), 22'h0}; #1;
      b = d.bank;
      chk(d.cs && b <= 2, "luma bank range");
      addr[30:29] = 2'b01; #1;
      chk(d.bank == 3'(b + 3), "chroma bank");
      addr[30:29] = 2'b10; #1;
      chk(d.bank == 3'd6, "residual bank");
      addr[30:29] = 2'b11; #1;
      chk(d.bank == 3'd7, "MV bank");
    end
    // hierarchical-B GOP of 8: each B frame lies in a bank apart from its references
    begin
      static int refs [9][2] = '{'{0,0}, '{0,2}, '{0,4}, '{2,4}, '{0,8}, '{4,6}, '{4,8}, '{6,8}, '{0,0}};
      for (int f = 1; f < 8; f++) begin
        automatic int bf, r0, r1;
        addr = {9'b0, 1'b0, 22'h0}; addr[25:22] = 4'(f); #1; bf = d.bank;
        addr[25:22] = 4'(refs[f][0]); #1; r0 = d.bank;
        addr[25:22] = 4'(refs[f][1]); #1; r1 = d.bank;
        chk(bf != r0 && bf != r1, "frame shares a bank with its reference");
      end
    end
    // within one luma picture (4CIF: 1584 MBs x 256 B) no two lines collide
    begin
      bit seen [logic [25:0]];
      for (int off = 0; off < 1584 * 256; off += 64) begin
        automatic logic [25:0] key;
        addr = 32'(off); #1;
        key = {d.bank, d.row, d.col};
        chk(!seen.exists(key), "collision");
        seen[key] = 1;
      end
      // a 2 KB row holds 8 luma macroblocks
      addr = 0; #1;
      begin
        automatic logic [12:0] r = d.row;
        addr = 8 * 256 - 1; #1; chk(d.row == r, "8 MBs per row");
        addr = 8 * 256; #1; chk(d.row != r, "row boundary");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// pcg: pre-fetch command generator of the inter-layer pre-fetch scheme, placed
// in the d-MMU of the SVC decoder node.
//
// When the SVC decoder starts reconstructing an enhancement-layer macroblock it
// reports the macroblock position (mb_valid, mb_x, mb_y) together with the
// frame information: base-layer picture size in pixels and the word addresses
// of the base-layer residual and motion-vector planes. The generator then
// names, one L1 line (8 words) per clock, every line the decoder will read for
// inter-layer prediction of the *next* macroblock (x + 1, or the first one of
// the next row):
//   residuals - the co-located 8x8 base-layer block plus the extra samples the
//               bilinear up-sampling needs: 10 columns (8x-1 .. 8x+8) by 9 rows
//               (8y .. 8y+8), clamped to the picture. Residuals are 16-bit,
//               two per word, raster order, so each row covers at most two
//               lines; a line equal to the previous command is skipped;
//   motion vectors - all MVs of the co-located 8x8 block: one 32-bit MV per
//               4x4 block, raster order, i.e. two rows of two words.
// Commands leave on pf_valid/pf_addr (line-aligned word address) and advance
// on pf_ready. mb_ready is high while the generator is idle; a new macroblock
// report is accepted only then.
//
// Follows the design description: the PCG receives frame and macroblock
// information from the SVC processor element, pre-fetches 10x9 residuals and
// the MVs of the 8x8 block for the next macroblock, and hands its addresses to
// the cache control, which serves them when idle. This design's choices: the
// dyadic (2:1) co-location, the residual/MV storage formats and the plane
// base-address inputs, and skipping repeated lines.
module pcg
  import odms_pkg::*;
#(
  parameter int unsigned MB_W = 8          // bits of a macroblock coordinate
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               mb_valid,
  output logic               mb_ready,
  input  logic [MB_W-1:0]    mb_x,        // enhancement-layer macroblock being reconstructed
  input  logic [MB_W-1:0]    mb_y,
  input  logic [MB_W+3:0]    base_w,      // base-layer width in pixels (multiple of 16)
  input  logic [MB_W+3:0]    base_h,      // base-layer height in pixels
  input  logic [ADDR_W-1:0]  resid_base,  // word address of the base-layer residual plane
  input  logic [ADDR_W-1:0]  mv_base,     // word address of the base-layer MV plane
  output logic               pf_valid,
  output logic [ADDR_W-1:0]  pf_addr,
  input  logic               pf_ready,
  output logic [31:0]        stat_cmds
);

  localparam int unsigned PW = MB_W + 4;  // pixel coordinate width

  typedef enum logic [1:0] { G_IDLE, G_RES, G_MV } gst_e;
  gst_e st;

  logic [PW-1:0]     bx, by;              // top-left base pixel of the co-located block
  logic [PW-1:0]     wq, hq;
  logic [ADDR_W-1:0] rb, mb;
  logic [3:0]        row;                 // 0..8 residual rows, 0..1 MV rows
  logic              half;                // 0: first line of the row, 1: last line
  logic [ADDR_W-4:0] last_line;
  logic              have_last;

  // residual columns and rows (clamped)
  logic [PW-1:0]     c_lo, c_hi, r_cur;
  logic [ADDR_W-1:0] w_lo, w_hi, mv_w;
  logic [ADDR_W-4:0] cand;
  logic              skip;

  always_comb begin
    c_lo  = (bx == '0) ? '0 : bx - 1'b1;
    c_hi  = (bx + PW'(8) > wq - 1'b1) ? wq - 1'b1 : bx + PW'(8);
    r_cur = (by + PW'(row) > hq - 1'b1) ? hq - 1'b1 : by + PW'(row);
    // residual word = base + (row * width + column) / 2
    w_lo  = rb + ADDR_W'((32'(r_cur) * 32'(wq) + 32'(c_lo)) >> 1);
    w_hi  = rb + ADDR_W'((32'(r_cur) * 32'(wq) + 32'(c_hi)) >> 1);
    // MV word = base + (4x4 row) * (width / 4) + 4x4 column
    mv_w  = mb + ADDR_W'((32'(by >> 2) + 32'(row)) * 32'(wq >> 2) + 32'(bx >> 2));
    if (st == G_MV)  cand = mv_w[ADDR_W-1:3];
    else if (!half)  cand = w_lo[ADDR_W-1:3];
    else             cand = w_hi[ADDR_W-1:3];
    skip = have_last && cand == last_line;
  end

  assign mb_ready = (st == G_IDLE);
  assign pf_valid = (st != G_IDLE) && !skip;
  assign pf_addr  = {cand, 3'b000};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= G_IDLE; bx <= '0; by <= '0; wq <= '0; hq <= '0; rb <= '0; mb <= '0;
      row <= '0; half <= 1'b0; last_line <= '0; have_last <= 1'b0; stat_cmds <= '0;
    end else begin
      unique case (st)
        G_IDLE: if (mb_valid) begin
          // next macroblock: right neighbour, or first of the next row
          if ((PW'(mb_x) + 1'b1) << 4 >= PW'(base_w) << 1) begin
            bx <= '0; by <= PW'(mb_y + 1'b1) << 3;
          end else begin
            bx <= PW'(mb_x + 1'b1) << 3; by <= PW'(mb_y) << 3;
          end
          wq <= base_w; hq <= base_h; rb <= resid_base; mb <= mv_base;
          row <= '0; half <= 1'b0; have_last <= 1'b0;
          st <= G_RES;
        end
        G_RES, G_MV: if (skip || pf_ready) begin
          if (!skip) begin
            last_line <= cand; have_last <= 1'b1;
            stat_cmds <= stat_cmds + 1;
          end
          if (st == G_RES) begin
            if (!half) half <= 1'b1;
            else begin
              half <= 1'b0;
              if (row == 4'd8) begin row <= '0; st <= G_MV; end
              else row <= row + 1'b1;
            end
          end else begin
            if (row == 4'd1) st <= G_IDLE;
            else row <= row + 1'b1;
          end
        end
        default: st <= G_IDLE;
      endcase
    end
  end

  // a pre-fetch command is a line-aligned address
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n) pf_valid |-> pf_addr[2:0] == 3'b000);

endmodule

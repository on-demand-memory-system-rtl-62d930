// addr_translator: maps a (node, byte address) pair from the L2 cache to a
// DDR3 device, bank, row and column.
//
// Two DDR3 x16 devices share one bus and are told apart by chip select. Device
// 0 holds the private address spaces of the general nodes, device 1 belongs to
// the SVC decoder node (SVC_NODE).
//
// Conventional mapping (device 0, and device 1 when svc_map_en = 0): the
// 27-bit device address is split, from the bottom, into 1 byte-offset bit,
// 10 column bits, 3 bank bits and 13 row bits, so a 64-byte line stays in one
// row of one bank. On device 0 the top two bits are the node number, giving
// each general node a 32 MB region.
//
// SVC mapping (device 1, svc_map_en = 1): the SVC node's byte address carries
//   [30:29] data type (luma, chroma, residual, motion vector)
//   [28]    quality layer, [27:26] spatial layer, [25:22] POC in the GOP (0..8)
//   [20:0]  byte offset inside the picture, macroblock-major in raster order
//           (256 B per luma MB, 128 B per chroma MB)
// Luma goes to bank 0..2 and chroma to bank 3..5, chosen so that a frame never
// shares a bank with the frames it references (odms_pkg::gop_bank); residuals
// go to bank 6 and motion vectors to bank 7. A 2 KB row holds 8 luma or 16
// chroma macroblocks, so reconstructed data written in raster order stays in
// one open row for long runs. Bank split, luma/chroma/residual/MV banks and the
// 2 KB row follow the design description; the exact field positions and the
// row layout (layer, slot-in-bank, offset) are this implementation's choice.
//
// Purely combinational; the result is valid in the same cycle.
module addr_translator
  import odms_pkg::*;
#(
  parameter int unsigned NODE_W   = 2,
  parameter int unsigned SVC_NODE = 3
) (
  input  logic [NODE_W-1:0] node,
  input  logic [31:0]       addr,        // byte address
  input  logic              svc_map_en,
  output dram_addr_t        daddr
);

  logic [26:0] conv;
  svc_type_e   ty;
  logic [3:0]  poc;

  always_comb begin
    ty    = svc_type_e'(addr[30:29]);
    poc   = addr[25:22];
    if (node == NODE_W'(SVC_NODE)) conv = addr[26:0];
    else                           conv = {node[1:0], addr[24:0]};
    daddr.cs   = (node == NODE_W'(SVC_NODE));
    daddr.col  = conv[10:1];
    daddr.bank = conv[13:11];
    daddr.row  = conv[26:14];
    if (node == NODE_W'(SVC_NODE) && svc_map_en) begin
      daddr.col = addr[10:1];
      unique case (ty)
        SVC_LUMA: begin
          daddr.bank = {1'b0, gop_bank(poc)};
          daddr.row  = {addr[28], addr[27:26], gop_slot(poc), addr[18:11]};
        end
        SVC_CHROMA: begin
          daddr.bank = 3'd3 + {1'b0, gop_bank(poc)};
          daddr.row  = {addr[28], addr[27:26], gop_slot(poc), addr[18:11]};
        end
        SVC_RESID: begin
          daddr.bank = 3'd6;
          daddr.row  = {addr[28], addr[27:26], addr[20:11]};
        end
        default: begin
          daddr.bank = 3'd7;
          daddr.row  = {addr[28], addr[27:26], addr[20:11]};
        end
      endcase
    end
  end

endmodule

// odms_pkg: types and constants shared by the on-demand memory system.
//
// The memory hierarchy has three levels: a per-node L1 (d-MMU), a shared L2 of
// 16 SRAM banks (c-MMU) and two DDR3 devices behind an address translator and
// an external memory interface. Everything here is in one clock domain; the
// DDR3 timing constants are clock counts at tCK = 1.5 ns (DDR3-1333, -15E
// speed grade), rounded up from the nanosecond minimums of the Micron part.
// The values tCWL, tRTP, tRFC, tREFI and the initialisation waits are not in
// the timing table the design follows and come from the DDR3 standard.
package odms_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned WORD_W      = 32;   // PE data word
  localparam int unsigned ADDR_W      = 30;   // word address (32-bit byte address)
  localparam int unsigned L1_LINE_W   = 256;  // 32-byte L1 line, 8 words
  localparam int unsigned L2_LINE_W   = 512;  // 64-byte L2 line, 16 words
  localparam int unsigned BURST_W     = 128;  // one DDR3 BL8 burst on a x16 device

  // ---------------------------------------------------------------- DDR3-1333 -15E timing, in clocks
  localparam int unsigned T_RCD  = 9;   // 13.5 ns
  localparam int unsigned T_RP   = 9;   // 13.5 ns
  localparam int unsigned T_CL   = 9;   // 13.5 ns
  localparam int unsigned T_CWL  = 7;   // DDR3-1333 write latency (standard)
  localparam int unsigned T_WR   = 10;  // 15 ns
  localparam int unsigned T_WTR  = 5;   // 7.5 ns
  localparam int unsigned T_MRD  = 4;   // clocks
  localparam int unsigned T_MOD  = 12;  // clocks (standard)
  localparam int unsigned T_RAS  = 24;  // 36 ns
  localparam int unsigned T_RRD  = 5;   // 7.5 ns
  localparam int unsigned T_RC   = 33;  // 49.5 ns
  localparam int unsigned T_FAW  = 27;  // 40 ns
  localparam int unsigned T_CCD  = 4;   // clocks
  localparam int unsigned T_RTP  = 5;   // 7.5 ns (standard)
  localparam int unsigned T_RFC  = 74;  // 110 ns
  localparam int unsigned T_REFI = 5200;// 7.8 us
  localparam int unsigned T_ZQINIT = 512;
  localparam int unsigned BURST_CYC = 4; // BL8 at two beats per clock

  // ---------------------------------------------------------------- DDR3 commands
  typedef enum logic [2:0] {
    CMD_NOP, CMD_ACT, CMD_RD, CMD_WR, CMD_PRE, CMD_REF, CMD_MRS, CMD_ZQCL
  } ddr_cmd_e;

  // {ras_n, cas_n, we_n} encoding of a command (JEDEC truth table)
  function automatic logic [2:0] ddr_cmd_pins(ddr_cmd_e c);
    case (c)
      CMD_ACT:  return 3'b011;
      CMD_RD:   return 3'b101;
      CMD_WR:   return 3'b100;
      CMD_PRE:  return 3'b010;
      CMD_REF:  return 3'b001;
      CMD_MRS:  return 3'b000;
      CMD_ZQCL: return 3'b110;
      default:  return 3'b111;
    endcase
  endfunction

  // DRAM physical address of one burst
  typedef struct packed {
    logic        cs;     // device (0: general PEs, 1: SVC)
    logic [2:0]  bank;
    logic [12:0] row;
    logic [9:0]  col;    // x16 column, bursts start at col[2:0] = 0
  } dram_addr_t;

  // ---------------------------------------------------------------- SVC data layout
  // Address fields the SVC processor element uses for frame data (byte address).
  typedef enum logic [1:0] { SVC_LUMA, SVC_CHROMA, SVC_RESID, SVC_MV } svc_type_e;

  // Bank (0..2) of a frame of an 8-frame hierarchical-B GOP, given its picture
  // order count 0..8. A frame never shares a bank with its two references:
  // F0:0 F8:1 F4:2 F2:1 F6:0 F1:2 F3:0 F5:1 F7:2 (decoding order 0 8 4 2 6 1 3 5 7).
  function automatic logic [1:0] gop_bank(logic [3:0] poc);
    case (poc)
      4'd0, 4'd6, 4'd3: return 2'd0;
      4'd8, 4'd2, 4'd5: return 2'd1;
      default:          return 2'd2;   // 4, 1, 7
    endcase
  endfunction

  // Slot (0..2) of the frame inside its bank, so frames sharing a bank use different rows
  function automatic logic [1:0] gop_slot(logic [3:0] poc);
    case (poc)
      4'd0, 4'd8, 4'd4: return 2'd0;
      4'd6, 4'd2, 4'd1: return 2'd1;
      default:          return 2'd2;   // 3, 5, 7
    endcase
  endfunction

endpackage

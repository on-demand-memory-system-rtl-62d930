// borrow_addr_gen: finds an empty L1 block that the network interface can
// borrow as packet buffer.
//
// Only the last way of each L1 bank is lent out, since it is the least used.
// Its 512 blocks (2 banks x 256 sets) are described by `occupied`: a block is
// occupied when it holds a valid cache line or is already borrowed. The
// search looks at a WINDOW-bit slice of that vector per clock, chosen by the
// search counter; the empty detector (a priority encoder) reports the first
// free block of the slice as {counter, position}. If the slice is full, the
// counter moves to the next slice, so the whole table is covered in
// ENTRIES/WINDOW = 4 clocks - the time the network interface needs to collect
// a payload. The counter is not reset between searches, so successive borrows
// spread over the table.
//
// Handshake: `start` (level) begins a search; `found` stays high with `addr`
// until `take` (the d-MMU has marked the block borrowed) or `cancel`
// (the network released the blocking packet). If the offered block becomes
// occupied before it is taken, the search resumes. Structure (window, search
// counter, empty detector) and sizes follow the design description.
module borrow_addr_gen #(
  parameter int unsigned ENTRIES = 512,
  parameter int unsigned WINDOW  = 128
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic                       cancel,
  input  logic                       take,
  input  logic [ENTRIES-1:0]         occupied,
  output logic                       found,
  output logic [$clog2(ENTRIES)-1:0] addr,
  output logic                       searching
);

  localparam int unsigned NWIN = ENTRIES / WINDOW;
  localparam int unsigned CW   = (NWIN > 1) ? $clog2(NWIN) : 1;
  localparam int unsigned PW   = $clog2(WINDOW);

  typedef enum logic [1:0] { G_IDLE, G_SEARCH, G_FOUND } st_e;
  st_e            st;
  logic [CW-1:0]  cnt;
  logic [WINDOW-1:0] win;
  logic           any_empty;
  logic [PW-1:0]  pos;

  assign win = occupied[cnt * WINDOW +: WINDOW];

  // empty detector: first zero of the window
  always_comb begin
    any_empty = 1'b0;
    pos       = '0;
    for (int i = WINDOW - 1; i >= 0; i--)
      if (!win[i]) begin any_empty = 1'b1; pos = PW'(i); end
  end

  assign searching = (st == G_SEARCH);
  assign found     = (st == G_FOUND);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= G_IDLE; cnt <= '0; addr <= '0;
    end else begin
      unique case (st)
        G_IDLE:   if (start && !cancel) st <= G_SEARCH;
        G_SEARCH: if (cancel) st <= G_IDLE;
                  else if (any_empty) begin
                    addr <= {cnt, pos};
                    st   <= G_FOUND;
                  end else cnt <= (int'(cnt) == NWIN - 1) ? '0 : cnt + 1'b1;
        default:  if (take || cancel) st <= G_IDLE;
                  else if (occupied[addr]) st <= G_SEARCH;
      endcase
    end
  end

endmodule

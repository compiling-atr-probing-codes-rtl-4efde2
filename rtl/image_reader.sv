// image_reader -- address generator that streams the input image out of local memory.
//
// The image is stored row by row, two horizontally adjacent 12-bit pixels per 32-bit word, so a
// row of IMG_COLS pixels is IMG_COLS/2 words.  The image is scanned in strips of STRIP_ROWS rows
// that step down one row at a time (IMG_ROWS-STRIP_ROWS+1 strips).  Within a strip the reader
// walks across the words of the row; for each word column it reads the STRIP_ROWS words from the
// top row of the strip to the bottom one, which delivers two complete pixel columns.  That is
// (IMG_ROWS-STRIP_ROWS+1) * IMG_COLS * STRIP_ROWS/2 reads in all, one per clock when memory grants
// every request: the engine is limited by this read stream and by nothing else.
//
// Interface: a one-cycle `start` begins a scan.  `mem_req`/`mem_addr` form a request that is
// taken in a cycle where `mem_gnt` is high (the memory may hold `mem_gnt` low to stall).  Read
// data comes back in request order on a separate return path handled by window_gen.  `busy` is
// high from start until the last request has been granted; `last` marks that last request.
// The scan order and the one-read-per-clock rate follow the published IO analysis; the word
// layout, the request/grant handshake and the start/busy protocol are this design's choices.
module image_reader #(
  parameter int IMG_ROWS   = atr_pkg::IMAGE_ROWS,
  parameter int IMG_COLS   = atr_pkg::IMAGE_COLS,
  parameter int STRIP_ROWS = atr_pkg::WIN_ROWS,
  parameter int ADDR_W     = $clog2(IMG_ROWS * IMG_COLS / 2)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              mem_req,
  output logic [ADDR_W-1:0] mem_addr,
  input  logic              mem_gnt,
  output logic              last
);
  localparam int WPR     = IMG_COLS / 2;          // words per image row
  localparam int NSTRIPS = IMG_ROWS - STRIP_ROWS + 1;

  logic [$clog2(STRIP_ROWS)-1:0] i_q;   // row inside the strip
  logic [$clog2(WPR)-1:0]        cp_q;  // word column
  logic [$clog2(NSTRIPS)-1:0]    r_q;   // strip (top row)
  logic [ADDR_W-1:0]             row_base_q;  // (r_q + i_q) * WPR
  logic [ADDR_W-1:0]             strip_base_q; // r_q * WPR

  assign mem_req  = busy;
  assign mem_addr = row_base_q + ADDR_W'(cp_q);
  assign last     = busy && (int'(i_q) == STRIP_ROWS - 1) && (int'(cp_q) == WPR - 1)
                    && (int'(r_q) == NSTRIPS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      i_q <= '0; cp_q <= '0; r_q <= '0;
      row_base_q <= '0; strip_base_q <= '0;
    end else if (start && !busy) begin
      busy <= 1'b1;
      i_q <= '0; cp_q <= '0; r_q <= '0;
      row_base_q <= '0; strip_base_q <= '0;
    end else if (busy && mem_gnt) begin
      if (int'(i_q) != STRIP_ROWS - 1) begin
        i_q        <= i_q + 1'b1;
        row_base_q <= row_base_q + ADDR_W'(WPR);
      end else begin
        i_q        <= '0;
        row_base_q <= strip_base_q;
        if (int'(cp_q) != WPR - 1) begin
          cp_q <= cp_q + 1'b1;
        end else begin
          cp_q <= '0;
          if (int'(r_q) != NSTRIPS - 1) begin
            r_q          <= r_q + 1'b1;
            strip_base_q <= strip_base_q + ADDR_W'(WPR);
            row_base_q   <= strip_base_q + ADDR_W'(WPR);
          end else begin
            busy <= 1'b0;
          end
        end
      end
    end
  end
endmodule

// window_gen -- the window generator: turns the stream of pixel words into a sliding
// STRIP_ROWS x PROBE_COLS window, one window position per image column.
//
// Words arrive in the order image_reader asks for them: for each word column of a strip, the
// STRIP_ROWS words from top to bottom.  Each word carries the pixel of an even image column in
// bits [11:0] and the pixel of the next (odd) column in bits [27:16]; bits [15:12] and [31:28] are
// not used.  The two pixels of each word are collected into an even and an odd column buffer.  When the bottom word of a column pair has
// arrived, the pair is copied into a holding register and shifted into the window on the next two
// cycles, the even column first.  Because a column pair takes STRIP_ROWS >= 2 words, the holding
// register is always free again before the next pair is complete.
//
// Window column 0 is the oldest (leftmost), column PROBE_COLS-1 the newest.  `win_valid` pulses
// once per image column; `win_pos` gives the strip's top row and the newest column's index.  The
// first PROBE_COLS-1 windows of a strip still hold columns of the previous strip; later stages
// only use windows whose whole probe-set extent lies in the current strip.
// The compaction to a 13x4 window follows the published optimisation; the pixel packing and the
// buffering are this design's choices.
module window_gen
  import atr_pkg::*;
#(
  parameter int IMG_COLS   = atr_pkg::IMAGE_COLS,
  parameter int STRIP_ROWS = atr_pkg::WIN_ROWS,
  parameter int WIN_COLS   = atr_pkg::PROBE_COLS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,      // clears the position counters
  input  logic              word_valid,
  input  logic [WORD_W-1:0] word,
  output logic              win_valid,
  output pos_t              win_pos,
  output logic [PIX_W-1:0]  win [STRIP_ROWS][WIN_COLS]
);
  localparam int WPR = IMG_COLS / 2;

  logic [PIX_W-1:0] col_e [STRIP_ROWS];
  logic [PIX_W-1:0] col_o [STRIP_ROWS];
  logic [PIX_W-1:0] hold_e [STRIP_ROWS];
  logic [PIX_W-1:0] hold_o [STRIP_ROWS];
  logic [$clog2(STRIP_ROWS)-1:0] i_q;
  logic [POS_W-1:0] cp_q, r_q;
  logic [POS_W-1:0] hold_col, hold_row;
  logic [1:0]       pend_q;   // columns of the holding register still to be shifted in

  initial assert (STRIP_ROWS >= 2) else $error("window_gen needs STRIP_ROWS >= 2");

  // collect column pairs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_q <= '0; cp_q <= '0; r_q <= '0;
      for (int k = 0; k < STRIP_ROWS; k++) begin
        col_e[k] <= '0; col_o[k] <= '0;
      end
    end else if (start) begin
      i_q <= '0; cp_q <= '0; r_q <= '0;
    end else if (word_valid) begin
      col_e[i_q] <= word[PIX_W-1:0];
      col_o[i_q] <= word[16 +: PIX_W];
      if (int'(i_q) != STRIP_ROWS - 1) begin
        i_q <= i_q + 1'b1;
      end else begin
        i_q <= '0;
        if (int'(cp_q) != WPR - 1) cp_q <= cp_q + 1'b1;
        else begin
          cp_q <= '0;
          r_q  <= r_q + 1'b1;
        end
      end
    end
  end

  // holding register and window shift
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q <= '0; hold_col <= '0; hold_row <= '0;
      win_valid <= 1'b0; win_pos <= '0;
      for (int k = 0; k < STRIP_ROWS; k++) begin
        hold_e[k] <= '0; hold_o[k] <= '0;
        for (int c = 0; c < WIN_COLS; c++) win[k][c] <= '0;
      end
    end else begin
      win_valid <= 1'b0;
      if (pend_q != 2'd0) begin
        for (int k = 0; k < STRIP_ROWS; k++) begin
          for (int c = 0; c < WIN_COLS - 1; c++) win[k][c] <= win[k][c+1];
          win[k][WIN_COLS-1] <= (pend_q == 2'd2) ? hold_e[k] : hold_o[k];
        end
        win_valid   <= 1'b1;
        win_pos.row <= hold_row;
        win_pos.col <= (pend_q == 2'd2) ? hold_col : hold_col + 1'b1;
        pend_q      <= pend_q - 1'b1;
      end
      if (!start && word_valid && int'(i_q) == STRIP_ROWS - 1) begin
        for (int k = 0; k < STRIP_ROWS - 1; k++) begin
          hold_e[k] <= col_e[k];
          hold_o[k] <= col_o[k];
        end
        hold_e[STRIP_ROWS-1] <= word[PIX_W-1:0];
        hold_o[STRIP_ROWS-1] <= word[16 +: PIX_W];
        hold_col <= {cp_q[POS_W-2:0], 1'b0};
        hold_row <= r_q;
        pend_q   <= 2'd2;
      end
    end
  end
endmodule

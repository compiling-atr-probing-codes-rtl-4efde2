// tb_window_gen -- checks the window generator against the image it is fed.
//
// Words of a 14x16 image are fed in the reader's order (strip, word column, row), with random
// idle cycles between them.  Each window is compared pixel by pixel with the image: window
// column k of the window for column c must be image column c-3+k of rows row..row+12.  Windows
// with c < 3 still hold columns of the previous strip and are only counted.  The test also
// checks that two windows arrive per column pair and that positions run in order.
module tb_window_gen;
  import atr_pkg::*;
  localparam int R = 14, C = 16, SR = 13, WC = 4;
  localparam int NSTRIPS = R - SR + 1;

  logic clk = 0, rst_n = 0, start = 0, word_valid = 0;
  logic [WORD_W-1:0] word = '0;
  logic win_valid;
  pos_t win_pos;
  logic [PIX_W-1:0] win [SR][WC];
  int checks = 0, failures = 0, nwin = 0;

  window_gen #(.IMG_COLS(C), .STRIP_ROWS(SR), .WIN_COLS(WC)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [PIX_W-1:0] pixel(int r, int c);
    return PIX_W'(r * 97 + c * 13 + (r ^ c) * 5 + 1);
  endfunction

  always @(posedge clk) if (rst_n && win_valid) begin
    int exp_row, exp_col;
    exp_row = nwin / C;
    exp_col = nwin % C;
    checks++;
    if (int'(win_pos.row) != exp_row || int'(win_pos.col) != exp_col) begin
      failures++;
      $display("window %0d at row %0d col %0d, expected %0d %0d", nwin, win_pos.row, win_pos.col,
               exp_row, exp_col);
    end
    if (exp_col >= WC - 1) begin
      for (int r = 0; r < SR; r++)
        for (int k = 0; k < WC; k++) begin
          checks++;
          if (win[r][k] != pixel(exp_row + r, exp_col - (WC - 1) + k)) begin
            failures++;
            if (failures < 10) $display("window %0d pixel [%0d][%0d] wrong", nwin, r, k);
          end
        end
    end
    nwin++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int r = 0; r < NSTRIPS; r++)
      for (int cp = 0; cp < C / 2; cp++)
        for (int i = 0; i < SR; i++) begin
          word_valid = 1;
          word = {4'h0, pixel(r + i, 2 * cp + 1), 4'h0, pixel(r + i, 2 * cp)};
          @(negedge clk);
          word_valid = 0;
          repeat ($urandom % 2) @(negedge clk);
        end
    repeat (5) @(negedge clk);
    checks++;
    if (nwin != NSTRIPS * C) begin failures++; $display("%0d windows, expected %0d", nwin, NSTRIPS * C); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

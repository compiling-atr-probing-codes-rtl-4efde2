// tb_result_writer -- checks the result address map and the end-of-scan pulse.
//
// Streams the window positions of a 15x40 image (3 strips x 40 columns, probe-set width 34), with
// gaps, through the writer.  Positions with col < 33 must produce no write; the others must be
// written one clock later at row*7 + col-33 with the data unchanged, and `done` must pulse only
// with the very last position.
module tb_result_writer;
  import atr_pkg::*;
  localparam int R = 15, C = 40, PC = 34, NS = R - WIN_ROWS + 1, OC = C - PC + 1;
  localparam int RA_W = $clog2(NS * OC);

  logic clk = 0, rst_n = 0, in_valid = 0, res_we, done;
  pos_t in_pos = '0;
  result_t in_res = '0, res_data;
  logic [RA_W-1:0] res_addr;
  int checks = 0, failures = 0, writes = 0, dones = 0;

  result_writer #(.IMG_ROWS(R), .IMG_COLS(C), .PS_COLS(PC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < NS; r++)
      for (int c = 0; c < C; c++) begin
        result_t d;
        bit last;
        d = result_t'($urandom);
        last = (r == NS - 1) && (c == C - 1);
        @(negedge clk);
        in_valid = 1; in_pos.row = POS_W'(r); in_pos.col = POS_W'(c); in_res = d;
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (c < PC - 1) begin
          if (res_we) failures++;
        end else begin
          writes++;
          if (!res_we || int'(res_addr) != r * OC + c - (PC - 1) || res_data != d) begin
            failures++;
            $display("r %0d c %0d: we %0d addr %0d data %h", r, c, res_we, res_addr, res_data);
          end
        end
        checks++;
        if (done != last) failures++;
        if (done) dones++;
        repeat ($urandom % 2) @(negedge clk);
      end
    checks++;
    if (writes != NS * OC || dones != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

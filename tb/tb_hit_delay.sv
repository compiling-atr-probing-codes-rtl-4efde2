// tb_hit_delay -- checks the hit delay lines.
//
// Random hit vectors are applied, some cycles without `in_valid` (the history must then hold).
// Tap d must equal the vector applied d valid cycles earlier; the testbench keeps its own
// history of the vectors.
module tb_hit_delay;
  import atr_pkg::*;
  localparam int N = 40, DEPTH = 31;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  pos_t in_pos = '0, out_pos;
  logic [N-1:0] in_hits = '0;
  logic [N-1:0] taps [DEPTH];
  logic [N-1:0] hist [$];
  int checks = 0, failures = 0;

  hit_delay #(.N(N), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 4 != 0);
      in_hits  = {$urandom, $urandom};
      in_pos.col = POS_W'(t);
      #1;
      checks++;
      if (out_valid != in_valid || out_pos != in_pos) failures++;
      if (in_valid) begin
        for (int d = 0; d < DEPTH && d <= hist.size(); d++) begin
          logic [N-1:0] exp;
          exp = (d == 0) ? in_hits : hist[d-1];
          checks++;
          if (taps[d] != exp) begin
            failures++;
            if (failures < 10) $display("t %0d tap %0d wrong", t, d);
          end
        end
        hist.push_front(in_hits);
        if (hist.size() > DEPTH) void'(hist.pop_back());
      end
    end
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

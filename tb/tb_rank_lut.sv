// tb_rank_lut -- checks every entry of the rank table.
// For all sizes 1..35 and hit counts 0..size the rank must be 0 below 80% and
// floor(100*hits/size) - 79 from 80% up; the boundary cases (exactly 80%, 100%) are included.
module tb_rank_lut;
  import atr_pkg::*;
  localparam int MAX = 35, SW = $clog2(MAX + 1);
  logic [SW-1:0] size, hits;
  logic [RANK_W-1:0] rank;
  int checks = 0, failures = 0, at80 = 0;

  rank_lut #(.MAX_SIZE(MAX)) dut (.*);

  initial begin
    for (int s = 1; s <= MAX; s++)
      for (int h = 0; h <= s; h++) begin
        int exp;
        size = SW'(s);
        hits = SW'(h);
        #1;
        if (100 * h < 80 * s) exp = 0;
        else exp = (100 * h) / s - 79;
        if (100 * h == 80 * s) at80++;
        checks++;
        if (int'(rank) != exp) begin
          failures++;
          if (failures < 10) $display("size %0d hits %0d: rank %0d expected %0d", s, h, rank, exp);
        end
      end
    checks++;
    if (at80 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_probe_threshold -- checks the threshold operators of the M60 engine.
//
// Random 13x4 windows are applied with random thresholds, including windows where many pixel
// pairs differ by exactly the threshold (a difference equal to the threshold is not a hit).
// Each hit bit is compared with |p1 - p2| > threshold computed here from the probe geometry.
module tb_probe_threshold;
  import atr_pkg::*;
  localparam int VEH = 0, NU = N_UNIQUE_V[VEH];

  logic clk = 0, rst_n = 0, win_valid = 0, hit_valid;
  logic [PIX_W-1:0] threshold = '0;
  pos_t win_pos = '0, hit_pos;
  logic [PIX_W-1:0] win [WIN_ROWS][PROBE_COLS];
  logic [NU-1:0] hits;
  int checks = 0, failures = 0, ones = 0;

  probe_threshold #(.VEH(VEH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    foreach (win[r, c]) win[r][c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      threshold = PIX_W'($urandom % 4096);
      foreach (win[r, c])
        win[r][c] = (t % 2) ? PIX_W'($urandom) : PIX_W'(((r + c) % 2) * int'(threshold));
      win_valid = 1;
      win_pos.col = POS_W'(t);
      @(negedge clk);
      win_valid = 0;
      checks++;
      if (!hit_valid || int'(hit_pos.col) != t) failures++;
      for (int u = 0; u < NU; u++) begin
        probe_geom_t g;
        int a, b, d;
        g = probe_geom(VEH, u);
        a = int'(win[g.r1][g.c1]);
        b = int'(win[g.r2][g.c2]);
        d = (a > b) ? a - b : b - a;
        checks++;
        if (hits[u] != (d > int'(threshold))) begin
          failures++;
          if (failures < 10) $display("t %0d probe %0d: hit %0d, diff %0d thr %0d", t, u, hits[u], d, threshold);
        end
        if (hits[u]) ones++;
      end
    end
    checks++;
    if (ones == 0) failures++;
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

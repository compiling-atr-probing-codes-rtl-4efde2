// tb_max_tree -- checks the winner selection over 81 ranks.
// Random ranks (few distinct values, so ties are frequent) and single-winner cases: the output
// must be the largest rank and the lowest index holding it.
module tb_max_tree;
  import atr_pkg::*;
  localparam int N = N_PSETS;
  logic [RANK_W-1:0] ranks [N];
  logic [RANK_W-1:0] best_rank;
  logic [PSET_W-1:0] best_idx;
  int checks = 0, failures = 0;

  max_tree #(.N(N)) dut (.*);

  task automatic check();
    int br = 0, bi = 0;
    #1;
    for (int i = 0; i < N; i++) if (int'(ranks[i]) > br) begin br = int'(ranks[i]); bi = i; end
    checks++;
    if (int'(best_rank) != br || int'(best_idx) != bi) begin
      failures++;
      if (failures < 10) $display("got %0d@%0d expected %0d@%0d", best_rank, best_idx, br, bi);
    end
  endtask

  initial begin
    for (int t = 0; t < 1000; t++) begin
      foreach (ranks[i]) ranks[i] = RANK_W'($urandom % ((t % 3 == 0) ? 3 : 22));
      check();
    end
    for (int i = 0; i < N; i++) begin
      foreach (ranks[k]) ranks[k] = '0;
      ranks[i] = RANK_W'(1 + i % 21);
      check();
    end
    foreach (ranks[k]) ranks[k] = '0;
    check();
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

// tb_atr_top -- end-to-end test of the three-engine design on a reduced image.
//
// The same 15x72 image is served to all three engines from one-cycle-latency memory models; each
// engine's grant is randomly withheld in the second scan.  Every result of every engine is
// compared with the reference model, every result position must be written exactly once, and
// the scan must finish with `all_done`.  The test also counts how often the design's mechanisms
// occur and fails if one never does: memory stalls, window positions dropped at the left edge of
// a strip, strip changes, windows where no probe set reaches 80% (rank 0) and windows with a
// winner, and winners from more than one probe set.
module tb_atr_top;
  import atr_pkg::*;

  localparam int R = 15, C = 72;
  localparam int NSTRIPS = R - WIN_ROWS + 1;
  localparam int ADDR_W  = $clog2(R * C / 2);
  localparam int RA_W    = $clog2(NSTRIPS * (C - 25 + 1));
  localparam int READS   = NSTRIPS * C * WIN_ROWS / 2;

  logic clk = 0, rst_n = 0, start = 0;
  logic [PIX_W-1:0] threshold;
  logic [N_VEH-1:0] busy, done, mem_req, mem_gnt, mem_rvalid, res_we;
  logic all_done;
  logic [ADDR_W-1:0] mem_addr [N_VEH];
  logic [WORD_W-1:0] mem_rdata [N_VEH];
  logic [RA_W-1:0] res_addr [N_VEH];
  result_t res_data [N_VEH];

  atr_top #(.IMG_ROWS(R), .IMG_COLS(C)) dut (.*);

  always #5 clk = ~clk;

  logic [WORD_W-1:0] mem [R * C / 2];
  bit stall_mode = 0;
  int checks = 0, failures = 0;
  int n_stall = 0, n_drop = 0, n_strip = 0, n_zero = 0, n_win = 0;
  int written [N_VEH][NSTRIPS * C];
  int set_seen [N_PSETS];

  for (genvar v = 0; v < N_VEH; v++) begin : g_mem
    always_ff @(posedge clk) begin
      mem_rvalid[v] <= mem_req[v] && mem_gnt[v];
      mem_rdata[v]  <= mem[mem_addr[v]];
      mem_gnt[v]    <= stall_mode ? ($urandom % 4 != 0) : 1'b1;
      if (rst_n && mem_req[v] && !mem_gnt[v]) n_stall++;
    end

    always @(posedge clk) if (rst_n && res_we[v]) begin
      int oc, row, x;
      result_t exp;
      oc  = C - PS_COLS_V[v] + 1;
      row = int'(res_addr[v]) / oc;
      x   = int'(res_addr[v]) % oc;
      exp = probe_ref::best(v, row, x, int'(threshold));
      checks++;
      written[v][res_addr[v]]++;
      if (exp.rank == 0) n_zero++;
      else begin n_win++; set_seen[exp.pset]++; end
      if (res_data[v] !== exp) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH veh %0d row %0d x %0d: got %0d/%0d expected %0d/%0d", v, row, x,
                   res_data[v].rank, res_data[v].pset, exp.rank, exp.pset);
      end
    end
  end

  // mechanisms seen inside the engines
  pos_t last_pos;
  always @(posedge clk) if (rst_n && dut.g_veh[0].u_eng.win_valid) begin
    pos_t p;
    p = dut.g_veh[0].u_eng.win_pos;
    if (int'(p.col) < PS_COLS_V[0] - 1) n_drop++;
    if (p.row != last_pos.row) n_strip++;
    last_pos = p;
  end

  task automatic run_scan(int thr, bit stall);
    int t = 0;
    threshold = PIX_W'(thr);
    stall_mode = stall;
    foreach (written[v, i]) written[v][i] = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!all_done) begin @(posedge clk); t++; end
    $display("scan (threshold %0d, stalls %0d) took %0d cycles for %0d reads", thr, stall, t, READS);
    for (int v = 0; v < N_VEH; v++) begin
      checks++;
      for (int i = 0; i < NSTRIPS * (C - PS_COLS_V[v] + 1); i++)
        if (written[v][i] != 1) begin
          failures++; $display("FAIL: veh %0d result %0d written %0d times", v, i, written[v][i]);
          break;
        end
    end
    if (!stall) begin
      checks++;
      if (t > READS + 10) begin failures++; $display("FAIL: slower than one read per clock"); end
    end
    repeat (5) @(posedge clk);
  endtask

  initial begin
    int distinct = 0;
    last_pos = '0;
    probe_ref::cols = C;
    probe_ref::img = new[R * C];
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) probe_ref::img[r * C + c] = probe_ref::gen_pixel(7, r, c);
    for (int r = 0; r < R; r++)
      for (int w = 0; w < C / 2; w++)
        mem[r * C / 2 + w] = {4'h0, 12'(probe_ref::img[r * C + 2 * w + 1]),
                              4'h0, 12'(probe_ref::img[r * C + 2 * w])};
    threshold = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_scan(400, 0);
    run_scan(800, 1);
    foreach (set_seen[s]) if (set_seen[s] != 0) distinct++;
    $display("stall cycles %0d, dropped edge windows %0d, strip changes %0d", n_stall, n_drop, n_strip);
    $display("rank-0 windows %0d, windows with a winner %0d, distinct winning sets %0d",
             n_zero, n_win, distinct);
    checks += 6;
    if (n_stall == 0)  begin failures++; $display("FAIL: no stall happened"); end
    if (n_drop == 0)   begin failures++; $display("FAIL: no edge window dropped"); end
    if (n_strip == 0)  begin failures++; $display("FAIL: no strip change"); end
    if (n_zero == 0)   begin failures++; $display("FAIL: no rank-0 window"); end
    if (n_win == 0)    begin failures++; $display("FAIL: no window with a winner"); end
    if (distinct < 2)  begin failures++; $display("FAIL: only one winning probe set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * READS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_atr_full -- one complete scan of a full 512x1024 image by the design at its default size.
//
// All three engines read the same hashed image from one-cycle-latency memories that grant every
// request.  The scan must take (512-13+1) * 1024 * 13/2 = 3,328,000 reads plus at most 10 clocks,
// i.e. one 32-bit word per clock.  Every result position of every engine must be written exactly
// once (500 strips x 991, 999 and 1000 positions), and one result in 4001 is compared with the
// reference model.
module tb_atr_full;
  import atr_pkg::*;

  localparam int R = IMAGE_ROWS, C = IMAGE_COLS;
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

  atr_top dut (.*);

  always #5 clk = ~clk;

  logic [WORD_W-1:0] mem [R * C / 2];
  int checks = 0, failures = 0, sampled = 0, n_win = 0;
  bit written [N_VEH][NSTRIPS * C];
  int n_written [N_VEH];

  assign mem_gnt = '1;

  for (genvar v = 0; v < N_VEH; v++) begin : g_mem
    always_ff @(posedge clk) begin
      mem_rvalid[v] <= mem_req[v];
      mem_rdata[v]  <= mem[mem_addr[v]];
    end

    always @(posedge clk) if (rst_n && res_we[v]) begin
      int oc, row, x;
      result_t exp;
      if (written[v][res_addr[v]]) begin
        failures++; $display("FAIL: veh %0d result %0d written twice", v, res_addr[v]);
      end
      written[v][res_addr[v]] = 1'b1;
      n_written[v]++;
      if (int'(res_addr[v]) % 4001 == 0) begin
        oc  = C - PS_COLS_V[v] + 1;
        row = int'(res_addr[v]) / oc;
        x   = int'(res_addr[v]) % oc;
        exp = probe_ref::best(v, row, x, int'(threshold));
        checks++; sampled++;
        if (exp.rank != 0) n_win++;
        if (res_data[v] !== exp) begin
          failures++;
          $display("MISMATCH veh %0d row %0d x %0d: got %0d/%0d expected %0d/%0d", v, row, x,
                   res_data[v].rank, res_data[v].pset, exp.rank, exp.pset);
        end
      end
    end
  end

  initial begin
    int t = 0;
    probe_ref::cols = C;
    probe_ref::img = new[R * C];
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) probe_ref::img[r * C + c] = probe_ref::gen_pixel(3, r, c);
    for (int r = 0; r < R; r++)
      for (int w = 0; w < C / 2; w++)
        mem[r * C / 2 + w] = {4'h0, 12'(probe_ref::img[r * C + 2 * w + 1]),
                              4'h0, 12'(probe_ref::img[r * C + 2 * w])};
    threshold = 12'd500;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!all_done) begin @(posedge clk); t++; end
    $display("full scan: %0d cycles for %0d reads; %0d results sampled, %0d with a winner",
             t, READS, sampled, n_win);
    checks++;
    if (t < READS || t > READS + 10) begin failures++; $display("FAIL: cycle count"); end
    for (int v = 0; v < N_VEH; v++) begin
      checks++;
      if (n_written[v] != NSTRIPS * (C - PS_COLS_V[v] + 1)) begin
        failures++; $display("FAIL: veh %0d wrote %0d results", v, n_written[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (READS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

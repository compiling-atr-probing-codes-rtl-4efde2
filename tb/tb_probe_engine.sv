// tb_probe_engine -- self-checking test of one vehicle's probing engine on a small image.
//
// A 16x64 image of hashed 12-bit pixels sits in a one-cycle-latency memory model.  Three scans
// are run: without stalls (checks the one-read-per-clock rate: start to done must take the
// number of reads plus the pipeline latency), with random grant stalls, and with a high
// threshold that leaves many windows at rank 0.  Every result write is compared with the reference model probe_ref::best, and every
// result position must be written exactly once per scan.
module tb_probe_engine;
  import atr_pkg::*;

  localparam int VEH = 0;
  localparam int R = 16, C = 64;
  localparam int NSTRIPS  = R - WIN_ROWS + 1;
  localparam int OUT_COLS = C - PS_COLS_V[VEH] + 1;
  localparam int READS    = NSTRIPS * C * WIN_ROWS / 2;
  localparam int ADDR_W   = $clog2(R * C / 2);
  localparam int LAT      = 10;  // last grant -> data -> column -> hits -> counts -> ranks -> winner -> write
  localparam int RA_W     = $clog2(NSTRIPS * OUT_COLS);

  logic clk = 0, rst_n = 0, start = 0;
  logic [PIX_W-1:0] threshold;
  logic busy, done, mem_req, mem_gnt, mem_rvalid, res_we;
  logic [ADDR_W-1:0] mem_addr;
  logic [WORD_W-1:0] mem_rdata;
  logic [RA_W-1:0] res_addr;
  result_t res_data;

  probe_engine #(.VEH(VEH), .IMG_ROWS(R), .IMG_COLS(C)) dut (.*);

  always #5 clk = ~clk;

  logic [WORD_W-1:0] mem [R * C / 2];
  bit stall_mode = 0;
  int checks = 0, failures = 0, nonzero = 0, zero = 0, stalls = 0;
  int written [NSTRIPS * OUT_COLS];

  always_ff @(posedge clk) begin
    mem_rvalid <= mem_req && mem_gnt;
    mem_rdata  <= mem[mem_addr];
    mem_gnt    <= stall_mode ? ($urandom % 3 != 0) : 1'b1;
    if (rst_n && mem_req && !mem_gnt) stalls++;
  end

  always @(posedge clk) if (rst_n && res_we) begin
    int row, x;
    result_t exp;
    row = int'(res_addr) / OUT_COLS;
    x   = int'(res_addr) % OUT_COLS;
    exp = probe_ref::best(VEH, row, x, int'(threshold));
    checks++;
    written[res_addr]++;
    if (exp.rank != 0) nonzero++; else zero++;
    if (res_data !== exp) begin
      failures++;
      if (failures < 10) $display("MISMATCH row %0d x %0d: got rank %0d set %0d, expected %0d %0d",
                                  row, x, res_data.rank, res_data.pset, exp.rank, exp.pset);
    end
  end

  task automatic run_scan(int thr, bit stall, bit check_time);
    int t0, t;
    threshold = PIX_W'(thr);
    stall_mode = stall;
    foreach (written[i]) written[i] = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t0 = 0;
    while (!done) begin @(posedge clk); t0++; end
    checks++;
    foreach (written[i]) if (written[i] != 1) begin failures++; break; end
    if (check_time) begin
      checks++;
      t = t0;
      $display("scan took %0d cycles for %0d reads", t, READS);
      if (t < READS || t > READS + LAT) begin
        failures++; $display("FAIL: expected %0d..%0d cycles", READS, READS + LAT);
      end
    end
    repeat (5) @(posedge clk);
  endtask

  initial begin
    probe_ref::cols = C;
    probe_ref::img = new[R * C];
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) probe_ref::img[r * C + c] = probe_ref::gen_pixel(1, r, c);
    for (int r = 0; r < R; r++)
      for (int w = 0; w < C / 2; w++)
        mem[r * C / 2 + w] = {4'h0, 12'(probe_ref::img[r * C + 2 * w + 1]),
                              4'h0, 12'(probe_ref::img[r * C + 2 * w])};
    threshold = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_scan(300, 0, 1);
    run_scan(300, 1, 0);
    run_scan(1500, 0, 0);
    checks++;
    if (nonzero == 0 || zero == 0 || stalls == 0) begin
      failures++; $display("FAIL: nonzero ranks %0d, stalls %0d", nonzero, stalls);
    end
    $display("rank>0 windows %0d, rank 0 windows %0d, stall cycles %0d", nonzero, zero, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * READS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

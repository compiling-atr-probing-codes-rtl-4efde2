// tb_image_reader -- checks the read address sequence of the image reader.
//
// A 16x20 image (10 words per row) is scanned twice, once with every request granted and once
// with random grant stalls.  Each granted address is compared with the sequence of the nested
// loops strip / word column / row, the number of reads must be 4 strips x 10 x 13, `last` must
// mark only the final read, and without stalls the scan must take one clock per read.
module tb_image_reader;
  localparam int R = 16, C = 20, SR = 13;
  localparam int NSTRIPS = R - SR + 1, WPR = C / 2;
  localparam int READS = NSTRIPS * WPR * SR;
  localparam int ADDR_W = $clog2(R * C / 2);

  logic clk = 0, rst_n = 0, start = 0, busy, mem_req, mem_gnt, last;
  logic [ADDR_W-1:0] mem_addr;
  bit stall_mode = 0;
  int checks = 0, failures = 0, n = 0, stalls = 0;

  image_reader #(.IMG_ROWS(R), .IMG_COLS(C), .STRIP_ROWS(SR)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) mem_gnt <= stall_mode ? ($urandom % 3 != 0) : 1'b1;

  always @(posedge clk) if (rst_n) begin
    if (mem_req && !mem_gnt) stalls++;
    if (mem_req && mem_gnt) begin
      int r, cp, i, exp;
      r  = n / (WPR * SR);
      cp = (n / SR) % WPR;
      i  = n % SR;
      exp = (r + i) * WPR + cp;
      checks++;
      if (int'(mem_addr) != exp) begin
        failures++;
        if (failures < 10) $display("read %0d: addr %0d expected %0d", n, mem_addr, exp);
      end
      checks++;
      if (last != (n == READS - 1)) begin failures++; $display("last wrong at read %0d", n); end
      n++;
    end
  end

  task automatic scan(bit stall);
    int t = 0;
    n = 0;
    stall_mode = stall;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (busy) begin @(posedge clk); t++; end
    checks++;
    if (n != READS) begin failures++; $display("%0d reads, expected %0d", n, READS); end
    if (!stall) begin
      checks++;
      if (t > READS + 1) begin failures++; $display("scan took %0d cycles for %0d reads", t, READS); end
    end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    scan(0);
    scan(1);
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * READS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

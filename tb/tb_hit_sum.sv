// tb_hit_sum -- checks the sum tree: the count must equal the number of ones in the input.
// Tries all-zero, all-one, single-bit and random inputs of a 35-input tree.
module tb_hit_sum;
  localparam int N = 35, CW = $clog2(N + 1);
  logic [N-1:0] bits;
  logic [CW-1:0] count;
  int checks = 0, failures = 0;

  hit_sum #(.N(N)) dut (.*);

  task automatic check(logic [N-1:0] b);
    int exp = 0;
    bits = b;
    #1;
    for (int i = 0; i < N; i++) exp += int'(b[i]);
    checks++;
    if (int'(count) != exp) begin
      failures++;
      if (failures < 10) $display("bits %h: count %0d expected %0d", b, count, exp);
    end
  endtask

  initial begin
    check('0);
    check('1);
    for (int i = 0; i < N; i++) check(N'(1) << i);
    for (int t = 0; t < 2000; t++) check(N'({$urandom, $urandom}));
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

// rank_lut -- replaces the division hits/size by a table lookup.
//
// The table holds, for every probe-set size 0..MAX_SIZE and hit count 0..MAX_SIZE, the rank
//   rank = 0                              if floor(100*hits/size) < MIN_PCT
//        = floor(100*hits/size) - MIN_PCT + 1 otherwise (1 .. 101-MIN_PCT),
// so the winner selection compares small integers instead of quotients.  With MIN_PCT = 80 the
// rank needs 5 bits.  The table is filled at elaboration from that formula.  In the probe
// engine the size input of each instance is a constant, so synthesis keeps only that probe
// set's column of the table.  Purely combinational.  Replacing the division by a lookup and
// giving scores under 80% rank 0 follow the published design; the exact rank formula is this
// design's choice.
module rank_lut
  import atr_pkg::*;
#(
  parameter int MAX_SIZE = 35,
  parameter int SIZE_W   = $clog2(MAX_SIZE + 1)
) (
  input  logic [SIZE_W-1:0] size,
  input  logic [SIZE_W-1:0] hits,
  output logic [RANK_W-1:0] rank
);
  localparam int ENTRIES = (MAX_SIZE + 1) * (MAX_SIZE + 1);

  function automatic logic [ENTRIES*RANK_W-1:0] build();
    logic [ENTRIES*RANK_W-1:0] t = '0;
    for (int s = 0; s <= MAX_SIZE; s++)
      for (int h = 0; h <= MAX_SIZE; h++) begin
        int pct = (s == 0) ? 0 : (100 * h) / s;
        t[(s * (MAX_SIZE + 1) + h) * RANK_W +: RANK_W] =
          (pct < MIN_PCT) ? '0 : RANK_W'(pct - MIN_PCT + 1);
      end
    return t;
  endfunction

  localparam logic [ENTRIES*RANK_W-1:0] TABLE = build();

  always_comb begin
    if (int'(size) > MAX_SIZE || int'(hits) > MAX_SIZE) rank = '0;
    else rank = TABLE[(int'(size) * (MAX_SIZE + 1) + int'(hits)) * RANK_W +: RANK_W];
  end
endmodule

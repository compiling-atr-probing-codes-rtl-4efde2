// probe_engine -- the probing computation of one vehicle, as mapped onto one FPGA.
//
// The nested loops "for every window, for every probe set, for every probe" are fully unrolled
// over probe sets and probes, leaving a single loop over window positions driven by the window
// generator.  Every clock in which a new window is ready, the whole loop body is evaluated at
// once:
//   window_gen       13x4 window, one per image column, from the words image_reader fetches
//   probe_threshold  one threshold operator per distinct probe (N_UNIQUE of them)
//   hit_delay        hit bits of earlier columns, so each probe set reuses them (temporal CSE)
//   hit_sum          one sum tree per probe set (81), over that set's probes
//   rank_lut         hit count and probe-set size -> rank (replaces the division)
//   max_tree         highest rank over the 81 probe sets and its index
//   result_writer    one result word per complete window position
//
// Which distinct probe and which delay each probe of a probe set uses is fixed at elaboration
// from atr_pkg (member_uid / member_delay), exactly as the compiler fixes the probe library in
// the configuration.  The result for the probe-set position whose left edge is column x of strip
// r is written to res_addr = r*(IMG_COLS-PS_COLS+1) + x as {rank, index}.
//
// Timing: one memory read per clock when the memory grants it; two window positions per
// STRIP_ROWS (13) reads.  From a window leaving window_gen to its result write is 5 clocks (hits,
// counts, ranks, winner, write registers).  `done` rises with the last result write and stays
// high until the next `start`; `busy` is high in between.  The read stream, data flow and
// operators follow the published design; register placement, ports and handshakes are this
// design's choices.
module probe_engine
  import atr_pkg::*;
#(
  parameter int VEH        = 0,
  parameter int IMG_ROWS   = atr_pkg::IMAGE_ROWS,
  parameter int IMG_COLS   = atr_pkg::IMAGE_COLS,
  parameter int ADDR_W     = $clog2(IMG_ROWS * IMG_COLS / 2),
  parameter int RES_ADDR_W = $clog2((IMG_ROWS - WIN_ROWS + 1)
                                    * (IMG_COLS - atr_pkg::PS_COLS_V[VEH] + 1))
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [PIX_W-1:0]      threshold,
  output logic                  busy,
  output logic                  done,
  // local-memory read port (image)
  output logic                  mem_req,
  output logic [ADDR_W-1:0]     mem_addr,
  input  logic                  mem_gnt,
  input  logic                  mem_rvalid,
  input  logic [WORD_W-1:0]     mem_rdata,
  // result write port
  output logic                  res_we,
  output logic [RES_ADDR_W-1:0] res_addr,
  output result_t               res_data
);
  localparam int N_UNIQUE = N_UNIQUE_V[VEH];
  localparam int PS_COLS  = PS_COLS_V[VEH];
  localparam int DEPTH    = PS_COLS - PROBE_COLS + 1;
  localparam int MAXSZ    = max_pset_size(VEH);
  localparam int CNT_W    = $clog2(MAXSZ + 1);

  initial assert (IMG_COLS >= PS_COLS && IMG_ROWS >= WIN_ROWS && IMG_COLS % 2 == 0)
    else $error("probe_engine: image smaller than the probe-set window");

  // ---------------- read stream and window ----------------
  logic reader_busy, reader_last;
  image_reader #(.IMG_ROWS(IMG_ROWS), .IMG_COLS(IMG_COLS), .STRIP_ROWS(WIN_ROWS),
                 .ADDR_W(ADDR_W)) u_reader (
    .clk, .rst_n, .start(start && !busy), .busy(reader_busy),
    .mem_req, .mem_addr, .mem_gnt, .last(reader_last));

  logic             win_valid;
  pos_t             win_pos;
  logic [PIX_W-1:0] win [WIN_ROWS][PROBE_COLS];
  window_gen #(.IMG_COLS(IMG_COLS), .STRIP_ROWS(WIN_ROWS),
               .WIN_COLS(PROBE_COLS)) u_win (
    .clk, .rst_n, .start(start && !busy), .word_valid(mem_rvalid), .word(mem_rdata),
    .win_valid, .win_pos, .win);

  // ---------------- threshold operators and delay lines ----------------
  logic                hit_valid;
  pos_t                hit_pos;
  logic [N_UNIQUE-1:0] hits;
  probe_threshold #(.VEH(VEH), .N_UNIQUE(N_UNIQUE), .STRIP_ROWS(WIN_ROWS),
                    .WIN_COLS(PROBE_COLS)) u_thr (
    .clk, .rst_n, .threshold, .win_valid, .win_pos, .win, .hit_valid, .hit_pos, .hits);

  logic                tap_valid;
  pos_t                tap_pos;
  logic [N_UNIQUE-1:0] taps [DEPTH];
  hit_delay #(.N(N_UNIQUE), .DEPTH(DEPTH)) u_dly (
    .clk, .rst_n, .in_valid(hit_valid), .in_pos(hit_pos), .in_hits(hits),
    .out_valid(tap_valid), .out_pos(tap_pos), .taps);

  // ---------------- sum trees, rank tables ----------------
  logic [CNT_W-1:0]  cnt_d [N_PSETS];
  logic [CNT_W-1:0]  cnt_q [N_PSETS];
  logic [RANK_W-1:0] rank_d [N_PSETS];
  logic [RANK_W-1:0] rank_q [N_PSETS];

  for (genvar s = 0; s < N_PSETS; s++) begin : g_pset
    localparam int BASE = pset_base(VEH, s);
    localparam int SZ   = pset_size(VEH, s);
    logic [MAXSZ-1:0] bits;
    for (genvar j = 0; j < MAXSZ; j++) begin : g_bit
      if (j < SZ) begin : g_probe
        localparam int UID = member_uid(VEH, BASE + j);
        localparam int DLY = member_delay(VEH, BASE + j);
        assign bits[j] = taps[DLY][UID];
      end else begin : g_unused
        assign bits[j] = 1'b0;
      end
    end
    hit_sum #(.N(MAXSZ), .COUNT_W(CNT_W)) u_sum (.bits, .count(cnt_d[s]));
    rank_lut #(.MAX_SIZE(MAXSZ), .SIZE_W(CNT_W)) u_rank (
      .size(CNT_W'(SZ)), .hits(cnt_q[s]), .rank(rank_d[s]));
  end

  logic cnt_valid, rank_valid, best_valid;
  pos_t cnt_pos, rank_pos, best_pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_valid <= 1'b0; rank_valid <= 1'b0; cnt_pos <= '0; rank_pos <= '0;
      for (int s = 0; s < N_PSETS; s++) begin
        cnt_q[s] <= '0; rank_q[s] <= '0;
      end
    end else begin
      cnt_valid  <= tap_valid;
      rank_valid <= cnt_valid;
      if (tap_valid) begin
        cnt_pos <= tap_pos;
        cnt_q   <= cnt_d;
      end
      if (cnt_valid) begin
        rank_pos <= cnt_pos;
        rank_q   <= rank_d;
      end
    end
  end

  // ---------------- max tree and result ----------------
  result_t best_d, best_q;
  max_tree #(.N(N_PSETS)) u_max (.ranks(rank_q), .best_rank(best_d.rank), .best_idx(best_d.pset));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_valid <= 1'b0; best_pos <= '0; best_q <= '0;
    end else begin
      best_valid <= rank_valid;
      if (rank_valid) begin
        best_pos <= rank_pos;
        best_q   <= best_d;
      end
    end
  end

  logic wr_done;
  result_writer #(.IMG_ROWS(IMG_ROWS), .IMG_COLS(IMG_COLS), .STRIP_ROWS(WIN_ROWS),
                  .PS_COLS(PS_COLS), .RES_ADDR_W(RES_ADDR_W)) u_wr (
    .clk, .rst_n, .in_valid(best_valid), .in_pos(best_pos), .in_res(best_q),
    .res_we, .res_addr, .res_data, .done(wr_done));

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0;
    end else if (start && !busy) begin
      busy <= 1'b1; done <= 1'b0;
    end else if (wr_done) begin
      busy <= 1'b0; done <= 1'b1;
    end
  end

  // The reader's status is not needed here: the end of a scan is taken from the result
  // writer, which sees the last position only after the last word has passed the pipeline.
  logic unused;
  assign unused = reader_busy ^ reader_last;
endmodule

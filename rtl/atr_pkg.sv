// atr_pkg -- shared constants, types and the probe library of the ATR probing engines.
//
// A probe is a pair of pixels with a yes/no question: does the absolute difference of the two
// 12-bit pixels exceed a threshold?  A probe set (one vehicle seen from one aspect and
// depression angle) is a list of probes; its score at a window position is the fraction of its
// probes that answer yes.  Each vehicle has 81 probe sets (27 aspect x 3 depression angles).
//
// The engines use the compacted form of the probe library: every probe is expressed as one of a
// small number of distinct probes that fit in a 13x4 pixel window, plus a column delay that says
// how many window steps earlier that distinct probe was evaluated.  The per-vehicle sizes
// (distinct probes, probes in total, probe-set height and width) follow the published
// statistics of the M60, M113 and M901 probe libraries.  The probe coordinates themselves are
// not published, so this package generates a deterministic stand-in library of exactly those
// sizes with an integer hash (see probe_geom and member_uid/member_delay below).  Replacing the
// three functions with tables of real probes changes nothing else in the design.
package atr_pkg;

  // ---------------- image and memory ----------------
  localparam int PIX_W       = 12;   // LADAR pixel width
  localparam int WORD_W      = 32;   // one memory word holds two pixels
  localparam int IMAGE_ROWS  = 512;
  localparam int IMAGE_COLS  = 1024;
  localparam int WIN_ROWS    = 13;   // height of the compacted window (largest vehicle)
  localparam int PROBE_COLS  = 4;    // width of the compacted window (widest probe)

  // ---------------- probe library sizes ----------------
  localparam int N_VEH       = 3;    // 0 = M60 tank, 1 = M113 APC, 2 = M901 APC with launcher
  localparam int N_PSETS     = 81;   // probe sets per vehicle
  localparam int PSET_W      = 7;    // bits of a probe-set index
  localparam int MIN_PCT     = 80;   // scores below this percentage get rank 0
  localparam int RANK_W      = 5;    // ranks 0..21

  localparam int N_UNIQUE_V [N_VEH] = '{151, 106, 143};    // distinct (compacted) probes
  localparam int N_PROBES_V [N_VEH] = '{2832, 2315, 2426}; // probes over all 81 probe sets
  localparam int PS_ROWS_V  [N_VEH] = '{12, 11, 13};       // probe-set window height
  localparam int PS_COLS_V  [N_VEH] = '{34, 26, 25};       // probe-set window width

  localparam int POS_W = 16;  // width of the row / column tags that travel with a window

  typedef struct packed {
    logic [POS_W-1:0] row;   // top image row of the strip
    logic [POS_W-1:0] col;   // image column of the newest window column
  } pos_t;

  typedef struct packed {
    logic [RANK_W-1:0] rank; // best rank over all probe sets, 0 = no probe set reached MIN_PCT
    logic [PSET_W-1:0] pset; // index of the probe set that reached it
  } result_t;

  typedef struct packed {
    logic [3:0] r1;  // first pixel: row 0..12 and column 0..3 in the 13x4 window
    logic [1:0] c1;
    logic [3:0] r2;  // second pixel
    logic [1:0] c2;
  } probe_geom_t;

  // ---------------- probe library ----------------
  function automatic int unsigned mix(int unsigned x);
    x = x ^ (x >> 16);
    x = x * 32'h7feb352d;
    x = x ^ (x >> 15);
    x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  // Number of probes in probe set s of vehicle v: the totals are spread evenly over the sets.
  function automatic int pset_base(int v, int s);
    return (N_PROBES_V[v] * s) / N_PSETS;
  endfunction

  function automatic int pset_size(int v, int s);
    return pset_base(v, s + 1) - pset_base(v, s);
  endfunction

  function automatic int max_pset_size(int v);
    int m = 0;
    for (int s = 0; s < N_PSETS; s++) if (pset_size(v, s) > m) m = pset_size(v, s);
    return m;
  endfunction

  // Geometry of distinct probe u of vehicle v (two different pixels of the compacted window).
  function automatic probe_geom_t probe_geom(int v, int u);
    int unsigned h = mix(32'(v * 100003 + u * 7 + 1));
    int rows = PS_ROWS_V[v];
    probe_geom_t g;
    g.r1 = 4'(int'(h % 32'(rows)));
    g.c1 = 2'(h >> 8);
    g.r2 = 4'(int'((h >> 12) % 32'(rows)));
    g.c2 = 2'(h >> 20);
    if (g.r1 == g.r2 && g.c1 == g.c2) g.r2 = 4'((int'(g.r1) + 1) % rows);
    return g;
  endfunction

  // Probe number k (0 .. N_PROBES_V-1, counted over all probe sets) refers to a distinct probe
  // and a column delay 0 .. PS_COLS-4.  The first N_UNIQUE probes use every distinct probe once.
  function automatic int member_uid(int v, int k);
    int unsigned h = mix(32'(v * 7919 + k * 3 + 12345));
    if (k < N_UNIQUE_V[v]) return k;
    return int'(h % 32'(N_UNIQUE_V[v]));
  endfunction

  function automatic int member_delay(int v, int k);
    int unsigned h = mix(32'(v * 7919 + k * 3 + 12345));
    return int'((h >> 10) % 32'(PS_COLS_V[v] - PROBE_COLS + 1));
  endfunction

endpackage

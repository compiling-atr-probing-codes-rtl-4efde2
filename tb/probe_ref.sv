// probe_ref -- reference model of probing, used by the testbenches.
//
// Works on the uncompacted definition: a probe set placed with its left edge at image column x
// of the strip starting at row r.  Each probe k of the set is the distinct probe member_uid(k)
// shifted member_delay(k) columns to the left of the set's right edge; its hit is
// |p1 - p2| > threshold.  The score is hits/size in percent; percentages below 80 give rank 0,
// others pct-79.  The winner is the highest rank, the lowest index on ties.
// The image lives in `img` (row-major, `cols` pixels per row), filled by the testbench.
package probe_ref;
  import atr_pkg::*;

  int unsigned img [];
  int          cols;

  function automatic int unsigned pix(int r, int c);
    return img[r * cols + c];
  endfunction

  // Pixel value used by the testbenches: a deterministic hash of the position and a seed.
  function automatic int unsigned gen_pixel(int seed, int r, int c);
    int unsigned h = 32'(seed * 40503 + r * 1031 + c * 7 + 11);
    h = h ^ (h >> 13); h = h * 32'h5bd1e995; h = h ^ (h >> 15);
    return h & 32'hfff;
  endfunction

  function automatic int hits_of(int v, int s, int r, int x, int thr);
    int n = 0;
    int base = (N_PROBES_V[v] * s) / N_PSETS;
    int size = (N_PROBES_V[v] * (s + 1)) / N_PSETS - base;
    int right = x + PS_COLS_V[v] - 1;
    for (int j = 0; j < size; j++) begin
      probe_geom_t g = probe_geom(v, member_uid(v, base + j));
      int c0 = right - member_delay(v, base + j) - (PROBE_COLS - 1);
      int a = int'(pix(r + int'(g.r1), c0 + int'(g.c1)));
      int b = int'(pix(r + int'(g.r2), c0 + int'(g.c2)));
      int d = (a > b) ? a - b : b - a;
      if (d > thr) n++;
    end
    return n;
  endfunction

  function automatic int rank_ref(int hits, int size);
    int pct;
    if (size == 0) return 0;
    pct = (100 * hits) / size;
    return (pct < 80) ? 0 : pct - 79;
  endfunction

  function automatic result_t best(int v, int r, int x, int thr);
    result_t res = '0;
    for (int s = 0; s < N_PSETS; s++) begin
      int base = (N_PROBES_V[v] * s) / N_PSETS;
      int size = (N_PROBES_V[v] * (s + 1)) / N_PSETS - base;
      int rk = rank_ref(hits_of(v, s, r, x, thr), size);
      if (rk > int'(res.rank)) begin
        res.rank = RANK_W'(rk);
        res.pset = PSET_W'(s);
      end
    end
    return res;
  endfunction
endpackage

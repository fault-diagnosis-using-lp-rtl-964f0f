// Reference models for the testbenches of the BISD design.
//
// Written from the behaviour of the blocks, not from their structure:
// - lfsr_next: one step of an external-XOR LFSR on the whole state;
// - inject: bitwise R-injection, equal bits pass, differing bits become r;
// - tpg_model: the LP-TPG pattern stream computed from whole LFSR states
//   T(i), T(i+1): T(i), [A(i+1)|inj B], [A(i+1)|B(i)], [inj A|B(i+1)], ...
//   where A is the lower half (outputs O1..O(n/2)) and B the upper half,
//   and R is the feedback parity of the LFSR state present in that step;
// - misr_next: one MISR clock, s' = L*s ^ d;
// - transitions: Hamming distance of two patterns.
// Widths up to 64 bits are handled through masks.
package bisd_ref_pkg;

  function automatic logic [63:0] width_mask(int w);
    return (w >= 64) ? '1 : ((64'd1 << w) - 64'd1);
  endfunction

  function automatic logic parity_taps(logic [63:0] q, logic [63:0] taps);
    return ^(q & taps);
  endfunction

  function automatic logic [63:0] lfsr_next(logic [63:0] q, logic [63:0] taps, int w);
    return ((q << 1) | {63'd0, parity_taps(q, taps)}) & width_mask(w);
  endfunction

  function automatic logic [63:0] inject(logic [63:0] a, logic [63:0] b, logic r);
    return (a & b) | ((a ^ b) & {64{r}});
  endfunction

  function automatic logic [63:0] misr_next(logic [63:0] s, logic [63:0] d,
                                            logic [63:0] taps, int w);
    return lfsr_next(s, taps, w) ^ (d & width_mask(w));
  endfunction

  function automatic int transitions(logic [63:0] a, logic [63:0] b);
    return $countones(a ^ b);
  endfunction

  class tpg_model;
    int          w;
    logic [63:0] taps, seed, lo, hi, ti;
    int          step;  // 0..3 = step 1..4

    function new(int width, logic [63:0] t, logic [63:0] s);
      w    = width;
      taps = t;
      seed = s;
      lo   = width_mask(width / 2);
      hi   = width_mask(width) & ~lo;
      restart();
    endfunction

    function void restart();
      ti   = seed;
      step = 0;
    endfunction

    // Pattern of the current clock, then advance one clock.
    function logic [63:0] next_pattern();
      logic [63:0] tn, mid, p;
      tn  = lfsr_next(ti, taps, w);
      mid = (tn & lo) | (ti & hi);
      case (step)
        0: p = ti;
        1: p = (tn & lo) | (inject(ti, tn, parity_taps(mid, taps)) & hi);
        2: p = mid;
        default: p = (inject(ti, tn, parity_taps(tn, taps)) & lo) | (tn & hi);
      endcase
      if (step == 3) begin
        ti   = tn;
        step = 0;
      end else begin
        step++;
      end
      return p;
    endfunction
  endclass

  // Stand-in circuit under test on up to 64 scan cells (the benchmark
  // netlists are not part of this design). Twelve internal nodes g[k] mix
  // AND/OR terms of the cells, a rare node is the AND of seven cells, and
  // every captured cell gets its own value XORed with one of seven outputs.
  // fault 0: fault free; 1: rare node stuck-at-0; 2: node g[3] stuck-at-1
  // under the condition cell 10 = 1 (a conditional stuck-at fault);
  // 100+2k+v: node g[k] stuck-at-v; 124+v: rare node stuck-at-v (both
  // unconditional, used as diagnosis candidates).
  function automatic logic [63:0] cut_model(logic [63:0] c, int cells, int fault);
    logic [11:0] g;
    logic        rare;
    logic [6:0]  po;
    logic [63:0] r;
    for (int k = 0; k < 12; k++)
      g[k] = (c[(3*k+1) % cells] & c[(5*k+2) % cells]) |
             (c[(7*k+3) % cells] & ~c[(11*k+5) % cells]);
    rare = 1'b1;
    for (int k = 0; k < 7; k++) rare &= c[(9*k) % cells];
    if (fault == 1) rare = 1'b0;
    if (fault == 2 && c[10 % cells]) g[3] = 1'b1;
    if (fault >= 100 && fault < 124) g[(fault - 100) / 2] = 1'((fault - 100) % 2);
    if (fault >= 124) rare = 1'(fault - 124);
    for (int j = 0; j < 7; j++)
      po[j] = g[j % 12] ^ g[(j + 4) % 12] ^ g[(j + 8) % 12] ^ c[(5*j) % cells];
    po[0] ^= rare;
    r = '0;
    for (int j = 0; j < cells; j++) r[j] = c[j] ^ po[j % 7];
    return r;
  endfunction

  // Signatures of one BISD session, block by block, following the session
  // schedule: per pattern m shift clocks (load next, unload previous), after
  // the n-th response of a block one check clock, then one capture clock;
  // the generator advances on every clock of the session.
  // stims receives the scan cell contents at every capture, i.e. the
  // stimulus of every pattern.
  function automatic void session_sigs(int w, int m, int mw, int nb,
                                       logic [63:0] tpg_taps, logic [63:0] tpg_seed,
                                       logic [63:0] misr_taps, int fault,
                                       ref logic [63:0] sigs[$]);
    logic [63:0] stims[$];
    session_run(w, m, mw, nb, tpg_taps, tpg_seed, misr_taps, fault, sigs, stims);
  endfunction

  function automatic void session_run(int w, int m, int mw, int nb,
                                      logic [63:0] tpg_taps, logic [63:0] tpg_seed,
                                      logic [63:0] misr_taps, int fault,
                                      ref logic [63:0] sigs[$], ref logic [63:0] stims[$]);
    tpg_model    tpg;
    logic [63:0] cells, pat, so, comp, s;
    int          total;
    tpg   = new(w, tpg_taps, tpg_seed);
    total = mw * nb;
    cells = '0;
    s     = '0;
    sigs.delete();
    stims.delete();
    for (int p = 0; p <= total; p++) begin
      for (int k = 0; k < m; k++) begin
        pat  = tpg.next_pattern();
        so   = '0;
        comp = '0;
        for (int c = 0; c < w; c++) begin
          so[c] = cells[c*m + m - 1];
          comp[c % mw] ^= so[c];
          for (int j = m - 1; j > 0; j--) cells[c*m + j] = cells[c*m + j - 1];
          cells[c*m] = pat[c];
        end
        if (p > 0) s = misr_next(s, comp, misr_taps, mw);
      end
      if (p > 0 && p % mw == 0) begin
        sigs.push_back(s);
        s   = '0;
        pat = tpg.next_pattern();
      end
      if (p < total) begin
        pat   = tpg.next_pattern();
        stims.push_back(cells);
        cells = cut_model(cells, w * m, fault);
      end
    end
  endfunction

endpackage

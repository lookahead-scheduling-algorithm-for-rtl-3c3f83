// lookahead_ref_pkg: slot-level reference model of the lookahead switch, used by the
// testbenches to predict outputs and drops.
//
// The model does not simulate minislots. It relies on the ordering property of the
// pipelined schedule: every column is checked by older packets before younger ones
// and, among packets of one age, in serving order. Processing the packets of a slot
// one after another in that order, each making as many checks as it has minislots in
// the slot (N+1-p for a new packet served at position p, N+1 for an older one), gives
// the same placements as the pipeline.
package lookahead_ref_pkg;

  typedef struct {
    int      in;
    int      dest;
    longint  tag;
    int      next_col;
    int      cnt;
    int      age;
    int      pos;
  } pkt_t;

  class lookahead_ref #(int N = 4, int B = 5, bit ROTATE = 1'b1);
    bit     occ [N][B];
    int     dst [N][B];
    longint tag [N][B];
    int     j;
    int     start;
    pkt_t   pend [$];

    // Expected outputs of the slot that begins at the last call of step().
    bit     exp_valid [N];
    longint exp_tag   [N];
    int     exp_src   [N];
    // Drops per input during the slot that ended at the last call of step().
    int     exp_drop  [N];

    // Event counters for coverage.
    int     n_place, n_drop, n_rej_busy, n_rej_conflict, n_place_late;
    int     n_place_xmit_col, n_overlap, n_arrive;

    function new();
      foreach (occ[i, c]) begin occ[i][c] = 0; dst[i][c] = 0; tag[i][c] = 0; end
      j = 0; start = 0;
      n_place = 0; n_drop = 0; n_rej_busy = 0; n_rej_conflict = 0; n_place_late = 0;
      n_place_xmit_col = 0; n_overlap = 0; n_arrive = 0;
    endfunction

    function automatic bit col_has_dest(int c, int d);
      for (int n = 0; n < N; n++)
        if (occ[n][c] && dst[n][c] == d) return 1;
      return 0;
    endfunction

    // Run the checks of the current slot.
    function automatic void run_slot();
      pkt_t order [$];
      pkt_t keep [$];
      int   per_in [N];
      foreach (exp_drop[i]) exp_drop[i] = 0;
      foreach (per_in[i]) per_in[i] = 0;
      foreach (pend[k]) per_in[pend[k].in]++;
      foreach (per_in[i]) if (per_in[i] > 1) n_overlap++;
      // Older first, then by serving position.
      for (int a = B; a >= 0; a--)
        for (int q = 0; q < N; q++)
          foreach (pend[k])
            if (pend[k].age == a && pend[k].pos == q) order.push_back(pend[k]);
      foreach (order[k]) begin
        pkt_t p = order[k];
        int   limit = (p.age == 0) ? (N + 1 - p.pos) : (N + 1);
        bit   done = 0;
        for (int s = 0; s < limit && !done; s++) begin
          int c = p.next_col;
          if (!occ[p.in][c] && !col_has_dest(c, p.dest)) begin
            occ[p.in][c] = 1; dst[p.in][c] = p.dest; tag[p.in][c] = p.tag;
            n_place++;
            if (p.age > 0) n_place_late++;
            if (c == j) n_place_xmit_col++;
            done = 1;
          end else begin
            if (occ[p.in][c]) n_rej_busy++; else n_rej_conflict++;
            p.cnt++;
            p.next_col = (c + 1) % B;
            if (p.cnt == B) begin
              exp_drop[p.in]++;
              n_drop++;
              done = 1;
            end
          end
        end
        if (!done) keep.push_back(p);
      end
      pend = keep;
    endfunction

    // End of a slot: finish its checks, switch the next column, take the arrivals.
    function automatic void step(bit av [N], int ad [N], longint at [N]);
      run_slot();
      j = (j + 1) % B;
      if (ROTATE) start = (start + 1) % N;
      for (int n = 0; n < N; n++) begin exp_valid[n] = 0; exp_tag[n] = 0; exp_src[n] = 0; end
      for (int i = 0; i < N; i++) begin
        if (occ[i][j]) begin
          exp_valid[dst[i][j]] = 1;
          exp_tag[dst[i][j]]   = tag[i][j];
          exp_src[dst[i][j]]   = i;
          occ[i][j] = 0;
        end
      end
      foreach (pend[k]) pend[k].age++;
      for (int i = 0; i < N; i++) begin
        if (av[i]) begin
          pkt_t p;
          p.in = i; p.dest = ad[i]; p.tag = at[i];
          p.next_col = (j + 1) % B; p.cnt = 0; p.age = 0;
          p.pos = (i - start + N) % N;
          pend.push_back(p);
          n_arrive++;
        end
      end
    endfunction
  endclass

endpackage

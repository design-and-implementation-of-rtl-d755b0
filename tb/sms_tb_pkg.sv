// sms_tb_pkg: reference models and stimulus for the scheduler testbenches.
//
// Instances are stored in fixed NMAX x NMAX integer matrices of which only
// the top-left n x n part is used: wr[i][j] is the rank of woman j for man i,
// mr[j][i] the rank of man i for woman j (ranks 1..n, indices 0-based).
//
//   * gale_shapley   - the classical man-proposing deferred acceptance
//                      algorithm; an independent oracle for the matching,
//                      since a rooted instance has exactly one stable matching.
//   * find_roots     - the root-finding iteration computed from the original
//                      ranks (a pair is a root when it is the best remaining
//                      choice of both its man and its woman), granting the
//                      lowest row first; gives the expected grant order, the
//                      iteration at which a non-rooted instance gets stuck, and
//                      how often several roots competed.
//   * gs_rounds      - proposal rounds of Gale-Shapley with all free men
//                      proposing together, and all_roots_rounds - rounds of
//                      root removal taking every current root at once; used
//                      to confirm the worked instances (5 / 6 and 3 rounds).
//   * gen_rooted     - a random instance that is rooted by construction.
//   * gen_random     - a uniformly random instance (rarely rooted for n > 3).
package sms_tb_pkg;

  localparam int NMAX = 16;
  typedef int mat_t[NMAX][NMAX];
  typedef int vec_t[NMAX];

  // Random permutation of 0..n-1 (Fisher-Yates).
  function automatic vec_t rand_perm(int n);
    vec_t p;
    for (int k = 0; k < n; k++) p[k] = k;
    for (int k = n - 1; k > 0; k--) begin
      int r = int'($urandom_range(k, 0));
      int t = p[k];
      p[k] = p[r];
      p[r] = t;
    end
    return p;
  endfunction

  // Man-proposing Gale-Shapley. match[i] = woman of man i.
  function automatic vec_t gale_shapley(int n, mat_t wr, mat_t mr);
    vec_t match, wife_of, husband, next;
    int   pref[NMAX][NMAX];  // pref[i][k] = k-th choice of man i
    bit   progress;
    for (int i = 0; i < n; i++) begin
      for (int j = 0; j < n; j++) pref[i][wr[i][j] - 1] = j;
      wife_of[i] = -1;
      husband[i] = -1;
      next[i]    = 0;
    end
    do begin
      progress = 0;
      for (int i = 0; i < n; i++) begin
        if (wife_of[i] < 0 && next[i] < n) begin
          int w = pref[i][next[i]];
          next[i]++;
          progress = 1;
          if (husband[w] < 0) begin
            husband[w] = i;
            wife_of[i] = w;
          end else if (mr[w][i] < mr[w][husband[w]]) begin
            wife_of[husband[w]] = -1;
            husband[w] = i;
            wife_of[i] = w;
          end
        end
      end
    end while (progress);
    for (int i = 0; i < n; i++) match[i] = wife_of[i];
    return match;
  endfunction

  // Rounds of Gale-Shapley when all free men propose at the same time.
  function automatic int gs_rounds(int n, mat_t wr, mat_t mr);
    vec_t wife_of, husband, next;
    int   pref[NMAX][NMAX];
    int   rounds = 0;
    bit   free_left = 1;
    for (int i = 0; i < n; i++) begin
      for (int j = 0; j < n; j++) pref[i][wr[i][j] - 1] = j;
      wife_of[i] = -1;
      husband[i] = -1;
      next[i]    = 0;
    end
    while (free_left && rounds < n * n + 1) begin
      vec_t best;  // best proposer this round, per woman
      rounds++;
      for (int w = 0; w < n; w++) best[w] = husband[w];
      for (int i = 0; i < n; i++) begin
        if (wife_of[i] < 0) begin
          int w = pref[i][next[i]];
          next[i]++;
          if (best[w] < 0 || mr[w][i] < mr[w][best[w]]) best[w] = i;
        end
      end
      for (int w = 0; w < n; w++) begin
        if (best[w] != husband[w]) begin
          if (husband[w] >= 0) wife_of[husband[w]] = -1;
          husband[w] = best[w];
          wife_of[best[w]] = w;
        end
      end
      free_left = 0;
      for (int i = 0; i < n; i++) if (wife_of[i] < 0) free_left = 1;
    end
    return rounds;
  endfunction

  // Rounds of root removal when every current root is removed at once.
  function automatic int all_roots_rounds(int n, mat_t wr, mat_t mr);
    bit row_live[NMAX], col_live[NMAX];
    int left = n, rounds = 0;
    for (int k = 0; k < n; k++) begin row_live[k] = 1; col_live[k] = 1; end
    while (left > 0 && rounds <= n) begin
      bit rr[NMAX], cr[NMAX];
      rounds++;
      for (int k = 0; k < n; k++) begin rr[k] = 0; cr[k] = 0; end
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++)
          if (row_live[i] && col_live[j]) begin
            bit root = 1;
            for (int l = 0; l < n; l++) if (col_live[l] && wr[i][l] < wr[i][j]) root = 0;
            for (int k = 0; k < n; k++) if (row_live[k] && mr[j][k] < mr[j][i]) root = 0;
            if (root) begin rr[i] = 1; cr[j] = 1; end
          end
      for (int k = 0; k < n; k++) begin
        if (rr[k]) begin row_live[k] = 0; left--; end
        if (cr[k]) col_live[k] = 0;
      end
    end
    return rounds;
  endfunction

  // True when (m, w) would block the matching.
  function automatic bit is_stable(int n, mat_t wr, mat_t mr, vec_t match);
    vec_t husband;
    for (int i = 0; i < n; i++) husband[match[i]] = i;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        if (j != match[i] && wr[i][j] < wr[i][match[i]] && mr[j][i] < mr[j][husband[j]])
          return 0;
    return 1;
  endfunction

  typedef struct {
    int   iters;        // iterations that found a root
    bit   stuck;        // an iteration found no root
    vec_t order;        // order[k] = row granted in iteration k
    vec_t match;        // match[i] = column of row i (-1 if never matched)
    int   contended;    // iterations in which more than one root existed
    int   h_decs;       // decrements of an h value over the whole run
    int   v_decs;       // decrements of a v value over the whole run
  } fr_result_t;

  // One root granted per iteration, lowest row first.
  function automatic fr_result_t find_roots(int n, mat_t wr, mat_t mr);
    fr_result_t r;
    bit row_live[NMAX], col_live[NMAX];
    r.iters = 0; r.stuck = 0; r.contended = 0; r.h_decs = 0; r.v_decs = 0;
    for (int k = 0; k < n; k++) begin
      row_live[k] = 1; col_live[k] = 1; r.match[k] = -1; r.order[k] = -1;
    end
    for (int it = 0; it < n; it++) begin
      int nroots = 0, gi = -1, gj = -1;
      for (int i = 0; i < n; i++) begin
        if (!row_live[i]) continue;
        for (int j = 0; j < n; j++) begin
          bit best_h = 1, best_v = 1;
          if (!col_live[j]) continue;
          for (int l = 0; l < n; l++)
            if (col_live[l] && wr[i][l] < wr[i][j]) best_h = 0;
          for (int k = 0; k < n; k++)
            if (row_live[k] && mr[j][k] < mr[j][i]) best_v = 0;
          if (best_h && best_v) begin
            nroots++;
            if (gi < 0) begin gi = i; gj = j; end
          end
        end
      end
      if (nroots == 0) begin
        r.stuck = 1;
        break;
      end
      if (nroots > 1) r.contended++;
      // Entries that lose one rank position by the removal.
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++)
          if (row_live[i] && col_live[j] && i != gi && j != gj) begin
            if (wr[i][j] > wr[i][gj]) r.h_decs++;
            if (mr[j][i] > mr[j][gi]) r.v_decs++;
          end
      row_live[gi] = 0;
      col_live[gj] = 0;
      r.order[it] = gi;
      r.match[gi] = gj;
      r.iters++;
    end
    return r;
  endfunction

  // Rooted by construction: pairs are fixed in a random order, and each man
  // (woman) ranks his (her) partner above every partner of a later pair.
  task automatic gen_rooted(int n, output mat_t wr, output mat_t mr);
    vec_t ord  = rand_perm(n);  // ord[p] = man of the p-th pair
    vec_t sig  = rand_perm(n);  // sig[m] = woman of man m
    vec_t posm, posw;
    for (int p = 0; p < n; p++) begin
      posm[ord[p]]      = p;
      posw[sig[ord[p]]] = p;
    end
    for (int m = 0; m < n; m++) begin
      vec_t perm = rand_perm(n);
      int   lst[$];
      int   f;
      foreach (perm[k]) if (k < n && perm[k] != sig[m]) lst.push_back(perm[k]);
      f = lst.size();
      foreach (lst[k]) if (posw[lst[k]] > posm[m] && k < f) f = k;
      lst.insert(int'($urandom_range(f, 0)), sig[m]);
      foreach (lst[k]) wr[m][lst[k]] = k + 1;
    end
    for (int w = 0; w < n; w++) begin
      vec_t perm = rand_perm(n);
      int   lst[$];
      int   f, hus = -1;
      for (int m = 0; m < n; m++) if (sig[m] == w) hus = m;
      foreach (perm[k]) if (k < n && perm[k] != hus) lst.push_back(perm[k]);
      f = lst.size();
      foreach (lst[k]) if (posm[lst[k]] > posw[w] && k < f) f = k;
      lst.insert(int'($urandom_range(f, 0)), hus);
      foreach (lst[k]) mr[w][lst[k]] = k + 1;
    end
  endtask

  task automatic gen_random(int n, output mat_t wr, output mat_t mr);
    for (int i = 0; i < n; i++) begin
      vec_t p = rand_perm(n);
      vec_t q = rand_perm(n);
      for (int j = 0; j < n; j++) begin
        wr[i][j] = p[j] + 1;
        mr[i][j] = q[j] + 1;
      end
    end
  endtask

endpackage

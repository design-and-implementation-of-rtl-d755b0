// tb_sms_scheduler: end-to-end test of the N x N scheduler at its default
// size (4 x 4, no parameter override).
//
// Runs the two worked 4 x 4 instances whose stable matchings are known
// ({(1,3),(2,4),(3,1),(4,2)} and {(1,1),(2,4),(3,3),(4,2)}, 1-based), then
// random rooted instances and uniformly random instances. For every run it
// checks, against reference models computed in the testbench:
//   * the matching equals the Gale-Shapley result and is stable;
//   * rows are matched one per cycle, lowest requesting row first;
//   * done comes exactly N cycles after start for a rooted instance, and one
//     cycle after the last successful iteration, with no_root, otherwise.
// It also checks that a start while busy is ignored. It counts how often
// each mechanism occurred (iterations where several roots competed and the
// lowest row had to win, h and v decrements, an instance with no root, an
// ignored start), as the reference model saw them in the runs whose results
// matched, and fails if one never did.
module tb_sms_scheduler;
  import sms_pkg::*;
  import sms_tb_pkg::*;

  localparam int unsigned N  = 4;
  localparam int unsigned RW = rank_w(N);
  localparam int unsigned IW = idx_w(N);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [N-1:0][N-1:0][RW-1:0] wr = '0, mr = '0;
  logic busy, done, no_root;
  logic [N-1:0][IW-1:0] s;
  logic [N-1:0] s_valid;

  int checks = 0, failures = 0;
  int n_contended = 0, n_hdec = 0, n_vdec = 0, n_stuck = 0, n_rooted = 0, n_ignored = 0;

  sms_scheduler dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(mat_t a_wr, mat_t a_mr, int exp_match[], bit poke_start);
    fr_result_t   r = find_roots(N, a_wr, a_mr);
    vec_t         gs = gale_shapley(N, a_wr, a_mr);
    vec_t         got;
    logic [N-1:0] exp_valid = '0;
    int           cyc = 0;
    bit           seen_done = 0;

    @(negedge clk);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        wr[i][j] = RW'(a_wr[i][j]);
        mr[i][j] = RW'(a_mr[i][j]);
      end
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy == 1'b1, "busy after start");
    while (!seen_done && cyc < 4 * N) begin
      if (poke_start && cyc == 1) begin
        // A second start, with other data, while busy must be ignored.
        start = 1'b1;
        wr = ~wr;
        n_ignored++;
      end
      @(negedge clk);
      start = 1'b0;
      cyc++;
      if (cyc <= r.iters) exp_valid[r.order[cyc-1]] = 1'b1;
      check(s_valid == exp_valid, $sformatf("grant order, cycle %0d: s_valid=%b expected %b",
                                            cyc, s_valid, exp_valid));
      seen_done = done;
    end
    check(seen_done, "done seen");
    check(busy == 1'b0, "idle after done");
    if (r.stuck) begin
      n_stuck++;
      check(no_root == 1'b1, "no_root for an instance that is not rooted");
      check(cyc == r.iters + 1, $sformatf("stop after %0d cycles, expected %0d", cyc, r.iters + 1));
    end else begin
      n_rooted++;
      n_contended += r.contended;
      n_hdec += r.h_decs;
      n_vdec += r.v_decs;
      check(no_root == 1'b0, "no_root clear for a rooted instance");
      check(cyc == N, $sformatf("latency %0d cycles, expected %0d", cyc, N));
      for (int i = 0; i < N; i++) got[i] = int'(s[i]);
      for (int i = 0; i < N; i++) begin
        check(got[i] == gs[i], $sformatf("row %0d: column %0d, Gale-Shapley gives %0d", i, got[i], gs[i]));
        check(got[i] == r.match[i], $sformatf("row %0d: column %0d, reference gives %0d", i, got[i], r.match[i]));
        if (exp_match.size() == N)
          check(got[i] == exp_match[i], $sformatf("row %0d: column %0d, expected %0d", i, got[i], exp_match[i]));
      end
      check(is_stable(N, a_wr, a_mr, got), "matching is stable");
    end
    // Outputs hold until the next start.
    repeat (2) @(negedge clk);
    check(done == 1'b0 && busy == 1'b0, "quiet after the run");
    if (!r.stuck) for (int i = 0; i < N; i++) check(int'(s[i]) == r.match[i], "s holds");
  endtask

  // Man lists mR_i and woman lists wR_j of the worked instances, given as
  // the rank each list assigns to partner 1..4.
  task automatic load_lists(int ml[4][4], int wl[4][4], output mat_t a_wr, output mat_t a_mr);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a_wr[i][j] = ml[i][j];
        a_mr[i][j] = wl[i][j];
      end
  endtask

  initial begin
    mat_t a_wr, a_mr;
    int   none[];
    automatic int ex1_m[4][4] = '{'{3,4,1,2}, '{1,2,3,4}, '{1,2,4,3}, '{2,3,1,4}};
    automatic int ex1_w[4][4] = '{'{3,2,1,4}, '{1,4,3,2}, '{1,2,3,4}, '{3,2,1,4}};
    automatic int ex2_m[4][4] = '{'{1,3,2,4}, '{1,4,2,3}, '{2,4,1,3}, '{2,4,3,1}};
    automatic int ex2_w[4][4] = '{'{1,2,3,4}, '{1,2,3,4}, '{3,2,1,4}, '{3,1,4,2}};
    automatic int ex1_s[] = '{2, 3, 0, 1};
    automatic int ex2_s[] = '{0, 3, 2, 1};

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(busy == 1'b0 && done == 1'b0 && s_valid == '0, "idle after reset");

    // The worked instances: Gale-Shapley needs 5 and 6 proposal rounds,
    // removing all roots at once needs 3 rounds, and this scheduler 4 cycles.
    load_lists(ex1_m, ex1_w, a_wr, a_mr);
    check(gs_rounds(N, a_wr, a_mr) == 5 && all_roots_rounds(N, a_wr, a_mr) == 3,
          "first worked instance: 5 Gale-Shapley rounds, 3 root rounds");
    run(a_wr, a_mr, ex1_s, 0);
    load_lists(ex2_m, ex2_w, a_wr, a_mr);
    check(gs_rounds(N, a_wr, a_mr) == 6 && all_roots_rounds(N, a_wr, a_mr) == 3,
          "second worked instance: 6 Gale-Shapley rounds, 3 root rounds");
    run(a_wr, a_mr, ex2_s, 1);

    for (int t = 0; t < 300; t++) begin
      gen_rooted(N, a_wr, a_mr);
      run(a_wr, a_mr, none, t % 17 == 3);
    end
    for (int t = 0; t < 100; t++) begin
      gen_random(N, a_wr, a_mr);
      run(a_wr, a_mr, none, 0);
    end

    $display("runs: rooted=%0d not_rooted=%0d; iterations with competing roots=%0d; h decrements=%0d; v decrements=%0d; ignored starts=%0d",
             n_rooted, n_stuck, n_contended, n_hdec, n_vdec, n_ignored);
    check(n_contended > 0, "several roots competed at least once");
    check(n_hdec > 0, "an h value was decremented");
    check(n_vdec > 0, "a v value was decremented");
    check(n_stuck > 0, "an instance without a root was seen");
    check(n_ignored > 0, "a start while busy was tried");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

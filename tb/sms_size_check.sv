// sms_size_check: drives one N x N scheduler with TRIALS random rooted
// instances and checks each result against Gale-Shapley, the grant order
// against the reference root iteration, and the latency of exactly N cycles.
// Used by tb_sms_sizes to exercise the array sizes 2..12. Results are
// reported through its outputs once finished rises.
module sms_size_check
  import sms_pkg::*;
  import sms_tb_pkg::*;
#(
  parameter int unsigned N      = 4,
  parameter int unsigned TRIALS = 20
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   contended,
  output logic finished
);

  localparam int unsigned RW = rank_w(N);
  localparam int unsigned IW = idx_w(N);

  logic start;
  logic [N-1:0][N-1:0][RW-1:0] wr, mr;
  logic busy, done, no_root;
  logic [N-1:0][IW-1:0] s;
  logic [N-1:0] s_valid;

  sms_scheduler #(.N(N)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (N=%0d): %s", N, what);
    end
  endtask

  initial begin
    mat_t a_wr, a_mr;
    checks = 0; failures = 0; contended = 0; finished = 1'b0;
    start = 1'b0; wr = '0; mr = '0;
    @(posedge rst_n);
    for (int t = 0; t < int'(TRIALS); t++) begin
      fr_result_t   r;
      vec_t         gs;
      logic [N-1:0] exp_valid;
      int           cyc;
      gen_rooted(N, a_wr, a_mr);
      r  = find_roots(N, a_wr, a_mr);
      gs = gale_shapley(N, a_wr, a_mr);
      check(!r.stuck, "generated instance is rooted");
      contended += r.contended;
      @(negedge clk);
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          wr[i][j] = RW'(a_wr[i][j]);
          mr[i][j] = RW'(a_mr[i][j]);
        end
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      exp_valid = '0;
      cyc = 0;
      while (!done && cyc < 2 * int'(N) + 2) begin
        @(negedge clk);
        cyc++;
        if (cyc <= r.iters) exp_valid[r.order[cyc-1]] = 1'b1;
        check(s_valid == exp_valid, $sformatf("grant order in cycle %0d", cyc));
      end
      check(done && !no_root, "run completed");
      check(cyc == int'(N), $sformatf("latency %0d cycles, expected %0d", cyc, N));
      for (int i = 0; i < N; i++)
        check(int'(s[i]) == gs[i], $sformatf("row %0d: column %0d, Gale-Shapley gives %0d", i, s[i], gs[i]));
    end
    finished = 1'b1;
  end

endmodule

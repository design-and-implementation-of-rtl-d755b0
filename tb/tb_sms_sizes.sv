// tb_sms_sizes: the scheduler at every array size of the published timing
// and area table, N = 2, 4, 6, 8, 10 and 12, each run on random rooted
// instances by sms_size_check. Checks the matching, the grant order and the
// latency of exactly N cycles per run at each size.
module tb_sms_sizes;

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  localparam int NS = 6;
  int   c[NS], f[NS], k[NS];
  logic fin[NS];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  sms_size_check #(.N(2),  .TRIALS(40)) u_n2  (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .contended(k[0]), .finished(fin[0]));
  sms_size_check #(.N(4),  .TRIALS(40)) u_n4  (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .contended(k[1]), .finished(fin[1]));
  sms_size_check #(.N(6),  .TRIALS(40)) u_n6  (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .contended(k[2]), .finished(fin[2]));
  sms_size_check #(.N(8),  .TRIALS(40)) u_n8  (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .contended(k[3]), .finished(fin[3]));
  sms_size_check #(.N(10), .TRIALS(40)) u_n10 (.clk, .rst_n, .checks(c[4]), .failures(f[4]), .contended(k[4]), .finished(fin[4]));
  sms_size_check #(.N(12), .TRIALS(40)) u_n12 (.clk, .rst_n, .checks(c[5]), .failures(f[5]), .contended(k[5]), .finished(fin[5]));

  function automatic bit all_done();
    foreach (fin[i]) if (!fin[i]) return 0;
    return 1;
  endfunction

  initial begin

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      begin
        while (!all_done()) @(posedge clk);
      end
      begin
        repeat (100000) @(posedge clk);
        failures++;
        $display("watchdog expired");
      end
    join_any
    foreach (c[i]) begin
      checks += c[i];
      failures += f[i];
      $display("size %0d: checks=%0d failures=%0d iterations with competing roots=%0d", 2 * (i + 1), c[i], f[i], k[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

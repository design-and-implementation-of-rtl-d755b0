// tb_sms_node: test of one processing element (N = 4, column index 2).
//
// The testbench plays the buses and the controller. A model of the node's
// two rank registers is kept in the testbench and updated by the rules of
// the algorithm: cleared when the node's row or column is removed, otherwise
// each rank drops by one when a nonzero value below it arrives on its bus.
// Each cycle it checks the combinational outputs (request only for a root
// while running, mask and index only on a grant, h on the row bus when the
// column is masked, v on the column bus when the row is masked); the
// registers are observed through those same outputs.
module tb_sms_node;
  import sms_pkg::*;

  localparam int unsigned N  = 4;
  localparam int unsigned RW = rank_w(N);
  localparam int unsigned IW = idx_w(N);
  localparam int unsigned COL = 2;

  int checks = 0, failures = 0;
  int n_root = 0, n_win = 0, n_hdec = 0, n_vdec = 0, n_removed = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, run = 1'b0, gnt = 1'b0, row_mask = 1'b0, col_mask = 1'b0;
  logic [RW-1:0] h_in = '0, v_in = '0, row_val = '0, col_val = '0;
  logic req, idx_valid, mask;
  logic [IW-1:0] idx;
  logic [RW-1:0] row_val_o, col_val_o;

  sms_node #(.N(N), .COL(COL)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .h_in(h_in), .v_in(v_in), .run(run),
    .req_o(req), .gnt_i(gnt), .row_mask_i(row_mask), .row_val_i(row_val),
    .row_val_o(row_val_o), .idx_valid_o(idx_valid), .idx_o(idx),
    .col_mask_i(col_mask), .col_val_i(col_val), .col_val_o(col_val_o), .mask_o(mask));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  int mh, mv;  // model of h and v

  // Look at h and v through the bus outputs: mask the column (row) for a
  // moment while not clocking.
  task automatic peek(output int h, output int v);
    logic sr = row_mask, sc = col_mask, sg = gnt, srun = run;
    gnt = 0; run = 1; col_mask = 1; row_mask = 1;
    #1;
    h = int'(row_val_o);
    v = int'(col_val_o);
    col_mask = sc; row_mask = sr; gnt = sg; run = srun;
    #1;
  endtask

  initial begin
    int h, v;
    mh = 0; mv = 0;
    repeat (2) @(negedge clk);
    peek(h, v);
    check(h == 0 && v == 0, "cleared by reset");
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // New pair every so often, biased toward small ranks so roots appear.
      if (t % 6 == 0 || mh == 0) begin
        load = 1;
        h_in = RW'($urandom_range(N > 2 ? 2 : 1, 1));
        v_in = RW'($urandom_range(N > 2 ? 2 : 1, 1));
        if (t % 12 == 0) begin
          h_in = RW'($urandom_range(N, 1));
          v_in = RW'($urandom_range(N, 1));
        end
        run = 0; gnt = 0; row_mask = 0; col_mask = 0; row_val = '0; col_val = '0;
        @(negedge clk);
        mh = int'(h_in); mv = int'(v_in);
        load = 0;
      end
      run      = ($urandom_range(9, 0) != 0);
      gnt      = 1'($urandom_range(1, 0));
      row_mask = ($urandom_range(5, 0) == 0);
      col_mask = ($urandom_range(5, 0) == 0);
      row_val  = ($urandom_range(2, 0) == 0) ? '0 : RW'($urandom_range(N, 1));
      col_val  = ($urandom_range(2, 0) == 0) ? '0 : RW'($urandom_range(N, 1));
      #1;
      begin
        automatic bit root = (mh == 1 && mv == 1);
        automatic bit win  = run && root && gnt;
        if (root && run) n_root++;
        if (win) n_win++;
        check(req == (run && root), $sformatf("req=%0d for (h,v)=(%0d,%0d) run=%0d", req, mh, mv, run));
        check(mask == win && idx_valid == win, "mask and index valid only on a grant");
        check(idx == (win ? IW'(COL) : '0), "index is the node's column");
        check(int'(row_val_o) == ((run && col_mask) ? mh : 0), "h driven on the row bus when the column is masked");
        check(int'(col_val_o) == ((run && row_mask) ? mv : 0), "v driven on the column bus when the row is masked");
      end
      @(negedge clk);
      if (run) begin
        if (row_mask || col_mask) begin
          if (mh != 0) n_removed++;
          mh = 0; mv = 0;
        end else begin
          if (row_val != 0 && mh > int'(row_val)) begin mh--; n_hdec++; end
          if (col_val != 0 && mv > int'(col_val)) begin mv--; n_vdec++; end
        end
      end
      run = 0; gnt = 0; row_mask = 0; col_mask = 0; row_val = '0; col_val = '0;
      peek(h, v);
      check(h == mh && v == mv, $sformatf("(h,v)=(%0d,%0d) expected (%0d,%0d)", h, v, mh, mv));
    end
    $display("roots=%0d grants=%0d removed=%0d h decrements=%0d v decrements=%0d",
             n_root, n_win, n_removed, n_hdec, n_vdec);
    check(n_win > 0 && n_hdec > 0 && n_vdec > 0 && n_removed > 0, "every node action happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

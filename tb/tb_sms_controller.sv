// tb_sms_controller: exhaustive test of the bus arbiter for N = 4 (default)
// and a random test for N = 12.
//
// For every request pattern the expected grant is worked out by scanning the
// requests from row 0 upward: the first requesting row must get the only
// grant, its index must be encoded on gnt_idx_o and any_o must be set; with
// no request nothing is granted.
module tb_sms_controller;
  import sms_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0]  req4;
  logic [3:0]  gnt4;
  logic [1:0]  idx4;
  logic        any4;
  logic [11:0] req12;
  logic [11:0] gnt12;
  logic [3:0]  idx12;
  logic        any12;

  sms_controller dut4 (.req_i(req4), .gnt_o(gnt4), .gnt_idx_o(idx4), .any_o(any4));
  sms_controller #(.N(12)) dut12 (.req_i(req12), .gnt_o(gnt12), .gnt_idx_o(idx12), .any_o(any12));

  initial begin
    #100000;
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

  function automatic int first_set(logic [31:0] v, int n);
    for (int k = 0; k < n; k++) if (v[k]) return k;
    return -1;
  endfunction

  initial begin
    for (int p = 0; p < 16; p++) begin
      int f;
      req4 = 4'(p);
      #1;
      f = first_set(32'(p), 4);
      if (f < 0) begin
        check(gnt4 == '0 && !any4, $sformatf("req=%b: no grant expected, got %b", req4, gnt4));
      end else begin
        check(any4, $sformatf("req=%b: any", req4));
        check(gnt4 == 4'(1 << f), $sformatf("req=%b: grant %b, expected row %0d", req4, gnt4, f));
        check(int'(idx4) == f, $sformatf("req=%b: index %0d, expected %0d", req4, idx4, f));
      end
    end
    for (int t = 0; t < 2000; t++) begin
      int f;
      req12 = 12'($urandom);
      if (t % 5 == 0) req12 = req12 & 12'($urandom);  // fewer requests
      if (t % 97 == 0) req12 = '0;
      #1;
      f = first_set(32'(req12), 12);
      if (f < 0) begin
        check(gnt12 == '0 && !any12, "N=12: no grant expected");
      end else begin
        check(any12 && gnt12 == 12'(1 << f) && int'(idx12) == f,
              $sformatf("N=12 req=%b: grant %b idx %0d, expected row %0d", req12, gnt12, idx12, f));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

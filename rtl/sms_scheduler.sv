// sms_scheduler: N x N acyclic stable matching scheduler.
//
// Finds the stable matching of an instance whose dependency graph is rooted
// (every acyclic instance is). The N x N ranking matrix is loaded into an
// N x N array of nodes (sms_node); node n_{i,j} starts with
// (h,v) = (wr[i][j], mr[j][i]). Row i of the array shares row bus r_i and
// column j shares column bus c_j; the request lines of the row buses go to a
// priority-encoder controller (sms_controller).
//
// Each clock cycle of a run is one iteration: the root nodes ((h,v) = (1,1))
// request their row bus, the controller grants the lowest requesting row,
// the granted root is matched and removes its row and column, and the
// remaining nodes decrement the ranks that were above a removed entry. After
// N iterations every row is matched. If in some iteration no node is a root,
// the instance is not rooted: the run stops and no_root is raised.
//
// Interface and timing:
//   * start (accepted only while busy is low) loads wr/mr into the nodes on
//     that rising edge; busy rises and the first iteration runs in the next
//     cycle;
//   * wr[i][j] is the rank (1..N) of woman/output j in man/input i's list,
//     mr[j][i] the rank (1..N) of man/input i in woman/output j's list; every
//     list is a permutation of 1..N;
//   * s[i] is the (0-based) column matched to row i, valid once s_valid[i]
//     is set; it is written in the iteration that matches row i, and rows are
//     matched in the order the controller grants them;
//   * done pulses for one cycle after the last iteration: exactly N cycles
//     after the start edge for a rooted instance. no_root is set with done
//     when the run stopped early, and both s/s_valid and no_root hold until
//     the next start.
//
// The array, the buses, the controller's minimum-row-index priority, one
// granted root per iteration and the n iterations per run follow the
// document. The start/busy/done sequencing, the no_root flag, the 0-based
// index encoding, the synchronous active-low reset and rank widths of
// clog2(N+1) bits are this design's own.
module sms_scheduler
  import sms_pkg::*;
#(
  parameter  int unsigned N  = 4,
  localparam int unsigned RW = rank_w(N),
  localparam int unsigned IW = idx_w(N),
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [N-1:0][N-1:0][RW-1:0] wr,       // wr[i][j]
  input  logic [N-1:0][N-1:0][RW-1:0] mr,       // mr[j][i]
  output logic                        busy,
  output logic                        done,
  output logic                        no_root,
  output logic [N-1:0][IW-1:0]        s,
  output logic [N-1:0]                s_valid
);

  sched_state_e state_q;
  logic [CW-1:0] iter_q;
  logic          run;
  logic          load;

  assign run  = (state_q == S_RUN);
  assign load = start && !run;
  assign busy = run;

  // Node outputs, row-major [i][j] for row bus lines, column-major [j][i]
  // for column bus lines.
  logic [N-1:0][N-1:0]         node_req;     // [i][j]
  logic [N-1:0][N-1:0]         node_mask;    // [i][j]
  logic [N-1:0][N-1:0]         node_mask_t;  // [j][i]
  logic [N-1:0][N-1:0][RW-1:0] node_rval;    // [i][j]
  logic [N-1:0][N-1:0][RW-1:0] node_cval;    // [j][i]
  logic [N-1:0][N-1:0][IW:0]   node_idx;     // [i][j], {valid, index}

  // Merged bus lines.
  logic [N-1:0]         row_req;
  logic [N-1:0]         row_gnt;
  logic [N-1:0]         row_mask;
  logic [N-1:0][RW-1:0] row_val;
  logic [N-1:0][IW:0]   row_idx;
  logic [N-1:0]         col_mask;
  logic [N-1:0][RW-1:0] col_val;

  logic [IW-1:0] gnt_idx;
  logic          gnt_any;

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      sms_node #(
        .N  (N),
        .COL(j)
      ) u_node (
        .clk        (clk),
        .rst_n      (rst_n),
        .load       (load),
        .h_in       (wr[i][j]),
        .v_in       (mr[j][i]),
        .run        (run),
        .req_o      (node_req[i][j]),
        .gnt_i      (row_gnt[i]),
        .row_mask_i (row_mask[i]),
        .row_val_i  (row_val[i]),
        .row_val_o  (node_rval[i][j]),
        .idx_valid_o(node_idx[i][j][IW]),
        .idx_o      (node_idx[i][j][IW-1:0]),
        .col_mask_i (col_mask[j]),
        .col_val_i  (col_val[j]),
        .col_val_o  (node_cval[j][i]),
        .mask_o     (node_mask[i][j])
      );
      assign node_mask_t[j][i] = node_mask[i][j];
    end

    // Row bus r_i: request line, mask line, value lines, index lines.
    sms_bus #(.N(N), .W(1))    u_row_req  (.drv_i(node_req[i]),  .bus_o(row_req[i]));
    sms_bus #(.N(N), .W(1))    u_row_mask (.drv_i(node_mask[i]), .bus_o(row_mask[i]));
    sms_bus #(.N(N), .W(RW))   u_row_val  (.drv_i(node_rval[i]), .bus_o(row_val[i]));
    sms_bus #(.N(N), .W(IW+1)) u_row_idx  (.drv_i(node_idx[i]),  .bus_o(row_idx[i]));

    // Column bus c_i: mask line, value lines.
    sms_bus #(.N(N), .W(1))    u_col_mask (.drv_i(node_mask_t[i]), .bus_o(col_mask[i]));
    sms_bus #(.N(N), .W(RW))   u_col_val  (.drv_i(node_cval[i]),   .bus_o(col_val[i]));
  end

  sms_controller #(.N(N)) u_ctrl (
    .req_i    (row_req),
    .gnt_o    (row_gnt),
    .gnt_idx_o(gnt_idx),
    .any_o    (gnt_any)
  );

  // Sequencing and the index outputs s_1..s_N at the ends of the row buses.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      iter_q  <= '0;
      done    <= 1'b0;
      no_root <= 1'b0;
      s       <= '0;
      s_valid <= '0;
    end else begin
      done <= 1'b0;
      if (load) begin
        state_q <= S_RUN;
        iter_q  <= '0;
        no_root <= 1'b0;
        s       <= '0;
        s_valid <= '0;
      end else if (run) begin
        for (int i = 0; i < N; i++) begin
          if (row_idx[i][IW]) begin
            s[i]       <= row_idx[i][IW-1:0];
            s_valid[i] <= 1'b1;
          end
        end
        if (!gnt_any) begin
          no_root <= 1'b1;
          done    <= 1'b1;
          state_q <= S_IDLE;
        end else if (iter_q == CW'(N - 1)) begin
          done    <= 1'b1;
          state_q <= S_IDLE;
        end else begin
          iter_q <= iter_q + CW'(1);
        end
      end
    end
  end

  // Protocol rules of the buses.
  a_one_grant : assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(row_gnt));
  a_grant_is_request : assert property (@(posedge clk) disable iff (!rst_n)
    (row_gnt & ~row_req) == '0);
  a_one_column_masked : assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(col_mask));
  a_one_row_masked : assert property (@(posedge clk) disable iff (!rst_n)
    row_mask == row_gnt);
  a_grant_row : assert property (@(posedge clk) disable iff (!rst_n)
    gnt_any |-> row_idx[gnt_idx][IW]);

endmodule

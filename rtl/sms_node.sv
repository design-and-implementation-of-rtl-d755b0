// sms_node: processing element n_{i,j} of the scheduler array.
//
// The node stands for entry a_{i,j} of the ranking matrix, i.e. the pair
// (man i, woman j). It holds two rank registers: h, the rank of woman j in
// man i's list, and v, the rank of man i in woman j's list. As rows and
// columns are removed, h and v are decremented so that they always give the
// pair's rank among the partners still unmatched. A node with (h,v) = (1,1)
// has no incoming edge in the dependency graph: it is a root, and a root is
// always a pair of the stable matching.
//
// One iteration takes one clock cycle (run = 1):
//   * a root drives req_o on its row bus;
//   * if the controller grants that row (gnt_i), the node "wins": it drives
//     the mask line of its row bus and of its column bus, drives its column
//     index on the row's index lines and clears itself;
//   * every node that sees a mask on its row bus drives its v on its column
//     bus, and every node that sees a mask on its column bus drives its h on
//     its row bus; both kinds of node are then cleared to (0,0) (removed);
//   * every other node compares its h with the value on its row bus and its
//     v with the value on its column bus, and decrements each that is larger.
// A bus value of 0 means that nothing was driven, so nothing is decremented.
//
// Interface: load captures (h_in, v_in) and overrides everything else;
// all bus outputs are 0 unless the node has something to drive. The
// request, mask, value and index outputs are combinational from the
// registers and the bus inputs; h and v change on the rising clock edge.
//
// The index output carries the constant COL, so in a given instance the
// zero bits of COL are tied low; that is the node telling its own position.
//
// The root test, the grant, the mask and the compare-and-decrement rule
// follow the document. Clearing the masked nodes (not only the root) to
// (0,0) so that 0 marks a removed node, doing the h and v comparisons in
// parallel in the same cycle (the document lists one comparator and one
// adder per node), and the synchronous active-low reset are this design's
// choices.
module sms_node
  import sms_pkg::*;
#(
  parameter  int unsigned N   = 4,
  parameter  int unsigned COL = 0,  // column index j of this node (0-based)
  localparam int unsigned RW  = rank_w(N),
  localparam int unsigned IW  = idx_w(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  // initial ranks (wr_{i,j}, mr_{j,i})
  input  logic          load,
  input  logic [RW-1:0] h_in,
  input  logic [RW-1:0] v_in,
  // iteration enable
  input  logic          run,
  // row bus r_i
  output logic          req_o,        // request line to the controller
  input  logic          gnt_i,        // grant sent back by the controller
  input  logic          row_mask_i,
  input  logic [RW-1:0] row_val_i,
  output logic [RW-1:0] row_val_o,    // h, when the column is masked
  output logic          idx_valid_o,  // index output s_i
  output logic [IW-1:0] idx_o,
  // column bus c_j
  input  logic          col_mask_i,
  input  logic [RW-1:0] col_val_i,
  output logic [RW-1:0] col_val_o,    // v, when the row is masked
  // mask, driven onto both the row and the column bus
  output logic          mask_o
);

  logic [RW-1:0] h_q, v_q;
  logic          root;
  logic          win;
  logic          removed;

  // Kept as separate continuous assignments: request, grant and mask form a
  // chain through the controller that must not look like a loop.
  assign root        = (h_q == RW'(1)) && (v_q == RW'(1));
  assign req_o       = run && root;
  assign win         = req_o && gnt_i;
  assign mask_o      = win;
  assign idx_valid_o = win;
  assign idx_o       = win ? IW'(COL) : '0;
  assign col_val_o   = (run && row_mask_i) ? v_q : '0;
  assign row_val_o   = (run && col_mask_i) ? h_q : '0;
  assign removed     = row_mask_i || col_mask_i;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      h_q <= '0;
      v_q <= '0;
    end else if (load) begin
      h_q <= h_in;
      v_q <= v_in;
    end else if (run) begin
      if (removed) begin
        h_q <= '0;
        v_q <= '0;
      end else begin
        if (row_val_i != '0 && h_q > row_val_i) h_q <= h_q - RW'(1);
        if (col_val_i != '0 && v_q > col_val_i) v_q <= v_q - RW'(1);
      end
    end
  end

endmodule

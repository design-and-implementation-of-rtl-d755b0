// sms_controller: bus arbiter of the scheduler.
//
// The request lines of the N row buses come into this block. When more than
// one row requests (several root nodes exist at once), the row with the
// smallest index is granted: a fixed-priority encoder whose encoded result is
// also decoded back into a one-hot grant, one line per row bus.
//
// Interface: req_i[i] is row bus i's request line; gnt_o[i] the grant sent
// back to that bus; gnt_idx_o the encoded index of the granted row and any_o
// whether any row requested. Purely combinational.
//
// Minimum-row-index priority is the document's; the one-hot decode of the
// grant is this design's way of sending it back to the bus.
module sms_controller
  import sms_pkg::*;
#(
  parameter  int unsigned N  = 4,
  localparam int unsigned IW = idx_w(N)
) (
  input  logic [N-1:0]  req_i,
  output logic [N-1:0]  gnt_o,
  output logic [IW-1:0] gnt_idx_o,
  output logic          any_o
);

  // Priority encoder: scan from the highest row down so that the lowest
  // requesting row is the last one written.
  always_comb begin
    gnt_idx_o = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req_i[i]) gnt_idx_o = IW'(i);
    end
  end

  assign any_o = |req_i;

  always_comb begin
    gnt_o = '0;
    if (any_o) gnt_o[gnt_idx_o] = 1'b1;
  end

endmodule

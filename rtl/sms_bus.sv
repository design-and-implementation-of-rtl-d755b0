// sms_bus: one line group of a row bus r_i or column bus c_j.
//
// Every node on a row (column) is tied to that row's (column's) bus. A node
// that has something to say drives its value, every other node drives 0, and
// the bus carries the OR of all drivers back to every node on it: a wired-OR
// broadcast. The scheduler's protocol guarantees that at most one node drives
// a nonzero value on a given line group in any cycle, so the OR is exactly
// the value of that node, and 0 means "nothing on the bus".
//
// Interface: drv_i[k] is the driver of the k-th node on the bus, bus_o the
// merged value. Purely combinational, no clock.
//
// The document gives the buses' role (broadcast to the nodes of one row or
// column, request line to the controller); modelling them as a wired-OR and
// splitting each bus into separate line groups (request, mask, value, index)
// is this design's choice.
module sms_bus #(
  parameter int unsigned N = 4,  // nodes on the bus
  parameter int unsigned W = 1   // width of this line group
) (
  input  logic [N-1:0][W-1:0] drv_i,
  output logic [W-1:0]        bus_o
);

  always_comb begin
    bus_o = '0;
    for (int k = 0; k < N; k++) begin
      bus_o |= drv_i[k];
    end
  end

endmodule

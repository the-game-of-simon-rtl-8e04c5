// flop: two-phase master-slave flip-flop.
//
// A master latch transparent during ph2 feeds a slave latch transparent
// during ph1. With non-overlapping clocks this behaves as an edge-triggered
// register: d is sampled at the end of ph2 and q changes when ph1 rises.
// This two-latch construction follows the original design.
module flop #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             ph1,
  input  logic             ph2,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] mid;

  latch #(.WIDTH(WIDTH)) master (.ph(ph2), .d(d),   .q(mid));
  latch #(.WIDTH(WIDTH)) slave  (.ph(ph1), .d(mid), .q(q));
endmodule

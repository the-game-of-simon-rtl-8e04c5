// flopr: two-phase master-slave flip-flop with reset.
//
// Same as flop, but the master latch loads zero while reset is high during
// ph2, so q becomes zero at the following rise of ph1 (a reset sampled like
// data, not an asynchronous clear).
module flopr #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             ph1,
  input  logic             ph2,
  input  logic             reset,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] mid;

  latchr #(.WIDTH(WIDTH)) master (.ph(ph2), .reset(reset), .d(d), .q(mid));
  latch  #(.WIDTH(WIDTH)) slave  (.ph(ph1), .d(mid), .q(q));
endmodule

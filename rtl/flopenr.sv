// flopenr: two-phase flip-flop with enable and reset.
//
// A 2:1 multiplexer keeps q when en is low and loads d when en is high; the
// result goes to a resettable two-phase flip-flop, so reset wins over enable.
// Timing as flop: sampled at the end of ph2, updated when ph1 rises.
// The lint tool reports q -> d_en -> q as a combinational loop; the path
// passes through the master and slave latches, which are never transparent
// at the same time with non-overlapping phases, so it is not a real loop.
module flopenr #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             ph1,
  input  logic             ph2,
  input  logic             reset,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] d_en;

  assign d_en = en ? d : q;

  flopr #(.WIDTH(WIDTH)) f (.ph1(ph1), .ph2(ph2), .reset(reset), .d(d_en), .q(q));
endmodule

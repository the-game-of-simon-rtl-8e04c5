// latchr: level-sensitive D latch with synchronous-to-phase reset.
//
// Transparent while ph is high; while ph is high and reset is high it loads
// zero instead of d. Used as the master stage of resettable two-phase
// flip-flops, so reset takes effect at the next phase-1 update. The storage
// is a latch by intent.
module latchr #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             ph,
  input  logic             reset,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_latch begin
    if (ph) q = reset ? '0 : d;
  end
endmodule

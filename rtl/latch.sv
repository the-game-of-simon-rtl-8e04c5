// latch: level-sensitive D latch, transparent while ph is high.
//
// Building block of the two-phase master-slave flip-flops used throughout
// the Simon core. Clocked by one phase of a non-overlapping two-phase clock,
// so the storage is a latch by intent.
module latch #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             ph,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_latch begin
    if (ph) q = d;
  end
endmodule

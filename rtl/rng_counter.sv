// rng_counter: free-running 2-bit counter used as the colour source.
//
// The counter advances by one on every clock cycle (every rise of ph1) for as
// long as the chip is powered, and is deliberately not cleared by the game
// reset. Because the player's reaction time decides in which cycle a new
// sequence term is sampled, its value at that moment serves as a random
// colour code (0 red, 1 blue, 2 green, 3 yellow). Built, as in the original
// design, from one two-phase register and an incrementer. It has no reset, so
// its power-up value is arbitrary.
// The lint tool reports count_out -> incrementer -> count_out as a
// combinational loop; it passes through two latches that are never
// transparent together (non-overlapping phases), so it is not a real loop.
module rng_counter (
  input  logic       ph1,
  input  logic       ph2,
  output logic [1:0] count_out
);
  logic [1:0] count_next;

  assign count_next = count_out + 2'd1;

  flop #(.WIDTH(2)) countflop (.ph1(ph1), .ph2(ph2), .d(count_next), .q(count_out));
endmodule

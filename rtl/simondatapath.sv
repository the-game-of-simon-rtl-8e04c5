// simondatapath: position and score counters of the Simon game.
//
// curr_pos is the sequence memory position being written, played back or
// checked; score is the length of the current sequence. Both are 7-bit
// two-phase registers with enable and reset: curr_pos increments when
// curr_posinc is high and clears on reset or resetcurr_pos; score increments
// when scoreinc is high and clears on reset. A clear wins over an increment.
// mem_in is the random colour, registered once so that it is stable for the
// whole cycle in which the controller writes it to memory. All outputs change
// when ph1 rises, from controls sampled at the end of ph2.
// The counter feedback (q + 1 back to d) is reported by the lint tool as a
// combinational loop; it passes through the two-phase master and slave
// latches, never transparent together, so it is not a real loop.
module simondatapath
  import simon_pkg::*;
(
  input  logic               ph1,
  input  logic               ph2,
  input  logic               reset,
  input  logic               curr_posinc,
  input  logic               scoreinc,
  input  logic               resetcurr_pos,
  input  logic [1:0]         rng_out,
  output logic [SCORE_W-1:0] score,
  output logic [SCORE_W-1:0] curr_pos,
  output logic [1:0]         mem_in
);
  flopenr #(.WIDTH(SCORE_W)) curr_pos_flop (
    .ph1(ph1), .ph2(ph2), .reset(reset | resetcurr_pos), .en(curr_posinc),
    .d(curr_pos + SCORE_W'(1)), .q(curr_pos)
  );

  flopenr #(.WIDTH(SCORE_W)) score_flop (
    .ph1(ph1), .ph2(ph2), .reset(reset), .en(scoreinc),
    .d(score + SCORE_W'(1)), .q(score)
  );

  flop #(.WIDTH(2)) add_term_flop (.ph1(ph1), .ph2(ph2), .d(rng_out), .q(mem_in));
endmodule

// simonstatelogic: state register and next-state logic of the game FSM.
//
// States and their successors:
//   START      -> PRE_OUTPUT   (a new random term is written meanwhile)
//   PRE_OUTPUT -> OUTPUT_SEQ
//   OUTPUT_SEQ -> OUTPUT_SEQ until curr_pos == score, then POST_OUT
//   POST_OUT   -> INPUT_SEQ
//   INPUT_SEQ  -> CHECK when the input handler reports a valid press
//   CHECK      -> CHECK_WIN if the pressed colour equals the stored one,
//                 else LOSE
//   CHECK_WIN  -> INPUT_SEQ while curr_pos != score; at the end of the
//                 sequence START, or WIN once score == MAX_STAGES
//   LOSE, WIN  -> stay until reset
// Any code outside the list goes to START. Reset forces START through a
// multiplexer in front of the two-phase state register, so it is sampled at
// the end of ph2 like any other input and takes effect when ph1 rises.
// The state feedback through the next-state logic is reported by the lint
// tool as a combinational loop; it crosses the ph2 master and ph1 slave
// latches of the state register, never transparent together, so it is
// not a real loop.
module simonstatelogic
  import simon_pkg::*;
#(
  parameter int unsigned MAX_STAGES_P = MAX_STAGES
) (
  input  logic               ph1,
  input  logic               ph2,
  input  logic               reset,
  input  logic [SCORE_W-1:0] curr_pos,
  input  logic [SCORE_W-1:0] score,
  input  button_t            button_out,
  input  logic [1:0]         mem_out,
  output state_t             state
);
  state_t     nextstate;
  logic [3:0] ns;
  logic [3:0] state_q;

  always_comb begin
    unique case (state)
      S_START:      nextstate = S_PRE_OUTPUT;
      S_PRE_OUTPUT: nextstate = S_OUTPUT_SEQ;
      S_OUTPUT_SEQ: nextstate = (score == curr_pos) ? S_POST_OUT : S_OUTPUT_SEQ;
      S_POST_OUT:   nextstate = S_INPUT_SEQ;
      S_INPUT_SEQ:  nextstate = button_out.valid ? S_CHECK : S_INPUT_SEQ;
      S_CHECK:      nextstate = (button_out.color == color_t'(mem_out)) ? S_CHECK_WIN : S_LOSE;
      S_CHECK_WIN: begin
        if (score != curr_pos)                     nextstate = S_INPUT_SEQ;
        else if (score == SCORE_W'(MAX_STAGES_P)) nextstate = S_WIN;
        else                                       nextstate = S_START;
      end
      S_LOSE:       nextstate = S_LOSE;
      S_WIN:        nextstate = S_WIN;
      default:      nextstate = S_START;
    endcase
  end

  assign ns = reset ? S_START : nextstate;

  flop #(.WIDTH(4)) statereg (.ph1(ph1), .ph2(ph2), .d(ns), .q(state_q));

  assign state = state_t'(state_q);
endmodule

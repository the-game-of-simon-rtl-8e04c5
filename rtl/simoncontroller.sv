// simoncontroller: game controller, the FSM split into state logic
// (simonstatelogic: next state and state register) and output logic
// (simonoutputlogic: Moore decode of enables, lamps and cheat output).
// The current state is also brought out for observation. Timing: the state
// changes when ph1 rises; all other outputs are combinational from it.
module simoncontroller
  import simon_pkg::*;
#(
  parameter int unsigned MAX_STAGES_P = MAX_STAGES
) (
  input  logic               ph1,
  input  logic               ph2,
  input  logic               reset,
  input  button_t            button_out,
  input  logic [1:0]         mem_out,
  input  logic [SCORE_W-1:0] curr_pos,
  input  logic [SCORE_W-1:0] score,
  output logic [2:0]         cheat_out,
  output logic               scoreinc,
  output logic               curr_posinc,
  output logic               resetcurr_pos,
  output logic               write_en,
  output logic               read_en,
  output logic               input_en,
  output logic               r_out,
  output logic               g_out,
  output logic               b_out,
  output logic               y_out,
  output state_t             state
);
  simonstatelogic #(.MAX_STAGES_P(MAX_STAGES_P)) ssl (
    .ph1(ph1), .ph2(ph2), .reset(reset), .curr_pos(curr_pos), .score(score),
    .button_out(button_out), .mem_out(mem_out), .state(state)
  );

  simonoutputlogic sol (
    .state(state), .mem_out(mem_out), .score(score), .curr_pos(curr_pos),
    .cheat_out(cheat_out), .scoreinc(scoreinc), .curr_posinc(curr_posinc),
    .resetcurr_pos(resetcurr_pos), .write_en(write_en), .read_en(read_en),
    .input_en(input_en), .r_out(r_out), .g_out(g_out), .b_out(b_out), .y_out(y_out)
  );
endmodule

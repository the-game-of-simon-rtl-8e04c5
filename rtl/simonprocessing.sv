// simonprocessing: game processor = controller plus datapath.
//
// The controller (FSM) issues increment/clear enables to the datapath
// counters and receives score and curr_pos back; the datapath registers the
// random colour into mem_in for the memory write. Memory control (write_en,
// read_en, curr_pos as address), the input enable for the button decoder,
// the four lamps, score and the cheat output leave the block. All registers
// are two-phase (sampled at the end of ph2, updated when ph1 rises).
// Loop warnings on score and curr_pos come from the two-phase register
// feedback in the datapath and controller; each such path crosses a ph2
// latch and a ph1 latch, never transparent together, so none is real.
module simonprocessing
  import simon_pkg::*;
#(
  parameter int unsigned MAX_STAGES_P = MAX_STAGES
) (
  input  logic               ph1,
  input  logic               ph2,
  input  logic               reset,
  input  button_t            button_out,
  input  logic [1:0]         rng_out,
  input  logic [1:0]         mem_out,
  output logic               write_en,
  output logic               read_en,
  output logic               r_out,
  output logic               y_out,
  output logic               g_out,
  output logic               b_out,
  output logic               input_en,
  output logic [1:0]         mem_in,
  output logic [SCORE_W-1:0] score,
  output logic [SCORE_W-1:0] curr_pos,
  output logic [2:0]         cheat_out,
  output state_t             state
);
  logic scoreinc, curr_posinc, resetcurr_pos;

  simoncontroller #(.MAX_STAGES_P(MAX_STAGES_P)) sc (
    .ph1(ph1), .ph2(ph2), .reset(reset), .button_out(button_out), .mem_out(mem_out),
    .curr_pos(curr_pos), .score(score), .cheat_out(cheat_out), .scoreinc(scoreinc),
    .curr_posinc(curr_posinc), .resetcurr_pos(resetcurr_pos), .write_en(write_en),
    .read_en(read_en), .input_en(input_en), .r_out(r_out), .g_out(g_out),
    .b_out(b_out), .y_out(y_out), .state(state)
  );

  simondatapath sdp (
    .ph1(ph1), .ph2(ph2), .reset(reset), .curr_posinc(curr_posinc), .scoreinc(scoreinc),
    .resetcurr_pos(resetcurr_pos), .rng_out(rng_out), .score(score), .curr_pos(curr_pos),
    .mem_in(mem_in)
  );
endmodule

// simonoutputlogic: Moore output decoder of the game FSM.
//
// Purely combinational from the state (and, for the playback lights and the
// cheat output, from the memory word and the counters):
//   START      write_en: store the random term at curr_pos
//   PRE_OUTPUT scoreinc and resetcurr_pos: lengthen the sequence, rewind
//   OUTPUT_SEQ while curr_pos != score: read_en, curr_posinc and light the
//              lamp of the colour read (one colour per clock cycle)
//   POST_OUT   resetcurr_pos: rewind for the player's turn
//   INPUT_SEQ  read_en, input_en; cheat_out = {1, expected colour}
//   CHECK      read_en, input_en (the press is compared now), curr_posinc
//   CHECK_WIN  nothing
//   LOSE       red and green lamps on
//   WIN        all four lamps on
// cheat_out is 000 outside INPUT_SEQ; it lets a test harness play the game.
module simonoutputlogic
  import simon_pkg::*;
(
  input  state_t             state,
  input  logic [1:0]         mem_out,
  input  logic [SCORE_W-1:0] score,
  input  logic [SCORE_W-1:0] curr_pos,
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
  output logic               y_out
);
  always_comb begin
    write_en      = 1'b0;
    read_en       = 1'b0;
    scoreinc      = 1'b0;
    curr_posinc   = 1'b0;
    input_en      = 1'b0;
    resetcurr_pos = 1'b0;
    r_out         = 1'b0;
    g_out         = 1'b0;
    b_out         = 1'b0;
    y_out         = 1'b0;
    cheat_out     = 3'b000;
    unique case (state)
      S_START: write_en = 1'b1;
      S_PRE_OUTPUT: begin
        scoreinc      = 1'b1;
        resetcurr_pos = 1'b1;
      end
      S_OUTPUT_SEQ: begin
        if (curr_pos != score) begin
          curr_posinc = 1'b1;
          read_en     = 1'b1;
          unique case (color_t'(mem_out))
            C_RED:    r_out = 1'b1;
            C_BLUE:   b_out = 1'b1;
            C_GREEN:  g_out = 1'b1;
            C_YELLOW: y_out = 1'b1;
          endcase
        end
      end
      S_POST_OUT: resetcurr_pos = 1'b1;
      S_INPUT_SEQ: begin
        read_en   = 1'b1;
        input_en  = 1'b1;
        cheat_out = {1'b1, mem_out};
      end
      S_CHECK: begin
        read_en     = 1'b1;
        input_en    = 1'b1;
        curr_posinc = 1'b1;
      end
      S_CHECK_WIN: ;
      S_LOSE: begin
        r_out = 1'b1;
        g_out = 1'b1;
      end
      S_WIN: begin
        r_out = 1'b1;
        g_out = 1'b1;
        b_out = 1'b1;
        y_out = 1'b1;
      end
      default: ;
    endcase
  end
endmodule

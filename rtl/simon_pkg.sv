// simon_pkg: types and constants shared by the Simon game core.
//
// The game controller is a Moore machine whose state codes are fixed here
// (they follow the state assignment of the original controller, so START is
// 4'b0111 and WIN is 4'b0000). Colours are 2-bit codes: red 0, blue 1,
// green 2, yellow 3. A 7-bit score counts sequence stages; the sequence memory
// has 64 two-bit words addressed by the low 6 bits of the position counter.
// The game is won when a 63-stage sequence has been repeated correctly.
package simon_pkg;

  localparam int unsigned SCORE_W    = 7;   // width of score and curr_pos
  localparam int unsigned ADDR_W     = 6;   // sequence memory address width
  localparam int unsigned MEM_DEPTH  = 64;  // sequence memory words
  localparam int unsigned MAX_STAGES = 63;  // stages needed to win

  typedef enum logic [3:0] {
    S_WIN        = 4'b0000,
    S_PRE_OUTPUT = 4'b0001,
    S_OUTPUT_SEQ = 4'b0010,
    S_POST_OUT   = 4'b0011,
    S_INPUT_SEQ  = 4'b0100,
    S_CHECK      = 4'b0101,
    S_CHECK_WIN  = 4'b0110,
    S_START      = 4'b0111,
    S_LOSE       = 4'b1000
  } state_t;

  typedef enum logic [1:0] {
    C_RED    = 2'd0,
    C_BLUE   = 2'd1,
    C_GREEN  = 2'd2,
    C_YELLOW = 2'd3
  } color_t;

  // Output of the button input handler: valid bit and colour code.
  typedef struct packed {
    logic   valid;
    color_t color;
  } button_t;

endpackage

// input_handler: button decoder ("decodermux") of the Simon game.
//
// Turns the four colour buttons into a 3-bit code {valid, colour}. Exactly one
// pressed button gives valid = 1 and its colour (red 100, blue 101,
// green 110, yellow 111); no button or more than one button gives 000, so
// mashing several buttons at once is ignored. When en is low the output is
// forced to 000. Purely combinational; the buttons are expected to be
// debounced outside the chip.
//
// The original circuit selects one of five constants onto a shared tri-state
// bus; here the same selection is written as a case statement.
module input_handler
  import simon_pkg::*;
(
  input  logic    r,
  input  logic    g,
  input  logic    b,
  input  logic    y,
  input  logic    en,
  output button_t color_out
);
  button_t decoded;

  always_comb begin
    unique case ({y, g, b, r})
      4'b0001: decoded = '{valid: 1'b1, color: C_RED};
      4'b0010: decoded = '{valid: 1'b1, color: C_BLUE};
      4'b0100: decoded = '{valid: 1'b1, color: C_GREEN};
      4'b1000: decoded = '{valid: 1'b1, color: C_YELLOW};
      default: decoded = '{valid: 1'b0, color: C_RED};
    endcase
  end

  assign color_out = en ? decoded : '{valid: 1'b0, color: C_RED};
endmodule
